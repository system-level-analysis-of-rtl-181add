// ni_master_ctrl: the NI's AXI4 master port into the cluster interconnect.
//
// The NI reaches the CPUs' local data memories through this port, acting like
// a DMA controller (document, Figure 2). Two clients share it:
//   * Send Control reads channel descriptors and buffer data. Its AR/R
//     channels pass straight through, so it can keep several bursts in flight
//     and receive one 64-bit beat per cycle.
//   * Send Control and Recv Control both write single 64-bit words (received
//     flit payloads, mutex updates). A round-robin arbiter picks one write
//     request per cycle and issues its AW and W beats together (each may be
//     accepted in a different cycle).
// Writes are not acknowledged back to the clients; the port counts the
// writes whose B response is still outstanding. A request marked fence waits
// until that count is zero, so a mutex written after the data of a buffer can
// never become visible before the data (the interconnect may answer writes to
// different memories out of order). The arbitration, the fence and the single
// AXI ID are this design's choices; the document gives only that the NI has
// an AXI master port.
module ni_master_ctrl
  import noc_pkg::*;
#(
  parameter int unsigned MAX_OUTSTANDING = 15
) (
  input  logic     clk,
  input  logic     rst_n,
  // read client (Send Control)
  input  axi_ax_t  rd_ar,
  input  logic     rd_ar_valid,
  output logic     rd_ar_ready,
  output axi_r_t   rd_r,
  output logic     rd_r_valid,
  input  logic     rd_r_ready,
  // write clients: 0 = Send Control, 1 = Recv Control
  input  wr_req_t  wr_req   [2],
  input  logic     wr_valid [2],
  output logic     wr_ready [2],
  // status
  output logic     wr_busy,
  // AXI4 master
  output axi_req_t m_axi_req,
  input  axi_rsp_t m_axi_rsp
);
  localparam int unsigned CNT_W = $clog2(MAX_OUTSTANDING + 1);

  logic [CNT_W-1:0] outstanding;
  logic             aw_done, w_done;     // parts of the current write already taken
  logic             busy;                // a write is being issued
  wr_req_t          cur;
  logic             rr_last;             // client served last
  logic             issue_ok;
  logic [1:0]       req_ok;
  logic             pick;
  logic             load;                // take a new request this cycle
  logic             aw_hs, w_hs, b_hs, wr_finish;

  // ------------------------------------------------------------- reads
  always_comb begin
    m_axi_req.ar       = rd_ar;
    m_axi_req.ar_valid = rd_ar_valid;
    rd_ar_ready        = m_axi_rsp.ar_ready;
    rd_r               = m_axi_rsp.r;
    rd_r_valid         = m_axi_rsp.r_valid;
    m_axi_req.r_ready  = rd_r_ready;
  end

  // ------------------------------------------------------------- writes
  // the write being issued counts as outstanding once it completes
  assign issue_ok = ({1'b0, outstanding} + (CNT_W+1)'(busy)) < (CNT_W+1)'(MAX_OUTSTANDING);
  always_comb begin
    for (int c = 0; c < 2; c++)
      req_ok[c] = wr_valid[c] && issue_ok && (!wr_req[c].fence || (outstanding == '0 && !busy));
  end

  // round-robin between the two clients
  always_comb begin
    if (req_ok[0] && req_ok[1]) pick = !rr_last;
    else                        pick = req_ok[1];
  end

  always_comb begin
    wr_ready[0] = load && (pick == 1'b0);
    wr_ready[1] = load && (pick == 1'b1);
  end

  assign aw_hs     = m_axi_req.aw_valid && m_axi_rsp.aw_ready;
  assign w_hs      = m_axi_req.w_valid && m_axi_rsp.w_ready;
  assign b_hs      = m_axi_rsp.b_valid && m_axi_req.b_ready;
  assign wr_finish = busy && (aw_done || aw_hs) && (w_done || w_hs);

  // a new request is taken when idle or as the current one completes
  assign load = (!busy || wr_finish) && (req_ok != 2'b00);

  always_comb begin
    m_axi_req.aw.id    = '0;
    m_axi_req.aw.addr  = cur.addr;
    m_axi_req.aw.len   = 8'd0;
    m_axi_req.aw.size  = AXI_SIZE_8B;
    m_axi_req.aw.burst = AXI_INCR;
    m_axi_req.aw_valid = busy && !aw_done;
    m_axi_req.w.data   = cur.data;
    m_axi_req.w.strb   = '1;
    m_axi_req.w.last   = 1'b1;
    m_axi_req.w_valid  = busy && !w_done;
    m_axi_req.b_ready  = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy        <= 1'b0;
      aw_done     <= 1'b0;
      w_done      <= 1'b0;
      rr_last     <= 1'b1;
      outstanding <= '0;
      cur         <= '0;
    end else begin
      if (load) begin
        busy    <= 1'b1;
        rr_last <= pick;
        cur     <= wr_req[pick];
        aw_done <= 1'b0;
        w_done  <= 1'b0;
      end else if (wr_finish) begin
        busy    <= 1'b0;
        aw_done <= 1'b0;
        w_done  <= 1'b0;
      end else if (busy) begin
        if (aw_hs) aw_done <= 1'b1;
        if (w_hs)  w_done  <= 1'b1;
      end
      case ({wr_finish, b_hs})
        2'b10:   outstanding <= outstanding + 1'b1;
        2'b01:   outstanding <= outstanding - 1'b1;
        default: ;
      endcase
    end
  end

  assign wr_busy = busy || (outstanding != '0);

  // AXI: a valid request is held until it is accepted
  a_aw_stable: assert property (@(posedge clk) disable iff (!rst_n)
    m_axi_req.aw_valid && !m_axi_rsp.aw_ready |=> m_axi_req.aw_valid && $stable(m_axi_req.aw));
  a_w_stable: assert property (@(posedge clk) disable iff (!rst_n)
    m_axi_req.w_valid && !m_axi_rsp.w_ready |=> m_axi_req.w_valid && $stable(m_axi_req.w));
  a_no_stray_b: assert property (@(posedge clk) disable iff (!rst_n)
    b_hs |-> outstanding != '0 || wr_finish);

endmodule
