// ni_slave_ctrl: the NI's AXI4 slave port, through which every CPU of the
// cluster configures the NI and hands it send requests (document, Figure 2).
//
// Register map (byte offsets in the NI's address window, 64-bit accesses):
//   0x0000  SEND    write: push a send request; wdata[31:0] is the pointer to
//                   the channel descriptor in the sending CPU's memory.
//                   If the send FIFO is full the write response is held back
//                   until there is room.
//   0x0008  STATUS  read: [7:0] requests waiting in the send FIFO,
//                   [8] Send Control busy, [9] Recv Control busy,
//                   [10] writes of the master port outstanding.
//   addr[15] = 1    LUT entry addr[14:3]: write {mutex_ptr, data_base}.
// The document gives that CPUs configure the NI and post send requests through
// this port and that a request is a single pointer; the map, the 64-bit
// entry write and the reply codes are this design's choices.
//
// One access at a time: a write completes (B) before the next AW/W is taken,
// a read returns its single beat before the next AR. Bursts are not
// supported (len must be 0); other offsets read as 0 and writes there are
// ignored, both answered OKAY.
module ni_slave_ctrl
  import noc_pkg::*;
#(
  parameter int unsigned LUT_ENTRIES = 256,
  parameter int unsigned FIFO_CNT_W  = 4
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  axi_req_t                       s_axi_req,
  output axi_rsp_t                       s_axi_rsp,
  // send request to the Send Control FIFO
  output logic                           send_valid,
  input  logic                           send_ready,
  output addr_t                          send_ptr,
  // LUT configuration
  output logic                           lut_we,
  output logic [$clog2(LUT_ENTRIES)-1:0] lut_waddr,
  output lut_entry_t                     lut_wdata,
  // status inputs
  input  logic [FIFO_CNT_W-1:0]          fifo_count,
  input  logic                           send_busy,
  input  logic                           recv_busy,
  input  logic                           wr_busy
);
  typedef enum logic [1:0] {W_IDLE, W_EXEC, W_RESP} wstate_e;

  wstate_e        wstate;
  logic           aw_got, w_got;
  axi_ax_t        aw_q;
  data_t          wdata_q;
  logic [AXI_ID_W-1:0] rid_q;
  logic           r_pending;
  data_t          rdata_q;
  logic           is_lut, is_send;

  assign is_lut  = aw_q.addr[NI_LUT_SEL_BIT];
  assign is_send = !is_lut && (aw_q.addr[14:0] == NI_REG_SEND[14:0]);

  // ------------------------------------------------------------- writes
  assign s_axi_rsp.aw_ready = (wstate == W_IDLE) && !aw_got;
  assign s_axi_rsp.w_ready  = (wstate == W_IDLE) && !w_got;
  assign s_axi_rsp.b_valid  = (wstate == W_RESP);
  assign s_axi_rsp.b.id     = aw_q.id;
  assign s_axi_rsp.b.resp   = AXI_OKAY;

  assign send_valid = (wstate == W_EXEC) && is_send;
  assign send_ptr   = wdata_q[AXI_ADDR_W-1:0];
  assign lut_we     = (wstate == W_EXEC) && is_lut;
  assign lut_waddr  = aw_q.addr[3 +: $clog2(LUT_ENTRIES)];
  assign lut_wdata  = lut_entry_t'(wdata_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wstate  <= W_IDLE;
      aw_got  <= 1'b0;
      w_got   <= 1'b0;
      aw_q    <= '0;
      wdata_q <= '0;
    end else begin
      unique case (wstate)
        W_IDLE: begin
          if (s_axi_req.aw_valid && !aw_got) begin
            aw_q   <= s_axi_req.aw;
            aw_got <= 1'b1;
          end
          if (s_axi_req.w_valid && !w_got) begin
            wdata_q <= s_axi_req.w.data;
            w_got   <= 1'b1;
          end
          if ((aw_got || s_axi_req.aw_valid) && (w_got || s_axi_req.w_valid))
            wstate <= W_EXEC;
        end
        W_EXEC: begin
          if (!is_send || send_ready) wstate <= W_RESP;
        end
        W_RESP: begin
          if (s_axi_req.b_ready) begin
            wstate <= W_IDLE;
            aw_got <= 1'b0;
            w_got  <= 1'b0;
          end
        end
        default: wstate <= W_IDLE;
      endcase
    end
  end

  // -------------------------------------------------------------- reads
  assign s_axi_rsp.ar_ready = !r_pending;
  assign s_axi_rsp.r_valid  = r_pending;
  assign s_axi_rsp.r.id     = rid_q;
  assign s_axi_rsp.r.data   = rdata_q;
  assign s_axi_rsp.r.resp   = AXI_OKAY;
  assign s_axi_rsp.r.last   = 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_pending <= 1'b0;
      rid_q     <= '0;
      rdata_q   <= '0;
    end else if (!r_pending) begin
      if (s_axi_req.ar_valid) begin
        r_pending <= 1'b1;
        rid_q     <= s_axi_req.ar.id;
        rdata_q   <= '0;
        if (!s_axi_req.ar.addr[NI_LUT_SEL_BIT] &&
            s_axi_req.ar.addr[14:0] == NI_REG_STATUS[14:0]) begin
          rdata_q[7:0] <= 8'(fifo_count);
          rdata_q[8]   <= send_busy;
          rdata_q[9]   <= recv_busy;
          rdata_q[10]  <= wr_busy;
        end
      end
    end else if (s_axi_req.r_ready) begin
      r_pending <= 1'b0;
    end
  end

  a_single_beat_w: assert property (@(posedge clk) disable iff (!rst_n)
    s_axi_req.aw_valid |-> s_axi_req.aw.len == 8'd0);
  a_single_beat_r: assert property (@(posedge clk) disable iff (!rst_n)
    s_axi_req.ar_valid |-> s_axi_req.ar.len == 8'd0);

endmodule
