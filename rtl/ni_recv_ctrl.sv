// ni_recv_ctrl: Recv Control of the NI, with the flow-ID look-up table.
//
// Flits from the NoC may belong to different packets and interleave, so each
// flit is handled on its own: its flow ID (unique within this NI) selects a
// LUT entry {data_base, mutex_ptr} configured beforehand by a CPU, and
//   * a DATA flit's payload is written to data_base + 8 * offset,
//   * after the last flit of a buffer (or for a SYNC flit) MUTEX_SET is
//     written to mutex_ptr, marked as a fence so it is issued only after all
//     earlier data writes have been acknowledged. The receiving CPU waiting in
//     getReadBuf then sees a complete buffer.
// Writes go out through Master Control (valid/ready). The per-flit handling,
// the LUT contents (data and mutex pointer) and the two LUT implementations
// follow the document; the offset field, the fence and the value written to
// the mutex are this design's choices.
//
// Timing: with LUT_SRAM = 1 the flit is registered while the LUT is read, so
// its write request appears one cycle after the flit is accepted. With
// LUT_SRAM = 0 (register LUT) the lookup is combinational and the request
// leaves in the cycle the flit arrives: one cycle less, as the document
// states. A data flit takes one write cycle, a last data flit two.
module ni_recv_ctrl
  import noc_pkg::*;
#(
  parameter int unsigned LUT_ENTRIES = 256,
  parameter bit          LUT_SRAM    = 1'b1
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // flits from the NoC
  input  logic                           flit_valid,
  output logic                           flit_ready,
  input  flit_t                          flit,
  // LUT configuration (from Slave Control)
  input  logic                           lut_we,
  input  logic [$clog2(LUT_ENTRIES)-1:0] lut_waddr,
  input  lut_entry_t                     lut_wdata,
  // memory writes (through Master Control)
  output wr_req_t                        wr_req,
  output logic                           wr_valid,
  input  logic                           wr_ready,
  output logic                           busy
);
  localparam int unsigned IDX_W = $clog2(LUT_ENTRIES);

  logic       cur_valid;
  flit_t      cur;
  lut_entry_t entry;
  logic       lut_re;
  logic [IDX_W-1:0] lut_raddr;
  logic       phase;          // 1: data written, mutex write pending
  logic       need_data, need_mutex, doing_mutex, op_done, flit_done;

  ni_lut #(.ENTRIES(LUT_ENTRIES), .SRAM(LUT_SRAM)) u_lut (
    .clk, .rst_n,
    .we(lut_we), .waddr(lut_waddr), .wdata(lut_wdata),
    .re(lut_re), .raddr(lut_raddr), .rdata(entry)
  );

  if (LUT_SRAM) begin : g_stage
    // flit register alongside the synchronous LUT read
    logic s_valid;
    flit_t s_flit;
    assign flit_ready = !s_valid || flit_done;
    assign lut_re     = flit_valid && flit_ready;
    assign lut_raddr  = flit.hdr.flow_id[IDX_W-1:0];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        s_valid <= 1'b0;
        s_flit  <= '0;
      end else if (flit_ready) begin
        s_valid <= flit_valid;
        if (flit_valid) s_flit <= flit;
      end
    end
    assign cur_valid = s_valid;
    assign cur       = s_flit;
  end else begin : g_direct
    assign cur_valid  = flit_valid;
    assign cur        = flit;
    assign lut_re     = 1'b1;
    assign lut_raddr  = flit.hdr.flow_id[IDX_W-1:0];
    assign flit_ready = flit_done;
  end

  assign need_data   = (cur.hdr.kind == FLIT_DATA);
  assign need_mutex  = cur.hdr.last || (cur.hdr.kind == FLIT_SYNC);
  assign doing_mutex = phase || !need_data;

  always_comb begin
    wr_valid = cur_valid && (!doing_mutex || need_mutex);
    if (doing_mutex) begin
      wr_req.addr  = entry.mutex_ptr;
      wr_req.data  = MUTEX_SET;
      wr_req.fence = 1'b1;
    end else begin
      wr_req.addr  = entry.data_base + AXI_ADDR_W'({cur.hdr.offset, 3'b000});
      wr_req.data  = cur.data;
      wr_req.fence = 1'b0;
    end
  end

  assign op_done   = wr_valid && wr_ready;
  assign flit_done = op_done && (doing_mutex || !need_mutex);
  assign busy      = cur_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         phase <= 1'b0;
    else if (flit_done) phase <= 1'b0;
    else if (op_done)   phase <= 1'b1;
  end

endmodule
