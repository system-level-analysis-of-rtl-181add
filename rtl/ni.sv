// ni: network interface between one CPU cluster and its NoC router.
//
// The NI bridges the cluster's address-based AXI4 interconnect and the
// packet-based NoC, and works like a DMA controller: it reads whole buffers
// out of a sending CPU's local data memory, sends them as flits, and writes
// arriving flits straight into the receiving CPU's local memory, so CPUs only
// post requests and wait on mutexes. It is built from the four parts of the
// document's block diagram:
//   ni_slave_ctrl   AXI slave: CPUs post send requests, configure the LUT,
//                   read status
//   ni_send_ctrl    request FIFO, descriptor and buffer reads, flit output
//   ni_recv_ctrl    flow-ID LUT (SRAM or registers), writes of arriving flits
//   ni_master_ctrl  AXI master shared by Send (reads, mutex write) and Recv
//                   (data and mutex writes)
// Interface: AXI4 slave and master (64-bit data), one flit link to the
// router and one from it (valid/ready). One flit can leave and one arrive per
// clock cycle.
module ni
  import noc_pkg::*;
#(
  parameter int unsigned LUT_ENTRIES     = 256,
  parameter bit          LUT_SRAM        = 1'b1,
  parameter int unsigned SEND_FIFO_DEPTH = 8,
  parameter int unsigned BURST_MAX       = 16
) (
  input  logic     clk,
  input  logic     rst_n,
  // cluster side
  input  axi_req_t s_axi_req,
  output axi_rsp_t s_axi_rsp,
  output axi_req_t m_axi_req,
  input  axi_rsp_t m_axi_rsp,
  // NoC side
  output logic     tx_valid,
  input  logic     tx_ready,
  output flit_t    tx_flit,
  input  logic     rx_valid,
  output logic     rx_ready,
  input  flit_t    rx_flit
);
  localparam int unsigned FCNT_W = $clog2(SEND_FIFO_DEPTH + 1);

  logic        send_valid, send_ready;
  addr_t       send_ptr;
  logic [FCNT_W-1:0] fifo_count;
  logic        send_busy, recv_busy, wr_busy;
  logic        lut_we;
  logic [$clog2(LUT_ENTRIES)-1:0] lut_waddr;
  lut_entry_t  lut_wdata;
  axi_ax_t     ar;
  logic        ar_valid, ar_ready, r_valid, r_ready;
  axi_r_t      r;
  wr_req_t     wr_req   [2];
  logic        wr_valid [2];
  logic        wr_ready [2];

  ni_slave_ctrl #(.LUT_ENTRIES(LUT_ENTRIES), .FIFO_CNT_W(FCNT_W)) u_slave (
    .clk, .rst_n, .s_axi_req, .s_axi_rsp,
    .send_valid, .send_ready, .send_ptr,
    .lut_we, .lut_waddr, .lut_wdata,
    .fifo_count, .send_busy, .recv_busy, .wr_busy
  );

  ni_send_ctrl #(.FIFO_DEPTH(SEND_FIFO_DEPTH), .BURST_MAX(BURST_MAX)) u_send (
    .clk, .rst_n,
    .req_valid(send_valid), .req_ready(send_ready), .req_ptr(send_ptr),
    .fifo_count, .busy(send_busy),
    .ar, .ar_valid, .ar_ready, .r, .r_valid, .r_ready,
    .wr_req(wr_req[0]), .wr_valid(wr_valid[0]), .wr_ready(wr_ready[0]),
    .flit_valid(tx_valid), .flit_ready(tx_ready), .flit(tx_flit)
  );

  ni_recv_ctrl #(.LUT_ENTRIES(LUT_ENTRIES), .LUT_SRAM(LUT_SRAM)) u_recv (
    .clk, .rst_n,
    .flit_valid(rx_valid), .flit_ready(rx_ready), .flit(rx_flit),
    .lut_we, .lut_waddr, .lut_wdata,
    .wr_req(wr_req[1]), .wr_valid(wr_valid[1]), .wr_ready(wr_ready[1]),
    .busy(recv_busy)
  );

  ni_master_ctrl u_master (
    .clk, .rst_n,
    .rd_ar(ar), .rd_ar_valid(ar_valid), .rd_ar_ready(ar_ready),
    .rd_r(r), .rd_r_valid(r_valid), .rd_r_ready(r_ready),
    .wr_req, .wr_valid, .wr_ready, .wr_busy,
    .m_axi_req, .m_axi_rsp
  );

endmodule
