// coreva_mpsoc: the NoC level of a hierarchical MPSoC.
//
// CPU clusters sit on a NX x NY 2D mesh; each cluster has one router and one
// network interface (NI). Inside a cluster, CPUs with their local instruction
// and data memories share an AXI4 interconnect; those parts are outside this
// module, so each cluster's two AXI ports of its NI are brought out:
//   s_axi_req/rsp[i]  the cluster's CPUs reach NI i here (configuration,
//                     send requests, status),
//   m_axi_req/rsp[i]  NI i reaches the CPUs' local data memories here.
// Cluster i sits at x = i % NX, y = i / NX. A buffer written by a CPU of one
// cluster travels as flits through the mesh and is written by the receiving
// NI into a CPU memory of the destination cluster.
//
// Defaults: the 4x2 mesh of the document's 4x2x4 configuration (8 clusters of
// 4 CPUs) with a 256-entry SRAM LUT per NI, the configuration the document
// evaluates as its best; the router FIFO depth, the send FIFO depth and the
// burst length are this design's choices.
module coreva_mpsoc
  import noc_pkg::*;
#(
  parameter int unsigned NX              = 4,
  parameter int unsigned NY              = 2,
  parameter int unsigned LUT_ENTRIES     = 256,
  parameter bit          LUT_SRAM        = 1'b1,
  parameter int unsigned SEND_FIFO_DEPTH = 8,
  parameter int unsigned ROUTER_FIFO     = 4
) (
  input  logic     clk,
  input  logic     rst_n,
  input  axi_req_t s_axi_req [NX*NY],
  output axi_rsp_t s_axi_rsp [NX*NY],
  output axi_req_t m_axi_req [NX*NY],
  input  axi_rsp_t m_axi_rsp [NX*NY]
);
  localparam int unsigned N = NX * NY;

  logic  inj_valid [N];
  logic  inj_ready [N];
  flit_t inj_flit  [N];
  logic  ej_valid  [N];
  logic  ej_ready  [N];
  flit_t ej_flit   [N];

  noc_mesh #(.NX(NX), .NY(NY), .FIFO_DEPTH(ROUTER_FIFO)) u_mesh (
    .clk, .rst_n,
    .inj_valid, .inj_ready, .inj_flit,
    .ej_valid, .ej_ready, .ej_flit
  );

  for (genvar i = 0; i < N; i++) begin : g_cluster
    ni #(
      .LUT_ENTRIES(LUT_ENTRIES), .LUT_SRAM(LUT_SRAM), .SEND_FIFO_DEPTH(SEND_FIFO_DEPTH)
    ) u_ni (
      .clk, .rst_n,
      .s_axi_req(s_axi_req[i]), .s_axi_rsp(s_axi_rsp[i]),
      .m_axi_req(m_axi_req[i]), .m_axi_rsp(m_axi_rsp[i]),
      .tx_valid(inj_valid[i]), .tx_ready(inj_ready[i]), .tx_flit(inj_flit[i]),
      .rx_valid(ej_valid[i]),  .rx_ready(ej_ready[i]),  .rx_flit(ej_flit[i])
    );
  end

endmodule
