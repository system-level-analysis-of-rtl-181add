// noc_mesh: the NoC interconnect, a NX x NY 2D mesh of noc_router.
//
// Router (x, y) serves cluster index y*NX + x through its Local port and links
// to its four neighbours; North/South change y, East/West change x. Ports at
// the mesh boundary are left unconnected: their inputs never carry flits and
// their outputs are always ready (XY routing never sends a flit to a
// coordinate outside the mesh). The document shows the mesh and its router
// links (Figure 1); the cluster numbering is this design's choice.
//
// Interface: one valid/ready flit link into and out of the mesh per cluster.
// Latency: two cycles per router on the path, i.e. 2*(hops+1) cycles from a
// Local input to the destination's Local output when nothing blocks.
module noc_mesh
  import noc_pkg::*;
#(
  parameter int unsigned NX         = 4,
  parameter int unsigned NY         = 2,
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  inj_valid [NX*NY],
  output logic  inj_ready [NX*NY],
  input  flit_t inj_flit  [NX*NY],
  output logic  ej_valid  [NX*NY],
  input  logic  ej_ready  [NX*NY],
  output flit_t ej_flit   [NX*NY]
);
  localparam int unsigned N = NX * NY;

  logic  r_in_valid  [N][NPORTS];
  logic  r_in_ready  [N][NPORTS];
  flit_t r_in_flit   [N][NPORTS];
  logic  r_out_valid [N][NPORTS];
  logic  r_out_ready [N][NPORTS];
  flit_t r_out_flit  [N][NPORTS];

  for (genvar y = 0; y < NY; y++) begin : g_y
    for (genvar x = 0; x < NX; x++) begin : g_x
      localparam int unsigned I = y * NX + x;

      noc_router #(.X(x), .Y(y), .FIFO_DEPTH(FIFO_DEPTH)) u_router (
        .clk, .rst_n,
        .in_valid (r_in_valid[I]),  .in_ready (r_in_ready[I]),  .in_flit (r_in_flit[I]),
        .out_valid(r_out_valid[I]), .out_ready(r_out_ready[I]), .out_flit(r_out_flit[I])
      );

      // Local port
      assign r_in_valid[I][P_LOCAL]  = inj_valid[I];
      assign r_in_flit[I][P_LOCAL]   = inj_flit[I];
      assign inj_ready[I]            = r_in_ready[I][P_LOCAL];
      assign ej_valid[I]             = r_out_valid[I][P_LOCAL];
      assign ej_flit[I]              = r_out_flit[I][P_LOCAL];
      assign r_out_ready[I][P_LOCAL] = ej_ready[I];

      // East link: from (x,y) to (x+1,y) and back over West
      if (x + 1 < NX) begin : g_e
        assign r_in_valid[I][P_EAST]   = r_out_valid[I+1][P_WEST];
        assign r_in_flit[I][P_EAST]    = r_out_flit[I+1][P_WEST];
        assign r_out_ready[I][P_EAST]  = r_in_ready[I+1][P_WEST];
      end else begin : g_e_edge
        assign r_in_valid[I][P_EAST]   = 1'b0;
        assign r_in_flit[I][P_EAST]    = '0;
        assign r_out_ready[I][P_EAST]  = 1'b1;
      end
      if (x > 0) begin : g_w
        assign r_in_valid[I][P_WEST]   = r_out_valid[I-1][P_EAST];
        assign r_in_flit[I][P_WEST]    = r_out_flit[I-1][P_EAST];
        assign r_out_ready[I][P_WEST]  = r_in_ready[I-1][P_EAST];
      end else begin : g_w_edge
        assign r_in_valid[I][P_WEST]   = 1'b0;
        assign r_in_flit[I][P_WEST]    = '0;
        assign r_out_ready[I][P_WEST]  = 1'b1;
      end
      if (y + 1 < NY) begin : g_n
        assign r_in_valid[I][P_NORTH]  = r_out_valid[I+NX][P_SOUTH];
        assign r_in_flit[I][P_NORTH]   = r_out_flit[I+NX][P_SOUTH];
        assign r_out_ready[I][P_NORTH] = r_in_ready[I+NX][P_SOUTH];
      end else begin : g_n_edge
        assign r_in_valid[I][P_NORTH]  = 1'b0;
        assign r_in_flit[I][P_NORTH]   = '0;
        assign r_out_ready[I][P_NORTH] = 1'b1;
      end
      if (y > 0) begin : g_s
        assign r_in_valid[I][P_SOUTH]  = r_out_valid[I-NX][P_NORTH];
        assign r_in_flit[I][P_SOUTH]   = r_out_flit[I-NX][P_NORTH];
        assign r_out_ready[I][P_SOUTH] = r_in_ready[I-NX][P_NORTH];
      end else begin : g_s_edge
        assign r_in_valid[I][P_SOUTH]  = 1'b0;
        assign r_in_flit[I][P_SOUTH]   = '0;
        assign r_out_ready[I][P_SOUTH] = 1'b1;
      end
    end
  end

endmodule
