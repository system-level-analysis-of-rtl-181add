// noc_router: packet-switched router of the 2D-mesh NoC.
//
// Five ports: Local (to the cluster's NI), North, East, South and West. Every
// flit carries its own header, so each flit is routed on its own with
// dimension-ordered XY routing (first along X, then along Y); flits of one
// packet keep their order because they all take the same path. The document
// gives the mesh, packet switching with flits and a router latency of two
// clock cycles; the routing algorithm, the per-flit arbitration and the buffer
// depth are this design's choices.
//
// Pipeline (two cycles from input to output):
//   cycle 1: the flit is written into the input FIFO of its port,
//   cycle 2: the FIFO head is routed, wins round-robin arbitration for its
//            output port and is written into that port's output register.
// Flow control is valid/ready on every link. An input FIFO of depth 2 or more
// sustains one flit per cycle per port.
module noc_router
  import noc_pkg::*;
#(
  parameter int unsigned X          = 0,
  parameter int unsigned Y          = 0,
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid  [NPORTS],
  output logic  in_ready  [NPORTS],
  input  flit_t in_flit   [NPORTS],
  output logic  out_valid [NPORTS],
  input  logic  out_ready [NPORTS],
  output flit_t out_flit  [NPORTS]
);
  localparam logic [COORD_W-1:0] MY_X = COORD_W'(X);
  localparam logic [COORD_W-1:0] MY_Y = COORD_W'(Y);

  logic  head_valid [NPORTS];
  logic  head_pop   [NPORTS];
  flit_t head_flit  [NPORTS];
  logic [NPORTS-1:0] head_route [NPORTS];   // one-hot output port per input

  // --------------------------------------------------------- input buffers
  for (genvar p = 0; p < NPORTS; p++) begin : g_in
    sync_fifo #(.WIDTH($bits(flit_t)), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n,
      .push_valid(in_valid[p]), .push_ready(in_ready[p]), .push_data(in_flit[p]),
      .pop_valid(head_valid[p]), .pop_ready(head_pop[p]), .pop_data(head_flit[p]),
      .count()
    );

    always_comb begin
      head_route[p] = '0;
      if      (head_flit[p].hdr.dst_x > MY_X) head_route[p][P_EAST]  = 1'b1;
      else if (head_flit[p].hdr.dst_x < MY_X) head_route[p][P_WEST]  = 1'b1;
      else if (head_flit[p].hdr.dst_y > MY_Y) head_route[p][P_NORTH] = 1'b1;
      else if (head_flit[p].hdr.dst_y < MY_Y) head_route[p][P_SOUTH] = 1'b1;
      else                                    head_route[p][P_LOCAL] = 1'b1;
    end
  end

  // ------------------------------------------ switch allocation and output
  logic [NPORTS-1:0] grant [NPORTS];         // grant[o][i]
  logic [$clog2(NPORTS)-1:0] rr_ptr [NPORTS]; // highest priority input per output

  for (genvar o = 0; o < NPORTS; o++) begin : g_out
    logic [NPORTS-1:0] req;
    logic              can_load;

    always_comb begin
      for (int i = 0; i < NPORTS; i++) req[i] = head_valid[i] && head_route[i][o];
    end

    assign can_load = !out_valid[o] || out_ready[o];

    // round-robin: first requester at or after rr_ptr
    always_comb begin
      int idx;
      idx      = 0;
      grant[o] = '0;
      if (can_load) begin
        for (int k = 0; k < NPORTS; k++) begin
          idx = (int'(rr_ptr[o]) + k) % NPORTS;
          if (req[idx] && grant[o] == '0) grant[o][idx] = 1'b1;
        end
      end
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        out_valid[o] <= 1'b0;
        rr_ptr[o]    <= '0;
      end else if (can_load) begin
        out_valid[o] <= (grant[o] != '0);
        for (int i = 0; i < NPORTS; i++) begin
          if (grant[o][i])
            rr_ptr[o] <= (i == NPORTS - 1) ? '0 : $clog2(NPORTS)'(i + 1);
        end
      end
    end

    always_ff @(posedge clk) begin
      if (can_load) begin
        for (int i = 0; i < NPORTS; i++) if (grant[o][i]) out_flit[o] <= head_flit[i];
      end
    end
  end

  always_comb begin
    for (int i = 0; i < NPORTS; i++) begin
      head_pop[i] = 1'b0;
      for (int o = 0; o < NPORTS; o++) head_pop[i] = head_pop[i] | grant[o][i];
    end
  end

  // An output register holds its flit until the next router takes it.
  for (genvar o = 0; o < NPORTS; o++) begin : g_chk
    a_hold: assert property (@(posedge clk) disable iff (!rst_n)
      out_valid[o] && !out_ready[o] |=> out_valid[o] && $stable(out_flit[o]));
  end

endmodule
