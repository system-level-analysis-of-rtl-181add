// tb_noc_router: router at (1,1). First a lone flit per direction checks the
// XY route and the two-cycle latency; then all five inputs inject random
// flits to random destinations of a 4x4 mesh while outputs apply random
// back-pressure. Each flit's payload names its input port and sequence
// number; every output checks that the flit belongs there under XY routing
// and arrives in order behind the earlier flits of the same input, and at the
// end no flit is missing.
module tb_noc_router;
  import noc_pkg::*;
  localparam int unsigned MX = 1, MY = 1;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  in_valid [NPORTS], in_ready [NPORTS], out_valid [NPORTS], out_ready [NPORTS];
  flit_t in_flit [NPORTS], out_flit [NPORTS];
  flit_t q [NPORTS][NPORTS][$];   // expected flits per (input, output)
  int checks = 0, failures = 0, sent = 0, rcvd = 0, n_bp = 0;

  noc_router #(.X(MX), .Y(MY)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int xy_port(input int x, input int y);
    if (x > int'(MX)) return P_EAST;
    if (x < int'(MX)) return P_WEST;
    if (y > int'(MY)) return P_NORTH;
    if (y < int'(MY)) return P_SOUTH;
    return P_LOCAL;
  endfunction

  function automatic flit_t mk(input int src, input int seq, input int x, input int y);
    flit_t f;
    f = '0;
    f.hdr.dst_x = COORD_W'(x);
    f.hdr.dst_y = COORD_W'(y);
    f.hdr.flow_id = FLOW_ID_W'($urandom);
    f.data = {4'(src), 28'(seq), 32'($urandom)};
    return f;
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output monitor
  always @(posedge clk) if (rst_n) begin
    for (int o = 0; o < NPORTS; o++) begin
      if (out_valid[o] && !out_ready[o]) n_bp++;
      if (out_valid[o] && out_ready[o]) begin
        int src;
        src = int'(out_flit[o].data[63:60]);
        rcvd++;
        check(xy_port(int'(out_flit[o].hdr.dst_x), int'(out_flit[o].hdr.dst_y)) == o,
              $sformatf("flit to (%0d,%0d) left on port %0d", out_flit[o].hdr.dst_x,
                        out_flit[o].hdr.dst_y, o));
        if (q[src][o].size() == 0) check(0, "unexpected flit");
        else check(out_flit[o] == q[src][o].pop_front(), "flit order and content");
      end
    end
  end

  initial begin
    int seq [NPORTS];
    bit taken [NPORTS];
    for (int p = 0; p < NPORTS; p++) begin
      in_valid[p] = 0; in_flit[p] = '0; out_ready[p] = 1; seq[p] = 0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;

    // latency: one lone flit to each direction, two cycles from input to output
    begin
      int dx [5] = '{1, 1, 2, 1, 0};
      int dy [5] = '{1, 2, 1, 0, 1};
      for (int k = 0; k < 5; k++) begin
        flit_t f;
        int o, lat;
        f = mk(P_LOCAL, seq[0]++, dx[k], dy[k]);
        o = xy_port(dx[k], dy[k]);
        q[P_LOCAL][o].push_back(f);
        @(negedge clk);
        in_valid[P_LOCAL] = 1; in_flit[P_LOCAL] = f;
        @(negedge clk);
        in_valid[P_LOCAL] = 0;
        lat = 1;
        while (!out_valid[o] && lat < 10) begin @(negedge clk); lat++; end
        check(lat == 2, $sformatf("router latency %0d cycles, expected 2", lat));
        @(negedge clk);
      end
      sent += 5;
    end

    // random traffic with back-pressure
    for (int p = 0; p < NPORTS; p++) taken[p] = 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      for (int p = 0; p < NPORTS; p++) begin
        out_ready[p] = ($urandom_range(99) < 70);
        if (!in_valid[p] || taken[p]) begin
          // previous flit taken (or none): maybe send a new one
          if ($urandom_range(99) < 60 && t < 3800) begin
            int x, y;
            x = $urandom_range(3); y = $urandom_range(3);
            in_flit[p]  = mk(p, seq[p]++, x, y);
            in_valid[p] = 1;
          end else begin
            in_valid[p] = 0;
          end
        end
      end
      #1;
      for (int p = 0; p < NPORTS; p++) begin
        taken[p] = in_valid[p] && in_ready[p];
        if (taken[p]) begin
          q[p][xy_port(int'(in_flit[p].hdr.dst_x), int'(in_flit[p].hdr.dst_y))].push_back(in_flit[p]);
          sent++;
        end
      end
    end
    for (int p = 0; p < NPORTS; p++) begin out_ready[p] = 1; end
    @(negedge clk);
    for (int p = 0; p < NPORTS; p++) in_valid[p] = 0;
    repeat (50) @(negedge clk);
    check(sent == rcvd, $sformatf("sent %0d received %0d", sent, rcvd));
    check(n_bp > 0, "back-pressure happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
