// tb_noc_mesh: the default 4x2 mesh. A lone flit from cluster 0 to every
// other cluster checks delivery and the latency of two cycles per router
// (2 * (hops + 1)). Then every cluster injects random flits to random
// destinations while the ejection ports apply random back-pressure; each
// ejected flit must be addressed to that cluster and arrive in order behind
// the earlier flits from the same source, and no flit may be lost.
module tb_noc_mesh;
  import noc_pkg::*;
  localparam int unsigned NX = 4, NY = 2, N = NX * NY;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  inj_valid [N], inj_ready [N], ej_valid [N], ej_ready [N];
  flit_t inj_flit [N], ej_flit [N];
  flit_t q [N][N][$];       // expected flits per (source, destination)
  int checks = 0, failures = 0, sent = 0, rcvd = 0, n_bp = 0;

  noc_mesh #(.NX(NX), .NY(NY)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic flit_t mk(input int src, input int seq, input int dst);
    flit_t f;
    f = '0;
    f.hdr.dst_x = COORD_W'(dst % NX);
    f.hdr.dst_y = COORD_W'(dst / NX);
    f.hdr.flow_id = FLOW_ID_W'(src);
    f.data = {4'(src), 28'(seq), 32'($urandom)};
    return f;
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    for (int d = 0; d < int'(N); d++) begin
      if (ej_valid[d] && !ej_ready[d]) n_bp++;
      if (ej_valid[d] && ej_ready[d]) begin
        int src;
        src = int'(ej_flit[d].data[63:60]);
        rcvd++;
        check(int'(ej_flit[d].hdr.dst_x) + NX * int'(ej_flit[d].hdr.dst_y) == d, "ejected at its destination");
        if (q[src][d].size() == 0) check(0, "unexpected flit");
        else check(ej_flit[d] == q[src][d].pop_front(), "per-source order and content");
      end
    end
  end

  initial begin
    int seq [N];
    bit taken [N];
    for (int i = 0; i < int'(N); i++) begin
      inj_valid[i] = 0; inj_flit[i] = '0; ej_ready[i] = 1; seq[i] = 0; taken[i] = 1;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;

    for (int d = 1; d < int'(N); d++) begin
      flit_t f;
      int lat, hops;
      f = mk(0, seq[0]++, d);
      q[0][d].push_back(f);
      hops = d % NX + d / NX;
      @(negedge clk);
      inj_valid[0] = 1; inj_flit[0] = f;
      @(negedge clk);
      inj_valid[0] = 0;
      lat = 1;
      while (!ej_valid[d] && lat < 40) begin @(negedge clk); lat++; end
      check(lat == 2 * (hops + 1), $sformatf("latency to %0d: %0d cycles, expected %0d", d, lat, 2 * (hops + 1)));
      @(negedge clk);
      sent++;
    end

    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      for (int i = 0; i < int'(N); i++) begin
        ej_ready[i] = ($urandom_range(99) < 75);
        if (!inj_valid[i] || taken[i]) begin
          if ($urandom_range(99) < 40 && t < 3800) begin
            inj_flit[i]  = mk(i, seq[i]++, $urandom_range(N - 1));
            inj_valid[i] = 1;
          end else inj_valid[i] = 0;
        end
      end
      #1;
      for (int i = 0; i < int'(N); i++) begin
        taken[i] = inj_valid[i] && inj_ready[i];
        if (taken[i]) begin
          q[i][int'(inj_flit[i].hdr.dst_x) + NX * int'(inj_flit[i].hdr.dst_y)].push_back(inj_flit[i]);
          sent++;
        end
      end
    end
    for (int i = 0; i < int'(N); i++) ej_ready[i] = 1;
    @(negedge clk);
    for (int i = 0; i < int'(N); i++) inj_valid[i] = 0;
    repeat (100) @(negedge clk);
    check(sent == rcvd, $sformatf("sent %0d received %0d", sent, rcvd));
    check(n_bp > 0, "back-pressure happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
