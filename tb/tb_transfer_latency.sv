// tb_transfer_latency: best-case latency of one buffer transfer between two
// clusters, for the 16 B and 1 kB buffers of the synthetic channel benchmark,
// measured on two complete 4x2 systems side by side: system 0 at the default
// configuration (SRAM LUT), system 1 with a register LUT.
//
// Nothing else runs and the memories never stall. A transfer's latency is
// counted from the cycle the sender's NI accepts the SEND write (AW handshake)
// to the cycle the receiver's memory accepts the write of the receive mutex,
// so it is the hardware part of a transfer only; the CPU's library code is
// not modelled. Each transfer is made from cluster 0 to cluster 1 (one hop)
// and to cluster 7 (four hops). Checks:
//   * every word and every receive mutex arrives;
//   * the 1 kB buffer takes exactly 126 cycles more than the 16 B one (one
//     flit per clock cycle);
//   * three more hops add exactly 6 cycles (2 cycles per router);
//   * the register LUT saves exactly one cycle against the SRAM LUT;
//   * at the default configuration the hardware latency stays below the
//     best-case end-to-end figures quoted for the whole transfer (26 cycles
//     for 16 B and 177 cycles for 1 kB, software included).
module tb_transfer_latency;
  import noc_pkg::*;

  localparam int unsigned NX = 4, NY = 2, N = NX * NY;
  localparam int unsigned NS = 2;          // system 0: SRAM LUT, system 1: register LUT
  localparam addr_t SRC_BUF  = 32'h1000;
  localparam addr_t DESC     = 32'h0040;
  localparam addr_t DST_BUF  = 32'h4000;
  localparam addr_t RX_MUTEX = 32'h0200;
  localparam addr_t TX_MUTEX = 32'h0208;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  axi_req_t s_req [NS][N];
  axi_rsp_t s_rsp [NS][N];
  axi_req_t m_req [NS][N];
  axi_rsp_t m_rsp [NS][N];

  logic  bd_we    [NS][N];
  int    bd_widx  [NS][N];
  data_t bd_wdata [NS][N];
  int    bd_ridx  [NS][N];
  data_t bd_rdata [NS][N];

  int checks = 0, failures = 0;
  int cyc = 0;
  int t_start [NS], t_end [NS];

  coreva_mpsoc dut_sram (
    .clk, .rst_n,
    .s_axi_req(s_req[0]), .s_axi_rsp(s_rsp[0]),
    .m_axi_req(m_req[0]), .m_axi_rsp(m_rsp[0])
  );
  coreva_mpsoc #(.LUT_SRAM(1'b0)) dut_reg (
    .clk, .rst_n,
    .s_axi_req(s_req[1]), .s_axi_rsp(s_rsp[1]),
    .m_axi_req(m_req[1]), .m_axi_rsp(m_rsp[1])
  );

  for (genvar s = 0; s < NS; s++) begin : g_sys
    for (genvar i = 0; i < N; i++) begin : g_mem
      tb_axi_mem #(.WORDS(4096)) u_mem (
        .clk, .rst_n, .stall_pct(0), .req(m_req[s][i]), .rsp(m_rsp[s][i]),
        .bd_we(bd_we[s][i]), .bd_widx(bd_widx[s][i]), .bd_wdata(bd_wdata[s][i]),
        .bd_ridx(bd_ridx[s][i]), .bd_rdata(bd_rdata[s][i])
      );
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // time stamps: SEND accepted at cluster 0, receive mutex written anywhere
  always @(posedge clk) if (rst_n) begin
    cyc++;
    for (int s = 0; s < NS; s++) begin
      if (s_req[s][0].aw_valid && s_rsp[s][0].aw_ready && s_req[s][0].aw.addr[15:0] == NI_REG_SEND)
        t_start[s] = cyc;
      for (int i = 0; i < N; i++)
        if (m_req[s][i].aw_valid && m_rsp[s][i].aw_ready && m_req[s][i].aw.addr == RX_MUTEX)
          t_end[s] = cyc;
    end
  end

  // the same backdoor write in both systems
  task automatic bd_write(input int c, input addr_t a, input data_t d);
    @(negedge clk);
    for (int s = 0; s < NS; s++) begin
      bd_we[s][c] = 1'b1; bd_widx[s][c] = int'(a >> 3); bd_wdata[s][c] = d;
    end
    @(negedge clk);
    for (int s = 0; s < NS; s++) bd_we[s][c] = 1'b0;
  endtask

  task automatic bd_read(input int s, input int c, input addr_t a, output data_t d);
    bd_ridx[s][c] = int'(a >> 3);
    #1;
    d = bd_rdata[s][c];
  endtask

  // the same single-beat write to the NI slave port of both systems
  task automatic cpu_write(input int c, input addr_t a, input data_t d);
    bit busy;
    bit aw_done [NS], w_done [NS], b_done [NS];
    @(negedge clk);
    for (int s = 0; s < NS; s++) begin
      s_req[s][c].aw       = '{id: '0, addr: a, len: 8'd0, size: AXI_SIZE_8B, burst: AXI_INCR};
      s_req[s][c].aw_valid = 1'b1;
      s_req[s][c].w        = '{data: d, strb: '1, last: 1'b1};
      s_req[s][c].w_valid  = 1'b1;
      s_req[s][c].b_ready  = 1'b1;
      aw_done[s] = 0; w_done[s] = 0; b_done[s] = 0;
    end
    do begin
      #1;
      for (int s = 0; s < NS; s++) begin
        if (s_req[s][c].aw_valid && s_rsp[s][c].aw_ready) aw_done[s] = 1;
        if (s_req[s][c].w_valid && s_rsp[s][c].w_ready)   w_done[s] = 1;
        if (s_rsp[s][c].b_valid && aw_done[s] && w_done[s]) b_done[s] = 1;
      end
      @(negedge clk);
      busy = 0;
      for (int s = 0; s < NS; s++) begin
        if (aw_done[s]) s_req[s][c].aw_valid = 1'b0;
        if (w_done[s])  s_req[s][c].w_valid  = 1'b0;
        if (!b_done[s]) busy = 1;
      end
    end while (busy);
  endtask

  function automatic data_t pattern(input int tag, input int i);
    return {8'(tag), 24'(i * 11 + 1), 32'h5A5A_0000 ^ 32'(i * 32'h0003_0301)};
  endfunction

  // one transfer of `words` words from cluster 0 to cluster dst; returns the
  // latency of each system
  task automatic transfer(input int dst, input int words, input int tag, output int lat [NS]);
    data_t v;
    bit ok;
    for (int i = 0; i < words; i++) bd_write(0, SRC_BUF + addr_t'(8 * i), pattern(tag, i));
    bd_write(0, DESC,     {16'd0, 16'(words), SRC_BUF});
    bd_write(0, DESC + 8, {TX_MUTEX, 16'(dst), 8'(dst / NX), 8'(dst % NX)});
    bd_write(dst, RX_MUTEX, '0);
    bd_write(0, TX_MUTEX, '0);
    for (int s = 0; s < NS; s++) begin t_start[s] = -1; t_end[s] = -1; end
    cpu_write(0, NI_REG_SEND, 64'(DESC));
    ok = 0;
    for (int t = 0; t < 2000 && !ok; t++) begin
      @(negedge clk);
      ok = 1;
      for (int s = 0; s < NS; s++) begin
        bd_read(s, dst, RX_MUTEX, v);
        if (v != MUTEX_SET) ok = 0;
        bd_read(s, 0, TX_MUTEX, v);
        if (v != MUTEX_SET) ok = 0;
      end
    end
    check(ok, $sformatf("%0d words to cluster %0d: both mutexes set in both systems", words, dst));
    for (int s = 0; s < NS; s++) begin
      int bad;
      bad = 0;
      for (int i = 0; i < words; i++) begin
        bd_read(s, dst, DST_BUF + addr_t'(8 * i), v);
        if (v != pattern(tag, i)) bad++;
      end
      check(bad == 0, $sformatf("system %0d, %0d words to cluster %0d: %0d words wrong", s, words, dst, bad));
      lat[s] = t_end[s] - t_start[s];
      $display("system %0d (%s LUT): %4d B to cluster %0d in %0d cycles", s, s == 0 ? "SRAM" : "register",
               8 * words, dst, lat[s]);
    end
    repeat (10) @(negedge clk);
  endtask

  initial begin
    int l16_near [NS], l1k_near [NS], l16_far [NS], l1k_far [NS];
    for (int s = 0; s < NS; s++)
      for (int i = 0; i < N; i++) begin
        s_req[s][i] = '0; bd_we[s][i] = 0; bd_widx[s][i] = 0; bd_wdata[s][i] = '0; bd_ridx[s][i] = 0;
      end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // receive channel `dst` at clusters 1 and 7 (semi-static: configured once)
    cpu_write(1, addr_t'(32'h8000 + 8 * 1), {RX_MUTEX, DST_BUF});
    cpu_write(7, addr_t'(32'h8000 + 8 * 7), {RX_MUTEX, DST_BUF});

    transfer(1, 2,   1, l16_near);
    transfer(1, 128, 2, l1k_near);
    transfer(7, 2,   3, l16_far);
    transfer(7, 128, 4, l1k_far);

    for (int s = 0; s < NS; s++) begin
      check(l1k_near[s] - l16_near[s] == 126,
            $sformatf("system %0d: 1 kB takes %0d cycles more than 16 B, expected 126", s, l1k_near[s] - l16_near[s]));
      check(l1k_far[s] - l16_far[s] == 126,
            $sformatf("system %0d: 1 kB takes %0d cycles more than 16 B (far), expected 126", s, l1k_far[s] - l16_far[s]));
      check(l16_far[s] - l16_near[s] == 6,
            $sformatf("system %0d: three more hops add %0d cycles, expected 6", s, l16_far[s] - l16_near[s]));
    end
    check(l16_near[0] - l16_near[1] == 1 && l1k_far[0] - l1k_far[1] == 1,
          "the register LUT saves one cycle against the SRAM LUT");
    check(l16_near[0] < 26,  $sformatf("16 B hardware latency %0d below 26 cycles", l16_near[0]));
    check(l1k_near[0] < 177, $sformatf("1 kB hardware latency %0d below 177 cycles", l1k_near[0]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
