// tb_coreva_mpsoc: end-to-end test of the MPSoC NoC level at its default
// size (4x2 mesh, 8 NIs with 256-entry SRAM LUTs).
//
// Every cluster's local memory is a behavioural AXI memory; the CPUs are
// replaced by tasks that access each NI's slave port. The test configures
// receive LUTs, places descriptors and buffers in memory and posts send
// requests, as the communication library of a CPU would:
//   A : cluster 0 -> cluster 7, 128 words (1 kB), flow 5, source buffer
//       crossing a 4 KB boundary
//   A2: cluster 0 -> cluster 5, 2 words, flow 1, posted right behind A
//       (two requests waiting in the send FIFO)
//   B : cluster 3 -> cluster 7, 2 words (16 B), flow 9, while A is in flight
//       (flits of two packets interleave at NI 7)
//   C : cluster 7 -> cluster 0, zero-length acknowledge (SYNC flit), flow 2,
//       posted once A has arrived
// Cluster 7's memory withholds ready/valid in 30% of cycles, so the NoC sees
// back-pressure. Checks: all received data, the receive mutexes, the sender
// mutexes, a status read, and that each mechanism happened at least once.
module tb_coreva_mpsoc;
  import noc_pkg::*;

  localparam int unsigned NX = 4, NY = 2, N = NX * NY;
  localparam int unsigned WORDS = 4096;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  axi_req_t s_req [N];
  axi_rsp_t s_rsp [N];
  axi_req_t m_req [N];
  axi_rsp_t m_rsp [N];

  logic  bd_we    [N];
  int    bd_widx  [N];
  data_t bd_wdata [N];
  int    bd_ridx  [N];
  data_t bd_rdata [N];

  int checks = 0, failures = 0;

  coreva_mpsoc dut (
    .clk, .rst_n,
    .s_axi_req(s_req), .s_axi_rsp(s_rsp),
    .m_axi_req(m_req), .m_axi_rsp(m_rsp)
  );

  for (genvar i = 0; i < N; i++) begin : g_mem
    tb_axi_mem #(.WORDS(WORDS)) u_mem (
      .clk, .rst_n, .stall_pct(i == 7 ? 30 : 0), .req(m_req[i]), .rsp(m_rsp[i]),
      .bd_we(bd_we[i]), .bd_widx(bd_widx[i]), .bd_wdata(bd_wdata[i]),
      .bd_ridx(bd_ridx[i]), .bd_rdata(bd_rdata[i])
    );
  end

  // ------------------------------------------------------------ helpers
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic bd_write(input int c, input addr_t a, input data_t d);
    @(negedge clk);
    bd_we[c] = 1'b1; bd_widx[c] = int'(a >> 3); bd_wdata[c] = d;
    @(negedge clk);
    bd_we[c] = 1'b0;
  endtask

  task automatic bd_read(input int c, input addr_t a, output data_t d);
    bd_ridx[c] = int'(a >> 3);
    #1;
    d = bd_rdata[c];
  endtask

  task automatic cpu_write(input int c, input addr_t a, input data_t d);
    bit aw_hs, w_hs, b_hs;
    @(negedge clk);
    s_req[c].aw       = '{id: '0, addr: a, len: 8'd0, size: AXI_SIZE_8B, burst: AXI_INCR};
    s_req[c].aw_valid = 1'b1;
    s_req[c].w        = '{data: d, strb: '1, last: 1'b1};
    s_req[c].w_valid  = 1'b1;
    do begin
      #1;
      aw_hs = s_req[c].aw_valid && s_rsp[c].aw_ready;
      w_hs  = s_req[c].w_valid && s_rsp[c].w_ready;
      @(negedge clk);
      if (aw_hs) s_req[c].aw_valid = 1'b0;
      if (w_hs)  s_req[c].w_valid  = 1'b0;
    end while (s_req[c].aw_valid || s_req[c].w_valid);
    do begin
      #1;
      b_hs = s_rsp[c].b_valid;
      @(negedge clk);
    end while (!b_hs);
  endtask

  task automatic cpu_read(input int c, input addr_t a, output data_t d);
    bit ar_hs, r_hs;
    @(negedge clk);
    s_req[c].ar       = '{id: '0, addr: a, len: 8'd0, size: AXI_SIZE_8B, burst: AXI_INCR};
    s_req[c].ar_valid = 1'b1;
    do begin
      #1;
      ar_hs = s_rsp[c].ar_ready;
      @(negedge clk);
    end while (!ar_hs);
    s_req[c].ar_valid = 1'b0;
    do begin
      #1;
      r_hs = s_rsp[c].r_valid;
      d    = s_rsp[c].r.data;
      @(negedge clk);
    end while (!r_hs);
  endtask

  // LUT entry write through the NI slave port
  task automatic cfg_lut(input int c, input int flow, input addr_t base, input addr_t mutex);
    cpu_write(c, addr_t'(32'h8000 + flow * 8), {mutex, base});
  endtask

  // descriptor: word0 {rsvd, len, buf}, word1 {mutex, flow, y, x}
  task automatic put_desc(input int c, input addr_t at, input addr_t buf_p, input int len,
                          input int dst, input int flow, input addr_t lmutex);
    bd_write(c, at,     {16'd0, 16'(len), buf_p});
    bd_write(c, at + 8, {lmutex, 16'(flow), 8'(dst / NX), 8'(dst % NX)});
  endtask

  function automatic data_t pattern(input int tag, input int i);
    return {8'(tag), 24'(i * 7 + 3), 32'hC0DE_0000 ^ 32'(i * 32'h0001_0101)};
  endfunction

  task automatic wait_mutex(input int c, input addr_t a, input int max_cycles, output bit ok);
    data_t v;
    ok = 1'b0;
    for (int t = 0; t < max_cycles && !ok; t++) begin
      @(negedge clk);
      bd_read(c, a, v);
      ok = (v == MUTEX_SET);
    end
  endtask

  // ------------------------------------------------------- mechanism counters
  int n_interleave = 0, n_noc_stall = 0, n_fifo_multi = 0, n_sync_flits = 0;
  int n_fence_wait = 0, n_burst_4k = 0;
  logic [FLOW_ID_W-1:0] last_flow7;
  logic                 open7;

  always @(posedge clk) if (rst_n) begin
    if (dut.ej_valid[7] && dut.ej_ready[7]) begin
      if (open7 && dut.ej_flit[7].hdr.flow_id != last_flow7) n_interleave++;
      last_flow7 <= dut.ej_flit[7].hdr.flow_id;
      open7      <= !dut.ej_flit[7].hdr.last;
    end
    if ((dut.inj_valid[0] && !dut.inj_ready[0]) || (dut.ej_valid[7] && !dut.ej_ready[7]))
      n_noc_stall++;
    if (dut.g_cluster[0].u_ni.fifo_count != 0 && dut.g_cluster[0].u_ni.send_busy) n_fifo_multi++;
    if (dut.ej_valid[0] && dut.ej_ready[0] && dut.ej_flit[0].hdr.kind == FLIT_SYNC)
      n_sync_flits++;
    if (dut.g_cluster[7].u_ni.wr_valid[1] && dut.g_cluster[7].u_ni.wr_req[1].fence &&
        !dut.g_cluster[7].u_ni.wr_ready[1]) n_fence_wait++;
    if (m_req[0].ar_valid && m_rsp[0].ar_ready && m_req[0].ar.addr == 32'h1000) n_burst_4k++;
  end

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ stimulus
  localparam addr_t BUF_A = 32'h0F80;   // 128 words, crosses 0x1000
  localparam addr_t BUF_S = 32'h1800;   // small source buffers

  initial begin
    data_t v;
    bit ok;
    for (int c = 0; c < int'(N); c++) begin
      s_req[c] = '0; bd_we[c] = 1'b0; bd_widx[c] = 0; bd_wdata[c] = '0; bd_ridx[c] = 0;
      s_req[c].b_ready = 1'b1;
      s_req[c].r_ready = 1'b1;
    end
    open7 = 1'b0; last_flow7 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // receive channels (set up before any buffer is sent)
    cfg_lut(7, 5, 32'h2000, 32'h0100);
    cfg_lut(7, 9, 32'h3000, 32'h0108);
    cfg_lut(5, 1, 32'h2400, 32'h0100);
    cfg_lut(0, 2, 32'h0000, 32'h0110);

    // buffers and descriptors
    for (int i = 0; i < 128; i++) bd_write(0, BUF_A + addr_t'(8 * i), pattern(8'hA, i));
    for (int i = 0; i < 2; i++)   bd_write(0, BUF_S + addr_t'(8 * i), pattern(8'hE, i));
    for (int i = 0; i < 2; i++)   bd_write(3, BUF_S + addr_t'(8 * i), pattern(8'hB, i));
    put_desc(0, 32'h0040, BUF_A, 128, 7, 5, 32'h0200);
    put_desc(0, 32'h0060, BUF_S, 2,   5, 1, 32'h0208);
    put_desc(3, 32'h0040, BUF_S, 2,   7, 9, 32'h0200);
    put_desc(7, 32'h0040, 32'h0, 0,   0, 2, 32'h0000);

    // two CPUs of cluster 0 post back to back; cluster 3 posts while A flows
    cpu_write(0, NI_REG_SEND, 64'h0040);
    cpu_write(0, NI_REG_SEND, 64'h0060);
    repeat (30) @(negedge clk);
    cpu_write(3, NI_REG_SEND, 64'h0040);

    // cluster 7 waits for A (getReadBuf), then acknowledges to cluster 0
    wait_mutex(7, 32'h0100, 5000, ok);
    check(ok, "mutex of A set at cluster 7");
    cpu_write(7, NI_REG_SEND, 64'h0040);

    wait_mutex(7, 32'h0108, 5000, ok);  check(ok, "mutex of B set at cluster 7");
    wait_mutex(5, 32'h0100, 5000, ok);  check(ok, "mutex of A2 set at cluster 5");
    wait_mutex(0, 32'h0110, 5000, ok);  check(ok, "acknowledge C set mutex at cluster 0");
    wait_mutex(0, 32'h0200, 5000, ok);  check(ok, "sender mutex of A at cluster 0");
    wait_mutex(0, 32'h0208, 5000, ok);  check(ok, "sender mutex of A2 at cluster 0");
    wait_mutex(3, 32'h0200, 5000, ok);  check(ok, "sender mutex of B at cluster 3");

    for (int i = 0; i < 128; i++) begin
      bd_read(7, 32'h2000 + addr_t'(8 * i), v);
      check(v == pattern(8'hA, i), $sformatf("A word %0d: %h", i, v));
    end
    for (int i = 0; i < 2; i++) begin
      bd_read(7, 32'h3000 + addr_t'(8 * i), v);
      check(v == pattern(8'hB, i), $sformatf("B word %0d: %h", i, v));
      bd_read(5, 32'h2400 + addr_t'(8 * i), v);
      check(v == pattern(8'hE, i), $sformatf("A2 word %0d: %h", i, v));
    end
    // nothing written past the end of A
    bd_read(7, 32'h2000 + 128 * 8, v);
    check(v == '0, "no write past buffer A");

    repeat (50) @(negedge clk);
    cpu_read(0, NI_REG_STATUS, v);
    check(v[10:8] == 3'b000 && v[7:0] == 8'd0, $sformatf("NI 0 idle, status %h", v));

    check(n_interleave > 0, "flits of two packets interleaved at NI 7");
    check(n_noc_stall > 0, "NoC back-pressure stalled a flit");
    check(n_fifo_multi > 0, "a send request waited in the FIFO while another was served");
    check(n_sync_flits == 1, "one SYNC acknowledge flit");
    check(n_fence_wait > 0, "mutex write waited for data writes");
    check(n_burst_4k > 0, "burst split at the 4 KB boundary");
    $display("mechanisms: interleave=%0d stall=%0d fifo_multi=%0d sync=%0d fence_wait=%0d burst_4k=%0d",
             n_interleave, n_noc_stall, n_fifo_multi, n_sync_flits, n_fence_wait, n_burst_4k);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
