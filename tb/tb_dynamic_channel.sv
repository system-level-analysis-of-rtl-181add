// tb_dynamic_channel: the dynamic channel scheme on the full 4x2 system. The
// sender re-targets the receiver's LUT entry before every buffer, without any
// CPU copy at the receiver.
//
// How the sender writes a remote LUT entry with this hardware: cluster 1's
// interconnect (modelled here) maps its own NI's register window at
// 0xFFFF_0000, so the NI's master port can write into its own slave port.
// Receive channel 255 of cluster 1 is a configuration channel whose data
// pointer is the address of LUT entry 3 in that window. A one-word buffer
// {mutex_ptr, data_base} sent on channel 255 therefore lands in LUT entry 3,
// and the channel's (fenced) mutex at 0x0300 tells the receiving CPU that the
// entry has been written. The receiving CPU answers with a zero-length
// request (a SYNC flit on channel 2 of cluster 0); only then does the sender
// post the data buffer on channel 3.
//
// Three rounds move a 16 B buffer from cluster 0 to cluster 1, each into a
// different area with a different mutex. Checks: every round's data and
// mutex arrive at that round's area, earlier areas keep their data, and each
// round made exactly one write through the forwarded LUT window. The cycles
// from the configuration request to the receive mutex are printed.
module tb_dynamic_channel;
  import noc_pkg::*;

  localparam int unsigned NX = 4, NY = 2, N = NX * NY;
  localparam int unsigned RX = 1;                      // receiving cluster
  localparam logic [15:0] NI_WIN = 16'hFFFF;           // NI window at cluster RX
  localparam int unsigned CFG_FLOW = 255, DATA_FLOW = 3, ACK_FLOW = 2;
  localparam addr_t CFG_MUTEX = 32'h0300;              // at cluster RX
  localparam addr_t ACK_MUTEX = 32'h0310;              // at cluster 0
  localparam addr_t TX_MUTEX  = 32'h0308;              // at cluster 0

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  axi_req_t s_req [N];
  axi_rsp_t s_rsp [N];
  axi_req_t m_req [N];
  axi_rsp_t m_rsp [N];
  axi_req_t cpu_req [N];       // what the CPU tasks drive on each slave port
  axi_req_t mem_req [N];
  axi_rsp_t mem_rsp [N];

  logic  bd_we    [N];
  int    bd_widx  [N];
  data_t bd_wdata [N];
  int    bd_ridx  [N];
  data_t bd_rdata [N];

  int checks = 0, failures = 0;
  int cyc = 0, t_cfg = 0, t_done = 0, n_fwd = 0;

  coreva_mpsoc dut (
    .clk, .rst_n,
    .s_axi_req(s_req), .s_axi_rsp(s_rsp),
    .m_axi_req(m_req), .m_axi_rsp(m_rsp)
  );

  for (genvar i = 0; i < N; i++) begin : g_mem
    tb_axi_mem #(.WORDS(4096)) u_mem (
      .clk, .rst_n, .stall_pct(0), .req(mem_req[i]), .rsp(mem_rsp[i]),
      .bd_we(bd_we[i]), .bd_widx(bd_widx[i]), .bd_wdata(bd_wdata[i]),
      .bd_ridx(bd_ridx[i]), .bd_rdata(bd_rdata[i])
    );
  end

  // ------------------------------------------- cluster RX interconnect model
  // Writes of NI RX's master port to 0xFFFF_xxxx go to its own slave port,
  // everything else to the memory. W beats follow their AW in order, so the
  // target of each accepted AW is queued until its last W beat has gone.
  // While a CPU task uses the slave port (cpu_owns), forwarded writes wait.
  logic [15:0] wq_bits;        // wq_bits[0] = target of the oldest open AW (1 = NI)
  int          wq_n;
  logic        cpu_owns;
  logic        aw_ni, w_ni, w_ok;
  axi_req_t    fwd_req;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      mem_req[i] = m_req[i];
      m_rsp[i]   = mem_rsp[i];
      s_req[i]   = cpu_req[i];
    end
    aw_ni = (m_req[RX].aw.addr[31:16] == NI_WIN);
    w_ni  = wq_bits[0];
    w_ok  = (wq_n != 0);

    mem_req[RX].aw_valid = m_req[RX].aw_valid && !aw_ni;
    mem_req[RX].w_valid  = m_req[RX].w_valid && w_ok && !w_ni;

    fwd_req          = '0;
    fwd_req.aw       = m_req[RX].aw;
    fwd_req.aw_valid = m_req[RX].aw_valid && aw_ni && !cpu_owns;
    fwd_req.w        = m_req[RX].w;
    fwd_req.w_valid  = m_req[RX].w_valid && w_ok && w_ni && !cpu_owns;
    fwd_req.b_ready  = m_req[RX].b_ready && !mem_rsp[RX].b_valid && !cpu_owns;
    if (!cpu_owns) s_req[RX] = fwd_req;

    m_rsp[RX].aw_ready = aw_ni ? (s_rsp[RX].aw_ready && !cpu_owns) : mem_rsp[RX].aw_ready;
    m_rsp[RX].w_ready  = w_ok && (w_ni ? (s_rsp[RX].w_ready && !cpu_owns) : mem_rsp[RX].w_ready);
    if (!mem_rsp[RX].b_valid && !cpu_owns) begin
      m_rsp[RX].b       = s_rsp[RX].b;
      m_rsp[RX].b_valid = s_rsp[RX].b_valid;
    end
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      wq_bits <= '0;
      wq_n    <= 0;
    end else begin
      logic [15:0] nb;
      int          nn;
      nb = wq_bits;
      nn = wq_n;
      if (m_req[RX].w_valid && m_rsp[RX].w_ready && m_req[RX].w.last) begin
        nb = nb >> 1;
        nn--;
      end
      if (m_req[RX].aw_valid && m_rsp[RX].aw_ready) begin
        nb[nn] = aw_ni;
        nn++;
        if (aw_ni) n_fwd++;
      end
      wq_bits <= nb;
      wq_n    <= nn;
    end
  end

  // time stamps
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (s_req[0].aw_valid && s_rsp[0].aw_ready && s_req[0].aw.addr[15:0] == NI_REG_SEND &&
        s_req[0].w.data == 64'h0040)
      t_cfg = cyc;
    if (mem_req[RX].aw_valid && mem_rsp[RX].aw_ready && mem_req[RX].aw.addr[31:8] == 24'h000004)
      t_done = cyc;
  end

  // ------------------------------------------------------------ helpers
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
    if (c == RX) begin
      check(wq_n == 0, "no forwarded write open when the CPU takes the NI port");
      cpu_owns = 1'b1;
    end
    cpu_req[c].aw       = '{id: '0, addr: a, len: 8'd0, size: AXI_SIZE_8B, burst: AXI_INCR};
    cpu_req[c].aw_valid = 1'b1;
    cpu_req[c].w        = '{data: d, strb: '1, last: 1'b1};
    cpu_req[c].w_valid  = 1'b1;
    do begin
      #1;
      aw_hs = cpu_req[c].aw_valid && s_rsp[c].aw_ready;
      w_hs  = cpu_req[c].w_valid && s_rsp[c].w_ready;
      @(negedge clk);
      if (aw_hs) cpu_req[c].aw_valid = 1'b0;
      if (w_hs)  cpu_req[c].w_valid  = 1'b0;
    end while (cpu_req[c].aw_valid || cpu_req[c].w_valid);
    do begin
      #1;
      b_hs = s_rsp[c].b_valid;
      @(negedge clk);
    end while (!b_hs);
    if (c == RX) cpu_owns = 1'b0;
  endtask

  task automatic wait_set(input int c, input addr_t a, output bit ok);
    data_t v;
    ok = 1'b0;
    for (int t = 0; t < 2000 && !ok; t++) begin
      @(negedge clk);
      bd_read(c, a, v);
      ok = (v == MUTEX_SET);
    end
    if (ok) bd_write(c, a, '0);
  endtask

  function automatic data_t pattern(input int round, input int i);
    return {8'(round), 24'(i + 1), 32'hD1A0_0000 + 32'(round * 16 + i)};
  endfunction

  function automatic addr_t area(input int round);
    return addr_t'(32'h4000 + round * 32'h400);
  endfunction

  function automatic addr_t rx_mutex(input int round);
    return addr_t'(32'h0400 + round * 8);
  endfunction

  // ------------------------------------------------------------ stimulus
  initial begin
    bit ok;
    data_t v;
    cpu_owns = 1'b0;
    for (int i = 0; i < N; i++) begin
      cpu_req[i] = '0; cpu_req[i].b_ready = 1'b1; cpu_req[i].r_ready = 1'b1;
      bd_we[i] = 0; bd_widx[i] = 0; bd_wdata[i] = '0; bd_ridx[i] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // set-up, once: the configuration channel at RX and the acknowledge
    // channel back at cluster 0
    cpu_write(RX, addr_t'(32'h8000 + 8 * CFG_FLOW), {CFG_MUTEX, {NI_WIN, 16'h8000} + addr_t'(8 * DATA_FLOW)});
    cpu_write(0,  addr_t'(32'h8000 + 8 * ACK_FLOW), {ACK_MUTEX, 32'h0});
    // descriptors that do not change between rounds
    bd_write(0, 32'h0048, {32'h0, 16'(CFG_FLOW), 8'(RX / NX), 8'(RX % NX)});          // config, 1 word
    bd_write(0, 32'h0040, {16'd0, 16'd1, 32'h2000});
    bd_write(0, 32'h0068, {TX_MUTEX, 16'(DATA_FLOW), 8'(RX / NX), 8'(RX % NX)});      // data, 2 words
    bd_write(RX, 32'h0080, {16'd0, 16'd0, 32'h0});                                    // acknowledge
    bd_write(RX, 32'h0088, {32'h0, 16'(ACK_FLOW), 8'd0, 8'd0});

    for (int r = 0; r < 3; r++) begin
      int fwd0;
      fwd0 = n_fwd;
      // sender: new LUT entry value and the data buffer
      bd_write(0, 32'h2000, {rx_mutex(r), area(r)});
      for (int i = 0; i < 2; i++) bd_write(0, addr_t'(32'h1000 + 8 * i), pattern(r, i));
      bd_write(0, 32'h0060, {16'd0, 16'd2, 32'h1000});
      cpu_write(0, NI_REG_SEND, 64'h0040);
      // receiver: entry written -> acknowledge
      wait_set(RX, CFG_MUTEX, ok);
      check(ok, $sformatf("round %0d: configuration mutex set at the receiver", r));
      check(n_fwd == fwd0 + 1, $sformatf("round %0d: one write through the NI window, got %0d", r, n_fwd - fwd0));
      cpu_write(RX, NI_REG_SEND, 64'h0080);
      // sender: acknowledge seen -> send the data
      wait_set(0, ACK_MUTEX, ok);
      check(ok, $sformatf("round %0d: acknowledge reached the sender", r));
      cpu_write(0, NI_REG_SEND, 64'h0060);
      wait_set(RX, rx_mutex(r), ok);
      check(ok, $sformatf("round %0d: receive mutex of this round set", r));
      wait_set(0, TX_MUTEX, ok);
      check(ok, $sformatf("round %0d: sender mutex set", r));
      for (int q = 0; q <= r; q++)
        for (int i = 0; i < 2; i++) begin
          bd_read(RX, area(q) + addr_t'(8 * i), v);
          check(v == pattern(q, i), $sformatf("round %0d: area %0d word %0d = %h", r, q, i, v));
        end
      $display("round %0d: 16 B over a re-targeted channel, %0d cycles from configuration request to receive mutex",
               r, t_done - t_cfg);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
