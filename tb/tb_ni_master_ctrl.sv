// tb_ni_master_ctrl: the NI's AXI master against a behavioural memory.
//   1. throughput: 32 back-to-back writes from one client with a memory that
//      never stalls must finish within 32 + 3 cycles;
//   2. random writes from both clients, some marked fence, with a memory that
//      stalls 30% of the time: every word must land, and when a fence write's
//      AW is accepted every earlier write must already have its B response;
//   3. a read burst passed straight through from the read client.
module tb_ni_master_ctrl;
  import noc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  axi_ax_t  rd_ar;
  logic     rd_ar_valid, rd_ar_ready, rd_r_valid, rd_r_ready;
  axi_r_t   rd_r;
  wr_req_t  wr_req [2];
  logic     wr_valid [2], wr_ready [2];
  logic     wr_busy;
  axi_req_t m_axi_req;
  axi_rsp_t m_axi_rsp;
  int       stall_pct = 0;
  logic     bd_we = 0;
  int       bd_widx = 0, bd_ridx = 0;
  data_t    bd_wdata = '0, bd_rdata;

  int checks = 0, failures = 0;
  int n_aw = 0, n_b = 0, n_fence = 0, n_both = 0;

  ni_master_ctrl dut (.*);
  tb_axi_mem u_mem (.clk, .rst_n, .stall_pct, .req(m_axi_req), .rsp(m_axi_rsp),
                    .bd_we, .bd_widx, .bd_wdata, .bd_ridx, .bd_rdata);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // fence rule, checked on the AXI side; fence writes use addresses >= 0x4000
  always @(posedge clk) if (rst_n) begin
    if (m_axi_req.aw_valid && m_axi_rsp.aw_ready) begin
      if (m_axi_req.aw.addr >= 32'h4000) begin
        check(n_b == n_aw, "fence write issued after all earlier responses");
        n_fence++;
      end
      n_aw++;
    end
    if (m_axi_rsp.b_valid && m_axi_req.b_ready) n_b++;
    if (wr_valid[0] && wr_valid[1]) n_both++;
  end

  function automatic data_t val(input int c, input int i);
    return {16'hBEEF, 8'(c), 8'(i), 32'(i * 977 + c)};
  endfunction

  task automatic client(input int c, input int n, input int base, input int pct, input bit fences);
    for (int i = 0; i < n; i++) begin
      bit f;
      f = fences && ($urandom_range(99) < 20);
      while ($urandom_range(99) >= pct) @(negedge clk);
      wr_req[c].addr  = addr_t'((f ? 32'h4000 : 32'h0) + base + 8 * i);
      wr_req[c].data  = val(c, i);
      wr_req[c].fence = f;
      wr_valid[c] = 1;
      do begin #1; @(negedge clk); end while (!last_ready[c]);
      wr_valid[c] = 0;
    end
  endtask

  // ready as seen just before the clock edge
  logic last_ready [2];
  always @(posedge clk) begin
    last_ready[0] <= wr_valid[0] && wr_ready[0];
    last_ready[1] <= wr_valid[1] && wr_ready[1];
  end

  task automatic expect_word(input addr_t a, input data_t v, input string what);
    bd_ridx = int'(a >> 3);
    #1 check(bd_rdata == v, what);
  endtask

  initial begin
    int t0, t1;
    rd_ar = '0; rd_ar_valid = 0; rd_r_ready = 1;
    for (int c = 0; c < 2; c++) begin wr_req[c] = '0; wr_valid[c] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;

    // 1. throughput
    @(negedge clk);
    t0 = n_aw;
    wr_valid[0] = 1;
    for (int i = 0; i < 32; i++) begin
      wr_req[0] = '{addr: addr_t'(32'h1000 + 8 * i), data: val(0, i), fence: 1'b0};
      #1;
      while (!wr_ready[0]) begin @(negedge clk); #1; end
      @(negedge clk);
    end
    wr_valid[0] = 0;
    t1 = 0;
    while (n_aw < t0 + 32 && t1 < 100) begin @(negedge clk); t1++; end
    check(t1 <= 3, $sformatf("32 writes issued, %0d cycles after the last request", t1));
    repeat (5) @(negedge clk);
    for (int i = 0; i < 32; i++) expect_word(addr_t'(32'h1000 + 8 * i), val(0, i), "throughput write landed");

    // 2. random writes from both clients with fences and stalls
    stall_pct = 30;
    fork
      client(0, 150, 32'h0000, 70, 1);
      client(1, 150, 32'h2000, 70, 1);
    join
    repeat (30) @(negedge clk);
    check(!wr_busy, "idle after all responses");
    for (int i = 0; i < 150; i++) begin
      bd_ridx = int'(((32'h0000 + 8 * i) >> 3));
      #1;
      if (bd_rdata != val(0, i)) begin
        bd_ridx = int'(((32'h4000 + 8 * i) >> 3));
        #1;
      end
      check(bd_rdata == val(0, i), $sformatf("client 0 word %0d", i));
      bd_ridx = int'(((32'h2000 + 8 * i) >> 3));
      #1;
      if (bd_rdata != val(1, i)) begin
        bd_ridx = int'(((32'h6000 + 8 * i) >> 3));
        #1;
      end
      check(bd_rdata == val(1, i), $sformatf("client 1 word %0d", i));
    end
    check(n_fence > 0 && n_both > 0, "fences and competing clients occurred");

    // 3. read burst passthrough
    stall_pct = 0;
    @(negedge clk);
    rd_ar = '{id: '0, addr: 32'h1000, len: 8'd7, size: AXI_SIZE_8B, burst: AXI_INCR};
    rd_ar_valid = 1;
    #1 while (!rd_ar_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    rd_ar_valid = 0;
    for (int i = 0; i < 8; i++) begin
      #1 while (!rd_r_valid) begin @(negedge clk); #1; end
      check(rd_r.data == val(0, i) && rd_r.last == (i == 7), $sformatf("read beat %0d", i));
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
