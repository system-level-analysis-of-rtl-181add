// tb_ni: one NI whose flit output is looped back into its flit input, with
// a behavioural memory on its master port and CPU accesses on its slave port.
// The CPU configures two receive channels, places a descriptor and a 64-word
// buffer in memory and posts the request. Checks: the buffer is copied to
// the receive channel's area, the flits leave one per cycle, the receive
// mutex and the sender's mutex are set, a zero-length request sets only the
// other channel's mutex, and STATUS reports busy while working and idle at
// the end. A second copy under 30% memory stalls must give the same result.
module tb_ni;
  import noc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  axi_req_t s_axi_req, m_axi_req;
  axi_rsp_t s_axi_rsp, m_axi_rsp;
  logic     tx_valid, tx_ready;
  flit_t    tx_flit;
  int       stall_pct = 0;
  logic     bd_we = 0;
  int       bd_widx = 0, bd_ridx = 0;
  data_t    bd_wdata = '0, bd_rdata;

  int checks = 0, failures = 0;
  int n_tx = 0, first_tx = -1, last_tx = -1, cyc = 0;

  ni dut (
    .clk, .rst_n, .s_axi_req, .s_axi_rsp, .m_axi_req, .m_axi_rsp,
    .tx_valid, .tx_ready, .tx_flit,
    .rx_valid(tx_valid), .rx_ready(tx_ready), .rx_flit(tx_flit)
  );
  tb_axi_mem u_mem (.clk, .rst_n, .stall_pct, .req(m_axi_req), .rsp(m_axi_rsp),
                    .bd_we, .bd_widx, .bd_wdata, .bd_ridx, .bd_rdata);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (tx_valid && tx_ready && tx_flit.hdr.kind == FLIT_DATA) begin
      if (first_tx < 0) first_tx = cyc;
      last_tx = cyc;
      n_tx++;
    end
  end

  task automatic bd_write(input addr_t a, input data_t d);
    @(negedge clk);
    bd_we = 1; bd_widx = int'(a >> 3); bd_wdata = d;
    @(negedge clk);
    bd_we = 0;
  endtask

  task automatic bd_read(input addr_t a, output data_t d);
    bd_ridx = int'(a >> 3);
    #1 d = bd_rdata;
  endtask

  task automatic cpu_write(input addr_t a, input data_t d);
    bit aw_hs, w_hs, b_hs;
    @(negedge clk);
    s_axi_req.aw = '{id: '0, addr: a, len: 8'd0, size: AXI_SIZE_8B, burst: AXI_INCR};
    s_axi_req.w  = '{data: d, strb: '1, last: 1'b1};
    s_axi_req.aw_valid = 1; s_axi_req.w_valid = 1;
    do begin
      #1;
      aw_hs = s_axi_req.aw_valid && s_axi_rsp.aw_ready;
      w_hs  = s_axi_req.w_valid && s_axi_rsp.w_ready;
      @(negedge clk);
      if (aw_hs) s_axi_req.aw_valid = 0;
      if (w_hs)  s_axi_req.w_valid  = 0;
    end while (s_axi_req.aw_valid || s_axi_req.w_valid);
    do begin #1; b_hs = s_axi_rsp.b_valid; @(negedge clk); end while (!b_hs);
  endtask

  task automatic cpu_read(input addr_t a, output data_t d);
    bit hs;
    @(negedge clk);
    s_axi_req.ar = '{id: '0, addr: a, len: 8'd0, size: AXI_SIZE_8B, burst: AXI_INCR};
    s_axi_req.ar_valid = 1;
    do begin #1; hs = s_axi_rsp.ar_ready; @(negedge clk); end while (!hs);
    s_axi_req.ar_valid = 0;
    do begin #1; hs = s_axi_rsp.r_valid; d = s_axi_rsp.r.data; @(negedge clk); end while (!hs);
  endtask

  task automatic wait_word(input addr_t a, input data_t v, output bit ok);
    data_t d;
    ok = 0;
    for (int t = 0; t < 3000 && !ok; t++) begin
      @(negedge clk);
      bd_read(a, d);
      ok = (d == v);
    end
  endtask

  function automatic data_t pat(input int run, input int i);
    return {8'(run), 24'(i * 5), 32'(i * 32'h0101_0101 + run)};
  endfunction

  task automatic copy_run(input int run, input int stall, input bit rate_check);
    bit ok;
    data_t d;
    addr_t dst_base, mtx_rx, mtx_tx, mtx_sync;
    dst_base = addr_t'(32'h2000 + run * 32'h400);
    mtx_rx   = addr_t'(32'h0100 + run * 32'h20);
    mtx_tx   = mtx_rx + 8;
    mtx_sync = mtx_rx + 16;
    stall_pct = stall;
    cpu_write(addr_t'(32'h8000 + 8 * (4 + run)), {mtx_rx, dst_base});
    cpu_write(addr_t'(32'h8000 + 8 * 6), {mtx_sync, 32'h0});
    for (int i = 0; i < 64; i++) bd_write(addr_t'(32'h1000 + 8 * i), pat(run, i));
    bd_write(32'h0040, {16'd0, 16'd64, 32'h1000});
    bd_write(32'h0048, {mtx_tx, 16'(4 + run), 8'd0, 8'd0});
    bd_write(32'h0060, {16'd0, 16'd0, 32'h0});
    bd_write(32'h0068, {32'h0, 16'd6, 8'd0, 8'd0});
    n_tx = 0; first_tx = -1;
    cpu_write(NI_REG_SEND, 64'h0040);
    cpu_read(NI_REG_STATUS, d);
    check(d[8] || d[9] || d[10], "status shows the NI busy");
    wait_word(mtx_rx, MUTEX_SET, ok);
    check(ok, "receive mutex set");
    wait_word(mtx_tx, MUTEX_SET, ok);
    check(ok, "sender mutex set");
    for (int i = 0; i < 64; i++) begin
      bd_read(dst_base + addr_t'(8 * i), d);
      check(d == pat(run, i), $sformatf("run %0d word %0d", run, i));
    end
    check(n_tx == 64, $sformatf("64 data flits, got %0d", n_tx));
    if (rate_check) check(last_tx - first_tx == 63, $sformatf("64 flits in %0d cycles", last_tx - first_tx + 1));
    bd_read(mtx_sync, d);
    check(d == '0, "SYNC channel untouched before its request");
    cpu_write(NI_REG_SEND, 64'h0060);
    wait_word(mtx_sync, MUTEX_SET, ok);
    check(ok, "zero-length request set the SYNC channel's mutex");
    bd_write(mtx_sync, '0);
    repeat (20) @(negedge clk);
    cpu_read(NI_REG_STATUS, d);
    check(d[10:0] == '0, $sformatf("status idle: %h", d));
  endtask

  initial begin
    s_axi_req = '0; s_axi_req.b_ready = 1; s_axi_req.r_ready = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    copy_run(0, 0, 1);
    copy_run(1, 30, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
