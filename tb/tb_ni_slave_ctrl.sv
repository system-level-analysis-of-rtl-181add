// tb_ni_slave_ctrl: AXI accesses to the NI's register window.
//   * SEND writes must hand their pointer to the send FIFO exactly once; with
//     the FIFO full (send_ready low) the B response must wait for it.
//   * LUT writes must produce one LUT write with the right index and entry.
//   * STATUS reads must return the status inputs; other offsets read 0.
//   * AW and W presented in different cycles, in either order, must work.
module tb_ni_slave_ctrl;
  import noc_pkg::*;
  localparam int unsigned E = 256;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  axi_req_t   s_axi_req;
  axi_rsp_t   s_axi_rsp;
  logic       send_valid, send_ready;
  addr_t      send_ptr;
  logic       lut_we;
  logic [7:0] lut_waddr;
  lut_entry_t lut_wdata;
  logic [3:0] fifo_count;
  logic       send_busy, recv_busy, wr_busy;

  int checks = 0, failures = 0;
  addr_t      sends [$];
  logic [7:0] lut_idx [$];
  lut_entry_t lut_val [$];

  ni_slave_ctrl #(.LUT_ENTRIES(E), .FIFO_CNT_W(4)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (send_valid && send_ready) sends.push_back(send_ptr);
    if (lut_we) begin lut_idx.push_back(lut_waddr); lut_val.push_back(lut_wdata); end
  end

  // write with AW leading W by aw_lead cycles (negative: W first); returns cycles to B
  task automatic axi_write(input addr_t a, input data_t d, input int aw_lead, output int lat);
    bit aw_hs, w_hs, b_hs;
    int t;
    @(negedge clk);
    s_axi_req.aw = '{id: 4'h3, addr: a, len: 8'd0, size: AXI_SIZE_8B, burst: AXI_INCR};
    s_axi_req.w  = '{data: d, strb: '1, last: 1'b1};
    t = 0;
    s_axi_req.aw_valid = (aw_lead >= 0);
    s_axi_req.w_valid  = (aw_lead <= 0);
    do begin
      #1;
      aw_hs = s_axi_req.aw_valid && s_axi_rsp.aw_ready;
      w_hs  = s_axi_req.w_valid && s_axi_rsp.w_ready;
      @(negedge clk);
      t++;
      if (aw_hs) s_axi_req.aw_valid = 0;
      if (w_hs)  s_axi_req.w_valid  = 0;
      if (t == (aw_lead < 0 ? -aw_lead : aw_lead)) begin
        if (aw_lead > 0 && !w_hs) s_axi_req.w_valid = 1;
        if (aw_lead < 0 && !aw_hs) s_axi_req.aw_valid = 1;
      end
    end while (s_axi_req.aw_valid || s_axi_req.w_valid || t < (aw_lead < 0 ? -aw_lead : aw_lead));
    do begin
      #1;
      b_hs = s_axi_rsp.b_valid;
      if (b_hs) check(s_axi_rsp.b.id == 4'h3, "B id");
      @(negedge clk);
      t++;
    end while (!b_hs);
    lat = t;
  endtask

  task automatic axi_read(input addr_t a, output data_t d);
    bit hs;
    @(negedge clk);
    s_axi_req.ar = '{id: 4'h5, addr: a, len: 8'd0, size: AXI_SIZE_8B, burst: AXI_INCR};
    s_axi_req.ar_valid = 1;
    do begin #1; hs = s_axi_rsp.ar_ready; @(negedge clk); end while (!hs);
    s_axi_req.ar_valid = 0;
    do begin
      #1; hs = s_axi_rsp.r_valid; d = s_axi_rsp.r.data;
      if (hs) check(s_axi_rsp.r.last && s_axi_rsp.r.id == 4'h5, "R last and id");
      @(negedge clk);
    end while (!hs);
  endtask

  initial begin
    int lat;
    data_t d;
    s_axi_req = '0; s_axi_req.b_ready = 1; s_axi_req.r_ready = 1;
    send_ready = 1; fifo_count = 4'd0; send_busy = 0; recv_busy = 0; wr_busy = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // SEND requests with different AW/W orders
    axi_write(NI_REG_SEND, 64'h0000_0000_0000_1040, 0, lat);
    axi_write(NI_REG_SEND, 64'h0000_0000_0000_2080, 2, lat);
    axi_write(NI_REG_SEND, 64'h0000_0000_0000_30C0, -3, lat);
    repeat (2) @(negedge clk);
    check(sends.size() == 3, $sformatf("3 send requests, got %0d", sends.size()));
    if (sends.size() == 3) begin
      check(sends[0] == 32'h1040 && sends[1] == 32'h2080 && sends[2] == 32'h30C0, "send pointers");
    end
    sends.delete();

    // FIFO full: response held until send_ready
    send_ready = 0;
    fork
      axi_write(NI_REG_SEND, 64'h4400, 0, lat);
      begin repeat (10) @(negedge clk); send_ready = 1; end
    join
    check(lat >= 10, $sformatf("B waited for the FIFO (%0d cycles)", lat));
    check(sends.size() == 1 && sends[0] == 32'h4400, "held request delivered once");
    sends.delete();

    // LUT writes
    for (int i = 0; i < 20; i++) begin
      int idx;
      lut_entry_t e;
      idx = (i * 37) % E;
      e = {32'($urandom), 32'($urandom)};
      axi_write(addr_t'(32'h8000 + 8 * idx), e, i % 3 - 1, lat);
      @(negedge clk);
      check(lut_idx.size() == 1 && lut_idx[0] == 8'(idx) && lut_val[0] == e,
            $sformatf("LUT write %0d", idx));
      lut_idx.delete(); lut_val.delete();
    end
    check(sends.size() == 0, "LUT writes post no send request");

    // STATUS and unmapped reads
    fifo_count = 4'd5; send_busy = 1; recv_busy = 0; wr_busy = 1;
    axi_read(NI_REG_STATUS, d);
    check(d == 64'h0000_0000_0000_0505, $sformatf("status %h", d));
    fifo_count = 4'd0; send_busy = 0; recv_busy = 1; wr_busy = 0;
    axi_read(NI_REG_STATUS, d);
    check(d == 64'h0000_0000_0000_0200, $sformatf("status %h", d));
    axi_read(32'h0010, d);
    check(d == '0, "unmapped offset reads 0");
    axi_write(32'h0018, 64'h1234, 0, lat);
    @(negedge clk);
    check(sends.size() == 0 && lut_idx.size() == 0, "unmapped write has no effect");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
