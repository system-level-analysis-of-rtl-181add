// tb_ni_send_ctrl: Send Control reading from a behavioural memory.
//   1. a 1 kB buffer (128 words) whose source crosses a 4 KB boundary, with
//      no stalls: 128 flits on consecutive cycles (one flit per clock), each
//      with the descriptor's destination and flow ID, its word offset, the
//      right payload and `last` on the final flit; then the local mutex write;
//      no read burst may cross the 4 KB boundary;
//   2. three requests posted back to back (16 B, zero-length, 40 words) with
//      random memory stalls and random NoC back-pressure: served in order,
//      the zero-length one as a single SYNC flit; a descriptor without mutex
//      pointer produces no mutex write.
module tb_ni_send_ctrl;
  import noc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic     req_valid, req_ready;
  addr_t    req_ptr;
  logic [3:0] fifo_count;
  logic     busy;
  axi_ax_t  ar;
  logic     ar_valid, ar_ready, r_valid, r_ready;
  axi_r_t   r;
  wr_req_t  wr_req;
  logic     wr_valid, wr_ready;
  logic     flit_valid, flit_ready;
  flit_t    flit;

  axi_req_t mreq;
  axi_rsp_t mrsp;
  int       stall_pct = 0;
  logic     bd_we = 0;
  int       bd_widx = 0, bd_ridx = 0;
  data_t    bd_wdata = '0, bd_rdata;

  int checks = 0, failures = 0;
  flit_t   flits [$];
  int      flit_cyc [$];
  wr_req_t mutexes [$];
  int      cyc = 0, n_bp = 0;

  ni_send_ctrl #(.FIFO_DEPTH(8), .BURST_MAX(16)) dut (.*);

  always_comb begin
    mreq          = '0;
    mreq.ar       = ar;
    mreq.ar_valid = ar_valid;
    mreq.r_ready  = r_ready;
    mreq.b_ready  = 1'b1;
  end
  assign ar_ready = mrsp.ar_ready;
  assign r_valid  = mrsp.r_valid;
  assign r        = mrsp.r;

  tb_axi_mem u_mem (.clk, .rst_n, .stall_pct, .req(mreq), .rsp(mrsp),
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
    if (flit_valid && flit_ready) begin flits.push_back(flit); flit_cyc.push_back(cyc); end
    if (flit_valid && !flit_ready) n_bp++;
    if (wr_valid && wr_ready) mutexes.push_back(wr_req);
    if (ar_valid && ar_ready)
      check((ar.addr >> 12) == ((ar.addr + 8 * ar.len) >> 12), "burst within a 4 KB page");
  end

  task automatic bd_write(input addr_t a, input data_t d);
    @(negedge clk);
    bd_we = 1; bd_widx = int'(a >> 3); bd_wdata = d;
    @(negedge clk);
    bd_we = 0;
  endtask

  function automatic data_t pat(input int tag, input int i);
    return {8'(tag), 24'(i), 32'(i * 32'h9E37_79B9)};
  endfunction

  task automatic desc(input addr_t at, input addr_t bp, input int len, input int x, input int y,
                      input int flow, input addr_t mtx);
    bd_write(at, {16'd0, 16'(len), bp});
    bd_write(at + 8, {mtx, 16'(flow), 8'(y), 8'(x)});
  endtask

  task automatic post(input addr_t p);
    @(negedge clk);
    req_valid = 1; req_ptr = p;
    #1 while (!req_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    req_valid = 0;
  endtask

  task automatic check_pkt(input int len, input int x, input int y, input int flow, input int tag,
                           input bit consecutive);
    int c0;
    if (len == 0) begin
      flit_t f;
      f = flits.pop_front(); void'(flit_cyc.pop_front());
      check(f.hdr.kind == FLIT_SYNC && f.hdr.last && f.hdr.flow_id == FLOW_ID_W'(flow) &&
            f.hdr.dst_x == COORD_W'(x) && f.hdr.dst_y == COORD_W'(y), "SYNC flit");
      return;
    end
    c0 = 0;
    for (int i = 0; i < len; i++) begin
      flit_t f;
      int c;
      f = flits.pop_front(); c = flit_cyc.pop_front();
      if (i == 0) c0 = c;
      check(f.hdr.kind == FLIT_DATA && f.hdr.dst_x == COORD_W'(x) && f.hdr.dst_y == COORD_W'(y) &&
            f.hdr.flow_id == FLOW_ID_W'(flow) && f.hdr.offset == OFFSET_W'(i) &&
            f.hdr.last == (i == len - 1) && f.data == pat(tag, i),
            $sformatf("flit %0d of flow %0d", i, flow));
      if (consecutive) check(c == c0 + i, $sformatf("flit %0d leaves in cycle %0d of the packet", i, c - c0));
    end
  endtask

  initial begin
    req_valid = 0; req_ptr = '0; wr_ready = 1; flit_ready = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // 1. 1 kB across a 4 KB boundary, no stalls
    for (int i = 0; i < 128; i++) bd_write(addr_t'(32'h0F00 + 8 * i), pat(1, i));
    desc(32'h0040, 32'h0F00, 128, 3, 1, 200, 32'h0300);
    post(32'h0040);
    wait (!busy && fifo_count == 0 && flits.size() == 128);
    repeat (3) @(negedge clk);
    check(flits.size() == 128, $sformatf("128 flits, got %0d", flits.size()));
    if (flits.size() == 128) check_pkt(128, 3, 1, 200, 1, 1);
    check(mutexes.size() == 1 && mutexes[0].addr == 32'h0300 && mutexes[0].data == MUTEX_SET,
          "local mutex written after the buffer");
    mutexes.delete();

    // 2. queued requests, stalls and back-pressure
    for (int i = 0; i < 2; i++)  bd_write(addr_t'(32'h2000 + 8 * i), pat(2, i));
    for (int i = 0; i < 40; i++) bd_write(addr_t'(32'h3000 + 8 * i), pat(3, i));
    desc(32'h0080, 32'h2000, 2,  1, 0, 7,  32'h0308);
    desc(32'h00A0, 32'h0000, 0,  2, 1, 9,  32'h0000);
    desc(32'h00C0, 32'h3000, 40, 0, 1, 33, 32'h0310);
    stall_pct = 25;
    fork
      begin post(32'h0080); post(32'h00A0); post(32'h00C0); end
      begin
        repeat (400) begin @(negedge clk); flit_ready = ($urandom_range(99) < 60); wr_ready = ($urandom_range(99) < 50); end
        flit_ready = 1; wr_ready = 1;
      end
    join
    repeat (20) @(negedge clk);
    check(!busy && fifo_count == 0, "all requests served");
    check(flits.size() == 43, $sformatf("43 flits, got %0d", flits.size()));
    if (flits.size() == 43) begin
      check_pkt(2, 1, 0, 7, 2, 0);
      check_pkt(0, 2, 1, 9, 0, 0);
      check_pkt(40, 0, 1, 33, 3, 0);
    end
    check(mutexes.size() == 2 && mutexes[0].addr == 32'h0308 && mutexes[1].addr == 32'h0310,
          "mutex writes only where a pointer is given");
    check(n_bp > 0, "NoC back-pressure happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
