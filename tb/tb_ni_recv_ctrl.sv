// tb_ni_recv_ctrl: Recv Control with an SRAM LUT (instance 0) and with a
// register LUT (instance 1), fed the same flits.
//   * latency: a lone flit's write request appears one cycle after the flit
//     with the SRAM LUT and in the same cycle with the register LUT;
//   * three flows whose flits interleave, plus a SYNC flit, under random
//     write back-pressure: every data flit becomes one write to
//     data_base + 8 * offset of its flow's LUT entry, the last flit of a
//     buffer and the SYNC flit are followed by a fence write of MUTEX_SET to
//     the flow's mutex pointer, in flit order.
module tb_ni_recv_ctrl;
  import noc_pkg::*;
  localparam int unsigned E = 256;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       flit_valid [2], flit_ready [2];
  flit_t      flit [2];
  logic       lut_we;
  logic [7:0] lut_waddr;
  lut_entry_t lut_wdata;
  wr_req_t    wr_req [2];
  logic       wr_valid [2], wr_ready [2], busy [2];

  int checks = 0, failures = 0;
  wr_req_t exp_q [2][$];
  lut_entry_t lut_ref [E];
  int n_bp = 0;

  ni_recv_ctrl #(.LUT_ENTRIES(E), .LUT_SRAM(1'b1)) dut_sram (
    .clk, .rst_n, .flit_valid(flit_valid[0]), .flit_ready(flit_ready[0]), .flit(flit[0]),
    .lut_we, .lut_waddr, .lut_wdata,
    .wr_req(wr_req[0]), .wr_valid(wr_valid[0]), .wr_ready(wr_ready[0]), .busy(busy[0]));
  ni_recv_ctrl #(.LUT_ENTRIES(E), .LUT_SRAM(1'b0)) dut_reg (
    .clk, .rst_n, .flit_valid(flit_valid[1]), .flit_ready(flit_ready[1]), .flit(flit[1]),
    .lut_we, .lut_waddr, .lut_wdata,
    .wr_req(wr_req[1]), .wr_valid(wr_valid[1]), .wr_ready(wr_ready[1]), .busy(busy[1]));

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
    for (int k = 0; k < 2; k++) begin
      if (wr_valid[k] && !wr_ready[k]) n_bp++;
      if (wr_valid[k] && wr_ready[k]) begin
        if (exp_q[k].size() == 0) check(0, $sformatf("unexpected write from instance %0d", k));
        else check(wr_req[k] == exp_q[k].pop_front(), $sformatf("write of instance %0d", k));
      end
    end
  end

  function automatic flit_t mk(input int flow, input flit_kind_e kind, input bit last, input int off);
    flit_t f;
    f = '0;
    f.hdr.flow_id = FLOW_ID_W'(flow);
    f.hdr.kind = kind;
    f.hdr.last = last;
    f.hdr.offset = OFFSET_W'(off);
    f.data = {16'(flow), 16'(off), 32'($urandom)};
    return f;
  endfunction

  task automatic expect_for(input flit_t f);
    lut_entry_t e;
    e = lut_ref[f.hdr.flow_id];
    for (int k = 0; k < 2; k++) begin
      if (f.hdr.kind == FLIT_DATA)
        exp_q[k].push_back('{addr: e.data_base + addr_t'(8 * int'(f.hdr.offset)), data: f.data, fence: 1'b0});
      if (f.hdr.last || f.hdr.kind == FLIT_SYNC)
        exp_q[k].push_back('{addr: e.mutex_ptr, data: MUTEX_SET, fence: 1'b1});
    end
  endtask

  // offer one flit to both instances; each takes it on its own ready
  task automatic send(input flit_t f);
    bit done [2];
    expect_for(f);
    @(negedge clk);
    for (int k = 0; k < 2; k++) begin flit_valid[k] = 1; flit[k] = f; done[k] = 0; end
    while (!(done[0] && done[1])) begin
      #1;
      for (int k = 0; k < 2; k++) if (flit_valid[k] && flit_ready[k]) done[k] = 1;
      @(negedge clk);
      for (int k = 0; k < 2; k++) if (done[k]) flit_valid[k] = 0;
    end
  endtask

  task automatic cfg(input int idx, input addr_t base, input addr_t mtx);
    @(negedge clk);
    lut_we = 1; lut_waddr = 8'(idx); lut_wdata = '{mutex_ptr: mtx, data_base: base};
    lut_ref[idx] = lut_wdata;
    @(negedge clk);
    lut_we = 0;
  endtask

  initial begin
    int off [3];
    int len [3] = '{12, 5, 20};
    int flows [3] = '{3, 77, 254};
    for (int k = 0; k < 2; k++) begin flit_valid[k] = 0; flit[k] = '0; wr_ready[k] = 1; end
    lut_we = 0; lut_waddr = '0; lut_wdata = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    cfg(3,   32'h1000, 32'h0100);
    cfg(77,  32'h2000, 32'h0108);
    cfg(254, 32'h3000, 32'h0110);
    cfg(9,   32'h0000, 32'h0118);

    // latency of a lone data flit
    begin
      flit_t f;
      f = mk(3, FLIT_DATA, 0, 0);
      expect_for(f);
      @(negedge clk);
      for (int k = 0; k < 2; k++) begin flit_valid[k] = 1; flit[k] = f; end
      #1;
      check(wr_valid[1] && !wr_valid[0], "register LUT: request in the flit's cycle");
      @(negedge clk);
      for (int k = 0; k < 2; k++) flit_valid[k] = 0;
      #1;
      check(wr_valid[0], "SRAM LUT: request one cycle after the flit");
      @(negedge clk);
    end

    // interleaved flows with back-pressure
    fork
      begin
        off = '{0, 0, 0};
        while (off[0] < len[0] || off[1] < len[1] || off[2] < len[2]) begin
          int s;
          s = $urandom_range(2);
          if (off[s] < len[s]) begin
            send(mk(flows[s], FLIT_DATA, off[s] == len[s] - 1, off[s]));
            off[s]++;
          end
          if (off[1] == 3 && s == 1) send(mk(9, FLIT_SYNC, 1, 0));
        end
      end
      begin
        repeat (300) begin
          @(negedge clk);
          for (int k = 0; k < 2; k++) wr_ready[k] = ($urandom_range(99) < 60);
        end
        for (int k = 0; k < 2; k++) wr_ready[k] = 1;
      end
    join
    repeat (10) @(negedge clk);
    check(exp_q[0].size() == 0 && exp_q[1].size() == 0, "all expected writes seen");
    check(!busy[0] && !busy[1], "idle at the end");
    check(n_bp > 0, "write back-pressure happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
