// tb_ni_lut: both LUT variants at the default 256 entries. Writes random
// entries, then reads them back: the SRAM variant must deliver the entry one
// cycle after the read enable and hold it while re is low, the register
// variant in the same cycle. Compares with a reference array.
module tb_ni_lut;
  import noc_pkg::*;
  localparam int unsigned E = 256;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic we, re;
  logic [7:0] waddr, raddr;
  lut_entry_t wdata, rd_sram, rd_reg;
  lut_entry_t ref_mem [E];
  int checks = 0, failures = 0;

  ni_lut #(.ENTRIES(E), .SRAM(1'b1)) dut_sram (.clk, .rst_n, .we, .waddr, .wdata, .re, .raddr, .rdata(rd_sram));
  ni_lut #(.ENTRIES(E), .SRAM(1'b0)) dut_reg  (.clk, .rst_n, .we, .waddr, .wdata, .re, .raddr, .rdata(rd_reg));

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

  initial begin
    lut_entry_t held;
    we = 0; re = 0; waddr = '0; raddr = '0; wdata = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    #1 check(rd_reg == '0, "register LUT resets to zero");
    for (int i = 0; i < int'(E); i++) begin
      @(negedge clk);
      we = 1; waddr = 8'(i); wdata = {32'($urandom), 32'($urandom)};
      ref_mem[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int k = 0; k < 600; k++) begin
      int a;
      a = $urandom_range(E - 1);
      raddr = 8'(a); re = 1;
      #1 check(rd_reg == ref_mem[a], "register LUT reads in the same cycle");
      @(negedge clk);
      re = 0;
      raddr = 8'($urandom);
      #1 check(rd_sram == ref_mem[a], "SRAM LUT reads one cycle later");
      held = rd_sram;
      @(negedge clk);
      check(rd_sram == held, "SRAM output holds while re is low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
