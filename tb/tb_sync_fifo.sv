// tb_sync_fifo: random pushes and pops against a reference queue. Checks the
// order and value of every popped word, the occupancy count, that push_ready
// drops exactly when the FIFO is full and pop_valid exactly when it is empty,
// and that a word pushed at one edge can be popped at the next.
module tb_sync_fifo;
  localparam int unsigned W = 16, D = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         push_valid, push_ready, pop_valid, pop_ready;
  logic [W-1:0] push_data, pop_data;
  logic [$clog2(D+1)-1:0] count;
  logic [W-1:0] model [$];
  int checks = 0, failures = 0;
  int n_full = 0, n_empty = 0;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

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
    push_valid = 0; pop_ready = 0; push_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // fill-through: push at one edge, visible at the next
    @(negedge clk); push_valid = 1; push_data = 16'h1234;
    @(negedge clk); push_valid = 0;
    check(pop_valid && pop_data == 16'h1234, "word visible one cycle after push");
    pop_ready = 1;
    @(negedge clk); pop_ready = 0;
    check(!pop_valid && count == 0, "empty after pop");
    for (int t = 0; t < 3000; t++) begin
      // phases: mostly push, mostly pop, balanced
      int pp, pq;
      pp = (t % 600 < 200) ? 90 : (t % 600 < 400) ? 10 : 50;
      pq = 100 - pp;
      push_valid = ($urandom_range(99) < pp);
      pop_ready  = ($urandom_range(99) < pq);
      push_data  = W'($urandom);
      #1;
      check(count == model.size(), "count matches model");
      check(push_ready == (model.size() < D), "push_ready iff not full");
      check(pop_valid == (model.size() > 0), "pop_valid iff not empty");
      if (pop_valid) check(pop_data == model[0], "head data");
      if (model.size() == D) n_full++;
      if (model.size() == 0) n_empty++;
      @(posedge clk);
      if (pop_valid && pop_ready) void'(model.pop_front());
      if (push_valid && push_ready) model.push_back(push_data);
      @(negedge clk);
    end
    check(n_full > 0 && n_empty > 0, "reached full and empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
