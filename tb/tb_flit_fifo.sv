// tb_flit_fifo: self-checking test of the flit queue.
// Random pushes and pops (also at full and empty) are checked against a
// queue model; full/empty/count are compared every cycle, and the first-word
// fall-through timing (a pushed flit is at the head one cycle later) is checked.
module tb_flit_fifo;
  localparam int DEPTH = 4;
  localparam int W     = 34;

  logic clk = 0, rst_n = 0;
  logic push, pop;
  logic [W-1:0] din, dout;
  logic full, empty;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model [$];

  flit_fifo #(.DEPTH(DEPTH), .WIDTH(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", msg, $time);
    end
  endtask

  initial begin
    push = 0; pop = 0; din = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(empty && !full && count == 0, "reset state");
    // single push: visible at head next cycle
    push = 1; din = 34'h2_1234_5678;
    @(negedge clk);
    push = 0;
    check(!empty && dout == 34'h2_1234_5678, "fall-through after one cycle");
    pop = 1;
    @(negedge clk);
    pop = 0;
    check(empty, "empty after pop");
    // random traffic
    for (int n = 0; n < 3000; n++) begin
      push = ($urandom_range(0, 99) < 55);
      pop  = ($urandom_range(0, 99) < 45);
      if (full && !pop) push = 0;
      if (empty) pop = 0;
      din = {$urandom(), $urandom()};
      // compare before the edge
      check(count == model.size(), "count");
      check(full == (model.size() == DEPTH), "full");
      check(empty == (model.size() == 0), "empty");
      if (model.size() > 0) check(dout == model[0], "head data");
      @(posedge clk);
      if (pop) void'(model.pop_front());
      if (push) model.push_back(din);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
