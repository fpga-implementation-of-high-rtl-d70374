// tb_rr_arbiter: self-checking test of the round-robin arbiter.
// A reference pointer model predicts every grant: the first request at or
// after the position following the last committed winner. Also checks that
// an uncommitted grant does not rotate priority and that all-on requests are
// served in strict rotation.
module tb_rr_arbiter;
  localparam int N = 5;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, gnt;
  logic advance;
  int checks = 0, failures = 0;
  int ptr;

  rr_arbiter #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] expect_gnt(logic [N-1:0] r, int p);
    for (int k = 0; k < N; k++) if (r[(p + k) % N]) return N'(1) << ((p + k) % N);
    return '0;
  endfunction

  initial begin
    req = '0; advance = 0; ptr = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // all requesting: rotation 0,1,2,3,4,0
    req = '1; advance = 1;
    for (int k = 0; k < 2 * N; k++) begin
      #1;
      checks++;
      if (gnt != (N'(1) << (k % N))) begin failures++; $display("FAIL rotation %0d gnt=%b", k, gnt); end
      @(negedge clk);
    end
    ptr = 0;
    // random, with random commit
    for (int n = 0; n < 2000; n++) begin
      logic [N-1:0] e;
      req = N'($urandom());
      advance = $urandom_range(0, 1);
      #1;
      e = expect_gnt(req, ptr);
      checks++;
      if (gnt !== e) begin failures++; $display("FAIL req=%b ptr=%0d gnt=%b exp=%b", req, ptr, gnt, e); end
      @(posedge clk);
      if (advance && e != 0) for (int k = 0; k < N; k++) if (e[k]) ptr = (k + 1) % N;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
