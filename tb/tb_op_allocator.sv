// tb_op_allocator: self-checking test of the output port allocator.
// Random requests (10 requesters, 5 outputs) and random tail completions on
// busy outputs. A reference model keeps, per output, the busy flag, the
// owner and the round-robin pointer, and predicts every grant, the busy
// flags and owners cycle by cycle. Also checks that each output is granted
// at most once while busy and that every requester is eventually served.
module tb_op_allocator;
  import roshaq_pkg::*;
  localparam int NOUT = 5, NREQ = 10;
  logic clk = 0, rst_n = 0;
  logic [NREQ-1:0] req, gnt;
  port_e req_port [NREQ];
  logic [NOUT-1:0] tail_done, busy;
  logic [3:0] owner [NOUT];
  int checks = 0, failures = 0;
  int m_ptr [NOUT], m_owner [NOUT];
  bit m_busy [NOUT];
  int served [NREQ];

  op_allocator #(.NOUT(NOUT), .NREQ(NREQ)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NREQ-1:0] exp_gnt;
    int win [NOUT];
    req = '0; tail_done = '0;
    for (int q = 0; q < NREQ; q++) req_port[q] = P_LOCAL;
    for (int j = 0; j < NOUT; j++) begin m_ptr[j] = 0; m_busy[j] = 0; m_owner[j] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 4000; n++) begin
      for (int q = 0; q < NREQ; q++) begin
        req[q] = ($urandom_range(0, 99) < 40);
        req_port[q] = port_e'($urandom_range(0, 4));
      end
      for (int j = 0; j < NOUT; j++) tail_done[j] = m_busy[j] && ($urandom_range(0, 2) == 0);
      // model
      exp_gnt = '0;
      for (int j = 0; j < NOUT; j++) begin
        win[j] = -1;
        if (!m_busy[j])
          for (int k = 0; k < NREQ; k++) begin
            int q;
            q = (m_ptr[j] + k) % NREQ;
            if (win[j] < 0 && req[q] && int'(req_port[q]) == j) win[j] = q;
          end
        if (win[j] >= 0) exp_gnt[win[j]] = 1'b1;
      end
      #1;
      checks++;
      if (gnt != exp_gnt) begin failures++; $display("FAIL gnt=%b exp=%b", gnt, exp_gnt); end
      for (int j = 0; j < NOUT; j++) begin
        checks++;
        if (busy[j] != m_busy[j] || (m_busy[j] && owner[j] != 4'(m_owner[j]))) begin
          failures++; $display("FAIL out %0d busy/owner", j);
        end
      end
      @(posedge clk);
      for (int j = 0; j < NOUT; j++) begin
        if (win[j] >= 0) begin
          m_busy[j] = 1; m_owner[j] = win[j]; m_ptr[j] = (win[j] + 1) % NREQ;
          served[win[j]]++;
        end else if (tail_done[j]) m_busy[j] = 0;
      end
      @(negedge clk);
    end
    for (int q = 0; q < NREQ; q++) begin
      checks++;
      if (served[q] == 0) begin failures++; $display("FAIL requester %0d starved", q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
