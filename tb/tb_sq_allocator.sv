// tb_sq_allocator: self-checking test of the shared-queue allocator.
// Random requests, output ports, OPA grants and queue status. A reference
// model applies the write rules (queue has room; empty or same output port;
// not being written), the lowest-eligible-queue choice per input and a
// round-robin choice per queue, and predicts grants, the granted queue,
// port tagging and the write locks. It also checks that no grant ever breaks
// the write rules and that an input that won its output does not lock a queue.
module tb_sq_allocator;
  import roshaq_pkg::*;
  localparam int NIN = 5, NSQ = 5;
  logic clk = 0, rst_n = 0;
  logic [NIN-1:0] in_req, in_opa_gnt, gnt;
  port_e in_port [NIN];
  logic [2:0] gnt_sq [NIN];
  logic [NSQ-1:0] sq_empty, sq_full, wr_done, wr_busy, set_port;
  port_e sq_port [NSQ];
  port_e new_port [NSQ];
  logic [2:0] wr_owner [NSQ];
  int checks = 0, failures = 0;
  int m_ptr [NSQ], m_owner [NSQ];
  bit m_busy [NSQ];
  int commits = 0;

  sq_allocator #(.NIN(NIN), .NSQ(NSQ)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  initial begin
    int pick [NIN];
    int win [NSQ];
    in_req = '0; in_opa_gnt = '0; sq_empty = '1; sq_full = '0; wr_done = '0;
    for (int i = 0; i < NIN; i++) in_port[i] = P_LOCAL;
    for (int k = 0; k < NSQ; k++) begin sq_port[k] = P_LOCAL; m_ptr[k] = 0; m_busy[k] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 4000; n++) begin
      for (int i = 0; i < NIN; i++) begin
        in_req[i] = ($urandom_range(0, 99) < 50);
        in_port[i] = port_e'($urandom_range(0, 4));
        in_opa_gnt[i] = in_req[i] && ($urandom_range(0, 3) == 0);
      end
      for (int k = 0; k < NSQ; k++) begin
        sq_empty[k] = ($urandom_range(0, 2) == 0);
        sq_full[k]  = !sq_empty[k] && ($urandom_range(0, 3) == 0);
        sq_port[k]  = port_e'($urandom_range(0, 4));
        wr_done[k]  = m_busy[k] && ($urandom_range(0, 2) == 0);
      end
      // model: input picks lowest eligible queue
      for (int i = 0; i < NIN; i++) begin
        pick[i] = -1;
        for (int k = NSQ - 1; k >= 0; k--)
          if (in_req[i] && !m_busy[k] && !sq_full[k] && (sq_empty[k] || sq_port[k] == in_port[i]))
            pick[i] = k;
      end
      for (int k = 0; k < NSQ; k++) begin
        win[k] = -1;
        for (int c = 0; c < NIN; c++) begin
          int i;
          i = (m_ptr[k] + c) % NIN;
          if (win[k] < 0 && pick[i] == k) win[k] = i;
        end
      end
      #1;
      for (int i = 0; i < NIN; i++) begin
        bit eg;
        int ek;
        eg = 0; ek = 0;
        for (int k = 0; k < NSQ; k++) if (win[k] == i) begin eg = 1; ek = k; end
        check(gnt[i] == eg, "grant");
        if (eg) check(int'(gnt_sq[i]) == ek, "granted queue");
      end
      for (int k = 0; k < NSQ; k++) begin
        bit ec;
        ec = (win[k] >= 0) && !in_opa_gnt[win[k]];
        check(set_port[k] == ec, "commit / port tag");
        if (ec) begin
          check(new_port[k] == in_port[win[k]], "tag is the packet's port");
          check(sq_empty[k] || sq_port[k] == in_port[win[k]], "write rule");
        end
        check(wr_busy[k] == m_busy[k], "write lock");
        if (m_busy[k]) check(int'(wr_owner[k]) == m_owner[k], "lock owner");
      end
      @(posedge clk);
      for (int k = 0; k < NSQ; k++) begin
        if (win[k] >= 0 && !in_opa_gnt[win[k]]) begin
          m_busy[k] = 1; m_owner[k] = win[k]; m_ptr[k] = (win[k] + 1) % NIN; commits++;
        end else if (wr_done[k]) m_busy[k] = 0;
      end
      @(negedge clk);
    end
    check(commits > 100, "enough commits exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
