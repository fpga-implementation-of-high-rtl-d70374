// tb_shared_queue: self-checking test of one shared queue.
// Writes two packets for the same output, checks the port tag, the request
// of each head flit, the busy state while sending, flit order, that no flit
// leaves before the grant or while the output is not ready, and full/empty.
module tb_shared_queue;
  import roshaq_pkg::*;
  logic clk = 0, rst_n = 0;
  logic wr_en, set_port, full, empty, req, opa_gnt, head_valid, out_ready, pop_o;
  flit_t wr_flit, head_flit;
  port_e new_port, port;
  logic [1:0] state_o;
  int checks = 0, failures = 0;

  shared_queue #(.DEPTH(4)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  task automatic wr(bit h, bit t, int tag);
    wr_en = 1; wr_flit.head = h; wr_flit.tail = t; wr_flit.data = 32'(tag);
    @(negedge clk);
    wr_en = 0; set_port = 0;
  endtask

  initial begin
    wr_en = 0; set_port = 0; new_port = P_LOCAL; opa_gnt = 0; out_ready = 0;
    wr_flit = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(empty && !req && state_o == 0, "idle after reset");
    set_port = 1; new_port = P_SOUTH;
    wr(1, 0, 1);
    check(port == P_SOUTH, "port tag set");
    check(req && state_o == 1, "head flit requests output");
    wr(0, 1, 2);
    wr(1, 0, 3);
    wr(0, 1, 4);
    check(full, "full with four flits");
    out_ready = 1;
    #1 check(!pop_o, "no flit before grant");
    opa_gnt = 1;
    @(negedge clk);
    opa_gnt = 0;
    check(state_o == 2 && !req, "busy after grant");
    out_ready = 0;
    #1 check(!pop_o, "holds while output not ready");
    out_ready = 1;
    #1 check(pop_o && head_flit.data == 1, "flit 1 out");
    @(negedge clk);
    check(pop_o && head_flit.data == 2 && head_flit.tail, "flit 2 out");
    @(negedge clk);
    check(state_o == 1 && req && !pop_o, "second packet requests again");
    opa_gnt = 1;
    @(negedge clk);
    opa_gnt = 0;
    check(pop_o && head_flit.data == 3, "flit 3 out");
    @(negedge clk);
    check(pop_o && head_flit.data == 4, "flit 4 out");
    @(negedge clk);
    check(empty && state_o == 0, "empty and idle at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
