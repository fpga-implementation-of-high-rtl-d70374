// tb_input_port: self-checking test of one router input port.
// The testbench plays the two allocators and the downstream side. Checked:
// the request and its wXY port one cycle after a head flit is pushed; the
// output path (flits leave in order only while the granted output is ready);
// the wait state keeping its port when the link bandwidths change; the shared
// queue path; precedence of the output when both grants come together; and
// backpressure (in_ready low with a full queue).
module tb_input_port;
  import roshaq_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [3:0] my_x, my_y;
  logic [3:0] bw_avail [4];
  logic in_valid, in_ready;
  flit_t in_flit;
  logic req, opa_gnt, sqa_gnt;
  port_e req_port;
  logic [2:0] sqa_sq;
  logic head_valid;
  flit_t head_flit;
  logic [4:0] out_ready;
  logic [4:0] sq_ready;
  logic [1:0] state_o;
  logic pop_o;
  int checks = 0, failures = 0;

  input_port #(.DEPTH(4), .NSQ(5)) dut (.*);
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

  function automatic flit_t mk(bit h, bit t, int dx, int dy, int bp, int tag);
    flit_t f;
    f.head = h; f.tail = t;
    f.data = {16'(tag), 4'd0, 4'(bp), 4'(dy), 4'(dx)};
    return f;
  endfunction

  task automatic push(flit_t f);
    in_valid = 1; in_flit = f;
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    my_x = 2; my_y = 2;
    bw_avail[0] = 8; bw_avail[1] = 8; bw_avail[2] = 8; bw_avail[3] = 8;
    in_valid = 0; in_flit = '0; opa_gnt = 0; sqa_gnt = 0; sqa_sq = 0;
    out_ready = '0; sq_ready = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!req && state_o == 0 && in_ready, "idle after reset");

    // --- 1: three-flit packet to (4,2): East, granted the output
    push(mk(1, 0, 4, 2, 1, 1));
    check(req && req_port == P_EAST, "request East one cycle after push");
    push(mk(0, 0, 0, 0, 0, 2));
    push(mk(0, 1, 0, 0, 0, 3));
    check(req && req_port == P_EAST, "still requesting (wait)");
    check(state_o == 1, "state WAIT after losing");
    opa_gnt = 1;
    @(negedge clk);
    opa_gnt = 0;
    check(state_o == 2 && !req, "BUSY_OUT after grant");
    check(!pop_o, "no pop while output not ready");
    out_ready = 5'b00001;                   // wrong output ready: no move
    #1 check(!pop_o, "no pop on other output's ready");
    out_ready = 5'b00100;                   // East ready
    for (int k = 1; k <= 3; k++) begin
      #1 check(pop_o && head_flit.data[31:16] == 16'(k), "output flit order");
      @(negedge clk);
    end
    out_ready = '0;
    check(state_o == 0 && !head_valid, "idle after tail");

    // --- 2: packet to (2,0): North; wait, bandwidth change, then shared queue 3
    push(mk(1, 1, 2, 0, 1, 7));
    check(req && req_port == P_NORTH, "request North");
    @(negedge clk);
    bw_avail[0] = 0;                          // North loses its bandwidth
    #1 check(req && req_port == P_NORTH, "port held in WAIT");
    sqa_gnt = 1; sqa_sq = 3;
    @(negedge clk);
    sqa_gnt = 0;
    check(state_o == 3, "BUSY_SQ after shared queue grant");
    sq_ready = 5'b10111;                      // queue 3 full
    #1 check(!pop_o, "no pop into a full shared queue");
    sq_ready = 5'b01000;
    #1 check(pop_o && head_flit.data[31:16] == 16'd7, "flit into shared queue");
    @(negedge clk);
    sq_ready = '0;
    check(state_o == 0, "idle after single-flit packet");
    bw_avail[0] = 8;

    // --- 3: both grants in one cycle: output wins
    push(mk(1, 1, 0, 2, 1, 9));
    check(req && req_port == P_WEST, "request West");
    opa_gnt = 1; sqa_gnt = 1; sqa_sq = 1;
    @(negedge clk);
    opa_gnt = 0; sqa_gnt = 0;
    check(state_o == 2, "output taken over shared queue");
    sq_ready = '1;
    #1 check(!pop_o, "does not drain into the shared queue");
    out_ready = 5'b10000;
    #1 check(pop_o, "drains to West");
    @(negedge clk);
    out_ready = '0; sq_ready = '0;

    // --- 4: local delivery and backpressure
    push(mk(1, 0, 2, 2, 1, 10));
    check(req_port == P_LOCAL, "request Local at destination");
    push(mk(0, 0, 0, 0, 0, 11));
    push(mk(0, 0, 0, 0, 0, 12));
    push(mk(0, 0, 0, 0, 0, 13));
    check(!in_ready, "in_ready low when the queue is full");
    opa_gnt = 1;
    @(negedge clk);
    opa_gnt = 0;
    out_ready = 5'b00001;
    @(negedge clk);
    check(in_ready, "room again after a pop");
    out_ready = '0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
