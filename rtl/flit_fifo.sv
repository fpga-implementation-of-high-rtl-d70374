// flit_fifo: generic synchronous first-in first-out queue.
//
// The router uses the same queue for its input queues and its shared queues,
// in line with the idea of reusing a plain queue design rather than managing
// buffers flit by flit. It is a circular buffer with read and write pointers and
// an occupancy counter. The head entry is visible on dout in the same cycle it
// becomes valid (first-word fall-through), so a consumer sees a flit one cycle
// after it was pushed. push and pop may happen in the same cycle, also when the
// queue is full (the popped slot is reused). Depth and width are this design's
// choice; the document gives no queue depth.
module flit_fifo #(
  parameter int DEPTH = 4,
  parameter int WIDTH = 34
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push,
  input  logic [WIDTH-1:0]           din,
  input  logic                       pop,
  output logic [WIDTH-1:0]           dout,
  output logic                       full,
  output logic                       empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    rd_ptr, wr_ptr;

  assign empty = (count == 0);
  assign full  = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign dout  = mem[rd_ptr];

  wire do_pop  = pop && !empty;
  wire do_push = push && (!full || do_pop);

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (p == AW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= next_ptr(wr_ptr);
      if (do_pop)  rd_ptr <= next_ptr(rd_ptr);
      case ({do_push, do_pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= din;
  end

  // Handshake rules: never write a full queue, never read an empty one.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (!(push && full && !pop)) else $error("flit_fifo: push while full");
      assert (!(pop && empty))         else $error("flit_fifo: pop while empty");
    end
  end

endmodule
