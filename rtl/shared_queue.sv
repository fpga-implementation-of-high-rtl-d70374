// shared_queue: one of the router's shared buffer queues.
//
// Any input port may park a packet here when its output is busy. The queue
// only ever holds packets for a single output port: the allocator tags the
// queue with the packet's output port (set_port/new_port) when it grants a
// packet to an empty queue, and only lets packets for that same port join a
// non-empty queue. Because the port is known from the tag, a shared queue needs
// no routing logic of its own. When a head flit is at the front the queue asks
// the output port allocator for its port (req); once granted (opa_gnt) it
// streams the packet out one flit per cycle that out_ready is high and drops the
// request until the tail has left. Its state is idle (empty), wait (request
// pending) or busy (sending). Timing is that of flit_fifo: a flit written in
// cycle t can request in cycle t+1 and leave in cycle t+2.
module shared_queue
  import roshaq_pkg::*;
#(
  parameter int DEPTH = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  // write side, from the shared-queue crossbar
  input  logic  wr_en,
  input  flit_t wr_flit,
  input  logic  set_port,
  input  port_e new_port,
  output logic  full,
  output logic  empty,
  output port_e port,
  // read side, to the output crossbar
  output logic  req,
  input  logic  opa_gnt,
  output logic  head_valid,
  output flit_t head_flit,
  input  logic  out_ready,
  // observation: 0 idle, 1 wait, 2 busy
  output logic [1:0] state_o,
  output logic  pop_o
);

  logic sending, pop;
  logic [FLIT_W-1:0] head_bits;
  logic [$clog2(DEPTH+1)-1:0] count;

  flit_fifo #(.DEPTH(DEPTH), .WIDTH(FLIT_W)) u_queue (
    .clk, .rst_n,
    .push (wr_en),
    .din  (wr_flit),
    .pop  (pop),
    .dout (head_bits),
    .full (full),
    .empty(empty),
    .count(count)
  );

  assign head_flit  = flit_t'(head_bits);
  assign head_valid = !empty;
  assign req        = !sending && head_valid && head_flit.head;
  assign pop        = sending && head_valid && out_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sending <= 1'b0;
      port    <= P_LOCAL;
    end else begin
      if (set_port) port <= new_port;
      if (opa_gnt) sending <= 1'b1;
      else if (pop && head_flit.tail) sending <= 1'b0;
    end
  end

  assign state_o = sending ? 2'd2 : (req ? 2'd1 : 2'd0);
  assign pop_o   = pop;

  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (!(opa_gnt && !req)) else $error("shared_queue: grant without request");
      assert (!(set_port && !empty && new_port != port))
        else $error("shared_queue: packet for another port joined a non-empty queue");
    end
  end

endmodule
