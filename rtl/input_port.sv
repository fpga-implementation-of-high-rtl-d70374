// input_port: one router input, i.e. input queue, routing logic and input state.
//
// Flits from the upstream link enter the input queue (valid/ready handshake;
// ready while the queue has room). When a head flit reaches the front of the
// queue the weighted XY unit picks its output port and, in the same cycle, the
// port asks for that output at the output port allocator (OPA) and for a shared
// queue at the shared-queue allocator (SQA). The state follows the three states
// the router keeps for every queue:
//   IDLE     no packet is being handled; a head flit at the front requests
//   WAIT     the head flit lost arbitration and keeps requesting, with its
//            output port held fixed from the first request
//   BUSY_OUT the output was granted: flits bypass the shared queues and go
//            straight to the output crossbar, one per cycle the output accepts
//   BUSY_SQ  a shared queue was granted: flits go to that queue instead
// A packet that wins both grants in the same cycle takes the output, as the
// router description says. After the tail flit leaves the port returns to
// IDLE. Grants are registered, so a head flit that reaches the front in cycle t
// and wins is offered to the output in cycle t+1.
// Routing here, in parallel with allocation, stands in for the look-ahead
// routing of the original scheme, because wXY weighs this router's own link
// bandwidths; that substitution is this design's choice.
module input_port
  import roshaq_pkg::*;
#(
  parameter int DEPTH = 4,
  parameter int NSQ   = 5,
  localparam int SQW  = (NSQ > 1) ? $clog2(NSQ) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // router position and link bandwidths for routing (index 0..3 = N, E, S, W)
  input  logic [COORD_W-1:0] my_x,
  input  logic [COORD_W-1:0] my_y,
  input  logic [BW_W-1:0]    bw_avail [4],
  // upstream link
  input  logic               in_valid,
  output logic               in_ready,
  input  flit_t              in_flit,
  // allocation
  output logic               req,
  output port_e              req_port,
  input  logic               opa_gnt,
  input  logic               sqa_gnt,
  input  logic [SQW-1:0]     sqa_sq,
  // flit offered to the crossbars
  output logic               head_valid,
  output flit_t              head_flit,
  input  logic [NPORTS-1:0]  out_ready,   // output j accepts a flit this cycle
  input  logic [NSQ-1:0]     sq_ready,    // shared queue k has room
  // observation
  output logic [1:0]         state_o,
  output logic               pop_o
);

  typedef enum logic [1:0] { S_IDLE, S_WAIT, S_BUSY_OUT, S_BUSY_SQ } state_e;

  state_e         state;
  port_e          port_q, rc_port;
  logic [SQW-1:0] sq_q;
  logic           empty, full, pop;
  logic [$clog2(DEPTH+1)-1:0] count;
  logic [FLIT_W-1:0] head_bits;

  flit_fifo #(.DEPTH(DEPTH), .WIDTH(FLIT_W)) u_queue (
    .clk, .rst_n,
    .push (in_valid && in_ready),
    .din  (in_flit),
    .pop  (pop),
    .dout (head_bits),
    .full (full),
    .empty(empty),
    .count(count)
  );

  assign in_ready   = !full;
  assign head_flit  = flit_t'(head_bits);
  assign head_valid = !empty;

  wxy_route u_rc (
    .cur_x (my_x),
    .cur_y (my_y),
    .dst_x (hdr_dst_x(head_flit.data)),
    .dst_y (hdr_dst_y(head_flit.data)),
    .bw_req(hdr_bw_req(head_flit.data)),
    .bw_n  (bw_avail[0]),
    .bw_e  (bw_avail[1]),
    .bw_s  (bw_avail[2]),
    .bw_w  (bw_avail[3]),
    .port  (rc_port),
    .w_n(), .w_e(), .w_s(), .w_w()
  );

  assign req      = head_valid && head_flit.head && (state == S_IDLE || state == S_WAIT);
  assign req_port = (state == S_WAIT) ? port_q : rc_port;

  always_comb begin
    pop = 1'b0;
    if (head_valid) begin
      if (state == S_BUSY_OUT) pop = out_ready[port_q];
      if (state == S_BUSY_SQ)  pop = sq_ready[sq_q];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      port_q <= P_LOCAL;
      sq_q   <= '0;
    end else begin
      case (state)
        S_IDLE, S_WAIT: begin
          if (req) begin
            port_q <= req_port;
            if (opa_gnt) begin
              state <= S_BUSY_OUT;
            end else if (sqa_gnt) begin
              state <= S_BUSY_SQ;
              sq_q  <= sqa_sq;
            end else begin
              state <= S_WAIT;
            end
          end
        end
        default: begin
          if (pop && head_flit.tail) state <= S_IDLE;
        end
      endcase
    end
  end

  assign state_o = state;
  assign pop_o   = pop;

  // A packet starts with a head flit; grants only come to a requesting port.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (!(head_valid && (state == S_IDLE) && !head_flit.head))
        else $error("input_port: packet without head flit");
      assert (!((opa_gnt || sqa_gnt) && !req))
        else $error("input_port: grant without request");
    end
  end

endmodule
