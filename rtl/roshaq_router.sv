// roshaq_router: five-port network-on-chip router with shared queues (RoShaQ).
//
// Each of the five ports (Local, North, East, South, West) has an input queue.
// A packet whose head flit reaches the front of its input queue is routed by
// weighted XY routing and competes at the same time for its output port
// (output port allocator, OPA) and for a shared queue (shared-queue allocator,
// SQA). If the output is granted the packet bypasses the shared queues and
// crosses the output crossbar directly, which keeps zero-load latency low. If
// only a shared queue is granted the packet is moved through the shared-queue
// crossbar into that queue, freeing its input queue, and the shared queue then
// competes for the output on its own. A shared queue accepts a packet only when
// it is empty or already holds packets for the same output, so idle buffer
// space is lent to busy ports. The two crossbars work in parallel.
//
// Interface: per port a valid/ready flit channel in and out (flit_t from
// roshaq_pkg), the router's own mesh coordinates, and the bandwidth still
// available on the North, East, South and West output links (bw_avail[0..3]),
// which the weighted XY routing uses. A transfer happens on a cycle where valid
// and ready are both high.
// Timing without contention: a head flit accepted at an input in cycle t is
// arbitrated in cycle t+1 and appears at the output in cycle t+2; the rest of
// the packet follows one flit per cycle. Through a shared queue it takes two
// cycles more (write in t+2, arbitrate in t+3, output in t+4).
// The document gives the port count, the shared-queue write rules, round-robin
// arbitration, the output-over-queue priority and the routing weights; queue
// depths, the number of shared queues, flit format and link handshake are this
// design's choices.
module roshaq_router
  import roshaq_pkg::*;
#(
  parameter int IQ_DEPTH = 4,   // input queue depth in flits
  parameter int NSQ      = 5,   // number of shared queues
  parameter int SQ_DEPTH = 4,   // shared queue depth in flits
  localparam int NREQ    = NPORTS + NSQ,
  localparam int SQW     = (NSQ > 1) ? $clog2(NSQ) : 1,
  localparam int IW      = $clog2(NPORTS),
  localparam int RW      = $clog2(NREQ)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [COORD_W-1:0] my_x,
  input  logic [COORD_W-1:0] my_y,
  input  logic [BW_W-1:0]    bw_avail  [4],
  input  logic [NPORTS-1:0]  in_valid,
  output logic [NPORTS-1:0]  in_ready,
  input  flit_t              in_flit   [NPORTS],
  output logic [NPORTS-1:0]  out_valid,
  input  logic [NPORTS-1:0]  out_ready,
  output flit_t              out_flit  [NPORTS]
);

  // Input ports
  logic [NPORTS-1:0] ip_req, ip_opa_gnt, ip_sqa_gnt, ip_head_valid, ip_pop;
  port_e             ip_req_port  [NPORTS];
  logic [SQW-1:0]    ip_sqa_sq    [NPORTS];
  flit_t             ip_head_flit [NPORTS];
  logic [1:0]        ip_state     [NPORTS];

  // Shared queues
  logic [NSQ-1:0]    sq_wr_en, sq_set_port, sq_full, sq_empty, sq_req, sq_opa_gnt;
  logic [NSQ-1:0]    sq_head_valid, sq_out_ready, sq_pop, sq_wr_done, sq_wr_busy;
  port_e             sq_new_port  [NSQ];
  port_e             sq_port      [NSQ];
  flit_t             sq_head_flit [NSQ];
  logic [1:0]        sq_state     [NSQ];
  logic [IW-1:0]     sq_wr_owner  [NSQ];

  // Output port allocator
  logic [NREQ-1:0]   opa_req, opa_gnt;
  port_e             opa_req_port [NREQ];
  logic [NPORTS-1:0] op_busy, tail_done;
  logic [RW-1:0]     op_owner     [NPORTS];

  // Crossbar data
  logic [FLIT_W-1:0] xs_in   [NPORTS];
  logic [FLIT_W-1:0] xs_out  [NSQ];
  logic [NSQ-1:0]    xs_valid;
  logic [FLIT_W-1:0] xo_in   [NREQ];
  logic [NREQ-1:0]   xo_in_valid;
  logic [FLIT_W-1:0] xo_out  [NPORTS];

  for (genvar i = 0; i < NPORTS; i++) begin : g_in
    input_port #(.DEPTH(IQ_DEPTH), .NSQ(NSQ)) u_ip (
      .clk, .rst_n, .my_x, .my_y, .bw_avail,
      .in_valid  (in_valid[i]),
      .in_ready  (in_ready[i]),
      .in_flit   (in_flit[i]),
      .req       (ip_req[i]),
      .req_port  (ip_req_port[i]),
      .opa_gnt   (ip_opa_gnt[i]),
      .sqa_gnt   (ip_sqa_gnt[i]),
      .sqa_sq    (ip_sqa_sq[i]),
      .head_valid(ip_head_valid[i]),
      .head_flit (ip_head_flit[i]),
      .out_ready (out_ready),
      .sq_ready  (~sq_full),
      .state_o   (ip_state[i]),
      .pop_o     (ip_pop[i])
    );
    assign xs_in[i]          = ip_head_flit[i];
    assign xo_in[i]          = ip_head_flit[i];
    assign xo_in_valid[i]    = ip_head_valid[i];
    assign opa_req[i]        = ip_req[i];
    assign opa_req_port[i]   = ip_req_port[i];
    assign ip_opa_gnt[i]     = opa_gnt[i];
  end

  for (genvar k = 0; k < NSQ; k++) begin : g_sq
    flit_t wr_flit;
    assign wr_flit = flit_t'(xs_out[k]);

    shared_queue #(.DEPTH(SQ_DEPTH)) u_sq (
      .clk, .rst_n,
      .wr_en     (sq_wr_en[k]),
      .wr_flit   (wr_flit),
      .set_port  (sq_set_port[k]),
      .new_port  (sq_new_port[k]),
      .full      (sq_full[k]),
      .empty     (sq_empty[k]),
      .port      (sq_port[k]),
      .req       (sq_req[k]),
      .opa_gnt   (sq_opa_gnt[k]),
      .head_valid(sq_head_valid[k]),
      .head_flit (sq_head_flit[k]),
      .out_ready (sq_out_ready[k]),
      .state_o   (sq_state[k]),
      .pop_o     (sq_pop[k])
    );
    assign sq_wr_en[k]            = xs_valid[k] && !sq_full[k];
    assign sq_wr_done[k]          = sq_wr_en[k] && wr_flit.tail;
    assign sq_out_ready[k]        = out_ready[sq_port[k]];
    assign xo_in[NPORTS+k]        = sq_head_flit[k];
    assign xo_in_valid[NPORTS+k]  = sq_head_valid[k];
    assign opa_req[NPORTS+k]      = sq_req[k];
    assign opa_req_port[NPORTS+k] = sq_port[k];
    assign sq_opa_gnt[k]          = opa_gnt[NPORTS+k];
  end

  sq_allocator #(.NIN(NPORTS), .NSQ(NSQ)) u_sqa (
    .clk, .rst_n,
    .in_req    (ip_req),
    .in_port   (ip_req_port),
    .in_opa_gnt(ip_opa_gnt),
    .gnt       (ip_sqa_gnt),
    .gnt_sq    (ip_sqa_sq),
    .sq_empty  (sq_empty),
    .sq_full   (sq_full),
    .sq_port   (sq_port),
    .wr_done   (sq_wr_done),
    .wr_busy   (sq_wr_busy),
    .wr_owner  (sq_wr_owner),
    .set_port  (sq_set_port),
    .new_port  (sq_new_port)
  );

  op_allocator #(.NOUT(NPORTS), .NREQ(NREQ)) u_opa (
    .clk, .rst_n,
    .req      (opa_req),
    .req_port (opa_req_port),
    .gnt      (opa_gnt),
    .tail_done(tail_done),
    .busy     (op_busy),
    .owner    (op_owner)
  );

  // Crossbar 1: input queues -> shared queues
  crossbar #(.NIN(NPORTS), .NOUT(NSQ), .WIDTH(FLIT_W)) u_xbar_sq (
    .in_data  (xs_in),
    .in_valid (ip_head_valid),
    .sel      (sq_wr_owner),
    .sel_en   (sq_wr_busy),
    .out_data (xs_out),
    .out_valid(xs_valid)
  );

  // Crossbar 2: input queues and shared queues -> output ports
  crossbar #(.NIN(NREQ), .NOUT(NPORTS), .WIDTH(FLIT_W)) u_xbar_out (
    .in_data  (xo_in),
    .in_valid (xo_in_valid),
    .sel      (op_owner),
    .sel_en   (op_busy),
    .out_data (xo_out),
    .out_valid(out_valid)
  );

  always_comb begin
    for (int j = 0; j < NPORTS; j++) begin
      out_flit[j]  = flit_t'(xo_out[j]);
      tail_done[j] = out_valid[j] && out_ready[j] && out_flit[j].tail;
    end
  end

endmodule
