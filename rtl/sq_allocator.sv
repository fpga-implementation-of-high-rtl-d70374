// sq_allocator: shared-queue allocator (SQA).
//
// Takes the requests of all input queues and grants them write access to the
// shared queues. A shared queue k is eligible for input i when it has room and
// either is empty or holds packets for the same output port as i's packet;
// the document states both rules. This design adds that a queue being written
// by one input is not eligible for another, so wormhole packets never
// interleave inside a queue.
// Allocation is separable and takes one cycle: every requesting input picks the
// lowest-numbered eligible queue, and every queue grants one of the inputs that
// picked it in round-robin order (rr_arbiter). A grant is committed only if the
// same input did not also win its output in this cycle (in_opa_gnt), because
// the output has precedence. A committed queue is locked to its writer
// (wr_busy, wr_owner; these drive the shared-queue crossbar) from the next
// cycle until the writer's tail flit has been written (wr_done), and it is
// tagged with the packet's output port in the cycle of the commit.
module sq_allocator
  import roshaq_pkg::*;
#(
  parameter int NIN  = 5,
  parameter int NSQ  = 5,
  localparam int SQW = (NSQ > 1) ? $clog2(NSQ) : 1,
  localparam int IW  = (NIN > 1) ? $clog2(NIN) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [NIN-1:0] in_req,
  input  port_e          in_port   [NIN],
  input  logic [NIN-1:0] in_opa_gnt,
  output logic [NIN-1:0] gnt,
  output logic [SQW-1:0] gnt_sq    [NIN],
  input  logic [NSQ-1:0] sq_empty,
  input  logic [NSQ-1:0] sq_full,
  input  port_e          sq_port   [NSQ],
  input  logic [NSQ-1:0] wr_done,
  output logic [NSQ-1:0] wr_busy,
  output logic [IW-1:0]  wr_owner  [NSQ],
  output logic [NSQ-1:0] set_port,
  output port_e          new_port  [NSQ]
);

  logic [NSQ-1:0] elig   [NIN];
  logic [NIN-1:0] choose [NSQ];   // inputs that picked queue k
  logic [NIN-1:0] qgnt   [NSQ];   // queue k's round-robin winner
  logic [NSQ-1:0] commit;
  logic [IW-1:0]  winner [NSQ];

  // Input stage: eligibility and choice of the lowest eligible queue.
  always_comb begin
    for (int k = 0; k < NSQ; k++) choose[k] = '0;
    for (int i = 0; i < NIN; i++) begin
      logic picked;
      picked = 1'b0;
      for (int k = 0; k < NSQ; k++) begin
        elig[i][k] = in_req[i] && !wr_busy[k] && !sq_full[k] &&
                     (sq_empty[k] || sq_port[k] == in_port[i]);
        if (elig[i][k] && !picked) begin
          picked       = 1'b1;
          choose[k][i] = 1'b1;
        end
      end
    end
  end

  // Queue stage: one round-robin arbiter per shared queue.
  for (genvar k = 0; k < NSQ; k++) begin : g_q
    rr_arbiter #(.N(NIN)) u_arb (
      .clk, .rst_n,
      .req    (choose[k]),
      .advance(commit[k]),
      .gnt    (qgnt[k])
    );
  end

  always_comb begin
    gnt = '0;
    for (int i = 0; i < NIN; i++) gnt_sq[i] = '0;
    for (int k = 0; k < NSQ; k++) begin
      commit[k]   = 1'b0;
      winner[k]   = '0;
      new_port[k] = P_LOCAL;
      for (int i = 0; i < NIN; i++) begin
        if (qgnt[k][i]) begin
          gnt[i]      = 1'b1;
          gnt_sq[i]   = SQW'(k);
          winner[k]   = IW'(i);
          commit[k]   = !in_opa_gnt[i];
          new_port[k] = in_port[i];
        end
      end
    end
    set_port = commit;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_busy <= '0;
      for (int k = 0; k < NSQ; k++) wr_owner[k] <= '0;
    end else begin
      for (int k = 0; k < NSQ; k++) begin
        if (commit[k]) begin
          wr_busy[k]  <= 1'b1;
          wr_owner[k] <= winner[k];
        end else if (wr_done[k]) begin
          wr_busy[k]  <= 1'b0;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert ((commit & wr_busy) == '0) else $error("sq_allocator: locked queue granted");
    end
  end

endmodule
