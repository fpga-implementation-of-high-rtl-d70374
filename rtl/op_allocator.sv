// op_allocator: output port allocator (OPA) with the output port states.
//
// One round-robin arbiter per output port chooses among all requesters that
// want that output: the input queues (requesters 0..NIN-1) and the shared
// queues (NIN..NREQ-1). Only an idle output arbitrates. The winner gets a
// one-cycle grant (gnt) and the output becomes busy, owned by the winner, from
// the next cycle on; busy/owner drive the output crossbar. The output is
// released after the cycle in which its tail flit leaves (tail_done), and may
// be granted again one cycle later. Round-robin order, and the inclusion of
// both kinds of queue, follow the document; the one idle cycle between packets
// on an output is this design's simplification.
module op_allocator
  import roshaq_pkg::*;
#(
  parameter int NOUT = NPORTS,
  parameter int NREQ = 10,
  localparam int RW  = (NREQ > 1) ? $clog2(NREQ) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NREQ-1:0] req,
  input  port_e           req_port [NREQ],
  output logic [NREQ-1:0] gnt,
  input  logic [NOUT-1:0] tail_done,
  output logic [NOUT-1:0] busy,
  output logic [RW-1:0]   owner    [NOUT]
);

  logic [NREQ-1:0] oreq [NOUT];
  logic [NREQ-1:0] ogn  [NOUT];
  logic [NOUT-1:0] take;

  always_comb begin
    for (int j = 0; j < NOUT; j++) begin
      for (int q = 0; q < NREQ; q++)
        oreq[j][q] = req[q] && (int'(req_port[q]) == j) && !busy[j];
      take[j] = |oreq[j];
    end
  end

  for (genvar j = 0; j < NOUT; j++) begin : g_out
    rr_arbiter #(.N(NREQ)) u_arb (
      .clk, .rst_n,
      .req    (oreq[j]),
      .advance(take[j]),
      .gnt    (ogn[j])
    );
  end

  always_comb begin
    gnt = '0;
    for (int j = 0; j < NOUT; j++) gnt |= ogn[j];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= '0;
      for (int j = 0; j < NOUT; j++) owner[j] <= '0;
    end else begin
      for (int j = 0; j < NOUT; j++) begin
        if (take[j]) begin
          busy[j] <= 1'b1;
          for (int q = 0; q < NREQ; q++)
            if (ogn[j][q]) owner[j] <= RW'(q);
        end else if (tail_done[j]) begin
          busy[j] <= 1'b0;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst_n) begin
      for (int j = 0; j < NOUT; j++)
        assert (!(tail_done[j] && !busy[j])) else $error("op_allocator: tail on idle output");
    end
  end

endmodule
