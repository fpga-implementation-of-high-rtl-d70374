// rr_arbiter: round-robin arbiter.
//
// Both allocators of the router grant requests in round-robin order, so that
// every requester is served in turn and none starves. The arbiter gives a
// one-hot grant to the first active request at or after the priority pointer.
// The pointer moves to the position after the winner only when the caller
// asserts advance, i.e. when the grant was actually used; an unused grant leaves
// the order unchanged. The grant is combinational; the pointer is registered.
module rr_arbiter #(
  parameter int N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] gnt
);

  localparam int IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] ptr;
  logic [IW-1:0] win;
  logic          found;

  always_comb begin
    logic [IW:0] idx;
    gnt   = '0;
    win   = '0;
    found = 1'b0;
    for (int k = 0; k < N; k++) begin
      idx = (IW+1)'(ptr) + (IW+1)'(k);
      if (idx >= (IW+1)'(N)) idx = idx - (IW+1)'(N);
      if (!found && req[idx[IW-1:0]]) begin
        found = 1'b1;
        win   = idx[IW-1:0];
      end
    end
    if (found) gnt[win] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) ptr <= '0;
    else if (advance && found) ptr <= (win == IW'(N-1)) ? '0 : win + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst_n) assert ($onehot0(gnt)) else $error("rr_arbiter: grant not one-hot");
  end

endmodule
