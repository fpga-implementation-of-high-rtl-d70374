// wxy_route: weighted XY (wXY) adaptive routing computation.
//
// For each of the four mesh directions the unit forms a weight from the
// bandwidth still available on that output (b_N, b_E, b_S, b_W), the bandwidth
// the packet asks for (b_p) and the distance to the destination along the axis
// of that direction:
//   b_d < b_p                    -> w_d = 0            (not enough bandwidth)
//   direction faces destination  -> w_d = b_d * dist + B_MAX
//   otherwise                    -> w_d = b_d
// e.g. w_E = b_E * (x_d - x) + B_MAX when x_d > x. The packet leaves on the
// direction of largest weight, so a productive direction with enough bandwidth
// always wins, and among productive directions the one with more bandwidth and
// more distance left is preferred. These rules are the document's; the zero
// case is given priority over the facing case, as its text states.
// This design's own choices: the Local port is chosen when the destination is
// this node; ties go in the order E, W, N, S; when every weight is zero the
// packet takes the plain XY direction. North is decreasing y. Combinational.
module wxy_route
  import roshaq_pkg::*;
#(
  parameter int              CW    = COORD_W,
  parameter int              BW    = BW_W,
  parameter logic [BW-1:0]   B_MAX = '1
) (
  input  logic [CW-1:0] cur_x,
  input  logic [CW-1:0] cur_y,
  input  logic [CW-1:0] dst_x,
  input  logic [CW-1:0] dst_y,
  input  logic [BW-1:0] bw_req,     // b_p
  input  logic [BW-1:0] bw_n,       // b_N
  input  logic [BW-1:0] bw_e,       // b_E
  input  logic [BW-1:0] bw_s,       // b_S
  input  logic [BW-1:0] bw_w,       // b_W
  output port_e         port,
  output logic [BW+CW:0] w_n,       // weights, exposed for observation
  output logic [BW+CW:0] w_e,
  output logic [BW+CW:0] w_s,
  output logic [BW+CW:0] w_w
);

  localparam int WW = BW + CW + 1;

  logic [CW-1:0] dist_x, dist_y;
  logic          go_e, go_w, go_n, go_s;

  assign go_e   = dst_x > cur_x;
  assign go_w   = dst_x < cur_x;
  assign go_s   = dst_y > cur_y;
  assign go_n   = dst_y < cur_y;
  assign dist_x = go_e ? dst_x - cur_x : cur_x - dst_x;
  assign dist_y = go_s ? dst_y - cur_y : cur_y - dst_y;

  function automatic logic [WW-1:0] weight(logic [BW-1:0] b, logic facing,
                                           logic [CW-1:0] d, logic [BW-1:0] bp);
    if (b < bp)      return '0;
    else if (facing) return WW'(b) * WW'(d) + WW'(B_MAX);
    else             return WW'(b);
  endfunction

  assign w_n = weight(bw_n, go_n, dist_y, bw_req);
  assign w_e = weight(bw_e, go_e, dist_x, bw_req);
  assign w_s = weight(bw_s, go_s, dist_y, bw_req);
  assign w_w = weight(bw_w, go_w, dist_x, bw_req);

  always_comb begin
    logic [WW-1:0] best;
    best = w_e;
    if (!go_e && !go_w && !go_n && !go_s) begin
      port = P_LOCAL;
    end else if (w_n == '0 && w_e == '0 && w_s == '0 && w_w == '0) begin
      // No direction has the bandwidth: fall back to dimension-order XY.
      if (go_e)      port = P_EAST;
      else if (go_w) port = P_WEST;
      else if (go_n) port = P_NORTH;
      else           port = P_SOUTH;
    end else begin
      port = P_EAST;
      best = w_e;
      if (w_w > best) begin port = P_WEST;  best = w_w; end
      if (w_n > best) begin port = P_NORTH; best = w_n; end
      if (w_s > best) begin port = P_SOUTH; best = w_s; end
    end
  end

endmodule
