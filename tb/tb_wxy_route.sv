// tb_wxy_route: self-checking test of the weighted XY routing unit.
// Hand-worked cases first, then random coordinates and bandwidths checked
// against an integer model of the weight equations:
//   w = 0 if b < b_p; b * distance + B_MAX if the direction faces the
//   destination; b otherwise; highest weight wins (ties E, W, N, S),
//   Local at the destination, XY direction if every weight is zero.
module tb_wxy_route;
  import roshaq_pkg::*;
  logic [3:0] cur_x, cur_y, dst_x, dst_y, bw_req, bw_n, bw_e, bw_s, bw_w;
  port_e port;
  logic [8:0] w_n, w_e, w_s, w_w;
  int checks = 0, failures = 0;

  wxy_route dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int wt(int b, int bp, bit facing, int d);
    if (b < bp) return 0;
    if (facing) return b * d + 15;
    return b;
  endfunction

  function automatic port_e model(int cx, int cy, int dx, int dy, int bp,
                                  int bn, int be, int bs, int bw);
    int wn, we, ws, ww, best;
    port_e p;
    if (cx == dx && cy == dy) return P_LOCAL;
    wn = wt(bn, bp, dy < cy, (cy > dy) ? cy - dy : dy - cy);
    ws = wt(bs, bp, dy > cy, (cy > dy) ? cy - dy : dy - cy);
    we = wt(be, bp, dx > cx, (cx > dx) ? cx - dx : dx - cx);
    ww = wt(bw, bp, dx < cx, (cx > dx) ? cx - dx : dx - cx);
    if (wn + ws + we + ww == 0) begin
      if (dx > cx) return P_EAST;
      if (dx < cx) return P_WEST;
      if (dy < cy) return P_NORTH;
      return P_SOUTH;
    end
    p = P_EAST; best = we;
    if (ww > best) begin p = P_WEST; best = ww; end
    if (wn > best) begin p = P_NORTH; best = wn; end
    if (ws > best) begin p = P_SOUTH; best = ws; end
    return p;
  endfunction

  task automatic run(int cx, int cy, int dx, int dy, int bp, int bn, int be,
                     int bs, int bw, port_e exp_p);
    cur_x = 4'(cx); cur_y = 4'(cy); dst_x = 4'(dx); dst_y = 4'(dy);
    bw_req = 4'(bp); bw_n = 4'(bn); bw_e = 4'(be); bw_s = 4'(bs); bw_w = 4'(bw);
    #1;
    checks++;
    if (port != exp_p) begin
      failures++;
      $display("FAIL (%0d,%0d)->(%0d,%0d) bp=%0d b=%0d,%0d,%0d,%0d got %s exp %s",
               cx, cy, dx, dy, bp, bn, be, bs, bw, port.name(), exp_p.name());
    end
  endtask

  initial begin
    // hand-worked: destination at this node
    run(3, 3, 3, 3, 1, 9, 9, 9, 9, P_LOCAL);
    // east 2, north 1; b_E=4 -> 4*2+15=23, b_N=8 -> 8*1+15=23: tie -> East
    run(3, 3, 5, 2, 1, 8, 4, 9, 9, P_EAST);
    // same, b_N=9 -> 24 > 23 -> North
    run(3, 3, 5, 2, 1, 9, 4, 9, 9, P_NORTH);
    // east link lacks bandwidth (b_E=2 < b_p=3): detour North (w_N = b_N = 5)
    run(3, 3, 5, 3, 3, 5, 2, 0, 0, P_NORTH);
    // with W and S at 9 the detour goes West (9 > 5; tie W before S)
    run(3, 3, 5, 3, 3, 5, 2, 9, 9, P_WEST);
    // destination west, only south has bandwidth: non-minimal detour South
    run(3, 3, 1, 3, 6, 0, 0, 7, 5, P_SOUTH);
    // no bandwidth anywhere: XY says West
    run(3, 3, 1, 0, 6, 0, 0, 0, 0, P_WEST);
    // check one weight value directly: b_S=7, distance 4 -> 43
    run(3, 1, 3, 5, 1, 0, 0, 7, 0, P_SOUTH);
    checks++;
    if (w_s != 9'd43) begin failures++; $display("FAIL w_s=%0d", w_s); end
    for (int n = 0; n < 20000; n++) begin
      int cx, cy, dx, dy, bp, bn, be, bs, bw;
      cx = $urandom_range(0, 15); cy = $urandom_range(0, 15);
      dx = ($urandom_range(0, 3) == 0) ? cx : $urandom_range(0, 15);
      dy = ($urandom_range(0, 3) == 0) ? cy : $urandom_range(0, 15);
      bp = $urandom_range(0, 15);
      bn = $urandom_range(0, 15); be = $urandom_range(0, 15);
      bs = $urandom_range(0, 15); bw = $urandom_range(0, 15);
      run(cx, cy, dx, dy, bp, bn, be, bs, bw, model(cx, cy, dx, dy, bp, bn, be, bs, bw));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
