// tb_roshaq_router: end-to-end self-checking test of the shared-queue router
// at its default parameters (five ports, five shared queues, queues of four
// flits).
//
// Directed part: checks the zero-load bypass latency (head flit on the output
// two cycles after the input accepted it) and the shared-queue path (two
// packets for the same output arrive together; one bypasses, the other is
// parked in a shared queue and follows right after the first one's tail and
// the one-cycle release of the output).
// Random part: phases with random router position, link bandwidths and output
// readiness; every input sends packets of 1..4 flits to random destinations.
// The expected output port of each packet comes from an integer model of the
// weighted XY rule in this file. Every output flit is checked: the packet must
// be expected on that output, its flits must arrive contiguously and in order,
// and every packet must be delivered exactly once.
// Mechanisms counted (each must occur): bypass to the output, write into a
// shared queue, a packet joining a non-empty shared queue for the same port,
// both grants in one cycle (output taken), wait state, output stall, input
// backpressure, full shared queue, adaptive route off the XY direction,
// fall-back to XY when no link has the bandwidth, local delivery.
module tb_roshaq_router;
  import roshaq_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [3:0] my_x, my_y;
  logic [3:0] bw_avail [4];
  logic [4:0] in_valid, in_ready, out_valid, out_ready;
  flit_t in_flit [5];
  flit_t out_flit [5];

  roshaq_router dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(negedge clk) cycle++;   // stable while posedge blocks sample it

  // ---------------------------------------------------------------- watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d", msg, cycle);
    end
  endtask

  // ------------------------------------------------------ wXY reference model
  int n_adaptive = 0, n_fallback = 0, n_local = 0;

  function automatic int wt(int b, int bp, bit facing, int d);
    if (b < bp) return 0;
    if (facing) return b * d + 15;
    return b;
  endfunction

  function automatic int route(int cx, int cy, int dx, int dy, int bp, output bit adaptive,
                               output bit fallback);
    int wn, we, ws, ww, best, p, xy;
    adaptive = 0; fallback = 0;
    if (cx == dx && cy == dy) return 0;
    xy = (dx > cx) ? 2 : (dx < cx) ? 4 : (dy < cy) ? 1 : 3;
    wn = wt(bw_avail[0], bp, dy < cy, (cy > dy) ? cy - dy : dy - cy);
    we = wt(bw_avail[1], bp, dx > cx, (cx > dx) ? cx - dx : dx - cx);
    ws = wt(bw_avail[2], bp, dy > cy, (cy > dy) ? cy - dy : dy - cy);
    ww = wt(bw_avail[3], bp, dx < cx, (cx > dx) ? cx - dx : dx - cx);
    if (wn + we + ws + ww == 0) begin fallback = 1; return xy; end
    p = 2; best = we;
    if (ww > best) begin p = 4; best = ww; end
    if (wn > best) begin p = 1; best = wn; end
    if (ws > best) begin p = 3; best = ws; end
    adaptive = (p != xy);
    return p;
  endfunction

  // ------------------------------------------------------------- sources
  flit_t  txq [5][$];
  int     exp_port [int];
  int     exp_len  [int];
  int     seq [5];
  int     in_rate = 100, out_rate = 100;
  int     n_sent = 0, n_recv = 0;

  function automatic flit_t mkflit(bit h, bit t, int id, int idx, logic [11:0] low);
    flit_t f;
    f.head = h; f.tail = t;
    f.data = {16'(id), 4'(idx), low};
    return f;
  endfunction

  // Queue one packet at input src; returns its id.
  function automatic int send_pkt(int src, int dx, int dy, int bp, int len);
    int id;
    bit ad, fb;
    id = src * 8192 + seq[src];
    seq[src] = (seq[src] + 1) % 8192;
    exp_port[id] = route(my_x, my_y, dx, dy, bp, ad, fb);
    exp_len[id]  = len;
    if (ad) n_adaptive++;
    if (fb) n_fallback++;
    if (exp_port[id] == 0) n_local++;
    for (int k = 0; k < len; k++)
      txq[src].push_back(mkflit(k == 0, k == len - 1, id, k,
                                (k == 0) ? {4'(bp), 4'(dy), 4'(dx)} : 12'($urandom())));
    n_sent++;
    return id;
  endfunction

  always @(negedge clk) begin
    for (int i = 0; i < 5; i++) begin
      in_valid[i] = (txq[i].size() > 0) && ($urandom_range(1, 100) <= in_rate);
      in_flit[i]  = (txq[i].size() > 0) ? txq[i][0] : '0;
      out_ready[i] = ($urandom_range(1, 100) <= out_rate);
    end
  end

  // --------------------------------------------------- mechanism counters
  int n_bypass = 0, n_sqwrite = 0, n_sqappend = 0, n_both = 0, n_wait = 0;
  int n_ostall = 0, n_backpress = 0, n_sqfull = 0;

  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < 5; i++) begin
      if (in_valid[i] && in_ready[i]) void'(txq[i].pop_front());
      if (in_valid[i] && !in_ready[i]) n_backpress++;
      if (dut.ip_req[i] && dut.ip_opa_gnt[i]) n_bypass++;
      if (dut.ip_req[i] && !dut.ip_opa_gnt[i] && dut.ip_sqa_gnt[i]) n_sqwrite++;
      if (dut.ip_opa_gnt[i] && dut.ip_sqa_gnt[i]) n_both++;
      if (dut.ip_state[i] == 2'd1) n_wait++;
      if (out_valid[i] && !out_ready[i]) n_ostall++;
    end
    for (int k = 0; k < 5; k++) begin
      if (dut.sq_set_port[k] && !dut.sq_empty[k]) n_sqappend++;
      if (dut.xs_valid[k] && dut.sq_full[k]) n_sqfull++;
    end
  end

  // ------------------------------------------------------------ scoreboard
  int cur_id [5], cur_idx [5];
  bit in_pkt [5];
  longint last_head_cycle [5];
  int last_head_id [5];

  always @(posedge clk) if (rst_n) begin
    for (int j = 0; j < 5; j++) if (out_valid[j] && out_ready[j]) begin
      int id, idx;
      id  = int'(out_flit[j].data[31:16]);
      idx = int'(out_flit[j].data[15:12]);
      if (out_flit[j].head) begin
        check(!in_pkt[j], "head flit inside another packet");
        check(exp_port.exists(id), "unknown or duplicate packet");
        if (exp_port.exists(id)) check(exp_port[id] == j, "packet left on the wrong port");
        check(idx == 0, "head flit index");
        in_pkt[j] = 1; cur_id[j] = id; cur_idx[j] = 0;
        last_head_cycle[j] = cycle; last_head_id[j] = id;
      end else begin
        check(in_pkt[j] && id == cur_id[j], "body flit of another packet");
        check(idx == cur_idx[j] + 1, "flit order");
        cur_idx[j] = idx;
      end
      if (out_flit[j].tail) begin
        if (exp_len.exists(id)) check(exp_len[id] == idx + 1, "packet length");
        exp_port.delete(id); exp_len.delete(id);
        in_pkt[j] = 0;
        n_recv++;
      end
    end
  end

  task automatic drain(int max_cycles);
    int c;
    c = 0;
    while ((exp_port.size() > 0 || txq[0].size() + txq[1].size() + txq[2].size() +
            txq[3].size() + txq[4].size() > 0) && c < max_cycles) begin
      @(posedge clk); c++;
    end
    check(exp_port.size() == 0, "all packets delivered");
    repeat (3) @(posedge clk);
  endtask

  // Wait for the cycle in which input src accepts a flit.
  task automatic wait_accept(int src, output longint t);
    do @(posedge clk); while (!(in_valid[src] && in_ready[src]));
    t = cycle;
  endtask

  // --------------------------------------------------------------- stimulus
  initial begin
    longint t0, t1;
    int id_a, id_b;
    my_x = 7; my_y = 7;
    for (int d = 0; d < 4; d++) bw_avail[d] = 4'd8;
    for (int i = 0; i < 5; i++) begin seq[i] = 0; in_pkt[i] = 0; end
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    // Directed 1: zero-load bypass latency. Local -> East, one flit.
    id_a = send_pkt(0, 9, 7, 1, 1);
    wait_accept(0, t0);
    wait (exp_port.size() == 0);
    check(last_head_id[2] == id_a && last_head_cycle[2] == t0 + 2,
          "bypass latency: output two cycles after input");
    repeat (3) @(posedge clk);

    // Directed 2: North and South inputs send 4-flit packets to East together.
    id_a = send_pkt(1, 10, 7, 1, 4);
    id_b = send_pkt(3, 10, 7, 1, 4);
    wait_accept(1, t0);
    wait (exp_port.size() == 1);
    t1 = last_head_cycle[2];
    wait (exp_port.size() == 0);
    check(last_head_cycle[2] - t1 == 5, "shared-queue packet follows after tail + release");
    check(t1 == t0 + 2, "bypassing packet latency");
    check(n_sqwrite >= 1 && n_bypass >= 2, "one bypass and one shared-queue write");
    repeat (3) @(posedge clk);

    // Random phases.
    for (int ph = 0; ph < 40; ph++) begin
      int npk, maxlen;
      my_x = 4'($urandom_range(0, 15));
      my_y = 4'($urandom_range(0, 15));
      for (int d = 0; d < 4; d++)
        bw_avail[d] = (ph % 5 == 4) ? 4'($urandom_range(0, 2)) : 4'($urandom_range(0, 15));
      in_rate  = (ph % 3 == 0) ? 100 : $urandom_range(20, 100);
      out_rate = (ph % 4 == 1) ? 100 : $urandom_range(15, 100);
      maxlen   = (ph % 2) ? 4 : 2;
      npk = 30;
      for (int n = 0; n < npk; n++)
        for (int i = 0; i < 5; i++) begin
          int dx, dy;
          if ($urandom_range(0, 9) == 0) begin dx = my_x; dy = my_y; end
          else if ($urandom_range(0, 2) == 0) begin
            // hot spot: many packets to one neighbour direction
            dx = (my_x < 15) ? my_x + 1 : my_x - 1; dy = my_y;
          end else begin dx = $urandom_range(0, 15); dy = $urandom_range(0, 15); end
          void'(send_pkt(i, dx, dy, $urandom_range(0, 9), $urandom_range(1, maxlen)));
        end
      drain(20000);
    end

    check(n_recv == n_sent, "every sent packet received");
    $display("packets sent %0d received %0d", n_sent, n_recv);
    $display("bypass=%0d sq_write=%0d sq_append=%0d both_grants=%0d wait=%0d",
             n_bypass, n_sqwrite, n_sqappend, n_both, n_wait);
    $display("out_stall=%0d backpressure=%0d sq_full=%0d adaptive=%0d xy_fallback=%0d local=%0d",
             n_ostall, n_backpress, n_sqfull, n_adaptive, n_fallback, n_local);
    check(n_bypass > 0, "bypass happened");
    check(n_sqwrite > 0, "shared-queue write happened");
    check(n_sqappend > 0, "append to non-empty shared queue happened");
    check(n_both > 0, "both grants in one cycle happened");
    check(n_wait > 0, "wait state happened");
    check(n_ostall > 0, "output stall happened");
    check(n_backpress > 0, "input backpressure happened");
    check(n_sqfull > 0, "full shared queue happened");
    check(n_adaptive > 0, "adaptive routing choice happened");
    check(n_fallback > 0, "XY fall-back happened");
    check(n_local > 0, "local delivery happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
