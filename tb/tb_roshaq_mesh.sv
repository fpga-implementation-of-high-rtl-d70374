// tb_roshaq_mesh: 4 x 4 mesh of shared-queue routers under uniform random
// traffic, the multicore setting the router is built for (every router linked
// to its four neighbours and to a local node).
//
// Link bandwidths are set so that weighted XY routing reduces to X-then-Y
// (East/West bandwidth 15, North/South 4, b_p = 1: an X direction that still
// has distance always outweighs a Y direction in a 4 x 4 mesh), which keeps the
// wormhole network free of deadlock. Checked: at zero load each packet's head
// reaches its destination exactly 2 cycles per router traversed after the
// source accepted it; under load every packet arrives once, at the right node,
// with its flits contiguous and in order, and no flit ever leaves the mesh
// edge. Average head latency (from acceptance at the source router, and from
// packet creation including the wait in the source queue) is printed for each
// injection rate, from light load up to saturation.
module tb_roshaq_mesh;
  import roshaq_pkg::*;
  localparam int K = 4;           // mesh is K x K
  localparam int NN = K * K;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  longint cycle = 0;
  always @(negedge clk) cycle++;

  logic [3:0] bw_avail [4];
  logic [4:0] iv [NN], ir [NN], ov [NN], orr [NN];
  flit_t      ifl [NN][5];
  flit_t      ofl [NN][5];
  logic       src_v [NN];
  flit_t      src_f [NN];
  logic       sink_r [NN];

  for (genvar n = 0; n < NN; n++) begin : g_node
    roshaq_router u_r (
      .clk, .rst_n,
      .my_x     (4'(n % K)),
      .my_y     (4'(n / K)),
      .bw_avail (bw_avail),
      .in_valid (iv[n]),
      .in_ready (ir[n]),
      .in_flit  (ifl[n]),
      .out_valid(ov[n]),
      .out_ready(orr[n]),
      .out_flit (ofl[n])
    );
  end

  // neighbour of node n through port p (1 N, 2 E, 3 S, 4 W), -1 at the edge
  function automatic int nb(int n, int p);
    int x, y;
    x = n % K; y = n / K;
    case (p)
      1: return (y > 0)     ? n - K : -1;
      2: return (x < K - 1) ? n + 1 : -1;
      3: return (y < K - 1) ? n + K : -1;
      4: return (x > 0)     ? n - 1 : -1;
      default: return -1;
    endcase
  endfunction

  function automatic int opp(int p);
    return (p == 1) ? 3 : (p == 2) ? 4 : (p == 3) ? 1 : 2;
  endfunction

  always_comb begin
    for (int n = 0; n < NN; n++) begin
      iv[n][0]  = src_v[n];
      ifl[n][0] = src_f[n];
      orr[n][0] = sink_r[n];
      for (int p = 1; p < 5; p++) begin
        int m;
        m = nb(n, p);
        if (m >= 0) begin
          iv[n][p]  = ov[m][opp(p)];
          ifl[n][p] = ofl[m][opp(p)];
          orr[n][p] = ir[m][opp(p)];
        end else begin
          iv[n][p]  = 1'b0;
          ifl[n][p] = '0;
          orr[n][p] = 1'b1;
        end
      end
    end
  end

  int checks = 0, failures = 0;
  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d", msg, cycle);
    end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------- sources
  flit_t  txq [NN][$];
  int     seq [NN];
  int     exp_dst [int];
  int     exp_len [int];
  longint t_acc [int];
  longint t_gen [int];
  longint gen_sum = 0;
  int     hops_of [int];
  int     n_sent = 0, n_recv = 0;
  longint lat_sum = 0;
  int     lat_cnt = 0;
  bit     zero_load = 0;

  function automatic void send_pkt(int src, int dst, int len);
    int id, dx, dy, sx, sy;
    id = src * 4096 + seq[src];
    seq[src] = (seq[src] + 1) % 4096;
    sx = src % K; sy = src / K; dx = dst % K; dy = dst / K;
    exp_dst[id] = dst;
    t_gen[id] = cycle;
    exp_len[id] = len;
    hops_of[id] = ((dx > sx) ? dx - sx : sx - dx) + ((dy > sy) ? dy - sy : sy - dy);
    for (int k = 0; k < len; k++) begin
      flit_t f;
      f.head = (k == 0); f.tail = (k == len - 1);
      f.data = {16'(id), 4'(k), (k == 0) ? {4'd1, 4'(dy), 4'(dx)} : 12'($urandom())};
      txq[src].push_back(f);
    end
    n_sent++;
  endfunction

  always @(negedge clk) begin
    for (int n = 0; n < NN; n++) begin
      src_v[n]  = txq[n].size() > 0;
      src_f[n]  = src_v[n] ? txq[n][0] : '0;
      sink_r[n] = 1'b1;
    end
  end

  // ------------------------------------------------- accept and delivery
  int cur_id [NN], cur_idx [NN];
  bit in_pkt [NN];

  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < NN; n++) begin
      if (src_v[n] && ir[n][0]) begin
        if (src_f[n].head) t_acc[int'(src_f[n].data[31:16])] = cycle;
        void'(txq[n].pop_front());
      end
      for (int p = 1; p < 5; p++)
        if (nb(n, p) < 0) check(!ov[n][p], "flit left the mesh edge");
      if (ov[n][0] && orr[n][0]) begin
        int id, idx;
        id  = int'(ofl[n][0].data[31:16]);
        idx = int'(ofl[n][0].data[15:12]);
        if (ofl[n][0].head) begin
          check(!in_pkt[n], "head inside another packet");
          check(exp_dst.exists(id), "unknown or duplicate packet");
          if (exp_dst.exists(id)) begin
            check(exp_dst[id] == n, "delivered to the wrong node");
            lat_sum += cycle - t_acc[id];
            gen_sum += cycle - t_gen[id];
            lat_cnt++;
            if (zero_load)
              check(cycle - t_acc[id] == 2 * (hops_of[id] + 1), "zero-load latency 2 cycles per router");
          end
          in_pkt[n] = 1; cur_id[n] = id; cur_idx[n] = 0;
        end else begin
          check(in_pkt[n] && id == cur_id[n], "flit of another packet");
          check(idx == cur_idx[n] + 1, "flit order");
          cur_idx[n] = idx;
        end
        if (ofl[n][0].tail) begin
          if (exp_len.exists(id)) check(exp_len[id] == idx + 1, "packet length");
          exp_dst.delete(id); exp_len.delete(id);
          in_pkt[n] = 0;
          n_recv++;
        end
      end
    end
  end

  task automatic drain();
    int c;
    c = 0;
    while (exp_dst.size() > 0 && c < 20000) begin @(posedge clk); c++; end
    check(exp_dst.size() == 0, "network drained (no deadlock)");
    repeat (4) @(posedge clk);
  endtask

  initial begin
    int rates [6] = '{20, 50, 100, 150, 200, 250};   // packets per node per 1000 cycles
    bw_avail[0] = 4'd4; bw_avail[1] = 4'd15; bw_avail[2] = 4'd4; bw_avail[3] = 4'd15;
    for (int n = 0; n < NN; n++) begin seq[n] = 0; in_pkt[n] = 0; end
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    // zero load: one packet at a time, all source/destination pairs of node 0
    // and node 15 plus a random sample
    zero_load = 1;
    for (int n = 0; n < 60; n++) begin
      int s, d;
      s = (n < 15) ? 0 : (n < 30) ? 15 : $urandom_range(0, NN - 1);
      d = (n < 15) ? n + 1 : (n < 30) ? n - 15 : $urandom_range(0, NN - 1);
      if (d == s) d = (s + 5) % NN;
      send_pkt(s, d, $urandom_range(1, 4));
      drain();
    end
    $display("zero-load average head latency %0.2f cycles", real'(lat_sum) / lat_cnt);
    zero_load = 0;

    // uniform random traffic at increasing injection rates
    foreach (rates[r]) begin
      lat_sum = 0; lat_cnt = 0; gen_sum = 0;
      repeat (3000) begin
        @(negedge clk);
        for (int n = 0; n < NN; n++)
          if ($urandom_range(0, 999) < rates[r]) begin
            int d;
            d = $urandom_range(0, NN - 2);
            if (d >= n) d++;
            send_pkt(n, d, $urandom_range(1, 4));
          end
      end
      drain();
      $display("rate %0d pkt/node/kcycle: %0d packets, average head latency %0.2f cycles in the network, %0.2f including source queueing",
               rates[r], lat_cnt, real'(lat_sum) / lat_cnt, real'(gen_sum) / lat_cnt);
    end
    check(n_recv == n_sent, "every packet delivered");
    $display("packets sent %0d received %0d", n_sent, n_recv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
