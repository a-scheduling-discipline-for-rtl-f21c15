// tb_alg_three_links: connection-level test over a sequence of three ALG
// links at default size (8 VCs, 16-bit flits, 3-stage pipelines).
//
// Two connections cross all three links. The fast connection uses the
// highest-priority VC (index 0, Q=1) on every link; the slow connection uses
// the lowest (index 7, Q=8). Between links a non-blocking router is modelled
// by wiring: the flit leaving a link's VC goes straight to the same VC of the
// next link. Each connection offers flits at its guaranteed rate, once every
// N+Qmax-1 cycles: 8 for the fast one and 15 for the slow one. VCs 1..6 of
// each link carry random background traffic, entering and leaving at that
// link, at network loads of 50, 80, 90, 95 and 100 percent of the link rate.
//
// Checks, per load, over at least 10000 flits of the slow connection: every
// connection flit arrives in order with its data, and its end-to-end latency
// from its scheduled source time never exceeds the sum of the per-hop
// bounds, 3 * (Q + LINK_STAGES + 1) cycles: 15 for the fast and 36 for the
// slow connection. It also checks that the slow connection's latency grows
// with load (the distribution moves towards the bound) and prints a latency
// histogram per load.
module tb_alg_three_links;
  import alg_pkg::*;
  localparam int N = ALG_N_VC, W = ALG_FLIT_W, ST = ALG_LINK_STAGES, HOPS = 3;
  localparam int FAST = 0, SLOW = N - 1;
  localparam int FAST_INT = N + FAST, SLOW_INT = N + SLOW;   // N+Q-1
  localparam int FAST_BOUND = HOPS * (FAST + 1 + ST + 1);
  localparam int SLOW_BOUND = HOPS * (SLOW + 1 + ST + 1);
  localparam int VCW = $clog2(N);

  logic clk = 0, rst_n = 0;
  logic [N-1:0]        in_valid [HOPS], in_ready [HOPS], out_valid [HOPS], out_ready [HOPS];
  logic [N-1:0][W-1:0] in_data  [HOPS], out_data [HOPS];
  logic                link_valid [HOPS];
  logic [VCW-1:0]      link_vc    [HOPS];
  logic [W-1:0]        link_data  [HOPS];
  logic [N-1:0]        grant [HOPS], occupancy [HOPS], adm_blocked [HOPS], vc_locked [HOPS];

  for (genvar h = 0; h < HOPS; h++) begin : g_link
    alg_link u_link (
      .clk(clk), .rst_n(rst_n),
      .in_valid(in_valid[h]), .in_ready(in_ready[h]), .in_data(in_data[h]),
      .out_valid(out_valid[h]), .out_ready(out_ready[h]), .out_data(out_data[h]),
      .link_valid(link_valid[h]), .link_vc(link_vc[h]), .link_data(link_data[h]),
      .grant(grant[h]), .occupancy(occupancy[h]), .adm_blocked(adm_blocked[h]),
      .vc_locked(vc_locked[h]));
  end

  int checks = 0, failures = 0;
  int cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  initial begin
    #200000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Connection sources and sinks.
  int  next_t[2], seq_tx[2], seq_rx[2];
  int  sched_q[2][$];
  int  lat_max[2], lat_sum[2], lat_n[2];
  int  hist[2][0:63];
  int  bg_prob;           // background rate per VC, in 0.01% of a flit per cycle
  int  bg_credit[HOPS][N];
  bit  bg_greedy, active;
  int  load_busy, load_cycles;
  int  conn_vc[2];

  initial begin
    int loads[5];
    real mean_slow[5];
    loads = '{50, 80, 90, 95, 100};
    conn_vc[0] = FAST; conn_vc[1] = SLOW;
    active = 0;
    for (int h = 0; h < HOPS; h++) begin in_valid[h] = '0; in_data[h] = '0; out_ready[h] = '1; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int li = 0; li < 5; li++) begin
      // Connections take 1/8 + 1/15 of the link; background VCs 1..6 share the rest.
      bg_greedy   = (loads[li] == 100);
      bg_prob = (loads[li] * 100 - 1917) / 6;   // (L - 19.17%) / 6
      for (int c = 0; c < 2; c++) begin
        next_t[c] = cyc + 2; lat_max[c] = 0; lat_sum[c] = 0; lat_n[c] = 0;
        for (int b = 0; b < 64; b++) hist[c][b] = 0;
      end
      load_busy = 0; load_cycles = 0;
      for (int h = 0; h < HOPS; h++) for (int v = 0; v < N; v++) bg_credit[h][v] = 0;
      active = 1;
      while (lat_n[1] < 10000) @(posedge clk);
      active = 0;
      repeat (100) @(posedge clk);
      check(sched_q[0].size() == 0 && sched_q[1].size() == 0, "connections drained");
      mean_slow[li] = real'(lat_sum[1]) / lat_n[1];
      $display("load %0d%%: measured link load %0d%%; fast: %0d flits, max %0d (bound %0d), mean %.1f; slow: %0d flits, max %0d (bound %0d), mean %.1f",
               loads[li], 100 * load_busy / load_cycles, lat_n[0], lat_max[0], FAST_BOUND,
               real'(lat_sum[0]) / lat_n[0], lat_n[1], lat_max[1], SLOW_BOUND, mean_slow[li]);
      for (int c = 0; c < 2; c++) begin
        string line;
        line = (c == 0) ? "  fast histogram (cycles:flits)" : "  slow histogram (cycles:flits)";
        for (int b = 0; b < 64; b++) if (hist[c][b] != 0) line = {line, $sformatf(" %0d:%0d", b, hist[c][b])};
        $display("%s", line);
      end
      check(lat_max[0] <= FAST_BOUND, "fast connection meets latency bound");
      check(lat_max[1] <= SLOW_BOUND, "slow connection meets latency bound");
      check(100 * load_busy / load_cycles >= loads[li] - 5, "offered network load reached");
    end
    check(mean_slow[4] > mean_slow[0] + 3.0, "slow latency grows with load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (rst_n) begin
      // Drive: connection sources into hop 0, router wiring between hops,
      // background on VCs 1..N-2 of each hop.
      for (int h = 0; h < HOPS; h++) begin
        for (int v = 1; v < N - 1; v++) begin
          if (!in_valid[h][v] || in_ready[h][v]) begin   // previous offer taken
            // Credit-based random source: earns bg_prob per cycle, spends
            // 10000 per flit, offers at a random moment once it has credit.
            in_valid[h][v] = active && (bg_greedy || (bg_credit[h][v] >= 10000 && $urandom_range(0, 1) == 1));
            if (in_valid[h][v] && !bg_greedy) bg_credit[h][v] -= 10000;
            in_data[h][v]  = W'($urandom);
          end
          out_ready[h][v] = 1'b1;
          if (active && bg_credit[h][v] < 40000) bg_credit[h][v] += bg_prob;
        end
      end
      for (int c = 0; c < 2; c++) begin
        int v;
        v = conn_vc[c];
        if (active && cyc >= next_t[c] && !in_valid[0][v]) begin
          in_valid[0][v] = 1'b1;
          in_data[0][v]  = W'(seq_tx[c]);
          sched_q[c].push_back(next_t[c]);
          seq_tx[c]++;
          next_t[c] += (c == 0) ? FAST_INT : SLOW_INT;
        end
        for (int h = 1; h < HOPS; h++) begin
          in_valid[h][v]    = out_valid[h-1][v];
          in_data[h][v]     = out_data[h-1][v];
          out_ready[h-1][v] = in_ready[h][v];
        end
        out_ready[HOPS-1][v] = 1'b1;
      end
      #1;
      // Second settle: the router wiring depends on the next link's ready.
      for (int c = 0; c < 2; c++)
        for (int h = 1; h < HOPS; h++) out_ready[h-1][conn_vc[c]] = in_ready[h][conn_vc[c]];
      #1;
      if (active) begin
        load_cycles++;
        if (link_valid[1]) load_busy++;
      end
      for (int c = 0; c < 2; c++) begin
        int v;
        v = conn_vc[c];
        if (out_valid[HOPS-1][v]) begin
          int t0, lat;
          if (sched_q[c].size() == 0) check(0, "unexpected connection flit");
          else begin
            t0 = sched_q[c].pop_front();
            lat = cyc - t0;
            check(out_data[HOPS-1][v] == W'(seq_rx[c]), "connection data in order");
            seq_rx[c]++;
            if (lat > lat_max[c]) lat_max[c] = lat;
            lat_sum[c] += lat; lat_n[c]++;
            hist[c][(lat > 63) ? 63 : lat]++;
            if (c == 0 && lat > FAST_BOUND) check(0, "fast flit over bound");
            if (c == 1 && lat > SLOW_BOUND) check(0, "slow flit over bound");
          end
        end
      end
    end
  end

  // Clear a source offer after it has been accepted.
  always @(posedge clk) begin
    for (int c = 0; c < 2; c++)
      if (in_valid[0][conn_vc[c]] && in_ready[0][conn_vc[c]]) in_valid[0][conn_vc[c]] <= 1'b0;
  end

endmodule
