// tb_alg_scheduler: self-checking test of the ALG scheduler (admission
// control + static priority queue).
//
// Part 1 (4 VCs A..D): the worked example of the discipline. A1 and C1
// arrive together; A2 and B1 arrive while A1 is on the link; then A3 and C2
// arrive. Expected link order A1 C1 A2 B1 A3 C2, one per cycle; A3 must be
// held back by admission control for one cycle (B1 already waited for A2),
// and B1 waits 2 flit-times, the bound for priority level 2.
//
// Part 2 (8 VCs): random traffic in phases. In each phase every VC is either
// greedy (offers a flit every cycle) or conforming (offers flits at least
// N+Q-1 cycles apart, Q = index+1). Checks, against values computed here:
// grant is one-hot and goes to the highest-priority occupied slot; flits of
// a VC leave in order with their data; every flit is granted within Q cycles
// of entering the SPQ; a conforming VC's flit is admitted in the cycle it
// arrives, so its access time is at most Q cycles whatever the greedy VCs do.
module tb_alg_scheduler;
  localparam int N = 8, W = 16;
  localparam int N4 = 4;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  int cyc = 0;

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- 4-VC example ----------------
  logic [N4-1:0]        a_valid, a_ready, a_grant, a_occ, a_blocked;
  logic [N4-1:0][W-1:0] a_data, a_slot;

  alg_scheduler #(.N(N4), .W(W)) dut4 (
    .clk(clk), .rst_n(rst_n), .in_valid(a_valid), .in_ready(a_ready), .in_data(a_data),
    .grant(a_grant), .slot_data(a_slot), .occupancy(a_occ), .blocked(a_blocked));

  // ---------------- 8-VC random ----------------
  logic [N-1:0]        in_valid, in_ready, grant, occupancy, blocked;
  logic [N-1:0][W-1:0] in_data, slot_data;

  alg_scheduler #(.N(N), .W(W)) dut8 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready), .in_data(in_data),
    .grant(grant), .slot_data(slot_data), .occupancy(occupancy), .blocked(blocked));

  // Per-VC source state for part 2.
  int  arr     [N];     // cycle from which the next flit is offered
  int  seq     [N];
  bit  greedy  [N];
  bit  active;
  int  inflight_seq[N][$];
  int  inflight_adm[N][$];
  int  inflight_arr[N][$];
  int  n_blocked = 0, n_conf_flits = 0, n_greedy_flits = 0, n_worst_case = 0;

  // Expected order for part 1: {vc, flit id}
  typedef struct { int vc; int id; } ev_t;

  initial begin
    ev_t exp_order[6];
    int  got;
    int  a3_blocked_cycles;
    a_valid = '0; a_data = '0; in_valid = '0; in_data = '0; active = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- Part 1 ----
    exp_order[0] = '{0, 1}; exp_order[1] = '{2, 1}; exp_order[2] = '{0, 2};
    exp_order[3] = '{1, 1}; exp_order[4] = '{0, 3}; exp_order[5] = '{2, 2};
    got = 0; a3_blocked_cycles = 0;
    begin
      // per-VC list of (arrival cycle, id) for A, B, C
      int a_arr[3][$], a_id[3][$];
      a_arr[0] = '{0, 2, 3}; a_id[0] = '{1, 2, 3};
      a_arr[1] = '{2};       a_id[1] = '{1};
      a_arr[2] = '{0, 3};    a_id[2] = '{1, 2};
      for (int t = 0; t < 12; t++) begin
        @(negedge clk);
        for (int v = 0; v < 3; v++) begin
          a_valid[v] = (a_arr[v].size() != 0) && (a_arr[v][0] <= t);
          a_data[v]  = (a_id[v].size() != 0) ? W'(16 * v + a_id[v][0]) : '0;
        end
        #1;
        if (a_grant != 0) begin
          int gv;
          gv = $clog2(a_grant);
          check(got < 6, "no extra grants");
          if (got < 6) begin
            check(gv == exp_order[got].vc && a_slot[gv] == W'(16 * gv + exp_order[got].id),
                  "example link order");
            check(t == got + 1, "example: one flit per cycle from cycle 1");
            if (gv == 1) check(t == 4, "example: B1 waits 2 flit-times");
          end
          got++;
        end
        if (a_valid[0] && a_id[0].size() != 0 && a_id[0][0] == 3 && a_blocked[0]) a3_blocked_cycles++;
        @(posedge clk);
        for (int v = 0; v < 3; v++)
          if (a_valid[v] && a_ready[v]) begin
            void'(a_arr[v].pop_front());
            void'(a_id[v].pop_front());
          end
      end
      check(got == 6, "example: all six flits sent");
      check(a3_blocked_cycles == 1, "example: A3 held back one cycle");
      a_valid = '0;
    end

    // ---- Part 2 ----
    for (int i = 0; i < N; i++) begin seq[i] = 0; arr[i] = 0; end
    for (int phase = 0; phase < 8; phase++) begin
      int start;
      for (int i = 0; i < N; i++) begin
        case (phase)
          0:       greedy[i] = 0;                 // all conforming, min interval
          1:       greedy[i] = (i < 4);           // greedy high VCs, conforming low VCs
          2:       greedy[i] = (i >= 4);          // greedy low VCs
          3:       greedy[i] = 1;                 // everything greedy
          default: greedy[i] = $urandom_range(0, 1);
        endcase
        arr[i] = cyc + 1 + $urandom_range(0, 3);
      end
      start = cyc;
      active = 1;
      while (cyc < start + 3000) @(posedge clk);
      active = 0;
      // drain
      repeat (40) @(posedge clk);
    end
    check(n_conf_flits > 1000, "conforming traffic exercised");
    check(n_greedy_flits > 1000, "greedy traffic exercised");
    check(n_blocked > 1000, "admission control blocking exercised");
    check(n_worst_case > 10, "worst-case access time reached");
    $display("conforming flits=%0d greedy flits=%0d blocked cycles=%0d worst-case waits=%0d",
             n_conf_flits, n_greedy_flits, n_blocked, n_worst_case);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Part 2 driver/monitor, one step per cycle.
  always @(negedge clk) begin
    if (rst_n) begin
      logic [N-1:0] exp_grant;
      for (int i = 0; i < N; i++) begin
        in_valid[i] = active && (cyc >= arr[i]);
        in_data[i]  = W'((i << 12) | (seq[i] & 12'hfff));
      end
      #1;
      exp_grant = '0;
      for (int i = 0; i < N; i++) if (occupancy[i]) begin exp_grant[i] = 1'b1; break; end
      check(grant == exp_grant, "grant to highest-priority occupied slot");
      for (int i = 0; i < N; i++) begin
        if (grant[i]) begin
          if (inflight_seq[i].size() == 0) check(0, "grant with nothing admitted");
          else begin
            int s, ad, ar;
            s = inflight_seq[i].pop_front(); ad = inflight_adm[i].pop_front(); ar = inflight_arr[i].pop_front();
            check(slot_data[i] == W'((i << 12) | (s & 12'hfff)), "flit data and order");
            check(cyc - ad >= 1 && cyc - ad <= i + 1, "granted within Q cycles of SPQ entry");
            if (cyc - ad == i + 1 && i > 0) n_worst_case++;
          end
        end
        if (in_valid[i] && blocked[i]) n_blocked++;
        if (in_valid[i] && in_ready[i]) begin
          inflight_seq[i].push_back(seq[i]);
          inflight_adm[i].push_back(cyc);
          inflight_arr[i].push_back(arr[i]);
          if (!greedy[i]) begin
            check(cyc == arr[i], "conforming flit admitted on arrival");
            n_conf_flits++;
            arr[i] = arr[i] + N + i + ((phase_extra() != 0) ? $urandom_range(1, 6) : 0);
          end else begin
            n_greedy_flits++;
            arr[i] = cyc + 1;
          end
          seq[i]++;
        end
      end
    end
  end

  // Half of the conforming intervals are exactly the minimum N+Q-1.
  function automatic int phase_extra();
    return $urandom_range(0, 1);
  endfunction

  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

endmodule
