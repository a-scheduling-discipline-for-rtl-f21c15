// tb_alg_link: end-to-end test of the complete ALG link at its default size
// (8 VCs, 16-bit flits, 3-stage link pipeline; no parameter is overridden).
//
// Traffic runs in phases. In each phase every VC is either conforming (it
// offers flits at least N+Q-1 cycles apart, Q = index+1, and its destination
// is always ready) or greedy (it offers a flit whenever it can, and its
// destination accepts at random, creating backpressure).
//
// Checks, computed in this testbench:
//  - every flit arrives at its VC's output, in order, with its data;
//  - a conforming flit is accepted in the cycle it is offered (neither the
//    sharebox lock nor admission control holds it) and is valid at the
//    output no later than Q + LINK_STAGES + 1 cycles after it was offered;
//  - at the minimum interval every conforming VC sustains its guaranteed
//    rate of 1/(N+Q-1) flits per cycle;
//  - at most one flit enters the link per cycle.
// Mechanisms counted (each must occur): admission-control hold, SPQ priority
// wait, sharebox lock stall, destination backpressure, a fully busy link,
// and a worst-case access time of exactly Q cycles.
module tb_alg_link;
  import alg_pkg::*;
  localparam int N = ALG_N_VC, W = ALG_FLIT_W, ST = ALG_LINK_STAGES;

  logic clk = 0, rst_n = 0;
  logic [N-1:0]        in_valid, in_ready, out_valid, out_ready;
  logic [N-1:0][W-1:0] in_data, out_data;
  logic                link_valid;
  logic [$clog2(N)-1:0] link_vc;
  logic [W-1:0]        link_data;
  logic [N-1:0]        grant, occupancy, adm_blocked, vc_locked;

  alg_link dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int  arr[N], seq[N], rcv[N];
  bit  greedy[N], active, bp;
  int  cur_phase = 0;
  int  sent_seq[N][$], sent_arr[N][$];
  bit  sent_conf[N][$];
  int  phase_cnt[N], phase_start;
  int  n_adm = 0, n_prio = 0, n_lock = 0, n_bp = 0, n_worst = 0, busy_run = 0, max_busy = 0;

  initial begin
    in_valid = '0; in_data = '0; out_ready = '1; active = 0; bp = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) begin seq[i] = 0; rcv[i] = 0; end
    for (int phase = 0; phase < 8; phase++) begin
      for (int i = 0; i < N; i++) begin
        case (phase)
          0:       greedy[i] = 0;          // all conforming at the minimum interval
          1:       greedy[i] = (i < 4);
          2:       greedy[i] = (i >= 4);
          3:       greedy[i] = 1;
          default: greedy[i] = $urandom_range(0, 1);
        endcase
        arr[i] = cyc + 1;
        phase_cnt[i] = 0;
      end
      bp = (phase == 2 || phase >= 4);
      cur_phase = phase;
      phase_start = cyc + 1;
      active = 1;
      while (cyc < phase_start + 4000) @(posedge clk);
      active = 0;
      if (phase == 0)
        for (int i = 0; i < N; i++)
          // guaranteed rate: 1/(N+Q-1) flits per cycle over the phase
          check(phase_cnt[i] >= 4000 / (N + i) - 1, "guaranteed bandwidth at minimum interval");
      repeat (60) @(posedge clk);
      for (int i = 0; i < N; i++) check(sent_seq[i].size() == 0, "link drained");
    end
    check(n_adm > 100, "admission control held a flit");
    check(n_prio > 100, "SPQ priority wait");
    check(n_lock > 100, "sharebox lock stall");
    check(n_bp > 100, "destination backpressure");
    check(max_busy >= 100, "link fully busy");
    check(n_worst > 10, "worst-case access time");
    $display("admission holds=%0d priority waits=%0d lock stalls=%0d backpressure=%0d longest busy run=%0d worst-case=%0d",
             n_adm, n_prio, n_lock, n_bp, max_busy, n_worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (rst_n) begin
      for (int i = 0; i < N; i++) begin
        in_valid[i]  = active && (cyc >= arr[i]);
        in_data[i]   = W'((i << 12) | (seq[i] & 12'hfff));
        out_ready[i] = !(bp && greedy[i]) || ($urandom_range(0, 2) == 0);
      end
      #1;
      check($onehot0(grant), "one flit per cycle onto the link");
      if (link_valid) begin busy_run++; if (busy_run > max_busy) max_busy = busy_run; end
      else busy_run = 0;
      for (int i = 0; i < N; i++) begin
        if (in_valid[i] && adm_blocked[i] && !vc_locked[i]) n_adm++;
        if (in_valid[i] && vc_locked[i]) n_lock++;
        if (occupancy[i] && !grant[i]) n_prio++;
        if (out_valid[i] && !out_ready[i]) n_bp++;
        // output side
        if (out_valid[i] && out_ready[i]) begin
          if (sent_seq[i].size() == 0) check(0, "unexpected output flit");
          else begin
            int s, a;
            bit c;
            s = sent_seq[i].pop_front(); a = sent_arr[i].pop_front(); c = sent_conf[i].pop_front();
            check(out_data[i] == W'((i << 12) | (s & 12'hfff)), "data and order per VC");
            if (c) begin
              check(cyc - a <= i + 1 + ST + 1, "conforming latency bound Q+LINK_STAGES+1");
              check(cyc - a >= ST + 2, "minimum latency");
              if (cyc - a == i + 1 + ST + 1 && i > 0) n_worst++;
            end
          end
        end
        // input side
        if (in_valid[i] && in_ready[i]) begin
          sent_seq[i].push_back(seq[i]);
          sent_arr[i].push_back(arr[i]);
          sent_conf[i].push_back(!greedy[i]);
          phase_cnt[i]++;
          if (!greedy[i]) begin
            check(cyc == arr[i], "conforming flit accepted on arrival");
            // phase 0 keeps exactly the minimum interval; later phases add jitter
            arr[i] = arr[i] + N + i + ((cur_phase != 0 && $urandom_range(0, 1) == 1) ? $urandom_range(1, 6) : 0);
          end else arr[i] = cyc + 1;
          seq[i]++;
        end
      end
    end
  end

endmodule
