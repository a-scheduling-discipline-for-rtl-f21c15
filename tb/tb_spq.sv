// tb_spq: self-checking test of the static priority queue (N=8, 16-bit).
// Random offers into the per-VC slots; a reference model of the slots checks
// occupancy, that the grant always goes to the highest-priority (lowest
// index) full slot, and that the granted slot presents the flit written
// into it. It also checks that a slot can be refilled in its grant cycle.
module tb_spq;
  localparam int N = 8, W = 16;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] in_valid, in_ready, occupancy, grant;
  logic [N-1:0][W-1:0] in_data, slot_data;
  logic [N-1:0] ref_full;
  logic [W-1:0] ref_data [N];
  int checks = 0, failures = 0, preempted = 0, refills = 0;

  spq #(.N(N), .W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] exp_grant;
    in_valid = '0; in_data = '0; ref_full = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        in_valid[i] = ($urandom_range(0, 5) == 0);
        in_data[i]  = W'($urandom);
      end
      #1;
      exp_grant = '0;
      for (int i = 0; i < N; i++)
        if (ref_full[i]) begin exp_grant[i] = 1'b1; break; end
      check(occupancy == ref_full, "occupancy");
      check(grant == exp_grant, "highest priority granted");
      check(in_ready == (~ref_full | exp_grant), "in_ready");
      for (int i = 0; i < N; i++)
        if (exp_grant[i]) check(slot_data[i] == ref_data[i], "granted data");
      if ($countones(ref_full) > 1) preempted++;
      @(posedge clk);
      for (int i = 0; i < N; i++) begin
        if (exp_grant[i]) ref_full[i] = 1'b0;
        if (in_valid[i] && in_ready[i]) begin
          if (exp_grant[i]) refills++;
          ref_full[i] = 1'b1;
          ref_data[i] = in_data[i];
        end
      end
    end
    check(preempted > 100 && refills > 10, "contention and refill exercised");
    $display("contention cycles=%0d refills=%0d", preempted, refills);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
