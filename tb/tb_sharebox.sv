// tb_sharebox: self-checking test of the sharebox (VC control, transmit side).
// Random valid/ready/unlock stimulus against a reference lock model: the box
// must pass exactly one flit, stay locked until the unlock wire changes,
// then pass the next one. Data must pass unchanged.
module tb_sharebox;
  localparam int W = 16;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready, unlock, locked;
  logic [W-1:0] in_data, out_data;
  int checks = 0, failures = 0;
  int passed = 0, lock_stalls = 0;
  logic ref_locked;
  logic ref_unlock_seen;

  sharebox #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; out_ready = 0; unlock = 0; in_data = '0;
    ref_locked = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      in_valid  = ($urandom_range(0, 3) != 0);
      out_ready = ($urandom_range(0, 3) != 0);
      in_data   = W'($urandom);
      // The far side returns unlock some time after a flit was passed.
      if (ref_locked && $urandom_range(0, 4) == 0) begin
        unlock = ~unlock;
        ref_locked = 0;
      end
      #1;
      check(locked == ref_locked, "locked state");
      check(out_valid == (in_valid && !ref_locked), "out_valid");
      check(in_ready == (out_ready && !ref_locked), "in_ready");
      check(out_data == in_data, "data passes");
      if (in_valid && ref_locked) lock_stalls++;
      @(posedge clk);
      if (in_valid && out_ready && !ref_locked) begin
        ref_locked = 1;
        passed++;
      end
    end
    check(passed > 100, "enough flits passed");
    check(lock_stalls > 100, "lock exercised");
    $display("flits passed=%0d lock stalls=%0d", passed, lock_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
