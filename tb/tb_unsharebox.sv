// tb_unsharebox: self-checking test of the unsharebox (VC control, receive
// side). A model of the far sharebox sends a flit only when unlocked; the
// test checks that each flit appears at the output with its data, that the
// unlock wire toggles exactly when the flit is taken, and that flits are
// held while the destination is not ready.
module tb_unsharebox;
  localparam int W = 16;
  logic clk = 0, rst_n = 0;
  logic in_valid, out_valid, out_ready, unlock;
  logic [W-1:0] in_data, out_data;
  int checks = 0, failures = 0;
  logic sent_phase;
  logic [W-1:0] expect_q[$];
  int held = 0, delivered = 0;

  unsharebox #(.W(W)) dut (.*);

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
    in_valid = 0; out_ready = 0; in_data = '0; sent_phase = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      // Far sharebox: unlocked when unlock has caught up with its phase.
      in_valid  = (sent_phase == unlock) && ($urandom_range(0, 2) != 0);
      in_data   = W'($urandom);
      out_ready = ($urandom_range(0, 2) != 0);
      #1;
      check(out_valid == (expect_q.size() != 0), "out_valid");
      if (out_valid && expect_q.size() != 0) check(out_data == expect_q[0], "out_data");
      if (out_valid && !out_ready) held++;
      @(posedge clk);
      if (out_valid && out_ready) begin
        void'(expect_q.pop_front());
        delivered++;
        #1 check(unlock == sent_phase, "unlock toggled on departure");
      end
      if (in_valid) begin
        expect_q.push_back(in_data);
        sent_phase = ~sent_phase;
      end
    end
    check(delivered > 100, "enough flits delivered");
    check(held > 50, "destination stall exercised");
    $display("delivered=%0d held=%0d", delivered, held);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
