// tb_link_pipeline: self-checking test of the 3-stage link pipeline. A random
// flit stream must come out unchanged exactly 3 cycles after it went in.
module tb_link_pipeline;
  localparam int W = 16, VCW = 3, STAGES = 3;
  logic clk = 0, rst_n = 0;
  logic in_valid, out_valid;
  logic [VCW-1:0] in_vc, out_vc;
  logic [W-1:0] in_data, out_data;
  logic [VCW+W:0] hist [$];
  int checks = 0, failures = 0;

  link_pipeline #(.W(W), .VCW(VCW), .STAGES(STAGES)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_vc = '0; in_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < STAGES; i++) hist.push_back('0);
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      in_valid = $urandom_range(0, 3) != 0;
      in_vc    = VCW'($urandom);
      in_data  = W'($urandom);
      #1;
      // hist[0] is what went in STAGES cycles ago.
      check(out_valid == hist[0][VCW+W], "valid delayed by STAGES");
      if (hist[0][VCW+W]) check({out_vc, out_data} == hist[0][VCW+W-1:0], "flit delayed by STAGES");
      @(posedge clk);
      void'(hist.pop_front());
      hist.push_back({in_valid, in_vc, in_data});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
