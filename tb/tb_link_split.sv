// tb_link_split: self-checking test of the link split (N=8, 16-bit). Each
// flit must raise exactly the valid of its VC and carry its data.
module tb_link_split;
  localparam int N = 8, W = 16, VCW = 3;
  logic in_valid;
  logic [VCW-1:0] in_vc;
  logic [W-1:0] in_data, out_data;
  logic [N-1:0] out_valid;
  int checks = 0, failures = 0;

  link_split #(.N(N), .W(W), .VCW(VCW)) dut (.*);

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
    for (int t = 0; t < 2000; t++) begin
      in_valid = $urandom_range(0, 3) != 0;
      in_vc    = VCW'($urandom);
      in_data  = W'($urandom);
      #1;
      check(out_valid == (in_valid ? (N'(1) << in_vc) : '0), "one-hot valid");
      check(out_data == in_data, "data");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
