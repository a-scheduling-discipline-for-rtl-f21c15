// tb_link_merge: self-checking test of the link merge (N=8, 16-bit). For
// every one-hot grant and for no grant, the link must carry the granted
// slot's data and its VC number.
module tb_link_merge;
  localparam int N = 8, W = 16, VCW = 3;
  logic [N-1:0] grant;
  logic [N-1:0][W-1:0] slot_data;
  logic link_valid;
  logic [VCW-1:0] link_vc;
  logic [W-1:0] link_data;
  int checks = 0, failures = 0;

  link_merge #(.N(N), .W(W), .VCW(VCW)) dut (.*);

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
      int sel;
      sel = $urandom_range(0, N);
      for (int i = 0; i < N; i++) slot_data[i] = W'($urandom);
      grant = (sel == N) ? '0 : (N'(1) << sel);
      #1;
      check(link_valid == (sel != N), "link_valid");
      if (sel != N) begin
        check(link_vc == VCW'(sel), "link_vc");
        check(link_data == slot_data[sel], "link_data");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
