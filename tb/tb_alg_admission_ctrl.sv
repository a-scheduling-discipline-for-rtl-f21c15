// tb_alg_admission_ctrl: self-checking test of one ALG admission-control
// channel (N=8, channel index 2, so channels 3..7 are of lower priority).
// Random one-hot grants and occupancy vectors are applied; a reference model
// of the status bits (set from the occupancy snapshot on the channel's own
// grant, cleared by each lower channel's grant) predicts when the channel
// must be blocked. A directed sequence first checks the basic case.
module tb_alg_admission_ctrl;
  localparam int N = 8, IDX = 2;
  logic clk = 0, rst_n = 0;
  logic req_in, ack_in, req_out, ack_out, blocked;
  logic [N-1:0] grant, occupancy, status;
  logic [N-1:0] ref_status, ref_next;
  int checks = 0, failures = 0, blocks = 0, releases = 0;

  alg_admission_ctrl #(.N(N), .IDX(IDX)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Apply one cycle and compare with the reference model.
  task automatic step(input logic [N-1:0] g, input logic [N-1:0] occ, input logic rq, input logic ak);
    @(negedge clk);
    grant = g; occupancy = occ; req_in = rq; ack_out = ak;
    if (g[IDX]) ref_next = occ & 8'b1111_1000;
    else        ref_next = ref_status & ~g;
    #1;
    check(status == ref_status, "status register");
    check(blocked == (ref_next != 0), "blocked");
    check(req_out == (rq && ref_next == 0), "req_out");
    check(ack_in == (ak && ref_next == 0), "ack_in");
    if (rq && ref_next != 0) blocks++;
    if (ref_status != 0 && ref_next == 0) releases++;
    @(posedge clk);
    #1;
    ref_status = ref_next;
  endtask

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    grant = '0; occupancy = '0; req_in = 0; ack_out = 0; ref_status = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Directed: own grant while channels 0, 4 and 6 wait -> bits 4 and 6 set
    // (channel 0 is of higher priority and is ignored).
    step(8'b0000_0100, 8'b0101_0101, 1'b1, 1'b1);
    check(status == 8'b0101_0000, "snapshot of lower channels");
    step(8'b0001_0000, 8'b0101_0001, 1'b1, 1'b1);   // channel 4 served
    check(status == 8'b0100_0000, "bit 4 cleared");
    step(8'b0000_0001, 8'b0100_0001, 1'b1, 1'b1);   // higher channel: no effect
    check(status == 8'b0100_0000, "higher grant leaves bits");
    step(8'b0100_0000, 8'b0100_0000, 1'b1, 1'b1);   // channel 6 served: release
    check(status == 8'b0000_0000, "released");
    // Random.
    for (int cyc = 0; cyc < 5000; cyc++) begin
      logic [N-1:0] g;
      int sel;
      sel = $urandom_range(0, N);
      g = (sel == N) ? '0 : (N'(1) << sel);
      step(g, N'($urandom), $urandom_range(0, 1) == 1, $urandom_range(0, 3) != 0);
    end
    check(blocks > 100 && releases > 100, "blocking and release exercised");
    $display("blocks=%0d releases=%0d", blocks, releases);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
