// unsharebox: receive side of share-based VC control for one virtual channel.
//
// It is a one-flit register: the single-element VC buffer that the link cycle
// condition makes sufficient. A flit arriving from the link split is always
// accepted (the sharebox at the far side guarantees the register is empty).
// When the flit leaves on the output handshake the unlock wire toggles,
// which unlocks the sharebox of the same VC (2-phase signalling).
//
// Interface: in_valid/in_data from the split, no ready (the link never
// stalls); out_valid/out_ready/out_data to the destination; unlock back to the
// sharebox.
//
// Timing: a flit written at a clock edge is offered at the output from the
// next cycle; unlock toggles at the edge where the flit is taken.
//
// The latch and the toggling unlock wire follow the published design; the clocked
// register in place of the latch is this design's choice.
module unsharebox #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_data,
  output logic         unlock
);

  logic         full;
  logic [W-1:0] data_q;
  logic         leave;

  assign leave     = full & out_ready;
  assign out_valid = full;
  assign out_data  = data_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      full   <= 1'b0;
      unlock <= 1'b0;
    end else begin
      if (in_valid)   full <= 1'b1;
      else if (leave) full <= 1'b0;
      if (leave) unlock <= ~unlock;
    end
  end

  always_ff @(posedge clk)
    if (in_valid) data_q <= in_data;

  // The far sharebox must never send into an occupied register.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> !full)
    else $error("unsharebox: flit arrived while register occupied");

endmodule
