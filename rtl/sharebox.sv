// sharebox: transmit side of share-based VC control for one virtual channel.
//
// It lets one flit through from the source VC buffer towards the admission
// control and then locks, so that no second flit of this VC can enter the
// shared link before the receiving unsharebox has room for it. The receiving
// unsharebox toggles the single unlock wire when its flit leaves; the wire is
// a 2-phase acknowledge. The sharebox keeps a phase bit that toggles on every
// flit passed; it is locked whenever that bit differs from the unlock wire.
//
// Interface: valid/ready handshake in (from the VC buffer) and out (to the
// admission control); a transfer happens on a clock edge where valid and
// ready are both high. Data passes combinationally; the flit is stored one
// stage later in the static priority queue slot.
//
// Timing: unlocked after reset. After a transfer the box is locked from the
// next cycle until the cycle after the unlock wire toggles.
//
// The lock/unlock behaviour and the 2-phase unlock wire follow the published
// share-based VC control. Its asynchronous circuit (C-element c_lock,
// pulse_gen, output_decouple) is replaced by the phase-bit comparison, a
// synchronous equivalent chosen for this design.
module sharebox #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_data,
  input  logic         unlock,
  output logic         locked
);

  logic phase;

  assign locked    = phase ^ unlock;
  assign out_valid = in_valid & ~locked;
  assign in_ready  = out_ready & ~locked;
  assign out_data  = in_data;

  always_ff @(posedge clk) begin
    if (!rst_n)                      phase <= 1'b0;
    else if (out_valid && out_ready) phase <= ~phase;
  end

endmodule
