// alg_admission_ctrl: ALG admission control for one channel (index IDX).
//
// The static priority queue (SPQ) only gives its latency bound if a flit on a
// higher-priority channel delays each lower-priority flit at most once. This
// block enforces that. It keeps one status bit per lower-priority channel.
// When its own channel is granted the link, the bits are loaded with a
// snapshot of the SPQ occupancy of the lower channels: the flits that have
// been waiting while this channel was served. Each bit clears when the
// corresponding channel is granted the link. While any bit is set, no new
// flit of this channel is admitted into the SPQ.
//
// Interface: req_in/ack_in is the valid/ready handshake from the sharebox;
// req_out/ack_out goes to this channel's SPQ slot. grant is the one-hot
// link grant of all channels, occupancy the SPQ slot-full vector at the start
// of the cycle. Index 0 is the highest priority, so the lower channels are
// IDX+1 .. N-1 (the original schematic numbers them n-1..0 below channel n).
//
// Timing: the status bits are registers updated at the clock edge ending the
// grant cycle. Admission looks at the value they take at that edge, so a flit
// can be admitted in the same cycle that the last waiting lower flit is
// granted, and a channel whose grant found no lower flit waiting can be
// refilled in the cycle of its own grant. With this, the release after a
// grant comes at most N-1 cycles later, giving the published interval
// condition of N+Q-1 flit-times.
//
// The set/reset rules follow the published ALG design; set and reset never coincide
// because grant is one-hot. Its RS latches and C-element are
// replaced by clocked registers and a valid/ready handshake (this design's
// choice); the handshake keeps req_out high until the transfer, which is what
// the C-element guarantees in the asynchronous circuit.
module alg_admission_ctrl
  import alg_pkg::*;
#(
  parameter int unsigned N   = 8,
  parameter int unsigned IDX = 0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         req_in,
  output logic         ack_in,
  output logic         req_out,
  input  logic         ack_out,
  input  logic [N-1:0] grant,
  input  logic [N-1:0] occupancy,
  output logic [N-1:0] status,
  output logic         blocked
);

  localparam logic [N-1:0] LOWER = N'(lower_mask(N, IDX));

  logic [N-1:0] status_q, status_d;

  always_comb begin
    if (grant[IDX]) status_d = occupancy & LOWER;     // set from snapshot
    else            status_d = status_q & ~grant;     // reset by lower grants
  end

  always_ff @(posedge clk) begin
    if (!rst_n) status_q <= '0;
    else        status_q <= status_d;
  end

  assign status  = status_q;
  assign blocked = |status_d;
  assign req_out = req_in & ~blocked;
  assign ack_in  = ack_out & ~blocked;

  a_grant_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant))
    else $error("alg_admission_ctrl: grant not one-hot");

endmodule
