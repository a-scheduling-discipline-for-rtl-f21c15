// spq: static priority queue of the ALG link.
//
// One single-flit slot per virtual channel. In every cycle (flit-time) in
// which at least one slot is full, the slot of highest priority (lowest
// index) is granted the physical link and emptied. A flit entering slot Q
// (priority level Q = index+1) therefore waits for at most Q-1 flits of
// higher priority plus one, provided each higher channel gets at most one
// turn, which the admission control ensures.
//
// Interface: per-channel in_valid/in_ready/in_data from the admission
// control. occupancy is the slot-full vector at the start of the cycle
// (registered), read by the admission control as its snapshot. grant is the
// one-hot grant of this cycle; slot_data presents all slots so the merge can
// select the granted one.
//
// Timing: a flit written at the end of cycle k can be granted in cycle k+1.
// A slot can be refilled in the cycle it is granted. The link never stalls
// (VC control guarantees room at the far end), so there is no ready input.
//
// The published design gives the SPQ's function and uses an asynchronous
// priority arbiter for its circuit; the fixed-priority encoder here is the
// simplest synchronous circuit with that function.
module spq #(
  parameter int unsigned N = 8,
  parameter int unsigned W = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N-1:0]        in_valid,
  output logic [N-1:0]        in_ready,
  input  logic [N-1:0][W-1:0] in_data,
  output logic [N-1:0]        occupancy,
  output logic [N-1:0]        grant,
  output logic [N-1:0][W-1:0] slot_data
);

  logic [N-1:0]        full_q;
  logic [N-1:0][W-1:0] data_q;

  // Fixed priority: lowest index wins.
  always_comb begin
    grant = '0;
    for (int i = N - 1; i >= 0; i--)
      if (full_q[i]) grant = N'(1) << i;
  end

  assign occupancy = full_q;
  assign in_ready  = ~full_q | grant;
  assign slot_data = data_q;

  always_ff @(posedge clk) begin
    if (!rst_n) full_q <= '0;
    else        full_q <= (full_q & ~grant) | (in_valid & in_ready);
  end

  always_ff @(posedge clk)
    for (int i = 0; i < N; i++)
      if (in_valid[i] && in_ready[i]) data_q[i] <= in_data[i];

  a_grant_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant))
    else $error("spq: more than one grant");
  a_grant_full: assert property (@(posedge clk) disable iff (!rst_n) (grant & ~full_q) == '0)
    else $error("spq: grant to an empty slot");
  a_work_conserving: assert property (@(posedge clk) disable iff (!rst_n) (|full_q) |-> (|grant))
    else $error("spq: link idle while a flit waits");

endmodule
