// alg_scheduler: the ALG scheduler, i.e. one admission control per virtual
// channel in front of the static priority queue (SPQ).
//
// Flits offered on in_valid/in_data (from the shareboxes) enter their SPQ
// slot unless the channel's admission control is holding it back; the SPQ
// grants the link to the highest-priority waiting flit every cycle. Together
// they bound the link access time of a flit on priority level Q to Q
// flit-times, provided flits on that channel arrive at least N+Q-1
// flit-times apart; flits arriving faster are held back by the admission
// control rather than harming other channels.
//
// Interface: per-channel valid/ready/data in; grant (one-hot), slot_data
// and occupancy out towards the merge; blocked and status for observation.
//
// Timing: admission at the end of the arrival cycle, grant one to Q cycles
// later. Structure follows the published ALG design; clocking is this design's choice.
module alg_scheduler #(
  parameter int unsigned N = 8,
  parameter int unsigned W = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N-1:0]        in_valid,
  output logic [N-1:0]        in_ready,
  input  logic [N-1:0][W-1:0] in_data,
  output logic [N-1:0]        grant,
  output logic [N-1:0][W-1:0] slot_data,
  output logic [N-1:0]        occupancy,
  output logic [N-1:0]        blocked
);

  logic [N-1:0] adm_valid, adm_ready;

  for (genvar i = 0; i < N; i++) begin : g_adm
    logic [N-1:0] status_unused;
    alg_admission_ctrl #(.N(N), .IDX(i)) u_adm (
      .clk      (clk),
      .rst_n    (rst_n),
      .req_in   (in_valid[i]),
      .ack_in   (in_ready[i]),
      .req_out  (adm_valid[i]),
      .ack_out  (adm_ready[i]),
      .grant    (grant),
      .occupancy(occupancy),
      .status   (status_unused),
      .blocked  (blocked[i])
    );
  end

  spq #(.N(N), .W(W)) u_spq (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (adm_valid),
    .in_ready (adm_ready),
    .in_data  (in_data),
    .occupancy(occupancy),
    .grant    (grant),
    .slot_data(slot_data)
  );

endmodule
