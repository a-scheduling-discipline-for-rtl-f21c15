// alg_link: an ALG (Asynchronous Latency Guarantee) link, where N virtual
// channels (VCs) share one physical link with per-VC latency and bandwidth
// guarantees.
//
// A flit on VC index i has priority level Q = i+1 (index 0 is the highest).
// From the cycle it is offered at in_valid[i], it is granted the link within
// Q cycles, provided flits on that VC are offered at least N+Q-1 cycles
// apart. The VC then keeps a bandwidth of at least 1/(N+Q-1) of the link.
// Flits offered faster are held back by the admission control so that
// they cannot break other VCs' guarantees.
//
// Data path, per VC then shared:
//   in -> sharebox -> admission control -> SPQ slot -> merge -> link
//   pipeline (LINK_STAGES registers) -> split -> unsharebox -> out
// VC control: each sharebox passes one flit and locks. The unsharebox of the
// same VC toggles its unlock wire when that flit leaves at out_*, which
// unlocks the sharebox. This way a flit never enters the link without room at
// the far end, and the link never stalls.
//
// Interface: per-VC valid/ready/data in (source VC buffers) and out
// (destination); all flows use valid/ready transfers on the rising clock
// edge. Observation outputs: link_* (the flit entering the link pipeline),
// grant, occupancy (SPQ), adm_blocked (admission control holding a VC) and
// vc_locked (sharebox locked).
//
// Timing, with out_ready high: a flit offered in cycle a and granted in
// cycle g (a < g <= a+Q) is valid at out in cycle g+LINK_STAGES+1. Its
// sharebox unlocks in the cycle after the flit is taken at out.
//
// The structure, the discipline, N=8, 16-bit flits and the 3-stage link
// follow the published ALG link. That circuit is asynchronous (one
// handshake per flit-time). This design is synchronous, one clock cycle per
// flit-time; that and the VC-number field on the link are its own choices.
module alg_link
  import alg_pkg::*;
#(
  parameter int unsigned N_VC        = ALG_N_VC,
  parameter int unsigned FLIT_W      = ALG_FLIT_W,
  parameter int unsigned LINK_STAGES = ALG_LINK_STAGES,
  localparam int unsigned VCW        = (N_VC > 1) ? $clog2(N_VC) : 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [N_VC-1:0]               in_valid,
  output logic [N_VC-1:0]               in_ready,
  input  logic [N_VC-1:0][FLIT_W-1:0]   in_data,
  output logic [N_VC-1:0]               out_valid,
  input  logic [N_VC-1:0]               out_ready,
  output logic [N_VC-1:0][FLIT_W-1:0]   out_data,
  output logic                          link_valid,
  output logic [VCW-1:0]                link_vc,
  output logic [FLIT_W-1:0]             link_data,
  output logic [N_VC-1:0]               grant,
  output logic [N_VC-1:0]               occupancy,
  output logic [N_VC-1:0]               adm_blocked,
  output logic [N_VC-1:0]               vc_locked
);

  logic [N_VC-1:0]             sb_valid, sb_ready, unlock;
  logic [N_VC-1:0][FLIT_W-1:0] sb_data, slot_data;
  logic                        rx_valid;
  logic [VCW-1:0]              rx_vc;
  logic [FLIT_W-1:0]           rx_data;
  logic [N_VC-1:0]             split_valid;
  logic [FLIT_W-1:0]           split_data;

  // Transmit side of VC control.
  for (genvar i = 0; i < N_VC; i++) begin : g_tx
    sharebox #(.W(FLIT_W)) u_sharebox (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (in_valid[i]),
      .in_ready (in_ready[i]),
      .in_data  (in_data[i]),
      .out_valid(sb_valid[i]),
      .out_ready(sb_ready[i]),
      .out_data (sb_data[i]),
      .unlock   (unlock[i]),
      .locked   (vc_locked[i])
    );
  end

  alg_scheduler #(.N(N_VC), .W(FLIT_W)) u_sched (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (sb_valid),
    .in_ready (sb_ready),
    .in_data  (sb_data),
    .grant    (grant),
    .slot_data(slot_data),
    .occupancy(occupancy),
    .blocked  (adm_blocked)
  );

  link_merge #(.N(N_VC), .W(FLIT_W), .VCW(VCW)) u_merge (
    .grant     (grant),
    .slot_data (slot_data),
    .link_valid(link_valid),
    .link_vc   (link_vc),
    .link_data (link_data)
  );

  link_pipeline #(.W(FLIT_W), .VCW(VCW), .STAGES(LINK_STAGES)) u_link (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (link_valid),
    .in_vc    (link_vc),
    .in_data  (link_data),
    .out_valid(rx_valid),
    .out_vc   (rx_vc),
    .out_data (rx_data)
  );

  link_split #(.N(N_VC), .W(FLIT_W), .VCW(VCW)) u_split (
    .in_valid (rx_valid),
    .in_vc    (rx_vc),
    .in_data  (rx_data),
    .out_valid(split_valid),
    .out_data (split_data)
  );

  // Receive side of VC control: the single-element destination VC buffers.
  for (genvar i = 0; i < N_VC; i++) begin : g_rx
    unsharebox #(.W(FLIT_W)) u_unsharebox (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (split_valid[i]),
      .in_data  (split_data),
      .out_valid(out_valid[i]),
      .out_ready(out_ready[i]),
      .out_data (out_data[i]),
      .unlock   (unlock[i])
    );
  end

endmodule
