// link_pipeline: the shared physical link, pipelined in STAGES register
// stages (3 in the reference link).
//
// Each stage holds one flit (valid, VC number, data). The link never stalls:
// VC control admits a flit only when the far unsharebox has room, so every
// stage advances every cycle and there is no backpressure signal.
//
// Interface: in_* from the merge, out_* to the split.
// Timing: a flit entering in cycle k leaves at the output in cycle k+STAGES.
// The stage count (3) is that of the published link; making every stage a clocked
// register is this design's choice.
module link_pipeline #(
  parameter int unsigned W      = 16,
  parameter int unsigned VCW    = 3,
  parameter int unsigned STAGES = 3
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [VCW-1:0] in_vc,
  input  logic [W-1:0]   in_data,
  output logic           out_valid,
  output logic [VCW-1:0] out_vc,
  output logic [W-1:0]   out_data
);

  logic [STAGES-1:0]                 valid_q;
  logic [STAGES-1:0][VCW+W-1:0]      flit_q;

  always_ff @(posedge clk) begin
    if (!rst_n) valid_q <= '0;
    else begin
      valid_q[0] <= in_valid;
      for (int s = 1; s < STAGES; s++) valid_q[s] <= valid_q[s-1];
    end
  end

  always_ff @(posedge clk) begin
    flit_q[0] <= {in_vc, in_data};
    for (int s = 1; s < STAGES; s++) flit_q[s] <= flit_q[s-1];
  end

  assign out_valid           = valid_q[STAGES-1];
  assign {out_vc, out_data}  = flit_q[STAGES-1];

endmodule
