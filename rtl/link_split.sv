// link_split: steers each flit leaving the physical link to the unsharebox
// of its virtual channel.
//
// The VC number carried with the flit is decoded into a one-hot valid; the
// data is broadcast to all VCs. Purely combinational.
//
// Interface: in_valid, in_vc, in_data from the link; out_valid[N] and
// out_data to the unshareboxes. The split is part of the published link; the VC-number
// decode is this design's choice, matching link_merge.
module link_split #(
  parameter int unsigned N   = 8,
  parameter int unsigned W   = 16,
  parameter int unsigned VCW = (N > 1) ? $clog2(N) : 1
) (
  input  logic           in_valid,
  input  logic [VCW-1:0] in_vc,
  input  logic [W-1:0]   in_data,
  output logic [N-1:0]   out_valid,
  output logic [W-1:0]   out_data
);

  always_comb begin
    out_valid = '0;
    for (int i = 0; i < N; i++)
      out_valid[i] = in_valid && (in_vc == VCW'(i));
  end

  assign out_data = in_data;

endmodule
