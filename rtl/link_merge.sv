// link_merge: puts the flit granted by the static priority queue onto the
// shared physical link.
//
// The SPQ grant is one-hot; the merge selects the granted slot's data and
// encodes the grant into the VC number that travels with the flit, so that
// the split at the far end can steer it to the right VC. Purely
// combinational; the first register of the link pipeline follows it.
//
// Interface: grant[N] and slot_data[N] in; link_valid, link_vc, link_data out.
// The merge is part of the published link; the VC-number field on the link is this
// design's choice (the published design does not say how the VC is identified on the
// link).
module link_merge #(
  parameter int unsigned N   = 8,
  parameter int unsigned W   = 16,
  parameter int unsigned VCW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]        grant,
  input  logic [N-1:0][W-1:0] slot_data,
  output logic                link_valid,
  output logic [VCW-1:0]      link_vc,
  output logic [W-1:0]        link_data
);

  always_comb begin
    link_valid = |grant;
    link_vc    = '0;
    link_data  = '0;
    for (int i = 0; i < N; i++) begin
      if (grant[i]) begin
        link_vc   = link_vc | VCW'(i);
        link_data = link_data | slot_data[i];
      end
    end
  end

endmodule
