// bv_aggregator: combines the per-field bit vectors.
//
// Bit n of the result is the AND of bit n of every input vector, so a rule
// survives only if every field of the packet matched it. With M = 5 this is
// the architecture's aggregator over the five 5-tuple vectors; the classifier
// uses M = 6 and feeds the ruleset's entry-valid bits in as the sixth vector
// (this design's way to keep unwritten entries from matching).
//
// Interface: bv_i[m] is input vector m, bv_o the final vector. Purely
// combinational.
module bv_aggregator #(
  parameter int unsigned N = 512,  // rules in the ruleset
  parameter int unsigned M = 5     // number of vectors combined
) (
  input  logic [M-1:0][N-1:0]  bv_i,
  output logic [N-1:0]         bv_o
);

  always_comb begin
    bv_o = '1;
    for (int m = 0; m < M; m++) begin
      bv_o &= bv_i[m];
    end
  end

endmodule
