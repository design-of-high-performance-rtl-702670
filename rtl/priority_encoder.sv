// priority_encoder: picks the highest-priority match from the final vector.
//
// Rules are stored in decreasing order of priority, so rule 0 is the most
// important; the encoder reports the lowest set bit of vec_i as idx_o and
// raises hit_o when any bit is set (idx_o is 0 when none is). That rules are
// ordered by priority and that one winner is chosen follow the architecture;
// the binary index output, the hit flag and the single-cycle realisation are
// this design's choices.
//
// Written as a scan from the lowest-priority bit up to bit 0, so that the
// last (lowest-numbered) set bit seen wins; synthesis is free to rebuild the
// chain as a tree. Purely combinational.
module priority_encoder #(
  parameter int unsigned N  = 512,
  parameter int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]  vec_i,
  output logic [IW-1:0] idx_o,
  output logic          hit_o
);

  always_comb begin
    idx_o = '0;
    for (int i = N - 1; i >= 0; i--) begin
      if (vec_i[i]) idx_o = IW'(i);
    end
  end

  assign hit_o = |vec_i;

endmodule
