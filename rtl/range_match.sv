// range_match: range search module for the port fields.
//
// Produces the N-bit vector of one port field against N rules. Rule n holds
// an inclusive lower and upper bound; the field is compared with both
// (field >= lower gives 1, field <= upper gives 1) and the two comparison
// bits are ANDed into bit n of the vector. This is the architecture's range
// module; it needs no range-to-prefix conversion. A rule whose lower bound
// exceeds its upper bound matches nothing.
//
// Interface: field_i is the port number, rule_lo_i[n] and rule_hi_i[n] the
// bounds of rule n, bv_o[n] its match bit. Purely combinational.
module range_match #(
  parameter int unsigned N = 512,  // rules in the ruleset
  parameter int unsigned W = 16    // port width in bits
) (
  input  logic [W-1:0]         field_i,
  input  logic [N-1:0][W-1:0]  rule_lo_i,
  input  logic [N-1:0][W-1:0]  rule_hi_i,
  output logic [N-1:0]         bv_o
);

  logic [N-1:0] ge_lo;  // field >= lower bound
  logic [N-1:0] le_hi;  // field <= upper bound

  always_comb begin
    for (int n = 0; n < N; n++) begin
      ge_lo[n] = (field_i >= rule_lo_i[n]);
      le_hi[n] = (field_i <= rule_hi_i[n]);
    end
  end

  assign bv_o = ge_lo & le_hi;

endmodule
