// xnorbv_match: XnorBV ternary field matcher.
//
// Produces the N-bit vector of one header field against N rules. For every
// rule n, each of the K field bits is XNORed with the rule's bit, and the K
// XNOR outputs are ANDed into bit n of the vector: 1 means the field matches
// rule n. This XNOR-then-AND structure is the architecture's own. A wildcard
// rule bit ('*') is represented by a care bit of 0, which forces that XNOR
// output to 1; that value/care encoding is this design's choice. The same
// module serves prefix match (a care mask of leading ones) and exact match
// (all care bits set).
//
// Interface: field_i is the header field; rule_value_i[n] and rule_care_i[n]
// are rule n's pattern; bv_o[n] is the match bit of rule n (rule 0 is the
// first and highest-priority rule). Purely combinational; the caller places
// the pipeline register behind it.
module xnorbv_match #(
  parameter int unsigned N = 512,  // rules in the ruleset
  parameter int unsigned K = 32    // field width in bits
) (
  input  logic [K-1:0]         field_i,
  input  logic [N-1:0][K-1:0]  rule_value_i,
  input  logic [N-1:0][K-1:0]  rule_care_i,
  output logic [N-1:0]         bv_o
);

  always_comb begin
    for (int n = 0; n < N; n++) begin
      // XNOR per bit, a don't-care bit always agrees, then AND the K bits
      bv_o[n] = &(~(rule_value_i[n] ^ field_i) | ~rule_care_i[n]);
    end
  end

endmodule
