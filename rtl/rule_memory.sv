// rule_memory: the ruleset store of the classifier.
//
// Holds N rules, entry 0 first (highest priority), and presents every entry
// at once so that all rules can be compared with a packet in the same cycle.
// The fields of each rule are kept apart (one struct member per field) and
// fed to the matcher of that field, as the architecture stores the rules of
// each tuple separately. It is written as a register array because every
// entry is read on every cycle.
//
// Writing: when wr_en_i is high at a rising clock edge, entry wr_idx_i takes
// wr_rule_i (including its valid bit, so writing valid = 0 deletes a rule).
// The new contents are visible at rules_o after that edge. Reset (rst_ni
// low, asynchronous) clears only the valid bits; the pattern bits of an
// invalid entry are never used. The write port and the reset behaviour are
// this design's choices: the architecture does not describe how the ruleset
// is loaded.
module rule_memory
  import pc_pkg::*;
#(
  parameter int unsigned N  = 512,
  parameter int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic               clk_i,
  input  logic               rst_ni,
  input  logic               wr_en_i,
  input  logic [IW-1:0]      wr_idx_i,
  input  rule_t              wr_rule_i,
  output rule_t [N-1:0]      rules_o
);

  // One register per entry, written when its index is addressed.
  for (genvar n = 0; n < N; n++) begin : g_entry
    logic  valid_q;
    rule_t rule_q;   // its valid member is superseded by valid_q
    logic  wr_hit;

    assign wr_hit = wr_en_i && (wr_idx_i == IW'(n));

    // Entry-valid bit: reset to "empty ruleset".
    always_ff @(posedge clk_i or negedge rst_ni) begin
      if (!rst_ni)     valid_q <= 1'b0;
      else if (wr_hit) valid_q <= wr_rule_i.valid;
    end

    // Rule pattern: no reset needed, gated by the valid bit.
    always_ff @(posedge clk_i) begin
      if (wr_hit) rule_q <= wr_rule_i;
    end

    // valid is the most significant member of rule_t
    assign rules_o[n] = {valid_q, rule_q[$bits(rule_t)-2:0]};
  end

endmodule
