// xnorbv_classifier: 5-tuple XnorBV packet classifier (top level).
//
// Each incoming 104-bit header is compared with every rule of an N-entry
// ruleset in parallel, one field at a time: the two IP addresses and the
// protocol go through XnorBV ternary matchers (prefix and exact match), the
// two ports through range matchers. Each matcher yields an N-bit vector;
// the aggregator ANDs the five vectors, and a priority encoder reports the
// lowest-numbered (highest-priority) rule that survived. This organisation,
// the three pipeline stages and the 3-cycle latency follow the architecture.
//
// Pipeline (one header accepted per clock, no stalls):
//   stage 1  field matchers          -> s1 registers (five N-bit vectors)
//   stage 2  aggregator              -> s2 register  (final N-bit vector)
//   stage 3  priority encoder        -> output registers
// A header presented with in_valid_i before rising edge t produces its
// result on the outputs after edge t+2, i.e. it is seen three clock edges
// after it is applied counting the edge that captures it: latency 3.
//
// Outputs: out_valid_o marks a result; out_hit_o says whether any rule
// matched; out_rule_idx_o is the winning rule; out_match_vec_o is the full
// multi-match vector of the same packet.
//
// Rule loading (this design's choice, the architecture leaves it open):
// rule_wr_en_i writes rule_wr_data_i into entry rule_wr_idx_i at a rising
// edge; headers captured from the next edge on see the new rule. Reset
// empties the ruleset and the pipeline. Unwritten entries never match: the
// entry-valid bits enter the aggregator as a sixth vector.
//
// The assertions at the end use rst_ni in their disable condition as well as
// it being the flops' asynchronous reset; that double use is intended.
module xnorbv_classifier
  import pc_pkg::*;
#(
  parameter int unsigned N  = 512,  // rules; the largest ruleset evaluated
  parameter int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic            clk_i,
  input  logic            rst_ni,
  // ruleset write port
  input  logic            rule_wr_en_i,
  input  logic [IW-1:0]   rule_wr_idx_i,
  input  rule_t           rule_wr_data_i,
  // packet headers
  input  logic            in_valid_i,
  input  header_t         in_header_i,
  // classification results
  output logic            out_valid_o,
  output logic            out_hit_o,
  output logic [IW-1:0]   out_rule_idx_o,
  output logic [N-1:0]    out_match_vec_o
);

  // ---------------------------------------------------------------- ruleset
  rule_t [N-1:0] rules;

  rule_memory #(.N(N), .IW(IW)) u_rules (
    .clk_i     (clk_i),
    .rst_ni    (rst_ni),
    .wr_en_i   (rule_wr_en_i),
    .wr_idx_i  (rule_wr_idx_i),
    .wr_rule_i (rule_wr_data_i),
    .rules_o   (rules)
  );

  // Per-field views of the ruleset.
  logic [N-1:0][IP_W-1:0]    sip_value, sip_care, dip_value, dip_care;
  logic [N-1:0][PORT_W-1:0]  sport_lo, sport_hi, dport_lo, dport_hi;
  logic [N-1:0][PROTO_W-1:0] proto_value, proto_care;
  logic [N-1:0]              rule_valid;

  for (genvar n = 0; n < N; n++) begin : g_view
    assign sip_value[n]   = rules[n].sip_value;
    assign sip_care[n]    = rules[n].sip_care;
    assign dip_value[n]   = rules[n].dip_value;
    assign dip_care[n]    = rules[n].dip_care;
    assign sport_lo[n]    = rules[n].sport_lo;
    assign sport_hi[n]    = rules[n].sport_hi;
    assign dport_lo[n]    = rules[n].dport_lo;
    assign dport_hi[n]    = rules[n].dport_hi;
    assign proto_value[n] = rules[n].proto_value;
    assign proto_care[n]  = rules[n].proto_care;
    assign rule_valid[n]  = rules[n].valid;
  end

  // ------------------------------------------------- stage 1: field matching
  logic [NUM_FIELDS-1:0][N-1:0] field_bv;

  xnorbv_match #(.N(N), .K(IP_W)) u_sip (
    .field_i      (in_header_i.sip),
    .rule_value_i (sip_value),
    .rule_care_i  (sip_care),
    .bv_o         (field_bv[F_SIP])
  );

  xnorbv_match #(.N(N), .K(IP_W)) u_dip (
    .field_i      (in_header_i.dip),
    .rule_value_i (dip_value),
    .rule_care_i  (dip_care),
    .bv_o         (field_bv[F_DIP])
  );

  range_match #(.N(N), .W(PORT_W)) u_sport (
    .field_i   (in_header_i.sport),
    .rule_lo_i (sport_lo),
    .rule_hi_i (sport_hi),
    .bv_o      (field_bv[F_SPORT])
  );

  range_match #(.N(N), .W(PORT_W)) u_dport (
    .field_i   (in_header_i.dport),
    .rule_lo_i (dport_lo),
    .rule_hi_i (dport_hi),
    .bv_o      (field_bv[F_DPORT])
  );

  xnorbv_match #(.N(N), .K(PROTO_W)) u_proto (
    .field_i      (in_header_i.proto),
    .rule_value_i (proto_value),
    .rule_care_i  (proto_care),
    .bv_o         (field_bv[F_PROTO])
  );

  logic                         s1_valid_q;
  logic [NUM_FIELDS-1:0][N-1:0] s1_bv_q;
  logic [N-1:0]                 s1_rule_valid_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) s1_valid_q <= 1'b0;
    else         s1_valid_q <= in_valid_i;
  end

  always_ff @(posedge clk_i) begin
    if (in_valid_i) begin
      s1_bv_q         <= field_bv;
      s1_rule_valid_q <= rule_valid;
    end
  end

  // ---------------------------------------------------- stage 2: aggregation
  logic [N-1:0] final_bv;

  bv_aggregator #(.N(N), .M(NUM_FIELDS + 1)) u_agg (
    .bv_i ({s1_rule_valid_q, s1_bv_q}),
    .bv_o (final_bv)
  );

  logic         s2_valid_q;
  logic [N-1:0] s2_bv_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) s2_valid_q <= 1'b0;
    else         s2_valid_q <= s1_valid_q;
  end

  always_ff @(posedge clk_i) begin
    if (s1_valid_q) s2_bv_q <= final_bv;
  end

  // ----------------------------------------------- stage 3: priority encoder
  logic          pe_hit;
  logic [IW-1:0] pe_idx;

  priority_encoder #(.N(N), .IW(IW)) u_pe (
    .vec_i (s2_bv_q),
    .idx_o (pe_idx),
    .hit_o (pe_hit)
  );

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      out_valid_o     <= 1'b0;
      out_hit_o       <= 1'b0;
      out_rule_idx_o  <= '0;
      out_match_vec_o <= '0;
    end else begin
      out_valid_o <= s2_valid_q;
      if (s2_valid_q) begin
        out_hit_o       <= pe_hit;
        out_rule_idx_o  <= pe_idx;
        out_match_vec_o <= s2_bv_q;
      end
    end
  end

  // The reported rule is always one that matched, and the lowest one.
  a_hit_is_match : assert property (@(posedge clk_i) disable iff (!rst_ni)
    out_valid_o && out_hit_o |-> out_match_vec_o[out_rule_idx_o]);
  a_hit_is_first : assert property (@(posedge clk_i) disable iff (!rst_ni)
    out_valid_o && out_hit_o |-> (out_match_vec_o & ((N'(1) << out_rule_idx_o) - N'(1))) == '0);
  a_miss_is_empty : assert property (@(posedge clk_i) disable iff (!rst_ni)
    out_valid_o && !out_hit_o |-> out_match_vec_o == '0);

endmodule
