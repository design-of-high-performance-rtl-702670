// tb_xnorbv_classifier: end-to-end test of the 5-tuple classifier at its
// default size (512 rules).
//
// The test runs five phases, one per ruleset size 32, 64, 128, 256 and 512.
// Each phase resets the classifier (emptying the ruleset), loads that many
// random rules through the write port, then streams headers, mostly
// back-to-back with occasional idle cycles, and now and then rewrites or
// deletes a rule while traffic flows. Headers are built to fall inside a
// chosen rule, sometimes with one field pushed just outside it, or are
// fully random.
//
// A shadow ruleset and a reference classifier written here (bit-by-bit
// ternary compare, integer range compare, lowest index wins) predict the
// multi-match vector, the hit flag and the rule index of every header. The
// testbench also checks that each result appears exactly three cycles after
// its header is applied, and that one header per cycle is accepted.
// It counts how often each mechanism occurred (prefix, wildcard, exact and
// range matches, range boundaries, misses, multi-matches decided by
// priority, rule writes under traffic, back-to-back issue, reset) and counts
// a failure for any that never did.
module tb_xnorbv_classifier;
  import pc_pkg::*;

  localparam int N  = 512;
  localparam int IW = 9;
  localparam int LATENCY = 3;
  localparam int PKTS_PER_PHASE = 400;

  int checks   = 0;
  int failures = 0;

  logic          clk = 1'b0;
  logic          rst_n;
  logic          wr_en;
  logic [IW-1:0] wr_idx;
  rule_t         wr_data;
  logic          in_valid;
  header_t       in_hdr;
  logic          out_valid, out_hit;
  logic [IW-1:0] out_idx;
  logic [N-1:0]  out_vec;

  always #5 clk = ~clk;

  xnorbv_classifier dut (
    .clk_i(clk), .rst_ni(rst_n),
    .rule_wr_en_i(wr_en), .rule_wr_idx_i(wr_idx), .rule_wr_data_i(wr_data),
    .in_valid_i(in_valid), .in_header_i(in_hdr),
    .out_valid_o(out_valid), .out_hit_o(out_hit),
    .out_rule_idx_o(out_idx), .out_match_vec_o(out_vec));

  // ------------------------------------------------------------ bookkeeping
  typedef struct {
    logic [N-1:0]  vec;
    logic          hit;
    logic [IW-1:0] idx;
    longint        cycle;
  } expect_t;

  expect_t expq[$];
  rule_t   shadow [N];
  longint  cycle = 0;

  // mechanism counters
  int n_prefix, n_wildcard, n_exact, n_range_edge, n_range_out;
  int n_miss, n_multi, n_wr_traffic, n_b2b, n_reset, n_hit;

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------ reference model
  function automatic logic tern_ok(logic [IP_W-1:0] f, logic [IP_W-1:0] v,
                                   logic [IP_W-1:0] c, int w);
    for (int b = 0; b < w; b++) if (c[b] && f[b] != v[b]) return 1'b0;
    return 1'b1;
  endfunction

  function automatic logic rule_ok(rule_t r, header_t h);
    if (!r.valid) return 1'b0;
    if (!tern_ok(h.sip, r.sip_value, r.sip_care, IP_W)) return 1'b0;
    if (!tern_ok(h.dip, r.dip_value, r.dip_care, IP_W)) return 1'b0;
    if (!tern_ok(IP_W'(h.proto), IP_W'(r.proto_value), IP_W'(r.proto_care), PROTO_W)) return 1'b0;
    if (int'(h.sport) < int'(r.sport_lo) || int'(h.sport) > int'(r.sport_hi)) return 1'b0;
    if (int'(h.dport) < int'(r.dport_lo) || int'(h.dport) > int'(r.dport_hi)) return 1'b0;
    return 1'b1;
  endfunction

  // ------------------------------------------------------- stimulus helpers
  function automatic logic [IP_W-1:0] prefix_mask(int len);
    return (len == 0) ? '0 : ~(IP_W'('1) >> len);
  endfunction

  function automatic rule_t random_rule();
    rule_t r;
    int    lo, span;
    r.valid = 1'b1;
    // source IP: prefix match, 8..32 bits
    r.sip_care  = prefix_mask($urandom_range(32, 8));
    r.sip_value = {8'd10, 8'($urandom_range(3)), 16'($urandom)} & r.sip_care;
    // destination IP: prefix, full wildcard or an arbitrary mask
    case ($urandom_range(3))
      0:       r.dip_care = '0;
      1:       r.dip_care = 32'hFFFF_00FF;
      default: r.dip_care = prefix_mask($urandom_range(32, 16));
    endcase
    r.dip_value = {8'd192, 8'd168, 8'($urandom_range(3)), 8'($urandom)} & r.dip_care;
    // ports: a range inside a small space so that rules overlap
    lo = $urandom_range(1000);
    span = $urandom_range(3) == 0 ? 0 : $urandom_range(400);
    r.sport_lo = 16'(lo);  r.sport_hi = 16'(lo + span);
    if ($urandom_range(4) == 0) begin r.sport_lo = '0; r.sport_hi = '1; end
    lo = $urandom_range(1000);
    span = $urandom_range(200);
    r.dport_lo = 16'(lo);  r.dport_hi = 16'(lo + span);
    // protocol: exact (TCP/UDP/ICMP) or wildcard
    r.proto_care  = ($urandom_range(2) == 0) ? 8'h00 : 8'hFF;
    case ($urandom_range(2))
      0:       r.proto_value = 8'd6;
      1:       r.proto_value = 8'd17;
      default: r.proto_value = 8'd1;
    endcase
    r.proto_value &= r.proto_care;
    return r;
  endfunction

  function automatic logic [15:0] in_range(logic [15:0] lo, logic [15:0] hi);
    case ($urandom_range(3))
      0:       return lo;
      1:       return hi;
      default: return 16'(int'(lo) + $urandom_range(int'(hi) - int'(lo)));
    endcase
  endfunction

  // Header inside rule r, optionally with one field moved just outside.
  function automatic header_t header_for(rule_t r, bit spoil);
    header_t h;
    h.sip   = (r.sip_value & r.sip_care) | ($urandom & ~r.sip_care);
    h.dip   = (r.dip_value & r.dip_care) | ($urandom & ~r.dip_care);
    h.proto = (r.proto_value & r.proto_care) | (8'($urandom) & ~r.proto_care);
    h.sport = (r.sport_lo <= r.sport_hi) ? in_range(r.sport_lo, r.sport_hi) : 16'($urandom);
    h.dport = (r.dport_lo <= r.dport_hi) ? in_range(r.dport_lo, r.dport_hi) : 16'($urandom);
    if (spoil) begin
      case ($urandom_range(3))
        0: if (r.dport_hi != '1) h.dport = r.dport_hi + 1'b1; else h.dport = r.dport_lo - 1'b1;
        1: if (r.dport_lo != '0) h.dport = r.dport_lo - 1'b1; else h.dport = r.dport_hi + 1'b1;
        2: h.proto = r.proto_value ^ 8'h80;
        default: h.sip = r.sip_value ^ 32'h8000_0000;
      endcase
    end
    return h;
  endfunction

  // Reference result for h against the current shadow ruleset, plus
  // mechanism bookkeeping.
  task automatic predict(header_t h);
    expect_t e;
    int cnt;
    e.vec = '0;
    cnt = 0;
    for (int n = 0; n < N; n++) begin
      e.vec[n] = rule_ok(shadow[n], h);
      if (e.vec[n]) cnt++;
    end
    e.hit = (cnt > 0);
    e.idx = '0;
    for (int n = N - 1; n >= 0; n--) if (e.vec[n]) e.idx = IW'(n);
    e.cycle = cycle;
    expq.push_back(e);
    if (cnt == 0) n_miss++;
    if (cnt > 1)  n_multi++;
    if (e.hit) begin
      rule_t w;
      n_hit++;
      w = shadow[e.idx];
      if (w.sip_care != '1 && w.sip_care != '0) n_prefix++;
      if (w.dip_care == '0 || w.proto_care == '0) n_wildcard++;
      if (w.proto_care == '1) n_exact++;
      if (h.sport == w.sport_lo || h.sport == w.sport_hi ||
          h.dport == w.dport_lo || h.dport == w.dport_hi) n_range_edge++;
    end
    for (int n = 0; n < N; n++) begin
      if (shadow[n].valid &&
          (h.dport == shadow[n].dport_hi + 1'b1 || h.dport == shadow[n].dport_lo - 1'b1) &&
          tern_ok(h.sip, shadow[n].sip_value, shadow[n].sip_care, IP_W) &&
          !e.vec[n]) begin
        n_range_out++;
        break;
      end
    end
  endtask

  // ------------------------------------------------------- output checker
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      expect_t e;
      checks++;
      if (expq.size() == 0) begin
        failures++;
        $display("FAIL result with no header outstanding");
      end else begin
        e = expq.pop_front();
        if (out_vec !== e.vec || out_hit !== e.hit || out_idx !== e.idx) begin
          failures++;
          if (failures < 10)
            $display("FAIL cycle %0d: hit=%b idx=%0d expected hit=%b idx=%0d vec %s",
                     cycle, out_hit, out_idx, e.hit, e.idx,
                     (out_vec === e.vec) ? "ok" : "differs");
        end
        checks++;
        if (cycle - e.cycle != LATENCY) begin
          failures++;
          if (failures < 10)
            $display("FAIL latency %0d cycles, expected %0d", cycle - e.cycle, LATENCY);
        end
      end
    end
  end

  // ------------------------------------------------------------- phases
  task automatic do_reset();
    @(negedge clk);
    rst_n = 1'b0; in_valid = 1'b0; wr_en = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    foreach (shadow[n]) shadow[n].valid = 1'b0;
    expq.delete();
    n_reset++;
  endtask

  task automatic run_phase(int size);
    int     prev_valid_run;
    int     n_loaded;
    do_reset();
    // load the ruleset, one rule per cycle
    for (int n = 0; n < size; n++) begin
      @(negedge clk);
      wr_en = 1'b1; wr_idx = IW'(n); wr_data = random_rule();
      @(posedge clk);
      shadow[n] = wr_data;
    end
    @(negedge clk);
    wr_en = 1'b0;
    n_loaded = size;
    prev_valid_run = 0;
    // stream headers
    for (int p = 0; p < PKTS_PER_PHASE; p++) begin
      @(negedge clk);
      in_valid = ($urandom_range(9) != 0);
      if (in_valid) begin
        case ($urandom_range(5))
          0:       in_hdr = header_t'({$urandom, $urandom, $urandom, $urandom});
          1:       in_hdr = header_for(shadow[$urandom_range(size-1)], 1'b1);
          default: in_hdr = header_for(shadow[$urandom_range(size-1)], 1'b0);
        endcase
        predict(in_hdr);
        prev_valid_run++;
        if (prev_valid_run >= LATENCY) n_b2b++;
      end else begin
        prev_valid_run = 0;
      end
      // occasionally rewrite or delete a rule under traffic; the header
      // issued in this same cycle still sees the old rule
      wr_en = ($urandom_range(15) == 0);
      if (wr_en) begin
        wr_idx  = IW'($urandom_range(size-1));
        wr_data = random_rule();
        if ($urandom_range(2) == 0) wr_data.valid = 1'b0;
        shadow[wr_idx] = wr_data;
        if (in_valid) n_wr_traffic++;
      end
    end
    @(negedge clk);
    in_valid = 1'b0; wr_en = 1'b0;
    repeat (LATENCY + 2) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin
      failures++;
      $display("FAIL %0d results missing after phase %0d", expq.size(), size);
    end
    $display("phase with %0d rules done at cycle %0d", size, cycle);
  endtask

  task automatic require(string what, int count);
    checks++;
    $display("  %-28s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    rst_n = 1'b0; wr_en = 1'b0; wr_idx = '0; wr_data = '0;
    in_valid = 1'b0; in_hdr = '0;
    foreach (shadow[n]) shadow[n] = '0;
    n_prefix = 0; n_wildcard = 0; n_exact = 0; n_range_edge = 0; n_range_out = 0;
    n_miss = 0; n_multi = 0; n_wr_traffic = 0; n_b2b = 0; n_reset = 0; n_hit = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // an empty ruleset matches nothing, whatever the pattern bits hold
    @(negedge clk);
    in_valid = 1'b1; in_hdr = '0; predict(in_hdr);
    @(negedge clk);
    in_valid = 1'b0;
    repeat (LATENCY + 1) @(negedge clk);

    run_phase(32);
    run_phase(64);
    run_phase(128);
    run_phase(256);
    run_phase(512);

    $display("mechanisms:");
    require("hit", n_hit);
    require("prefix match", n_prefix);
    require("wildcard field", n_wildcard);
    require("exact protocol match", n_exact);
    require("range bound hit", n_range_edge);
    require("range bound just missed", n_range_out);
    require("no match", n_miss);
    require("multi-match by priority", n_multi);
    require("rule write under traffic", n_wr_traffic);
    require("back-to-back headers", n_b2b);
    require("reset", n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
