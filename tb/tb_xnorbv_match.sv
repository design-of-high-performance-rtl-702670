// tb_xnorbv_match: self-checking test of the XnorBV ternary field matcher.
//
// Part 1 applies the worked example of the method: four 4-bit rules 1010,
// 1*01, 0010, *001 and the field 1101, for which only the second rule
// matches (expected vector, rule 1 at the top: 0,1,0,0). Part 2 drives a
// 32-bit, 16-rule instance with random rules, random wildcard masks and
// fields that are often built to match, and compares every vector bit with
// a character-by-character reference written in the testbench.
module tb_xnorbv_match;

  int checks   = 0;
  int failures = 0;

  // ---- part 1: 4-bit example
  logic [3:0]       f4;
  logic [3:0][3:0]  v4, c4;
  logic [3:0]       bv4;

  xnorbv_match #(.N(4), .K(4)) dut4 (
    .field_i(f4), .rule_value_i(v4), .rule_care_i(c4), .bv_o(bv4));

  // ---- part 2: random, IP-sized
  localparam int N = 16;
  localparam int K = 32;
  logic [K-1:0]        f;
  logic [N-1:0][K-1:0] v, c;
  logic [N-1:0]        bv;

  xnorbv_match #(.N(N), .K(K)) dut (
    .field_i(f), .rule_value_i(v), .rule_care_i(c), .bv_o(bv));

  // Reference: rule n matches when no cared-for bit differs.
  function automatic logic ref_match(logic [K-1:0] fld, logic [K-1:0] val,
                                     logic [K-1:0] care);
    for (int b = 0; b < K; b++) begin
      if (care[b] && (fld[b] != val[b])) return 1'b0;
    end
    return 1'b1;
  endfunction

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // rule 1 (highest priority) is index 0
    v4[0] = 4'b1010; c4[0] = 4'b1111;
    v4[1] = 4'b1001; c4[1] = 4'b1011;   // 1*01
    v4[2] = 4'b0010; c4[2] = 4'b1111;
    v4[3] = 4'b0001; c4[3] = 4'b0111;   // *001
    f4 = 4'b1101;
    #1;
    checks++;
    if (bv4 !== 4'b0010) begin
      failures++;
      $display("FAIL example: bv=%b expected 0010 (only rule 2)", bv4);
    end
    // same rules, field 0001 matches *001 only
    f4 = 4'b0001;
    #1;
    checks++;
    if (bv4 !== 4'b1000) begin
      failures++;
      $display("FAIL example 2: bv=%b expected 1000", bv4);
    end

    for (int t = 0; t < 2000; t++) begin
      f = $urandom;
      for (int n = 0; n < N; n++) begin
        case ($urandom_range(3))
          0: c[n] = '1;                                  // exact
          1: c[n] = ~(K'('1) >> $urandom_range(K));      // prefix
          2: c[n] = $urandom;                            // arbitrary mask
          default: c[n] = '0;                            // full wildcard
        endcase
        v[n] = $urandom;
        if ($urandom_range(1)) v[n] = (f & c[n]) | (v[n] & ~c[n]);
        if ($urandom_range(7) == 0) v[n][$urandom_range(K-1)] ^= 1'b1;
      end
      #1;
      for (int n = 0; n < N; n++) begin
        checks++;
        if (bv[n] !== ref_match(f, v[n], c[n])) begin
          failures++;
          if (failures < 10)
            $display("FAIL t=%0d rule=%0d f=%h v=%h c=%h bv=%b", t, n, f, v[n], c[n], bv[n]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
