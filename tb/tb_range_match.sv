// tb_range_match: self-checking test of the port range matcher.
//
// Part 1 applies the worked example: four 4-bit rules with bounds
// [1001,1100], [0010,0100], [0101,1001], [1100,1010] and the field 1000;
// only the third rule contains it. Part 2 drives a 16-bit, 32-rule instance
// with random bounds (including empty and single-value ranges) and fields
// placed on, next to and between the bounds, against an integer reference.
module tb_range_match;

  int checks   = 0;
  int failures = 0;

  logic [3:0]       f4;
  logic [3:0][3:0]  lo4, hi4;
  logic [3:0]       bv4;

  range_match #(.N(4), .W(4)) dut4 (
    .field_i(f4), .rule_lo_i(lo4), .rule_hi_i(hi4), .bv_o(bv4));

  localparam int N = 32;
  localparam int W = 16;
  logic [W-1:0]        f;
  logic [N-1:0][W-1:0] lo, hi;
  logic [N-1:0]        bv;

  range_match #(.N(N), .W(W)) dut (
    .field_i(f), .rule_lo_i(lo), .rule_hi_i(hi), .bv_o(bv));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int fi, l, h;
    lo4[0] = 4'b1001; hi4[0] = 4'b1100;
    lo4[1] = 4'b0010; hi4[1] = 4'b0100;
    lo4[2] = 4'b0101; hi4[2] = 4'b1001;
    lo4[3] = 4'b1100; hi4[3] = 4'b1010;
    f4 = 4'b1000;
    #1;
    checks++;
    if (bv4 !== 4'b0100) begin
      failures++;
      $display("FAIL example: bv=%b expected 0100 (only rule 3)", bv4);
    end

    for (int t = 0; t < 2000; t++) begin
      for (int n = 0; n < N; n++) begin
        lo[n] = $urandom;
        case ($urandom_range(3))
          0: hi[n] = lo[n];                               // single value
          1: hi[n] = lo[n] + W'($urandom_range(100));     // narrow range
          default: hi[n] = $urandom;                      // anything, maybe empty
        endcase
      end
      case ($urandom_range(4))
        0: f = lo[$urandom_range(N-1)];
        1: f = hi[$urandom_range(N-1)];
        2: f = lo[$urandom_range(N-1)] - 1'b1;
        3: f = hi[$urandom_range(N-1)] + 1'b1;
        default: f = $urandom;
      endcase
      #1;
      for (int n = 0; n < N; n++) begin
        fi = int'(f); l = int'(lo[n]); h = int'(hi[n]);
        checks++;
        if (bv[n] !== ((fi >= l) && (fi <= h))) begin
          failures++;
          if (failures < 10)
            $display("FAIL t=%0d rule=%0d f=%0d lo=%0d hi=%0d bv=%b", t, n, fi, l, h, bv[n]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
