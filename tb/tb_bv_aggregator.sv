// tb_bv_aggregator: self-checking test of the bit-vector aggregator.
//
// Drives five random 64-bit vectors (biased towards ones, so that both
// outcomes are common) and checks each result bit against a per-bit
// reference that looks for any zero among the five inputs.
module tb_bv_aggregator;

  localparam int N = 64;
  localparam int M = 5;

  int checks   = 0;
  int failures = 0;

  logic [M-1:0][N-1:0] bv_in;
  logic [N-1:0]        bv_out;

  bv_aggregator #(.N(N), .M(M)) dut (.bv_i(bv_in), .bv_o(bv_out));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    for (int t = 0; t < 3000; t++) begin
      for (int m = 0; m < M; m++)
        for (int n = 0; n < N; n++)
          bv_in[m][n] = ($urandom_range(15) != 0);
      #1;
      for (int n = 0; n < N; n++) begin
        exp = 1'b1;
        for (int m = 0; m < M; m++) if (bv_in[m][n] == 1'b0) exp = 1'b0;
        checks++;
        if (bv_out[n] !== exp) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d bit=%0d got %b", t, n, bv_out[n]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
