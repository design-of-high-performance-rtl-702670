// tb_priority_encoder: self-checking test of the priority encoder.
//
// Runs the full 512-input encoder and a 5-input one (a size that is not a
// power of two) with empty, one-hot, sparse and dense vectors, and checks
// the hit flag and that the index is that of the lowest set bit, found by a
// linear scan in the testbench.
module tb_priority_encoder;

  localparam int N  = 512;
  localparam int IW = 9;

  int checks   = 0;
  int failures = 0;

  logic [N-1:0]  v;
  logic [IW-1:0] idx;
  logic          hit;

  priority_encoder #(.N(N)) dut (.vec_i(v), .idx_o(idx), .hit_o(hit));

  logic [4:0] v5;
  logic [2:0] idx5;
  logic       hit5;

  priority_encoder #(.N(5)) dut5 (.vec_i(v5), .idx_o(idx5), .hit_o(hit5));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_big();
    int first;
    first = -1;
    for (int i = N - 1; i >= 0; i--) if (v[i]) first = i;
    checks++;
    if (hit !== (first >= 0) || (first >= 0 && int'(idx) != first) ||
        (first < 0 && idx != 0)) begin
      failures++;
      if (failures < 10) $display("FAIL N=512 first=%0d hit=%b idx=%0d", first, hit, idx);
    end
  endtask

  initial begin
    int first;
    v = '0; #1; check_big();
    for (int i = 0; i < N; i++) begin
      v = '0; v[i] = 1'b1; #1; check_big();
    end
    v = '1; #1; check_big();
    for (int t = 0; t < 3000; t++) begin
      v = '0;
      repeat ($urandom_range(6)) v[$urandom_range(N-1)] = 1'b1;
      if ($urandom_range(9) == 0) for (int w = 0; w < N / 32; w++) v[w*32 +: 32] = $urandom;
      #1; check_big();
    end
    for (int p = 0; p < 32; p++) begin
      v5 = 5'(p);
      #1;
      first = -1;
      for (int i = 4; i >= 0; i--) if (v5[i]) first = i;
      checks++;
      if (hit5 !== (first >= 0) || (first >= 0 && int'(idx5) != first)) begin
        failures++;
        $display("FAIL N=5 v=%b hit=%b idx=%0d", v5, hit5, idx5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
