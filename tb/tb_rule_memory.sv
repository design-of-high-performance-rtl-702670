// tb_rule_memory: self-checking test of the ruleset store.
//
// Uses 64 entries. Checks that reset empties the ruleset, that a write
// appears on the parallel outputs after the clock edge and not before, that
// other entries keep their contents, that writing valid = 0 deletes a rule,
// and that a second reset empties the ruleset again. A shadow copy in the
// testbench is the reference.
module tb_rule_memory;
  import pc_pkg::*;

  localparam int N  = 64;
  localparam int IW = 6;

  int checks   = 0;
  int failures = 0;

  logic          clk = 1'b0;
  logic          rst_n;
  logic          wr_en;
  logic [IW-1:0] wr_idx;
  rule_t         wr_rule;
  rule_t [N-1:0] rules;
  rule_t [N-1:0] shadow;

  always #5 clk = ~clk;

  rule_memory #(.N(N)) dut (
    .clk_i(clk), .rst_ni(rst_n), .wr_en_i(wr_en), .wr_idx_i(wr_idx),
    .wr_rule_i(wr_rule), .rules_o(rules));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic rule_t random_rule();
    rule_t r;
    r = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    return r;
  endfunction

  task automatic compare_all(string what);
    for (int n = 0; n < N; n++) begin
      checks++;
      if (rules[n].valid !== shadow[n].valid ||
          (shadow[n].valid && rules[n] !== shadow[n])) begin
        failures++;
        if (failures < 10) $display("FAIL %s entry %0d", what, n);
      end
    end
  endtask

  initial begin
    rst_n = 1'b0; wr_en = 1'b0; wr_idx = '0; wr_rule = '0;
    shadow = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    compare_all("after reset");

    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      wr_en   = ($urandom_range(3) != 0);
      wr_idx  = IW'($urandom_range(N-1));
      wr_rule = random_rule();
      wr_rule.valid = ($urandom_range(4) != 0);
      #1;
      // nothing changes before the edge
      checks++;
      if (rules[wr_idx].valid !== shadow[wr_idx].valid) begin
        failures++;
        $display("FAIL write visible before the clock edge");
      end
      @(posedge clk);
      if (wr_en) shadow[wr_idx] = wr_rule;
      #1;
      compare_all("after write");
    end

    @(negedge clk);
    wr_en = 1'b0;
    rst_n = 1'b0;
    #1;
    shadow = '0;
    compare_all("after second reset");
    rst_n = 1'b1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
