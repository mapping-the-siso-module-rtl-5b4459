// tb_fpfa_fn - random test of the level-1 function block: every operation,
// with and without operand negation and absolute value, on small operands
// and on operands near the end of the 20-bit sign-magnitude range (where
// the result saturates), against a reference written from the definition.
module tb_fpfa_fn;
  import fpfa_pkg::*;
  import fpfa_tb_pkg::*;

  fn_cfg_t cfg;
  sval_t   left, right, result;
  int      checks = 0, failures = 0, exp_v, x, y;
  int      op_seen[6];
  logic    clk = 1'b0;

  fpfa_fn dut (.cfg, .left, .right, .result);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      cfg   = rand_fn();
      x     = rand_val();
      y     = rand_val();
      left  = sval_t'(x);
      right = sval_t'(y);
      #1;
      exp_v = fn_ref(cfg, x, y);
      op_seen[cfg.op]++;
      checks++;
      if (int'(result) != exp_v) begin
        failures++;
        if (failures < 10)
          $display("FAIL op=%0d nl=%b nr=%b abs=%b %0d,%0d -> %0d, expected %0d",
                   cfg.op, cfg.neg_l, cfg.neg_r, cfg.absv, x, y, int'(result), exp_v);
      end
    end
    for (int i = 0; i < 6; i++) begin
      checks++;
      if (op_seen[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
