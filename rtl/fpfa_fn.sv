// fpfa_fn - level-1 function block of the FPFA ALU (f1, f2 and f3).
//
// Returns one of: 0, [abs][neg] left, [abs][neg] right,
// [abs](+/min/max)([neg] left, [neg] right), as selected by cfg. This list of
// functions is the published one. Operands and result are two's complement
// values within +/-(2**19 - 1), the range of a 20-bit sign-magnitude word;
// the block computes in 21 bits and saturates its result back into that
// range (the saturation is this design's choice: the original only states
// the functions). Purely combinational.
module fpfa_fn
  import fpfa_pkg::*;
(
  input  fn_cfg_t cfg,
  input  sval_t   left,
  input  sval_t   right,
  output sval_t   result
);

  logic signed [WORD_W:0] l, r, v;

  always_comb begin
    l = cfg.neg_l ? -{left[WORD_W-1], left}   : {left[WORD_W-1], left};
    r = cfg.neg_r ? -{right[WORD_W-1], right} : {right[WORD_W-1], right};
    unique case (cfg.op)
      FN_LEFT:  v = l;
      FN_RIGHT: v = r;
      FN_ADD:   v = l + r;
      FN_MIN:   v = (l < r) ? l : r;
      FN_MAX:   v = (l > r) ? l : r;
      default:  v = '0;
    endcase
    if (cfg.absv && v < 0) v = -v;
    result = sat_w(v);
  end

endmodule
