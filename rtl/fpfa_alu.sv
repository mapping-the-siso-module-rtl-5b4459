// fpfa_alu - the three-level reconfigurable ALU of an FPFA block.
//
// Level 1: Z1 = f3(f1(a, b), f2(c, d)); each f is an fpfa_fn (0, pass,
//          add, min, max with optional negation and absolute value).
// Level 2: a 19 x 19-bit unsigned multiplier on the operand magnitudes (the
//          sign is the XOR of the operand signs) followed by a 40-bit adder:
//          Z2 = X * Y +/- E, X from {a, c, d, b}, Y from {c, a, b, d, Z1},
//          E from {0, c, d, east}; c and d are sign extended. When l2_en is
//          0 level 2 is bypassed and Z2 = Z1. Z2 also leaves on west, to the
//          neighbouring ALU's east input.
// Level 3: butterfly o1 = B + Z2, o2 = B - Z2 with B from {0, c, d, cd}.
// out1 and out2 each select the high or low word of o1 or o2.
//
// The levels, multiplexer inputs and widths follow the published datapath.
// Choices of this design where it is silent: level-1 results saturate to the
// 20-bit sign-magnitude range; the level-2 and level-3 adders wrap in 40-bit
// two's complement; a 40-bit value is split into words as sign-magnitude,
// high word = {sign, magnitude[37:19]}, low word = {sign, magnitude[18:0]}
// (magnitude saturated to 38 bits), and "cd" is the reverse: sign of c,
// magnitude {c[18:0], d[18:0]}. A value that fits a word is therefore
// returned exactly by the low word. Purely combinational: results are
// written back through the crossbar at the next clock edge.
module fpfa_alu
  import fpfa_pkg::*;
(
  input  alu_cfg_t cfg,
  input  word_t    a,
  input  word_t    b,
  input  word_t    c,
  input  word_t    d,
  input  acc_t     east,
  output acc_t     west,
  output word_t    out1,
  output word_t    out2
);

  localparam int unsigned PM_W = 2 * MAG_W;  // product / double-word magnitude

  sval_t sa, sb, sc, sd, r1, r2, z1;

  assign sa = sm_to_s(a);
  assign sb = sm_to_s(b);
  assign sc = sm_to_s(c);
  assign sd = sm_to_s(d);

  fpfa_fn u_f1 (.cfg(cfg.f1), .left(sa), .right(sb), .result(r1));
  fpfa_fn u_f2 (.cfg(cfg.f2), .left(sc), .right(sd), .result(r2));
  fpfa_fn u_f3 (.cfg(cfg.f3), .left(r1), .right(r2), .result(z1));

  // sign-magnitude word -> 40-bit two's complement
  function automatic acc_t se(word_t w);
    acc_t m;
    m = acc_t'({1'b0, w[MAG_W-1:0]});
    return w[WORD_W-1] ? -m : m;
  endfunction

  // 40-bit value -> high / low sign-magnitude word
  function automatic word_t split(acc_t v, logic high);
    logic [ACC_W-1:0] m;
    logic [PM_W-1:0]  ms;
    m  = (v < 0) ? ACC_W'(-v) : ACC_W'(v);
    ms = (m > ACC_W'({PM_W{1'b1}})) ? {PM_W{1'b1}} : m[PM_W-1:0];
    return high ? {v < 0, ms[PM_W-1:MAG_W]} : {v < 0, ms[MAG_W-1:0]};
  endfunction

  word_t            xw, yw, z1w;
  logic [PM_W-1:0]  pmag;
  acc_t             prod, e, sum, z2, bop, o1, o2, cd;

  always_comb begin
    z1w = s_to_sm(z1);
    unique case (cfg.ml)
      ML_A:    xw = a;
      ML_C:    xw = c;
      ML_D:    xw = d;
      default: xw = b;
    endcase
    unique case (cfg.mr)
      MR_C:    yw = c;
      MR_A:    yw = a;
      MR_B:    yw = b;
      MR_D:    yw = d;
      default: yw = z1w;
    endcase
    pmag = PM_W'(xw[MAG_W-1:0]) * PM_W'(yw[MAG_W-1:0]);
    prod = (xw[WORD_W-1] ^ yw[WORD_W-1]) ? -acc_t'({1'b0, pmag}) : acc_t'({1'b0, pmag});
    unique case (cfg.me)
      ME_ZERO: e = '0;
      ME_C:    e = se(c);
      ME_D:    e = se(d);
      default: e = east;
    endcase
    sum = cfg.sub ? prod - e : prod + e;
    z2  = cfg.l2_en ? sum : acc_t'(z1);

    cd = acc_t'({1'b0, c[MAG_W-1:0], d[MAG_W-1:0]});
    if (c[WORD_W-1]) cd = -cd;
    unique case (cfg.mb)
      MB_ZERO: bop = '0;
      MB_C:    bop = se(c);
      MB_D:    bop = se(d);
      default: bop = cd;
    endcase
    o1 = bop + z2;
    o2 = bop - z2;

    unique case (cfg.out1)
      OS_O1H:  out1 = split(o1, 1'b1);
      OS_O1L:  out1 = split(o1, 1'b0);
      OS_O2H:  out1 = split(o2, 1'b1);
      default: out1 = split(o2, 1'b0);
    endcase
    unique case (cfg.out2)
      OS_O1H:  out2 = split(o1, 1'b1);
      OS_O1L:  out2 = split(o1, 1'b0);
      OS_O2H:  out2 = split(o2, 1'b1);
      default: out2 = split(o2, 1'b0);
    endcase
  end

  assign west = z2;

endmodule
