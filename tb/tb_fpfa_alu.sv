// tb_fpfa_alu - random test of the three-level ALU.
//
// Random configurations of every multiplexer of levels 2 and 3 and of the
// level-1 functions, random operands and east input. The reference follows
// the datapath equations with 64-bit integers: Z1 = f3(f1(a,b), f2(c,d)),
// Z2 = X*Y +/- E (or Z1 when level 2 is bypassed), o1 = B + Z2,
// o2 = B - Z2, and each output word is the sign plus 19 bits of the
// saturated 38-bit magnitude. Also checks west = Z2 and counts that each
// selection (bypass, east input, cd operand, high/low words) occurred.
module tb_fpfa_alu;
  import fpfa_pkg::*;
  import fpfa_tb_pkg::*;

  alu_cfg_t cfg;
  word_t    a, b, c, d, out1, out2;
  acc_t     east, west;
  int       checks = 0, failures = 0;
  int       seen_bypass = 0, seen_east = 0, seen_cd = 0, seen_high = 0, seen_sub = 0;
  logic     clk = 1'b0;

  fpfa_alu dut (.cfg, .a, .b, .c, .d, .east, .west, .out1, .out2);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam longint M38 = (64'sd1 <<< 38) - 1;

  function automatic longint wrap40(longint v);
    logic [39:0] t;
    t = v[39:0];
    return longint'($signed(t));
  endfunction

  function automatic word_t word_of(longint v, int sel);
    longint mag, ms;
    logic   sg;
    sg  = v < 0;
    mag = v < 0 ? -v : v;
    ms  = mag > M38 ? M38 : mag;
    return (sel == 0) ? {sg, ms[37:19]} : {sg, ms[18:0]};
  endfunction

  function automatic word_t pick(osel_e s, longint o1, longint o2);
    case (s)
      OS_O1H:  return word_of(o1, 0);
      OS_O1L:  return word_of(o1, 1);
      OS_O2H:  return word_of(o2, 0);
      default: return word_of(o2, 1);
    endcase
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  longint z1, xv, yv, prod, e, z2, bv, o1, o2;
  int     r1, r2;
  word_t  xw, yw;

  initial begin
    for (int n = 0; n < 20000; n++) begin
      cfg      = '0;
      cfg.f1   = rand_fn();
      cfg.f2   = rand_fn();
      cfg.f3   = rand_fn();
      cfg.l2_en = 1'($urandom);
      cfg.ml   = mul_l_e'($urandom_range(0, 3));
      cfg.mr   = mul_r_e'($urandom_range(0, 4));
      cfg.me   = me_e'($urandom_range(0, 3));
      cfg.sub  = 1'($urandom);
      cfg.mb   = mb_e'($urandom_range(0, 3));
      cfg.out1 = osel_e'($urandom_range(0, 3));
      cfg.out2 = osel_e'($urandom_range(0, 3));
      a = to_sm(rand_val());
      b = to_sm(rand_val());
      c = to_sm(rand_val());
      d = to_sm(rand_val());
      east = acc_t'({$urandom, $urandom});
      #1;
      r1 = fn_ref(cfg.f1, from_sm(a), from_sm(b));
      r2 = fn_ref(cfg.f2, from_sm(c), from_sm(d));
      z1 = longint'(fn_ref(cfg.f3, r1, r2));
      case (cfg.ml)
        ML_A: xw = a;
        ML_C: xw = c;
        ML_D: xw = d;
        default: xw = b;
      endcase
      case (cfg.mr)
        MR_C: yw = c;
        MR_A: yw = a;
        MR_B: yw = b;
        MR_D: yw = d;
        default: yw = to_sm(int'(z1));
      endcase
      prod = longint'(xw[18:0]) * longint'(yw[18:0]);
      if (xw[19] ^ yw[19]) prod = -prod;
      case (cfg.me)
        ME_ZERO: e = 0;
        ME_C:    e = from_sm(c);
        ME_D:    e = from_sm(d);
        default: e = longint'(east);
      endcase
      z2 = cfg.l2_en ? wrap40(cfg.sub ? prod - e : prod + e) : z1;
      case (cfg.mb)
        MB_ZERO: bv = 0;
        MB_C:    bv = from_sm(c);
        MB_D:    bv = from_sm(d);
        default: begin
          bv = (longint'(c[18:0]) <<< 19) + longint'(d[18:0]);
          if (c[19]) bv = -bv;
        end
      endcase
      o1 = wrap40(bv + z2);
      o2 = wrap40(bv - z2);
      check(longint'(west) == z2, $sformatf("west %0d, expected %0d", west, z2));
      check(out1 == pick(cfg.out1, o1, o2), $sformatf("out1 %h, expected %h (n=%0d)", out1, pick(cfg.out1, o1, o2), n));
      check(out2 == pick(cfg.out2, o1, o2), $sformatf("out2 %h, expected %h", out2, pick(cfg.out2, o1, o2)));
      if (!cfg.l2_en) seen_bypass++;
      if (cfg.l2_en && cfg.me == ME_EAST) seen_east++;
      if (cfg.l2_en && cfg.sub) seen_sub++;
      if (cfg.mb == MB_CD) seen_cd++;
      if (cfg.out1 == OS_O1H || cfg.out1 == OS_O2H) seen_high++;
    end
    check(seen_bypass > 0 && seen_east > 0 && seen_sub > 0 && seen_cd > 0 && seen_high > 0,
          "every datapath selection exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
