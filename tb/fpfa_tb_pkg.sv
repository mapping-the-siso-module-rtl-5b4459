// fpfa_tb_pkg - reference models and small test programs shared by the
// FPFA testbenches.
//
// siso_ref recomputes the forward state metrics of the max-log-MAP SISO
// straight from the butterfly equations, with plain integers and the same
// saturation to +/-(2**19 - 1) the ALU's level 1 applies. dsp_word builds a
// one-cycle program word that uses levels 2 and 3 of the ALU: ALU1 computes
// a product that travels west into ALU0's level-2 adder, and ALU2 forms a
// butterfly (sum and difference) with level 2 bypassed.
package fpfa_tb_pkg;
  import fpfa_pkg::*;

  localparam int SMAX = (1 << 19) - 1;

  function automatic int sat(int v);
    return v > SMAX ? SMAX : (v < -SMAX ? -SMAX : v);
  endfunction

  function automatic int imax(int x, int y);
    return x > y ? x : y;
  endfunction

  function automatic word_t to_sm(int v);
    int m;
    m = v < 0 ? -v : v;
    return {v < 0, m[18:0]};
  endfunction

  function automatic int from_sm(word_t w);
    int m;
    m = int'(w[18:0]);
    return w[19] ? -m : m;
  endfunction

  // level-1 function, written from its definition
  function automatic int fn_ref(fn_cfg_t c, int x, int y);
    int l, r, v;
    l = c.neg_l ? -x : x;
    r = c.neg_r ? -y : y;
    case (c.op)
      FN_LEFT:  v = l;
      FN_RIGHT: v = r;
      FN_ADD:   v = l + r;
      FN_MIN:   v = l < r ? l : r;
      FN_MAX:   v = l > r ? l : r;
      default:  v = 0;
    endcase
    if (c.absv && v < 0) v = -v;
    return sat(v);
  endfunction

  function automatic fn_cfg_t rand_fn();
    fn_cfg_t c;
    c.op    = fn_op_e'($urandom_range(0, 5));
    c.neg_l = 1'($urandom);
    c.neg_r = 1'($urandom);
    c.absv  = 1'($urandom);
    return c;
  endfunction

  // random operand: mostly small, sometimes near the ends of the range
  function automatic int rand_val();
    int v;
    case ($urandom_range(0, 3))
      0:       v = int'($urandom_range(0, SMAX));
      1:       v = SMAX - int'($urandom_range(0, 100));
      default: v = int'($urandom_range(0, 2000));
    endcase
    return $urandom_range(0, 1) ? -v : v;
  endfunction

  // a[k*8 + i] = A[i][k] for k = 0..m; a[0..7] must hold column 0 on entry
  function automatic void siso_ref(ref int a[], input int l[], input int p[], input int m);
    int x[8];
    int lp;
    for (int k = 1; k <= m; k++) begin
      for (int i = 0; i < 8; i++) x[i] = a[(k-1)*8 + i];
      lp = sat(l[k-1] + p[k-1]);
      a[k*8 + 0] = imax(x[0],                 sat(x[1] + lp));
      a[k*8 + 4] = imax(x[1],                 sat(x[0] + lp));
      a[k*8 + 1] = imax(sat(x[2] + l[k-1]),   sat(x[3] + p[k-1]));
      a[k*8 + 5] = imax(sat(x[3] + l[k-1]),   sat(x[2] + p[k-1]));
      a[k*8 + 2] = imax(sat(x[4] + p[k-1]),   sat(x[5] + l[k-1]));
      a[k*8 + 6] = imax(sat(x[5] + p[k-1]),   sat(x[4] + l[k-1]));
      a[k*8 + 3] = imax(sat(x[6] + lp),       x[7]);
      a[k*8 + 7] = imax(sat(x[7] + lp),       x[6]);
    end
  endfunction

  // Word 0 loads registers from memories 0..5 (address 0): ALU1 a,b <- M0,M1;
  // ALU0 a,b <- M2,M3; ALU2 c,d <- M4,M5.
  // Word 1: ALU1 Z2 = a*b (west -> ALU0 east); ALU0 Z2 = a*b + east,
  // out1 = low word, out2 = high word -> M6, M7 at address 1;
  // ALU2: Z1 = c, o1 = d + c, o2 = d - c -> M8, M9 at address 1.
  // Word 2: halt.
  function automatic instr_t dsp_word(int idx);
    instr_t w;
    w = '0;
    if (idx == 0) begin
      for (int k = 0; k < 6; k++) begin
        w.mem[k].rd_op = PTR_LD_INC;
        w.bus[k] = '{en: 1'b1, src: SRC_AW'(SRC_MEM0 + k)};
      end
      w.rwr[1][0] = '{we: 1'b1, addr: 2'd0, bus: 4'd0};
      w.rwr[1][1] = '{we: 1'b1, addr: 2'd0, bus: 4'd1};
      w.rwr[0][0] = '{we: 1'b1, addr: 2'd0, bus: 4'd2};
      w.rwr[0][1] = '{we: 1'b1, addr: 2'd0, bus: 4'd3};
      w.rwr[2][2] = '{we: 1'b1, addr: 2'd0, bus: 4'd4};
      w.rwr[2][3] = '{we: 1'b1, addr: 2'd0, bus: 4'd5};
    end else if (idx == 1) begin
      w.alu[1].l2_en = 1'b1;
      w.alu[1].ml = ML_A;
      w.alu[1].mr = MR_B;
      w.alu[1].me = ME_ZERO;
      w.alu[0].l2_en = 1'b1;
      w.alu[0].ml = ML_A;
      w.alu[0].mr = MR_B;
      w.alu[0].me = ME_EAST;
      w.alu[0].mb = MB_ZERO;
      w.alu[0].out1 = OS_O1L;
      w.alu[0].out2 = OS_O1H;
      w.alu[2].f2.op = FN_LEFT;
      w.alu[2].f3.op = FN_RIGHT;
      w.alu[2].mb = MB_D;
      w.alu[2].out1 = OS_O1L;
      w.alu[2].out2 = OS_O2L;
      w.bus[0] = '{en: 1'b1, src: SRC_AW'(0)};   // ALU0 out1
      w.bus[1] = '{en: 1'b1, src: SRC_AW'(1)};   // ALU0 out2
      w.bus[2] = '{en: 1'b1, src: SRC_AW'(4)};   // ALU2 out1
      w.bus[3] = '{en: 1'b1, src: SRC_AW'(5)};   // ALU2 out2
      for (int k = 6; k < 10; k++) begin
        w.mem[k].we = 1'b1;
        w.mem[k].wr_op = PTR_LD_INC;
        w.mem[k].imm = 8'd1;
        w.mem[k].bus = BUS_AW'(k - 6);
      end
    end else begin
      w.halt = 1'b1;
    end
    return w;
  endfunction

  // Expected results of dsp_word: 38-bit magnitude product sum split into
  // {sign, mag[37:19]} (high) and {sign, mag[18:0]} (low).
  function automatic void dsp_ref(input int m0, m1, m2, m3, m4, m5,
                                  output word_t lo, hi, sum, dif);
    longint v, mag;
    v = longint'(m2) * longint'(m3) + longint'(m0) * longint'(m1);
    mag = v < 0 ? -v : v;
    lo  = {v < 0, mag[18:0]};
    hi  = {v < 0, mag[37:19]};
    sum = to_sm(m5 + m4);
    dif = to_sm(m5 - m4);
  endfunction

endpackage
