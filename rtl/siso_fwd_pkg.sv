// siso_fwd_pkg - tile program for the forward state-metric recursion of a
// max-log-MAP SISO decoder (8-state trellis of the 3GPP turbo code).
//
// For k = 1..m the recursion computes, from column A[.,k-1] and the inputs
// L[k-1], P[k-1] (LP = L + P):
//   A[0],A[4] = LBut(A[0],A[1], 0 , LP)    A[1],A[5] = LBut(A[2],A[3], L , P)
//   A[2],A[6] = LBut(A[4],A[5], P , L )    A[3],A[7] = LBut(A[6],A[7], LP, 0)
// with LBut(X,Y,H,D) = (max(X+H, Y+D), max(Y+H, X+D)). This butterfly list
// and the mapping idea are the published ones: ALUs 0..3 each evaluate one
// LBut, one max-of-two-sums per cycle in level 1 with levels 2 and 3
// bypassed, so a column takes two cycles; the fifth ALU adds L + P; new
// metrics go to registers for the next column and, in FIFO order, to
// memories 0..7 (memory i holds A[i][.]); L and P are read from memories 8
// and 9. The register allocation and cycle-by-cycle schedule below are this
// design's own:
//   * register sets alternate between columns (set s = k mod 2), so the
//     loop body covers two columns (4 cycles) and runs m/2 times (m even);
//   * ALU j's bank a holds X at entry 2s and Y at 2s+1, bank c the reverse,
//     so the two LBut halves differ only in the read address; bank b holds
//     H and bank d holds D at entry s;
//   * ALUs 0 and 2 produce their first half in the even cycle, ALUs 1 and 3
//     their second half, so no register bank is written twice in a cycle;
//   * L[k], P[k] for the next column are fetched in the even cycle and L+P
//     computed by ALU 4 in the odd cycle.
//
// Memory layout before start: A[i][0] at address 0 of memory i (i = 0..7),
// L[k] and P[k] at address k of memories 8 and 9. After the run A[i][k] is at
// address k mod 256 of memory i (for m = 256 column 256 overwrites column 0).
// Timing: 2 set-up cycles + 2 cycles per column, then the halt word.
// Start the tile with loop count m/2.
package siso_fwd_pkg;
  import fpfa_pkg::*;

  localparam int unsigned PROG_LEN = 7;   // words 0..6
  localparam int unsigned MEM_L    = 8;
  localparam int unsigned MEM_P    = 9;
  localparam int unsigned BUS_L    = 4;
  localparam int unsigned BUS_P    = 5;
  localparam int unsigned BUS_LP   = 6;
  localparam int unsigned RA = 0, RB = 1, RC = 2, RD = 3;  // bank index

  function automatic fn_cfg_t fn(fn_op_e op);
    fn_cfg_t f;
    f = '0;
    f.op = op;
    return f;
  endfunction

  // level-1 only ALU configuration, result on out1 and out2
  function automatic alu_cfg_t l1_cfg(fn_op_e o1, fn_op_e o2, fn_op_e o3);
    alu_cfg_t c;
    c = '0;
    c.f1 = fn(o1);
    c.f2 = fn(o2);
    c.f3 = fn(o3);
    c.l2_en = 1'b0;
    c.mb = MB_ZERO;
    c.out1 = OS_O1L;
    c.out2 = OS_O1L;
    return c;
  endfunction

  // Route A[i] of register set s into the banks of the ALU that reads it.
  function automatic void route_a(ref instr_t w, input int i, input int s, input int bus);
    int t;
    t = i / 2;
    w.rwr[t][RA] = '{we: 1'b1, addr: REG_AW'(2*s + (i % 2)), bus: BUS_AW'(bus)};
    w.rwr[t][RC] = '{we: 1'b1, addr: REG_AW'(2*s + 1 - (i % 2)), bus: BUS_AW'(bus)};
  endfunction

  function automatic void route_w(ref instr_t w, input int alu, input int bank,
                                  input int entry, input int bus);
    w.rwr[alu][bank] = '{we: 1'b1, addr: REG_AW'(entry), bus: BUS_AW'(bus)};
  endfunction

  function automatic void drive(ref instr_t w, input int bus, input int src);
    w.bus[bus] = '{en: 1'b1, src: SRC_AW'(src)};
  endfunction

  // L and P fetched into register set s
  function automatic void fetch_lp(ref instr_t w, input int s, input int bus_l, input int bus_p);
    route_w(w, 4, RA, 0, bus_l);
    route_w(w, 4, RB, 0, bus_p);
    route_w(w, 1, RB, s, bus_l);  // H = L
    route_w(w, 1, RD, s, bus_p);  // D = P
    route_w(w, 2, RB, s, bus_p);  // H = P
    route_w(w, 2, RD, s, bus_l);  // D = L
  endfunction

  // L + P computed by ALU 4 and stored into register set s
  function automatic void add_lp(ref instr_t w, input int s);
    w.alu[4] = l1_cfg(FN_ADD, FN_ZERO, FN_LEFT);
    w.rd_addr[4][RA] = '0;
    w.rd_addr[4][RB] = '0;
    drive(w, BUS_LP, 8);          // ALU 4 out1
    route_w(w, 0, RD, s, BUS_LP); // D = L + P
    route_w(w, 3, RB, s, BUS_LP); // H = L + P
  endfunction

  function automatic instr_t siso_fwd_word(int unsigned idx);
    instr_t w;
    int     s, odd, half, ai;
    w = '0;
    if (idx == 0 || idx == 1) begin
      // set-up: column 0 into register set 0; even A's first, then odd A's
      for (int j = 0; j < 4; j++) begin
        ai = 2*j + int'(idx);
        w.mem[ai].rd_op = PTR_LD_INC;   // read address 0
        w.mem[ai].wr_op = PTR_LD_INC;   // write pointer -> 1
        w.mem[ai].imm   = '0;
        drive(w, j, SRC_MEM0 + ai);
        route_a(w, ai, 0, j);
      end
      if (idx == 0) begin
        w.mem[MEM_L].rd_op = PTR_LD_INC;
        w.mem[MEM_P].rd_op = PTR_LD_INC;
        drive(w, BUS_L, SRC_MEM0 + MEM_L);
        drive(w, BUS_P, SRC_MEM0 + MEM_P);
        fetch_lp(w, 0, BUS_L, BUS_P);
      end else begin
        add_lp(w, 0);
      end
    end else if (idx >= 2 && idx <= 5) begin
      s   = int'(idx - 2) / 2;
      odd = int'(idx - 2) % 2;
      for (int j = 0; j < 4; j++) begin
        // half 0: max(X+H, Y+D) -> A[j];  half 1: max(Y+H, X+D) -> A[j+4]
        half = ((j % 2) == 0) ? odd : 1 - odd;
        ai   = (half == 0) ? j : j + 4;
        w.alu[j] = l1_cfg((j == 0) ? FN_LEFT : FN_ADD, (j == 3) ? FN_LEFT : FN_ADD, FN_MAX);
        w.rd_addr[j][RA] = REG_AW'(2*s + half);
        w.rd_addr[j][RC] = REG_AW'(2*s + half);
        w.rd_addr[j][RB] = REG_AW'(s);
        w.rd_addr[j][RD] = REG_AW'(s);
        drive(w, j, 2*j);             // ALU j out1
        route_a(w, ai, 1 - s, j);
        w.mem[ai].we    = 1'b1;
        w.mem[ai].bus   = BUS_AW'(j);
        w.mem[ai].wr_op = PTR_INC;
      end
      if (odd == 0) begin
        w.mem[MEM_L].rd_op = PTR_INC;
        w.mem[MEM_P].rd_op = PTR_INC;
        drive(w, BUS_L, SRC_MEM0 + MEM_L);
        drive(w, BUS_P, SRC_MEM0 + MEM_P);
        fetch_lp(w, 1 - s, BUS_L, BUS_P);
      end else begin
        add_lp(w, 1 - s);
      end
      if (idx == 5) begin
        w.loop_end = 1'b1;
        w.loop_to  = PC_W'(2);
      end
    end else begin
      w.halt = 1'b1;
    end
    return w;
  endfunction

endpackage
