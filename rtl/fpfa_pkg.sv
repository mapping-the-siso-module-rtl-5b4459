// fpfa_pkg - shared sizes, number formats and configuration types of the FPFA
// (Field Programmable Function Array) processor tile.
//
// A tile has five identical blocks. Each block holds one ALU with four
// inputs (a, b, c, d) and two outputs (out1, out2), a register bank of four
// 20-bit registers in front of every ALU input, and two 256 x 20-bit local
// memories. A crossbar lets any ALU output or memory output be written into
// any register or memory of the tile. These numbers follow the published
// tile; the bus count of the crossbar, the field encodings and the program
// memory depth are this design's own choices.
//
// Number formats: words on the crossbar, in registers and in memories are
// 20-bit sign-magnitude (bit 19 = sign, bits 18:0 = magnitude). Inside the
// ALU the adders work in two's complement and the multiplier on magnitudes.
//
// A tile is programmed with one instruction (instr_t) per clock cycle. An
// instruction is the complete configuration of the tile for that cycle: the
// function of each ALU, the read address of each register bank, which source
// drives each crossbar bus, which bus each register bank and memory writes
// from, and how each memory's address pointers move.
package fpfa_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned WORD_W    = 20;  // ALU in/out, register and memory word
  localparam int unsigned MAG_W     = WORD_W - 1;  // magnitude bits of a word
  localparam int unsigned ACC_W     = 40;  // level-2 / level-3 datapath
  localparam int unsigned NUM_ALUS  = 5;   // blocks (ALUs) per tile
  localparam int unsigned NUM_IN    = 4;   // ALU inputs a, b, c, d
  localparam int unsigned NUM_OUT   = 2;   // ALU outputs out1, out2
  localparam int unsigned MEMS_PER_ALU = 2;
  localparam int unsigned NUM_MEMS  = NUM_ALUS * MEMS_PER_ALU;
  localparam int unsigned MEM_DEPTH = 256;
  localparam int unsigned MEM_AW    = $clog2(MEM_DEPTH);
  localparam int unsigned REG_DEPTH = 4;   // registers per bank
  localparam int unsigned REG_AW    = $clog2(REG_DEPTH);
  localparam int unsigned NUM_BANKS = NUM_ALUS * NUM_IN;
  localparam int unsigned NUM_BUSES = 10;  // horizontal crossbar lines
  localparam int unsigned BUS_AW    = $clog2(NUM_BUSES);
  // Crossbar sources: ALU outputs first (alu*2 + out index), then memories.
  localparam int unsigned NUM_SRCS  = NUM_ALUS * NUM_OUT + NUM_MEMS;
  localparam int unsigned SRC_AW    = $clog2(NUM_SRCS);
  localparam int unsigned SRC_MEM0  = NUM_ALUS * NUM_OUT;
  localparam int unsigned PROG_DEPTH = 32; // program memory words
  localparam int unsigned PC_W      = $clog2(PROG_DEPTH);
  localparam int unsigned LOOP_W    = 16;  // loop counter

  typedef logic [WORD_W-1:0] word_t;         // sign-magnitude word
  typedef logic signed [WORD_W-1:0] sval_t;  // two's complement, |v| < 2**MAG_W
  typedef logic signed [ACC_W-1:0] acc_t;    // 40-bit two's complement

  localparam sval_t SVAL_MAX = sval_t'((1 << MAG_W) - 1);
  localparam sval_t SVAL_MIN = -SVAL_MAX;

  // ------------------------------------------------- level-1 function block
  typedef enum logic [2:0] {
    FN_ZERO  = 3'd0,  // 0
    FN_LEFT  = 3'd1,  // [abs][neg] left
    FN_RIGHT = 3'd2,  // [abs][neg] right
    FN_ADD   = 3'd3,  // [abs] ([neg] left + [neg] right)
    FN_MIN   = 3'd4,  // [abs] min([neg] left, [neg] right)
    FN_MAX   = 3'd5   // [abs] max([neg] left, [neg] right)
  } fn_op_e;

  typedef struct packed {
    fn_op_e op;
    logic   neg_l;  // negate the left operand first
    logic   neg_r;  // negate the right operand first
    logic   absv;   // absolute value of the result
  } fn_cfg_t;

  // ------------------------------------------------------ level 2 and 3
  typedef enum logic [1:0] {ML_A, ML_C, ML_D, ML_B} mul_l_e;        // left multiplier input
  typedef enum logic [2:0] {MR_C, MR_A, MR_B, MR_D, MR_Z1} mul_r_e; // mY
  typedef enum logic [1:0] {ME_ZERO, ME_C, ME_D, ME_EAST} me_e;     // mE
  typedef enum logic [1:0] {MB_ZERO, MB_C, MB_D, MB_CD} mb_e;       // mB
  typedef enum logic [1:0] {OS_O1H, OS_O1L, OS_O2H, OS_O2L} osel_e; // mO1 / mO2

  typedef struct packed {
    fn_cfg_t f1;      // f1(a, b)
    fn_cfg_t f2;      // f2(c, d)
    fn_cfg_t f3;      // f3(f1, f2) = Z1
    logic    l2_en;   // mZ: 1 = multiply-add result, 0 = bypass level 2 (Z2 = Z1)
    mul_l_e  ml;
    mul_r_e  mr;
    me_e     me;
    logic    sub;     // level-2 adder: product - E instead of product + E
    mb_e     mb;      // level-3 operand: o1 = B + Z2, o2 = B - Z2
    osel_e   out1;
    osel_e   out2;
  } alu_cfg_t;

  // ------------------------------------------------------- tile control
  typedef enum logic [2:0] {
    PTR_HOLD   = 3'd0,  // access at ptr, ptr unchanged
    PTR_INC    = 3'd1,  // access at ptr, then ptr + 1
    PTR_DEC    = 3'd2,  // access at ptr, then ptr - 1
    PTR_LD_INC = 3'd3,  // access at imm, then ptr = imm + 1
    PTR_LD_DEC = 3'd4   // access at imm, then ptr = imm - 1
  } ptr_op_e;

  typedef struct packed {
    logic                  we;
    logic [BUS_AW-1:0]     bus;
    ptr_op_e               rd_op;
    ptr_op_e               wr_op;
    logic [MEM_AW-1:0]     imm;
  } mem_ctl_t;

  typedef struct packed {
    logic              we;
    logic [REG_AW-1:0] addr;
    logic [BUS_AW-1:0] bus;
  } reg_wr_t;

  typedef struct packed {
    logic              en;   // 0: the bus carries 0
    logic [SRC_AW-1:0] src;
  } bus_ctl_t;

  typedef struct packed {
    logic                                     halt;      // end of program (not executed)
    logic                                     loop_end;  // last word of the loop body
    logic [PC_W-1:0]                          loop_to;   // first word of the loop body
    alu_cfg_t [NUM_ALUS-1:0]                  alu;
    logic [NUM_ALUS-1:0][NUM_IN-1:0][REG_AW-1:0] rd_addr;
    reg_wr_t  [NUM_ALUS-1:0][NUM_IN-1:0]      rwr;
    mem_ctl_t [NUM_MEMS-1:0]                  mem;
    bus_ctl_t [NUM_BUSES-1:0]                 bus;
  } instr_t;

  // --------------------------------------------- host (communication) port
  typedef enum logic [1:0] {
    CMD_WR_MEM  = 2'd0,  // write wdata to memory sel at addr
    CMD_RD_MEM  = 2'd1,  // read memory sel at addr, answer on rsp
    CMD_WR_PROG = 2'd2,  // write instr to program memory at addr
    CMD_START   = 2'd3   // run the program from word 0, loop count = wdata
  } cmd_op_e;

  typedef struct packed {
    cmd_op_e           op;
    logic [3:0]        sel;
    logic [MEM_AW-1:0] addr;
    word_t             wdata;
    instr_t            instr;
  } cmd_t;

  // ------------------------------------------------------------ helpers
  function automatic sval_t sm_to_s(word_t w);
    sval_t m;
    m = sval_t'({1'b0, w[MAG_W-1:0]});
    return w[WORD_W-1] ? -m : m;
  endfunction

  function automatic word_t s_to_sm(sval_t v);
    logic [MAG_W-1:0] m;
    m = (v < 0) ? MAG_W'(-v) : MAG_W'(v);
    return {v < 0, m};
  endfunction

  // Clamp a 21-bit intermediate to the range a sign-magnitude word can hold.
  localparam logic signed [WORD_W:0] WIDE_MAX = (1 << MAG_W) - 1;
  function automatic sval_t sat_w(logic signed [WORD_W:0] v);
    if (v > WIDE_MAX) return SVAL_MAX;
    if (v < -WIDE_MAX) return SVAL_MIN;
    return sval_t'(v);
  endfunction

endpackage
