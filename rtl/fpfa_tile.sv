// fpfa_tile - one FPFA processor tile.
//
// Five identical blocks, each an ALU (fpfa_alu) with a four-register bank
// (fpfa_regbank) on each of its inputs a, b, c, d and two local memories
// (fpfa_mem): memories 2i and 2i+1 belong to block i. The blocks share a
// crossbar (fpfa_crossbar), a control unit with program memory (fpfa_ctrl)
// and a communication and reconfiguration unit (fpfa_comm). This
// organisation, the sizes and the east-west chain between neighbouring ALUs
// are the published tile; the instruction format is this design's own.
//
// One instruction per clock: the ALUs compute combinationally from the
// registers the instruction addresses; the crossbar routes ALU outputs and
// memory read data to register banks and memories, which are written at the
// next rising edge. So an ALU result computed in cycle t can be used as an
// operand in cycle t + 1. ALU i's east input is ALU i+1's west output
// (level-2 result); the last ALU's east input is east_in and the first
// ALU's west output is west_out, for a neighbouring tile.
//
// Host side: see fpfa_comm. Load memories and the program, send a start
// command, wait for done_irq, read results.
module fpfa_tile
  import fpfa_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  cmd_valid,
  output logic  cmd_ready,
  input  cmd_t  cmd,
  output logic  rsp_valid,
  output word_t rsp_data,
  output logic  done_irq,
  output logic  busy,
  input  acc_t  east_in,
  output acc_t  west_out
);

  localparam int unsigned N_SINK = NUM_BANKS + NUM_MEMS;

  instr_t            instr;
  logic              run, done, start, prog_we;
  logic [LOOP_W-1:0] loop_count;
  logic [PC_W-1:0]   prog_addr;
  instr_t            prog_wdata;
  logic [NUM_MEMS-1:0] ext_we;
  logic [MEM_AW-1:0] ext_addr;
  word_t             ext_wdata;

  word_t             opnd     [NUM_ALUS][NUM_IN];
  word_t             alu_out  [NUM_ALUS][NUM_OUT];
  acc_t              west     [NUM_ALUS];
  acc_t              east     [NUM_ALUS];
  word_t             mem_rd   [NUM_MEMS];
  word_t             src      [NUM_SRCS];
  bus_ctl_t          bus_ctl  [NUM_BUSES];
  logic [BUS_AW-1:0] sink_bus [N_SINK];
  word_t             sink     [N_SINK];

  fpfa_ctrl u_ctrl (
    .clk, .rst_n, .start, .loop_count, .prog_we, .prog_addr, .prog_wdata,
    .instr, .run, .busy, .done
  );

  fpfa_comm u_comm (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd, .rsp_valid, .rsp_data, .done_irq,
    .busy, .done, .mem_rdata(mem_rd), .mem_we(ext_we), .mem_addr(ext_addr),
    .mem_wdata(ext_wdata), .prog_we, .prog_addr, .prog_wdata, .start, .loop_count
  );

  // crossbar sources, bus drivers and sink selections from the instruction
  always_comb begin
    for (int i = 0; i < int'(NUM_ALUS); i++)
      for (int o = 0; o < int'(NUM_OUT); o++) src[i*NUM_OUT + o] = alu_out[i][o];
    for (int m = 0; m < int'(NUM_MEMS); m++) src[SRC_MEM0 + m] = mem_rd[m];
    for (int k = 0; k < int'(NUM_BUSES); k++) bus_ctl[k] = instr.bus[k];
    for (int i = 0; i < int'(NUM_ALUS); i++)
      for (int p = 0; p < int'(NUM_IN); p++) sink_bus[i*NUM_IN + p] = instr.rwr[i][p].bus;
    for (int m = 0; m < int'(NUM_MEMS); m++) sink_bus[NUM_BANKS + m] = instr.mem[m].bus;
  end

  fpfa_crossbar #(.N_SINK(N_SINK)) u_xbar (
    .src, .bus_ctl, .sink_bus, .bus(), .sink
  );

  for (genvar i = 0; i < NUM_ALUS; i++) begin : g_blk
    for (genvar p = 0; p < NUM_IN; p++) begin : g_reg
      fpfa_regbank u_rb (
        .clk, .rst_n,
        .we   (run && instr.rwr[i][p].we),
        .waddr(instr.rwr[i][p].addr),
        .wdata(sink[i*NUM_IN + p]),
        .raddr(instr.rd_addr[i][p]),
        .rdata(opnd[i][p])
      );
    end

    for (genvar q = 0; q < MEMS_PER_ALU; q++) begin : g_mem
      localparam int unsigned M = i * MEMS_PER_ALU + q;
      fpfa_mem u_mem (
        .clk, .rst_n, .run,
        .ctl      (instr.mem[M]),
        .wdata    (sink[NUM_BANKS + M]),
        .ext_we   (ext_we[M]),
        .ext_addr (ext_addr),
        .ext_wdata(ext_wdata),
        .rdata    (mem_rd[M])
      );
    end

    if (i == NUM_ALUS - 1) begin : g_east_edge
      assign east[i] = east_in;
    end else begin : g_east_chain
      assign east[i] = west[i+1];
    end

    fpfa_alu u_alu (
      .cfg (instr.alu[i]),
      .a   (opnd[i][0]),
      .b   (opnd[i][1]),
      .c   (opnd[i][2]),
      .d   (opnd[i][3]),
      .east(east[i]),
      .west(west[i]),
      .out1(alu_out[i][0]),
      .out2(alu_out[i][1])
    );
  end

  assign west_out = west[0];

endmodule
