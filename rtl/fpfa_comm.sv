// fpfa_comm - communication and reconfiguration unit of an FPFA tile.
//
// The host side is a valid/ready command port and a response port. Commands
// (fpfa_pkg::cmd_t): write a word into one of the ten local memories, read a
// word back (answered on rsp_valid/rsp_data one cycle after acceptance),
// write an instruction into the program memory (reconfiguration), and start
// the program with a loop count. Commands are accepted only while the tile
// is idle (cmd_ready = 0 while a program runs and in the cycle a start is
// being handed to the control unit); done_irq pulses when the program ends.
//
// The original only names this unit; the command set and handshake are
// this design's choices. A command is accepted when cmd_valid and cmd_ready
// are both high at a rising edge; memory and program writes happen at that
// edge.
module fpfa_comm
  import fpfa_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // host
  input  logic              cmd_valid,
  output logic              cmd_ready,
  input  cmd_t              cmd,
  output logic              rsp_valid,
  output word_t             rsp_data,
  output logic              done_irq,
  // tile
  input  logic              busy,
  input  logic              done,
  input  word_t             mem_rdata [NUM_MEMS],
  output logic [NUM_MEMS-1:0] mem_we,
  output logic [MEM_AW-1:0] mem_addr,
  output word_t             mem_wdata,
  output logic              prog_we,
  output logic [PC_W-1:0]   prog_addr,
  output instr_t            prog_wdata,
  output logic              start,
  output logic [LOOP_W-1:0] loop_count
);

  logic accept;
  logic sel_ok;

  assign cmd_ready = !busy && !start;
  assign accept    = cmd_valid && cmd_ready;
  assign sel_ok    = int'(cmd.sel) < int'(NUM_MEMS);

  assign mem_addr   = cmd.addr;
  assign mem_wdata  = cmd.wdata;
  assign prog_addr  = PC_W'(cmd.addr);
  assign prog_wdata = cmd.instr;
  assign prog_we    = accept && cmd.op == CMD_WR_PROG;

  always_comb begin
    mem_we = '0;
    if (accept && cmd.op == CMD_WR_MEM && sel_ok) mem_we[cmd.sel] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rsp_valid  <= 1'b0;
      rsp_data   <= '0;
      start      <= 1'b0;
      loop_count <= '0;
      done_irq   <= 1'b0;
    end else begin
      rsp_valid <= accept && cmd.op == CMD_RD_MEM;
      if (accept && cmd.op == CMD_RD_MEM) rsp_data <= sel_ok ? mem_rdata[cmd.sel] : '0;
      start <= accept && cmd.op == CMD_START;
      if (accept && cmd.op == CMD_START) loop_count <= LOOP_W'(cmd.wdata);
      done_irq <= done;
    end
  end

  // A host must hold a command until it is accepted.
  a_cmd_held: assert property (@(posedge clk) disable iff (!rst_n)
                               cmd_valid && !cmd_ready |=> cmd_valid);

endmodule
