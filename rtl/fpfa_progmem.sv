// fpfa_progmem - program memory of an FPFA processor tile.
//
// DEPTH instruction words (fpfa_pkg::instr_t, the full tile configuration
// for one cycle). One write port, used by the communication and
// reconfiguration unit to load a program, written at the rising edge when
// we is high; one combinational read port addressed by the control unit's
// program counter. The original names a program memory next to the control
// unit; its depth (32 words) and ports are this design's choice. The array
// is not reset.
module fpfa_progmem
  import fpfa_pkg::*;
#(
  parameter int unsigned DEPTH = PROG_DEPTH
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  instr_t                   wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output instr_t                   rdata
);

  instr_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
