// fpfa_regbank - one register bank in front of an FPFA ALU input.
//
// Four 20-bit registers (the published size). One write port, fed from the
// crossbar, written at the rising clock edge when we is high; one read port
// whose address comes from the current instruction and whose data goes
// straight (combinationally) to the ALU input. Reading and writing the same
// register in one cycle returns the old value, so a register can be read
// and refilled in the same cycle. Synchronous active-low reset clears all
// registers (reset behaviour is this design's choice).
module fpfa_regbank
  import fpfa_pkg::*;
#(
  parameter int unsigned DEPTH = REG_DEPTH
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  word_t                    wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output word_t                    rdata
);

  word_t regs [DEPTH];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(DEPTH); i++) regs[i] <= '0;
    end else if (we) begin
      regs[waddr] <= wdata;
    end
  end

  assign rdata = regs[raddr];

endmodule
