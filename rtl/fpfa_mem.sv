// fpfa_mem - one local memory of an FPFA block, with its address generator.
//
// 256 words of 20 bits (the published size). While the tile runs a program
// (run = 1) the memory is addressed by two pointers, one for reading and one
// for writing, moved by the current instruction: hold, post-increment,
// post-decrement, or load an immediate address (access at imm, then
// pointer = imm + 1 or imm - 1). Writing with increment and later reading with
// decrement gives the FIFO store / last-in-first-out read-back order that
// the SISO forward and backward recursions need. The pointer scheme is this
// design's realisation of the "memory addressing function" the mapping
// assumes. While the tile is idle (run = 0) the communication unit reads and
// writes the memory directly at ext_addr.
//
// Timing: reads are combinational (the word at the read address is on rdata
// in the same cycle and can be written into a register at the next edge);
// writes and pointer updates take effect at the rising edge. Pointers reset
// to 0 (synchronous, active low); the array itself is not reset.
module fpfa_mem
  import fpfa_pkg::*;
#(
  parameter int unsigned DEPTH = MEM_DEPTH
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     run,
  input  mem_ctl_t                 ctl,
  input  word_t                    wdata,
  input  logic                     ext_we,
  input  logic [$clog2(DEPTH)-1:0] ext_addr,
  input  word_t                    ext_wdata,
  output word_t                    rdata
);

  localparam int unsigned AW = $clog2(DEPTH);

  word_t          mem [DEPTH];
  logic [AW-1:0]  rd_ptr, wr_ptr, rd_addr, wr_addr, imm;

  assign imm     = AW'(ctl.imm);
  assign rd_addr = (ctl.rd_op inside {PTR_LD_INC, PTR_LD_DEC}) ? imm : rd_ptr;
  assign wr_addr = (ctl.wr_op inside {PTR_LD_INC, PTR_LD_DEC}) ? imm : wr_ptr;

  function automatic logic [AW-1:0] next_ptr(ptr_op_e op, logic [AW-1:0] addr);
    unique case (op)
      PTR_INC, PTR_LD_INC: return addr + 1'b1;
      PTR_DEC, PTR_LD_DEC: return addr - 1'b1;
      default:             return addr;
    endcase
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
    end else if (run) begin
      rd_ptr <= next_ptr(ctl.rd_op, rd_addr);
      wr_ptr <= next_ptr(ctl.wr_op, wr_addr);
    end
  end

  always_ff @(posedge clk) begin
    if (run) begin
      if (ctl.we) mem[wr_addr] <= wdata;
    end else if (ext_we) begin
      mem[ext_addr] <= ext_wdata;
    end
  end

  assign rdata = mem[run ? rd_addr : ext_addr];

endmodule
