// fpfa_ctrl - control unit of an FPFA processor tile, with its program
// memory (fpfa_progmem).
//
// The program memory holds PROG_DEPTH instructions; each is the complete
// configuration of the tile for one clock cycle (see fpfa_pkg::instr_t).
// A start pulse loads the loop counter and begins execution at word 0. Every
// cycle the word at the program counter is issued on instr with run = 1.
// A word marked loop_end jumps back to loop_to while the loop counter is
// above 1 (decrementing it), so a loop body runs loop_count times (0 counts
// as 1). A word marked halt is not executed: run stays 0 in that cycle,
// busy drops and done pulses for one cycle. The program memory can be
// written only while the tile is idle.
//
// The original names the control unit and the program memory without
// describing them; this sequencer with a single counted loop is this
// design's choice, the simplest that runs the published SISO mapping.
module fpfa_ctrl
  import fpfa_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [LOOP_W-1:0] loop_count,
  input  logic              prog_we,
  input  logic [PC_W-1:0]   prog_addr,
  input  instr_t            prog_wdata,
  output instr_t            instr,
  output logic              run,
  output logic              busy,
  output logic              done
);

  logic [PC_W-1:0]   pc;
  logic [LOOP_W-1:0] cnt;

  fpfa_progmem u_prog (
    .clk,
    .we   (prog_we && !busy),
    .waddr(prog_addr),
    .wdata(prog_wdata),
    .raddr(pc),
    .rdata(instr)
  );
  assign run   = busy && !instr.halt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      pc   <= '0;
      cnt  <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          pc   <= '0;
          cnt  <= loop_count;
        end
      end else if (instr.halt) begin
        busy <= 1'b0;
        done <= 1'b1;
        pc   <= '0;
      end else if (instr.loop_end && cnt > 1) begin
        pc  <= instr.loop_to;
        cnt <= cnt - 1'b1;
      end else begin
        pc <= pc + 1'b1;
      end
    end
  end

endmodule
