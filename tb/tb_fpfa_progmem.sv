// tb_fpfa_progmem - writes random instruction words to every address of the
// program memory, then reads them back in a random order, and checks that
// a word is readable in the cycle after its write while a word with we low
// is not stored.
module tb_fpfa_progmem;
  import fpfa_pkg::*;

  logic            clk = 1'b0, we;
  logic [PC_W-1:0] waddr, raddr;
  instr_t          wdata, rdata;
  instr_t          model [PROG_DEPTH];
  int              checks = 0, failures = 0;

  fpfa_progmem dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic instr_t rand_word();
    instr_t w;
    for (int i = 0; i < $bits(instr_t); i += 32) w = {w, $urandom};
    return w;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    we = 1'b0; waddr = '0; raddr = '0; wdata = '0;
    for (int i = 0; i < int'(PROG_DEPTH); i++) begin
      @(negedge clk);
      we = 1'b1;
      waddr = PC_W'(i);
      wdata = rand_word();
      model[i] = wdata;
    end
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      we = 1'($urandom);
      waddr = PC_W'($urandom);
      wdata = rand_word();
      raddr = PC_W'($urandom);
      #1 check(rdata == model[raddr], $sformatf("word %0d", raddr));
      @(posedge clk);
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
