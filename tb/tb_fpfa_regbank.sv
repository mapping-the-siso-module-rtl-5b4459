// tb_fpfa_regbank - random writes and reads of a four-register bank against
// an array model: reset clears all registers, a write lands at the next
// rising edge, and a read of the register being written returns the old
// value in that cycle.
module tb_fpfa_regbank;
  import fpfa_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0, we;
  logic [1:0] waddr, raddr;
  word_t      wdata, rdata;
  word_t      model [4];
  int         checks = 0, failures = 0, same_addr = 0;

  fpfa_regbank dut (.clk, .rst_n, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    we = 1'b0; waddr = '0; wdata = '0; raddr = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 4; i++) begin
      model[i] = '0;
      raddr = 2'(i);
      #1 check(rdata == '0, "register cleared by reset");
    end
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      we    = 1'($urandom);
      waddr = 2'($urandom);
      wdata = 20'($urandom);
      raddr = 2'($urandom);
      #1 check(rdata == model[raddr], $sformatf("read r%0d = %h, expected %h", raddr, rdata, model[raddr]));
      if (we && waddr == raddr) same_addr++;
      @(posedge clk);
      if (we) model[waddr] = wdata;
    end
    check(same_addr > 0, "read and write of one register in one cycle occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
