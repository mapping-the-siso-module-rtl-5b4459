// tb_fpfa_mem - local memory and address generator.
//
// 1. Host access while idle: random writes, then read back every address.
// 2. FIFO store / LIFO read-back as the SISO recursions use it: 40 words
//    written with post-increment from a loaded address, read back with
//    post-decrement in reverse order, then the write pointer is taken past
//    address 255 to check that it wraps to 0.
// 3. Random pointer operations and writes in run mode against a model of
//    the two pointers and the array.
module tb_fpfa_mem;
  import fpfa_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0, run, ext_we;
  mem_ctl_t   ctl;
  word_t      wdata, ext_wdata, rdata;
  logic [7:0] ext_addr;
  word_t      model [256];
  logic [7:0] rp, wp, ra, wa;
  int         checks = 0, failures = 0;

  fpfa_mem dut (.clk, .rst_n, .run, .ctl, .wdata, .ext_we, .ext_addr, .ext_wdata, .rdata);

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

  function automatic logic [7:0] nxt(ptr_op_e op, logic [7:0] adr);
    case (op)
      PTR_INC, PTR_LD_INC: return adr + 8'd1;
      PTR_DEC, PTR_LD_DEC: return adr - 8'd1;
      default:           return adr;
    endcase
  endfunction

  // one run-mode cycle: set controls at the falling edge, check the read
  // data, update the model at the rising edge
  task automatic step(input ptr_op_e rop, input ptr_op_e wop, input logic [7:0] imm,
                      input logic we, input word_t wd);
    @(negedge clk);
    run = 1'b1;
    ctl = '0;
    ctl.rd_op = rop;
    ctl.wr_op = wop;
    ctl.imm = imm;
    ctl.we = we;
    wdata = wd;
    ra = (rop inside {PTR_LD_INC, PTR_LD_DEC}) ? imm : rp;
    wa = (wop inside {PTR_LD_INC, PTR_LD_DEC}) ? imm : wp;
    #1 check(rdata == model[ra], $sformatf("run read @%0d = %h, expected %h", ra, rdata, model[ra]));
    @(posedge clk);
    if (we) model[wa] = wd;
    rp = nxt(rop, ra);
    wp = nxt(wop, wa);
  endtask

  initial begin
    run = 1'b0; ext_we = 1'b0; ext_addr = '0; ext_wdata = '0; ctl = '0; wdata = '0;
    rp = '0; wp = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // 1. host access
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      ext_we = 1'b1;
      ext_addr = 8'(i);
      ext_wdata = 20'($urandom);
      model[i] = ext_wdata;
    end
    @(negedge clk);
    ext_we = 1'b0;
    for (int i = 0; i < 256; i++) begin
      ext_addr = 8'(255 - i);
      #1 check(rdata == model[255 - i], "host read-back");
    end

    // 2. FIFO store, LIFO read-back, wrap
    step(PTR_HOLD, PTR_LD_INC, 8'd100, 1'b1, 20'h0AAAA);
    for (int i = 1; i < 40; i++) step(PTR_HOLD, PTR_INC, 8'd0, 1'b1, 20'(i * 7 + 3));
    step(PTR_LD_DEC, PTR_HOLD, 8'd139, 1'b0, '0);       // last word stored
    check(rdata == 20'(39 * 7 + 3), "first read-back is the last word stored");
    for (int i = 38; i >= 1; i--) begin
      @(negedge clk);
      run = 1'b1;
      ctl = '0;
      ctl.rd_op = PTR_DEC;
      #1 check(rdata == 20'(i * 7 + 3), $sformatf("LIFO read-back of word %0d", i));
      @(posedge clk);
      rp = rp - 8'd1;
    end
    step(PTR_HOLD, PTR_LD_INC, 8'd254, 1'b1, 20'h11111);
    step(PTR_HOLD, PTR_INC, 8'd0, 1'b1, 20'h22222);      // address 255
    step(PTR_HOLD, PTR_INC, 8'd0, 1'b1, 20'h33333);      // wraps to 0
    step(PTR_LD_INC, PTR_HOLD, 8'd0, 1'b0, '0);
    check(rdata == 20'h33333, "write pointer wraps from 255 to 0");

    // 3. random run-mode operations
    for (int n = 0; n < 4000; n++)
      step(ptr_op_e'($urandom_range(0, 4)), ptr_op_e'($urandom_range(0, 4)), 8'($urandom),
           1'($urandom), 20'($urandom));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
