// tb_fpfa_comm - communication and reconfiguration unit on its own, with
// the tile side modelled by the testbench.
//
// Checks the decoding of each command (memory write strobes, program write,
// start pulse and loop count), the read response one cycle after a read
// command with the selected memory's data, that commands are refused while
// the tile is busy and while a start is being handed over, that an
// out-of-range memory number writes nothing, and the done interrupt.
module tb_fpfa_comm;
  import fpfa_pkg::*;

  logic                clk = 1'b0, rst_n = 1'b0;
  logic                cmd_valid, cmd_ready, rsp_valid, done_irq, busy, done;
  cmd_t                cmd;
  word_t               rsp_data, mem_wdata;
  word_t               mem_rdata [NUM_MEMS];
  logic [NUM_MEMS-1:0] mem_we;
  logic [MEM_AW-1:0]   mem_addr;
  logic                prog_we, start;
  logic [PC_W-1:0]     prog_addr;
  instr_t              prog_wdata;
  logic [LOOP_W-1:0]   loop_count;
  int                  checks = 0, failures = 0;

  fpfa_comm dut (.clk, .rst_n, .cmd_valid, .cmd_ready, .cmd, .rsp_valid, .rsp_data, .done_irq,
                 .busy, .done, .mem_rdata, .mem_we, .mem_addr, .mem_wdata, .prog_we,
                 .prog_addr, .prog_wdata, .start, .loop_count);

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

  cmd_t c;

  initial begin
    cmd_valid = 1'b0; cmd = '0; busy = 1'b0; done = 1'b0;
    for (int m = 0; m < int'(NUM_MEMS); m++) mem_rdata[m] = 20'($urandom);
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // memory writes: one strobe, at the selected memory, with address and data
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      c = '0;
      c.op = CMD_WR_MEM;
      c.sel = 4'($urandom_range(0, 15));
      c.addr = 8'($urandom);
      c.wdata = 20'($urandom);
      cmd = c;
      cmd_valid = 1'b1;
      #1;
      check(cmd_ready, "ready while idle");
      check(mem_we == ((c.sel < NUM_MEMS) ? NUM_MEMS'(1) << c.sel : '0),
            $sformatf("write strobes %b for memory %0d", mem_we, c.sel));
      check(mem_addr == c.addr && mem_wdata == c.wdata && !prog_we, "write address and data");
    end

    // reads: answer one cycle later with the selected memory's data
    for (int n = 0; n < 50; n++) begin
      @(negedge clk);
      c = '0;
      c.op = CMD_RD_MEM;
      c.sel = 4'($urandom_range(0, NUM_MEMS - 1));
      cmd = c;
      cmd_valid = 1'b1;
      #1 check(mem_we == '0, "no write on a read");
      @(negedge clk);
      cmd_valid = 1'b0;
      check(rsp_valid && rsp_data == mem_rdata[c.sel], "read response");
    end
    @(negedge clk);
    check(!rsp_valid, "response lasts one cycle");

    // program write
    c = '0;
    c.op = CMD_WR_PROG;
    c.addr = 8'd13;
    c.instr = {$urandom, $urandom, $urandom, $urandom};
    cmd = c;
    cmd_valid = 1'b1;
    #1 check(prog_we && prog_addr == 13 && prog_wdata == c.instr && mem_we == '0, "program write");

    // start: pulse with the loop count, ready drops until the tile is busy
    @(negedge clk);
    c = '0;
    c.op = CMD_START;
    c.wdata = 20'd128;
    cmd = c;
    @(negedge clk);
    cmd_valid = 1'b0;
    check(start && loop_count == 128, "start pulse with loop count");
    check(!cmd_ready, "not ready while the start is handed over");
    busy = 1'b1;
    @(negedge clk);
    check(!start, "start lasts one cycle");
    c = '0;
    c.op = CMD_WR_MEM;
    cmd = c;
    cmd_valid = 1'b1;
    repeat (5) begin
      #1 check(!cmd_ready && mem_we == '0, "commands refused while busy");
      @(negedge clk);
    end
    busy = 1'b0;
    done = 1'b1;
    #1 check(cmd_ready, "ready again when idle");
    @(negedge clk);
    done = 1'b0;
    cmd_valid = 1'b0;
    check(done_irq, "done interrupt follows done");
    @(negedge clk);
    check(!done_irq, "done interrupt lasts one cycle");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
