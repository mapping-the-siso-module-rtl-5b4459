// tb_fpfa_ctrl - control unit sequencing.
//
// Loads a program whose words are tagged (memory 0's immediate field holds
// the word number): word 0, a loop body of words 1..3 (loop_end on 3), word
// 4, and a halt at word 5. For several loop counts it checks the exact
// order of issued words, that run is high for each executed word and low on
// the halt word, the busy length, and the one-cycle done pulse. Count 0
// runs the body once, like 1. Also checks that the program memory ignores
// writes while a program runs.
module tb_fpfa_ctrl;
  import fpfa_pkg::*;

  logic              clk = 1'b0, rst_n = 1'b0, start, prog_we, run, busy, done;
  logic [LOOP_W-1:0] loop_count;
  logic [PC_W-1:0]   prog_addr;
  instr_t            prog_wdata, instr;
  int                checks = 0, failures = 0;

  fpfa_ctrl dut (.clk, .rst_n, .start, .loop_count, .prog_we, .prog_addr, .prog_wdata,
                 .instr, .run, .busy, .done);

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

  function automatic instr_t tag_word(int tag);
    instr_t w;
    w = '0;
    w.mem[0].imm = 8'(tag);
    if (tag == 3) begin
      w.loop_end = 1'b1;
      w.loop_to = PC_W'(1);
    end
    if (tag == 5) w.halt = 1'b1;
    return w;
  endfunction

  task automatic write_word(input int adr, input instr_t w);
    @(negedge clk);
    prog_we = 1'b1;
    prog_addr = PC_W'(adr);
    prog_wdata = w;
    @(negedge clk);
    prog_we = 1'b0;
  endtask

  task automatic run_prog(input int cnt);
    int exp_q[$];
    int iters, ncyc, dones;
    iters = (cnt == 0) ? 1 : cnt;
    exp_q.push_back(0);
    for (int i = 0; i < iters; i++) begin
      exp_q.push_back(1); exp_q.push_back(2); exp_q.push_back(3);
    end
    exp_q.push_back(4);
    @(negedge clk);
    start = 1'b1;
    loop_count = LOOP_W'(cnt);
    @(negedge clk);
    start = 1'b0;
    ncyc = 0;
    dones = 0;
    // try to overwrite word 0 while running: must be ignored
    prog_we = 1'b1;
    prog_addr = '0;
    prog_wdata = tag_word(9);
    while (busy) begin
      ncyc++;
      if (!instr.halt) begin
        check(run, "run high while executing");
        check(exp_q.size() > 0 && int'(instr.mem[0].imm) == exp_q[0],
              $sformatf("issued word %0d, expected %0d", instr.mem[0].imm, exp_q.size() > 0 ? exp_q[0] : -1));
        if (exp_q.size() > 0) void'(exp_q.pop_front());
      end else begin
        check(!run, "halt word not executed");
      end
      @(negedge clk);
      prog_we = 1'b0;
      if (done) dones++;
    end
    check(exp_q.size() == 0, "all words issued");
    check(ncyc == 3 * iters + 3, $sformatf("busy %0d cycles, expected %0d", ncyc, 3 * iters + 3));
    check(done && dones == 1, "done pulses once when busy drops");
    @(negedge clk);
    check(!done, "done lasts one cycle");
  endtask

  initial begin
    start = 1'b0; prog_we = 1'b0; prog_addr = '0; prog_wdata = '0; loop_count = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(!busy && !done, "idle after reset");
    for (int i = 0; i < 6; i++) write_word(i, tag_word(i));
    run_prog(1);
    run_prog(4);
    run_prog(0);
    run_prog(17);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
