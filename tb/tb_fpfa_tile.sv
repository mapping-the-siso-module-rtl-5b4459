// tb_fpfa_tile - end-to-end test of one FPFA processor tile.
//
// Through the host command port it loads the SISO forward-recursion program,
// column 0 of the state metrics and the L / P input vectors (random), starts
// the tile with loop count m/2, for block lengths 2, 40 and 24. It checks
// the run length (2 set-up cycles + 2 cycles per column + the halt word),
// that commands are refused while the tile runs, and every stored metric
// A[i][k] against a reference model.
// It then loads and runs a short program that uses the multiplier, the
// east-west chain and the level-3 butterfly and checks those results.
module tb_fpfa_tile;
  import fpfa_pkg::*;
  import siso_fwd_pkg::*;
  import fpfa_tb_pkg::*;

  localparam int M = 24;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  cmd_valid, cmd_ready, rsp_valid, done_irq, busy;
  cmd_t  cmd;
  word_t rsp_data;
  acc_t  west_out;
  int    checks = 0, failures = 0, cycles = 0, busy_cycles = 0;

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles <= cycles + 1;
    if (busy) busy_cycles <= busy_cycles + 1;
  end

  fpfa_tile dut (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd, .rsp_valid, .rsp_data,
    .done_irq, .busy, .east_in(acc_t'(0)), .west_out
  );

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Drive at the falling edge, so the tile samples stable values.
  task automatic send(input cmd_t c);
    @(negedge clk);
    cmd       = c;
    cmd_valid = 1'b1;
    while (!cmd_ready) @(negedge clk);
    @(posedge clk);
    #1 cmd_valid = 1'b0;
  endtask

  task automatic wr_mem(input int sel, input int addr, input int v);
    cmd_t c;
    c = '0;
    c.op = CMD_WR_MEM;
    c.sel = 4'(sel);
    c.addr = 8'(addr);
    c.wdata = to_sm(v);
    send(c);
  endtask

  task automatic rd_mem(input int sel, input int addr, output word_t v);
    cmd_t c;
    c = '0;
    c.op = CMD_RD_MEM;
    c.sel = 4'(sel);
    c.addr = 8'(addr);
    send(c);
    check(rsp_valid, "read response one cycle after the command");
    v = rsp_data;
  endtask

  task automatic wr_prog(input int addr, input instr_t w);
    cmd_t c;
    c = '0;
    c.op = CMD_WR_PROG;
    c.addr = 8'(addr);
    c.instr = w;
    send(c);
  endtask

  task automatic run(input int count, output int ncyc);
    cmd_t c;
    int   b0;
    c = '0;
    c.op = CMD_START;
    c.wdata = 20'(count);
    send(c);
    b0 = busy_cycles;
    // the port must refuse commands while the program runs
    repeat (2) @(negedge clk);
    check(busy && !cmd_ready, "cmd_ready low while busy");
    while (!done_irq) @(negedge clk);
    ncyc = busy_cycles - b0;
  endtask

  int    a[], l[], p[];
  word_t w, lo, hi, sm, df;
  int    ncyc, m, d[6];

  initial begin
    cmd_valid = 1'b0;
    cmd = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // ---- SISO forward recursion: the smallest block, the smallest 3GPP
    //      block length (40) and a mid-size block
    for (int sz = 0; sz < 3; sz++) begin
      m = (sz == 0) ? 2 : (sz == 1) ? 40 : M;
      a = new[(m + 1) * 8];
      l = new[m];
      p = new[m];
      for (int i = 0; i < 8; i++) a[i] = int'($urandom_range(0, 2000)) - 1000;
      for (int k = 0; k < m; k++) begin
        l[k] = int'($urandom_range(0, 600)) - 300;
        p[k] = int'($urandom_range(0, 600)) - 300;
      end
      siso_ref(a, l, p, m);
      for (int i = 0; i < int'(PROG_LEN); i++) wr_prog(i, siso_fwd_word(i));
      for (int i = 0; i < 8; i++) wr_mem(i, 0, a[i]);
      for (int k = 0; k < m; k++) begin
        wr_mem(MEM_L, k, l[k]);
        wr_mem(MEM_P, k, p[k]);
      end
      run(m / 2, ncyc);
      check(ncyc == 2 * m + 3, $sformatf("SISO m=%0d took %0d busy cycles, expected %0d", m, ncyc, 2 * m + 3));
      for (int k = 1; k <= m; k++)
        for (int i = 0; i < 8; i++) begin
          rd_mem(i, k, w);
          check(w == to_sm(a[k*8 + i]),
                $sformatf("m=%0d A[%0d][%0d] = %0d, expected %0d", m, i, k, from_sm(w), a[k*8 + i]));
        end
    end

    // ---- multiplier, east-west chain, butterfly
    for (int i = 0; i < 3; i++) wr_prog(i, dsp_word(i));
    d[0] = 300000; d[1] = -250000; d[2] = 123456; d[3] = 77777;
    d[4] = int'($urandom_range(0, 100000)) - 50000;
    d[5] = int'($urandom_range(0, 100000)) - 50000;
    for (int k = 0; k < 6; k++) wr_mem(k, 0, d[k]);
    run(0, ncyc);
    check(ncyc == 3, "DSP program length");
    dsp_ref(d[0], d[1], d[2], d[3], d[4], d[5], lo, hi, sm, df);
    rd_mem(6, 1, w); check(w == lo, $sformatf("MAC low word %h, expected %h", w, lo));
    rd_mem(7, 1, w); check(w == hi, $sformatf("MAC high word %h, expected %h", w, hi));
    rd_mem(8, 1, w); check(w == sm, $sformatf("butterfly sum %h, expected %h", w, sm));
    rd_mem(9, 1, w); check(w == df, $sformatf("butterfly difference %h, expected %h", w, df));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
