// tb_fpfa - end-to-end test of the full FPFA (25 tiles, default sizes).
//
// Every tile gets the SISO forward-recursion program, its own random
// column 0 and L / P vectors for the largest block the memories hold
// (m = 256), and all tiles run at the same time. The test checks each
// tile's run length (2 + 2m cycles plus the halt word) and all 8 x 256
// stored state metrics against the reference model; because m = 256 the
// last column wraps to address 0 of each memory. The last tile gets inputs
// large enough for the metrics to saturate. Then tile 0 runs a program that
// uses the multiplier, the east-west chain and the butterfly.
//
// Each mechanism must occur at least once, else it counts as a failure:
// loop back-jumps, memory write-pointer wrap, commands refused while busy,
// all tiles running in parallel, level-1 saturation, level-2 bypass,
// multiply with east input, level-3 butterfly.
module tb_fpfa;
  import fpfa_pkg::*;
  import siso_fwd_pkg::*;
  import fpfa_tb_pkg::*;

  localparam int T = 25;
  localparam int M = 256;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  cmd_valid [T];
  logic  cmd_ready [T];
  cmd_t  cmd       [T];
  logic  rsp_valid [T];
  word_t rsp_data  [T];
  logic  done_irq  [T];
  logic  busy      [T];
  acc_t  east_in   [T];
  acc_t  west_out  [T];

  int checks = 0, failures = 0;
  int busy_cyc [T];
  int n_loop_back = 0, n_wrap = 0, n_refused = 0, n_parallel = 0, n_sat = 0;
  int n_bypass = 0, n_mac_east = 0, n_butterfly = 0;

  fpfa dut (.clk, .rst_n, .cmd_valid, .cmd_ready, .cmd, .rsp_valid, .rsp_data,
            .done_irq, .busy, .east_in, .west_out);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    int nb;
    nb = 0;
    for (int t = 0; t < T; t++) if (busy[t]) begin
      busy_cyc[t] <= busy_cyc[t] + 1;
      nb++;
    end
    if (nb == T) n_parallel <= n_parallel + 1;
    if (dut.g_tile[0].u_tile.u_ctrl.run && dut.g_tile[0].u_tile.u_ctrl.instr.loop_end &&
        dut.g_tile[0].u_tile.u_ctrl.cnt > 1) n_loop_back <= n_loop_back + 1;
    if (dut.g_tile[0].u_tile.u_ctrl.run && !dut.g_tile[0].u_tile.u_ctrl.instr.alu[0].l2_en)
      n_bypass <= n_bypass + 1;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic send(input int t, input cmd_t c);
    @(negedge clk);
    cmd[t]       = c;
    cmd_valid[t] = 1'b1;
    for (int n = 0; !cmd_ready[t]; n++) begin
      if (n == 4 * M) begin
        check(1'b0, $sformatf("tile %0d never ready", t));
        break;
      end
      @(negedge clk);
    end
    @(posedge clk);
    #1 cmd_valid[t] = 1'b0;
  endtask

  task automatic wr_mem(input int t, input int sel, input int addr, input int v);
    cmd_t c;
    c = '0;
    c.op = CMD_WR_MEM;
    c.sel = 4'(sel);
    c.addr = 8'(addr);
    c.wdata = to_sm(v);
    send(t, c);
  endtask

  task automatic rd_mem(input int t, input int sel, input int addr, output word_t v);
    cmd_t c;
    c = '0;
    c.op = CMD_RD_MEM;
    c.sel = 4'(sel);
    c.addr = 8'(addr);
    send(t, c);
    check(rsp_valid[t], "read response");
    v = rsp_data[t];
  endtask

  task automatic wr_prog(input int t, input int addr, input instr_t w);
    cmd_t c;
    c = '0;
    c.op = CMD_WR_PROG;
    c.addr = 8'(addr);
    c.instr = w;
    send(t, c);
  endtask

  task automatic start(input int t, input int count);
    cmd_t c;
    c = '0;
    c.op = CMD_START;
    c.wdata = 20'(count);
    send(t, c);
  endtask

  int    a [T][];
  int    l [], p [];
  word_t w, lo, hi, sm, df;
  int    d [6];
  int    b0 [T];
  bit    all_done;
  cmd_t  c;

  initial begin
    for (int t = 0; t < T; t++) begin
      cmd_valid[t] = 1'b0;
      cmd[t] = '0;
      east_in[t] = '0;
      busy_cyc[t] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;

    // ---- load every tile
    l = new[M];
    p = new[M];
    for (int t = 0; t < T; t++) begin
      a[t] = new[(M + 1) * 8];
      for (int i = 0; i < 8; i++)
        a[t][i] = (t == T - 1) ? SMAX - int'($urandom_range(0, 5000))
                               : int'($urandom_range(0, 2000)) - 1000;
      for (int k = 0; k < M; k++) begin
        l[k] = (t == T - 1) ? int'($urandom_range(0, 200000)) : int'($urandom_range(0, 600)) - 300;
        p[k] = (t == T - 1) ? int'($urandom_range(0, 200000)) : int'($urandom_range(0, 600)) - 300;
      end
      siso_ref(a[t], l, p, M);
      for (int i = 0; i < int'(PROG_LEN); i++) wr_prog(t, i, siso_fwd_word(i));
      for (int i = 0; i < 8; i++) wr_mem(t, i, 0, a[t][i]);
      for (int k = 0; k < M; k++) begin
        wr_mem(t, MEM_L, k, l[k]);
        wr_mem(t, MEM_P, k, p[k]);
      end
    end
    for (int k = 1; k <= M; k++)
      for (int i = 0; i < 8; i++) if (a[T-1][k*8 + i] == SMAX) n_sat++;

    // ---- run all tiles
    for (int t = 0; t < T; t++) begin
      b0[t] = busy_cyc[t];
      start(t, M / 2);
    end
    // a command sent to a running tile must wait until the program ends
    repeat (2) @(negedge clk);
    c = '0;
    c.op = CMD_RD_MEM;
    cmd[0] = c;
    cmd_valid[0] = 1'b1;
    #1 if (!cmd_ready[0] && busy[0]) n_refused++;
    for (int n = 0; !cmd_ready[0] && n < 4 * M; n++) @(negedge clk);
    check(!busy[0], "held command accepted only once the tile is idle");
    @(posedge clk);
    #1 cmd_valid[0] = 1'b0;
    check(rsp_valid[0] && rsp_data[0] == to_sm(a[0][M*8]), "held read answered (column 256 at address 0)");
    for (int n = 0; n < 4 * M; n++) begin
      @(negedge clk);
      all_done = 1'b1;
      for (int t = 0; t < T; t++) if (busy[t]) all_done = 1'b0;
      if (all_done) break;
    end
    check(all_done, "all tiles finished");
    repeat (2) @(negedge clk);
    for (int t = 0; t < T; t++)
      check(busy_cyc[t] - b0[t] == 2 * M + 3,
            $sformatf("tile %0d ran %0d cycles, expected %0d", t, busy_cyc[t] - b0[t], 2 * M + 3));

    // ---- results (column k at address k mod 256)
    for (int t = 0; t < T; t++)
      for (int k = 1; k <= M; k++)
        for (int i = 0; i < 8; i++) begin
          rd_mem(t, i, k % 256, w);
          check(w == to_sm(a[t][k*8 + i]),
                $sformatf("tile %0d A[%0d][%0d] = %0d, expected %0d", t, i, k, from_sm(w), a[t][k*8 + i]));
          if (k == 256 && w == to_sm(a[t][k*8 + i]) && w != to_sm(a[t][i])) n_wrap++;
        end

    // ---- multiplier, east-west chain, butterfly on tile 0
    for (int i = 0; i < 3; i++) wr_prog(0, i, dsp_word(i));
    d[0] = -412345; d[1] = 398765; d[2] = 5; d[3] = -7;
    d[4] = int'($urandom_range(0, 100000)) - 50000;
    d[5] = int'($urandom_range(0, 100000)) - 50000;
    for (int k = 0; k < 6; k++) wr_mem(0, k, 0, d[k]);
    start(0, 0);
    repeat (2) @(negedge clk);
    for (int n = 0; busy[0] && n < 100; n++) @(negedge clk);
    dsp_ref(d[0], d[1], d[2], d[3], d[4], d[5], lo, hi, sm, df);
    rd_mem(0, 6, 1, w);
    if (w == lo) n_mac_east++;
    check(w == lo, "multiply-add low word");
    rd_mem(0, 7, 1, w);
    check(w == hi, "multiply-add high word");
    rd_mem(0, 8, 1, w);
    check(w == sm, "butterfly sum");
    rd_mem(0, 9, 1, w);
    if (w == df) n_butterfly++;
    check(w == df, "butterfly difference");

    $display("mechanisms: loop back-jumps %0d, pointer wraps %0d, refused commands %0d, cycles with all tiles busy %0d, saturated metrics %0d, bypassed level-2 cycles %0d, multiply-add with east input %0d, butterflies %0d",
             n_loop_back, n_wrap, n_refused, n_parallel, n_sat, n_bypass, n_mac_east, n_butterfly);
    check(n_loop_back == M / 2 - 1, "loop back-jumps");
    check(n_wrap > 0, "memory write pointer wrapped");
    check(n_refused > 0, "command refused while busy");
    check(n_parallel > 0, "all tiles running together");
    check(n_sat > 0, "saturation");
    check(n_bypass > 0, "level-2 bypass");
    check(n_mac_east > 0, "multiply-add with east input");
    check(n_butterfly > 0, "butterfly");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
