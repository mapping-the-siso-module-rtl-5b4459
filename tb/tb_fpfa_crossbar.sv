// tb_fpfa_crossbar - random bus and sink selections against a model: each
// bus carries its selected source (0 when disabled or the source number is
// out of range) and each sink receives its selected bus.
module tb_fpfa_crossbar;
  import fpfa_pkg::*;

  localparam int unsigned N_SINK = NUM_BANKS + NUM_MEMS;

  word_t             src      [NUM_SRCS];
  bus_ctl_t          bus_ctl  [NUM_BUSES];
  logic [BUS_AW-1:0] sink_bus [N_SINK];
  word_t             bus      [NUM_BUSES];
  word_t             sink     [N_SINK];
  word_t             exp_bus  [NUM_BUSES];
  int                checks = 0, failures = 0;
  logic              clk = 1'b0;

  fpfa_crossbar #(.N_SINK(N_SINK)) dut (.src, .bus_ctl, .sink_bus, .bus, .sink);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      for (int i = 0; i < int'(NUM_SRCS); i++) src[i] = 20'($urandom);
      for (int k = 0; k < int'(NUM_BUSES); k++) begin
        bus_ctl[k].en  = ($urandom_range(0, 7) != 0);
        bus_ctl[k].src = SRC_AW'($urandom_range(0, 31));
        exp_bus[k] = (bus_ctl[k].en && bus_ctl[k].src < NUM_SRCS) ? src[bus_ctl[k].src] : '0;
      end
      for (int s = 0; s < int'(N_SINK); s++) sink_bus[s] = BUS_AW'($urandom_range(0, NUM_BUSES - 1));
      #1;
      for (int k = 0; k < int'(NUM_BUSES); k++) begin
        checks++;
        if (bus[k] != exp_bus[k]) failures++;
      end
      for (int s = 0; s < int'(N_SINK); s++) begin
        checks++;
        if (sink[s] != exp_bus[sink_bus[s]]) begin
          failures++;
          if (failures < 10) $display("FAIL sink %0d got %h expected %h", s, sink[s], exp_bus[sink_bus[s]]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
