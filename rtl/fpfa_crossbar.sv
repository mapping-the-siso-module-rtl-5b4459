// fpfa_crossbar - the crossbar switch of an FPFA processor tile.
//
// NUM_BUSES horizontal buses run across the tile. Each bus is driven by one
// source chosen by the current instruction (any ALU output out1/out2 or any
// memory read port), or carries 0 when disabled. Each sink (every register
// bank's write port and every memory's write port) picks one bus. A value
// can thus reach any register or memory of the tile, and one bus may feed
// several sinks in the same cycle. The published tile says only that an
// ALU can write back to any register or memory through the crossbar; the
// bus count (ten, as drawn for five blocks) and this two-stage source/bus
// selection are this design's choices. Purely combinational.
module fpfa_crossbar
  import fpfa_pkg::*;
#(
  parameter int unsigned N_SINK = NUM_BANKS + NUM_MEMS
) (
  input  word_t             src      [NUM_SRCS],
  input  bus_ctl_t          bus_ctl  [NUM_BUSES],
  input  logic [BUS_AW-1:0] sink_bus [N_SINK],
  output word_t             bus      [NUM_BUSES],
  output word_t             sink     [N_SINK]
);

  always_comb begin
    for (int i = 0; i < int'(NUM_BUSES); i++) begin
      bus[i] = '0;
      if (bus_ctl[i].en && int'(bus_ctl[i].src) < int'(NUM_SRCS)) bus[i] = src[bus_ctl[i].src];
    end
    for (int k = 0; k < int'(N_SINK); k++) begin
      sink[k] = '0;
      if (int'(sink_bus[k]) < int'(NUM_BUSES)) sink[k] = bus[sink_bus[k]];
    end
  end

endmodule
