// fpfa - Field Programmable Function Array: NUM_TILES processor tiles.
//
// The published array is a 5 x 5 matrix of tiles (NUM_TILES = 25), each an
// independent fpfa_tile running its own program, so several processes run
// side by side. How tiles communicate with each other and with the outside
// is not specified, so every tile's host command port, response port and
// east/west chain ends are brought out as arrays indexed by tile number
// for an external network to connect.
module fpfa
  import fpfa_pkg::*;
#(
  parameter int unsigned NUM_TILES = 25
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  cmd_valid [NUM_TILES],
  output logic  cmd_ready [NUM_TILES],
  input  cmd_t  cmd       [NUM_TILES],
  output logic  rsp_valid [NUM_TILES],
  output word_t rsp_data  [NUM_TILES],
  output logic  done_irq  [NUM_TILES],
  output logic  busy      [NUM_TILES],
  input  acc_t  east_in   [NUM_TILES],
  output acc_t  west_out  [NUM_TILES]
);

  for (genvar t = 0; t < NUM_TILES; t++) begin : g_tile
    fpfa_tile u_tile (
      .clk, .rst_n,
      .cmd_valid(cmd_valid[t]),
      .cmd_ready(cmd_ready[t]),
      .cmd      (cmd[t]),
      .rsp_valid(rsp_valid[t]),
      .rsp_data (rsp_data[t]),
      .done_irq (done_irq[t]),
      .busy     (busy[t]),
      .east_in  (east_in[t]),
      .west_out (west_out[t])
    );
  end

endmodule
