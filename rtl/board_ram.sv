// board_ram - one game-screen tile map: a 2048 x 8 single-port synchronous RAM.
//
// Each byte is the tile type of one screen tile, at address {tile row, tile
// column} (64 slots per row, the first 40 shown). Two instances form the double
// buffer: the one on display is read by the VGA driver, the other is written by
// the control unit, and the address port is switched between the two users
// outside this module.
//
// Interface: addr, we, din in; dout out. Timing: a write with we = 1 takes
// effect at the rising clk edge; a read returns mem[addr] one cycle after addr
// is presented (read-before-write when both happen at once). The memory starts
// all zero, like FPGA block RAM after configuration.
//
// Follows the original design in size, width and single-port use; the
// power-up contents are this design's choice.
module board_ram
  import tetris_pkg::*;
#(
  parameter int ADDR_W = MAP_ADDR_W
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  input  logic              we,
  input  tile_t             din,
  output tile_t             dout
);

  tile_t mem [2**ADDR_W];

  initial begin
    for (int i = 0; i < 2**ADDR_W; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= din;
    dout <= mem[addr];
  end

endmodule
