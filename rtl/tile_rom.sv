// tile_rom - pixel store for the 64 tiles: a 16384 x 8 synchronous ROM.
//
// Address {tile[5:0], pixel row[3:0], pixel column[3:0]}: each tile is 256
// consecutive bytes, row by row. Each byte is one pixel, RRRGGGBB (3 bits red,
// 3 green, 2 blue), which the board's resistor DAC turns into analog levels.
//
// The tile artwork (tetromino blocks, digits, letters) is not part of this RTL;
// give INIT_FILE (a $readmemh file of 16384 bytes) to load it. Without it the
// ROM holds a placeholder set computed at elaboration: every tile has a white
// top and left edge (8'hFF), a black bottom and right edge (8'h00), and an
// inside colour taken from the tile number t: red = t[2:0], green = t[5:3],
// blue = 2'b01. That makes every tile and every pixel position distinguishable.
//
// Interface: addr in, dout out; dout is the pixel at addr one clk cycle later.
module tile_rom
  import tetris_pkg::*;
#(
  parameter string INIT_FILE = ""
) (
  input  logic       clk,
  input  tile_addr_t addr,
  output pixel_t     dout
);

  pixel_t rom [2**TILE_ADDR_W];

  initial begin
    if (INIT_FILE != "") begin
      $readmemh(INIT_FILE, rom);
    end else begin
      for (int a = 0; a < 2**TILE_ADDR_W; a++) begin
        automatic logic [5:0] t = 6'(a >> 8);
        automatic int         r = (a >> 4) & 15;
        automatic int         c = a & 15;
        if (r == 0 || c == 0)        rom[a] = 8'hFF;
        else if (r == 15 || c == 15) rom[a] = 8'h00;
        else                         rom[a] = {t[2:0], t[5:3], 2'b01};
      end
    end
  end

  always_ff @(posedge clk) dout <= rom[addr];

endmodule
