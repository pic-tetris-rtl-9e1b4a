// screen_rom - a fixed full-screen tile map (start screen or end screen):
// a 2048 x 8 synchronous ROM laid out like board_ram, {tile row, tile column}.
//
// The screen images themselves are artwork made with a tile-map editor and are
// not part of this RTL. Give INIT_FILE (a $readmemh file of 2048 bytes, one
// per map slot, 64 slots per row, slots of columns 40..63 and rows 30..31 zero)
// to load a real image. Without it the ROM holds a plain placeholder screen: a
// frame of FRAME_TILE around the 40 x 30 visible area, background grey tiles
// inside, and zero in the unused slots, so that the two screens can be told
// apart on a monitor and in simulation.
//
// Interface: addr in, dout out; dout is the byte at addr one clk cycle later.
module screen_rom
  import tetris_pkg::*;
#(
  parameter string INIT_FILE  = "",
  parameter tile_t FRAME_TILE = 8'd1
) (
  input  logic      clk,
  input  map_addr_t addr,
  output tile_t     dout
);

  tile_t rom [2**MAP_ADDR_W];

  initial begin
    if (INIT_FILE != "") begin
      $readmemh(INIT_FILE, rom);
    end else begin
      for (int r = 0; r < 2**MAP_ROW_W; r++) begin
        for (int c = 0; c < MAP_STRIDE; c++) begin
          if (r >= SCREEN_ROWS || c >= SCREEN_COLS)
            rom[r*MAP_STRIDE + c] = '0;
          else if (r == 0 || r == SCREEN_ROWS-1 || c == 0 || c == SCREEN_COLS-1)
            rom[r*MAP_STRIDE + c] = FRAME_TILE;
          else
            rom[r*MAP_STRIDE + c] = TILE_BACKGROUND;
        end
      end
    end
  end

  always_ff @(posedge clk) dout <= rom[addr];

endmodule
