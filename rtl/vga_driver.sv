// vga_driver - draws the tile map on a 640x480 VGA screen.
//
// How it works, as a three-stage pipeline on the 25 MHz clock:
//   stage 0: vga_sync gives de/hsync/vsync; tile_scan turns de into the
//            screen tile and the pixel inside it, and presents the tile-map
//            address map_addr to the tile-map memories (outside this module).
//   stage 1: the memories return the tile type (map_tile, one cycle later);
//            together with the pixel row/column delayed by one cycle it forms
//            the tile-ROM address {tile[5:0], pixel row, pixel column}.
//   stage 2: the tile ROM returns the pixel, RRRGGGBB. It is split into the
//            3/3/2 colour outputs and forced to black outside the visible area.
// hsync, vsync and de are delayed by two cycles to stay aligned with the
// pixels, so the monitor sees syncs and colours from the same clock.
//
// Interface: clk/rst; map_addr out and map_tile in (tile-map read with one
// cycle latency); vga_r, vga_g, vga_b, hsync, vsync out. Timing: outputs lag
// the sync-counter values by three cycles in total (one register in vga_sync,
// two pipeline stages here).
//
// Following the original design: the tile geometry, the address formats,
// the memory latencies and the two-cycle sync delay. This design's own choice:
// the display enable used for blanking is delayed with the syncs (the original
// blanked with the undelayed enable). TILE_INIT_FILE loads real tile artwork.
// Only bits 5:0 of the tile type select a tile (64 tiles); bits 7:6 are
// unused, as in the original design.
module vga_driver
  import tetris_pkg::*;
#(
  parameter string TILE_INIT_FILE = ""
) (
  input  logic       clk,
  input  logic       rst,
  output map_addr_t  map_addr,
  input  tile_t      map_tile,
  output logic [2:0] vga_r,
  output logic [2:0] vga_g,
  output logic [1:0] vga_b,
  output logic       hsync,
  output logic       vsync
);

  logic       hs0, vs0, de0, frame_start, line_end;
  logic [3:0] pix_row0, pix_col0;
  logic [3:0] pix_row1, pix_col1;
  logic [1:0] hs_d, vs_d, de_d;
  tile_addr_t tile_addr;
  pixel_t     pixel;

  vga_sync u_sync (
    .clk, .rst, .hsync(hs0), .vsync(vs0), .de(de0), .frame_start, .line_end
  );

  tile_scan u_scan (
    .clk, .rst, .de(de0), .line_end, .frame_start,
    .map_addr, .pix_row(pix_row0), .pix_col(pix_col0)
  );

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      pix_row1 <= '0;
      pix_col1 <= '0;
      hs_d     <= '1;
      vs_d     <= '1;
      de_d     <= '0;
    end else begin
      pix_row1 <= pix_row0;
      pix_col1 <= pix_col0;
      hs_d     <= {hs_d[0], hs0};
      vs_d     <= {vs_d[0], vs0};
      de_d     <= {de_d[0], de0};
    end
  end

  assign tile_addr = {map_tile[5:0], pix_row1, pix_col1};

  tile_rom #(.INIT_FILE(TILE_INIT_FILE)) u_tiles (.clk, .addr(tile_addr), .dout(pixel));

  assign vga_r = de_d[1] ? pixel[7:5] : 3'b000;
  assign vga_g = de_d[1] ? pixel[4:2] : 3'b000;
  assign vga_b = de_d[1] ? pixel[1:0] : 2'b00;
  assign hsync = hs_d[1];
  assign vsync = vs_d[1];

endmodule
