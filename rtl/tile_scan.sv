// tile_scan - tells the VGA driver which screen tile, and which pixel inside
// it, is being drawn.
//
// How it works: two pairs of counters. The column pair (pixel column 0..15,
// tile column 0..39) steps on every clock with de high, so the 640 visible
// pixels of a line run through 40 tiles and the pair is back at zero for the
// next line. The row pair (pixel row 0..15, tile row 0..29) steps once per
// visible line on line_end, so 480 lines run through 30 tiles. frame_start
// clears all counters, which keeps the scan locked to the frame even if a pulse
// were ever missed. The tile-map address is simply {tile row, tile column}.
//
// Interface: de, line_end, frame_start from vga_sync; map_addr, pix_row,
// pix_col out (combinational from the counters). Timing: in a cycle with de high
// the outputs describe the pixel being drawn in that cycle.
//
// Following the original design: the counter ranges and the {row, column}
// address. This design's own choice: the row counters step synchronously at
// the end of each line and are cleared each frame (the original clocked them
// with the display-enable signal itself).
module tile_scan
  import tetris_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      de,
  input  logic      line_end,
  input  logic      frame_start,
  output map_addr_t map_addr,
  output logic [3:0] pix_row,
  output logic [3:0] pix_col
);

  logic [MAP_COL_W-1:0] tile_col_q;
  logic [MAP_ROW_W-1:0] tile_row_q;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      pix_col    <= '0;
      tile_col_q <= '0;
      pix_row    <= '0;
      tile_row_q <= '0;
    end else if (frame_start) begin
      pix_col    <= '0;
      tile_col_q <= '0;
      pix_row    <= '0;
      tile_row_q <= '0;
    end else begin
      if (de) begin
        pix_col <= pix_col + 4'd1;
        if (pix_col == 4'd15)
          tile_col_q <= (tile_col_q == MAP_COL_W'(SCREEN_COLS - 1)) ? '0 : tile_col_q + 1'b1;
      end
      if (line_end) begin
        pix_row <= pix_row + 4'd1;
        if (pix_row == 4'd15)
          tile_row_q <= (tile_row_q == MAP_ROW_W'(SCREEN_ROWS - 1)) ? '0 : tile_row_q + 1'b1;
      end
    end
  end

  assign map_addr = {tile_row_q, tile_col_q};

endmodule
