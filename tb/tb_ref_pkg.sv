// tb_ref_pkg - reference formulas for the testbenches, written independently of
// the RTL: the placeholder tile artwork, the placeholder start/end screens and
// the tile-map field layout of the Tetris graphics engine.
package tb_ref_pkg;

  // Placeholder tile pixel: white top/left edge, black bottom/right edge,
  // inside red = t[2:0], green = t[5:3], blue = 01.
  function automatic logic [7:0] tile_pixel(input logic [7:0] tile, input int prow, input int pcol);
    if (prow == 0 || pcol == 0)   return 8'hFF;
    if (prow == 15 || pcol == 15) return 8'h00;
    return {tile[2:0], tile[5:3], 2'b01};
  endfunction

  // Placeholder screen: frame of frame_tile around 40 x 30, grey 0x2D inside,
  // zero outside the visible 40 x 30 window.
  function automatic logic [7:0] screen_tile(input logic [7:0] frame_tile, input int row, input int col);
    if (row >= 30 || col >= 40) return 8'h00;
    if (row == 0 || row == 29 || col == 0 || col == 39) return frame_tile;
    return 8'h2D;
  endfunction

  // Map slot of byte i of a field that starts at map (row0, col0) and is
  // len bytes wide.
  function automatic int field_slot(input int row0, input int col0, input int len, input int i);
    return (row0 + i / len) * 64 + col0 + i % len;
  endfunction

endpackage
