// tetris_pkg - types and constants shared by the Tetris VGA graphics engine.
//
// The engine shows a 640x480 screen as 40 x 30 tiles of 16 x 16 pixels. A tile
// map memory holds one byte (the tile type) per screen tile; its 11-bit address
// is {tile row[4:0], tile column[5:0]}, so each map row has 64 slots of which the
// first 40 are shown. A tile ROM holds 64 tiles of 256 pixels each, addressed
// {tile[5:0], pixel row[3:0], pixel column[3:0]}; a pixel is RRRGGGBB.
//
// The game microcontroller tells the engine what it is doing with a 4-bit status
// code; the codes and the map positions of the score, high score, level, next
// piece and board fields follow the original design. The VGA timing numbers are
// those of the original 25 MHz sync generator (800 clocks per line, 525 lines).
package tetris_pkg;

  // ---------------- tile map geometry ----------------
  localparam int MAP_COL_W   = 6;                    // 64 slots per map row
  localparam int MAP_ROW_W   = 5;                    // 32 map rows
  localparam int MAP_ADDR_W  = MAP_ROW_W + MAP_COL_W; // 11 bits, 2048 bytes
  localparam int MAP_STRIDE  = 1 << MAP_COL_W;       // 64
  localparam int SCREEN_COLS = 40;
  localparam int SCREEN_ROWS = 30;
  localparam int TILE_PX     = 16;                   // tile edge in pixels
  localparam int TILE_ADDR_W = 6 + 4 + 4;            // 14 bits, 16 KiB of pixels

  typedef logic [MAP_ADDR_W-1:0]  map_addr_t;
  typedef logic [TILE_ADDR_W-1:0] tile_addr_t;
  typedef logic [7:0]             tile_t;   // tile type stored in the map
  typedef logic [7:0]             pixel_t;  // RRRGGGBB

  // tile used for an empty board cell (background grey)
  localparam tile_t TILE_BACKGROUND = 8'h2D;

  // ---------------- status codes from the microcontroller ----------------
  typedef enum logic [3:0] {
    STATUS_NONE    = 4'd0,
    STATUS_BOARD   = 4'd1,
    STATUS_SCORE   = 4'd2,
    STATUS_PIECE   = 4'd3,
    STATUS_LEVEL   = 4'd4,
    STATUS_START   = 4'd5,
    STATUS_PLAY    = 4'd6,
    STATUS_END     = 4'd7,
    STATUS_HISCORE = 4'd8
  } status_e;

  // ---------------- where each field lands in the tile map ----------------
  // A field is written left to right, row_len bytes per map row; after the
  // last byte of a row the address jumps to the first column of the next row.
  typedef struct packed {
    map_addr_t  base;
    logic [5:0] row_len;
  } field_t;

  localparam field_t FIELD_BOARD   = '{base: 11'd271,  row_len: 6'd10}; // row 4,  col 15, 10 x 20
  localparam field_t FIELD_PIECE   = '{base: 11'd543,  row_len: 6'd4};  // row 8,  col 31, 4 x 2
  localparam field_t FIELD_SCORE   = '{base: 11'd1054, row_len: 6'd7};  // row 16, col 30, 7 digits
  localparam field_t FIELD_HISCORE = '{base: 11'd1411, row_len: 6'd7};  // row 22, col 3,  7 digits
  localparam field_t FIELD_LEVEL   = '{base: 11'd1440, row_len: 6'd2};  // row 22, col 32, 2 digits

  // ---------------- which map is displayed ----------------
  typedef enum logic [1:0] {
    GS_START = 2'b00,   // start screen ROM
    GS_GAME1 = 2'b01,   // show game buffer 1, write buffer 2
    GS_GAME2 = 2'b10,   // show game buffer 2, write buffer 1
    GS_END   = 2'b11    // end screen ROM
  } game_state_e;

  // ---------------- VGA timing, in 25 MHz clocks and lines ----------------
  localparam int H_TOTAL      = 800;
  localparam int H_SYNC_START = 7;
  localparam int H_SYNC_END   = 103;   // sync low for 96 clocks
  localparam int H_VIS_START  = 151;
  localparam int H_VIS_END    = 791;   // 640 visible pixels
  localparam int V_TOTAL      = 525;
  localparam int V_SYNC_START = 2;
  localparam int V_SYNC_END   = 4;     // sync low for 2 lines
  localparam int V_VIS_START  = 37;
  localparam int V_VIS_END    = 517;   // 480 visible lines

endpackage
