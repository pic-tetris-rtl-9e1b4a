// tetris_fpga - graphics engine for a Tetris game whose rules run on a
// separate microcontroller.
//
// The microcontroller keeps the game (board, falling piece, score, level) and
// streams what should be on screen; this logic turns that stream into a 640x480
// VGA picture made of 40 x 30 tiles of 16 x 16 pixels, 256 colours.
//
// Data path (all on the 25 MHz pixel clock except the serial shift register):
//   receive_data  - serial bytes (10 MHz, MSB first) to parallel, one pulse per byte
//   control_fsm   - status code -> field start address, writes each byte into
//                   the tile map, requests buffer switches and screen changes
//   gamestate_fsm - START / GAME1 / GAME2 / END: which map is shown, which written
//   board_buffers - start-screen ROM, two game buffers (double buffering), end-screen ROM
//   vga_driver    - sync generation, tile scan, tile ROM lookup, RGB output
//
// Interface: clk is the 25 MHz pixel clock (made from the 40 MHz board clock by
// the FPGA's clock manager, which is outside this RTL); rst is asynchronous and
// active high. serial_clk/serial_data/status come from the microcontroller;
// status is the upper nibble of its port D. vga_r/vga_g/vga_b go to a resistor
// DAC (3/3/2 bits), hsync/vsync straight to the monitor. game_state shows which
// map is displayed.
//
// The block structure, protocol, memory layout and timing follow the original
// design; the screen and tile artwork is not included (see screen_rom and
// tile_rom, whose INIT_FILE parameters load it).
module tetris_fpga
  import tetris_pkg::*;
#(
  parameter string START_INIT_FILE = "",
  parameter string END_INIT_FILE   = "",
  parameter string TILE_INIT_FILE  = ""
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        serial_clk,
  input  logic        serial_data,
  input  logic [3:0]  status,
  output logic [2:0]  vga_r,
  output logic [2:0]  vga_g,
  output logic [1:0]  vga_b,
  output logic        hsync,
  output logic        vsync,
  output game_state_e game_state
);

  tile_t     rx_data, wr_data, map_tile;
  logic      rx_valid, wr_en, mem_switch, go_start, go_play, go_end;
  map_addr_t wr_addr, map_addr;

  receive_data u_rx (
    .clk, .rst, .serial_clk, .serial_data, .rx_data, .rx_valid
  );

  control_fsm u_ctrl (
    .clk, .rst, .status, .rx_data, .rx_valid,
    .wr_en, .wr_addr, .wr_data, .mem_switch, .go_start, .go_play, .go_end
  );

  gamestate_fsm u_gstate (
    .clk, .rst, .mem_switch, .go_start, .go_play, .go_end, .game_state
  );

  board_buffers #(
    .START_INIT_FILE(START_INIT_FILE), .END_INIT_FILE(END_INIT_FILE)
  ) u_mem (
    .clk, .game_state, .wr_en, .wr_addr, .wr_data, .rd_addr(map_addr), .rd_tile(map_tile)
  );

  vga_driver #(.TILE_INIT_FILE(TILE_INIT_FILE)) u_vga (
    .clk, .rst, .map_addr, .map_tile, .vga_r, .vga_g, .vga_b, .hsync, .vsync
  );

endmodule
