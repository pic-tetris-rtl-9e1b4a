// board_buffers - the four tile-map memories and their multiplexers
// (double-buffered game screen plus fixed start and end screens).
//
// How it works: game buffer 1 and game buffer 2 (board_ram) share the roles of
// "front" (read by the VGA driver) and "back" (written by the control unit).
// Bit 1 of the game state decides: when it is 0 (START, GAME1) buffer 1 is the
// front and buffer 2 the back; when it is 1 (GAME2, END) the roles swap. Each
// buffer's single address port is switched between rd_addr and wr_addr
// accordingly, and the write enable goes only to the back buffer, so the
// picture on screen never changes while it is being drawn. The start-screen and
// end-screen ROMs are always read at rd_addr. The output multiplexer returns the
// start ROM, buffer 1, buffer 2 or the end ROM for START, GAME1, GAME2 and END.
//
// Interface: game_state; wr_en/wr_addr/wr_data from the control unit;
// rd_addr from the VGA driver, rd_tile back to it. Timing: rd_tile is the byte
// at rd_addr one clk cycle later. The output select is the game state of the
// previous cycle, so a switch never mixes the address of one map with the data
// of another.
//
// Following the original design: the four memories, the 11-bit address muxes
// controlled by game-state bit 1, and the 4-way output mux. Registering the
// output select is this design's choice. START_INIT_FILE and END_INIT_FILE
// load real screen artwork into the two ROMs (see screen_rom).
module board_buffers
  import tetris_pkg::*;
#(
  parameter string START_INIT_FILE = "",
  parameter string END_INIT_FILE   = ""
) (
  input  logic        clk,
  input  game_state_e game_state,
  input  logic        wr_en,
  input  map_addr_t   wr_addr,
  input  tile_t       wr_data,
  input  map_addr_t   rd_addr,
  output tile_t       rd_tile
);

  logic        back_is_buf1;
  map_addr_t   buf1_addr, buf2_addr;
  tile_t       buf1_dout, buf2_dout, start_dout, end_dout;
  game_state_e sel_q;

  assign back_is_buf1 = game_state[1];
  assign buf1_addr    = back_is_buf1 ? wr_addr : rd_addr;
  assign buf2_addr    = back_is_buf1 ? rd_addr : wr_addr;

  board_ram u_buf1 (.clk, .addr(buf1_addr), .we(wr_en &&  back_is_buf1), .din(wr_data), .dout(buf1_dout));
  board_ram u_buf2 (.clk, .addr(buf2_addr), .we(wr_en && !back_is_buf1), .din(wr_data), .dout(buf2_dout));

  screen_rom #(.INIT_FILE(START_INIT_FILE), .FRAME_TILE(8'd1)) u_start_rom (.clk, .addr(rd_addr), .dout(start_dout));
  screen_rom #(.INIT_FILE(END_INIT_FILE),   .FRAME_TILE(8'd2)) u_end_rom   (.clk, .addr(rd_addr), .dout(end_dout));

  always_ff @(posedge clk) sel_q <= game_state;

  always_comb begin
    unique case (sel_q)
      GS_START: rd_tile = start_dout;
      GS_GAME1: rd_tile = buf1_dout;
      GS_GAME2: rd_tile = buf2_dout;
      GS_END:   rd_tile = end_dout;
      default:  rd_tile = start_dout;
    endcase
  end

endmodule
