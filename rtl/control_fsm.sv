// control_fsm - control unit of the Tetris graphics engine.
//
// What it does: watches the 4-bit status code from the game microcontroller and
// turns the bytes delivered by receive_data into tile-map writes, and tells the
// game-state FSM when to switch buffers or screens.
//
// How it works: in READY the FSM decodes the status code. A "write" code (board,
// score, high score, level, next piece) moves it to a write state and loads the
// start address and row length of that field (tetris_pkg FIELD_*). It stays
// there while the code is held; every received byte is written at the current
// address, which then advances by one, or, after the last byte of a field row,
// jumps to the same start column one map row (64 slots) further down. That is
// how the 10-wide, 20-high board and the 4 x 2 next-piece preview are laid into
// the 64-wide map. When the code goes back to another value the microcontroller
// is done: the FSM spends one cycle in SWITCH (mem_switch = 1), which makes the
// game-state FSM show the freshly written buffer, and returns to READY. The
// start, play and end codes hold go_start, go_play or go_end high for as long as
// the code is present.
//
// Interface: status, rx_data/rx_valid in; wr_en/wr_addr/wr_data out to the
// written game buffer; mem_switch, go_start, go_play, go_end out to
// gamestate_fsm. Timing: a byte that arrives with rx_valid in cycle t is
// written (wr_en high) in cycle t+1. The state enters a write state one cycle
// after the status code appears; a byte arriving in that very cycle is already
// placed at the field's start address.
//
// Following the original design: the status codes, the states, the field start
// addresses (271, 1054, 1411, 543, 1440), the row wrap of board (10) and next
// piece (4), the switch after every write transfer, and the write lagging the
// received byte by one register stage. This design's own choices: the start
// address is loaded on entry to the write state instead of one cycle later by a
// separate state-change pulse, the byte-in-row counter is a normal synchronous
// counter, and bytes arriving outside a write state are ignored.
module control_fsm
  import tetris_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic [3:0] status,
  input  tile_t     rx_data,
  input  logic      rx_valid,
  output logic      wr_en,
  output map_addr_t wr_addr,
  output tile_t     wr_data,
  output logic      mem_switch,
  output logic      go_start,
  output logic      go_play,
  output logic      go_end
);

  typedef enum logic [3:0] {
    C_READY, C_WR_BOARD, C_WR_SCORE, C_WR_PIECE, C_WR_LEVEL, C_WR_HISCORE,
    C_SHOW_START, C_PLAY, C_SHOW_END, C_SWITCH
  } ctrl_state_e;

  ctrl_state_e state_q, state_d;
  map_addr_t   addr_q;
  logic [5:0]  cnt_q, len_q;

  // ---------------- next-state logic ----------------
  always_comb begin
    state_d = state_q;
    unique case (state_q)
      C_READY: begin
        unique case (status)
          STATUS_BOARD:   state_d = C_WR_BOARD;
          STATUS_SCORE:   state_d = C_WR_SCORE;
          STATUS_PIECE:   state_d = C_WR_PIECE;
          STATUS_LEVEL:   state_d = C_WR_LEVEL;
          STATUS_START:   state_d = C_SHOW_START;
          STATUS_PLAY:    state_d = C_PLAY;
          STATUS_END:     state_d = C_SHOW_END;
          STATUS_HISCORE: state_d = C_WR_HISCORE;
          default:        state_d = C_READY;
        endcase
      end
      C_WR_BOARD:   if (status != STATUS_BOARD)   state_d = C_SWITCH;
      C_WR_SCORE:   if (status != STATUS_SCORE)   state_d = C_SWITCH;
      C_WR_PIECE:   if (status != STATUS_PIECE)   state_d = C_SWITCH;
      C_WR_LEVEL:   if (status != STATUS_LEVEL)   state_d = C_SWITCH;
      C_WR_HISCORE: if (status != STATUS_HISCORE) state_d = C_SWITCH;
      C_SHOW_START: if (status != STATUS_START)   state_d = C_READY;
      C_PLAY:       if (status != STATUS_PLAY)    state_d = C_READY;
      C_SHOW_END:   if (status != STATUS_END)     state_d = C_READY;
      C_SWITCH:     state_d = C_READY;
      default:      state_d = C_READY;
    endcase
  end

  // ---------------- field selection on entry to a write state ----------------
  logic   entering;
  field_t entry_field;

  always_comb begin
    entering    = 1'b1;
    entry_field = FIELD_BOARD;
    unique case (status)
      STATUS_BOARD:   entry_field = FIELD_BOARD;
      STATUS_SCORE:   entry_field = FIELD_SCORE;
      STATUS_PIECE:   entry_field = FIELD_PIECE;
      STATUS_LEVEL:   entry_field = FIELD_LEVEL;
      STATUS_HISCORE: entry_field = FIELD_HISCORE;
      default:        entering = 1'b0;
    endcase
    if (state_q != C_READY) entering = 1'b0;
  end

  logic in_write;
  assign in_write = (state_q inside {C_WR_BOARD, C_WR_SCORE, C_WR_PIECE, C_WR_LEVEL, C_WR_HISCORE})
                    || entering;

  // address and position of the byte being written now
  map_addr_t  cur_addr;
  logic [5:0] cur_cnt, cur_len;
  assign cur_addr = entering ? entry_field.base    : addr_q;
  assign cur_cnt  = entering ? 6'd0                : cnt_q;
  assign cur_len  = entering ? entry_field.row_len : len_q;

  // ---------------- registers ----------------
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state_q <= C_READY;
      addr_q  <= '0;
      cnt_q   <= '0;
      len_q   <= '0;
      wr_en   <= 1'b0;
      wr_addr <= '0;
      wr_data <= '0;
    end else begin
      state_q <= state_d;
      wr_en   <= rx_valid && in_write;
      wr_addr <= cur_addr;
      wr_data <= rx_data;
      if (entering) begin
        addr_q <= cur_addr;
        cnt_q  <= cur_cnt;
        len_q  <= cur_len;
      end
      if (rx_valid && in_write) begin
        if (cur_cnt == cur_len - 6'd1) begin
          addr_q <= cur_addr + map_addr_t'(MAP_STRIDE) - map_addr_t'(cur_len) + map_addr_t'(1);
          cnt_q  <= '0;
        end else begin
          addr_q <= cur_addr + map_addr_t'(1);
          cnt_q  <= cur_cnt + 6'd1;
        end
      end
    end
  end

  assign mem_switch = (state_q == C_SWITCH);
  assign go_start   = (state_q == C_SHOW_START);
  assign go_play    = (state_q == C_PLAY);
  assign go_end     = (state_q == C_SHOW_END);

  // a buffer switch is always a single-cycle pulse
  assert property (@(posedge clk) disable iff (rst) mem_switch |=> !mem_switch)
    else $error("control_fsm: mem_switch longer than one cycle");

endmodule
