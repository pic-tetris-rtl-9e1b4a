// gamestate_fsm - selects which tile map the screen shows.
//
// Four states: START (start-screen ROM), GAME1 (show game buffer 1 while buffer
// 2 is written), GAME2 (show buffer 2, write buffer 1) and END (end-screen ROM).
// go_play leaves START for GAME1. In a game state every mem_switch pulse swaps
// GAME1 and GAME2 (double buffering), and go_end leaves for END, which has
// priority over a simultaneous switch. go_start leaves END for START. Other
// commands are ignored in each state (go_start during a game, go_play on the end
// screen), as in the original design. The state is the output and, with its
// encoding, directly drives the memory selection: bit 1 set means "buffer 1 is
// the one written" (GAME2 and END).
//
// Interface: clk/rst (asynchronous active-high reset to START), mem_switch,
// go_start, go_play, go_end from control_fsm; game_state out. Timing: the new
// state is visible one cycle after the command.
//
// Follows the original design in states, encoding and transitions.
module gamestate_fsm
  import tetris_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        mem_switch,
  input  logic        go_start,
  input  logic        go_play,
  input  logic        go_end,
  output game_state_e game_state
);

  game_state_e state_d;

  always_comb begin
    state_d = game_state;
    unique case (game_state)
      GS_START: if (go_play) state_d = GS_GAME1;
      GS_GAME1: if (go_end) state_d = GS_END; else if (mem_switch) state_d = GS_GAME2;
      GS_GAME2: if (go_end) state_d = GS_END; else if (mem_switch) state_d = GS_GAME1;
      GS_END:   if (go_start) state_d = GS_START;
      default:  state_d = GS_START;
    endcase
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) game_state <= GS_START;
    else     game_state <= state_d;
  end

endmodule
