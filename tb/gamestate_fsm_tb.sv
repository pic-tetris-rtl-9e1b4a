// gamestate_fsm_tb - applies random sequences of switch / start / play / end
// commands (one at a time and together) and compares the displayed-map state
// with a reference model of the transitions: play leaves the start screen for
// game buffer 1, a switch swaps the two game buffers, end (which wins over a
// simultaneous switch) leads from a game to the end screen, start leads from
// the end screen back to the start screen, and everything else is ignored.
`timescale 1ns/1ps
module gamestate_fsm_tb;
  import tetris_pkg::*;
  logic clk = 0, rst = 0;
  logic mem_switch = 0, go_start = 0, go_play = 0, go_end = 0;
  game_state_e game_state;
  int checks = 0, failures = 0;
  int visits[4] = '{0, 0, 0, 0};

  gamestate_fsm dut (.*);

  always #20 clk = ~clk;

  logic [1:0] model = 0;   // 0 start, 1 buffer 1 shown, 2 buffer 2 shown, 3 end

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5 rst = 1;
    #50 rst = 0;
    @(negedge clk);
    checks++;
    if (game_state != GS_START) begin failures++; $display("FAIL: reset state %0d", game_state); end
    for (int n = 0; n < 2000; n++) begin
      logic [3:0] cmd;
      cmd = 4'($urandom);
      if (n < 8) cmd = 4'b0100 >> (n % 3);   // play, start, switch early on
      {mem_switch, go_start, go_play, go_end} = ($urandom % 3 == 0) ? cmd : (4'b1 << ($urandom % 4));
      case (model)
        0: if (go_play) model = 1;
        1: if (go_end) model = 3; else if (mem_switch) model = 2;
        2: if (go_end) model = 3; else if (mem_switch) model = 1;
        3: if (go_start) model = 0;
      endcase
      @(negedge clk);
      checks++;
      visits[model]++;
      if (game_state != game_state_e'(model)) begin
        failures++; $display("FAIL: step %0d state %0d expected %0d", n, game_state, model);
        model = game_state;
      end
    end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (visits[i] == 0) begin failures++; $display("FAIL: state %0d never reached", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
