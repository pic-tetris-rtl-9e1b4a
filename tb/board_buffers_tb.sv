// board_buffers_tb - checks the double buffer and the screen selection. In each
// game state the testbench writes random tiles to random slots and reads random
// slots; a reference model of the two buffers (written buffer = buffer 2 in the
// start and game-1 states, buffer 1 in the game-2 and end states) and of the
// placeholder screens gives the expected byte one cycle after each read address.
// Writes must never show up in the buffer on display.
`timescale 1ns/1ps
module board_buffers_tb;
  import tetris_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0;
  game_state_e game_state = GS_START;
  logic wr_en = 0;
  logic [10:0] wr_addr = 0, rd_addr = 0;
  logic [7:0] wr_data = 0, rd_tile;
  int checks = 0, failures = 0;
  logic [7:0] buf1 [2048], buf2 [2048];

  board_buffers dut (.*);

  always #20 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] expected(input game_state_e s, input int a);
    case (s)
      GS_START: return screen_tile(8'd1, a / 64, a % 64);
      GS_GAME1: return buf1[a];
      GS_GAME2: return buf2[a];
      default:  return screen_tile(8'd2, a / 64, a % 64);
    endcase
  endfunction

  initial begin
    for (int i = 0; i < 2048; i++) begin buf1[i] = 0; buf2[i] = 0; end
    for (int round = 0; round < 12; round++) begin
      game_state_e s;
      s = game_state_e'(round % 4);
      @(negedge clk) game_state = s;
      for (int n = 0; n < 600; n++) begin
        logic [7:0] exp;
        @(negedge clk) begin
          rd_addr = 11'($urandom);
          wr_en   = 1'($urandom);
          wr_addr = (n % 3 == 0) ? rd_addr : 11'($urandom);
          wr_data = 8'($urandom);
        end
        exp = expected(s, rd_addr);   // the byte before this cycle's write
        if (wr_en) begin
          if (s == GS_START || s == GS_GAME1) buf2[wr_addr] = wr_data;
          else                                buf1[wr_addr] = wr_data;
        end
        @(negedge clk) wr_en = 0;
        checks++;
        if (rd_tile !== exp) begin
          failures++; $display("FAIL: state %0d slot %0d read %h expected %h", s, rd_addr, rd_tile, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
