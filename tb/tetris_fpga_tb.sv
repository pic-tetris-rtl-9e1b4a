// tetris_fpga_tb - end-to-end test of the graphics engine at its default size.
//
// A model of the game microcontroller drives the engine the way the game does:
// a status code on the 4-bit bus, then tile bytes over the 10 MHz serial link
// (MSB first), then the status back to zero. Like the game, it sends every
// score / level / piece update twice so that both game buffers get it, and the
// board once per move. The testbench keeps its own model of the two game
// buffers and of which map is on screen, and checks whole VGA frames pixel by
// pixel (see vga_track.svh) after: reset (start screen), play (empty game
// buffer), a full initial data set, single board updates, game over (end
// screen), return to the start screen and a second game.
//
// It also counts how often each mechanism of the engine happened - bytes
// received, writes to each field, row wraps of the board and next-piece
// fields, buffer swaps in both directions, and each screen change - and counts
// a failure for any that never did.
`timescale 1ns/1ps
module tetris_fpga_tb;
  import tetris_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst = 0, serial_clk = 0, serial_data = 0;
  logic [3:0] status = 0;
  logic [2:0] vga_r, vga_g;
  logic [1:0] vga_b;
  logic hsync, vsync;
  game_state_e game_state;
  int checks = 0, failures = 0;

  tetris_fpga dut (.*);

  // analog levels at the monitor, through the resistor DAC
  real v_red, v_green, v_blue;
  rgb_dac_model dac (.red(vga_r), .green(vga_g), .blue(vga_b), .v_red, .v_green, .v_blue);
  int n_full = 0, n_black = 0, dac_errors = 0;
  always @(posedge clk) begin
    if ({vga_r, vga_g, vga_b} == 8'hFF) begin
      n_full++;
      if (v_red < 0.65 || v_red > 0.75 || v_green < 0.65 || v_green > 0.75 || v_blue < 0.55 || v_blue > 0.7)
        dac_errors++;
    end else if ({vga_r, vga_g, vga_b} == 8'h00) begin
      n_black++;
      if (v_red != 0.0 || v_green != 0.0 || v_blue != 0.0) dac_errors++;
    end
  end

  always #20 clk = ~clk;   // 25 MHz pixel clock

  // ---------------- reference model ----------------
  logic [7:0] ref_buf1 [2048], ref_buf2 [2048];
  int ref_state = 0;   // 0 start, 1 buffer 1 shown, 2 buffer 2 shown, 3 end

  function automatic logic [7:0] ref_tile(input int row, input int col);
    case (ref_state)
      0: return screen_tile(8'd1, row, col);
      1: return ref_buf1[row * 64 + col];
      2: return ref_buf2[row * 64 + col];
      default: return screen_tile(8'd2, row, col);
    endcase
  endfunction

  function automatic logic [7:0] expected_pixel(input int x, input int y);
    return tile_pixel(ref_tile(y / 16, x / 16), y % 16, x % 16);
  endfunction

  `include "vga_track.svh"

  // ---------------- microcontroller model ----------------
  task automatic send_byte(input logic [7:0] b);
    for (int i = 7; i >= 0; i--) begin
      serial_data = b[i];
      #50 serial_clk = 1;
      #50 serial_clk = 0;
    end
    #300;   // the processor reloads its serial buffer
  endtask

  task automatic set_status(input logic [3:0] s);
    @(negedge clk) status = s;
  endtask

  // one write transfer; the written buffer is buffer 1 in states 2 and 3
  task automatic write_field(input logic [3:0] code, input int row0, input int col0,
                             input int len, input logic [7:0] bytes[$]);
    set_status(code);
    #400;
    foreach (bytes[i]) begin
      send_byte(bytes[i]);
      if (ref_state >= 2) ref_buf1[field_slot(row0, col0, len, i)] = bytes[i];
      else                ref_buf2[field_slot(row0, col0, len, i)] = bytes[i];
    end
    #400;
    set_status(4'd0);
    #400;
    if (ref_state == 1) ref_state = 2;
    else if (ref_state == 2) ref_state = 1;
  endtask

  task automatic command(input logic [3:0] code);
    set_status(code);
    #400;
    set_status(4'd0);
    #400;
    case (ref_state)
      0: if (code == 4'd6) ref_state = 1;
      1, 2: if (code == 4'd7) ref_state = 3;
      3: if (code == 4'd5) ref_state = 0;
      default: ;
    endcase
  endtask

  // game data as the microcontroller formats it
  task automatic send_board();
    logic [7:0] b[$];
    for (int i = 0; i < 200; i++) begin
      int t;
      t = $urandom % 9;
      b.push_back(t == 0 || t > 7 ? 8'h2D : 8'(t));   // empty cells are sent as grey
    end
    write_field(4'd1, 4, 15, 10, b);
  endtask

  task automatic send_digits(input logic [3:0] code, input int row0, input int col0, input int n);
    logic [7:0] b[$];
    for (int i = 0; i < n; i++) b.push_back(8'(34 + $urandom % 10));   // digit tiles 34..43
    write_field(code, row0, col0, n, b);
  endtask

  task automatic send_piece();
    logic [7:0] b[$];
    logic [7:0] t;
    t = 8'(1 + $urandom % 7);
    for (int i = 0; i < 8; i++) b.push_back(($urandom % 2 == 1) ? t : 8'h00);
    write_field(4'd3, 8, 31, 4, b);
  endtask

  task automatic send_data();
    send_board();
    send_digits(4'd2, 16, 30, 7);   // score
    send_digits(4'd8, 22, 3, 7);    // high score
    send_digits(4'd4, 22, 32, 2);   // level
    send_piece();
  endtask

  task automatic check_frame(input string what);
    int f0;
    f0 = frames_checked;
    trk_arm = 1;
    wait (frames_checked == f0 + 1);
    trk_arm = 0;
    checks++;
    if (int'(game_state) != ref_state) begin
      failures++; $display("FAIL: %s: game state %0d, expected %0d", what, game_state, ref_state);
    end
    $display("frame checked: %s (%0d wrong pixels so far)", what, total_pixel_errors);
  endtask

  // ---------------- mechanism counters ----------------
  int n_bytes = 0, n_switch12 = 0, n_switch21 = 0, n_play = 0, n_end = 0, n_start = 0;
  int n_wr_board = 0, n_wr_score = 0, n_wr_hiscore = 0, n_wr_level = 0, n_wr_piece = 0;
  int n_wrap_board = 0, n_wrap_piece = 0;
  logic [10:0] last_wr = 0;
  game_state_e gs_q = GS_START;

  always @(posedge clk) if (!rst) begin
    if (dut.rx_valid) n_bytes++;
    if (dut.wr_en) begin
      int a;
      a = int'(dut.wr_addr);
      if (a / 64 >= 4 && a / 64 < 24 && a % 64 >= 15 && a % 64 < 25) n_wr_board++;
      if (a / 64 == 16 && a % 64 >= 30 && a % 64 < 37) n_wr_score++;
      if (a / 64 == 22 && a % 64 >= 3 && a % 64 < 10) n_wr_hiscore++;
      if (a / 64 == 22 && a % 64 >= 32 && a % 64 < 34) n_wr_level++;
      if (a / 64 >= 8 && a / 64 < 10 && a % 64 >= 31 && a % 64 < 35) n_wr_piece++;
      if (a - int'(last_wr) == 55) n_wrap_board++;
      if (a - int'(last_wr) == 61) n_wrap_piece++;
      last_wr <= dut.wr_addr;
    end
    if (gs_q == GS_GAME1 && game_state == GS_GAME2) n_switch12++;
    if (gs_q == GS_GAME2 && game_state == GS_GAME1) n_switch21++;
    if (gs_q == GS_START && game_state == GS_GAME1) n_play++;
    if (gs_q != GS_END && game_state == GS_END) n_end++;
    if (gs_q == GS_END && game_state == GS_START) n_start++;
    gs_q <= game_state;
  end

  task automatic require(input int count, input string what);
    checks++;
    $display("mechanism %-24s happened %0d times", what, count);
    if (count == 0) begin failures++; $display("FAIL: %s never happened", what); end
  endtask

  initial begin
    #200000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2048; i++) begin ref_buf1[i] = 0; ref_buf2[i] = 0; end
    #5 rst = 1;
    #100 rst = 0;
    check_frame("start screen after reset");
    command(4'd6);
    check_frame("empty game buffer after play");
    send_data();
    send_data();
    check_frame("initial game data");
    send_board();
    check_frame("board update 1");
    send_board();
    check_frame("board update 2");
    send_digits(4'd2, 16, 30, 7);
    send_digits(4'd2, 16, 30, 7);
    send_piece();
    send_piece();
    check_frame("score and next piece update");
    command(4'd7);
    check_frame("end screen");
    command(4'd5);
    check_frame("start screen again");
    command(4'd6);
    send_board();
    check_frame("second game");

    require(n_bytes, "byte received");
    require(n_wr_board, "board write");
    require(n_wr_score, "score write");
    require(n_wr_hiscore, "high score write");
    require(n_wr_level, "level write");
    require(n_wr_piece, "next piece write");
    require(n_wrap_board, "board row wrap");
    require(n_wrap_piece, "next piece row wrap");
    require(n_switch12, "swap to buffer 2");
    require(n_switch21, "swap to buffer 1");
    require(n_play, "start screen -> game");
    require(n_end, "game -> end screen");
    require(n_start, "end -> start screen");
    require(n_full, "full-scale colour at the DAC");
    checks++;
    $display("DAC: red/green/blue at full scale %.3f/%.3f/%.3f V", dac.node3(3'b111), dac.node3(3'b111), dac.node2(2'b11));
    if (dac_errors != 0 || n_black == 0) begin
      failures++; $display("FAIL: %0d analog levels outside 0..0.7 V", dac_errors);
    end
    checks++;
    if (total_pixel_errors != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
