// vga_driver_tb - feeds the VGA driver from a tile map held in the testbench
// (random tile types, read with one cycle of latency like the real map
// memories) and checks two complete frames pixel by pixel: every visible pixel
// must be the placeholder tile pixel of the tile at (x/16, y/16), pixel
// (x%16, y%16), at the position the sync timing defines, and the blanking must
// be black. It also measures the sync rates at the outputs: hsync every 800
// clocks, low for 96; vsync every 525 lines (420000 clocks), low for 2 lines.
`timescale 1ns/1ps
module vga_driver_tb;
  import tb_ref_pkg::*;
  logic clk = 0, rst = 0;
  logic [10:0] map_addr;
  logic [7:0] map_tile;
  logic [2:0] vga_r, vga_g;
  logic [1:0] vga_b;
  logic hsync, vsync;
  int checks = 0, failures = 0;
  logic [7:0] map [2048];

  vga_driver dut (.*);

  always #20 clk = ~clk;
  always @(posedge clk) map_tile <= map[map_addr];

  function automatic logic [7:0] expected_pixel(input int x, input int y);
    return tile_pixel(map[(y / 16) * 64 + x / 16], y % 16, x % 16);
  endfunction

  `include "vga_track.svh"

  // Sync rate and pulse-width measurement, after the first full frame.
  longint cyc = 0, hs_fall = -1, vs_fall = -1;
  int sync_checks_done = 0;
  logic hs_prev = 1, vs_prev = 1;
  always @(posedge clk) begin
    cyc++;
    if (hs_prev && !hsync) begin
      if (hs_fall >= 0 && vs_fall >= 0) begin
        checks++;
        if (cyc - hs_fall != 800) begin
          failures++; $display("FAIL: hsync period %0d", cyc - hs_fall);
        end
      end
      hs_fall = cyc;
    end
    if (!hs_prev && hsync && hs_fall >= 0) begin
      checks++;
      if (cyc - hs_fall != 96) begin failures++; $display("FAIL: hsync low for %0d", cyc - hs_fall); end
    end
    if (vs_prev && !vsync) begin
      if (vs_fall >= 0) begin
        checks++;
        if (cyc - vs_fall != 420000) begin
          failures++; $display("FAIL: vsync period %0d", cyc - vs_fall);
        end
        sync_checks_done++;
      end
      vs_fall = cyc;
    end
    if (!vs_prev && vsync && vs_fall >= 0) begin
      checks++;
      if (cyc - vs_fall != 1600) begin failures++; $display("FAIL: vsync low for %0d", cyc - vs_fall); end
    end
    hs_prev = hsync;
    vs_prev = vsync;
  end

  initial begin
    #60000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2048; i++) map[i] = 8'($urandom);
    #5 rst = 1;
    #50 rst = 0;
    trk_arm = 1;
    wait (frames_checked == 2);
    checks++;
    if (sync_checks_done == 0) begin failures++; $display("FAIL: no whole frame period measured"); end
    if (total_pixel_errors != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
