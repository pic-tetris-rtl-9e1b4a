// vga_sync_tb - measures the generated timing over three frames and compares
// it with the 640x480 numbers: 800 clocks per line with hsync low for 96 of
// them, de high for 640 clocks starting 144 clocks after hsync falls, 525
// lines per frame with vsync low for 2 lines (1600 clocks), 480 lines with de,
// the first starting (37-2)*800 + 151 clocks after vsync falls, one
// frame_start per frame and one line_end right after each visible line.
`timescale 1ns/1ps
module vga_sync_tb;
  logic clk = 0, rst = 0;
  logic hsync, vsync, de, frame_start, line_end;
  int checks = 0, failures = 0;

  vga_sync dut (.*);

  always #20 clk = ~clk;

  longint cyc = 0, t_hfall = -1, t_vfall = -1, t_hrise, t_vrise, t_derise, t_fs = -1;
  logic hs_q = 1, vs_q = 1, de_q = 0;
  int de_lines = 0, frames = 0, line_ends = 0;
  bit first_de_of_frame = 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at cycle %0d", what, cyc); end
  endtask

  always @(posedge clk) if (!rst) begin
    cyc++;
    if (hs_q && !hsync) begin
      if (t_hfall >= 0) check(cyc - t_hfall == 800, "line period");
      t_hfall = cyc;
    end
    if (!hs_q && hsync) check(cyc - t_hfall == 96, "hsync width");
    if (vs_q && !vsync) begin
      if (t_vfall >= 0) begin
        check(cyc - t_vfall == 525 * 800, "frame period");
        check(de_lines == 480, "480 visible lines");
        check(line_ends == 480, "480 line ends");
        frames++;
      end
      t_vfall = cyc; de_lines = 0; line_ends = 0; first_de_of_frame = 1;
    end
    if (!vs_q && vsync) check(cyc - t_vfall == 1600, "vsync width");
    if (!de_q && de) begin
      t_derise = cyc;
      de_lines++;
      if (t_hfall >= 0) check(cyc - t_hfall == 144, "hsync fall to first pixel");
      if (first_de_of_frame && t_vfall >= 0) check(cyc - t_vfall == 35 * 800 + 151, "vsync fall to first line");
      first_de_of_frame = 0;
    end
    if (de_q && !de) check(cyc - t_derise == 640, "640 pixels per line");
    if (line_end) begin
      line_ends++;
      check(de_q && !de, "line_end right after visible line");
    end
    if (frame_start) begin
      if (t_fs >= 0) check(cyc - t_fs == 525 * 800, "frame_start period");
      t_fs = cyc;
    end
    hs_q <= hsync; vs_q <= vsync; de_q <= de;
  end

  initial begin
    #200000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5 rst = 1;
    #50 rst = 0;
    wait (frames == 3);
    check(t_fs >= 0, "frame_start seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
