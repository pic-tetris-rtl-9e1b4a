// vga_track.svh - VGA output checker shared by the testbenches of the VGA
// driver and of the whole engine. Included inside a testbench module, it needs
// clk, hsync, vsync, vga_r, vga_g, vga_b, the counters checks and failures, and
// a function expected_pixel(x, y) returning the RRRGGGBB byte that belongs at
// visible pixel (x, y).
//
// It locates pixels from the syncs alone, using the 640x480 timing: the first
// visible pixel of a line comes 144 clocks after hsync falls (column 151 versus
// 7), and the first visible line is the 36th line whose hsync falls after vsync
// fell (line 37 versus 2). Outside the visible area the colour must be black.
// A frame is checked when trk_arm was set as the frame began (vsync fell). One
// check is counted per visible line, failing if any pixel of that line or of
// the blanking before it was wrong, and frames_checked counts whole frames.
int   trk_k = 0, trk_line = 0;
bit   trk_hlock = 0, trk_vlock = 0, trk_active = 0, trk_arm = 0;
logic trk_hs = 1, trk_vs = 1;
int   frame_errors = 0, line_errors = 0, frames_checked = 0, total_pixel_errors = 0;

always @(posedge clk) begin
  int x, y;
  logic [7:0] px, ex;
  if (trk_hs && !hsync) begin trk_k = 0; trk_line++; trk_hlock = 1; end
  else trk_k++;
  if (trk_vs && !vsync) begin trk_line = 0; trk_vlock = 1; trk_active = trk_arm; frame_errors = 0; line_errors = 0; end
  x  = trk_k - 144;
  y  = trk_line - 36;
  px = {vga_r, vga_g, vga_b};
  if (trk_hlock && trk_vlock && trk_active) begin
    if (x >= 0 && x < 640 && y >= 0 && y < 480) begin
      ex = expected_pixel(x, y);
      if (px !== ex) begin
        frame_errors++; line_errors++; total_pixel_errors++;
        if (total_pixel_errors <= 10)
          $display("FAIL: pixel (%0d,%0d) is %h, expected %h", x, y, px, ex);
      end
      if (x == 639) begin
        checks++;
        if (line_errors != 0) failures++;
        line_errors = 0;
      end
      if (x == 639 && y == 479) begin
        frames_checked++;
        if (frame_errors != 0) begin
          $display("FAIL: frame %0d had %0d wrong pixels", frames_checked, frame_errors);
        end
        trk_active = 0;
      end
    end else if (px !== 8'h00) begin
      frame_errors++; line_errors++; total_pixel_errors++;
      if (total_pixel_errors <= 10) $display("FAIL: colour %h in blanking at (%0d,%0d)", px, x, y);
    end
  end
  trk_hs = hsync;
  trk_vs = vsync;
end
