// tile_scan_tb - drives display-enable, line_end and frame_start with its own
// timing (640 pixels per line, 480 lines per frame, random blanking gaps) and
// checks at every visible pixel (x, y) that the scan reports tile (y/16, x/16),
// pixel (y%16, x%16) and map address (y/16)*64 + x/16. Two frames are run, the
// second without frame_start, so the wrap of the counters is covered as well.
`timescale 1ns/1ps
module tile_scan_tb;
  logic clk = 0, rst = 0, de = 0, line_end = 0, frame_start = 0;
  logic [10:0] map_addr;
  logic [3:0] pix_row, pix_col;
  int checks = 0, failures = 0;

  tile_scan dut (.*);

  always #20 clk = ~clk;

  int x, y;

  initial begin
    #200000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (de) begin
    checks++;
    if (map_addr != 11'((y / 16) * 64 + x / 16) || pix_row != 4'(y % 16) || pix_col != 4'(x % 16)) begin
      failures++;
      if (failures < 10)
        $display("FAIL: pixel (%0d,%0d): addr %0d row %0d col %0d", x, y, map_addr, pix_row, pix_col);
    end
  end

  initial begin
    #5 rst = 1;
    #50 rst = 0;
    for (int f = 0; f < 2; f++) begin
      repeat (30) @(negedge clk);
      if (f == 0) begin
        @(negedge clk) frame_start = 1;
        @(negedge clk) frame_start = 0;
      end
      for (y = 0; y < 480; y++) begin
        repeat ($urandom % 20 + 3) @(negedge clk);
        for (x = 0; x < 640; x++) begin
          de = 1;
          @(negedge clk);
        end
        de = 0; line_end = 1;
        @(negedge clk) line_end = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
