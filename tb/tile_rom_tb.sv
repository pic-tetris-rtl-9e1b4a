// tile_rom_tb - reads all 16384 pixels of the placeholder tile set and checks
// the address format {tile, pixel row, pixel column} and each pixel value
// against the placeholder artwork formula, with one cycle of read latency.
`timescale 1ns/1ps
module tile_rom_tb;
  import tb_ref_pkg::*;
  logic clk = 0;
  logic [13:0] addr = 0;
  logic [7:0] dout;
  int checks = 0, failures = 0;

  tile_rom dut (.*);

  always #20 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 64; t++)
      for (int r = 0; r < 16; r++)
        for (int c = 0; c < 16; c++) begin
          @(negedge clk) addr = 14'(t * 256 + r * 16 + c);
          @(negedge clk);
          checks++;
          if (dout !== tile_pixel(8'(t), r, c)) begin
            failures++;
            $display("FAIL: tile %0d row %0d col %0d read %h expected %h", t, r, c, dout, tile_pixel(8'(t), r, c));
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
