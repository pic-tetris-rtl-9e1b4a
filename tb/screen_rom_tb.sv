// screen_rom_tb - reads all 2048 slots of the placeholder start and end screen
// ROMs and compares them with the placeholder layout (frame tile around the
// 40 x 30 screen, grey 0x2D inside, zero in unused slots), one-cycle latency.
`timescale 1ns/1ps
module screen_rom_tb;
  import tb_ref_pkg::*;
  logic clk = 0;
  logic [10:0] addr = 0;
  logic [7:0] dout_a, dout_b;
  int checks = 0, failures = 0;

  screen_rom                        dut_a (.clk, .addr, .dout(dout_a));
  screen_rom #(.FRAME_TILE(8'd2))   dut_b (.clk, .addr, .dout(dout_b));

  always #20 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2048; i++) begin
      @(negedge clk) addr = 11'(i);
      @(negedge clk);
      checks++;
      if (dout_a !== screen_tile(8'd1, i / 64, i % 64) || dout_b !== screen_tile(8'd2, i / 64, i % 64)) begin
        failures++;
        $display("FAIL: slot %0d read %h/%h expected %h/%h", i, dout_a, dout_b,
                 screen_tile(8'd1, i / 64, i % 64), screen_tile(8'd2, i / 64, i % 64));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
