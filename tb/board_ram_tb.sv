// board_ram_tb - checks the game-buffer RAM against an array model: all 2048
// bytes start at zero, a read returns the addressed byte exactly one cycle
// later, and random writes (including write and read of the same address in
// one cycle, which returns the old byte) land where they should.
`timescale 1ns/1ps
module board_ram_tb;
  logic clk = 0;
  logic [10:0] addr = 0;
  logic we = 0;
  logic [7:0] din = 0, dout;
  int checks = 0, failures = 0;
  logic [7:0] model [2048];

  board_ram dut (.*);

  always #20 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cycle(input logic [10:0] a, input logic w, input logic [7:0] d);
    logic [7:0] exp;
    @(negedge clk) begin addr = a; we = w; din = d; end
    exp = model[a];
    if (w) model[a] = d;
    @(negedge clk) we = 0;
    checks++;
    if (dout !== exp) begin
      failures++; $display("FAIL: addr %0d read %h expected %h", a, dout, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 2048; i++) model[i] = 0;
    for (int i = 0; i < 2048; i++) cycle(11'(i), 0, 0);           // power-up zero
    for (int i = 0; i < 4000; i++) cycle(11'($urandom), 1'($urandom), 8'($urandom));
    for (int i = 0; i < 2048; i++) cycle(11'(i), 0, 0);           // final contents
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
