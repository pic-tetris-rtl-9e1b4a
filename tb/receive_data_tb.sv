// receive_data_tb - sends random bytes over the serial link at 10 MHz (25 MHz
// system clock) with varying gaps and checks that every byte arrives once, in
// order, with its value intact, and within 5 clk cycles of the serial clock
// edge that shifted in its last bit.
`timescale 1ns/1ps
module receive_data_tb;
  logic clk = 0, rst = 0, serial_clk = 0, serial_data = 0;
  logic [7:0] rx_data;
  logic rx_valid;
  int checks = 0, failures = 0;

  receive_data dut (.*);

  always #20 clk = ~clk;   // 25 MHz

  logic [7:0] sent[$];
  realtime last_edge;
  int n_rx = 0;

  task automatic send_byte(input logic [7:0] b);
    for (int i = 7; i >= 0; i--) begin
      serial_data = b[i];
      #50 serial_clk = 1;
      if (i == 0) last_edge = $realtime;
      #50 serial_clk = 0;
    end
  endtask

  always @(posedge clk) begin
    if (rx_valid) begin
      logic [7:0] exp;
      checks++;
      if (sent.size() == 0) begin
        failures++; $display("FAIL: byte %h received, none sent", rx_data);
      end else begin
        exp = sent.pop_front();
        if (rx_data !== exp) begin
          failures++; $display("FAIL: byte %0d got %h expected %h", n_rx, rx_data, exp);
        end
      end
      checks++;
      if ($realtime - last_edge > 5 * 40) begin
        failures++; $display("FAIL: byte %0d latency %0t", n_rx, $realtime - last_edge);
      end
      n_rx++;
    end
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5 rst = 1;
    #92 rst = 0;
    #300;
    for (int n = 0; n < 100; n++) begin
      logic [7:0] b;
      b = 8'($urandom);
      if (n == 0) b = 8'hA5;
      if (n == 1) b = 8'h01;
      sent.push_back(b);
      send_byte(b);
      #(($urandom % 4) * 37);
    end
    #1000;
    checks++;
    if (n_rx != 100 || sent.size() != 0) begin
      failures++; $display("FAIL: received %0d of 100 bytes", n_rx);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
