// control_fsm_tb - drives status codes and received bytes into the control
// unit and checks, for every field (board, next piece, score, high score,
// level), that each byte is written one cycle after it arrives, at the slot
// the map layout gives (start row/column and row length of the field, worked
// out here from the layout, not from the RTL), and that every write transfer
// ends with exactly one single-cycle buffer switch. The start/play/end codes
// must raise their command for as long as they are held and cause no switch.
`timescale 1ns/1ps
module control_fsm_tb;
  import tb_ref_pkg::*;
  logic clk = 0, rst = 0;
  logic [3:0] status = 0;
  logic [7:0] rx_data = 0;
  logic rx_valid = 0;
  logic exp_v = 0;   // a byte the control unit should accept
  logic wr_en, mem_switch, go_start, go_play, go_end;
  logic [10:0] wr_addr;
  logic [7:0] wr_data;
  int checks = 0, failures = 0;
  int n_switch = 0, n_wr = 0;

  control_fsm dut (.*);

  always #20 clk = ~clk;

  // expected writes, queued when the byte is presented
  int exp_addr[$];
  logic [7:0] exp_data[$];
  logic valid_q = 0;

  always @(posedge clk) begin
    if (mem_switch) n_switch++;
    // write must follow a byte by exactly one cycle
    if (wr_en !== valid_q) begin
      failures++; $display("FAIL: wr_en=%b one cycle after rx_valid=%b at %0t", wr_en, valid_q, $time);
    end
    if (wr_en) begin
      checks++; n_wr++;
      if (exp_addr.size() == 0) begin
        failures++; $display("FAIL: unexpected write");
      end else begin
        int a;
        logic [7:0] d;
        a = exp_addr.pop_front();
        d = exp_data.pop_front();
        if (wr_addr != 11'(a) || wr_data != d) begin
          failures++;
          $display("FAIL: write at %0d data %h, expected %0d data %h", wr_addr, wr_data, a, d);
        end
      end
    end
    valid_q <= exp_v;
  end

  task automatic set_status(input logic [3:0] s);
    @(negedge clk) status = s;
  endtask

  // one write transfer of n bytes into a field at (row0, col0), len wide
  task automatic transfer(input logic [3:0] code, input int row0, input int col0,
                          input int len, input int n, input bit same_cycle);
    int sw0;
    if (same_cycle) begin
      // the first byte arrives in the very cycle the code appears
      @(negedge clk) begin status = code; rx_valid = 1; exp_v = 1; rx_data = 8'($urandom); end
      exp_addr.push_back(field_slot(row0, col0, len, 0)); exp_data.push_back(rx_data);
      @(negedge clk) begin rx_valid = 0; exp_v = 0; end
    end else begin
      set_status(code);
      repeat (3) @(negedge clk);
    end
    for (int i = same_cycle ? 1 : 0; i < n; i++) begin
      repeat ($urandom % 20 + 2) @(negedge clk);
      rx_data = 8'($urandom); rx_valid = 1; exp_v = 1;
      exp_addr.push_back(field_slot(row0, col0, len, i)); exp_data.push_back(rx_data);
      @(negedge clk) begin rx_valid = 0; exp_v = 0; end
    end
    repeat (5) @(negedge clk);
    sw0 = n_switch;
    set_status(0);
    repeat (6) @(negedge clk);
    checks++;
    if (n_switch - sw0 != 1) begin
      failures++; $display("FAIL: code %0d ended with %0d switches", code, n_switch - sw0);
    end
    checks++;
    if (exp_addr.size() != 0) begin
      failures++; $display("FAIL: code %0d: %0d writes missing", code, exp_addr.size());
      exp_addr.delete(); exp_data.delete();
    end
  endtask

  task automatic command(input logic [3:0] code);
    int sw0;
    logic seen;
    sw0 = n_switch;
    set_status(code);
    repeat (2) @(negedge clk);
    seen = (code == 5) ? go_start : (code == 6) ? go_play : go_end;
    checks++;
    if (!seen || (go_start + go_play + go_end) != 1) begin
      failures++; $display("FAIL: command %0d: go_start=%b go_play=%b go_end=%b", code, go_start, go_play, go_end);
    end
    repeat (10) @(negedge clk);
    seen = (code == 5) ? go_start : (code == 6) ? go_play : go_end;
    checks++;
    if (!seen) begin failures++; $display("FAIL: command %0d not held", code); end
    set_status(0);
    repeat (3) @(negedge clk);
    checks++;
    if (go_start || go_play || go_end || n_switch != sw0) begin
      failures++; $display("FAIL: command %0d: still active or switched", code);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5 rst = 1;
    #50 rst = 0;
    // stray byte while idle: ignored
    @(negedge clk) rx_valid = 1; @(negedge clk) rx_valid = 0;
    command(5);
    command(6);
    for (int k = 0; k < 2; k++) begin
      transfer(4'd1, 4, 15, 10, 200, 0);   // board 10 x 20 at row 4, col 15
      transfer(4'd2, 16, 30, 7, 7, 0);     // score, 7 digits at row 16, col 30
      transfer(4'd8, 22, 3, 7, 7, 0);      // high score at row 22, col 3
      transfer(4'd4, 22, 32, 2, 2, 1);     // level at row 22, col 32
      transfer(4'd3, 8, 31, 4, 8, 0);      // next piece 4 x 2 at row 8, col 31
    end
    command(7);
    checks++;
    if (n_wr != 2 * (200 + 7 + 7 + 2 + 8)) begin
      failures++; $display("FAIL: %0d writes", n_wr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
