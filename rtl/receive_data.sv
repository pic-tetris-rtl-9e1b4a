// receive_data - serial-to-parallel receiver for the link from the game
// microcontroller.
//
// How it works: an 8-bit shift register runs on the microcontroller's serial
// clock (10 MHz) and samples serial_data on every rising edge, MSB first. A
// 3-bit counter marks every eighth bit; the completed byte is then copied into
// a holding register and a toggle flag flips. The flag crosses into the 25 MHz
// clk domain through a two-flop synchronizer; a change of the synchronized flag
// captures the (by then stable) holding register into rx_data and raises
// rx_valid for one clk cycle. The holding register is stable for the next eight
// serial clocks (about 20 clk cycles), far longer than the three cycles the
// hand-over needs.
//
// Interface: clk/rst (25 MHz, asynchronous active-high reset, which also
// clears the serial-side bit counter so that byte framing starts at reset),
// serial_clk/serial_data from the microcontroller, rx_data/rx_valid out.
// Timing: rx_valid rises 3 to 4 clk cycles after the serial clock edge that
// shifted in the eighth bit.
//
// Following the original design: an 8-bit shift register on the serial clock
// and a synchronizer into the 25 MHz domain, framing by counting bits from
// reset. This design's own choices: the toggle-flag hand-over (the original
// clocked the output register with a derived strobe) and MSB-first order (the
// microcontroller's SPI port sends MSB first).
module receive_data (
  input  logic       clk,
  input  logic       rst,
  input  logic       serial_clk,
  input  logic       serial_data,
  output logic [7:0] rx_data,
  output logic       rx_valid
);

  // ---------------- serial clock domain ----------------
  logic [6:0] shift_q;
  logic [2:0] bit_cnt_q;
  logic [7:0] hold_q;
  logic       toggle_q;

  always_ff @(posedge serial_clk or posedge rst) begin
    if (rst) begin
      shift_q   <= '0;
      bit_cnt_q <= '0;
      hold_q    <= '0;
      toggle_q  <= 1'b0;
    end else begin
      shift_q   <= {shift_q[5:0], serial_data};
      bit_cnt_q <= bit_cnt_q + 3'd1;
      if (bit_cnt_q == 3'd7) begin
        hold_q   <= {shift_q, serial_data};
        toggle_q <= ~toggle_q;
      end
    end
  end

  // ---------------- 25 MHz domain ----------------
  logic [2:0] tog_sync_q;   // [0],[1] synchronizer, [2] previous value

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      tog_sync_q <= '0;
      rx_data    <= '0;
      rx_valid   <= 1'b0;
    end else begin
      tog_sync_q <= {tog_sync_q[1:0], toggle_q};
      rx_valid   <= tog_sync_q[2] ^ tog_sync_q[1];
      if (tog_sync_q[2] ^ tog_sync_q[1])
        rx_data <= hold_q;
    end
  end

endmodule
