// vga_sync - 640x480 VGA timing from a 25 MHz pixel clock.
//
// How it works: a column counter runs 0..799 and a line counter 0..524, the
// line counter stepping each time the column counter wraps. From the counter
// values the next clock edge registers: hsync low for columns 7..102, vsync low
// for lines 2..3, and de (display enable) high for columns 151..790 of lines
// 37..516, i.e. 640 x 480 visible pixels. frame_start is a one-cycle pulse at
// column 0 of line 0, and line_end a one-cycle pulse in the first column after
// the visible part of every line; both are registered like the syncs.
//
// Interface: clk/rst in; hsync, vsync, de, frame_start, line_end out, all
// registered and mutually aligned (one clk after the counter values they
// come from).
//
// Following the original design: the 800 x 525 totals and every window
// boundary above. This design's own choices: the line counter is stepped
// synchronously at the end of each line (the original clocked it from the
// falling edge of hsync), and the frame_start/line_end pulses for the tile
// counters.
module vga_sync
  import tetris_pkg::*;
(
  input  logic clk,
  input  logic rst,
  output logic hsync,
  output logic vsync,
  output logic de,
  output logic frame_start,
  output logic line_end
);

  logic [9:0] h_q, v_q;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      h_q <= '0;
      v_q <= '0;
    end else if (h_q == 10'(H_TOTAL - 1)) begin
      h_q <= '0;
      v_q <= (v_q == 10'(V_TOTAL - 1)) ? '0 : v_q + 10'd1;
    end else begin
      h_q <= h_q + 10'd1;
    end
  end

  logic h_vis, v_vis;
  assign h_vis = (h_q >= 10'(H_VIS_START)) && (h_q < 10'(H_VIS_END));
  assign v_vis = (v_q >= 10'(V_VIS_START)) && (v_q < 10'(V_VIS_END));

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      hsync       <= 1'b1;
      vsync       <= 1'b1;
      de          <= 1'b0;
      frame_start <= 1'b0;
      line_end    <= 1'b0;
    end else begin
      hsync       <= !((h_q >= 10'(H_SYNC_START)) && (h_q < 10'(H_SYNC_END)));
      vsync       <= !((v_q >= 10'(V_SYNC_START)) && (v_q < 10'(V_SYNC_END)));
      de          <= h_vis && v_vis;
      frame_start <= (h_q == '0) && (v_q == '0);
      line_end    <= (h_q == 10'(H_VIS_END)) && v_vis;
    end
  end

endmodule
