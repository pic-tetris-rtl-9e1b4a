// rgb_dac_model - behavioural model (not synthesizable) of the resistor D/A
// converter between the FPGA colour pins and the monitor.
//
// Each colour bit drives the monitor's 75 ohm input through its own resistor:
// 470 ohm for the most significant bit, 1000 ohm for the next and 2000 ohm for
// the third (red and green; blue has only 470 and 1000). A driven pin is at
// VDD (3.3 V) or 0 V, so the node voltage is the conductance-weighted mean:
//   V = VDD * sum(bit_i / R_i) / (sum(1 / R_i) + 1 / 75)
// which reaches about 0.71 V for red and green all ones and 0.63 V for blue.
module rgb_dac_model #(
  parameter real VDD    = 3.3,
  parameter real R_LOAD = 75.0
) (
  input  logic [2:0] red,
  input  logic [2:0] green,
  input  logic [1:0] blue,
  output real        v_red,
  output real        v_green,
  output real        v_blue
);

  function automatic real node3(input logic [2:0] b);
    real g_on, g_all;
    g_on  = (b[2] ? 1.0 / 470.0 : 0.0) + (b[1] ? 1.0 / 1000.0 : 0.0) + (b[0] ? 1.0 / 2000.0 : 0.0);
    g_all = 1.0 / 470.0 + 1.0 / 1000.0 + 1.0 / 2000.0 + 1.0 / R_LOAD;
    return VDD * g_on / g_all;
  endfunction

  function automatic real node2(input logic [1:0] b);
    real g_on, g_all;
    g_on  = (b[1] ? 1.0 / 470.0 : 0.0) + (b[0] ? 1.0 / 1000.0 : 0.0);
    g_all = 1.0 / 470.0 + 1.0 / 1000.0 + 1.0 / R_LOAD;
    return VDD * g_on / g_all;
  endfunction

  always_comb begin
    v_red   = node3(red);
    v_green = node3(green);
    v_blue  = node2(blue);
  end

endmodule
