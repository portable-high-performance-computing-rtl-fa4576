// calculation_module: three lanes that compute the three components of one
// field (e_x, e_y, e_z or b_x, b_y, b_z) of one cell in parallel.
//
// The three components have the same algebraic form, so the lanes are
// identical component_calc instances; the data selector gives each lane its
// own operands and constants. Lanes 0, 1, 2 are the x, y and z components.
// Timing: results follow the operands by CALC_LAT clocks, one cell per clock.
module calculation_module
  import fdtd_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  lane_in_t  lane_in  [3],
  output lane_out_t lane_out [3]
);

  for (genvar l = 0; l < 3; l++) begin : g_lane
    component_calc u_lane (
      .clk  (clk),
      .rst_n(rst_n),
      .in   (lane_in[l]),
      .out  (lane_out[l])
    );
  end

endmodule
