// component_calc: one calculation lane of the calculation module.
//
// The normal FDTD/FIT circuit (update_unit) and the PML circuit (pml_unit)
// work side by side on the same operands; a selector passes the PML result
// when the cell's PML flag is set, the normal result otherwise. The result
// then goes through the conductor gate: the boundary-condition bit of the
// cell (1 = vacuum/material, 0 = perfect conductor) is ANDed with every bit
// of the new value, so a conductor cell is held at zero without any extra
// clock. Both mechanisms follow the machine's description; running both
// circuits every cycle (instead of enabling one) is this design's choice.
//
// Timing: result follows the operands by CALC_LAT = 2 clocks, one result per
// clock. out.split is the new PML split part; it is only meaningful, and
// only written back, when out.pml is set.
module component_calc
  import fdtd_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  lane_in_t  in,
  output lane_out_t out
);

  logic   n_valid, p_valid;
  field_t n_res, p_total, p_split;
  logic [CALC_LAT-1:0] pml_d, mask_d;

  update_unit u_normal (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in.valid),
    .neg      (in.neg),
    .old      (in.old),
    .f1       (in.f1),
    .f2       (in.f2),
    .f3       (in.f3),
    .f4       (in.f4),
    .c        (in.c),
    .out_valid(n_valid),
    .result   (n_res)
  );

  pml_unit u_pml (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in.valid),
    .neg      (in.neg),
    .total    (in.old),
    .split    (in.split),
    .f1       (in.f1),
    .f2       (in.f2),
    .f3       (in.f3),
    .f4       (in.f4),
    .pa       (in.pa),
    .pb       (in.pb),
    .out_valid(p_valid),
    .total_new(p_total),
    .split_new(p_split)
  );

  // Cell flags travel alongside the two circuits.
  always_ff @(posedge clk) begin
    pml_d  <= {pml_d[CALC_LAT-2:0],  in.pml};
    mask_d <= {mask_d[CALC_LAT-2:0], in.mask};
  end

  // Normal grid / PML selector, then the conductor AND gate.
  field_t sel_total, sel_split;
  always_comb begin
    sel_total = pml_d[CALC_LAT-1] ? p_total : n_res;
    sel_split = p_split;
    out.valid = n_valid;
    out.pml   = pml_d[CALC_LAT-1];
    out.total = sel_total & {DATA_W{mask_d[CALC_LAT-1]}};
    out.split = sel_split & {DATA_W{mask_d[CALC_LAT-1]}};
  end

  // Both circuits share the lane's timing.
  a_lanes_in_step: assert property (@(posedge clk) disable iff (!rst_n) n_valid == p_valid)
    else $error("component_calc: normal and PML circuits out of step");

endmodule
