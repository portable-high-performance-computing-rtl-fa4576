// power_input: injects the excitation into the grid.
//
// The input-signal memory holds one excitation sample per time step. While
// the machine sweeps the grid, this block compares the cell being computed
// with the programmed source cell; on a match, and when the half step is the
// one of the source component (E for e_x/e_y/e_z, b for b_x/b_y/b_z), it adds
// the sample to the old value of that component, so the update adds the
// excitation to the field (an additive, "soft" source). The machine names a
// power input block and an input-signal memory; the single source point and
// the additive injection are this design's choices.
//
// Interface: combinational. cell_addr, phase and valid describe the cell whose memory
// words are on the read ports this cycle; add[l] is the value to add to lane
// l (x, y, z) and hit flags that the source was applied.
module power_input
  import fdtd_pkg::*;
#(
  parameter int unsigned AW = DEF_XW + DEF_YW + DEF_ZW
) (
  input  logic          src_en,
  input  logic [AW-1:0] src_addr,
  input  comp_e         src_comp,
  input  field_t        sample,
  input  logic          valid,
  input  phase_e        phase,
  input  logic [AW-1:0] cell_addr,
  output field_t        add [3],
  output logic          hit
);

  phase_e     src_phase;
  logic [1:0] src_lane;

  always_comb begin
    src_phase = (src_comp inside {C_BX, C_BY, C_BZ}) ? PH_H : PH_E;
    unique case (src_comp)
      C_EX, C_BX: src_lane = 2'd0;
      C_EY, C_BY: src_lane = 2'd1;
      default:    src_lane = 2'd2;
    endcase
    hit = src_en && valid && (phase == src_phase) && (cell_addr == src_addr);
    for (int l = 0; l < 3; l++)
      add[l] = (hit && src_lane == 2'(l)) ? sample : '0;
  end

endmodule
