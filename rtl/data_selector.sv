// data_selector: connects the memory module to the calculation module.
//
// Address side (cycle t): from the cell (i,j,k) being issued it forms the
// read address of every field memory copy. Memory1 of each component is read
// at the cell itself; Memory2 and Memory3 at the neighbours that component
// is needed at:
//   e_x: (i,j+1,k) (i,j,k+1)    b_x: (i,j-1,k) (i,j,k-1)
//   e_y: (i+1,j,k) (i,j,k+1)    b_y: (i-1,j,k) (i,j,k-1)
//   e_z: (i+1,j,k) (i,j+1,k)    b_z: (i-1,j,k) (i,j-1,k)
// These offsets are the machine's memory map. The addresses do not depend on
// the half step: both are served by the same reads. A neighbour outside the
// active grid is flagged, and its value is replaced by zero one cycle later
// (this design's choice for the grid edge; an absorbing edge is made with PML
// cells, a reflecting one with conductor cells).
//
// Data side (cycle t+1): the words arrive, and the selector hands each lane
// the four curl operands, the old value (plus any source), the PML split
// part and the constants of its component:
//   E half step: e_x = e_x + Ce[(b_z - b_z(j-1)) - (b_y - b_y(k-1))]
//                e_y = e_y + Ce[(b_x - b_x(k-1)) - (b_z - b_z(i-1))]
//                e_z = e_z + Ce[(b_y - b_y(i-1)) - (b_x - b_x(j-1))]
//   b half step: b_x = b_x - Ch[(e_z(j+1) - e_z) - (e_y(k+1) - e_y)]
//                b_y = b_y - Ch[(e_x(k+1) - e_x) - (e_z(i+1) - e_z)]
//                b_z = b_z - Ch[(e_y(i+1) - e_y) - (e_x(j+1) - e_x)]
// The PML split part of lane x is driven by the y derivative and the rest by
// the z derivative; lane y: z then x; lane z: x then y. The conductor mask is
// applied to the E half step only.
module data_selector
  import fdtd_pkg::*;
#(
  parameter int unsigned XW = DEF_XW,
  parameter int unsigned YW = DEF_YW,
  parameter int unsigned ZW = DEF_ZW,
  localparam int unsigned AW = XW + YW + ZW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [XW:0]   nx,
  input  logic [YW:0]   ny,
  input  logic [ZW:0]   nz,
  // address side, cycle t
  input  logic          issue_valid,
  input  phase_e        issue_phase,
  input  logic [XW-1:0] i,
  input  logic [YW-1:0] j,
  input  logic [ZW-1:0] k,
  output logic [AW-1:0] f_raddr [6][3],
  output logic [AW-1:0] cell_raddr,
  // data side, cycle t+1
  input  field_t        f_rdata     [6][3],
  input  field_t        split_rdata [6],
  input  bound_t        bnd,
  input  grid_t         grid,
  input  field_t        src_add     [3],
  output logic [PML_IW-1:0] pml_rx, pml_ry, pml_rz,
  input  pml_coef_t     pml_cx, pml_cy, pml_cz,
  output logic          sel_valid,
  output phase_e        sel_phase,
  output logic [AW-1:0] sel_addr,
  output lane_in_t      lane_in [3],
  output logic [5:0]    edge_zeroed
);

  // ---------------------------------------------------------------- address
  logic [XW-1:0] ip, im;
  logic [YW-1:0] jp, jm;
  logic [ZW-1:0] kp, km;
  logic          ip_out, im_out, jp_out, jm_out, kp_out, km_out;
  logic          oob [6][3];

  always_comb begin
    ip = i + 1'b1;  im = i - 1'b1;
    jp = j + 1'b1;  jm = j - 1'b1;
    kp = k + 1'b1;  km = k - 1'b1;
    ip_out = ({1'b0, i} + 1'b1 >= nx);
    jp_out = ({1'b0, j} + 1'b1 >= ny);
    kp_out = ({1'b0, k} + 1'b1 >= nz);
    im_out = (i == '0);
    jm_out = (j == '0);
    km_out = (k == '0);

    cell_raddr = {k, j, i};
    for (int c = 0; c < 6; c++) begin
      f_raddr[c][0] = {k, j, i};
      oob[c][0]     = 1'b0;
    end
    f_raddr[C_EX][1] = {k,  jp, i};   oob[C_EX][1] = jp_out;
    f_raddr[C_EX][2] = {kp, j,  i};   oob[C_EX][2] = kp_out;
    f_raddr[C_EY][1] = {k,  j,  ip};  oob[C_EY][1] = ip_out;
    f_raddr[C_EY][2] = {kp, j,  i};   oob[C_EY][2] = kp_out;
    f_raddr[C_EZ][1] = {k,  j,  ip};  oob[C_EZ][1] = ip_out;
    f_raddr[C_EZ][2] = {k,  jp, i};   oob[C_EZ][2] = jp_out;
    f_raddr[C_BX][1] = {k,  jm, i};   oob[C_BX][1] = jm_out;
    f_raddr[C_BX][2] = {km, j,  i};   oob[C_BX][2] = km_out;
    f_raddr[C_BY][1] = {k,  j,  im};  oob[C_BY][1] = im_out;
    f_raddr[C_BY][2] = {km, j,  i};   oob[C_BY][2] = km_out;
    f_raddr[C_BZ][1] = {k,  j,  im};  oob[C_BZ][1] = im_out;
    f_raddr[C_BZ][2] = {k,  jm, i};   oob[C_BZ][2] = jm_out;
  end

  // Delay to the data side.
  logic oob_q [6][3];
  always_ff @(posedge clk) begin
    if (!rst_n) sel_valid <= 1'b0;
    else        sel_valid <= issue_valid;
    sel_phase <= issue_phase;
    sel_addr  <= {k, j, i};
    oob_q     <= oob;
  end

  // ------------------------------------------------------------------- data
  // Field words with out-of-grid neighbours replaced by zero.
  field_t v [6][3];
  always_comb begin
    for (int c = 0; c < 6; c++)
      for (int m = 0; m < 3; m++)
        v[c][m] = oob_q[c][m] ? '0 : f_rdata[c][m];
    for (int c = 0; c < 6; c++)
      edge_zeroed[c] = sel_valid && (oob_q[c][1] || oob_q[c][2]);
  end

  assign pml_rx = bnd.px;
  assign pml_ry = bnd.py;
  assign pml_rz = bnd.pz;

  always_comb begin
    for (int l = 0; l < 3; l++) begin
      lane_in[l].valid = sel_valid;
      lane_in[l].neg   = (sel_phase == PH_H);
      lane_in[l].pml   = bnd.pml;
      lane_in[l].mask  = (sel_phase == PH_H) ? 1'b1 : bnd.vac;
      lane_in[l].c     = (sel_phase == PH_H) ? grid.ch : grid.ce;
    end
    // PML constants: first split part / second split part
    lane_in[0].pa = pml_cy;  lane_in[0].pb = pml_cz;
    lane_in[1].pa = pml_cz;  lane_in[1].pb = pml_cx;
    lane_in[2].pa = pml_cx;  lane_in[2].pb = pml_cy;

    if (sel_phase == PH_E) begin
      lane_in[0].old   = sat_field(acc_t'(v[C_EX][0]) + acc_t'(src_add[0]));
      lane_in[0].split = split_rdata[C_EX];
      lane_in[0].f1 = v[C_BZ][0];  lane_in[0].f2 = v[C_BZ][2];
      lane_in[0].f3 = v[C_BY][0];  lane_in[0].f4 = v[C_BY][2];

      lane_in[1].old   = sat_field(acc_t'(v[C_EY][0]) + acc_t'(src_add[1]));
      lane_in[1].split = split_rdata[C_EY];
      lane_in[1].f1 = v[C_BX][0];  lane_in[1].f2 = v[C_BX][2];
      lane_in[1].f3 = v[C_BZ][0];  lane_in[1].f4 = v[C_BZ][1];

      lane_in[2].old   = sat_field(acc_t'(v[C_EZ][0]) + acc_t'(src_add[2]));
      lane_in[2].split = split_rdata[C_EZ];
      lane_in[2].f1 = v[C_BY][0];  lane_in[2].f2 = v[C_BY][1];
      lane_in[2].f3 = v[C_BX][0];  lane_in[2].f4 = v[C_BX][1];
    end else begin
      lane_in[0].old   = sat_field(acc_t'(v[C_BX][0]) + acc_t'(src_add[0]));
      lane_in[0].split = split_rdata[C_BX];
      lane_in[0].f1 = v[C_EZ][2];  lane_in[0].f2 = v[C_EZ][0];
      lane_in[0].f3 = v[C_EY][2];  lane_in[0].f4 = v[C_EY][0];

      lane_in[1].old   = sat_field(acc_t'(v[C_BY][0]) + acc_t'(src_add[1]));
      lane_in[1].split = split_rdata[C_BY];
      lane_in[1].f1 = v[C_EX][2];  lane_in[1].f2 = v[C_EX][0];
      lane_in[1].f3 = v[C_EZ][1];  lane_in[1].f4 = v[C_EZ][0];

      lane_in[2].old   = sat_field(acc_t'(v[C_BZ][0]) + acc_t'(src_add[2]));
      lane_in[2].split = split_rdata[C_BZ];
      lane_in[2].f1 = v[C_EY][1];  lane_in[2].f2 = v[C_EY][0];
      lane_in[2].f3 = v[C_EX][1];  lane_in[2].f4 = v[C_EX][0];
    end
  end

endmodule
