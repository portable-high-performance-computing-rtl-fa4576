// fdtd_pkg: types and constants shared by the FDTD/FIT machine.
//
// The machine updates the six field components of a 3D Yee grid, named as in
// finite integration: e_x, e_y, e_z (electric) and b_x, b_y, b_z (magnetic).
// Field values are signed fixed-point integers of DATA_W bits. Update
// constants (C = dt/(eps*dl) or dt/(mu*dl) and the PML constants) are
// unsigned fixed point with COEF_FRAC fraction bits, so 1.0 is 2**COEF_FRAC.
// The word widths and the fixed-point format are this design's choice; the
// grid capacity (256 x 256 x 64 cells) is the size printed for the machine.
package fdtd_pkg;

  // Grid capacity, as bit widths of the i, j, k cell indices.
  localparam int unsigned DEF_XW = 8;   // 256 cells along x
  localparam int unsigned DEF_YW = 8;   // 256 cells along y
  localparam int unsigned DEF_ZW = 6;   // 64 cells along z

  localparam int unsigned DATA_W    = 16; // field word
  localparam int unsigned COEF_W    = 18; // update constant word
  localparam int unsigned COEF_FRAC = 16; // fraction bits of a constant
  localparam int unsigned PML_IW    = 4;  // PML depth index width
  localparam int unsigned DEF_TW    = 12; // input-signal memory: 4096 time steps

  typedef logic signed [DATA_W-1:0] field_t;
  typedef logic        [COEF_W-1:0] coef_t;

  // Field components; also the column order of the memory module.
  typedef enum logic [2:0] {
    C_EX = 3'd0, C_EY = 3'd1, C_EZ = 3'd2,
    C_BX = 3'd3, C_BY = 3'd4, C_BZ = 3'd5
  } comp_e;

  // Half step being computed: E from b, or b from E.
  typedef enum logic {PH_E = 1'b0, PH_H = 1'b1} phase_e;

  // Boundary-condition word stored for every cell.
  //   vac      : 1 = vacuum/material, 0 = perfect conductor (E forced to 0)
  //   pml      : 1 = cell is inside the PML, use the PML circuit
  //   px/py/pz : depth index into the PML constant table for each axis
  typedef struct packed {
    logic              vac;
    logic              pml;
    logic [PML_IW-1:0] px;
    logic [PML_IW-1:0] py;
    logic [PML_IW-1:0] pz;
  } bound_t;

  // Grid-information word: material constants of the cell.
  typedef struct packed {
    coef_t ce;  // dt/(eps*dl), used for the E half step
    coef_t ch;  // dt/(mu*dl),  used for the b half step
  } grid_t;

  // One entry of the PML constant table: X(n+1) = ca*X(n) +/- cb*dF.
  typedef struct packed {
    coef_t ca;
    coef_t cb;
  } pml_coef_t;

  // Everything stored for one cell; the host loads and reads cells as a whole.
  typedef struct packed {
    field_t [5:0] f;      // total fields, index = comp_e
    field_t [5:0] split;  // PML split parts: e_xy e_yz e_zx b_xy b_yz b_zx
    bound_t       bnd;
    grid_t        grid;
  } cell_t;

  // Operands of one calculation lane for one cell.
  typedef struct packed {
    logic      valid;
    logic      neg;     // 1 for the b half step: X - C*[...]
    logic      pml;     // use the PML circuit
    logic      mask;    // 0 forces the result to zero (conductor)
    field_t    old;     // X(n-1), source already added
    field_t    split;   // stored PML split part (first term)
    field_t    f1, f2, f3, f4; // X + C[(f1 - f2) - (f3 - f4)]
    coef_t     c;       // material constant for the normal circuit
    pml_coef_t pa;      // PML constants of the first split part
    pml_coef_t pb;      // PML constants of the second split part
  } lane_in_t;

  // Result of one lane.
  typedef struct packed {
    logic   valid;
    logic   pml;
    field_t total;
    field_t split;
  } lane_out_t;

  // Wide signed intermediate used by the update arithmetic.
  localparam int unsigned ACC_W = 48;
  typedef logic signed [ACC_W-1:0] acc_t;

  // Clamp a wide value to the field range.
  function automatic field_t sat_field(acc_t v);
    acc_t lo, hi;
    lo = -(acc_t'(1) <<< (DATA_W-1));
    hi =  (acc_t'(1) <<< (DATA_W-1)) - 1;
    if (v > hi)      return field_t'(hi);
    else if (v < lo) return field_t'(lo);
    else             return field_t'(v);
  endfunction

  // Scale a fixed-point product back to field units, rounding half up.
  function automatic acc_t round_coef(acc_t prod);
    return (prod + (acc_t'(1) <<< (COEF_FRAC-1))) >>> COEF_FRAC;
  endfunction

  // Pipeline depth of a calculation lane (operands in -> result out).
  localparam int unsigned CALC_LAT = 2;

endpackage
