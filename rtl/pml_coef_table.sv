// pml_coef_table: the PML material constants.
//
// A cell inside the perfectly matched layer carries, per axis, an index of
// its depth into the layer (0 = no loss along that axis). This table turns
// the three indices into the update constants {ca, cb} of each axis, with a
// separate set for the E half step (electric conductivity) and for the b
// half step (magnetic conductivity). The machine keeps these constants
// inside the FPGA; the depth-indexed table, its size (2**PML_IW entries per
// half step) and loading it from the host are this design's choices.
//
// Interface: the host writes one entry per cycle (we, wphase, widx, wdata).
// The three read ports are combinational: rphase selects the set, rx/ry/rz
// the depth along x, y and z. Reset clears every entry to zero.
module pml_coef_table
  import fdtd_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              we,
  input  phase_e            wphase,
  input  logic [PML_IW-1:0] widx,
  input  pml_coef_t         wdata,
  input  phase_e            rphase,
  input  logic [PML_IW-1:0] rx, ry, rz,
  output pml_coef_t         cx, cy, cz
);

  localparam int unsigned N = 2**PML_IW;

  pml_coef_t tab [2][N];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int p = 0; p < 2; p++)
        for (int d = 0; d < N; d++)
          tab[p][d] <= '0;
    end else if (we) begin
      tab[wphase][widx] <= wdata;
    end
  end

  always_comb begin
    cx = tab[rphase][rx];
    cy = tab[rphase][ry];
    cz = tab[rphase][rz];
  end

endmodule
