// memory_module: the parallel-access memory of the FDTD/FIT machine.
//
// Six field memories, one per component (e_x e_y e_z b_x b_y b_z), each with
// three copies of the field and one PML split memory (see field_memory),
// plus three further memories: the boundary-condition word of every cell
// (conductor bit, PML flag and PML depth indices), the grid-information word
// of every cell (material constants) and the input signal, one excitation
// sample per time step. The memory map follows the machine's memory module;
// the word formats are this design's (see fdtd_pkg).
//
// All memories share one write address: the calculation module writes the
// three components of one cell in one cycle, and the host loads a whole cell
// in one cycle. Reads are clocked, one cycle latency. cell_raddr addresses
// the boundary and grid-information memories (the cell being computed).
module memory_module
  import fdtd_pkg::*;
#(
  parameter int unsigned AW = DEF_XW + DEF_YW + DEF_ZW,
  parameter int unsigned TW = DEF_TW
) (
  input  logic          clk,
  // field write port
  input  logic [AW-1:0] waddr,
  input  logic [5:0]    f_we,
  input  field_t        f_wdata     [6],
  input  logic [5:0]    split_we,
  input  field_t        split_wdata [6],
  // boundary / grid-information write (host only)
  input  logic          bg_we,
  input  bound_t        bnd_wdata,
  input  grid_t         grid_wdata,
  // field reads: per component, own cell and two neighbours
  input  logic [AW-1:0] f_raddr     [6][3],
  output field_t        f_rdata     [6][3],
  output field_t        split_rdata [6],
  // boundary / grid-information read
  input  logic [AW-1:0] cell_raddr,
  output bound_t        bnd_rdata,
  output grid_t         grid_rdata,
  // input signal memory
  input  logic          sig_we,
  input  logic [TW-1:0] sig_waddr,
  input  field_t        sig_wdata,
  input  logic [TW-1:0] sig_raddr,
  output field_t        sig_rdata
);

  for (genvar c = 0; c < 6; c++) begin : g_comp
    field_memory #(.AW(AW)) u_fmem (
      .clk        (clk),
      .we         (f_we[c]),
      .waddr      (waddr),
      .wdata      (f_wdata[c]),
      .split_we   (split_we[c]),
      .split_wdata(split_wdata[c]),
      .raddr      (f_raddr[c]),
      .rdata      (f_rdata[c]),
      .split_rdata(split_rdata[c])
    );
  end

  logic [$bits(bound_t)-1:0] bnd_q;
  logic [$bits(grid_t)-1:0]  grid_q;

  field_ram #(.AW(AW), .W($bits(bound_t))) u_bound (
    .clk(clk), .we(bg_we), .waddr(waddr), .wdata(bnd_wdata),
    .raddr(cell_raddr), .rdata(bnd_q)
  );

  field_ram #(.AW(AW), .W($bits(grid_t))) u_grid (
    .clk(clk), .we(bg_we), .waddr(waddr), .wdata(grid_wdata),
    .raddr(cell_raddr), .rdata(grid_q)
  );

  field_ram #(.AW(TW), .W(DATA_W)) u_signal (
    .clk(clk), .we(sig_we), .waddr(sig_waddr), .wdata(sig_wdata),
    .raddr(sig_raddr), .rdata(sig_rdata)
  );

  assign bnd_rdata  = bound_t'(bnd_q);
  assign grid_rdata = grid_t'(grid_q);

endmodule
