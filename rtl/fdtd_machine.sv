// fdtd_machine: memory-architecture 3D FDTD/FIT machine.
//
// The machine solves Maxwell's equations on a Yee grid by the leapfrog
// scheme. Every update has the same form, X(n+1) = X(n-1) +/- C[(f1 - f2) -
// (f3 - f4)], so one small dataflow circuit per component computes it in a
// single pass. Three such circuits (x, y, z) work in parallel on one cell, and
// the grid is swept one cell per clock. To feed them, every field component
// is stored three times in a parallel-access memory module, each copy read
// at a different neighbour, so the twelve field values of a cell come out of
// memory in one cycle. Material constants and boundary bits are stored for
// every cell, so dielectrics, conductors (a 0/1 bit ANDed with the result)
// and a split-field PML absorbing layer cost no extra clocks.
//
// Blocks: memory_module (field, boundary, grid-information and input-signal
// memories), data_selector, calculation_module (3 x component_calc, each an
// update_unit and a pml_unit), pml_coef_table, power_input and
// master_controller.
//
// Pipeline, one cell per clock: cycle t the controller issues (i,j,k) and the
// selector sends the read addresses; t+1 the words arrive and are routed to
// the lanes; t+2 and t+3 are the two lane stages; in t+3 the three new
// components (and PML split parts) are written back. A time step is the E
// sweep then the b sweep, each followed by a DRAIN = 3 clock stall, so one
// step takes 2*(nx*ny*nz + 3) clocks.
//
// Host port (used while busy is low): host_cell_we writes a whole cell
// (fields, PML split parts, boundary and grid words) at host_addr = {k,j,i};
// host_rd_en reads one back, host_rdata valid with host_rvalid one clock
// later; host_sig_we loads the input-signal memory; host_coef_we loads the
// PML constant table. start runs n_steps time steps on the nx*ny*nz grid at
// the low corner of the memory; done pulses at the end. Host writes while
// busy are ignored. The host port, word formats and edge handling are this
// design's; the memory map, the calculation circuits, the conductor bit,
// the PML circuit and the blocks of the FPGA follow the machine.
module fdtd_machine
  import fdtd_pkg::*;
#(
  parameter int unsigned XW = DEF_XW,  // 2**XW cells along x
  parameter int unsigned YW = DEF_YW,  // 2**YW cells along y
  parameter int unsigned ZW = DEF_ZW,  // 2**ZW cells along z
  parameter int unsigned TW = DEF_TW,  // 2**TW input-signal samples
  parameter int unsigned SW = 16,      // time-step counter width
  localparam int unsigned AW = XW + YW + ZW
) (
  input  logic              clk,
  input  logic              rst_n,
  // run control
  input  logic              start,
  input  logic [SW-1:0]     n_steps,
  input  logic [XW:0]       nx,
  input  logic [YW:0]       ny,
  input  logic [ZW:0]       nz,
  output logic              busy,
  output logic              done,
  output logic [SW-1:0]     step,
  // excitation
  input  logic              src_en,
  input  logic [AW-1:0]     src_addr,
  input  comp_e             src_comp,
  // host access
  input  logic              host_cell_we,
  input  logic              host_rd_en,
  input  logic [AW-1:0]     host_addr,
  input  cell_t             host_wcell,
  output cell_t             host_rdata,
  output logic              host_rvalid,
  input  logic              host_sig_we,
  input  logic [TW-1:0]     host_sig_addr,
  input  field_t            host_sig_data,
  input  logic              host_coef_we,
  input  phase_e            host_coef_phase,
  input  logic [PML_IW-1:0] host_coef_idx,
  input  pml_coef_t         host_coef,
  // activity, for monitoring
  output logic              src_hit,
  output logic [5:0]        edge_zeroed,
  output logic              draining
);

  // ------------------------------------------------------------ controller
  logic          issue_valid;
  phase_e        issue_phase;
  logic [XW-1:0] ci;
  logic [YW-1:0] cj;
  logic [ZW-1:0] ck;

  master_controller #(.XW(XW), .YW(YW), .ZW(ZW), .SW(SW)) u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (start),
    .n_steps    (n_steps),
    .nx         (nx),
    .ny         (ny),
    .nz         (nz),
    .busy       (busy),
    .done       (done),
    .issue_valid(issue_valid),
    .phase      (issue_phase),
    .i          (ci),
    .j          (cj),
    .k          (ck),
    .step       (step),
    .draining   (draining)
  );

  // ----------------------------------------------------------- memories
  logic [AW-1:0] sel_f_raddr [6][3];
  logic [AW-1:0] sel_cell_raddr;
  logic [AW-1:0] f_raddr     [6][3];
  logic [AW-1:0] cell_raddr;
  field_t        f_rdata     [6][3];
  field_t        split_rdata [6];
  bound_t        bnd_rdata;
  grid_t         grid_rdata;
  field_t        sig_rdata;

  logic [AW-1:0] waddr;
  logic [5:0]    f_we, split_we;
  field_t        f_wdata [6];
  field_t        split_wdata [6];
  logic          bg_we;

  lane_out_t     lane_out [3];
  logic [AW-1:0] wb_addr;
  phase_e        wb_phase;

  logic host_wr;
  assign host_wr = host_cell_we && !busy;

  // Write port: calculation results, or a host cell load while idle.
  always_comb begin
    waddr    = wb_addr;
    f_we     = '0;
    split_we = '0;
    bg_we    = 1'b0;
    for (int c = 0; c < 6; c++) begin
      f_wdata[c]     = lane_out[c % 3].total;
      split_wdata[c] = lane_out[c % 3].split;
    end
    if (lane_out[0].valid) begin
      for (int l = 0; l < 3; l++) begin
        if (wb_phase == PH_E) begin
          f_we[l]     = 1'b1;
          split_we[l] = lane_out[l].pml;
        end else begin
          f_we[l+3]     = 1'b1;
          split_we[l+3] = lane_out[l].pml;
        end
      end
    end else if (host_wr) begin
      waddr    = host_addr;
      f_we     = '1;
      split_we = '1;
      bg_we    = 1'b1;
      for (int c = 0; c < 6; c++) begin
        f_wdata[c]     = host_wcell.f[c];
        split_wdata[c] = host_wcell.split[c];
      end
    end
  end

  // Read addresses: the sweep, or a host read while idle.
  always_comb begin
    f_raddr    = sel_f_raddr;
    cell_raddr = sel_cell_raddr;
    if (!busy) begin
      for (int c = 0; c < 6; c++) f_raddr[c][0] = host_addr;
      cell_raddr = host_addr;
    end
  end

  memory_module #(.AW(AW), .TW(TW)) u_mem (
    .clk        (clk),
    .waddr      (waddr),
    .f_we       (f_we),
    .f_wdata    (f_wdata),
    .split_we   (split_we),
    .split_wdata(split_wdata),
    .bg_we      (bg_we),
    .bnd_wdata  (host_wcell.bnd),
    .grid_wdata (host_wcell.grid),
    .f_raddr    (f_raddr),
    .f_rdata    (f_rdata),
    .split_rdata(split_rdata),
    .cell_raddr (cell_raddr),
    .bnd_rdata  (bnd_rdata),
    .grid_rdata (grid_rdata),
    .sig_we     (host_sig_we && !busy),
    .sig_waddr  (host_sig_addr),
    .sig_wdata  (host_sig_data),
    .sig_raddr  (step[TW-1:0]),
    .sig_rdata  (sig_rdata)
  );

  // Host read-back.
  always_ff @(posedge clk) begin
    if (!rst_n) host_rvalid <= 1'b0;
    else        host_rvalid <= host_rd_en && !busy;
  end
  always_comb begin
    for (int c = 0; c < 6; c++) begin
      host_rdata.f[c]     = f_rdata[c][0];
      host_rdata.split[c] = split_rdata[c];
    end
    host_rdata.bnd  = bnd_rdata;
    host_rdata.grid = grid_rdata;
  end

  // ---------------------------------------------------- selector and source
  logic          sel_valid;
  phase_e        sel_phase;
  logic [AW-1:0] sel_addr;
  lane_in_t      lane_in [3];
  field_t        src_add [3];
  logic [PML_IW-1:0] prx, pry, prz;
  pml_coef_t     pcx, pcy, pcz;

  data_selector #(.XW(XW), .YW(YW), .ZW(ZW)) u_sel (
    .clk        (clk),
    .rst_n      (rst_n),
    .nx         (nx),
    .ny         (ny),
    .nz         (nz),
    .issue_valid(issue_valid),
    .issue_phase(issue_phase),
    .i          (ci),
    .j          (cj),
    .k          (ck),
    .f_raddr    (sel_f_raddr),
    .cell_raddr (sel_cell_raddr),
    .f_rdata    (f_rdata),
    .split_rdata(split_rdata),
    .bnd        (bnd_rdata),
    .grid       (grid_rdata),
    .src_add    (src_add),
    .pml_rx     (prx),
    .pml_ry     (pry),
    .pml_rz     (prz),
    .pml_cx     (pcx),
    .pml_cy     (pcy),
    .pml_cz     (pcz),
    .sel_valid  (sel_valid),
    .sel_phase  (sel_phase),
    .sel_addr   (sel_addr),
    .lane_in    (lane_in),
    .edge_zeroed(edge_zeroed)
  );

  power_input #(.AW(AW)) u_src (
    .src_en   (src_en),
    .src_addr (src_addr),
    .src_comp (src_comp),
    .sample   (sig_rdata),
    .valid    (sel_valid),
    .phase    (sel_phase),
    .cell_addr(sel_addr),
    .add      (src_add),
    .hit      (src_hit)
  );

  pml_coef_table u_pml_tab (
    .clk   (clk),
    .rst_n (rst_n),
    .we    (host_coef_we && !busy),
    .wphase(host_coef_phase),
    .widx  (host_coef_idx),
    .wdata (host_coef),
    .rphase(sel_phase),
    .rx    (prx),
    .ry    (pry),
    .rz    (prz),
    .cx    (pcx),
    .cy    (pcy),
    .cz    (pcz)
  );

  // ------------------------------------------------------------ calculation
  calculation_module u_calc (
    .clk     (clk),
    .rst_n   (rst_n),
    .lane_in (lane_in),
    .lane_out(lane_out)
  );

  // Write-back address and half step travel with the lanes.
  logic [AW-1:0] addr_d  [CALC_LAT];
  phase_e        phase_d [CALC_LAT];
  always_ff @(posedge clk) begin
    addr_d[0]  <= sel_addr;
    phase_d[0] <= sel_phase;
    for (int s = 1; s < CALC_LAT; s++) begin
      addr_d[s]  <= addr_d[s-1];
      phase_d[s] <= phase_d[s-1];
    end
  end
  assign wb_addr  = addr_d[CALC_LAT-1];
  assign wb_phase = phase_d[CALC_LAT-1];

  a_no_host_write_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    !(lane_out[0].valid && busy && host_cell_we))
    else $warning("fdtd_machine: host cell write ignored while running");

endmodule
