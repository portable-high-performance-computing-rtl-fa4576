// tb_waveguide_pml: the machine's demonstration workload, scaled down.
//
// A rectangular metal waveguide runs along x inside a box whose faces are
// lined with a graded PML, as in the waveguide model the machine was shown
// running. The grid is 24 x 12 x 12 cells (a scaled-down version of the
// roughly 70 x 30 x 30 model) in a 32 x 16 x 16 memory. A sinusoidal e_z
// source inside the guide drives it for 40 time steps. All fields start at
// zero. After the run every cell is read back and compared with a reference
// model of the same update equations, the run time is checked against
// 2*(cells + 3) clocks per step, and the wave must have reached the far end
// of the guide and entered the PML.
module tb_waveguide_pml;
  import fdtd_pkg::*;
  import fdtd_ref_pkg::*;

  localparam int XW = 5, YW = 4, ZW = 4, TW = 6, SW = 16;
  localparam int AW = XW + YW + ZW;
  localparam int NXC = 2**XW, NYC = 2**YW, NZC = 2**ZW;
  localparam int NX = 24, NY = 12, NZ = 12, STEPS = 40;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start; logic [SW-1:0] n_steps, step;
  logic [XW:0] nx; logic [YW:0] ny; logic [ZW:0] nz;
  logic busy, done;
  logic src_en; logic [AW-1:0] src_addr; comp_e src_comp;
  logic host_cell_we, host_rd_en, host_rvalid;
  logic [AW-1:0] host_addr;
  cell_t host_wcell, host_rdata;
  logic host_sig_we; logic [TW-1:0] host_sig_addr; field_t host_sig_data;
  logic host_coef_we; phase_e host_coef_phase; logic [PML_IW-1:0] host_coef_idx;
  pml_coef_t host_coef;
  logic src_hit, draining; logic [5:0] edge_zeroed;

  fdtd_machine #(.XW(XW), .YW(YW), .ZW(ZW), .TW(TW), .SW(SW)) dut (.*);

  // reference state
  longint F [6][NZC][NYC][NXC];
  longint S [6][NZC][NYC][NXC];
  bound_t B [NZC][NYC][NXC];
  grid_t  G [NZC][NYC][NXC];
  pml_coef_t T [2][2**PML_IW];
  longint SIG [2**TW];

  int checks = 0, failures = 0;
  int n_src = 0, n_edge = 0, n_drain = 0, n_loads = 0, n_reads = 0;
  int n_pml_cells = 0, n_metal_cells = 0;
  int si, sj, sk, sc;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (src_hit) n_src++;
    if (edge_zeroed != 0) n_edge++;
    if (draining) n_drain++;
  end

  function automatic longint fv(int c, int i, int j, int k);
    if (i < 0 || j < 0 || k < 0 || i >= NX || j >= NY || k >= NZ) return 0;
    return F[c][k][j][i];
  endfunction

  // One component update at one cell, normal or PML, with masking.
  task automatic ref_update(int c, int i, int j, int k, bit neg,
                            longint f1, longint f2, longint f3, longint f4,
                            pml_coef_t pa, pml_coef_t pb,
                            output longint nf, output longint ns, output bit wsplit);
    bound_t b; grid_t g; longint old, t, s;
    b = B[k][j][i]; g = G[k][j][i];
    old = F[c][k][j][i];
    if (sc == c && si == i && sj == j && sk == k) old = clamp(old + SIG[cur_step % (2**TW)]);
    if (b.pml) begin
      pml(neg, old, S[c][k][j][i], f1, f2, f3, f4, pa.ca, pa.cb, pb.ca, pb.cb, t, s);
      wsplit = 1;
    end else begin
      t = upd(neg, old, f1, f2, f3, f4, neg ? g.ch : g.ce);
      s = S[c][k][j][i];
      wsplit = 0;
    end
    if (!neg && !b.vac) begin t = 0; if (b.pml) s = 0; end
    nf = t; ns = s;
  endtask

  int cur_step;
  longint NF [6][NZC][NYC][NXC];
  longint NS [6][NZC][NYC][NXC];

  task automatic ref_step();
    pml_coef_t px, py, pz;
    bit w;
    NF = F; NS = S;
    // E half step
    for (int k = 0; k < NZ; k++) for (int j = 0; j < NY; j++) for (int i = 0; i < NX; i++) begin
      px = T[0][B[k][j][i].px]; py = T[0][B[k][j][i].py]; pz = T[0][B[k][j][i].pz];
      ref_update(C_EX, i, j, k, 0, fv(C_BZ,i,j,k), fv(C_BZ,i,j-1,k), fv(C_BY,i,j,k), fv(C_BY,i,j,k-1),
                 py, pz, NF[C_EX][k][j][i], NS[C_EX][k][j][i], w);
      ref_update(C_EY, i, j, k, 0, fv(C_BX,i,j,k), fv(C_BX,i,j,k-1), fv(C_BZ,i,j,k), fv(C_BZ,i-1,j,k),
                 pz, px, NF[C_EY][k][j][i], NS[C_EY][k][j][i], w);
      ref_update(C_EZ, i, j, k, 0, fv(C_BY,i,j,k), fv(C_BY,i-1,j,k), fv(C_BX,i,j,k), fv(C_BX,i,j-1,k),
                 px, py, NF[C_EZ][k][j][i], NS[C_EZ][k][j][i], w);
    end
    F = NF; S = NS;
    // b half step
    for (int k = 0; k < NZ; k++) for (int j = 0; j < NY; j++) for (int i = 0; i < NX; i++) begin
      px = T[1][B[k][j][i].px]; py = T[1][B[k][j][i].py]; pz = T[1][B[k][j][i].pz];
      ref_update(C_BX, i, j, k, 1, fv(C_EZ,i,j+1,k), fv(C_EZ,i,j,k), fv(C_EY,i,j,k+1), fv(C_EY,i,j,k),
                 py, pz, NF[C_BX][k][j][i], NS[C_BX][k][j][i], w);
      ref_update(C_BY, i, j, k, 1, fv(C_EX,i,j,k+1), fv(C_EX,i,j,k), fv(C_EZ,i+1,j,k), fv(C_EZ,i,j,k),
                 pz, px, NF[C_BY][k][j][i], NS[C_BY][k][j][i], w);
      ref_update(C_BZ, i, j, k, 1, fv(C_EY,i+1,j,k), fv(C_EY,i,j,k), fv(C_EX,i,j+1,k), fv(C_EX,i,j,k),
                 px, py, NF[C_BZ][k][j][i], NS[C_BZ][k][j][i], w);
    end
    F = NF; S = NS;
  endtask

  initial begin
    int busy_cycles, exp_cycles;
    start = 0; n_steps = 0; nx = NX; ny = NY; nz = NZ;
    src_en = 0; src_addr = 0; src_comp = C_EZ;
    host_cell_we = 0; host_rd_en = 0; host_addr = 0; host_wcell = '0;
    host_sig_we = 0; host_sig_addr = 0; host_sig_data = 0;
    host_coef_we = 0; host_coef_phase = PH_E; host_coef_idx = 0; host_coef = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);

    // PML constant table: depth d in 1..2, loss grows with depth; 0 lossless
    for (int p = 0; p < 2; p++)
      for (int d = 0; d < 2**PML_IW; d++) begin
        real g;
        g = (d == 0) ? 0.0 : 0.15 * d * d;
        T[p][d].ca = coef_t'(int'(65536.0 * (1.0 - g) / (1.0 + g)));
        T[p][d].cb = coef_t'(int'(65536.0 * 0.5 / (1.0 + g)));
        host_coef_we = 1; host_coef_phase = phase_e'(p); host_coef_idx = PML_IW'(d);
        host_coef = T[p][d];
        @(negedge clk);
      end
    host_coef_we = 0;

    // input signal: a sine of period 16 steps, amplitude 2000
    for (int t = 0; t < 2**TW; t++) begin
      SIG[t] = longint'($rtoi(2000.0 * $sin(2.0 * 3.14159265 * t / 16.0)));
      host_sig_we = 1; host_sig_addr = TW'(t); host_sig_data = field_t'(SIG[t]);
      @(negedge clk);
    end
    host_sig_we = 0;

    // cells: zero fields, C = 0.5, PML two cells deep on every face,
    // metal walls of a guide along x for i < 14, spanning j, k in 3..8
    for (int k = 0; k < NZC; k++) for (int j = 0; j < NYC; j++) for (int i = 0; i < NXC; i++) begin
      bound_t b; grid_t g; int dx, dy, dz;
      for (int c = 0; c < 6; c++) begin
        F[c][k][j][i] = 0; S[c][k][j][i] = 0;
        host_wcell.f[c] = 0; host_wcell.split[c] = 0;
      end
      dx = (i < 2) ? 2 - i : (i >= NX - 2) ? i - (NX - 3) : 0;
      dy = (j < 2) ? 2 - j : (j >= NY - 2) ? j - (NY - 3) : 0;
      dz = (k < 2) ? 2 - k : (k >= NZ - 2) ? k - (NZ - 3) : 0;
      b = '0;
      b.pml = (dx != 0 || dy != 0 || dz != 0);
      b.px = PML_IW'(dx); b.py = PML_IW'(dy); b.pz = PML_IW'(dz);
      b.vac = !(i >= 2 && i < 14 && ((j == 3 || j == 8) && k >= 3 && k <= 8 ||
                                     (k == 3 || k == 8) && j >= 3 && j <= 8));
      if (i < NX && j < NY && k < NZ) begin
        if (b.pml) n_pml_cells++;
        if (!b.vac) n_metal_cells++;
      end
      g.ce = coef_t'(32768); g.ch = coef_t'(32768);
      B[k][j][i] = b; G[k][j][i] = g;
      host_wcell.bnd = b; host_wcell.grid = g;
      host_addr = {ZW'(k), YW'(j), XW'(i)};
      host_cell_we = 1;
      n_loads++;
      @(negedge clk);
    end
    host_cell_we = 0;

    si = 4; sj = 5; sk = 5; sc = C_EZ;
    src_en = 1; src_addr = {ZW'(sk), YW'(sj), XW'(si)}; src_comp = C_EZ;

    // reference
    for (int s = 0; s < STEPS; s++) begin cur_step = s; ref_step(); end

    // run
    n_steps = STEPS; start = 1;
    @(negedge clk);
    start = 0;
    busy_cycles = 0;
    while (!done) begin
      if (busy) busy_cycles++;
      @(negedge clk);
    end
    exp_cycles = STEPS * 2 * (NX * NY * NZ + 3);
    checks++;
    if (busy_cycles != exp_cycles) begin
      failures++; $display("run took %0d clocks, expected %0d", busy_cycles, exp_cycles);
    end
    checks++;
    if (int'(step) != STEPS) begin failures++; $display("step counter %0d", step); end
    @(negedge clk);

    // read back everything
    for (int k = 0; k < NZC; k++) for (int j = 0; j < NYC; j++) for (int i = 0; i < NXC; i++) begin
      host_addr = {ZW'(k), YW'(j), XW'(i)}; host_rd_en = 1;
      @(negedge clk);
      host_rd_en = 0;
      n_reads++;
      checks++;
      if (!host_rvalid) begin failures++; $display("no read valid"); end
      for (int c = 0; c < 6; c++) begin
        checks += 2;
        if (longint'(host_rdata.f[c]) != F[c][k][j][i]) begin
          failures++;
          if (failures < 15) $display("cell %0d,%0d,%0d comp %0d: got %0d expected %0d (pml %0d vac %0d)",
                                      i, j, k, c, host_rdata.f[c], F[c][k][j][i],
                                      B[k][j][i].pml, B[k][j][i].vac);
        end
        if (longint'(host_rdata.split[c]) != S[c][k][j][i]) begin
          failures++;
          if (failures < 15) $display("cell %0d,%0d,%0d split %0d: got %0d expected %0d",
                                      i, j, k, c, host_rdata.split[c], S[c][k][j][i]);
        end
      end
      checks++;
      if (host_rdata.bnd != B[k][j][i] || host_rdata.grid != G[k][j][i]) begin
        failures++; $display("boundary/grid word changed");
      end
    end

    begin
      longint far_end, in_pml;
      far_end = 0; in_pml = 0;
      for (int k = 4; k <= 7; k++) for (int j = 4; j <= 7; j++) begin
        far_end += (F[C_EZ][k][j][13] < 0) ? -F[C_EZ][k][j][13] : F[C_EZ][k][j][13];
        in_pml  += (F[C_EZ][k][j][NX-2] < 0) ? -F[C_EZ][k][j][NX-2] : F[C_EZ][k][j][NX-2];
      end
      $display("|e_z| summed at guide end %0d, in the far PML %0d", far_end, in_pml);
      checks++;
      if (far_end == 0 || in_pml == 0) begin failures++; $display("wave did not propagate"); end
    end
    $display("mechanisms: pml_cells=%0d conductor_cells=%0d edge_zeroing=%0d source=%0d drain=%0d loads=%0d reads=%0d",
             n_pml_cells, n_metal_cells, n_edge, n_src, n_drain, n_loads, n_reads);
    checks++;
    if (n_pml_cells == 0 || n_metal_cells == 0 || n_src != STEPS ||
        n_drain == 0 || n_loads == 0 || n_reads == 0) begin
      failures++; $display("a mechanism was not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
