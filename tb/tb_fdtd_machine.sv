// tb_fdtd_machine: end-to-end run of the machine on a small grid.
//
// The host loads every cell of an 8x8x8 memory with random fields, random
// PML split parts, random material constants and a boundary map holding
// vacuum cells, conductor cells and PML cells of several depths; it loads
// the PML constant table and the input signal, places a source, and runs a
// few time steps on a 7x6x5 active grid (smaller than the memory). A
// reference model in the testbench performs the same leapfrog steps from
// the update equations; afterwards every cell is read back and compared,
// cells outside the active grid included (they must be untouched). The run
// length is checked against 2*(cells + 3) clocks per step, and each
// mechanism (PML update, conductor masking, grid-edge zeroing, source
// injection, drain stall, host load and read-back) must have happened.
module tb_fdtd_machine;
  import fdtd_pkg::*;
  import fdtd_ref_pkg::*;

  localparam int XW = 3, YW = 3, ZW = 3, TW = 4, SW = 16;
  localparam int AW = XW + YW + ZW;
  localparam int NXC = 2**XW, NYC = 2**YW, NZC = 2**ZW;
  localparam int NX = 7, NY = 6, NZ = 5, STEPS = 3;

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
    repeat (200000) @(posedge clk);
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

    // PML constant table: lossy entries, depth 0 lossless
    for (int p = 0; p < 2; p++)
      for (int d = 0; d < 2**PML_IW; d++) begin
        T[p][d].ca = (d == 0) ? 18'd65536 : coef_t'($urandom_range(40000, 65536));
        T[p][d].cb = coef_t'($urandom_range(8000, 30000));
        host_coef_we = 1; host_coef_phase = phase_e'(p); host_coef_idx = PML_IW'(d);
        host_coef = T[p][d];
        @(negedge clk);
      end
    host_coef_we = 0;

    // input signal
    for (int t = 0; t < 2**TW; t++) begin
      SIG[t] = $urandom_range(0, 2000) - 1000;
      host_sig_we = 1; host_sig_addr = TW'(t); host_sig_data = field_t'(SIG[t]);
      @(negedge clk);
    end
    host_sig_we = 0;

    // cells
    for (int k = 0; k < NZC; k++) for (int j = 0; j < NYC; j++) for (int i = 0; i < NXC; i++) begin
      bound_t b; grid_t g;
      for (int c = 0; c < 6; c++) begin
        F[c][k][j][i] = $urandom_range(0, 2000) - 1000;
        S[c][k][j][i] = $urandom_range(0, 2000) - 1000;
        host_wcell.f[c] = field_t'(F[c][k][j][i]);
        host_wcell.split[c] = field_t'(S[c][k][j][i]);
      end
      b = '0;
      b.vac = ($urandom_range(0, 9) != 0);
      b.pml = (i == 0 || j == 0 || k >= NZ - 1 || $urandom_range(0, 9) == 0);
      if (b.pml) begin
        b.px = PML_IW'($urandom); b.py = PML_IW'($urandom); b.pz = PML_IW'($urandom);
      end
      if (i < NX && j < NY && k < NZ) begin
        if (b.pml) n_pml_cells++;
        if (!b.vac) n_metal_cells++;
      end
      g.ce = coef_t'($urandom_range(6000, 36000));
      g.ch = coef_t'($urandom_range(6000, 36000));
      B[k][j][i] = b; G[k][j][i] = g;
      host_wcell.bnd = b; host_wcell.grid = g;
      host_addr = {ZW'(k), YW'(j), XW'(i)};
      host_cell_we = 1;
      n_loads++;
      @(negedge clk);
    end
    host_cell_we = 0;

    // source: a vacuum, non-PML cell inside the grid
    si = 3; sj = 2; sk = 2; sc = $urandom_range(0, 5);
    B[sk][sj][si].vac = 1; B[sk][sj][si].pml = 0;
    host_wcell.bnd = B[sk][sj][si]; host_wcell.grid = G[sk][sj][si];
    for (int c = 0; c < 6; c++) begin
      host_wcell.f[c] = field_t'(F[c][sk][sj][si]);
      host_wcell.split[c] = field_t'(S[c][sk][sj][si]);
    end
    host_addr = {ZW'(sk), YW'(sj), XW'(si)};
    host_cell_we = 1;
    @(negedge clk);
    host_cell_we = 0;
    src_en = 1; src_addr = {ZW'(sk), YW'(sj), XW'(si)}; src_comp = comp_e'(sc);

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

    $display("mechanisms: pml_cells=%0d conductor_cells=%0d edge_zeroing=%0d source=%0d drain=%0d loads=%0d reads=%0d",
             n_pml_cells, n_metal_cells, n_edge, n_src, n_drain, n_loads, n_reads);
    checks++;
    if (n_pml_cells == 0 || n_metal_cells == 0 || n_edge == 0 || n_src != STEPS ||
        n_drain == 0 || n_loads == 0 || n_reads == 0) begin
      failures++; $display("a mechanism was not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
