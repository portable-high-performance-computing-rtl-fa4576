// tb_fdtd_machine_full: one complete time step of the machine at its full
// size, 256 x 256 x 64 cells, with every parameter at its default.
//
// The host loads every cell (fields zero, vacuum, C = 0.5 for E and b), puts
// a source on e_z at the centre and one sample of 1000 in the input signal,
// and runs one time step over the whole grid. After it, e_z at the source
// must hold the sample and the four b components around it must hold the
// curl of it (b_x = +/-500, b_y = -/+500); cells around them and cells at
// the corners of the grid must still be zero. The run must take
// 2*(256*256*64 + 3) clocks.
module tb_fdtd_machine_full;
  import fdtd_pkg::*;
  import fdtd_ref_pkg::*;

  localparam int XW = DEF_XW, YW = DEF_YW, ZW = DEF_ZW, TW = DEF_TW, SW = 16;
  localparam int AW = XW + YW + ZW;
  localparam int NX = 2**XW, NY = 2**YW, NZ = 2**ZW;
  localparam longint CONST_C = 32768;  // 0.5
  localparam longint SAMPLE  = 1000;

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

  fdtd_machine dut (.*);

  int checks = 0, failures = 0, n_src = 0, n_edge = 0, n_drain = 0;
  localparam int SI = NX / 2, SJ = NY / 2, SK = NZ / 2;

  always @(posedge clk) begin
    if (src_hit) n_src++;
    if (edge_zeroed != 0) n_edge++;
    if (draining) n_drain++;
  end

  initial begin
    repeat (16_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_cell(int i, int j, int k, longint e [6]);
    host_addr = {ZW'(k), YW'(j), XW'(i)}; host_rd_en = 1;
    @(negedge clk);
    host_rd_en = 0;
    for (int c = 0; c < 6; c++) begin
      checks++;
      if (longint'(host_rdata.f[c]) != e[c]) begin
        failures++;
        $display("cell %0d,%0d,%0d comp %0d: got %0d expected %0d", i, j, k, c,
                 host_rdata.f[c], e[c]);
      end
    end
  endtask

  initial begin
    longint e [6];
    longint h;
    int busy_cycles;
    start = 0; n_steps = 0; nx = (XW+1)'(NX); ny = (YW+1)'(NY); nz = (ZW+1)'(NZ);
    src_en = 0; src_addr = 0; src_comp = C_EZ;
    host_cell_we = 0; host_rd_en = 0; host_addr = 0;
    host_sig_we = 0; host_sig_addr = 0; host_sig_data = 0;
    host_coef_we = 0; host_coef_phase = PH_E; host_coef_idx = 0; host_coef = '0;
    host_wcell = '0;
    host_wcell.bnd.vac = 1;
    host_wcell.grid.ce = coef_t'(CONST_C);
    host_wcell.grid.ch = coef_t'(CONST_C);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    host_sig_we = 1; host_sig_addr = 0; host_sig_data = field_t'(SAMPLE);
    @(negedge clk);
    host_sig_we = 0;
    host_cell_we = 1;
    for (int a = 0; a < NX * NY * NZ; a++) begin
      host_addr = AW'(a);
      @(negedge clk);
    end
    host_cell_we = 0;
    src_en = 1; src_addr = {ZW'(SK), YW'(SJ), XW'(SI)}; src_comp = C_EZ;

    n_steps = 1; start = 1;
    @(negedge clk);
    start = 0;
    busy_cycles = 0;
    while (!done) begin
      if (busy) busy_cycles++;
      @(negedge clk);
    end
    checks++;
    if (busy_cycles != 2 * (NX * NY * NZ + 3)) begin
      failures++; $display("run took %0d clocks", busy_cycles);
    end
    @(negedge clk);

    // b around the source, from b = b - C[...] with only e_z(SI,SJ,SK) set
    h = mulc(CONST_C, SAMPLE);
    e = '{0, 0, SAMPLE, upd(1'b1, 0, 0, SAMPLE, 0, 0, CONST_C),
          upd(1'b1, 0, 0, 0, 0, SAMPLE, CONST_C), 0};
    expect_cell(SI, SJ, SK, e);               // b_x = +h, b_y = -h
    e = '{0, 0, 0, -h, 0, 0};
    expect_cell(SI, SJ - 1, SK, e);           // b_x(j-1) sees e_z(j) - 0
    e = '{0, 0, 0, 0, h, 0};
    expect_cell(SI - 1, SJ, SK, e);           // b_y(i-1) sees -(e_z(i) - 0)
    e = '{0, 0, 0, 0, 0, 0};
    expect_cell(SI + 1, SJ, SK, e);
    expect_cell(SI, SJ + 1, SK, e);
    expect_cell(SI, SJ, SK + 1, e);
    expect_cell(SI, SJ, SK - 1, e);
    expect_cell(0, 0, 0, e);
    expect_cell(NX - 1, NY - 1, NZ - 1, e);
    expect_cell(NX - 1, 0, NZ - 1, e);
    checks++;
    if (n_src != 1 || n_edge == 0 || n_drain == 0) begin
      failures++; $display("source %0d edge %0d drain %0d", n_src, n_edge, n_drain);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
