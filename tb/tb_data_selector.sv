// tb_data_selector: random cells of a random active grid are issued. The
// read addresses are checked against the memory map (own cell plus the two
// neighbours of each component). One clock later random memory words are
// returned, and every lane operand is checked against the update equations
// written in terms of grid offsets, with neighbours outside the grid read
// as zero. Also checks the material constant, PML constants, mask and sign.
module tb_data_selector;
  import fdtd_pkg::*;
  localparam int XW = 3, YW = 3, ZW = 2, AW = XW + YW + ZW;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [XW:0] nx; logic [YW:0] ny; logic [ZW:0] nz;
  logic issue_valid; phase_e issue_phase;
  logic [XW-1:0] i; logic [YW-1:0] j; logic [ZW-1:0] k;
  logic [AW-1:0] f_raddr [6][3];
  logic [AW-1:0] cell_raddr;
  field_t f_rdata [6][3], split_rdata [6];
  bound_t bnd; grid_t grid;
  field_t src_add [3];
  logic [PML_IW-1:0] pml_rx, pml_ry, pml_rz;
  pml_coef_t pml_cx, pml_cy, pml_cz;
  logic sel_valid; phase_e sel_phase; logic [AW-1:0] sel_addr;
  lane_in_t lane_in [3];
  logic [5:0] edge_zeroed;
  int checks = 0, failures = 0, n_edge = 0;

  data_selector #(.XW(XW), .YW(YW), .ZW(ZW)) dut (.*);

  // Offsets of the copies, from the memory map.
  int off [6][3][3];
  initial begin
    for (int c = 0; c < 6; c++) off[c][0] = '{0, 0, 0};
    off[C_EX][1] = '{0, 1, 0};  off[C_EX][2] = '{0, 0, 1};
    off[C_EY][1] = '{1, 0, 0};  off[C_EY][2] = '{0, 0, 1};
    off[C_EZ][1] = '{1, 0, 0};  off[C_EZ][2] = '{0, 1, 0};
    off[C_BX][1] = '{0, -1, 0}; off[C_BX][2] = '{0, 0, -1};
    off[C_BY][1] = '{-1, 0, 0}; off[C_BY][2] = '{0, 0, -1};
    off[C_BZ][1] = '{-1, 0, 0}; off[C_BZ][2] = '{0, -1, 0};
  end

  int ci, cj, ck;
  // field value of component c at (i+di, j+dj, k+dk), as the lanes must see it
  function automatic longint val(int c, int di, int dj, int dk);
    int ii, jj, kk;
    ii = ci + di; jj = cj + dj; kk = ck + dk;
    for (int m = 0; m < 3; m++)
      if (off[c][m][0] == di && off[c][m][1] == dj && off[c][m][2] == dk) begin
        if (ii < 0 || jj < 0 || kk < 0 || ii >= int'(nx) || jj >= int'(ny) || kk >= int'(nz))
          return 0;
        return longint'(f_rdata[c][m]);
      end
    $display("no copy of %0d at %0d %0d %0d", c, di, dj, dk);
    failures++;
    return 0;
  endfunction

  task automatic expect_lane(int l, longint o, longint s, longint a, longint b,
                             longint c, longint d);
    checks++;
    if (longint'(lane_in[l].old) != o || longint'(lane_in[l].split) != s ||
        longint'(lane_in[l].f1) != a || longint'(lane_in[l].f2) != b ||
        longint'(lane_in[l].f3) != c || longint'(lane_in[l].f4) != d) begin
      failures++;
      if (failures < 10)
        $display("lane %0d phase %0d cell %0d,%0d,%0d: got %0d %0d %0d %0d %0d %0d exp %0d %0d %0d %0d %0d %0d",
          l, sel_phase, ci, cj, ck, lane_in[l].old, lane_in[l].split, lane_in[l].f1,
          lane_in[l].f2, lane_in[l].f3, lane_in[l].f4, o, s, a, b, c, d);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pml_coef_t tabc [16];
    issue_valid = 0; issue_phase = PH_E; i = 0; j = 0; k = 0;
    nx = 8; ny = 8; nz = 4;
    for (int c = 0; c < 6; c++) begin
      split_rdata[c] = 0;
      for (int m = 0; m < 3; m++) f_rdata[c][m] = 0;
    end
    bnd = '0; grid = '0; for (int l = 0; l < 3; l++) src_add[l] = 0;
    for (int d = 0; d < 16; d++) tabc[d] = pml_coef_t'({$urandom, $urandom});
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if (n % 100 == 0) begin
        nx = (XW+1)'($urandom_range(1, 8));
        ny = (YW+1)'($urandom_range(1, 8));
        nz = (ZW+1)'($urandom_range(1, 4));
      end
      ci = $urandom_range(0, int'(nx) - 1);
      cj = $urandom_range(0, int'(ny) - 1);
      ck = $urandom_range(0, int'(nz) - 1);
      i = XW'(ci); j = YW'(cj); k = ZW'(ck);
      issue_valid = 1; issue_phase = phase_e'($urandom_range(0, 1));
      #1;
      // address side
      checks++;
      if (cell_raddr != {k, j, i}) begin failures++; $display("cell address"); end
      for (int c = 0; c < 6; c++)
        for (int m = 0; m < 3; m++) begin
          logic [XW-1:0] ei; logic [YW-1:0] ej; logic [ZW-1:0] ek;
          ei = XW'(ci + off[c][m][0]); ej = YW'(cj + off[c][m][1]); ek = ZW'(ck + off[c][m][2]);
          checks++;
          if (f_raddr[c][m] != {ek, ej, ei}) begin
            failures++;
            if (failures < 10) $display("address comp %0d copy %0d", c, m);
          end
        end
      // data side, next clock
      @(negedge clk);
      issue_valid = 0;
      for (int c = 0; c < 6; c++) begin
        split_rdata[c] = field_t'($urandom_range(0, 2000)) - 16'sd1000;
        for (int m = 0; m < 3; m++) f_rdata[c][m] = field_t'($urandom_range(0, 2000)) - 16'sd1000;
      end
      bnd = bound_t'($urandom); grid = grid_t'({$urandom, $urandom});
      for (int l = 0; l < 3; l++) src_add[l] = ($urandom_range(0, 3) == 0) ? field_t'($urandom_range(0, 100)) : '0;
      #1;
      pml_cx = tabc[pml_rx]; pml_cy = tabc[pml_ry]; pml_cz = tabc[pml_rz];
      #1;
      checks++;
      if (!sel_valid || sel_addr != {k, j, i}) begin failures++; $display("valid/addr delay"); end
      if (edge_zeroed != 0) n_edge++;
      if (sel_phase == PH_E) begin
        expect_lane(0, val(C_EX,0,0,0) + src_add[0], split_rdata[C_EX],
                    val(C_BZ,0,0,0), val(C_BZ,0,-1,0), val(C_BY,0,0,0), val(C_BY,0,0,-1));
        expect_lane(1, val(C_EY,0,0,0) + src_add[1], split_rdata[C_EY],
                    val(C_BX,0,0,0), val(C_BX,0,0,-1), val(C_BZ,0,0,0), val(C_BZ,-1,0,0));
        expect_lane(2, val(C_EZ,0,0,0) + src_add[2], split_rdata[C_EZ],
                    val(C_BY,0,0,0), val(C_BY,-1,0,0), val(C_BX,0,0,0), val(C_BX,0,-1,0));
      end else begin
        expect_lane(0, val(C_BX,0,0,0) + src_add[0], split_rdata[C_BX],
                    val(C_EZ,0,1,0), val(C_EZ,0,0,0), val(C_EY,0,0,1), val(C_EY,0,0,0));
        expect_lane(1, val(C_BY,0,0,0) + src_add[1], split_rdata[C_BY],
                    val(C_EX,0,0,1), val(C_EX,0,0,0), val(C_EZ,1,0,0), val(C_EZ,0,0,0));
        expect_lane(2, val(C_BZ,0,0,0) + src_add[2], split_rdata[C_BZ],
                    val(C_EY,1,0,0), val(C_EY,0,0,0), val(C_EX,0,1,0), val(C_EX,0,0,0));
      end
      for (int l = 0; l < 3; l++) begin
        checks++;
        if (lane_in[l].valid != 1 || lane_in[l].neg != (sel_phase == PH_H) ||
            lane_in[l].pml != bnd.pml ||
            lane_in[l].mask != ((sel_phase == PH_H) ? 1'b1 : bnd.vac) ||
            lane_in[l].c != ((sel_phase == PH_H) ? grid.ch : grid.ce)) begin
          failures++; $display("lane %0d flags/constant", l);
        end
      end
      // PML constants: x lane uses y then z, y lane z then x, z lane x then y
      checks++;
      if (lane_in[0].pa != tabc[bnd.py] || lane_in[0].pb != tabc[bnd.pz] ||
          lane_in[1].pa != tabc[bnd.pz] || lane_in[1].pb != tabc[bnd.px] ||
          lane_in[2].pa != tabc[bnd.px] || lane_in[2].pb != tabc[bnd.py]) begin
        failures++; $display("PML constant routing");
      end
    end
    checks++;
    if (n_edge == 0) begin failures++; $display("grid edge never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
