// tb_memory_module: loads whole cells (six fields, six split parts,
// boundary and grid words) and input-signal samples, then reads them back
// with independent addresses on every port and compares with a model.
// Also writes single components only, as the calculation module does, and
// checks the other components are left alone.
module tb_memory_module;
  import fdtd_pkg::*;
  localparam int AW = 5, TW = 4;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [AW-1:0] waddr;
  logic [5:0]    f_we, split_we;
  field_t        f_wdata [6], split_wdata [6];
  logic          bg_we;
  bound_t        bnd_wdata;
  grid_t         grid_wdata;
  logic [AW-1:0] f_raddr [6][3];
  field_t        f_rdata [6][3];
  field_t        split_rdata [6];
  logic [AW-1:0] cell_raddr;
  bound_t        bnd_rdata;
  grid_t         grid_rdata;
  logic          sig_we;
  logic [TW-1:0] sig_waddr, sig_raddr;
  field_t        sig_wdata, sig_rdata;

  field_t mf [6][2**AW], ms [6][2**AW], msig [2**TW];
  bound_t mb [2**AW];
  grid_t  mg [2**AW];
  int checks = 0, failures = 0;

  memory_module #(.AW(AW), .TW(TW)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_reads();
    field_t ef [6][3], es [6], esig;
    bound_t eb; grid_t eg;
    for (int c = 0; c < 6; c++) begin
      for (int m = 0; m < 3; m++) begin
        f_raddr[c][m] = AW'($urandom);
        ef[c][m] = mf[c][f_raddr[c][m]];
      end
      es[c] = ms[c][f_raddr[c][0]];
    end
    cell_raddr = AW'($urandom); eb = mb[cell_raddr]; eg = mg[cell_raddr];
    sig_raddr = TW'($urandom); esig = msig[sig_raddr];
    f_we = '0; split_we = '0; bg_we = 0; sig_we = 0;
    @(posedge clk); #1;
    for (int c = 0; c < 6; c++) begin
      for (int m = 0; m < 3; m++) begin
        checks++;
        if (f_rdata[c][m] !== ef[c][m]) begin
          failures++;
          if (failures < 10) $display("field %0d copy %0d mismatch", c, m);
        end
      end
      checks++;
      if (split_rdata[c] !== es[c]) begin failures++; $display("split %0d mismatch", c); end
    end
    checks += 3;
    if (bnd_rdata !== eb)  begin failures++; $display("boundary mismatch"); end
    if (grid_rdata !== eg) begin failures++; $display("grid mismatch"); end
    if (sig_rdata !== esig) begin failures++; $display("signal mismatch"); end
  endtask

  initial begin
    for (int c = 0; c < 6; c++) for (int m = 0; m < 3; m++) f_raddr[c][m] = '0;
    cell_raddr = 0; sig_raddr = 0;
    // whole-cell loads
    for (int a = 0; a < 2**AW; a++) begin
      waddr = AW'(a); f_we = '1; split_we = '1; bg_we = 1;
      for (int c = 0; c < 6; c++) begin
        f_wdata[c] = field_t'($urandom); split_wdata[c] = field_t'($urandom);
        mf[c][a] = f_wdata[c]; ms[c][a] = split_wdata[c];
      end
      bnd_wdata = bound_t'($urandom); grid_wdata = grid_t'({$urandom, $urandom});
      mb[a] = bnd_wdata; mg[a] = grid_wdata;
      sig_we = (a < 2**TW); sig_waddr = TW'(a); sig_wdata = field_t'($urandom);
      if (a < 2**TW) msig[a] = sig_wdata;
      @(posedge clk); #1;
    end
    repeat (200) check_reads();
    // partial writes: only the three E or the three b components
    for (int n = 0; n < 200; n++) begin
      logic hp;
      hp = 1'($urandom);
      waddr = AW'($urandom);
      f_we = hp ? 6'b111000 : 6'b000111;
      split_we = f_we & 6'($urandom);
      bg_we = 0; sig_we = 0;
      for (int c = 0; c < 6; c++) begin
        f_wdata[c] = field_t'($urandom); split_wdata[c] = field_t'($urandom);
        if (f_we[c]) mf[c][waddr] = f_wdata[c];
        if (split_we[c]) ms[c][waddr] = split_wdata[c];
      end
      @(posedge clk); #1;
      check_reads();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
