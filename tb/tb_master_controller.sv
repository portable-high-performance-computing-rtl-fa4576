// tb_master_controller: runs several grids and step counts. Checks that each
// half step issues every cell of the active grid exactly once in raster
// order (i fastest), E before b, that the step counter advances, that the
// drain stall follows each sweep, and that a run of n steps keeps busy for
// n*2*(nx*ny*nz + 3) clocks and ends with a single done pulse.
module tb_master_controller;
  import fdtd_pkg::*;
  localparam int XW = 3, YW = 2, ZW = 2, SW = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done, issue_valid, draining;
  logic [SW-1:0] n_steps, step;
  logic [XW:0] nx; logic [YW:0] ny; logic [ZW:0] nz;
  phase_e phase;
  logic [XW-1:0] i; logic [YW-1:0] j; logic [ZW-1:0] k;
  int checks = 0, failures = 0;

  master_controller #(.XW(XW), .YW(YW), .ZW(ZW), .SW(SW)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int sx, int sy, int sz, int ns);
    int cells, ei, ej, ek, eph, estep, busy_cycles, dones, drains, issued;
    nx = (XW+1)'(sx); ny = (YW+1)'(sy); nz = (ZW+1)'(sz); n_steps = SW'(ns);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cells = sx * sy * sz;
    ei = 0; ej = 0; ek = 0; eph = 0; estep = 0;
    busy_cycles = 0; dones = 0; drains = 0; issued = 0;
    while (busy) begin
      if (issue_valid) begin
        checks++;
        if (int'(i) != ei || int'(j) != ej || int'(k) != ek || int'(phase) != eph ||
            int'(step) != estep) begin
          failures++;
          if (failures < 10) $display("order: got %0d,%0d,%0d ph%0d st%0d exp %0d,%0d,%0d ph%0d st%0d",
                                      i, j, k, phase, step, ei, ej, ek, eph, estep);
        end
        issued++;
        ei++;
        if (ei == sx) begin ei = 0; ej++; end
        if (ej == sy) begin ej = 0; ek++; end
        if (ek == sz) begin
          ek = 0;
          if (eph == 1) estep++;
          eph = 1 - eph;
        end
      end
      if (draining) drains++;
      if (done) dones++;
      busy_cycles++;
      @(negedge clk);
    end
    if (done) dones++;
    checks += 4;
    if (issued != 2 * cells * ns) begin failures++; $display("issued %0d", issued); end
    if (busy_cycles != ns * 2 * (cells + CALC_LAT + 1)) begin
      failures++; $display("busy %0d clocks, expected %0d", busy_cycles, ns * 2 * (cells + 3));
    end
    if (drains != ns * 2 * (CALC_LAT + 1)) begin failures++; $display("drain %0d", drains); end
    if (dones != 1) begin failures++; $display("done pulses %0d", dones); end
  endtask

  initial begin
    start = 0; n_steps = 0; nx = 1; ny = 1; nz = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(8, 4, 4, 2);
    run(5, 3, 2, 3);
    run(1, 1, 1, 4);
    run(8, 1, 3, 1);
    for (int n = 0; n < 10; n++)
      run($urandom_range(1, 8), $urandom_range(1, 4), $urandom_range(1, 4), $urandom_range(1, 3));
    // zero steps: done at once, never busy
    @(negedge clk); n_steps = 0; start = 1;
    @(negedge clk); start = 0;
    checks++;
    if (!done || busy) begin failures++; $display("zero-step run"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
