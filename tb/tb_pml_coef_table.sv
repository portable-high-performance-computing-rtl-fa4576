// tb_pml_coef_table: checks reset clears the table, then loads random
// entries for both half steps and reads them back on the three ports with
// independent indices, including reads of entries written just before.
module tb_pml_coef_table;
  import fdtd_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic we; phase_e wphase, rphase;
  logic [PML_IW-1:0] widx, rx, ry, rz;
  pml_coef_t wdata, cx, cy, cz;
  pml_coef_t model [2][2**PML_IW];
  int checks = 0, failures = 0;

  pml_coef_table dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; wphase = PH_E; widx = 0; wdata = '0; rphase = PH_E; rx = 0; ry = 0; rz = 0;
    repeat (2) @(posedge clk); #1;
    rst_n = 1;
    for (int p = 0; p < 2; p++)
      for (int d = 0; d < 2**PML_IW; d++) begin
        model[p][d] = '0;
        rphase = phase_e'(p); rx = PML_IW'(d); #1;
        checks++;
        if (cx != '0) begin failures++; $display("not cleared"); end
      end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we = 1'($urandom); wphase = phase_e'($urandom_range(0, 1));
      widx = PML_IW'($urandom); wdata = pml_coef_t'({$urandom, $urandom});
      @(posedge clk);
      if (we) model[wphase][widx] = wdata;
      #1;
      we = 0;
      rphase = phase_e'($urandom_range(0, 1));
      rx = PML_IW'($urandom); ry = PML_IW'($urandom); rz = ($urandom_range(0, 1)) ? widx : PML_IW'($urandom);
      #1;
      checks += 3;
      if (cx != model[rphase][rx]) begin failures++; $display("port x"); end
      if (cy != model[rphase][ry]) begin failures++; $display("port y"); end
      if (cz != model[rphase][rz]) begin failures++; $display("port z"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
