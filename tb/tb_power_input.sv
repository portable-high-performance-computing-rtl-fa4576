// tb_power_input: sweeps cells and half steps past a random source of every
// component; the sample must be added to the right lane only at the source
// cell, in the source's half step, while valid and enabled.
module tb_power_input;
  import fdtd_pkg::*;
  localparam int AW = 6;

  logic src_en, valid, hit;
  logic [AW-1:0] src_addr, cell_addr;
  comp_e src_comp;
  field_t sample;
  phase_e phase;
  field_t add [3];
  int checks = 0, failures = 0, hits = 0;

  power_input #(.AW(AW)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      logic exp_hit;
      int lane;
      src_en = ($urandom_range(0, 7) != 0);
      valid = ($urandom_range(0, 7) != 0);
      src_addr = AW'($urandom);
      cell_addr = ($urandom_range(0, 2) == 0) ? src_addr : AW'($urandom);
      src_comp = comp_e'($urandom_range(0, 5));
      phase = phase_e'($urandom_range(0, 1));
      sample = field_t'($urandom);
      #1;
      lane = int'(src_comp) % 3;
      exp_hit = src_en && valid && (cell_addr == src_addr) &&
                ((int'(src_comp) >= 3) == (phase == PH_H));
      if (exp_hit) hits++;
      checks++;
      if (hit != exp_hit) begin failures++; $display("hit mismatch"); end
      for (int l = 0; l < 3; l++) begin
        checks++;
        if (add[l] != ((exp_hit && l == lane) ? sample : field_t'(0))) begin
          failures++;
          if (failures < 10) $display("lane %0d add %0d", l, add[l]);
        end
      end
    end
    checks++;
    if (hits == 0) begin failures++; $display("source never hit"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
