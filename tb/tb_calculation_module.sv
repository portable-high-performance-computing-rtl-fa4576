// tb_calculation_module: the three lanes get different random operands in
// the same clocks; each lane's result must match the reference for its own
// operands two clocks later (no lane may see another's data).
module tb_calculation_module;
  import fdtd_pkg::*;
  import fdtd_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  lane_in_t  lane_in  [3];
  lane_out_t lane_out [3];
  int checks = 0, failures = 0;

  calculation_module dut (.*);

  longint exp_t [3][$];
  int     nval [$];

  function automatic field_t rnd(int span);
    return field_t'($urandom_range(0, 2*span)) - field_t'(span);
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int l = 0; l < 3; l++) lane_in[l] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 1002; n++) begin
      @(negedge clk);
      if (nval.size() >= 2) begin
        int v;
        v = nval.pop_front();
        for (int l = 0; l < 3; l++) begin
          checks++;
          if (lane_out[l].valid != v[0]) begin failures++; $display("valid mismatch"); end
          if (v[0]) begin
            longint e;
            e = exp_t[l].pop_front();
            if (longint'(lane_out[l].total) != e) begin
              failures++;
              if (failures < 10) $display("lane %0d: got %0d expected %0d", l, lane_out[l].total, e);
            end
          end
        end
      end
      if (n < 1000) begin
        logic neg;
        neg = 1'($urandom);
        for (int l = 0; l < 3; l++) begin
          longint pt, ps;
          lane_in[l].valid = 1; lane_in[l].neg = neg;
          lane_in[l].pml = 1'($urandom); lane_in[l].mask = 1;
          lane_in[l].old = rnd(5000); lane_in[l].split = rnd(5000);
          lane_in[l].f1 = rnd(2000); lane_in[l].f2 = rnd(2000);
          lane_in[l].f3 = rnd(2000); lane_in[l].f4 = rnd(2000);
          lane_in[l].c  = coef_t'($urandom_range(0, 65536));
          lane_in[l].pa = '{ca: coef_t'($urandom_range(30000, 65536)), cb: coef_t'($urandom_range(0, 65536))};
          lane_in[l].pb = '{ca: coef_t'($urandom_range(30000, 65536)), cb: coef_t'($urandom_range(0, 65536))};
          if (lane_in[l].pml) begin
            pml(neg, lane_in[l].old, lane_in[l].split, lane_in[l].f1, lane_in[l].f2,
                lane_in[l].f3, lane_in[l].f4, lane_in[l].pa.ca, lane_in[l].pa.cb,
                lane_in[l].pb.ca, lane_in[l].pb.cb, pt, ps);
            exp_t[l].push_back(pt);
          end else begin
            exp_t[l].push_back(upd(neg, lane_in[l].old, lane_in[l].f1, lane_in[l].f2,
                                   lane_in[l].f3, lane_in[l].f4, lane_in[l].c));
          end
        end
        nval.push_back(1);
      end else begin
        for (int l = 0; l < 3; l++) lane_in[l].valid = 0;
        nval.push_back(0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
