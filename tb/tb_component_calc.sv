// tb_component_calc: random cells, some in the PML and some conductors, are
// fed one per clock. Two clocks later the lane must give the normal or the
// PML result as the cell's flag says, zero for a conductor cell, and a valid
// flag exactly then. Counts how often each path was taken.
module tb_component_calc;
  import fdtd_pkg::*;
  import fdtd_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  lane_in_t  in;
  lane_out_t out;
  int checks = 0, failures = 0, n_pml = 0, n_norm = 0, n_metal = 0;

  component_calc dut (.*);

  longint exp_t [$], exp_s [$];
  logic   vhist [$], phist [$];

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
    in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3002; n++) begin
      @(negedge clk);
      if (vhist.size() >= 2) begin
        logic vexp, pexp;
        vexp = vhist.pop_front(); pexp = phist.pop_front();
        checks++;
        if (out.valid !== vexp) begin failures++; $display("valid latency mismatch"); end
        if (vexp) begin
          longint et, es;
          et = exp_t.pop_front(); es = exp_s.pop_front();
          checks++;
          if (longint'(out.total) != et || out.pml != pexp ||
              (pexp && longint'(out.split) != es)) begin
            failures++;
            if (failures < 10) $display("mismatch: got %0d/%0d expected %0d/%0d",
                                        out.total, out.split, et, es);
          end
        end
      end
      if (n < 3000 && $urandom_range(0, 5) != 0) begin
        longint pt, ps, nt;
        in.valid = 1; in.neg = 1'($urandom);
        in.pml = ($urandom_range(0, 2) == 0);
        in.mask = ($urandom_range(0, 4) != 0);
        in.old = rnd(5000); in.split = rnd(5000);
        in.f1 = rnd(2000); in.f2 = rnd(2000); in.f3 = rnd(2000); in.f4 = rnd(2000);
        in.c = coef_t'($urandom_range(0, 65536));
        in.pa = '{ca: coef_t'($urandom_range(30000, 65536)), cb: coef_t'($urandom_range(0, 65536))};
        in.pb = '{ca: coef_t'($urandom_range(30000, 65536)), cb: coef_t'($urandom_range(0, 65536))};
        nt = upd(in.neg, in.old, in.f1, in.f2, in.f3, in.f4, in.c);
        pml(in.neg, in.old, in.split, in.f1, in.f2, in.f3, in.f4,
            in.pa.ca, in.pa.cb, in.pb.ca, in.pb.cb, pt, ps);
        if (!in.mask) begin n_metal++; exp_t.push_back(0); exp_s.push_back(0); end
        else if (in.pml) begin n_pml++; exp_t.push_back(pt); exp_s.push_back(ps); end
        else begin n_norm++; exp_t.push_back(nt); exp_s.push_back(0); end
        vhist.push_back(1'b1); phist.push_back(in.pml);
      end else begin
        in.valid = 0;
        vhist.push_back(1'b0); phist.push_back(1'b0);
      end
    end
    checks++;
    if (n_pml == 0 || n_norm == 0 || n_metal == 0) begin
      failures++; $display("a path was never exercised");
    end
    $display("normal=%0d pml=%0d conductor=%0d", n_norm, n_pml, n_metal);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
