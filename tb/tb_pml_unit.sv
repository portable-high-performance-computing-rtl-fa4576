// tb_pml_unit: random split-field updates for both half steps are fed one
// per clock; the new total and split part are compared with the reference
// two clocks later, and the valid flag is checked to arrive exactly then.
module tb_pml_unit;
  import fdtd_pkg::*;
  import fdtd_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, neg, out_valid;
  field_t total, split, f1, f2, f3, f4, total_new, split_new;
  pml_coef_t pa, pb;
  int checks = 0, failures = 0;

  pml_unit dut (.*);

  longint exp_t [$], exp_s [$];
  logic   vhist [$];

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
    in_valid = 0; neg = 0; total = 0; split = 0; f1 = 0; f2 = 0; f3 = 0; f4 = 0;
    pa = '0; pb = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3002; n++) begin
      @(negedge clk);
      if (vhist.size() >= 2) begin
        logic vexp;
        vexp = vhist.pop_front();
        checks++;
        if (out_valid !== vexp) begin failures++; $display("valid latency mismatch"); end
        if (vexp) begin
          longint et, es;
          et = exp_t.pop_front(); es = exp_s.pop_front();
          checks += 2;
          if (longint'(total_new) != et || longint'(split_new) != es) begin
            failures++;
            if (failures < 10) $display("mismatch: got %0d/%0d expected %0d/%0d",
                                        total_new, split_new, et, es);
          end
        end
      end
      if (n < 3000 && $urandom_range(0, 5) != 0) begin
        longint et, es;
        int span;
        span = (n % 7 == 0) ? 32767 : 3000;
        in_valid = 1; neg = 1'($urandom);
        total = rnd(span); split = rnd(span);
        f1 = rnd(span); f2 = rnd(span); f3 = rnd(span); f4 = rnd(span);
        pa.ca = coef_t'($urandom_range(0, 65536)); pa.cb = coef_t'($urandom_range(0, 65536));
        pb.ca = coef_t'($urandom_range(0, 65536)); pb.cb = coef_t'($urandom_range(0, 65536));
        pml(neg, total, split, f1, f2, f3, f4, pa.ca, pa.cb, pb.ca, pb.cb, et, es);
        exp_t.push_back(et); exp_s.push_back(es); vhist.push_back(1'b1);
      end else begin
        in_valid = 0;
        vhist.push_back(1'b0);
      end
    end
    // directed: lossless (ca = 1), cb = 0.5, E half step
    @(negedge clk);
    in_valid = 1; neg = 0; total = 100; split = 40; f1 = 20; f2 = 0; f3 = 10; f4 = 0;
    pa = '{ca: 18'd65536, cb: 18'd32768}; pb = '{ca: 18'd65536, cb: 18'd32768};
    @(negedge clk); in_valid = 0;
    @(negedge clk);
    checks++;
    // a = 40 + 10 = 50, b = 60 - 5 = 55
    if (split_new != 16'sd50 || total_new != 16'sd105) begin
      failures++; $display("directed: %0d %0d", total_new, split_new);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
