// tb_update_unit: random operands, including values that saturate, are fed
// one per clock; each result is compared with the reference update two
// clocks later, and the valid flag is checked to arrive exactly then.
module tb_update_unit;
  import fdtd_pkg::*;
  import fdtd_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, neg, out_valid;
  field_t old, f1, f2, f3, f4, result;
  coef_t c;
  int checks = 0, failures = 0;

  update_unit dut (.*);

  longint exp_q [$];
  logic   vhist [$];

  task automatic drive_random(bit big);
    in_valid = 1'b1;
    neg = 1'($urandom);
    if (big) begin
      old = field_t'($urandom); f1 = field_t'($urandom); f2 = field_t'($urandom);
      f3 = field_t'($urandom);  f4 = field_t'($urandom);
      c = coef_t'($urandom_range(0, 2*65536));
    end else begin
      old = field_t'($urandom_range(0, 4000)) - 16'sd2000;
      f1 = field_t'($urandom_range(0, 400)) - 16'sd200;
      f2 = field_t'($urandom_range(0, 400)) - 16'sd200;
      f3 = field_t'($urandom_range(0, 400)) - 16'sd200;
      f4 = field_t'($urandom_range(0, 400)) - 16'sd200;
      c = coef_t'($urandom_range(0, 65536));
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; neg = 0; old = 0; f1 = 0; f2 = 0; f3 = 0; f4 = 0; c = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000 + 2; n++) begin
      @(negedge clk);
      // results of the operands given two clocks ago
      if (vhist.size() >= 2) begin
        logic vexp; longint e;
        vexp = vhist.pop_front();
        checks++;
        if (out_valid !== vexp) begin
          failures++;
          $display("valid latency mismatch at %0d", n);
        end
        if (vexp) begin
          e = exp_q.pop_front();
          checks++;
          if (longint'(result) != e) begin
            failures++;
            if (failures < 10) $display("mismatch: got %0d expected %0d", result, e);
          end
        end
      end
      if (n < 2000 && ($urandom_range(0, 7) != 0)) begin
        drive_random(n % 5 == 0);
        exp_q.push_back(upd(neg, old, f1, f2, f3, f4, c));
        vhist.push_back(1'b1);
      end else begin
        in_valid = 1'b0;
        vhist.push_back(1'b0);
      end
    end
    // directed: C = 1.0, curl = 10 -> old + 10 / old - 10
    @(negedge clk);
    in_valid = 1; neg = 0; old = 100; f1 = 30; f2 = 10; f3 = 5; f4 = 15; c = 18'd65536;
    @(negedge clk);
    in_valid = 1; neg = 1;
    @(negedge clk);
    in_valid = 0;
    checks++; if (result != 16'sd130) begin failures++; $display("directed add: %0d", result); end
    @(negedge clk);
    checks++; if (result != 16'sd70) begin failures++; $display("directed sub: %0d", result); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
