// update_unit: the normal FDTD/FIT dataflow circuit.
//
// Computes X(n+1) = X(n-1) + C*[(f1 - f2) - (f3 - f4)] for the E half step,
// or X(n+1) = X(n-1) - C*[...] for the b half step (neg = 1). The four curl
// operands enter two subtractors, their results a third, the difference is
// multiplied by the cell's material constant C and added to the old value:
// the tree of the machine's update circuit, one new value per clock.
//
// Timing: two register stages. Stage 1 holds the curl difference, stage 2
// the scaled and accumulated result, so out_valid/result follow in_valid by
// two clocks. The split into two stages, the fixed-point rounding (half up)
// and the saturation of the result to the field range are this design's
// choices.
module update_unit
  import fdtd_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  logic   neg,
  input  field_t old,
  input  field_t f1, f2, f3, f4,
  input  coef_t  c,
  output logic   out_valid,
  output field_t result
);

  logic                       v1;
  logic                       neg1;
  field_t                     old1;
  logic signed [DATA_W+1:0]   curl1;
  coef_t                      c1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v1        <= in_valid;
      out_valid <= v1;
    end
  end

  // Stage 1: the two subtractors and the combining subtractor.
  logic signed [DATA_W+1:0] w1, w2, w3, w4;
  always_comb begin
    w1 = (DATA_W+2)'(f1);
    w2 = (DATA_W+2)'(f2);
    w3 = (DATA_W+2)'(f3);
    w4 = (DATA_W+2)'(f4);
  end

  always_ff @(posedge clk) begin
    curl1 <= (w1 - w2) - (w3 - w4);
    old1  <= old;
    c1    <= c;
    neg1  <= neg;
  end

  // Stage 2: multiply by C, add to (or subtract from) the old value.
  acc_t scaled;
  acc_t sum;
  always_comb begin
    scaled = round_coef(acc_t'(curl1) * acc_t'({1'b0, c1}));
    sum    = neg1 ? acc_t'(old1) - scaled : acc_t'(old1) + scaled;
  end

  always_ff @(posedge clk) result <= sat_field(sum);

endmodule
