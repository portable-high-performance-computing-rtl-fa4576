// pml_unit: split-field PML circuit for one field component.
//
// Inside the perfectly matched layer a component X is split into two parts,
// one driven by each term of its curl, X = Xa + Xb (for e_x: e_xy and e_xz).
// The total X is kept in the field memories and Xa in the PML split memory,
// so Xb = X - Xa. Each part is updated with its own loss:
//   Xa(n+1) = ca_a*Xa(n) + s*cb_a*(f1 - f2)
//   Xb(n+1) = ca_b*Xb(n) - s*cb_b*(f3 - f4)
//   X(n+1)  = Xa(n+1) + Xb(n+1)
// with s = +1 for the E half step and -1 for the b half step (neg = 1). The
// constants come from the PML constant table for the depth of the cell along
// the axis of each derivative. Each part is one subtractor and one
// accumulation, as in the machine's PML circuit; storing the total and one
// part (rather than both parts) is how this design reads the memory map.
//
// Timing: two register stages, like update_unit; results follow in_valid by
// two clocks. Rounding is half up, results saturate to the field range.
module pml_unit
  import fdtd_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  logic      neg,
  input  field_t    total,     // X(n), total field
  input  field_t    split,     // Xa(n)
  input  field_t    f1, f2, f3, f4,
  input  pml_coef_t pa,        // constants of Xa
  input  pml_coef_t pb,        // constants of Xb
  output logic      out_valid,
  output field_t    total_new,
  output field_t    split_new
);

  logic                     v1, neg1;
  logic signed [DATA_W:0]   da1, db1, xa1, xb1;
  pml_coef_t                pa1, pb1;

  logic signed [DATA_W:0] w1, w2, w3, w4, wt, ws;
  always_comb begin
    w1 = (DATA_W+1)'(f1);
    w2 = (DATA_W+1)'(f2);
    w3 = (DATA_W+1)'(f3);
    w4 = (DATA_W+1)'(f4);
    wt = (DATA_W+1)'(total);
    ws = (DATA_W+1)'(split);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v1        <= in_valid;
      out_valid <= v1;
    end
  end

  // Stage 1: derivatives and the second split part.
  always_ff @(posedge clk) begin
    da1  <= w1 - w2;
    db1  <= w3 - w4;
    xa1  <= ws;
    xb1  <= wt - ws;
    pa1  <= pa;
    pb1  <= pb;
    neg1 <= neg;
  end

  // Stage 2: lossy accumulation of each part, then their sum.
  acc_t ta, tb, na, nb;
  always_comb begin
    na = acc_t'({1'b0, pa1.ca}) * acc_t'(xa1);
    nb = acc_t'({1'b0, pb1.ca}) * acc_t'(xb1);
    tb = acc_t'({1'b0, pa1.cb}) * acc_t'(da1);
    ta = acc_t'({1'b0, pb1.cb}) * acc_t'(db1);
    if (neg1) begin
      na = na - tb;
      nb = nb + ta;
    end else begin
      na = na + tb;
      nb = nb - ta;
    end
  end

  field_t a_new, b_new;
  always_comb begin
    a_new = sat_field(round_coef(na));
    b_new = sat_field(round_coef(nb));
  end

  always_ff @(posedge clk) begin
    split_new <= a_new;
    total_new <= sat_field(acc_t'(a_new) + acc_t'(b_new));
  end

endmodule
