// fp_exp_neg: approximate exp(-x) for the simulated-annealing acceptance test.
//
// The selection unit needs Y = exp(-Pow) with Pow = delta / T >= 0. The
// source approximates the exponential by the second-order polynomial
// 1 - x + 0.5 x^2, which is the Taylor expansion of exp(-x) around 0, so this
// unit computes y = (1 - x) + 0.5 * x^2 with one multiplier, one constant
// multiplication and two adders. The polynomial has its minimum at x = 1 and
// rises again beyond it, which would make large cost increases look likely;
// this design therefore returns 0 for x >= 1 (its own choice). Negative x is
// not used by the decoder and is computed by the same polynomial.
// Combinational.
module fp_exp_neg
  import hgsca_pkg::*;
(
  input  fp32_t x,
  output fp32_t y
);
  fp32_t sq, half_sq, one_minus_x, poly;

  fp_mul u_sq   (.a(x),  .b(x),       .y(sq));
  fp_mul u_half (.a(sq), .b(FP_HALF), .y(half_sq));
  fp_add u_sub  (.a(FP_ONE), .b(x), .sub(1'b1), .y(one_minus_x));
  fp_add u_add  (.a(one_minus_x), .b(half_sq), .sub(1'b0), .y(poly));

  assign y = (!x[31] && x[30:0] >= FP_ONE[30:0]) ? FP_ZERO : poly;
endmodule
