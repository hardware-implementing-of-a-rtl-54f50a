// fp_sqrt_approx: approximate square root for the threshold-pruning unit.
//
// The source approximates sqrt(x) by 1 - 0.5 y - 0.25 y^2 with y = 1 - x,
// which is only meaningful for x near 1. This unit therefore first reduces
// the argument (its own addition): x = m * 2^(2k) with m in [0.5, 2), the
// polynomial is applied to m, and k is added to the exponent of the result,
// giving sqrt(x) ~ poly(m) * 2^k. The polynomial itself, including its
// coefficient 0.25 on y^2, is the source's (the Taylor series would have
// 0.125). Zero and negative inputs give zero. Combinational.
module fp_sqrt_approx
  import hgsca_pkg::*;
(
  input  fp32_t x,
  output fp32_t y
);
  logic signed [9:0] e_unb, k;
  fp32_t m, yv, ysq, t_half, t_quarter, p1, poly;

  always_comb begin
    e_unb = $signed({2'b00, x[30:23]}) - 10'sd127;
    if (e_unb[0]) begin               // odd exponent: m = mantissa / 2 in [0.5,1)
      m = {1'b0, 8'd126, x[22:0]};
      k = (e_unb + 10'sd1) >>> 1;
    end else begin                    // even exponent: m in [1,2)
      m = {1'b0, 8'd127, x[22:0]};
      k = e_unb >>> 1;
    end
  end

  fp_add u_y    (.a(FP_ONE), .b(m), .sub(1'b1), .y(yv));
  fp_mul u_ysq  (.a(yv), .b(yv), .y(ysq));
  fp_mul u_h    (.a(yv), .b(FP_HALF), .y(t_half));
  fp_mul u_q    (.a(ysq), .b(FP_0P25), .y(t_quarter));
  fp_add u_p1   (.a(FP_ONE), .b(t_half), .sub(1'b1), .y(p1));
  fp_add u_p2   (.a(p1), .b(t_quarter), .sub(1'b1), .y(poly));

  logic signed [9:0] e_out;
  always_comb begin
    e_out = $signed({2'b00, poly[30:23]}) + k;
    y = {1'b0, e_out[7:0], poly[22:0]};
    if (x[31] || x[30:23] == 8'd0 || poly[30:23] == 8'd0) y = FP_ZERO;
  end
endmodule
