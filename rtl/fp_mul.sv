// fp_mul: IEEE754 single-precision multiplier, combinational.
//
// The 24-bit significands (hidden one restored) are multiplied into a 48-bit
// product; the product is normalised by at most one place and truncated to
// 23 fraction bits (rounded toward zero). Subnormals read as zero, underflow
// flushes to zero, overflow or an infinite operand gives infinity. Rounding
// and special cases are this design's choice; the source only names an
// IEEE754 multiplier.
module fp_mul
  import hgsca_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);
  logic        s;
  logic [47:0] p;
  logic signed [9:0] e;

  always_comb begin
    s = a[31] ^ b[31];
    p = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e = $signed({2'b00, a[30:23]}) + $signed({2'b00, b[30:23]}) - 10'sd127;
    if (p[47]) begin
      e = e + 10'sd1;
      y = {s, e[7:0], p[46:24]};
    end else begin
      y = {s, e[7:0], p[45:23]};
    end
    if (a[30:23] == 8'd0 || b[30:23] == 8'd0) y = {s, 31'd0};
    else if (a[30:23] == 8'hFF || b[30:23] == 8'hFF || e >= 255) y = {s, FP_INF[30:0]};
    else if (e <= 0) y = {s, 31'd0};
  end
endmodule
