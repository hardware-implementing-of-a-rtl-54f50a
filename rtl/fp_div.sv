// fp_div: IEEE754 single-precision divider, combinational.
//
// y = a / b. The dividend significand, shifted left by 25 places, is divided
// by the divisor significand with an integer divider; the 26-bit quotient is
// normalised by at most one place and truncated (rounded toward zero).
// Subnormals read as zero; a zero dividend gives zero, a zero divisor or an
// infinite dividend gives infinity, underflow flushes to zero. Rounding and
// special cases are this design's choice; the source only names an IEEE754
// divider.
module fp_div
  import hgsca_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);
  logic        s;
  logic [48:0] num;
  logic [48:0] q;
  logic signed [9:0] e;

  always_comb begin
    s   = a[31] ^ b[31];
    num = {1'b1, a[22:0], 25'd0};
    q   = num / {25'd0, 1'b1, b[22:0]};     // in (2^24, 2^26)
    e   = $signed({2'b00, a[30:23]}) - $signed({2'b00, b[30:23]}) + 10'sd127;
    if (q[25]) begin
      y = {s, e[7:0], q[24:2]};
    end else begin
      e = e - 10'sd1;
      y = {s, e[7:0], q[23:1]};
    end
    if (a[30:23] == 8'd0) y = {s, 31'd0};
    else if (b[30:23] == 8'd0 || a[30:23] == 8'hFF || e >= 255) y = {s, FP_INF[30:0]};
    else if (b[30:23] == 8'hFF || e <= 0) y = {s, 31'd0};
  end
endmodule
