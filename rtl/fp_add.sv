// fp_add: IEEE754 single-precision adder / subtractor, combinational.
//
// y = a + b when sub = 0, y = a - b when sub = 1. The operands are aligned
// on the larger exponent with two guard bits and a sticky bit, added or
// subtracted as 27-bit magnitudes, renormalised with a leading-zero count,
// and the result is truncated (rounded toward zero). Subnormal inputs are
// read as zero and results below the normal range are flushed to zero; an
// exponent overflow, or an infinite or NaN operand, gives infinity. The
// decoder only ever feeds it finite costs, so these simplifications (this
// design's choice; the source names an IEEE754 adder/subtractor but not its
// rounding or special cases) do not show in its results.
module fp_add
  import hgsca_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  input  logic  sub,
  output fp32_t y
);
  logic        sa, sb, sl, ss;
  logic [7:0]  ea, eb, el, es;
  logic [23:0] ma, mb, ml, ms;
  logic [7:0]  d;
  logic [26:0] al, as_sh;   // {hidden, 23 fraction, guard, round, sticky}
  logic [27:0] sum;
  logic [4:0]  lz;
  logic signed [9:0] eres;
  logic [27:0] norm;

  always_comb begin
    sa = a[31];
    sb = b[31] ^ sub;
    ea = a[30:23];
    eb = b[30:23];
    ma = {1'b1, a[22:0]};
    mb = {1'b1, b[22:0]};
    // larger magnitude first
    if (b[30:0] > a[30:0]) begin
      sl = sb; el = eb; ml = mb; ss = sa; es = ea; ms = ma;
    end else begin
      sl = sa; el = ea; ml = ma; ss = sb; es = eb; ms = mb;
    end
    d     = el - es;
    al    = {ml, 3'b000};
    as_sh = {ms, 3'b000};
    if (d >= 8'd27) as_sh = 27'd1;                      // only the sticky bit survives
    else if (d != 0) as_sh = (as_sh >> d) | 27'((as_sh & ((27'd1 << d) - 27'd1)) != 0);
    if (sl == ss) sum = {1'b0, al} + {1'b0, as_sh};
    else          sum = {1'b0, al} - {1'b0, as_sh};
    lz = 5'd0;
    for (int i = 27; i >= 0; i--) begin
      if (sum[i]) break;
      lz = lz + 5'd1;
    end
    // sum bit 26 is the hidden-bit position of the larger operand
    eres = $signed({2'b00, el}) + 10'sd1 - $signed({5'b0, lz});
    norm = sum << lz;                                    // leading one in bit 27
    y = {sl, eres[7:0], norm[26:4]};
    if (es == 8'd0) y = (el == 8'd0) ? FP_ZERO : {sl, el, ml[22:0]};  // small operand is zero
    if (el == 8'd0) y = FP_ZERO;                                       // both zero
    else if (sum == '0) y = FP_ZERO;
    else if (eres <= 0) y = FP_ZERO;
    else if (eres >= 255 || el == 8'hFF) y = {sl, FP_INF[30:0]};
  end
endmodule
