// tb_fp_pkg: reference arithmetic for the testbenches.
//
// Converts IEEE754 single-precision bit patterns to and from the simulator's
// double-precision real type by the definition of the format (sign, biased
// exponent, hidden one), without using the design's arithmetic, and checks
// results against a relative tolerance.
package tb_fp_pkg;

  function automatic real fp2r(logic [31:0] b);
    real m;
    int  e;
    if (b[30:23] == 8'd0) return 0.0;
    m = 1.0 + real'(b[22:0]) / 8388608.0;
    e = int'(b[30:23]) - 127;
    m = m * (2.0 ** e);
    return b[31] ? -m : m;
  endfunction

  // Nearest-below representable float of a real (truncation), normal range only.
  function automatic logic [31:0] r2fp(real r);
    logic s;
    int   e;
    real  a;
    logic [22:0] f;
    if (r == 0.0) return 32'd0;
    s = (r < 0.0);
    a = s ? -r : r;
    e = 0;
    while (a >= 2.0) begin a = a / 2.0; e++; end
    while (a < 1.0)  begin a = a * 2.0; e--; end
    f = 23'($rtoi((a - 1.0) * 8388608.0));
    return {s, 8'(e + 127), f};
  endfunction

  function automatic logic close(real got, real want, real rel);
    real d, m;
    d = got - want;
    if (d < 0.0) d = -d;
    m = (want < 0.0) ? -want : want;
    return d <= rel * m + 1.0e-30;
  endfunction

  // random float with unbiased exponent in [elo, ehi]
  function automatic logic [31:0] rand_fp(int elo, int ehi, logic allow_neg);
    logic s;
    int   e;
    s = allow_neg ? 1'($urandom) : 1'b0;
    e = elo + int'($urandom_range(0, ehi - elo));
    return {s, 8'(e + 127), 23'($urandom)};
  endfunction

endpackage
