// hgsca_pkg: types and constants shared by the HGSCA decoder.
//
// All arithmetic of the decoder is IEEE754 single precision, carried as raw
// 32-bit words (fp32_t). Costs are negative logarithms of HMM probabilities,
// so they are never negative; two non-negative floats compare like unsigned
// integers, which is what fp_le_pos()/fp_lt_pos() use.
//
// A gene is the pair (state, cost) of one time step of a path through the
// trellis; its time index is the gene's position in the chromosome array.
// The model has N_STATES = 6 states (a 6-state left-to-right HMM) and a
// codebook of K_SYMBOLS = 256 observation symbols, both as in the design's
// evaluation setup. FP_BIG stands in for -log(0): a forbidden transition
// (a state going backwards) costs 1.0e30, large enough to lose every
// comparison but small enough that a sum of a few hundred of them stays
// finite. That constant is this design's choice.
package hgsca_pkg;

  localparam int N_STATES  = 6;
  localparam int STATE_W   = 3;
  localparam int K_SYMBOLS = 256;
  localparam int OBS_W     = 8;

  typedef logic [31:0] fp32_t;

  localparam fp32_t FP_ZERO = 32'h0000_0000;
  localparam fp32_t FP_HALF = 32'h3F00_0000;
  localparam fp32_t FP_ONE  = 32'h3F80_0000;
  localparam fp32_t FP_0P95 = 32'h3F73_3333;  // 0.95, cooling factor
  localparam fp32_t FP_0P25 = 32'h3E80_0000;
  localparam fp32_t FP_BIG  = 32'h7149_F2CA;  // 1.0e30, cost of a forbidden step
  localparam fp32_t FP_INF  = 32'h7F80_0000;

  typedef logic [STATE_W-1:0] state_t;
  typedef logic [OBS_W-1:0]   obs_t;

  typedef struct packed {
    state_t s;   // HMM state of this time step, 0 .. N_STATES-1
    fp32_t  f;   // cost of this step: emission cost + transition cost
  } gene_t;

  // Order of the four von Neumann neighbours on a cell's inputs.
  typedef enum logic [1:0] {NB_UP = 2'd0, NB_LEFT = 2'd1, NB_DOWN = 2'd2, NB_RIGHT = 2'd3} nb_dir_e;

  // a <= b and a < b for non-negative floats (costs).
  function automatic logic fp_le_pos(fp32_t a, fp32_t b);
    return a[30:0] <= b[30:0];
  endfunction

  function automatic logic fp_lt_pos(fp32_t a, fp32_t b);
    return a[30:0] < b[30:0];
  endfunction

  // Uniform random number in [0,1) from 24 random bits: r * 2^-24, exact.
  function automatic fp32_t u24_to_unit(logic [23:0] r);
    int unsigned lz;
    logic [23:0] m;
    lz = 0;
    for (int i = 23; i >= 0; i--) begin
      if (r[i]) break;
      lz++;
    end
    if (r == '0) return FP_ZERO;
    m = r << lz;  // leading one now in bit 23
    return {1'b0, 8'(126 - lz), m[22:0]};
  endfunction

  // Small unsigned integer (below 2^24) to float, exact.
  function automatic fp32_t uint_to_fp(logic [23:0] v);
    int unsigned lz;
    logic [23:0] m;
    lz = 0;
    for (int i = 23; i >= 0; i--) begin
      if (v[i]) break;
      lz++;
    end
    if (v == '0) return FP_ZERO;
    m = v << lz;
    return {1'b0, 8'(150 - lz), m[22:0]};
  endfunction

endpackage
