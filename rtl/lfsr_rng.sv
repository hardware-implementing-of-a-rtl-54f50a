// lfsr_rng: 32-bit linear-feedback shift register random number generator.
//
// A Fibonacci LFSR with the primitive feedback polynomial
// x^32 + x^22 + x^2 + x + 1: each enabled cycle the register shifts left by
// one and the new bit 0 is the XOR of bits 31, 21, 1 and 0. Its period is
// 2^32 - 1 for any non-zero seed. The source generates its random numbers
// with LFSRs whose input is a linear function of two or more register bits;
// the length, the polynomial and the seed are this design's choice. A zero
// seed is replaced by 1 so the register can never lock up.
//
// Timing: rnd is the register itself; it changes on the clock edge after
// en is high. Reset (active low, synchronous) loads seed, which is a
// port so that identical generators can share one module while starting
// from different states.
module lfsr_rng (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] seed,
  input  logic        en,
  output logic [31:0] rnd
);
  always_ff @(posedge clk) begin
    if (!rst_n)  rnd <= (seed == 32'd0) ? 32'd1 : seed;
    else if (en) rnd <= {rnd[30:0], rnd[31] ^ rnd[21] ^ rnd[1] ^ rnd[0]};
  end
endmodule
