// selection_unit: simulated-annealing tournament of one SCA cell.
//
// Follows the selection procedure of the method and its RTL diagram: a
// random number 1..4 picks one of the four neighbouring chromosomes (B)
// through a 4-to-1 multiplexer; a floating-point subtractor forms
// delta = F(B) - F(A) against the cell's own chromosome A. If delta <= 0, B
// becomes the parent. Otherwise the temperature is cooled,
// T(t) = 0.95 T(t-1), Pow = delta / T(t) is formed by a divider and
// Y = exp(-Pow) by the polynomial approximation (fp_exp_neg); a second
// random number X in [0,1) is compared with Y and B is still the parent when
// X <= Y. The two conditions are ORed into the select of a 2-to-1
// multiplexer between B and A. The diagram writes X <= Y while the
// procedure writes x < y; this unit follows the diagram.
//
// The temperature register is loaded with T0 by load_t0 and cooled once per
// start, before it is used, so the first tournament uses 0.95 T0 (the
// procedure's T = 0.95 T0). Both random numbers are disjoint bit fields of
// one free-running LFSR (this design's choice).
//
// Timing: the decision is combinational and registered on the start cycle;
// parent, parent_cost and the event flags are valid with done, one cycle
// after start, and hold until the next start.
module selection_unit
  import hgsca_pkg::*;
#(
  parameter int          T    = 32
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic [31:0] seed,     // LFSR reset value
  input  logic   load_t0,
  input  fp32_t  t0,
  input  logic   start,
  input  gene_t  own      [T],
  input  fp32_t  own_cost,
  input  gene_t  nb       [4][T],
  input  fp32_t  nb_cost  [4],
  output gene_t  parent   [T],
  output fp32_t  parent_cost,
  output logic   done,
  output logic   took_better,   // B taken because delta <= 0
  output logic   took_worse,    // B taken by the annealing test
  output fp32_t  temp           // current temperature
);
  logic [31:0] rnd;
  logic [1:0]  pick;
  fp32_t       delta, temp_next, pow, y, x;
  logic        delta_le0, x_le_y, take_b;

  lfsr_rng u_rng (.clk(clk), .rst_n(rst_n), .seed(seed), .en(1'b1), .rnd(rnd));

  assign pick = rnd[31:30];              // neighbour 1..4 -> index 0..3
  assign x    = u24_to_unit(rnd[23:0]);  // X in [0,1)

  fp_add     u_delta (.a(nb_cost[pick]), .b(own_cost), .sub(1'b1), .y(delta));
  fp_mul     u_cool  (.a(temp), .b(FP_0P95), .y(temp_next));
  fp_div     u_pow   (.a(delta), .b(temp_next), .y(pow));
  fp_exp_neg u_exp   (.x(pow), .y(y));

  assign delta_le0 = delta[31] || (delta[30:0] == '0);
  assign x_le_y    = fp_le_pos(x, y);
  assign take_b    = delta_le0 || x_le_y;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      temp        <= FP_ONE;
      done        <= 1'b0;
      took_better <= 1'b0;
      took_worse  <= 1'b0;
      parent_cost <= FP_ZERO;
    end else begin
      done <= start;
      if (load_t0) temp <= t0;
      else if (start) begin
        temp        <= temp_next;
        parent      <= take_b ? nb[pick] : own;
        parent_cost <= take_b ? nb_cost[pick] : own_cost;
        took_better <= delta_le0;
        took_worse  <= !delta_le0 && x_le_y;
      end
    end
  end
endmodule
