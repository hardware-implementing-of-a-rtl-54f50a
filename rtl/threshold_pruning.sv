// threshold_pruning: drops poorly matching words from the competition.
//
// Each generation every active word's array reports its best fitness X(i)
// (a cost: lower is better). Following the unit's RTL diagram, the unit
// serially accumulates Sigma = sum X(i) with a floating-point adder,
// divides by the number of active words to get Avg, then accumulates
// sum (X(i) - Avg)^2 through a subtractor, a multiplier and an adder,
// divides by the count to get the variance and takes its square root
// (fp_sqrt_approx) to get SD. The threshold is Avg + SD/2, and a comparator
// sets bit i of above_mask for every active word whose X(i) is higher.
// Only the words still active enter the statistics (the method computes
// them on the "Result" array of the words taking part).
//
// The pruning-ratio rule: words are only disabled if at least Pp percent of
// all V reference words remain active afterwards,
// (active - above) * 100 >= pp_percent * V; prune_mask is above_mask when
// this holds and zero otherwise, and prune_blocked reports a blocked prune.
// This is the method's rule that pruning goes on only while Pp percent of
// the reference words remain; the exact inequality is this design's reading.
// best_word is the active word with the lowest X (ties: lowest index), the
// recognised word.
//
// Timing: start samples nothing; x and active must hold until done. The
// unit takes 2V + 6 cycles from start to done and pulses done with all
// outputs valid; they hold until the next start.
module threshold_pruning
  import hgsca_pkg::*;
#(
  parameter int V = 24
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  fp32_t  x [V],
  input  logic [V-1:0] active,
  input  logic [6:0]   pp_percent,
  output logic   done,
  output fp32_t  avg,
  output fp32_t  sd,
  output fp32_t  threshold,
  output logic [V-1:0] above_mask,
  output logic [V-1:0] prune_mask,
  output logic   prune_blocked,
  output logic [$clog2(V)-1:0] best_word
);
  localparam int VW = $clog2(V);
  localparam int CW = $clog2(V + 1);

  typedef enum logic [2:0] {P_IDLE, P_SUM, P_AVG, P_VAR, P_SD, P_THR, P_CMP, P_MASK} pr_state_e;
  pr_state_e st;

  logic [VW-1:0] i;
  logic [CW-1:0] n;
  fp32_t sigma, sq_acc, var_r;
  fp32_t sum_next, avg_q, diff, sq, sq_next, var_q, sd_q, half_sd, thr_q, n_fp;

  assign n_fp = uint_to_fp(24'(n));

  fp_add         u_sum  (.a(sigma),  .b(x[i]),  .sub(1'b0), .y(sum_next));
  fp_div         u_avg  (.a(sigma),  .b(n_fp),  .y(avg_q));
  fp_add         u_diff (.a(x[i]),   .b(avg),   .sub(1'b1), .y(diff));
  fp_mul         u_sq   (.a(diff),   .b(diff),  .y(sq));
  fp_add         u_sqa  (.a(sq_acc), .b(sq),    .sub(1'b0), .y(sq_next));
  fp_div         u_var  (.a(sq_acc), .b(n_fp),  .y(var_q));
  fp_sqrt_approx u_sqrt (.x(var_r),  .y(sd_q));
  fp_mul         u_half (.a(sd),     .b(FP_HALF), .y(half_sd));
  fp_add         u_thr  (.a(avg),    .b(half_sd), .sub(1'b0), .y(thr_q));

  logic [V-1:0]  above_c;
  logic [CW-1:0] n_above;
  logic [VW-1:0] best_c;
  logic          allow;
  always_comb begin
    above_c = '0;
    n_above = '0;
    best_c  = '0;
    for (int k = 0; k < V; k++) begin
      above_c[k] = active[k] && fp_lt_pos(threshold, x[k]);
      n_above   += CW'(above_c[k]);
    end
    for (int k = V - 1; k >= 0; k--)
      if (active[k] && (!active[best_c] || fp_le_pos(x[k], x[best_c]))) best_c = VW'(k);
    allow = (32'(n - n_above) * 32'd100) >= (32'(pp_percent) * 32'(V));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st            <= P_IDLE;
      done          <= 1'b0;
      i             <= '0;
      n             <= '0;
      sigma         <= FP_ZERO;
      sq_acc        <= FP_ZERO;
      var_r         <= FP_ZERO;
      avg           <= FP_ZERO;
      sd            <= FP_ZERO;
      threshold     <= FP_ZERO;
      above_mask    <= '0;
      prune_mask    <= '0;
      prune_blocked <= 1'b0;
      best_word     <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        P_IDLE: if (start) begin
          i     <= '0;
          n     <= '0;
          sigma <= FP_ZERO;
          st    <= P_SUM;
        end
        P_SUM: begin                              // Register Sigma
          if (active[i]) begin
            sigma <= sum_next;
            n     <= n + 1'b1;
          end
          if (int'(i) == V - 1) st <= P_AVG;
          else i <= i + 1'b1;
        end
        P_AVG: begin                              // Register Avg
          avg    <= (n == '0) ? FP_ZERO : avg_q;
          i      <= '0;
          sq_acc <= FP_ZERO;
          st     <= P_VAR;
        end
        P_VAR: begin                              // Register sum (X(i)-Avg)^2
          if (active[i]) sq_acc <= sq_next;
          if (int'(i) == V - 1) st <= P_SD;
          else i <= i + 1'b1;
        end
        P_SD: begin                               // Register Var
          var_r <= (n == '0) ? FP_ZERO : var_q;
          st    <= P_THR;
        end
        P_THR: begin                              // Register SD
          sd        <= sd_q;
          st        <= P_CMP;
        end
        P_CMP: begin                              // threshold = Avg + SD/2
          threshold <= thr_q;
          st        <= P_MASK;
        end
        P_MASK: begin                             // comparator, bit pattern
          above_mask    <= above_c;
          prune_mask    <= allow ? above_c : '0;
          prune_blocked <= !allow && (above_c != '0);
          best_word     <= best_c;
          done          <= 1'b1;
          st            <= P_IDLE;
        end
        default: st <= P_IDLE;
      endcase
    end
  end
endmodule
