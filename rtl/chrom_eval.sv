// chrom_eval: recomputes the gene costs and the total cost of a chromosome.
//
// This is the "modify the cost" step of the genetic operators: from the
// state sequence alone it sets every gene cost f_t (Eq. 9 of the method:
// emission cost of state s_t at frame t plus the initial cost of s_0 or the
// transition cost from s_{t-1}) and sums them into the chromosome cost
// F = sum f_t (Eq. 10). One gene per cycle with two floating-point adders:
// after start it takes T cycles and pulses done with f and cost valid, which
// then hold until the next start. The serial organisation is this design's
// choice.
module chrom_eval
  import hgsca_pkg::*;
#(
  parameter int T = 32
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  state_t s    [T],
  input  fp32_t  init_cost  [N_STATES],
  input  fp32_t  trans_cost [N_STATES][N_STATES],
  input  fp32_t  emis_cost  [T][N_STATES],
  output fp32_t  f    [T],
  output fp32_t  cost,
  output logic   done
);
  localparam int TW = (T > 1) ? $clog2(T) : 1;

  logic          run;
  logic [TW-1:0] t_idx;
  fp32_t         step_cost, gene_cost, acc_next;

  always_comb begin
    if (t_idx == '0) step_cost = init_cost[s[0]];
    else             step_cost = trans_cost[s[t_idx - 1'b1]][s[t_idx]];
  end

  fp_add u_gene (.a(emis_cost[t_idx][s[t_idx]]), .b(step_cost), .sub(1'b0), .y(gene_cost));
  fp_add u_acc  (.a(cost), .b(gene_cost), .sub(1'b0), .y(acc_next));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run   <= 1'b0;
      t_idx <= '0;
      done  <= 1'b0;
      cost  <= FP_ZERO;
    end else begin
      done <= 1'b0;
      if (start) begin
        run   <= 1'b1;
        t_idx <= '0;
        cost  <= FP_ZERO;
      end else if (run) begin
        f[t_idx] <= gene_cost;
        cost     <= acc_next;
        if (int'(t_idx) == T - 1) begin
          run  <= 1'b0;
          done <= 1'b1;
        end else begin
          t_idx <= t_idx + 1'b1;
        end
      end
    end
  end
endmodule
