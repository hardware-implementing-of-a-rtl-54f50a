// mutation_unit: injects a locally optimal sub-path into a chromosome.
//
// Follows the mutation procedure of the method and its RTL diagram. A random
// X in [0,1) is compared with the mutation rate Pm; when X <= Pm two random
// genes gs < ge are drawn and genes gs+1 .. ge are rebuilt one per cycle:
// from the state of the previous gene, one floating-point adder per HMM
// state forms transition cost plus emission cost at that frame, a comparator
// takes the minimum (lowest state on a tie), and the arg-min state and its
// cost are written to the gene. Otherwise the chromosome passes unchanged.
// The diagram draws four adders; with the six-state model this unit has one
// per state, N_STATES. The gene after ge keeps its state; the processing
// element recomputes all gene costs and the total afterwards.
//
// Timing: start loads the chromosome; done pulses when child is valid,
// after ge - gs loop cycles when mutating. mutated tells whether the
// mutation was applied. The random numbers come from a free-running LFSR.
module mutation_unit
  import hgsca_pkg::*;
#(
  parameter int          T    = 32
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic [31:0] seed,     // LFSR reset value
  input  logic   start,
  input  fp32_t  pm,
  input  gene_t  parent [T],
  input  fp32_t  trans_cost [N_STATES][N_STATES],
  input  fp32_t  emis_cost  [T][N_STATES],
  output gene_t  child  [T],
  output logic   done,
  output logic   mutated,
  output logic [$clog2(T)-1:0] gs_point,
  output logic [$clog2(T)-1:0] ge_point
);
  localparam int TW = $clog2(T);

  typedef enum logic [1:0] {IDLE, DECIDE, LOOP} mu_state_e;
  mu_state_e st;

  logic [31:0]   rnd;
  logic [TW-1:0] g, ge, gs_draw, ge_draw;
  fp32_t         cand [N_STATES];
  state_t        best;
  state_t        prev_s;

  lfsr_rng u_rng (.clk(clk), .rst_n(rst_n), .seed(seed), .en(1'b1), .rnd(rnd));

  assign prev_s = child[g - 1'b1].s;

  for (genvar k = 0; k < N_STATES; k++) begin : g_add
    fp_add u_add (.a(trans_cost[prev_s][k]), .b(emis_cost[g][k]), .sub(1'b0), .y(cand[k]));
  end

  always_comb begin
    best = '0;
    for (int k = 1; k < N_STATES; k++)
      if (fp_lt_pos(cand[k], cand[best])) best = STATE_W'(k);
  end

  // gs in 0..T-2, ge in gs+1..T-1
  always_comb begin
    gs_draw = TW'(rnd[31:24] % 8'(T - 1));
    ge_draw = TW'(8'(gs_draw) + 8'd1 + (rnd[15:8] % (8'(T - 1) - 8'(gs_draw))));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st       <= IDLE;
      done     <= 1'b0;
      mutated  <= 1'b0;
      g        <= '0;
      ge       <= '0;
      gs_point <= '0;
      ge_point <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        IDLE: if (start) begin
          child <= parent;
          st    <= DECIDE;
        end
        DECIDE: begin
          if (fp_le_pos(u24_to_unit(rnd[23:0]), pm)) begin
            mutated  <= 1'b1;
            g        <= gs_draw + 1'b1;
            ge       <= ge_draw;
            gs_point <= gs_draw;
            ge_point <= ge_draw;
            st       <= LOOP;
          end else begin
            mutated <= 1'b0;
            done    <= 1'b1;
            st      <= IDLE;
          end
        end
        LOOP: begin
          child[g] <= '{s: best, f: cand[best]};
          if (g == ge) begin
            done <= 1'b1;
            st   <= IDLE;
          end else begin
            g <= g + 1'b1;
          end
        end
        default: st <= IDLE;
      endcase
    end
  end
endmodule
