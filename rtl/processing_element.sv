// processing_element: one cell of the stochastic cellular automaton.
//
// A cell owns one chromosome: a path of T genes through the trellis of the
// word model, state s_t non-decreasing from one frame to the next, and its
// total cost F. Per generation it runs the three genetic operators of the
// method in the order of its block diagram, each on the result of the
// previous one, against the chromosomes of its four von Neumann neighbours
// (up, left, down, right):
//   selection_unit  -> parent (own chromosome or a neighbour's)
//   crossover_unit  -> child  (greedy single-point crossover with neighbours)
//   mutation_unit   -> child  (optimal sub-path injection)
//   chrom_eval      -> gene costs and total cost recomputed ("modify cost")
// The new chromosome is kept in a working register while the neighbours
// still read the current one; it replaces the current chromosome on commit,
// which the array gives to all cells at once, so every cell of the automaton
// updates synchronously as a cellular automaton does.
//
// init_start makes a random initial chromosome: s_0 = 0 and each later gene
// moves one state up with probability 1/4 (two random bits both one), never
// past the last state, then it is costed by chrom_eval. The initial
// distribution is this design's choice; the source says only "randomly
// generate a chromosome".
//
// Timing: after init_start or iter_start the cell is busy and pulses done
// when the working chromosome is ready. A generation without crossover or
// mutation takes T + 11 cycles from iter_start to done (selection 2,
// crossover and mutation 3 each, evaluation T + 1, hand-overs); a crossover
// at gene gc adds T - gc cycles and a mutation of genes gs+1..ge adds
// ge - gs. Initialisation takes 2T + 3 cycles. commit copies the working
// chromosome to cur/cur_cost on the next edge. The ev_* outputs describe
// the last generation (valid from done).
module processing_element
  import hgsca_pkg::*;
#(
  parameter int          T    = 32
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic [31:0] seed,     // seeds this cell's four LFSRs
  input  logic   init_start,
  input  logic   iter_start,
  input  logic   commit,
  input  fp32_t  t0,
  input  fp32_t  pc,
  input  fp32_t  pm,
  input  fp32_t  init_cost  [N_STATES],
  input  fp32_t  trans_cost [N_STATES][N_STATES],
  input  fp32_t  emis_cost  [T][N_STATES],
  input  gene_t  nb       [4][T],
  input  fp32_t  nb_cost  [4],
  output gene_t  cur      [T],
  output fp32_t  cur_cost,
  output logic   busy,
  output logic   done,
  output logic   ev_took_better,
  output logic   ev_took_worse,
  output logic   ev_crossed,
  output logic   ev_mutated
);
  localparam int TW = $clog2(T);

  typedef enum logic [2:0] {S_IDLE, S_GEN, S_SEL, S_XO, S_MU, S_EVAL} pe_state_e;
  pe_state_e st;

  gene_t  work [T];
  fp32_t  work_cost;
  logic [TW-1:0] t_idx;
  logic [31:0]   rnd;

  logic  sel_start, sel_done, xo_start, xo_done, mu_start, mu_done, ev_start, ev_done;
  gene_t sel_parent [T], xo_child [T], mu_child [T];
  fp32_t sel_parent_cost, ev_cost, sel_temp;
  fp32_t ev_f [T];
  state_t work_s [T];
  logic [TW-1:0] xo_gc, mu_gs, mu_ge;

  lfsr_rng u_rng (.clk(clk), .rst_n(rst_n), .seed(seed ^ 32'h9E37_79B9), .en(1'b1), .rnd(rnd));

  selection_unit #(.T(T)) u_sel (
    .clk, .rst_n, .seed(seed ^ 32'h85EB_CA6B), .load_t0(init_start), .t0, .start(sel_start),
    .own(cur), .own_cost(cur_cost), .nb, .nb_cost,
    .parent(sel_parent), .parent_cost(sel_parent_cost), .done(sel_done),
    .took_better(ev_took_better), .took_worse(ev_took_worse), .temp(sel_temp));

  crossover_unit #(.T(T)) u_xo (
    .clk, .rst_n, .seed(seed ^ 32'hC2B2_AE35), .start(xo_start), .pc, .parent(work), .nb,
    .trans_cost, .emis_cost, .child(xo_child), .done(xo_done), .crossed(ev_crossed),
    .gc_point(xo_gc));

  mutation_unit #(.T(T)) u_mu (
    .clk, .rst_n, .seed(seed ^ 32'h27D4_EB2F), .start(mu_start), .pm, .parent(work),
    .trans_cost, .emis_cost, .child(mu_child), .done(mu_done), .mutated(ev_mutated),
    .gs_point(mu_gs), .ge_point(mu_ge));

  always_comb for (int t = 0; t < T; t++) work_s[t] = work[t].s;

  chrom_eval #(.T(T)) u_eval (
    .clk, .rst_n, .start(ev_start), .s(work_s), .init_cost, .trans_cost, .emis_cost,
    .f(ev_f), .cost(ev_cost), .done(ev_done));

  assign busy = (st != S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      done      <= 1'b0;
      sel_start <= 1'b0;
      xo_start  <= 1'b0;
      mu_start  <= 1'b0;
      ev_start  <= 1'b0;
      t_idx     <= '0;
      cur_cost  <= FP_ZERO;
      work_cost <= FP_ZERO;
      for (int t = 0; t < T; t++) begin
        cur[t]  <= '{s: '0, f: FP_ZERO};
        work[t] <= '{s: '0, f: FP_ZERO};
      end
    end else begin
      done      <= 1'b0;
      sel_start <= 1'b0;
      xo_start  <= 1'b0;
      mu_start  <= 1'b0;
      ev_start  <= 1'b0;
      if (commit) begin
        cur      <= work;
        cur_cost <= work_cost;
      end
      unique case (st)
        S_IDLE: begin
          if (init_start) begin
            t_idx <= '0;
            st    <= S_GEN;
          end else if (iter_start) begin
            sel_start <= 1'b1;
            st        <= S_SEL;
          end
        end
        S_GEN: begin
          if (t_idx == '0) work[0].s <= '0;
          else if (rnd[0] && rnd[1] && work[t_idx - 1'b1].s != STATE_W'(N_STATES - 1))
            work[t_idx].s <= work[t_idx - 1'b1].s + 1'b1;
          else
            work[t_idx].s <= work[t_idx - 1'b1].s;
          if (int'(t_idx) == T - 1) begin
            ev_start <= 1'b1;
            st       <= S_EVAL;
          end else begin
            t_idx <= t_idx + 1'b1;
          end
        end
        S_SEL: if (sel_done) begin
          work      <= sel_parent;
          work_cost <= sel_parent_cost;
          xo_start  <= 1'b1;
          st        <= S_XO;
        end
        S_XO: if (xo_done) begin
          work     <= xo_child;
          mu_start <= 1'b1;
          st       <= S_MU;
        end
        S_MU: if (mu_done) begin
          work     <= mu_child;
          ev_start <= 1'b1;
          st       <= S_EVAL;
        end
        S_EVAL: if (ev_done) begin
          for (int t = 0; t < T; t++) work[t].f <= ev_f[t];
          work_cost <= ev_cost;
          done      <= 1'b1;
          st        <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
