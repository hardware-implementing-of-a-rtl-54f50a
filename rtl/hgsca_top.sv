// hgsca_top: isolated-word recogniser built on the HGSCA decoder.
//
// Decoding an utterance against V reference words means finding, for every
// word's HMM, the cheapest path through the trellis of states against
// frames (cost = -log probability), and picking the word whose cheapest
// path is cheapest. Instead of Viterbi's full dynamic programme, each word
// has its own stochastic cellular automaton (sca) of SIDE x SIDE cells in
// which a genetic algorithm (selection with simulated annealing, greedy
// crossover, optimal sub-path mutation) evolves candidate paths in parallel.
// After every generation all arrays report their best cost to the
// threshold-pruning unit, which disables the arrays whose best cost is
// above mean + SD/2 of the active words, as long as at least Pp percent of
// the words remain. The word with the lowest best cost after max_iter
// generations is the recognised word.
//
// Use: load each word's cost tables through the mdl_* port (one value per
// cycle: mdl_sel 0 = -log pi[row], 1 = -log a[row][col], 2 = -log b[row]
// at symbol col), write the T observation symbols (codebook indices)
// through the obs_* port, then pulse start with max_iter, t0, pc, pm and
// pp_percent held stable. The controller gathers the emission costs (T
// cycles), initialises all arrays, and then repeats generation + pruning
// max_iter times (max_iter = 0 is treated as 1). done pulses when
// recognized_word, recognized_cost and recognized_path (the state
// sequence of the winning word's best chromosome) are valid; busy is high in between.
// best_fitness and active show every word's last best cost and whether it
// is still competing; iter_count counts finished generations.
//
// The preprocessing, feature extraction and vector quantisation that turn
// speech into the symbol sequence are outside this design. Sizes: the HMM
// has 6 states and 256 symbols (the source's evaluation setup), V = 24
// words (its largest vocabulary); SIDE = 3 and T = 32 frames are this
// design's choice, the source gives neither.
module hgsca_top
  import hgsca_pkg::*;
#(
  parameter int V    = 24,
  parameter int SIDE = 3,
  parameter int T    = 32
) (
  input  logic   clk,
  input  logic   rst_n,
  // model loading
  input  logic   mdl_wr_en,
  input  logic [$clog2(V)-1:0] mdl_word,
  input  logic [1:0]  mdl_sel,
  input  state_t      mdl_row,
  input  obs_t        mdl_col,
  input  fp32_t       mdl_data,
  // observation sequence
  input  logic   obs_wr_en,
  input  logic [$clog2(T)-1:0] obs_addr,
  input  obs_t   obs_data,
  // run control and algorithm parameters
  input  logic   start,
  input  logic [15:0] max_iter,
  input  fp32_t  t0,
  input  fp32_t  pc,
  input  fp32_t  pm,
  input  logic [6:0]  pp_percent,
  // results
  output logic   busy,
  output logic   done,
  output logic [$clog2(V)-1:0] recognized_word,
  output fp32_t  recognized_cost,
  output state_t recognized_path [T],
  output fp32_t  best_fitness [V],
  output logic [V-1:0] active,
  output logic [15:0]  iter_count
);
  localparam int CW = $clog2(SIDE * SIDE + 1);

  typedef enum logic [2:0] {C_IDLE, C_GATHER, C_INIT, C_ITER, C_PRUNE, C_DONE} ctl_state_e;
  ctl_state_e st;

  obs_t  obs [T];
  fp32_t init_cost  [V][N_STATES];
  fp32_t trans_cost [V][N_STATES][N_STATES];
  fp32_t emis_cost  [V][T][N_STATES];
  logic [V-1:0] gather_done, sca_busy, sca_done;
  logic  gather_start, sca_init, sca_iter, pr_start, pr_done;
  logic  sca_running;
  state_t best_path [V][T];
  logic [CW-1:0] ev_better [V], ev_worse [V], ev_xo [V], ev_mu [V];
  logic [V-1:0] prune_mask, above_mask;
  logic  prune_blocked;
  logic [$clog2(V)-1:0] best_word;
  fp32_t avg, sd, threshold;

  always_ff @(posedge clk)
    if (obs_wr_en) obs[obs_addr] <= obs_data;

  for (genvar w = 0; w < V; w++) begin : g_word
    hmm_model_mem #(.T(T)) u_mem (
      .clk, .rst_n,
      .wr_en(mdl_wr_en && mdl_word == ($clog2(V))'(w)),
      .wr_sel(mdl_sel), .wr_row(mdl_row), .wr_col(mdl_col), .wr_data(mdl_data),
      .gather_start, .obs, .gather_done(gather_done[w]),
      .init_cost(init_cost[w]), .trans_cost(trans_cost[w]), .emis_cost(emis_cost[w]));

    sca #(.SIDE(SIDE), .T(T)) u_sca (
      .clk, .rst_n, .seed(32'(w) + 32'd1), .init_start(sca_init), .iter_start(sca_iter), .disable_sca(!active[w]),
      .t0, .pc, .pm, .init_cost(init_cost[w]), .trans_cost(trans_cost[w]),
      .emis_cost(emis_cost[w]), .busy(sca_busy[w]), .done(sca_done[w]),
      .best_fitness(best_fitness[w]), .best_path(best_path[w]),
      .ev_took_better(ev_better[w]), .ev_took_worse(ev_worse[w]),
      .ev_crossed(ev_xo[w]), .ev_mutated(ev_mu[w]));
  end

  threshold_pruning #(.V(V)) u_prune (
    .clk, .rst_n, .start(pr_start), .x(best_fitness), .active, .pp_percent,
    .done(pr_done), .avg, .sd, .threshold, .above_mask, .prune_mask,
    .prune_blocked, .best_word);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st              <= C_IDLE;
      busy            <= 1'b0;
      done            <= 1'b0;
      gather_start    <= 1'b0;
      sca_init        <= 1'b0;
      sca_iter        <= 1'b0;
      pr_start        <= 1'b0;
      sca_running     <= 1'b0;
      active          <= '1;
      iter_count      <= '0;
      recognized_word <= '0;
      recognized_cost <= FP_ZERO;
    end else begin
      done         <= 1'b0;
      gather_start <= 1'b0;
      sca_init     <= 1'b0;
      sca_iter     <= 1'b0;
      pr_start     <= 1'b0;
      unique case (st)
        C_IDLE: if (start) begin
          busy         <= 1'b1;
          active       <= '1;
          iter_count   <= '0;
          gather_start <= 1'b1;
          st           <= C_GATHER;
        end
        C_GATHER: if (gather_done[0]) begin      // all memories gather in lock step
          sca_init    <= 1'b1;
          sca_running <= 1'b0;
          st          <= C_INIT;
        end
        C_INIT, C_ITER: begin
          // wait until the arrays started in the previous cycle are idle again
          if (sca_init || sca_iter) sca_running <= 1'b1;
          else if (sca_running && sca_busy == '0) begin
            sca_running <= 1'b0;
            if (st == C_INIT) begin
              sca_iter <= 1'b1;
              st       <= C_ITER;
            end else begin
              pr_start <= 1'b1;
              st       <= C_PRUNE;
            end
          end
        end
        C_PRUNE: if (pr_done) begin
          active     <= active & ~prune_mask;
          iter_count <= iter_count + 1'b1;
          if (iter_count + 1'b1 >= max_iter) begin
            recognized_word <= best_word;
            recognized_cost <= best_fitness[best_word];
            recognized_path <= best_path[best_word];
            st              <= C_DONE;
          end else begin
            sca_iter <= 1'b1;
            st       <= C_ITER;
          end
        end
        C_DONE: begin
          busy <= 1'b0;
          done <= 1'b1;
          st   <= C_IDLE;
        end
        default: st <= C_IDLE;
      endcase
    end
  end
endmodule
