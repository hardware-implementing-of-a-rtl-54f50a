// sca: stochastic cellular automaton decoding one reference word.
//
// SIDE x SIDE processing elements (P = SIDE^2 cells) on a grid whose edges
// wrap around, each cell wired to its von Neumann neighbours: up (row+1),
// left (column-1), down (row-1) and right (column+1), in that order on the
// cell's neighbour inputs. Cell (r,c) corresponds to Cell_{r+1,c+1} of the
// array diagram, row 1 at the bottom. Every cell holds one chromosome,
// i.e. one candidate alignment of the observation sequence with this
// word's HMM.
//
// init_start (all cells build random chromosomes) and iter_start (one
// generation of selection, crossover and mutation) start every cell; the
// array waits until all cells are done, then commits all new chromosomes in
// the same cycle and registers the best (lowest) cost of the array on
// best_fitness, with the path that has it on best_path. busy is high from
// the start to that point. disable_sca (the array's Disable input) makes
// iter_start have no effect: the array keeps its chromosomes and its best
// fitness and is not busy. The ev_* outputs count, for the last generation,
// how many cells took a better neighbour, accepted a worse one by the
// annealing test, crossed over and mutated.
module sca
  import hgsca_pkg::*;
#(
  parameter int          SIDE = 3,
  parameter int          T    = 32
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic [31:0] seed,     // seeds the cells' random generators
  input  logic   init_start,
  input  logic   iter_start,
  input  logic   disable_sca,
  input  fp32_t  t0,
  input  fp32_t  pc,
  input  fp32_t  pm,
  input  fp32_t  init_cost  [N_STATES],
  input  fp32_t  trans_cost [N_STATES][N_STATES],
  input  fp32_t  emis_cost  [T][N_STATES],
  output logic   busy,
  output logic   done,
  output fp32_t  best_fitness,
  output state_t best_path [T],
  output logic [$clog2(SIDE*SIDE+1)-1:0] ev_took_better,
  output logic [$clog2(SIDE*SIDE+1)-1:0] ev_took_worse,
  output logic [$clog2(SIDE*SIDE+1)-1:0] ev_crossed,
  output logic [$clog2(SIDE*SIDE+1)-1:0] ev_mutated
);
  localparam int P  = SIDE * SIDE;
  localparam int CW = $clog2(P + 1);

  gene_t cur      [P][T];
  fp32_t cur_cost [P];
  logic  [P-1:0] pe_done, e_better, e_worse, e_xo, e_mu;
  logic  [P-1:0] finished;
  logic  running, commit, commit_q;
  logic  go_init, go_iter;

  assign go_init = init_start && !running;
  assign go_iter = iter_start && !running && !disable_sca;

  for (genvar r = 0; r < SIDE; r++) begin : g_row
    for (genvar c = 0; c < SIDE; c++) begin : g_col
      localparam int ID = r * SIDE + c;
      localparam int UP = ((r + 1) % SIDE) * SIDE + c;
      localparam int DN = ((r + SIDE - 1) % SIDE) * SIDE + c;
      localparam int LF = r * SIDE + (c + SIDE - 1) % SIDE;
      localparam int RT = r * SIDE + (c + 1) % SIDE;
      gene_t nb [4][T];
      fp32_t nb_cost [4];
      assign nb[NB_UP]    = cur[UP];
      assign nb[NB_LEFT]  = cur[LF];
      assign nb[NB_DOWN]  = cur[DN];
      assign nb[NB_RIGHT] = cur[RT];
      assign nb_cost[NB_UP]    = cur_cost[UP];
      assign nb_cost[NB_LEFT]  = cur_cost[LF];
      assign nb_cost[NB_DOWN]  = cur_cost[DN];
      assign nb_cost[NB_RIGHT] = cur_cost[RT];

      processing_element #(.T(T)) u_pe (
        .clk, .rst_n, .seed(seed * 32'd2654435761 + 32'(ID) * 32'd40503 + 32'd1), .init_start(go_init), .iter_start(go_iter), .commit,
        .t0, .pc, .pm, .init_cost, .trans_cost, .emis_cost,
        .nb, .nb_cost, .cur(cur[ID]), .cur_cost(cur_cost[ID]),
        .busy(), .done(pe_done[ID]),
        .ev_took_better(e_better[ID]), .ev_took_worse(e_worse[ID]),
        .ev_crossed(e_xo[ID]), .ev_mutated(e_mu[ID]));
    end
  end

  // remembers whether the running pass is an initialisation
  logic go_init_was;
  always_ff @(posedge clk) begin
    if (!rst_n)       go_init_was <= 1'b0;
    else if (go_init) go_init_was <= 1'b1;
    else if (go_iter) go_init_was <= 1'b0;
  end

  assign commit = running && ((finished | pe_done) == '1);

  // best cell after the commit
  logic [$clog2(P)-1:0] best_idx;
  always_comb begin
    best_idx = '0;
    for (int i = 1; i < P; i++)
      if (fp_lt_pos(cur_cost[i], cur_cost[best_idx])) best_idx = ($clog2(P))'(i);
  end

  logic [CW-1:0] n_better, n_worse, n_xo, n_mu;
  always_comb begin
    n_better = '0; n_worse = '0; n_xo = '0; n_mu = '0;
    for (int i = 0; i < P; i++) begin
      n_better += CW'(e_better[i]);
      n_worse  += CW'(e_worse[i]);
      n_xo     += CW'(e_xo[i]);
      n_mu     += CW'(e_mu[i]);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      running      <= 1'b0;
      finished     <= '0;
      commit_q     <= 1'b0;
      done         <= 1'b0;
      best_fitness <= FP_INF;
      ev_took_better <= '0;
      ev_took_worse  <= '0;
      ev_crossed     <= '0;
      ev_mutated     <= '0;
      for (int t = 0; t < T; t++) best_path[t] <= '0;
    end else begin
      commit_q <= commit;
      done     <= 1'b0;
      if (go_init || go_iter) begin
        running  <= 1'b1;
        finished <= '0;
        ev_took_better <= '0;
        ev_took_worse  <= '0;
        ev_crossed     <= '0;
        ev_mutated     <= '0;
      end else if (commit) begin
        finished <= '0;
        if (!go_init_was) begin
          ev_took_better <= n_better;
          ev_took_worse  <= n_worse;
          ev_crossed     <= n_xo;
          ev_mutated     <= n_mu;
        end
      end else if (running) begin
        finished <= finished | pe_done;
      end
      if (commit_q) begin            // chromosomes committed last cycle
        running      <= 1'b0;
        done         <= 1'b1;
        best_fitness <= cur_cost[best_idx];
        for (int t = 0; t < T; t++) best_path[t] <= cur[best_idx][t].s;
      end
    end
  end

  assign busy = running;
endmodule
