// tb_hgsca_top: end-to-end testbench of the HGSCA recogniser at reduced size.
//
// Builds V synthetic word models: a left-to-right 6-state HMM per word in
// which state s of word w favours codebook symbol (6w + s) mod 256 (cost
// 0.3, every other symbol 5 to 7, higher for some words than for others),
// staying costs 0.4, moving on one state 1.2, skipping 4.0 and going back is
// forbidden. The utterance is the favoured symbol sequence of a target word
// with its T frames split evenly over the six states, plus a few random
// symbols. The testbench loads all
// tables through the model port, writes the symbols, starts the decoder
// and checks:
//  - done arrives, iter_count equals max_iter;
//  - the recognised word is the target, its cost equals the real-arithmetic
//    cost of the reported path, is not below that word's Viterbi optimum
//    and is below every other word's Viterbi optimum;
//  - the target is never pruned, and at least pp percent of the words stay
//    active;
//  - after every pruning step no word with best cost at or below the mean
//    was disabled;
//  - every mechanism occurred at least once: selection of a better
//    neighbour, annealing acceptance of a worse one, crossover, a kept
//    chromosome without crossover, mutation, a pruning step that disabled
//    words, a pruning step blocked by the pruning ratio, and a generation
//    start that a disabled array ignored.
// Reduced size: V = 6 words, 3 x 3 cells, T = 16 frames; two utterances.
module tb_hgsca_top;
  import hgsca_pkg::*;
  import tb_fp_pkg::*;
  import tb_hmm_pkg::*;
  localparam int V = 6, SIDE = 3, T = 16;
  localparam int MAX_ITER = 25;
  logic clk = 0, rst_n = 0;
  logic mdl_wr_en = 0, obs_wr_en = 0, start = 0, busy, done;
  logic [$clog2(V)-1:0] mdl_word = '0, recognized_word;
  logic [1:0] mdl_sel = '0;
  state_t mdl_row = '0;
  obs_t mdl_col = '0, obs_data = '0;
  fp32_t mdl_data = '0, t0, pc, pm, recognized_cost;
  logic [$clog2(T)-1:0] obs_addr = '0;
  logic [15:0] max_iter, iter_count;
  logic [6:0] pp_percent;
  state_t recognized_path [T];
  fp32_t best_fitness [V];
  logic [V-1:0] active;
  real ri [V][], ra [V][], re [V][];
  int obs [T];
  int checks = 0, failures = 0, cycles = 0;
  int n_better = 0, n_worse = 0, n_xo = 0, n_keep = 0, n_mu = 0, n_pruned = 0, n_blocked = 0, n_skipped = 0;

  hgsca_top #(.V(V), .SIDE(SIDE), .T(T)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 2000000) begin
      failures++;
      $display("watchdog");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // mechanism counters, read at the arrays' and the pruning unit's outputs
  for (genvar w = 0; w < V; w++) begin : g_mon
    always @(posedge clk) begin
      if (rst_n && dut.g_word[w].u_sca.done && !dut.g_word[w].u_sca.go_init_was) begin
        n_better += int'(dut.g_word[w].u_sca.ev_took_better);
        n_worse  += int'(dut.g_word[w].u_sca.ev_took_worse);
        n_xo     += int'(dut.g_word[w].u_sca.ev_crossed);
        n_keep   += SIDE * SIDE - int'(dut.g_word[w].u_sca.ev_crossed);
        n_mu     += int'(dut.g_word[w].u_sca.ev_mutated);
      end
      if (rst_n && dut.sca_iter && !dut.active[w]) n_skipped++;
    end
  end

  always @(posedge clk) begin
    if (rst_n && dut.pr_done) begin
      if (dut.prune_mask != '0) n_pruned++;
      if (dut.prune_blocked) n_blocked++;
      for (int w = 0; w < V; w++)
        if (dut.prune_mask[w]) begin
          checks++;
          if (!(fp2r(best_fitness[w]) > fp2r(dut.avg))) begin
            failures++;
            $display("FAIL word %0d pruned at or below the mean", w);
          end
        end
    end
  end

  function automatic int fav(int w, int s);
    return (w * N_STATES + s) % K_SYMBOLS;
  endfunction

  // emission cost of symbol k in state s of word w
  function automatic real emis_val(int w, int s, int k);
    return (k == fav(w, s)) ? 0.3 : 5.0 + 0.5 * real'(w % 3) + real'((k * 7 + s * 13 + w * 29) % 100) / 100.0;
  endfunction

  task automatic wr(int w, int sel, int row, int col, real v, logic big);
    mdl_wr_en = 1; mdl_word = ($clog2(V))'(w); mdl_sel = 2'(sel);
    mdl_row = state_t'(row); mdl_col = obs_t'(col);
    mdl_data = big ? FP_BIG : r2fp(v);
    @(negedge clk);
  endtask

  task automatic load_models();
    real v;
    for (int w = 0; w < V; w++) begin
      ri[w] = new[N_STATES]; ra[w] = new[N_STATES * N_STATES]; re[w] = new[T * N_STATES];
      for (int p = 0; p < N_STATES; p++) begin
        v = (p == 0) ? 0.1 : 4.0;
        wr(w, 0, p, 0, v, 1'b0);
        ri[w][p] = fp2r(r2fp(v));
        for (int q = 0; q < N_STATES; q++) begin
          v = (q == p) ? 0.4 : (q == p + 1) ? 1.2 : 4.0;
          wr(w, 1, p, q, v, q < p);
          ra[w][p * N_STATES + q] = (q < p) ? fp2r(FP_BIG) : fp2r(r2fp(v));
        end
      end
      for (int k = 0; k < K_SYMBOLS; k++)
        for (int s = 0; s < N_STATES; s++) begin
          v = emis_val(w, s, k);
          wr(w, 2, s, k, v, 1'b0);
        end
    end
    mdl_wr_en = 0;
  endtask

  // emission costs of word w for the current utterance, as the model defines them
  task automatic emis_of(int w);
    int k;
    for (int t = 0; t < T; t++)
      for (int s = 0; s < N_STATES; s++) begin
        k = obs[t];
        re[w][t * N_STATES + s] = fp2r(r2fp(emis_val(w, s, k)));
      end
  endtask

  task automatic decode(int target, int iters, bit expect_prune = 1'b1);
    real opt [V], c;
    int p [], n_act;
    for (int t = 0; t < T; t++) begin
      obs[t] = fav(target, (t * N_STATES) / T);
      if (t % 7 == 3) obs[t] = $urandom_range(0, K_SYMBOLS - 1);
      obs_wr_en = 1; obs_addr = ($clog2(T))'(t); obs_data = obs_t'(obs[t]);
      @(negedge clk);
    end
    obs_wr_en = 0;
    for (int w = 0; w < V; w++) begin emis_of(w); opt[w] = viterbi(ri[w], ra[w], re[w], T); end
    max_iter = 16'(iters);
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    chk(iter_count == 16'(iters), "iteration count");
    chk(int'(recognized_word) == target, $sformatf("recognised %0d, target %0d", recognized_word, target));
    p = new[T];
    for (int t = 0; t < T; t++) p[t] = int'(recognized_path[t]);
    c = path_cost(ri[target], ra[target], re[target], p);
    chk(close(fp2r(recognized_cost), c, 2.0 ** -18), $sformatf("cost %g vs path %g", fp2r(recognized_cost), c));
    chk(fp2r(recognized_cost) >= opt[target] * (1.0 - 2.0 ** -18), "not below the optimum");
    for (int w = 0; w < V; w++)
      if (w != target) chk(fp2r(recognized_cost) < opt[w], $sformatf("beats word %0d", w));
    chk(active[target], "target still active");
    n_act = 0;
    for (int w = 0; w < V; w++) n_act += int'(active[w]);
    chk(n_act * 100 >= int'(pp_percent) * V, "pruning ratio respected");
    if (expect_prune) chk(n_act < V, "some words pruned");
    $display("target %0d: cost %g optimum %g, %0d of %0d words active, %0d cycles",
             target, fp2r(recognized_cost), opt[target], n_act, V, cycles);
  endtask

  initial begin
    t0 = r2fp(20.0); pc = r2fp(0.3); pm = r2fp(0.3); pp_percent = 7'd30; max_iter = 16'd1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    load_models();
    decode(2, MAX_ITER);
    decode(5, MAX_ITER);
    chk(n_better > 0, "better neighbour selected");
    chk(n_worse > 0, "worse neighbour accepted by annealing");
    chk(n_xo > 0, "crossover applied");
    chk(n_keep > 0, "crossover skipped");
    chk(n_mu > 0, "mutation applied");
    chk(n_pruned > 0, "pruning disabled words");
    chk(n_blocked > 0, "pruning blocked by the ratio");
    chk(n_skipped > 0, "disabled array skipped a generation");
    $display("events: better %0d worse %0d crossover %0d kept %0d mutation %0d prunes %0d blocked %0d skipped %0d",
             n_better, n_worse, n_xo, n_keep, n_mu, n_pruned, n_blocked, n_skipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
