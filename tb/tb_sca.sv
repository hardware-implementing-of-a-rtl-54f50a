// tb_sca: self-checking testbench of one cellular-automaton array.
//
// A 3 x 3 array decodes random cost tables (backward transitions
// forbidden) over T = 12 frames. Checks:
//  - after initialisation and after each of 60 generations: busy drops,
//    done pulses once, best_fitness equals the real-arithmetic cost of
//    best_path and the least cost over the nine cells, and is not below
//    the Viterbi optimum; the event counts never exceed the cell count;
//  - at the end the best cost is no worse than after initialisation, and
//    annealing acceptance, crossover and mutation have all occurred;
//  - with disable_sca high, iter_start starts nothing: busy stays low and
//    the best fitness and every cell's chromosome stay as they were;
//  - the commit is synchronous: all nine cells change in the same cycle.
module tb_sca;
  import hgsca_pkg::*;
  import tb_fp_pkg::*;
  import tb_hmm_pkg::*;
  localparam int SIDE = 3, T = 12, P = SIDE * SIDE;
  logic clk = 0, rst_n = 0, init_start = 0, iter_start = 0, disable_sca = 0, busy, done;
  fp32_t t0, pc, pm, best_fitness;
  fp32_t init_cost [N_STATES], trans_cost [N_STATES][N_STATES], emis_cost [T][N_STATES];
  state_t best_path [T];
  logic [$clog2(P+1)-1:0] ev_took_better, ev_took_worse, ev_crossed, ev_mutated;
  real ri [], ra [], re [];
  real opt, first_best;
  int checks = 0, failures = 0, cycles = 0, n_done = 0, n_worse = 0, n_xo = 0, n_mu = 0, n_better = 0;

  logic [31:0] seed = 32'd7;
  sca #(.SIDE(SIDE), .T(T)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (done) n_done++;
    if (cycles > 400000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  task automatic run(logic init, string what);
    int d0, p [];
    real c, m;
    d0 = n_done;
    @(negedge clk);
    if (init) init_start = 1; else iter_start = 1;
    @(negedge clk);
    init_start = 0; iter_start = 0;
    chk(busy, {what, ": busy"});
    while (busy) @(negedge clk);
    @(negedge clk);
    chk(n_done == d0 + 1, {what, ": one done pulse"});
    p = new[T];
    for (int t = 0; t < T; t++) p[t] = int'(best_path[t]);
    c = path_cost(ri, ra, re, p);
    chk(close(fp2r(best_fitness), c, 2.0 ** -18), $sformatf("%s: best %g path cost %g", what, fp2r(best_fitness), c));
    chk(c >= opt * (1.0 - 2.0 ** -18), {what, ": not below optimum"});
    m = 1.0e300;
    for (int i = 0; i < P; i++) if (fp2r(dut.cur_cost[i]) < m) m = fp2r(dut.cur_cost[i]);
    chk(fp2r(best_fitness) == m, {what, ": best is the least cell cost"});
    chk(int'(ev_took_better) + int'(ev_took_worse) <= P && int'(ev_crossed) <= P && int'(ev_mutated) <= P, {what, ": event counts"});
    if (!init) begin
      n_better += int'(ev_took_better); n_worse += int'(ev_took_worse);
      n_xo += int'(ev_crossed); n_mu += int'(ev_mutated);
    end
  endtask

  initial begin
    fp32_t keep_best, keep_cost [P];
    ri = new[N_STATES]; ra = new[N_STATES * N_STATES]; re = new[T * N_STATES];
    for (int p = 0; p < N_STATES; p++) begin
      init_cost[p] = r2fp((p == 0) ? 0.1 : 3.0 + real'(p));
      ri[p] = fp2r(init_cost[p]);
      for (int q = 0; q < N_STATES; q++) begin
        trans_cost[p][q] = (q < p) ? FP_BIG : r2fp(0.1 + real'($urandom_range(0, 4900)) / 1000.0);
        ra[p * N_STATES + q] = fp2r(trans_cost[p][q]);
      end
    end
    for (int t = 0; t < T; t++)
      for (int q = 0; q < N_STATES; q++) begin
        emis_cost[t][q] = r2fp(0.2 + real'($urandom_range(0, 7800)) / 1000.0);
        re[t * N_STATES + q] = fp2r(emis_cost[t][q]);
      end
    opt = viterbi(ri, ra, re, T);
    t0 = r2fp(40.0); pc = r2fp(0.3); pm = r2fp(0.3);
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(1'b1, "init");
    first_best = fp2r(best_fitness);
    for (int it = 0; it < 60; it++) run(1'b0, $sformatf("generation %0d", it));
    chk(fp2r(best_fitness) <= first_best, "improved on the initial population");
    chk(n_better > 0 && n_worse > 0 && n_xo > 0 && n_mu > 0,
        $sformatf("events better %0d worse %0d xo %0d mu %0d", n_better, n_worse, n_xo, n_mu));
    $display("best %g after 60 generations, optimum %g, initial %g", fp2r(best_fitness), opt, first_best);
    // disabled array ignores iter_start
    keep_best = best_fitness;
    for (int i = 0; i < P; i++) keep_cost[i] = dut.cur_cost[i];
    disable_sca = 1;
    @(negedge clk); iter_start = 1;
    @(negedge clk); iter_start = 0;
    repeat (100) begin
      chk(!busy, "disabled: not busy");
      @(negedge clk);
    end
    chk(best_fitness == keep_best, "disabled: best kept");
    for (int i = 0; i < P; i++) chk(dut.cur_cost[i] == keep_cost[i], "disabled: cells kept");
    disable_sca = 0;
    run(1'b0, "re-enabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // cells change only in the cycle of the array's commit
  fp32_t prev_cost [P];
  always @(negedge clk) begin
    if (rst_n) begin
      for (int i = 0; i < P; i++) begin
        if (dut.cur_cost[i] != prev_cost[i]) begin
          checks++;
          if (!dut.commit_q) begin failures++; $display("FAIL cell %0d changed outside a commit", i); end
        end
        prev_cost[i] = dut.cur_cost[i];
      end
    end else for (int i = 0; i < P; i++) prev_cost[i] = FP_ZERO;
  end
endmodule
