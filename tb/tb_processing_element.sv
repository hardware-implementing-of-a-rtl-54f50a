// tb_processing_element: self-checking testbench of one SCA cell.
//
// Random cost tables with backward transitions forbidden; the four
// neighbour chromosomes are driven by the testbench. Checks:
//  - initialisation: the random path starts in state 0 and climbs at most
//    one state per frame; every gene cost and the total cost agree with the
//    path cost computed in real arithmetic;
//  - 40 generations against random neighbours: after each commit the gene
//    costs and the total again agree with the path, and the total is never
//    below the Viterbi optimum; selection, crossover and mutation each occur;
//  - with all neighbours holding the optimal (Viterbi) path, no crossover
//    (pc = 1) and no mutation (pm = 0), one generation makes the cell adopt
//    exactly that path and cost;
//  - a generation without crossover or mutation takes T + 11 cycles
//    from iter_start to done.
module tb_processing_element;
  import hgsca_pkg::*;
  import tb_fp_pkg::*;
  import tb_hmm_pkg::*;
  localparam int T = 10;
  logic clk = 0, rst_n = 0, init_start = 0, iter_start = 0, commit = 0;
  logic busy, done, ev_took_better, ev_took_worse, ev_crossed, ev_mutated;
  fp32_t t0, pc, pm, cur_cost, nb_cost [4];
  fp32_t init_cost [N_STATES], trans_cost [N_STATES][N_STATES], emis_cost [T][N_STATES];
  gene_t nb [4][T], cur [T];
  real ri [], ra [], re [];
  int checks = 0, failures = 0, cycles = 0, n_sel = 0, n_xo = 0, n_mu = 0, lat;
  int opt_path [T];
  real opt;

  logic [31:0] seed = 32'h0000_1234;
  processing_element #(.T(T)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 200000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  function automatic real cost_of_genes(gene_t g [T], logic check_genes);
    int p [];
    p = new[T];
    for (int t = 0; t < T; t++) p[t] = int'(g[t].s);
    return path_cost(ri, ra, re, p);
  endfunction

  task automatic set_nb(int k, int p [T]);
    int q [];
    q = new[T];
    for (int t = 0; t < T; t++) begin
      q[t] = p[t];
      nb[k][t] = '{s: state_t'(p[t]), f: r2fp(gene_cost(ri, ra, re, t, (t == 0) ? 0 : p[t-1], p[t]))};
    end
    nb_cost[k] = r2fp(path_cost(ri, ra, re, q));
  endtask

  task automatic check_cur(string what);
    real want;
    int p [];
    p = new[T];
    for (int t = 0; t < T; t++) p[t] = int'(cur[t].s);
    want = path_cost(ri, ra, re, p);
    chk(close(fp2r(cur_cost), want, 2.0 ** -18), $sformatf("%s: cost %g want %g", what, fp2r(cur_cost), want));
    chk(fp2r(cur_cost) >= opt * (1.0 - 2.0 ** -18), $sformatf("%s: below optimum", what));
    for (int t = 0; t < T; t++)
      chk(close(fp2r(cur[t].f), gene_cost(ri, ra, re, t, (t == 0) ? 0 : p[t-1], p[t]), 2.0 ** -20),
          $sformatf("%s: gene %0d cost", what, t));
  endtask

  task automatic run(logic init);
    @(negedge clk);
    if (init) init_start = 1; else iter_start = 1;
    @(negedge clk);
    init_start = 0; iter_start = 0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    commit = 1;
    @(negedge clk);
    commit = 0;
  endtask

  // Viterbi path by dynamic programming with back-pointers
  task automatic find_opt();
    real d [N_STATES], nd [N_STATES], v;
    int bp [T][N_STATES];
    for (int s = 0; s < N_STATES; s++) d[s] = re[s] + ri[s];
    for (int t = 1; t < T; t++) begin
      for (int s = 0; s < N_STATES; s++) begin
        nd[s] = 1.0e300;
        for (int p = 0; p < N_STATES; p++) begin
          v = d[p] + ra[p * N_STATES + s];
          if (v < nd[s]) begin nd[s] = v; bp[t][s] = p; end
        end
        nd[s] += re[t * N_STATES + s];
      end
      d = nd;
    end
    opt_path[T-1] = 0;
    for (int s = 1; s < N_STATES; s++) if (d[s] < d[opt_path[T-1]]) opt_path[T-1] = s;
    opt = d[opt_path[T-1]];
    for (int t = T - 1; t > 0; t--) opt_path[t-1] = bp[t][opt_path[t]];
  endtask

  initial begin
    int rp [T], s;
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
    find_opt();
    t0 = r2fp(5.0); pc = r2fp(0.5); pm = r2fp(0.5);
    for (int k = 0; k < 4; k++) set_nb(k, opt_path);
    repeat (2) @(posedge clk);
    rst_n = 1;

    run(1'b1);
    chk(cur[0].s == '0, "initial path starts in state 0");
    for (int t = 1; t < T; t++) chk(cur[t].s == cur[t-1].s || cur[t].s == cur[t-1].s + 1'b1, "initial path climbs by at most one");
    check_cur("init");

    for (int it = 0; it < 40; it++) begin
      for (int k = 0; k < 4; k++) begin
        s = 0;
        for (int t = 0; t < T; t++) begin
          if ($urandom_range(0, 2) == 0 && s < N_STATES - 1) s++;
          rp[t] = s;
        end
        set_nb(k, rp);
      end
      run(1'b0);
      n_sel += int'(ev_took_better || ev_took_worse);
      n_xo  += int'(ev_crossed);
      n_mu  += int'(ev_mutated);
      check_cur($sformatf("generation %0d", it));
    end
    chk(n_sel > 0 && n_xo > 0 && n_mu > 0, $sformatf("operators seen sel %0d xo %0d mu %0d", n_sel, n_xo, n_mu));

    // adopt the optimum from the neighbours
    pc = FP_ONE; pm = FP_ZERO;
    for (int k = 0; k < 4; k++) set_nb(k, opt_path);
    if (fp_le_pos(cur_cost, nb_cost[0])) begin
      // make the own chromosome worse first: one generation with a bad path everywhere
      for (int t = 0; t < T; t++) rp[t] = (t < T / 2) ? 0 : 5;
      for (int k = 0; k < 4; k++) set_nb(k, rp);
      run(1'b0);
      for (int k = 0; k < 4; k++) set_nb(k, opt_path);
    end
    run(1'b0);
    chk(lat == T + 11, $sformatf("generation latency %0d", lat));
    for (int t = 0; t < T; t++) chk(int'(cur[t].s) == opt_path[t], "adopted optimal path");
    chk(close(fp2r(cur_cost), opt, 2.0 ** -18), "optimal cost");
    check_cur("optimum");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
