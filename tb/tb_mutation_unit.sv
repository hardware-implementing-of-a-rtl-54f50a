// tb_mutation_unit: self-checking testbench of the sub-path mutation.
//
// Random cost tables (backward transitions forbidden) and a random parent
// path per trial. Checks, with costs computed in real arithmetic:
//  - without mutation: the child equals the parent, done 2 cycles after
//    start;
//  - with mutation between gs < ge: genes outside gs+1..ge are the
//    parent's; each gene t in gs+1..ge has the state of least transition
//    cost from gene t-1 plus emission cost at frame t (lowest state on a
//    tie) and carries that cost; done comes 2 + (ge - gs) cycles after
//    start;
//  - with pm = 0.5 both outcomes occur; with pm = 0 mutation never happens.
module tb_mutation_unit;
  import hgsca_pkg::*;
  import tb_fp_pkg::*;
  localparam int T = 10;
  logic clk = 0, rst_n = 0, start = 0, done, mutated;
  fp32_t pm;
  gene_t parent [T], child [T];
  fp32_t trans_cost [N_STATES][N_STATES], emis_cost [T][N_STATES];
  logic [$clog2(T)-1:0] gs_point, ge_point;
  int checks = 0, failures = 0, cycles = 0, n_mut = 0, n_keep = 0, lat;

  logic [31:0] seed = 32'h00C0_FFEE;
  mutation_unit #(.T(T)) dut (.*);

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

  task automatic trial();
    real best, c;
    int bs, s;
    s = $urandom_range(0, 2);
    for (int t = 0; t < T; t++) begin
      if ($urandom_range(0, 3) == 0 && s < N_STATES - 1) s++;
      parent[t] = '{s: state_t'(s), f: r2fp(real'($urandom_range(1, 100)))};
    end
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    if (!mutated) begin
      n_keep++;
      chk(child == parent, "no mutation: child is parent");
      chk(lat == 2, "no-mutation latency");
    end else begin
      n_mut++;
      chk(gs_point < ge_point && int'(ge_point) <= T - 1, "gs < ge");
      chk(lat == 2 + int'(ge_point) - int'(gs_point), $sformatf("mutation latency %0d", lat));
      for (int t = 0; t < T; t++) begin
        if (t <= int'(gs_point) || t > int'(ge_point)) chk(child[t] == parent[t], "outside sub-path kept");
        else begin
          best = 1.0e300; bs = 0;
          for (int k = 0; k < N_STATES; k++) begin
            c = fp2r(trans_cost[child[t-1].s][k]) + fp2r(emis_cost[t][k]);
            if (c < best * (1.0 - 2.0 ** -20)) begin best = c; bs = k; end
          end
          chk(int'(child[t].s) == bs, $sformatf("gene %0d state %0d want %0d", t, child[t].s, bs));
          chk(close(fp2r(child[t].f), best, 2.0 ** -20), "gene cost");
        end
      end
    end
  endtask

  initial begin
    for (int p = 0; p < N_STATES; p++)
      for (int s = 0; s < N_STATES; s++)
        trans_cost[p][s] = (s < p) ? FP_BIG : r2fp(0.1 + real'($urandom_range(0, 4900)) / 1000.0);
    for (int t = 0; t < T; t++)
      for (int s = 0; s < N_STATES; s++)
        emis_cost[t][s] = r2fp(0.2 + real'($urandom_range(0, 7800)) / 1000.0);
    pm = r2fp(0.5);
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (400) trial();
    chk(n_mut > 50 && n_keep > 50, $sformatf("both outcomes: %0d mutated %0d kept", n_mut, n_keep));
    pm = FP_ZERO;
    n_mut = 0;
    repeat (50) trial();
    chk(n_mut == 0, "pm = 0 never mutates");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
