// tb_crossover_unit: self-checking testbench of the greedy crossover.
//
// Random cost tables (backward transitions forbidden), a random parent path
// and four random neighbour paths per trial. After each start the testbench
// checks, against costs computed in real arithmetic:
//  - without crossover: the child equals the parent, and done comes 2
//    cycles after start;
//  - with crossover at gene gc (1 <= gc <= T-2): genes before gc are the
//    parent's; every gene from gc on takes the state of one of the four
//    neighbours at that frame, one of those with the least emission plus
//    transition cost from the child's previous gene, and carries that cost;
//    done comes 2 + (T - gc) cycles after start;
//  - with pc = 0.5, both outcomes occur; with pc = 1.0 crossover never
//    happens.
module tb_crossover_unit;
  import hgsca_pkg::*;
  import tb_fp_pkg::*;
  localparam int T = 10;
  logic clk = 0, rst_n = 0, start = 0, done, crossed;
  fp32_t pc;
  gene_t parent [T], nb [4][T], child [T];
  fp32_t trans_cost [N_STATES][N_STATES], emis_cost [T][N_STATES];
  logic [$clog2(T)-1:0] gc_point;
  int checks = 0, failures = 0, cycles = 0, n_cross = 0, n_keep = 0, lat;

  logic [31:0] seed = 32'h0BAD_CAFE;
  crossover_unit #(.T(T)) dut (.*);

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

  function automatic real cost_of(int t, int sp, int s);
    return fp2r(emis_cost[t][s]) + fp2r(trans_cost[sp][s]);
  endfunction

  task automatic rand_path(output gene_t p [T]);
    int s;
    s = $urandom_range(0, 2);
    for (int t = 0; t < T; t++) begin
      if ($urandom_range(0, 3) == 0 && s < N_STATES - 1) s++;
      p[t] = '{s: state_t'(s), f: r2fp(real'($urandom_range(1, 100)))};
    end
  endtask

  task automatic trial();
    real best, c;
    logic ok;
    rand_path(parent);
    for (int k = 0; k < 4; k++) rand_path(nb[k]);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    if (!crossed) begin
      n_keep++;
      chk(child == parent, "no crossover: child is parent");
      chk(lat == 2, $sformatf("no-crossover latency %0d", lat));
    end else begin
      n_cross++;
      chk(gc_point >= 1 && int'(gc_point) <= T - 2, "crossover point range");
      chk(lat == 2 + T - int'(gc_point), $sformatf("crossover latency %0d gc %0d", lat, gc_point));
      for (int t = 0; t < int'(gc_point); t++) chk(child[t] == parent[t], "head kept");
      for (int t = int'(gc_point); t < T; t++) begin
        best = 1.0e300;
        for (int k = 0; k < 4; k++) begin
          c = cost_of(t, int'(child[t-1].s), int'(nb[k][t].s));
          if (c < best) best = c;
        end
        ok = 0;
        for (int k = 0; k < 4; k++)
          if (child[t].s == nb[k][t].s && close(cost_of(t, int'(child[t-1].s), int'(child[t].s)), best, 2.0 ** -20)) ok = 1;
        chk(ok, $sformatf("gene %0d is a cheapest neighbour gene", t));
        chk(close(fp2r(child[t].f), best, 2.0 ** -20), "gene cost");
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
    pc = r2fp(0.5);
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (400) trial();
    chk(n_cross > 50 && n_keep > 50, $sformatf("both outcomes: %0d crossed %0d kept", n_cross, n_keep));
    pc = FP_ONE;
    n_cross = 0;
    repeat (50) trial();
    chk(n_cross == 0, "pc = 1 never crosses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
