// tb_threshold_pruning: self-checking testbench of the pruning unit.
//
// Random best-fitness vectors and random active masks. The reference, in
// real arithmetic over the active words only: Avg = mean, Var = mean
// squared deviation, SD by the same polynomial square root the unit uses
// (argument reduced to [0.5,2), 1 - y/2 - y^2/4), threshold = Avg + SD/2,
// above = active words with X above the threshold, prune only if at least
// pp percent of the V words stay active, best = active word of least X.
// Checks avg, sd and threshold within 2^-16, the masks (vectors with a
// value within 1e-4 of the threshold are not counted), best_word, and that
// done comes 2V + 6 cycles after start. Both allowed and blocked prunes
// must occur.
module tb_threshold_pruning;
  import hgsca_pkg::*;
  import tb_fp_pkg::*;
  localparam int V = 8;
  logic clk = 0, rst_n = 0, start = 0, done, prune_blocked;
  fp32_t x [V], avg, sd, threshold;
  logic [V-1:0] active, above_mask, prune_mask;
  logic [6:0] pp_percent;
  logic [$clog2(V)-1:0] best_word;
  int checks = 0, failures = 0, cycles = 0, lat, n_allowed = 0, n_blocked = 0;

  threshold_pruning #(.V(V)) dut (.*);

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

  function automatic real sqrt_model(real v);
    real m, y;
    int k;
    if (v <= 0.0) return 0.0;
    m = v; k = 0;
    while (m >= 2.0) begin m = m / 4.0; k++; end
    while (m < 0.5)  begin m = m * 4.0; k--; end
    y = 1.0 - m;
    return (1.0 - 0.5 * y - 0.25 * y * y) * (2.0 ** k);
  endfunction

  initial begin
    real xr [V], mean, var_, sdr, thr, mind;
    int n, nab, best;
    logic [V-1:0] ab, pm;
    logic tie;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 300; trial++) begin
      do active = V'($urandom); while (active == '0);
      if (trial < 5) active = '1;
      pp_percent = 7'($urandom_range(0, 70));
      for (int i = 0; i < V; i++) begin
        x[i] = r2fp(10.0 + real'($urandom_range(0, 90000)) / 1000.0);
        xr[i] = fp2r(x[i]);
      end
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      chk(lat == 2 * V + 6, $sformatf("latency %0d", lat));
      n = 0; mean = 0.0;
      for (int i = 0; i < V; i++) if (active[i]) begin n++; mean += xr[i]; end
      mean = mean / n;
      var_ = 0.0;
      for (int i = 0; i < V; i++) if (active[i]) var_ += (xr[i] - mean) * (xr[i] - mean);
      var_ = var_ / n;
      sdr = sqrt_model(var_);
      thr = mean + sdr / 2.0;
      chk(close(fp2r(avg), mean, 2.0 ** -16), "avg");
      chk(close(fp2r(sd), sdr, 2.0 ** -16), $sformatf("sd %g want %g", fp2r(sd), sdr));
      chk(close(fp2r(threshold), thr, 2.0 ** -16), "threshold");
      ab = '0; nab = 0; tie = 0; best = -1;
      for (int i = 0; i < V; i++) if (active[i]) begin
        mind = xr[i] - thr;
        if (mind < 1.0e-4 && mind > -1.0e-4) tie = 1;
        if (xr[i] > thr) begin ab[i] = 1; nab++; end
        if (best < 0 || xr[i] < xr[best]) best = i;
      end
      pm = ((n - nab) * 100 >= int'(pp_percent) * V) ? ab : '0;
      chk(int'(best_word) == best, "best word");
      if (!tie) begin
        chk(above_mask == ab, $sformatf("above mask %b want %b", above_mask, ab));
        chk(prune_mask == pm, "prune mask");
        chk(prune_blocked == (pm == '0 && ab != '0), "blocked flag");
        if (pm != '0) n_allowed++;
        if (pm == '0 && ab != '0) n_blocked++;
      end
    end
    chk(n_allowed > 0 && n_blocked > 0, $sformatf("allowed %0d blocked %0d", n_allowed, n_blocked));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
