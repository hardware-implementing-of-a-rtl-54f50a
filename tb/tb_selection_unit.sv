// tb_selection_unit: self-checking testbench of the annealing tournament.
//
// All four neighbours carry different chromosomes with the same cost, so
// the cost difference delta is known whichever neighbour the unit picks.
// Before every trial the temperature is reloaded with t0, so the trial
// uses T = 0.95 t0. Checks:
//  - done comes one cycle after start, and temp then equals 0.95 t0;
//  - the parent is the own chromosome or exactly one neighbour's, with the
//    matching cost;
//  - delta <= 0: a neighbour is always taken and took_better is set;
//  - delta > 0 with delta/T >= 1: the own chromosome is always kept;
//  - delta > 0 with delta/T < 1: the acceptance rate over many trials is
//    within 0.05 of Y = 1 - x + x^2/2, x = delta/T (the exp(-x) model);
//  - all four neighbours are picked over the run.
module tb_selection_unit;
  import hgsca_pkg::*;
  import tb_fp_pkg::*;
  localparam int T = 8;
  logic clk = 0, rst_n = 0, load_t0 = 0, start = 0, done, took_better, took_worse;
  fp32_t t0, own_cost, nb_cost [4], parent_cost, temp;
  gene_t own [T], nb [4][T], parent [T];
  int checks = 0, failures = 0, cycles = 0;
  int picked [5] = '{0, 0, 0, 0, 0};
  int accepted, which;

  logic [31:0] seed = 32'hBEEF_0101;
  selection_unit #(.T(T)) dut (.*);

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

  // one tournament; returns 0 for own, 1..4 for the neighbour taken
  task automatic trial(output int w);
    @(negedge clk); load_t0 = 1;
    @(negedge clk); load_t0 = 0; start = 1;
    @(negedge clk); start = 0;
    chk(done, "done one cycle after start");
    chk(close(fp2r(temp), 0.95 * fp2r(t0), 2.0 ** -21), "temperature cooled once");
    w = -1;
    if (parent == own && parent_cost == own_cost) w = 0;
    for (int k = 0; k < 4; k++) if (parent == nb[k] && parent_cost == nb_cost[k]) w = k + 1;
    chk(w >= 0, "parent is own or a neighbour");
    picked[w < 0 ? 0 : w]++;
  endtask

  task automatic set_costs(real own_r, real nb_r);
    own_cost = r2fp(own_r);
    for (int k = 0; k < 4; k++) nb_cost[k] = r2fp(nb_r);
  endtask

  initial begin
    for (int t = 0; t < T; t++) begin
      own[t] = '{s: state_t'(0), f: 32'(t)};
      for (int k = 0; k < 4; k++) nb[k][t] = '{s: state_t'(k + 1), f: 32'(t * 16 + k)};
    end
    t0 = r2fp(10.0);
    set_costs(20.0, 20.0);
    repeat (2) @(posedge clk);
    rst_n = 1;
    // better and equal neighbours are always taken
    for (int i = 0; i < 200; i++) begin
      set_costs(20.0, (i % 2 == 1) ? 15.0 : 20.0);
      trial(which);
      chk(which >= 1 && took_better && !took_worse, "better neighbour taken");
    end
    // far worse neighbour (x = 12/9.5 > 1) never accepted
    for (int i = 0; i < 200; i++) begin
      set_costs(20.0, 32.0);
      trial(which);
      chk(which == 0 && !took_better && !took_worse, "far worse neighbour rejected");
    end
    // acceptance rate for x = delta / (0.95 t0) at a few points
    for (int p = 0; p < 3; p++) begin
      real d, x, y;
      d = (p == 0) ? 1.0 : (p == 1) ? 4.0 : 8.0;
      x = d / 9.5;
      y = 1.0 - x + 0.5 * x * x;
      accepted = 0;
      for (int i = 0; i < 1500; i++) begin
        set_costs(20.0, 20.0 + d);
        trial(which);
        if (which > 0) begin
          accepted++;
          chk(took_worse && !took_better, "worse neighbour flagged");
        end else chk(!took_worse && !took_better, "kept own flagged");
      end
      chk((real'(accepted) / 1500.0 - y) < 0.05 && (y - real'(accepted) / 1500.0) < 0.05,
          $sformatf("acceptance %0d/1500 vs %f", accepted, y));
    end
    for (int k = 1; k <= 4; k++) chk(picked[k] > 0, "every neighbour picked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
