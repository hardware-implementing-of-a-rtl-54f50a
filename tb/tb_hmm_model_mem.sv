// tb_hmm_model_mem: self-checking testbench of the word-model cost memory.
//
// Loads random initial, transition and emission costs, writes a random
// observation sequence, starts the gather and checks that gather_done comes
// T + 1 clock edges after the start pulse and that every emis_cost[t][s] equals the emission
// cost written for state s and symbol obs[t]; also reads back the initial
// and transition tables. Done twice with different sequences.
module tb_hmm_model_mem;
  import hgsca_pkg::*;
  localparam int T = 12;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, gather_start = 0, gather_done;
  logic [1:0] wr_sel = 0;
  state_t wr_row = 0;
  obs_t wr_col = 0, obs [T];
  fp32_t wr_data = 0;
  fp32_t init_cost [N_STATES], trans_cost [N_STATES][N_STATES], emis_cost [T][N_STATES];
  fp32_t ref_b [K_SYMBOLS][N_STATES], ref_i [N_STATES], ref_a [N_STATES][N_STATES];
  int checks = 0, failures = 0, cycles = 0, lat;

  hmm_model_mem #(.T(T)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 50000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  task automatic wr(logic [1:0] sel, int row, int col, fp32_t d);
    @(negedge clk);
    wr_en = 1; wr_sel = sel; wr_row = state_t'(row); wr_col = obs_t'(col); wr_data = d;
    @(negedge clk);
    wr_en = 0;
  endtask

  initial begin
    for (int t = 0; t < T; t++) obs[t] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < N_STATES; s++) begin
      ref_i[s] = $urandom; wr(2'd0, s, 0, ref_i[s]);
      for (int p = 0; p < N_STATES; p++) begin ref_a[s][p] = $urandom; wr(2'd1, s, p, ref_a[s][p]); end
    end
    for (int k = 0; k < K_SYMBOLS; k++)
      for (int s = 0; s < N_STATES; s++) begin ref_b[k][s] = $urandom; wr(2'd2, s, k, ref_b[k][s]); end
    for (int rep = 0; rep < 2; rep++) begin
      @(negedge clk);
      for (int t = 0; t < T; t++) obs[t] = obs_t'($urandom);
      gather_start = 1;
      @(negedge clk);
      gather_start = 0;
      lat = 1;
      while (!gather_done) begin @(negedge clk); lat++; end
      chk(lat == T + 1, $sformatf("gather latency %0d", lat));
      for (int t = 0; t < T; t++)
        for (int s = 0; s < N_STATES; s++)
          chk(emis_cost[t][s] == ref_b[obs[t]][s], $sformatf("emis t=%0d s=%0d", t, s));
      for (int s = 0; s < N_STATES; s++) begin
        chk(init_cost[s] == ref_i[s], "init");
        for (int p = 0; p < N_STATES; p++) chk(trans_cost[s][p] == ref_a[s][p], "trans");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
