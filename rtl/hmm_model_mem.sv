// hmm_model_mem: cost tables of one reference word's HMM.
//
// Holds the word model as negative logarithms, the form in which the decoder
// scores a path (gene cost = -log b_s(o_t) plus -log pi_s at the first step or
// -log a_{s',s} afterwards): init_cost[s] = -log pi_s, trans_cost[s'][s] =
// -log a_{s',s} and the emission table -log b_s(k) for every codebook symbol
// k. A forbidden transition is written as FP_BIG. The tables are loaded
// through a write port one value per cycle (wr_sel picks the table,
// wr_row/wr_col the entry: for the emission table wr_row is the state and
// wr_col the symbol; for the initial table only wr_row is used).
//
// Because the observation sequence stays the same for a whole decoding, the
// memory gathers, once per utterance, the emission cost of every state at
// every frame into the T x N table emis_cost: after gather_start it reads
// one frame per cycle (all N states of the symbol's row at once) and pulses
// gather_done T cycles later. The processing elements then read only these
// small tables. The storage organisation and the gather step are this
// design's choice; the source states only the cost definitions.
module hmm_model_mem
  import hgsca_pkg::*;
#(
  parameter int T = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  // table loading
  input  logic        wr_en,
  input  logic [1:0]  wr_sel,     // 0: init cost, 1: transition cost, 2: emission cost
  input  state_t      wr_row,
  input  obs_t        wr_col,
  input  fp32_t       wr_data,
  // emission gather
  input  logic        gather_start,
  input  obs_t        obs [T],
  output logic        gather_done,
  // tables seen by the processing elements
  output fp32_t       init_cost  [N_STATES],
  output fp32_t       trans_cost [N_STATES][N_STATES],
  output fp32_t       emis_cost  [T][N_STATES]
);
  localparam int TW = (T > 1) ? $clog2(T) : 1;

  fp32_t emis_tab [K_SYMBOLS][N_STATES];
  logic  gathering;
  logic [TW-1:0] t_idx;

  always_ff @(posedge clk) begin
    if (wr_en) begin
      unique case (wr_sel)
        2'd0:    init_cost[wr_row] <= wr_data;
        2'd1:    trans_cost[wr_row][wr_col[STATE_W-1:0]] <= wr_data;
        default: emis_tab[wr_col][wr_row] <= wr_data;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      gathering   <= 1'b0;
      t_idx       <= '0;
      gather_done <= 1'b0;
    end else begin
      gather_done <= 1'b0;
      if (gather_start) begin
        gathering <= 1'b1;
        t_idx     <= '0;
      end else if (gathering) begin
        emis_cost[t_idx] <= emis_tab[obs[t_idx]];
        if (int'(t_idx) == T - 1) begin
          gathering   <= 1'b0;
          gather_done <= 1'b1;
        end else begin
          t_idx <= t_idx + 1'b1;
        end
      end
    end
  end
endmodule
