// crossover_unit: single-point greedy crossover of one SCA cell.
//
// Follows the crossover procedure of the method and its RTL diagram. A
// random X in [0,1) is compared with the crossover rate Pc; as the procedure
// is written, X <= Pc leaves the parent unchanged (the child is A). Otherwise
// a random crossover gene gc with 1 < gc < T (1-based; 0-based 1..T-2) is
// drawn, and for gc, gc+1, ..., T-1 the unit looks at gene gc of the four
// neighbouring chromosomes: four floating-point adders price each
// neighbour's state as emission cost at frame gc plus the transition cost
// from the child's gene gc-1, a comparator picks the cheapest (lowest
// neighbour index on a tie), and that state and cost become gene gc of the
// child. A step that would move the path to a lower state costs FP_BIG and
// so loses unless all four candidates are forbidden.
//
// Which cost the adders add to the neighbours' genes is not spelled out; this
// design uses the transition cost from the child's previous gene, which keeps
// the child a consistent path. The total cost of the child is recomputed by
// the processing element afterwards.
//
// Timing: start loads the parent; with crossover the loop takes one cycle
// per gene from gc to T-1; done pulses when child is valid. crossed tells
// whether the crossover was applied. The random numbers come from a
// free-running LFSR.
module crossover_unit
  import hgsca_pkg::*;
#(
  parameter int          T    = 32
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic [31:0] seed,     // LFSR reset value
  input  logic   start,
  input  fp32_t  pc,
  input  gene_t  parent [T],
  input  gene_t  nb     [4][T],
  input  fp32_t  trans_cost [N_STATES][N_STATES],
  input  fp32_t  emis_cost  [T][N_STATES],
  output gene_t  child  [T],
  output logic   done,
  output logic   crossed,
  output logic [$clog2(T)-1:0] gc_point   // crossover gene of the last crossover
);
  localparam int TW = $clog2(T);

  typedef enum logic [1:0] {IDLE, DECIDE, LOOP} xo_state_e;
  xo_state_e st;

  logic [31:0]   rnd;
  logic [TW-1:0] g;
  fp32_t         cand [4];
  logic [1:0]    best;
  state_t        prev_s;
  logic [TW-1:0] gc_draw;

  lfsr_rng u_rng (.clk(clk), .rst_n(rst_n), .seed(seed), .en(1'b1), .rnd(rnd));

  assign prev_s = child[g - 1'b1].s;

  for (genvar k = 0; k < 4; k++) begin : g_add
    fp_add u_add (.a(emis_cost[g][nb[k][g].s]), .b(trans_cost[prev_s][nb[k][g].s]),
                  .sub(1'b0), .y(cand[k]));
  end

  // crossover gene in 1 .. T-2
  assign gc_draw = TW'(8'd1 + rnd[31:24] % 8'(T - 2));

  always_comb begin
    best = 2'd0;
    for (int k = 1; k < 4; k++)
      if (fp_lt_pos(cand[k], cand[best])) best = 2'(k);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st       <= IDLE;
      done     <= 1'b0;
      crossed  <= 1'b0;
      g        <= '0;
      gc_point <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        IDLE: if (start) begin
          child <= parent;
          st    <= DECIDE;
        end
        DECIDE: begin
          if (fp_le_pos(u24_to_unit(rnd[23:0]), pc)) begin
            crossed <= 1'b0;
            done    <= 1'b1;
            st      <= IDLE;
          end else begin
            crossed  <= 1'b1;
            g        <= gc_draw;
            gc_point <= gc_draw;
            st       <= LOOP;
          end
        end
        LOOP: begin
          child[g] <= '{s: nb[best][g].s, f: cand[best]};
          if (int'(g) == T - 1) begin
            done <= 1'b1;
            st   <= IDLE;
          end else begin
            g <= g + 1'b1;
          end
        end
        default: st <= IDLE;
      endcase
    end
  end
endmodule
