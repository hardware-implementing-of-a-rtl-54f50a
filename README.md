# HGSCA: a genetic-algorithm HMM decoder on stochastic cellular automata

An isolated-word speech recogniser compares an utterance, already turned into
a sequence of codebook symbols, with one hidden Markov model (HMM) per word of
its vocabulary. The usual way is the Viterbi algorithm: a dynamic programme
over every state at every frame. This design does it differently. For every
word it keeps a small population of candidate alignments ("chromosomes": one
HMM state per frame) on a grid of identical cells, and improves them with a
genetic algorithm. Each cell only talks to its four grid neighbours, so all
cells of all words work in parallel. After every generation the words whose
best alignment is clearly worse than the others are switched off (threshold
pruning), so the work concentrates on the plausible words. The word with the
cheapest alignment at the end is the result.

The RTL is SystemVerilog (IEEE 1800-2017). All arithmetic is IEEE754 single
precision, as in the method it implements.

## The search problem

A word model has N = 6 states in a left-to-right topology (a path may stay in
its state or move to a higher one, never back) and a codebook of K = 256
symbols. Probabilities are held as costs, negative logarithms:

| table | meaning | size |
|---|---|---|
| `init_cost[s]` | -log P(start in s) | 6 |
| `trans_cost[p][s]` | -log P(p -> s); backward steps cost `FP_BIG` = 1e30 | 6 x 6 |
| emission table | -log P(symbol k in state s) | 256 x 6 |

A chromosome is an array of T genes; gene t holds the state s_t and its cost
f_t = emission cost of s_t at frame t + (t = 0 ? init cost : transition cost
from s_{t-1}). The chromosome cost is F = sum f_t. The best achievable F is
exactly the Viterbi cost, so no chromosome can ever be cheaper than that;
the testbenches use this as a bound.

## Architecture

```
                       +-------------------- hgsca_top --------------------+
 model tables  ------> | hmm_model_mem x V  --cost tables-->  sca x V      |
 symbols obs[T] -----> |   (emission gather)                 (3x3 cells)  |
                       |                                       | best     |
                       |           threshold_pruning <---------+ fitness  |
                       |              | disable bits -> sca Disable input  |
                       +--------------+------------------------------------+
                                      v recognised word, cost, path
```

* **`hgsca_top`** – controller and wiring. Sequence per utterance: gather
  emission costs (T cycles), initialise every array, then `max_iter` times:
  one generation in every active array, wait for all, pruning step, clear the
  pruned words' active flags.
* **`hmm_model_mem`** (one per word) – the three cost tables, written through
  the top's model port. Because the utterance is fixed while it is decoded,
  it copies, once, the emission costs of the T observed symbols into a T x 6
  table, so the cells never index the 256-entry table.
* **`sca`** (one per word) – a SIDE x SIDE grid of `processing_element`s
  whose edges wrap around (a torus). Cell neighbours are ordered up, left,
  down, right. All cells start a generation together, each works on a private
  copy, and the array commits all new chromosomes in the same cycle once the
  slowest cell is done, so the update is that of a synchronous cellular
  automaton. It then registers the least cell cost (`best_fitness`) and that
  cell's path. With `disable_sca` high it ignores generation starts.
* **`processing_element`** – one cell: selection, then crossover, then
  mutation, then re-costing of the whole chromosome (`chrom_eval`, one gene
  per cycle). A random initial chromosome starts in state 0 and climbs one
  state with probability 1/4 per frame.
* **`threshold_pruning`** – serial statistics over the active words' best
  costs (sum, mean, squared deviations, variance, square root), threshold
  mean + SD/2, disable pattern, and the arg-min word.

## The genetic operators

These are the heart of the design and the least obvious part.

**Selection (`selection_unit`)** – simulated annealing between the cell's
own chromosome A and one neighbour B picked at random. With
delta = F(B) - F(A): B wins when delta <= 0; otherwise the temperature is
cooled, T <- 0.95 T, and B still wins when a uniform X in [0,1) satisfies
X <= exp(-delta/T). The exponential is the polynomial 1 - x + x^2/2
(`fp_exp_neg`). That polynomial turns upward past x = 1, so this design
returns 0 there: a much worse neighbour is never accepted. The whole decision
is one combinational pass through a subtractor, a multiplier, a divider and
the exponential, registered in one cycle. The temperature register is per
cell, loaded with `t0` at initialisation and cooled at every tournament, so
the first tournament uses 0.95 t0.

**Crossover (`crossover_unit`)** – with a random X in [0,1), X <= Pc leaves
the parent unchanged. Note the polarity: **`pc` is the probability of *not*
crossing over**. This is how the method's procedure states it, and it is kept.
Otherwise a crossover gene g in 1..T-2 is drawn, and for every frame from g
to T-1 the child takes, among the four neighbours' states at that frame, the
one with the least emission cost plus transition cost from the child's
previous state. One frame per cycle, four adders and a comparator. The
child's head (frames before g) is the parent's.

**Mutation (`mutation_unit`)** – X <= Pm triggers it (here `pm` is the
probability of mutating). Two genes gs < ge are drawn and frames gs+1..ge are
rebuilt greedily: each takes the state with the least transition plus
emission cost from the previous frame's state (six adders, one per state).
The frame after ge keeps its state; the following re-costing prices the new
junction, and a backward step there costs 1e30, which selection soon removes.

Each unit has its own free-running 32-bit LFSR (`lfsr_rng`, polynomial
x^32 + x^22 + x^2 + x + 1); uniform numbers in [0,1) are 24 random bits
scaled by 2^-24. The seed is an input port (`seed`) rather than a
parameter, so every cell is the same module; the top gives word w's array
the seed w + 1, the array derives each cell's seed from it and the cell
index, and the cell derives its four generators' seeds from that. Runs are
therefore repeatable.

## Pruning

After each generation `threshold_pruning` sees the active words' best costs
X(i) and computes Avg, SD and threshold = Avg + SD/2. Words with X(i) above it
are disabled, but only if at least `pp_percent` percent of all V words stay
active; otherwise the step is skipped (`prune_blocked`). The best word is
always at or below the mean, so it can never be pruned. The square root is
the polynomial 1 - y/2 - y^2/4 with y = 1 - m, applied after reducing the
argument to m in [0.5, 2) (the reduction is this design's addition; without
it the polynomial only works near 1). The coefficient 1/4 is kept as the
method gives it. The Taylor value is 1/8. The error is up to about 12 %,
which only moves the threshold.

## Interfaces and timing of the top

| port | dir | meaning |
|---|---|---|
| `mdl_wr_en, mdl_word, mdl_sel, mdl_row, mdl_col, mdl_data` | in | write one cost: `mdl_sel` 0 = init[row], 1 = trans[row][col], 2 = emission of state row for symbol col |
| `obs_wr_en, obs_addr, obs_data` | in | write observation symbol `obs_addr` |
| `start` | in | pulse to decode; `max_iter`, `t0`, `pc`, `pm`, `pp_percent` held stable while busy |
| `busy`, `done` | out | busy until `done` pulses |
| `recognized_word`, `recognized_cost`, `recognized_path` | out | valid at `done` |
| `best_fitness[V]`, `active`, `iter_count` | out | per-word best cost, active flags, generations run |

Reset is synchronous and active low. One generation of a cell without
crossover or mutation takes T + 11 cycles; a crossover at gene g adds T - g,
a mutation of genes gs+1..ge adds ge - gs. An array's generation lasts as long
as its slowest cell. The pruning step takes 2V + 6 cycles. Floating-point
units are combinational. The longest path is the selection decision
(subtract, multiply, divide, square, two adds, in one cycle), so a real
implementation would pipeline it or run a slow clock.

Default parameters: `V = 24` words (the largest vocabulary the method was
evaluated with), `SIDE = 3` (9 cells per word), `T = 32` frames, 6 states,
256 symbols. The method gives neither the cell count nor the utterance length,
so those two are this design's choice. Utterances longer than T frames need
a larger `T`.

## Departures and simplifications

* Floating point: truncation instead of round-to-nearest, subnormals flushed
  to zero, overflow saturates to infinity. Results are within one unit in
  the last place of the exact value.
* `-log 0` is represented by 1e30 (`FP_BIG`) so that sums stay finite.
* exp(-x) returns 0 for x >= 1 (see Selection); the square root gets argument
  reduction (see Pruning).
* The selection's acceptance test uses X <= Y. The method's text procedure
  has X < Y; the difference is immaterial.
* The preprocessing, feature extraction and vector quantisation in front of
  the decoder are not part of this RTL; the top takes symbol indices.
* The emission gather in `hmm_model_mem`, the load ports, the event outputs
  (`ev_*`) of the arrays and the recognised-path output are this design's
  additions for use and observation.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. References are computed independently in
real arithmetic (`tb_fp_pkg`, `tb_hmm_pkg` with a Viterbi reference):

* `tb_fp_add`, `tb_fp_mul`, `tb_fp_div` – 22 000 random and directed cases
  each against exact results, 2^-22 relative tolerance.
* `tb_fp_exp_neg`, `tb_fp_sqrt_approx` – polynomials against their real
  evaluation. The square root is also checked to stay within 15 % of the true
  root.
* `tb_lfsr_rng` – sequence against the bit-stream recurrence of the
  polynomial.
* `tb_selection_unit` – always takes better or equal neighbours, never a
  far worse one, and the acceptance rate matches the polynomial within 0.05.
* `tb_crossover_unit`, `tb_mutation_unit` – every rebuilt gene is a cheapest
  choice, untouched genes are kept, and the latency is exact.
* `tb_processing_element` – costs always match the path, and the cell never
  beats Viterbi. With optimal neighbours and no crossover or mutation it
  adopts the optimum exactly.
* `tb_sca` – best fitness is the least cell cost and matches its path.
  Cells change only at the commit, and a disabled array stays frozen.
* `tb_threshold_pruning` – statistics, masks, pruning-ratio rule, arg-min
  and latency against a real-arithmetic model.
* `tb_hgsca_top` – V = 6, T = 16, two utterances of synthetic word models.
  The right word is recognised with a cost equal to its reported path, not
  below its Viterbi cost, and below every other word's Viterbi cost. It also
  requires each mechanism at least once: better and worse selection, crossover
  and its skip, mutation, pruning, a ratio-blocked pruning step, and an
  ignored start of a disabled array.
* `tb_hgsca_top_full` – the same checks at the default size (24 words,
  3 x 3 cells, T = 32), two utterances of 30 generations. The second uses a
  pruning ratio of 99 %, so its pruning steps are blocked. It reaches the
  Viterbi cost of the correct word in both. It builds in under two minutes
  with Verilator and runs in about 12 seconds.

To run one with Verilator (package files first):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/hgsca_pkg.sv tb/tb_fp_pkg.sv tb/tb_hmm_pkg.sv \
  $(ls rtl/*.sv | grep -v hgsca_pkg) tb/tb_hgsca_top.sv \
  --top-module tb_hgsca_top -o sim && obj_dir/sim
```

On the synthetic models, both the reduced-size and the default-size runs
reach the Viterbi cost of the correct word within 25 to 30 generations. In unit tests with random tables the
algorithm converges more slowly: 60 generations of one 3 x 3 array on random
costs typically end a few percent above the optimum. This is a stochastic
search, not an exact decoder.
