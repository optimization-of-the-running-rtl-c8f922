# Address-based ant colony core

This is a hardware core for ant colony optimisation (ACO) on a travelling-salesman-style
problem. The target is n = 16 nodes, 3 ants and 20 iterations at 50 MHz. Every quantity the
algorithm needs lives in an n×n matrix in on-chip RAM:

- the pheromone on each edge;
- the distance of each edge.

Element (i, j) is found at address `(i << log2 n) | j`. An ant is a small state machine that
moves through these matrices by address:

- its current node selects the row;
- a column pointer walks across that row;
- choosing a node means jumping to that node's row.

No multiplier or divider appears anywhere. Multiplications are replaced by shifts and additions,
and every value is an unsigned integer.

The ants work in parallel, each with its own read port and random source. After every ant has
closed its tour, an evaluation unit picks the shortest tour. An updating unit then rewrites the
pheromone along the tours. The cycle repeats for a fixed number of iterations.

The method follows the published address-based ACO architecture, "Optimization of the Running
Speed of Ant Colony Algorithm with Address-based Hardware Method". That source describes the
flowchart and the block structure but gives few numbers or formulas. The widths, the scoring
rule, the update constants and all timing details are choices made for this RTL. They are marked
as such below and in each file's header.

## Block structure

```
              load port ──┬──────────────┐
                          v              v
                   pheromone_mem    heuristic_mem       (n*n words each)
                    │ │ │   ^ │        │ │ │
          read port │ │ │   │ │ read   │ │ │
          per ant   v v v   │ v port   v v v
                ┌─ city_select ×N_ANTS ─┐   (each: lfsr + result_mem)
                │  tour, cost, done     │
                └──────────┬────────────┘
                           v
                       eval_unit ──> best ant, best cost
                           v
                      update_unit ──> pheromone writes, best_tour
                           ^
                       aco_ctrl   (SOLVE -> EVAL -> UPDATE, N_ITER times)
```

| file | role |
|---|---|
| `rtl/aco_pkg.sv` | default sizes and constants, seed and width helpers |
| `rtl/aco_top.sv` | the core: wires everything, load port, status outputs |
| `rtl/aco_ctrl.sv` | phase sequencer and iteration counter |
| `rtl/city_select.sv` | one ant: row scan, random acceptance, tour cost |
| `rtl/result_mem.sv` | an ant's Result memory: one byte per node (chosen or not) plus the tour in order |
| `rtl/lfsr.sv` | 16-bit Galois LFSR, the ant's random threshold |
| `rtl/pheromone_mem.sv` | n×n pheromone RAM, N_ANTS+1 read ports, two write ports |
| `rtl/heuristic_mem.sv` | n×n distance table, written only by the load port |
| `rtl/eval_unit.sv` | cheapest ant of the iteration, best cost of the run |
| `rtl/update_unit.sv` | local and global pheromone update, best-tour buffer |

## How an ant chooses its next node

This is the heart of the design. It is also where it differs most from ACO as usually written.

Textbook ACO picks node s from node r with probability proportional to `Ph(r,s)^α · η(r,s)^β`.
Here η is the heuristic desirability of the edge. Computing that needs:

- powers;
- a sum over every candidate;
- a division.

The core replaces all of this with a **sequential threshold test along the row**:

1. The ant sits on row `cur`. A column pointer starts at 0.
2. A priority encoder over the Result memory's flags finds the next column, at or after the
   pointer, whose node is still free. Columns already in the tour therefore cost no time.
3. The ant reads `Ph(cur, col)` and `D(cur, col)` and forms the score `Ph + (DMAX − D)`, where
   `DMAX = 2^D_W − 1`.
   - `DMAX − D` stands in for the heuristic η = 1/D, without a divider.
   - Adding, instead of multiplying, treats both terms as log-domain weights. This amounts to
     α = β = 1 in the log domain.
4. The score is compared with the low `PH_W+1` bits of the ant's LFSR.
   - If the score is **greater**, the node is taken:
     - it is written to the Result memory at position M, and M increments;
     - its distance is added to the cost;
     - `cur` becomes that node, and the pointer goes back to column 0.
   - Otherwise the pointer moves to the next free column and the LFSR steps.
5. **Forced choice.** Suppose the ant rejects as many candidates in a row as there are free
   columns, a whole round of the row. Then the next free column is taken whatever its score.
   This bounds the tour time: a row can never stall, however little pheromone it carries.
6. When M = n, the ant reads `D(cur, start)`, adds it to close the tour, and raises `done`.

A node's chance of being picked thus rises with its pheromone and falls with its distance, much
as in ACO's proportional rule. The exact distribution is different, though: it depends on scan
order, and low columns are offered first. Ant k starts on node `k mod n`, so ant 0 starts on
node 0.

Ant colony systems also have an *exploitation* branch: with probability q0, take the argmax
instead of sampling. The core does **not** build it. Every choice goes through the random
threshold.

### Ant pipeline and timing

Each cycle the ant issues the read address of the next free column. In the same cycle it judges
the column whose data has just arrived, since both memories have a one-cycle synchronous read.

When a node is taken, the read issued in that cycle belongs to the old row and is dropped. So
every choice costs one bubble cycle. A tour takes exactly

    2·(n − 1) + R + 3 cycles from the start strobe to done,

where R is the number of candidates that lost against the LFSR. For n = 16 that is 33 + R. The
SOLVE phase lasts as long as the slowest ant.

## Pheromone update

All pheromone values are `PH_W`-bit unsigned integers. Rates are powers of two, so every update
is a subtract and a shift. The update runs after evaluation, as read-modify-write passes over
tours:

| pass | edges | rule |
|---|---|---|
| local, once per ant | every edge of that ant's closed tour | `τ ← τ − ((τ − TAU0) >> LOCAL_SHIFT)` (mirrored when τ < TAU0) |
| global, once | every edge of the iteration's shortest tour | `τ ← τ + ((DEPOSIT − τ) >> RHO_SHIFT)` |

The global rule is the usual `τ ← (1−ρ)τ + ρΔτ`, with ρ = 2^−RHO_SHIFT and Δτ = DEPOSIT. It is
applied only to the best tour; no evaporation touches the other edges. The local rule pulls used
edges back toward the initial level, so that ants spread out. The shifted step is truncated, so
repeated application settles within 2^shift − 1 of the target rather than exactly on it. Neither
rule can overflow or underflow the word.

Edges are undirected. Each new value is written to (a,b) through write port A and, in the same
cycle, to (b,a) through write port B. The matrix therefore stays symmetric if it is loaded
symmetric. The read of the next edge (b,c) is issued in the cycle that writes (a,b). Its address
can never clash with either write, because c ≠ a in a tour of three or more nodes. So a pass runs
at one edge per cycle, plus two cycles to restart the pipeline at the start of each tour:

    update time = (N_ANTS + 1) · (n + 2) + 1 cycles   (73 for the defaults)

When the evaluation unit reports that this iteration beat the best cost of the run, the global
pass also copies the tour into `best_tour`.

## Iteration sequence and overall speed

`aco_ctrl` runs these phases:

    LAUNCH (1) → SOLVE (33 + R_max) → EVAL (1) → UPD_GO (1) → UPDATE (73)

It repeats them `N_ITER` times and then pulses `done`.

At the defaults, the 16-city ring test in `tb/tb_aco_top.sv` takes 2,414–2,549 cycles for 20
iterations, or about 48–51 µs at 50 MHz. For the same 16-node, 3-ant, 20-iteration case the
source architecture reports 20,777.5 ns, about 1,039 cycles. This RTL is therefore about 2.3–2.5×
slower than that figure.

That figure works out to about 52 cycles per iteration. Here, sixteen sequential choices cost at
least 33 cycles per tour, and the pheromone passes cost 73 more. Getting closer would take a
different organisation, such as doing the local update while the ants walk, and the described
flowchart does not have one.

## Using the core

Ports of `aco_top` (parameters `N_NODES`, `N_ANTS`, `N_ITER`, `PH_W`, `D_W`):

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; synchronous active-low reset of all control state |
| `ld_we`, `ld_sel`, `ld_addr`, `ld_data` | in | load port, honoured only while `busy` is low. `ld_sel` = 0 writes pheromone, 1 writes distance; `ld_addr = (row << log2 n) \| col` |
| `start` | in | one-cycle pulse to begin a run |
| `busy`, `done` | out | run in progress; one-cycle pulse at the end |
| `iter` | out | completed iterations |
| `best_cost`, `best_tour` | out | shortest closed tour of the run and its node sequence |
| `iter_cost` | out | shortest tour of the latest iteration |
| `ev_reject[k]`, `ev_forced[k]` | out | strobes: ant k rejected a candidate / made a forced choice |
| `ev_local`, `ev_global` | out | strobes: one local / global edge update |

A run goes as follows:

1. Load all n² distances. Distances must fit `D_W` bits.
2. Load a uniform pheromone level. `TAU0` = 32 matches the local-update target.
3. Pulse `start` and wait for `done`.

Pheromone carries over from one run to the next. Reload it to start fresh. `best_cost` restarts
with every `start`.

The memories have no reset. Whatever is read must be loaded first.

Key constants, all in `rtl/aco_pkg.sv`:

| name | default | meaning |
|---|---|---|
| `DEF_N_NODES` | 16 | nodes, n ≥ 3. Each index takes ⌈log2 n⌉ address bits, so memory depth is the square of the next power of two; row r starts at address r · 2^⌈log2 n⌉. Simulated at n = 16 and n = 12 |
| `DEF_N_ANTS` | 3 | parallel ants, each with its own read ports |
| `DEF_N_ITER` | 20 | iterations per run |
| `DEF_PH_W`, `DEF_D_W` | 8, 8 | pheromone and distance word widths |
| `DEF_RHO_SHIFT` | 3 | global rate ρ = 1/8 |
| `DEF_LOCAL_SHIFT` | 4 | local rate 1/16 |
| `DEF_TAU0` | 32 | local-update target level |
| `DEF_DEPOSIT` | 255 | Δτ of the global update |

Only 16, 3 and 20 come from the source architecture. The other values are this design's own
choices. The tour cost is `D_W + log2 n` bits wide, which holds n·(2^D_W − 1).

## Departures from the source architecture

- **Selection rule:** an additive score against a random threshold, scanned column by column,
  replaces the probability of the proportional rule. There is no q0 exploitation branch.
- **Forced choice** after a fruitless round is this design's addition, to bound tour time.
- **Distances** are stored in place of heuristic coefficients. The heuristic is derived as
  `DMAX − D`, and the same table gives the tour cost.
- **Phase order:** evaluation runs before the local update. The source lists the local update
  first. Evaluation only reads tour costs, so the pheromone outcome is the same.
- **Update rules:** the local rule, all constants and the symmetric double write are this
  design's choices.
- **Speed:** see the figures above. The reported run time is not reached.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops through a watchdog if it hangs.

| testbench | what it checks against |
|---|---|
| `tb_lfsr` | full period 65,535, and the output bit stream against the polynomial's recurrence |
| `tb_pheromone_mem`, `tb_heuristic_mem` | a shadow array or a closed-form table, on all read ports, including same-cycle read/write |
| `tb_result_mem` | random permutations: flags, flag vector, tour order; clear together with a mark |
| `tb_city_select` | random matrices: the tour is a permutation from the start node and the cost equals the recomputed length; with all scores zero every choice is forced and the tour is ascending; a ring of high-score edges is followed exactly; row addresses; exact tour cycle count |
| `tb_eval_unit` | a reference minimum with ties; best-so-far; clear |
| `tb_update_unit` | the whole pheromone matrix against a reference update; best-tour copy; exact cycle count |
| `tb_aco_ctrl` | the phase protocol against a randomly delayed environment; iteration and done counts |
| `tb_aco_top` | full-size end-to-end run, described below |
| `tb_aco_top_n12` | the same end-to-end checks as `tb_aco_top`, at 12 nodes, 4 ants and 6 iterations |

`tb_aco_top` runs the full default configuration on 16 cities spaced around a ring, where the
optimum tour length is 256. It checks:

- the best tour is a valid permutation and its length matches `best_cost`;
- the best cost tracks the per-iteration minimum and never rises;
- every update lasts 73 cycles;
- the pheromone matrix stays symmetric and the best tour's edges are reinforced;
- loads are ignored while busy;
- rejections, forced choices, local and global updates, and new-best events each happen.

In the current run:

- the first run ends at 288;
- a second run, continuing from the learned pheromone, reaches the optimum, 256.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -y rtl rtl/aco_pkg.sv tb/tb_aco_top.sv \
          --top tb_aco_top -o sim
./obj_dir/sim
```

Substitute any other `tb/tb_<block>.sv` and its top name. The simulation is two-state and
finishes in well under a second.
