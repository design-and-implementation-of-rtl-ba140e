# Differential evolution in double-precision hardware

This is a sequential hardware implementation of the differential evolution
(DE) optimiser, classic DE/rand/1/bin, working entirely in IEEE-754 binary64.
Given an objective function of D real variables, the engine keeps a population
of NP candidate vectors in on-chip RAM. For every individual it builds a trial
vector from three other individuals. It evaluates the trial vector with a
pipelined floating-point objective unit and keeps whichever of trial and parent
scores lower. It stops when the best score falls below a threshold or after a
given number of generations.

The default build is the main configuration of the design it follows:
NP = 128 individuals and D = 32 variables. It targets a mid-range FPGA with
7-cycle adders and 5-cycle multipliers. Six textbook objective functions are
built in:

| sel | objective | formula as built |
|----|----|----|
| 0 | f1 sphere | Σ x_j² |
| 1 | f2 Schwefel 2.22 | Σ\|x_j\| + Π\|x_j\| |
| 2 | f3 Schwefel 1.2 | Σ_i (Σ_{j≤i} x_j)² |
| 3 | f4 Schwefel 2.21 | max \|x_j\| |
| 4 | f5 Rosenbrock | Σ_{j=1}^{D-1} \|100(x_j − x_{j−1}²)² + (x_{j−1} − 1)²\| |
| 5 | f6 step (continuous form) | Σ \|x_j + 0.5\|² |

## The algorithm as the hardware runs it

One run goes through the following steps:

1. **Range.** The crossover unit computes `x_max − x_min` once.
2. **Initial population.** For each individual i and attribute j, a random
   double r ∈ [1, 2) from the generator `Randf` becomes
   `x_min + (r − 1)·(x_max − x_min)`. This expression has exactly the form of
   the mutation formula `x_r1 + F·(x_r2 − x_r3)`, so the crossover unit
   computes it. Each value is written to the population RAM (PMem) and to the
   trial-vector register file U. Once all D values are in place, the objective
   unit evaluates U and the score goes to the fitness RAM (FXMem). The register
   `Minimal` keeps the best score.
3. **Generation loop.** For each individual i:
   * Draw r1, r2 and r3 from the index generator, one per clock. A draw that
     is out of range or repeats i or an earlier index is thrown away. Then draw
     `jrand` ∈ [0, D).
   * For each attribute j, read x_i,j from PMem. If `rand7 < cr` or
     `j == jrand`, read x_r1,j, x_r2,j and x_r3,j and run the crossover unit
     (22 cycles): `U[j] = x_r1,j + F·(x_r2,j − x_r3,j)`. Otherwise
     `U[j] = x_i,j`.
   * Evaluate U. If `f(U) ≤ FXMem[i]`, write U back over individual i and
     update FXMem[i], then update `Minimal` if it improved.
4. **Stop test** after every generation, and once after the initial
   population: stop if `Minimal < min_error` or the generation count has
   reached `max_gen`.

There is one population memory, so a replaced individual takes effect at once.
Mutants built later in the same generation can already use it. This is the
"in-place" variant of DE. A run is therefore not step-for-step identical to a
software DE that keeps generations G and G+1 in separate buffers.

### Cycle budget

With the default latencies:

| step | cycles |
|----|----|
| mutated attribute (4 RAM reads, crossover, bookkeeping) | 27 |
| copied attribute | 3 |
| index draws | ≥ 4, one more for each rejected draw |
| objective evaluation | see the objective table below (for example 8·D + 6 for f1) |
| write-back of an accepted trial | D + 1 |

At NP = 128 and D = 32 with CR ≈ 0.9 on f1, one generation takes about
143,000 cycles. The initial population takes about 128,000 cycles.

## Floating-point units

`fp64_addsub` (7-cycle latency) and `fp64_mul` (5-cycle latency) accept a new
operation on every clock. Each computes its result in the issue cycle through
the combinational functions `fp_add` and `fp_mul` in `dea_pkg`, then delays it
through a register chain of the given length. A synthesis tool with retiming
can spread the logic over those registers. Without retiming, the critical path
is a full binary64 add or multiply, and the clock will be far below the
≈ 95 MHz the latencies were chosen for.

Both units round to nearest, ties to even. They are bit-exact against a
software double for normal operands and results. Subnormal inputs count as
zero and subnormal results are flushed to a signed zero. Overflow gives ±∞.
NaN inputs, ∞ − ∞ and 0 · ∞ give a quiet NaN.

`fp64_comp` is combinational: `lt = a < b` in IEEE order. Binary64 is
sign-magnitude with the exponent above the fraction, so magnitudes compare as
unsigned integers and only the signs need handling. The engine has one such
comparator. A multiplexer feeds it one of three pairs:

* FXMem[i] and f(U), for selection
* f(U) and `Minimal`, to track the best score
* `Minimal` and `min_error`, for the stop test

## The crossover unit: 22 cycles on one adder and one multiplier

`crossover` computes `v = x_r1 + F·(x_r2 − x_r3)` in three dependent steps on
a single adder and a single multiplier. The adder runs twice, first as a
subtractor and then fed back as an adder:

| cycles | activity |
|----|----|
| 1 | operands registered at `start` |
| 7 | R1 = x_r2 − x_r3 (adder) |
| 1 | R1 held in a register |
| 5 | R2 = F · R1 (multiplier) |
| 7 | v = x_r1 + R2 (adder again) |
| 1 | v registered, `done` pulses |

The result is bit-identical to evaluating the expression in double arithmetic
in that order.

## Objective units

Each objective is its own module with the same port set: `start`, `busy`,
`done` and `fx`, plus an `idx`/`x` pair for reading attribute `idx` of the
trial vector combinationally from U. A unit issues one attribute every
`PERIOD` cycles into a small dataflow of pipelined units. The running value
sits in accumulator registers (AC, AC+, AC*, AC1/AC2, Max). `PERIOD` is set to
the per-attribute rate of the reference implementation. It is long enough for
the accumulator loop (an add takes `ADD_LAT` + 1 cycles to come back round),
so no hazard logic is needed.

| unit | units inside | PERIOD | start-to-done latency |
|----|----|----|----|
| `fit_sphere` | 1 mul, 1 add | 8 | 8·D + 6 |
| `fit_schwefel222` | 1 add (sum, then the final sum + product), 1 mul (product) | 11 | 11·D + 5 |
| `fit_schwefel12` | 2 add, 1 mul | 12 | 12·D + 9 |
| `fit_schwefel221` | comparator only | 3 | 3·D |
| `fit_rosenbrock` | 4 add, 4 mul, registers Delay1/Delay2 | 17 | 17·D + 21 |
| `fit_step` | 2 add, 1 mul | 12 | 12·D + 9 |

The reference latencies are 8·D, 11·D + 10, 12·D, 3·D, 17·D and 12·D. The
per-attribute rates here are identical; only the fixed pipeline fill and drain
differ.

Notes on individual objectives:

* **Rosenbrock** works on consecutive pairs. Attribute 0 only loads the
  "previous" register. Each later attribute j starts two branches. One forms
  x_{j−1}² and then x_j − x_{j−1}², squares it and multiplies by 100. The
  other forms (x_{j−1} − 1)² and parks it in Delay2 until the upper branch
  arrives.
* **f6** is built without a floor stage: x + 0.5, absolute value, square,
  accumulate. The function is therefore continuous, and its minimum 0 is
  reached only at x_j = −0.5.
* `dea_top` instantiates all six units. `func_sel` starts one of them and
  selects its result. For a single-objective build, remove the others. Each
  unit stands alone.

## Random number generators

`ca_rng` is a one-dimensional cellular automaton with null boundaries. Each
cell follows one of two rules:

* rule 90: `a_i ← a_{i−1} ⊕ a_{i+1}`
* rule 150: `a_i ← a_{i−1} ⊕ a_i ⊕ a_{i+1}`

The `RULES` bit vector chooses the rule per cell. Each rule vector used here
was chosen so that the automaton's characteristic polynomial (the recurrence
p_k = (x + r_k)·p_{k−1} + p_{k−2} over GF(2)) is primitive. The automaton then
steps through all 2^CELLS − 1 non-zero states before repeating. The engine has
four generators, all stepping every clock:

| generator | cells | rule vector | use |
|----|----|----|----|
| RandNP | 16 | `16'hB962` | low log2(NP) bits; rejection if ≥ NP |
| RandD | 16 | `16'hB962`, different seed | low bits for jrand; rejection if ≥ D |
| Rand<CR | 7 | `7'h32` | values 1..127 compared with `cr` |
| Randf | 52 | `52'hE0D57B02F6ACC` | fraction of a double in [1, 2) |

`cr` is the crossover rate as a 7-bit integer, `cr = round(CR·128)`. For
example, CR = 0.9 gives 115. The 7-cell generator never produces 0, so
`cr = 0` still mutates the single attribute `jrand`. That is the intended
behaviour of DE at CR = 0.

## Memories

`dea_ram` is a single-port RAM with write enable, one-cycle registered read
and read-old-data on a simultaneous write, the behaviour of an FPGA block RAM.
It is used twice:

* PMem: NP·D words of 64 bits, address i·D + j (256 Kbit at the default size)
* FXMem: NP words of 64 bits

The contents are not reset; every word is written before it is read.

## Interface of `dea_top`

| port | dir | width | meaning |
|----|----|----|----|
| `clk`, `rst_n` | in | 1 | clock, synchronous active-low reset |
| `start` | in | 1 | one-cycle pulse while idle starts a run |
| `func_sel` | in | 3 | objective, `dea_pkg::func_e` (0 = f1 … 5 = f6) |
| `cr` | in | 7 | crossover rate × 128 |
| `f` | in | 64 | scale factor F |
| `x_min`, `x_max` | in | 64 | search interval for the initial population (mutants are not clipped) |
| `min_error` | in | 64 | stop when best fitness < min_error |
| `max_gen` | in | 32 | generation limit |
| `busy` / `done` | out | 1 | run in progress / one-cycle end pulse |
| `best_fx`, `best_idx` | out | 64, log2 NP | best fitness and which individual holds it |
| `gen_count` | out | 32 | generations completed |
| `rd_i`, `rd_j` → `rd_x`, `rd_fx` | in → out | | while idle: PMem[rd_i][rd_j] and FXMem[rd_i], one cycle after the address |

The run inputs must stay stable while `busy` is high. Parameters: `NP`
(4 … 65536, default 128), `D` (2 … 65536, default 32), `ADD_LAT` (default 7)
and `MUL_LAT` (default 5). `NP` and `D` need not be powers of two; index draws
above the range are rejected.

## Verification

Every testbench is self-checking and ends with
`TB_RESULT checks=<n> failures=<m>`. Unit testbenches compare against models
written independently in the testbench, mostly the simulator's own `real`
arithmetic evaluated in the same order:

| testbench | what it checks |
|----|----|
| `tb_fp64_addsub`, `tb_fp64_mul` | 4000 mixed-exponent operations each, including cancellation, x − x and zero; bit-exact, exact latency |
| `tb_fp64_comp` | 5000 comparisons, ±0, ±∞, equal and near-equal values |
| `tb_ca_rng` | every transition against a cell-by-cell model; full periods 15 and 127 with no repeats |
| `tb_rand_float` | 4000 draws: range, rule model, mean |
| `tb_dea_ram` | read latency, hold before the edge, read-old-data |
| `tb_crossover` | 300 random cases, bit-exact, exactly 22 cycles |
| `tb_fit_*` | 200 vectors at D = 5 each, bit-exact, exact latency |
| `tb_dea_top` | NP = 8, D = 4, seven runs (see below) |
| `tb_dea_full` | default build (NP = 128, D = 32), f1, 10 generations (1.56 M cycles); all 128 stored fitness values recomputed, best value and index checked, best must improve |
| `tb_dea_table5` (with `dea_run_harness`) | all six objectives with CR = 0.9/0.2/0.9/0.8/0.9/0, F = 0.7: at NP = 16, D = 4 until 1e-12 or 20,000 generations; at the default NP = 128, D = 32 for 3 generations each; every stored fitness recomputed |

`tb_dea_top` runs all six objectives, both stop conditions, and CR = 0.9 and
CR = 0. During each run it checks every initial value, every index draw,
every mutant, every copied attribute, every fitness value, every selection
decision and the monotonic best. It also counts index redraws, mutations,
copies, forced `jrand` mutations, replacements, rejections, best updates and
both kinds of stop, and fails if any of them never happened.

In `tb_dea_table5` at NP = 16, D = 4, all six objectives reach the 1e-12 threshold:

| objective | generations here | generations, reference |
|----|----|----|
| f1 | 160 | 121 |
| f2 | 263 | 250 |
| f3 | 156 | 144 |
| f4 | 341 | 501 |
| f5 | 389 | 1683 |
| f6 | 153 | 101 |

These are single runs, while the reference values are averages of 20 runs.
For f1, the 392,000 cycles of the run are about 4 ms at 95 MHz.

At the default size a generation of f1 takes about 143,000 cycles, so the
reference's average of 11,571 generations for f1 would take about 1.7·10⁹
cycles (about 17 s at 95 MHz). The default size was simulated for 10
generations of f1 and 3 generations of each other objective. A full
20,000-generation run at that size (about 3·10⁹ cycles) was not simulated.

To run a testbench with plain Verilator, list the package first (the
testbenches carry a few width warnings, hence `-Wno-fatal`):

```
verilator --binary --assert -Wno-fatal -Irtl rtl/dea_pkg.sv $(ls rtl/*.sv | grep -v dea_pkg) \
          tb/tb_dea_top.sv --top-module tb_dea_top -o sim
./obj_dir/sim
```

Each unit testbench needs only the package and the modules it instantiates.
`tb_dea_table5` also needs `tb/dea_run_harness.sv`.

`--assert` turns on the handshake assertions in `dea_top`: a unit is never
started while busy, and `busy` matches the FSM state. The lint warnings that
remain are the unused high bits of the 16-cell index generators and package
constants that a given module does not use. They are not circuit problems.

## Departures from the reference design and open points

* **Floating-point units** are written here, not vendor cores. They match the
  vendor cores' latency and use a flush-to-zero subnormal policy.
* **Population update in place** (one PMem). See above.
* **All six objectives in one build**, selected at run time. The reference
  builds one objective per configuration, so its resource figures are per
  objective.
* **One search interval** for all variables. Mutants are never clipped to it.
* **Initial values** are generated through the crossover unit instead of a
  separate scaling path from `Randf` to PMem. This costs 22 cycles per value
  during initialisation only.
* **f6** has no floor, as drawn in the reference datapath. It is therefore a
  shifted sphere, not a true step function.
* **Rosenbrock** runs over the D − 1 consecutive pairs (the standard
  definition).
* **Fixed latencies** of the objective units differ from the reference by a
  few cycles of pipeline fill (see the objective table). The per-attribute
  rates are the same.
* **Index generation** by rejection is this design's choice. So are the
  cellular-automaton rule vectors and seeds.
* **No resource or Fmax figures** have been measured for this RTL.
