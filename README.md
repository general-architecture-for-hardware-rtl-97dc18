# A streaming genetic-algorithm engine for FPGAs

This RTL runs a genetic algorithm (GA) entirely in hardware. The GA is built
as a ring of four small stages: management, crossover, mutation and
evaluation. Candidate solutions circulate around the ring, one bus-width
slice per clock. A new offspring is produced, evaluated and either kept or
thrown away every `ceil(N/M)` clocks, where N is the chromosome length and M
the bus width. Throughput scales by placing several such rings ("pipelines",
or islands) side by side. Neighbouring islands occasionally exchange
individuals.

The architecture follows the paper *General Architecture for Hardware
Implementation of Genetic Algorithm*. That paper fixes the split into stages,
the data passed between them, the replacement rule and the island structure.
Everything the paper leaves open was decided for this implementation; the
last section lists those decisions. Examples are the bus width, the
population size, the crossover and mutation operators, how the initial
population is made, and how a migrant joins its new island. The fitness
function here is a 64-item 0/1 knapsack problem.

## The replacement rule (simplified Minimal Generation Gap)

The design holds no generations. Each step takes two parents, makes one
offspring and evaluates it. The offspring then competes only with the worse
of its two parents (`parent_worse`). If it is strictly fitter, it overwrites
that parent in the population memory. Otherwise it is discarded. The
population therefore never grows, and its worst members are replaced one at
a time.

The hardware makes the two parents cheaply. The crossover stage keeps the
previous individual it saw in a register `r`. Each new individual arriving
from management (`parent2`) is crossed with the one in `r` (`parent1`), and
then replaces it in `r`. Consecutive individuals leaving management are
therefore the parent pairs.

What management sends next depends on the last result:

* if the last offspring was kept, the offspring itself is sent next, so it
  immediately becomes a parent;
* otherwise a randomly chosen member of the population is sent.

## How an individual moves through the ring

```
          +------------+  frame  +-------------+     +-----------+     +-----------+     +------------+
   +----->| management |-------->| immigration |---->| crossover |---->| mutation  |---->| evaluation |--+
   |      |  memory    |         | (parallel   |     |  reg r    |     |           |     | (knapsack) |  |
   |      +------------+         |  only)      |     +-----------+     +-----------+     +------------+  |
   |            |                +-------------+                                                       |
   |            +--> mg_* to the next pipeline's immigration stage                                     |
   +---------------- offspring2 chromosome + fitness, parent_worse address + fitness -------------------+
```

An individual travels as a **frame** of `B = ceil(N/M)` **beats**. Each beat
carries M chromosome bits: bit j of beat k is chromosome bit `k*M + j`. Three
signals mark the beats: `valid`, `first` and `last`. Side-band fields travel
with the data and hold the same value on every beat of a frame:

| field | management -> crossover | crossover -> mutation -> evaluation | evaluation -> management |
|---|---|---|---|
| `kind` | INIT / GA / MIGRANT | same | same |
| address | of the individual sent | of `parent_worse` | of `parent_worse` |
| fitness | of the individual sent | of `parent_worse` | of `parent_worse` |
| `off_fit` | – | – | offspring fitness, valid on the last beat |

There is no back-pressure. Every stage accepts one beat per clock and emits
it one clock later. Management starts a new frame every B clocks, with no
gaps between frames. The ring latency is therefore 3 clocks for a single
pipeline, and 4 clocks when the immigration stage is present.

The frame **kind** lets one datapath do three jobs:

* **INIT** frames build the initial population. After reset, management
  sends POP frames of random bits to addresses 0..POP-1. Crossover and
  mutation pass them unchanged. Evaluation computes their fitness, and
  management writes each one unconditionally. GA frames start only after all
  INIT frames have returned, so no individual is used before it has been
  evaluated.
* **GA** frames are ordinary parents. They are crossed and mutated.
* **MIGRANT** frames carry an individual from the neighbouring island. The
  next section describes how they are handled.

## Stage details

**Management** (`ga_management`). The population memory holds one word per
individual: the chromosome, padded to `B*M` bits, plus its fitness. The
module has two independent sides:

* *Return side.* It collects the returning offspring in a staging register.
  On the last beat it compares `off_fit` with the fitness of `parent_worse`
  and, if the offspring is fitter, writes the whole word in one clock.
* *Send side.* It reads the word for the next frame one clock before that
  frame starts. A kept offspring is flagged as pending. The first frame
  whose memory read follows the write sends that offspring; any other frame
  sends a random individual.

Because both sides run at one frame per B clocks, at most one offspring is
ever pending. The module also reports the best fitness it has written, the
matching chromosome, and counters of offspring evaluated and offspring kept.

**Crossover** (`ga_crossover`). It uses uniform crossover, one beat at a
time. A fresh random M-bit mask takes each bit from `parent1` (mask 1) or
`parent2` (mask 0). In the same clock, the beat of `parent2` is written into
`r`. On a fitness tie, `parent2` counts as the worse parent. INIT and
MIGRANT frames, and the first GA frame after reset (when `r` is still empty),
pass unchanged and carry their own address and fitness as `parent_worse`.

**Mutation** (`ga_mutation`). Each beat of a GA frame is mutated with
probability `MUT_PROB/256` (default 1/8). A mutation inverts one random
chromosome bit of that beat. Padding bits above N are never touched. With
N = 64 and M = 8 this averages about one inverted bit per offspring.

**Evaluation** (`ga_eval_knapsack`). Bit i selects knapsack item i. Each
clock, the values and weights of the M items in the current beat are added
to running sums. The fitness is the value sum if the weight sum is within
capacity, and 0 otherwise. It is ready together with the last beat, so
evaluation adds no clocks per frame. The instance is generated by formula in
`ga_pkg`:

* `weight(i) = 5 + (13*i + 7) mod 23`
* `value(i) = 4 + (29*i + 3) mod 37`
* `capacity = floor(sum of weights / 2)`

For 64 items its optimum is 1003. To solve another problem, replace this
module with one of the same ports.

**Random numbers** (`ga_rng`). Each stage has its own 32-bit xorshift
generators with distinct seeds. They drive random selection, crossover
masks, mutation and the initial population.

## Islands and migration

`ga_top` instantiates `N_PIPES` pipelines (default 4) in a ring. Pipeline i
sees the management output of pipeline i-1. Its immigration stage
(`ga_immigration`) sits between management and crossover and counts the GA
frames it forwards. On every `PERIOD`-th such frame (default 16) it replaces
the chromosome with the neighbour's frame of that same clock, and marks the
frame MIGRANT. Address and fitness stay those of the local individual that
was displaced.

The migrant passes crossover and mutation unchanged and is evaluated. The
normal replacement rule then applies: management keeps the migrant in the
displaced individual's slot only if it is fitter. This works because all
pipelines share reset and timing, so their frames start on the same clocks.
An assertion checks this alignment during every migration. If the neighbour
is not sending a GA frame, the migration waits for the next one.

With `N_PIPES = 1` no immigration stage is instantiated.

## Parameters

| parameter | default | meaning | origin |
|---|---|---|---|
| `N` | 64 | chromosome bits (knapsack items) | from the paper (64-bit knapsack) |
| `M` | 8 | bus width, bits per clock | chosen |
| `POP` | 32 | individuals per pipeline | chosen |
| `FW` | 16 | fitness width | chosen |
| `N_PIPES` | 4 | parallel pipelines | largest count the paper evaluates (1, 2, 4) |
| `MUT_PROB` | 32 | mutation probability per beat, out of 256 | chosen |
| `PERIOD` | 16 | GA frames between migrations | chosen |

`N` must be at least `M`; `ga_pipeline` stops elaboration otherwise.

Timing at the defaults:

* each pipeline evaluates one offspring every 8 clocks;
* the initial population takes about `POP*B + 4` = 260 clocks;
* four pipelines evaluate 0.5 offspring per clock in total.

A generic coarse synthesis of `ga_top` at the defaults gives about 2,300
word-level cells, 2,400 flip-flop bits and 10,500 memory bits (four
population memories of 32 x 80 bits, plus the crossover registers).

## Files

| file | contents |
|---|---|
| `rtl/ga_pkg.sv` | frame kinds, default sizes, knapsack instance functions |
| `rtl/ga_rng.sv` | xorshift random source |
| `rtl/ga_management.sv` | population memory, replacement, selection, initial population |
| `rtl/ga_crossover.sv` | register r, uniform crossover, parent_worse selection |
| `rtl/ga_mutation.sv` | bit-flip mutation |
| `rtl/ga_eval_knapsack.sv` | knapsack fitness, M items per clock |
| `rtl/ga_immigration.sv` | migration from the neighbouring pipeline |
| `rtl/ga_pipeline.sv` | one pipeline (island) |
| `rtl/ga_top.sv` | N_PIPES pipelines in a ring, global best |

## Simulation

Each testbench checks itself and ends by printing
`TB_RESULT checks=<n> failures=<n>`. Run one with plain Verilator from the
repository root, for example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl -y tb +libext+.sv \
          rtl/ga_pkg.sv tb/tb_ga_top.sv --top-module tb_ga_top -o sim
./obj_dir/sim
```

| testbench | what it shows |
|---|---|
| `tb_ga_eval_knapsack` | fitness against a bit-by-bit reference; pass-through; 1-clock latency |
| `tb_ga_mutation` | exactly one flipped bit at probability 1; none at 0; observed rate at the default; padding untouched |
| `tb_ga_crossover` | offspring bits come only from the two parents; choice of `parent_worse` including ties; register r behaviour |
| `tb_ga_immigration` | migration period, waiting for the neighbour, migrant contents |
| `tb_ga_management` | init sequence, back-to-back frames, memory contents against a model, a kept offspring is sent next, counters, best-so-far |
| `tb_ga_pipeline` | one pipeline end to end: 3-clock ring latency, one offspring per 8 clocks, every fitness and stored word correct, improvement |
| `tb_ga_top` | the full default design (4 pipelines) for 20,000 offspring each: all mechanisms occur, pipelines stay aligned, optimum reached |
| `tb_ga_islands` | best fitness against time for 1, 2 and 4 pipelines |

At the defaults, the four-pipeline design reaches the instance optimum
(1003) within 20,000 offspring per pipeline. `tb_ga_islands` shows 1, 2 and
4 pipelines all reaching it within about 26,000 clocks. This knapsack
instance is easy, so the curves do not separate the way a harder problem
would. The pipeline and top testbenches read a few internal signals by
hierarchical name to count mechanisms, such as crossovers, mutations and
migrant outcomes.

## What is this design's own, and what is missing

The paper does not specify the following; each was chosen here:

* the bus width, population size, fitness width and mutation rate;
* the crossover operator (uniform) and the mutation operator (one bit per
  mutated beat);
* the random-number generator;
* the frame format, the INIT/MIGRANT kinds, and building the initial
  population by streaming it through the pipeline;
* strict "fitter" comparison, and `parent2` as the worse parent on a tie;
* the migration period, the ring direction, and the rule that a migrant
  takes the slot of the individual it displaced only if it is fitter;
* the knapsack item values, weights and capacity;
* the best-so-far and counter outputs.

Higher fitness is better throughout. A minimisation problem needs an
evaluation stage that returns, for example, a constant minus the cost.

Not included:

* **The TSP evaluation stage.** The paper also reports a travelling-salesman
  benchmark (eil51). A TSP pipeline needs the city data, a tour encoding and
  permutation-preserving crossover and mutation, none of which are
  specified. Only the knapsack evaluation is provided.
* **The circuit-size prediction model** and the design tool. They are
  software, not hardware.
