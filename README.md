# Evolving cellular-automata neural networks in hardware

This design runs a genetic algorithm over **cellular-automata rules** rather
than over network weights or circuits. Each individual is a small rule table.
When the rule runs for a few steps, it grows the wiring of a 5 x 10 grid of
pulse-coded chaotic neurons. The grown network is then run on a time series
(Mackey-Glass) and scored by how well it predicts the next sample, and the
score drives selection. Everything runs on chip: the GA processor, the
decoding of rules into the reconfigurable network, the network, and the
scoring.

The design follows a published evolvable-hardware study of ECANS (Evolving
Cellular Automata Neural Systems). That study gives the block structure and
the equations, but not the encodings, widths, constants or timing. Every
such choice made here is listed below and in the opening comment of each
source file.

```
            +-----------------------------+        +----------------+
 host  ---> | population mem 0 / mem 1    |<------>|  GA processor  |<--- fitness memory
 loads      +-----------------------------+        +----------------+          ^
                    | individual                                                |
                    v                                                           |
            +----------------+  rule entries   +----------------------+   +-----------+
            | rule generator |---------------->| 5 x 10 CA neural net |-->| fitness   |
            +----------------+  initial cells  +----------------------+   | evaluator |
                                                 ^ pulse encoders (5)      +-----------+
 host ---> sample memory (1024 x Q0.16) ---------+                    main controller
```

## From chromosome to network

This is the part that differs most from an ordinary neural accelerator, so
it is described in full.

**Cell state.** Every cell holds a 2-bit cellular-automata state. The state
is also the configuration of the cell's connection switches:

| state bit | meaning when 1 |
|-----------|----------------|
| 0 | vertical link: the neuron listens to the neuron above it (or, in the top row, to an input node) |
| 1 | lateral link: the neuron and its right-hand neighbour listen to each other |

The left input of a neuron is therefore enabled by the *left neighbour's*
bit 1. A neuron always feeds back to itself through its refractory term, and
every bottom-row neuron always drives the single output node. The
switches stand for tri-state buffers on an FPGA's internal lines. Here each is
an AND gate, which behaves the same on a point-to-point wire
(`connection_module`).

**Rule.** The next state of a cell depends on the states of its upper-left,
upper and upper-right neighbours: 6 bits, so 64 entries of 2 bits. Cells
outside the grid count as state 0. Each cell keeps its own copy of the rule
in a RAM-configured look-up table (`lut_block` inside `ca_module`). All copies
are written together, so every cell obeys the same rule.

**Chromosome layout (148 bits).**

| bits | content |
|------|---------|
| `[2e+1 : 2e]`, e = 0..63 | new state for neighbourhood `e = {upper-left, upper, upper-right}` (upper-left in the high bits) |
| `[147 : 128]` | initial states of the 10 top-row cells, column 0 in bits 129:128 |

**Development.** The `rule_generator` reads one individual and writes the
64 entries into every rule table, one per cycle. It then loads the top row
with the initial cells and clears the other rows. The main controller then
gives four CA steps. On each step every lower cell takes the rule's answer
for its three upper neighbours. After step k, rows 0..k are final, so four
steps grow the 5-row network level by level. The top row never changes.

The original cell drawing gives the CA module and the neuron separate
clocks, "CA CLK" and "CN CLK". Here both are clock enables (`ca_step` and
`cn_step`) of the one system clock, so the design has a single clock domain.

**Inputs and output.** Five input nodes carry y(t), y(t-5), y(t-10), y(t-15)
and y(t-20). Input k drives top-row columns 2k and 2k+1 (in general column
c gets input `c*5/10`). The output node counts the pulses of the 10
bottom-row neurons.

## The pulse neuron

Each neuron (`neuron_module`) is a discrete chaotic neuron of the
Nagumo-Sato type. Its membrane value is split into three decaying terms:

```
a(t+1) = ke*a(t) + v * up(t)                   A register, external input
b(t+1) = kf*b(t) + w * (left(t) + right(t))    B register, same-layer input
c(t+1) = kr*c(t) - alpha*y(t) - theta*(1-kr)   C register, refractoriness
y(t+1) = 1 if a(t+1) + b(t+1) + c(t+1) > 0      State register
```

Each factor is `k = 1 - 2^-S`, so damping costs one arithmetic shift and one
subtraction. The values are signed Q8.8 in 16 bits. Defaults: S = 2 for all
three (k = 0.75), v = 1.0, w = 0.5, alpha = 1.0, theta = 0.5. With these,
every term stays well inside the range, so there is no saturation logic. The
weights are fixed. Evolution changes only *which* inputs are connected, not
their strength. The source gives no weight values or learning rule.

All signals between neurons are single-bit pulses, and a value is carried by
pulse density. `pulse_encoder` turns a Q0.16 sample into such a stream with
a first-order sigma-delta: the carry out of a 16-bit accumulator is the
pulse.

## Evaluating one individual

`main_controller` runs the following sequence for each individual:

1. rule loading: 68 cycles;
2. four CA steps;
3. clearing the neurons, encoders and error sum;
4. for each t = 20..498 (the training half of a 1000-point series):
   * read y(t), y(t-5), ..., y(t-20) and the target y(t+1): 7 cycles;
   * run WIN = 32 neuron steps with the encoded inputs, counting output
     pulses `n`;
   * predict `y_hat = min(n * round(65536 / (10*WIN)), 65535)` and add
     `floor((y(t+1) - y_hat)^2 / 2^16)` to the error sum;
5. `fitness_eval` computes `E = sum / 479` and `fit = 10^(-10 E)`. It
   evaluates 10^x as `2^(-33.22 E)`: the integer part is a shift, and the
   fraction comes from a 17-point table of `2^(-i/16)` with linear
   interpolation. The test bench accepts an error of up to 0.5 % of full
   scale plus 0.3 % of the value, and the hardware stays within that;
6. writes the fitness (Q0.16) to the fitness memory.

Neuron state carries over from one sample to the next and is cleared only
between individuals. One individual costs about 19,300 clock cycles. A
default run takes about 4.2 million: 20 individuals, 11 evaluations, and 10
GA generations of about 1,700 cycles each.

Sample values are unsigned Q0.16. The series must be scaled into [0, 1)
before loading. The test benches divide the Mackey-Glass values by 1.5.

## The GA processor

`ga_processor` holds three units:

* `ga_controller`, which runs a generation;
* the reproduction module: `reproductor` plus the `re_pool` instruction FIFO;
* `operating_module`, which does crossover and mutation.

The two population memories and the fitness memory are outside it.

**Instructions.** The reproduction module does not move individuals. It
writes *instructions*, and the controller executes them:

| field | width | meaning |
|-------|-------|---------|
| `op.xover` | 2 | 0 none, 1 one-point, 2 two-point crossover |
| `op.mut_en` | 1 | 0 forces the mutation mask to zero |
| `op.steady` | 1 | 0 generation model, 1 steady-state model |
| `p1`, `p2` | 5 each | parent addresses |
| `d1`, `d2` | 5 each | where the two offspring are written |

In the generation model, offspring go to the *other* population memory, and
the memories swap roles (`cur`) at the end of the generation. In the
steady-state model, offspring overwrite individuals in the current memory.
A generation is: fill the pool with POP/2 instructions, then execute them
all.

**Selection.** The original design runs a user program on an embedded 8051
core in the reproduction module. That core is not included. `reproductor`
instead hard-wires binary tournament selection, with ties going to the first
candidate. For each instruction it draws two random IDs, reads both fitness
values and keeps the fitter one, and does this twice. In the generation
model pair k is written to 2k and 2k+1. In the steady-state model the pair
replaces the two tournament losers. The op-code comes from the top-level
`op` input.

**Operating module.** Parents are latched into Buffer11 and Buffer12.
Crossover happens only when a 16-bit random fraction is below `pc`. Each
point is `1 + (r*(L-1) >> 16)`, so it lies in 1..L-1. A one-point crossover
swaps bits `[p, L)`; a two-point crossover swaps the bits between the two
points. The result goes to Buffer21 and Buffer22. While the crossover runs,
two mask generators (one per offspring) each draw one random number per bit.
A mask bit is 1 when the number is below `pm`. The converters then invert
the masked bits. A pair takes L+2 = 150 cycles. The random sources are
xorshift32 generators with fixed seeds, so runs are repeatable.

## Top-level interface (`ecans_ehw_top`)

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `pop_we/pop_addr/pop_wdata` | in | write initial individuals into population memory 0 (idle only) |
| `samp_we/samp_addr/samp_wdata` | in | write the series, 1024 x Q0.16 (idle only) |
| `op`, `pc`, `pm` | in | GA op-code and crossover / mutation probabilities (Q0.16) |
| `start` | in | run NGEN generations (NGEN+1 evaluations) |
| `done`, `busy`, `gen` | out | completion pulse, activity, generations completed |
| `best_fit`, `best_id`, `cur` | out | best fitness of the last evaluation, its index, and which population memory holds it |
| `mse` | out | E of the most recently evaluated individual |

Parameters: `POP_N` = 20, `NGEN` = 10, `WIN` = 32, `T_FIRST` = 20 and
`T_LAST` = 498. The grid size, state width and chromosome layout are set in
`ecans_pkg`. `POP_N` may not exceed 32, because IDs are 5 bits.

A run loads both memories, sets `op` (for example two-point crossover with
mutation, generation model), `pc` ≈ 0.6 and `pm` ≈ 0.02, pulses `start`, and
waits for `done`.

## Departures from the original description, and how far to trust it

Following the original design:

* the block structure (GA processor with controller, operating module,
  reproduction module and Re-Pool; rule generator; cells made of a CA
  module, a connection module and a neuron module);
* the instruction fields and the two GA models;
* the pc/pm rules and crossover point range;
* the neuron equations with A/B/C/State registers;
* the 5 x 10 network with 5 delay-embedded inputs (delay 5) and one output;
* the fitness `10^(-10E)`.

This design's own choices:

* the chromosome coding;
* the meaning of the state bits;
* all widths and number formats;
* the neuron constants;
* the pulse encoding and the 32-step window;
* tournament selection in place of a programmable 8051;
* population size, generation count and all timing.

The fitness the original study reports for its best network (0.9677 at an
MSE of 0.0052) does not satisfy its own formula (10^-0.052 = 0.887). The
formula is what is implemented.

The original study also mentions an exclusive-OR problem but gives no
setup for it, so no input mapping for it is provided.

Not built: the 8051 core, and any host software.

The test half of the series is scored by a second top with `NGEN = 0`,
which evaluates only, and `T_FIRST`/`T_LAST` = 500/998. The evolved
population is loaded into it through its host port.

Verification status:

* Every module has a self-checking test bench that compares against values
  computed independently in the test bench.
* The network test checks every cell state and every neuron pulse against a
  reference model.
* The end-to-end test recomputes every fitness the hardware writes through
  a complete model (decoding, development, encoders, neurons, error, 10^x).
  It reads the chromosome from the population memory that the current
  generation should be in. Individual 0 agrees to within 0.1 %.
* The full-size run (all defaults, 4.2 M cycles) completes in about
  20 seconds of simulation.
* In the prediction test, the best network after 10 generations has
  fitness 0.53 (E = 0.028) on the training half and 0.50 (E = 0.030) on
  the test half. This is far from the values the original study reports.
  With fixed weights, 20 individuals and 10 generations, this design
  makes no claim to match them.
* The design has not been synthesised for an FPGA or timed.

## Simulating

Every test bench prints `TB_RESULT checks=N failures=M` and stops itself
with a watchdog. To build and run one with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl \
    rtl/ecans_pkg.sv tb/tb_ecans_full.sv --top-module tb_ecans_full
./obj_dir/Vtb_ecans_full
```

| test bench | what it covers |
|------------|----------------|
| `tb_ecans_full` | the top at default parameters: one complete 10-generation run on a generated Mackey-Glass series |
| `tb_ecans_predict` | the prediction experiment: evolve on the first half at default parameters, then score the final population on the second half with an evaluate-only top; every test fitness is checked against the model |
| `tb_ecans_ehw_top` | the top at reduced size, fitness checked against a full reference model, generation then steady-state run, every mechanism counted |
| `tb_ga_processor`, `tb_ga_controller`, `tb_reproductor`, `tb_operating_module` | GA processor and its parts |
| `tb_ca_neural_network`, `tb_ecans_cell`, `tb_ca_module`, `tb_neuron_module`, `tb_connection_module`, `tb_lut_block` | network and its parts |
| the rest | one test bench per remaining module |

## Files

`rtl/ecans_pkg.sv` holds the sizes, the op-code and the instruction types.
Every other file in `rtl/` is one module, named after the file. Each opens
with a comment on its function, interface and timing.
