# CAM-Brain Machine in SystemVerilog

The CAM-Brain Machine (CBM) evolves small spiking neural networks in hardware
and then runs tens of thousands of them together as one "artificial brain".
It is built around a 3D cellular automaton (CA). Each cell is a tiny state
machine that can be empty or be part of a neuron, an axon or a dendrite.

A module's chromosome tells the cells how to grow axon and dendrite trees
from seed neurons. The grown network is then driven with spiketrains, and its
output spiketrains are scored against target trains. A genetic algorithm
breeds better chromosomes from the best scorers.

In run mode, one physical CA cube is time-shared by up to 32,768 evolved
modules. Each module gets 96 clocks in turn. Its output spiketrains are stored
and fed to the modules that listen to it on their next turn.

This repository holds synthesizable RTL for the whole machine's logic:
- the cell and the 24x24x24 cube;
- the configuration memory controller with double-buffered cell registers;
- the genetic crossover/mutation unit;
- the spike-to-analog convolver and the fitness evaluator;
- the analog-to-spike converter;
- the module-interconnection memories;
- the run-mode external interface;
- the sequencer.

It also has a self-checking testbench for every block, and end-to-end
testbenches at a reduced size and at full size.

## Contents

| File | Role |
|---|---|
| `rtl/cbm_pkg.sv` | shared types: cell types, cell configuration word, face numbering, CA phases, cross-reference entry |
| `rtl/codi_cell.sv` | one CA cell (CoDi-1Bit rules, growth and signalling, dual configuration register) |
| `rtl/ca_module.sv` | 24x24x24 toroidal cube of cells, 180 inputs, 4 output points, row-wide configuration port |
| `rtl/config_loader.sv` | genotype/phenotype memory controller: LOAD, SAVE, BREED of 96-row configurations |
| `rtl/ga_unit.sv` | per-cell uniform crossover and bit mutation, one 144-cell row per clock |
| `rtl/siic_convolver.sv` | convolution of a spiketrain with a programmable 20-tap filter |
| `rtl/fitness_evaluator.sv` | sum of absolute differences between convolved outputs and convolved targets |
| `rtl/spiketrain_buffer.sv` | input and target vector stores for evaluation |
| `rtl/hsa_spiker.sv` | analog samples to spiketrain (inverse of the convolver) |
| `rtl/xref_memory.sv` | per-module list of 180 signal sources |
| `rtl/signal_memory.sv` | three 96-bit output trains for each of 32,768 modules |
| `rtl/input_loader.sv` | gathers the next module's 180 input trains |
| `rtl/signal_input_buffer.sv` | double-buffered 180 x 96-bit input store for the running module |
| `rtl/ext_interface.sv` | captures output trains, presents them to devices, writes them to Signal Memory |
| `rtl/cbm_controller.sv` | sequencer for evolution, breeding and run modes |
| `rtl/cbm_top.sv` | the whole machine |
| `tb/tb_<block>.sv` | one self-checking testbench per block |
| `tb/tb_cbm_top.sv` | end-to-end test at reduced size (4x4x3 cube) |
| `tb/tb_cbm_top_full.sv` | end-to-end test with every parameter at its default |
| `tb/row_memory_model.sv` | behavioural model of the external configuration DRAM |

## The CoDi cell

Every cell has six faces with the numbering +x, -x, +y, -y, +z, -z (0..5);
the opposite of face `f` is `f ^ 1`. There is one 1-bit link in each direction
across each face. A cell's configuration is 11 bits (`cell_cfg_t`):

- `ctype` (2 bits): blank, neuron, axon or dendrite;
- `dir` (3 bits): the cell's special face. For a neuron, it is the axon
  output. For an axon, it is the input. For a dendrite, it is the output
  (towards the neuron);
- `chrom` (6 bits): the cell's part of the chromosome, one bit per face.

### Signalling phase

All outputs are registered, so a signal moves one cell per clock.

- **Dendrite.** The output on face `dir` is the XOR of the five other inputs.
  Colliding spikes therefore cancel.
- **Axon.** The input arriving on face `dir` is copied to the five other faces.
- **Neuron.** A 4-bit accumulator adds each input whose chromosome bit is 1
  (excitatory) and subtracts each input whose bit is 0 (inhibitory). It
  saturates at 0 and 15. When the sum exceeds `THRESH`, the neuron emits one
  spike on its axon face and the accumulator clears.
- **Blank.** The cell is silent.

### Growth phase

Growth clocks alternate between two sub-steps: "grow dendrite"
(`axon_tick = 0`) and "grow axon" (`axon_tick = 1`).

- A neuron sends a growth signal on its five dendrite faces during dendrite
  sub-steps, and on its axon face during axon sub-steps.
- A blank cell that receives a growth signal becomes a dendrite or an axon,
  depending on the sub-step. Its `dir` is the face the signal came from; the
  lowest face number wins if several arrive at once.
- A dendrite or axon that received a growth signal on its `dir` face passes
  it on at the next sub-step of the same kind (two clocks later). It sends it
  on every face whose chromosome bit is 1, never on `dir`. Chromosome
  `000000` therefore blocks growth. A single bit grows a straight or turning
  branch, and several bits split it.

The "same kind two clocks later" rule keeps dendrite growth and axon growth
apart on 1-bit links: a growth bit never says which kind it is, the sub-step
does. The mask is absolute (one bit per face) rather than relative to the
direction of travel. This is simple and lets every cell read its own 6 bits
without knowing its orientation.

### Dual configuration register

Each cell has an active register and a shadow register. The memory
controller writes the shadow register while the cube runs. `swap` exchanges
the two in one clock and clears the signal state. It is an exchange, not a
copy, so after growth the grown phenotype can be swapped back into the shadow
register and read out while the next individual starts. `sig_clear` clears
only the signal state. It is used between the tests of a multi-test
evaluation.

## The CA cube

`ca_module` instantiates X·Y·Z cells (24·24·24 = 13,824) and joins them as a
torus: each face wraps to the opposite face. All cells update on every clock.

**Inputs.** There are 180 inputs from other modules, 60 per surface pair
(x, y, z). Input `j` of a pair sits at linear surface position
`floor(j·576/60)`. Its bit is ORed onto the wrap-around link entering the
cube at that position, on both opposite surfaces. Inputs act only in the
signalling phase.

**Outputs.** There are four output points:
- the cell at the centre of the x surface;
- the cell at the centre of the y surface;
- the cell at the centre of the z surface;
- corner cell (0,0,0).

**Configuration port.** Cells are numbered `x + X·(y + Y·z)` and grouped in
rows of `LANES = 144` cells, which makes 96 rows. One row is written per
clock, so a module loads in 96 clocks. The row width is 72 FPGA boards × 2
cells per clock; 96 rows match the 96-clock spiketrain length. `rd_row`/`rd_data`
read a row of shadow registers, combinationally.

## Memory controller and genetic unit

Configurations are stored in an external memory as 96 consecutive row words of
144 × 11 bits. The memory port (`mem_*`) has a one-clock read latency.
`config_loader` has three operations:

| op | action | clocks |
|---|---|---|
| LOAD | memory rows → CA shadow rows (pipelined) | ROWS + 2 = 98 |
| SAVE | CA shadow rows → memory rows | ROWS + 1 = 97 |
| BREED | for each row: read parent A, read parent B, pass both through `ga_unit`, write the offspring | 4·ROWS + 1 = 385 |

`ga_unit` handles one row per clock. For each cell it does the following:
1. It draws random bits from a per-lane xorshift64 generator. Each lane starts
   from a different multiple of 0x9E3779B97F4A7C15, and the host can reseed
   all lanes.
2. It takes the type and `dir` fields whole from one parent.
3. It picks each chromosome bit from either parent, using a random crossover
   mask.
4. It flips each chromosome bit with probability `mut_rate/256`.

Selection (which parents to breed) is left to the host. The design reaches the
host through `parent_a`, `parent_b` and `geno_addr`.

## Spike coding: convolver, fitness and Hough spiker

Signals between modules are 1-bit spiketrains. The value they carry is
recovered by convolving the train with a fixed filter `h`:
`y(t) = Σ h[k]·s(t−k)`.

`siic_convolver` keeps the last `TAPS = 20` spikes in a shift register. It
adds the taps whose spike is set, and outputs the sum one clock after the
spike. The taps are signed 8-bit values written by the host (`coef_*` ports
of the top); no filter is built in. With taps {1, 4, 9, 5, −2}, the train
1101001 gives 1, 5, 13, 15, 7, 7, 6, 2, 9, 5, −2. The testbench checks this
example.

`fitness_evaluator` runs two convolvers for each of the three scored
channels. One convolves the module output and the other the target train, and
the evaluator adds `|y_out − y_target|` every clock. A new run (`start`) or a
test boundary (`test_clear`) empties the convolver histories, so multi-test
partial fitnesses add up in one accumulator. The result is ready two clocks
after the last vector. Lower is better.

`hsa_spiker` goes the other way, from samples to a spiketrain:
1. It keeps a window of the next 20 samples.
2. At each step it emits a spike if every tap is ≤ the matching residual
   sample, and if so subtracts the filter from the window.
3. The first 19 samples only fill the window.

With the filter above, the residual of 1, 5, 13, … gives back 1101001.

## Evaluation sequence (evolution mode)

The host fills the evaluation buffers before each evaluation:
- the input buffer: 1024 vectors × 180 bits;
- the target buffer: 1024 vectors × (3 target bits + 1 "new test" flag).

Then `CMD_EVOLVE` runs:

1. **Load.** LOAD the genotype at `geno_addr` into the shadow registers
   (98 clocks).
2. **Swap.** The genotype becomes active (1 clock).
3. **Grow.** `grow_cycles` clocks of growth, alternating sub-steps.
4. **Signal.** `sig_len` clocks. At step `t`:
   - input vector `t` drives the 180 inputs;
   - output points 0–2 and target vector `t` go to the fitness evaluator.

   A step whose target has the "new test" flag clears the cell signal state
   and the convolver histories, which starts a new test.
5. **Fitness.** The fitness appears on `fitness` with `fitness_valid`.
6. **Swap back and Save.** The grown phenotype is written to `pheno_addr`
   (97 clocks).

`CMD_BREED` runs one BREED of the loader. A generation is thus a series of
EVOLVE commands, host-side selection, then BREED commands.

## Run mode: time-sharing the cube

`CMD_RUN` runs `n_mods` modules for `n_passes` passes. The phenotype of
module `m` is at `pheno_addr + m·96`. Each module's turn (a slot) is:

| slot clock | what happens |
|---|---|
| 0 | swap: the module loaded during the last slot becomes active; the signal input buffer swaps banks; the loads for the next module start |
| 1 … 96 | the module runs; clock `t` applies bit `t` of its 180 input trains, and the 4 output points are captured as bit `t` of its output trains |
| 97 … | wait for the next module's configuration load (98 clocks) and input gathering (93 clocks) to finish |
| end | emit: the output trains go out on `ext_valid/ext_mod/ext_trains`, and trains 0–2 are written to the Signal Memory over the next 3 clocks |

At the default sizes a slot is 100 clocks, because the configuration load takes
98 clocks and begins at the swap clock.

The input gathering for the next module (`input_loader`) walks that module's
cross-reference list, two entries per clock. It reads each source train from
the Signal Memory (two read ports) or from the external input port, and writes
it into the back bank of `signal_input_buffer`. An entry can be invalid (the
input gets all zeros) or external (`ext` bit set). In an external entry,
`src_mod` selects the device channel on `ext_in_idx/ext_in_train`.

The Signal Memory holds the latest trains, updated in place. It has no reset
(it is a large RAM), so a host should clear it before the first pass; the
testbenches start it at zero. A module sees
the output of a source from the current pass if the source ran earlier in the
pass, otherwise from the previous pass.

## Top level

`cbm_top` connects all blocks:
- a host command port (`cmd_valid`, `cmd`, addresses, lengths);
- host write ports for the filter taps, the evaluation buffers, the
  cross-reference memory and the GA seed/mutation rate;
- the configuration memory port (`mem_*`);
- the external spiketrain ports;
- a stream port for the Hough spiker.

The cube's input comes from the evaluation input buffer in evolution mode and
from the signal input buffer in run mode. The top is a single-clock design with
an active-low asynchronous reset.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| X, Y, Z | 24 | cube size |
| LANES | 144 | cells per configuration row (gives ROWS = 96) |
| NIN | 180 | module inputs (60 per surface pair) |
| NOUT | 4 | output points |
| NSIG | 3 | output trains stored and scored per module |
| TRAIN | 96 | spiketrain length between modules (clocks per slot) |
| NMOD | 32768 | modules in a brain |
| TAPS, CW | 20, 8 | filter taps and tap width |
| DEPTH | 1024 | evaluation buffer depth (signalling steps per evaluation) |
| THRESH | 2 | neuron firing threshold (fires when the sum exceeds it) |
| AW | 32 | configuration memory row address width |
| HSW | 16 | Hough spiker sample width |

## Departures from the original machine and open points

- **Slot length.** The original machine keeps a 96-clock rhythm. Here a
  run-mode slot is 100 clocks: one swap clock, 96 run clocks, and the rest of
  the 98-clock configuration load. The throughput is therefore 96 % of the
  original figure.
- **Evolution mode is not overlapped.** Load, grow, signal and save run one
  after another. The original machine hides loading behind the previous
  evaluation using the dual register. An evaluation here costs about 294
  clocks plus the growth and signalling time.
- **Cross-reference memory size.** The full list of 180 entries for every one
  of 32,768 modules is stored, about 12.5 Mbytes. The original machine quotes
  3 Mbytes, which cannot hold full lists, so its encoding must be more compact
  or its lists shorter.
- **Three or four outputs.** There are four output points. Only three trains
  per module are stored in the Signal Memory and scored for fitness; the
  fourth goes only to the external port.
- **Threshold, growth-mask encoding, input/output positions.** These are
  this design's own choices, described above. The neuron threshold is a
  parameter.
- **Neuron placement.** The original genotype adds 7 bits per 2x2x3 block for
  neuron position and orientation (91,008 bits per chromosome in all). Here a
  neuron is simply a cell whose stored configuration says "neuron": the 11-bit
  configuration word covers type, direction and mask for every cell. The host
  places the neurons when it writes the initial genotypes, and crossover keeps
  them per cell.
- **Filter taps** are programmable. No specific filter shape is built in.
- **Hough spiker placement.** It is provided as a separate stream converter on
  the top, for turning sensor signals into spiketrains. The original machine
  does not say where in the hardware this conversion takes place.
- **Physical implementation.** The original machine spreads the cube over 72
  XC6264 FPGAs (4x6x8 cells each) on a backplane, with 16 Mbytes of EDO DRAM
  and a CPLD per board. It also has a PCI host, a temperature shut-off and a
  selectable 8.25 / 9.42 / 11 MHz clock. None of this is modelled. The logic
  here is one flat single-clock design, and the DRAM and host are reached
  through plain ports.

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` at the end and has a
watchdog. Plain Verilator 5 is enough:

```
verilator --binary --timing --assert -y rtl -y tb rtl/cbm_pkg.sv tb/tb_codi_cell.sv --top tb_codi_cell
./obj_dir/Vtb_codi_cell
```

Replace the testbench name for another block. Points worth knowing:

- `tb_ca_module` runs a 4x4x3 cube against a cycle-accurate reference model
  of the cell rules, written separately in the testbench.
- `tb_cbm_top` runs the whole machine at a reduced size (4x4x3 cube,
  16-cell rows, 12 inputs, 8 modules, short trains). It exercises growth,
  signalling, multi-test clearing, swaps, breeding, run-mode slots, external
  inputs, routed Signal Memory inputs, output records and the Hough spiker,
  and counts each one.
- `tb_cbm_top_full` uses every default parameter (24x24x24 cube, 180 inputs,
  32,768-module memories). It runs one evolution (load, 40 growth clocks,
  200 signalling clocks with a test boundary, save) and checks the fitness
  against a software model of the convolver. It also checks that the
  phenotype grew, and then runs a two-module brain for one pass, checking the
  save time and the slot length (100 clocks). Verilator turns the 13,824-cell
  cube into a very large C++ model: building it takes about 20 minutes on one
  core, while the simulation itself takes well under a minute.

The full-size top has more than 150,000 cell configuration bits plus large
memories written as arrays. Synthesis tools take a long time on it; the
reduced parameter sets are the practical way to experiment.
