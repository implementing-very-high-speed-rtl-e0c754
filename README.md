# Hierarchical MLP classifier board: a tree of neural networks in hardware

This is RTL for a neural co-processor board that classifies feature vectors
(for example, measurements of surface defects on a steel strip) in real time.
It uses a **Tree of Multi-Layer Perceptrons (TMLP)**, not one large MLP. A
*root* MLP first sorts a pattern into a superclass, such as a defect family:
scratches, seams, stains and so on. The root's winning class then selects
exactly one *leaf* MLP. The leaf classifies the same input into a detailed
class within that family. Each MLP in the tree is small, trained on its own
subset of the data, and quick to evaluate.

The board carries two MLP co-processor chips, their weight RAMs and a glue
chip, and it plugs into a host over the Industry Pack (IP) bus. Chip 0 runs
the root and chip 1 runs the leaf. The two chips form a pipeline: while the
leaf classifies pattern *p*, the root is already working on pattern *p+1*.

The architecture follows a published design: a 128 MCPS
MLP ASIC and an IP-bus mezzanine board. That description fixes the sizes,
the rates and the overall structure, but not the internals. Every internal
detail here (number formats, activation function, computational schemes,
buffering, register map) is this design's own, and is listed under
[Departures and own choices](#departures-and-own-choices).

## The tree and how it is run

```
 input pattern (up to 64 features, 8 bit)
        |
        +------------------+
        v                  |
  chip 0: ROOT MLP         |  same input, same bank
  winning class k          |
        |                  v
  leaf_map[k] --valid--> chip 1: LEAF MLP leaf_map[k].net --> detailed class
        |
        +--not valid--> result = root class only
```

* Limits per chip: any MLP of up to **64 inputs, 128 hidden neurons and
  64 outputs** (one hidden layer), and up to **64 topologies** (one root plus
  63 leaves). The topologies are held in each chip's topology RAM.
* The root is always topology slot 0. The leaf map is a 64-entry table in
  the glue chip: root class → {valid, leaf topology}. An entry without the
  valid bit makes the root class final. An entry can also be marked coupled
  (see [Coupled MLPs](#coupled-mlps-the-sum-unit)).
* Both chips hold the input pattern. The host writes the features once, and
  the glue chip writes them into both chips' input RAMs.
* Results leave in pattern order through a 4-entry FIFO: root class, leaf
  class, and whether a leaf ran. A pattern whose root class has no leaf waits
  until chip 1 holds no earlier pattern, so the order is kept.
* Flow control: each chip has two input banks, so at most two patterns are in
  flight. The board takes a new pattern (GO) only when the next bank is free
  and the FIFO has room for every pattern in flight. No result is ever
  dropped. A host that is too early is held with a stretched bus cycle.

## Inside an MLP chip

The chip computes `o = f(W2 · f(W1 · x + b1) + b2)` and then ranks the
outputs.

```
 host ──► topology RAM (64 entries)
 host ──► input RAM (2 banks x 64) ──► FIRST LAYER ──► hidden RAM (2 banks x 128) ──► SECOND LAYER ──► class sorter ──► ranked list
                                     2 mult, f()                                   2 mult, f(),
          weight RAM 1 (external) ─────┘                   weight RAM 2 (external) ──┘ accumulator RAM
```

Each layer has **two multipliers** and its own external weight RAM port. A
RAM word is 16 bits and holds two 8-bit weights. The chip therefore does
4 connections per clock, which is 128 MCPS at 32 MHz. The two layers work
**on two different patterns at the same time**. The first layer fills one
bank of the hidden RAM while the second layer reads the other. This is the
chip-level pipeline, and the hardest part to get right, so here is how each
layer works.

### FIRST LAYER: neuron by neuron

For hidden neuron *j*, the layer reads `ceil((n_in+1)/2)` weight words from
`w1_base + j*ceil((n_in+1)/2) + k`. Word *k* holds the weights of inputs 2k
(low byte) and 2k+1 (high byte). In the same clock it reads the matching
*pair* of features from the input RAM. Input number `n_in` is the bias, with
the constant value 1.0. Lanes past it are multiplied by zero, so whatever the
weight RAM holds there does not matter. The neuron's last product goes
straight into the activation function, and the result is written to the
hidden RAM. The next neuron starts in the following clock.

Latency: `n_hid * ceil((n_in+1)/2) + 2` clocks from start to done.

### SECOND LAYER: hidden value by hidden value

This layer uses a different scheme. It reads **one hidden value h[j] per
clock**. Its two multipliers apply that value to two outputs at once, adding
into an on-chip **accumulator RAM** with one 24-bit entry per output. Row *j*
uses the words `w2_base + j*ceil(n_out/2) + q`. Word *q* holds the weights of
outputs 2q (low byte) and 2q+1 (high byte). Row `n_hid` is the bias row,
with h = 1.0. Row 0 overwrites the accumulators instead of adding, so they
need no clearing.

Once the last row has been read, the hidden bank is released, so the first
layer may overwrite it. The **readout** then passes the accumulators, one per
clock and in index order, through the activation function into the class
sorter.

Timing: the hidden bank is released `(n_hid+1)*ceil(n_out/2) + 2` clocks
after start, and done comes `n_out` clocks later.

### Hand-over between the layers

The chip controller (`mlp_chip`) keeps a *full* flag for each hidden bank. A
flag is set when the first layer finishes its job, and cleared when the
second layer has read that bank's last row. The finished first-layer job
waits in a one-entry hand-over register until the second layer is free. A
new job is accepted (`ready_o`) when all three hold:

* the first layer is idle;
* the hidden bank it would write is not full;
* the hand-over register is empty.

With both layers equally loaded, the chip completes one pattern per
`max(first layer, second layer)` clocks. For 64-128-64 that is 4228 clocks
for 16 576 connections, biases included: 3.92 connections per clock.

### Number formats and the activation function

| quantity              | format                                      |
|-----------------------|---------------------------------------------|
| input features        | signed 8 bit, Q0.7 (−1 … +0.99)             |
| weights               | signed 8 bit, Q2.5 (−4 … +3.97)             |
| bias input            | +1.0, the value 128 (operands are 9 bits)   |
| neuron sum            | 24 bit, Q.12 (129 full-scale terms fit)     |
| activation output     | 0 … 127 in Q0.7 (0 … 0.99)                  |

The activation `f` is the PLAN piecewise-linear sigmoid, which needs only
shifts and adds. Let z be the sum cut to 1/32 steps, i.e. `acc >>> 7`:
`f = 1` for |z| ≥ 5; `|z|/32 + 0.84375` for 2.375 ≤ |z| < 5;
`|z|/8 + 0.625` for 1 ≤ |z| < 2.375; `|z|/4 + 0.5` below. For z < 0,
`f = 1 − f(|z|)`. The result is truncated to 1/128 and clamped to 127. The
hidden layer and the output layer use the same function.

### The ranked list

The chip's result is the list of classes ranked by output value: highest
first, then second highest, and so on. An insertion sorter of 64 entries
inserts one output per clock, during the readout, so the list is complete in
the clock the job ends. Of two equal values, the lower class index comes
first. The sorter is cleared when the next job's readout starts, so the list
can be read during the next job's row phase.

## Coupled MLPs: the sum unit

Besides trees, the original chip is meant to build *coupled* MLPs (CMLP):
several MLPs classify the same input, and their output vectors are added
class by class before ranking. A TCMLP is a tree whose nodes are such
coupled groups. This board has two chips, so it couples two MLPs. The
coupling reuses the tree sequence: the root (chip 0) and the leaf (chip 1)
are the two members. A leaf-map entry marked **coupled** makes the result
of that root class the winner of `root outputs + leaf outputs`, not the
leaf's own winner.

* Mark every entry coupled, all pointing at one leaf network: the board is
  a two-member CMLP.
* Mark only some entries: the second level of the tree is coupled for those
  root classes (a small TCMLP).

Both members must have the same number of outputs. The sum unit
(`cmlp_combiner`) taps each chip's output stream, the activations as they
enter the chip's sorter:

* Chip 0's values are stored by class, in one of two banks picked by the
  input bank of the pattern. The pipelined root of the next pattern can
  therefore not overwrite them.
* While chip 1 reads out the leaf of the same pattern, each output is added
  to the stored root value of its class. The sum (9 bits, 0 … 254) goes
  into a third insertion sorter, in class order.

The summed list is therefore complete in the same clock as chip 1's own
list, and costs no time. Ties rank the lower class first, as in the chips.
The list stays readable (target 9) until chip 1's next readout begins.

## The board and its host interface

`mlp_mezzanine` is the top level. It holds `glue_chip` (which contains
`tmlp_sequencer`), the sum unit `cmlp_combiner` and two `mlp_chip`
instances. The sum unit is glue logic too. The four weight RAMs (chip 0
layer 1/2, chip 1 layer 1/2) are external parts: their ports are brought
out, and the RAM must return the word one clock after the address.

**IP bus cycle (I/O space).** The host drives `ip_iosel_n` low with
`ip_rw_n`, `ip_a` and, for a write, `ip_d_i`. The board answers with
`ip_ack_n` low for one clock; read data is valid in that clock. The board
delays the acknowledge while an access must wait. Both interrupt lines of
the module are used. `ip_intreq0_n` is low while results are waiting, and
`ip_intreq1_n` is low while the board can take a new pattern. Each is
gated by its own enable bit.

| addr | read                                                              | write                                              |
|------|-------------------------------------------------------------------|----------------------------------------------------|
| 0    | status: b0 go-ready, b1 host bank, b2 idle, b5:3 results waiting, b6/b7 chip ready | b0 GO (waits until accepted), b1 enable interrupt 0, b2 enable interrupt 1 |
| 1    | indirect address [15:0]                                           | same (byte strobes honoured)                       |
| 2    | b3:0 indirect address [19:16], b11:8 target                       | same                                               |
| 3    | indirect data, address +1 after each access                       | indirect data, address +1                          |
| 4    | pop result: b15 valid, b13 coupled, b12 leaf ran, b11:6 root class, b5:0 leaf class (coupled: winner of the sum) | – |

| target | window onto                                                                  |
|--------|-------------------------------------------------------------------------------|
| 0 … 3  | weight RAM chip0 L1, chip0 L2, chip1 L1, chip1 L2. R/W; waits while a pattern is in flight |
| 4      | topology RAM of both chips, address `{net, field}`. Fields: 0 n_in, 1 n_hid, 2 n_out, 3/4 w1_base low/high, 5/6 w2_base low/high |
| 5      | input feature 0 … 63 (low byte) of the bank being filled, both chips; waits for a free bank |
| 6      | leaf map entry for root class 0 … 63: b7 coupled, b6 valid, b5:0 leaf topology |
| 7, 8   | ranked list of chip 0 / chip 1, by position: b15:8 value, b5:0 class           |
| 9      | ranked list of root + leaf sums, by position: b15:7 sum, b5:0 class            |

Classifying one pattern: write target 5 with the features, then write
register 0 with bit 0 (GO) set, plus the interrupt enables wanted. Then
poll register 4, or wait for interrupt 0. A
streaming host can use interrupt 1 to learn when the next pattern may be
written.
Configuration: write the weights through targets 0 … 3, the topologies
through target 4 (root in slot 0), and the leaf map through target 6.

## Performance

All figures assume the 32 MHz clock of the original board.

* Per chip: 4 connections per clock, 128 MCPS peak. 64-128-64 patterns
  complete every 4228 clocks (132 µs) with both layers busy.
* Board, steel-defect tree (23-20-4 root, four 23-25-9 leaves), one
  pattern at a time: at most 819 clocks (25.6 µs) from the first feature
  write to the result read. The original demonstration system, with its
  VME host software, reached 2611 classifications/s this way.
* Board, steel-defect tree (23-20-4 root, four 23-25-9 leaves), streaming:
  412 clocks per pattern **including all IP bus traffic**. That is about
  12.9 µs, or 77 700 patterns/s. The targets were over 50 000 per second,
  and one classification per 20 µs.
* 8192 classes: the tree's own limits, 63 leaves × 64 outputs, give 4032
  leaf classes. The 8192 quoted for the original board is not reached.

## Departures and own choices

Taken from the original description: the sizes (64/128/64, 1 + 63
networks, 8-bit weights, 20-bit weight address); the two layer units that
run in parallel with different schemes and an activation function each; the
four multipliers and 128 MCPS; off-chip weights addressed by the chip;
topologies downloaded into on-chip RAM; the ranked-list output; two chips,
weight RAMs and a glue chip on an IP-bus board (16-bit data, 6-bit address,
interrupts); and the TMLP root/leaf semantics.

This design's own choices:

* Number formats, the bias as a constant input, and the PLAN activation.
  The originals are not published.
* Both computational schemes, the two-bank input and hidden RAMs, the
  accumulator RAM, and the job hand-over.
* One 16-bit weight port per layer. The 20-bit weight address counts
  16-bit words (two weights each).
* On-chip RAM: the original chip had 7040 bits in two dual-port and ten
  single-port RAMs. This design holds 8576 bits per chip: topology table
  3968 (64 entries of 62 bits), input RAM 1024, hidden RAM 2048 and
  accumulator RAM 1536. Most of the difference is the double buffering and
  the full 64-entry topology table.
* Mapping the tree onto the chips (chip 0 root, chip 1 leaf, pipelined), the
  leaf map with its "no leaf" entries, the result FIFO, and the whole
  register map and bus handshake.
* Coupled MLPs with two members, selected per leaf-map entry, and the sum
  unit that adds the members' outputs. Only the structure (members on one
  input, outputs summed) comes from the original.
* The original quotes a weight throughput of 64 Mbyte/s to the chips. Here
  that is the rate of each weight RAM port: 16 bits every clock at 32 MHz.
  Each chip reads 128 Mbyte/s over its two ports. Downloads from the host
  are slower: an unstretched IP bus cycle takes about 3 clocks per 16-bit
  word, about 21 Mbyte/s.
* Reset: asynchronous, active low, for all control state. RAM contents are
  not reset.

Not built: the host CPU or carrier board (a testbench plays the IP-bus
master); the weight SRAM parts (`tb/weight_sram_model.sv` models them); the
camera and image-treatment system; and the physical chip (pads, package).
Coupled groups of more than two MLPs would need more chips, or several
passes per pattern, and are not built.

## Files

`rtl/` (package first):

| file                   | contents                                                 |
|------------------------|----------------------------------------------------------|
| `mlp_pkg.sv`           | sizes, formats, `topo_t`, job types, word-count helpers   |
| `mlp_mezzanine.sv`     | board top: glue chip, sum unit, two MLP chips             |
| `glue_chip.sv`         | IP bus slave, register map, indirect windows, RAM muxing  |
| `tmlp_sequencer.sv`    | root → leaf sequencing, leaf map, bank and FIFO control   |
| `mlp_chip.sv`          | one MLP co-processor and its layer hand-over              |
| `first_layer.sv`, `second_layer.sv` | the two layer units                          |
| `neuron_activation.sv` | PLAN activation                                           |
| `class_sorter.sv`      | insertion sorter for the ranked list                      |
| `cmlp_combiner.sv`     | sum unit for coupled MLPs (board level)                   |
| `topology_ram.sv`, `input_buffer.sv`, `hidden_buffer.sv` | on-chip RAMs            |

`tb/` holds one self-checking testbench per module (`tb_<module>.sv`), the
reference model `tb_ref_pkg.sv` and the SRAM model `weight_sram_model.sv`.
The reference model computes the MLP in plain integer and real arithmetic.
It shares nothing with the RTL but the number formats. Each testbench prints
`TB_RESULT checks=N failures=M`, and each has a watchdog.

`tb_mlp_mezzanine` is the end-to-end test at the board's full size. It
downloads the steel-defect tree and a 64-128-64 tree over the IP bus, and
then runs the 64-128-64 pair as a coupled MLP. It checks every result, the
leaf's complete ranked list and the complete summed list. It also checks
the streaming rate and the one-by-one time. It also verifies that each mechanism actually occurred:
layer overlap, root/leaf chip overlap, held bus cycles, results with and
without a leaf, coupled results, and both interrupts. It runs in about
fifteen seconds.

To simulate with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/mlp_pkg.sv tb/tb_ref_pkg.sv tb/tb_mlp_mezzanine.sv \
    --top-module tb_mlp_mezzanine -o sim
obj_dir/sim
```

Replace `tb_mlp_mezzanine` with any other testbench to test a single
module. The testbenches check latencies exactly:

* first layer: `n_hid*ceil((n_in+1)/2)+2`;
* second layer: release at `(n_hid+1)*ceil(n_out/2)+2`, done `n_out` later;
* chip: pattern interval ≤ `max(first layer, second layer) + 4` when
  streaming.

A change to the pipeline timing therefore shows up as a failure.
