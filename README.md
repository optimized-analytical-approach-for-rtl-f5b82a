# Folded-tree prefix-sum processor for wireless sensor nodes

A wireless sensor node spends far more energy on its radio than on
computing. So it pays to reduce many samples to a few useful numbers on the
node before transmitting. Many such reductions (running sums, filtering,
searching, the carries of an adder) are **parallel-prefix operations**. Given
samples `x0..x7` and an associative operator (here `+`), the exclusive prefix
set is

    0, x0, x0+x1, x0+x1+x2, ..., x0+...+x6      and the total x0+...+x7

This RTL computes that set for blocks of eight 4-bit samples. It uses
Blelloch's two-phase scan on a binary tree of processing elements (PEs).
The tree is **folded**: the 7 nodes of an 8-leaf tree are mapped onto only 4
physical PEs, which are reused from stage to stage. That halves the PE count
and the interconnect. The price is throughput: one block per log2(8) = 3 cycles
instead of one per cycle. Sensor sample rates (at most around 100 kHz) leave
plenty of room for that trade.

## Blelloch's scan in two phases

Both phases are shown here for the input `3 1 2 0 4 1 1 3`:

* **Trunk phase (leaves to root).** Every tree node receives a left value L
  and a right value R. It stores L locally ("Lsave") and passes L+R up. The
  root receives the total (15).

        leaves   3 1 | 2 0 | 4 1 | 1 3      Lsave (level 0) = 3, 2, 4, 1
        level 1    4 | 2   | 5 | 4          Lsave (level 1) = 4, 5
        level 2      6     |   9            Lsave (level 2) = 6
        root             15

* **Twig phase (root to leaves).** The root receives 0. Every node receives a
  value S from its parent. It sends S to its left child and S + Lsave to its
  right child. The leaves then hold the exclusive prefix sums:
  `0 3 4 6 6 10 11 12`.

## Folding 7 nodes onto 4 PEs

The whole design rests on the schedule below. Each row is one clock edge.
Only the PEs listed are active in it.

| phase | stage | PE1 | PE2 | PE3 | PE4 |
|---|---|---|---|---|---|
| trunk | 1 | (x0,x1) → Lsave0 | (x2,x3) → Lsave0 | (x4,x5) → Lsave0 | (x6,x7) → Lsave0 |
| trunk | 2 | – | – | (PE1, PE2 sums) → Lsave1 | (PE3, PE4 sums) → Lsave1 |
| trunk | 3 | – | – | – | (PE3, PE4 sums) → Lsave2, total |
| twig | 1 | – | – | – | S=0 with Lsave2 |
| twig | 2 | – | – | S = PE4 left, Lsave1 | S = PE4 right, Lsave1 |
| twig | 3 | S = PE3 left, Lsave0 | S = PE3 right, Lsave0 | S = PE4 left, Lsave0 | S = PE4 right, Lsave0 |

Three things follow from the table:

* **Wiring.** PE1 and PE2 only ever talk to PE3, and PE3 and PE4 only to PE4.
  So only PE3 and PE4 need input multiplexers. PE4 takes its own previous
  result as an input, which is the "fold".
* **Local register files.** Each PE keeps the left operand of every tree
  node it played, at an address equal to the stage number minus one: PE1
  and PE2 keep 1 value, PE3 keeps 2, PE4 keeps 3. That is 7 values in all,
  one per tree node. These local stores stand in for a shared data memory.
* **Outputs.** After twig stage 3, PE *k* holds the left/right output pair
  for leaves 2(*k*−1) and 2(*k*−1)+1.

In this implementation the trunk phase and the twig phase are separate
hardware blocks, each with its own four PEs. The trunk block exports its 7
saved operands (`Slave[0..6]`, in the order PE1.L0, PE2.L0, PE3.L0, PE4.L0,
PE3.L1, PE4.L1, PE4.L2). The twig block copies them when it starts. The
trunk block is then free for the next block. So the two phases work on
consecutive blocks at the same time.

## The processing element and its adder

A trunk PE is an adder plus a copy of its left input: `sum = L + R`,
`Lsave = L`. A twig PE is an adder plus a pass-through: `left = S`,
`right = S + Lsave`. Every adder is a **Kogge-Stone parallel-prefix adder**
(`ks_adder`). The adder is itself a prefix computation over the bits, with the
carry look-ahead operator

    (P_hi, G_hi) o (P_lo, G_lo) = (P_hi & P_lo,  G_hi | P_hi & G_lo)

It has three stages:

1. bitwise `p = a | b`, `g = a & b`;
2. log2(W) levels, where level k combines bit i with bit i − 2^k;
3. `sum_i = a_i ^ b_i ^ c_i`.

Trunk sums are 9 bits wide (carry out included). No value in this design can
reach 256, because 8 × 15 = 120. So the carry is always zero, and the
registered results and all outputs are 8 bits.

## Modules

| module | role |
|---|---|
| `fold_pkg` | sizes (`N_IN`=8, `N_PE`=4, `LOG2_N`=3, `DIN_W`=4, `DATA_W`=8), types, stage enum, `pg_combine()` |
| `ks_adder` | Kogge-Stone adder, parameter `W` (default 8) |
| `fold_single_trunk` | two trunk PEs: `OutSumA=A+B, SlaveA=A, OutSumB=C+D, SlaveB=C` (combinational) |
| `single_twig` | one twig PE: `OutA=In, OutB=In+Slave` (combinational) |
| `fold_single_twig` | two `single_twig` PEs side by side |
| `fold_trunk_phase` | trunk schedule: stage counter, PE3/PE4 input muxes, per-PE register files |
| `fold_twig_phase` | twig schedule: Lsave copy, stage counter, PE3/PE4 input muxes, result registers |
| `fold_sensor_node` | top: trunk phase → twig phase |

## Interface and timing of the top (`fold_sensor_node`)

| port | dir | width | meaning |
|---|---|---|---|
| `Clock` | in | 1 | rising-edge clock |
| `Reset` | in | 1 | synchronous, active high |
| `Load` | in | 1 | one-cycle start pulse; accepted when `Busy` is low |
| `DataInA`..`DataInH` | in | 4 each | the 8 samples, A first; only needed in the `Load` cycle |
| `Outa`..`Outh` | out | 8 each | `0, A, A+B, ..., A+...+G` |
| `Total` | out | 8 | `A+...+H` |
| `Busy` | out | 1 | trunk phase busy; a `Load` now is ignored |
| `Done` | out | 1 | one-cycle pulse: `Outa..Outh` are valid |

* Counting the edge that accepts `Load` as edge 1, `Total` is valid after
  edge 3. `Done` is high for one cycle after edge 6.
* A `Load` is accepted again after edge 3, so blocks can be fed every 3
  cycles. In that case `Outa..Outh` are valid only in the `Done` cycle. Fed
  more slowly, they hold until the next block's twig phase starts.
* An assertion in the top checks the hand-over rule: the trunk phase never
  finishes while the twig phase is still busy. This holds because both
  phases take exactly 3 cycles.

## How far it can be trusted, and where it departs from the original

These parts follow the original design:

* the prefix-sum function;
* the 4-PE folded schedule and its per-PE Lsave addresses;
* the Kogge-Stone adder structure;
* the top-level port names and widths (`DataInA..H[3:0]`, `Outa..h[7:0]`,
  `Clock`, `Load`, `Reset`);
* the split into a trunk block and a twig block, joined by seven saved
  operands and a done/enable signal.

The following are this implementation's own choices:

* The `Load`/`Busy`/`Done` handshake, reset polarity, latency and the
  streaming overlap of the two phases. The `Done`, `Busy` and `Total` ports
  were added.
* The original PE-pair blocks also had `Load`/`Enable` and select pins
  `S0`, `S1` whose meaning is not known. Here those pairs are purely
  combinational. Sequencing and operand selection sit in the phase blocks.
* The original twig block seems to contain a separate single PE for the root
  stage. Here the root stage runs on PE4, which keeps the twig phase at
  four PEs.
* The original processor is described as programmable: PEs run small
  programs with register-file reads and writes, and handshake triggers make
  them wait for data. This RTL hard-wires the prefix-sum program. Other
  prefix operators (min/max, logic operators) would need the adders in
  the PEs replaced. No instruction memory is modelled.
* A three-PE trunk test block ("two trunk") of the original is not included,
  because its function is unknown. Neither are the unfolded 7-PE reference
  tree, the data router mentioned as future work, or the sensors and the
  radio.
* FPGA utilisation and timing figures reported for the original (about 125
  slices, 99 flip-flops, 2 ns) were not reproduced. Synthesised here, the
  top has 178 flip-flop bits. Before trimming, the trunk holds 56 bits of
  register files and 32 bits of PE sums. The twig holds a 56-bit copy of the
  saved operands and 64 bits of PE results. The stage counters and done
  flags make up the rest. Synthesis drops bits that are always zero, such
  as the upper half of each level-0 saved operand, which holds a 4-bit
  sample.

Verification status: every module has a self-checking testbench. The adder
is checked exhaustively (8-bit and 5-bit). The PE blocks are checked with
random vectors. The phase blocks are checked with random blocks against a
tree walk done in the testbench, including the 3-edge latency. The top is
checked with a scoreboard over about 750 random blocks, covering:

* streaming with overlapped phases;
* ignored `Load`s;
* all-maximum samples;
* a reset in the middle of a block;
* the worked example above.

For each testbench, a deliberately broken copy of its module was run and
the testbench reported failures.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. With
Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb rtl/fold_pkg.sv \
        tb/tb_fold_sensor_node.sv --top-module tb_fold_sensor_node -o sim
    ./obj_dir/sim

Replace `tb_fold_sensor_node` with `tb_ks_adder`, `tb_single_twig`,
`tb_fold_single_twig`, `tb_fold_single_trunk`, `tb_fold_trunk_phase` or
`tb_fold_twig_phase` for the block tests. Every run takes well under a
second.

To change widths, edit `fold_pkg`. `DIN_W` and `DATA_W` may change, as long as
8 × (2^`DIN_W` − 1) still fits in `DATA_W` bits. The tree size is fixed by
the hand-written schedule. Both phase blocks stop elaboration with an error
if `N_IN`, `N_PE` or `LOG2_N` are changed.
