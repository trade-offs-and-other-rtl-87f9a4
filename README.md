# Parallel FIR filter with multiplexed asynchronous tree multipliers

A finite impulse response filter of order N computes

    y_n = sum_{i=0..N} h_i * x_{n-i}

In a parallel hardware filter, most of the cost sits in the block that multiplies the
samples by the coefficients, and that cost grows quickly with the coefficient and sample
widths. This RTL implements such a filter and lets you pick each of the design choices that
set the cost. The main choices are:

* **How the sample history is stored.** It can be a classic shift register, where every
  sample moves one place per input. It can also be a *rotational memory*, where a sample
  stays in one cell until it is overwritten N+1 samples later.
* **How the stored samples meet their coefficients.** The classic line needs no routing.
  A rotational memory needs either a *rotation switch* or a *coefficient ring* in which the
  coefficients circulate.
* **What kind of multiplier is used.** The choice is a fully parallel, combinational
  *binary-tree* multiplier or a *serial shift-and-add* multiplier that takes one clock cycle
  per sample bit.
* **How many multipliers there are.** `NMULT` multipliers each serve (N+1)/`NMULT`
  coefficient-sample pairs, one pair per step.

The default configuration is a 32-coefficient filter (N = 31) with 32-bit coefficients and
32-bit samples. It uses a rotational memory with a rotation switch and **one** tree
multiplier, switched over the 32 pairs. For a filter whose length is close to the
coefficient width, this single multiplexed parallel multiplier needs fewer transistors than
N+1 serial multipliers running in parallel, at a similar data rate. With longer filters,
raise `NMULT` so that several tree multipliers share the work.

## Top level: `fir_top`

| parameter | default | meaning |
|---|---|---|
| `N` | 31 | filter order (N+1 coefficients) |
| `K` | 32 | coefficient width, two's complement |
| `L` | 32 | sample width, unsigned, power of two (tree multiplier) |
| `NMULT` | 1 | multipliers working at the same time; must divide N+1 |
| `ARCH` | `ARCH_ROT_SWITCH` | `ARCH_CLASSIC`, `ARCH_ROT_SWITCH` or `ARCH_ROT_RING` (package `fir_pkg`) |
| `MULT` | `MULT_TREE` | `MULT_TREE` or `MULT_SERIAL` |

The output width is `AW = K + L + clog2(N+1)` (69 bits at the defaults). This width is
enough that no sum can overflow. The output is full precision and is not rounded.

**Number formats.** Samples are unsigned: shift a signed signal by a DC offset before it
enters the filter. Coefficients are two's complement. Their sign bit drives the `fill`
input of the multipliers, which tells the multiplier to treat A as signed. `y_out` is
two's complement.

**Ports and handshake.** There is one clock (`clk`) and an active-low asynchronous reset
(`rst_n`). The reset clears every memory, so the filter starts from an all-zero history.

* `coef_valid` / `coef_ready` / `coef_in` load one coefficient per transfer. A coefficient
  set is N+1 transfers in the order h_0, h_1, ..., h_N. Each transfer takes 3 cycles.
  A coefficient offered together with a sample wins.
* `in_valid` / `in_ready` / `x_in` accept one sample per transfer. Both ready signals are
  high only when the filter is idle.
* `y_valid` is high for one cycle, and `y_out` is valid in that cycle.

**Timing.** With `MULT_TREE`, a sample accepted on clock edge t gives `y_valid` in the
cycle that starts at edge t + STEPS + 3, where STEPS = (N+1)/`NMULT`:

* 35 cycles at the defaults;
* 4 cycles when fully parallel (`NMULT` = N+1).

The next sample can be accepted one cycle later. With `MULT_SERIAL`, each step takes
L + 2 cycles instead of one.

## How a sample meets its coefficient

This is the least obvious part of the design. The three `ARCH` settings differ only here.
In every case the coefficients are loaded through the coefficient ring (`coef_ring`). After
h_0 … h_N have been shifted in, ring position j holds h_{N-j}.

**Memory cells in pairs (`classic_delay_line`, `coef_ring`).** Each position is a pair of
cells, A and B, and data moves in two phases:

* **ck1:** every B cell is copied into the *next* A cell, and the new word enters the
  first A cell.
* **ck2:** every A cell is copied into its own B cell.

This two-step transfer lets every position move at once without a race. The outputs are
the B cells. The controller issues ck1 and ck2 as one-cycle enables on consecutive cycles.

**`ARCH_CLASSIC`.** The delay line shifts on every sample, so `taps[i]` is x_{n-i}.
Coefficient h_i sits at the fixed ring position N-i. Only a 2-phase clock is needed.

**Rotational memory (`rot_delay_line`).** The memory uses a one-hot (N+1)-phase generator
(`multiphase_gen`, phases ck_0 … ck_N). Sample n is written only into the cell whose phase
is active, and the phase then moves on by one. Nothing is rewritten. This saves the
shifting energy, but which cell holds x_{n-i} now depends on the phase. If cell w holds
the newest sample, cell (w - i) mod (N+1) holds x_{n-i}.

**`ARCH_ROT_SWITCH`.** A matrix of switches (`rotation_switch`) connects cell j to
coefficient line i while phase c is active, for j = (c - i) mod (N+1). Each cell therefore
has N+1 switches, one per phase, and the connection pattern turns by one line per sample.
The phase used is the one of the cell written last, which is the generator's current phase
moved back by one.

**`ARCH_ROT_RING`.** This setting has no switch matrix. Cell j is always multiplied by ring
position j, and the ring turns by one position on each sample, in step with the write
phase. Position j then holds h_{(w-j) mod (N+1)}, which is the coefficient for the sample
in cell j. The alignment depends on the ring and the write phase starting together, so a
coefficient load also returns the write phase to cell 0. Until N+1 new samples have
arrived, the older history is paired with the wrong coefficients. The end-to-end test skips
exactly those outputs.

## The coefficient block: multiplexing and accumulation

The N+1 pairs are split into `NMULT` groups of STEPS pairs. In step s, multiplier p takes
pair p*STEPS + s. The `NMULT` products of a step are added by a combinational summing block
(`sum_tree`). The step sums are then accumulated in an accumulator (`acu`: a multi-bit
adder plus a register), which is cleared when the sample is written.

* `NMULT` = 1 gives a single multiplexed multiplier.
* `NMULT` = N+1 gives the fully parallel filter, which finishes in one step.

## Binary-tree multiplier (`tree_mult`)

This multiplier computes A (K bits, the coefficient) times B (L bits, the sample) with no
clock:

* **Layer 0** forms the L rows A AND b_j.
* **Layer m** (m = 1 … log2 L) adds pairs of results from layer m-1 with one multi-bit
  full adder (`mbfa`, a ripple chain of `fa1` cells). The upper operand is shifted left by
  2^(m-1).
* **Widths.** Layer m has L/2^m adders that are K + 2^m bits wide. The last layer is a
  single K+L-bit adder whose output is the product.

For K = 4 and L = 8 there are four 6-bit adders, then two 8-bit adders, then one 12-bit
adder. For 4-bit A = 15 and 8-bit B = 255 with `fill` = 0, the first layer gives 45 and the
second gives 225. The product is 3825.

`fill` = 1 makes A a two's complement number. Each operand's extension bits are
`fill AND operand-MSB`, which sign-extends signed values and zero-extends unsigned ones. The
product is exact in both cases.

The upper operand of every adder is shifted by exactly the width it gains, so its extension
bits always drop off the top. Only the lower operand is ever extended.

## Serial multiplier (`serial_mult`)

This is the shift-and-add alternative to the tree. It has one (K+L)-bit accumulator,
K+L AND gates and an L-phase one-hot generator:

* **Start.** A start pulse loads A (extended to K+L bits), loads B and clears the
  accumulator.
* **Each phase j.** The common input of the AND gates is bit b_j. The gated, shifted A is
  added into the accumulator, and then A shifts left by one bit.
* **Done.** `done` rises on the L-th edge after the start edge.

The serial multiplier is much smaller than a tree, but it needs L cycles per product.

## Controller (`fir_ctrl`)

The controller is a state machine with these states:

* `IDLE`
* `LD1`, `LD2` (ck1 and ck2 of a coefficient load)
* `S1`, `S2` (ck1 and ck2 of a sample, the memory write, the phase advance and the
  accumulator clear)
* `CALC` (one step per cycle for tree multipliers)
* `MSTART`, `MWAIT` (start, then wait for the serial multipliers)
* `OUT`

The clock phases of the memories are one-cycle enables. An assertion checks that no two
phases are active together.

## Files

| file | content |
|---|---|
| `rtl/fir_pkg.sv` | `fir_arch_e`, `fir_mult_e` |
| `rtl/fir_top.sv` | the filter |
| `rtl/fir_ctrl.sv` | controller / phase sequencer |
| `rtl/multiphase_gen.sv` | one-hot multi-phase generator (N+1 phases; L phases in the serial multiplier) |
| `rtl/classic_delay_line.sv` | two-cell-per-stage shift register |
| `rtl/rot_delay_line.sv` | rotational sample memory |
| `rtl/rotation_switch.sv` | cell-to-coefficient switch matrix |
| `rtl/coef_ring.sv` | circulating coefficient memory, also the load path |
| `rtl/tree_mult.sv` | binary-tree multiplier |
| `rtl/serial_mult.sv` | serial shift-and-add multiplier |
| `rtl/sum_tree.sv` | parallel adder of the products of one step |
| `rtl/acu.sv` | accumulator (multi-bit adder + register) |
| `rtl/mbfa.sv`, `rtl/fa1.sv` | ripple-carry adder and its one-bit full adder |

Every module has a self-checking testbench `tb/<module>_tb.sv`, which prints a
`TB_RESULT checks=… failures=…` line. `tb/fir_top_tb.sv` runs the filter end to end:

* **Instances.** It has the default instance (all parameters at their defaults, 32-bit)
  and four 8-bit variants: classic with 32 tree multipliers, ring with 4 tree multipliers,
  switch with 32 serial multipliers, and classic with 2 serial multipliers.
* **Stimulus.** It uses three coefficient sets, including the extreme case of every
  h = -2^31 with samples 2^32-1, and about 114 samples.
* **Checks.** It compares every output with the sum computed from the sample history and
  checks the 35-cycle latency of the default instance. It also counts each mechanism:
  phase wrap, multiplexing steps, negative coefficients, classic shifts, ring rotations,
  serial products and reloads.

`tb/fir_full_tb.sv` runs the same sequence on the default instance alone.

`tb/fir_sweep_tb.sv` covers these configurations, all with N = 31:

| widths (K = L) | tree multipliers | cycles per output |
|---|---|---|
| 4 | 32 | 5 |
| 8 | 16 | 6 |
| 8 | 8 | 8 |
| 8 | 2 | 20 |
| 16 | 2 | 20 |
| 2 | 1 | 36 |

It also runs 4 serial multipliers at 8 bits (84 cycles per output). For each configuration
it checks the result and the cycle count per output.

## Simulating

With Verilator 5, the simulation command is the same for every testbench:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/fir_pkg.sv tb/fir_top_tb.sv --top-module fir_top_tb
    ./obj_dir/Vfir_top_tb

Replace `fir_top_tb` with any other testbench name. The package file must come first.
Each 32 x 32 tree multiplier adds noticeably to Verilator's C++ compile time because it is
written down to one-bit adders. For quick experiments, use narrower widths.

## Where this design makes its own choices

* **Single clock.** All "clock phases" (the 2-phase ck1/ck2 and the (N+1)-phase and
  L-phase generators) are enables on one system clock.
* **Memory cells.** They are flip-flops, not dynamic cells.
* **Combinational parts.** The tree multiplier and the summing block are combinational
  logic in that clock domain, not self-timed circuits.
* **Widths.** K = L = 32 was chosen to make the filter length equal to the coefficient
  width. The handshake, the coefficient load order, the output width and the reset values
  are also this design's own.
* **First tree layer.** Its adders are one bit wider (K+2) than the minimal K+1 so that
  signed products come out right. Fill is gated with each operand's MSB.
* **Serial multiplier phases.** It steps through the **sample** bits (L phases). This is
  because the signed coefficient is the operand that gets shifted.
* **Mode switching.** The alternative structures are selected by parameters, not at run
  time.
* **Output bits.** Reducing the number of output bits (rounding or shifting right) is not
  implemented, and the output is full precision.
* **Not implemented.** Two things are left out:
  * Long filters with all-equal coefficients, which are built without multipliers.
  * Mixed schemes other than the `NMULT` and `MULT` choices above.
