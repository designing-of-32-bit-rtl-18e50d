# Self-timed carry-lookahead floating-point multiplier

This is an IEEE-754 single-precision (32-bit) multiplier whose arithmetic is carried out by
*self-timed* carry-lookahead adders (CLAs). A self-timed adder does not wait for a worst-case
clock period. Every bit travels on two wires (dual rail), so the adder can tell on its own
when its result has arrived, and it reports that with a `done` signal. The adders are linked
by a request/acknowledge handshake rather than by a common clock edge. One kind of adder, a
tree of two small cells (the C-block and the D-block), does all three additions the multiplier
needs:

* exponent addition and bias removal,
* the 24 × 24-bit significand product, as an array of 23 adders,
* the rounding increment and the final exponent correction.

The design follows a published description of a self-timed CLA-based floating-point
multiplier. The adder cells and their equations come from that description, as do the
dual-rail/one-hot coding, the split into an exponent calculator and a significand multiplier,
the port names `start`, `a`, `b`, `c`, and the handshake names. The description says little
about the rest: how many pipeline stages there are, how the significand multiplier and the
rounding are built, and what happens with exceptional operands. Those parts are this design's
own choices, listed in "Departures and choices" below.

## What it computes

`c = a × b` for IEEE-754 binary32 operands, rounded to nearest, ties to even. The six example
products that come with the source design are all reproduced bit for bit, for instance:

| a          | b          | c          | note                                  |
|------------|------------|------------|---------------------------------------|
| `c1900000` | `41180000` | `c32b0000` | −18 × 9.5 = −171                      |
| `c2431829` | `c1169271` | `43e57f84` | truncation would give `43e57f83`      |
| `a3450000` | `111c2000` | `00000000` | underflow, returned as **+0**         |

Exceptional cases, which are this design's own choice:

* A zero or subnormal operand counts as zero. Any zero result, including underflow, is `+0`.
  The source's underflow example shows +0 for a negative product, and the design follows it.
* An exponent of 255 or more after rounding gives ±infinity. An infinite operand gives
  ±infinity.
* A NaN operand, or infinity × 0, gives the quiet NaN `7fc00000`.

## Dual rail, spacers and completion

This part is the least familiar to most readers, and the rest depends on it.

A dual-rail bit (`stcla_pkg::dr_t`) has two wires `t` and `f`:

| (t,f) | meaning                                  |
|-------|------------------------------------------|
| (1,0) | logical 1                                |
| (0,1) | logical 0                                |
| (0,0) | *spacer*: no value yet                   |
| (1,1) | never occurs                             |

Inside the adder tree, each bit or group of bits carries a one-hot *kill / propagate /
generate* code (`kpg_t`), whose all-zero value is also a spacer. Every gate in the datapath
is monotonic: an output leaves the spacer only once the inputs it needs have left it. An
operation therefore runs like this:

1. All inputs are spacers, and so are all outputs.
2. Valid inputs are applied (`start` high). Outputs become valid one by one, as the carries
   settle.
3. `completion_detect` ANDs `t | f` over every output pair. When all pairs are valid, `done`
   rises. A short carry chain finishes early, a long one late. That average-case timing is
   the point of the technique.
4. The inputs return to spacers (`start` low). `done` falls, and the adder is ready again.

`cla_adder` wraps this with single-rail ports. While `start` is high it encodes `in_A`, `in_B`
and `in_Carry` to dual rail; otherwise it drives spacers. It returns rail 1 of each result
pair, so its outputs read 0 while `done` is low. Inside the multiplier, each adder's `start`
is the previous adder's `done`, so completion ripples through the dependent adders. The
stage's final `done` therefore means that everything it computed is valid.

In an RTL simulation, gates have no delay, so `done` follows `start` at once. The handshake
sequence is exercised, but the data-dependent completion time is not; that appears only with
real gate delays.

## The carry-lookahead tree

**C-block** (`c_block`, one per bit). From the operand bits A_i, B_i:

* kill k = A⁰B⁰
* generate g = A¹B¹
* propagate p = A⁰B¹ + A¹B⁰

When the carry C_i arrives it forms the sum:

* S⁰ = A⁰B⁰C⁰ + A¹B¹C⁰ + A⁰B¹C¹ + A¹B⁰C¹
* S¹ = A⁰B⁰C¹ + A¹B¹C¹ + A⁰B¹C⁰ + A¹B⁰C⁰

Superscripts are rails. The S¹ equation is the dual of S⁰, written out here.

**D-block** (`d_block`, one per tree node). It joins an upper group I(i..j) and the adjacent
lower group I(j−1..k):

* g = g_hi + p_hi·g_lo
* k = k_hi + p_hi·k_lo
* p = p_hi·p_lo

From the carry C_k into the lower group it forms the carry into the upper group: C_j¹ = g_lo +
p_lo·C_k¹ and C_j⁰ = k_lo + p_lo·C_k⁰. These are the standard lookahead equations. The
source gives the block's ports but not its equations.

**Tree** (`cla_tree`). The bit positions are the leaves of a binary tree of D-blocks,
numbered like a heap:

* node 1 is the root;
* node m has the children 2m (lower bits) and 2m+1 (upper bits);
* bit n is leaf WP+n, where WP is W rounded up to a power of two.

The codes travel up the tree and the carries travel back down. Leaves above bit W−1 hold a
constant kill code, so the carry that reaches leaf WP+W is the carry out of the sum. For W =
32 there is no padding, and the carry out is formed from the root's code. The tree has about
2·log2(W) block levels from operands to sum.

## Datapath built from the adder

* **`exp_calc`** (exponent calculator). An 8-bit CLA computes e = Ea + Eb; its carry is
  bit 8 of `e`. A 10-bit CLA then adds −127, giving the signed exponent `e_unb` of the
  unnormalised product.
* **`mant_mult`** (significand multiplier, N = 24). Partial product i is x AND y[i]. Row i
  (1 … N−1) adds partial product i to the previous row shifted right by one, in an N-bit CLA.
  Its carry out becomes the row's top bit. The bit shifted out of each row is product bit i,
  and the last row gives the top N+1 bits. Completion ripples row by row.
* **`fp_round`**. If product bit 47 is set, it keeps bits 47:24 and adds one to the exponent;
  otherwise it keeps bits 46:23. The guard bit and the sticky OR decide round-to-nearest-even.
  A 24-bit CLA adds the increment. A carry out of it (1.11…1 rounded up) means the significand
  is exactly 1.0, so the fraction becomes 0 and the exponent gets one more step. A 10-bit CLA
  adds both exponent steps. Range checks and packing follow.

## The request/acknowledge pipeline

`fp_multiplier` has two stages. Each stage has a stage latch (`stage_latch`), a processing
unit and a control unit (`ctrl_unit`):

| stage | latches                                  | processing unit                     |
|-------|------------------------------------------|-------------------------------------|
| 1     | a, b (64 bits)                           | `exp_calc`, `mant_mult`, sign, flags|
| 2     | sign, e_unb, product, flags (62 bits)    | `fp_round`                          |

The control unit uses four-phase (return-to-zero) signalling:

```
IDLE --req_in (and previous token released)--> BUSY   en pulses: latch loads, ack_out rises
BUSY --done-->                                 OUT    start held high, req_out rises
OUT  --ack_in-->                               RTZ    start and req_out fall (datapath -> spacer)
RTZ  --!ack_in && !done-->                     IDLE
```

`ack_out` stays high from the loading edge until `req_in` falls. A stage can accept a new
operand pair as soon as the next stage has acknowledged the previous one, so two operations
can be in flight at once. The control units are clocked state machines that step once per
clock edge. The source design uses asynchronous control units with the same sequence of
signals (en, ack, start, done, req).

### Top-level interface

| port       | dir | width | meaning                                            |
|------------|-----|-------|----------------------------------------------------|
| `clk`      | in  | 1     | clock of the control units and stage latches       |
| `rst_n`    | in  | 1     | asynchronous active-low reset                      |
| `start`    | in  | 1     | request: `a`, `b` are valid                        |
| `ack`      | out | 1     | acknowledge of `start`                             |
| `a`, `b`   | in  | 32    | operands                                           |
| `c`        | out | 32    | product, valid while `done` is high                |
| `done`     | out | 1     | request: `c` is valid                              |
| `done_ack` | in  | 1     | consumer's acknowledge of `done`                   |

The producer holds `a`, `b` and `start` until `ack` rises, then lowers `start` and waits for
`ack` to fall. The consumer reads `c` while `done` is high, raises `done_ack`, and lowers it
once `done` falls. With an idle pipeline and a consumer that acknowledges at once, `done`
rises on the 3rd clock edge after the edge that loads the operands.

## Departures and choices

* **Adder or multiplier.** The source's headings describe a 32-bit floating-point
  *adder*, but its body, block names and every worked example describe a multiplier whose
  additions are done by the CLA. This RTL builds the multiplier.
* **Clocked handshake.** The source's control is asynchronous. Here it is a clocked state
  machine, and the stage latches are enabled flip-flops. The dual-rail datapath and its
  completion detection are kept as described.
* **Number of stages.** Two stages: product, then round. The source shows a cascade of
  stages without fixing their number.
* **Significand multiplier structure.** A carry-propagate array of CLAs. The source says only
  that groups of units form a network.
* **Completion detection.** An AND over all `t | f` pairs.
* **Exceptions.** Round-to-nearest-even and +0 on underflow match the source's results.
  Subnormal, infinity and NaN handling are this design's own.
* **Not reproduced.** The source compares delay, power and area against a synchronous CLA.
  Such figures depend on gate delays and cannot come from an RTL simulation. The synchronous
  baseline itself is not built.
* **Precision.** A 64-bit version is mentioned only as future work and is not built.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| testbench              | what it checks                                                                 |
|------------------------|---------------------------------------------------------------------------------|
| `tb_c_block`           | all valid input combinations against integer sums; spacer behaviour             |
| `tb_d_block`           | every pair of group codes: merged code acts like lower-then-upper; C_j          |
| `tb_cla_tree`          | W = 32 and W = 9 (padded tree), random and corner operands; spacers             |
| `tb_completion_detect` | all-valid words give done; a single spacer pair blocks it                        |
| `tb_cla_adder`         | 32-bit sums and carries; outputs 0 and `done` low while `start` is low          |
| `tb_exp_calc`          | all 65,536 exponent pairs                                                        |
| `tb_mant_mult`         | 3,000 products against 64-bit integer multiplication                             |
| `tb_fp_round`          | 4,000 products over the whole exponent range, with forced exact ties            |
| `tb_stage_latch`       | load and hold against a model register                                           |
| `tb_ctrl_unit`         | 200 tokens with random delays: order, one load per token, protocol rules        |
| `tb_fp_multiplier`     | the worked examples, latency, then 3,000 random products streamed under random back-pressure |

`tb_fp_multiplier` runs the top at its default parameters. It compares every result with an
independent integer model. It also counts that each mechanism occurs at least once:

* normalising shift and no shift,
* rounding up, and a rounding carry into the exponent,
* overflow and underflow,
* zero, infinite and NaN operands,
* a held result (back-pressure),
* both stages busy at once.

`ctrl_unit` also holds SystemVerilog assertions for the four-phase rules.

## Simulating

Any testbench builds with plain Verilator 5, for example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_fp_multiplier \
    -y rtl -y tb +libext+.sv -Irtl rtl/stcla_pkg.sv tb/tb_fp_multiplier.sv -o sim
./obj_dir/sim
```

To run another testbench, replace `tb_fp_multiplier` in both places. `rtl/stcla_pkg.sv` has
to come first, because every module imports it. The end-to-end test finishes in well under a
second.

## Files

* `rtl/stcla_pkg.sv`: dual-rail and one-hot types, IEEE-754 field sizes, encode helpers.
* Adder: `rtl/c_block.sv`, `rtl/d_block.sv`, `rtl/cla_tree.sv`, `rtl/completion_detect.sv`,
  `rtl/cla_adder.sv`.
* Datapath: `rtl/exp_calc.sv`, `rtl/mant_mult.sv`, `rtl/fp_round.sv`.
* Pipeline: `rtl/stage_latch.sv`, `rtl/ctrl_unit.sv`, `rtl/fp_multiplier.sv` (top).
* `tb/tb_<module>.sv`: one testbench per module.

Synthesised with a generic flow, the whole multiplier is about 20,000 word-level cells and
136 flip-flops. Almost all of it is the significand array (23 dual-rail 24-bit adders).
