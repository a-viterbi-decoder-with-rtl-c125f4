# Viterbi decoder with a register-array trace-back memory

This is a Viterbi decoder for the DAB convolutional code: constraint length 7,
so 64 trellis states, and rate 1/4. Its survivor memory is not a RAM that is
read back step by step. It is an array of small cells, one per state and stage,
holding the ACS decision bits. The cells are wired along the trellis, so a
single "token" injected at the winning state ripples back through the stored
decisions in one clock. The decoded bits of a whole block are then read
straight off the array, with no read cycles. While no block is being decoded,
the token network does not toggle at all. The register array can also be
written so that each column is clocked only once per block. Both properties aim
at low power.

The RTL is SystemVerilog (IEEE 1800-2017), synthesizable, in `rtl/`.
Self-checking testbenches are in `tb/`.

## The code and how states are numbered

The encoder (`conv_encoder`) is a 6-bit shift register S0..S5, with S0 the
newest bit. The input bit u and the register are combined into four code bits.
The generators, in octal, are:

| output | generator | taps |
|---|---|---|
| V3 | 133 | u ^ S1 ^ S2 ^ S4 ^ S5 |
| V2 | 171 | u ^ S0 ^ S1 ^ S2 ^ S5 |
| V1 | 145 | u ^ S0 ^ S3 ^ S5 |
| V0 | 133 | same as V3 |

A trellis state is the register read as a 6-bit number with S0 as its most
significant bit. Everything else follows from this numbering:

* after input u, state s becomes `{u, s[5:1]}`;
* state s has two predecessors, `{s[4:0],0}` and `{s[4:0],1}`, that is 2s and
  2s+1 modulo 64;
* the branch from predecessor `{s[4:0],d}` into s carries the code bits of the
  7-bit window `{s, d}`, which is `vit_pkg::code_bits({s,d})`;
* states 32..63 ("zone B") are exactly the states whose newest input bit was 1.
  States 0..31 are "zone A".

The same encoder module with `K=3, N=2, GEN={3'b101,3'b111}` is the common
4-state (7,5) textbook code. Its testbench checks it against a known 10-bit
sequence.

## One trellis stage: BMU, PMU and ACS

A single add-compare-select unit serves all 64 states in turn, one state per
clock, so a stage takes 64 clocks. In the clock where state s is handled:

1. `bmu` scores both incoming branches against the stage's four received soft
   symbols. The symbols are 3 bits wide: 0 means a confident 0, 7 a confident 1.
   The score is `sum_i (c_i ? 7 - rx_i : rx_i)`, from 0 (perfect) to 28.
2. `pmu` supplies the old metrics of predecessors 2s and 2s+1 through two
   combinational read ports. It has two banks of 64 metrics: one is read during
   a stage and the other is written, and they swap at every stage boundary. One
   bank is not enough, because a later state of the same stage still needs the
   old metric that state s would overwrite.
3. `acs` forms `pm + bm - norm` for both branches and keeps the smaller one.
   Here `norm` is the smallest metric of the previous stage. It writes the
   survivor metric to the other bank. Its decision bit is 1 when the
   predecessor ending in 1 survived; on a tie, predecessor 0 wins.
4. `winner` keeps a running minimum over the 64 new metrics. At the end of the
   stage it publishes the smallest metric (the next stage's `norm`) and its
   state.

Because of the normalisation, metrics stay below about 256 + 7·28. The initial
offset of 256 is given to all states except state 0 at reset, since the
encoder starts from zero. With 10-bit metrics this leaves a wide margin, and
the ACS saturates as a guard anyway.

`control_unit` sequences all of this: a state counter 0..63, a stage counter
1..35, the bank bit, and a one-cycle `trace` strobe.

## The trace-back register array

This is the heart of the design: `tb_cell` and `tb_memory`, with the
surrounding logic in `smu`.

**Cell.** Each `tb_cell` stores one decision bit. It has two token inputs,
`a` and `b`, and three outputs:

```
sel = a | b          -- the survivor path passes through this state at this stage
up  = sel & ~bit     -- pass the token to predecessor {s[4:0],0}
lo  = sel &  bit     -- pass the token to predecessor {s[4:0],1}
```

**Array.** The array has 35 columns (stages) of 64 cells. Column k holds the
decision bits of stage k+1 of the current block. Cell s of column k takes its
tokens from column k+1, the next stage in time:

* `a` comes from cell `s>>1` (in zone A);
* `b` comes from cell `32 + (s>>1)` (in zone B);
* in both cases the `up` output is used for even s and the `lo` output for
  odd s.

That is exactly the reverse trellis: the cells that can hand a token to state
s are the two successors of s, and each hands it on only if its stored decision
names s as its survivor.

**Decoding.** At the end of a block, the winning state (smallest metric at
stage 35) is driven one-hot into column 34 (`sel_row`). The token then runs
combinationally through all 35 columns, along the single survivor path. In
every column it sits in zone B exactly when that stage's input bit was 1. So
each column's decoded bit is just the OR of its 32 zone-B `sel` outputs:

```
decode[k] = |sel[k][63:32]        -- message bit of stage k+1
```

All 35 bits are valid in the same cycle, and no memory is read. When
`sel_row` is zero, which is every cycle except the trace cycle, no token exists
and none of the `a/b/up/lo/sel` logic switches.

The longest path is 35 cells deep: an OR and an AND per stage, plus the final
32-input OR. This decides the clock rate if the trace is done in one cycle.

**Writing the array.** The ACS produces its decisions one per clock. `smu`
gathers them in a 64-bit collector. In the last cycle of a stage, the full
vector (the collector plus the decision arriving in that cycle) is written into
one column. Two write forms are built, chosen with the parameter
`ARCH` (`vit_pkg::tb_arch_e`):

* `TB_PARALLEL` (the default): the vector is broadcast to every column, and
  only column `stage-1` loads it. Each column is therefore clocked once every
  35 stages. Each column's load enable is where an ASIC flow puts a clock gate.
  This form keeps flip-flop activity lowest.
* `TB_SYSTOLIC`: every column loads from its neighbour at each stage end. The
  new vector enters column 34 and older vectors move one column toward
  column 0. All 2240 flip-flops are clocked every stage. Decoding is identical.

With random decision data, the systolic array changes about 34 times as many
stored bits as the parallel one: 379,155 against 11,231 bit changes over 350
stages in `tb_memory_activity_tb`. This difference in register activity is
the reason the parallel form is the default.

**Block timing.** Decoding is block-wise. After the column of stage 35 is
written (the clock edge ending the stage's 64th cycle), `trace` is high for the
next cycle. In that cycle the array shows the block and `viterbi_top` captures
it. `dec_valid` is high for one cycle, 35·64 + 1 = 2241 clocks after the
block's first symbol group was accepted. The next block can already be
running: its first column is only written at the end of its first stage, so no
gap is needed between blocks.

Because each block is traced from its own last stage, its final few bits rest
on fewer later symbols than its early bits. A sliding-window decoder with
overlapping trace-backs would protect them better. The end-to-end test
therefore places its injected errors in the first 28 stages of each block.

## Interface of `viterbi_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `rx_valid`, `rx_ready` | in/out | 1 | handshake for one symbol group; a transfer happens when both are high at a rising edge |
| `rx` | in | 4×3 (`rx_t`) | soft symbols, `rx[i]` belongs to code bit V_i |
| `dec_valid` | out | 1 | one-cycle pulse: `dec_bits` holds a new block |
| `dec_bits` | out | 35 | bit k = k-th message bit of the block |
| `stage` | out | 6 | stage being computed, 1..35 |
| `winner`, `min_pm` | out | 6, 10 | best state and its metric at the last finished stage |
| `enc_valid`, `enc_u`, `enc_v` | in/in/out | 1/1/4 | the DAB encoder, standing beside the decoder and not connected to it |

`rx_ready` is high when the decoder is idle or in the last cycle of a stage.
So groups offered continuously are processed back to back, one per 64 clocks.
If no group is offered, the decoder waits. Parameters: `TB_LEN_P` (35) and
`ARCH` (`TB_PARALLEL`). The code itself (64 states, rate 1/4, generators) is
fixed in `vit_pkg`.

For example, the 35-bit message `35'h713922f2b` (bit 0 sent first), encoded
and fed in noise-free, comes out as `dec_bits = 35'h713922f2b`. The winning
state is 56 (`111000`), the last six message bits.

## What is this design's own

The overall structure follows a published low-power trace-back design:

* the single ACS with 64 clocks per stage;
* the 35-stage decoding length;
* the cell with its token steering;
* the zone A/B wiring of the array and the zone-B decode OR;
* the parallel and systolic write forms.

The following points are choices made here:

* the soft-symbol coding and the distance branch metric;
* the metric width (10 bits), normalisation by the previous stage minimum, the
  reset metrics (0 for state 0, 256 for the others) and the tie rules (ACS:
  predecessor 0 wins; winner: lowest state number wins);
* the double-banked path-metric store;
* the 64-bit decision collector, which lets a one-state-per-clock ACS feed a
  column-wide write;
* the `rx_valid`/`rx_ready` handshake and the registered `dec_bits` output;
* gated column clocks are written as load enables on a single clock;
* in the systolic form, new vectors enter at the column where the trace starts
  (stage 35) and move toward stage 1, so the newest decisions are always
  adjacent to the winner injection point.

Not built:

* a conventional RAM-based survivor memory (the usual reference point for
  this technique);
* power, area and timing figures, which need a technology library and a
  gate-level flow;
* a multi-ACS (parallel state) datapath. The array itself does not depend on
  how many states are computed per clock.

## Verification

Each module has a self-checking testbench `tb/<module>_tb.sv`. Each one prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `conv_encoder_tb` | 4-state code against a known sequence; DAB code against an independent tap-by-tap model |
| `bmu_tb` | all 64 states, random symbol groups, against a recomputed distance |
| `acs_tb` | random metrics, ties, saturation |
| `pmu_tb` | reset values and random bank/read/write traffic against an array model |
| `winner_tb` | minimum and state per stage, ties, hold during the next stage |
| `tb_cell_tb` | exhaustive token steering and storage |
| `tb_memory_tb` | both write forms: random columns and winners against a software trace-back; idle decode is zero |
| `tb_memory_activity_tb` | register bit changes of the two write forms on the same data (systolic must be at least 10× parallel), and identical decoding |
| `smu_tb` | serial decision stream, winner, and block decode against a software trace-back |
| `control_unit_tb` | cycle-accurate model of counters, handshake, bank and trace pulse |
| `viterbi_top_tb` | end to end at default parameters (see below) |
| `viterbi_top_systolic_tb` | the same with `ARCH=TB_SYSTOLIC` |

The end-to-end tests share `tb/viterbi_harness.sv`. The harness encodes six
35-bit blocks (the first is `35'h713922f2b`) with its own encoder model and
maps them to soft symbols. From the third block on, it adds mild noise and one
fully flipped symbol per block. It feeds some blocks back to back and others
with idle gaps.

The harness checks:

* every decoded block;
* the winning state 56 for the first block;
* 64 clocks per stage;
* the 2241-clock block latency;
* the stage counter sequence;
* the side-by-side encoder port.

It also counts stalls, back-to-back stages, trace-backs, stages normalised by a
nonzero minimum, and injected errors. Any of these that never happened counts
as a failure.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/vit_pkg.sv tb/viterbi_top_tb.sv --top-module viterbi_top_tb
./obj_dir/Vviterbi_top_tb
```

Replace `viterbi_top_tb` with any other testbench name. The full-size
end-to-end run takes well under a second.
