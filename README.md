# Parallel LTE turbo decoder with ungrouped backward recursion

This is synthesizable SystemVerilog for a turbo decoder for the LTE turbo code. To reach a high
throughput it runs several MAP (maximum a posteriori) decoders side by side, 8 by default, each on
its own part of the code block. Each MAP decoder uses a max-log BCJR algorithm with a modified sliding window.
The usual sliding-window decoder runs one backward recursion per window. Here every trellis stage
gets its own short backward recursion instead, which is called an *ungrouped* backward recursion.
These independent recursions can be laid out as a pipeline. Each MAP decoder then accepts one new
trellis stage and produces one LLR every clock, and its critical path is a single add-compare-select
step. The add-compare-select units (ACSUs) also normalize their state metrics by a cheap
subtraction, so no search for the largest metric is needed.

The design follows the published architecture of a high-throughput parallel turbo decoder for
LTE/LTE-Advanced, which was implemented with 8 and with 32/64 parallel MAP decoders. That
description gives the algorithm and the architecture, but not every number. Window size, iteration
count, word lengths, memory organisation and the schedule between the parallel decoders were
chosen for this implementation. They are listed under "Choices made here" below.

## The ungrouped backward recursion (`ubr_unit`)

To compute the a posteriori LLR of stage k, a MAP decoder needs three things:

- the forward metrics α of the state before the stage;
- the branch metrics γ of the stage;
- the backward metrics β of the state after the stage.

A sliding-window decoder approximates β by starting a backward recursion a window of M stages
further on, where all states are taken as equally likely.

The ungrouped scheme does this separately for every stage k. A recursion starts at stage k+M-1
with all β equal (ln(1/8), stored as 0, since only differences matter). It then runs M-1 ACS steps
backwards, over the branch metrics of stages k+M-1 down to k+1. The β set it ends with is used for
stage k only.

Done one after another, that would be M-1 times the work of a normal decoder. But the recursions
are independent, so `ubr_unit` pipelines them, with one ACSU per step:

```
 bm_in (stage j enters at cycle j)
   |
   +--> hist[0] --> ACS step 1 (starts recursion for stage j-M+1: "new set")
   +--> hist[2] --> ACS step 2  \
   +--> hist[4] --> ACS step 3   } recursions already under way ("consecutive sets")
   ...                          /
   +--> hist[2(M-2)] --> ACS step M-1 --> beta_out ("effective set")
```

Every clock, pipeline stage i takes the β set that stage i-1 produced in the previous clock. It
needs the branch metrics of a stage one further back in the trellis. Because stages arrive in
increasing order, those metrics arrived 2(i-1) clocks earlier. A shift register of the last
2(M-2) branch metric sets (`hist`) supplies them. So in every clock:

- one recursion starts;
- M-3 recursions advance;
- one recursion ends.

**Timing.** The effective β set of stage k appears at `beta_out` 2M-2 clocks after the branch
metrics of stage k entered. At M = 16 a MAP decoder holds 15 backward ACSUs, one forward ACSU and a
history of 28 branch metric sets.

## One MAP decoder (`map_decoder`)

```
ls, lp, la --> bmu --+--> ubr_unit --------------------------+
                     |                                       v
                     +--> delay 2M-2 --> fwd_recursion --> llr_unit --> out_app, out_ext
amode, tag, ls, la --> delay 1 + 2M-2 -------^-----------------^------> out_tag
```

- **`bmu`** turns the systematic LLR `ls`, the parity LLR `lp` and the a-priori LLR `la` into
  branch metrics. LLRs are ln(P(1)/P(0)). A branch labelled (u, p) gets the metric
  u·(ls+la) + p·lp, and the (0,0) metric is the constant 0. The unit has a 1-clock register.
- **`acsu`** performs one recursion step for all 8 states, forward or backward (parameter
  `BACKWARD`). Each new metric is the larger of its two candidates (max-log). Then the new metric
  of state 0 is subtracted from all eight, and the result saturates to 12 bits. State 0 therefore
  always holds 0. Metric growth is bounded without comparing all eight metrics, which keeps
  normalization off the critical path.
- **`fwd_recursion`** keeps α in a register and advances it one stage per clock. It runs on branch
  metrics delayed by 2M-2 clocks, so it reaches stage k together with that stage's β set. Its
  `mode` input can replace the register with one of two initial sets:
  - `A_ZERO`: state 0 at 0 and all others at -1024, standing for minus infinity. This is the start
    of a code block.
  - `A_EQUI`: all states equal. This is the start of an acquisition run in front of a sub-block.
- **`llr_unit`** computes `L = max over u=1 branches of (α + γ + β) - max over u=0 branches`. It
  also computes the extrinsic LLR `Le = L - ls - la`, saturated to 8 bits.

**Interface.** The decoder takes one stage per clock, without gaps. Its outputs, with the stage's
tag, appear exactly 2M clocks after the stage's inputs. A stage's result is correct only if the
M-1 stages after it are also streamed in. The caller appends them, or appends zero-LLR stages past
the end of the block.

The constituent code is the 8-state LTE recursive systematic code:

- feedback polynomial 1+D²+D³ and feed-forward polynomial 1+D+D³;
- a state is `{s1,s2,s3}`;
- the feedback bit is `a = u ^ s2 ^ s3`;
- the parity bit is `a ^ s1 ^ s3`;
- the next state is `{a,s1,s2}`.

These functions live in `turbo_pkg`.

Fixed-point formats (`turbo_pkg`):

| quantity | bits |
|---|---|
| channel LLR (systematic, parity) | 6 |
| a-priori / extrinsic LLR | 8 |
| branch metric | 10 |
| state metric (normalized, saturating) | 12 |
| a posteriori LLR | 12 |

## Parallel decoding (`turbo_ctrl`, `turbo_decoder`)

The K-bit block is split into P contiguous sub-blocks of S = K/P stages, one for each MAP
decoder. All P decoders run in lockstep.

**Stages fed to each decoder.** In every half-iteration, decoder p is fed the NSTEP = S + 2(M-1)
stages

```
x = p·S-(M-1) ... p·S-1       acquisition: the forward recursion starts here with all
                              states equal (A_EQUI), results discarded
x = p·S ... p·S+S-1           the decoder's own stages, results written
x = p·S+S ... p·S+S+M-2       look-ahead for the ungrouped backward recursions, results discarded
```

Stages outside 0..K-1 are padding with zero LLRs. Stage 0 restarts the forward recursion in
state 0 (`A_ZERO`). The overlaps read the neighbouring sub-blocks' inputs, so no metrics are passed
between decoders.

**Half-iterations.** Each iteration is two half-iterations:

| half | order | reads for stage x | writes |
|---|---|---|---|
| even | natural | `ls[x]`, `lp1[x]`, a-priori `le2[x]` | extrinsic to `le1[x]` |
| odd | interleaved | `ls[π(x)]`, `lp2[x]`, a-priori `le1[π(x)]` | extrinsic to `le2[π(x)]`, decision `(L > 0)` to `dec[π(x)]` |

- π is the LTE QPP interleaver, π(x) = (F1·x + F2·x²) mod K. `qpp_gen` produces it with two
  modular adders per clock, one generator per decoder.
- The first half-iteration uses zero a-priori LLRs.
- Each half-iteration reads one extrinsic memory and writes the other. The look-ahead and
  acquisition stages, which belong to other decoders, therefore always see values from the
  previous half-iteration.
- After the last stage is issued, the controller waits 2M+2 clocks until every result is written.
  Only then does the next half-iteration start.

**Memories.** All memories are `llr_ram` instances: one array per quantity, with one read port per
decoder and synchronous reads. There are six:

- `ls`, `lp1`, `lp2`: 6 bits × K each;
- `le1`, `le2`: 8 bits × K each;
- `dec`: 1 bit × K.

Any set of distinct addresses can be written in the same clock. Because the QPP is a permutation,
the P decoders never collide.

### Top-level interface and timing

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `ld_en`, `ld_addr` | in | 1, ⌈log2 K⌉ | write one bit position's channel LLRs |
| `ld_ls`, `ld_lp1`, `ld_lp2` | in | 6 each | systematic LLR, parity LLR of encoder 1, parity LLR of encoder 2 (natural order) |
| `start` | in | 1 | start decoding the loaded block |
| `busy` | out | 1 | high while decoding |
| `done` | out | 1 | one-clock pulse when `dec` holds the result |
| `rd_addr` / `rd_bit` | in / out | ⌈log2 K⌉ / 1 | decoded bit, one clock after the address |

To decode a block:

1. Load all K positions, one per clock.
2. Pulse `start`.
3. Wait for `done`.
4. Read the decoded bits out.

One half-iteration takes K/P + 2(M-1) + 2M + 2 clocks. `done` rises 2·N_ITER times that, plus one,
clocks after the edge that samples `start`. At the defaults that is 16 × 832 + 1 = 13313 clocks
for a 6144-bit block. That is 0.46 decoded bits per clock at 8 iterations, or 3.7 bits per clock
per iteration. Loading and reading out take K clocks each and are not overlapped with decoding.

### Parameters (top level)

| parameter | default | meaning |
|---|---|---|
| `K` | 6144 | block size; must be a QPP size with matching `F1`, `F2`, and divisible by `P` |
| `P` | 8 | parallel MAP decoders |
| `M` | 16 | window size: each backward recursion spans M-1 stages (at least 2) |
| `F1`, `F2` | 263, 480 | QPP coefficients of the LTE table for K = 6144 |
| `N_ITER` | 8 | full iterations |

Examples: K = 40 uses F1 = 3, F2 = 10; K = 1024 uses F1 = 31, F2 = 64. For the larger published
configurations set `P` = 32 or 64 (6144/64 = 96 stages per decoder).

At the defaults, yosys coarse synthesis gives about 25 k word-level cells, 32 k flip-flop bits and
215 k memory bits.

## Choices made here, and where the design departs from its source

- **Constituent code and interleaver.** The LTE 8-state code and the QPP interleaver are taken from
  the LTE standard (3GPP TS 36.212). The source illustrates the recursion on a 4-state trellis.
- **Arithmetic.** Max-log arithmetic is used, without the log-MAP correction term and without
  extrinsic scaling.
- **Normalization.** The ACSU normalizes by subtracting state 0's metric. The source says only that
  the ACSU normalizes in a way that shortens the critical path.
- **Sizes.** Window M = 16, N_ITER = 8 and the word lengths above are this design's own values.
- **Block size.** The default is K = 6144, the largest LTE block. The source's FPGA demonstration
  shows a 32-bit decoded output; 32 is not an LTE interleaver size.
- **Parallel schedule.** Sub-blocks with M-1 acquisition stages and M-1 look-ahead stages, the two
  extrinsic memories and the drain between half-iterations are choices of this implementation.
- **Trellis termination.** It is not used. Tail bits are ignored, and the block end is treated
  like an open window: padding with zero LLRs.
- **Memories.** These are plain multi-port arrays. A silicon implementation would use P banks with
  a contention-free QPP crossbar. The array form keeps the RTL simple, but synthesizing it as it
  stands needs a memory with P ports.
- **No early stopping.** A fixed number of iterations always runs.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and ends itself through a watchdog if it hangs.

`tb_ref_pkg` is a bit-exact reference model, written from the code definition rather than from the
RTL. It holds:

- the encoder as a shift register;
- max-log forward and backward steps with the same normalization and saturation;
- the windowed MAP decoder;
- the QPP formula.

| testbench | what it checks |
|---|---|
| `bmu_tb` | branch metrics, including extreme LLRs |
| `acsu_tb` | forward and backward ACS steps against the reference, including saturation |
| `ubr_unit_tb` | every effective β set and its 2M-2 latency, at M = 16 and M = 4 |
| `fwd_recursion_tb` | α over random streams with random `A_ZERO`/`A_EQUI` restarts and hold cycles |
| `llr_unit_tb` | a posteriori and extrinsic LLRs, including saturated extrinsics |
| `map_decoder_tb` | bit-exact outputs of whole streams and the exact 2M latency, at M = 16 and M = 5 |
| `qpp_gen_tb` | addresses for K = 40, 1024, 6144 with offsets, stalls and restarts; permutation property |
| `llr_ram_tb` | multi-port reads and writes against a model |
| `turbo_ctrl_tb` | every address and flag of every issue cycle, and the drain and `done` timing (K = 40) |
| `turbo_decoder_tb` | full default size (K = 6144, P = 8, M = 16, 8 iterations), described below |
| `turbo_small_tb` | the same checks at K = 40, P = 4, M = 4, 2 iterations, three blocks |
| `turbo_p64_tb` | the same checks for the 64-parallel configuration (K = 6144, P = 64): 2561 clocks per block |

The three end-to-end testbenches share `turbo_checker`. It generates random blocks and
encodes them with an LTE turbo encoder. It adds Gaussian noise to BPSK symbols and quantizes the
result. It then checks:

- every decoded bit against a reference turbo decoder that follows the same schedule;
- zero residual bit errors;
- the exact decode time in clocks.

It also counts each mechanism and fails if one never happens: state-0 starts, acquisition starts,
padding stages, natural and interleaved half-iterations, and corrected channel errors. In the
default-size run the noisy block has 657 wrong systematic hard decisions and decodes without
error.

To run a testbench with Verilator 5 from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module turbo_decoder_tb \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/turbo_pkg.sv tb/tb_ref_pkg.sv \
  tb/turbo_decoder_tb.sv -o sim
obj_dir/sim
```

Replace `turbo_decoder_tb` with any other testbench name. The full-size test builds in about
15 s and runs in about 1 s.

## Files

- `rtl/turbo_pkg.sv`: widths, types, trellis functions.
- `rtl/bmu.sv`, `rtl/acsu.sv`, `rtl/ubr_unit.sv`, `rtl/fwd_recursion.sv`, `rtl/llr_unit.sv`,
  `rtl/delay_line.sv`, `rtl/map_decoder.sv`: the MAP decoder.
- `rtl/qpp_gen.sv`, `rtl/llr_ram.sv`, `rtl/turbo_ctrl.sv`, `rtl/turbo_decoder.sv`: interleaver,
  memories, controller and top level.
- `tb/`: the testbenches above, plus `tb_ref_pkg.sv` and `turbo_checker.sv`.
