# Iterative multiuser receiver for partition-spreading CDMA

In a direct-sequence CDMA uplink, all users transmit on the same band at the same
time, each spread by its own pseudo-random chip sequence. A plain correlating
receiver (matched filter) treats the other users as noise. That multiple-access
interference (MAI) limits how many users a channel can carry. This receiver removes
the interference iteratively. Every user's receiver estimates its own transmitted
chips. An adder tree sums all these estimates, and each user matched-filters the
received signal after the other users' estimates have been subtracted. A few
iterations take a heavily loaded channel from a 13 % bit error rate (matched filter
alone) to error-free decoding. The end-to-end test shows this with 50 users on
64-chip symbols.

The modulation is *partition spreading* (PS-CDMA), a generalised form of
interleave-division multiple access:

* every data bit of user *k* is repeated M times (a rate-1/M repetition code); each
  copy is a *partition*;
* the coded bits are permuted by a user-specific interleaver π_k;
* each partition is spread by N/M chips of the user's sequence, so that one symbol
  still occupies N chips. This keeps power and bandwidth equal to plain CDMA with
  spreading factor N.

At the receiver, the M partitions of a symbol are M independent looks at the same
bit. The receiver combines them like a sum-product decoder: the *extrinsic* value
of a partition is the sum of the *other* M−1 partitions. Only this extrinsic
information is fed back into the interference estimate, which keeps each user's
own noise out of its next estimate.

All RTL is SystemVerilog-2017 in `rtl/`; self-checking testbenches are in `tb/`.

## Architecture

```
                 in_chip ──► rx_chip_mem (L·N × H, sign-magnitude)
                                   │ r (read once per chip per iteration)
                                   ▼
  ┌────────────── user_receiver k (K copies) ───────────────────────────────┐
  │ estimate side                         matched-filter side               │
  │ ilv mem[π(p)] ─► ×w ─► tanh LUT ─►    r − Σŷ + ŷ_k(delayed log2 K)      │
  │   XOR LFSR ─► ŷ_k ──────────┐           │                               │
  │                             │           ▼                               │
  │                             │   XOR LFSR, Σ N/M chips, × sqrt(M/N)      │
  │                             │           │ partition b                   │
  │                             │      ┌────┴───────┐                       │
  │                             │  dil mem[π(p)]   variance ─► 1/x LUT ─► w │
  │                             │      │ read in symbol order               │
  │                             │  partition_estimator: Σ_M, M delay,       │
  │                             │      extrinsic = Σ − b,  decision = sign Σ│
  │                             │      └──► ilv mem (in order)              │
  └─────────────────────────────┼───────────────────────────────────────────┘
                                ▼
                      k_adder_tree (Σŷ over K users, log2 K levels)
```

| Module | Function |
|---|---|
| `ps_cdma_demod` | Top: frame store, controller, K user receivers, adder tree. |
| `rx_chip_mem` | Received frame, L·N chips of H bits, written by its own counter. |
| `iter_controller` | Runs the chip pass and partition pass of each iteration; counts iterations. |
| `user_receiver` | One user's path: estimate side, matched-filter side, partition pass. |
| `lfsr` | 51-stage spreading-sequence generator, taps at stages 1 and 4, seeded per user. |
| `interleaver_addr` | Serial address generator for π(x) = (63x + 128x² + h) mod L·M. |
| `part_mem` | L·M × P partition memory; two per user (deinterleaver and interleaver). |
| `matched_filter` | Sign-bit XOR despreading, accumulator with reset, sqrt(M/N) scaler. |
| `partition_estimator` | Extrinsic step and hard decision. |
| `variance_est` | Noise-plus-interference variance, and its reciprocal from a look-up table. |
| `tanh_lut` | Weights the extrinsic value by 1/σ² and maps it to a soft chip amplitude. |
| `k_adder_tree` | Pipelined K-operand adder tree (the common aggregator). |
| `ps_cdma_pkg` | Shared sizes, fixed-point constants, per-user seeds and interleaver offsets. |

## The iteration: two passes over the frame

The interleaver forces a frame-level schedule: a symbol's partitions are spread
over the whole frame, so no symbol can be combined before the whole frame has been
matched-filtered. Each iteration therefore has two passes, run by `iter_controller`.

**Chip pass** (L·N cycles, one chip per cycle, all users in lock step). For chip
*c* in partition slot *p* = c / (N/M):

1. *Estimate side.* Each user reads its extrinsic partition of the previous
   iteration from its interleaver memory at π_k(p). It multiplies the value by the
   weight w and looks up the soft chip amplitude `round(16·tanh(x/16))`. It then
   flips the sign with its LFSR bit. This gives the chip estimate ŷ_k, which
   arrives `EST_LAT` = 4 cycles after the chip index.
2. *Aggregation.* `k_adder_tree` sums all K estimates in ceil(log2 K) register
   levels (6 for K = 50).
3. *Matched-filter side.* The controller's chip index is delayed by the same
   4 + log2 K cycles before it reads `rx_chip_mem`, so the received chip r and the
   sum Σŷ arrive together. Each user computes `r − Σŷ + ŷ_k`. Its own estimate
   comes from a log2 K delay line, so the user cancels everyone except itself. The
   result is saturated to H bits and turned into sign-magnitude form. The matched
   filter despreads it and sums N/M chips into one partition. That partition is
   written to the deinterleaver memory at π_k(p), so the memory ends up in symbol
   order. The same partitions feed the variance estimate. At the end of the pass,
   the variance gives the weight w for the next iteration.

In the first iteration no estimates exist yet: `est_zero` forces ŷ to zero, which
skips the cancellation. That iteration is a conventional matched-filter detector.

**Partition pass** (L·M cycles). Each user reads its deinterleaver memory in order
into `partition_estimator`. The estimator sums the M partitions of each symbol
while the partitions wait in an M-stage delay line. Each partition is then
subtracted from the sum, which gives its extrinsic value. These values are written
in order to the interleaver memory, ready for the next chip pass. The sign of the
sum is the symbol's hard decision. The top presents all K users' decisions for a
symbol together on `dec_bits`.

Each memory has a single port, with an address multiplexer that selects a
counter or the interleaver address. This works because every memory is written
in one pass and read in the other: the deinterleaver memory is written at π_k(p)
during the chip pass and read by the counter during the partition pass, and the
interleaver memory the other way round. The received-chip memory is written by
its counter while a frame is loaded, and read while the frame is processed. A pass ends with `DRAIN` = 32 idle cycles, which lets the
pipelines empty. One iteration takes **L·N + L·M + 2·DRAIN + 2 cycles**: 4418 at the
defaults.

## Number formats

Two precisions meet at the matched filter:

* **Chip domain, H = 11 bits.** This covers received chips, chip estimates and
  residuals. It must carry the sum of all users (up to 50 × 16 here) and also
  fractions of one chip amplitude. The received chip memory and the residual fed to
  the matched filter are in **sign-magnitude** form. Spreading and despreading are
  then a single XOR on the sign bit, with no negation. The adders work in two's
  complement, and the converters sit at the adders.
* **Partition domain, P = 8 bits.** This covers partitions and extrinsic values,
  in two's complement, saturated symmetrically to ±127.

The fixed-point scaling chain, with its defaults:

| Quantity | Definition | Default |
|---|---|---|
| chip amplitude of one user (`CHIP_AMP`) | LSBs of the chip domain | 16 |
| matched-filter scale | `round(256·sqrt(M/N)) / 256` | 64/256 = 1/4 |
| noiseless partition amplitude A | `CHIP_AMP · (N/M) · sqrt(M/N)` | 64 |
| variance σ² | `mean((abs(b) − A)²)` over the L·M partitions of the frame | — |
| weight w | `16 · A · 256 / σ²` from a 256-entry table indexed by σ²/64 | up to 8192 |
| tanh-table input x | `(ext · w) >> 8`, saturated to ±127 (= LLR/2 in 1/16 units) | — |
| soft chip | `round(CHIP_AMP · tanh(x/16))`, sign-magnitude | −16…16 |

The extrinsic log-likelihood ratio of a partition is 2·A·ext/σ². The expected value
of a ±1 bit with LLR λ is tanh(λ/2). The tanh table therefore outputs the expected
chip directly, with the chip amplitude folded in, so the cancellation needs no
multiplier. Both tables are computed at elaboration from these formulas, not read
from files. The variance estimate assumes every partition's hard decision is
correct, so the error of a partition is |b| − A.

The received signal is assumed to have **equal power per user and this known
amplitude** (`CHIP_AMP`). A real front end would need gain control to meet it.

## Spreading sequence and interleaver

`lfsr` is a 51-stage shift register. Stage 1 is the output. On each step the
stages shift toward stage 1, and stage 1 XOR stage 4 enters stage 51. The
sequence is therefore a[n+51] = a[n] ⊕ a[n+3]. Each user has its own 51-bit seed
(`ps_cdma_pkg::lfsr_seed`, a fixed hash of the user index). The seed is reloaded at
the start of every chip pass. Each user has two LFSRs, one per side of the chip
pass, because the two sides work on the same chip 4 + log2 K cycles apart.

`interleaver_addr` computes π(x) = (63x + 128x² + h) mod L·M in order without a
multiplier. It uses forward differences: π(0) = h, π(x+1) = π(x) + d(x),
d(0) = 191, d(x+1) = d(x) + 256, all mod L·M. The polynomial is a permutation only
when L·M is a power of two, and then the modulo is a truncation. This is asserted.
The offset is h_k = (37k + 11) mod L·M. In the transmitter model, time slot *p* of
user *k* carries coded bit π_k(p), and coded bit *j* belongs to symbol j / M.

Bit mapping: data bit 0 is sent as +1, data bit 1 as −1; an LFSR bit of 1 negates
the chip. `dec_bits` uses the same convention (1 = negative sum).

## Interface and timing of the top (`ps_cdma_demod`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `in_valid`, `in_chip` | in | 1, H | received chip, sign-magnitude, accepted while `in_ready` |
| `in_ready` | out | 1 | frame store is accepting chips |
| `num_iter` | in | 4 | iterations to run (0 counts as 1), sampled when the frame is complete |
| `dec_valid` | out | 1 | one pulse per symbol per iteration |
| `dec_bits` | out | K | hard decision of each user for symbol `dec_sym` |
| `dec_sym`, `dec_iter`, `dec_last` | out | log2 L, 4, 1 | symbol index, iteration, final-iteration flag |
| `busy`, `done` | out | 1 | processing; one-cycle pulse when the frame is finished |

Load exactly L·N chips. Processing then starts on its own and `in_ready` stays low
until `done`. Decisions come out in symbol order during every partition pass.
Usually only those with `dec_last` matter. The whole frame takes
`num_iter · (L·N + L·M + 2·DRAIN + 2)` cycles after the last chip is accepted.
Assertions check that the adder-tree output and the chip-memory data arrive in the
same cycle, that all users stay in lock step, that no single-port partition
memory is read and written in the same cycle, and that the weight never changes
while the estimate side is running.

## Parameters

| Parameter | Default | Origin |
|---|---|---|
| `K` users | 50 | published (fully loaded 50-user system) |
| `P` partition bits | 8 | published |
| `H` chip bits | 11 | published |
| `M` partitions per symbol | 4 | own choice within the published 3–5; it must be a power of two for the interleaver |
| `N` chips per symbol | 64 | own choice (N/M = 16 chips per partition, load K/N = 0.78) |
| `L` symbols per frame | 64 | own choice |
| `CHIP_AMP` | 16 | own choice |
| `DRAIN` | 32 | own choice; must be at least 4 + log2 K + N/M + 4 and at least M + 4 |
| LFSR stages / taps | 51 / 1, 4 | published |
| interleaver coefficients | 63, 128 | published |

N must be a multiple of M, L·M must be a power of two, and K must be at least 4.

## Departures and open points

* **Own design choices.** The two-pass schedule, the pipeline timing, all
  fixed-point formats and scale factors, the variance formula, the table formats,
  the seeds, the interleaver offsets, sign-magnitude storage of the received chips,
  and N, M, L are this implementation's decisions. The block structure, the widths
  P and H, K = 50, the LFSR length and taps, and the interleaver polynomial follow
  the published design.
* **LFSR.** The 51 stages with taps 1 and 4 are implemented as described. The
  recurrence's period and correlation properties were not analysed. The shift
  direction and the output stage are an interpretation.
* **Interleaver memory.** Each memory is written as a single-port array with a
  registered read. It maps to flip-flops (as in the published ASIC)
  or to block RAM (as in the published FPGA). With 50 users the two partition
  memories per user total 205 kbit; with the 45 kbit frame store and the two
  small tables per user (7 kbit), they dominate the area.
* **Throughput.** The published design reports 197 Mb/s (ASIC) and 119 Mb/s (FPGA)
  of aggregate throughput for 50 users. Its clock rate, iteration count, N and L
  are not known here. This implementation decodes K·L = 3200 bits per
  I · 4418 cycles, which is 0.121 bit/cycle at I = 6 iterations. Reaching 197 Mb/s
  would need about 1.6 GHz, or a shorter symbol, or fewer iterations. The chip pass
  is serial (one chip per cycle), and it is the bottleneck.
* **Not included.** The transmitter (repetition encoder, interleaver, spreader),
  the channel and any outer code (such as LDPC) are not part of the receiver RTL.
  The testbench package models the transmitter and the channel.

## Simulation

Every testbench is self-checking. It ends with a line
`TB_RESULT checks=<n> failures=<m>` and has a watchdog. Example with plain
Verilator (5.x):

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv -Irtl -Itb \
    rtl/ps_cdma_pkg.sv tb/ps_tb_pkg.sv tb/tb_ps_cdma_demod.sv --top-module tb_ps_cdma_demod
./obj_dir/Vtb_ps_cdma_demod
```

| Testbench | What it shows |
|---|---|
| `tb_ps_cdma_demod` | Full default size (K = 50, N = 64, M = 4, L = 64). A random frame goes through the reference transmitter with Gaussian-like noise (σ = 12 LSB per chip), then 8 iterations run. At this load the matched-filter-only iteration makes about 13 % errors, and later iterations reach zero errors (in about 5 iterations). The test also checks the symbol order, the exact cycle count and back-pressure. It counts skipped and active cancellation, corrected decisions, matched-filter saturation and weight updates. It runs in well under a second. |
| `tb_ps_cdma_scaled` | The same test on a system of half the size at about the same load (K = 24, N = 32, load 0.75, same symbol SNR). The error rate of the first iteration is similar (about 12 %), and the frame again converges to zero errors. The error rate depends on the load K/N, not on the absolute size. |
| `tb_user_receiver` | One user alone, noise-free. After the first iteration every chip estimate must equal the transmitted chip. |
| `tb_matched_filter`, `tb_partition_estimator`, `tb_variance_est`, `tb_tanh_lut`, `tb_k_adder_tree` | Arithmetic checked against real-valued or integer models, including saturation and latency. |
| `tb_lfsr`, `tb_interleaver_addr` | Sequence against its recurrence; addresses against the polynomial evaluated directly, plus a permutation check. |
| `tb_rx_chip_mem`, `tb_part_mem`, `tb_iter_controller` | Memory behaviour; pass order, counts and cycle count of the schedule. |

`tb/ps_tb_pkg.sv` holds the reference models, which are written independently of
the RTL. It evaluates the spreading sequence from its recurrence and the
interleaver from its polynomial. It also models the transmitter and an
additive-noise channel, approximating Gaussian noise with a sum of twelve uniform
draws.
