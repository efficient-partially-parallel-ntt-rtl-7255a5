# Partially-parallel NTT processor and NTT polynomial multiplier

Lattice-based cryptosystems spend most of their time multiplying polynomials
in `Z_q[x]/(x^N + 1)`. With a number theoretic transform (NTT) that product
costs O(N log N) instead of O(N^2). This RTL is a pipelined NTT processor
that takes **P coefficients per clock** (default N = 512, P = 8,
q = 12289, W = 3). Around it sits a complete polynomial multiplier.

A P-parallel pipelined NTT needs a way to bring together the two operands of
every butterfly. This design takes P/2 independent two-lane delay-commutator
pipelines (a "multi-path delay commutator", MDC) for the early stages. The
last stages, where the two partners already arrive in the same clock, are
joined by fixed wiring. The result has:

* log2(N) stages of P/2 butterflies, and every butterfly does useful work in
  every clock while frames stream back to back;
* exactly N - P words of delay memory (504 for 512/8);
* a reordering latency of N/P - 1 clocks (63). One pipeline register per
  stage adds log2(N) clocks, so the measured latency is 72.

The forward processor (`ntt_pp_top`) is the core of the design. The
polynomial multiplier (`poly_mult_top`, the top level) adds the psi
weighting of the negative-wrapped convolution, a pointwise product, and an
inverse processor (`intt_pp`). The inverse processor is the forward pipeline
run backwards.

## What is computed

Forward transform, for one frame of N coefficients:

    A_k = sum_{j=0}^{N-1} a_j * W^(j*k)  mod q          (W a primitive N-th root of unity)

It is a radix-2 decimation-in-frequency (DIF) transform. The result leaves
in bit-reversed order, which the inverse takes as it is.

Polynomial product, `c = a * b mod (x^N + 1)`:

    a'_i = a_i * psi^i,  b'_i = b_i * psi^i               (psi^2 = W, psi of order 2N)
    C    = NTT(a') . NTT(b')                              (pointwise)
    c_i  = N^-1 * psi^-i * INTT(C)_i

The psi weighting turns the cyclic convolution of the NTT into the
negacyclic one, so no zero padding is needed. With q = 12289 and W = 3,
psi = 1321.

## Stages and pair bits

Number the samples of a frame by their flow-graph index i (n = log2 N bits).
Stage s (1..n) applies butterflies to pairs whose indices differ only in bit
n-s: first bit 8 (distance 256), then bit 7, ..., finally bit 0. Stage s
multiplies the difference by W^e, where e = (i mod 2^(n-s)) * 2^(s-1) and i
is the upper index.

In each clock a stage receives P words on P lanes. Lanes 2k and 2k+1 are the
upper and lower inputs of PE k. The whole problem is to present, in every
clock, P words that form P/2 valid pairs for the stage. Every stage must see
a different pairing, so the words are reordered between stages.

## Port order, and the 16-point example

Take the small configuration N = 16, P = 4 (q = 17, W = 3). Each frame is
4 clocks of 4 words. The table shows which flow-graph index sits on which
lane when it enters each stage (lanes 0..3 in each cell):

| clock | stage 1 input | stage 2 input | stage 3 input | stage 4 input = output positions |
|-------|---------------|---------------|---------------|-----------------|
| 0     | 0 8 1 9       | 0 4 1 5       | 0 2 1 3       | 0 1 2 3         |
| 1     | 2 10 3 11     | 2 6 3 7       | 4 6 5 7       | 4 5 6 7         |
| 2     | 4 12 5 13     | 8 12 9 13     | 8 10 9 11     | 8 9 10 11       |
| 3     | 6 14 7 15     | 10 14 11 15   | 12 14 13 15   | 12 13 14 15     |

In every cell, lanes (0,1) and (2,3) differ only in the stage's pair bit.

* **Input order** (all configurations): lane 2k+u at frame clock t carries
  coefficient `t*(P/2) + k + u*N/2`. PE pipeline k handles the coefficients
  with `i mod (P/2) = k`. Its upper lane takes them from the first half of
  the polynomial and its lower lane from the second half.
* **Output order**: lane l at clock t carries position `t*P + l` of the
  flow graph, which holds `A[bitrev_n(t*P + l)]`.
* The polynomial multiplier takes `a`, `b` and returns `c` in the
  *input* order. It has no bit-reversal stage anywhere.

## Reordering in the front: delay commutators

Let m = n - p + 1 (p = log2 P); m = 7 for 512/8. In stages 1..m the pair
distance is a multiple of P/2, so both partners live in the same two-lane
pipeline. Pipeline k is then a 2-parallel MDC transform of 2N/P points.
Between stages s and s+1 (s < m) each pipeline has a **delay commutator**
(`mdc_commutator`) with L = 2^(m-s-1):

1. delay the lower lane by L clocks,
2. a 2x2 switch exchanges the upper word and the delayed lower word,
3. delay the upper lane by L clocks.

The switch crosses when bit log2(L) of the frame position of the upper word
is 1. In index terms the commutator swaps "which lane" with one bit of "which
clock". Words on the right lane and in the right half wait L clocks on one
side. The others are exchanged with a partner L clocks away. Every word
leaves exactly L clocks after it arrived.

In the 16-point table, the commutators between stages 1/2 and 2/3 have
L = 2 and L = 1. The L = 2 one exchanges lane 1 of clock 0 with lane 0 of
clock 2 (8 with 4), and lane 3 of clock 0 with lane 2 of clock 2 (9 with 5).
For 512/8 the delays are 32, 16, 8, 4, 2, 1 in each of the 4 pipelines. That
is 2 x 63 words per pipeline and N - P = 504 words in all.

## Reordering in the rear: fixed lane permutation

From stage m on, the pair distance is below P/2. Both partners of every
future pair already arrive in the same clock, only on different PEs. The
reordering between stages s and s+1 (s >= m) is then pure wiring
(`hardwired_shuffle`). It exchanges bit 0 and bit D = n-s of the lane
number. In the table that is the swap of lanes 1 and 2 between stages 3 and
4. For 512/8 there are two such permutations (D = 2, then D = 1).

Because both reordering kinds are involutions (a bit exchange), the inverse
transform reuses the same modules.

## Processing element and modular arithmetic

`ntt_pe` has one butterfly, one multiplier and three modular reduction
units:

    x = (a + b) mod q                        mod_add_sub (one conditional -q)
    y = ((a - b) mod q) * w mod q            mod_add_sub (one conditional +q), multiplier, barrett_reduce

`barrett_reduce` uses `MU = floor(2^(2*DW)/q)` (21843 for q = 12289). For any
x < 2^(2*DW) its quotient estimate is at most one low, so one conditional
subtraction completes it. The PE registers its outputs, so each stage has one
clock of latency.

Twiddle factors come from a constant table per PE (`ntt_twiddle_rom`, N/P
entries). The table is computed at elaboration from N, P, q and W and is
addressed by a frame-position counter in the stage. Changing the modulus or
the root needs no data file.

The inverse uses `intt_pe`, a decimation-in-time (DIT) butterfly:
`a = x + y*v`, `b = x - y*v` with `v = w^-1`. It undoes the forward butterfly
up to a factor 2. The factor N of all stages is removed in the output
weighting, `N^-1 * psi^-i`.

## Framing and timing

* `in_valid` qualifies a clock of P words. A frame is **N/P consecutive
  valid clocks**. Frames may follow back to back (full throughput) or with
  any gap between them. A gap inside a frame is not allowed;
  `mdc_commutator` asserts this rule.
* Every position counter counts valid clocks modulo N/P. After reset the
  first valid clock starts a frame.
* Delay lines shift every clock, and each valid bit travels with its words.
  The tail of the last frame therefore drains without further input.
* Latencies, first input word to first output word:

| block | latency (clocks) | 512/8 |
|-------|------------------|-------|
| `ntt_pp_top`, `intt_pp` | N/P - 1 + log2 N | 72 |
| `coef_scaler`, `pointwise_mult` | 1 | 1 |
| `poly_mult_top` | 2(N/P - 1 + log2 N) + 3 | 147 |

* Throughput is one transform, or one polynomial product, every N/P clocks.
* Reset (`rst`) is synchronous and active high. It clears the valid bits and
  the counters, not the data registers.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `N`  | 512   | transform length, power of two |
| `P`  | 8     | words per clock, power of two, 2 <= P < N |
| `Q`  | 12289 | prime modulus, q = 1 mod 2N |
| `W`  | 3     | primitive N-th root of unity mod q |
| `PSI`| 1321  | (multiplier only) primitive 2N-th root, PSI^2 = W |
| `DW` | 14    | coefficient width, >= ceil(log2 q) |

The defaults live in `ntt_pkg`. P = 2 gives a plain 2-parallel MDC pipeline
with no shuffles. Growing P moves stages from the commutator part to the
wired part. For other N, q must satisfy q = 1 mod 2N, and W and PSI must have
orders N and 2N.

Resources for the default forward processor: 36 PEs, i.e. 36 multipliers
and 108 reduction units; 504 delay words of 14 bits; 36 twiddle tables of 64
words. The polynomial multiplier contains two forward processors, one
inverse processor, 8 pointwise multipliers and 24 weighting multipliers.

## Where this RTL departs from, or adds to, the architecture

* **Latency.** The architecture's latency figure, N/P - 1, counts only the
  commutator delays. The PE output registers add log2 N clocks here (72
  instead of 63). Their placement, and whether a PE needs more pipelining
  for a target clock, is unverified: no timing analysis has been done.
* **Port order, framing, counters, reset** are this design's choices. The
  port order follows from the pair structure and the stated composition
  (P/2 independent MDC pipelines in front).
* **Modular reduction** uses Barrett with one correction for products and a
  single conditional add/subtract after the butterfly. The architecture
  leaves the reduction method to the implementer.
* **Twiddle storage** is one constant table per PE. The architecture does not
  say how twiddles are produced.
* **Polynomial multiplier.** The architecture places the NTT in a multiplier
  with DIF forward transforms, a pointwise product and a DIT inverse
  transform, but it describes only the forward processor in detail. The
  inverse here is the mirror of the forward pipeline. Two forward processors
  (one per operand) and folding N^-1 into the psi^-i weights are this
  design's choices.
* **Not modelled:** the gate count, clock rate and hardware-efficiency
  figures of a 180 nm synthesis. Nothing here depends on a process.

## Files

`rtl/` (one module or package per file):

| file | role |
|------|------|
| `ntt_pkg.sv` | defaults; elaboration-time functions (modular power, index maps, twiddle exponents, shuffle map) |
| `mod_add_sub.sv` | reduction after the butterfly adder / subtractor |
| `barrett_reduce.sv` | reduction after a multiplier |
| `ntt_pe.sv` / `intt_pe.sv` | DIF / DIT processing element |
| `ntt_twiddle_rom.sv` | per-PE twiddle table (forward or inverse) |
| `ntt_stage.sv` / `intt_stage.sv` | P/2 PEs, frame counter, twiddle tables |
| `delay_line.sv` | shift-register delay |
| `mdc_commutator.sv` | front reordering: delay, switch, delay |
| `hardwired_shuffle.sv` | rear reordering: lane permutation |
| `ntt_pp_top.sv` | forward partially-parallel NTT processor |
| `intt_pp.sv` | inverse processor |
| `pointwise_mult.sv` | P lanes of modular products |
| `coef_scaler.sv` | psi^i or N^-1 psi^-i weighting |
| `poly_mult_top.sv` | polynomial multiplier, top level |

`tb/` has one self-checking testbench per block (`tb_<module>.sv`) plus:

* `ntt_pp_driver.sv`, `poly_mult_driver.sv`: shared stimulus and checkers.
  They compare against a direct O(N^2) transform and the schoolbook
  negacyclic product, check latency and back-to-back throughput, and count
  the commutator swaps, back-to-back frames and frames after a gap.
* `tb_ntt_pp_top.sv`: the 16-point example (q = 17).
* `tb_ntt_pp_full.sv`: the forward processor at the defaults.
* `tb_ntt_pp_n512_p4.sv`, `tb_ntt_pp_n512_p16.sv`: 512 points at P = 4 and
  P = 16.
* `tb_poly_mult_top.sv`: the polynomial multiplier at N = 16, q = 12289.
* `tb_poly_mult_full.sv`: the polynomial multiplier at the defaults, three
  512-coefficient products.

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself
through a watchdog if the design hangs.

## Simulating

With Verilator 5, from the repository root. The package goes first, and
`-I` lets Verilator find the other modules by file name:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
        rtl/ntt_pkg.sv tb/tb_poly_mult_full.sv --top-module tb_poly_mult_full
    ./obj_dir/Vtb_poly_mult_full

Swap in any other testbench name. The full-size multiplier run takes about
half a minute, and the smaller ones a few seconds. Lint one module with

    verilator --lint-only -Wall -Irtl rtl/ntt_pkg.sv rtl/poly_mult_top.sv

The only lint warnings left are the package defaults that a given
module does not use.

## How far it has been checked

* Every block has a self-checking testbench. Each testbench also fails on a
  deliberately broken copy of its block.
* The forward processor is checked bit-exactly against a direct transform
  for N = 16/P = 4 (q = 17), and for N = 512 with P = 4, 8 and 16
  (q = 12289). The checks include latency and back-to-back throughput.
* The inverse processor is checked against a direct transform for
  N = 64/P = 8.
* The polynomial multiplier is checked against the schoolbook negacyclic
  product at N = 16 and at the full N = 512/P = 8. The checks include the
  wrap-around case x^(N-1) * x = -1 and all-(q-1) operands.
* Assertions, active in every simulation, check that the P/2 butterflies of
  a stage and the P/2 commutators between two stages stay in lock step, that
  the two forward transforms of the multiplier do too, and that no frame is
  interrupted.
* Not checked: timing closure, and gate count after synthesis.
