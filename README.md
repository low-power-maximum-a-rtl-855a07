# Traceback MAP decoder for double-binary turbo codes

A MAP (BCJR) decoder needs, for every symbol, the forward state metrics
(alpha) and the backward state metrics (beta) at the same time. Because one
set is computed in the opposite time order from the other, a conventional
decoder stores one of them, eight state metrics per trellis stage, in a state
metric cache (SMC), and that cache is the largest power consumer of the
decoder.

This design stores less and recomputes the rest. Each add-compare-select
unit (ACSU) also outputs the *differences* between its candidates. From one
state metric and its three stored differences, a small traceback unit (TBU)
can run the ACSU backwards and recover all four candidates exactly. With two
well-chosen states per stage, six stored differences are enough to rebuild
all eight state metrics of the previous stage. The SMC therefore holds six
difference metrics per stage instead of eight state metrics. There is no
reversibility check, flag cache or path selection: the traceback is always
exact.

The RTL is a complete SISO (soft-in soft-out) decoder for one window of `L`
double-binary (DB) symbols of an 8-state code like the WiMAX convolutional
turbo code (CTC). It takes soft channel values and a priori LLRs, and gives
a posteriori LLRs, extrinsic LLRs and hard decisions. Both published
traceback structures are available: radix-2\*2 (cheaper) and radix-4
(shorter critical path). They give bit-identical results.

## Why the traceback is exact

An ACSU adds four branch metrics to four state metrics. That gives the
candidates A, B, C and D. The unit outputs their maximum plus a log-MAP
correction. The correction is a function of the stored differences only.

*Radix-2\*2* (`acsu_r22`, `tbu_r22`). This is a tree of three radix-2
compare-select stages. It stores

    Diff0 = A - B,   Diff1 = C - D,   Diff2 = max(A,B) - max(C,D)

To trace back, the TBU recomputes the correction from the three differences
and subtracts it. That gives the maximum. The sign of Diff2 says which pair
won. The winning pair's maximum is the value itself, and the other pair's
maximum is found by adding or subtracting Diff2. The signs of Diff0 and
Diff1 then do the same inside each pair. Subtracting the branch metrics
returns the four previous state metrics. No comparison is repeated: the
sign bits steer the muxes, so the TBU has none of the ACSU's
sign-then-compare chain.

*Radix-4* (`acsu_r4`, `tbu_r4`). A comparator makes all six pairwise
subtractions in parallel and produces two select bits. `s0` says the C/D
pair holds the maximum, and `s1` picks the larger member of the winning
pair. The stored differences are all relative to A:

    Diff0 = A - B,   Diff1 = A - C,   Diff2 = A - D,   plus s0, s1

The TBU uses `s1`/`s0` to pick the difference between A and the winner (0,
Diff0, Diff1 or Diff2). Adding it to the maximum gives A. B, C and D then
follow from A in parallel. This costs four more bits per stage, but the
paths are shorter and balanced.

All metric arithmetic is `W`-bit two's complement that wraps around (modulo
normalisation). Every operation of the TBU is the exact inverse of the ACSU
operation modulo 2^W, so the regenerated metrics are bit-identical to the
ones that were consumed. This holds even when the metrics wrap. A difference
metric has the same width as a state metric.

## Anchor states: eight metrics from two TBUs

In the 8-state DB trellis every state has four predecessors, one per input
pair z = {A,B}, and four successors. The code used here has this property:
the predecessor set of a state depends only on `n2 ^ n3` of that state, so
two states with different `n2 ^ n3` have disjoint predecessor sets that
together cover all eight states. Only the ACSUs of these two *anchor* states
have their differences stored.

* Forward recursion: the anchors are states 0 and 1.
* Backward recursion: the anchors are states 0 and 4, because the successor
  set depends on `s1 ^ s2`.

A traceback recursion processor (`trp`) holds two TBUs. Each TBU starts from
the current metric of one anchor and writes the metrics of that anchor's
four neighbours.

The trellis (`map_pkg`), with state `{s1,s2,s3}` and input `{A,B}`:

    f  = A ^ B ^ s1 ^ s3
    next state = {f, s1 ^ B, s2 ^ B}
    Y = f ^ s2 ^ s3,   W = f ^ s3

This is a duo-binary recursive code of the WiMAX type. The polynomials are
this design's choice, not the standard's. Replacing them means changing
`next_state`, `prev_state`, `parity` and `anchor` in `map_pkg`. The
replacement must keep the partition property above.

## The window schedule

`map_decoder` has two mirrored paths, as in the block diagram of the
architecture:

| | upper path (`_a`) | lower path (`_b`) |
|---|---|---|
| BMU + NRP | forward (alpha) recursion from symbol 0 | backward (beta) recursion from symbol L-1 |
| SMC (depth L/2) | stores the alpha differences | stores the beta differences |
| TRP | regenerates beta from the lower SMC | regenerates alpha from the upper SMC |
| LAPO, LEX, HD | decodes symbols L/2 .. L-1 | decodes symbols L/2-1 .. 0 |

*Phase 1*, L/2 cycles: both natural recursion processors (NRPs) run
towards the middle of the window. Each cycle, each SMC receives one stage of
six differences.

*Phase 2*, L/2 cycles: both NRPs keep running past the middle. At the
crossing, each TRP is seeded with the *other* path's NRP metrics: beta at
L/2 for the upper path, alpha at L/2 for the lower path. The TRP then
replays the other path's SMC in reverse. In each cycle the upper path pairs
alpha[k] from its NRP with beta[k+1] from its TRP, and the lower path pairs
alpha[k] from its TRP with beta[k+1] from its NRP. Both paths read the SMC
at the same address, L/2-1-cycle. The traceback step, the LLR, the extrinsic
value and the hard decision are all combinational in that cycle.

So a window of L symbols takes L cycles. Two symbols are decoded per cycle
in phase 2. The NRPs finish with alpha[L] and beta[0], which come out as
`alpha_out` and `beta_out`.

## Arithmetic and widths

| quantity | width | note |
|---|---|---|
| soft channel value (`IN_W`) | 4 | signed, one of the usual 3-/4-bit soft quantisations |
| a priori / extrinsic LLR (`LA_W`) | 6 | signed, extrinsic saturates |
| branch metric (`BM_W`) | 8 | exact for the ranges above |
| state / difference metric (`SM_W`, `W`) | 10 in the decoder, 8 in the stand-alone ACSU/TBU | wraps modulo 2^W |
| LLR | SM_W + 3 | exact |

*Branch metric* (`bmu`). This is a correlation:
`gamma = la[z] + A*ra + B*rb + Y*ry + W*rw`, with `la[0] = 0`. That gives 16
metrics per symbol, indexed `{A,B,Y,W}`, computed on the fly without a
cache.

*Why 10-bit state metrics.* With these inputs the branch metrics of one
symbol spread over up to about 123 LSB. Any state reaches any other in two
stages, so the state metrics spread over at most about 260. ACSU candidates
then differ by less than 2^9, which is what the modulo comparison in 10 bits
needs. The ACSU/TBU unit modules default to 8 bits, the width of the
published unit simulations, and work at any `W`.

*LUT correction.* The value is ln(1+e^-|x|) in units of 0.25: 3 for x = 0,
2 for 1..3, 1 for 4..8, 0 above. It is applied to the final comparison and
to the comparison inside the winning pair. The radix-4 LUT derives the same
two comparisons from its A-relative differences, which is why the two
structures agree bit for bit. Set `USE_LUT = 0` for max-log recursions.

*LAPO* (`lapo`). This uses max-log. It normalises alpha and beta to state 0
(a signed W-bit difference, which is exact), forms the 32 transition sums in
W+2 bits, and outputs `llr[z] = M[z] - M[0]` for z = 1..3. Eight of the sums
are the traced path's TBU candidates A..D (metric plus branch metric, on the
`trp` `sum` port), so for them the LAPO adds only the other side's metric.
Such a candidate is normalised by subtracting state 0's metric, which is
exact while normalised metric plus branch metric stays within +-2^(W-1)
(at most about 380 + 64 for the default widths).
*LEX* outputs `llr - la - systematic` (`ra`, `rb` or `ra+rb`), saturated to
6 bits, without a scaling factor. *HD* picks the z with the largest LLR
(z = 0 counts as LLR 0).

## Interface and timing of `map_decoder`

Parameters:

* `L` = 32: window length; even, at least 4.
* `SM_W` = 10.
* `RADIX4` = 0.
* `USE_LUT` = 1.

Starting and feeding a window:

* A one-cycle `start` while idle loads `alpha_in` and `beta_in` into the
  NRPs. `start` is ignored while `busy`.
* For the next L cycles, `rd_en` is high. The decoder expects symbol
  `rd_idx_a` on `sym_a` and symbol `rd_idx_b` on `sym_b` in the same cycle,
  so an external buffer is read combinationally.
* Each symbol (`sym_t`) carries `ra`, `rb`, `ry`, `rw` and `la[1..3]`.

Results:

* Results are registered. `out_valid` is high for L/2 cycles, starting one
  cycle after phase 2 begins.
* Each valid cycle carries `out_idx_a` and `out_idx_b`, plus `llr_*`,
  `ext_*` and `hd_*` (`{A,B}`) for both paths.
* `done` pulses with the last results, L cycles after the `start` edge.
  `alpha_out` and `beta_out` are valid from then until the next start.

## Files

* `rtl/map_pkg.sv`: widths, `sym_t`, trellis, anchors, LUT.
* `rtl/bmu.sv`, `rtl/nrp.sv`, `rtl/smc.sv`, `rtl/trp.sv`, `rtl/lapo.sv`,
  `rtl/lex.sv`, `rtl/hd.sv`: the blocks of each path.
* `rtl/acsu_r22.sv`, `rtl/tbu_r22.sv`, `rtl/acsu_r4.sv`, `rtl/tbu_r4.sv`:
  the two ACSU/TBU pairs.
* `rtl/map_decoder.sv`: the top, which holds the schedule.
* `tb/map_ref_pkg.sv`: the integer reference model used by the testbenches.
  It has an encoder, predecessor search, the recursion and the correction
  table, and wraps nothing.
* `tb/tb_*.sv`: one self-checking testbench per block. Each prints
  `TB_RESULT checks=N failures=M`.

## Verification

Every block has a self-checking testbench that compares it against the
integer model:

* The ACSU testbenches check the maximum, the differences, and that both
  signs of every difference (and every radix-4 winner) occur.
* The TBU testbenches check the exact inverse, including fully random
  values that wrap.
* The NRP and TRP testbenches use all four direction/radix combinations.
  The TRP test runs a 24-stage chain forward and traces it back.

The end-to-end tests decode six windows back to back:

* The symbols come from the encoder with noise.
* The a priori values are zero in the first window, noisy in the middle
  windows, and confident in the last window (this one saturates the
  extrinsic output).
* Every LLR, extrinsic value, hard decision and border metric must match
  the model exactly. The schedule is checked too: L read cycles, L/2 result
  cycles, and `done` after exactly L cycles.
* Each test counts the architecture's mechanisms and requires each one to
  occur: initial load, cache write, crossing seed, traceback step, both TBU
  sign paths, extrinsic saturation, and `start` ignored while busy. The
  radix-4 test also requires every stored select-bit combination.

The end-to-end tests are:

* `tb_map_decoder`: the default configuration.
* `tb_map_decoder_r4`: the radix-4 structure.
* `tb_map_decoder_maxlog`: `USE_LUT = 0`.
* `tb_map_decoder_l24`: L = 24, the smallest WiMAX frame as one window.

Each runs in seconds. With the encoder-generated data the hard decisions
match the transmitted pairs except for a rare symbol (1 of 192 in a typical
run).

To run a test with Verilator:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
      rtl/map_pkg.sv tb/map_ref_pkg.sv tb/tb_map_decoder.sv \
      --top-module tb_map_decoder -o sim
    ./obj_dir/sim

A coarse yosys synthesis of the default decoder gives about 1.5k word-level
cells, 366 flip-flop bits and 2 x 960 bits of SMC.

## Where this design departs from, or goes beyond, the published architecture

* **The LAPO reuses the TBU candidates but saves no adder.** The published
  idea feeds the TBU's A..D into the LAPO to save eight adders. Here the
  metrics wrap and are normalised before adding, and normalising a reused
  candidate takes one subtraction, in place of the branch metric addition
  it saves.
* **Diff1 of the radix-2\*2 ACSU is C - D**, the comparison inside the
  lower pair. The TBU needs exactly this value to rebuild C and D.
* **Chosen by this design:**
  * the trellis polynomials;
  * the branch metric formula;
  * the LUT contents;
  * the LAPO (max-log), LEX and HD equations;
  * all widths except the 8-bit unit width;
  * L = 32;
  * the asynchronous-read register-file SMC;
  * reset values;
  * the external symbol-buffer interface.
* **Not built:**
  * the conventional decoding mode without TRPs and the sub-banked
    "reverse computation" cache, which are only baselines;
  * the turbo-level loop: the second SISO decoder, the interleaver and
    deinterleaver, the iteration control and the final decision;
  * the handling of border metrics across windows and iterations for
    circular (tail-biting) frames. One operation decodes one window with
    the given `alpha_in`/`beta_in`; a 2400-couple WiMAX frame needs 75
    such windows, sequenced outside this RTL.
  * a memory of encoded border metrics for circular frames, which would
    replace dummy recursions at window borders. `alpha_in`/`beta_in` and
    `alpha_out`/`beta_out` are the hooks for it.
* **Power and gate count** of the two structures depend on a cell library
  and were not measured.
