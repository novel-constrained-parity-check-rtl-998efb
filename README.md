# Constrained parity-check code receiver for high-density blue-laser discs

A blue-laser disc read channel makes a handful of short, typical bit errors
at the Viterbi detector output: a transition shifted by one bit, or a short
alternating burst. This design adds four parity bits to every 406-bit
channel codeword so that such errors can be *detected*, and then *locates*
and undoes them with a post-processor that compares a few likely error
events against the detector input samples. The parity is built into a d=1
run-length-limited code, so it costs very little rate (overall rate
277/406 = 0.6823 instead of 2/3 for the standard 17PP code).

This repository holds synthesizable SystemVerilog for the receiver side
(Viterbi detector, parity check, double-error-event post-processor) and
for the encoder's parity-check unit, with self-checking testbenches.

## The code in brief

- Channel bits are NRZ. The d=1 constraint means every run of equal bits
  is at least two bits long.
- A codeword is N = 406 bits: K = 30 "normal constrained" (NC) codewords of
  13 bits (rate 9/13, 5-state, d=1, k=18) followed by one 16-bit
  "parity-related constrained" (PRC) codeword (rate 7/16). 30 × 9 + 7 = 277
  user bits.
- Parity check: generator polynomial g(x) = 1 + x + x^4. The whole 406-bit
  codeword, read first bit first as a polynomial r(x), must satisfy
  r(x)·x^4 mod g(x) = 0.
- The encoder gets there by splitting the job: the parity-check unit
  computes the parity p1 of the NC bits u1 followed by 16 zeros, and the PRC
  encoder picks a 16-bit PRC word u2 whose own parity equals p1. Since parity
  is linear, [u1 | u2] then has zero parity.

The NC and PRC code tables (and therefore the NC/PRC encoders and the
constrained decoder) are not part of this RTL; only the parity-check unit of
the encoder is.

### Why g(x) = 1 + x + x^4 catches the dominant errors

Error events are written as the difference detected − true in bipolar
(±1) terms. In GF(2) each one is a set of bit flips:

| event | flipped bits | e(x) | e(x) mod g(x) |
|---|---|---|---|
| ±{2} | m | 1 | 1 |
| ±{2,0,−2} | m, m+2 | 1 + x² | 1 + x² |
| ±{2,0,−2,0,2} | m, m+2, m+4 | 1 + x² + x⁴ | x + x² |
| ±{2,0,−2,0,2,0,−2} | m, …, m+6 | 1 + x² + x⁴ + x⁶ | x + x³ |

None is divisible by g(x), and g(x) is primitive (x has order 15), so every
shift of every event leaves a nonzero syndrome. The syndrome of an event at
codeword position p (0 = first bit) is e(x)·x^(N+3−p−(len−1)) mod g(x), i.e.
the XOR of x^((N+3−q) mod 15) mod g(x) over the flipped positions q. The
post-processor tracks the exponent (N+3−q) mod 15 with a down-counter.

## Receive chain

```
rx_y ──► pr_viterbi ──bits──► pc_syndrome_check ──syndrome──┐
            │   └─────────────bits─────────────────────────►│
            └──── delayed sample + start flag ─────────────►pp_double_event ──► corrected bits
```

`bd_pc_top` wires these together and also holds `pc_encoder_parity` with its
inputs and outputs brought out as ports (its neighbours, the NC and PRC
encoders, are outside this RTL).

### pr_viterbi

A 64-state Viterbi detector for a 7-tap partial-response target (states are
the last six bits). States containing an isolated bit are unreachable under
d=1 and are never selected, so the trellis only produces d=1 sequences.
Branch metric (y − ŷ)², add-compare-select with wrap-around 24-bit path
metrics, register-exchange survivors of depth 48, decision from the state
with the smallest metric. A side channel (the sample and its start-of-
codeword flag) is delayed by the same 47 samples so that the following
blocks see each decision together with its own input sample.

The tap values are not known from the original proposal (it only calls
the target "7-tap optimized"); the default `{4, 8, 12, 16, 12, 8, 4}` is a
symmetric low-pass stand-in. Change `DEF_TAPS` in `pc_pkg` (or the `TAPS`
parameters) to the equalizer's real target. Sample scale: 8-bit two's
complement in the same units as the taps.

### pc_syndrome_check

A 4-bit division register for g(x); after the last bit of each codeword it
reports the syndrome and a violation flag, one clock later.

### pp_double_event — the post-processor

This is the part worth reading closely.

**Residual and matched filters.** With s_k = ±1 the decided bits, the
residual is r_k = y_k − Σ h_i s_(k−i). For error type t (pattern p_t, length
2t+1) the filtered event is g_t = h * p_t, at most 13 samples long. The
polarity of an event starting at bit m is forced by the decided bit there,
so undoing it changes the squared distance to the samples by −4·λ with

    λ_t(m) = −s_m · Σ_k r_(m+k) g_t(k) − Σ_k g_t(k)²

λ is a matched-filter output minus the event energy; larger λ means a more
likely event. All four filters are evaluated for every bit position, 13
samples after the bit arrives (the longest filtered event).

**Screening.** A candidate is admitted only if the decided bits have the
polarity the event needs (the flipped bits alternate), the corrected bits
still have no run of length one, and the event ends inside the codeword.

**Candidate lists.** Each filter keeps the NCAND = 4 largest λ of the
codeword in a sorted list (shift-insert, one candidate per filter per
clock), each with its position and syndrome.

**Search.** When the window passes the last bit of a codeword, the 16
candidates are frozen and the codeword's syndrome S is latched. A nonzero S
starts a serial search, one step per clock, over all 16 singles and 120
pairs (136 clocks). A single qualifies if its syndrome equals S; a pair if
the XOR of its syndromes equals S and more than 6 error-free bits (the
channel memory) lie between the two events. Because such events' filtered
versions cannot overlap, a pair's distance change is exactly λ₁ + λ₂, so
"largest score" is "smallest Euclidean distance". The best qualifying single
or pair wins (with `MAX_EV = 1` pairs are never admitted, giving the classic
single-event post-processor). Zero syndrome means nothing is corrected; if nothing
qualifies, the codeword passes uncorrected and `dec_fail` is raised.

**Correction.** Decided bits (with their start flags) go through a
1024-entry delay line and leave D = N + 13 + 136 + 8 = 563 samples later; on
the way out, the bits of the chosen events are inverted. A two-stage
decision register (pending/active) lets the next codeword's search finish
while the current one is still being read out. The output advances only
with input samples, so a stream must be followed by ≥ D flush samples.

Constraints: the search must finish within one codeword, so N must be at
least 13 + 136 + 8 = 157 with the default NCAND; an assertion flags a new
codeword end arriving while a search is still running.

Note that the choice is maximum-likelihood among the candidates only: when
the detector errs, the true correction *increases* the distance slightly,
and a wrong single event whose syndrome happens to match can beat a correct
pair. This is inherent in the scheme, not a bug; the end-to-end test
therefore only expects a correction where the true events are the unique
minimum-distance choice.

## Parameters

| parameter | default | where it comes from |
|---|---|---|
| N (codeword bits) | 406 | original proposal |
| g(x) | 1 + x + x⁴ | original proposal |
| I1 / I2 (NC bits / PRC bits) | 390 / 16 | derived from N and the 7/16 PRC code |
| target taps | {4,8,12,16,12,8,4} | own choice (7 taps from the proposal) |
| Y_W (sample width) | 8 | own choice |
| DEPTH (survivor length) | 48 | own choice |
| NCAND (candidates per filter) | 4 | own choice ("several") |
| MEM (pair separation) | 6 | channel memory of a 7-tap target |
| MW (metric width) | 24 | own choice |
| MAX_EV (events per codeword) | 2 | original proposal (double-event correction); 1 gives the single-event scheme it is compared with |

Latency through `bd_pc_top` with continuous input: a sample's corrected bit
appears DEPTH + D + 1 = 612 clocks after the sample is accepted.

## Departures and open points

- NC encoder, PRC encoder and constrained decoder are absent (their code
  tables come from earlier work and are not available here). The testbenches
  stand in for the encoder by drawing random d=1 codewords with zero parity.
- The original block diagram draws the parity check between the detector
  and the post-processor; here the detector bits feed both blocks directly,
  which carries the same information.
- The detector trellis and the post-processor's screening enforce only the
  minimum run length (d=1); the code's maximum run length (k=18) is left to
  the decoder and not checked.
- Sorting uses λ (distance reduction) rather than raw filter magnitude, so
  that the final minimum-distance step is exact and needs no second pass
  over the samples.
- The Viterbi target, widths, survivor depth, candidate count and
  interfaces are this design's choices and should be set for a real channel.

## Files

| file | contents |
|---|---|
| `rtl/pc_pkg.sv` | constants (N, g(x), target, event patterns) and shared functions |
| `rtl/pr_viterbi.sv` | d=1 Viterbi detector |
| `rtl/pc_syndrome_check.sv` | receiver parity check |
| `rtl/pc_encoder_parity.sv` | encoder parity-check unit |
| `rtl/pp_double_event.sv` | post-processor |
| `rtl/bd_pc_top.sv` | top level |
| `tb/tb_pc_ref_pkg.sv` | reference models: parity by position, d=1 codeword generator, channel, events |
| `tb/tb_*.sv` | one self-checking testbench per block, `tb_bd_pc_top` end to end, `tb_bd_pc_ber` error-rate run |

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops on its
own (with a watchdog). With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_bd_pc_top \
  -y rtl -y tb +libext+.sv rtl/pc_pkg.sv tb/tb_pc_ref_pkg.sv tb/tb_bd_pc_top.sv
./obj_dir/Vtb_bd_pc_top
```

Replace `tb_bd_pc_top` with `tb_pr_viterbi`, `tb_pc_syndrome_check`,
`tb_pc_encoder_parity` or `tb_pp_double_event` for the block tests. All run
at the default sizes in seconds.

What the tests cover:

- `tb_pc_syndrome_check`: random and zero-parity codewords, with and without
  injected events, gaps in the valid stream; syndrome against a
  position-by-position reference, one-clock latency.
- `tb_pc_encoder_parity`: parity of 390 random bits plus 16 zeros; that a
  16-bit word with equal parity completes a zero-parity codeword.
- `tb_pr_viterbi`: 4000 bits of d=1 data with noise, then with samples pushed
  towards injected error events; every decision and its 47-sample delay.
- `tb_pp_double_event`: 16 codewords with none, one, or two separated events;
  bit-exact output, event count, 563-sample delay.
- `tb_bd_pc_top`: 20 codewords through detector, parity check and
  post-processor; the channel samples are displaced so that the detector
  really makes the injected errors. A reference in the testbench checks
  that the injected events are the unique minimum-distance choice
  among all admissible singles and pairs, and that each ranks within the
  four best of its type. The test then requires bit-exact recovery, the
  right parity flags and event counts, the 612-clock latency, the encoder
  unit's parity, and that clean codewords, parity violations, single and
  double corrections all occur.

- `tb_bd_pc_ber`: 180 codewords through the whole chain with white
  Gaussian noise, 60 each at σ = 9, 8 and 7 sample units. A second
  post-processor with `MAX_EV = 1` runs on the same detector stream. It
  checks every parity flag against the detected codeword, that correctly
  detected codewords pass unchanged, that post-processing does not increase
  bit or codeword errors at any noise level and reduces them overall, and
  that the double-event post-processor leaves no more wrong codewords than
  the single-event one. A typical run (BER / wrong codewords of 60):

  | σ | detector | double-event (MAX_EV = 2) | single-event (MAX_EV = 1) |
  |---|---|---|---|
  | 9 | 3.2·10⁻³ / 27 | 2.3·10⁻³ / 9 | 2.5·10⁻³ / 11 |
  | 8 | 2.9·10⁻³ / 21 | 2.5·10⁻³ / 8 | 2.6·10⁻³ / 9 |
  | 7 | 5.3·10⁻⁴ / 4 | 3.3·10⁻⁴ / 1 | 3.3·10⁻⁴ / 1 |

  Most flagged codewords are repaired; the remaining ones are mostly
  miscorrections, where a wrong event with a matching syndrome was closer to
  the samples, which is why the bit error rate falls less than the codeword
  error rate. These runs are far too short for the low error rates at which
  disc systems are compared, and use the stand-in target, not an optical
  channel model.

Not verified: behaviour on a real optical (blue-laser) channel model with
its equalizer, and error rates at the operating SNR over the long runs
needed to compare with other codes.
