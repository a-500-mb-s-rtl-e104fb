# Eight-state soft-output Viterbi decoder, one bit per clock

A soft-output Viterbi decoder (SOVA) delivers each decoded bit together with a
measure of how far it can be trusted. Iterative (turbo) receivers need those
soft values. This RTL implements a fully parallel eight-state SOVA that decodes
one bit every clock cycle. It comes in two trellis labellings that share the
same hardware:

* **SOVA_EPR4** is matched to a magnetic-recording EPR4 channel,
  `1 + D - D^2 - D^3`, with a `1/(1 xor D)` precoder in front of it.
* **SOVA_13** is matched to the feed-forward Octal(13) convolutional code,
  `1 xor D^2 xor D^3`.

Each output is a seven-bit sign-magnitude word. The sign is the decided bit.
The six-bit magnitude is the difference in path metric between the best path
and the best path that decides the bit the other way. It is an approximate
log-likelihood ratio, saturated at 63 (`111111`).

The architecture follows a published 0.18-um test-chip design that reached
500 Mb/s. That design specifies the block structure, the CSA transformation,
the register-exchange survivor memory, the XOR-based equivalence test and the
reliability pipeline. The metric formats, the alignment of the pipelines and
a few other details are choices of this implementation. They are listed
under [Departures and own choices](#departures-and-own-choices).

## Block diagram

```
 sample, apriori
      |
  sova_bmg ---- 16 branch metrics
      |
  sova_csa_array (8 x sova_csa) --- dec[8] -----+------------------------+
      |            |                            |                        |
      | metric[8]  +-- delta[8] --+        sova_smu (L cols)       sova_fifo (L+1)
      |                           |             ^      |                 |
  sova_best_state --- best -------|-------------+      | ml_state (3b)   dec_d[8]
                                  |                    |                 |
                         sova_fifo (L+1)               |            sova_ped (M)
                                  | delta_d[8]         |                 | eqbar[8][M]
                                  +--> mux[ml_state] <-+-> mux[ml_state] +
                                            |                    |
                                            +---> sova_rmu (M) <-+  <- hard bit
                                                       |
                                               soft_out (7 bits)
```

| Module | Role |
|---|---|
| `sova_pkg` | widths, types, `code_e`, trellis helper functions |
| `sova_bmg` | branch metrics for one symbol (16 branches) |
| `sova_csa` | one transformed compare-select-add unit |
| `sova_csa_array` | eight CSAs wired as the radix-2 trellis |
| `sova_best_state` | index of the smallest path metric (registered) |
| `sova_smu` | L-step register-exchange survivor memory, gives the ML state |
| `sova_fifo` | flip-flop delay line for decisions and metric differences |
| `sova_ped` | M-step register exchange with XORs (path equivalence) |
| `sova_rmu` | M-stage pipelined minimum (reliability) |
| `sova_decoder` | one complete decoder, `CODE` selects EPR4 or Octal(13) |
| `sova_chip` | top: the two decoders side by side |

## The trellis

Both codes have memory 3, so the trellis has eight states. Each state is a
three-bit shift register of trellis bits. The oldest bit is in the MSB:
`s(t) = {b[t-3], b[t-2], b[t-1]}`. The branch that shifts in bit `a` goes from
`p` to `((p << 1) | a) & 7`. State `j` is therefore reached from
`{0, j[2:1]}` and `{1, j[2:1]}`; for example, states 0 and 4 feed states 0
and 1.

The decision of a state is the MSB of the predecessor it kept, which is the
trellis bit leaving the register. Three consecutive decisions along a path
spell out one state. The survivor memory uses this to give a three-bit state
from a decision-only register exchange.

* **EPR4.** The trellis bits are the precoded channel bits `a`. The noiseless
  output of a branch is `a + a1 - a2 - a3` in +-1 form. The decoded user bit
  is `u[t] = a[t] xor a[t-1]`.
* **Octal(13).** The trellis bits are the user bits `u`. The code bit of a
  branch is `u xor u2 xor u3`.

## Transformed compare-select-add

A classic add-compare-select (ACS) unit does two additions, a comparison and a
selection in series in every step. That recursion limits the clock rate. The
CSA is a retimed version of it. Its registers hold the *partial sums*
`sm_p(n) + bm_pj(n)` of the two branches entering a state. In one cycle the
unit does three things:

1. compares the two incoming partial sums;
2. at the same time, adds each outgoing branch metric of the next symbol
   (`bm_j,2j(n+1)` and `bm_j,2j+1(n+1)`) to *both* candidates, using four
   adders;
3. selects the two results of the winning candidate with two multiplexers.

The loop then contains only a comparator and a multiplexer. The cost is
twice the adders. The comparison also gives `delta`, the absolute metric
difference between the survivor and the discarded path, saturated to six
bits.

Path metrics are 12 bits wide and wrap around. Two metrics are compared by
the sign of their wrapped difference. This is exact while all metrics stay
within 2048 of each other. The spread is bounded by roughly four branch
metrics plus the start penalty, which is well under that limit.

## Two-stage traceback

The decoder finds two paths:

1. The most likely (ML) path, alpha. An L-step traceback gives the ML
   state `m` at time `t-L`.
2. For every ML state along alpha, the competing path beta that merged into
   it. Beta is discarded at that state with a metric difference `delta_m`.
   It changes the decision of an earlier bit only if it differs from alpha on
   that bit.

The reliability of bit `T` is the smallest `delta_m`, over the next M trellis
steps, among the competitors that flip bit `T`.

### Survivor memory (`sova_smu`)

This is an L-column register exchange of decisions. Every cycle, the decision
of state `i` enters column 1 of row `i` and also selects all multiplexers of
row `i`. The multiplexer in column `k` passes on the column-k register of the
predecessor chosen by that decision. Column `k` of row `i` therefore always
holds the decision found `k` steps back on the survivor of state `i`. A full
traceback is done every cycle, and the critical path is one multiplexer.

The row that is read comes from `sova_best_state`, the state with the
smallest metric. Its last three columns form the ML state at time `t-L`.

### Path-equivalence detector (`sova_ped`)

This is the same register exchange, fed with decisions delayed by L+1 cycles
so that it works at the time of the traced ML state. The two inputs of each
multiplexer are the decisions of the two paths competing for that state. An
XOR of the two inputs tells whether the paths differ at that traceback step.

* Step 1, where the two paths meet, always differs and needs no gate.
* Columns 1..M-1 give steps 2..M.

For Octal(13) the flag of step `j` goes straight to RMU stage `j`. For EPR4 the
rated bit is `a[t] xor a[t-1]`, so the two paths disagree on it only when
exactly one of the two trellis bits differs. Stage `j` then gets the XOR of
the flags of steps `j` and `j-1`.

### ML-state multiplexers

The ML state `m` selects from two sources:

* `delta_m` from the eight metric-difference FIFOs;
* the equivalence vector `eqbar[m]` from the PED.

### Reliability measure unit (`sova_rmu`)

The RMU is M stages of six-bit registers. A bit enters stage 1 at `111111`.
In every cycle `delta_m` is broadcast to all stages, and stage `j` does this:

```
r_j <= (eqbar[j] && delta < r_(j-1)) ? delta : r_(j-1)
```

The bit that sits in stage `j` was decided `j` steps before the current ML
state. The stage therefore applies exactly the competitor that is `j` steps
away from it. After M stages, `r_M` is the bit's reliability. The decided bit
travels in a parallel one-bit pipeline and leaves together with `r_M`:

* Octal(13): the bit is the MSB of the previous ML state.
* EPR4: the bit is the XOR of the MSBs of the previous and current ML states.

### Alignment and latency

With decision vector `D[t]` leaving the CSA array in a given cycle:

* the SMU holds tracebacks from time `t`, and `ml_state` is the state at
  `t-L`;
* the decision and delta FIFOs are L+1 deep, so in the same cycle they
  deliver `D[t-L-1]` and `delta[t-L-1]`: the step that entered that state;
* the PED registers hold the histories of the two paths entering each state
  at time `t-L`.

Latency from the cycle a symbol is applied to the cycle its soft output
appears:

| Code | Latency |
|---|---|
| EPR4 | L + M + 5 |
| Octal(13) | L + M + 6 |

The cycles beyond L + M come from the CSA output register, the three
decisions that make up one state, and the RMU output register. `soft_valid`
rises when the first bit leaves and stays high. There is no stall: one
symbol goes in and one soft bit comes out every cycle.

## Interfaces and formats

`sova_chip` ports (one clock, synchronous active-low reset `rst_n`):

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `epr4_sample` | in | 7 | EPR4 channel sample, sign-magnitude; ideal levels 0, +-16, +-32 |
| `epr4_apriori` | in | 7 | a-priori soft value of the EPR4 user bit (0 if none) |
| `epr4_soft`, `epr4_valid` | out | 7, 1 | SOVA_EPR4 result |
| `oct13_sample` | in | 7 | soft value of one Octal(13) code bit |
| `oct13_soft`, `oct13_valid` | out | 7, 1 | SOVA_13 result |

Soft values are sign-magnitude: bit 6 is the sign and bits 5:0 the magnitude.
A set sign bit means bit value 1. This is the sign of a log-likelihood ratio
`log P(0)/P(1)`. The EPR4 sample is a physical amplitude, where trellis bit 1
maps to +1.

Branch metrics (`sova_bmg`):

* EPR4: `|y - 8*(a + a1 - a2 - a3)|`, plus `|apriori|` when the a-priori sign
  disagrees with the branch's user bit.
* Octal(13): `|x|` when the sign of `x` disagrees with the branch's code bit,
  otherwise 0.

Parameters: `L` and `M` (default 16 each) on `sova_chip` and `sova_decoder`;
`CODE` on `sova_decoder`. Widths are in `sova_pkg`: `PM_W = 12`, `BM_W = 8`,
`MAG_W = 6`.

## Departures and own choices

These follow from the published architecture but are not specified by it:

* **L and M.** The source says only that the two are equal. Both default to
  16, about five times the code memory.
* **Traceback start.** The SMU is read from the best-metric state. The source
  does not say which state it starts from. A fixed start state fails for the
  Octal(13) trellis: it has rate one, so its survivors need not merge.
* **Known start state.** After reset the decoder assumes state 0. The other
  states start with a penalty of 512.
* **Metric formats.** The path metrics, their modulo normalisation, the
  saturation of delta, the branch-metric formulas (absolute error rather than
  squared error) and the EPR4 level scale are all this design's choices.
* **FIFO depth.** The source calls the FIFOs "L-step". Here they are L+1
  deep, to line up with the registered decisions.
* **EPR4 reliability.** The reliability refers to the user bit in front of
  the precoder. The PED output is combined across adjacent steps to achieve
  this; the source does not describe how it handles the precoder.
* **Octal(13) soft output.** Only the information bits get soft values. The
  turbo loop would also need code-bit soft values, and the source's rate-8/9
  puncturing is not described; neither is built.
* **Interleaver.** The interleaver/deinterleaver that would join the two
  decoders into a serial turbo decoder is not specified, so the decoders sit
  side by side.
* **Not built.** Physical items are left out: the custom clock tree with its
  characterisation delay line, and the pads.
* **Throughput.** 500 Mb/s means one bit per cycle at 500 MHz. The RTL does
  one bit per cycle. Whether a given process reaches 500 MHz has not been
  evaluated.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=F` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_sova_bmg` | all 16 metrics, both codes, a grid of sample and a-priori values, against formulas recomputed from the channel and code definitions |
| `tb_sova_csa` | decision, delta, selected metric and both sums, including ties, saturation and metric wrap-around |
| `tb_sova_csa_array` | every output against an integer Viterbi recursion |
| `tb_sova_fifo` | exact delay and reset contents |
| `tb_sova_smu` | ML state against explicit tracebacks, for every start state, every cycle |
| `tb_sova_ped` | both codes against explicit tracebacks of the two competing paths |
| `tb_sova_rmu` | reliability and hard bit against a per-bit minimum over the stages |
| `tb_sova_decoder` | both codes at L=12, M=10, noisy and clean data |
| `tb_sova_chip` | both decoders at the default sizes, 3000 symbols each |

The two end-to-end tests compare every soft output with `sova_ref_pkg`. That
is a behavioural reference which runs the Viterbi recursion on plain
integers and forms each reliability by explicitly tracing back the ML path
and both competing paths. The end-to-end tests also check:

* the latency;
* one output per cycle;
* on clean data, that the decided bits equal the transmitted bits.

`tb_sova_chip` also requires that each of these happens at least once:
saturation of delta, a reliability below the maximum, an output at the
maximum, wrap-around of the path metrics, and a traceback that starts from a
state other than 0.

Run a testbench with Verilator 5, from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/sova_pkg.sv tb/sova_ref_pkg.sv rtl/sova_*.sv tb/tb_sova_chip.sv \
  --top-module tb_sova_chip -o sim && ./obj_dir/sim
```

Swap `tb_sova_chip` for another testbench name to run that test. The full
chip test takes a few seconds. At the defaults `sova_chip` synthesises
(generic, yosys) to about 3300 flip-flops and 1950 word-level cells.

Three limitations apply to the tests:

* They use uniform integer noise, not a calibrated Gaussian channel.
* The decoders have not been run inside an iterative turbo loop.
* Bit-error-rate performance has not been measured.
