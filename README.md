# Parallel turbo codec with a hybrid Log-MAP decoder and QPP interleaver

This is a rate-1/3 turbo encoder and an iterative turbo decoder for
1024-bit frames, written in synthesizable SystemVerilog. Two ideas make the
decoder cheap and fast:

* **Hybrid max\*.** The Log-MAP algorithm is built on the Jacobian logarithm
  `max*(a,b) = ln(e^a + e^b)`. Here that function is computed as
  `max(a,b)` plus a piecewise correction. Near zero the correction is a
  straight line. Further out it is a constant shifted right. There are no
  look-up tables and no multipliers. The result stays close to exact
  Log-MAP.
* **Contention-free parallel decoding.** Each constituent decoder is split
  into `P` identical SISO (soft-in soft-out) lanes. Each lane handles one
  segment of `N/P` bits, and all lanes run in lock step. Every frame memory
  is split into `P` banks. The interleaver is a quadratic permutation
  polynomial (QPP), `pi(x) = (31x + 64x^2) mod 1024`, which has a useful
  property: when all lanes read their interleaved positions at once, they
  always hit `P` different banks. No lane ever stalls and the memories need
  no arbitration.

At the default settings (`N = 1024`, `P = 2`, one iteration) the decoder
finishes one iteration in 2052 clock cycles. A single full-frame SISO would
need 4100.

## Contents

1. [Data flow of one decoding iteration](#data-flow-of-one-decoding-iteration)
2. [The hybrid max\* operator](#the-hybrid-max-operator)
3. [Inside a SISO lane](#inside-a-siso-lane)
4. [Parallel lanes and the QPP interleaver](#parallel-lanes-and-the-qpp-interleaver)
5. [Encoder](#encoder)
6. [Top-level interface and timing](#top-level-interface-and-timing)
7. [Module map](#module-map)
8. [Verification and measured error rate](#verification-and-measured-error-rate)
9. [Simulating with Verilator](#simulating-with-verilator)
10. [Departures from the source description and open points](#departures-from-the-source-description-and-open-points)

## Data flow of one decoding iteration

The receiver supplies three soft values (log-likelihood ratios, LLRs) per
information bit k:

* `ys[k]`: the systematic bit;
* `yp1[k]`: the parity from constituent encoder 1;
* `yp2[k]`: the parity from constituent encoder 2.

A positive LLR favours bit 1.

`channel_buffer` stores the whole frame, and then the iterations start.

**Decoder 1** works in natural order. For each bit k it reads:

* `ys[k]`;
* `yp1[k]`;
* the a-priori value `La1[k]`.

In the first iteration `La1` is zero. Decoder 1 produces the a-posteriori LLR
`L1[k]` and subtracts what it was given. The result is the extrinsic value
`Le1[k] = L1[k] - La1[k] - ys[k]`, which it writes to the extrinsic memory at
address k.

**Decoder 2** works in interleaved order. For position k it reads:

* `ys[pi(k)]`;
* `yp2[k]`;
* `La2[k] = Le1[pi(k)]`.

It writes `Le2[k]` back to address `pi(k)`. That write is the
de-interleaver, so `Le2` lands in natural order and is decoder 1's a-priori
input in the next iteration.

Only one extrinsic memory is needed. A SISO lane consumes and stores all of
its inputs before it writes its first result, so the read and write sweeps
never overlap.

In the last iteration, decoder 2 also passes its a-posteriori LLR to
`hard_decision`. That block stores the sign of each LLR at `pi(k)` and then
streams the decoded frame out in natural order.

## The hybrid max\* operator

For `x = |a - b|` the exact correction is `fc(x) = ln(1 + e^-x)`. It falls
from 0.693 at x = 0 toward zero. `max_star_hybrid` replaces it with:

| region  | correction used        | hardware                                    |
|---------|------------------------|---------------------------------------------|
| x < 1.5 | `0.693 - x/2`, ≥ 0     | one subtraction (x/2 is a shift)            |
| x ≥ 1.5 | `0.1693 / 2^floor(x)`  | barrel shift of a constant by the integer part of x |

Since `x` is fixed point, `floor(x)` is just its integer bits. The second
region is therefore a right shift of a constant.

Notes on the arithmetic:

* Both constants are held with 4 extra guard bits. The correction is rounded
  to the data format (3 fractional bits) before it is added.
* Between x = 1.39 and 1.5 the linear formula would go negative, so it is
  clamped at zero. The true correction is never negative.
* The output saturates at the top of its range.
* A side output `fc` shows which correction was added. Testbenches use it to
  confirm that both regions were exercised.

Error against the exact correction:

* largest just below x = 1.5, where the clamped line gives 0 and the true
  value is about 0.22;
* under one LSB (1/8) for x ≥ 2.5.

This operator is the only non-linear element of the decoder:

* the forward and backward recursions use four of them each per step;
* the LLR unit uses six per step (two trees of three).

## Inside a SISO lane

**Code and trellis.** Each constituent code is a four-state recursive
systematic convolutional code:

* feedback polynomial 7 (octal);
* feed-forward polynomial 5;
* constraint length 3.

Each state has two outgoing branches, eight in total. Every branch carries a
systematic label `xs = ±1` and a parity label `xp = ±1`. All trellis
constants are derived from `MEM`, `FB_POLY` and `FF_POLY` in `turbo_pkg`. For
the state encoding, the most recently shifted-in bit is the state's MSB.

**Fixed point.** All soft values are two's complement with 3 fractional
bits:

| quantity                      | bits | range   |
|-------------------------------|------|---------|
| channel LLR                   | 7    | ±8      |
| extrinsic / a-priori LLR      | 9    | ±32 (saturating) |
| branch metric                 | 11   |         |
| state metric                  | 12   |         |
| a-posteriori LLR              | 12   |         |

After every step the state metrics are normalised by subtracting state 0's
metric, so they never grow. "Impossible" start states get −64.

**Datapath per trellis step:**

* `branch_metric_unit` computes the four distinct branch metrics
  `gamma = ½(La·xs + ys·xs + yp·xp)`. The halving truncates.
* `forward_metric_unit` computes `alpha_k(s) = max*` over the two branches
  entering s of `alpha_{k-1} + gamma`.
* `backward_metric_unit` computes `beta_k(s) = max*` over the two branches
  leaving s of `gamma + beta_{k+1}`.
* `llr_unit` computes `L = max*(u=1 branches) − max*(u=0 branches)` of
  `alpha_k + gamma + beta_{k+1}`. Each side is a balanced tree of two-input
  max\* operators.

**Schedule (`siso_decoder`).** The lane runs one full forward-backward pass
over its segment:

1. A start cycle clears the lane.
2. During the forward pass the lane accepts one input per cycle (`La`, `ys`,
   `yp`). It stores these inputs and all alpha vectors: M × 4 state metrics.
3. An idle cycle follows.
4. The backward pass recomputes gamma from the stored inputs, updates beta,
   and emits one a-posteriori and extrinsic LLR per cycle for k = M−1 down
   to 0.

The lane therefore takes 2M + 2 cycles. There is no sliding window and no
trellis termination.

Starting metrics:

* Alpha starts in state 0 when `START_KNOWN = 1`, which is lane 0 (the
  encoder starts from zero). Otherwise alpha starts uniform.
* Beta always starts uniform.

The LLR output is combinational during the backward pass (`out_valid`,
`out_k`, `out_llr`, `out_ext`).

## Parallel lanes and the QPP interleaver

With `M = N/P`, lane j owns frame positions `j·M … j·M+M−1`. Each frame
memory (`banked_memory`) stores address a in bank `a div M` at offset
`a mod M`. Each bank has one read and one write port, and a crossbar connects
lanes to banks.

In natural order (decoder 1, and decoder 2's parity reads) lane j only ever
touches bank j. In interleaved order, at step x lane j touches bank
`pi(j·M + x) div M`. For a QPP, `pi(j·M + x) ≡ pi(x) + j·M·(F1 + F2·(2x + j·M)) (mod N)`.
When P divides N, the `P` values `pi(j·M+x) div M` are all different for
every x. This is the contention-free property, so all P lanes access the
memory in the same cycle with no conflict.

Assertions in `banked_memory` check this property for reads and writes in
every cycle. The testbenches check it with frame sizes, coefficients and lane
counts other than the defaults.

**Address generation.** `qpp_interleaver` computes addresses recursively, not
with multipliers. It keeps three registers:

* `x`;
* `pi(x)`;
* the first difference `g(x) = pi(x+1) − pi(x)`.

Stepping up uses `pi ← pi + g` and `g ← g + 2·F2`. Stepping down reverses
both. All arithmetic is modulo N with one conditional subtraction.

Each lane has its own generator, started at `X0 = j·M`. The generators step
up while decoder 2 reads its inputs (forward pass). They step down while it
writes its results (backward pass), which produces the de-interleaving write
addresses.

**Segment edges.** The lanes do not exchange boundary metrics. Lanes j > 0
start alpha uniform and all lanes start beta uniform. This is the simplest
arrangement. In principle it weakens the decisions near the segment edges.
With two lanes the loss is too small to measure against a single
full-frame SISO; see the error-rate tables below.

## Encoder

`turbo_encoder` contains two `rsc_encoder` instances and one
`qpp_interleaver`.

1. The frame loads serially (N cycles). Encoder 1 runs on the fly and keeps
   its parity bits.
2. The encoder emits `u[k], p1[k], p2[k]` for each k (3N cycles). Encoder 2
   and the QPP generator advance once per information bit, so encoder 2 sees
   `u[pi(k)]`.

There are no tail bits and no puncturing, so the rate is exactly 1/3.

In `rsc_encoder`, the systematic output is the input bit itself. It is kept
as a port for clarity.

## Top-level interface and timing

`turbo_codec` places the encoder and decoder side by side. The channel
between them is outside the design:

* the modulator;
* the analog front end;
* the converter;
* the soft demodulator.

The decoder input is therefore a stream of quantised channel LLRs. The
testbenches compute them as `2y/σ²`, rounded to 3 fractional bits and
saturated to 7 bits.

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `enc_in_valid`, `enc_in_bit` | in | 1 | information bits, one per cycle |
| `enc_in_ready` | out | 1 | encoder is loading a frame |
| `enc_out_valid`, `enc_out_bit`, `enc_out_last` | out | 1 | code bits u, p1, p2 per information bit |
| `dec_in_valid`, `dec_in_sym` | in | 1, 7 | channel LLRs ys, yp1, yp2 per bit (signed, 3 fractional bits) |
| `dec_in_ready` | out | 1 | decoder is accepting LLRs |
| `dec_out_valid`, `dec_out_bit`, `dec_out_last` | out | 1 | decoded bits in natural order |
| `dec_busy` | out | 1 | decoder is working on a frame |
| `dec_iter_done` | out | 8 | iterations completed on the current frame |

Parameters: `N = 1024`, `F1 = 31`, `F2 = 64`, `ITER = 1`, `P = 2`. `P` must
divide `N`, and `(F1, F2)` must be a valid QPP for `N`.

**Decoder timing:**

* A frame enters in 3N valid cycles.
* Each iteration then takes `4M + 4` cycles: two half-iterations of
  `2M + 2`.
* The first decoded bit appears `3 + ITER·(4M + 4)` cycles after the last
  input, which is 2055 cycles at the defaults.
* The N output bits then follow, one per cycle.
* The decoder accepts the next frame after the last bit has left.

**Encoder timing:** N load cycles, then 3N output cycles starting in the next
cycle.

At the defaults the design holds 179,200 memory bits and about 600
flip-flops outside the memories. The largest memories are:

* each lane's alpha store: 512 × 48 bits;
* each lane's input store.

## Module map

| module | role |
|--------|------|
| `turbo_pkg` | widths, types, trellis functions, saturation |
| `turbo_codec` | top: encoder and decoder side by side |
| `turbo_encoder`, `rsc_encoder` | rate-1/3 encoder and its constituent |
| `turbo_decoder` | control, lanes, memories, address generators |
| `channel_buffer` | serial input split into ys/yp1/yp2 banked memories |
| `banked_memory` | P-bank frame memory with lane crossbar |
| `qpp_interleaver` | recursive QPP address generator |
| `siso_decoder` | one SISO lane |
| `branch_metric_unit`, `forward_metric_unit`, `backward_metric_unit`, `llr_unit` | per-step datapath |
| `max_star_hybrid` | hybrid max\* |
| `hard_decision` | bit slicing, de-interleaving and natural-order output |

## Verification and measured error rate

Every module has a self-checking testbench in `tb/`. Each one compares
against independent models in `tb/tb_ref_pkg.sv`. The reference decoder is
written directly from the equations, with its own trellis tables and a
real-valued correction function. The testbenches also check:

* cycle counts, where the design defines them;
* the contention-free banking at several sizes;
* lanes running both with and without a known start state.

| testbench | what it covers |
|-----------|----------------|
| `tb_turbo_codec` | end to end, with `ITER = 2` and `P = 2` |
| `tb_turbo_decoder` | `ITER = 3` and `P = 4`, bit-exact against the reference, latency checked |
| `tb_turbo_codec_full` | all defaults, the error-rate sweep below |

`tb_turbo_codec` counts each mechanism and fails if any never occurred:

* up and down interleaver steps;
* cross-bank interleaved reads;
* non-zero a-priori input to decoder 1;
* both correction regions;
* extrinsic saturation;
* the encoder and decoder running at the same time.

`tb_turbo_codec_full` uses every parameter at its default and encodes,
transmits (BPSK over AWGN) and decodes 20 frames per point. The decoded bits
must match the reference decoder exactly. Measured bit error rate, one
iteration, 1024-bit frames, two lanes:

| Eb/N0 (dB) | 0.0 | 0.5 | 1.0 | 1.5 | 2.0 | 2.5 |
|-----------|-----|-----|-----|-----|-----|-----|
| BER | 1.2e-1 | 9.4e-2 | 6.3e-2 | 3.7e-2 | 1.7e-2 | 5.9e-3 |

These figures come from 20,480 bits per point, so treat them as rough.
Changing the parameters of the same testbench gives:

| configuration | 0.0 dB | 0.5 dB | 1.0 dB | 1.5 dB | 2.0 dB |
|---------------|--------|--------|--------|--------|--------|
| P = 1, ITER = 1 | 1.2e-1 | 9.5e-2 | 6.2e-2 | 3.6e-2 | 1.7e-2 |
| P = 2, ITER = 3 | 7.9e-2 | 2.6e-2 | 3.1e-3 | 2.9e-4 | ≈1e-4 |

Splitting the frame into two lanes costs no error rate that can be measured
at this sample size. For lower error rates, raise `ITER`: each iteration
adds `4M + 4` cycles.

## Simulating with Verilator

The testbenches need Verilator 5 with `--timing`. The package files come
first; `-y` lets Verilator find each module by its file name:

```sh
verilator --binary --timing --assert -Wno-fatal \
  --top-module tb_turbo_codec -y rtl -y tb \
  rtl/turbo_pkg.sv tb/tb_ref_pkg.sv tb/tb_turbo_codec.sv -o sim
./obj_dir/sim
```

Replace `tb_turbo_codec` with any other testbench name.

Every testbench:

* ends with a line `TB_RESULT checks=<n> failures=<m>`;
* stops itself with a watchdog if the design hangs;
* is independent of the simulator's initial register values, because the
  reset is applied on a real falling edge.

`tb_turbo_codec_full` runs for a few seconds. The others take well under a
second.

To try another configuration, override parameters on `turbo_codec`:

* `P`, any value that divides `N`;
* `ITER`;
* `N` together with a matching QPP pair, for example N = 40 with (3, 10)
  from the LTE table.

For another code, change `MEM`, `FB_POLY` and `FF_POLY` in `turbo_pkg`. The
test reference in `tb_ref_pkg` hard-codes the (7,5) taps and would need the
same change.

## Departures from the source description and open points

* **Code.** The source gives a constraint length of 3 and a four-state
  trellis, and also a generator pair (13, 11) octal, which needs eight
  states. This design follows the four-state description with (7, 5). Set
  `MEM = 3`, `FB_POLY = 4'o13`, `FF_POLY = 4'o11` for the other reading.
* **Correction constant.** Both 0.1635 and 0.1693 appear for the
  second-region constant. 0.1693, the one in the defining formula, is used.
* **Correction curve.** The plotted hybrid correction curve does not quite
  match the formula. The formula is implemented.
* **Clamp.** The linear region is clamped at zero. This is not stated in the
  source.
* **Degree of parallelism.** It is not specified. This design uses P = 2
  lanes per constituent decoder, which is the "two SISO units operating on
  one frame in parallel". The two constituent decoders still alternate, as in
  the serial turbo schedule.
* **Choices of this design:**
  * segment boundary handling (uniform starts, no metric exchange);
  * the fixed-point formats;
  * the serial input and output order;
  * no overlap between frames;
  * no tail bits.
* **Error rate.** The published error-rate curve reaches about 2e-4 at 2 dB
  after one iteration. This design measures about 1.7e-2 there, and the
  bit-exact reference model agrees. The published figure is not reproduced
  with the stated code and iteration count, so it is not taken as a target.
* **Not built.** The analog-to-digital converter and the soft demodulator of
  the receiver chain have no digital design to follow. Their output is the
  `dec_in_sym` port.
