# Division-free MIMO-OFDM detector core (DIFMAD)

This core detects the symbols of a multi-antenna OFDM link, one sub-carrier
at a time. For each sub-carrier it receives:

- the vector `y` seen by the `NR` receive antennas,
- the `NR x NT` channel matrix `H`,
- the noise variance of each receive antenna.

It returns, for each of the `NT` transmit streams:

- an estimate of the transmitted QAM symbol,
- a reliability value for that estimate,
- a hard decision.

It supports four detectors: linear MMSE, zero-forcing (ZF), and iterative
(ordered successive cancellation) versions of both.

The central idea is that **no divider is used anywhere**. An MMSE detector
needs `R^-1`, where `R = Rww + H H^H` and `Rww` is the diagonal noise
covariance. The textbook way to build `R^-1` adds one stream at a time with
the matrix inversion lemma:

    R_k^-1 = R_{k-1}^-1 - (R_{k-1}^-1 h_k h_k^H R_{k-1}^-1) / (1 + h_k^H R_{k-1}^-1 h_k)

Each step divides by a scalar. This core never forms `R^-1` itself. It keeps
a matrix `P` and a scalar `c` such that `P / c = R^-1` at every step, and
pushes every denominator into `P` and `c` instead:

    start:     P = adj(Rww),  c = det(Rww)
    per k:     u = P h_k
               d = c + h_k^H u
               P <- d P - u u^H
               c <- c d
    outputs:   z_i     = h_i^H P y      (unnormalised estimate)
               scale_i = h_i^H P h_i    (the "scale value")

The MMSE estimate of stream `i` is `z_i / scale_i`. Because both terms share
the same factor `1/c`, that factor cancels. The core outputs `z_i` and
`scale_i` separately. The scale value is also the reliability metric that a
soft demapper downstream would use.

Every operation above is a complex dot product: a sum of products of complex
numbers, some of them conjugated or negated. The whole detector is therefore
one bank of dot-product units, a register file, and a state machine that
sequences the dot products.

## Blocks

| file | role |
|------|------|
| `rtl/difmad_pkg.sv` | number format, operation codes, control struct, normalisation functions |
| `rtl/cdot.sv` | folded complex dot-product unit, `LANES` multipliers |
| `rtl/difmad_datapath.sv` | registers for H, y, P, c, u, z, scale; operand multiplexer for the `NR` dot-product units; write-back; stream ordering |
| `rtl/difmad_fsm.sv` | state machine that issues the operations |
| `rtl/cpf_slicer.sv` | division-free hard decision of `z` against `scale` |
| `rtl/qam_mapper.sv` | transmit-side Gray QAM mapper |
| `rtl/mimo_core.sv` | top: state machine, datapath and mapper |

## Number format

The core uses pseudo floating point. Each complex number (`cpf_t`, 42 bits)
has three fields:

- an 18-bit signed real mantissa,
- an 18-bit signed imaginary mantissa,
- one 6-bit signed exponent, shared by both mantissas.

The value is `(re + j*im) * 2^(e-17)`. A normalised number has
`max(|re|,|im|)` in `[2^16, 2^17)`. Zero is stored with the smallest
exponent, -32.

The 18-bit mantissa matches the 18x18 hardware multipliers of the FPGA class
this design targets. A 15-bit mantissa was found to be enough for the 2x3
case, and `BM` can be reduced to try that. The 6-bit exponent is the
published choice.

The following details are this design's own:

- the shared exponent,
- round-to-nearest on normalisation,
- saturation at exponent +31,
- flush-to-zero below -32.

Keep these limits in mind when you read the outputs:

- **Overflow:** values saturate at exponent +31 and do not wrap.
- **Underflow:** tiny values become exact zero.
- **Shared exponent:** when the real and imaginary parts differ greatly in
  size, the smaller part loses bits.

### The dot-product unit (`cdot`)

Each beat takes `LANES` terms `(a, b, conj_a, neg)` and adds
`+/- conj?(a) * b` to the sum. A dot product of `n` terms takes
`ceil(n/LANES)` beats. The unit has two stages:

1. Register the complex products, 40 bits wide with exponent `a.e + b.e`.
2. Align the products to the larger exponent with a truncating right shift,
   and accumulate them.

On the last beat the sum is normalised and rounded. `out_valid` rises two
clock edges after the last beat. The accumulator has 4 guard bits, which is
enough for up to 15 terms.

### Keeping c in range

`c` grows by the factor `d` at every step. After each update, `c` and all
of `P` are multiplied by the same power of two, so that `c` stays in
`[1, 2)`. This leaves `P / c` unchanged, and so also the ratio
`z_i / scale_i`, but it keeps the exponents far from saturation.

`adj(Rww)` and `det(Rww)` are computed the same way. The exponents of the
variances are factored out, so each entry is a single product.

## Operation schedule

One sub-carrier runs through these operations. The `NR` dot-product units
work in parallel. Unit `r` computes row `r` of a vector or matrix result.

| op | what | terms per unit |
|----|------|----------------|
| ADJ (x NR) | diagonal of `adj(Rww)` | 1 |
| DET | `det(Rww)` | 1 |
| P0 | copy `P = adj`, `c = det` | - |
| U | `u = P h_k` | NR |
| D | `d = c + h_k^H u` (unit 0) | NR+1 |
| P (x NR columns) | `P[:,q] = d P[:,q] - u conj(u[q])` | 2 |
| C | `c = c d`, then rescale c and P | 1 |
| W (per stream) | `u = P h_i` | NR |
| ZS (per stream) | `z_i = u^H y` (unit 0), `scale_i = h_i^H u` (unit 1) | NR |
| CANCEL | `y <- y - h_b * decision_b` | 2 |

U, D, P and C repeat for every stream `k` still active. W and ZS then run
once per active stream.

Every operation waits for the result of the one before it. The state machine
issues the beats and waits for `res_valid`, so an operation of `b` beats
takes `b + 2` cycles.

At the defaults (`NT = NR = 3`, `LANES = 1`) a linear run takes **122 cycles
from input accepted to the first result**. The testbench checks this number.
The `NT` results follow, one per cycle when `out_ready` is high, for about
155 cycles per sub-carrier in all. With `LANES = 3`, every operation except D (which has `NR + 1` terms) is a
single beat, and the first result comes 89 cycles after acceptance.

### Modes

- **LMMSE** (`in_det = linear`, `in_zf = 0`): the schedule above, run once.
- **ZF** (`in_zf = 1`): the same recursion, with every noise variance
  replaced by the small constant `2^(ZF_SIGMA2_EXP-1)` (default `2^-6`).
  This approaches the zero-forcing solution `(H^H H)^-1 H^H y` when the
  symbol energy is large relative to that constant. There is no separate
  pseudo-inverse datapath. The constant is a compromise: smaller values come
  closer to exact ZF, but cost precision in the 18-bit format.
- **Iterative** (`in_det = iterative`, with either criterion): after W/ZS,
  the core proceeds as follows.
  1. It picks the remaining stream with the largest scale value.
  2. It outputs that stream and slices it (`cpf_slicer`).
  3. It subtracts `h_b * decision` from `y`.
  4. It removes the stream from the active set.
  5. It rebuilds `P` from `adj(Rww)` over the remaining streams only.

  The steps repeat until one stream is left. Results come out in detection
  order, and `out_strm` names the stream. A larger scale value means a
  higher post-detection SINR for that stream.

### Hard decisions without division

`cpf_slicer` decides `z / scale` without dividing. For each axis it compares
`z` with `k * scale` for the thresholds `k = -(M-2), ..., -2, 0, 2, ..., M-2`,
where `M` is 2, 2, 4 or 8 points per axis. It then returns the odd-integer
level: ±1, ±3, ±5 or ±7. Levels are unnormalised, so a 16-QAM symbol is
`{±1, ±3} + j{±1, ±3}`. `y` and `H` must use the same scale. This is the
convention that `qam_mapper` also produces.

## Interface and timing (`mimo_core`)

**Input.** `in_valid`/`in_ready` handshake, one sub-carrier per transfer:

- `in_y[NR]`, `in_h[NR][NT]`, `in_sigma2[NR]`, all `cpf_t`;
- `in_mod`: BPSK, QPSK, 16-QAM or 64-QAM;
- `in_det`: linear or iterative;
- `in_zf`.

`in_ready` is high only while the core is idle. A sub-carrier is captured in
the cycle of the handshake.

**Output.** `out_valid`/`out_ready` handshake, one stream per transfer:

- `out_strm`, `out_z`, `out_scale`;
- the hard decision `out_dec_re`/`out_dec_im`;
- `out_last` on the final stream of a sub-carrier.

A result is held until it is taken, and the core does not move on until
then.

**Transmit mapper.** `tx_valid`, `tx_mod`, `tx_bits[5:0]` in; `tx_sym_valid`,
`tx_i`, `tx_q`, `tx_sym` out, one cycle later. It uses IEEE 802.11a Gray
mapping, with bit 0 as the first bit of the in-phase group.

**Reset.** `rst_n` is asynchronous and active low.

### Throughput

An OFDM symbol with 48 data tones every 4 µs, at a core clock of 60 MHz,
leaves 5 cycles per tone. This core needs about 155 cycles per tone at
3x3. That is far from real time. The reason is that the schedule is strictly
sequential and uses only `NR` dot-product units.

Reaching real time would take a schedule that works on several tones at once,
or a pipelined schedule. That is not implemented here. Increasing `LANES`
shortens each operation, but not the fixed two-cycle wait per operation.

## Where this design departs from the published architecture

The recursion, the division-free output pair (estimate and scale value), the
18/6-bit pseudo floating point format and the split into a datapath plus a
state machine follow the published architecture. The following are this
design's own choices:

- the number format's layout, rounding, and shared exponent;
- the power-of-two rescaling of `c` and `P`;
- the exact operation schedule, and the number and width of the dot-product
  units;
- ZF as MMSE with a small fixed variance;
- ordering by the largest scale value, and recomputing `P` from scratch at
  each iteration;
- the slicer and the level convention;
- the handshakes.

The published formula writes `det(Rww)` both as the product of the
variances and as the trace of `Rww`. The product is used here, because only
the product makes `adj(Rww)/det(Rww)` the inverse.

The reliability output is the scale value. Bit probabilities (soft bits) are
not produced; a soft demapper would sit downstream.

The parts of the surrounding prototype are outside this RTL:

- the radio and analog front end,
- IFFT/FFT and synchronisation,
- channel and noise estimation,
- FEC,
- MAC.

The core's inputs are where channel estimation would connect, and its
outputs are where the demapper and FEC would connect.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `NT` | 3 | transmit streams, up to 15 |
| `NR` | 3 | receive antennas, 2 to 14 |
| `LANES` | 1 | multipliers per dot-product unit; a 3-term product takes `ceil(3/LANES)` beats |
| `ZF_SIGMA2_EXP` | -5 | ZF noise-variance constant `2^(ZF_SIGMA2_EXP-1)` |
| `BM`, `BE` (package) | 18, 6 | mantissa and exponent widths |

The accumulator has 4 guard bits, so a dot product may have at most 15 terms:
`NR + 1 <= 15`. Indices are 4 bits wide, so `NT <= 15`.

## Verification

Each block has a self-checking testbench in `tb/`. All use `$urandom` and end
with a `TB_RESULT checks=… failures=…` line. `tb/difmad_tb_pkg.sv` holds a
double-precision complex reference: matrix inverse, MMSE estimate and slicer.

| testbench | what it checks |
|-----------|----------------|
| `tb_cdot` | random dot products of 1 to 5 terms at `LANES` = 1 and 3, against real arithmetic; latency |
| `tb_cpf_slicer` | 20000 random `z`/`scale` pairs for all modulations, against a divide-and-round reference; clamping |
| `tb_qam_mapper` | all inputs of all modulations, against the Gray formula |
| `tb_difmad_fsm` | the state machine at `LANES` = 1 and 3, against a model of the datapath: op counts, beats per op, active-stream use, output order, total cycles |
| `tb_difmad_datapath` | datapath plus state machine. Checks: `adj/det = Rww^-1`; `P/c = R^-1` element by element; estimates; cancelled `y` in iterative mode |
| `tb_mimo_core` | the whole core at its default parameters. It first checks the exact latency (122 cycles) and that input is refused while busy, then runs 240 random sub-carriers through all four detectors and all modulations. It checks stream order, estimates, decisions, `out_last`, the transmit mapper and output back-pressure. Each mechanism must occur at least once |

| `tb_mimo_workloads` | the end-to-end testbench at three other sizes side by side: 2x3, 2x2, and 3x3 with `LANES = 3`. Each checks its own exact latency, for example 89 cycles to the first result for 3x3 at `LANES = 3` |

Tolerances follow a condition-number estimate of `R`. The testbench draws a
new channel when a decision or an ordering comes too close to a tie for
18-bit arithmetic to settle it.

To run a testbench with Verilator (5.x):

    verilator --binary --timing --assert -Irtl -Itb \
      rtl/difmad_pkg.sv tb/difmad_tb_pkg.sv rtl/cdot.sv rtl/cpf_slicer.sv \
      rtl/difmad_fsm.sv rtl/difmad_datapath.sv rtl/qam_mapper.sv rtl/mimo_core.sv \
      tb/tb_mimo_core.sv --top-module tb_mimo_core -Mdir obj_tb_mimo_core
    ./obj_tb_mimo_core/Vtb_mimo_core

For another testbench, replace `tb_mimo_core` with its name. The end-to-end test body is
`tb/mimo_e2e_body.svh`, found through `-Itb`. `tb_mimo_workloads` also needs
`tb/mimo_e2e_bench.sv` on the command line. Each testbench
runs in well under a minute.
