# Time-domain equalizer with zero-forcing compensation for OFDM

An OFDM receiver copes with multipath as long as the channel's impulse response
is no longer than the cyclic prefix. When the channel is longer, a short FIR
filter in front of the demodulator, the **time-domain equalizer (TEQ)**, can
shorten the combined response so that it fits the prefix again. This design
does that for an IEEE 802.11a-style receiver: 64 sub-carriers, an 8-sample
prefix, a 15-sample channel and an 8-tap TEQ.

The filter taps come from a minimum-mean-square-error criterion. This is a
small linear system, `A w = B`, that the hardware builds from the channel
response and then solves. Shortening the channel leaves each sub-carrier with
a complex gain equal to the DFT of the shortened response, `h * w`. A
**zero-forcing equalizer (ZFE)** removes that gain. It computes
`1 / (FFT(h) · FFT(w))` per sub-carrier and multiplies each demodulated
sub-carrier by it. Both FFTs run through one 64-point radix-4 pipeline FFT.

```
   h ──► teq_solver ──► w ──► teq_fir  (received samples in, shortened-channel samples out)
   │                    │
   └──► p2s_loader ◄────┘        (h, then w, zero padded to 64 points)
             │
             ▼
       fft64_r4mdc ──► zfe_coef ──► 64 coefficients ──► zfe_apply  (demodulated sub-carriers)
```

`teq_top` wires these together with a small setup controller. It does not
contain the receiver's own OFDM demodulator (prefix removal and the receive
FFT) or the channel estimator. The channel enters as the port `h_in`. The
demodulated sub-carriers enter as `sc_*`.

## Number format

- Every data word is 16-bit two's complement **Q3.13**: range ±4, step 1/8192.
- FFT twiddle factors are 8-bit **Q2.6**, so cos/sin are multiples of 1/64.
- A product is truncated back to Q3.13 (arithmetic shift right by 13). If it
  does not fit, it is **saturated** rather than wrapped.
- Every block that can saturate reports it on an `ovf` or `carry` output.

The shared types (`fx_t`, `cfx_t`, `tw_t`, `ctw_t`) and the multiply and
saturate functions (`fx_mul`, `cfx_mul`, `fx_sat`) live in `rtl/teq_pkg.sv`.
`fx_div` is a combinational signed divider with the same conventions.
Quotients truncate toward zero. A zero denominator gives a full-scale result
with `ovf` set.

## The tap solver (`teq_solver`)

The MMSE taps for a channel `h` of length M+1, a TEQ of order P and a prefix of
`Ng` samples solve

```
   A = Hre^T Hre + γ² I         (P+1)×(P+1), symmetric, positive definite
   B = [h0, 0, ..., 0]^T
   A w = B
```

Here `H` is the (M+1)×(P+1) convolution (Toeplitz) matrix of `h`. `Hre` is `H`
with the rows that fall inside the prefix window removed: rows 1..Ng,
counting from 0. `γ²` is `1/SNR`, an input port (`gamma2`); 0 gives the
noiseless solution. The solver is a chain of four units. Each one starts on
the previous unit's `done` pulse.

| unit | what it computes | cycles |
|---|---|---|
| `matrix_mult` | A, one MAC lane per diagonal | 13 |
| `ldl_decomp`  | A = L·U, with U = D·Lᵀ, no pivoting | 17 |
| `fwd_subst`   | y = L⁻¹ B, one row per cycle | 9 |
| `bwd_subst`   | w = U⁻¹ y, one row per cycle | 9 |

From `enable` to `done` takes **49 cycles** with the defaults. At 16 MHz that
is 3.1 µs, inside one 4 µs OFDM symbol.

**Building A without a full matrix product.** Element a(i,j) is a sum of
`h[r-i]·h[r-j]` over the rows r kept in `Hre`. Moving one step down a diagonal,
from (i,j) to (i+1,j+1), shifts the sum by one row. So

    a(i+1, j+1) = a(i, j) + h[Ng-i] · h[Ng-j]

and each new diagonal element needs one product and one addition.
`matrix_mult` has one lane per diagonal d = j−i. The lane first walks the
channel from its last sample downwards to form the first-row element a(0,d).
It then produces the rest of the diagonal with the increment rule, one element
per cycle. The term a(0,0) also picks up h0². γ² is added on the main diagonal.
The lower triangle is written as a mirror copy.

**Factorisation.** A is symmetric positive definite, so Gaussian elimination
needs no pivoting. Row i of U is `u(i,j) = a(i,j) − Σ_k l(i,k)·u(k,j)`. The
column below the pivot is `l(j,i) = u(i,j)/u(i,i)`. `ldl_decomp` takes two
cycles per row. In the first cycle it forms the whole row of U in parallel.
In the second, N parallel dividers form the column of L. The design divides
directly rather than multiplying by 1/u(i,i): pivots below 0.25 are common,
and their reciprocal would not fit in Q3.13.

**Substitution.** `fwd_subst` resolves one row of the unit lower-triangular
system per cycle. `bwd_subst` does the same from the bottom row up, with one
divider by the pivot.

For the reference channel `h = [0.5 0.4 0.1 0.35 0.6 0.2 0.3 −0.3 −0.2 −0.1
−0.15 0.2 0.1 0.2 0.1]` with γ² = 0, the hardware returns `w0 ≈ 1.889`,
`w1 ≈ −0.537`, `w2 ≈ −0.793` and so on. Every tap is within 0.02 of the exact
solution.

## The TEQ filter (`teq_fir`)

The filter is an 8-tap direct-form FIR with a shift register. The taps load in
parallel on `load`; the top drives that from the solver's `done`. Each product
is truncated to Q3.13 and saturated. The eight products are summed at full
width. The sum is saturated to 16 bits and registered, so `y` follows
`in_valid` by one cycle. `carry` is set with an output that was saturated.
The filter is real-valued; a complex baseband would use one per rail.

## The 64-point R4MDC FFT (`fft64_r4mdc`)

This is the most involved part of the design. It is a radix-4
decimation-in-frequency FFT with three stages (64 = 4³). It is built as a
**multi-path delay commutator** pipeline. Samples enter one per cycle, and
between stages the data travel on four parallel paths. Each stage has two
parts:

- a *commutator*, which uses delays and a rotating switch to line up the four
  samples that one radix-4 butterfly needs;
- an *arithmetic element* (`r4_ae`), which computes the four-point DFT
  (the "dragonfly") and multiplies outputs 1..3 by twiddle factors from
  `twiddle_rom`.

The butterfly inside an arithmetic element is

    y_p = Σ_{m=0..3} x_m · (−j)^(p·m)

It needs only additions and swaps of real and imaginary parts.

**Stage 1.** The input goes into a 48-deep delay line with taps at 0, 16, 32
and 48. During the last quarter of a frame (samples 48..63), the four taps
hold `x(n), x(n+16), x(n+32), x(n+48)` for n = 0..15. The arithmetic element
runs on those 16 groups. Output p is multiplied by `W64^(p·n)`.

**Stage 2: `delay_commutator`, D = 4.** Stage 1 gives 16 groups in time order.
Stage 2 needs, for each of its butterflies, the same output line p from four
groups n = m, m+4, m+8, m+12. The commutator does a 4×4 transpose of blocks of
D = 4 cycles:

1. Input line p is delayed by p·D cycles.
2. A switch sends input line p to output line (t − p) mod 4, where t counts
   D-cycle blocks.
3. Output line q is delayed by (3 − q)·D cycles.
4. All lines are registered once more.

After the commutator, every group of four is a valid butterfly input. The
latency is 3D + 1 cycles. The twiddles of stage 2 are `W64^(4·q·m)`.

**Stage 3: `delay_commutator`, D = 1.** This is the same transpose on single
cycles. All twiddles of the last stage are 1.

**Output order and `fft_shuffler`.** On stage-3 cycle c = 4p + q, line k
carries bin `X(16k + 4q + p)`. This is base-4 digit-reversed order. The
shuffler writes each group of four into a 64-entry bank at that address. It
reads the bank back in natural order while the other bank fills (ping-pong),
so frames can follow each other with no gap.

**Timing.**
- The arithmetic elements are busy 16 of every 64 cycles. That low use is the
  price of the R4MDC structure, which buys simple control.
- One frame is taken every 64 cycles.
- Bin 0 leaves 85 cycles after sample 0 of its frame went in. Bin 63 leaves
  148 cycles after it.
- A frame is 64 consecutive valid samples. The first valid sample after reset
  is sample 0.
- Between stages the groups must come back to back, or at least 3D cycles
  apart. The FFT meets this by construction.

**Precision.** The transform is unscaled: `X(k) = Σ x(n) W64^(nk)`. Intermediate
words stay 16-bit Q3.13 and saturate. Inputs with a large sum can saturate and
raise `ovf`. Channel and tap vectors of the size used here stay well inside
the range: |FFT(h)| ≤ 2.3 and |FFT(w)| ≤ 3.7 for the reference channel.

## Zero-forcing coefficients (`p2s_loader`, `zfe_coef`, `zfe_apply`)

`p2s_loader` latches a 15-entry vector and sends it as a 64-sample frame,
zero padded, one sample per cycle. The top sends h first and w second, back to
back.

`zfe_coef` keeps the 64 bins of FFT(h). As FFT(w) streams in, it forms for
each bin:

    P   = FFT(h)·FFT(w)
    |P|² = P.re² + P.im²          (full precision, Q6.26)
    C   = conj(P) / |P|²          (two dividers)

`ready` rises once all 64 coefficients are written. It drops when a new FFT(h)
frame starts. `zfe_apply` multiplies each incoming sub-carrier, tagged with its
index, by the stored coefficient. It has one register stage.

## Setup sequence (`teq_top`)

A `start` pulse runs the controller through these states:

1. `SOLVE`: run the solver. At the same time, p2s sends h into the FFT.
2. `FFT_H`: wait for the solver's taps.
3. `FFT_W`: send the taps into the FFT.
4. `WAIT`: wait for `zfe_coef`'s `ready`.

A full setup takes about 270 cycles. The TEQ filter is loaded as soon as the
solver finishes. Sub-carriers may be equalized once `ready` is high.

## Departures from the source design and open points

- **Glue between the units.** The published design splits the solver, the FIR
  filter and the FFT into three separate chips. It does not describe the
  sequencing between them. The setup FSM, the start/done handshakes and the
  index tags on the sub-carrier ports are this design's own.
- **Solve time.** The solver takes 49 cycles. The published figure is 55
  cycles at 16 MHz. The schedule of the units (parallel dividers, one row per
  cycle) is assumed.
- **γ² input.** The noise term γ² is an input port. The published solver
  chip's pin count leaves no room for it, so it probably used a fixed value.
  Setting `gamma2` to 0 gives the noiseless solution.
- **Division.** The factorisation divides directly by the pivot, with N
  parallel dividers. Multiplying by a reciprocal overflows Q3.13 for small
  pivots.
- **Saturation.** Results saturate everywhere. The source only says that
  products are truncated and that the FIR flags overflow.
- **FFT output delay.** The FFT's delay to the first output bin is 85 cycles.
  The published figure is 82 cycles. The register placement inside the
  pipeline is not specified, so this design uses its own.
- **Decimation.** The FFT uses decimation in frequency. The switch pattern of
  the commutators is derived here.
- **ZFE inverse.** The complex inverse is formed as conj(P)/|P|². How the
  inversion is done is not specified in the source.
- **Sizes.** The top is built for the hardware configuration: a 15-sample
  channel, order 7 and an 8-sample prefix. Longer channels (26 or 38 samples)
  and other TEQ orders (3 to 45) appear only in floating-point system studies.
  The solver modules take them through their parameters (see below). The
  top's sizes come from `H_LEN` and `TEQ_P` in `teq_pkg`. Only the default
  sizes have been simulated at the top level. The p2s loader assumes that
  the taps are no more than the channel samples (P + 1 ≤ H_LEN).
- **Not included.** There is no channel estimator; the channel is assumed
  known. The 802.11a transmitter and demodulator are also not included.

## Accuracy

Against a double-precision solve, the 8 taps agree to within 0.02 for the
reference channel. For random channels with γ² = 0.01 they agree to within
0.05; the error comes mostly from the truncation in the factorisation. End to
end, with QPSK at ±0.5 over a real-valued OFDM link, all 372 checked
sub-carrier decisions are correct after TEQ plus ZFE.

## Other channel lengths and TEQ orders

`teq_solver` and its units are parameterised by the channel order `M`, the
TEQ order `P` and the prefix `NG`. The only size rule is M ≥ NG + 1; orders
above NG + 1 are allowed. The solve takes (M − NG + P) + 4(P + 1) + 4 cycles.
`tb_teq_workloads` runs the solver at the channel and order combinations used
in the system studies of this equalizer, all with γ² = 0.01 and an 8-sample
prefix:

| channel | order | cycles | SSNR, hardware taps | SSNR, exact taps |
|---|---|---|---|---|
| h1, 15 samples | 3  | 30  | 9.9 dB  | 9.8 dB  |
| h1 | 17 | 100 | 29.9 dB | 29.6 dB |
| h1 | 31 | 170 | 41.6 dB | 42.7 dB |
| h1 | 45 | 240 | 43.7 dB | 46.1 dB |
| h2, 5 paths up to delay 25 | 7  | 61  | 12.7 dB | 12.7 dB |
| h3, 8 paths up to delay 37 | 15 | 113 | 27.7 dB | 27.6 dB |

SSNR is the energy of h∗w inside the first 9 samples over the energy outside.
h2 is `0.85δ(k) + 0.402δ(k−6) + 0.19δ(k−14) + 0.09δ(k−20) + 0.042δ(k−25)`.
h3 is `0.881δ(k) + 0.416δ(k−6) + 0.197δ(k−11) + 0.093δ(k−15) +
0.044δ(k−18) + 0.021δ(k−22) + 0.01δ(k−30) + 0.005δ(k−37)`.

From order 17 up, the normal equations are very sensitive. Changes of a few
1e-4 in A, the size of Q3.13 rounding, move single taps by up to 0.14.
The shortening they achieve stays close to that of the exact taps. Orders
of 17 and above would profit from a wider fraction in the factorisation.

## Files

| file | contents |
|---|---|
| `rtl/teq_pkg.sv` | sizes, fixed-point types and functions |
| `rtl/teq_top.sv` | top level and setup controller |
| `rtl/teq_solver.sv`, `matrix_mult.sv`, `ldl_decomp.sv`, `fwd_subst.sv`, `bwd_subst.sv`, `fx_div.sv` | MMSE tap solver |
| `rtl/teq_fir.sv` | TEQ filter |
| `rtl/fft64_r4mdc.sv`, `delay_commutator.sv`, `r4_ae.sv`, `twiddle_rom.sv`, `fft_shuffler.sv` | 64-point FFT |
| `rtl/p2s_loader.sv`, `zfe_coef.sv`, `zfe_apply.sv` | zero-forcing equalizer |
| `tb/tb_<module>.sv` | self-checking testbench per module |
| `tb/tb_teq_workloads.sv`, `tb/teq_solver_case.sv` | solver at other channel lengths and orders |
| `tb/teq_ref_pkg.sv` | real-valued reference models: A matrix, linear solve, DFT |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. For
example, the end-to-end test:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb \
    rtl/teq_pkg.sv tb/teq_ref_pkg.sv rtl/*.sv tb/tb_teq_top.sv \
    --top-module tb_teq_top -o sim
./obj_dir/sim
```

For a unit test, swap in its testbench, for example
`tb/tb_fft64_r4mdc.sv --top-module tb_fft64_r4mdc`. `tb_teq_workloads` also
needs `tb/teq_solver_case.sv`.

`tb_teq_top` runs the top at its default sizes. It solves two channels: the
reference channel and a random one with γ² > 0. It checks the taps, the
zero-forcing coefficients and the equalized QPSK sub-carriers. It counts
solves, setups, `ready` events and FIR overflow flags, and fails if any of
them never happened.
