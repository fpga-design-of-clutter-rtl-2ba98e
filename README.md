# Lognormal radar clutter generator

Radar receivers are tested against clutter: echoes from ground, sea or rain
that are much stronger than the receiver noise and whose amplitude is far
from Gaussian. This design generates such clutter in real time as a stream
of samples whose amplitude is **lognormal** and whose sample-to-sample
**correlation is programmable**.

It uses the zero-memory-nonlinearity (ZMNL) method. White Gaussian noise is
first coloured by a linear filter, which sets the correlation. A memoryless
function then reshapes the amplitude distribution:

```
v ~ N(0,1) --> H(w) --> u --> x sigma_c --> + ln(mu_c) --> exp() --> z (lognormal)
```

Because `ln z = sigma_c*u + ln mu_c` is Gaussian, `z` is lognormal with
`E[z] = mu_c * exp(sigma_c^2 / 2)`. The filter runs in the frequency domain,
on frames of N samples: FFT, multiply by the filter spectrum H(k), IFFT.

## Signal chain

| Stage | Module | What it does |
|---|---|---|
| 1 | `tausworthe_prng` (x2) | Two 31-bit Tausworthe generators. Each gives 16 uniform bits per sample, 32 bits in all. |
| 2 | `box_muller` | Turns the uniforms r1, r2 into two independent N(0,1) samples, x1 and x2. |
| 3 | `fft` (forward) | Collects N samples of x1 and transforms them, with a 1/N scale. |
| 4 | `spectral_filter` (memory) | Holds H(k), loaded by the host. |
| 5 | `spectral_filter` (multiplier), `fft` (inverse) | Forms X(k)·H(k) and transforms back (unscaled). The result is correlated Gaussian noise u. |
| 6 | `zmnl` | Outputs `exp(sigma_c*u + ln mu_c) + noise_gain*x2`. |

The top level is `clutter_generator`. `sample_fifo` holds each x2 until its
partner x1 comes out of the FFT/IFFT path, so the two meet at stage 6.
`cordic` is the shift-and-add engine behind ln, sin/cos and exp.
`clutter_pkg` holds the shared number formats, types and constants.

The stage structure, the Tausworthe shift/xor form, the 16-bit Gaussian
samples, Box-Muller and the ZMNL with `sigma_c` and `ln mu_c` follow the
published design. All of the following are choices made here:

- the frame length;
- the FFT architecture;
- every number format;
- the CORDIC arithmetic;
- the FIFO;
- the way the second Gaussian stream is used.

## Stage 1: the Tausworthe generator

A feedback shift register with the primitive trinomial `x^P + x^Q + 1`
produces bits `a(n+P) = a(n+Q) xor a(n)`. One step computes P new bits at
once, with the oldest bit in the LSB:

```
B  = A xor (A >> Q)
A' = B xor (B << (P-Q))      (P bits kept)
```

This is exact when `0 < Q < P/2`. With P = 31, every word is one full block
of the sequence, and the period is 2^31 - 1 because 2^31 - 1 is prime. The
two instances use Q = 3 and Q = 6, two different primitive trinomials, and
different seeds. Each shows bits 30..15 of its state as its 16-bit output.

## Stage 2: Box-Muller with CORDIC

```
u1 = (r1 + 1) / 2^16   in (0, 1]     (keeps ln finite)
u2 = r2 / 2^16
x1 = sqrt(-2 ln u1) cos(2 pi u2)
x2 = sqrt(-2 ln u1) sin(2 pi u2)
```

- **ln**: a leading-one search writes `u1 = m * 2^E` with m in [0.5, 1). A
  hyperbolic vectoring CORDIC then gives `atanh((m-1)/(m+1)) = ln(m)/2`, and
  `ln u1 = ln m + E ln 2`.
- **sin/cos**: the top two bits of r2 pick the quadrant. The other 14 bits
  give an angle in [0, pi/2) for a circular rotation CORDIC.
- **sqrt**: an exact digit-by-digit integer square root.

Both CORDICs run in parallel. The unit is fully pipelined: it accepts one
request per clock and answers `BM_LATENCY` = 34 clocks later. The samples are
accurate to within 4 LSB (2^-10) of the real-valued transform.

## Stages 3-5: frames, FFT and filter

`fft` is an in-place radix-2 decimation-in-time transform. It stores one
frame of N complex words and computes one butterfly per clock. It cycles
through three states:

- **LOAD**: accepts N samples, written at bit-reversed addresses.
- **CALC**: runs N/2·log2 N butterflies. That is 5120 clocks for N = 1024.
- **UNLOAD**: sends out N bins in natural order, with valid/ready.

Its twiddle table is computed from cos/sin when the design is elaborated.
The forward instance halves its results in every stage, so its words stay
close to the input range. The inverse instance does not scale. In both, a sum
that leaves the 24-bit range saturates. With H = 1, FFT followed by IFFT
returns the input, apart from rounding.

`spectral_filter` sits between the two transforms. It multiplies each bin by
H(k) from its N-entry memory and passes the result through one register
slice.

### Frame timing and flow control

This is the least obvious part of the design. While `run` is high, the top
level requests one uniform word per clock, but only while:

- the forward FFT is in LOAD;
- fewer than N requests have been made for the current frame;
- at a frame start, the x2 FIFO holds at most one frame.

The FIFO is 2N deep. Results arrive `BM_LATENCY` clocks after their requests.

The forward FFT unloads straight into the IFFT's LOAD state. It then loads
the next frame while the IFFT computes and sends out the current one. If the
forward FFT finishes first, the spectrum multiplier stalls its unload until
the IFFT returns to LOAD. With back-to-back frames this never happens: the
forward FFT always finishes `BM_LATENCY` clocks after the IFFT has drained.

The steady-state frame period is

```
2N + BM_LATENCY + N/2 log2 N  = 7202 clocks for N = 1024
```

Output comes in bursts of N samples, one per clock, with `out_last` on the
last sample of each frame. On average that is N/7202 ≈ 0.14 samples per
clock. The output has no back-pressure.

### Programming the filter spectrum

The host writes H(k) through `coef_we/coef_addr/coef_data`. Each part is 16
bits with 12 fraction bits, so the range is ±8. The memory is not cleared by
reset.

With the forward scaling above, the correlated noise is the circular
convolution `u = x1 ⊛ h`, where `h(n) = (1/N) sum_k H(k) e^{+j2πkn/N}`. Two
rules follow:

- **Unit variance**: choose `(1/N) sum_k |H(k)|^2 = 1`.
- **Real output**: make H Hermitian, `H(N-k) = conj H(k)`. Only the real part
  of the IFFT output is used.

A low-pass spectrum that is constant on 63 bins, for example, needs the
value sqrt(1024/63) ≈ 4.03.

The correlation `s` wanted at the lognormal output and the correlation `rho`
of u are related by

```
rho = ln(1 + s (e^{sigma_c^2} - 1)) / sigma_c^2
```

The host designs H for rho, not for s: `|H(k)|^2` is the DFT of rho(m). Not
every wanted s(m) gives a rho(m) whose DFT is non-negative. A Gaussian-shaped
s(m) at `sigma_c = 1`, for example, gives a DFT that dips to -0.18. The host
then clips those values to 0 and accepts a slightly different correlation.
Each frame is filtered on its own, so correlation does not continue across
frame boundaries.

## Stage 6: ZMNL

```
w = sigma_c*u + ln mu_c                  (clamped to [-24, 24])
k = round(w / ln 2),  r = w - k ln 2     (|r| <= 0.35)
z = (cosh r + sinh r) * 2^k              (hyperbolic rotation CORDIC, then a shift)
clutter = z + noise_gain * x2
```

The published scheme feeds the second Gaussian stream into this stage and
speaks of adding other interference signals. Here x2 is read as additive
receiver noise with a programmable gain; `noise_gain = 0` gives pure
lognormal clutter.

`out_amp` is z alone. `out_clutter` is the sum. `out_sat` flags z saturating
at 2^15. Latency is `ZMNL_LATENCY` = 33 clocks.

## Number formats

| Signal | Width | Fraction bits |
|---|---|---|
| Gaussian samples x1, x2, u | 16 signed | 12 |
| FFT/IFFT data (each part) | 24 signed | 20 |
| H(k) (each part) | 16 signed | 12 |
| CORDIC x, y, z | 32 signed | 28 |
| `sigma_c`, `noise_gain` | 16 unsigned | 12 |
| `ln_mu_c` | 16 signed | 12 |
| `out_clutter`, `out_amp` | 32 signed | 16 |

## Parameters

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| `clutter_generator` | `N` | 1024 | frame and transform length (power of two) |
| `clutter_generator` | `Q1`, `Q2` | 3, 6 | trinomial taps of the two generators |
| `clutter_generator` | `SEED1`, `SEED2` | 31'h2545F491, 31'h1B873593 | generator seeds (nonzero) |
| `fft` | `INVERSE`, `SCALE` | 0, 1 | transform direction; halve each stage |
| `cordic` | `MODE`, `STEPS`, `TAG_W` | CIRC_ROT, 30, 1 | CORDIC mode; iterations; width of the side-band tag |

The published figures suggest about 1024 points for the filter, but no
transform length is stated, so N = 1024 is a reading of those figures.

## Verification

Each module has a self-checking testbench in `tb/`. Every testbench prints
`TB_RESULT checks=… failures=…`.

| Testbench | What it checks |
|---|---|
| `tb_tausworthe_prng` | Words against a bit-serial model of the feedback register. Period 127 of a 7-bit instance. |
| `tb_cordic` | All four modes against real math, within 2^-20. Tag alignment. Latency. |
| `tb_box_muller` | 4000 pairs against real Box-Muller, within 4 LSB, including both extreme values of r1. Mean and variance. Latency. |
| `tb_fft` | 64-point forward and inverse transforms and one 1024-point forward transform against a direct DFT, with random back-pressure. Latency N/2·log2 N. |
| `tb_spectral_filter` | Products against real math, with random gaps and back-pressure. One-clock latency. |
| `tb_zmnl` | 3000 random operands against real `exp`, within 0.1 %, including clamp and saturation. Latency. |
| `tb_clutter_generator` | Full size (N = 1024), 7 frames. See below. |

Four more testbenches run the generator on the jobs it is meant for:

- **`tb_gauss_pdf`**: histograms 65536 samples from stages 1-2 against the
  N(0,1) density, using a chi-square test, the variance and the kurtosis.
- **`tb_lognormal_pdf`**: runs the full generator for 8 frames. It compares
  the amplitude histogram with the lognormal density, and the sample mean and
  variance with `exp(mu + sigma^2/2)` and `exp(2mu + 2sigma^2) - exp(2mu + sigma^2)`.
- **`tb_pulse_compression`**: uses the FFT, `spectral_filter` and IFFT blocks
  as a frequency-domain matched filter. The replica is a 64-sample chirp, and
  the echo comes from four scatterers. The output must match a
  real-arithmetic model, and its four largest peaks must sit exactly at the
  scatterer delays.
- **`tb_clutter_correlation`**: follows the host procedure above. It picks a
  wanted output correlation, `s(m) = exp(-m^2/72)` at `sigma_c = 1`, and
  converts it to rho(m). It then loads `H(k) = sqrt(DFT(rho))` and runs 64
  frames. The measured correlations of z and of ln z must match what the
  loaded H gives, at lags 1 to 20.

`tb_clutter_generator` runs three phases against an independent model of the
generators and of Box-Muller:

- **All-pass H**: every output sample must match. The mean amplitude must
  match `mu_c exp(sigma_c^2/2)`. The frame period must be exactly 7202 clocks.
- **Low-pass H**: the variance and the lag-1 correlation (> 0.9) of ln z.
- **Large sigma_c**: saturation, with every sample still checked.

The top-level test simulates in well under a second. To run a testbench with
Verilator:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl \
    rtl/clutter_pkg.sv tb/tb_clutter_generator.sv --top-module tb_clutter_generator -o sim
./obj_dir/sim
```

## Limits and departures

- Only the lognormal ZMNL is implemented. Weibull and K-distributed clutter
  would need another nonlinearity in stage 6.
- The uniform word comes from two 31-bit generators, 16 bits each. The
  source speaks of one 32-bit sequence, while its waveforms show 31-bit
  registers.
- A FIFO buffers x2 so that it stays aligned with x1. The published block
  diagram draws a plain wire.
- Output comes in frame bursts, and correlation does not continue across
  frames; there is no overlap-save.
- The FFT frame memories are written as plain arrays with two write ports
  during CALC. An FPGA build would bank them into dual-port block RAMs.
- The filter coefficients are not designed on chip. The host computes H(k)
  from the desired clutter spectrum and loads it.
