# Cyclostationary feature detector for OFDM spectrum sensing

A cognitive radio may use a channel only while the licensed ("primary")
user is silent, so it must decide, at low SNR, whether the channel holds an
OFDM signal or only noise. This design makes that decision from a property
that noise does not have: each OFDM symbol starts with a cyclic prefix, a
copy of its own last samples. Multiplying the received signal by a delayed,
conjugated copy of itself,

    r(n) = x(n) · conj(x(n − τ)),

gives, for τ equal to the useful symbol length, a sequence whose mean is
non-zero during every prefix and zero elsewhere. It is therefore periodic with
the symbol period, and its spectrum has lines at multiples of the symbol rate
(the cyclic frequencies α). The detector takes the FFT of r(n) and compares
the bin at α with the statistics of all bins:

    T = (X²·D + Y²·A − 2·X·Y·B) / (A·D − B²)

where F(α) = X + jY, A = mean(X²), D = mean(Y²) and B = mean(X·Y) over all N
bins. This is r·φ⁻¹·rᵀ for r = [X Y] and the 2×2 covariance φ = [[A B] [B D]].
With noise only, F(α) looks like any other bin and T is close to chi-square
with two degrees of freedom. A threshold η = F⁻¹χ²(1 − P_FA) then sets the
false-alarm rate. A primary user is declared present when T > η.

The design is all digital and starts at the ADC samples. The RF front end
and the converter are not part of it.

## Configuration

| Item | Value | Where set |
|---|---|---|
| OFDM symbol | 64 QPSK subcarriers + 16-sample cyclic prefix = 80 samples | property of the signal |
| Samples per decision | 4000 (50 symbols) | `SAMPLES` parameter of `cfd_detector` |
| FFT | 4096 points, radix 4, 6 pipelined stages | `N` parameter |
| Lag τ | 64 by default, 1 … 64 at run time | `tau` port, depth `TAU_MAX` |
| Number format | Q15.16, 32 bits: sign, 15 integer bits, 16 fraction bits | `cfd_pkg` |
| Complex word | 64 bits: real part in bits 63:32, imaginary part in bits 31:0 | `cfd_pkg::cplx_t` |
| False-alarm probability | 0.1, so η = −2·ln 0.1 = 4.6052 (301804 in Q47.16) | `threshold_cmp`, writable |

These are the sizes of the original architecture. Its reference
implementation ran at 100 MHz (110 MHz maximum) in a 90 nm process.

## Data path

```
x(n) ──► autocorrelator ──► zero pad ──► 4096-pt radix-4 FFT ──┬─► MAC X·X  (A)
          delay FIFO (τ)     4000→4096    6 stages, one bin     ├─► MAC Y·Y  (D)
          conjugate           samples     per clock             ├─► MAC X·Y  (B)
          complex multiply                                      └─► frequency selector F(α)
                                                                        │
                           decision ◄── threshold ◄── test-statistic unit (T)
```

* **autocorrelator** (`autocorrelator`, `delay_fifo`, `conj_unit`). The delay
  memory is a circular buffer of 64 words, read τ words behind the write
  pointer. The delayed word is conjugated by the two's complement of its low
  32 bits, then multiplied by the current sample. For the first τ samples of
  a frame the delayed sample is zero. Latency is 2 clocks.
* **zero padding** (inside `cfd_detector`). The 4000 products are followed
  by 96 zeros, so the FFT always sees a full 4096-sample frame.
* **FFT** (`fft_r4`, described below). Its output is not reordered.
* **three MAC blocks** (`mac_unit`). Each registers its two inputs, forms a
  64-bit product and accumulates it in 80 bits. After the frame, the
  fixed-point conversion divides the sum by 4096 (the mean over the bins),
  returns to Q15.16 and saturates to 32 bits. The output updates only while
  `en` is low, so it stays stable while a frame accumulates.
* **frequency selector** (`freq_selector`). A 16-bit counter counts FFT
  outputs. When the count equals the count register, the 64-bit bin is
  latched.
* **test-statistic unit** (`test_stat_unit`, described below).
* **threshold comparator** (`threshold_cmp`). This is a 64-bit register with
  a comparator.

Idle blocks are held by enable signals. These stand in for the clock gating
of the original design: only enables are modelled, not gated clocks.

## The pipelined FFT

This is the least obvious part.

**Algorithm.** Radix-4 decimation in frequency on N = 4⁶ = 4096 points. Stage
s works on blocks of M = N/4ˢ samples (4096, 1024, 256, 64, 16, 4). For
n = 0 … M/4−1 and k = 0 … 3 it produces

    out[k·M/4 + n] = ( Σ_{i=0..3} in[n + i·M/4] · (−j)^(i·k) ) · W_N^(n·k·N/M),   W_N = e^(−j2π/N)

Every stage writes its result back "in place". After six stages, bin k
therefore sits at the position whose base-4 digits are those of k in reverse
order. The output stream is in **base-4 digit-reversed order**, and it is
used in that order. The MACs do not care about order. The frequency
selector is simply given the reversed position. For example, α = 51 (the
bin nearest 4096/80) gives position 3264, and α = 256 gives position 4.

**Stage hardware** (`fft_stage`):

* A memory selector writes incoming samples, one per clock, into memory 1.
  When M samples have arrived it switches to memory 2, then back again.
* The memory that was just filled goes to the sequencer. The sequencer
  reads four words (n, n+M/4, n+M/2, n+3M/4) per clock, in output order.
  It also fetches W_N^(n·k·N/M) from the shared twiddle generator into the
  stage's twiddle register.
* The radix-4 butterfly (`r4_butterfly`) forms the k-th output: the
  multiplications by ±j are swaps and negations. It then multiplies the
  result by the twiddle factor. The butterfly has two register stages.

A stage gives its first output M + 3 clocks after its first input. It then
gives M outputs on consecutive clocks while the next block fills the other
memory, so a stream of one sample per clock passes through without stalls.

**Whole transform.** The latency is Σ(M + 3) = 5460 + 18 = **5478 clocks**
from the first input to the first output. The 4096 bins then follow on 4096
consecutive clocks. There is no scaling between stages: the result is the
plain sum Σ r(n)·W^(nk), and overflow wraps. For inputs of about unit power
the largest bin is below 4000, well inside the Q15.16 range of ±32768.

**Twiddle generator** (`twiddle_gen`). This is a table of W_N^m for
m = 0 … 4095, with round(65536·cos) and round(−65536·sin) as parts. It has
one read port per stage. The table is filled at start-up from the cosine and
sine functions, as a ROM initialisation would be.

**Control unit** (`fft_ctrl`). A counter starts with the first sample of a
frame. Stage s is enabled from its first input, at clock
T_s = Σ_{i<s}(M_i + 3), until its last output, at T_s + M_s + 3 + N − 1, plus
one clock of margin. `en_tf` is high while any stage is enabled. Because the
windows are computed from a clock count, **a frame must arrive on 4096
consecutive clocks**; an assertion checks this at the top level. The next
frame may start once the FFT is idle.

## Test statistic

`test_stat_unit` uses eight multipliers, two adders, two subtractors and one
divider, in four steps:

1. X·X, Y·Y, (X+X)·Y, A·D, B·B
2. X²·D, Y²·A, 2XY·B, A·D − B²
3. X²·D + Y²·A − 2XY·B
4. the division

Every product keeps its full width:

* numerator: Q50.48 in 99 bits
* denominator: Q32.32 in 65 bits
* quotient: Q47.16, saturated to 64 bits

The divider is a restoring divider. It works on the magnitudes, one quotient
bit per clock, and then applies the sign, so it rounds toward zero. A zero
denominator gives the largest value of the right sign. The statistic is
ready 105 clocks after `start`.

Two points differ from a literal reading of the original equations:

* **The denominator is the determinant A·D − B².** The closed form printed
  in the source reads A·C − B² with C = B. That contradicts the φ⁻¹
  definition it derives from.
* **There is no factor N in front of the statistic.** The MACs already
  divide by N. Under noise only, T is then about χ² with two degrees of
  freedom, which matches the threshold of 4.6052.

## Interface and timing (`cfd_detector`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `in_valid`, `x_in` | in | 1, 64 | ADC sample x(n), {re, im} Q15.16 |
| `in_ready` | out | 1 | high while the frame still takes samples |
| `tau` | in | 7 | lag, 1 … 64; hold it during a frame |
| `count_value` | in | 16 | stream position of F(α) (digit-reversed α); hold it during a frame |
| `thr_we`, `thr_din` | in | 1, 64 | write the threshold (Q47.16) |
| `t_stat`, `stat_valid` | out | 64, 1 | statistic (Q47.16) and its one-clock strobe |
| `decision`, `decision_valid` | out | 1, 1 | 1 = primary user present; strobe one clock after `stat_valid` |
| `alpha_found` | out | 1 | F(α) was captured in this frame |
| `threshold` | out | 64 | current threshold |
| `busy` | out | 1 | frame in progress |

A frame is 4000 samples on consecutive clocks. `in_ready` falls after the
4000th sample and rises again when the decision is out. The decision appears
5686 clocks after the last sample, and the whole detection takes about
9690 clocks (97 µs at 100 MHz). Frames do not overlap.

The design assumes received samples of about unit average power, as after
gain control. Much stronger inputs overflow the Q15.16 FFT and MAC outputs
(the MACs saturate). The test benches normalise their input power.

## Design choices beyond the original description

The original architecture gives:

* the block structure
* the sizes and the number format
* the delay FIFO with conjugation by two's complement
* the FFT's stage structure: memory selector, two memories, sequencer,
  twiddle registers, butterfly, control unit and twiddle generator
* the MAC with reset, enable and fixed-point conversion
* the counter/comparator/latch frequency selector
* the operator count of the statistic unit
* a reconfigurable threshold register

The following are choices of this implementation:

* **Pipelines.** Pipeline depths, and truncation of every product to Q15.16.
* **Zero padding.** The 4000 → 4096 zero padding, and the frame handshake.
* **FFT.** The sequencer's read order, the twiddle table layout, and the
  enable windows of the control unit. Each stage memory holds its own block
  size M rather than N words.
* **MAC.** The division by N inside the MAC's fixed-point conversion, and
  the saturation.
* **Frequency selector.** Its count register loads while `reset` is high.
  It compares for equality, as drawn, rather than waiting for a counter
  overflow.
* **Statistic unit.** The Q47.16 format, the bit-serial divider, and the
  determinant and factor-N readings described above.
* **Threshold.** The default value (two degrees of freedom), and the
  decision rule T > η.

## Files

* `rtl/cfd_pkg.sv`: number types and complex arithmetic.
* `rtl/cfd_detector.sv`: top level.
* `rtl/autocorrelator.sv`, `delay_fifo.sv`, `conj_unit.sv`
* `rtl/fft_r4.sv`, `fft_stage.sv`, `r4_butterfly.sv`, `twiddle_gen.sv`, `fft_ctrl.sv`
* `rtl/mac_unit.sv`, `freq_selector.sv`, `test_stat_unit.sv`, `threshold_cmp.sv`
* `tb/cfd_ref_pkg.sv`: reference models. They include an in-place radix-4
  FFT written as a plain array algorithm, the statistics and the test
  statistic in 128-bit integers, and an OFDM-plus-noise frame generator.
* `tb/tb_<module>.sv`: one self-checking test bench per module.
* `tb/tb_cfd_detector.sv`: end-to-end test at full size.
* `tb/tb_pd_sweep.sv`: detection-rate sweep at full size.

## Verification

Each test bench prints `TB_RESULT checks=<n> failures=<n>` and stops by
itself; a watchdog ends it if the design hangs. To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/cfd_pkg.sv tb/cfd_ref_pkg.sv tb/tb_cfd_detector.sv \
    --top-module tb_cfd_detector
./obj_dir/Vtb_cfd_detector
```

Replace the last file and the top module name to run another bench.

* **Block benches** compare against values computed independently, bit for
  bit: conjugation, lag, complex products, butterfly outputs, twiddle
  values and symmetries, enable windows, one FFT stage, MAC sums with
  saturation, selector latching, and statistics in 128-bit arithmetic.
* **`tb_fft_r4`** checks the 64- and 256-point FFT in two ways:
  * bit for bit against the array model;
  * within 10⁻³ of a floating-point DFT at the bin each stream position
    names, which checks the digit-reversed order.

  It also checks the latency and that the output stream has no gaps.
* **`tb_cfd_detector`** runs four full-size frames:
  * OFDM at 0 dB;
  * noise only;
  * OFDM with a rewritten threshold;
  * OFDM at 10 dB with lag 16.

  For each frame it checks all 4096 FFT outputs in stream order, A, B, D,
  F(α), T and the decision against the models. It also checks:
  * the FFT latency of 5478 clocks;
  * 4096 output bins on consecutive clocks;
  * that zero padding, the stage enables switching on and off, the
    selector latch, the threshold write, the lag change and both decisions
    all occur.
* **`tb_pd_sweep`** runs 20 frames per point at the default threshold and
  checks every statistic bit for bit. Measured rates:

| Input | Frames declared occupied |
|---|---|
| noise only | 2 / 20 (false alarm ≈ 0.1, as designed) |
| −22 dB | 3 / 20 |
| −18 dB | 1 / 20 |
| −14 dB | 3 / 20 |
| −10 dB | 8 / 20 |
| −6 dB | 19 / 20 |
| 0 dB | 20 / 20 |

  This agrees with the original evaluation: a detection probability of
  0.95 at −6 dB, and about the false-alarm rate near −22 dB. With 20 frames
  per point the rates are coarse.

## Limits and notes for changing the design

* **Reference cyclic frequency.** α = 51 is used as the nearest bin to the
  first cyclic frequency 4096/80 = 51.2. The fifth harmonic (bin 256) is
  exactly zero for a prefix that is one fifth of the symbol.
* **Other sizes.** `N` must be a power of 4, and `SAMPLES` ≤ `N`. The
  control unit and the latency follow from the parameters. The MAC's
  `AVG_SHIFT` (12) must equal log2 N if N changes.
* **Memories.** The FFT stage memories are register arrays with one write
  and four reads per clock. For an ASIC they would become four banked
  single-port memories per buffer (Σ 2·M·64 bits ≈ 700 kbit in total).
* **Twiddle table.** It is initialised with real-number cosine and sine.
  Synthesis tools that cannot evaluate real arithmetic need the table
  supplied as constants instead.
* **Frames.** A frame must not have gaps, and frames cannot overlap. A
  continuous sensing mode would need the MACs and the statistic unit to
  double-buffer.
