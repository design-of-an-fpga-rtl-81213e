# Multi-feature FFT spectrum analyzer

This design takes a frame of N real time-domain samples and returns four
spectra for it: frequency, amplitude, phase and power. A fixed-size radix-2
FFT turns the frame into N complex bins X(k). A spectrum extractor then works
out four features for each bin:

| feature   | formula                          | output stream |
|-----------|----------------------------------|---------------|
| frequency | f_k = k · Fs / N                 | `m_freq_*`    |
| amplitude | A_k = sqrt(Re² + Im²) / N        | `m_amp_*`     |
| phase     | φ_k = atan(Im / Re), in radians  | `m_phase_*`   |
| power     | P_k = (Re² + Im²) / N²           | `m_power_*`   |

Every block-to-block link is an AXI stream. Each of the four features leaves on
its own stream. TUSER carries the bin index k and TLAST marks bin N−1. The
default size is N = 16, with one clock domain and a synchronous active-low
reset.

```
 s_axis ─► input reg ─► FFT subsystem ──Re──► spectrum extractor ─► freq  reg ─► m_freq
 (x[n])    (axis_reg)   ┌───────────────┐─Im──►  counter k        ─► amp   reg ─► m_amp
                        │ data_ram      │        Re²+Im²          ─► phase reg ─► m_phase
                        │ dif_butterfly │        udiv ×3, isqrt   ─► power reg ─► m_power
                        │ twiddle_rom   │        cordic_atan         (axis_reg ×4)
                        └───────────────┘   fs ─►
```

## Number format

All data words are 32-bit signed fixed point with 16 fraction bits (Q16.16).
This applies to input samples, FFT bins, `fs` and all four results. The phase
is in radians. Twiddle factors are Q2.30. Internally, Re² + Im² is held exactly
as a 66-bit Q32.32 value. The 32-bit word width matches the buses of the
original design. That design never states its number format; Q16.16 is this
design's own choice (see "Where this design departs" below).

Consequences:

* The FFT applies no scaling. The largest |X(k)| is about N · max|x|, and it
  must stay below 2¹⁵. With N = 16 the input can therefore reach about ±2000.
* One Q16.16 LSB is 1.5·10⁻⁵. That sets the output resolution. Frequencies
  such as 6.25 are exact.

## FFT subsystem (`fft_subsystem`)

This block is an in-place, iterative radix-2 decimation-in-frequency (DIF) FFT
built around a single butterfly. A frame passes through three phases:

1. **LOAD**: `s_axis_tready` is high. Up to one sample per clock is written to
   `data_ram[n]`, with a zero imaginary part. TLAST is ignored because a frame
   is always N samples long.
2. **COMPUTE**: this phase runs log2(N) iterations of N/2 butterflies, one
   butterfly per clock. In iteration s (0-based):

   ```
   h    = N / 2^(s+1)                 butterfly span
   j    = b mod h                     b = butterfly number, 0 .. N/2-1
   i0   = 2·(b − j) + j,  i1 = i0 + h
   X[i0] ← X[i0] + X[i1]
   X[i1] ← (X[i0] − X[i1]) · W_N^(j·2^s)
   ```

   For N = 16 the twiddles are W⁰…W⁷ in the first iteration, then W⁰,²,⁴,⁶,
   then W⁰,⁴, then W⁰ only. `data_ram` has two combinational read ports and
   two write ports, so a butterfly reads both operands and writes both results
   in the same clock.
3. **OUTPUT**: a DIF flow graph leaves its results in bit-reversed order. The
   block reads address bitrev(k) for k = 0 … N−1, so the bins leave in natural
   order. Re and Im go out on two separate streams, and each stream has its own
   handshake. The next bin is loaded only after both halves of the current bin
   have been taken. At best this gives one bin every two clocks.

The transform is X(k) = Σ x(n)·e^(−j2πnk/N). The twiddle table holds
W_N^k = cos(2πk/N) − j·sin(2πk/N) for k < N/2. It is computed at elaboration
time from `$cos`/`$sin`, so it follows any N without a data file.

Timing for N = 16: 16 load clocks, then 32 compute clocks. The first bin is
valid 33 clocks after the last sample is accepted.

## Spectrum extractor (`spectrum_extractor`)

The extractor joins the Re and Im streams. It accepts a bin when both streams
are valid and all four results of the previous bin have left. A counter of
accepted bins supplies k and wraps at `n_samples`. After one clock the four
units start in parallel on the registered bin:

| result    | unit                                              | clocks after start |
|-----------|---------------------------------------------------|-------------------|
| frequency | `udiv` of k·Fs (38 bit) by N                      | ≈ 38             |
| phase     | `cordic_atan` on (Re, Im), 24 micro-rotations     | ≈ 25             |
| amplitude | `isqrt` of Re²+Im² (33 clocks), then `udiv` by N (33 clocks) | ≈ 67 |
| power     | `udiv` of Re²+Im² (66 bit) by N², then >>16       | ≈ 66             |

Each result waits in its own output register until its stream takes it. One
slow consumer therefore stalls only the next bin, never another stream's
current result. With all outputs ready, the extractor handles about one bin
every 70 clocks. The extractor is the bottleneck of the whole analyzer.

**The phase is the arctangent of the ratio, not atan2.** Its range is
[−π/2, π/2]. A bin with Re = −1.29 and Im = −4.16 has phase +1.27, not −1.88.
The divide-then-arctangent becomes a single CORDIC vectoring unit, which never
forms Im/Re. The unit folds the vector into the right half-plane,
(|Re|, Im·sign(Re)), then rotates it onto the x axis. The summed rotation
angles give atan(Im/Re). Special cases:

* Re = 0 gives ±π/2.
* Im = 0 gives exactly 0, so bins 0 and N/2 of a real frame have zero phase.

x and y carry 8 guard bits. The angle is accumulated in Q3.28 and rounded to
Q16.16.

Results are truncated, except the rounded phase. `udiv` divides by zero as
all ones.

## Registers and streams (`axis_reg`)

Registers sit after the input and on each of the four outputs. Each is an
AXI-stream register slice with a one-entry skid buffer:

* `m_tdata`, `m_tvalid` and `s_tready` all come from flip-flops.
* The slice still moves one word per clock.
* A word already in flight when the output stalls is caught in the skid
  register.

On the outputs the slice's payload is the packed `result_t`
`{data, idx, last}` from `sa_pkg`.

## Top-level interface (`spectrum_analyzer`)

| port                                  | dir | meaning                                  |
|---------------------------------------|-----|------------------------------------------|
| `clk`, `rst_n`                        | in  | clock, synchronous active-low reset      |
| `s_axis_tdata[31:0]`, `_tvalid`, `_tready`, `_tlast` | | sample stream, Q16.16          |
| `fs[31:0]`                            | in  | sampling frequency, Q16.16, ≥ 0          |
| `m_{freq,amp,phase,power}_tdata[31:0]`| out | result, Q16.16                           |
| `m_*_tuser[5:0]`                      | out | bin index k                              |
| `m_*_tlast`, `m_*_tvalid`, `m_*_tready` |   | end of frame, handshake                  |

Parameter `N` (default 16) is the FFT length. It must be a power of two
between 4 and 64: the 6-bit index in `sa_pkg::IDX_W` sets the upper limit. N
is also the "number of samples" given to the extractor. Keep k·Fs/N below
32768, since the frequency output is Q16.16.

A whole 16-sample frame takes about 16 + 32 + 16·70 ≈ 1170 clocks, and the
extractor sets that pace. The next frame can load while the extractor works
through the previous bins only after the FFT has handed over its last bin.
Until then `s_axis_tready` stays low.

## Accuracy

The reference frame is the 16 samples −1.6642, −0.5900, −0.2781, 0.4227,
−1.6702, 0.4716, −1.2128, 0.0662, 0.6524, 0.3271, 1.0826, 1.0061, −0.6509,
0.2571, −0.9444, −1.3218, with Fs = 100. For this frame the testbenches check
the design's output against a published floating-point (MATLAB) spectrum,
within these limits:

* FFT bins: 5·10⁻⁴. Most of that is because the samples are given to four
  decimals only.
* Amplitude and power: 10⁻⁴.
* Phase: 2·10⁻⁴.
* Frequency: exactly 0, 6.25, …, 93.75.

Against a double-precision model fed the same quantised samples, FFT bins
agree within 2·10⁻⁴. The extractor units agree within a few Q16.16 LSB.

Root-mean-square errors over the 16 bins of the reference frame, measured
against the published floating-point spectrum, with the default seed:

| quantity              | RMSE        |
|-----------------------|-------------|
| FFT, real part        | 7.9·10⁻⁵    |
| FFT, imaginary part   | 6.4·10⁻⁵    |
| frequency             | 0           |
| amplitude             | 1.2·10⁻⁵    |
| phase                 | 1.8·10⁻⁵    |
| power                 | 1.1·10⁻⁵    |

The testbenches print these values and fail if they exceed fixed limits.

## Where this design departs from the original, or fills gaps

* **Arithmetic.** The original was written through high-level synthesis with
  the C math library, probably in floating point. This design is fixed point
  throughout, with sequential divide, square-root and CORDIC units.
* **Sign of the imaginary part.** The original's published hardware results
  have the opposite imaginary sign (and so opposite phase) to its own FFT
  definition and to its MATLAB reference. This design follows the definition
  e^(−j2πnk/N) and matches the reference. Its phase for bin N/2 is 0.
* **Order in which results appear.** The original's waveforms show frequency,
  then amplitude, then phase, then power for each bin. Here the phase arrives
  first, because the CORDIC is the fastest unit. Every result carries its
  index, so a consumer does not depend on the order.
* **Schedule.** The original gives no clock-level schedule. The choices here
  are the FFT schedule (one butterfly per clock), the RAM organisation, the
  skid-buffer registers and the reset.
* **Not included.** The original's surroundings are not included: the file
  reader that supplies samples in simulation, and the signal generator, ADC,
  video DAC and display of a complete instrument.

## Files

| file                         | contents                                        |
|------------------------------|-------------------------------------------------|
| `rtl/sa_pkg.sv`              | formats, `sample_t`, `cplx_t`, `result_t`, Q16.16 helpers |
| `rtl/spectrum_analyzer.sv`   | top level                                       |
| `rtl/fft_subsystem.sv`       | DIF FFT controller and addressing               |
| `rtl/data_ram.sv`            | 2-read / 2-write complex frame memory           |
| `rtl/twiddle_rom.sv`         | elaboration-time twiddle table                  |
| `rtl/dif_butterfly.sv`       | combinational DIF butterfly                     |
| `rtl/spectrum_extractor.sv`  | four-feature extractor                          |
| `rtl/udiv.sv`, `rtl/isqrt.sv`, `rtl/cordic_atan.sv` | sequential arithmetic units |
| `rtl/axis_reg.sv`            | AXI-stream register slice                       |
| `tb/tb_<module>.sv`          | self-checking testbench of each module          |
| `tb/tb_fft_sizes.sv`, `tb/fft_size_check.sv` | FFT at N = 4 and N = 64 against a direct DFT |

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself. It
also has a watchdog. Example for the whole analyzer (about a second):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
    rtl/sa_pkg.sv tb/tb_spectrum_analyzer.sv --top-module tb_spectrum_analyzer
./obj_dir/Vtb_spectrum_analyzer
```

`tb_spectrum_analyzer` runs the reference frame and three random frames
through the default-size design. It applies random source gaps and random
back-pressure on every output, including long stalls. It reports how often the
design hit input back-pressure, output back-pressure, skid-register use and
end-of-frame, plus how many bins had a negative real part. Lint with
`verilator --lint-only -Wall -Irtl -y rtl rtl/sa_pkg.sv rtl/<module>.sv`.
