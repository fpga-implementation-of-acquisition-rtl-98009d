# GPS acquisition engine: parallel code-phase search with FFTs

A GPS receiver must work out which satellites it can see before it can track
them. For each one it needs a rough estimate of two unknowns. One is the
**code phase**: where the satellite's 1023-chip C/A code starts within the
1 ms code period of the received samples. The other is the **carrier
frequency**: the intermediate frequency (IF) shifted by the Doppler offset.
This RTL searches a grid of candidate frequencies. For each candidate it
tests all code phases at once by circular correlation through FFTs. This is
known as *parallel code-phase search*.

One **cell** of the search is one satellite at one frequency bin. For each
cell:

1. One code period of the IF signal `s` (N samples) is multiplied by the
   bin's sine and cosine carriers: `I = s·sin`, `Q = s·cos`.
2. `A = FFT(I + jQ)` and `B = FFT(PRN)`, where PRN is the satellite's C/A
   code resampled to N samples.
3. `u = IFFT(A · conj(B))` is the circular correlation of signal and code at
   all N lags.
4. `|u|² = R² + I²` is stored in a memory indexed by lag (code phase).
5. The largest `|u|²` and its lag are found, along with the second-largest
   value more than one chip away from the peak.

After all the bins of a satellite, the bin with the strongest peak wins. The
satellite is declared **visible** if that peak is more than 2.5 times its
second peak. The engine then reports the satellite ID, the code phase and the
carrier frequency of the winning bin, and moves on to the next satellite with
a new PRN code.

Default configuration: 32.768 MHz sampling, so N = 32768 samples per 1 ms
code period. The IF is 9.548 MHz. The search covers 29 bins 500 Hz apart
(IF ± 7 kHz) and satellite IDs 1–32. A second configuration, also supported
through parameters, uses 8.192 MHz sampling, N = 8192 and a 2.046 MHz IF.

## Structure

```
acq_top
 ├─ acq_controller      search order: satellites × bins, one cell at a time
 ├─ acq_prn_gen         internal C/A code generator + upsampler to N samples
 ├─ acq_mixer           I = s·sin, Q = s·cos
 ├─ acq_fft  u_fft_sig  forward FFT of I + jQ          (unscaled, 28 bit)
 ├─ acq_fft  u_fft_prn  forward FFT of the ±1 PRN code  (unscaled, 18 bit)
 ├─ acq_cmul_conj       A·conj(B), shifted right by log2 N (32 bit)
 ├─ acq_fft  u_ifft     inverse FFT, scaled by 1/2 per stage (32 bit)
 ├─ acq_magnitude       |u|² = R² + I²  (64 bit)
 ├─ acq_mag_memory      N × 64-bit store of |u|², indexed by code phase
 ├─ acq_peak_detector   peak, its index, second peak (two scans)
 └─ acq_fine_detection  best bin over the grid, 2.5 ratio test, frequency
acq_pkg                 grid constants, peak_result_t
```

The three groups are the correlator (mixer to magnitude memory), peak
detection and fine detection.

## The sample interface

The engine does not make its own carriers. Like the system it models, it
receives the incoming signal, the carriers and optionally the sampled PRN
code as streams from outside. While `busy`, it asks for the cell
`(cur_sat, cur_bin)`. The source then streams samples `k = 0 … N-1`:

| port     | width | content                                                   |
|----------|-------|-----------------------------------------------------------|
| `sig_in` | 4 s   | IF sample k (the same recorded code period for every cell) |
| `sin_in` | 8 s   | `round(127·sin(2π f_bin k / fs))`                         |
| `cos_in` | 8 s   | `round(127·cos(2π f_bin k / fs))`                         |
| `prn_in` | 1     | chip `floor(k·1023/N)` of satellite `cur_sat`, 0 = +1, 1 = −1 |

Here `f_bin = IF + (cur_bin − 14)·500 Hz`. A sample moves on a clock where
`sample_valid && sample_ready`. Each cell takes exactly N samples, and the
carrier phase and code start at k = 0. With `prn_external = 0`, `prn_in` is
ignored and the PRN comes from `acq_prn_gen`. That generator is the standard
GPS Gold code: G1 = x¹⁰+x³+1, G2 = x¹⁰+x⁹+x⁸+x⁶+x³+x²+1, with the per-satellite
G2 phase-selector taps. `sat_first … sat_last` chooses the satellites to
search. `start` begins a search, `res_valid` pulses once per satellite, and
`done` pulses at the end.

Results: `res_sat_id`, `res_visible`, `res_code_phase` (in samples,
0 … N−1), `res_carrier_hz` (the centre of the winning bin, in Hz) and
`res_peak` (`|u|²` at the peak).

The code phase is the delay of the received code relative to the local code.
If the received signal contains `PRN[(k − d) mod N]`, the reported phase is
`d`.

## The FFT core (`acq_fft`)

This is the largest and least obvious block. It is a streaming radix-2
pipeline of the single-path delay-feedback kind. There are log2 N butterfly
stages in a row. Each stage has a feedback delay line of D words, and the
delay lines together hold N − 1 samples. The pipeline takes one sample and
gives one result on every step.

* **Forward** (`INVERSE = 0`): decimation in frequency, with
  D = N/2, N/4, …, 1. Samples go in in natural order and bins come out in
  bit-reversed order. The twiddle is applied to each difference as it
  leaves its delay line.
* **Inverse** (`INVERSE = 1`): decimation in time, with D = 1, 2, …, N/2.
  Bins go in in bit-reversed order and samples come out in natural order.
  The twiddle is applied to the second operand before the butterfly.

Because of this pairing the three FFTs chain without any reordering memory.
The spectra leave the forward FFTs in bit-reversed order, are multiplied in
that order, and enter the inverse FFT in the order it expects. `out_idx`
gives the bin (forward) or sample (inverse) number of each output.

Streaming rules:

* The pipeline steps on every accepted input sample. A gap in the input
  stalls it.
* A frame is N consecutive samples. Its first result is registered on the
  step that takes its last sample, so without gaps it appears N clocks after
  the first sample. The other N − 1 results follow during the next frame,
  so back-to-back frames stream without a break.
* If a frame has ended and no new input comes, the core pushes one frame of
  zeros through on its own to deliver the pending results. `in_ready` is
  low for those N clocks. There is no output back-pressure.

The twiddle ROM holds N/2 entries each of `round(32767·cos(2πk/N))` and
`round(32767·sin(2πk/N))`, to within one unit. It is filled by an `initial`
loop that uses integer arithmetic only, so synthesis tools can evaluate it.
The loop sums the sine and cosine series in Q30 for angles up to π/4 and
fills the rest of the half turn by symmetry. Forward transforms use `e^{−j…}` and inverse transforms use
`e^{+j…}`.

Word growth:

* The two forward FFTs are **unscaled**. Each gets `IN_W + log2 N + 1` bits,
  which no input can overflow.
* The inverse FFT halves the result of every butterfly (round half up), so
  it computes the usual 1/N-normalised inverse.
* Between them, `acq_cmul_conj` drops log2 N low bits.

The correlation therefore reaches the magnitude stage scaled by 2^−log2N
relative to the exact circular correlation. At N = 32768 the worst case fits
32 bits, and `|u|²` fits 64.

## Timing

For a cell with no input stalls, in clocks:

| step                                              | clocks  |
|---------------------------------------------------|---------|
| PRN rewind                                        | 1       |
| stream the samples into both forward FFTs         | N       |
| forward FFTs flush their spectra; product into the inverse FFT | N |
| inverse FFT flushes the correlation into the magnitude memory | N |
| peak detector (two scans)                         | 2N + 4  |

With the few clocks of control this comes to 5N + 7 clocks per cell, as
measured (the testbenches allow 5N to 5N + 16). At N = 32768 that is
163,847 clocks per cell and 4.75 M clocks per satellite (29 cells). That
is 0.12 s per satellite at the 39.193 MHz clock reported for the original
implementation, and 3.9 s for all 32 satellites.
At N = 8192 a cell takes 40,967 clocks.

Cells are processed strictly one after another: the next cell's samples are
only asked for once the peak detector has finished. The FFTs could take the
next cell straight after the current one, so there is room to overlap cells
(about 2N per cell) if throughput matters.

## Detection rule and what the frequency output means

* `acq_peak_detector` returns the largest `|u|²`, its index, and the largest
  value whose circular distance from the peak index is more than
  `EXCL = round(N/1023)` samples (one chip).
* `acq_fine_detection` keeps, over the 29 bins, the result with the largest
  peak (on a tie, the earlier bin). It then declares the satellite visible
  when `peak·2 > second·5`, which is the ratio test `peak/second > 2.5`.
  `THR_NUM`/`THR_DEN` change the threshold.

`res_carrier_hz` is the **centre of the winning 500 Hz bin**. No refinement
below the bin spacing is made. The carrier is therefore only known to within
±250 Hz. A tracking loop or a separate fine-frequency search, given the code
phase, would have to narrow it.

## Departures from the design this RTL follows, and choices of its own

* The original uses a vendor FFT core in pipelined streaming mode, whose
  internals are not described. This design builds its own streaming FFT (see
  above). The forward and inverse transforms use different decompositions so
  that no reordering memory is needed, and an idle core flushes itself.
* Fine detection reports the bin frequency only (see above). The original
  reports frequencies with finer resolution than the 500 Hz grid. The method
  for that is not part of this design.
* The spectra product uses a full four-multiplier complex multiply with
  conjugation.
* The peak search is a sequential scan with one comparison per clock, not a
  parallel comparator tree. The second-peak exclusion window of one chip is
  this design's definition.
* These are this design's own choices:
  * the widths: 4-bit samples, 8-bit carriers and the internal widths above;
  * the valid/ready handshakes;
  * the `cur_sat`/`cur_bin` request outputs;
  * the `sat_first`/`sat_last` range;
  * the PRN-source select;
  * asynchronous active-low reset.
* The host-side data preparation is outside this RTL: reading the recorded
  file, reshaping, and converting floating point to fixed point. So is the
  JTAG co-simulation wrapper. The testbenches model the host with
  `tb/tb_gps_source.sv`.

## Resources, for orientation

The magnitude memory is N × 64 bits: 2 Mbit at N = 32768. Each FFT holds
N − 1 complex words in its delay lines, plus a twiddle ROM of N/2 × 2 × 16
bits. At the defaults the three FFTs hold about 32768 × 56, 32768 × 36 and
32768 × 64 bits. The long delay lines (N/2, N/4, …) have the shape of block
RAM with one read and one write per clock; the short ones fit in registers.
Each FFT has log2 N complex twiddle multipliers, one per stage.

## Simulation

Every testbench is self-checking and ends with a `TB_RESULT checks=… failures=…`
line. With plain Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_acq_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/acq_pkg.sv tb/tb_acq_top.sv
./obj_dir/Vtb_acq_top
```

| testbench               | what it covers                                                                  | run time |
|-------------------------|--------------------------------------------------------------------------------|----------|
| `tb_acq_top`            | N = 1024, full 29-bin grid: two satellites in noise, external and internal PRN, input stalls, visible and not-visible verdicts, cell timing | ~2 s |
| `tb_acq_top_full`       | all defaults (N = 32768, 9.548 MHz IF): satellites 21 and 22 found at their code phases and nearest bins, 23 rejected | ~30 s |
| `tb_acq_top_8k`         | 8.192 MHz configuration (N = 8192, 2.046 MHz IF)                                | ~5 s |
| `tb_acq_fft`            | 64-point forward and inverse vs. a direct DFT over three frames: output order, latency, gap-free streaming, flush, stalls | <1 s |
| `tb_acq_prn_gen`        | all 32 codes vs. a G2-delay reference, published first-10-chip values           | <1 s |
| `tb_acq_peak_detector`, `tb_acq_fine_detection`, `tb_acq_controller`, `tb_acq_mixer`, `tb_acq_cmul_conj`, `tb_acq_magnitude`, `tb_acq_mag_memory` | each block on its own | <1 s |

The synthetic input in `tb_gps_source.sv` consists of a 4-bit quantised sum
of up to two C/A-coded carriers and Gaussian noise. It does not resemble real
recorded data in signal-to-noise ratio: its satellites are far stronger than
real ones. The fixed-point scaling has not been tried on weak, real-world
signals.

## Changing it

* `N` (a power of two, at least 1024) sets the FFT length and the memory
  depth. Set it to fs/1 kHz so that one code period fills the FFT.
* `IF_HZ`, `STEP_HZ` and `NUM_BINS` only affect the reported frequency and
  the number of cells. The carriers themselves come from the source.
* `SIG_W` and `CAR_W` set the input widths. The internal widths follow from
  them, and from `N`, in `acq_top`.
