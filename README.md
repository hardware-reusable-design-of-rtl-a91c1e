# MFCC feature extraction core for distributed speech recognition

A mobile phone that hands speech recognition to a server should not send
audio; it should send, every few milliseconds, a few numbers that describe the spectrum of
the speech. The ETSI Aurora distributed speech recognition standard fixes
those numbers: for every frame of speech, thirteen mel-frequency cepstral
coefficients C0..C12 and the logarithm of the frame energy. This RTL computes
them in fixed-point hardware, as a parameterised soft core: 16-bit speech
samples go in, one feature vector per frame comes out.

The design follows the architecture published in *Hardware Reusable Design of
Feature Extraction for Distributed Speech Recognition* (a VHDL core
synthesised for an Altera Stratix FPGA). It is a re-implementation in
SystemVerilog, not the authors' code; where the publication leaves a detail
open, the choice made here is stated below and in the header comment of each
file.

## The signal chain

```
   clk2 (sample side)        |   clk1 (twice as fast)                 |  clk (any)
samples -> preemph -> frame -|-> Hamming window + bit reversal         |
             memory (write)  |          |                              |
                             |          v                              |
                             |   FFT working memory -> radix-2 DIT FFT |
                             |          |                              |
                             |          v  bins 0..N/2                 |
                             |      bin FIFO (write) -----------------|-> (read)
                             |                                         |    |
                             |                                         |    v
                             |        band_energy -> natural_log x2 -> mel_cepstrum
                             |                          |                   |
                             |                        log_e              C0..C12
```

| step | what it computes | module |
|---|---|---|
| pre-emphasis | y[n] = s[n] - (31/32) s[n-1] | `preemph` |
| framing | 256-sample frames, a new one every 128 samples | `frame_overlap` |
| windowing | x[n] = y[n] * w[n], Hamming, written in bit-reversed order | `hamming_window` |
| FFT | 256-point radix-2 decimation in time | `fft_r2dit` |
| energies | frame energy and 23 mel band energies from \|X[k]\|^2 | `band_energy` |
| logarithm | ln of each energy, via Mitchell's log2 | `natural_log`, `log2_mitchell` |
| cosine transform | C_i = sum_j ln(E_j) cos(pi i (j+0.5)/23) | `mel_cepstrum` |
| clock crossing | FFT bins from `clk1` to `clk` | `bin_fifo` |

Wrappers group them as in the original architecture: `preprocessing`
(pre-emphasis, framing, windowing), `fft_r2dit`, and `feature_extraction`
(energies, logarithms, cosine transform). `mfcc_frontend` is the top; it
also holds the FIFO that carries the bins into the feature-extraction clock.
Shared constants and the functions that fill the ROMs live in `mfcc_pkg`.

## Numbers and formats

There is no floating point anywhere. Samples and most intermediate values are
16-bit two's complement. Fractions are scaled by 2^10: the Hamming
coefficients (82 .. 1024), the cosines of the transform (-1024 .. 1024), and
every logarithm (10 fraction bits). FFT twiddle factors use 2^14.

| signal | width | scale |
|---|---|---|
| input sample, pre-emphasised and windowed sample | 16 | integer |
| FFT data path and bins | 25 = 16 + log2(256) + 1 | integer, never scaled |
| normalised bin (after the right shift by 8) | 16, saturating | integer |
| band and frame energies | 32, saturating | integer |
| `log_e`, band logarithms | 16 | 2^10 |
| `cep[i]` | 32 | 2^10 |

## The frame memory and its two clocks

This is the part of the design with the least obvious behaviour.

Frames are 256 samples long and overlap by half, so every sample belongs to
two frames. `frame_overlap` keeps exactly one frame, 256 words, and treats
the memory as two halves. New samples are written circularly on `clk2`. When
a half has just been filled, the memory holds a whole frame: the other half
(the older 128 samples, shared with the previous frame) followed by the half
just written. That frame is read out on `clk1`, oldest half first. Reads
therefore alternate between the orders 0..255 and 128..255, 0..127. The very
first frame waits until all 256 words have been written.

While the frame is read, new samples are already overwriting its oldest half.
This only works because the reader is faster: `clk1` runs at twice the
frequency of `clk2`, reading starts on the `clk1` cycle after the half
completes, and from then on the read address stays ahead of the write
address. The write side reports a completed half by toggling a flag. Because
`clk2` is assumed to be derived from `clk1` (half the frequency, rising edges
aligned), the read side samples the flag directly, without a synchroniser.
If your clocks are unrelated, add one and allow for its latency.

A frame is read only while the FFT can accept it. If the FFT is still busy
when a half completes, the frame waits. It stays intact as long as no new
sample arrives in the meantime. The first sample that overwrites a waiting
frame's oldest half raises `overrun` for one `clk1` cycle; that frame's
features are then wrong. At speech sample rates this never happens: a frame
takes about 1,420 `clk1` cycles to process, and 128 samples at 8 kHz last
16 ms.

## Windowing with bit reversal

A decimation-in-time FFT wants its input in bit-reversed order. Instead of
shuffling later, the window ROM holds, for every position n, both the
coefficient w[n] = 0.54 - 0.46 cos(2 pi n / 255) and the address bitrev(n)
where the product goes. The windowed frame is therefore written straight into
the FFT's working memory in the order the butterflies need (for 8 points:
0, 4, 2, 6, 1, 5, 3, 7).

## FFT

`fft_r2dit` is an in-place radix-2 decimation-in-time engine with one
butterfly per clock: 8 stages of 128 butterflies, 1,024 cycles. The data path
is 25 bits wide and never scales, so no stage can overflow; the only error is
the rounding of the twiddle products, a few parts in 10^5 of the largest bin.
The working memory is a register file read and written at two addresses per
cycle. After the last stage, bins 0..128 (all a real input needs) stream out,
one per cycle. The original design reused an FFT of its authors' whose
insides were not published; this engine is this design's own.

## Band energies

`band_energy` right-shifts each bin by 8 bits back to the 16-bit format,
squares real and imaginary parts, and feeds two accumulators in parallel: one
sums all bins into the frame energy; the other sums the bins of the current
band. A counter over the bins is compared with a ROM of band limits; when it
reaches the limit of a band, that band's energy is output and the next band
starts. The 24 limits are the FFT bins nearest to frequencies equally spaced
on the mel scale, mel(f) = 2595 log10(1 + f/700), between 64 Hz and 4 kHz:
bins 2 (start), 4, 6, 9, 11, 14, ..., 106, 117, 128. Bands are narrow at low and wide at high
frequencies, plain sums of whole bins.

With `TRIANG = 1` the bands become overlapping triangular mel filters
instead. The limit ROM then holds NB+2 mel-spaced edges, and band b rises
from edge b to edge b+1 and falls to edge b+2. A second ROM holds, for every
bin, its weight on the rising slope of the filter above it, with 10 fraction
bits: w = (k - edge j)/(edge j+1 - edge j). A multiplier splits each bin's
power p into w*p, added to the band that is rising, and p - w*p, added to
the band that is falling. Two band accumulators therefore run at once. When
the bin counter reaches the last bin before an edge, the falling band is
complete and is output, the rising one becomes the falling one, and a new
rising band starts. The latency stays at three cycles. The frame energy is
unaffected.

## Logarithms

`log2_mitchell` approximates log2(Z) by c + m, where c is the position of the
leading one and m is the bits to its right read as a fraction. For Z = 21 =
10101b this gives 4 + 0.0101b = 4.3125 (exact: 4.3922). The error is at most
0.086, and the approximation never exceeds the true value. `natural_log` converts to ln with
ln = (log2 * 11357) >> 14 + 8617. The product by 11357 (= 2^14 ln 2) is a sum
of eight shifted copies (shifts 13, 11, 10, 6, 4, 3, 2, 0), so no multiplier
is needed. The constant 8617 is a fixed correction for the scalings upstream;
it is the parameter `OFFSET`. Three pipeline stages.

## Cosine transform

`mel_cepstrum` receives the 23 log band energies one at a time. A counter
numbers them and addresses a cosine ROM whose row j holds
cos(pi i (j + 0.5) / 23) for all 13 coefficients. There are 13
multiply-accumulate units, one per coefficient, so the transform is finished
two cycles after the last band arrives and no band value is stored.

## The third clock

Feature extraction has a clock of its own, `clk`, which need not be related
to the other two. The FFT writes its N/2+1 bins on `clk1` into `bin_fifo`,
a dual-clock FIFO of N entries whose read and write pointers cross between
the domains in Gray code through two-flop synchronisers. The read side pops
a bin on every `clk` cycle in which one is there, so `band_energy` sees the
bins in order but possibly with gaps, which it accepts.

The FIFO has no per-word back-pressure, because the FFT streams its bins
without pausing. Instead a frame is let into the FFT only when the FIFO has
room for all bins it will produce (`fft_ready` to the frame memory is the
FFT's own idle flag and this room test). A slow `clk` therefore holds frames
back in the frame memory, which eventually leads to `overrun`, but never loses
a bin. `clk` must take a frame's 129 bins, plus a few cycles of
synchronisation, in the time `clk1` needs for one frame. Tying `clk` to
`clk1` is allowed; the FIFO then only adds latency.

## Interface of `mfcc_frontend`

| port | dir | width | meaning |
|---|---|---|---|
| `clk1` | in | 1 | frame read, window and FFT clock |
| `clk2` | in | 1 | sample clock, half of `clk1`, rising edges aligned with it |
| `clk` | in | 1 | feature-extraction clock, any frequency fast enough (see above) |
| `rst` | in | 1 | synchronous reset, active high; hold for a few `clk2` cycles |
| `in_valid`, `in_sample` | in | 1, 16 | one speech sample per `clk2` cycle at most |
| `out_valid` | out | 1 | feature vector valid for one `clk` cycle |
| `log_e` | out | 16 | ln of the frame energy, 10 fraction bits |
| `cep[0:12]` | out | 32 each | C0..C12, 10 fraction bits |
| `overrun` | out | 1 | a frame was overwritten before it could be processed |

Timing from the sample that completes a half-frame to `out_valid`: 1 (start)
+ 256 (read) + 3 (read and window pipeline) + 1,024 (FFT) + 130 (bin stream)
cycles of `clk1`, then 3 to 4 `clk` cycles through the FIFO and 9 more
(energies, logarithm, transform, output), about 1,430 cycles when `clk` is
`clk1`.
Input samples may arrive at any pace that leaves, on average, at least 11
`clk1` cycles per sample, and no two samples back to back on `clk2` right
after a half-frame completes.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N` | 256 | frame length, power of two; frames advance by N/2 |
| `NB` | 23 | number of mel bands |
| `NC` | 13 | number of cepstral coefficients |
| `W` | 16 | sample width |
| `FW` | W + log2(N) + 1 | FFT word width |
| `SHIFT` | log2(N) | right shift applied to the bins before squaring |
| `FS` | 8000.0 | sample rate in Hz, only used for the band limits |
| `F_LO` | 64.0 | lower edge of the first band in Hz |
| `TRIANG` | 0 | 0: bands are sums of bins between limits; 1: overlapping triangular filters |

All ROMs (window and bit-reversed addresses, twiddles, band limits, cosines)
are computed from these parameters at elaboration by the functions in
`mfcc_pkg`, so changing a parameter regenerates them. The band limits must
stay strictly increasing; with 23 bands this holds for N = 128 and above at
8 kHz. For 11 or 16 kHz input, set `FS` accordingly.

## Where this design departs from the published one

- The published design clocks the window with the slow sample clock; here
  the window runs on `clk1`, so it keeps pace with the frame read. The FFT,
  whose clock the publication does not name, also runs on `clk1`. How data
  reach the separate feature-extraction clock is not published; the FIFO and
  its frame-level room test are this design's.
- By default the bands are non-overlapping rectangular sums of bins, as the
  published accumulator-with-limits structure computes. The publication also
  speaks of overlapping triangular filters without showing hardware for them.
  `TRIANG = 1` provides them, with this design's own weight ROM, multiplier
  and second accumulator. In either mode the coefficients are close to, but
  not equal to, those of the standard's floating-point front end.
- The number of bands (23), the mel spacing from 64 Hz and the 8 kHz default
  come from the Aurora standard; the publication gives none of them.
- The log energy is taken from the FFT frame energy, with a second logarithm
  unit; the standard computes it from the time-domain samples.
- Saturation (pre-emphasis, normalised bins, energies), truncation of the
  window product, rounding of twiddle products, output widths, the
  ready/overrun handshake and reset behaviour are choices of this design.
- The de-noising stage that precedes feature extraction in the standard, and
  the compression, framing and error protection that follow it, are not part
  of this core.

## Verification

Every module has a self-checking testbench in `tb/` that compares against
reference models in `tb/mfcc_ref_pkg.sv`, written separately from the RTL as
plain integer and floating-point loops:

| testbench | what it checks |
|---|---|
| `tb_preemph` | random and full-scale samples, saturation, 3-cycle latency |
| `tb_frame_overlap` | 16-sample frames: content and order of every frame, both read orders, a held frame, a burst at full `clk2` rate, overrun |
| `tb_hamming_window` | window values and bit-reversed addresses for 256 points, the 8-point bit-reversal table, 2-cycle latency |
| `tb_fft_r2dit` | against a floating-point DFT (tolerance) and a bit-exact fixed-point model; exact latency of 1,025 cycles to the first bin |
| `tb_band_energy` | band limits, band and frame sums, saturation, 3-cycle latency; the same for a triangular-filter instance against its own reference |
| `tb_log2_mitchell` | the 4.3125 example, all values to 4096, random values, error bound |
| `tb_natural_log` | exact results, ln 2 steps between powers of two, 3-cycle latency |
| `tb_mel_cepstrum` | exact transform of random frames, constant input, 2-cycle latency |
| `tb_feature_extraction` | complete feature vectors from random bins, 9-cycle latency |
| `tb_preprocessing` | five 256-sample frames written in bit-reversed order |
| `tb_mfcc_frontend` | the whole core at its default size on a speech-like signal: eight frames checked bit-exactly, both frame read orders, pre-emphasis saturation, a frame held back while the FFT is busy, a frame held back because the bin FIFO is too full (with `clk` unrelated to `clk1` and slowed down for a while), and an overrun when samples come too fast |
| `tb_mfcc_triang` | two cores at 8 kHz side by side, one with summed bands and one with triangular filters (its feature clock unrelated to `clk1`): both bit-exact against their references, same frame energy, different coefficients |
| `tb_bin_fifo` | the dual-clock FIFO with unrelated clocks: order and content of every word, no loss, free-space report never optimistic, bursts waiting for room |
| `tb_mfcc_rates` | two cores built for 11 kHz and 16 kHz sampling (other band-limit tables), each checked bit-exactly over several frames, with `clk` tied to `clk1` |

Assertions in the RTL also guard the rules the blocks rely on: the FFT
must not be loaded or started while a transform runs, the bin FIFO must not
be written when full, and every band must
cover at least one FFT bin for the chosen `N`, `NB` and sampling rate.

The end-to-end test checks the hardware against a model of the same
fixed-point arithmetic. It does not measure how close the coefficients come to
a floating-point MFCC front end, nor recognition accuracy.

## Simulating

Each testbench is a top module without ports that prints
`TB_RESULT checks=<n> failures=<m>` and finishes. With Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/mfcc_pkg.sv tb/mfcc_ref_pkg.sv tb/tb_mfcc_frontend.sv \
    --top-module tb_mfcc_frontend
./obj_dir/Vtb_mfcc_frontend
```

Replace the testbench name to run another one. The end-to-end test runs in a
fraction of a second and prints the log energy and the first cepstral
coefficients of each frame.
