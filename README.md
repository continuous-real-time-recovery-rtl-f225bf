# Continuous FIR recovery of fast-chirped spectral readout: FPGA RTL

A spatial-spectral (S2) crystal records a signal's power spectrum as a pattern
of absorption holes. The pattern is read out by sweeping a laser across it.
Sweeping fast keeps latency low, but it smears every narrow hole into a long
ringing tail with a quadratic phase. The distortion is linear and known, so a
long FIR filter matched to the chirp rate removes it. For 25 kHz features read
at 1 MHz/µs, sampled at about 90 MSPS, that filter has 4609 taps: 415 G
multiply-accumulates per second, with no gaps in the stream.

This RTL performs that filtering with FFT-based overlap-add block convolution
on a single streaming FFT. The design has two clock domains:

* a slow clock at the ADC rate;
* a fast clock N/L times faster (16/7 in the main configuration: 206 MHz
  against 90.1 MHz).

A separate block, the readout chirp generator, is included beside the
processor. It builds a binary linear chirp for a 40:1 serializer (10 Gb/s
at 250 MHz).

## Main configuration

| symbol | meaning | value |
|---|---|---|
| N | transform length | 8192 (`LOG2N = 13`) |
| L | new samples per segment | 3584 = 8192 · 7/16 |
| M | filter taps | 4609 = N − L + 1 |
| W | sample, coefficient and result word | 16 bits |
| f_fast / f_slow | clock ratio, must equal N / L | 16/7 |

Every segment of L samples is padded to N. It is circularly convolved with the
filter, which is stored as its N-point spectrum. Consecutive results overlap
by M − 1 = 4608 samples. That is longer than one segment, so an output sample
can collect contributions from **three** consecutive segments. Several of the
design choices below follow from this.

## Data path

```
 data_in ─► zero_padder ─► circular_convolver ─► overlap_adder ─► data_out
 slow clk   async FIFO,     FFT ▸ × H[k] ▸ IFFT    tail buffer,    slow clk
            L samples +     two segments per       async FIFO
            N−L zeros       FFT pass
                   fast clock (N/L × slow)
                    filter RAM ◄── filt_ram_* (slow clock)
```

### Zero padder (`zero_padder`)

* ADC samples are written into a 2048-word asynchronous FIFO at every slow
  clock.
* On the fast side a segment is N cycles long. The padder reads the FIFO for
  the first L cycles and sends zeros for the remaining N − L.
* The first segment starts once the FIFO holds ceil(L(N−L)/N) + 8 samples.
  This is the smallest level that lets L samples be drained at N/L times the
  fill rate without running dry, plus a margin for the pointer synchronisers.
* After that, a segment starts every N fast cycles, marked by `seg_start`.
* The clock ratio is exact, so the FIFO level repeats from segment to
  segment. A sticky `overflow` or `underflow` flag reports a clock ratio that
  is not N/L.

### Circular convolver (`circular_convolver`): two segments per pass

The filter is real, so two real segments a and b can share one transform:

```
IDFT( DFT(a + j·b) · H ) = (a ⊛ h) + j·(b ⊛ h)
```

One forward FFT, one complex multiply and one inverse FFT therefore serve two
segments. A frame is N cycles long. With forward and inverse frames
alternating, one FFT core is busy every cycle.

The schedule counts steps of N fast cycles from the first `seg_start`.
Segment k arrives during step k.

| step parity | FFT input | FIFO1 | Cmult FIFO | output |
|---|---|---|---|---|
| even k | inverse frame: Cmult FIFO × filter RAM | stores segment k | read in bin order | real part of the inverse result |
| odd k | forward frame: re = FIFO1 (segment k−1), im = segment k | read | written from the forward result | imaginary part, replayed from FIFO2 |

* **Forward results** leave the core two steps after they enter. They are
  cut to 16 bits and wait in the Cmult FIFO until the next even step.
* **In the even step** they are read in bin order and multiplied by the filter
  word of the same bin. The product is cut to 16 bits and sent back into the
  core as an inverse frame.
* **Inverse results** carry two segments:
  * the real part (segment k−4) is sent out at once;
  * the imaginary part (segment k−3) is held in FIFO2 and sent out during the
    next step.

  The result stream is therefore sequential again: one N-sample segment every
  N cycles, `out_start` on its first sample, `out_valid` once real data has
  been through.
* The first valid result starts **6N + 2·LOG2N + 4** fast cycles after the
  first `seg_start`.
* A `seg_start` that falls off the N-cycle grid sets the sticky `sync_error`.

The three FIFOs (`sync_fifo`) are each one transform long. The schedule never
fills or drains them at the wrong moment, and assertions in the convolver check
this in simulation:

* no FIFO is written when full or read when empty;
* FIFO1 holds exactly one segment when its replay starts;
* each new spectrum finds the Cmult FIFO and FIFO2 empty.

The filter RAM
(`filter_coeff_ram`, 8192 × 32 bits) has two ports:

* a read port on the fast clock;
* a write port on the slow clock, so that a filter for a new chirp rate can be
  written while the processor runs.

### FFT core (`fft_core`, `fft_r2sdf_stage`)

The core is a radix-2 decimation-in-frequency pipeline with single-path delay
feedback. Each of the 13 stages has one butterfly and one delay line of
2^(12−s) words.

* A frame of N samples enters on N consecutive cycles. Each frame can be
  forward or inverse (`inv`).
* Every sample travels with a tag: valid, inverse, and an index whose top bit
  is the frame parity. Control therefore follows the data, and the stages have
  no counters.
* Inverse frames use conjugated twiddles and are not divided by N.
* The delay lines are plain memories without reset. A per-stage flag masks
  their valid bits until every word has been rewritten after reset.
* Arithmetic is unscaled. Words grow to 16 + 13 + 1 = 30 bits, enough for
  every stage.
* Twiddles are 16-bit (1.0 = 2^14), computed at elaboration with `$cos` and
  `$sin`.
* A two-bank bit-reversal memory (2N × 60 bits) returns the bins in natural
  order. Bin k of a frame whose first sample entered at cycle t leaves at
  t + 2N + 2·LOG2N + 1 + k.

### Overlap adder (`overlap_adder`)

Result segment y_k starts L samples after y_{k−1}. The adder keeps a single
tail buffer, which is a delay line of N − L fast cycles. For sample i of a
segment:

* `sum = y[i] + tail`, where `tail` is the buffer's output (zero for
  i ≥ N − L);
* if i < L, `sum` is a finished output sample and goes to the output FIFO;
* if i ≥ L, `sum` goes back into the buffer, where it meets sample i − L of
  the next segment N − L cycles later.

The recirculated sum already contains the older tails. One buffer and a
two-input adder therefore handle two-way and three-way overlaps alike.
Segments marked invalid push zeros. Finished samples (L per segment) cross
back to the slow clock through a 2048-word asynchronous FIFO. The FIFO is read
at every slow clock once it holds 16 samples. Its `underflow` flag is sticky:
it also rises, legitimately, when the input stream stops.

## Fixed point, gain and loading a filter

Words are cut at three places. The shifts are parameters of the top.

| place | default | width |
|---|---|---|
| forward FFT output | `>> 7` (`FFT_SHIFT`) | 30 → 16 bits |
| complex product | `>> 15` (`MULT_SHIFT`) | 33 → 16 bits |
| inverse FFT output | `>> 9` (`IFFT_SHIFT`) | 30 → 16 bits |

Every cut rounds to nearest and saturates (`recovery_pkg::shift_sat`). The
twiddle products in the FFT are also rounded. Truncation would not be a small
error here. Truncating gives every bin the same −½ LSB bias, and the inverse
transform turns a bias common to all bins into a spike on the first sample of
every segment, several LSB high.

With the default shifts the end-to-end gain is N · word / 2^(7+15+9) =
word / 2^18. To filter with taps h[0..M−1], write for every bin k:

```
H[k]          = Σ_m h[m] · exp(−j·2π·m·k / N)
filt_ram_data = { round(2^18 · Re H[k]), round(2^18 · Im H[k]) }   // 16 bits each
filt_ram_addr = k
```

Because the words are 16-bit, |2^18 · H[k]| must stay below 32768. Usable
gains are therefore below 1/8; a sum of |h| of about 0.12 is safe. The RAM
starts all-zero, so the output is zero until a filter has been written. A
reload takes N slow cycles. Bins written in the middle of a segment take
effect on the next multiply pass.

## Latency

The measured latency, from the first ADC sample to the first output sample, is
53,840 fast cycles (6.57 N), or 261 µs at 206 MHz. This is inside the bound of
8N / f_fast = 318 µs that holds for this architecture. The main contributors
are:

* waiting for a partner segment (one step);
* the forward transform (two steps);
* the Cmult FIFO (one step);
* the inverse transform (two steps);
* the zero padder's start level;
* the output FIFO.

## Chirp generator (`chirp_gen`)

The chirp generator has 40 lanes. Each lane is a 24-bit direct digital
synthesiser without a sine table: the lane's bit is the MSB of its phase
accumulator, so the output is a square-wave chirp. Serial sample n = 40c + i
is lane i at clock c. For a serial chirp with start frequency F0 and frequency
step RS per serial sample (both in units of 2^−24 turn), load:

```
phase_init[i] = F0·i + RS·i(i−1)/2
freq_init[i]  = 40·F0 + RS·(40·i + 780)          // 780 = 40·39/2
chirp_rate    = 1600·RS                          // 40²·RS
```

* The values are loaded through the two shift ports while the generator is
  idle, lane 39 first.
* `chirp_start` copies them into the accumulators and starts the chirp.
* `chirp_out` then carries one 40-bit word per clock for `chirp_dur + 1`
  clocks.
* `chirp_done` pulses and the output returns to zero.
* The initial values are kept, so the same chirp can be repeated without
  reloading.

The duration counter is 24 bits, at most 67 ms at 250 MHz. Lane 0 is the first
bit on the line.

RS is rarely an integer. A 10 MHz/µs chirp at 10 Gb/s has RS = 1.68. In that
case, load `chirp_rate = round(1600·RS)` and round the initial values. The lane
rate word then has a resolution of (250 MHz)² / 2^24, about 3.7 kHz/µs.
Rounding the initial values moves a lane's phase by at most half an LSB per
clock, which is 0.4% of a turn over a 495 µs chirp.

## Top level (`s2_recovery_top`)

| port | dir | clock | meaning |
|---|---|---|---|
| `slow_clk`, `fast_clk` | in | | ADC clock and FFT clock (ratio N/L, generated outside) |
| `rst` | in | async | reset, synchronised into each domain |
| `data_in[15:0]` | in | slow | ADC samples, one per clock, signed |
| `data_out[15:0]`, `data_out_valid` | out | slow | recovered samples |
| `filt_ram_addr[12:0]`, `filt_ram_data[31:0]`, `filt_ram_we` | in | slow | filter spectrum write port |
| `status[4:0]` | out | mixed | sticky {sync error, input FIFO overflow, input FIFO underflow, output FIFO overflow, output FIFO underflow} |
| `chirp_clk`, `chirp_start`, `chirp_done` | | chirp | chirp generator clock and control |
| `chirp_out[39:0]` | out | chirp | parallel word for the serializer |
| `chirp_rate`, `chirp_dur`, `phase_init_shift_*`, `freq_init_shift_*` | in | chirp | chirp set-up |

Parameters:

* `LOG2N` and `L` set the transform and segment sizes. The fast clock must
  then run N/L times faster than the slow one.
* `IN_FIFO_AW` and `OUT_FIFO_AW` set the clock-crossing FIFO depths. The input
  FIFO must hold ceil(L(N−L)/N) + 8 samples; an elaboration-time check reports
  one that is too small.
* The three shifts are listed above.
* `LANES` and `CAW` size the chirp generator.

Tested configurations:

* N = 8192 with L = 3584 (4609 taps);
* N = 8192 with L = 5632 (2561 taps, clock ratio 16/11);
* a reduced N = 64 with L = 28.

## Verification

Every testbench in `tb/` checks itself. It ends by printing
`TB_RESULT checks=… failures=…` and has a watchdog. Reference values are
computed independently in the testbench, in floating point.

| testbench | what it checks |
|---|---|
| `tb_fft_core` | 64-point frames, forward and inverse alternating, against a direct DFT; exact latency |
| `tb_cmult` | random products, bit-exact |
| `tb_filter_coeff_ram` | writes on one clock, reads on the other |
| `tb_chirp_gen` | 40-lane output against a single serial DDS, bit by bit; repeat without reload |
| `tb_zero_padder` | segment contents, seg_start spacing, no FIFO errors (N = 64, L = 28); a fast clock that is too fast raises underflow, one that is too slow raises overflow |
| `tb_circular_convolver` | every result segment against linear convolution (±4 LSB); result order; latency 6N + 2·LOG2N + 4; sync error detection |
| `tb_overlap_adder` | exact overlap-add including three-way overlaps; invalid segments ignored |
| `tb_s2_recovery_top` | end to end at N = 64, L = 28, with two bursts, a filter reload between them, and a chirp; counts forward and inverse frames, three-segment sums, reloads and chirps, using only the ports (the full-size test counts frames and three-segment sums on the internal signals) |
| `tb_s2_recovery_top_full` | the same at full size with every parameter at its default: 136k samples, ±3 LSB (largest error seen 1.5), latency ≤ 8N, status clear; counts the same mechanisms on the frame and overlap-add signals inside the processor |
| `tb_chirp_gen_workloads` | the chirp generator at its defaults running a complete 50 MHz–5 GHz chirp at 10 MHz/µs (495 µs, 4.95 Mbit) and a 50–600 MHz chirp at 20 MHz/µs, compared with the ideal chirp phase |
| `tb_s2_recovery_l5632` | the L = 5632 / 2561-tap configuration at full size (clock ratio 16/11) |

The full-size tests filter with taps only at delays 0, N/4 and N/2. The
spectra of these taps are exactly ±1 or ±j, so the filter words are exact and
the tolerance covers only the datapath's own rounding. The tap at N/2 reaches
past two segment lengths and exercises the three-way overlap.

To run a test with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/recovery_pkg.sv \
          tb/tb_s2_recovery_top_full.sv --top tb_s2_recovery_top_full -Mdir obj
./obj/Vtb_s2_recovery_top_full
```

The full-size tests build and run in under a minute.

## Where this RTL departs from the original implementation

* **FFT.** The original used a vendor pipelined streaming FFT core, described
  only by what it does. The delay-feedback pipeline, its tags, its latency and
  its twiddle precision are this design's own.
* **FIFOs and clocking.** The original used vendor FIFOs and a clock manager
  that derived the fast clock from the ADC clock. Here the FIFOs are
  Gray-pointer and counter designs, and both clocks are inputs.
* **Segment start.** The zero padder starts the first segment on its own FIFO
  level and the convolver locks to it. In the original, the convolver
  requested segments.
* **Overlap-add.** The original used two tail FIFOs and a three-input adder.
  This design uses one recirculating tail buffer, with the same result.
* **Input word.** ADC samples enter at their full 16 bits. The original
  allowed an optional cut to 14 bits at the input, which is not included
  here.
* **Rounding and saturation.** Every word cut and every twiddle product
  rounds to nearest and saturates. The original sliced bits.
* **Not included.** The filter loader is omitted. In the original it was an
  embedded microcontroller that received coefficients from a PC over a serial
  link; here the RAM write port is brought out instead. Also omitted: the
  clock manager, the ADC and DAC, the ROM holding a stored test readout, and
  the multi-gigabit serializer behind the chirp generator.
* **Chirp end.** After a chirp the generator returns to idle. It keeps its
  initial values, so a chirp can be repeated without reloading.
* **Filter sizes.** Filters longer than N − L taps need a larger N. LOG2N is a
  parameter everywhere, but only N = 64 and N = 8192 have been simulated.
