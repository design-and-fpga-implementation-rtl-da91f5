# Golay-correlation frame detector for IEEE 802.15.3c SC-FDE / OFDM receivers

A 60 GHz IEEE 802.15.3c receiver works on framed data in both of its modes,
single carrier with frequency-domain equalisation (SC-FDE) and OFDM. Before it
can equalise anything it must find each frame and know which sample starts the
channel estimation sequence (CES) and each data block, so that every FFT
window sits exactly on a block. This RTL does that job with very little logic.
An Efficient Golay Correlator (EGC) finds the 128-chip Golay word `a128` that
makes up the preamble. Its output is multiplied twice by itself, one word
(128 samples) apart. The sign flips of the start-frame delimiter (SFD) then
show up as isolated negative peaks, and a plain comparison with a negative
threshold finds them. A small controller turns the first peak into FFT
triggers for the CES and for every following block, and tells the two header
rates apart.

The top level, `wpan_fd_top`, holds two test platforms side by side:

* **The detector test bed** (`fd_testbed`). A frame ROM feeds a noise source,
  the noise source feeds a multipath channel emulator, and the channel feeds
  the detector. A reference path and a packet-error counter measure the
  packet error rate (PER) against SNR, channel and threshold.
* **A dual-mode SC-FDE / OFDM transceiver** (`sc_ofdm_trx`) that uses the
  detector's triggers. It has a 16-QAM transmitter, framing, noise and
  multipath, the detector, a 256-point FFT, frequency-domain equalisation and
  16-QAM decisions. A bit-error counter measures the bit error rate (BER).

The detector's samples are real, signed 16-bit fixed point with 15 fraction
bits (Q1.15). The transceiver carries complex samples: a packed struct of two
Q1.15 values. All sample-rate registers are enabled by a sample enable `ce`,
and reset is synchronous and active high.

## The preamble

| field | length (samples) | content |
|---|---|---|
| SYNC | 14 x 128 | `a128` repeated 14 times |
| SFD  | 4 x 128  | `[a -a a -a]` medium rate, `[a a -a -a]` high rate |
| CES  | 512      | `a256 = [a128 b128]`, then `b256 = [a128 -b128]` |
| blocks | n x (32 + 256) | 32-sample cyclic prefix + 256-point FFT block |

`(a128, b128)` is a binary Golay complementary pair: the aperiodic
autocorrelations of the two add up to `2N` at zero shift and to exactly zero
everywhere else. A pair of length `2^M` comes from `M` steps of

    a_m(n) = a_{m-1}(n) + W_m b_{m-1}(n - D_m)
    b_m(n) = a_{m-1}(n) - W_m b_{m-1}(n - D_m)

which start from a unit impulse. `fd_pkg` runs this recursion while the design
is elaborated. The delay vector is `D = {1,8,2,4,16,32,64}` and the weight
vector is `W = {-1,-1,-1,-1,+1,-1,-1}`, the pair used by the 60 GHz single
carrier PHYs. These vectors have not been checked against the text of the
802.15.3c standard. To use a different pair, change `GOLAY_D` and `GOLAY_W`:
every block, the ROM and every testbench follow automatically. The transmitted
`a128` is the time reverse of the correlator's impulse response, so the
correlator is matched to it.

## Why the SFD gives negative peaks

This is the heart of the design. Let `s_k = +/-1` be the sign of the k-th
Golay word. The EGC output `Ra` has a peak of sign `s_k` at the end of word k,
and the two products in `double_correlator` are

    c1(t) = Ra(t) * Ra(t-128)   -> sign s_k * s_{k-1}
    c2(t) = c1(t) * c1(t-128)   -> sign s_k * s_{k-2}

Through SYNC every word is `+a`, so both products stay positive. Across the SFD:

| word | SYNC end | SFD1 | SFD2 | SFD3 | SFD4 | CES a128 |
|---|---|---|---|---|---|---|
| medium: s | + | + | - | + | - | + |
| medium: sign of c2 | + | + | **-** | + | + | + |
| high: s | + | + | + | - | - | + |
| high: sign of c2 | + | + | + | **-** | **-** | **-** |

So a medium-rate frame gives one negative peak, at the end of SFD word 2. A
high-rate frame gives negative peaks at the ends of SFD words 3 and 4, 128
samples apart, and also one inside the CES. This is why the threshold is
negative: SYNC cannot cause a false alarm however strong it is. It is also how
`frame_sync_ctrl` reads the rate. It looks for a second peak 128 +/- `WIN`
samples after the first one.

With a preamble amplitude `A` (as a fraction of full scale) and a channel gain
`g`, the peak magnitudes are `|Ra| = gA`, `|c1| = (gA)^2` and `|c2| = (gA)^4`.
The normaliser only divides by the sequence length and does not track the
signal power, so **the threshold has to follow the fourth power of the
received level**. At the test bed's `A = 0.25` (8192), the c2 peak is -128
LSB, and a threshold of -64 sits halfway. A channel with gain 0.88 gives a
peak of about -77, which is why the multipath test uses -32. Sweeping the
threshold trades missed frames against false alarms.

## Datapath and timing

```
x --> golay_correlator --ra--> corr_normalizer --r--> double_correlator --c2--> threshold_detector --det--> frame_sync_ctrl
 |        (7 stages)            (>>>7, sat)            (2 x lag-128 product)     (c2 < threshold)          (rate, triggers)
 +--> delay DLY ------------------------------------------------------------------------------------------> data_out
```

| stage | what it holds | latency (enables) |
|---|---|---|
| `golay_correlator` | 7 delay lines (1..64 words, 127 in all) per branch, 7 add/sub pairs | 7 |
| `corr_normalizer` | `Ra / 128`, saturated to 16 bits | 1 |
| `double_correlator` | two 128-word delay lines, two 16x16 multipliers | 1 + 1 |
| `threshold_detector` | one comparator | 1 |

The end of a Golay word therefore reaches `det` `LAT = 11` enables later.
`data_out` is the input delayed by `DLY = 16` enables. Let the first peak be
seen at enable `T1`. The controller raises `ces_start` and `fft_start` at

    T1 + 2*128 + DLY - LAT   (medium rate, OFS_MED = 261)
    T1 +   128 + DLY - LAT   (high rate,   OFS_HIGH = 133)

and `data_out` carries the first CES sample in exactly that enable. The delay
is needed because a high-rate frame is recognised only at its second peak,
which comes one sample before the CES starts. `DLY` must stay large enough
that `OFS_HIGH > 128 + WIN`; an assertion checks this. After `ces_start`:

* `fft_start` pulses at the start of `a256` and of `b256` (`sym_idx` 0 and 1),
  then 32 samples into each data block (`sym_idx` 2, 3, ...).
* `blk_start` marks the first cyclic-prefix sample of each block.
* `frame_end` pulses one enable after the last of `NUM_BLK` blocks. The
  controller then listens for the next frame. Peaks seen while a frame is
  being followed are ignored.

Every output is registered and changes only when `ce` is high, and each pulse
lasts one enable. `ce` may be tied high for one sample per clock.

Without the test bed, the detector costs two multipliers, about 460 flip-flop
bits, and 7.3 kbit of shift-register or RAM storage in the delay lines (the
delay lines are written as circular buffers and map to SRL or distributed
RAM).

## The detector test bed (`fd_testbed`)

* `frame_rom` holds one medium-rate frame and one high-rate frame, 4096
  samples each, and plays them alternately without end. Each frame has SYNC,
  SFD, CES, 4 blocks of 16-QAM axis levels with a real cyclic prefix, and 128
  zero samples. The contents are computed when the ROM is initialised.
* `awgn_gen` adds noise whose standard deviation is `sigma` LSB. The noise is
  the sum of twelve uniform numbers from twelve xorshift32 generators. With
  `A = 8192`, `sigma = 8192` gives 0 dB SNR on the preamble.
* `mp_channel` is a 16-tap FIR filter with run-time Q1.15 taps. Load it with
  a sampled channel impulse response, for example a realisation of the
  two-path Saleh-Valenzuela LOS/NLOS models. The taps are computed off chip.
* A reference path delays the ROM's CES marker and rate by the latency of
  noise source, channel and detector (`2 + DLY`). `per_counter` counts a
  frame as an error unless the detector's `ces_start` falls within
  +/-`TOL = 2` samples of the marker and the detected rate matches. It also
  splits the errors the way a threshold trades them: `misses` counts frames
  with no trigger within +/-`TOL`, and `false_alarms` counts triggers with no
  frame within +/-`TOL`. Sweeping `threshold` at a fixed `sigma` gives the
  miss and false-alarm curves from which a threshold is chosen.
* `ext_sel` / `ext_x` feed the detector from an external converter instead
  (the PER count is then meaningless).

`data_out`, `fft_start` and `sym_idx` form the interface a receiver FFT
attaches to. The transceiver below uses exactly that interface.

## The SC-FDE / OFDM transceiver (`sc_ofdm_trx`)

```
PRBS-15 -> 16-QAM map -> [IFFT, OFDM only] -> tx_framer -> noise -> FIR channel --+
                                                                                  |
bit errors <- PRBS-15 compare <- 16-QAM decide <- [IFFT, SC only] <- FDE <- FFT <-+- frame_detector (I)
```

The two modes differ only in where the inverse transform sits. In OFDM, the
transmitter IFFT puts the 256 symbols of a block on 256 subcarriers. In
SC-FDE, the symbols are sent as they are and the receiver IFFT brings the
equalised spectrum back to the time domain. Either way the receiver
equalises in the frequency domain. That is why it needs the detector to
place every FFT window exactly after the cyclic prefix of its block.

**Framing (`tx_framer`).** It sends the preamble of the selected header rate
on I at amplitude 8192. Then it sends `NUM_BLK` blocks, each one the last 32
samples of the block followed by all 256. Block samples are written at clock
rate into a 2 x 256 ping-pong buffer, because the IFFT delivers a block as a
burst. The source is throttled by two credits, one per buffer. A credit is
used when the source generates a block, and returned (`blk_sent`) when the
framer has sent one. The framer starts the next frame as soon as the last
one ends, while `run` is high.

**FFT (`fft_core`).** This is a memory-based radix-2 transform with one
butterfly per clock and two banks, so one window loads while the other is
transformed. The last four of the eight stages halve with rounding, which
scales by 1/16 = 1/sqrt(256). An IFFT followed by an FFT therefore returns the
input, and the OFDM time signal has about the power of its symbols. A window
takes about 1280 clocks, so **the sample enable may be high at most one clock
in six**. This is the one place where the design trades speed for area.

**Channel estimate and equaliser (`fde_equalizer`).** The CES halves `a256`
and `b256` are themselves a complementary pair. Their spectra therefore obey
`|Xa(k)|^2 + |Xb(k)|^2 = 512` in every bin. With `Ya` and `Yb` the received
CES spectra,

    H(k) = (Ya(k) conj(Xa(k)) + Yb(k) conj(Xb(k))) / 512

is the channel, and no bin has to be divided by a training value that might
be small. `Xa` and `Xb` are computed with `$cos`/`$sin` when the tables are
initialised. `H` is kept with 14 fraction bits. The equaliser then stores
the zero-forcing gain `G = conj(H)/|H|^2` (a combinational divider, saturated
to 24 bits) and multiplies every data bin by it. The estimate assumes the
test bed's preamble amplitude (parameter `PRE_AMP`). With a different
amplitude, or a gain stage in front, `H` is scaled accordingly. That scaling
cancels in `G` only if data and preamble see the same gain.

**Fixed-point plan.** The 16-QAM levels are +/-2730 and +/-8190 per axis
(`QAM_UNIT`), so a 16-QAM sample stays below 0.25 of full scale like the
preamble. A data bin then has an rms of about 8600 LSB. It can saturate
occasionally at the FFT output; the IFFT spreads the clipping error over the
block, where it stays far below the decision distance.

**Receiver timing.** Q is delayed by the same `DLY` enables as the detector's
`data_out`. Each `fft_start` opens a 256-enable window into the receive FFT,
tagged with `sym_idx`: tag 0 is `a256`, tag 1 is `b256`, and tags 2 and up
are data. The equaliser keys on the tag. The receiver PRBS advances only with
decided symbols, so it stays in step as long as no frame is lost. A missed
frame shows up as a BER near 0.5 from then on.

**Flags.** `tx_underflow` is set if a block was not complete when its turn
came. `rx_overrun` is set if an FFT, the framer or the IFFT was offered data
while it was not ready. Neither happens with the enable at one clock in
six or slower.

Not included: the host-PC link through shared memories, and the board's
converters. The external-input mux `ext_sel`/`ext_x` stands in for an ADC.
No header, pilots, guard carriers, coding or spreading are modelled; all 256
subcarriers carry data.

## Where this design fills gaps

These are this design's choices, not taken from elsewhere:

* **Real-valued datapath.** Only the I stream is processed. Two real products
  match a two-multiplier budget; complex products would need four or more.
* **Normalisation** divides by the sequence length only. There is no power
  normalisation, so the threshold depends on the signal level (see above).
* **Each "correlation" is a single lag-128 product**, without a moving sum.
* **Golay D/W vectors**, as stated above.
* **Rate detection** from the peak spacing, the `DLY` alignment delay and the
  trigger offsets.
* **Frame contents** after the CES. No separate header is modelled; header
  blocks are counted among the `NUM_BLK = 4` blocks. The CES is taken as
  `[a128 b128 a128 -b128]`, cut into two 256-sample FFT windows.
* **Test-bed internals**: the noise generator, the FIR form and length of the
  channel, the timing/rate criterion of a packet error, and the external input.
* **Transceiver details**: the 16-QAM Gray map and levels, the FFT
  architecture and scaling, the zero-forcing equaliser and its Golay-pair
  estimator, the PRBS data and bit-error count, the credit flow control,
  and the real-valued channel taps (applied to I and Q alike).
* **Speed**: the detector takes one sample per clock. The transceiver needs
  at least six clocks per sample, so at the 78 Msample/s of a 78 MHz channel
  it would need a clock near 470 MHz. Real-time operation would need a
  faster (pipelined or radix-4) FFT.

## Files

| file | content |
|---|---|
| `rtl/fd_pkg.sv` | sample type, rate enum, sizes, Golay generator, saturation |
| `rtl/delay_line.sv` | circular-buffer delay (helper) |
| `rtl/golay_correlator.sv` | EGC for `a128`/`b128` |
| `rtl/corr_normalizer.sv` | divide by 128 and saturate |
| `rtl/double_correlator.sv` | the two lag-128 products |
| `rtl/threshold_detector.sv` | negative-threshold comparator |
| `rtl/frame_sync_ctrl.sv` | rate decision and FFT triggers |
| `rtl/frame_detector.sv` | the detector |
| `rtl/frame_rom.sv`, `rtl/awgn_gen.sv`, `rtl/mp_channel.sv`, `rtl/per_counter.sv` | test-bed blocks |
| `rtl/fd_testbed.sv` | detector test bed |
| `rtl/qam16_mapper.sv`, `rtl/qam16_demapper.sv` | 16-QAM map and hard decision |
| `rtl/fft_core.sv` | 256-point FFT / IFFT |
| `rtl/tx_framer.sv` | preamble and cyclic-prefix insertion |
| `rtl/fde_equalizer.sv` | CES channel estimate and zero-forcing equaliser |
| `rtl/sc_ofdm_trx.sv` | transceiver loop with BER counter |
| `rtl/wpan_fd_top.sv` | top level: test bed and transceiver |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. It
also has a watchdog. The package must come first on the command line:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_wpan_fd_top \
    -y rtl +libext+.sv rtl/fd_pkg.sv tb/tb_wpan_fd_top.sv
./obj_dir/Vtb_wpan_fd_top
```

The same command works for every testbench: change the two names.

What the testbenches establish:

* **`tb_golay_correlator`**: every output equals a direct 128-tap correlation,
  the pair is complementary, and each `a128` gives a peak of `128*A`.
* **`tb_corr_normalizer`, `tb_double_correlator`, `tb_threshold_detector`,
  `tb_mp_channel`**: every output is bit-exact against arithmetic models,
  including saturation.
* **`tb_awgn_gen`**: bit-exact against a model of the generators. The
  statistics are also checked: standard deviation within 3 % of `sigma`.
* **`tb_frame_sync_ctrl`**: pulses fall on the exact enable for both rates,
  including an early second peak, a two-sample peak and a stray peak inside
  a frame.
* **`tb_frame_detector`**: four generated frames with noise. The CES trigger
  falls exactly on the first CES sample, the rate is right, all 24 FFT
  windows are marked, and there are no other triggers.
* **`tb_frame_rom`**, **`tb_per_counter`**: the frame layout and the
  error-count rules, including the miss / false-alarm split.
* **`tb_fd_testbed`** runs the test bed at its default parameters. It covers
  a clean channel, 6 dB and 0 dB SNR, a multipath channel, a threshold that
  misses every frame, a positive threshold that fires on the quiet parts of
  the signal (false alarms), and the external input. PER is 0 in all phases
  except the last two threshold phases.

* **`tb_qam16_mapper`, `tb_qam16_demapper`**: every bit pattern, the Gray
  property, and decisions near every boundary.
* **`tb_fft_core`**: forward results within 12 LSB of a double-precision DFT,
  IFFT-after-FFT within 20 LSB of the input, with back-to-back windows.
* **`tb_tx_framer`**: the preamble of both rates, every cyclic prefix and block
  sample, the markers, `blk_sent` and `underflow`.
* **`tb_fde_equalizer`**: random three-path channels. Every equalised bin is
  within 4 LSB of the sent 16-QAM symbol, and a zero channel gives zero.
* **`tb_sc_ofdm_trx`**: SC-FDE and OFDM, both header rates, clean and
  three-path channels with noise. No bit errors, the right header rate, and
  no underflow or overrun.
* **`tb_wpan_fd_top`** runs the top level at its default parameters. The seven
  test-bed phases and the four transceiver phases run at the same time. Every
  mechanism (both rates, noise, multipath, missed detection, false alarm,
  external input, both transceiver modes) is counted and must occur.

* **`tb_per_sweep`** and **`tb_ber_sweep`** are short measurement runs (see
  below). They check only trends that a short run can support.

The testbenches gap `ce` at random, so the enable logic is tested throughout.
BER and PER at the 10^-3 and 10^-6 levels need 10^4 frames or 10^7 bits. That
is hardware time, not simulation time: the testbenches check correctness at
high SNR and the mechanics of the counters.

## Measured in simulation

Short runs, at the default parameters. SNR is per complex sample: on the
preamble for PER and on the data for BER.

PER, `tb_per_sweep` (8 frames per point, threshold -64 unless stated):

| SNR | -9 dB | -7 dB | -5 dB | -3 dB | 0 dB |
|---|---|---|---|---|---|
| misses / false alarms | 3 / 2 | 0 / 0 | 0 / 0 | 0 / 0 | 0 / 0 |

| threshold at 0 dB | -8 | -32 | -64 | -96 | -124 |
|---|---|---|---|---|---|
| misses / false alarms | 2 / 3 | 0 / 0 | 0 / 0 | 0 / 0 | 3 / 2 |

The c2 peak is -128 at this level, so thresholds from -32 to -96 all
work. Near zero, the product terms of signal and noise cross the
threshold. Near the peak, noise pushes the peak above the threshold.

BER, `tb_ber_sweep` (10240 bits per point):

| SNR | 8 dB | 12 dB | 16 dB | 30 dB |
|---|---|---|---|---|
| SC-FDE, clean | 0.151 | 0.059 | 8.9e-3 | 0 |
| SC-FDE, 3-path | 0.149 | 0.060 | 1.0e-2 | 0 |
| OFDM, clean | 0.128 | 0.048 | 6.4e-3 | 0 |
| OFDM, 3-path | 0.128 | 0.048 | 6.3e-3 | 0 |

These values sit about 1.5 dB (OFDM) to 2 dB (SC-FDE) from ideal 16-QAM.
SC-FDE is a little worse because zero forcing boosts noise in weak bins, and
the IFFT then spreads that noise over every symbol in the block. Most of the gap is
the zero-forcing equaliser using a channel estimate from a single noisy CES
without smoothing. Averaging the estimate over neighbouring bins would
recover most of it.

