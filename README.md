# 128-lag two-bit digital autocorrelation spectrometer

This is SystemVerilog RTL for a low-power digital autocorrelation spectrometer
of the kind built for balloon and spaceborne radiometers. The input is
band-limited to 20 MHz and sampled at the Nyquist rate of 40 MHz. Each sample
is quantized to just two bits, sign and magnitude. Then, for 128 delays (lags)
at once, the design multiplies the current sample by the sample taken n clocks
earlier and counts the products. After an integration period (0.8 s in the
original instrument) the 128 counts are the autocorrelation function of the
input. A host computer reads them out and turns them into a 128-channel power
spectrum with a cosine transform (Wiener-Khinchin theorem).

The digital part of the instrument is four identical 32-lag correlator chips
chained into 128 lags, plus an integration timer and a shared readout bus. All
of it is described here at RTL. The comparators that form the 2-bit digitizer
are included as a behavioural model. The analog front end (AGC amplifier,
op-amp, threshold references, clock limiter) and the host computer are not
included.

## From two-bit samples to a spectrum

This arithmetic is the least obvious part of the design, and the host needs it
to interpret the counts.

**Digitizer code.** Each sample is `{sign, mag}`:

| sign | mag | meaning                         | weight |
|------|-----|---------------------------------|--------|
| 1    | 1   | below `vth_neg`                 | -3     |
| 1    | 0   | between `vth_neg` and `vt0`     | -1     |
| 0    | 0   | between `vt0` and `vth_pos`     | +1     |
| 0    | 1   | above `vth_pos`                 | +3     |

The sign bit is 1 for a negative input, and the magnitude bit is 1 outside the
window ±Vth. Setting Vth near the RMS of the input with weight 3 gives about
88 % of the sensitivity of an unquantized correlator.

**Product table.** The weight products (±9, ±3, ±1) are divided by 3. The
small "inner" terms (low × low magnitude, ±1/3) are dropped, which costs about
1 % of sensitivity. That leaves ±3, ±1 and 0. A bias of +3 then makes every
product non-negative, so the accumulator only ever adds. `corr_multiplier`
implements this table:

| delayed \ undelayed | 11 | 10 | 00 | 01 |
|---------------------|----|----|----|----|
| **11**              | 6  | 4  | 2  | 0  |
| **10**              | 4  | 3  | 3  | 2  |
| **00**              | 2  | 3  | 3  | 4  |
| **01**              | 0  | 2  | 4  | 6  |

**Accumulation.** Each lag adds its product (0..6) into a 4-bit adder
register. The adder's carry out increments a 24-bit counter. Because a product
is at most 6, there is at most one carry per clock. The counter therefore
holds ⌊S/16⌋, where S is the sum of the biased products over the integration.
Only the counter is read out; the 4 adder bits are dropped.

**What the host computes.** Suppose an integration of N clocks gives count
c(n) for lag n. Then:

- The mean unbiased product is q(n) ≈ 16·c(n)/N − 3, with an error below 16/N.
- The two-bit correlation coefficient is R₂(n) = q(n)/q(0).
- A correction curve turns R₂ into the coefficient of an unquantized
  correlator. The original system used Rcont = 1.146 R₂ − 0.049 R₂² for
  R₂ ≤ 0.9.
- A cosine transform gives channel j (0..127) of the spectrum:
  P(j) ∝ Σₙ R(n) cos(π n j / 128).
- The channel spacing is f_s / 256, which is 156 kHz at 40 MHz.

Longer integrations, such as the 80 s used for stability tests, are made by
adding 0.8 s readouts in the host. A single 80 s integration would overflow
the 24-bit counters, since 3.2·10⁹ clocks × about 3 / 16 is far more than 2²⁴.
At 0.8 s, even the worst case is 32·10⁶ × 6 / 16 = 1.2·10⁷ < 2²⁴ = 16,777,216.
The counters wrap silently, so this bound is the user's to respect.

## Lags, chips and cascading

Each `correlator_chip` holds 32 lags. It has a shift-register delay line
(`delay_line`) and one register holding the undelayed sample. Both are loaded
on the same clock edge, so tap n is exactly n clocks older than the undelayed
sample. Lag 0 is the zero-delay channel.

A chip has three sample inputs:

- `din_a`: the primary input.
- `din_b`: a second input. With `xcorr=1` it supplies the undelayed sample, so
  the chip computes a cross-correlation of `din_a` (delayed) against `din_b`.
- `aux_in`: the auxiliary input. With `aux_sel=1` it feeds the delay line in
  place of `din_a`.

The last delay stage leaves the chip as `cas_out`. In `correlator_board`:

- Chip 0 fills its delay line from the digitizer.
- Chip k (k = 1..3) fills its delay line from chip k−1's `cas_out`.
- All chips get the same undelayed sample.

Chip k therefore covers lags 32k … 32k+31.

## The integration cycle

The board's `integration_timer` counts correlator clocks, and the host
controls it:

1. The host writes `timer_preset` (32,000,000 for 0.8 s at 40 MHz) and pulses
   `timer_start`.
2. `integrating` is high for exactly `timer_preset` clocks. Every chip
   accumulates during those clocks.
3. In the next clock the timer pulses its end-of-integration (dump) line. In
   that clock every chip:
   - copies its 32 counts into its output shift register,
   - clears its counters,
   - sets its `data_ready` flag.
4. Correlation now pauses. The host polls `data_ready` and restarts the timer
   with `timer_start`. This clears the flags and starts the next integration at
   once.
5. While that integration runs, the host reads the shift registers. Reading
   must finish before the next dump overwrites them. With `rd_clk` at its fastest
   (6 correlator clocks per period), reading all four chips takes about 58 µs
   at 40 MHz, against 0.8 s of integration.

The dead time between integrations is only the host's polling delay.

## Readout bus

All chips drive one 16-bit bus, `dout`:

- The host selects a chip with `chip_sel`. Only that chip sees the readout
  clock `rd_clk`.
- `rd_clk` comes from the host and is asynchronous to the correlator clock.
  Each chip synchronizes it with two flip-flops. The chip advances its shift
  register 3 correlator clocks after each rising edge of `rd_clk`, so each
  level of `rd_clk` must last at least 3 correlator clocks.
- `dout` always shows the current item. The host reads `dout` and then gives
  one readout clock, repeating for each item.
- The data order is lag 0 first, and each 24-bit count is sent most
  significant bit first.
- With `word_mode=0` (byte mode), the data byte is in `dout[7:0]` and
  `dout[15:8]` is zero. A chip takes 96 reads.
- With `word_mode=1`, the same bit stream comes 16 bits at a time, in 48
  reads. In this mode a word can hold parts of two counts.
- `word_mode` stands for a jumper on the board: set it once, and do not change
  it during a readout.

## Modules

| module | role |
|---|---|
| `ac_pkg` | sample type `{sign, mag}`, product type, bus widths |
| `spectrometer_top` | top: two digitizer channels plus the correlator board |
| `digitizer_2bit` | behavioural model of the three comparators, latched on the sample clock |
| `correlator_board` | 4 cascaded chips, integration timer, readout-bus multiplexer |
| `integration_timer` | programmable 32-bit one-shot timer |
| `correlator_chip` | 32 lags, input selection, dump, flag, readout |
| `delay_line` | lag shift register |
| `corr_multiplier` | biased 2-bit product table |
| `lag_accumulator` | 4-bit adder plus 24-bit carry counter |
| `readout_sreg` | 768-bit output shift register, byte/word shifting |
| `readout_clk_sync` | synchronizer and edge detector for the readout clock |

Parameters and their defaults, all taken from the original system except
`V_W`:

| parameter | default | meaning |
|---|---|---|
| `NCHIP` | 4 | chips on the board |
| `NCH` | 32 | lags per chip |
| `CNT_W` | 24 | counter bits per lag |
| `TIMER_W` | 32 | timer width |
| `V_W` | 12 | width of the numeric "voltage" fed to the digitizer model; this design's own choice |

## Choices made in this RTL

The original design fixes the following:

- the digitizer coding,
- the product table and its bias,
- the 4-bit adder feeding a 24-bit counter,
- 32 lags per chip and four chips,
- the chip's features: auto- or cross-correlation, cascading, an auxiliary
  input, integration continuing during readout, and a data ready flag,
- the 32-bit timer,
- 96 readout clocks per chip and the byte/word option.

The following are this design's own choices:

- **Counters.** The counters are synchronous and enabled by the carry. The
  original chip used asynchronous ripple counters, which count the same
  events. The counters wrap.
- **Readout clock.** The host's readout clock is synchronized inside each chip.
  The original skewed the readout clock against the correlator clock on the
  board.
- **Bus.** The shared bus is a multiplexer addressed by `chip_sel`, not
  tri-state outputs.
- **Timer.** The timer is a one-shot that the host restarts. The flag is
  cleared by that restart.
- **Data format.** The bit and byte order of the readout is this design's, as
  is the zero fill after the last item.
- **Reset.** Reset is asynchronous and active low. It clears the delay lines
  to code `00`.
- **Digitizer model.** The digitizer model compares signed numbers instead of
  voltages and latches them on the sample clock. That adds one clock of
  latency before the chips.
- **Dropped bits.** Only the 4 adder bits are discarded. A common rule of thumb
  for correlators discards (M/2)−3 of the M counter-chain bits. This design
  keeps all 24 counter bits, matching 96 bytes per 32 lags.

## Verification

Each module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=… failures=…` and has a watchdog. The reference arithmetic
lives in `tb_ref_pkg`: it computes products from the digitizer weights, not
from the table, and counts as ⌊S/16⌋ mod 2^CNT_W.

| testbench | what it shows |
|---|---|
| `tb_corr_multiplier` | all 16 products |
| `tb_delay_line` | tap n equals the input n+1 clocks earlier |
| `tb_lag_accumulator` | counts against ⌊S/16⌋ with random enables and clears; wrap checked on a 6-bit instance |
| `tb_readout_sreg` | 96 bytes and 48 words against the loaded counts |
| `tb_integration_timer` | exact run length, single-clock end pulse, restart |
| `tb_digitizer_2bit` | comparator rules and all four codes |
| `tb_correlator_chip` | 32 lags in auto, cross and auxiliary-input modes; readout during integration; flag handshake |
| `tb_correlator_board` | 128 lags across the cascade; timer length; readout of all four chips over the bus in both modes |
| `tb_spectrometer_top` | end to end at 4×8 lags with 10-bit counters (see below) |
| `tb_spectrometer_full` | default sizes, one complete 0.8 s integration (see below) |

`tb_spectrometer_top` drives a CW tone plus noise and plays the host. It runs
four integrations and counts that each mechanism occurred:

- dump,
- flag set and clear,
- readout during integration,
- byte mode and word mode,
- cross-correlation,
- counter wrap,
- reading the cascaded chips,
- all four digitizer codes.

`tb_spectrometer_full` leaves every parameter at its default. It integrates
32,000,000 clocks, reads all 128 counts and compares them exactly with the
model. It then checks that the cosine transform of the measured
autocorrelation peaks at the tone's channel: channel 48 for a tone at
0.1875·f_s. It runs in about a minute.

`tb_spectrometer_workloads` repeats the measurements made on the original
instrument, at default sizes with shortened integrations:

- **Tone sweep.** Tones at 0.05, 0.125, 0.3 and 0.45·f_s must peak at
  channels 13, 32, 77 and 115.
- **White noise.** The spectrum of white noise must be flat within 25 %.
- **Stability.** Noise spectra are taken in pairs, at T and at 16·T. The RMS
  of each pair's normalized difference must fall by about √16 = 4, as the
  radiometer equation predicts. The run measures a ratio of about 4.3.

To run any testbench with plain Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/ac_pkg.sv tb/tb_ref_pkg.sv tb/tb_spectrometer_top.sv \
  --top-module tb_spectrometer_top
obj_dir/Vtb_spectrometer_top
```

Put the testbench you want in place of `tb_spectrometer_top`. Verilator is a
two-state simulator, so the testbenches reset or initialize everything they
read.

## Limits

- There is no timing closure or power estimate. Whether the logic reaches
  40 MHz depends on the target process. The original chip was full-custom
  1.2 µm CMOS at 12 mW per lag.
- There is no overflow flag and no protection against a dump during an
  unfinished readout. The host is responsible for both.
- The host-side processing is not in RTL: normalization, the two-bit
  correction, post-integration and the cosine transform. The full-size
  testbench contains a simple cosine transform only as a check.
