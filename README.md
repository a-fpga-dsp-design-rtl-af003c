# FPGA front end for ultrasonic edge and fracture detection

This is the FPGA half of a two-chip ultrasonic test system. The system
finds edges and cracks in a plate (bone, or a bone-substitute plate in the
lab) by timing the echoes of an ultrasonic pulse. The FPGA does the fast
work:

- it drives the transmitting transducer through a DAC with a *low
  transient pulse* (LTP);
- it samples the receiving transducer at about 1 MHz;
- it demodulates the 150 kHz echo train down to its envelope, in
  real time, in fixed-point logic;
- it serves the envelope to a DSP over the DSP's external memory bus, one
  value per microsecond.

The DSP (a TMS320C6416, not part of this RTL) smooths the envelope with a
16-sample moving average and reports the times of its maxima. Each maximum
is an echo from one edge of the plate. The DSP then writes the smoothed
signal back, and the FPGA puts it out on the second DAC channel for an
oscilloscope.

Two clocks run the design:

| Clock | Frequency | What runs on it |
|---|---|---|
| master clock `clk_62m5` | 62.5 MHz, from a DSP timer | pulse generator, DAC1, bus capture |
| `clk_1m` | 62.5 MHz / 60 = 1.0417 MHz | ADC, demodulator, DAC2, DSP interrupt |

The 62.5 MHz clock gives the pulse its 16 ns time resolution. The slow
clock is the sample rate. Throughout this text "1 µs" means one period of
`clk_1m`, which is really 0.96 µs.

```
             +----------------------------- fpga_top ------------------------------+
 XA[15:2] -->| dsk_decode -- rd_n, csad_n, csdac2_n --> dsk_bus, dsk_adc, dsk_dac  |
 XCE/XRE/XWE>|                                                                     |
 XD[15:0] <->| dsk_bus <-- s2u_conv <-- qam_demod <-- u2s_conv <-- dsk_adc <-------|<-- AD[11:0] samples
             |    |                                                   |  --------->|--> AD[11:0] config words
             |    | from_dsp = XD[15:4]                               +----------->|--> ADCLK, ADRW
             |    +--> dsk_dac:  ltp_gen ----------------------------------------> |--> DAC1[11:0] pulse
             |                   WRDAC2 holding register ------------------------> |--> DAC2[11:0] averaged envelope
 clk_62m5 -->| clock_divider --> clk_1m (ADC, demodulator, DAC2) ------------------>|--> INT to the DSP
             +---------------------------------------------------------------------+
```

## Module map

| Module | Role | Clock |
|---|---|---|
| `fd_pkg` | widths, carrier tables, bus addresses, mid-scale code | – |
| `fpga_top` | wires the front end together | both |
| `clock_divider` | ÷60 clock (`clk_1m`) and a one-cycle `tick` after its falling edge | 62.5 MHz |
| `ltp_gen` | two-step low transient pulse, repeated every 2^18 master cycles | 62.5 MHz |
| `dsk_dac` | DAC module: channel 1 = `ltp_gen`, channel 2 = value written by the DSP | both |
| `dsk_decode` | EMIF address decoder: `rd_n`, `csad_n`, `csdac1_n`, `csdac2_n` | comb. |
| `dsk_bus` | EMIF data bus: envelope out on XD[15:4], DSP data in from XD[15:4] | comb. |
| `dsk_adc` | ADC module: sample register, ADC clock, configuration path, ADRW | 1 MHz |
| `u2s_conv` / `s2u_conv` | offset-binary ↔ two's complement (±2048) | comb. |
| `qam_demod` | envelope demodulator: mixer, 2 IIR filters, 2 squarers, adder, square root | 1 MHz |
| `sincos_gen` | 20-entry 150 kHz sine/cosine table walker | 1 MHz |
| `quad_mixer` | multiplies the sample by sine and cosine | 1 MHz |
| `iir_lpf` | 2nd-order Butterworth low-pass, shift-and-add coefficients | 1 MHz |
| `squarer` | signed 12×12 → 24-bit product | comb. |
| `iq_adder` | I² + Q², top 24 of 25 bits | comb. |
| `sqrt_restoring`, `sqrt_stage` | 12-bit restoring square root, one stage per result bit | comb. |
| `int_gen` | DSP interrupt line: the sample clock, optionally gated down to every `INT_DECIM`-th period | 1 MHz |

All registers reset asynchronously from `rst_n` (active low at the top,
active high inside).

## The envelope demodulator (`qam_demod`)

The transducers ring at about 150 kHz, so an echo arrives as a short
150 kHz burst. Its timing is read from the burst's envelope. The
demodulator works out that envelope with a quadrature (I/Q) detector
running at the 1 MHz sample rate, in five steps.

### 1. Carrier: `sincos_gen`

At 1 MHz sampling, 150 kHz goes through exactly three cycles every 20
samples. A 20-entry table per phase is therefore enough for a perfectly
periodic carrier. Each entry is `round(31·sin(2π·0.15·(n+1)))` (and the
same with cos), 6-bit signed (sign plus 5 magnitude bits). A modulo-20
pointer walks the table, and the sine and cosine outputs are registered.
Since `clk_1m` is really 1.0417 MHz, the carrier is really 156 kHz. The
filter below is wide enough that this does not matter.

### 2. Mixing: `quad_mixer`

The signed 12-bit sample is multiplied by each carrier value, giving an
18-bit product. Bits [16:5] go on, i.e. the product divided by 32. This
undoes the table's amplitude of 31, so a full-scale input still fits in
12 bits. After mixing, the echo's envelope sits at baseband, and a copy
sits at twice the carrier.

### 3. Low-pass: `iir_lpf` (one each for I and Q)

This is a second-order Butterworth filter in direct form II, with a
cutoff of 75 kHz at a 1 MHz sample rate (78 kHz at the real 1.0417 MHz).
It has no multipliers; every coefficient is a sum of powers of two:

```
w[n] = x[n]·64 + a1·w[n-1] − a2·w[n-2]     a1 = 1 + 1/4 + 1/16 + 1/32 + 1/256 + 1/1024 = 1.3486
                                           a2 = 1/2 + 1/128 + 1/256 + 1/512 + 1/1024  = 0.5146
y[n] = g·(w[n] + 2·w[n-1] + w[n-2]) / 64   g  = 1/32 + 1/128 + 1/512 + 1/4096        = 0.04126
```

Notes on the filter:

- The DC gain is 4g/(1 − a1 + a2) = 0.994.
- The state `w` is kept with 6 fraction bits (`FRAC`) in 26-bit
  registers (`ACC_W`). This keeps the truncation of the `>>>` terms from
  building up into a large DC error.
- The output is saturated to 12 bits.
- `GAIN_LOG2` shifts the output left. The original system adjusts the
  filter gain to the input amplitude. Here that gain is a parameter,
  default 0 (unity).

### 4. Magnitude: `squarer`, `iq_adder`

I² and Q² are 24-bit. Their 25-bit sum is cut back to its upper 24 bits,
so the radicand is (I² + Q²)/2.

### 5. Square root: `sqrt_restoring`

This is a combinational restoring square root with one `sqrt_stage` per
result bit, MSB first. Stage k tries the bit by subtracting
`(4·q + 1)·4^(N−1−k)` from the remainder. If the result is not negative,
the bit is 1 and the difference is kept; otherwise the bit is 0 and the
remainder is restored. Twelve stages turn the 24-bit radicand into a
12-bit root. The root is registered as the envelope, clamped to 2047 so
that it stays a positive signed value.

### Scale and latency

For an input burst of amplitude A (ADC codes), the settled envelope is
about 0.34·A. After filtering, the I/Q vector has length A·31/64: the
31/32 table scaling times the 1/2 that mixing leaves at baseband. Halving
the radicand divides that by another √2.
A 1500-code tone gives about 514.

Timing of one sample through the chain:

- The whole chain from the ADC sample register to the envelope register
  is combinational. An envelope register update at a rising `clk_1m` edge
  uses the sample captured at the previous rising edge.
- The filters add their own group delay of a few samples.
- With the DSP's 16-tap average, an echo maximum shows up about 13 to 14
  samples after the centre of its burst.

`u2s_conv` subtracts 2048 from the offset-binary ADC code before the
demodulator. `s2u_conv` adds it back to the envelope, so the DSP reads
2048 + envelope.

## The low transient pulse (`ltp_gen`)

A transducer driven with a plain step rings for a long time. That ringing
would bury the early echoes. The pulse is therefore shaped as two steps
whose ringing cancels:

- a high level for half a ringing period;
- then a lower level for another half period;
- then back to the rest level (mid-scale code 2048).

An 18-bit counter runs freely on the 62.5 MHz clock:

| Counter | DAC1 code | Nominal level (code × 1.3 mV) | Duration |
|---|---|---|---|
| 0 … 264 | 2000 | 2.6 V | 265 cycles, 4.24 µs |
| 265 … 528 | 1231 | 1.6 V | 264 cycles, 4.22 µs |
| 529 … 262143 | 2048 (mid-scale) | rest level | rest of the period |

The pattern repeats every 2^18 cycles (4.19 ms), which gives one "shot"
per period. `ltp_start_o` pulses when the counter is 0. It is a debug and
testbench marker; the DSP does not use it, because it counts interrupts
instead.

- The thresholds and levels are parameters: `T1`, `T2`, `LEVEL1`,
  `LEVEL2`, `IDLE`, `CNT_W`.
- The output is registered, so DAC1 follows the counter by one cycle.
- The second threshold (528), the rest code and the repetition period
  are this design's choices. 528 makes the two steps equally long. That
  is close to half the period of the transducer's damped ringing,
  3.76 µs or 235 cycles, which is where a two-step shaper puts its second
  step.

## The DSP bus (`dsk_decode`, `dsk_bus`, `dsk_adc`, `dsk_dac`)

The DSP reaches the FPGA through an asynchronous external memory interface
(EMIF). The FPGA sees the low address lines XA[15:2], chip enable XCE,
read strobe XRE, write strobe XWE and the 16-bit data bus XD.

| Byte address (low 16 bits) | Select | Read | Write |
|---|---|---|---|
| 0x0000 (`CSADC`) | `csad_n` | envelope on XD[15:4], XD[3:0] = 0 | XD[15:4] to the ADC (configuration) |
| 0x0004 (`WRDAC1`) | `csdac1_n` | – | decoded and brought out as `csdac1_n_o`; DAC1 always plays the pulse |
| 0x000C (`WRDAC2`) | `csdac2_n` | – | XD[15:4] to DAC2 |

How each select is formed:

- `rd_n = XA15 | XA14 | XA13 | XCE_n | XRE_n`. It enables the FPGA's data
  bus drivers (`xd_oe = ~rd_n`). Outside a CSADC read the FPGA drives
  zero.
- Each chip select is low only when XA[15:2] equals its address and XCE is
  low.

The 12-bit values sit in the upper bits of the 16-bit bus word: the DSP
shifts them by 4.

### ADC side (`dsk_adc`)

`ADRW = csad_n | XWE_n`:

- **While ADRW is low** (a DSP write to CSADC), the FPGA drives the DSP's
  word onto the ADC's bidirectional AD bus. This is how the DSP writes the
  ADC's reset and control-register words at start-up. In the testbench
  these are 0x401, 0x400, 0x01A and 0x4D2 on AD[11:0].
- **While ADRW is high**, the AD bus is an input. The sample register
  takes AD[11:0] on every rising edge of the ADC clock.

The ADC clock is `clk_1m` itself. The sample register resets to 0x800
(0 V).

### DAC side (`dsk_dac`)

**Channel 1** is the pulse. It is clocked and strobed by the 62.5 MHz
clock.

**Channel 2** takes the DSP's writes:

1. A write to WRDAC2 lasts several hundred ns. While `csdac2_n` and `XWE_n`
   are both low, the 62.5 MHz clock samples XD[15:4] into a holding
   register.
2. One master cycle after `clk_1m` falls (`tick`), the holding register
   is copied to the DAC2 output register.
3. DAC2 is clocked and strobed by `clk_1m`, so it latches on the rising
   edge, half a period after the data changed.

### Interrupt and timing budget (`int_gen`)

By default the interrupt line to the DSP (`int_n_o`) is `clk_1m` itself.
The DSP takes the interrupt on the falling edge, which is half a period
after the envelope register changed. In its handler it:

1. reads CSADC;
2. subtracts 2048;
3. updates the moving average and the peak search;
4. writes the average to WRDAC2.

All of this must finish within one 0.96 µs sample period. The testbench
DSP model takes about 0.7 µs: an 11-cycle read and a 32-cycle write at
62.5 MHz.

That budget is tight for anything beyond a short filter. The envelope's
spectrum, however, ends well below 50 kHz, so the DSP can equally well
read only every fourth sample.

The top-level parameter `INT_DECIM` sets how many samples there are per
interrupt. `int_gen` lets the low half of `clk_1m` through to `int_n_o`
only when a modulo-`INT_DECIM` counter of rising `clk_1m` edges is zero.
It computes `int_n_o = clk_1m | (cnt != 0)`:

- The counter changes only while `clk_1m` is high, so the line cannot
  glitch.
- `INT_DECIM = 1` gives exactly the sample clock.
- With `INT_DECIM = 4` the DSP gets one interrupt every 3.84 µs, about
  four times the processing time. It reads the newest envelope each time.

The demodulator itself always runs at the full rate.

## Departures and choices

These follow the original system:

- the clock plan (62.5 MHz and ÷60);
- the 20-entry 6-bit carrier tables;
- the 12×6 → 18-bit mixer;
- the filter coefficients written as shift-and-add sums, and the
  Butterworth / 75 kHz design;
- 24-bit squares, the 25-bit sum cut to 24 bits, and the 12-bit root;
- the first pulse threshold (264) and the two pulse levels (2000, 1231);
- the address map and the ORed selects;
- ADRW = csad OR XWE, the ADC clock and the interrupt taken from the
  1 MHz clock;
- data on XD[15:4];
- the offset converters.

These are this design's own choices:

- **Mixer scaling**: the product bits taken for the filter input are
  [16:5].
- **Filter arithmetic**: the 6 fraction bits and 26-bit state, the output
  saturation, and the gain as a power-of-two parameter rather than a
  run-time adjustment.
- **Second pulse threshold**: 528.
- **Pulse rest level**: mid-scale (2048).
- **Pulse repetition**: the free-running 2^18-cycle period.
- **WRDAC1 writes**: the DSP's writes to WRDAC1 are decoded but not used.
  Channel 1 is reserved for the pulse, and the DAC1 write strobe is the
  master clock. The original forms that strobe from the bus output enable
  combined (XOR) with a chip select.
- **Pulse timing source**: the original system is also described with
  3.27 µs steps at 2.5 V and 1.5 V. The RTL uses the counter thresholds and
  codes of its pulse-generator description instead (264 cycles, codes
  2000 and 1231).
- **DAC2 write capture**: the holding register and the update on `tick`.
- **Clock and strobe pins**: the DAC clock and write pins are driven by
  the two clocks.
- **Resets**: the reset values (zero, or mid-scale for the data
  converters).
- **Envelope clamp**: the envelope is clamped at 2047.

Other parts of the original system are outside the RTL. The
moving-average filter and the edge detector are DSP software; a
behavioural version of both is in `tb/tb_fpga_top.sv`. The DSP's timer,
which makes the 62.5 MHz clock, the ADC and DAC chips, and the
transducers and amplifier are not modelled as hardware. The interrupt decimation (`INT_DECIM`) is an option that the original
system mentions but does not use in its experiments. Its default of 1 is
the configuration those experiments ran with.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares the
module against an independent model and prints
`TB_RESULT checks=N failures=M`. `tb/tb_ref_pkg.sv` holds the reference
models shared by the testbenches:

- floating-point carrier tables;
- a floor-division model of the filter;
- an integer square root.

### End-to-end testbench

`tb_fpga_top` runs the whole front end at its default sizes for two full
pulse periods (8.4 ms of real time at 62.5 MHz). That takes a few seconds. Around the FPGA
it models two things.

**The DSP:**

- EMIF read and write cycles;
- the ADC configuration sequence;
- one read and one write per interrupt;
- the 16-tap moving average and a peak detector with hysteresis.

**The ADC input:** four Hann-windowed 150 kHz bursts plus noise after each
pulse. The burst times are the echo maxima measured on a 13 × 17.8 cm
bone-substitute plate with two transducer placements:

- **Shot 1, asymmetric placement:** 51, 80, 102 and 128 µs.
- **Shot 2, symmetric placement:** 50, 79, 104 and 125 µs. The echoes from
  the two farthest edges arrive together, so they form one burst.

It checks:

- every envelope read by the DSP, bit for bit, against the reference
  model;
- the configuration words on the ADC bus;
- the pulse levels and the 2^18-cycle period;
- the 60-cycle ADC clock;
- every DAC2 update;
- that four echo maxima are found in each shot, each 14 ± 4 samples after
  its burst centre.

It also counts each mechanism (configuration writes, pulse starts,
interrupts, reads, DAC2 updates, maxima) and fails if one never happens.

### Decimated-interrupt testbench

`tb_fpga_top_decim` repeats the asymmetric-placement shot with
`INT_DECIM = 4`. The DSP model averages its last four reads, which is
again a 16 µs window. The testbench checks:

- the 240-cycle interrupt spacing;
- that every interrupt falls in the low half of the sample clock;
- every envelope read, bit for bit;
- DAC2;
- the four echo maxima.

The maxima land within two samples of the full-rate results.

### Running a testbench

With Verilator 5:

```
verilator --binary --timing -Irtl -Itb rtl/fd_pkg.sv $(ls rtl/*.sv | grep -v fd_pkg.sv) \
          tb/tb_ref_pkg.sv tb/tb_fpga_top.sv --top-module tb_fpga_top -Mdir obj_top -o sim
./obj_top/sim
```

Replace `tb_fpga_top` with any other `tb_*` module to test a single block.
All of them build without warnings and finish in seconds. They pass
with zero-initialised and with randomly initialised state
(`+verilator+rand+reset+2`).

Simulation details:

- The testbenches have no `timescale`. The master clock is modelled with
  a 16-unit period, so one time unit stands for 1 ns.
- The design has no `x`-dependent behaviour: every register that is read
  is reset.

Things to check when changing the design:

- **`HALF_DIV`:** the carrier tables assume 20 samples per three carrier
  cycles. Changing `HALF_DIV` moves the carrier with the sample rate,
  which stays at 0.15 × the sample rate.
- **Sample rate:** to keep the carrier at a fixed frequency under a new
  sample rate, regenerate `SIN_LUT`/`COS_LUT` in `fd_pkg` from the
  formula above.
- **Filter coefficients:** the filter coefficients are tied to the sample
  rate too; recheck them whenever it changes.
