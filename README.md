# HF DSB/SSB transmitter core for an FPGA SoC

This is the digital half of a software-defined short-wave (3–30 MHz)
transmitter. Voice enters an audio codec, and the codec sends it to the FPGA as
serial 16-bit samples. The FPGA modulates the voice onto a carrier that it
synthesises itself, then filters the result. It sends the 12-bit samples at
50 MS/s to a high-speed DAC (a DAC902). The DAC output goes through an RF power
amplifier to the antenna. There is no analog mixer or local oscillator: the
carrier frequency, the modulation (double-sideband suppressed carrier, DSB, or
single-sideband, SSB) and the codec input are all settings that an embedded
Linux host writes over the processor-to-FPGA AXI bridge.

```
 codec (I2S) ──► adc_reader ──► audio_modulation ───────────────────────► dac902_if ──► DAC902
     ▲                         ┌────────────────────────────────────┐
     │                         │ phase_counter ─► sine_table (sin)  │
 audio_control                 │               └► sine_table (cos)  │
 (XCK, control bus)            │ dsb_ssb_modulator ─► fir_filter    │
     ▲                         └────────────────────────────────────┘
     └────────── ctrl_regs (AXI4-Lite) ◄── host
```

Everything runs on one 50 MHz clock (`CLOCK_50`) with a synchronous
active-low reset. The codec's bit clocks are oversampled, not used as clocks.

## Carrier synthesis: step counter and sine table

The carrier is a direct digital synthesiser of the simplest kind. On every
50 MHz clock, a 9-bit counter (`phase_counter`) adds a programmable *step*.
Its value addresses a 512-entry table (`sine_table`) that holds one cycle of a
sine as signed 12-bit samples, `round(2047·sin(2πi/512))`. So the table is read
at a rate that sets

    f_carrier = 50 MHz × step / 512        (resolution 97.66 kHz)

For example, step 128 gives 12.5 MHz, and step 185 gives 18 066 406 Hz. Step
185 is the reset value; the transmitter has been measured on that carrier. The useful range is step 1–255 (up to
24.9 MHz, below the 25 MHz Nyquist limit). Carriers above that would be images,
and the output filter removes them.

The SSB path also needs the cosine. So a second copy of the table is read a
quarter cycle (128 entries) ahead of the first. The table contents are in
`rtl/sine_table.hex`, and they are exactly the formula above.

## Modulation: DSB and Weaver SSB (`dsb_ssb_modulator`)

The audio sample rate is about 48.8 kHz, so a new audio sample arrives about
every 1024 clocks. The modulator holds the latest sample between arrivals.

**DSB** (`mode = 0`). The held audio sample (Q1.15) multiplies the carrier sine
in a 12×16 signed multiplier (`am_multiplier`). The product is scaled by 2⁻¹⁵,
rounded and saturated to 12 bits. This is a balanced modulator: a tone at fm
gives two lines at fc ± fm, and there is no carrier line.

**SSB** (`mode = 1`) uses the Weaver method, which needs no Hilbert
transformer and no sharp band-pass filter at HF:

1. The audio signal m(t) is mixed with an audio-band oscillator at f0 in two
   branches, sin ω0t and cos ω0t. The oscillator is a second step counter and
   a second pair of tables. They advance once per audio sample, so
   f0 = f_audio × `lo_step`/512. The default `lo_step` of 18 gives about
   1.7 kHz, near the middle of the voice band.
2. Each branch passes a 60-tap low-pass filter at the audio rate (cutoff
   1.5 kHz). What is left is I = (Vm/2)·sin(ω0−ωm)t and
   Q = (Vm/2)·cos(ω0−ωm)t.
3. I multiplies the carrier sine and Q multiplies the carrier cosine. The two
   products are added:
   I·sin ωct + Q·cos ωct = (Vm/2)·cos(ωc − ω0 + ωm)t.

A tone at fm therefore comes out at a single frequency, fc − f0 + fm. This is
the upper sideband of a virtual carrier at fc − f0. The sum is doubled, with
saturation, so a full-scale tone has the same peak in SSB as in DSB. The
branch mixers keep 16-bit audio precision: the same multiplier block is used
with a 2⁻¹¹ scale.

How well the unwanted sideband is rejected depends on the branch filters.
With 60 taps at 48.8 kHz the transition band is about 2.6 kHz wide. A 1.5 kHz
tone (which lands 190 Hz inside the filter) is passed, and its mirror is more
than 30 dB down in the tests. Voice frequencies close to f0 are rejected less
well. If you need a sharper filter, use longer `WEAVER_TAPS` and a new
`WEAVER_COEFS` set.

## Harmonic filter (`fir_filter`)

Before the DAC, the modulator output passes a 60-tap direct-form FIR filter
that runs at the full 50 MHz rate. It has one multiplier per tap, a delay line
of input samples and one wide accumulator. The result is rounded and saturated
to 12 bits. The coefficients in `tx_pkg` form a Hamming-windowed sinc low-pass
with a 22 MHz cutoff and unity DC gain, stored as Q1.15:

    h[i] = w[i]·sin(2π·fc·(i−m)) / (π·(i−m)),  m = (N−1)/2,
    w[i] = 0.54 − 0.46·cos(2πi/(N−1)),  fc = 22/50

The filter suppresses table-quantisation spurs and the images near Nyquist.
The same module, given other parameters, is the Weaver branch filter (it then
takes a sample only when `en` is high). The length is a parameter. A 128-tap
version, built from the same formula, is exercised in `tb/fir_filter_128_tb.sv`.
At 22.9 MHz it attenuates 40 dB more than the 60-tap filter.

## Codec interface

* **`audio_control`** drives the codec master clock, XCK = 50 MHz / 4 =
  12.5 MHz. After reset, and whenever the host asks, it writes nine control
  words over the codec's two-wire (I²C) bus at 100 kHz. Each write is one
  transaction: START, device byte 0x34, a 7-bit register address plus a 9-bit
  value, STOP. The values are those of a WM8731-type codec:
  * reset;
  * 0 dB line gain;
  * line or microphone path, set by `input_sel`;
  * all blocks powered;
  * I2S bit-clock master, 16-bit samples;
  * 48 kHz normal mode;
  * active.

  SDA is open drain: `sda_oe = 1` pulls the line low. If a byte is not
  acknowledged, `ack_error` is set.
* **`adc_reader`** takes BCLK, ADCLRCK and ADCDAT through two-flop
  synchronisers and detects rising BCLK edges. It shifts the data in MSB first,
  in I2S format: the word starts one bit clock after ADCLRCK changes, and
  ADCLRCK low marks the left channel. When a frame is complete, `valid` pulses
  for one clock with both channels. The transmitter uses the left channel.
  BCLK must be at most clk/4; the codec runs it at 3.125 MHz.

## Host registers (`ctrl_regs`, AXI4-Lite, 32-bit)

| offset | name         | bits | reset | meaning |
|-------:|--------------|------|-------|---------|
| 0x00 | CARRIER_STEP | [8:0] | 185 | f = 50 MHz·step/512 |
| 0x04 | MODE         | [0]   | 0   | 0 = DSB, 1 = SSB |
| 0x08 | LO_STEP      | [8:0] | 18  | Weaver audio oscillator step |
| 0x0C | CODEC        | [0] input select (0 line, 1 mic); [1] write 1 to reconfigure | 0 | |
| 0x10 | DAC_CTRL     | [0]   | 1   | DAC enable; 0 = mid-scale and power-down |
| 0x14 | STATUS (RO)  | [0] configured, [1] ack error, [2] busy | | |

A write is accepted when address and data are both valid. The port handles one
transaction at a time, byte strobes are honoured, and every response is OKAY.
Assertions check that `bvalid` and `rvalid` stay high until they are
accepted. A new input select takes effect only when the codec is
reconfigured, so set bit 1 in the same write.

## DAC port (`dac902_if`)

The port registers each sample and converts it to offset binary by inverting
the sign bit (−2048 → 0x000, 0 → 0x800). It drives the 12-bit bus together
with `DAC_CLK = ~CLOCK_50`, so the DAC latches in the middle of each data
word. While the DAC is disabled, the bus sits at mid-scale and `DAC_PD` is
high.

## Timing

| path | latency |
|------|---------|
| step register → counter | 1 clock |
| counter → table | 1 clock |
| table → modulator output | 2 clocks |
| modulator output → FIR output | 1 clock, plus the filter's 29.5-sample group delay |
| FIR output → DAC pins | 1 clock |
| SSB audio path | 3 clocks of pipeline, plus the Weaver filter's group delay (about 30 audio samples ≈ 0.6 ms) |

A codec configuration takes about 2.6 ms.

## Where this implementation makes its own choices

The published design fixes these points:
* the block structure;
* the 50 MHz clock, the 9-bit counter and the 512 × 12-bit sine table;
* the frequency formula;
* 16-bit audio and the 12×16 multiplier with a 12-bit result;
* the 60-tap direct-form harmonic filter placed before the DAC;
* DSB/SSB operation;
* host control over an AXI bridge.

It does not give, and this RTL chooses:
* the SSB method (Weaver, from the three methods considered), f0, and the
  branch filters;
* all filter coefficients;
* which product bits are kept, with rounding and saturation;
* the codec (a WM8731-type part), its register values, the I2S format and the
  clock scheme;
* the register map and its reset values;
* the DAC coding, clock phase and power-down control;
* the use of the left channel only.

Two limits follow from the fixed numbers:
* Carriers above 24.9 MHz cannot be produced with a 50 MHz clock, although the
  DAC is specified to 30 MHz.
* The carrier can only be set in 97.66 kHz steps.

The receiver side of such a system (an SDR board and PC software) and the
analog parts (DAC, amplifier, antenna) are outside this RTL.

## Files

* `rtl/tx_pkg.sv`: shared widths, types, mode enum, default steps and both
  coefficient sets.
* `rtl/hf_transmitter.sv`: the top level.
* `rtl/*.sv`: one module per file, as named above.
* `rtl/sine_table.hex`: the table contents.
* `tb/<module>_tb.sv`: a self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M`.
* `tb/i2s_codec_model.sv` and `tb/i2c_slave_model.sv`: behavioural models of
  the codec's serial port and control port.
* `tb/fir_filter_128_tb.sv`: the 128-tap filter variant.

## Simulating

Run from the repository root, because the sine table is loaded from
`rtl/sine_table.hex`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/tx_pkg.sv \
    tb/hf_transmitter_tb.sv --top-module hf_transmitter_tb -y rtl -y tb +libext+.sv
./obj_dir/Vhf_transmitter_tb
```

Use the same command for any other testbench. The end-to-end test runs the
top at its default parameters, through about 1.6 M clocks (about 5 s). It
checks:
* the codec configuration, and a reconfiguration for the microphone;
* the 18 066 406 Hz carrier (18500 crossings in 51200 clocks);
* a step change to 12.5 MHz;
* both DSB sidebands with the carrier suppressed;
* the SSB line at fc − f0 + fm, with the opposite sideband more than 30 dB
  down;
* DAC power-down.

It counts each of these mechanisms, and a mechanism that never happened counts
as a failure. The unit testbenches compare with models computed independently
in the testbench: real-valued sine tables, direct-form sums, and correlation
against exact frequencies.
