# Digital AM / SSB demodulator with DDS carrier and 200-tap FIR

This design recovers the audio tone from an amplitude-modulated signal entirely in logic, by
coherent (product) detection. Each sample of the received signal is multiplied by a locally
synthesized copy of the carrier. The product holds the modulating tone at baseband and images
around twice the carrier. A long FIR low-pass filter keeps only the tone. The carrier copy comes
from a direct digital frequency synthesizer (DDS), so the carrier and tone frequencies are
constants that can be changed.

The default configuration targets a small FPGA board with a 50 MHz oscillator:

| quantity | value |
|---|---|
| system clock | 50 MHz |
| sample rate fsam | 40 kHz (50 MHz x 13422 / 2^24 = 40000.6 Hz) |
| carrier fcar | 10 kHz |
| modulating tone fmod | 1 kHz or 1.5 kHz (switch) |
| modulation types | AM, USB, LSB, USB with carrier, LSB with carrier |
| low-pass filter | direct-form FIR, 200 taps (order 199), Hamming window, fc = 2 kHz |
| word length | 8-bit samples, 8-bit coefficients, 24-bit filter output |
| sine tables | 8192 x 8 per period, half stored (4096 x 8), four tables |

## Why product detection works for all five signal types

For an upper-sideband signal (m/2)·cos(wc+wm)t multiplied by cos(wc t):

    (m/2)·cos(wc+wm)t · cos(wc t) = (m/4)·[cos(2wc+wm)t + cos(wm t)]

The low-pass filter removes the 2wc+wm term and leaves (m/4)·cos(wm t). The lower sideband works
the same way with 2wc−wm. For full AM, both sidebands add to (m/2)·cos(wm t), and the carrier
itself adds a DC level. With fcar = 10 kHz and fsam = 40 kHz, the 2fcar ± fmod products (19 and
21 kHz) both fold to 19 kHz (or 18.5 kHz for a 1.5 kHz tone). The 2 kHz filter suppresses them by
more than 70 dB.

This is a *coherent* detector: the local carrier must be in phase with the received carrier. In
this design the test signal is generated on chip from the same carrier synthesizer, so the two are
locked. Phase matters differently per mode:

* For SSB, a phase error φ only shifts the recovered tone by φ. Its amplitude stays the same.
* For AM, and for the carrier part of SSB-with-carrier, the output scales with cos φ.

At fcar = fsam/4, one sample of misalignment is exactly 90° and makes an AM output vanish. The top
therefore registers the local carrier in the same pipeline stage as the modulator output (see
*Pipeline and timing*). There is no carrier recovery: a signal on the external ADC input is
demodulated against the free-running local carrier.

## Block structure

```
 clk 50 MHz ─► sample_clock_gen ──tick (40 kHz enable)──────────────────────────────┐
                                                                                     │
 frq_sel ─► freq_code_mux ─code─► dds (tone)    ─ sin/cos ─┐                          │
            CAR_CODE ────────────► dds (carrier) ─ sin/cos ─┼─► am_modulator ─► mod_dac │
                                          │ cos             │       │ (mode)           │
                                          └─► 1-sample reg ─┼───────┼────────┐         │
 adc_data ─► 1-sample reg ──────────────────────────────────┘  use_adc mux   │         │
                                                                   ▼         ▼         │
                                               product_mixer (x · lo, signed 8x8) ◄───┘
                                                                   ▼
                                               product_scaler (16 → 8 bits)
                                                                   ▼
                                               fir_lpf (200 taps) ─► dem_y [23:0]
                                                                   ▼
                                               DAC formatting ─► dem_dac [7:0], dac_strobe
```

Every stage runs on the single 50 MHz clock. Each stage advances only on the one-cycle sample
strobe `tick`.

| file | what it is |
|---|---|
| `rtl/am_demod_pkg.sv` | widths, `mod_type_e`, offset-binary ⇄ two's-complement helpers |
| `rtl/sample_clock_gen.sv` | 24-bit accumulator; MSB rising edge → sample strobe |
| `rtl/half_sine_rom.sv` | 8192-sample sine period stored as its first half |
| `rtl/dds.sv` | phase accumulator + sine and cosine tables |
| `rtl/freq_code_mux.sv` | 1 kHz / 1.5 kHz tone code selector |
| `rtl/am_modulator.sv` | on-chip test modulator, five modulation types |
| `rtl/product_mixer.sv` | product detector (signed multiplier) |
| `rtl/product_scaler.sv` | shift-and-saturate to the filter word length |
| `rtl/fir_lpf.sv` | 200-tap direct-form FIR, coefficients computed at elaboration |
| `rtl/am_demodulator_top.sv` | the complete demodulator |

## Number formats

The sine tables hold unsigned words 0..255 centred on 127.5. So does everything that crosses the
chip boundary: the ADC word, `mod_dac` and `dem_dac`. The arithmetic inside is two's complement.
A conversion between the two adds 128 modulo 256, which is the same as inverting the MSB
(`ob2tc` / `tc2ob` in the package). The multiplier input stage uses this 128 offset. So does the
final DAC formatting.

## Sample clock

`sample_clock_gen` adds 13422 to a 24-bit accumulator on every 50 MHz clock. The MSB toggles at
50e6 · 13422 / 2^24 = 40000.6 Hz, which is the intended K = 1250 division on average. Successive
strobes are 1249 or 1250 clocks apart. The MSB rising edge becomes a one-clock enable. That keeps
the design in one clock domain instead of clocking the synthesizers from the MSB as a derived
clock. Changing `FSAM_CODE` changes the sample rate, but the filter coefficients assume 40 kHz.

## Synthesizers and the half-wave table

`dds` holds a 24-bit phase accumulator that adds `code` on each enabled cycle. The top 13 bits
address a sine period of 8192 samples, v(a) = round(127.5 + 127.5·sin(2πa/8192)).
`half_sine_rom` stores only a = 0..4095. For the second half period it returns the bitwise
complement, 255 − v. That is exact because the stored values are symmetric about 127.5. The
cosine is a second table read at the phase plus 2048 (a quarter period). Each `dds` therefore
holds two tables, and the design holds four:

* uncompressed, 4 × 8192 × 8 = 262144 bits, more than the 239616 bits of block memory of the
  intended FPGA (Cyclone II EP2C20);
* half-compressed, 4 × 4096 × 8 = 131072 bits.

The table contents are computed at elaboration from `$sin` in a constant function. No data file
is needed.

In the top, the synthesizers step once per sample. The frequency code is therefore
f · 2^24 / fsam:

* 10 kHz carrier: 4194304. That is exactly a quarter period per sample, so the carrier samples
  are +1, 0, −1, 0 (scaled).
* 1 kHz tone: 419430.
* 1.5 kHz tone: 629146.

The top parameter `DDS_ON_CLK = 1` makes the synthesizers step on every 50 MHz clock instead.
They then have a 50e6/2^24 = 2.98 Hz step and cover 0 to 25 MHz. The codes are then
f · 2^24 / 50 MHz: 3355 for 10 kHz, 336 for 1 kHz, 503 for 1.5 kHz.

The detector samples both synthesizers at the same strobe, so the local carrier stays coherent
with the test signal in either mode. In the 50 MHz mode, a code C advances C/13422 of a period per
sample; 336 gives a 1001.4 Hz tone at the output. At the default (`DDS_ON_CLK = 0`) the
synthesizers span only 0 to 20 kHz.

## On-chip test modulator

`am_modulator` builds the received signal from the sine and cosine of both synthesizers. SSB uses
the phasing identity cos(wc ± wm) = cos wc·cos wm ∓ sin wc·sin wm.

The modulation index is m = `M_INDEX`/128 (parameter, 0..128, default 128, i.e. m = 1). Each
sideband product x is scaled first, s(x) = (x·`M_INDEX`) >>> 7. The table below is for m = 1.
For smaller m the sideband terms, and so the demodulated tone, shrink in proportion.

| mode (`mode` input) | signal | integer form (cc, cm, sc, sm signed 8-bit) | peak |
|---|---|---|---|
| 0 AM | c·(1 + cos wm) / 2 | (128·cc + cc·cm) >>> 8 | 127 |
| 1 USB | cos(wc+wm) | (cc·cm − sc·sm) >>> 7 | 126 |
| 2 LSB | cos(wc−wm) | (cc·cm + sc·sm) >>> 7 | 126 |
| 3 USB with carrier | c/2 + cos(wc+wm)/4 | (128·cc + (cc·cm − sc·sm)/2) >>> 8 | 95 |
| 4 LSB with carrier | c/2 + cos(wc−wm)/4 | (128·cc + (cc·cm + sc·sm)/2) >>> 8 | 95 |

Codes 5 to 7 behave as AM. The result is saturated to 8 bits and leaves in offset binary on
`mod_dac`, so it can be watched next to the demodulated output.

## Product detector, scaler and filter

* **`product_mixer`** recentres both inputs and registers their full 16-bit signed product.
* **`product_scaler`** takes `product >>> 7`, saturated to 8 bits. A product of two full-scale
  words (127·127) maps to 126. Only (−128)·(−128) clips.
* **`fir_lpf`** is a 200-tap direct-form FIR. Its coefficients are computed at elaboration by the
  window method:

      M = 99.5,  w(n) = 0.54 − 0.46·cos(2πn/199)
      h(n) = w(n)·sin(2π·(2000/40000)·(n−M)) / (π·(n−M)),  then h ← h / Σh
      c(n) = round(h(n) · 2^10)   (8-bit signed, largest 102, Σc = 1008)

  With 8-bit coefficients the tails below half an LSB round to zero, and 148 of the 200 taps are
  non-zero. The measured response of the quantised filter:

  | frequency | gain |
  |---|---|
  | 1 kHz | 1.008 of DC |
  | 2 kHz | −5.8 dB (the intended −6 dB point) |
  | 19 kHz | below −70 dB |

  The 200 products are summed in parallel on the clock after each new sample. The result is
  ready one clock after the sample; the next sample comes 1249 clocks later. The adder tree
  can therefore be constrained as a multicycle path.

* **DAC formatting** in the top: `dem_dac = saturate(y >>> 9) + 128`. The shift puts a
  full-scale SSB tone at about ±126. Expected output levels at the default settings, which the
  top-level testbench checks:

  | mode | tone amplitude (LSB) | DC level (LSB above 128) |
  |---|---|---|
  | USB, LSB | ≈ 126 | 0 |
  | AM | ≈ 63 | ≈ 62 |
  | USB / LSB with carrier | ≈ 32 | ≈ 62 |
  | external ADC, sine of amplitude 100 at fcar ± fmod | ≈ 99 | 0 |

## Pipeline and timing

All registers are enabled by `tick`, except the table reads (every clock) and the filter output
(the clock after `tick`).

| event | when |
|---|---|
| synthesizer phases step | `tick` n |
| table outputs valid | next clock |
| modulator output, local carrier register, ADC register | `tick` n+1 |
| product | `tick` n+2 |
| scaled word, shifted into the filter | `tick` n+3 and n+4 |
| `dem_y` | one clock after `tick` n+4 |
| `dem_dac` and `dac_strobe` | one clock after that |

Registering the local carrier together with the modulator output is what keeps them aligned.
Without that register the product sees a carrier one sample (90°) late.

`adc_sample` is the strobe itself. An external converter should present a new `adc_data` word
before the next strobe.

## Top-level interface (`am_demodulator_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | 50 MHz clock |
| `reset_n` | in | 1 | active-low reset (push button); all registers reset synchronously |
| `frq_sel` | in | 1 | 1 = 1 kHz tone, 0 = 1.5 kHz tone |
| `mode` | in | 3 | modulation type of the test modulator (table above) |
| `use_adc` | in | 1 | 1 = demodulate `adc_data`, 0 = demodulate the test modulator |
| `adc_data` | in | 8 | external ADC word, offset binary |
| `adc_sample` | out | 1 | sample strobe for the ADC |
| `mod_dac` | out | 8 | modulated test signal, offset binary |
| `dem_dac` | out | 8 | demodulated signal, offset binary |
| `dem_y` | out | 24 | full-precision filter output, signed |
| `dac_strobe` | out | 1 | one-clock strobe per new `dem_dac` |

Parameters:

* `FSAM_CODE` (13422)
* `CAR_CODE` (4194304)
* `MOD_CODE_1K` (419430)
* `MOD_CODE_1K5` (629146)
* `TAPS` (200)
* `DAC_SHIFT` (9)
* `DDS_ON_CLK` (0: step the synthesizers per sample; 1: on every clock)
* `M_INDEX` (128: modulation index m = `M_INDEX`/128 of the test modulator)

The filter cut-off and sample rate are fixed at 2 kHz / 40 kHz in the top. They are parameters of
`fir_lpf` itself.

## Outside the logic

The analog parts of a complete receiver are not part of this RTL:

* the ADC in front of the multiplier;
* the DAC after the filter;
* the analog reconstruction low-pass filter after the DAC;
* the 50 MHz oscillator.

The top brings out `adc_data`/`adc_sample` and `dem_dac`/`mod_dac`/`dac_strobe` for them.

## What follows the specification and what is this design's choice

Taken from the specification:

* 50 MHz clock, 40 kHz sampling from a 24-bit accumulator with constant 13422;
* the 24-bit synthesizers with 8192 × 8 tables compressed to half, with sine and cosine outputs;
* the 10 kHz carrier and the 1 kHz / 1.5 kHz tones and their codes;
* the signed 8 × 8 multiplier with a 128 offset adder, the scaler before the filter;
* the 200-tap Hamming FIR with fc = 2 kHz and 8-bit word length, and its 24-bit output;
* the five modulation types and their equations.

Chosen here:

* one clock domain with sample enables;
* the mirror method of table compression and the quarter-period cosine;
* the structure, scaling, fixed-point modulation index and mode encoding of the test modulator;
* the 16-bit product, the shift by 7 and saturation in the scaler;
* coefficient quantisation to round(h·2^10);
* fully parallel filter arithmetic;
* the extra register that aligns the local carrier;
* the external-ADC source select;
* the DAC scaling;
* active-low reset;
* which switch position selects which tone.

By default the synthesizers step at the sample rate, as in the reference schematic. The
specification's frequency range (3 Hz to 25 MHz in 3 Hz steps) applies to synthesizers stepped
at 50 MHz. That is the `DDS_ON_CLK = 1` configuration, which is not the default.

## Simulation

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`:

| testbench | checks |
|---|---|
| `tb_sample_clock_gen` | strobe width, 1249/1250-clock spacing, 800 strobes per 10^6 clocks, reset |
| `tb_half_sine_rom` | all 8192 words against the mirror rule and within 1 LSB of the true sine; read latency |
| `tb_dds` | phase model for the carrier, both tone codes and a random code; sine and cosine; hold and reset |
| `tb_freq_code_mux` | both codes equal round(f·2^24/40000) |
| `tb_am_modulator` | all modes against the real-valued equations, at m = 1 and m = 0.5; USB/LSB land at 11/9 kHz |
| `tb_product_mixer`, `tb_product_scaler` | random and corner operands, hold without enable |
| `tb_fir_lpf` | impulse response equals the window-method coefficients, step gain, gain at 1 / 2 / 19 kHz, output timing |
| `tb_am_demodulator_top` | the whole design at its default parameters (50 MHz clock, 200 taps) |
| `tb_am_demodulator_top_fclk` | the whole design with `DDS_ON_CLK = 1`, the 50 MHz codes and m = 0.5: USB, LSB, AM, USB with carrier |

`tb_am_demodulator_top` runs every modulation type with both tones, the external-ADC input (fed an
11 kHz sine) and a mid-run reset. In each case it measures the recovered tone, the 19 kHz residue
and the DC level. It also checks the 40 kHz output rate and that each of these mechanisms was
exercised. It simulates about 8 million clocks, roughly 15 s.

To run one testbench with Verilator 5:

    verilator --binary --timing --assert --timescale 1ns/1ps \
        --top-module tb_am_demodulator_top -Irtl -y rtl \
        rtl/am_demod_pkg.sv tb/tb_am_demodulator_top.sv -o sim
    ./obj_dir/sim

Replace the top module and file name to run another testbench. With `-Wall` the RTL lints
without warnings, apart from an unconnected output (the raw sample-clock MSB) and an unused
package constant.
