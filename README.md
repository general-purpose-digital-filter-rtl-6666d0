# General-purpose digital filter platform

A teaching platform for real-time digital filtering. It digitises one analog
channel at 1 MSPS and runs the samples through a wide, fully parallel FIR
filter on an FPGA. It then plays the result back through a DAC. A student
designs a filter, loads its coefficients and sees the effect on a scope
straight away. The filter computes every tap in the same cycle, with no
time-shared multiply-accumulate loop.

The SystemVerilog here is the FPGA side of the platform:

- the 1 MHz sample timing;
- the SPI links to a 16-bit SAR ADC (ADS8681 class) and a 16-bit DAC (DAC8830 class);
- the controller that initialises the ADC and picks filtered or pass-through output;
- the complete fixed-point signal path around the filter;
- the filter itself: 171 symmetric taps on 86 multipliers.

The filter path has two configurations. In the audio configuration, the
filter runs at 44.1 kSPS between a down-sampler and an up-sampler. In the
full-rate configuration, it runs at 1 MSPS.

The analog board is not RTL. That covers the input level shifter, the output
smoothing buffer, the reference, the regulators and the jacks and switches.
The converters appear only as behavioural models in the testbenches.

## Block structure

```
             100 MHz clk
                 |
          clock_divider ---- tick (1 cycle in 100) -------------------+
                                                                      |
 ADC pins <-> spi_master #(32) <-> adc_rx / adc_tx                    |
                                     |        ^                       |
                                     v        |                       |
                            system_controller (INIT/FILT/DIAG) <- switches, -> led
                                     |        ^
                         adc_rx[30:15]        | filt_code
                                     v        |
                                   fir_block (signal path, steps on tick)
                                     |
 DAC pins <-  spi_master #(16) <- dac_tx
```

| Module | Role |
|---|---|
| `filter_pkg` | Shared widths, fixed-point format, ADC command words, controller state type, saturation helper |
| `clock_divider` | 100 MHz to 1 MHz divided clock, plus a one-cycle `tick` strobe |
| `spi_master` | Generic SPI master: CPOL/CPHA, clock ratio, slave address, continuous mode, busy flag |
| `system_controller` | Sequencing state machine: ADC range set-up, filter or bypass mode, LEDs |
| `fir_block` | The signal path between ADC code and DAC code |
| `cmult`, `addsub_const`, `negate` | Input conditioning: gain ×1.25, bias removal, sign flip |
| `down_sample`, `up_sample` | Rate change between 1 MSPS and 44.1 kSPS |
| `fir_symmetric` | 171-tap linear-phase FIR filter with pre-adders |
| `bit_basher` | Picks the 16 integer bits for the DAC |
| `filter_platform_top` | Wires the above to the board pins |

Clocking: everything runs on the 100 MHz board clock. `tick` from
`clock_divider` is used as a clock enable. No logic is clocked by the divided
1 MHz clock. The original platform clocked its controller from a divided
clock; the enable strobe gives the same sample rate without a second clock
domain.

## The signal path and its number format

A sample goes through these stages. Each stage is one register that loads
when the sample strobe is high.

1. **×1.25** (`cmult`). The ADC is set to its 0–5.12 V range, while the
   useful input spans 0–4.096 V (the reference). Multiplying by 5.12/4.096 =
   1.25 stretches that span back to a full 16-bit code.
2. **−32768** (`addsub_const`, `SUBTRACT=1`). The board adds a 2.048 V
   offset so a single supply can carry an AC signal. 2.048 V is code 32768
   after the gain, so this step removes it.
3. **Negate** (`negate`). The input buffer is an inverting amplifier. This
   step restores the polarity.
4. *(audio configuration only)* **Down-sample** to 44.1 kSPS.
5. **FIR filter** (`fir_symmetric`).
6. *(audio configuration only)* **Up-sample** back to 1 MSPS.
7. **+32768** (`addsub_const`). Puts the bias back for the unipolar DAC.
8. **Integer bits** (`bit_basher`). The DAC word is the 16 integer bits.

Between the ADC and the DAC, the sample is a 20-bit signed number with 2
fractional bits (`SIG_W=20`, `FRAC_W=2`). That is enough to hold 1.25 × 65535
exactly, with its sign after negation. The ×1.25 gain is therefore exact.
The add, subtract and negate stages saturate instead of wrapping.

Coefficients are signed Q1.15 (`COEF_W=16`, `COEF_FRAC=15`), covering −1 to
+1 − 2⁻¹⁵. The FIR sum is accumulated at full width. It is then rounded half
up to the 2-fraction-bit format and saturated. A filter with unity gain in
its pass band therefore returns the input level.

`bit_basher` takes bits `[FRAC_W +: 16]` and drops the fraction. Because the
bias is added back first, the result is an unsigned 16-bit DAC code: 32768
at 0 V of AC signal.

## The FIR filter

`fir_symmetric` uses the symmetry h[k] = h[N−1−k] of a linear-phase filter.
The two delay-line samples that share a coefficient are added first. Each
sum then goes through one multiplier, so N taps need (N+1)/2 multipliers.

The default is 171 taps on 86 multipliers. The platform's FPGA has 90 DSP
multipliers, and four of them are reserved for the conditioning stages.

The whole sum is combinational and completes in one 100 MHz cycle. The
delay line and the output register step only on the sample strobe. So the
datapath has 100 clock cycles to settle, and a synthesis run should treat it
as a multicycle path. The RTL carries no constraint file.

Coefficients enter through the `coef` port of the top module, one Q1.15 word
per multiplier. To run a shorter filter, centre it in the 171 taps and set
the outer coefficients to zero. Fixed coefficients can be tied to the port
as constants, and synthesis will fold them into the multipliers. The
original platform built the coefficients into the generated netlist. A port
lets you change the filter without touching the RTL.

## Sample timing and the SPI frames

Every `tick` (1 µs), both SPI links start a frame together:

- The **ADC link** sends 32 bits. These are the controller's current
  command: the range write `0xD014000B` after reset, a no-op read
  (`0x00000000`) after that. It receives the result of the conversion that
  the previous frame's chip-select edge started.
- The **DAC link** sends 16 bits: the controller's chosen output code. The
  DAC latches it when chip select rises.

Both links run in SPI mode 0 with `clk_div = 1`, which gives a 50 MHz serial
clock. One frame takes:

| Link | Frame length | Time |
|---|---|---|
| ADC | (2·32+1)+1 = 66 cycles | 0.66 µs |
| DAC | 34 cycles | 0.34 µs |

Both fit inside the 1 µs period. The top module asserts that neither link is
busy when the next tick arrives.

**Where the sample sits in the ADC word.** The ADC shifts its result out on
the falling SCLK edges. The master samples on the rising ones. So the 16
result bits arrive one position late, in bits 30..15 of the 32-bit word. The
controller and the pass-through mode read `adc_rx[30:15]`, as the platform
does.

**Latency.** The path from the ADC's conversion to the DAC latching the
result has these steps:

| Step | Sample periods |
|---|---|
| Conversion read back during the next frame | 1 |
| Word reaches the filter path at the tick after that | 1 |
| Signal path at full rate (six register stages) | 6 |
| Controller register, then the DAC frame that sends it | 1 |
| **Total** | **9 + the filter's group delay** |

In the audio configuration, the down-sampler adds one more period, and the
44.1 kSPS grid adds a phase-dependent wait of up to 22 more.

The original platform measured 10 extra samples. It attributes 6 of them to
the conditioning blocks and 4 to the two buffer registers of each SPI link.
This design gets the same six stage delays. The SPI buffering costs three
sample periods here, not four, because both links restart on the same tick.

## Rate change: the 44.1 kSPS audio configuration

1 MHz / 44.1 kHz = 22.68, which is not an integer.

`down_sample` keeps samples at a fractional rate. It adds `RATE_NUM = 441`
to a phase accumulator on every input sample. It keeps the sample whenever
the accumulator passes `RATE_DEN = 10000`. That keeps exactly 441 of every
10000 samples, with a spacing of 22 or 23 input samples. There is no
anti-alias filter in front of it; the ADC's own analog front end limits the
input bandwidth. The filter runs only on kept samples, so its coefficients
are designed for 44.1 kHz.

`up_sample` returns to 1 MSPS. By default (`COPY_SAMPLES = 1`) it holds the
last filtered sample, which keeps the signal level. With `COPY_SAMPLES = 0`
it inserts zeros instead, which scales the output by about 1/22.7.

Set `RESAMPLE = 0` on `filter_platform_top` (or `fir_block`) to remove both
blocks and run the filter at 1 MSPS. Use this for filters designed at the
full rate.

## Controller modes

`system_controller` steps once per tick:

| State | ADC command | DAC word | Next state |
|---|---|---|---|
| INIT (after reset) | `0xD014000B` (range 0–5.12 V) | unchanged | FILT |
| FILT | `0x00000000` (read) | filter output | DIAG if switches = `0x0001` |
| DIAG | `0x00000000` (read) | raw ADC sample `adc_rx[30:15]` | FILT if switches = `0x0000` |

Any other switch setting holds the current state. DIAG bypasses the filter
to check the analog chain. The 16 LEDs mirror the switches. The top's
`reset` input is active high (a push button) and returns the controller to
INIT, so the range write is sent again.

## How far the RTL can be trusted

Every module has a self-checking testbench. Each testbench compares the
module against values computed independently inside the testbench:

- exact arithmetic for the conditioning stages;
- a direct-form convolution for the FIR, at 171 and 8 taps;
- a bit-level model of SPI mode 0/1/2/3 slaves, in single-word and
  continuous three-word transfers;
- an exact 441/10000 keep pattern;
- the state rules of the controller.

For each module there is also a deliberately broken copy. The matching
testbench detects it.

The end-to-end testbenches connect the top module to behavioural models of
the ADC and DAC:

- `tb_filter_platform_top` runs two small (7-tap) platforms, one full-rate
  and one resampled, for 1400 frames. It predicts **every** DAC word
  bit-exactly from the ADC conversions. It also counts these mechanisms, and
  fails if any never occurs:
  - the range write;
  - filter and bypass frames;
  - both mode transitions;
  - the hold on an unrecognised switch setting;
  - kept samples.
- `tb_filter_platform_full` does the same with the top at its default
  parameters: 171 taps, audio configuration, 5000 frames.
- `tb_filter_workloads` runs three filters on full-size platforms:
  - a 57-tap band-pass and a 153-tap band-stop at 44.1 kSPS;
  - a 157-tap high-pass at 1 MSPS.

  It drives them with test tones and measures each tone's gain at the DAC:

  | Filter | Pass-band tones | Stop-band tones |
  |---|---|---|
  | Band-pass | 6 kHz: −0.2 dB | 500 Hz: −47 dB; 15 kHz: −58 dB |
  | Band-stop | 1 kHz, 8 kHz: within 0.5 dB | 4 kHz: −59 dB |
  | High-pass | 50 kHz: +0.04 dB | 200 Hz: −33 dB |

  All of their DAC frames are also checked bit-exactly. The coefficients are
  Kaiser-window designs made in the testbench, not the original design tool's
  equiripple sets.

What has **not** been checked:

- synthesis timing (the one-cycle FIR sum needs the multicycle constraint
  described above);
- the real converters' datasheet timing, beyond the behaviour the models
  give;
- anything analog.

The converter models are written from the frame formats the controller
uses. They are not a full datasheet model: they have only the range
register, and no other ADC registers.

## Where this design departs from the original platform

- **Filter netlist.** The original filter path was generated from a
  block-diagram tool, and its internals are not published. The stage order,
  constants, filter size and rate change follow the platform. The following
  are this design's own choices:
  - the 20-bit/2-fraction signal format;
  - Q1.15 coefficients;
  - rounding and saturation;
  - one register per stage.
- **Coefficients** are a port, not built-in constants.
- **Down-sampling** uses a 441/10000 phase accumulator. The original's
  down-sample block settings are not given.
- **Up-sampling** holds samples by default.
- **Clock enable instead of a divided clock.** The divider still produces the
  50 %-duty 1 MHz clock, inverting every 50 board cycles. It also produces the
  `tick` strobe, and the logic uses only the strobe.
- **SPI master.** MOSI idles low instead of high-impedance. Chip select goes
  low on the enable edge.
  - Continuous (back-to-back) mode is provided but tied off in the top, as on
    the platform. If `cont` is high at a word's last clock edge, the word is
    handed over with a one-cycle drop of `busy`. `tx_data` is then reloaded
    with no gap in the serial clock.
- **Latency** is 9 sample periods plus group delay at full rate, against the
  10 measured on the original hardware (see above).
- **The 1 MSPS high-pass case.** The original hardware showed a much larger
  delay here (190 samples against a group delay of 78). It put this down to
  extra pipelining added by its tool flow. Here the latency does not depend
  on the filter order.

## Simulating

Verilator 5 is enough. Pass the package first, then let Verilator find the
other modules in `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
    -Irtl -y rtl -y tb +libext+.sv \
    rtl/filter_pkg.sv tb/tb_filter_platform_top.sv \
    --top-module tb_filter_platform_top -o sim
./obj_dir/sim
```

Replace the testbench name to run any other testbench in `tb/`. Each one
prints a final line `TB_RESULT checks=<n> failures=<n>` and stops itself; a
watchdog ends it with a failure if it hangs.

Run times on a workstation:

| Testbench | Run time |
|---|---|
| `tb_filter_platform_full` (defaults) | under a second |
| `tb_filter_workloads` | about 8 s, including the build |

To change the filter size, override `NTAPS` (and `NMULT`, which defaults to
(NTAPS+1)/2) on `filter_platform_top`. To choose full rate or 44.1 kSPS, set
`RESAMPLE`.
