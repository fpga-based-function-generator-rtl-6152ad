# FPGA function generator

A bench function generator built entirely in FPGA logic: it produces sine,
square, triangle and ramp waveforms from 0.1 Hz to 100 kHz with 8-bit
samples, scales their amplitude digitally, interpolates them to a higher
sample rate and shifts them out to an external serial DAC. A rotary knob steps
the frequency, slide switches pick the waveform, and a small sequencer can
play a list of waveforms one after another, either on its own or on a trigger.
It targets a Spartan-3E XC3S500E board with a 50 MHz clock, but nothing in the
RTL is device specific.

## Signal chain

```
            +-------------+   +-----------+   +--------+   +-------------+   +---------+
 tuning --> | waveform    |-->| digital   |-->| interp |-->| DAC serial  |--> SPI to the
 word       | engine      |   | gain      |   | filter |   | interface   |    off-chip DAC,
            | (3 DDS accs,|   +-----------+   +--------+   +-------------+    analog filter
            |  sine table)|                       ^               ^           and output
            +-------------+                       |               |
                 ^   ^ wave_sel             dac_tick         filt_valid
   engine_tick --+   +--- waveform_sequencer <-- switches, trigger, period wrap
                       sample_clock: dac_tick every 100 clocks, engine_tick every 200
   knob --> rotary_encoder --> frequency_control --> tuning word, output enable
```

| module | role |
|---|---|
| `fg_pkg` | shared widths, rates, enums (`wave_t`, `mode_t`), the sequence instruction struct and the tuning-word function |
| `sine_rom` | one period of a sine, 256 x 8 bits, computed at elaboration |
| `phase_accumulator` | 49-bit DDS phase accumulator with a 48-bit tuning word and a period-wrap strobe |
| `waveform_engine` | three accumulators in lock step, sine/square/triangle/ramp shaping, waveform selector |
| `waveform_sequencer` | manual, sequence and script modes over an 8-entry instruction memory |
| `digital_gain` | amplitude scaling about mid-scale with rounding and saturation |
| `interp_filter` | linear interpolator, 2x by default |
| `sample_clock` | the DAC and engine sample-rate enables |
| `dac_spi` | 24-bit SPI word per sample to the serial DAC |
| `rotary_encoder` | synchronisers, quadrature filter and push-button debounce |
| `frequency_control` | decade frequency setting, tuning-word table, output enable |
| `function_generator_top` | wires the above together |

The DAC itself and the analog filter after it are analog parts outside the
FPGA and are not part of the RTL. `tb/ltc2624_model.sv` is a behavioural model
of the DAC that the testbenches use to decode the serial words.

## Phase, frequency and rates

Everything rests on direct digital synthesis. A phase accumulator adds a
tuning word `ftw` on every engine sample, modulo 2^49. The top bits of the phase
say where in the period the current sample lies, so the output frequency is

    f_out = ftw * f_engine / 2^49

The clock and rates are:

| quantity | value | where set |
|---|---|---|
| system clock | 50 MHz | `fg_pkg::CLK_HZ` |
| DAC update rate | 50 MHz / 100 = 500 kHz | `DAC_DIV`, top parameter `DIV` |
| engine sample rate | 500 kHz / 2 = 250 kHz | `INTERP`, top parameter `LOG2_L` |
| phase accumulator | 49 bits | `ACC_W` |
| tuning word | 48 bits | `FTW_W` |

The tuning word is 48 bits, one bit less than the accumulator. That limits
`f_out` to below half the engine rate, the Nyquist limit. It also means at
most one wrap can happen per step, so the carry out of the accumulator marks
each completed period exactly. The frequency resolution is 250 kHz / 2^49, about
4.4e-10 Hz, so the decade settings come out exact to far better than 1 ppm.

`frequency_control` holds seven settings, 0.1 Hz x 10^i for i = 0..6 (0.1 Hz to
100 kHz). Their tuning words are computed at elaboration as
`round(f * 2^49 / ENGINE_HZ)`. So `ENGINE_HZ` must match the rate of the engine
ticks: the top derives it from `CLK_HZ`, `DIV` and `LOG2_L`. At 100 kHz
the engine has only 2.5 samples per period, and the waveforms are accordingly
coarse. At 1 kHz it has 250.

## Waveform engine

There are three accumulators, for the sine, square and triangle channels. All
three get the same tuning word and tick, so they run in lock step, and an
assertion checks that their wrap strobes agree. Only the sine needs memory. The
others are computed from the phase `p`:

| channel | value (8-bit offset binary, mid-scale 128) |
|---|---|
| sine | `round(128 + 127*sin(2*pi*a/256))`, `a` = top 8 phase bits |
| square | 255 in the first half period, 0 in the second |
| triangle | rises 0 to 255 over the first half, falls back to 0 over the second |
| ramp | top 8 phase bits (from the triangle channel's accumulator) |

A tick updates the phases in cycle 1. The samples are registered in cycle 2,
with `sample_valid` and `wrap` (this sample starts a new period) pulsing in
that cycle. `wave_sel` then picks the channel that goes on, through a
combinational multiplexer on the registered channels.

## Sequencing

`waveform_sequencer` decides `wave_sel`:

* **manual**: the two switches choose the waveform;
* **sequence**: instructions `{wave, periods}` are played in order
  0..`seq_len`-1 and then loop. Each instruction lasts `periods` engine
  periods, and 0 counts as 1. The periods are counted with the engine's wrap
  strobe, so the waveform changes exactly at a period boundary;
* **script**: the current instruction plays until a `trigger` pulse, then the
  next one starts.

Any mode change restarts at instruction 0. Instructions can be written at any
time through `seq_we/seq_waddr/seq_wdata`. After reset the memory holds sine,
square, triangle and ramp for 2 periods each (entries 0 to 3), with sine for 1
period in the rest. `trigger` is taken as a synchronous one-cycle pulse; an
external button would need a synchroniser and debouncer in front of it.

## Gain, interpolation and the DAC

`digital_gain` removes the 128 offset and multiplies by an 8-bit gain with 6
fraction bits, so 64 is unity and the range is 0 to 3.98. It rounds half up,
saturates to -128..127 (raising `clipped`) and restores the offset. This lets
the amplitude change without touching the stored waveform.

`interp_filter` doubles the sample rate by linear interpolation. The input
samples are x[n]. After x[n] arrives, the DAC gets x[n-1] and then
x[n-1] + floor((x[n]-x[n-1])/2). This delays the signal by one engine sample.
Each input must arrive between two output ticks. That holds because the engine
tick coincides with every second DAC tick, and the engine, gain and filter
pipeline is only a few cycles deep.

`dac_spi` sends one 24-bit word per DAC tick, MSB first: command `0011`
(write and update), address `1111` (all four channels), the sample as the top
8 bits of the 12-bit code, and 4 zero bits. SCK runs at half the clock, and
the DAC samples MOSI on its rising edge. The word takes 50 cycles from start
to chip select rising, which fits in the 100-cycle DAC period. An assertion in
the top checks this. When the output is switched off, mid-scale (128) is sent
instead.

## Front panel

`rotary_encoder` passes each knob contact through a 2-flip-flop synchroniser.
The two quadrature contacts are filtered as follows. `q1` is set when both
contacts are closed and cleared when both are open. `q2` is set when only B
is closed and cleared when only A is closed. Bounce on a single contact
therefore cannot produce a count. Each rising edge of `q1` is one detent:
clockwise (up) when `q2` is low, anticlockwise (down) when it is high. The
push contact must be stable for `DEBOUNCE` cycles (1 ms) before it counts.

Turning steps the frequency one decade per detent and stops at 0.1 Hz and
100 kHz. Pushing toggles the output on and off. After reset the generator
runs a 1 kHz sine at unity gain with the output on.

## What is specified and what is chosen here

These parts come from the design this RTL implements:

* the block chain (memory, engine, gain, digital filter, DAC, sample clock),
  with analog filtering after the DAC;
* one stored period per waveform;
* sine, square, triangle and ramp outputs;
* 8-bit samples and the 0.1 Hz to 100 kHz range;
* three 49-bit accumulators, a 48-bit register and a 24-bit DAC data register;
* two 2-bit shift registers, used here as input synchronisers;
* sequence and script modes;
* knob control of frequency and switch selection of the waveform;
* the signal names of the original design (`rst_b`, `rot_center`,
  `output_en`, the DAC state, counter and data registers).

These are choices of this implementation:

* the 50 MHz clock and the 500 kHz / 250 kHz rates;
* the 256-entry sine table;
* the shaping formulas;
* the decade frequency steps;
* the push button toggling the output enable;
* the gain format;
* the linear interpolator;
* the DAC word layout, which is that of the quad serial DAC on the
  Spartan-3E starter board;
* the sequence instruction format and depth;
* the debounce time.

Known differences from the original implementation:

* Its synthesis report lists three 16 x 3-bit ROMs whose contents are not
  known. They are not reproduced. The sine here comes from a 256 x 8 table.
* The original has four state machines. Only the DAC interface here is an
  explicit state machine.
* The original also had frequencies set in the source code. Here the knob
  selects among fixed decade settings. Other frequencies need a new table in
  `frequency_control`.
* Script mode can be stepped by an external or an internal trigger in the
  original. No internal trigger source is described, so only the external
  `trigger` input is built.
* The original's statistics also list small adders, subtractors and
  registers (4-, 5-, 6- and 9-bit) whose purpose is not described. They have
  no counterpart here.

## Verification

Every module has a self-checking testbench in `tb/` that compares it against
a model written independently in the testbench:

* `sine_rom_tb` checks all 256 entries, the symmetry and the read latency.
* `phase_accumulator_tb` compares 2000 random steps with a 64-bit model.
* `waveform_engine_tb` checks all four channels and the selector for 1200
  samples at four tuning words.
* `waveform_sequencer_tb` runs all three modes and a reloaded instruction
  list.
* `digital_gain_tb` runs every input value at six gains.
* `interp_filter_tb` checks the filter at L = 2 and 4.
* `sample_clock_tb` checks the tick spacing and alignment.
* `dac_spi_tb` checks the serial words through the DAC model, including the
  50-cycle word time.
* `rotary_encoder_tb` checks 100 bouncing detents and debounced presses.
* `frequency_control_tb` checks every tuning word to 1e-4 and the saturation
  at both ends.

`function_generator_top_tb` runs the whole design at its default parameters.
A reference model predicts every channel value and every DAC code, and the
testbench checks the DAC model against it: about 9000 DAC words in roughly
900,000 clock cycles. It measures the square wave at the DAC at 1 kHz,
10 kHz and 100 kHz by counting rising edges. It turns the knob to both ends
of the range, saturates and attenuates the gain, and switches the output off
and on. It also plays the sequence mode with the reset and a reloaded
instruction list, and steps script mode with triggers. Each of these
mechanisms is counted, and the test fails if one never happens.

`waveform_frequency_tb` also runs the whole design at its default
parameters. It plays sine, square and triangle at 1 kHz, 10 kHz and 100 kHz
and measures each at the DAC model's output. The frequency is checked by
counting rising mid-scale crossings. At 1 kHz the shape is checked too:

* all three must reach full swing;
* the square must sit at a rail;
* the share of DAC words in the top eighth of the code range must be about
  23 % for the sine and 12.5 % for the triangle.

The 0.1 Hz and 1 Hz settings are only checked by their tuning words and a few
samples. A whole period at 0.1 Hz is 5e8 clock cycles.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl -y tb rtl/fg_pkg.sv \
    tb/function_generator_top_tb.sv --top-module function_generator_top_tb
./obj_dir/Vfunction_generator_top_tb
```

Use the same command with another `*_tb.sv` for a single block. The package
must come first on the command line; `-y` finds the other files by module
name. Each testbench prints `TB_RESULT checks=N failures=M` and stops on its
own, with a watchdog in case it hangs. The full-design test takes about a
second.

To change the rates, override `DIV` and `LOG2_L` on the top. The tuning words
follow automatically. Keep `DIV` at 50 or more so that a 50-cycle DAC word
fits between ticks. For other frequency steps, change `freq_hz`/`NUM_FREQ` in
`fg_pkg`. For a different DAC, only `dac_spi` needs to change.
