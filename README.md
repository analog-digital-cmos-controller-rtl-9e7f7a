# Digital lock controller for thermally tuned Mach-Zehnder meshes

A mesh of Mach-Zehnder interferometers (MZIs) on a photonic chip steers light only if every
interferometer sits at the right working point. Thermal drift, fabrication spread and crosstalk
keep moving those points, so each MZI needs a feedback loop. This RTL is the digital half of
a mixed-signal controller that closes those loops.

Each MZI has two heaters and a photodiode on the output that should go dark. The controller
tells the two heaters apart by dithering both at once with small square waves in quadrature.
It correlates the photodiode samples with each wave. It then integrates each correlation into
that heater's drive, so that each heater runs down the slope of the measured power until the
output reaches its minimum (or its maximum, if configured). The useful signal is the
*derivative* of the light, not the light itself. So the photodiode's dark current, which
equals about −37 dBm of light, does not limit how dark the output can get: with the models in
`tb/` the loop reaches −40 dB of the input power.

The default build controls seven MZIs, i.e. an 8-input diagonal mesh. A diagonal mesh with
N inputs needs N−1 channels. The channel count is a parameter.

## System view

```
            per channel (x N_CH)                                   shared
  photodiode -> TIA + gated integrator -> 10-bit ADC ---+       +--------------------+
      ^        (gain code, 10 switches)  (11 clk/conv)  |       | write register     |
      |                     ^                           v       | 263 bit, serial in |
      |                     |                    +-------------+|  -> configuration  |
   MZI heaters <- 2 x 12-bit DAC <---------------| mzi_channel |<--------------------+
                                                 +-------------+| read register      |
                                                        |       | 259 bit, serial out|
                                                        +------>|  <- channel state  |
                                                                +--------------------+
```

`pic_controller` is the top. It holds `N_CH` copies of `mzi_channel` plus the two shift
registers through which a host configures and observes the chip using four pins. The
following parts are not in the RTL, and their digital signals are ports of the top:
- the photodiode and the transimpedance/gated-integrator front-end;
- the ADC;
- the heater DACs.

Top-level control pins:

| pin | meaning |
|---|---|
| `clk` | 1.1 MHz master clock, also the ADC clock |
| `start` | low: system off. Gain codes are at maximum and integrators are loaded with `Sat_Reset`. |
| `loop_reset` | high: all loops are open. Samples are not integrated, no dither is applied, and manual DAC words may be forced. |
| `adc_data`, `adc_eoc` | ADC word and end-of-conversion pulse of each channel |
| `tia_gain`, `tia_sw`, `gi_reset` | front-end gain code, its ten switch commands, and the gated-integrator discharge pulse |
| `dac_word` | the two 12-bit heater words of each channel |
| `new_in`, `bit_in` | serial configuration input |
| `get_bit`, `read_bit`, `out_bit` | serial monitor output |

## One channel: the signal path

```
adc_data/eoc -> gain_adjust --sample--> integrator[k] -> dith_add[k] -> square_root[k] -> dac_rw[k] -> dac_word[k]
                    |                       ^                ^
                    +-> tia_gain            | demod[k]       | dith_mod[k]
                                   feedback_sign <- demod_delay <- modulator <- clk_div <- reset_delay
```

There is one `gain_adjust`, followed by two identical heater branches (k = 0, 1). Each branch
integrates the same samples but demodulates them with its own dither bit. The blocks are:

- **gain_adjust**: picks one of six transimpedance gains, spaced by a factor 4. It looks at the
  first sample of each dithering period. If the sample's five MSBs are at or above the upper
  threshold, the gain code steps down. If they are at or below the lower threshold, it steps
  up. A sample that causes a step is dropped, and the period restarts with the next sample.
  The 12 samples of a period are therefore always taken at one gain. It also marks the last
  sample of the period (`dith_over`). `tia_switch_decode` turns the code into the ten switch
  commands of the resistor network.
- **integrator**: the demodulator and integral controller (see below).
- **dith_add**: adds or subtracts the dither amplitude `2^Dith_Sel` to or from the 16-bit
  integrator output. It clips the sum and keeps the upper 15 bits as the set point.
- **square_root**: the heater phase grows with power, i.e. with the square of the DAC word.
  Driving the DAC with a square root of the set point makes the phase roughly linear in the
  control variable. The square root is piecewise linear: on each interval
  `4^N <= X < 4^(N+1)`, with `X = set_point * 64`, the output is `X/2^N + 2^(N+1)`. This
  equals `3*sqrt(X)` at both ends of the interval. With `Ctrl_sqrt = 0` the block is bypassed
  and the DAC gets the set point's 12 MSBs.
- **dac_rw**: passes the loop's word. It substitutes the manual word only when the loop is
  open (`loop_reset` high) and that DAC's `Write` bit is set.
- **gi_reset**: discharges the gated integrator after every conversion. The pulse is half a
  clock long: from the falling edge of `eoc` to the next falling clock edge.

## Timing: why the numbers fit together

All timing derives from the ADC, which converts continuously every **11 clocks**.

| quantity | clocks | at 1.1 MHz |
|---|---|---|
| conversion | 11 | 10 µs |
| divider tick (quarter dither period) | 33 = 3 conversions | 30 µs |
| dither half period | 66 = 6 conversions | 60 µs |
| dithering period = integration period | 132 = 12 conversions | 120 µs |

The dither is produced in three stages:

- `clk_div` divides the clock by 33.
- `modulator` steps the 2-bit state `(Dith_Mod(1), Dith_Mod(0))` through the Gray sequence
  `00 → 10 → 11 → 01` on each tick.
- Each bit is thus a 132-clock square wave, and bit 0 lags bit 1 by a quarter period. Over a
  whole period the two waves are orthogonal, so each branch's correlation contains only its
  own heater's slope.

Alignment is what makes this work. Each half-period of the dither must cover exactly six
whole conversions, and the demodulating bit must change exactly when the first sample taken
under the new dither is summed:

- **reset_delay**: when the loop is enabled, it waits for an `eoc` and then counts ten
  falling clock edges before it starts the modulator. A dither step therefore reaches the
  heater (two registers later) at the second clock of a conversion.
- **demod_delay**: delays the dither bits by two conversions, using two flip-flops clocked by
  `eoc`. That matches the latency from heater to summed sample: the conversion itself, plus
  registers in `gain_adjust` and the integrator.
- **feedback_sign**: XNORs the delayed bit with `Feedback_Sign`. With `Feedback_Sign = 0`,
  samples taken on the high half of the dither are subtracted, and the loop descends to a
  minimum. With 1 it climbs to a maximum.

The heater working point moves once per dithering period.

## The integrator word

This is the least obvious part of the design. Each branch keeps a 34-bit signed word:

```
 33   31 30                                    3 2   0
+-------+---------------------------------------+-----+
|  ovf  |        28-bit field                   |guard|
+-------+---------------------------------------+-----+
          [30:15] = Result (16 bits, to dith_add)
```

A 10-bit sample is added (or subtracted, per `demod`) at bit position
`2*(5 - gain) + min(BW_Gain, 11)`. The `2*(5 - gain)` term compensates the front-end gain:
one gain step is a factor 4, i.e. two bit positions. A sample taken at higher gain therefore
counts proportionally less, and the loop gain in units of light is the same in all six
regions. `BW_Gain` scales the loop gain in powers of two; it is clamped at 11 so that the
sample stays inside the field.

After the last sample of a period, two rules apply:

- **Det_Move**: if the word is exactly unchanged over the whole period and the gain is not the
  highest, `Det_Move` is added at the `Result` position. An unchanged word means the dither
  produced no visible change in the ADC samples. That happens on a flat stretch of the
  transfer function, or when the signal is too large for the current range. This rule walks
  the working point out of such stretches. At the highest gain, an unchanged word means the
  loop is at the bottom, so it is left alone.
- **Saturation window**: let the field's five MSBs be `msb5`.
  - If `msb5 >= Sat_th`, or the word overflowed, `Result` is reloaded with `~Sat_Reset`.
  - If `msb5 <= ~Sat_th`, or the word went negative, it is reloaded with `Sat_Reset`.
  - A heater phase range of almost 3π covers more than one fringe. So a loop that runs into
    the end of its range is moved to an equivalent point inside it, instead of sticking at
    the rail.

`Result` (bits [30:15]) is updated only at the end of a period. While `start` is low the word
holds `Sat_Reset` at the `Result` position.

## Host interface

**Write register** (`write_shift_register`, 263 bits). Each rising edge of `new_in` shifts
`bit_in` into bit 0. The bit meant for the MSB is sent first. The register has no reset. It is
meant to be loaded with `loop_reset` high, because its outputs change on every shift. While
the bits pass through, the `Write` positions briefly hold ones, so the DACs take arbitrary
manual words. The front-end gain follows that light. The host should therefore keep
`loop_reset` high for a few dither periods after loading (the testbenches wait 8), so the gain
settles before samples count again. Releasing the loop at once lets the first period integrate
a large transient at low gain. Layout,
defined in `pic_ctrl_pkg`:

| bits | field | width | shared / per channel |
|---|---|---|---|
| [9:0] | Sample th.: `[9:5]` upper, `[4:0]` lower gain threshold | 10 | shared |
| [13:10] | BW_Gain | 4 | shared |
| [29:14] | Det_Move | 16 | shared |
| [34:30] | Sat_th | 5 | shared |
| [50:35] | Sat_Reset | 16 | shared |
| [51] | Ctrl_sqrt (1 = square root on) | 1 | shared |
| [52] | Feedback_Sign (1 = lock to maximum) | 1 | shared |
| 53+30c + [3:0] | Dith_Sel of channel c | 4 | per channel |
| 53+30c + [16:4] | DAC 0: `{Write, DAC_Manual[11:0]}` | 13 | per channel |
| 53+30c + [29:17] | DAC 1: `{Write, DAC_Manual[11:0]}` | 13 | per channel |

**Read register** (`read_shift_register`, 259 bits = 7 × 37):

- While `get_bit` is low, it reloads every clock with each channel's state. Channel c occupies
  bits `37c + [9:0]` (ADC sample), `[12:10]` (gain code), `[24:13]` (DAC 0) and `[36:25]`
  (DAC 1).
- Raising `get_bit` freezes it. Each rising edge of `read_bit` then shifts it towards bit 0,
  and `out_bit` shows bit 0.
- Both pins are synchronised with two flip-flops, so `get_bit` must be held for two clocks
  before reading starts, and each `read_bit` level must last at least two clocks. The snapshot
  is the state at the second clock edge after `get_bit` rises.

## Files

| file | content |
|---|---|
| `rtl/pic_ctrl_pkg.sv` | widths, constants, configuration and monitor structs |
| `rtl/pic_controller.sv` | top: channels and shift registers |
| `rtl/mzi_channel.sv` | one MZI channel |
| `rtl/gain_adjust.sv`, `rtl/tia_switch_decode.sv`, `rtl/gi_reset.sv` | front-end control |
| `rtl/reset_delay.sv`, `rtl/clk_div.sv`, `rtl/modulator.sv`, `rtl/demod_delay.sv`, `rtl/feedback_sign.sv` | modulation timing |
| `rtl/integrator.sv`, `rtl/dith_add.sv`, `rtl/square_root.sv`, `rtl/dac_rw.sv` | heater branch |
| `rtl/write_shift_register.sv`, `rtl/read_shift_register.sv` | host interface |
| `tb/tb_<block>.sv` | self-checking testbench of each block |
| `tb/mzi_plant_model.sv`, `tb/adc10a_model.sv` | behavioural MZI + photodiode + front-end, and ADC |
| `tb/mzi_mesh_stage_model.sv` | one unitary MZI stage of a cascaded mesh, with its drop-port photodiode |
| `tb/tb_mesh_workload.sv` | the full controller tuning an 8-input diagonal mesh |
| `tb/tb_loop_bandwidth.sv` | loop time constant against BW_Gain after a heater-phase step |

Every file opens with a comment that explains its block. It also separates what follows the
reference design from what was chosen here.

## Simulating

Any testbench runs with plain Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb \
    rtl/pic_ctrl_pkg.sv tb/tb_pic_controller.sv --top-module tb_pic_controller
./obj_dir/Vtb_pic_controller
```

Each testbench checks its block against an independent reference and prints
`TB_RESULT checks=N failures=M`. Notes on individual testbenches:

- Most block testbenches are exhaustive or randomised. The square-root testbench covers all
  32768 set points in both modes. The integrator testbench compares every period with a
  64-bit model of the weighted sum, Det_Move and the saturation window.
- `tb_mzi_channel` closes one loop through the plant and ADC models. It checks:
  - the cycle counts: 11 clocks per conversion, 12 samples per period, 66-clock dither
    half-periods in quadrature, one gated-integrator reset per conversion;
  - that the light reaches its minimum, twice: it lands near −40 dB;
  - that with `Feedback_Sign = 1` the light reaches its maximum (99.8 % of the input). Near
    the top, at reduced gain, the dither becomes invisible, so Det_Move has to act there.
- `tb_pic_controller` runs the full seven-channel top at its default size. It takes about
  3 seconds. It:
  - loads the configuration serially;
  - locks five channels, first with a coarse dither and then with finer ones;
  - drives one channel into the bottom of its saturation window, and starves another of
    dither so that Det_Move must act;
  - reads the frozen monitor register out bit by bit;
  - switches the square root off and on.

  Every clock it compares every DAC word with a reference of the mapping. It fails if any
  mechanism (gain up and down, Det_Move, both saturation resets, manual write, square root,
  bypass, readout, lock) never occurred. Add `+trace` to print the loop state as it
  converges.
- `tb_loop_bandwidth` measures the loop speed of one channel with 1 mW in the MZI. It steps
  the heater-0 phase by 40 DAC codes and times how fast the result walks back. Each BW_Gain
  step halves the time constant (measured ratios 1.92, 2.00, 2.00 from BW_Gain 8 to 11). With
  `Dith_Sel` 8, BW_Gain 11 gives a time constant of about 4.5 dither periods, a 0 dB bandwidth
  near 300 Hz. The loop gain is proportional to the dither amplitude and to the light, so
  `Dith_Sel` 9 doubles it, and 10 µW of light makes the loop about 100 times slower.
- `tb_mesh_workload` chains seven MZI stages into an 8-input diagonal mesh. The inputs have
  equal power and different phases. Each channel minimises the drop port of its stage, so all
  the light is combined into the last through port. The unlocked mesh delivers about 42 % of
  the total there. After locking, every drop port is below −36 dB of the total and the output
  holds more than 99 %. It runs in under a minute. Add `+trace` to follow the drop ports.

The behavioural models are simple:
- The MZI has two coherent, equal inputs, two ideal 50/50 couplers, and heater phase
  proportional to the square of the DAC word, reaching 2.88π at full scale.
- The front-end has 0.85 A/W responsivity, 7 dB loss, 150 nA dark current, gains of
  3.5 kΩ·4^g, and a 0.15 V output offset.
- The ADC averages its input over each 11-clock conversion.
- There is no thermal time constant and no noise. Lock results are therefore optimistic
  about noise, but not about timing or quantisation.

## Interpretations and departures

Some points of the reference description are ambiguous or inconsistent. This RTL resolves
them as follows:

- **Integrator width**: 34 bits (3 overflow + 28 + 3 guard). The description also mentions a
  33-bit word.
- **Dith_Sel**: the dither amplitude is `2^Dith_Sel`. The description calls it both
  thermometric and a power of two. The power of two is used.
- **Threshold comparisons**: the gain thresholds and the saturation window are inclusive, so a
  value equal to a threshold triggers.
- **Rejected samples**: a first sample that changes the gain is dropped. Nothing is
  integrated for it.
- **Get_Bit**: the read register freezes while `get_bit` is high. The description uses both
  polarities.
- **gi_reset pulse**: it starts at the falling edge of `eoc` and lasts half a clock. The fixed
  ~10 ns standard-cell delay after it on the chip is not modelled.
- **Unused gain codes**: codes 110 and 111 never occur; they decode like 101.
- **Register layout**: the field order in both shift registers is this design's. Only the
  sizes and the split between shared and per-channel fields are given.
- **Clipping**: `dith_add` clips at the ends of the 16-bit range instead of wrapping.
- **Loop sign**: `Feedback_Sign = 0` locks to a minimum; this follows from the add/subtract
  conventions chosen here.
- **While the loop is open**: `gain_adjust` suppresses `dith_over` while `loop_reset` is
  high, so neither Det_Move nor the saturation window can act during that time.
- **Asynchronous pins**: `get_bit`/`read_bit` are synchronised, while `new_in` clocks the
  write register directly.

Not part of this RTL:
- the analog front-end, the ADC (a vendor cell), the heater DACs and driver, and the
  delay cell;
- any noise or thermal dynamics in the testbench models.

A 15-MZI mesh needs `N_CH = 15`. That gives a 503-bit write register and a 555-bit read
register. The RTL is parameterised for it, but only the seven-channel default has been
simulated.
