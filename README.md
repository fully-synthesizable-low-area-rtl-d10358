# DDPM DAC: a digital-to-analog converter built only from standard cells

This is a Nyquist-rate digital-to-analog converter whose active part is ordinary
synchronous logic: a handful of toggle flip-flops and 2:1 multiplexers. It turns
an N-bit code into a one-bit stream whose time average is exactly
`code / 2^N`; a passive first-order RC low-pass filter outside the logic turns
that stream into a voltage `VDD * code / 2^N`. The modulation used is Dyadic
Digital Pulse Modulation (DDPM). It needs no interpolator and no feedback loop,
and it pushes most of the stream's energy to high frequencies, so a small
on-chip RC filter suffices.

Three properties follow from the way the logic is arranged, and they are the
reason for this design:

* **Graceful degradation.** The timing path of input bit `b[i]` goes through
  `N-i` multiplexers, so the LSB has the longest path and the MSB the shortest.
  If the clock is too fast or the supply too low, timing fails in the LSBs
  first: the converter loses resolution a bit at a time instead of failing in
  the MSB.
* **Power-resolution scaling at run time.** Forcing `h` LSBs to zero and
  sampling every `2^(N-h)` cycles turns the same hardware into an `(N-h)`-bit
  converter at `2^h` times the sample rate. If the clock is divided by `2^h` at
  the same time, you trade resolution for power at a fixed sample rate. If you
  divide the clock but keep `h = 0`, you trade sample rate for power at full
  resolution.
* **Linear cost.** An N-bit converter needs N flip-flops and N multiplexers in
  the modulator.

The reference configuration is 12 bits. With a 225 MHz input clock it gives
54.9 kS/s (225 MHz / 4096).

## The DDPM stream

For a code `D = b[N-1] ... b[0]` the stream has `2^N` bits per conversion:

```
S_0 = (empty)
S_i = { S_(i-1), b[N-i], S_(i-1) }      i = 1 .. N
frame = { S_N, 0 }
```

Every other bit of the frame is `b[N-1]`. Every other bit of what remains is
`b[N-2]`, and so on down to one position for `b[0]`. The last bit is always 0.
Bit `b[i]` therefore occurs `2^i` times, so the frame holds exactly `D` ones.
For example, 4-bit code `1011` gives `1011 1011 1011 1010`.

The ones are spread as evenly as a binary code allows. The frame repeats at the
sample rate, but its strongest spectral lines sit near the clock frequency, not
near the sample rate as in PWM. This is why a first-order filter with a corner
near `f_sample / sqrt(3)` is enough. The reference filter, 400 kOhm and 5 pF
(tau = 2 us), is small enough to integrate.

## From a counter to a chain of multiplexers

Count the cycles of a frame with a binary counter `cnt = 1, 2, ..., 2^N - 1, 0`.
The bit to output in cycle `cnt` is `b[N-1-tz]`, where `tz` is the number of
trailing zeros of `cnt`. Odd counts have `tz = 0` and select the MSB. Counts that
are 2 mod 4 select `b[N-2]`, and so on. The count 0 selects the constant 0.

`ddpm_modulator` builds this as a priority decision taken one bit at a time:

```
             cnt[0]           cnt[1]                    cnt[N-1]
               |                |                          |
 dout <- FF <- MUX --0--------- MUX --0-- ... --0--------- MUX --0-- 1'b0
               |1               |1                         |1
            b[N-1]           b[N-2]                      b[0]
```

The mux next to the output flip-flop passes `b[N-1]` whenever `cnt[0]` is 1.
Otherwise it passes the decision of the next mux, which passes `b[N-2]` whenever
`cnt[1]` is 1, and so on. The last mux chooses between `b[0]` and 0. The counter
is a chain of T flip-flops (`ddpm_tff`). Stage `k` toggles when all earlier
stages are 1, so stage 0 toggles every cycle and stage `k` runs at
`f / 2^(k+1)`.

The arrangement is what gives graceful degradation. A counter stage that launches
the selection of `b[i]` reaches the output flip-flop through `N-i` muxes. The
minimum clock period for bit `i` is therefore
`t_clk-q + (N-i) * t_mux + t_setup`, which grows towards the LSB. A textbook
priority encoder followed by an N:1 mux does the same job, but it gives no such
ordering. When you synthesize, keep the chain as written and do not let the tool
flatten it into a balanced tree. If it does, the logic stays correct but the
graceful-degradation property is gone.

### Sampling and frame timing

The modulator holds the code in a sample register for a whole frame.
`sample_req` is 1 during the last cycle of each frame, when the low `N-h`
counter bits are all 0. The code on `din` is taken at the rising edge that ends
that cycle. The output is registered:

```
edge E0 (sample_req was 1):  code taken, dout <- last bit of previous frame (0)
edge E1 .. E(2^M - 1):       dout <- frame bits 1 .. 2^M - 1
edge E(2^M) = next E0:       dout <- 0 (bit 2^M), next code taken
                             (M = N - h)
```

After reset the counter is 0, so the first code is taken on the first clock
edge.

## Resolution scaling (`h`) and the clock divider (`cfg`)

Suppose a code has its `h` LSBs equal to zero. Its `2^N`-bit frame is then
`2^h` copies of the `2^(N-h)`-bit frame of the code shifted right by `h`. The
modulator uses this directly. With `h` set, it clears the `h` LSBs of the
sampled code and asks for a new code every `2^(N-h)` cycles. The counter and the
mux chain do not change. Codes on `din` are MSB-justified: a 10-bit value goes
in `din[11:2]`.

The counter runs freely, so its low bits are aligned with every possible
sub-frame length only when the whole counter is 0. For that reason a new `h`
takes effect at the next full `2^N`-cycle boundary. Codes sampled before then
keep the old `h`. Values of `h` above `N-1` are read as `N-1`, which gives a
1-bit converter.

`ddpm_clk_div` makes the modulator clock. It is a separate chain of `N-1`
T flip-flops on the input clock, with a multiplexer that selects either the
input clock (`cfg = 0`) or the divided clock `clk_in / 2^cfg`. The selection
changes only on a falling input-clock edge at which the whole divider counter is
0. At that moment the input clock and every divided clock are low, so the switch
cannot produce a short pulse. A new `cfg` is in use (`cfg_active`) within
`2^(N-1)` input cycles.

| operating point | h | cfg | resolution | modulator clock | sample rate |
|---|---|---|---|---|---|
| nominal | 0 | 0 | 12 bit | 225 MHz | 54.9 kS/s |
| clock-scaled (iso-sample-rate) | 2 | 2 | 10 bit | 56.25 MHz | 54.9 kS/s |
| rate-scaled (iso-resolution) | 0 | 2 | 12 bit | 56.25 MHz | 13.7 kS/s |
| any | k | j | 12-k bit | 225 MHz / 2^j | 225 MHz / 2^(12-k+j) |

The RTL does not set the power. In silicon it falls with the clock frequency and
with the shorter frame.

## Input calibration

The output driver does not rise and fall equally fast, so every rising/falling
edge pair in the stream adds a small error. Below mid-scale, each extra LSB adds
an edge pair to the frame. Above mid-scale, each extra LSB removes one. The
transfer curve is therefore two straight lines with a kink at `2^(N-1)`.
`ddpm_input_cal` pre-distorts the code with one gain and one offset per half. A
multiplexer driven by the input MSB chooses the half:

```
dcal = GAIN0 * din + OFF0     din[N-1] = 0
dcal = GAIN1 * din + OFF1     din[N-1] = 1
```

To find the coefficients, measure the uncalibrated curve. Set each gain so that
its half has the target average LSB size (`GAINx = LSB_target / LSB_measured`).
Then set `OFFx = 2^(N-1) * (1 - GAINx)` so that both halves meet at mid-scale.
With those offsets, the code `2^(N-1)` maps to itself from either side.

Number formats (this design's choice):

* Gains are unsigned 16-bit values with 14 fraction bits (`1.0 = 16384`).
* Offsets are signed 29-bit values in the same scale, so one code LSB is
  `16384`.
* The result is rounded half up and clamped to `0 .. 2^N-1`. `cal_sat` reports
  a clamp.

Unity gains and zero offsets make the block transparent. The block is
combinational and sits in front of the modulator's sample register. In many
systems the processor that produces the codes would do this arithmetic instead.

## Top level: `ddpm_dac_top`

`din -> ddpm_input_cal -> ddpm_modulator -> dac_out`. The modulator is clocked
by `mod_clk` from `ddpm_clk_div`.

| port | dir | width | meaning |
|---|---|---|---|
| `clk_in` | in | 1 | input clock, 225 MHz nominal; on chip it comes from a configurable ring oscillator |
| `rst_n` | in | 1 | active-low asynchronous reset |
| `cfg` | in | 4 | clock division exponent, 0..11 |
| `din` | in | 12 | code, `mod_clk` domain, MSB-justified |
| `h` | in | 4 | resolution reduction, 0..11 |
| `gain0`, `gain1` | in | 16 | calibration gains (lower / upper half) |
| `off0`, `off1` | in | 29 | calibration offsets, signed |
| `cfg_active` | out | 4 | division exponent in use |
| `mod_clk` | out | 1 | modulator clock, for the code source |
| `sample_req` | out | 1 | the code is taken at the next rising `mod_clk` edge |
| `cal_sat` | out | 1 | the calibrated code was clamped |
| `dac_out` | out | 1 | DDPM stream to the output driver and the RC filter |

To drive the top from a code source:

1. On a falling edge of `mod_clk` at which `sample_req` is 1, put the next code
   (and `h`) on the inputs.
2. Hold them until that condition comes round again.

`cfg` may change at any time.

These parts are not logic and are not in the RTL:

* the ring oscillator that makes `clk_in`;
* the output driver;
* the RC filter (400 kOhm poly resistor and 5 pF MIM capacitor).

`tb/rc_filter_model.sv` is an exact event-driven model of the filter, for
simulation only. By default it assumes an ideal driver. Its `T_RISE_NS` and
`T_FALL_NS` parameters give rising and falling edges different delays. This
reproduces the dual-slope error that the calibration corrects.

Parameters: `N` (12), `STAGES` (`N-1`), `GW`/`GF` (16/14), and derived widths.
Every module works for other `N`. The modulator testbench also runs a 4-bit
instance.

## Verification

Every testbench checks itself and ends with a `TB_RESULT checks=... failures=...`
line.

| testbench | what it checks |
|---|---|
| `tb_ddpm_modulator` | 12-bit frames compared bit by bit with the recursive definition, for edge-case, random and reduced-resolution codes; ones per frame equal the code; `sample_req` period `2^(N-h)`; `h` applied only at full-frame boundaries; a 4-bit instance against literal strings (`1011 -> 1011101110111010`, and `101`, `10`, `1` at h = 1, 2, 3) |
| `tb_ddpm_clk_div` | every division 0..11 and an out-of-range value: exact output period, edge count, switch latency, and no high or low phase shorter than half a period of the faster of the clocks selected before and after a switch |
| `tb_ddpm_input_cal` | all 4096 codes for identity, mid-scale-continuous and saturating coefficient sets against a floating-point reference |
| `tb_ddpm_dac_top` | end to end at the default parameters with the RC model: frame length, sample period in input-clock time, ones per frame against the calibrated code, and the mean filtered voltage within half a 12-bit LSB after settling. Covers nominal, calibrated (both halves, clamping), clock-scaled, rate-scaled and 1-bit operation, and fails if any of these mechanisms never occurred |
| `tb_ddpm_sine_workload` | full-swing sines through the whole converter and filter, 3 ms per operating point; the frame-mean output is fitted with a sine to get the SNDR; every frame's length and number of ones are checked too |
| `tb_ddpm_cal_flow` | the calibration procedure with a driver whose falling edges lag its rising edges by 10 ps: measure mid- and full-scale, compute the gains and offsets, and compare the integral nonlinearity before (2.1 LSB) and after (0.44 LSB) calibration |

Sine results with ideal logic, where only quantization limits the result:

| operating point | SNDR | ENOB |
|---|---|---|
| 12 bit, 1 kHz | 73.7 dB | 11.9 |
| 12 bit, 20.3 kHz | 72.0 dB | 11.7 |
| 10 bit clock-scaled | 62.0 dB | 10.0 |
| 12 bit rate-scaled | 73.3 dB | 11.9 |

These numbers are upper bounds. Silicon adds the driver-edge error and jitter.
Graceful degradation depends on gate delays, so the RTL simulation cannot show
it. The simulation only shows the path ordering that produces it.

Running a testbench with Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    rtl/ddpm_pkg.sv tb/tb_ddpm_dac_top.sv --top-module tb_ddpm_dac_top
./obj_dir/Vtb_ddpm_dac_top
```

Replace the testbench name to run the others. Each takes a few seconds.

## Design choices not fixed by the published architecture

* The T-flip-flop chain is a synchronous counter (each stage enabled by the AND
  of the earlier ones), not a ripple chain. A ripple chain would add clock-to-Q
  delays along the chain.
* The sample register, the `sample_req` handshake, and applying `h` at
  full-frame boundaries.
* The clock divider is a separate T-flip-flop chain, with the `cfg` encoding
  (0 = undivided) and the glitch-free switching rule described above. The
  published measurements use division by 4. The range here goes to
  `2^(N-1)` so that it matches `h`.
* The calibration number formats, rounding and clamping, and placing the
  calibration inside the top rather than in the code source. At exactly
  mid-scale the MSB-driven multiplexer selects the upper coefficients. With
  continuous offsets this gives the same value as the lower ones.
* Asynchronous active-low reset everywhere. Deassert `rst_n` synchronously to
  `clk_in`.

## Files

* `rtl/ddpm_pkg.sv`: shared constants.
* `rtl/ddpm_tff.sv`: T flip-flop.
* `rtl/ddpm_modulator.sv`: DDPM modulator.
* `rtl/ddpm_clk_div.sv`: clock divider and selector.
* `rtl/ddpm_input_cal.sv`: two-region calibration.
* `rtl/ddpm_dac_top.sv`: top level.
* `tb/`: the testbenches above and `rc_filter_model.sv`.
