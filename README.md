# CEL: calibration electronics for rf cavity set values

An rf cavity in a synchrotron is driven through a chain of low-level rf components and cables. The
closed amplitude and phase loops around the cavity do not remove every error in that chain. The
response of the chain depends on the operating frequency, and for amplitude also on the
modulation level. A calibration electronic (CEL) sits in the set-value path and removes this
error. It measures or receives the set value, looks up a correction in a **3D characteristic map**
z(frequency, amplitude), applies it in floating point, and sends the corrected value on. The
correction is either a factor or an offset. The map is measured once per cavity and loaded into
the module. One module serves one quantity. An amplitude module uses a map that depends on both
frequency and amplitude. A phase module uses a map that depends on frequency only, and adds its
correction.

This repository holds synthesizable SystemVerilog for the FPGA part of such a module:

- the multirate filtering around the converters;
- the self-calibration of the ADC and DAC;
- the conversions between fixed point, floating point and SI units;
- the Manchester-coded optical links;
- the characteristic-map subsystem with its bisection searches and interpolation;
- the correction unit.

The converters, the analogue selector, the optical transceivers and the board RAM are external
parts. They are not included; their signals are ports of `cel_top`.

## Signal flow

```
            14b        16b           16b           f32          f32 [V]
adc_data ─► CIC dec ─► ADC cal ─────► fix→float ──► ×10/32768 ──┬──────────────► y ┐
           (÷400)     GCC·x+OCC                                  │                  │
                          ▲                                      │   char. map      │
                          │ constants                            │   z(x,y) ◄───────┘
                    cal_sequencer ──► cal_sel (selector)          │      ▲ x [Hz]
                          │ DAC test codes                       ▼      │
opt_rx ─► Manchester ─► 32b word ─► fix→float ─► ×200e6/2^32 ─► hold ───┘
          decoder                                                │
                                                  FPU: a·z or a+z ◄┘
                                                        │ f32 [V] = out_value
                ┌───────────────────────────────────────┴──────────────┐
                ▼                                                      ▼
     float→fix (×3276.8, 16b) ─► DAC cal ─► CIC int (×400) ─► dac_data   float→fix (×2^31/10, 32b)
                                   GCC·x+OCC                 14b           ─► Manchester encoder ─► opt_tx
```

The ADC and the DAC run at the 100 MHz system clock. Everything between the two CIC filters runs
at 250 kHz: each decimator output strobe (`raw_v` inside `cel_top`) starts one sample through the
chain. The slow part uses a clock enable, not a second clock. The useful band is DC to 100 kHz,
so 250 kHz is above the Nyquist rate. At 400 clocks per sample, the floating-point and map logic
is sequential or lightly pipelined and still has a lot of time left. The interpolator takes a new value on the same decimator strobe, so input and
output rates match exactly.

## Number formats and scaling

| Where | Format | Scale |
|---|---|---|
| ADC / DAC pins | 14-bit two's complement | ±8192 ↔ ±10 V |
| between CIC and float converters | 16-bit two's complement | ±32768 ↔ ±10 V |
| calibration constants | GCC signed Q2.14 (16384 = 1.0); OCC in data LSBs | |
| processing | IEEE 754 single precision in SI units | volts, hertz |
| optical input word | 32-bit unsigned | LSB = 200 MHz / 2^32 ≈ 46.6 mHz |
| optical output word | 32-bit signed | ±2^31 ↔ ±10 V |
| optical frame | start bit `0` + 8-bit header + 32-bit payload, MSB first | |

The floating-point functions are in `cel_pkg`. They are combinational, and the modules register
their results. Their handling is reduced to what this datapath needs:

- subnormals are flushed to zero;
- NaN and infinity inputs are not treated specially;
- overflow gives infinity;
- rounding is to nearest even;
- float→integer rounds half away from zero and saturates.

## The characteristic map

This is the most involved part: `characteristic_map` and the modules below it.

**Storage.** `cm_ram` holds every node of an NX × NY map (default 32 × 32) as 32-bit floats:

| Addresses | Contents |
|---|---|
| `0 .. NX-1` | x nodes (frequency, ascending) |
| `NX .. NX+NY-1` | y nodes (voltage, ascending) |
| `NX+NY + iy·NX + ix` | z nodes |

The axes do not have to be equidistant. The RAM is written through the `cfg_*` port of the top,
which stands in for the configuration access (JTAG in the original module).

**Load.** A pulse on `cm_load` makes the control unit (`cm_control`) copy the x nodes into one fast
RAM and the y nodes into another (`cm_axis_ram`, one word per clock, NX+NY+1 clocks).
`cm_ready` rises when the copy is done. Each axis has a RAM of its own, so the two searches never
compete for a memory port. The fast RAMs read asynchronously, with three ports each: one for the
search and two for the ends of the found interval.

**Search.** `cm_axis_search` finds the largest i with node[i] ≤ value by bisection. It builds i one
bit at a time from the MSB: it probes `i | 2^b` and keeps the bit if that node is ≤ the value.

- There is one probe per clock, so the result is ready exactly log2(N) clocks after start (5 for
  32 nodes), whatever the value.
- A value below the first node gives 0. A value at or above the last node gives N−2. The lookup
  therefore never leaves the map, and values outside it are clamped, not extrapolated.
- The float comparison works on the bit pattern: negative numbers are inverted and positive ones
  get the sign bit set, and the results are compared as unsigned integers.
- N must be a power of two.

Both searches start in the same clock.

**Fetch.** The control unit then reads the four nodes z(ix,iy), z(ix+1,iy), z(ix,iy+1) and
z(ix+1,iy+1) from `cm_ram`. That is one read per clock with a one-clock read latency.

**Interpolation.** `cm_interp` uses one shared floating-point unit (add, subtract, multiply or
divide), one operation per clock, in a fixed sequence:

```
tx = clamp((x−x0)/(x1−x0), 0, 1)        ty = clamp((y−y0)/(y1−y0), 0, 1)
method 1 (bilinear):  z0 = z00 + tx·(z10−z00);  z1 = z01 + tx·(z11−z01);  z = z0 + ty·(z1−z0)
method 0 (nearest):   z = z[tx ≥ ½][ty ≥ ½]
```

**Timing.** For a 32 × 32 map, `start` to `done` is always 5 + 7 + 16 = **28 clocks** (bilinear)
or 5 + 7 + 7 = **19 clocks** (nearest). That is 0.28 µs at 100 MHz, against a 4 µs sample period.

## Converter self-calibration

`lin_cal` applies `out = GCC·in + OCC` to the 16-bit stream in two pipeline stages. It is used
twice: behind the decimator (ADC) and in front of the interpolator (DAC). `cal_sequencer` finds
the four constants. It runs after reset (power-up calibration) and on every `online_cal_req`
pulse (online calibration), in these steps:

| Step | Selector (`cal_sel`) | Measured stream | Target |
|---|---|---|---|
| 1 | ground | uncalibrated ADC | 0 |
| 2 | 5 V reference | uncalibrated ADC | code 16384 |
| 3 | DAC loop-back, DAC forced to −16384 | calibrated ADC | −16384 |
| 4 | DAC loop-back, DAC forced to +16384 | calibrated ADC | +16384 |

For each pair of steps the constants follow from two points:

    GCC = (target_hi − target_lo) / (meas_hi − meas_lo)       (Q2.14, saturated)
    OCC = target_lo − GCC·meas_lo

For the DAC the roles are reversed. The constants pre-distort a requested code so that the
calibrated ADC reads it back unchanged. This calibrates the DAC against the ADC, which was just
calibrated against ground and the reference.

In each step the first `SETTLE` = 6 decimated samples are thrown away, which covers the CIC and
calibration latency. The next 2^`AVG_LOG2` = 4 are averaged. One full calibration takes about
40 decimated samples, roughly 0.17 ms. During steps 3 and 4 the interpolator receives the test
code instead of the corrected signal. `cal_busy` is high for the whole calibration.

## Multirate filters

Both filters are third-order CIC filters with a ratio of 400 and a differential delay of 1.

**Decimator** (`cic_decimator`):

- Integrators run on every ADC sample. The combs run once per 400 samples.
- The CIC gain 400³ is removed by a constant multiply (GMUL / 2^GSH, computed from R and N at
  elaboration), rounded and saturated.
- The result is scaled so that a DC code d gives 4·d. This is the growth from 14 to 16 bits. The
  small residual gain error is removed by the ADC calibration.
- Output is 3 clocks after the 400th input.

**Interpolator** (`cic_interpolator`):

- It zero-stuffs: the comb result enters the integrators once per input and zeros enter on all
  other clocks.
- The output therefore changes every clock and follows steps smoothly and monotonically.
- The gain 400² is cancelled so that code d becomes d/4 (16 to 14 bits).

Group delay is about 600 clocks per filter. In the top-level test, an input step reached half
height at the DAC output after 1,600 clocks, which is 16 µs at 100 MHz.

Neither filter compensates for droop. A third-order CIC filter with R = 400 attenuates a 100 kHz
component by a factor of 0.43 (−7.3 dB), and the signal passes through two of them.
`tb_cel_bandwidth` measured the gain from ADC input to DAC output:

| Frequency | 5 kHz | 25 kHz | 50 kHz | 100 kHz |
|---|---|---|---|---|
| Gain | 0.996 | 0.906 | 0.670 | 0.188 |

The −3 dB point is therefore near 47 kHz. The 100 kHz band is sampled correctly but is not flat.
If it must be flat, you need a droop-compensation filter at the 250 kHz rate, or filters of lower
order. This design has neither.

## Optical links

Both links use IEEE 802.3 Manchester coding: a `0` is high-then-low and a `1` is low-then-high.
Each half bit lasts `CLKS_PER_HALF` clocks (default 4, so 12.5 Mbit/s at 100 MHz). The line idles
low. A frame is a start bit `0` followed by 40 bits, MSB first.

- **Transmitter** (`manchester_encoder`): holds the line low for one extra bit period after each
  frame, so the next start bit always begins with a clean rising edge. A frame plus its gap takes
  336 clocks, which fits within a 400-clock sample.
- **Receiver** (`manchester_decoder`): synchronises the line with two flip-flops. It starts on a
  rising edge in idle and samples the middle of each half bit. It flags `code_err` if the two
  halves of a bit are equal or the start bit is wrong.
- The receiver has no clock recovery. It assumes that both ends run from clocks of the same
  frequency.
- A received frame with an error is ignored, and the last good frequency stays in use.

## Top level (`cel_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | 100 MHz clock; asynchronous active-low reset, which starts the power-up calibration |
| `adc_data` / `dac_data` | in / out | 14 | converter samples, one per clock |
| `cal_sel` | out | 2 | selector: 0 signal, 1 ground, 2 reference, 3 DAC loop-back |
| `opt_rx` / `opt_tx` | in / out | 1 | Manchester lines |
| `cfg_we`, `cfg_addr`, `cfg_wdata` | in | 1, 11, 32 | map RAM write port |
| `cm_load` | in | 1 | copy axes into the search RAMs |
| `fpu_mode` | in | 1 | 1: out = a·z, 0: out = a + z |
| `interp_method` | in | 1 | 1 bilinear, 0 nearest node |
| `online_cal_req` | in | 1 | start an online calibration |
| `cal_busy`, `cm_ready`, `rx_err` | out | 1 | status |
| `out_valid`, `out_value` | out | 1, 32 | corrected value (float, volts), once per sample |

**Sample flow.**

- A voltage sample starts a map lookup at (latest frequency, voltage) if the map is ready.
  Otherwise the sample is not corrected and produces no output.
- From the decimator strobe to `out_valid` takes about 45 clocks.
- The FPU is a multiplier followed by an adder. In multiply mode the adder adds 0; in add mode the
  multiplier multiplies by 1.

**Parameters.** `R`, `NX`, `NY`, `CLKS_PER_HALF`, `SETTLE`, `AVG_LOG2` and `TX_HEADER`.
`NX` and `NY` must be powers of two.

## What follows the original CEL and what is this design's own

**Taken from the CEL:**

- the chain of blocks and its bus widths (14/16/32 bit, 40-bit Manchester frames);
- the 100 MHz and 250 kHz rates, the ±10 V range and the 200 MHz / 47 mHz frequency word;
- the calibration equation and its 16-bit pipelined arithmetic;
- the switched ground, reference and DAC loop-back used for calibration;
- IEEE 754 single precision in SI units;
- the multiply-or-add correction;
- the map with its control unit, one fast RAM and one bisection search per axis, the log2(N)
  search time, and interpolation from four nodes with a choice of methods.

**Chosen here**, where the original leaves the point open:

- the CIC order (3) and the gain correction;
- the Q2.14 constant format, the reference voltage (5 V), the calibration order, the test codes
  and the averaging;
- the frame layout, line-code polarity, bit rate and start bit;
- the scale of the optical output word;
- the map size (32 × 32) and the memory layout;
- the two interpolation methods offered, and the clamping at the map edges;
- the floating-point corner-case handling;
- the sample-drop rule.

**Left out:** the analogue parts, the converters and transceivers, the JTAG access (replaced by a
plain write port), the board-level bus between library modules and the backplane link to the
control system. The original keeps the map in a RAM chip on the converter board; here it is an
on-chip array with the same role.

## Verification

Every module has a self-checking testbench `tb/tb_<module>.sv`, which prints
`TB_RESULT checks=N failures=M`. The reference values are computed independently in the
testbenches. `tb/tb_f32_pkg.sv` converts between float bit patterns and doubles through
`$realtobits`, so the floating-point tests do not reuse the design's functions.

`tb_cel_top` runs the whole design at its default sizes, in about 6 s of simulation, with these
models:

- an ADC with 3 % gain error and 50 mV offset;
- a DAC with −3 % gain error and −30 mV offset;
- a selector.

In the test it:

- calibrates at power-up, loads a map and receives two frequencies;
- checks the corrected value in all four mode and method combinations, and the DAC output voltage
  and the transmitted optical word against it;
- rejects a corrupted frame;
- drifts the converters, recalibrates online and checks again;
- measures the output rate (one value per 400 clocks) and the step delay (1,600 clocks, against
  a 6,000-clock limit);
- counts that each mechanism occurred.

The observed error of the corrected value is about 2 mV or less.

Run a testbench with plain verilator (any of the testbenches; `tb_cel_top` shown):

```
verilator --binary --timing --assert -y rtl -y tb rtl/cel_pkg.sv tb/tb_f32_pkg.sv \
          tb/tb_cel_top.sv --top-module tb_cel_top
./obj_dir/Vtb_cel_top
```

Lint a module with `verilator --lint-only -Wall -y rtl rtl/cel_pkg.sv rtl/<module>.sv`. The
remaining lint warnings are unused bits (for example the upper bits of the 64-bit conversion
result, and busy flags that the map does not need).

**Not verified:**

- behaviour on real converters;
- clock drift between the optical link partners;
- timing closure of the combinational floating-point functions at 100 MHz. The divider in
  `cm_interp` is the longest path. It may need pipelining, which the 400-clock sample period
  easily allows.
