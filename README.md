# Self-calibrated delay-line temperature sensor

A chip that needs many thermal sensors cannot afford a bandgap sensor at every
hot spot. A string of ordinary logic cells can do the job instead: cell delay
grows with temperature, so a ring oscillator built from a delay line slows down
as the die warms up. Counting how far the oscillator gets in a fixed time gives
a digital code for temperature. Two problems remain. Counting needs a fast
counter, which costs power. And the code also depends on process, so every
sensor on every die reads differently.

This RTL implements the architecture of *A Low Power All-digital
Self-calibrated Temperature Sensor using 65nm FPGAs*, which answers both
problems:

* **Hybrid counter / pulse-position decoder.** A short counter counts whole
  oscillation periods (the MSBs). A decoder reads where in the line the edge
  had got to when the oscillator stopped (the N LSBs). The ring only has to
  run for a short time, so the counter toggles little and the sensor uses
  little power.
* **Eight resets per sample.** The ring is restarted eight times per sample
  and the eight results are added. Short runs collect less jitter than one
  long run.
* **Continuous self-calibration.** One shared circuit removes each sensor's
  process spread at start-up. It then converts codes to temperature and fixes
  the gain and offset against one accurate reference sensor. It takes a
  second calibration point by itself once the chip has warmed up far enough.

The top, `temp_sensor_chip`, holds a short sensor (N = 2) and a long sensor
(N = 5). Both feed one calibration circuit, and the long sensor is the one
calibrated against the reference.

## How one sensor forms its code

```
            run ──┐
                  ▼
   ┌──────────► gate ──► cell 0 ──► cell 1 ──► ... ──► cell K-1 ──┬──► osc
   │                        │          │                  │       │
   └────────────────────────┼──────────┼──────────────────┼───────┘
                            ▼          ▼                  ▼
                         taps ──► latch & decoder ──► pos (N bits)
                 osc ──► (M-N)-bit counter ──► count
```

* `ring_oscillator` has K = 2^(N-1) delay cells in a loop, closed through a
  gate that also takes `run` (the line's reset). While `run` is 0 every cell
  holds 1. When `run` rises, a falling edge runs down the line. When it
  reaches the end it comes back as a rising edge. One period is therefore
  2K cell delays, and the line passes through exactly 2K = 2^N states per
  period.
* `pulse_position_decoder` latches the taps on the clock edge where `run`
  falls, and turns them into the position within the period:
  * First half period (last tap still 1): the position is the number of
    zeros.
  * Second half (last tap 0): the position is K plus the number of ones.

  Counting, rather than looking for the one transition, tolerates a single
  bubble.
* `coarse_counter` is clocked by the last tap. It counts one per period while
  `run` is high. It is cleared only at the start of a sample, so it adds up
  the periods of all eight runs.
* `temp_sensor` adds the eight decoded positions and forms

  `D = count · 2^N + Σ pos  (mod 2^M)`

  If the sum of positions stays below 2^N, this is just `{count, pos}`. For
  example, with M = 9 and N = 5, count `1001` and position `01011` give code
  `100101011`.

Each run lets `floor(T_run / d)` cell delays elapse, where `d` is the cell
delay. A noise-free sensor therefore reads `D = 8 · floor(T_run / d)`. The
code falls as temperature rises. With noise, the eight runs round differently
and their sum resolves fractions of a cell delay. This is the averaging the
eight resets buy.

## Timing of a sample (`sense_timing`)

One sample is taken every `PERIOD_CYCLES` clocks. The default is 2,000,000
cycles, i.e. 40 ms or 25 samples per second at the assumed 50 MHz clock. The
sample window is:

| cycles | action |
|---|---|
| 1 | `clr`: clear counter and position sum |
| 8 × (`RUN_CYCLES` + `GAP_CYCLES`) | `run` high for `RUN_CYCLES`. `capture` in its last cycle, so the taps are latched on the edge that stops the ring. Then a gap: `accumulate` in its first cycle, then the line settles back to all ones. |
| 1 | `done`; the sensor's `d_valid` follows one cycle later |

With the defaults (8-cycle run = 160 ns, 4-cycle gap), the window is 98
cycles and the ring is idle for the rest of the 40 ms. `run` and `clr` come
straight from flip-flops, because they reach the oscillator and an
asynchronous clear.

## Continuous self-calibration (`self_calibration`)

The method models a cell delay as a product: a temperature-only factor times
a process-only factor. Dividing a sensor's code by its own code at a known
temperature then cancels the process factor. The circuit works in three
steps. It shares one multiplier and one divider between all sensors, one
sensor after another.

1. **Process removal (start-up).** All sensors are assumed to be at the same
   temperature at start-up. The first complete set of codes `D_i(Tc)` gives
   each sensor a correction factor:

   `Nc_i = C(Tc) / D_i(Tc)`

   `C(Tc)` = `CAL_CODE` (2048) is a stored target. From then on every code is
   normalised, `C_i = D_i · Nc_i`, so all sensors give the same code at
   start-up.
2. **Code to temperature.**

   `H_i = (OFFSET − C_i) / GS`

   * GS is the gain in codes per °C. It is positive, because codes fall with
     temperature.
   * OFFSET is the code at 0 °C.
   * H is in units of 0.125 °C, the same as the reference sensor.

   Before the second point is taken, the presets `GS_INIT` and
   `OFFSET_INIT` are used.
3. **Two-point calibration against the reference.**
   * At the first round, store the reference sensor's code `C(T1)` and the
     reference reading `R(T1)`.
   * At every later round, once `R(Tx) − R(T1) > DIFF`, take the second
     point and compute:

     `GS' = GR · (C(T1) − C(T2)) / (R(T2) − R(T1))`

     `OFFSET' = C(T1) + GS' · T1`, with `T1 = R(T1) / GR`

     GR is the reference's codes per °C (8).
   * `GS'` and `OFFSET'` then replace the presets for **all** sensors.
   * `H(T1) = T1` and `H(T2) ≈ T2` hold for the calibrated sensor by
     construction. The other sensors inherit the result because step 1 made
     their codes match.

Fixed-point formats (all in `ts_pkg`):

| quantity | format |
|---|---|
| Nc | unsigned, 20 bits, 12 fraction bits |
| C | unsigned, 12 bits, integer |
| GS | unsigned Q8.8 (codes/°C) |
| OFFSET | signed, 24 bits, 8 fraction bits |
| R | signed 12 bits, 0.125 °C |
| H | signed 16 bits, 0.125 °C, rounded toward zero |

All results saturate instead of wrapping.

**Sign convention.** The published flow of this calibration is not
consistent in sign. Some steps write `OFFSET − C` and `C(T1) + GS'·T1`.
Others write `C − OFFSET` and `C(T2) − C(T1)`. This RTL uses the convention
above throughout: GS is positive and codes fall with temperature. Under that
convention, H is exactly T at both calibration points.

**When the second point is taken.** The test compares the reference
readings, as in the published flow, and DIFF counts reference codes. The
published text instead speaks of the sensor's code falling by DIFF. The
second point is taken once. If the calibrated sensor's code has not fallen
by then, the presets stay in use and the test is repeated at the next round.

**Handshake and latency.**
* `d_code`/`d_valid` from each sensor and `r_code`/`r_valid` from the
  reference are latched whenever they arrive.
* A round starts when every sensor has delivered a new code and at least one
  reference reading has been seen.
* The round ends with one `out_valid` pulse and all `c_code`/`temp` outputs
  updated together.
* The divider produces one quotient bit per cycle, 32 cycles per quotient. A
  round therefore takes about (sensors + 1) × 35 cycles. The first round
  adds one division per sensor, and the round that takes the second point
  adds one more.

## The chip (`temp_sensor_chip`)

| port | meaning |
|---|---|
| `clk`, `rst_n` | system clock (50 MHz assumed), asynchronous active-low reset |
| `cell_delay_ps[1:0]` | modelled cell delay of the short (0) and long (1) sensor, in ps; it stands for the die temperature and the process corner |
| `r_code`, `r_valid` | reading of the off-chip accurate sensor, signed, 0.125 °C per code |
| `d_code`, `d_valid`, `sample` | raw 9-bit codes, their strobes, sample windows |
| `c_code`, `temp`, `out_valid` | normalised codes and temperatures (0.125 °C), updated together |
| `nc_ready`, `point1_taken`, `calibrated`, `gain`, `offset` | calibration state |

Parameters: `RUN_CYCLES`, `GAP_CYCLES`, `PERIOD_CYCLES` and `DIFF`, plus
`JITTER_PS`. `JITTER_PS` adds uniform random noise of ±`JITTER_PS` to every
cell transition of the oscillator model; the default is 0.

## What comes from the published design and what is chosen here

| item | value | origin |
|---|---|---|
| code split: counter MSBs, decoder LSBs | M − N / N | published |
| N of the long / short sensor | 5 / 2 | published |
| code width M | 9 | published, but only as the example of the timing diagram; the prototype's own M is not given |
| resets per sample | 8 | published |
| sample rate | 25 /s | published |
| calibration method and formulas | as above | published, signs made consistent |
| sensors sharing one calibration circuit | 4 (`NUM_SENSORS` default) | published chip layout |
| cells per line | 2^(N-1), 16 LUT-sized delays each (2 × 16 = 32 and 16 × 16 = 256, the published ring sizes) | chosen |
| clock, run and gap length | 50 MHz, 160 ns, 80 ns | chosen |
| C(Tc), GS and OFFSET presets | 2048, 12.25 codes/°C, 2354.25 | chosen from the published resolution of 0.36 °C per code (about 0.6 %/°C) |
| DIFF | 160 reference codes = 20 °C | chosen; the published bound is "smaller than 30" |
| reference sensor gain GR | 8 codes/°C | from the published 0.125 °C reference resolution |
| calibrated sensor | the long one | chosen |
| divider, formats, handshake | as above | chosen |

## Limits and departures

* **The oscillator is a behavioural model.** A ring is a combinational loop
  with real delays, so it is modelled with `#` delays. In an FPGA it is a
  chain of LUTs kept from optimisation. In an ASIC it is a chain of standard
  cells. The rest of the design is synthesizable.
* **Clock-domain crossings.** The taps are sampled once, without a
  synchronizer, like the latch they replace. The counter is read only while
  the ring is stopped, so its value is stable when read.
* **Code width.** M = 9 limits a sample to 512 phases. Without noise the
  eight runs are identical and the code moves in steps of 8, which is several
  °C. With realistic jitter the eight runs dither, and after calibration the error over a
  20 to 75 °C sweep is typically 1 to 2.5 °C, and at most 3 °C in the runs
  made. For finer resolution, raise
  M and `RUN_CYCLES` together.
* **Calibration speed.** The published minimum conversion time of 227 ns is
  not met: one round takes about 2 µs at 50 MHz. This is still far inside the
  40 ms sample period. A radix-4 or parallel divider would close the gap.
* **Left out.**
  * The counter-only sensors placed on the same chip for comparison are not
    part of the top.
  * The accurate reference sensor is an off-chip part. Its reading is a port.
  * The serial interface of the reference part is not modelled.

## Simulating

Every testbench is self-checking. Each prints `TB_RESULT checks=N failures=F`
and stops itself, or is stopped by a watchdog. With Verilator 5:

```
verilator --binary --timing --assert --top-module tb_temp_sensor_chip \
    rtl/ts_pkg.sv rtl/*.sv tb/tb_temp_sensor_chip.sv
./obj_dir/Vtb_temp_sensor_chip
```

(`ts_pkg.sv` must come first.)

| testbench | what it checks |
|---|---|
| `tb_ring_oscillator` | period = 2·cells·delay, thermometer taps, return to all ones |
| `tb_pulse_position_decoder` | every line state of a 16-cell and a 2-cell line, latch hold |
| `tb_coarse_counter` | counting only while `run` is high, clear, wrap |
| `tb_sense_timing` | 8 runs, capture and accumulate placement, one clear and one done, exact period |
| `tb_temp_sensor` | codes of both sensors against `8·floor(T_run/d)`, including wrap, and the sample period |
| `tb_self_calibration` | four sensors through a sweep against a bit-exact model of the formulas, accuracy after calibration, no early start, latency |
| `tb_temp_sensor_chip` | end-to-end sweep with jitter: codes near ideal, calibration bit-exact, ±3 °C after calibration, and every mechanism seen (8 resets, decoder carry, Nc, first point, rounds below DIFF, second point) |
| `tb_sweep_workload` | the published measurement sweep, 20 to 75 °C in 5 °C steps, on three chips (six sensors in different process corners), with noise; prints the largest calibrated error per chip (typically 1 to 2.5 °C) and requires every calibrated reading within 4 °C |
| `tb_temp_sensor_chip_full` | the chip at its default parameters (40 ms samples) through start-up, second point and a calibrated reading; exact codes and 40 ms spacing (about 7 s of run time) |

The environment model in the testbenches is

`d(T) = 3000 ps · g / (1 − 0.006 · (T − 25))`

where g is a per-sensor process factor. The oscillator frequency therefore
falls linearly by 0.6 % per °C.
