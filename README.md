# FPGA ultrasonic range finder

This design measures distance by timing an ultrasonic echo. It does the
timing in FPGA logic, not in a microcontroller's timer interrupts. The FPGA
sends a short burst of 40 kHz square waves to a transmitting transducer and
starts counting. It then listens to the digitised output of a receiving
transducer. Only a signal that repeats at 40 kHz counts as the echo: the
logic measures the period of every received cycle and ignores anything
outside a narrow window around 25 µs. When the echo is accepted, the count
becomes a distance in centimetres. The distance is shown on three
seven-segment digits, and measurements repeat continuously.

Everything runs from one 48 MHz clock, and the timing is exact to one clock
(21 ns). The distance resolution is set by the counting rate: one 40 kHz
period is 0.425 cm of target distance.

The structure follows a published FPGA ranging system. That system is built
from a timing generator, a waveform generator, a high-speed counter, an echo
identification module with a frequency gate and a three-process state
machine, and a binary-to-digit display stage. Where that description gives no
number or mechanism, this design makes its own choice. Each choice is listed
under "Design choices" below.

## One measurement, step by step

With all parameters at their defaults:

| phase | what happens | duration |
|---|---|---|
| fire | `trig` carries 8 periods of 40 kHz at 50 % duty. The counter starts on the first rising edge. The echo gate is blanked. | 200 µs |
| listen | The counter counts 40 kHz periods. The echo gate watches `echo`. | until the echo is accepted, at most 2353 periods (58.8 ms, a 10 m target) |
| latch | The count is converted to centimetres and stored on `distance`. `update` pulses. | 1 clock |
| hold | The design waits for reverberation to die down. | 400 periods (10 ms) |

`distance` changes only when a measurement ends. Between updates it holds
the last result, so the display never shows the counter while it is running.
If no echo arrives within the 10 m range, `distance` becomes all ones
(`24'hFFFFFF`). The display then shows 999 and lights `over`.

## The frequency gate (echo identification)

This part decides what is an echo and what is not, so it sets how reliable
the whole range finder is.

`echo` is asynchronous. It first passes through two synchronising flip-flops,
then a third flip-flop used to detect rising edges. A counter measures the
number of clocks between consecutive rising edges, saturating at twice the
nominal period. At each rising edge the block:

1. takes the measured period `P` (nominal `NOM = CLK_HZ/TONE_HZ = 1200`
   clocks);
2. computes the deviation `|P - NOM|`;
3. if the deviation is **strictly less than** `GATE_CLKS` (120 clocks, which
   is ±10 %, i.e. 36.4 kHz to 44.4 kHz), counts the period as in the gate;
   otherwise counts it as interference (`rejected` pulses) and clears the run;
4. after `MIN_PERIODS` (4) in-gate periods in a row, pulses `found`.

So a signal is accepted after five rising edges, i.e. four whole periods. The
pieces below follow from that.

- **Latency compensation.** `found` comes about four periods after the echo
  starts. The counter is still running during that time. `dist_calc`
  therefore subtracts `MIN_PERIODS` from the count before converting it, so
  the result is the arrival time of the echo's first edge. What remains is a
  truncation error of at most one period: the result can read up to 0.425 cm
  short, before rounding to whole centimetres.
- **Blanking.** The gate is only armed (`enable`/`listen`) after the burst
  has ended. Transmitter crosstalk, which is also at 40 kHz, therefore cannot
  be taken for an echo. The cost is a minimum range of about 3.4 cm (the
  200 µs burst).
- **Glitches.** A narrow glitch adds an extra rising edge, which splits a
  period into two short ones. Both fall outside the gate, and the run starts
  again. A noisy echo is therefore delayed or rejected, never shortened.
- **Tuning.** Changing `GATE_CLKS` trades interference rejection against
  tolerance to transducer detuning and Doppler shift. Changing `MIN_PERIODS`
  trades immunity against weak, short echoes. Far targets return weak echoes,
  and such an echo may not give four clean cycles.

## Two kinds of echo input

`ECHO_MODE` (type `us_pkg::echo_mode_t`, on `ultrasonic_detect` and the
top) selects what `echo` is.

- **`ECHO_TONE`** (default). `echo` is the receiving transducer's signal after
  an amplifier and a comparator: a train of 40 kHz cycles. `trig` drives the
  transmitting transducer with the burst. The counter runs from the first
  drive edge, and the frequency gate above decides when the echo has
  arrived.
- **`ECHO_PULSE`**. `echo` is the echo pulse of an HC-SR04-style sensor
  module, which sends its own burst and holds `echo` high for the round-trip
  time. Set `BURST_PULSES = 1`: `trig` is then one 40 kHz period, 12.5 µs
  high, which is enough to trigger the module. The rising edge of `echo`
  restarts the counter and the falling edge stops it, so the count is the
  pulse width in 40 kHz periods. No gate latency is subtracted. A pulse
  narrower than one tone period (`MIN_PULSE_CLKS`) is treated as a glitch:
  it is ignored, and the next rising edge starts again. Two limits come from
  the module rather than from this logic:
  - It holds `echo` high for about 38 ms when nothing is in range. Choose
    `MAX_COUNT` below that (941 periods = 4 m, the module's usual range) so
    that such a pulse ends as "no echo".
  - It ignores `trig` while busy. Choose `HOLD_TICKS` so that `MAX_COUNT +
    HOLD_TICKS` is longer than 38 ms; 1000 (25 ms) works.

## Counting and distance arithmetic

`hs_counter` is 20 bits wide. It counts `tone_tick`, a one-clock strobe every
40 kHz period. The strobe is the same one that starts the burst, so the count
is in phase with the transmitted signal. The counter stops when an echo is
identified. Otherwise it stops itself after `MAX_COUNT = 2353` periods, which
is the round trip to 10 m: 2 · 10 m / 340 m/s · 40 kHz.

`dist_calc` computes

    distance_cm = round( (N - MIN_PERIODS) * 34000 / (2 * 40000) )

The factor 2 is for the round trip, so one count is 17/40 cm. The
multiplication and the division by a constant are combinational. Their result
is captured in the output register on `latch`.

## Timing generator and waveform generator

`timing_gen` divides the clock by `CLK_HZ / (2*TONE_HZ)` (600 at the
defaults). This gives `half_tick` at 80 kHz, and `tone_tick` on every second
`half_tick`. `wave_gen` waits for a `tone_tick`, raises `drive`, and then
inverts it on every `half_tick`. This flip-flop toggle gives exactly 50 %
duty at 40 kHz, whatever the divide ratio. It counts the pulses fired
(`fired`) and ends after `BURST_PULSES` periods.

## Display

`bin2bcd` converts the distance into hundreds, tens and units. It uses
shift-and-add-3 (double dabble) over the lower 10 bits, after clamping at 999.
There are three `seg7_decoder`s, one per digit. Their outputs are active low
for common-anode digits, and leading zeros are blanked. Segment order is
`{g,f,e,d,c,b,a}`. `seg[0]` is the units digit.

## Module map

```
ultrasonic_ranging_top          whole FPGA design, display included
├── ultrasonic_detect           ranging core: clk, rst_n, echo -> trig, distance[23:0]
│   ├── timing_gen              80 kHz / 40 kHz strobes from the 48 MHz clock
│   ├── measure_fsm             three-process sequencer: fire, listen, latch, hold
│   ├── wave_gen                40 kHz burst on trig, pulse count, launch strobe
│   ├── echo_ident              synchroniser + period measurement + frequency gate
│   ├── hs_counter              20-bit period counter with range timeout
│   └── dist_calc               count -> cm, result register
├── bin2bcd                     distance -> hundreds, tens, units
└── seg7_decoder (x3)           digit -> segments
us_pkg                          shared constants and the sequencer's state type
```

All state is reset by `rst_n`, which is asynchronous and active low.
`ultrasonic_detect` asserts that an echo is only ever accepted while the
counter is running.

## Parameters

| parameter | default | meaning | origin |
|---|---|---|---|
| `CLK_HZ` | 48 000 000 | global clock | source design |
| `TONE_HZ` | 40 000 | transducer frequency | source design |
| `MAX_COUNT` | 2353 | range limit in periods (10 m) | source design |
| counter width | 20 bits | `us_pkg::COUNT_W` | source design |
| `distance` width | 24 bits | `us_pkg::DIST_W` | source design |
| `ECHO_MODE` | `ECHO_TONE` | tone gate or sensor-module pulse | this design |
| `BURST_PULSES` | 8 | periods per burst | this design |
| `GATE_CLKS` | `CLK_HZ/TONE_HZ/10` = 120 | half-width of the frequency gate | this design |
| `MIN_PERIODS` | 4 | in-gate periods needed to accept an echo | this design |
| `HOLD_TICKS` | 400 | periods between shots (10 ms) | this design |

## Design choices and departures from the source design

- **What `echo` carries.** The source system is built around a ready-made
  sensor module, but its echo identification measures the frequency of the
  returned signal. Such a module reports the flight time as a pulse width,
  while frequency measurement needs the raw tone. Both are supported (see
  "Two kinds of echo input"). The frequency gate is the default because it is
  the mechanism the source describes in detail.
- **Clock.** The source gives 48 MHz for the timing generator. Elsewhere it
  mentions a 60 MHz clock divided by 750, which is also an 80 kHz half-period
  strobe. 48 MHz was kept. Any clock that is a multiple of `2*TONE_HZ` works.
- **Divider.** The source uses a vendor divider core. Here the divider is a
  counter.
- **Own choices.** These are not given in the source: burst length, gate
  width, number of periods needed, blanking, hold-off, latency compensation,
  rounding, the all-ones no-echo code, the two echo modes in one design,
  saturation of the display at 999
  (the source keeps only the low 9 bits of the distance), display polarity
  and leading-zero blanking.
- **Not built.** The source's echo module also names a "dual-core FFT" with
  CORDIC, generator, pipeline, storage and data-conversion sub-modules. Its
  size, number format and role in the data path are not specified, so it is
  not part of this RTL. Identification here rests on the period gate alone.
  The analog transmitter and receiver, power supply, configuration flash and
  JTAG port are board parts outside the FPGA logic.

## Range and the reference measurements

The reference measurements cover obstacles at 200 cm to 2600 cm. With the
10 m counter limit, targets from 200 cm to 800 cm are measured. Targets from
1200 cm upward need 2824 to 6118 periods, so they exceed `MAX_COUNT` and
report no echo. Distances above 999 cm would not fit the three digits anyway.
Raising `MAX_COUNT` extends the range (the 20-bit counter holds it), but then
`HOLD_TICKS` and the display should be revisited.

## Simulation

The testbenches are self-checking. Each prints one line,
`TB_RESULT checks=N failures=M`, and stops. Each has a watchdog. Build and
run any of them with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/us_pkg.sv \
    tb/tb_ultrasonic_ranging_top.sv --top-module tb_ultrasonic_ranging_top
./obj_dir/Vtb_ultrasonic_ranging_top
```

| testbench | what it establishes |
|---|---|
| `tb_timing_gen` | strobe spacing of 600 and 1200 clocks, one clock wide |
| `tb_wave_gen` | burst length, 50 % duty, pulse count, launch strobe, restart |
| `tb_echo_ident` | tone mode: acceptance after 4 periods with 2-4 clocks of latency; 68 kHz interference rejected; gate edges at deviations of 119 and 120 clocks; run reset; glitches; disable. Pulse mode: start and found on the pulse edges, width limit at 1200 clocks |
| `tb_hs_counter` | counting, stop, freeze, timeout at `MAX_COUNT`, relaunch |
| `tb_measure_fsm` | state sequence, blanking, valid flag, hold-off length |
| `tb_dist_calc` | conversion against `(m*17+20)/40`, latching, no-echo code |
| `tb_bin2bcd` | every value 0-1100 plus random and saturated values |
| `tb_seg7_decoder` | every code, blanking, both polarities |
| `tb_ultrasonic_detect` | the 12 reference distances at a 4 MHz clock; accuracy ±1 cm up to 800 cm, no-echo beyond 10 m, echo-to-result time |
| `tb_ultrasonic_ranging_top` | full size, every parameter at its default |
| `tb_sensor_module_mode` | whole design in `ECHO_PULSE` mode at 48 MHz with a sensor-module model: 37-399 cm, a glitch before the echo, no target |

The last testbench drives five shots through `tb/us_echo_model.sv`, a
behavioural model of transducers, air and target:

- a clean echo;
- an echo preceded by 68 kHz interference;
- crosstalk during the burst;
- no target;
- a 512 cm target.

It checks the distance and all three digits for each shot. It also requires
that the gate rejected periods, that blanking ignored crosstalk, that the
counter timed out once, and that the hold-off ran between shots. It
simulates about 7.5 million clock cycles in a few seconds.

What the simulations do not cover: real transducer waveforms (ringing,
amplitude fading, an echo that drifts in frequency) and metastability. The
model delivers clean square waves.
