# Echo-sounder transmit pulse generator (50 kHz / 200 kHz bursts)

An echo sounder measures depth by sending a short acoustic burst into the
water and timing its echo. The digital part of the transmitter has two jobs:

* **Fire bursts at a fixed repetition rate.** The next burst must wait until
  every echo of the previous one has come back. For a 75 m maximum depth and
  a sound speed of 1500 m/s the round trip is 2 x 75 / 1500 = 0.1 s, so the
  pulse repetition frequency (PRF) is 10 Hz.
* **Make each burst short and of a known carrier.** Range resolution is
  tau x c / 2, so the burst is kept at tau = 0.4 ms: 20 cycles of 50 kHz or
  80 cycles of 200 kHz. A board switch, SW0, picks the carrier
  (SW0 = 1: 50 kHz, SW0 = 0: 200 kHz).

The logic produces three signals for an external bridge driver and
amplifier: the complementary driver inputs **INA** and **INB**, and an
output enable **OE** that is high only while a burst is on the air. Between
bursts OE = 0, INA = 0 and INB = 1. The FPGA outputs square waves. The
amplifier and the transducer's narrow band make the burst close to a
sine wave in the water. Those analog parts are not in this RTL.

This RTL implements the transmitter described in *Design and generation of
50 kHz and 200 kHz pulsed sine wave using FPGA* (El Gendy and Abd El-Napi,
Military Technical College, Cairo). It was designed for a Terasic DE1-SoC
board with a 50 MHz clock.

## Block structure

```
            clk_50 (50 MHz)
               |
   +-----------+-------------------------------------------------+
   |  clk_div (/10) --tick 5 MHz--> burst_fsm --start--+         |
   |                                 | state, count    |         |
   |  sw0 --> 2-flop sync ---------------------------> route     |
   |                                              /         \    |
   |                       pulse_train (500 clk x 20)  pulse_train (125 clk x 80)
   |                                              \         /    |
   |                          OE = OR, INA = OR, INB = AND       |
   +--------------------------------------------------------------+
                       oe   ina   inb      state  count
```

| File | What it is |
|---|---|
| `rtl/pulse_pkg.sv` | state enum `state_t` and the default numbers |
| `rtl/clk_div.sv` | 50 MHz -> 5 MHz clock enable |
| `rtl/burst_fsm.sv` | INIT / WRITE_STATE / IDLE_STATE state machine and frame counter |
| `rtl/pulse_train.sv` | one carrier's burst of N square-wave cycles on INA/INB |
| `rtl/pulse_gen_top.sv` | the whole generator |

Everything runs on the single 50 MHz clock. The 5 MHz rate exists only as a
one-clock-wide enable (`tick`), not as a second clock.

## The frame: state machine and tick counter

This is the part that sets the timing. `burst_fsm` has three states and one
counter, `count`, which advances by one on every 5 MHz tick (0.2 us). The
thresholds are those of the published state chart:

| state | counter range | leaves when | goes to |
|---|---|---|---|
| `ST_INIT` | 0 .. 100 | count = 100 | `ST_WRITE`, count = 101, **start** |
| `ST_WRITE` | 101 .. 250000 | count = 250000 | `ST_IDLE`, count = 250001 |
| `ST_IDLE` | 250001 .. 499999 | count = 499999 | `ST_WRITE`, count reloads **101**, **start** |

A few things to note:

* **INIT runs only once after reset.** At the end of each frame the counter
  reloads 101, not 0, so each frame is 499999 - 101 + 1 = **499899 ticks =
  99.98 ms**. That is a PRF of 10.0004 Hz. These are the published numbers.
  For exactly 100 ms (500000 ticks), set `FRAME_END` to 500100.
* **The burst is much shorter than WRITE_STATE.** WRITE_STATE lasts about
  50 ms, but the burst (OE high) lasts 0.4 ms from the start of that state.
  After the last cycle, INA and INB return to 0/1 and OE drops. The state
  machine stays in WRITE_STATE until count 250000. With the default numbers,
  WRITE_STATE and IDLE_STATE therefore look the same at the pins. The
  published state chart marks OE = '1' on WRITE_STATE as a whole. The
  accompanying description, and the 0.4 ms pulse length, say that OE drops
  when the cycles are done. This RTL follows the description. The description
  also has the machine go idle once the burst is out. The state itself follows
  the chart's thresholds, which makes no difference at the pins.
* **`start` is one clock wide.** It is registered on the clock edge that
  enters WRITE_STATE. Only the carrier that SW0 selects receives it.

## The burst: `pulse_train`

Each `pulse_train` counts half periods on the 50 MHz clock:

* In the first half of each cycle, INA = 1 and INB = 0.
* In the second half, INA = 0 and INB = 1.
* OE is high for exactly `2 * HALF_PERIOD * N_CYCLES` clocks.

| carrier | SW0 | HALF_PERIOD | N_CYCLES | burst |
|---|---|---|---|---|
| 50 kHz | 1 | 500 clocks | 20 | 20000 clocks = 0.4 ms |
| 200 kHz | 0 | 125 clocks | 80 | 20000 clocks = 0.4 ms |

The half periods are counted at 50 MHz, not 5 MHz. At 5 MHz a 200 kHz half
period would be 12.5 ticks. At 50 MHz it is exactly 125 clocks, so both
carriers are exact and have a 50 % duty cycle. A `start` that arrives during
a burst is ignored. An assertion checks that INA and INB are never equal.

The top has one `pulse_train` per carrier. The idle one holds INA = 0,
INB = 1 and OE = 0, so the two can be merged without a multiplexer:

* OE = OR of the two OE outputs.
* INA = OR of the two INA outputs.
* INB = AND of the two INB outputs.

A second assertion checks that the two carriers are never active together.

## Timing at the pins (default parameters)

| event | when |
|---|---|
| First OE rise | clock 1011 after reset is released. The 101st tick falls on clock 1010 and registers `start`; `pulse_train` takes it one clock later. Clock 1 is the first edge that sees `rst_n` high. |
| OE high | 20000 clocks (0.4 ms) |
| Burst to burst | 4998990 clocks (99.98 ms) |
| SW0 to effect | SW0 passes a two-flop synchronizer. It is sampled only when a burst starts, so moving the switch never cuts a burst short. The new carrier appears at the next frame. |

## Ports of `pulse_gen_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk_50` | in | 1 | 50 MHz clock |
| `rst_n` | in | 1 | synchronous reset, active low |
| `sw0` | in | 1 | carrier select, 1 = 50 kHz, 0 = 200 kHz (asynchronous, synchronized inside) |
| `oe` | out | 1 | driver output enable |
| `ina`, `inb` | out | 1 | complementary driver inputs |
| `state` | out | `pulse_pkg::state_t` (2) | state machine state, for observation |
| `count` | out | 19 | frame counter, for observation |

The original design sends these signals to the board's GPIO header at
3.3 V. Which header pins to use is left to the board constraints.

## Parameters

All parameters are on `pulse_gen_top`. The defaults are the published
values.

| parameter | default | meaning |
|---|---|---|
| `CLK_HZ` | 50000000 | clock frequency |
| `TICK_HZ` | 5000000 | frame-counter rate (divider = `CLK_HZ/TICK_HZ`) |
| `F_SW1_HZ`, `CYCLES_SW1` | 50000, 20 | carrier and cycle count for SW0 = 1 |
| `F_SW0_HZ`, `CYCLES_SW0` | 200000, 80 | carrier and cycle count for SW0 = 0 |
| `INIT_END`, `WRITE_END`, `FRAME_END`, `RESTART` | 100, 250000, 499999, 101 | state machine thresholds in ticks |

Rules for changing them:

* `CLK_HZ` must be a multiple of `TICK_HZ` and of twice each carrier
  frequency. An elaboration-time assertion checks this.
* The thresholds must satisfy `INIT_END < WRITE_END < FRAME_END`.
* The burst must fit inside WRITE_STATE. Otherwise the next start can fall
  while a burst is still running, and that start is ignored.
* A different PRF only needs new `FRAME_END` and `WRITE_END` values. For a
  depth D (m), the frame must be at least `2*D/1500` s.

## Design choices beyond the published design

These parts follow the published design:

* the block split: divider, three-state machine, and one generator per
  carrier;
* every number: 50 MHz, 5 MHz, 100 / 250000 / 499999 / 101, 20 and 80
  cycles;
* the initial values INA = 0 and INB = 1;
* SW0 polarity;
* OE dropping after the burst.

These parts are choices of this RTL:

* **Reset.** The published design does not describe one. `rst_n` is a
  synchronous, active-low reset.
* **Clocking.** The 5 MHz rate is a clock enable, not a divided clock.
* **Half-period counting** runs at 50 MHz (see above).
* **Duty cycle.** The description gives a "10 % duty cycle" and then
  explains it as half of each cycle positive and half negative. The RTL
  uses equal halves.
* **SW0** is synchronized and latched at the start of each burst.
* **A start during a burst** is ignored.
* **Observation ports.** `state` and `count` are brought out. The original
  simulations show these two signals.

Not included:

* the bridge driver and amplifier that OE/INA/INB feed;
* the transducer;
* the ADC and DAC that also use the 5 MHz rate in the complete echo sounder.

None of these has a described logic function.

## Testbenches

Each testbench checks its results, prints
`TB_RESULT checks=N failures=M`, and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb/tb_clk_div.sv` | first tick on clock DIV, spacing DIV, width one clock; DIV = 10 and DIV = 3 |
| `tb/tb_burst_fsm.sv` | every clock against a reference model of the state chart, at small thresholds with an irregular tick; at the default thresholds: the first start after 101 ticks, 249900 ticks per WRITE_STATE, and starts every 499899 ticks |
| `tb/tb_pulse_train.sv` | both carriers at full size: OE width 20000 clocks, 20 / 80 cycles, every half cycle 500 / 125 clocks, INA/INB complementary, idle values, a start during a burst ignored |
| `tb/tb_pulse_gen_top.sv` | the whole generator at its default parameters over four frames (50 kHz, 200 kHz, 200 kHz with SW0 moved mid-burst, 50 kHz): first-burst time, burst period, OE width, cycle counts and half periods of every burst, and idle pin values. It also counts each mechanism and fails if one never occurs: leaving INIT, a burst of each carrier, entering IDLE_STATE, the counter reload to 101, and a switch move during a burst. |

Running the full-size test with Verilator 5 takes about 15 s, for 300 ms of
simulated time:

```sh
verilator --binary --timing --assert -Irtl \
  rtl/pulse_pkg.sv rtl/clk_div.sv rtl/burst_fsm.sv rtl/pulse_train.sv \
  rtl/pulse_gen_top.sv tb/tb_pulse_gen_top.sv \
  --top-module tb_pulse_gen_top -o sim
./obj_dir/sim
```

For any other testbench, swap in its file and `--top-module`. `pulse_pkg.sv`
must always come first.

## How far it can be trusted

* All four testbenches pass, the full-size one included.
* Each testbench was also run against a copy of its block with one
  deliberate error, and caught it:
  * the divider wrapping one count late;
  * the frame counter reloading 100;
  * a burst one cycle short;
  * the SW0 routing swapped.
* Verilator lint and a Yosys (slang) elaboration accept every file with no
  latch, loop or multiple-driver warnings. The whole design is about 65
  flip-flops.
* Not verified: operation on hardware, and timing closure on the FPGA. At
  50 MHz timing closure is not expected to be a problem.
