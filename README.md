# Digital lock-in controller for resonant switched-capacitor converters

A resonant switched-capacitor converter (for example a 4:1 switched-tank
converter stepping 48 V down to 12 V) moves charge most efficiently when every
switch opens at the moment its resonant current crosses zero. To do that, each
conduction interval must last exactly half of the resonant period of the path
that conducts. That period differs from tank to tank and from switching state
to switching state, and it drifts with load, temperature and age.

This controller does not compute the period. It measures whether each turn-off
came too early or too late and corrects the on-time. It does this separately for
every tank and every switching state, until each one switches at zero current.
It then keeps tracking, so the converter stays locked to its resonances
(a lock-in loop). The design is all-digital and uses standard cells. It runs
from a 20 MHz clock. Sub-clock timing comes from tapped delay lines instead of a
fast counter clock.

The RTL is SystemVerilog (IEEE 1800-2017) in `rtl/`, with self-checking
testbenches in `tb/`.

## The switching cycle

With the default of two tanks, one switching cycle is:

```
            state 0 (charging)          state 1 (discharging)
tank 0 q[0][0] ___/‾‾‾‾‾‾‾‾‾‾‾‾‾‾\_____________________________________
tank 1 q[1][0] ___/‾‾‾‾‾‾‾‾‾‾\_________________________________________
tank 0 q[0][1] __________________________/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\___________
tank 1 q[1][1] __________________________/‾‾‾‾‾‾‾‾‾‾\_________________
                  |<- T[x][0] ->|<-dead->|<-- T[x][1] -->|<-dead->|
```

* All pulses of a state start together. Each pulse ends after its own on-time
  `T[tank][state]`.
* The next state starts only after the longest pulse of the current state has
  ended and `dead_time` clocks have passed. So the two gate outputs of a tank
  can never overlap; an assertion in `sequencer` checks this.
* The dead-time is counted from the last whole clock of the longest pulse.
  The gap seen at the gates is therefore `dead_time` clocks minus that pulse's
  fine part (less than one clock).
* If the run command is removed, the cycle in progress finishes first.
* In light-load mode, every active cycle is followed by two cycles with all
  gates off (pulse skipping).

## On-times and the high-resolution timer

An on-time is a 12-bit word `{coarse[7:0], fine[3:0]}`:

* `coarse` counts 50 ns clocks.
* `fine` counts delay elements of 3.125 ns. Sixteen elements span one clock.

The range is 0 to 12.8 µs in 3.125 ns steps. For comparison, the resonant
half-period of a 2.35 µF / 70 nH tank is 1.27 µs, which is 25.5 clocks.

`sequencer` keeps a coarse pulse high for `coarse` clocks, using one counter
shared by all tanks and a compare per tank. The pulse then goes into a
per-tank `hr_delay_line`: a chain of `delay_cell` elements with a tap
multiplexer set to `fine`. The gate output is the coarse pulse combined with
its delayed copy. The rising edge stays on the clock, and the falling edge
moves `fine × 3.125 ns` later. The on-times are latched when a state begins,
so a tuning update never cuts a pulse short.

`delay_cell` is a behavioural model: a buffer with a `#3125` ps simulation
delay. In silicon each element is a library buffer, and the real step is that
buffer's delay. With a different cell, change `DELAY_PS` for simulation and,
if needed, the number of taps (`FINE_BITS` in `lockin_pkg`).

## Reading the current polarity

Each tank has an external zero-current-detection (ZCD) sensor on its
switch node. The sensor gives a 2-bit code:

| code | meaning |
|------|---------|
| `11` | early: current still flowing forward at turn-off (switch node clamped high) |
| `00` | late: current already reversed (switch node clamped below ground) |
| `01` | ZCS: the switch opened at zero current |

The code is only valid in a window. The window opens some time after the
controller's turn-off command: this is the inherent delay of the gate driver
and transistor, which is unknown and variable. The window closes when the next
state switches on. `zcd_sampler` (one instance per tank) finds that window in
one of two ways, chosen by the configuration:

* **Continuous sampling.** The synchronized code is read every clock, from the
  turn-off command to the end of the dead-time. The result is:
  * early, if some sample was `11` and none was `00`;
  * late, if some sample was `00` and none was `11`;
  * ZCS otherwise.

  This needs no calibration, but the resolution is one clock.
* **Single delayed sample.** One strobe captures the code `delta_s` delay
  elements after the gate's real falling edge. The strobe is built like a gate
  pulse: whole clocks, then a delay-line tap. The pulse's own fine delay is
  added, so that `delta_s` is measured from the actual edge.

  If the strobe does not fire inside the window, the reading is ZCS, which
  means no correction.

**Inherent-delay estimation** is used with the single-sample method. The
governor first drives every tank with a fixed short on-time (`EST_TIME`), so
that every turn-off is early. Each tank's sampler then starts with a strobe
delay of zero. After each turn-off that did not read `11`, it moves the strobe
one delay element later. The first delay that reads `11` is the shortest
gate-to-valid-reading delay, and it becomes `delta_s`. This estimation runs at
start-up and again every N_est switching cycles.

A reading leaves the sampler three clocks after the dead-time ends. It is
tagged with the switching state it belongs to.

## The tuning loop

`auto_tuner` holds one channel per tank and state (four channels by default).
At the start of every switching cycle, each channel does the following:

1. **Compensator.** It forms a candidate on-time from the on-time in use: +1
   delay element after an early reading, −1 after a late one, unchanged after
   ZCS. The candidate is limited to the range `[T_MIN, T_MAX]`.
2. **Voting filter.** It shifts the candidate into a register chain and
   compares the newest `lpf_depth` entries. The tune register `t_pulse` takes
   the candidate only when all of them agree.

The filter has two effects:

* Under steady early or late readings, the on-time moves by one step every
  `lpf_depth` cycles.
* One stray reading can never move it, because it breaks the agreement.

For example, 120 ns of initial error is 38 steps. With a depth of 4, it is
removed in about 150 switching cycles.

`locked` is high once every channel has read ZCS for at least `lpf_depth`
cycles in a row.

The sensor's ZCS band has to be wider than one delay element. Otherwise no
on-time reads ZCS, and the loop dithers by one step around the resonance.

## Operating modes and the configuration pin

`system_governor` runs the following state machine:

```
OFF --enable--> START --(single-sample)--> EST --all est_done--> LOCKIN --locked--> RUN
                  \--(continuous)------------------------------>/          <--lost--/
RUN --N_est cycles (single-sample only)--> EST
any --enable cleared--> STOP --sequencer idle--> OFF
```

| state | what it does |
|-------|--------------|
| START | loads `INIT_TIME` into every tune register |
| EST | applies `EST_TIME` to all tanks; tuning is frozen |
| LOCKIN, RUN | tune in closed loop |
| STOP | no new cycle is started; the cycle in progress completes |

All settings come from one pin. The pin voltage is the supply `V_op` of an
inverter that, together with an RC integrator and an inverter-threshold
comparator, forms a first-order sigma-delta modulator. `single_pin_config`
holds the modulator's clocked flip-flop. Its inverted output `sd_trg` drives
the front-end inverter. It counts the ones of the bit-stream over 1024 clocks
and publishes the count as the 10-bit word `op`. In steady state:

    op ≈ 1024 · V_th / V_op        (V_th: comparator threshold)

The count can be off by a count or two. For that reason only the eight upper
bits are decoded, giving 256 usable voltage levels:

| bits | field | values |
|------|-------|--------|
| 9 | enable | 1 runs the converter |
| 8 | sampling method | 1 single sample with delay estimation, 0 continuous |
| 7:6 | dead-time | 2, 4, 6, 8 clocks |
| 5 | N_est | 256 or 1024 cycles between estimations |
| 4:3 | filter depth | 2, 4, 6, 8 |
| 2 | light-load | 1 skips two cycles after each active one |
| 1:0 | ignored | absorb the ADC's count error |

To select a word `w`, set the pin to about `V_th · 1024 / (w + 2)`.

## Files

| file | content |
|------|---------|
| `rtl/lockin_pkg.sv` | sizes, on-time type, ZCD code enum, governor states, OP fields |
| `rtl/lockin_controller.sv` | top level: all blocks wired together |
| `rtl/single_pin_config.sv` | bit-stream flip-flop and 1024-clock ones counter |
| `rtl/system_governor.sv` | mode state machine, OP decoding, on-time selection |
| `rtl/zcd_sampler.sv` | one sampling channel: continuous / single sample, delay estimation |
| `rtl/auto_tuner.sv` | compensator, voting filter, tune registers, `locked` |
| `rtl/sequencer.sv` | cycle state machine, coarse timer, protection, gate steering |
| `rtl/hr_delay_line.sv` | tapped delay line with tap multiplexer |
| `rtl/delay_cell.sv` | behavioural delay element (simulation delay only) |
| `tb/*_tb.sv` | one self-checking testbench per block, the system test and the resonator-set test |
| `tb/sd_frontend_model.sv` | behavioural inverter / RC / comparator of the configuration ADC |
| `tb/tank_zcd_model.sv` | behavioural resonant tank plus ZCD sensor |

Top-level ports of `lockin_controller`:

| port | direction | meaning |
|------|-----------|---------|
| `clk`, `rst_n` | in | clock (20 MHz) and asynchronous reset, active low |
| `sd_cmp` | in | comparator output of the configuration ADC |
| `sd_trg`, `sd_bit` | out | drive to the ADC front-end inverter, and the bit-stream |
| `zcd[x]` | in | sensor code of tank x |
| `q[x][s]` | out | gate commands |
| `op`, `op_valid` | out | configuration word |
| `gstate`, `locked`, `masked` | out | status: governor state, lock, light-load idle cycle |
| `t_pulse`, `delta_s` | out | tuned on-times and delay estimates (observation) |

Parameters of `lockin_controller`:

| parameter | default | meaning |
|-----------|---------|---------|
| `NT` | 2 | number of tanks |
| `DECIM` | 1024 | ADC decimation window, clocks |
| `DELAY_PS` | 3125 | simulation delay of one delay element |
| `INIT_TIME` | 24 clocks | start-up on-time |
| `EST_TIME` | 16 clocks | early-switching on-time used during estimation |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog ends a hung run. For example, the system test:

```
verilator --binary --timing --assert -Wno-fatal -Mdir obj \
  rtl/lockin_pkg.sv rtl/*.sv -y tb +libext+.sv tb/lockin_controller_tb.sv \
  --top-module lockin_controller_tb
./obj/Vlockin_controller_tb
```

Compile `rtl/lockin_pkg.sv` first. If the shell glob lists it a second time,
verilator only warns. Replace the top module name to run any other testbench.
Timing needs `--timing`, because of the delay elements and the behavioural
models.

What the testbenches establish:

* **`lockin_controller_tb`** runs the full design at its default parameters
  in closed loop. The load is two mismatched tanks: 2.62 µF / 70 nH and
  2.35 µF / 50 nH, with a 2 % longer half-period in state 1. The tanks have
  different gate delays. The test covers:
  * configuration through the sigma-delta loop;
  * delay estimation, with each estimate equal to the model delay rounded up
    to a delay element;
  * lock-in from both sides of resonance; every tuned on-time must fall within
    the sensor's ±2.5 ns ZCS band;
  * periodic re-estimation;
  * retuning after a 4 % drift;
  * continuous sampling combined with light-load;
  * turn-off.

  It counts each of these mechanisms and fails if one never occurs. About
  3 ms of converter time simulates in under a second.
* **`stc_workloads_tb`** runs the controller from reset, at its default
  parameters, on three resonator sets, each with both sampling methods:
  * 2.35 µF / 70 nH with 2.10 µF / 63 nH;
  * two identical 2.35 µF / 70 nH tanks;
  * the mismatched pair.

  Every on-time must end inside the ZCS band. Lock takes about 100 to 220
  switching cycles from the 1.2 µs start value.
* **Block testbenches** cover:
  * pulse widths and switching period to the picosecond, non-overlap,
    skipping and stop completion (`sequencer_tb`);
  * a reference model of the filter over random readings (`auto_tuner_tb`);
  * the sampling methods and the estimator against a delayed-window sensor
    (`zcd_sampler_tb`);
  * all delay taps (`hr_delay_line_tb`) and the delay element itself
    (`delay_cell_tb`);
  * decimation of known bit densities (`single_pin_config_tb`);
  * every governor transition (`system_governor_tb`).

## Own choices and limits

The overall structure is fixed: governor, auto-tuner with compensator and
voting filter, sequencer with coarse counter and delay lines, a sampling block
with both methods and delay estimation, and a sigma-delta configuration pin
with 1024-clock decimation. The following details are this design's own:

* the OP field layout and the governor's state machine;
* light-load operation, implemented as skipping two cycles;
* the rule that combines continuous samples into one reading;
* the one-step compensator, which works from the on-time in use;
* the rule for `locked`;
* the on-time word format (8 + 4 bits) and the 16-tap, 3.125 ns delay line;
* `INIT_TIME`, `EST_TIME`, and the dead-time and N_est choices.

Other limits:

* **Delay steps.** The delay elements carry no real timing in a netlist. The
  achievable step is whatever the buffer cell gives, and a real chip would
  need the tap count to cover a full clock over process corners.
* **Per-tank, per-state tuning.** There are two gate outputs per tank, one per
  switching state. Mapping them to the individual transistors of a given
  topology is left to the board.
* **Analog parts.** The analog parts are not included: the configuration ADC's
  inverter, RC and comparator, the ZCD comparators, the gate drivers and the
  20 MHz oscillator. They exist only as behavioural models in `tb/`, as far as
  the tests need them.
