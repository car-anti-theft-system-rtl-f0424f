# Car anti-theft system

A car alarm with a hidden immobilizer. It is built for an FPGA board with a 27 MHz clock.

- **The alarm** watches the two door switches and the ignition. It arms itself when the owner leaves the car. It gives the owner time to get in before the siren starts. It drives a status light and a two-tone sweeping siren.
- **The immobilizer** is independent of the alarm. The fuel pump gets power only if, after the ignition is switched on, the brake pedal and a hidden switch are pressed together. A thief who defeats the alarm still cannot drive away without knowing about the hidden switch.

All logic is synchronous to one clock, and all delays count real seconds. Every delay, the blink rate and the siren pitch are derived from one parameter, `CLK_HZ`. A testbench can therefore shrink "one second" to a few thousand cycles and still run the real design.

## What the user sees

| Light | Meaning |
|---|---|
| blinking (on 1 s, off 1 s) | armed |
| steadily on | triggered: counting down to the siren, or the siren is sounding |
| off | disarmed |

- **Opening a door while armed** starts a countdown: 8 s for the driver door, 15 s for the passenger door. The passenger delay is longer so the driver can open the passenger door for a guest and then walk round. When the countdown ends, the siren sounds.
- **The siren keeps sounding** until both doors have stayed closed for the siren-on time (10 s). The system then re-arms silently. Reopening a door during those 10 s restarts the siren phase.
- **Switching on the ignition** disarms the system at any time.
- **Switching the ignition off** does not arm the system straight away. It waits for the driver door to open, then for both doors to close, then for the arming delay (6 s). A door opening during that delay makes it wait for the doors to close again.
- **Reprogramming.** The four delays are 4-bit values (0–15 s). While the reprogram button is held, the value on the four time-value switches is written into the delay chosen by the two selector switches. Holding the button also forces the alarm into the armed state. A reset restores the factory values.

| Selector | Delay | Default |
|---|---|---|
| 00 | arming delay after the doors close | 6 s |
| 01 | countdown, driver door | 8 s |
| 10 | countdown, passenger door | 15 s |
| 11 | siren-on time after the doors close | 10 s |

## Structure

```
 raw switches ──► debouncer ×13 ──┬─► fuel_pump_logic ──────────────────────► fuel_pump_power
 (incl. reset button)             │
                                  ├─► anti_theft_fsm ──► light_control ──────► status_light
                                  │        │  ▲   │ siren_en
                                  │ interval│  │   └──► siren_generator ─────► siren_out
                                  │        ▼  │expired        (2 × var_clock_divider)
                                  └─► time_parameters ─value─► countdown_timer
                                                                 ▲ tick
                     start_timer ──► (rst) clock_divider (1 Hz) ─┘
```

| Module | Role |
|---|---|
| `car_antitheft_top` | wires everything together and generates the global reset |
| `debouncer` | two-flop synchronizer plus a 10 ms stability filter, one per input |
| `fuel_pump_logic` | three-state immobilizer |
| `anti_theft_fsm` | 11-state alarm controller; contains `light_control` |
| `light_control` | off / on / blink, with its own one-second divider |
| `time_parameters` | the four reprogrammable delays, registered read |
| `clock_divider` | fixed divider; gives the 1 Hz tick for the timer and for the blinker |
| `countdown_timer` | 4-bit seconds countdown with an expired strobe |
| `siren_generator` | tone and sweep generator built from two `var_clock_divider`s |
| `var_clock_divider` | divider whose divisor may change while it runs |
| `level_to_pulse` | rising-edge detector, used for every start and expiry strobe |
| `antitheft_pkg` | state, interval and light-mode enums; the output-word struct; the default delays |

## The alarm controller

This is the part that needs the most care. The states and their output words are:

| Code | State | Timer | Interval | Light | Siren | Leaves on |
|---|---|---|---|---|---|---|
| 0 | ARMED | off | arm | blink | off | ignition → 7; driver → 2; passenger → 1 |
| 1 | P_TRIG_SET | off | passenger | blink | off | always → 3 |
| 2 | D_TRIG_SET | off | driver | blink | off | always → 4 |
| 3 | PASSENGER_TRIG | **on** | passenger | on | off | ignition → 7; expired → 5 |
| 4 | DRIVER_TRIG | **on** | driver | on | off | ignition → 7; expired → 5 |
| 5 | SOUND_ALARM | off | alarm | on | on | ignition → 7; both doors closed → 6 |
| 6 | REARM_TIME | **on** | alarm | on | on | ignition → 7; a door open → 5; expired → 0 |
| 7 | DISARMED | off | arm | off | off | ignition off → 8 |
| 8 | DOOR_WAIT_O | off | arm | off | off | ignition → 7; driver door open → 9 |
| 9 | DOOR_WAIT_C | off | arm | off | off | ignition → 7; both doors closed → 10 |
| 10 | ARM_WAIT | **on** | arm | off | off | ignition → 7; a door open → 9; expired → 0 |

Conditions are tested left to right, so the ignition always wins. Reset and the reprogram button override everything and force state 0.

### Starting a countdown

Three registers sit between a state and a running countdown. Their order explains why states 1 and 2 exist.

1. **The output word is registered.** The 6-bit word `{timer_on, interval, light, siren}` is loaded from the current state, so it follows the state one cycle later.
2. **The start strobe is an edge.** `start_timer` is the rising edge of the registered `timer_on` bit.
3. **The time store answers one cycle late.** `time_parameters` registers its output, so `value` shows the delay for the `interval` of the previous cycle.

So the delay must already be selected one cycle before `timer_on` rises. Every state with the timer on is entered only from a state that selects the same interval:

- SOUND_ALARM sets up REARM_TIME.
- DOOR_WAIT_C sets up ARM_WAIT.
- The door countdowns can start from ARMED, which selects the arming delay. They therefore pass through P_TRIG_SET or D_TRIG_SET, which spend one cycle selecting the right interval.

An assertion in `anti_theft_fsm` checks that `interval` has not changed in the cycle `start_timer` fires.

### Timing a countdown

`start_timer` loads the countdown and also restarts the 1 Hz divider. The first tick therefore arrives exactly `CLK_HZ` cycles after the start. `expired` fires `V·CLK_HZ + 1` cycles after the start, for a loaded value `V`.

A start while a countdown is running simply reloads it. That is how REARM_TIME → SOUND_ALARM → REARM_TIME restarts the 10 s wait. The timer is never stopped explicitly. A state that does not care about `expired` ignores it, and every state that does care starts a fresh countdown when it is entered.

**From door switch to siren:**

| Step | Cycles |
|---|---|
| debounce | 270 004 |
| controller (SET, TRIG, output register) | about 3 |
| countdown | 8 · 27 000 000 + 1 |
| siren enable register | 1 |

The first tone edge then follows one half-period later, about 1 ms.

## The siren

The output is a square wave. A tone divider toggles it once every `divisor` cycles, so the frequency is `CLK_HZ / (2·divisor)`. The divisors are `CLK_HZ/(2·f)` with integer division:

| Frequency | Divisor at 27 MHz |
|---|---|
| middle, 500 Hz | 27 000 |
| high, 667 Hz | 20 239 |
| low, 400 Hz | 33 750 |

A second divider, the sweep clock, fires every `CLK_HZ/6750` = 4 000 cycles. Each sweep tick moves the divisor by one.

1. **Rising half.** The divisor starts at the middle value and decreases until it reaches the high-frequency value.
2. **Jump.** The divisor returns to the middle value and the tone divider restarts.
3. **Falling half.** The divisor increases until it reaches the low-frequency value.
4. **Jump** back to the middle value, and the cycle repeats.

Each half takes about one second. The generator restarts (middle frequency, rising, output low) on reset and on each rising edge of `siren_en`. The output is forced low while the siren is disabled.

The tone divider compares `count ≥ divisor − 1` rather than `count == divisor − 1`. When the divisor drops below the running count, an `==` divider would run through its whole counter range before it ticked again. With `≥` it simply wraps on the next cycle. A half-period that contains a jump is longer than its neighbours, by up to one middle half-period, because the tone divider restarts there.

## The immobilizer and the inputs

**`fuel_pump_logic`** has three states:

| State | Pump | Leaves on |
|---|---|---|
| RESET | off | ignition on → IGNITION |
| IGNITION | off | brake and hidden switch in the same cycle → ACTIVE |
| ACTIVE | on | — (ignores brake and hidden switch) |

Ignition off from IGNITION or ACTIVE returns to RESET. Pressing brake and hidden switch while the ignition is off does nothing.

**Debouncing.** Each input passes through a two-flop synchronizer and a stability counter. A change reaches the logic only after the input has been steady for `DEBOUNCE_CYCLES` (270 000 cycles = 10 ms), `DEBOUNCE_CYCLES + 4` cycles after it settled. Shorter bounces are dropped.

**Reset.** The global reset is the debounced user reset button ORed with the `power_on_reset` input.

## Parameters

| Parameter | Default | Where | Effect |
|---|---|---|---|
| `CLK_HZ` | 27 000 000 | `car_antitheft_top` | cycles per second for the timer, the blinker and the siren frequencies |
| `DEBOUNCE_CYCLES` | 270 000 | `car_antitheft_top` | stability time of every input |
| `T_*_DEFAULT` | 6, 8, 15, 10 | `antitheft_pkg` | factory delays in seconds |
| `MID_HZ`, `HIGH_HZ`, `LOW_HZ`, `SWEEP_HZ` | 500, 667, 400, 6750 | `siren_generator` | siren pitch range and sweep rate |

The delays are 4 bits wide (`TIME_W` in the package), so no delay can exceed 15 s.

## Where this RTL departs from the original design

The behaviour, state codes, output words, delays, divider values and siren numbers are the original design's. This RTL makes the following choices of its own:

- **Reset and reprogram priority.** Reset and reprogram take priority over every state transition, in both state machines. In the original, the transition code could override them.
- **Timer start priority.** A start strobe takes priority over a tick or a zero count arriving in the same cycle.
- **Edge-detector reset.** Every edge detector has a reset and ignores a level that is already high when reset ends.
- **Divider ticks under reset.** The fixed and variable dividers hold their tick low in a reset cycle.
- **Overflow-safe compare.** The variable divider's compare cannot underflow; a divisor of 0 behaves as 1.
- **Input synchronizer.** Each debouncer has a two-flop synchronizer in front of it (2 extra cycles of latency).
- **Active-high inputs.** Raw inputs are active high (1 = pressed or door open). The board's inverted push buttons are not modelled.
- **Reset values.** Reset sets the controller's output word to the ARMED word, `value` to the arming delay, and the light off. The original left some of these to the first clock edge.
- **One clock parameter.** A single `CLK_HZ` drives all time bases.

## Not included

These parts of the original board are not part of this RTL:

- **Power-on reset generator.** The original used an FPGA vendor primitive. Drive `power_on_reset` high for a few cycles after configuration.
- **Debug display driver.** The original used a board-specific 16-digit hex display driver. Its data is available on `fsm_state` and `timer_count`.
- **Speaker network.** The original fed the speaker through a resistor divider (2 kΩ / 1 kΩ) into an external speaker. `siren_out` is a logic-level square wave.

## Verification

Each module has a self-checking testbench in `tb/`. Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `level_to_pulse_tb` | random levels against an edge-detector reference |
| `debouncer_tb` | glitches up to DELAY cycles are filtered; exact DELAY+4 latency |
| `fuel_pump_logic_tb` | directed unlock sequences; 3 000 random cycles against a reference |
| `clock_divider_tb` | exact period; realignment after random restarts |
| `countdown_timer_tb` | exact expiry cycle for values 0–15; restart while counting; displayed count |
| `time_parameters_tb` | defaults; registered read; random reprogramming against a reference store |
| `var_clock_divider_tb` | exact period for divisors 1–20; wrap after a divisor drop; divisor 0 |
| `light_control_tb` | off/on; blink phase and period; blink restart |
| `siren_generator_tb` | half-periods stay in range; alternating rising and falling sweeps; cycle length; silence when disabled; restart on enable |
| `anti_theft_fsm_tb` | 20 000 random cycles against a reference transition table; every state visited; blink period; interval set-up before each start |
| `car_antitheft_top_tb` | end to end at `CLK_HZ` = 27 000 with a 5-cycle debounce (see below) |
| `car_antitheft_full_tb` | one full alarm cycle at the real defaults (see below) |

**`car_antitheft_top_tb`** runs the whole system at reduced parameters. Every mechanism must occur at least once:

- a bounce is ignored
- 8 s driver countdown and 15 s passenger countdown
- the siren sounds, re-arms after 10 s, and restarts when a door reopens
- the ignition disarms a countdown
- automatic arming after 6 s, and a restart of the arming wait
- reprogramming the driver delay to 3 s
- the user reset restores 8 s
- the 1 s blink
- the immobilizer stays locked and then unlocks
- the guest case: passenger door first, driver door 5 s later, ignition at 9 s, and the siren never sounds

**`car_antitheft_full_tb`** runs one complete alarm cycle at the real defaults (27 MHz, 10 ms debounce):

- blink period
- 8 s driver countdown
- siren pitch
- 10 s re-arm

This is about 570 million cycles and takes roughly five minutes.

To run a testbench with Verilator (5.x), from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb +libext+.sv \
  --top-module car_antitheft_top_tb rtl/antitheft_pkg.sv tb/car_antitheft_top_tb.sv \
  --Mdir obj -o sim
./obj/sim
```

Replace the testbench name to run any other. Lint a module with `verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/antitheft_pkg.sv rtl/<module>.sv`.
