# Fixed-time traffic light controller for a T-junction

A main road crosses the mouth of a side road. Traffic on the main road runs
in two directions, M1 and M2, and there is a turning movement, MT, off the
main road across the opposing lane. The side road, S, has a single signal
head. The controller gives the main road most of the time, releases the side
road for a short green, and never lets a green or yellow on the side road
overlap one on the main road. Every green ends in a yellow before the head
turns red.

The controller is time driven and has no sensors. It is a Moore machine: the
lamps depend only on the present state, and the state changes only when a
dwell timer expires. That keeps the outputs glitch-free and the timing
exactly predictable.

## The phase ring

Six states run in a fixed ring. Each head shows a 3-bit one-hot code:
`1` green, `2` yellow, `4` red.

| state | name             | M1     | M2     | MT     | S      | lasts (ticks) |
|-------|------------------|--------|--------|--------|--------|---------------|
| 0     | main go          | green  | green  | red    | red    | 8             |
| 1     | M2 yellow        | green  | yellow | red    | red    | 3             |
| 2     | turn go          | green  | red    | green  | red    | 6             |
| 3     | main yellow      | yellow | red    | yellow | red    | 3             |
| 4     | side go          | red    | red    | red    | green  | 4             |
| 5     | side yellow      | red    | red    | red    | yellow | 3             |

One ring takes 27 ticks. The main road has some green for 17 of them, and the
side road has green for 4. In coarse terms this is *main green → main yellow
→ side green → side yellow*. States 0–2 split the main-road green so that the
turning movement gets its own protected green. To protect it, the opposing
direction M2 is stopped first, with its own yellow.

## How the timing works

The controller has three blocks, all clocked by `clk`:

```
clk ─► tlc_clk_div ─tick─► tlc_fsm ─state─► tlc_light_decode ─► light_M1/S/M2/MT
```

* **`tlc_clk_div`** counts `DIV` board clocks and pulses `tick` for one
  clock at the end of each period. `tick` is a clock *enable*. It is not a
  divided clock, so the whole design stays in one clock domain.
* **`tlc_fsm`** holds the 3-bit state and a 4-bit dwell counter `count`. On
  each tick it compares `count` with the present state's terminal count
  `TC`:
  * while `count < TC`, the counter increments;
  * once `count == TC`, the state advances and the counter returns to 0.

  A state therefore lasts `TC + 1` ticks. The terminal counts are 7, 2, 5, 2,
  3 and 2, so a state that lasts 8 ticks has `TC = 7`. Keep this in mind when
  you retime the design. Between ticks, nothing changes.
* **`tlc_light_decode`** is the output table above, written as a case
  statement. Its only input is the registered state, so the lamps change one
  clock after the edge on which the state changes, and only then. The unused
  state codes 6 and 7 show red on every head.

`rst` is asynchronous and active high. It clears the divider and the dwell
counter, and puts the machine in state 0 (main road green).

### Timing at the default parameters

`TICK_DIV = 100_000_000`, so the tick is 1 Hz from a 100 MHz clock. The
phases then last 8 s, 3 s, 6 s, 3 s, 4 s and 3 s, and a ring takes 27 s.
With `TICK_DIV = 1`, the machine steps on every clock. A ring then takes 27
clocks, and `count` runs 0..7, 0..2, 0..5, 0..2, 0..3, 0..2. This is the
cycle-level behaviour the reference waveforms of this controller show.

## Files

| file | contents |
|------|----------|
| `rtl/tlc_pkg.sv` | `light_t` (lamp codes), `state_t` (states 0..5), `lights_t` (the four heads), `COUNT_W`, default terminal counts |
| `rtl/tlc_clk_div.sv` | tick generator, parameter `DIV` |
| `rtl/tlc_fsm.sv` | state register and dwell timer, parameters `TC_S0`..`TC_S5` |
| `rtl/tlc_light_decode.sv` | state → lamp codes |
| `rtl/tlc_top.sv` | top: `clk`, `rst`, `light_M1`, `light_S`, `light_M2`, `light_MT` (3 bits each), parameter `TICK_DIV` |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_tlc_top_long.sv` |

The FSM has assertions built in. The dwell counter never passes its terminal
count, and the state is always one of the six legal codes. The decoder
asserts that the side road is released only while all main-road heads are
red.

## Where this design makes its own choices

The state ring, the dwell times, the lamp codes, the port names, the 3-bit
state and 4-bit counter widths, and the asynchronous active-high reset are
those of the reference design. The following are choices of this
implementation:

* **Tick rate.** The reference design specifies a clock divider that derives
  the timing from the 50 or 100 MHz board clock, but it gives no tick rate.
  The default of one tick per second at 100 MHz is an assumption. Set
  `TICK_DIV` to `f_clk / f_tick` for other boards or durations.
* **Divider structure.** A simple modulo-`DIV` counter whose output is an
  enable pulse. Its first tick comes `DIV` clocks after reset.
* **Signal-head meaning.** M1 and M2 are read as the two through directions
  of the main road, MT as the main-road turn and S as the side road. Only the
  names come from the reference design.
* **State encoding.** Binary 0..5. A synthesis tool may re-encode it, for
  example as one-hot.
* **Unused states** decode to all red.
* **"One green at a time" is read per road.** Two main-road heads can be
  green together: M1 with M2 in state 0, and M1 with MT in state 2. This
  matches the reference waveforms. A stricter reading of its text, that only
  one direction may ever be green, would not allow it. What the design
  guarantees, and asserts, is that the side road and the main road are never
  released at the same time.
* **The reference simulation has no divider.** It steps the machine on every
  clock, and its synthesized netlist has only the state and count registers.
  The divider here follows the reference's description of the design's
  structure. With `TICK_DIV = 1`, the cycle behaviour is identical to that
  simulation.

There are no vehicle sensors, pedestrian phases, emergency pre-emption or
multi-junction coordination. The reference design names these only as future
work.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Each also has a watchdog that counts a failure if the run hangs.
With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -y rtl +libext+.sv rtl/tlc_pkg.sv tb/tb_tlc_top.sv --top-module tb_tlc_top
./obj_dir/Vtb_tlc_top
```

To run another testbench, substitute its name: `tb_tlc_fsm`,
`tb_tlc_light_decode`, `tb_tlc_clk_div` or `tb_tlc_top_long`.

* `tb_tlc_fsm` runs a reference model of the ring in step with the FSM. It
  checks state and count on every clock: first with `tick` held high (each
  ring must take 27 clocks), then with random ticks, then across an
  asynchronous reset in mid-state.
* `tb_tlc_light_decode` checks all eight state codes against the table.
* `tb_tlc_clk_div` checks the position of the tick at `DIV = 5` and
  `DIV = 1`, and checks that reset restarts the count.
* `tb_tlc_top` runs the whole controller at `TICK_DIV = 3` and compares the
  four outputs with a cycle-level model on every clock. It counts each
  mechanism and fails if any never occurs: each of the six phases, divider
  cycles without a tick, state advances, side-road release, yellow
  clearance (no head goes from green straight to red), and a mid-ring reset.
* `tb_tlc_top_long` runs a complete ring at `TICK_DIV = 10_000_000`. It
  checks every phase's lamps and its duration in clocks, and takes one to
  two minutes.

The default `TICK_DIV = 100_000_000` puts 2.7·10⁹ clocks in one ring, which
takes over 20 minutes in Verilator. A full ring at the default has been run
with the same checks as `tb_tlc_top_long` (each phase's lamps, and each phase
lasting exactly `(TC + 1) * 100 000 000` clocks) and passed. There is no full-default testbench, because it is too slow for
routine regression. The largest size in the regression set is
`TICK_DIV = 10_000_000`.
