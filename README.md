# Two-vehicle logic controller from a Control Interpreted Petri net

This is a small synchronous logic controller. It moves two vehicles back and forth on
separate tracks. Its behaviour was first written as a UML activity diagram. That diagram
was turned into a Petri net, and the net was reduced to 10 places and 9 transitions.
The RTL here is the net's global-state form: the controller holds which set of places is
marked, not one flip-flop per place. Every clock edge is one step of the net.

## The process

```
   W1:   a  o============================o  b        sensors a, b; drives r1 (right), l1 (left)
   W2:   c  o============================o  d        sensors c, d; drives r2 (right), l2 (left)
   start button: m
```

1. Both vehicles rest at their starting points, W1 at `a` and W2 at `c`.
2. Pressing `m` starts both vehicles moving right in the same clock (`r1 = r2 = 1`).
3. Each vehicle stops when it reaches its ending point (`b` clears `r1`, `d` clears `r2`).
   The two can arrive in either order.
4. Once both have arrived, W1 returns alone (`l1`).
5. When W1 is back at `a`, W2 returns (`l2`). When W2 is back at `c`, the cycle can start again.

The right-hand moves run in parallel; the returns run one after the other.

## Global states

The net's places are P1, P2, P3, P6, P7, P10, P11, P12, P13 and P15. Nine combinations
of marked places can be reached. Each one is a state of `lc_state_machine` (`lc_pkg::gstate_e`):

| state  | meaning                                | leaves on | to      | actuator change                  |
|--------|----------------------------------------|-----------|---------|----------------------------------|
| P1     | initial place                          | always    | P2P3    | –                                |
| P2P3   | both vehicles ready (fork)             | m         | P6P7    | r1 := 1, r2 := 1                 |
| P6P7   | both moving right                      | b         | P7P10   | r1 := 0                          |
|        |                                        | d         | P6P11   | r2 := 0                          |
| P7P10  | W1 arrived, W2 still moving            | d         | P10P11  | r2 := 0                          |
| P6P11  | W2 arrived, W1 still moving            | b         | P10P11  | r1 := 0                          |
| P10P11 | both arrived (join)                    | always    | P12     | –                                |
| P12    | —                                      | always    | P13     | –                                |
| P13    | W1 returning                           | a         | P15     | l1 := 0, l2 := 1                 |
| P15    | W2 returning                           | c         | P1      | l2 := 0                          |

In P13, `l1` is set on every clock in which the input is not `a`. In practice it goes to 1
on the first clock in P13. In every other case, each actuator keeps its value.
Because a transition sets or clears an actuator, the actuators are set/reset registers.
They are not decoded from the state.

P2 and P3 leave on the same condition, `m`, so both of their transitions fire in the
same step. That is why P2P3 goes straight to P6P7, and why P2P7 and P3P6 are not states.

## The input variable: one sensor per step

The controller is designed on the premise that it acts on one sensor per step. On each
clock, `lc_input_encoder` stores which sensor the controller will act on next, as one
value: none, m, a, b, c or d. Only sensors that the current state waits for are stored:

| state                 | awaited |
|-----------------------|---------|
| P2P3                  | m       |
| P6P7                  | b, d    |
| P6P11                 | b       |
| P7P10                 | d       |
| P13                   | a       |
| P15                   | c       |
| P1, P10P11, P12       | none    |

This filter has a second effect. A vehicle parked on its switch keeps the sensor on,
for example `a` and `c` while both vehicles wait. Such a sensor has no effect once the
state no longer waits for it.

The one case where two awaited sensors can be active together is P6P7, when both vehicles
arrive in the same clock. This design takes `b` first. `b` is still active and still awaited
on the next step, so it is stored a second time. Only after that is `d` taken, in P7P10.

## Timing

All three registers (input variable, state, actuators) update on the same edge. Each
reads only the values from before that edge. No combinational path runs from a sensor
to an actuator.

- A sensor that becomes active before edge *k* is stored in the input variable at edge *k*.
  The state change and actuator change it causes happen at edge *k+1*. So the reaction
  time is two clocks.
- Each unconditional step (P1→P2P3, P10P11→P12, P12→P13) takes one clock. W1 therefore starts back
  three clocks after the second vehicle has been stopped.
- If W1 arrives first, or both arrive together, `d` cannot be taken before the third clock
  after `b` became active. This is the cost of the repeated `b` described above.

Reset (`rst_n`, active low, asynchronous) puts the controller in P1 with the input
variable at none and all actuators off.

## Requirements checked as assertions

`logic_controller` asserts these properties on every clock outside reset:

- `r1` and `l1` are never both on; the same holds for `r2` and `l2`.
- An input of `m` gives `r1 = r2 = 1` on the next step.
- An input of `b` gives `r1 = 0` on the next step, `d` gives `r2 = 0`, `a` gives `l1 = 0` and `c` gives `l2 = 0`.

Liveness does **not** hold. The requirement "after `b`, W1 will eventually be sent back"
fails. If W2 never reaches `d`, the controller stays in P7P10 forever. This is intended:
the controller has no error or timeout handling. A stuck vehicle must be pushed home by
hand, and the controller reset.

## Files

| file | contents |
|------|----------|
| `rtl/lc_pkg.sv` | state and input enums, sensor and actuator structs |
| `rtl/lc_input_encoder.sv` | input variable register with the per-state sensor filter |
| `rtl/lc_state_machine.sv` | global-state register and next-state table |
| `rtl/lc_output_logic.sv` | r1, r2, l1, l2 set/reset registers |
| `rtl/logic_controller.sv` | top: the three registers, plain-signal ports, assertions |
| `tb/lc_ref_pkg.sv` | reference model: the net as a list of transitions with their actions |
| `tb/vehicles_model.sv` | behavioural model of the two vehicles and their end switches |
| `tb/tb_*.sv` | self-checking testbenches, one per module |

The top's ports are `clk`, `rst_n`, the sensors `m a b c d`, and the actuators `r1 r2 l1 l2`.
Two more ports are for observation only: `state` (4 bits, a `gstate_e` code) and
`input_code` (3 bits, an `input_e` code). The design has no parameters, since the sizes
are fixed by the process. It synthesizes to 11 flip-flops.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself with a watchdog.

- `tb_lc_input_encoder` applies all 32 sensor patterns in every state, then a random sequence.
- `tb_lc_state_machine` feeds random inputs, biased towards the awaited ones. It compares
  the state each clock against the reference transition list, and requires every state to be reached.
- `tb_lc_output_logic` applies every (state, input) pair, starting from each of the 16
  actuator values, and then a random sequence.
- `tb_logic_controller` runs the whole controller with the vehicle model in the loop. It covers:
  - work cycles with W1 arriving first, W2 first, both in the same clock, and very short tracks.
    The order of the moves and the clock-exact reaction times are checked, and the whole
    controller is compared against the reference on every clock.
  - the stuck-vehicle trace, P1 → P2P3 → (m) → P6P7 → (b) → P7P10, which then stays in
    P7P10 for 300 clocks.
  - 40,000 clocks of random sensor values. It counts the distinct (state, input, r1, r2,
    l1, l2) combinations it reaches. There are 9 × 6 × 16 = 864 possible combinations,
    and exactly 24 must be reached; this is checked.
  - counts of each mechanism (fork, either arrival order, simultaneous arrival, join, both
    returns, restart, stuck vehicle). A mechanism that never happened is counted as a failure.

Run one testbench with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/lc_pkg.sv tb/lc_ref_pkg.sv rtl/lc_input_encoder.sv rtl/lc_state_machine.sv \
  rtl/lc_output_logic.sv rtl/logic_controller.sv tb/vehicles_model.sv \
  tb/tb_logic_controller.sv --top-module tb_logic_controller
./obj_dir/Vtb_logic_controller
```

All of the testbenches run in well under a second.

## What is specified and what is chosen here

These parts follow the specification: the state list, the next-state table, the per-state
list of awaited sensors, the set/reset conditions of the four actuators, the initial
values, and the requirements used as assertions.

These parts are choices made in this design:

- the binary codes of states and inputs;
- the `b`-before-`d` priority when both arrive in the same clock;
- the asynchronous active-low reset;
- the assumption that the sensor wires are already synchronous to `clk` (there is no
  synchronizer or debouncer);
- bringing the state and input variable out as ports.

The controller is not built as one flip-flop per place, with a firing circuit per
transition. It is built from the net's global-state form. Both forms behave the same,
because the only two transitions that can fire together, the ones on `m`, are merged
into one step. Changing the controlled process means editing the three case statements,
plus the reference list in `tb/lc_ref_pkg.sv`.
