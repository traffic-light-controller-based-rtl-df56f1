# Fixed-time traffic light controller with unequal green times

A four-road junction has eight signals. Opposite signals are driven as pairs:
L1/L5 and L3/L7 stand on the two straight roads, and L2/L6 and L4/L8 on the
two cross roads. The straight roads are assumed to carry more traffic, so
their green phase lasts twice as long as a cross-road green: 16 seconds
against 8. A plain Moore state machine steps through the phases. Each state
has a fixed dwell time, and every lamp output depends on the present state
only.

## The cycle

After reset the controller repeats eight states. One clock pulse is one
second.

| State | Dwell (pulses) | L1/L5 | L2/L6 | L3/L7 | L4/L8 |
|:-----:|:--------------:|:-----:|:-----:|:-----:|:-----:|
| S0    | reset, then 4  | red   | red   | red   | red   |
| S1    | 4              | yellow| red   | red   | red   |
| S2    | 16             | green | red   | red   | red   |
| S3    | 4              | yellow| red   | red   | red   |
| S4    | 8              | red   | green | red   | red   |
| S5    | 4              | red   | red   | yellow| red   |
| S6    | 16             | red   | red   | green | red   |
| S7    | 4              | red   | red   | yellow| red   |
| S8    | 8              | red   | red   | red   | green |

After S8 the controller goes back to S1. S0 is entered only through reset. A
full cycle takes 64 pulses. Straight roads get 32 green pulses per cycle and
cross roads get 16.

Two details are worth noting:

- **Yellow before and after green.** A straight-road pair shows yellow both
  before its green (S1, S5, "get ready") and after it (S3, S7, "clear").
- **No yellow on cross roads.** The cross-road signals have only red and green
  lamps. They switch straight from green to red, and the yellow of the next
  straight pair follows.

## Lamp codes

The outputs carry codes, not one wire per lamp. The codes are defined in
`tlc_pkg`.

Straight signals (`L15`, `L37`) are 4 bits wide. They have four lamps: red,
yellow and two greens.

| Aspect         | Code      |
|----------------|-----------|
| red            | `4'b1001` |
| yellow         | `4'b1010` |
| green          | `4'b1100` |
| red, in S0     | `4'b0001` |

Cross signals (`L26`, `L48`) are 2 bits wide: red is `2'b10` and green is
`2'b01`.

This RTL's reading of the straight-road bits:

- bit 0 is the red lamp;
- bit 1 is the yellow lamp;
- bit 2 is the main green lamp;
- bit 3 is the second green lamp.

Bit 3 is lit in every state of the cycle and dark only in S0. That fits a
free-turn arrow, but it is an interpretation. If your board wires the lamps
another way, change the constants in `tlc_pkg`.

In S0 the cross signals show red (`2'b10`). They do not show `2'b01`, because
that code would mean green while the whole junction is meant to be red.

## Structure

```
            +-----------+  duration  +-----------------+
 clk,rst -->|  tlc_fsm  |----------->| tlc_dwell_timer |
            | state reg |<-----------|  up-counter     |
            | next state|   expire   +-----------------+
            +-----------+
                  | state
                  v
         +------------------+
         | tlc_output_logic |--> L15, L26, L37, L48
         +------------------+
```

- `rtl/tlc_pkg.sv`: the state enum `state_e` (S0..S8, binary in 4 bits), the
  lamp code constants and the `lamps_t` output struct.
- `rtl/tlc_fsm.sv`: the state register (D flip-flops with synchronous reset)
  and the next-state logic. It also outputs the dwell time of the present
  state. The state advances only when `expire` is high.
- `rtl/tlc_dwell_timer.sv`: an up-counter. It drives `expire` during the last
  pulse of a dwell and clears itself on that same pulse, so each state lasts
  exactly `duration` pulses.
- `rtl/tlc_output_logic.sv`: combinational decode from state to lamp codes.
- `rtl/traffic_light_controller.sv`: the top level. It sizes the counter from
  the largest time parameter.

## Timing

- **Clock.** `clk` is meant to run at 1 Hz. There is no prescaler. On a board
  with a faster oscillator, divide the clock down, or drive `clk` from a
  1-pulse-per-second enable.
- **Reset.** Reset is synchronous and active high. Every rising edge that sees
  `rst` high puts the controller in S0 and clears the counter.
- **Start-up.** After reset is released, the controller stays in S0 for
  `T_START` = 4 pulses, all red, and then enters S1. The clock period in which
  `rst` falls counts as the first of the four.
- **Output timing.** The lamp codes are decoded from the state register. They
  change on the same rising edge as the state and show no glitch between
  states.
- **Cost.** The design uses 9 flip-flops: 4 for the state and 5 for the
  counter.

## Parameters

All times are in clock pulses and must be 1 or more.

| Parameter          | Default | Meaning                                  |
|--------------------|---------|------------------------------------------|
| `T_START`          | 4       | S0 dwell after reset is released         |
| `T_YELLOW`         | 4       | every yellow state (S1, S3, S5, S7)      |
| `T_GREEN_STRAIGHT` | 16      | green on L1/L5 and L3/L7 (S2, S6)        |
| `T_GREEN_CROSS`    | 8       | green on L2/L6 and L4/L8 (S4, S8)        |

The counter width follows the largest of the four times.

## Choices made beyond the source description

- **Yellow after green.** The straight-road green is followed by a 4-second
  yellow (S3, S7) before the cross road turns green. One account of the
  simulated behaviour skips this yellow, which would give a 56-pulse cycle.
  This design keeps the eight-state cycle.
- **Start-up pause.** Reset is followed by a 4-pulse all-red start-up. Without
  it, S0 would be held only while reset is applied. Set `T_START = 1` to enter
  S1 one pulse after reset is released.
- **Output width.** The straight-road outputs are 4 bits wide, one bit per
  lamp. A 5-bit declaration would leave one bit unused.
- **Synchronous reset, binary state code.** These are this design's choices.
- **Unused state codes.** An unused state code goes back to S0.
- **Not included.** The board pinout and the LEDs are not part of the RTL.

## Simulation

Each module has a self-checking testbench in `tb/`. Each one prints a
`TB_RESULT checks=N failures=M` line and ends with `$finish`:

- `tb_tlc_dwell_timer` checks expire timing for dwells from 1 to 31, a change
  of duration in mid-dwell, and reset.
- `tb_tlc_fsm` drives `expire` by hand. It checks the state order over three
  cycles, the dwell reported for each state, holding without `expire`, and
  reset from mid-cycle.
- `tb_tlc_output_logic` checks the lamp codes of every state against the table
  above.
- `tb_traffic_light_controller` runs end to end at the default times. It
  compares every pulse with a reference schedule over three cycles, resets in
  the middle of S6, and runs again. It checks the 64-pulse cycle length and
  the 2:1 ratio of green time. It counts the reset hold, the start-up, entry
  into each state, the S8 to S1 wrap and the mid-cycle reset, and fails any of
  them that never happens.

To run one with Verilator:

```
verilator --binary --timing --assert -Wall -Wno-fatal --top-module tb_traffic_light_controller \
    rtl/tlc_pkg.sv rtl/tlc_dwell_timer.sv rtl/tlc_fsm.sv rtl/tlc_output_logic.sv \
    rtl/traffic_light_controller.sv tb/tb_traffic_light_controller.sv
./obj_dir/Vtb_traffic_light_controller
```

For the other testbenches, replace the top module and the last file. The
unit testbenches need only `tlc_pkg.sv` and their own module.

The timer has an assertion that `duration` is never zero.
