# FM0 / Manchester line encoders clocked by a pulse generator

Short-range vehicle radio links (DSRC: car-to-car and car-to-roadside,
e.g. electronic toll collection) use two DC-balanced line codes in the
baseband transmitter: FM0 and Manchester. This RTL implements the
transmit-side line coder that produces either code from one serial bit
stream. It contains three interchangeable encoder circuits: a conventional
two-flip-flop encoder and two single-flip-flop encoders in which FM0 and
Manchester share most of their logic. The flip-flops are clocked by short
pulses from a pulse generator rather than by the clock edge itself.

## The two line codes

Each bit occupies one cycle of the bit clock `CLK`. It is sent as two
half-bits, the first while `CLK` is high and the second while it is low.

**FM0** (bi-phase space). Call the half-bits of bit *t* A(t) and B(t).
- The line always changes level at a bit boundary: A(t) = ~B(t-1).
- A 0 also changes level in mid-bit, and a 1 does not: B(t) = A(t) for a 1
  and ~A(t) for a 0.

Together these give B(t) = X(t) xor B(t-1). So one bit of state, the last
half-bit sent, is all FM0 needs. Example, starting from a line at 1:

| bit X      | 0  | 1  | 1  | 0  | 1  |
|------------|----|----|----|----|----|
| FM0 A B    | 0 1| 0 0| 1 1| 0 1| 0 0|
| Manchester | 1 0| 0 1| 0 1| 1 0| 0 1|

**Manchester** is X xor CLK: ~X in the high half, X in the low half. It needs
no state.

## The three encoders

All three have the same mode input, `mode_e` in `encoder_pkg`: 0 is FM0 and
1 is Manchester.

### `fm0_manchester_2ff`: separate logic, two flip-flops

This is the straightforward circuit. DFF_B stores B(t) = X xor B(t-1)
through an XOR. DFF_A stores A(t) = ~B(t-1) through an inverter. A
multiplexer selected by `CLK` sends A in the high half and B in the low
half. A second XOR forms X xor CLK for Manchester, and a final multiplexer
picks one of the two codes by `mode`. Both codes are also brought out on
their own, as `fm0_code` and `manchester_code`.

Both flops load on the clock pulse at the start of a cycle. At that moment
they take the bit presented in the cycle that just ended. The **FM0 code of
a bit therefore comes out one cycle after the bit.** Manchester is
combinational and comes out in the same cycle. The FM0 flops keep running
while Manchester is selected.

### `sols_unbalanced` and `sols_balanced`: shared logic, one flip-flop

These encoders share logic between the two codes. The high half is "~Q or
~X" and the low half is "X xor Q or X". Q is the one flip-flop (DFF_B), and
it holds B(t-1).

- In the high half, a mode multiplexer picks Q (FM0) or X (Manchester), and
  the result is inverted. This gives A(t) = ~B(t-1) for FM0, or ~X for
  Manchester.
- In the low half, X xor Q gives B(t) for FM0. In Manchester mode Q is held
  at 0 by the flop's clear input, and the same gate then passes X.

So the only Manchester-specific hardware is the mode multiplexer and the
clear. DFF_A is gone: A(t) is simply ~Q.

The two variants differ only in where the inverter sits. That changes the
circuit's path balance, not its function:

- **unbalanced**: the inverter follows the mode multiplexer, and the low
  half uses a bare XOR. One path has a multiplexer and an inverter, the
  other a single XOR.
- **balanced**: the low half uses an XNOR. One inverter after the `CLK`
  multiplexer serves both paths, so both have the same depth.

These encoders code a bit **in the same cycle** it is presented. `X` must be
steady for the whole cycle, because the low half reads it combinationally.

**The clear input must be active in Manchester mode.** `clr_n` is active
low and asynchronous. The top level drives it as `rst_n && mode == FM0`.
Each module contains an assertion that fails if DFF_B is not 0 at a clock
pulse in Manchester mode. After a switch back to FM0, the line
state is 0, so the first FM0 half-bit is 1.

### Which value the single flip-flop stores

This is the least obvious part of the circuit. In the schematic, the flop's
D input is the code line itself, which is the output of the `CLK`
multiplexer. The flop fires on a pulse that starts when `CLK` rises. At
that instant the code line is still showing the low half, B(t), and the
flop must capture that value. Just after the edge, the multiplexer switches
to the high half.

In zero-delay RTL, that race would make the flop capture the wrong half.
The RTL therefore connects D directly to the low-half input of the
multiplexer. For `sols_balanced` that input is inverted, to match the
inverter after the multiplexer. This is the value the code line carries as
the flop samples. Timing-accurate simulation is not needed to get the right
result.

## Pulse generator (`pulse_gen`)

Each stage is a clock chopper. `CLK` is ANDed with a delayed and inverted
copy of itself, and the result drives a clock buffer. Every rising edge of
`CLK` thus becomes a pulse whose width equals the delay. A chain of stages
gives `N_PULSES` = 5 successive, non-overlapping pulses per clock edge.
Output 0 is the earliest, and it rises together with `CLK`. Only output 0
clocks the encoders. The other outputs are brought out of the top level.

The flops are modelled as edge-triggered on the rising edge of the pulse.
That is the behaviour of an explicit pulse-triggered flip-flop, in which
pulse generator and latch are separate circuits.

`pulse_gen` is a **behavioural model**. The pulse width comes from an analog
delay, which logic cannot express, so the model uses `#` delays:
`PULSE_WIDTH_NS` = 1.0 and `PULSE_STEP_NS` = 1.0. Both values are this
design's own choice. A synthesis tool ignores the delays and reduces each
output to `CLK & ~CLK`, a constant 0. The encoders behind it then collapse
as well. To build real hardware, replace `pulse_gen` with a
technology-specific pulse generator cell, or clock the encoders from `CLK`
directly. The encoder modules themselves are plain synthesizable RTL with a
clock input.

Five pulses at a 1 ns spacing occupy the first 5 ns after the rising edge.
Keep the `CLK` high phase longer than that, i.e. a period above 10 ns, or
change the parameters.

## Top level (`dsrc_encoder_top`)

One `pulse_gen` drives all three encoders, which share `clk`, `rst_n`,
`mode` and `x`:

| port             | dir | meaning                                              |
|------------------|-----|------------------------------------------------------|
| `clk`            | in  | bit clock; one bit per cycle, high half first        |
| `rst_n`          | in  | asynchronous reset of all flops, active low          |
| `mode`           | in  | `MODE_FM0` (0) or `MODE_MANCHESTER` (1)              |
| `x`              | in  | data bit; change it just after the clock pulse       |
| `clk_pulse[4:0]` | out | pulse train from the pulse generator                 |
| `code_2ff`       | out | two-flop encoder, selected code (FM0 one cycle late) |
| `fm0_2ff`        | out | two-flop encoder, FM0 code                           |
| `manchester_2ff` | out | two-flop encoder, Manchester code                    |
| `code_bal`       | out | balanced single-flop encoder                         |
| `code_unbal`     | out | unbalanced single-flop encoder                       |

The coded outputs go to the RF front end, which is not part of this RTL.
Neither is the rest of the DSRC baseband: modulation, error correction,
clock recovery and the receive path.

Drive `x` and `mode` a little after the rising edge of `clk`, after the
first clock pulse. The testbenches use 2 ns with a 20 ns clock.

## Where this design makes its own choices

The gate structure follows the published circuits: the gates, their
connections and the numbering of the multiplexer inputs. The following
points are this design's own:

- The behaviour of the clear input: active low, held active in Manchester
  mode, and driven from `mode` by the top level.
- `rst_n` on the two-flop encoder, and reset values of 0.
- Output 0 of the pulse generator as the encoders' clock, and all delay
  values in the pulse generator.
- Loading the single flip-flop from the low-half path (see above).
- Putting all three encoder variants side by side in one top level. They
  are alternatives. A product would keep one.

The published comparison is in gate delay: roughly 5.8 to 8.6 ns across
the variants, with and without pulse clocking. This RTL does not model or
reproduce those figures.

## Files

- `rtl/encoder_pkg.sv`: `mode_e`.
- `rtl/pulse_gen.sv`: pulse generator (behavioural).
- `rtl/fm0_manchester_2ff.sv`, `rtl/sols_unbalanced.sv`,
  `rtl/sols_balanced.sv`: the encoders.
- `rtl/dsrc_encoder_top.sv`: top level.
- `tb/tb_<module>.sv`: one self-checking testbench per module.

## Verification

Each encoder testbench computes the expected code from the rules above,
without reference to the RTL. It compares every output in the middle of every
half-bit, including the one-cycle latency of the two-flop encoder. It also
checks the five-bit example in the table against the constants shown there.
Each then runs a random stream with mode switches. Every testbench ends
with `TB_RESULT checks=N failures=M`, and a watchdog ends a hung run.

`tb_dsrc_encoder_top` runs the whole design at its default parameters, with
the real pulse generator. It covers about 2,000 random bits, mode switches
in both directions and several resets. It counts each mechanism (FM0 0-bit,
FM0 1-bit, Manchester bit, switches each way, reset, complete pulse train)
and fails if any count is zero. `tb_pulse_gen` checks the one-hot pulse
slots and each pulse's edge times against the parameters.

To simulate with Verilator, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
  rtl/encoder_pkg.sv tb/tb_dsrc_encoder_top.sv --top-module tb_dsrc_encoder_top
./obj_dir/Vtb_dsrc_encoder_top
```

Substitute any other `tb_*` module for the top-level one. `--timing` is
required, because the pulse generator and the testbenches use delays.
Verilator has two states only, so every testbench resets or initialises
what it reads.
