# Three-digit password lock state machine

An electronic key for a cabinet door or a safe deposit box: the user enters a
three-digit code, one 4-bit digit per clock, and the lock lights one more
output for every correct digit in a row. The code is **5, 2, 7**. After `5`
output Y0 comes on, after `5 2` Y0 and Y1, after `5 2 7` all three, Y0, Y1
and Y2; Y2 is the "code accepted" signal. Any wrong digit starts over.

The design is a four-state Moore machine with a 3-bit state register. It is
small enough for a 22V10-class programmable logic device: 3 state flip-flops,
6 inputs and 3 outputs.

## The state machine

| state | code | meaning               | Y0 | Y1 | Y2 |
|-------|------|-----------------------|----|----|----|
| A     | 000  | idle                  | 0  | 0  | 0  |
| B     | 001  | `5` entered           | 1  | 0  | 0  |
| C     | 010  | `5 2` entered         | 1  | 1  | 0  |
| D     | 011  | `5 2 7` entered       | 1  | 1  | 1  |

A digit is `{X3, X2, X1, X0}`, X0 the least significant bit: 5 = 0101,
2 = 0010, 7 = 0111. All four bits are compared, so X3 must be 0.

Transitions on each rising clock edge:

- A goes to B on 5. Otherwise it stays in A.
- B goes to C on 2. Otherwise it goes back to A.
- C goes to D on 7. Otherwise it goes back to A.
- D always goes back to A.
- The unused codes 100 to 111 also go to A.
- RESET (asynchronous, active high) forces A at any time.

Some points need care:

- **One digit per clock.** The input is sampled on every rising edge. A digit
  held for two clocks counts as two digits, so `5 5 2 7` does not unlock.
  Clock the machine once per keypress, for example from a debounced "enter"
  strobe. Do not clock it from a free-running oscillator.
- **Latency.** The outputs are decoded from the state alone. Each one changes
  one clock edge after its digit is sampled, never in between.
- **Y2 lasts one clock.** State D has no condition for staying, so the
  machine leaves it on the next edge whatever the input. To hold a door open,
  stretch or latch Y2 outside this design.
- **No partial restart.** A wrong digit always goes back to A. This is true
  even when the wrong digit is itself a `5`. So `5 5 2 7` fails, while
  `5 5`, then a new `5 2 7`, succeeds. The lock is a plain sequence
  checker, not a sliding-window matcher.

## Files

| file | contents |
|------|----------|
| `rtl/password_pkg.sv` | The state enum `state_e` (A to D with the codes above), `digit_t`, the widths and the default code digits. |
| `rtl/password_fsm.sv` | The state machine. It has a state register, next-state logic and output decode. Parameters `DIGIT0`, `DIGIT1` and `DIGIT2` default to 5, 2 and 7. Ports are `clk`, `rst`, `digit[3:0]` and `y[2:0]`, where `y = {Y2,Y1,Y0}`. It has two assertions: the outputs are always a thermometer code (000, 001, 011, 111), and the state only steps forward by one or falls back to A. |
| `rtl/peihong.sv` | The top level, with the device's pin names: `CLK`, `RESET`, `X0`..`X3`, `Y0`..`Y2`. It has no parameters. The comment gives the 22V10 pin numbers of the original fit, which are CLK 1, RESET 3, X0..X3 on 5..8, Y0 19, Y1 18 and Y2 17. |
| `tb/tb_password_fsm.sv` | Unit test against a reference model. The model counts consecutive correct digits. |
| `tb/tb_peihong.sv` | End-to-end test of the top as built. |

## Where this RTL makes its own choices

- The code digits are parameters of `password_fsm`, which is new here. The
  top keeps them at 5, 2 and 7. To change the code, set `DIGIT0..DIGIT2` on
  the instance in `peihong.sv`.
- The original describes only three facts about D: its outputs, that its
  single exit is an "else" transition, and that every unmatched case returns
  to A. Leaving D unconditionally follows from that.
- The original summary gives the code as three bits, X2..X0. The four-bit
  comparison, with X3 = 0, follows the state-diagram conditions and the truth
  table. If X3 should be ignored, compare `digit[2:0]` instead.
- The machine needs nothing more than the PLD resources above. There is no
  lockout after repeated failures, and no output hold or keypad interface:
  none was part of the design.

## Verification

Both testbenches compare the outputs after every clock edge with an
independent model. The unit test also checks, before each edge, that the
outputs have not yet changed.

The unit test covers these cases:

- the correct code
- a wrong digit at each of the three positions
- a repeated digit
- a digit that matches only in its low three bits
- the digits in the wrong order
- a reset between clock edges
- 3000 random digits biased towards the code

The end-to-end test counts each behaviour and fails if any never happens.
The behaviours are:

- unlock
- wrong first digit
- wrong second digit
- wrong third digit
- return from D
- asynchronous reset

With Verilator 5:

    verilator --binary --timing --assert rtl/password_pkg.sv rtl/password_fsm.sv \
        rtl/peihong.sv tb/tb_peihong.sv --top-module tb_peihong
    ./obj_dir/Vtb_peihong

Each test ends with `TB_RESULT checks=N failures=0`. Both run in well under
a second.

Lint with `-Wall` reports one warning, SYNCASYNCNET on the reset. The reset
is used asynchronously by the state register and as `disable iff` in the
assertions. This is intended.
