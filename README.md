# 3x3 keypad decoder

A membrane keypad is a grid of switches: each key joins one row conductor to
one column conductor when pressed. This design reads the nine digit keys 1..9
of such a keypad (the upper-left 3x3 part of a 4x4 pad) and shows the binary
value of the key being held on four LEDs. All LEDs are dark while no key is
pressed. It targets a small FPGA board with a 50 MHz oscillator, eight LEDs
and a pushbutton. Only single presses are decoded, and the switches are not
debounced.

## How scanning works

The FPGA drives the three row lines `row[3:1]` and reads the three column
lines `col[3:1]`. The column inputs have pull-ups, so a column reads 1 unless
a pressed key connects it to a row that is driven low.

A three-state machine, clocked at 10 kHz, drives one row low at a time:

| state (= `row[3:1]`) | row driven low | keys on it |
|---|---|---|
| `011` | row(3) | 1 2 3 |
| `101` | row(2) | 4 5 6 |
| `110` | row(1) | 7 8 9 |

On each clock edge:

* if `col == 3'b111` (no key in the driven row is down), the machine moves on:
  `011 -> 101 -> 110 -> 011`;
* otherwise it stays where it is.

So when a key is pressed the scan runs on until it reaches that key's row, at
most two clock edges (200 us) later. Then the key pulls its column low and the
scan stops there for as long as the key is held. The state code is the row
pattern itself, so the state register drives the row pins with no output
logic.

The key value comes straight from combinational logic on the registered row
and the live columns:

    value = 3*r + c + 1     r = 0,1,2 for row(3),row(2),row(1) low
                            c = 0,1,2 for col(3),col(2),col(1) low

Any other row/column combination gives 0. That covers no key, two keys in the
same row, and an invalid row code. For example `row=011, col=011` is key 1 and
`row=110, col=110` is key 9. The LEDs therefore change in the same cycle as
the row reaches the key, and they go dark as soon as the key is released.
Nothing holds a value after release.

The columns go into the state machine with no synchroniser. This is deliberate.
A column only means something in answer to the row that is being driven right
now. A two-flop synchroniser would hand the machine a column value from a row
it has already left, and the scan would stop on the wrong row. The price is
that a press or release close to a clock edge can make the flip-flops
metastable. At a 10 kHz clock there is ample time for that to settle.

## Clock and reset

* **Scan clock.** On the board, a vendor PLL component makes 10 kHz (`c0`)
  from the 50 MHz input (`inclk0`). `rtl/clock_pll.sv` is a behavioural stand-in
  with the same ports: it divides by `DIVIDE = 5000` with a counter and gives a
  50 % duty cycle. Swap in the board's own clock component for a real build. The
  counter would also synthesise, but it has no lock detection or phase
  behaviour.
* **Reset.** `key0_n` is the active-low pushbutton KEY(0). It is synchronous
  to the scan clock and selects state `011`. There is also a second route:
  every code other than the three valid ones returns to `011` on the next
  edge. This includes `000`, the value the flip-flops hold at FPGA power-up.
  The design therefore starts cleanly even if the button is never pressed.

## Board connection

The keypad's 8-pin ribbon goes to the board's GPIO-0 header. Keypad pin 1
(the A-B-C-D column) and pin 5 (the `*`-0-#-D row) are unused.

| keypad pin | keys along it | signal | GPIO | FPGA pin | cable pin |
|---|---|---|---|---|---|
| 8 | 1 2 3 | `row[3]` | GPIO_08  | A5 | 13 |
| 7 | 4 5 6 | `row[2]` | GPIO_010 | B6 | 15 |
| 6 | 7 8 9 | `row[1]` | GPIO_012 | B7 | 17 |
| 4 | 1 4 7 | `col[3]` | GPIO_016 | C8 | 21 |
| 3 | 2 5 8 | `col[2]` | GPIO_018 | E7 | 23 |
| 2 | 3 6 9 | `col[1]` | GPIO_020 | E8 | 25 |

The three `col` pins need their internal weak pull-ups turned on in the
FPGA's pin settings. The RTL assumes they are there.

## Files

| file | module | role |
|---|---|---|
| `rtl/keypad_pkg.sv` | `keypad_pkg` | scan-state enum (`SCAN_ROW3/2/1`), line and value types, `COL_IDLE` |
| `rtl/row_scanner.sv` | `row_scanner` | the three-state scan machine |
| `rtl/key_decode.sv` | `key_decode` | row/column to key value, combinational |
| `rtl/clock_pll.sv` | `clock_pll` | behavioural model of the 50 MHz to 10 kHz clock component |
| `rtl/keypad_decoder.sv` | `keypad_decoder` | top level |
| `tb/keypad_model.sv` | `keypad_model` | switch matrix plus pull-ups, for simulation |
| `tb/tb_*.sv` | | self-checking testbenches, one per module |

Top-level ports of `keypad_decoder` (parameter `DIVIDE`, default 5000):

| port | dir | width | meaning |
|---|---|---|---|
| `clock_50` | in | 1 | 50 MHz board clock |
| `key0_n` | in | 1 | pushbutton, low resets the scanner |
| `col` | in | 3 | `col[3:1]` from the keypad, pulled up |
| `row` | out | 3 | `row[3:1]` to the keypad, one low at a time |
| `led` | out | 8 | `led[3:0]` = key value 1..9 or 0, `led[7:4]` always 0 |

Vectors are declared `[2:0]`, so bit 2 is row(3)/col(3) and bit 0 is row(1)/col(1).

## Verification

Each testbench checks its outputs against values it works out itself, and
ends with a `TB_RESULT checks=N failures=M` line.

* `tb_key_decode` covers all 64 row/column combinations. It also scans each
  key through the keypad model and checks that each key is seen in exactly
  one row.
* `tb_row_scanner` runs a reference model of the scan rule clock by clock.
  It covers every non-idle column pattern in every row, reset in mid-scan,
  and every invalid state code (forced into the register). It also presses
  each key at random times and checks that the scan stops on the right row
  within two clocks.
* `tb_clock_pll` checks 5000 input edges per output period, 2500 of them
  high, and a 100 us period.
* `tb_keypad_decoder` runs the top at its default parameters (real 50 MHz and
  10 kHz timing). A keypad model closes the loop. The LEDs are compared with
  the expected value on every 50 MHz cycle, and the scan rule is checked on
  every scan edge. The test first resets the design, then loads the all-zero
  power-up code, then presses every key twice in shuffled order at random
  times. For each press it checks the two-edge bound, that the row and LEDs
  stay steady while the key is held, and that the LEDs go dark on release.
  It counts resets, advances, wrap-arounds, holds, recoveries, releases and
  each decoded key, and fails if any of these never happened. It takes about
  a second.

Two testbenches reach into the design hierarchically to force the state
register: `tb_row_scanner` (`dut.state_q`) and `tb_keypad_decoder`
(`dut.u_scanner.state_q`, and it watches `dut.scan_clk`). Keep those names if
you rename internals.

To run a testbench with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        --top-module tb_keypad_decoder rtl/keypad_pkg.sv tb/tb_keypad_decoder.sv
    ./obj_dir/Vtb_keypad_decoder

## Limits and choices made here

* No debouncing and no latching of key presses. The LEDs show a key only while
  it is held. Contact bounce can make the LEDs flicker for a few scan clocks.
* When two keys are held, the result depends on their rows. If they share a
  row, the LEDs show 0. If they are in different rows, the scan stops on
  whichever row it reaches first and shows that key.
* The scan order (row(3), row(2), row(1)) is a choice. A scanner that runs
  the other way decodes exactly the same way.
* The reset button and power-up recovery are both built in. Either one alone
  would be enough.
* `clock_pll` is a model, not the real PLL.
