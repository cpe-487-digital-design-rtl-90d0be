# Four-digit hexadecimal calculator

A small FPGA design that turns a board with a 16-key matrix keypad, four
push-buttons and four multiplexed 7-segment digits into a hex calculator.
You type a number of up to four hex digits on the keypad, press `+` or `-`,
type a second number and press `=`. The display then shows the sum or the
difference, modulo 2^16. `clear` sets everything back to zero at any time.
Working in hexadecimal keeps the display path trivial: each 4-bit digit maps
directly to one 7-segment pattern, so no binary-to-decimal conversion is
needed.

The design targets a Digilent Nexys2-class board with a 50 MHz oscillator and
a PmodKYPD keypad. Everything runs from that one clock.

## Blocks

```
                 +-----------+  kp_tick   +--------+ hit, value +-----------+ display +----------+
 clk_50MHz ----->| timebase  |----------->| keypad |----------->| calc_fsm  |-------->| leddec16 |--> SEG7_anode[3:0]
                 |  21-bit   |  sm_tick   |        |            |           |         |          |--> SEG7_seg[6:0]
                 |  counter  |------------------------------------>         |         |          |
                 |           |  led_mpx   +--------+            +-----------+         |          |
                 |           |------------------------------------------------------->|          |
                 +-----------+             ^      |              ^  ^  ^  ^           +----------+
                                   KB_row -+      +-> KB_col     |  |  |  bt_clr (also resets timebase, keypad)
                                                           bt_plus bt_minus bt_eq
```

| File | Role |
|---|---|
| `rtl/hexcalc_pkg.sv` | word and digit types, controller state and operation enums, hex to 7-segment function |
| `rtl/timebase.sv` | free-running counter; keypad tick, controller tick, digit select |
| `rtl/keypad.sv` | column scanner and key decoder |
| `rtl/calc_fsm.sv` | calculator controller with the accumulator and operand registers |
| `rtl/leddec16.sv` | digit multiplexer, 7-segment decoder, leading zero blanking |
| `rtl/hexcalc.sv` | top level |

## Timing: three rates from one counter

This is the part that makes the rest work, so it comes first. A 21-bit
counter runs on the 50 MHz clock. Three rates are taken from it:

| Use | Counter bits | Period at 50 MHz |
|---|---|---|
| keypad sampling (`kp_tick`) | rising edge of bit 15 | 2^16 cycles = 1.31 ms |
| display digit select (`led_mpx`) | bits 18:17 | a new digit every 2.62 ms (381 Hz); each digit refreshed 95 times a second |
| controller step (`sm_tick`) | rising edge of bit 20 | 2^21 cycles = 41.9 ms |

The ticks are one-cycle enables, high in the cycle just before the tapped
bit goes from 0 to 1. A register clocked by `clk` and enabled by a tick
therefore changes at the same instant as a register clocked by the counter
bit itself would. The design has a single clock domain and no derived clocks.

The slow controller step does the debouncing. There is no separate debouncer
and no edge detector. The controller samples keys and buttons only once per
41.9 ms. After taking a digit it waits until it sees the key released at a
later step. Contact bounce, which lasts a few milliseconds, therefore can't
enter a digit twice. Two consequences for a user:

* A press must last through at least one controller step to be seen. Add the
  keypad's own delay of up to four sampling ticks (5.2 ms). Anything held
  for about 50 ms or more is seen for certain; a quicker tap may be missed.
* A key held down enters one digit, however long it is held. The buttons are
  level-sensitive. Holding `+` or `=` is harmless, because the state they
  lead to ignores them.

## Keypad scanner

The keypad is a 4×4 switch matrix. The row lines are pulled up on the keypad
board. A pressed key shorts its row to its column. On each `kp_tick` the
scanner does two things:

1. It stores the row lines into a 4-bit vector for the column that was
   driven low during the past tick period.
2. It drives the next column low, keeping the other three high. The column
   codes are `1110`, `1101`, `1011`, `0111`, and any other code returns to
   column 1.

A full scan takes four ticks (5.2 ms). The decoder looks at the four stored
vectors together, column 1 first, and within a column row 1 first. The
first `0` it finds gives `hit = 1` and that key's value. No `0` gives
`hit = 0` and `value = 0`. The decoder expects one key at a time; with
several down, the first in that search order is reported. The layout is:

```
 1 2 3 A      row 1
 4 5 6 B      row 2
 7 8 9 C      row 3
 0 F E D      row 4
 col 1 2 3 4
```

## Calculator controller

Two 16-bit registers hold the numbers. `acc` holds the first number and
later the result; `operand` holds the second number. A one-bit register
remembers whether `+` or `-` was pressed. Digits enter from the right:
`x <= {x[11:0], key}`. After four digits, the oldest digit drops out of the
top.

| State | Shows | Event (checked in this order) | Action | Next |
|---|---|---|---|---|
| ENTER_ACC | acc | key down | shift key into acc | ACC_RELEASE |
| | | `+` | remember add | START_OP |
| | | `-` | remember subtract | START_OP |
| ACC_RELEASE | acc | no key down | | ENTER_ACC |
| START_OP | acc (old operand while a key is down) | key down | operand = key | OP_RELEASE |
| OP_RELEASE | operand | no key down | | ENTER_OP |
| ENTER_OP | operand | `=` | acc = acc ± operand | SHOW_RESULT |
| | | key down | shift key into operand | OP_RELEASE |
| SHOW_RESULT | acc | key down | acc = key | ACC_RELEASE |

`clear` works asynchronously. It zeroes `acc` and `operand`, selects
addition and returns to ENTER_ACC.

A result can't be carried straight into a new operation: `+` is ignored in
SHOW_RESULT, and the first key typed there starts a new first number.

Arithmetic wraps. A carry out of an addition and a borrow out of a
subtraction are dropped, so `1 - 2` shows `FFFF`. There is no overflow
indicator.

In START_OP, the display shows the previous `operand`, not `acc`, for the
step in which the first digit of the second number is seen. This lasts at
most one controller step. The next step shows the new operand.

## Display

The display has four common-anode digits sharing seven segment lines, and
all these lines are active low. `led_mpx` selects a digit, 0 being the
rightmost. `leddec16` takes that digit's anode low and puts its nibble's
pattern on the segment lines. Segment bit 6 is segment `a` and bit 0 is
segment `g`.

With `LZ_SUPPRESS = 1` (the default), leading zeros are blanked. A digit is
lit only if it, or a digit to its left, is non-zero. For example, `0023`
shows as `23`. The rightmost digit is always lit, so zero shows as `0` and
the display never goes dark. With `LZ_SUPPRESS = 0`, all four digits are
always shown.

## Ports and board pins

| Port | Dir | Board use (Nexys2) |
|---|---|---|
| `clk_50MHz` | in | 50 MHz oscillator, B8 |
| `bt_clr` | in | BTN3 (H13), clear |
| `bt_plus` | in | BTN0 (B18), `+` |
| `bt_minus` | in | BTN2 (E18), `-` |
| `bt_eq` | in | BTN1 (D18), `=` |
| `KB_col[4:1]` | out | keypad columns, JA1: M15, L17, K12, L15 |
| `KB_row[4:1]` | in | keypad rows, JA1: M16, M14, L16, K13 |
| `SEG7_seg[6:0]` | out | [0..6] = H14, J17, G14, D16, D17, F18, L18 |
| `SEG7_anode[3:0]` | out | [0..3] = F17, H17, C18, F15 |

Buttons are active high. The keypad uses all 12 pins of connector JA1.

## Parameters of `hexcalc`

| Parameter | Default | Meaning |
|---|---|---|
| `CNT_W` | 21 | timing counter width |
| `KP_BIT` | 15 | counter bit whose rising edge is the keypad tick |
| `SM_BIT` | 20 | counter bit whose rising edge is the controller step |
| `MPX_LSB` | 17 | low bit of the 2-bit digit select |
| `LZ_SUPPRESS` | 1 | blank leading zeros |

For a different board clock, move the taps so that the periods stay near
those in the timing table. The controller step must stay well above the
keypad's full-scan time (four keypad ticks) and above the bounce time of
the buttons. The word width is fixed at four digits in `hexcalc_pkg`.

## Where this RTL departs from the original lab design

The behaviour of the state machine, the scanner, the decoder and the
display follows the original lab design. These points are this
implementation's own:

* One clock with enables replaces the counter bits used as clocks. The
  update instants are the same.
* `clear` also resets the timing counter and the keypad scanner. The original
  reset only the calculator registers and relied on power-up values for the
  rest.
* Subtraction and leading zero blanking, which the original gives as
  extensions of the basic adder, are built in. If `+` and `-` are pressed
  together, addition wins.
* With blanking on, the rightmost digit stays lit for a zero word, rather
  than following the blanking rule to the letter and showing nothing.
* Like the original, the button and row inputs have no synchronising
  flip-flops. They feed logic sampled only at the slow ticks. If a board
  shows metastability trouble, add two flip-flops on each input in
  `hexcalc`. `clear` acts asynchronously, and its release is not
  synchronised either.

## Simulation

All testbenches check their own results and print one line
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/hexcalc_pkg.sv tb/hexcalc_tb_pkg.sv tb/tb_hexcalc.sv --top-module tb_hexcalc
./obj_dir/Vtb_hexcalc
```

Replace `tb_hexcalc` with any of:

| Testbench | What it checks | Run time |
|---|---|---|
| `tb_timebase` | tick positions cycle by cycle on a small counter; tick spacing and digit rate at the default taps | seconds |
| `tb_keypad` | column walk, all 16 keys (value, press and release within four ticks, the column where each is found), two-key priority | < 1 s |
| `tb_leddec16` | segments and anodes for every digit value in every position and random words, with and without blanking | < 1 s |
| `tb_calc_fsm` | 60 random calculations against plain arithmetic, plus input priorities, held keys, enable-only stepping and asynchronous clear | < 1 s |
| `tb_hexcalc` | the whole design at reduced timing (`CNT_W=8`, `KP_BIT=1`, `SM_BIT=7`, `MPX_LSB=2`). A simulated user types on a keypad model and reads the display back from the anode and segment lines, for 24 random calculations. It also counts every mechanism: long numbers, add, subtract, carry, borrow, held keys, chaining from a result, clear, blanking, all four digits lit | seconds |
| `tb_hexcalc_full` | the top at its default parameters (real 50 MHz rates): `A7 + 5C = 103`, then `103 - 1F4 = FF0F` (about 110 million cycles) | about 2 min |

Helpers in `tb/`:

* `pmodkypd_model.sv` is a behavioural model of the key matrix.
* `hexcalc_user.sv` presses keys and buttons and decodes the display.
* `hexcalc_tb_pkg.sv` builds the expected segment patterns from the names
  of the lit segments, independent of the design's code table.

All of these pass, and each unit testbench fails on a deliberately broken
copy of its block.

No timing analysis or hardware run is part of this verification. The
design is small (about 80 flip-flops) and, at 50 MHz, it has nothing
critical in timing.
