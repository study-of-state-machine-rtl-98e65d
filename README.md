# Keypad code entry system

A small, fully digital door-entry style lock. A 3x4 matrix keypad
(digits 0-9, `*` and `#`) is scanned one row at a time; every key press
is turned into a 4-bit code, and a finite state machine collects four
digits and compares them with a stored code. Six LEDs show the state:
four count the digits entered (one more LED per digit), one lights for
"correct" and one for "wrong". `*` works as a backspace, `#` validates
once four digits are in.

The design targets an FPGA board with a 50 MHz clock. The keypad is far
too slow to be scanned at that rate, so the scan runs at about 1 kHz.

## Block structure

```
                 +--------------------+
  clk 50 MHz --->| scan_clock_divider |--- tick (1 kHz, 1 cycle wide)
                 +--------------------+        |
                                               v
   +---------------------- key_decoder ----------------------------+
   |  row_counter --row(A1 A0)--> row_decoder ---> rows_out[3:0] ---+--> keypad rows
   |       |                                                        |
   |       +--------------> keypad_encoder <-- 2-flop sync <-- cols_in[2:0] <-- keypad columns
   |                              | key (D3..D0, per row)           |
   |                        key_scan_latch --> press, press_key ----+
   +----------------------------------------------------------------+
                                               |
                                               v
                                 code_fsm ---> led_digits[3:0], led_ok, led_wrong
```

| File | Role |
|---|---|
| `rtl/code_entry_pkg.sv` | key codes, sizes, FSM state type |
| `rtl/scan_clock_divider.sv` | 50 MHz to 1 kHz scan tick |
| `rtl/row_counter.sv` | 2-bit count of the row being scanned |
| `rtl/row_decoder.sv` | row number to one-hot row drive |
| `rtl/keypad_encoder.sv` | row number + column lines to key code |
| `rtl/key_scan_latch.sv` | per-row codes to one event per key press |
| `rtl/key_decoder.sv` | the scanning circuit (the four above plus an input synchronizer) |
| `rtl/code_fsm.sv` | code detection FSM and LED outputs |
| `rtl/code_entry_top.sv` | top level |

## Keypad and key codes

The keypad is a passive switch matrix. Each row line runs across three
keys and each column line down four; the column lines have pull-down
resistors to ground. Pressing a key connects its row to its column, so
if the row is driven high the column reads high.

```
           COL 3   COL 2   COL 1        cols_in[2] [1] [0]
  ROW 1      1       2       3          rows_out[0]
  ROW 2      4       5       6          rows_out[1]
  ROW 3      7       8       9          rows_out[2]
  ROW 4      *       0       #          rows_out[3]
```

Key codes (`code_entry_pkg`): a digit is its binary value, `#` = `1010`,
`*` = `1011`, no key = `1111`.

## How a key press is found

Understanding the scan is the key to the timing of the whole design.

1. `row_counter` steps 0, 1, 2, 3, 0, ... once per tick, so each row is
   driven high for one tick period (1 ms). A full scan of the keypad
   takes four ticks (4 ms).
2. `row_decoder` drives exactly one row line high.
3. The columns pass a two-flop synchronizer (the keypad is not in the
   clock's domain). After a row change they show that row's keys two
   clocks later, long before the next tick.
4. `keypad_encoder` names the key from the row number and the column
   lines. It shows a key only while that key's row is being driven;
   for the other three rows it shows `1111`. If several columns are
   high, the leftmost key (COL 3) wins.
5. `key_scan_latch` samples the encoder on every tick and remembers
   the first key of the scan. After row 4 has been sampled it has the
   result of a whole scan. If that scan found a key and the scan before
   found none, it sends one `press` pulse with the key's code.

So a key is reported once, at the end of the first full scan that sees
it. That is 1 to 2 scans (4-8 ms) after it goes down, plus a few clocks.
Holding a key gives no further events. The key must be seen released
for a whole scan before it can count again, which also filters contact
bounce shorter than a scan.

When two keys go down in the same scan, the one scanned first wins. If
both are down at the start of a scan, that is the one in the upper row.
Two keys pressed at once are not otherwise handled.

## The code detection FSM

`code_fsm` has seven logical states:

| State | Meaning | LEDs |
|---|---|---|
| `S_EMPTY`..`S_FOUR` | 0 to 4 digits held | that many digit LEDs |
| `S_OK` | last `#` found the right code | 4 digit LEDs + `led_ok` |
| `S_WRONG` | last `#` found a wrong code | 4 digit LEDs + `led_wrong` |

Transitions, taken on a `press` event:

- a digit in `S_EMPTY`..`S_THREE` is stored and the count goes up.
  A fifth digit is ignored.
- `*` in `S_ONE`..`S_FOUR` forgets the last digit. It does nothing on
  an empty entry.
- `#` in `S_FOUR` compares the four digits with `CODE` and goes to
  `S_OK` or `S_WRONG`. Before four digits, `#` does nothing.
- any key in `S_OK` or `S_WRONG` clears the entry (back to `S_EMPTY`).
  The key itself is not used.

The entered digits are kept in a 4x4-bit register, so backspace can
return to any earlier point. The LEDs are decoded from the state and
change on the clock edge that takes the `press` event.

**State encoding.** The `ONE_HOT` parameter chooses how the state is
stored. With `0` (default) it uses three flip-flops, holding the enum
value in binary. With `1` it uses seven flip-flops, one per state. The
behaviour is the same either way. With one-hot, an assertion checks
that exactly one bit is set, and an illegal pattern is read as
`S_EMPTY`. This lets the two encodings be compared in size and speed
on the same design.

## Parameters

Top level `code_entry_top`:

| Parameter | Default | Meaning |
|---|---|---|
| `CLK_HZ` | 50 000 000 | board clock frequency |
| `SCAN_HZ` | 1 000 | scan tick rate. One tick = one row; `CLK_HZ/SCAN_HZ` must be at least 3 |
| `CODE` | `16'h1234` | the secret code, one digit per nibble, first digit in `[15:12]` |
| `ONE_HOT` | 0 | FSM state encoding, see above |

Ports: `clk`, `rst` (synchronous, active high), `rows_out[3:0]`,
`cols_in[2:0]` (needs external pull-downs), `led_digits[3:0]`,
`led_ok`, `led_wrong`. Every output is active high.

## What is specified and what is chosen here

These parts follow the original description of the system:

- the keys and the 4-bit key codes
- the keypad layout and its pull-down columns
- the split into counter, counter decoder, keypad encoder and key
  decoder
- the 50 MHz clock slowed to about 1 kHz by a counter
- a 4-digit code, with backspace on `*` and validate on `#` after four
  digits
- the six LEDs, with one more digit LED lit per digit
- binary and one-hot as the two state encodings considered

These are this design's own choices:

- the slow scan is a clock enable, not a divided clock. The whole
  design runs on one clock.
- the column synchronizer
- the whole press-detection scheme in `key_scan_latch`
- the FSM's states and its rules for cases the description leaves
  open: a fifth digit, an early `#`, `*` on an empty entry, clearing a
  result
- the digit LEDs staying lit while a result is shown
- the default code 1234 and binary as the default encoding
- the order of the column bits, and leftmost-wins when several columns
  are high
- a synchronous, active-high reset

## Simulation

Each testbench in `tb/` checks itself and ends by printing
`TB_RESULT checks=N failures=M`. `tb/keypad_model.sv` models the keypad:
12 key inputs (indexed by key code), 4 row inputs and 3 column outputs.

| Testbench | What it checks |
|---|---|
| `scan_clock_divider_tb` | tick period and width at DIVIDE=7 and at the default 50 000 |
| `row_counter_tb` | count against a modulo-4 model under a random enable, reset |
| `row_decoder_tb` | all four rows |
| `keypad_encoder_tb` | all 32 row/column combinations against the layout |
| `key_decoder_tb` | all 12 keys through the keypad model; one event per press, latency of two scans at most, per-row codes, two keys at once |
| `code_fsm_tb` | binary and one-hot instances against a reference model; directed cases and 3000 random keys |
| `code_entry_top_tb` | whole system, both encodings, fast scan (8 clocks per tick); every mechanism must occur at least once |
| `code_entry_top_full_tb` | whole system at default parameters; enters 1234#, then a wrong code, with real 4 ms scans |

To run one with Verilator (example: the end-to-end test):

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/code_entry_pkg.sv tb/code_entry_top_tb.sv --top-module code_entry_top_tb
./obj_dir/Vcode_entry_top_tb
```

The full-size test runs about 13 million clock cycles, which takes a
few seconds.

## Limitations

- Two keys pressed at once give whichever is scanned first. Nothing
  reports the error.
- The stored code is a parameter, fixed at synthesis time. There is no
  way to change it at run time.
- There is no lock-out after repeated wrong codes, and no time-out on a
  half-entered code.
- Bounce longer than one scan (4 ms at the default rate) can count as a
  second press.
