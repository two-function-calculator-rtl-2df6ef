# Two-function calculator: eight-digit BCD add/subtract with a scanned keypad and a multiplexed LED display

This is a complete small calculator. It takes a 16-key keypad on four row and four column wires and drives an eight-digit common-anode 7-segment display. The user keys in a number of up to eight decimal digits, then `+` or `-`, then a second number, then `=`. Each number is shown while it is typed, and the result is shown once `=` is pressed. `C` clears everything. An indicator output lights when a sum goes above 99,999,999 or a difference is negative.

The design is very frugal, because it was first built for a small FPGA (196 logic blocks). There is one decimal digit adder, and it is used eight times over. One clock enable, 488 times a second, drives everything:

- the keypad scan;
- the debouncing;
- the arithmetic, one digit per step;
- the display multiplexing, one digit per step.

This RTL is a SystemVerilog rendering of that original calculator. The block structure, the rates, the key layout, the segment codes and the arithmetic follow the original. The few changes are listed in [Departures from the original](#departures-from-the-original).

## One tick, eight slots

Everything hangs off `calc_slow_clock`. This is a free-running counter on the 2 MHz clock:

- Counter bit 11 is the "trigger". It is a 488 Hz square wave, with a 2.048 ms period.
- `tick` is a one-cycle enable, high in the cycle in which the trigger rises.
- The three bits above the trigger form the digit slot, `slot`. It steps once per tick through the digits 0 (units) to 7.

The slot chooses which digit the rest of the design works on:

| at each tick, in slot *k* | block |
|---|---|
| digit *k* of both operands is added or subtracted, and answer digit *k* is written | `calc_operator` |
| the segment code of digit *k* of the number on show is stored | `calc_mapper` |
| the stored code of digit *k* is put on the segment lines | `calc_display` |
| the anode of digit *k* is switched on | `calc_display2` |
| the keypad column is advanced, or a key is confirmed | `calc_keypad_scanner` |

So a frame of eight ticks (16.4 ms) refreshes every digit once, which gives 61 Hz per digit. The same frame also recomputes the whole answer. The 2 ms tick is also long enough for a bouncing key contact to settle between two samples.

The original clocked its blocks from the divided trigger signal. Here every flip-flop is on `clk`, and `tick` gates the updates. The `tick` cycle is the one whose closing edge raises the trigger bit, so registers change at the same moments as in the original. The slot bits never change at that edge.

## Keypad: scan, debounce, decode (`calc_keypad_scanner`)

Keypad layout and wiring, as on the original board:

|             | col 0 `cycle[3]` | col 1 `cycle[2]` | col 2 `cycle[1]` | col 3 `cycle[0]` |
|---|---|---|---|---|
| row 0 `poll[2]` | 1 | 2 | 3 | + |
| row 1 `poll[0]` | 4 | 5 | 6 | - |
| row 2 `poll[1]` | 7 | 8 | 9 | (none) |
| row 3 `poll[3]` | (none) | 0 | C | = |

The scanner drives exactly one column low. The rows have pull-up resistors, so a pressed key in the driven column pulls its row low. The scanner works in three phases:

- **Idle scan.** While no row is low, the low column moves on by one each tick.
- **Debounce.** When a row goes low, the column is held where it is. The key counts only if it is seen again on the next tick. A closure that lasts one tick is treated as contact bounce and forgotten.
- **Report once, then wait for release.** A confirmed key is decoded into the 4-bit code `{column, row}` (`calc_pkg::key_e`). It is reported with a single-cycle `key_valid`. Nothing more is accepted until a tick sees no key. Scanning resumes on the tick after that.

Key latency is at most about six ticks (12 ms): up to four ticks to reach the column, one tick to see the key and one to confirm it.

`C` also sends the scan back to the first column. So a `C` held down repeats once every full scan, which does no harm. The `poll` inputs pass through a two-flop synchroniser. If several rows are low at once, the press is swallowed without a report.

## Operands and operator flags (`calc_entry_control`)

Two eight-digit BCD shift registers hold the operands: `first` and `second`, with digit 0 as the units. Three flags record where the user is in the sequence: `plus`, `minus` and `equals`.

- **A numeral** shifts the operand up one digit and puts the new digit in the units place. It goes into `first` while no operator is set, and into `second` after one is set. A ninth digit pushes the leading digit out.
- **`+`** is refused once `minus` is set, and **`-`** is refused once `plus` is set.
- **`=`** is refused until an operator is set.
- **`C`** zeroes both operands and all three flags.
- **The two unlabelled keys** do nothing.

The original has one known fault, kept here by default: numerals typed after `=` still edit `second`, and so change the displayed result. The original left out the guard for lack of room. Setting the parameter `LOCK_AFTER_EQUALS = 1` (on `calc_top`, `calc_decoder` or `calc_entry_control`) adds that guard.

`calc_decoder` is just the scanner followed by these registers.

## Digit-serial decimal arithmetic (`calc_operator`)

This is the heart of the design, and the least obvious part. There is one BCD digit adder/subtracter, `calc_bcd_addsub_digit`, and one carry flip-flop. While `equals` is set, each tick in slot *k* does the following:

1. **Carry in.** `c_in` is the carry flip-flop, except in slot 0, where a multiplexer forces it to 0.
2. **Add.** For addition, `raw = a + b + c_in` in five bits. If `raw > 9`, the digit is `raw - 10` and the carry out is 1.
3. **Subtract.** Subtraction assumes a borrow in advance: `raw = a - b + 10 - c_in`. If `raw > 9`, no borrow was needed, so the digit is `raw - 10` and the borrow out is 0. Otherwise the digit is `raw` and the borrow out is 1.
4. **Store.** The digit goes into `answer[k]`, and the carry or borrow goes into the flip-flop for slot *k+1*.

After slot 7, the whole answer has been recomputed, and the next frame starts again at slot 0. So the answer follows the operands for as long as `equals` stays set.

A carry or borrow out of digit 7 means the true result is out of range: above 99,999,999 for a sum, or below zero for a difference. This carry is latched at slot 7, and `led = equals & latch`. A negative difference is left in ten's complement: for example, 12345678 − 87654321 shows 24691357, with the indicator lit.

Timing:

- If `=` arrives in the middle of a frame, the digits computed in the rest of that frame use a stale carry.
- The first complete frame after that is correct. So the answer is right at most 16 ticks (33 ms) after `=`.
- Two more frames pass through the mapper and the segment multiplexer before the result is on the glass. Allow about five frames (82 ms) from a key to a settled display. This is far below what a user can see.

## Display (`calc_mapper`, `calc_display`, `calc_display2`)

`calc_mapper` chooses what to show:

- the answer if `equals` is set;
- otherwise `second` if an operator is set;
- otherwise `first`.

At each tick it converts the slot's digit to its segment code and stores it in `keys[slot]`. Leading zeros are shown, so a cleared calculator reads `00000000`.

Segment codes are active low and packed `{a,b,c,d,e,f,g}`: bit 6 is the top segment and bit 0 the middle one.

| digit | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 |
|---|---|---|---|---|---|---|---|---|---|---|
| code | 0000001 | 1001111 | 0010010 | 0000110 | 1001100 | 0100100 | 0100000 | 0001111 | 0000000 | 0001100 |

The display uses two registered multiplexers:

- `calc_display` puts `keys[slot]` on the shared segment lines `digit[6:0]`. In reset it shows `0110110` (top, middle and bottom bars).
- `calc_display2` drives `high[7:0]` with a single 0 at the slot's position. Each bit goes to the base of a PNP transistor that switches one digit's common anode, so 0 means that digit is on.

Both multiplexers change at the same tick, so the segments and the anodes always belong to the same digit. Each digit is lit for one tick in eight.

## Pins of `calc_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | 2 MHz clock |
| `reset` | in | 1 | asynchronous reset, active high |
| `poll` | in | 4 | keypad rows, active low, pulled up externally |
| `cycle` | out | 4 | keypad column drive, exactly one low |
| `high` | out | 8 | digit anode drive, one low (through PNP switches) |
| `digit` | out | 7 | segment cathodes `{a..g}`, active low (through 240 Ω resistors) |
| `plus`, `minus`, `equals` | out | 1 each | operator state |
| `led` | out | 1 | overflow (add) or negative (subtract) indicator |

Parameters of `calc_top`:

- `TRIG_BIT` (default 11) sets the tick to one per 2^(TRIG_BIT+1) clocks. It must be at least 1.
- `LOCK_AFTER_EQUALS` (default 0) is described in the operand section above.

The number of digits, `calc_pkg::DIGITS = 8`, is fixed by the 3-bit slot counter.

## Departures from the original

- **Clocking.** The design uses a single clock with a `tick` enable, instead of clocking blocks from a divided clock. The update instants are unchanged.
- **The indicator.** The original gated the top-digit carry with slot 7, so the lamp was lit only one slot in eight. Here the carry is latched, so the lamp is steady while `equals` is set.
- **Answer width.** Answer digits are 4 bits wide rather than 5: the corrected digit never exceeds 9.
- **Additions.** A `poll` synchroniser. Several-rows-low presses are ignored. Digit values above 9 display blank, where the original kept the previous code. Keys that do nothing are consumed like any other. `LOCK_AFTER_EQUALS` is an option, off by default.
- **Not included.** The original author also wrote a multiplier (BCD to binary, shift-and-add, and back, over 256 ticks). It never went into the calculator for lack of room, and is not part of this design. The keypad, the LEDs, the transistors and the clock oscillator are board parts. The keypad has a behavioural model for simulation only (`tb/calc_keypad_model.sv`).

## Files

- `rtl/calc_pkg.sv`: the digit count, BCD and segment types, key codes, segment table.
- `rtl/calc_top.sv`: the top level.
- `rtl/calc_slow_clock.sv`: the tick and slot counter.
- `rtl/calc_keypad_scanner.sv`, `rtl/calc_entry_control.sv`, `rtl/calc_decoder.sv`: keypad input.
- `rtl/calc_operator.sv`, `rtl/calc_bcd_addsub_digit.sv`: the arithmetic.
- `rtl/calc_mapper.sv`, `rtl/calc_display.sv`, `rtl/calc_display2.sv`: the display.
- `tb/tb_<block>.sv`: one self-checking testbench per block. Each prints `TB_RESULT checks=N failures=M`.
- `tb/tb_calc_top.sv`: the end-to-end test, at a fast tick (`TRIG_BIT = 2`). It runs two calculators, with and without the lock, and reads each display back from the `high`/`digit` lines. Its reference is an integer model. It counts each mechanism and fails if any mechanism never occurred:
  - bounce rejection;
  - entry into each operand;
  - ninth digit;
  - each operator;
  - refused operator;
  - refused `=`;
  - add and subtract results;
  - overflow;
  - negative result;
  - editing after `=`;
  - the lock;
  - clear;
  - unlabelled keys.
- `tb/tb_calc_top_full.sv`: the design at its default parameters and a real 2 MHz clock. It computes 12345678 − 87654321 and checks the 488 Hz step and the 61 Hz refresh of the display. It takes under a second of CPU time.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_calc_top \
    -y rtl -y tb +libext+.sv -Irtl -Itb rtl/calc_pkg.sv tb/tb_calc_top.sv
./obj_dir/Vtb_calc_top
```

Substitute any other testbench name. The package must be listed first, and the library paths find the rest. `-Wno-fatal` keeps the testbenches' width and lifetime warnings from stopping the build. For lint, use `verilator --lint-only -Wall -y rtl rtl/calc_pkg.sv rtl/calc_top.sv`. The only warning it gives is `SYNCASYNCNET`, from the reset used both asynchronously and in the assertions' `disable iff`. Linting a single block on its own can also give `UNUSEDPARAM` for package constants that the block does not use.
