// calc_top: two-function (add/subtract) eight-digit decimal calculator.
//
// The user keys in a number, + or -, a second number and =; each number is
// shown on an eight-digit multiplexed LED display while it is typed, and
// the result once = is pressed. A clear key empties everything. An
// indicator (`led`) lights when a sum exceeds 99,999,999 or a difference
// is negative.
//
// Blocks: calc_slow_clock divides the 2 MHz clock to a 488 Hz tick and a
// 3-bit digit slot; calc_decoder scans and debounces the keypad and holds
// the two operands and the operator flags; calc_operator adds or subtracts
// one decimal digit per tick; calc_mapper chooses what to show and encodes
// it for 7 segments; calc_display and calc_display2 drive the shared
// segment lines and the digit anodes, one digit per tick. Everything runs
// on `clk`, with `tick` as a clock enable (the original clocked its blocks
// from a divided clock). The block split and all rates follow the original
// design.
//
// Ports: clk (2 MHz), reset (asynchronous, active high); poll[3:0] keypad
// rows in (active low, pulled up on the board); cycle[3:0] keypad columns
// out (one low); high[7:0] digit anodes out (one low = that digit on, via
// a PNP switch); digit[6:0] segment cathodes {a..g} out (active low);
// plus, minus, equals operator state out; led overflow/negative out.
// Parameters: TRIG_BIT selects the tick rate (2**(TRIG_BIT+1) clocks per
// tick); LOCK_AFTER_EQUALS = 1 blocks digit entry after =.
module calc_top
  import calc_pkg::*;
#(
  parameter int unsigned TRIG_BIT          = 11,
  parameter bit          LOCK_AFTER_EQUALS = 1'b0
) (
  input  logic              clk,
  input  logic              reset,
  input  logic [3:0]        poll,
  output logic [3:0]        cycle,
  output logic [DIGITS-1:0] high,
  output seg_t              digit,
  output logic              plus,
  output logic              minus,
  output logic              equals,
  output logic              led
);

  logic              tick;
  slot_t             slot;
  bcd_num_t          first, second, answer;
  seg_t [DIGITS-1:0] keys;

  calc_slow_clock #(.TRIG_BIT(TRIG_BIT)) u_slow_clock (
    .clk, .rst(reset), .tick, .slot
  );

  calc_decoder #(.LOCK_AFTER_EQUALS(LOCK_AFTER_EQUALS)) u_decoder (
    .clk, .rst(reset), .tick, .poll, .cycle,
    .first, .second, .plus, .minus, .equals
  );

  calc_operator u_operator (
    .clk, .rst(reset), .tick, .slot, .plus, .minus, .equals,
    .first, .second, .answer, .led
  );

  calc_mapper u_mapper (
    .clk, .rst(reset), .tick, .slot, .first, .second, .answer,
    .plus, .minus, .equals, .keys
  );

  calc_display u_display (
    .clk, .rst(reset), .tick, .slot, .keys, .digit
  );

  calc_display2 u_display2 (
    .clk, .rst(reset), .tick, .slot, .high
  );

endmodule
