// calc_decoder: keypad input handler.
//
// Joins the keypad scanner (column drive, debounce, key decode) to the
// entry registers (the two BCD operands and the plus/minus/equals flags),
// as the original's decoder does in one block. See calc_keypad_scanner and
// calc_entry_control for how each works.
//
// Interface: clk, rst, tick, poll[3:0] (keypad rows, active low) in;
// cycle[3:0] (keypad columns, one low), first, second, plus, minus, equals
// out. Timing: a key held for two ticks takes effect at the second tick.
module calc_decoder
  import calc_pkg::*;
#(
  parameter bit LOCK_AFTER_EQUALS = 1'b0
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       tick,
  input  logic [3:0] poll,
  output logic [3:0] cycle,
  output bcd_num_t   first,
  output bcd_num_t   second,
  output logic       plus,
  output logic       minus,
  output logic       equals
);

  logic key_valid;
  key_e key;

  calc_keypad_scanner u_scan (
    .clk, .rst, .tick, .poll, .cycle, .key_valid, .key
  );

  calc_entry_control #(.LOCK_AFTER_EQUALS(LOCK_AFTER_EQUALS)) u_entry (
    .clk, .rst, .key_valid, .key, .first, .second, .plus, .minus, .equals
  );

endmodule
