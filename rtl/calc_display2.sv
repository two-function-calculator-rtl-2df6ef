// calc_display2: anode drive of the 8-digit display.
//
// Turns on one digit at a time: at each tick `high` gets a single 0 in the
// position of the current slot, all other bits 1. Each output drives the
// base of the PNP transistor that switches one digit's common anode, so a
// 0 lights that digit. After reset digit 0 is on. This is the original's
// registered one-cold decoder.
//
// Interface: clk, rst, tick, slot in; high[7:0] out. Timing: high changes
// at each tick, in step with calc_display's segment output.
module calc_display2
  import calc_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              tick,
  input  slot_t             slot,
  output logic [DIGITS-1:0] high
);

  always_ff @(posedge clk or posedge rst)
    if (rst)       high <= ~DIGITS'(1);
    else if (tick) high <= ~(DIGITS'(1) << slot);

  a_one_digit: assert property (@(posedge clk) disable iff (rst) $onehot(~high));

endmodule
