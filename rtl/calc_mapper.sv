// calc_mapper: picks the number to show and turns it into segment codes.
//
// The number on the display depends on how far the entry has got: the
// answer once equals is set, otherwise the second operand once an operator
// is chosen, otherwise the first operand. At each tick the digit of that
// number in the current slot is converted to its 7-segment code and stored
// in the slot's entry of `keys`, so the eight codes are refreshed once per
// 8-tick frame. The priority order, the one-digit-per-tick refresh and the
// segment codes follow the original; a digit value above 9 (which the
// design never produces) shows blank here, where the original left the
// previous code in place.
//
// Interface: clk, rst, tick, slot, first, second, answer, plus, minus,
// equals in; keys[7:0] (active-low {a..g}) out, all blank after reset.
// Timing: keys[k] changes at the tick of slot k.
module calc_mapper
  import calc_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  tick,
  input  slot_t                 slot,
  input  bcd_num_t              first,
  input  bcd_num_t              second,
  input  bcd_num_t              answer,
  input  logic                  plus,
  input  logic                  minus,
  input  logic                  equals,
  output seg_t [DIGITS-1:0]     keys
);

  bcd_num_t shown;

  always_comb begin
    if (equals)              shown = answer;
    else if (plus || minus)  shown = second;
    else                     shown = first;
  end

  always_ff @(posedge clk or posedge rst)
    if (rst)       keys <= {DIGITS{SEG_BLANK}};
    else if (tick) keys[slot] <= bcd_to_seg(shown[slot]);

endmodule
