// calc_display: segment multiplexer of the 8-digit display.
//
// The eight digits share their segment lines. At each tick this block puts
// the segment code of the current slot's digit on `digit`, so together with
// the anode drive of calc_display2 each digit is lit for one tick in
// eight. While in reset it shows a, d and g (three bars). As in the
// original, it is a registered 8-to-1 multiplexer.
//
// Interface: clk, rst, tick, slot, keys[7:0] in; digit[6:0] (active-low
// {a..g}) out. Timing: digit changes at each tick to keys[slot], the code
// that calc_mapper stored for that slot one frame earlier.
module calc_display
  import calc_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              tick,
  input  slot_t             slot,
  input  seg_t [DIGITS-1:0] keys,
  output seg_t              digit
);

  always_ff @(posedge clk or posedge rst)
    if (rst)       digit <= SEG_RESET;
    else if (tick) digit <= keys[slot];

endmodule
