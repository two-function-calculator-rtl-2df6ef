// calc_slow_clock: time base of the calculator.
//
// A free-running counter on the 2 MHz system clock. Its bit TRIG_BIT is the
// slow "trigger" square wave (bit 11 gives 2 MHz / 4096 = 488 Hz, a 2 ms
// period), and the SLOT_BITS bits above it are the digit slot, which steps
// once per trigger period through the eight display/arithmetic digits
// (61 Hz per digit refresh). These widths and rates follow the original
// design.
//
// The original clocks every other block on the rising edge of the trigger
// bit. Here the whole design stays on the one system clock instead: `tick`
// is a one-cycle enable that is high in the system cycle whose closing edge
// makes the trigger bit rise, so blocks that update on `tick` change at the
// same instant the original's trigger-clocked registers would. `slot` does
// not change at a trigger rising edge, so it is stable around every tick.
//
// Interface: clk, rst (asynchronous, active high) in; tick, slot out.
// Timing: one tick every 2**(TRIG_BIT+1) cycles; slot increments in the
// cycle 2**TRIG_BIT cycles after each tick.
module calc_slow_clock
  import calc_pkg::*;
#(
  parameter int unsigned TRIG_BIT = 11
) (
  input  logic  clk,
  input  logic  rst,
  output logic  tick,
  output slot_t slot
);

  localparam int unsigned CW = TRIG_BIT + 1 + SLOT_BITS;

  logic [CW-1:0] count;

  always_ff @(posedge clk or posedge rst)
    if (rst) count <= '0;
    else     count <= count + 1'b1;

  // Trigger rises when the low TRIG_BIT+1 bits roll from 0111..1 to 1000..0.
  assign tick = (count[TRIG_BIT:0] == {1'b0, {TRIG_BIT{1'b1}}});
  assign slot = count[CW-1:TRIG_BIT+1];

endmodule
