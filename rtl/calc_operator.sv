// calc_operator: digit-serial BCD adder/subtracter.
//
// Once equals is set, one decimal digit of the result is worked out per
// tick: in slot k the k-th digits of both operands pass through a single
// BCD digit adder/subtracter (calc_bcd_addsub_digit) together with the
// carry (or borrow) left in a register by slot k-1, and the result is
// written to answer digit k. In slot 0 the carry in is forced to 0. The
// slots repeat, so the eight digits are recomputed every 8 ticks for as
// long as equals stays set, which keeps the answer in step if the second
// operand is edited after =. A carry out of the top digit means the sum
// is above 99,999,999 (add) or the difference is negative (subtract); the
// `led` output then lights. A negative difference is left in ten's
// complement, as in the original.
//
// The one shared digit unit, the carry register with its slot-0 mux and
// the write enable per answer digit follow the original. Two choices are
// this design's: answer digits are 4 bits wide where the original kept 5
// (the fifth bit is always 0 after correction), and the top-digit carry
// is held in a register (`led` = equals and that register, cleared while
// equals is low) rather than gated with slot 7, so the indicator stays lit
// instead of being on one slot in eight.
//
// Interface: clk, rst, tick, slot, plus, minus, equals, first, second in;
// answer, led out. Timing: answer digit k and the carry register change at
// the tick of slot k; a result is complete 8 ticks after the first slot-0
// tick with equals set, and led follows at the slot-7 tick.
module calc_operator
  import calc_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  logic     tick,
  input  slot_t    slot,
  input  logic     plus,
  input  logic     minus,
  input  logic     equals,
  input  bcd_num_t first,
  input  bcd_num_t second,
  output bcd_num_t answer,
  output logic     led
);

  logic c_out;      // carry/borrow left by the previous slot
  logic c_in;
  logic ovf;        // carry/borrow out of the top digit
  bcd_t sum;
  logic carry;

  assign c_in = (slot == '0) ? 1'b0 : c_out;

  calc_bcd_addsub_digit u_digit (
    .a(first[slot]), .b(second[slot]), .cin(c_in), .sub(minus),
    .sum(sum), .cout(carry)
  );

  always_ff @(posedge clk or posedge rst)
    if (rst) begin
      answer <= '0;
      c_out  <= 1'b0;
      ovf    <= 1'b0;
    end else if (!equals) begin
      ovf <= 1'b0;
    end else if (tick && (plus || minus)) begin
      answer[slot] <= sum;
      c_out        <= carry;
      if (slot == slot_t'(DIGITS-1)) ovf <= carry;
    end

  assign led = equals && ovf;

endmodule
