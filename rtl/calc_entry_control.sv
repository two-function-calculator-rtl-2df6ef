// calc_entry_control: the calculator's input registers and operator flags.
//
// Holds the two operands as eight-digit BCD shift registers and the three
// flags plus, minus and equals that record how far the user has got through
// "number, operator, number, =". Each decoded key (one `key_valid` strobe
// from the keypad scanner) is applied here:
//   numeral  shift the operand left one digit and put the new digit in the
//            units place; the first operand while no operator is chosen,
//            the second one after. A ninth digit pushes the leading digit
//            out.
//   +  -     set plus (or minus) unless the other operator is already set.
//   =        set equals, but only once an operator has been chosen.
//   C        clear both operands and all three flags.
// This is the behaviour of the original, including its one known fault:
// digits typed after = still edit the second operand, and with it the
// result. LOCK_AFTER_EQUALS = 1 adds the guard the original left out for
// lack of room, ignoring numerals once equals is set; the default 0 keeps
// the original behaviour.
//
// Interface: clk, rst, key_valid, key in; first, second (BCD, digit 0 =
// units), plus, minus, equals out. Timing: registers change on the clock
// edge that ends the key_valid cycle.
module calc_entry_control
  import calc_pkg::*;
#(
  parameter bit LOCK_AFTER_EQUALS = 1'b0
) (
  input  logic     clk,
  input  logic     rst,
  input  logic     key_valid,
  input  key_e     key,
  output bcd_num_t first,
  output bcd_num_t second,
  output logic     plus,
  output logic     minus,
  output logic     equals
);

  logic on_second;
  assign on_second = plus || minus;

  always_ff @(posedge clk or posedge rst)
    if (rst) begin
      first  <= '0;
      second <= '0;
      plus   <= 1'b0;
      minus  <= 1'b0;
      equals <= 1'b0;
    end else if (key_valid) begin
      if (is_digit_key(key)) begin
        if (on_second) begin
          if (!(LOCK_AFTER_EQUALS && equals))
            second <= {second[DIGITS-2:0], key_value(key)};
        end else begin
          first <= {first[DIGITS-2:0], key_value(key)};
        end
      end else begin
        unique case (key)
          KEY_CLEAR: begin
            first  <= '0;
            second <= '0;
            plus   <= 1'b0;
            minus  <= 1'b0;
            equals <= 1'b0;
          end
          KEY_PLUS:   if (!minus)    plus   <= 1'b1;
          KEY_MINUS:  if (!plus)     minus  <= 1'b1;
          KEY_EQUALS: if (on_second) equals <= 1'b1;
          default: ;  // the two unlabelled keys do nothing
        endcase
      end
    end

  a_one_operator:   assert property (@(posedge clk) disable iff (rst) !(plus && minus));
  a_equals_has_op:  assert property (@(posedge clk) disable iff (rst) equals |-> on_second);

endmodule
