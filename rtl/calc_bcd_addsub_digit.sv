// calc_bcd_addsub_digit: one decimal digit of addition or subtraction.
//
// Adds a + b + cin, or subtracts a - b - cin, for BCD digits a and b and
// returns a BCD digit with a carry (add) or borrow (subtract) out. The sum
// is formed in five bits; an addition above 9 is corrected by subtracting
// 10 and sets the carry. A subtraction first adds 10, assuming a borrow;
// if the result is still above 9 no borrow was needed, so 10 is taken off
// again and the borrow is cleared. This is the correction scheme of the
// original adder/subtracter. Purely combinational.
module calc_bcd_addsub_digit
  import calc_pkg::*;
(
  input  bcd_t a,
  input  bcd_t b,
  input  logic cin,   // carry in (add) or borrow in (subtract)
  input  logic sub,   // 1: a - b - cin, 0: a + b + cin
  output bcd_t sum,
  output logic cout   // carry out (add) or borrow out (subtract)
);

  logic [4:0] raw;

  always_comb begin
    if (sub) raw = 5'(a) - 5'(b) + 5'd10 - 5'(cin);
    else     raw = 5'(a) + 5'(b) + 5'(cin);
    if (raw > 5'd9) begin
      sum  = 4'(raw - 5'd10);
      cout = !sub;
    end else begin
      sum  = raw[3:0];
      cout = sub;
    end
  end

endmodule
