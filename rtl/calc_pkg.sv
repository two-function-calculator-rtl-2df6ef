// calc_pkg: types and constants shared by the two-function calculator.
//
// Numbers are held as eight binary-coded-decimal digits, least significant
// digit at index 0. The display is a common-anode 7-segment display whose
// segment lines are active low; a segment code is packed {a,b,c,d,e,f,g}
// with a in bit 6 and g in bit 0. The codes below are the ones the original
// calculator uses (including its "all bars off" blank and the three
// horizontal bars shown while in reset). Keypad key codes are the 4-bit
// value {column, row} produced by the scanner, numbered as on the original
// board: columns left to right 0..3, rows top to bottom in the order of
// the row code table in calc_keypad_scanner.
package calc_pkg;

  localparam int unsigned DIGITS    = 8;             // digits per number
  localparam int unsigned SLOT_BITS = $clog2(DIGITS); // width of the digit slot

  typedef logic [3:0]            bcd_t;     // one decimal digit
  typedef bcd_t [DIGITS-1:0]     bcd_num_t; // eight digits, [0] = units
  typedef logic [SLOT_BITS-1:0]  slot_t;    // which digit is being served
  typedef logic [6:0]            seg_t;     // {a,b,c,d,e,f,g}, 0 = lit

  // Segment codes (active low).
  localparam seg_t SEG_BLANK = 7'b111_1111;
  localparam seg_t SEG_RESET = 7'b011_0110; // a, d and g lit
  localparam seg_t SEG_0 = 7'b000_0001;
  localparam seg_t SEG_1 = 7'b100_1111;
  localparam seg_t SEG_2 = 7'b001_0010;
  localparam seg_t SEG_3 = 7'b000_0110;
  localparam seg_t SEG_4 = 7'b100_1100;
  localparam seg_t SEG_5 = 7'b010_0100;
  localparam seg_t SEG_6 = 7'b010_0000;
  localparam seg_t SEG_7 = 7'b000_1111;
  localparam seg_t SEG_8 = 7'b000_0000;
  localparam seg_t SEG_9 = 7'b000_1100;

  // Key codes: {column[1:0], row[1:0]}.
  typedef enum logic [3:0] {
    KEY_1     = 4'd0,  KEY_4 = 4'd1,  KEY_7     = 4'd2,  KEY_BLANK_A = 4'd3,
    KEY_2     = 4'd4,  KEY_5 = 4'd5,  KEY_8     = 4'd6,  KEY_0       = 4'd7,
    KEY_3     = 4'd8,  KEY_6 = 4'd9,  KEY_9     = 4'd10, KEY_CLEAR   = 4'd11,
    KEY_PLUS  = 4'd12, KEY_MINUS = 4'd13, KEY_BLANK_B = 4'd14, KEY_EQUALS = 4'd15
  } key_e;

  // Value of a numeral key; only meaningful when is_digit_key() is true.
  function automatic bcd_t key_value(key_e k);
    unique case (k)
      KEY_0: key_value = 4'd0;
      KEY_1: key_value = 4'd1;
      KEY_2: key_value = 4'd2;
      KEY_3: key_value = 4'd3;
      KEY_4: key_value = 4'd4;
      KEY_5: key_value = 4'd5;
      KEY_6: key_value = 4'd6;
      KEY_7: key_value = 4'd7;
      KEY_8: key_value = 4'd8;
      KEY_9: key_value = 4'd9;
      default: key_value = 4'd0;
    endcase
  endfunction

  // Numeral keys are codes 0..10 except the blank key at code 3.
  function automatic logic is_digit_key(key_e k);
    return (k < KEY_CLEAR) && (k != KEY_BLANK_A);
  endfunction

  // BCD digit to segment code; a value above 9 gives a blank digit.
  function automatic seg_t bcd_to_seg(bcd_t d);
    unique case (d)
      4'd0: bcd_to_seg = SEG_0;
      4'd1: bcd_to_seg = SEG_1;
      4'd2: bcd_to_seg = SEG_2;
      4'd3: bcd_to_seg = SEG_3;
      4'd4: bcd_to_seg = SEG_4;
      4'd5: bcd_to_seg = SEG_5;
      4'd6: bcd_to_seg = SEG_6;
      4'd7: bcd_to_seg = SEG_7;
      4'd8: bcd_to_seg = SEG_8;
      4'd9: bcd_to_seg = SEG_9;
      default: bcd_to_seg = SEG_BLANK;
    endcase
  endfunction

endpackage
