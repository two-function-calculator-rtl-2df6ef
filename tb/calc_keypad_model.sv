// calc_keypad_model: behavioural model of the 4x4 switch-matrix keypad.
//
// Layout (rows top to bottom, columns left to right):
//   1 2 3 +  /  4 5 6 -  /  7 8 9 (blank)  /  (blank) 0 C =
// Column c is driven by cycle[3-c]. Rows are read back on poll with the
// board's wiring: top row on poll[2], second on poll[0], third on poll[1],
// bottom on poll[3]. Rows are pulled up; a pressed key connects its row to
// its column wire, so a row reads 0 only while the pressed key's column is
// driven low. `press` closes the switch at (row, col); one key at a time.
module calc_keypad_model (
  input  logic [3:0] cycle,
  input  logic       press,
  input  logic [1:0] row,
  input  logic [1:0] col,
  output logic [3:0] poll
);

  localparam int ROW_BIT [4] = '{2, 0, 1, 3};

  always_comb begin
    poll = 4'hF;
    if (press && !cycle[3 - col]) poll[ROW_BIT[row]] = 1'b0;
  end

endmodule
