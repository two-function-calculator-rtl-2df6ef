// calc_keypad_scanner: scans, debounces and decodes the 4x4 keypad.
//
// The keypad is a switch matrix. `cycle` drives the four column wires, one
// of them low at a time; the four row wires come back on `poll`, pulled up
// on the board, so a pressed key in the driven column pulls its row low.
// While no key is seen the scanner moves the low column on by one every
// tick (column order cycle[3], cycle[2], cycle[1], cycle[0]). When a row
// goes low the column is held, and the key counts only if it is still seen
// on the next tick as well: a contact closure that lasts a single tick is
// taken for bounce and dropped. A debounced key is decoded from the driven
// column and the low row into a 4-bit code {column, row} (calc_pkg::key_e)
// and reported once with a one-cycle `key_valid` strobe; the key must then
// be seen released for one tick before another key is accepted. The CLEAR
// key also sends the scan back to the first column. Scanning, the
// two-tick debounce, the release rule and the code table are those of the
// original; the synchroniser on `poll` and the handling of several rows low
// at once (the press is consumed without a strobe) are this design's
// additions.
//
// Interface: clk, rst, tick (1-cycle enable from calc_slow_clock),
// poll[3:0] (rows, active low) in; cycle[3:0] (columns, one low), key_valid,
// key out. Timing: a press held from tick n is reported at tick n+1 (plus
// the two synchroniser cycles, which vanish against the tick period);
// key_valid is high for the single system cycle of that tick.
module calc_keypad_scanner
  import calc_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       tick,
  input  logic [3:0] poll,
  output logic [3:0] cycle,
  output logic       key_valid,
  output key_e       key
);

  localparam logic [3:0] COL1 = 4'b0111;
  localparam logic [3:0] COL2 = 4'b1011;
  localparam logic [3:0] COL3 = 4'b1101;
  localparam logic [3:0] COL4 = 4'b1110;

  // Debounce progress of the key being looked at.
  typedef enum logic [1:0] {
    HIT_NONE = 2'd0,  // nothing seen yet
    HIT_ONCE = 2'd1,  // seen on one tick
    HIT_DONE = 2'd2   // reported, waiting for release
  } hit_e;

  logic [3:0] poll_meta, poll_s;
  hit_e       hit;
  logic       miss;   // no key seen on the previous tick

  // Two-flop synchroniser for the asynchronous row inputs.
  always_ff @(posedge clk or posedge rst)
    if (rst) begin
      poll_meta <= 4'hF;
      poll_s    <= 4'hF;
    end else begin
      poll_meta <= poll;
      poll_s    <= poll_meta;
    end

  // Column and row part of the key code.
  logic [1:0] col_code, row_code;
  logic       row_ok;

  always_comb begin
    unique case (cycle)
      COL1:    col_code = 2'd0;
      COL2:    col_code = 2'd1;
      COL3:    col_code = 2'd2;
      default: col_code = 2'd3;
    endcase
    row_ok = 1'b1;
    unique case (poll_s)
      4'b1011: row_code = 2'd0;  // row of 1 2 3 +
      4'b1110: row_code = 2'd1;  // row of 4 5 6 -
      4'b1101: row_code = 2'd2;  // row of 7 8 9
      4'b0111: row_code = 2'd3;  // row of 0 C =
      default: begin row_code = 2'd0; row_ok = 1'b0; end
    endcase
  end

  logic key_seen, accept;
  assign key_seen = (poll_s != 4'hF);
  assign accept   = tick && key_seen && (hit == HIT_ONCE);

  assign key_valid = accept && row_ok;
  assign key       = key_e'({col_code, row_code});

  always_ff @(posedge clk or posedge rst)
    if (rst) begin
      cycle <= COL1;
      hit   <= HIT_NONE;
      miss  <= 1'b0;
    end else if (tick) begin
      if (key_seen) begin
        if (hit == HIT_ONCE) begin
          if (row_ok && key == KEY_CLEAR) begin
            cycle <= COL1;
            hit   <= HIT_NONE;
            miss  <= 1'b0;
          end else begin
            hit <= HIT_DONE;
          end
        end else if (hit == HIT_NONE) begin
          hit  <= HIT_ONCE;
          miss <= 1'b0;
        end
      end else if (miss) begin
        unique case (cycle)
          COL1:    cycle <= COL2;
          COL2:    cycle <= COL3;
          COL3:    cycle <= COL4;
          default: cycle <= COL1;
        endcase
      end else begin
        miss <= 1'b1;
        hit  <= HIT_NONE;
      end
    end

  // Exactly one column is driven low.
  a_one_column: assert property (@(posedge clk) disable iff (rst) $onehot(~cycle));

endmodule
