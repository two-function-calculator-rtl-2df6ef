// tb_calc_mapper: random operands, answers and flag states; after each
// slot's tick the key code of that slot must be the 7-segment pattern of
// the right digit of the number the flags select (answer if equals, else
// second if an operator is set, else first). Segment patterns are built
// here from lists of lit segments, not from the design's table.
module tb_calc_mapper;
  import calc_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #1 clk = ~clk;

  logic              tick = 1'b0;
  slot_t             slot = '0;
  bcd_num_t          first = '0, second = '0, answer = '0;
  logic              plus = 1'b0, minus = 1'b0, equals = 1'b0;
  seg_t [DIGITS-1:0] keys;

  calc_mapper dut (.clk, .rst, .tick, .slot, .first, .second, .answer,
                   .plus, .minus, .equals, .keys);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Lit segments of each numeral (a top, b top right, c bottom right,
  // d bottom, e bottom left, f top left, g middle); code bit 6 is a.
  string lit [10] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg",
                      "acdfg", "acdefg", "abc", "abcdefg", "abcfg"};

  function automatic seg_t pattern(int d);
    seg_t s = 7'b111_1111;
    string l = lit[d];
    for (int i = 0; i < l.len(); i++) s[6 - (l[i] - "a")] = 1'b0;
    return s;
  endfunction

  function automatic bcd_num_t rand_num();
    bcd_num_t n;
    for (int i = 0; i < DIGITS; i++) n[i] = bcd_t'($urandom_range(9));
    return n;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    check(keys == {DIGITS{7'b111_1111}}, "all digits blank in reset");
    rst = 1'b0;
    // The segment pattern of the worked example: 3 lights a, b, c, d, g.
    check(pattern(3) == 7'b000_0110, "pattern table sanity");
    repeat (200) begin
      bcd_num_t shown;
      first = rand_num(); second = rand_num(); answer = rand_num();
      case ($urandom_range(3))
        0: begin plus = 0; minus = 0; equals = 0; end
        1: begin plus = 1; minus = 0; equals = 0; end
        2: begin plus = 0; minus = 1; equals = 0; end
        default: begin plus = $urandom_range(1); minus = !plus; equals = 1; end
      endcase
      shown = equals ? answer : (plus || minus) ? second : first;
      for (int k = 0; k < DIGITS; k++) begin
        @(negedge clk); tick = 1'b1;
        @(negedge clk); tick = 1'b0;
        check(keys[slot] == pattern(int'(shown[slot])),
              $sformatf("slot %0d: key %b, expected digit %0d", slot, keys[slot], shown[slot]));
        // The other digits only change at their own slot.
        @(negedge clk);
        slot = slot + 1'b1;
      end
      for (int k = 0; k < DIGITS; k++)
        check(keys[k] == pattern(int'(shown[k])), $sformatf("frame digit %0d", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
