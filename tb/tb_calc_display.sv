// tb_calc_display: the segment output must show the reset pattern (a, d, g
// lit) in reset, then at every tick take the key code of the current slot,
// and hold between ticks.
module tb_calc_display;
  import calc_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #1 clk = ~clk;

  logic              tick = 1'b0;
  slot_t             slot = '0;
  seg_t [DIGITS-1:0] keys = '0;
  seg_t              digit;

  calc_display dut (.clk, .rst, .tick, .slot, .keys, .digit);

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

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    check(digit == 7'b011_0110, "reset pattern");
    rst = 1'b0;
    repeat (500) begin
      seg_t held;
      for (int i = 0; i < DIGITS; i++) keys[i] = seg_t'($urandom);
      slot = slot_t'($urandom_range(DIGITS - 1));
      @(negedge clk); tick = 1'b1;
      @(negedge clk); tick = 1'b0;
      check(digit == keys[slot], $sformatf("slot %0d shows %b, expected %b", slot, digit, keys[slot]));
      held = digit;
      for (int i = 0; i < DIGITS; i++) keys[i] = seg_t'($urandom);
      slot = slot + 1'b1;
      repeat (3) @(negedge clk);
      check(digit == held, "holds between ticks");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
