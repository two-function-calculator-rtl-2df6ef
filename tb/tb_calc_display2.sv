// tb_calc_display2: the anode drive must have digit 0 on in reset, then
// at every tick turn on exactly the current slot's digit (a single 0), and
// hold between ticks.
module tb_calc_display2;
  import calc_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #1 clk = ~clk;

  logic              tick = 1'b0;
  slot_t             slot = '0;
  logic [DIGITS-1:0] high;

  calc_display2 dut (.clk, .rst, .tick, .slot, .high);

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
    check(high == 8'b1111_1110, "digit 0 on in reset");
    rst = 1'b0;
    repeat (200) begin
      logic [DIGITS-1:0] held;
      slot = slot_t'($urandom_range(DIGITS - 1));
      @(negedge clk); tick = 1'b1;
      @(negedge clk); tick = 1'b0;
      for (int i = 0; i < DIGITS; i++)
        check(high[i] == (i != int'(slot)), $sformatf("slot %0d: high %b", slot, high));
      held = high;
      slot = slot + 1'b1;
      repeat (3) @(negedge clk);
      check(high == held, "holds between ticks");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
