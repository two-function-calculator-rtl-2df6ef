// tb_calc_slow_clock: checks the tick period and slot sequence of the
// time base, at a small TRIG_BIT and at the default (2 MHz / 4096 = 488 Hz).
module tb_calc_slow_clock;
  import calc_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #1 clk = ~clk;

  logic  tick_s, tick_d;
  slot_t slot_s, slot_d;

  calc_slow_clock #(.TRIG_BIT(2)) dut_s (.clk, .rst, .tick(tick_s), .slot(slot_s));
  calc_slow_clock                 dut_d (.clk, .rst, .tick(tick_d), .slot(slot_d));

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

  // Independent reference: cycle count since reset.
  longint unsigned n;
  int ticks_s, ticks_d;
  longint unsigned last_s, last_d;
  int exp_slot_s, exp_slot_d;

  initial begin
    n = 1; ticks_s = 0; ticks_d = 0; exp_slot_s = 0; exp_slot_d = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    while (ticks_d < 20) begin
      @(negedge clk);
      // count value now is n (cycles since reset release)
      if (tick_s) begin
        check(n % 8 == 3, $sformatf("small tick at cycle %0d", n));
        if (ticks_s > 0) check(n - last_s == 8, "small tick period 8");
        check(slot_s == slot_t'((n / 8) % 8), "small slot value");
        check(int'(slot_s) == exp_slot_s, "small slot steps by one per tick");
        exp_slot_s = (exp_slot_s + 1) % 8;
        last_s = n; ticks_s++;
      end
      if (tick_d) begin
        check(n % 4096 == 2047, $sformatf("default tick at cycle %0d", n));
        if (ticks_d > 0) check(n - last_d == 4096, "default tick period 4096 cycles (488 Hz at 2 MHz)");
        check(int'(slot_d) == exp_slot_d, "default slot steps by one per tick");
        exp_slot_d = (exp_slot_d + 1) % 8;
        last_d = n; ticks_d++;
      end
      n++;
    end
    check(ticks_s > 1000, "small instance ticked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
