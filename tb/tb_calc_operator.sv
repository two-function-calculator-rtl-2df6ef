// tb_calc_operator: random additions and subtractions through the
// digit-serial BCD operator. The expected result is computed with integer
// arithmetic modulo 10**8 (ten's complement for a negative difference),
// the indicator from whether the true result leaves 0..99,999,999. It
// checks each answer digit right after its own slot's tick (one digit per
// tick, complete after 8), that the carry chain restarts at slot 0 on every
// frame, and that nothing changes while equals is low.
module tb_calc_operator;
  import calc_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #1 clk = ~clk;

  logic     tick = 1'b0;
  slot_t    slot = '0;
  logic     plus = 1'b0, minus = 1'b0, equals = 1'b0;
  bcd_num_t first = '0, second = '0, answer;
  logic     led;

  calc_operator dut (.clk, .rst, .tick, .slot, .plus, .minus, .equals,
                     .first, .second, .answer, .led);

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

  function automatic bcd_num_t int2bcd(longint unsigned v);
    bcd_num_t n;
    for (int i = 0; i < DIGITS; i++) begin n[i] = bcd_t'(v % 10); v /= 10; end
    return n;
  endfunction

  // One tick, with three idle system cycles around it; slot then advances.
  task automatic do_tick();
    @(negedge clk); tick = 1'b1;
    @(negedge clk); tick = 1'b0;
    @(negedge clk);
    slot = slot + 1'b1;
  endtask

  task automatic run(input longint unsigned a, input longint unsigned b, input bit sub);
    longint signed   r;
    longint unsigned exp;
    bcd_num_t        e;
    bit              ovf;
    r   = sub ? longint'(a) - longint'(b) : longint'(a + b);
    ovf = (r < 0) || (r > 99999999);
    exp = (r < 0) ? longint'(r + 100000000) : longint'(r % 100000000);
    e   = int2bcd(exp);
    // Start at slot 0, as the operands are settled well before.
    while (slot != '0) do_tick();
    first = int2bcd(a); second = int2bcd(b);
    plus = !sub; minus = sub; equals = 1'b1;
    for (int f = 0; f < 2; f++)
      for (int k = 0; k < DIGITS; k++) begin
        do_tick();
        check(answer[k] == e[k], $sformatf("%0d %s %0d: digit %0d = %0d, expected %0d (frame %0d)",
              a, sub ? "-" : "+", b, k, answer[k], e[k], f));
        if (k == DIGITS - 1)
          check(led == ovf, $sformatf("%0d %s %0d: led %0b expected %0b", a, sub ? "-" : "+", b, led, ovf));
      end
    // With equals low the answer holds and the indicator is off.
    equals = 1'b0;
    first = int2bcd($urandom_range(99999999));
    repeat (9) do_tick();
    check(answer == e, "answer holds while equals is low");
    check(led == 1'b0, "indicator off while equals is low");
    plus = 1'b0; minus = 1'b0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    run(12345678, 87654321, 0);   // 99999999, no overflow
    run(99999999, 1, 0);          // overflow
    run(1, 2, 1);                 // negative
    run(50000000, 50000000, 1);   // zero
    run(100, 1, 1);               // borrow chain
    run(99999999, 99999999, 0);
    run(0, 0, 0);
    repeat (300) begin
      longint unsigned a, b;
      a = $urandom_range(99999999); b = $urandom_range(99999999);
      if ($urandom_range(3) == 0) b = $urandom_range(999);
      run(a, b, bit'($urandom_range(1)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
