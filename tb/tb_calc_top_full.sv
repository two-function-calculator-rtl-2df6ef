// tb_calc_top_full: one complete calculation on the calculator at its
// default parameters, with the 2 MHz clock: 12345678 - 87654321 = on the
// keypad model. The display, read back from the anode and segment lines,
// must show each operand as it is typed and finally 24691357 (the ten's
// complement of -75308643) with the negative indicator lit. Also checks
// the timing of the multiplex: one digit step per 4096 clocks (488 Hz),
// each digit refreshed every 16.384 ms (61 Hz).
`timescale 1ns/1ps
module tb_calc_top_full;
  import calc_pkg::*;

  localparam int TICK = 4096;        // clocks per tick at the default divider

  logic clk = 1'b0, reset = 1'b1;
  always #250 clk = ~clk;            // 2 MHz

  logic       press = 1'b0;
  logic [1:0] row = '0, col = '0;
  logic [3:0] poll, cycle;
  logic [DIGITS-1:0] high;
  seg_t       digit;
  logic       plus, minus, equals, led;

  calc_keypad_model kp (.cycle, .press, .row, .col, .poll);
  calc_top dut (.clk, .reset, .poll, .cycle, .high, .digit, .plus, .minus, .equals, .led);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #4s;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  string lit [10] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg",
                      "acdfg", "acdefg", "abc", "abcdefg", "abcfg"};

  function automatic int seg2digit(seg_t s);
    for (int d = 0; d < 10; d++) begin
      seg_t p = 7'b111_1111;
      for (int i = 0; i < lit[d].len(); i++) p[6 - (lit[d][i] - "a")] = 1'b0;
      if (p == s) return d;
    end
    return -1;
  endfunction

  // Display read-back and multiplex timing.
  int      shown [DIGITS];
  longint  n_clk = 0, last_step = -1;
  longint  last_visit [DIGITS];
  int      step_errors = 0, steps = 0, refresh_errors = 0, refreshes = 0;
  logic [DIGITS-1:0] high_q = ~DIGITS'(1);   // digit 0 is on in reset
  always @(posedge clk) if (!reset) n_clk++;
  always @(negedge clk) if (!reset) begin
    int pos;
    pos = -1;
    for (int i = 0; i < DIGITS; i++) if (!high[i]) pos = i;
    if (pos >= 0) shown[pos] = seg2digit(digit);
    if (high != high_q && pos >= 0) begin
      if (last_step >= 0) begin
        steps++;
        if (n_clk - last_step != TICK) begin
          step_errors++;
          $display("step after %0d clocks at clock %0d", n_clk - last_step, n_clk);
        end
      end
      if (last_visit[pos] >= 0) begin
        refreshes++;
        if (n_clk - last_visit[pos] != DIGITS * TICK) refresh_errors++;
      end
      last_step = n_clk;
      last_visit[pos] = n_clk;
    end
    high_q = high;
  end

  function automatic longint display_value();
    longint v = 0;
    for (int i = DIGITS - 1; i >= 0; i--) begin
      if (shown[i] < 0) return -1;
      v = v * 10 + shown[i];
    end
    return v;
  endfunction

  string labels [4][4] = '{'{"1", "2", "3", "+"}, '{"4", "5", "6", "-"},
                           '{"7", "8", "9", ""}, '{"", "0", "C", "="}};

  task automatic wait_ticks(input int n);
    repeat (n * TICK) @(posedge clk);
  endtask

  task automatic key(input string lab);
    int r = -1, c = -1;
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) if (labels[i][j] == lab) begin r = i; c = j; end
    row = 2'(r); col = 2'(c);
    @(negedge clk); press = 1'b1;
    wait_ticks(8);
    @(negedge clk); press = 1'b0;
    wait_ticks(3);
  endtask

  task automatic type_str(input string s);
    for (int i = 0; i < s.len(); i++) key(string'(s[i]));
  endtask

  initial begin
    for (int i = 0; i < DIGITS; i++) last_visit[i] = -1;
    repeat (3) @(posedge clk);
    @(negedge clk);
    reset = 1'b0;
    wait_ticks(2 * DIGITS + 2);
    check(display_value() == 0, $sformatf("display after reset %0d", display_value()));

    type_str("12345678");
    wait_ticks(3 * DIGITS);
    check(display_value() == 12345678, $sformatf("first operand shows %0d", display_value()));
    key("-");
    wait_ticks(3 * DIGITS);
    check(minus && !plus, "minus chosen");
    check(display_value() == 0, "second operand starts at 0");
    type_str("87654321");
    wait_ticks(3 * DIGITS);
    check(display_value() == 87654321, $sformatf("second operand shows %0d", display_value()));
    key("=");
    wait_ticks(5 * DIGITS);
    check(equals, "equals set");
    check(display_value() == 24691357, $sformatf("result shows %0d, expected 24691357", display_value()));
    check(led, "negative indicator lit");
    check(steps > 100 && step_errors == 0, $sformatf("digit step every %0d clocks: %0d errors in %0d", TICK, step_errors, steps));
    check(refreshes > 100 && refresh_errors == 0, $sformatf("per-digit refresh: %0d errors", refresh_errors));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
