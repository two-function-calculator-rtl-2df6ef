// tb_calc_keypad_scanner: presses every key of the keypad model and checks
// that each press is reported exactly once with the code of the key at
// that position, within the scan-plus-debounce latency; that a contact
// closure lasting one tick is rejected; that the column drive is one-cold
// and rotates while idle; and that CLEAR sends the scan to the first column.
module tb_calc_keypad_scanner;
  import calc_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #1 clk = ~clk;

  // Tick every 4 system cycles.
  logic [1:0] div = '0;
  logic       tick;
  always_ff @(posedge clk) div <= div + 1'b1;
  assign tick = (div == 2'd3);

  logic [3:0] poll, cycle;
  logic       press = 1'b0;
  logic [1:0] row = '0, col = '0;
  logic       key_valid;
  key_e       key;

  calc_keypad_model kp (.cycle, .press, .row, .col, .poll);
  calc_keypad_scanner dut (.clk, .rst, .tick, .poll, .cycle, .key_valid, .key);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Key at each keypad position, from the printed keypad layout.
  key_e layout [4][4] = '{
    '{KEY_1,       KEY_2, KEY_3,     KEY_PLUS},
    '{KEY_4,       KEY_5, KEY_6,     KEY_MINUS},
    '{KEY_7,       KEY_8, KEY_9,     KEY_BLANK_B},
    '{KEY_BLANK_A, KEY_0, KEY_CLEAR, KEY_EQUALS}
  };

  // Strobe recorder.
  int   n_strobes = 0;
  key_e last_key;
  int   tick_no = 0, strobe_tick = 0;
  always @(posedge clk) if (!rst) begin
    if (tick) tick_no <= tick_no + 1;
    if (key_valid) begin
      n_strobes <= n_strobes + 1;
      last_key  <= key;
      strobe_tick <= tick_no;
    end
  end

  // Column one-cold at every tick.
  always @(posedge clk) if (!rst && tick) begin
    checks++;
    if (!$onehot(~cycle)) begin failures++; $display("FAIL: cycle not one-cold %b", cycle); end
  end

  task automatic wait_ticks(input int n);
    repeat (n) begin
      @(posedge clk iff tick);
    end
  endtask

  task automatic do_press(input int r, input int c, input int hold);
    int s0, t0;
    s0 = n_strobes;
    @(negedge clk);
    row = 2'(r); col = 2'(c); press = 1'b1;
    t0 = tick_no;
    // CLEAR resets the scan, so a held CLEAR repeats after a full scan;
    // release it right after it has been reported.
    for (int i = 0; i < hold; i++) begin
      wait_ticks(1);
      if (layout[r][c] == KEY_CLEAR && n_strobes != s0) break;
    end
    @(negedge clk);
    check(n_strobes == s0 + 1,
          $sformatf("one strobe for key (%0d,%0d), got %0d", r, c, n_strobes - s0));
    check(last_key == layout[r][c],
          $sformatf("key (%0d,%0d) decoded %0d, expected %0d", r, c, last_key, layout[r][c]));
    // Up to 4 ticks to reach the column, one to see it, one to confirm.
    check(strobe_tick - t0 <= 6, $sformatf("press latency %0d ticks", strobe_tick - t0));
    if (layout[r][c] == KEY_CLEAR) check(cycle == 4'b0111, "clear returns scan to first column");
    press = 1'b0;
    wait_ticks(3);
    check(n_strobes == s0 + 1, "no strobe on release");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;

    // Idle scan visits all four columns.
    begin
      logic [3:0] seen = '0;
      repeat (8) begin
        wait_ticks(1);
        @(negedge clk);
        seen |= ~cycle;
      end
      check(seen == 4'hF, "idle scan visits all columns");
    end

    // Every key, held long.
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        do_press(r, c, 12);

    // A bounce: closure seen on one tick only, in the driven column.
    begin
      int s0;
      s0 = n_strobes;
      row = 2'd1; col = 2'd1;
      @(posedge clk iff (tick && cycle == 4'b1011));
      @(negedge clk);
      press = 1'b1;
      wait_ticks(1);
      @(negedge clk);
      press = 1'b0;
      wait_ticks(6);
      check(n_strobes == s0, "single-tick closure rejected");
    end

    // Randomised presses.
    repeat (40) begin
      int r, c;
      r = $urandom_range(3); c = $urandom_range(3);
      do_press(r, c, 6 + $urandom_range(10));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
