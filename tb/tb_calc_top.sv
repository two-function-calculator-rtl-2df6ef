// tb_calc_top: end-to-end test of the calculator, at a fast tick
// (TRIG_BIT = 2, one tick per 8 clocks). Two calculators, one with the
// original's free editing after = and one with LOCK_AFTER_EQUALS set, are
// fed the same key presses through keypad models. The number on each
// display is read back from the multiplexed anode and segment outputs
// and compared with an integer reference model, as is the overflow /
// negative indicator. Every mechanism of the design is counted and must
// occur at least once: debounce rejection, digit entry into each operand,
// a ninth digit pushing the first out, each operator, a refused second
// operator, a refused early =, addition and subtraction results, overflow,
// negative result, editing after =, the lock, clear and the unlabelled keys.
module tb_calc_top;
  import calc_pkg::*;

  localparam int TB_TRIG = 2;
  localparam int TICK = 2 ** (TB_TRIG + 1);   // clocks per tick

  logic clk = 1'b0, reset = 1'b1;
  always #1 clk = ~clk;

  logic       press = 1'b0;
  logic [1:0] row = '0, col = '0;

  logic [3:0]        poll [2], cycle [2];
  logic [DIGITS-1:0] high [2];
  seg_t              digit [2];
  logic              plus [2], minus [2], equals [2], led [2];

  for (genvar g = 0; g < 2; g++) begin : g_calc
    calc_keypad_model kp (.cycle(cycle[g]), .press, .row, .col, .poll(poll[g]));
    calc_top #(.TRIG_BIT(TB_TRIG), .LOCK_AFTER_EQUALS(g == 1)) dut (
      .clk, .reset, .poll(poll[g]), .cycle(cycle[g]), .high(high[g]), .digit(digit[g]),
      .plus(plus[g]), .minus(minus[g]), .equals(equals[g]), .led(led[g]));
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- display read-back -------------------------------------------------
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

  int shown [2][DIGITS];
  int last_pos [2] = '{-1, -1};
  int refresh_errors = 0;
  always @(negedge clk) if (!reset) begin
    for (int g = 0; g < 2; g++) begin
      int pos, zeros;
      pos = -1; zeros = 0;
      for (int i = 0; i < DIGITS; i++) if (!high[g][i]) begin pos = i; zeros++; end
      if (zeros != 1) refresh_errors++;
      else begin
        shown[g][pos] = seg2digit(digit[g]);
        // Digits are served in order, one per tick.
        if (last_pos[g] >= 0 && pos != last_pos[g] && pos != (last_pos[g] + 1) % DIGITS)
          refresh_errors++;
        last_pos[g] = pos;
      end
    end
  end

  function automatic longint display_value(int g);
    longint v = 0;
    for (int i = DIGITS - 1; i >= 0; i--) begin
      if (shown[g][i] < 0) return -1;
      v = v * 10 + shown[g][i];
    end
    return v;
  endfunction

  // ---- reference model ---------------------------------------------------
  longint m_a [2] = '{0, 0}, m_b [2] = '{0, 0};
  bit m_p [2] = '{0, 0}, m_m [2] = '{0, 0}, m_e [2] = '{0, 0};

  // Mechanism counters.
  typedef enum int {
    M_BOUNCE, M_DIGIT_FIRST, M_DIGIT_SECOND, M_NINTH_DIGIT, M_PLUS, M_MINUS,
    M_OP_REFUSED, M_EQ_REFUSED, M_EQUALS_ADD, M_EQUALS_SUB, M_OVERFLOW,
    M_NEGATIVE, M_EDIT_AFTER_EQ, M_LOCKED_DIGIT, M_CLEAR, M_BLANK_KEY, M_COUNT
  } mech_e;
  int mech [M_COUNT];

  task automatic model(input string lab);
    for (int g = 0; g < 2; g++) begin
      if (lab.len() == 1 && lab[0] >= "0" && lab[0] <= "9") begin
        longint d = longint'(lab[0] - "0");
        if (m_p[g] || m_m[g]) begin
          if (g == 1 && m_e[g]) mech[M_LOCKED_DIGIT]++;
          else begin
            if (m_e[g]) mech[M_EDIT_AFTER_EQ]++;
            if (m_b[g] >= 10000000) mech[M_NINTH_DIGIT]++;
            m_b[g] = (m_b[g] * 10 + d) % 100000000;
            if (g == 0) mech[M_DIGIT_SECOND]++;
          end
        end else begin
          if (m_a[g] >= 10000000) mech[M_NINTH_DIGIT]++;
          m_a[g] = (m_a[g] * 10 + d) % 100000000;
          if (g == 0) mech[M_DIGIT_FIRST]++;
        end
      end else if (lab == "C") begin
        m_a[g] = 0; m_b[g] = 0; m_p[g] = 0; m_m[g] = 0; m_e[g] = 0;
        if (g == 0) mech[M_CLEAR]++;
      end else if (lab == "+") begin
        if (!m_m[g]) begin m_p[g] = 1; if (g == 0) mech[M_PLUS]++; end
        else if (g == 0) mech[M_OP_REFUSED]++;
      end else if (lab == "-") begin
        if (!m_p[g]) begin m_m[g] = 1; if (g == 0) mech[M_MINUS]++; end
        else if (g == 0) mech[M_OP_REFUSED]++;
      end else if (lab == "=") begin
        if (m_p[g] || m_m[g]) begin
          if (g == 0 && !m_e[g]) mech[m_p[g] ? M_EQUALS_ADD : M_EQUALS_SUB]++;
          m_e[g] = 1;
        end else if (g == 0) mech[M_EQ_REFUSED]++;
      end else if (g == 0) mech[M_BLANK_KEY]++;
    end
  endtask

  function automatic longint result(int g, output bit ind);
    longint r;
    r = m_p[g] ? m_a[g] + m_b[g] : m_a[g] - m_b[g];
    ind = (r < 0) || (r > 99999999);
    return (r < 0) ? r + 100000000 : r % 100000000;
  endfunction

  // ---- stimulus ----------------------------------------------------------
  string labels [4][4] = '{'{"1", "2", "3", "+"}, '{"4", "5", "6", "-"},
                           '{"7", "8", "9", ""}, '{"", "0", "C", "="}};

  task automatic wait_ticks(input int n);
    repeat (n * TICK) @(posedge clk);
  endtask

  task automatic compare(input string ctx);
    for (int g = 0; g < 2; g++) begin
      longint exp;
      bit ind = 0;
      exp = m_e[g] ? result(g, ind) : (m_p[g] || m_m[g]) ? m_b[g] : m_a[g];
      check(display_value(g) == exp,
            $sformatf("%s [calc %0d]: display %0d, expected %0d", ctx, g, display_value(g), exp));
      check(led[g] == (m_e[g] && ind), $sformatf("%s [calc %0d]: led %0b", ctx, g, led[g]));
      check(plus[g] == m_p[g] && minus[g] == m_m[g] && equals[g] == m_e[g],
            $sformatf("%s [calc %0d]: flags", ctx, g));
      if (g == 0 && m_e[g] && ind) mech[m_p[g] ? M_OVERFLOW : M_NEGATIVE]++;
    end
  endtask

  task automatic key(input string lab, input bit bounce);
    int r = -1, c = -1;
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) if (labels[i][j] == lab) begin r = i; c = j; end
    row = 2'(r); col = 2'(c);
    if (bounce) begin
      // A closure lasting one tick, in the driven column: must be ignored.
      @(posedge clk iff (cycle[0][3 - c] == 1'b0));
      repeat (2) @(posedge clk);
      @(negedge clk); press = 1'b1;
      wait_ticks(1);
      @(negedge clk); press = 1'b0;
      wait_ticks(3);
      compare($sformatf("bounce on '%s'", lab));
      mech[M_BOUNCE]++;
    end
    @(negedge clk); press = 1'b1;
    wait_ticks(8);
    @(negedge clk); press = 1'b0;
    model(lab);
    // Worst case from a key to the display: up to two frames for the
    // digit-serial answer (a partial frame, then a whole one), one for the
    // mapper to pick it up and one for the segment multiplexer; wait five.
    wait_ticks(5 * DIGITS);
    compare($sformatf("after '%s'", lab));
  endtask

  task automatic type_str(input string s, input bit bounces);
    for (int i = 0; i < s.len(); i++)
      key(string'(s[i]), bounces && ($urandom_range(3) == 0));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    reset = 1'b0;
    wait_ticks(2 * DIGITS + 2);
    compare("after reset");

    type_str("=12345678+-87654321=", 1);    // refused =, refused -, 99999999
    type_str("5C", 0);                      // edit after =, clear
    type_str("99999999+1=", 0);             // overflow
    key("C", 0);
    type_str("123456789-+987654321=", 0);   // ninth digits, refused +, negative
    key("", 0);                             // unlabelled key
    type_str("0C42-17=C", 1);
    repeat (40) begin
      string pool [16] = '{"0", "1", "2", "3", "4", "5", "6", "7", "8", "9",
                           "+", "-", "=", "C", "", "9"};
      key(pool[$urandom_range(15)], ($urandom_range(5) == 0));
    end

    check(refresh_errors == 0, $sformatf("display refresh errors: %0d", refresh_errors));
    for (int m = 0; m < M_COUNT; m++) begin
      $display("mechanism %s: %0d", mech_e'(m), mech[m]);
      check(mech[m] > 0, $sformatf("mechanism %s never happened", mech_e'(m)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
