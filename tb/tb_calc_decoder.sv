// tb_calc_decoder: types key sequences on the keypad model, with each key
// held for several ticks and a contact bounce before some presses, and
// checks the two operands and the three flags against an integer
// reference model after every key.
module tb_calc_decoder;
  import calc_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #1 clk = ~clk;

  logic [1:0] div = '0;
  logic       tick;
  always_ff @(posedge clk) div <= div + 1'b1;
  assign tick = (div == 2'd3);

  logic [3:0] poll, cycle;
  logic       press = 1'b0;
  logic [1:0] row = '0, col = '0;
  bcd_num_t   first, second;
  logic       plus, minus, equals;

  calc_keypad_model kp (.cycle, .press, .row, .col, .poll);
  calc_decoder dut (.clk, .rst, .tick, .poll, .cycle, .first, .second, .plus, .minus, .equals);

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

  // Printed keypad: label of each position.
  string labels [4][4] = '{'{"1", "2", "3", "+"}, '{"4", "5", "6", "-"},
                           '{"7", "8", "9", ""}, '{"", "0", "C", "="}};

  longint unsigned m_a = 0, m_b = 0;
  bit m_p = 0, m_m = 0, m_e = 0;

  function automatic longint unsigned bcd2int(bcd_num_t n);
    longint unsigned v = 0;
    for (int i = DIGITS - 1; i >= 0; i--) v = v * 10 + longint'(n[i]);
    return v;
  endfunction

  task automatic wait_ticks(input int n);
    repeat (n) @(posedge clk iff tick);
  endtask

  task automatic key(input string lab, input bit bounce);
    int r = -1, c = -1;
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) if (labels[i][j] == lab) begin r = i; c = j; end
    row = 2'(r); col = 2'(c);
    if (bounce) begin
      // One-tick closure while the key's column is driven.
      @(posedge clk iff (tick && cycle[3 - c] == 1'b0));
      @(negedge clk); press = 1'b1;
      wait_ticks(1);
      @(negedge clk); press = 1'b0;
      wait_ticks(1);
    end
    @(negedge clk); press = 1'b1;
    wait_ticks(8);
    @(negedge clk); press = 1'b0;
    wait_ticks(3);
    // Reference.
    if (lab.len() == 1 && lab[0] >= "0" && lab[0] <= "9") begin
      if (m_p || m_m) m_b = (m_b * 10 + longint'(lab[0] - "0")) % 100000000;
      else            m_a = (m_a * 10 + longint'(lab[0] - "0")) % 100000000;
    end else if (lab == "C") begin m_a = 0; m_b = 0; m_p = 0; m_m = 0; m_e = 0; end
    else if (lab == "+") begin if (!m_m) m_p = 1; end
    else if (lab == "-") begin if (!m_p) m_m = 1; end
    else if (lab == "=") begin if (m_p || m_m) m_e = 1; end
    check(bcd2int(first) == m_a && bcd2int(second) == m_b &&
          plus == m_p && minus == m_m && equals == m_e,
          $sformatf("after '%s': %0d %0d p%0b m%0b e%0b, expected %0d %0d p%0b m%0b e%0b", lab,
                    bcd2int(first), bcd2int(second), plus, minus, equals, m_a, m_b, m_p, m_m, m_e));
  endtask

  task automatic type_str(input string s);
    for (int i = 0; i < s.len(); i++) key(string'(s[i]), ($urandom_range(3) == 0));
  endtask

  string pool [16] = '{"0", "1", "2", "3", "4", "5", "6", "7", "8", "9", "+", "-", "=", "C", "", ""};

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    type_str("=12345678+-87654321=5C");
    type_str("9876543210-+42=");
    key("", 0);
    key("C", 1);
    repeat (150) key(pool[$urandom_range(15)], ($urandom_range(3) == 0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
