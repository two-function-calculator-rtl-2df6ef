// tb_calc_entry_control: applies random key sequences to the entry
// registers and compares the two operands and three flags with an
// arithmetic reference model (operands kept as integers modulo 10**8),
// for both settings of LOCK_AFTER_EQUALS. Also steps through the
// directed cases: operator exclusion, = before an operator, ninth digit,
// digits after =, clear.
module tb_calc_entry_control;
  import calc_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #1 clk = ~clk;

  logic     key_valid = 1'b0;
  key_e     key = KEY_0;
  bcd_num_t first0, second0, first1, second1;
  logic     plus0, minus0, equals0, plus1, minus1, equals1;

  calc_entry_control dut0 (.clk, .rst, .key_valid, .key,
    .first(first0), .second(second0), .plus(plus0), .minus(minus0), .equals(equals0));
  calc_entry_control #(.LOCK_AFTER_EQUALS(1'b1)) dut1 (.clk, .rst, .key_valid, .key,
    .first(first1), .second(second1), .plus(plus1), .minus(minus1), .equals(equals1));

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

  // Reference model, one per lock setting.
  longint unsigned m_a[2], m_b[2];
  bit m_p[2], m_m[2], m_e[2];

  function automatic longint unsigned bcd2int(bcd_num_t n);
    longint unsigned v = 0;
    for (int i = DIGITS - 1; i >= 0; i--) v = v * 10 + longint'(n[i]);
    return v;
  endfunction

  // Digit value of a key, from the printed keypad labels.
  function automatic int digit_of(key_e k);
    case (k)
      KEY_0: return 0; KEY_1: return 1; KEY_2: return 2; KEY_3: return 3;
      KEY_4: return 4; KEY_5: return 5; KEY_6: return 6; KEY_7: return 7;
      KEY_8: return 8; KEY_9: return 9;
      default: return -1;
    endcase
  endfunction

  task automatic model(input key_e k);
    for (int l = 0; l < 2; l++) begin
      int d;
      d = digit_of(k);
      if (d >= 0) begin
        if (m_p[l] || m_m[l]) begin
          if (!(l == 1 && m_e[l])) m_b[l] = (m_b[l] * 10 + d) % 100000000;
        end else m_a[l] = (m_a[l] * 10 + d) % 100000000;
      end else if (k == KEY_CLEAR) begin
        m_a[l] = 0; m_b[l] = 0; m_p[l] = 0; m_m[l] = 0; m_e[l] = 0;
      end else if (k == KEY_PLUS)  begin if (!m_m[l]) m_p[l] = 1; end
      else if (k == KEY_MINUS) begin if (!m_p[l]) m_m[l] = 1; end
      else if (k == KEY_EQUALS) begin if (m_p[l] || m_m[l]) m_e[l] = 1; end
    end
  endtask

  task automatic compare(input string ctx);
    check(bcd2int(first0) == m_a[0] && bcd2int(second0) == m_b[0] &&
          plus0 == m_p[0] && minus0 == m_m[0] && equals0 == m_e[0],
          $sformatf("%s lock=0: got %0d %0d p%0b m%0b e%0b exp %0d %0d p%0b m%0b e%0b", ctx,
                    bcd2int(first0), bcd2int(second0), plus0, minus0, equals0,
                    m_a[0], m_b[0], m_p[0], m_m[0], m_e[0]));
    check(bcd2int(first1) == m_a[1] && bcd2int(second1) == m_b[1] &&
          plus1 == m_p[1] && minus1 == m_m[1] && equals1 == m_e[1],
          $sformatf("%s lock=1: got %0d %0d exp %0d %0d", ctx,
                    bcd2int(first1), bcd2int(second1), m_a[1], m_b[1]));
  endtask

  task automatic send(input key_e k);
    @(negedge clk);
    key = k; key_valid = 1'b1;
    @(negedge clk);
    key_valid = 1'b0;
    model(k);
    compare($sformatf("after key %0d", k));
    // Idle cycles with a key code present but no strobe change nothing.
    key = key_e'($urandom_range(15));
    @(negedge clk);
    compare("idle");
  endtask

  task automatic type_number(input longint unsigned v, input int ndig);
    for (int i = ndig - 1; i >= 0; i--) begin
      int d;
      longint unsigned p = 1;
      for (int j = 0; j < i; j++) p *= 10;
      d = int'((v / p) % 10);
      case (d)
        0: send(KEY_0); 1: send(KEY_1); 2: send(KEY_2); 3: send(KEY_3); 4: send(KEY_4);
        5: send(KEY_5); 6: send(KEY_6); 7: send(KEY_7); 8: send(KEY_8); default: send(KEY_9);
      endcase
    end
  endtask

  initial begin
    for (int l = 0; l < 2; l++) begin m_a[l] = 0; m_b[l] = 0; m_p[l] = 0; m_m[l] = 0; m_e[l] = 0; end
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    compare("after reset");

    // Directed: 12345678 + 87654321 =, then more digits, then clear.
    type_number(12345678, 8);
    send(KEY_EQUALS);            // ignored: no operator yet
    send(KEY_PLUS);
    send(KEY_MINUS);             // ignored: plus already chosen
    type_number(87654321, 8);
    send(KEY_EQUALS);
    send(KEY_5);                 // edits second operand unless locked
    send(KEY_BLANK_A);
    send(KEY_BLANK_B);
    send(KEY_CLEAR);
    // Ninth digit drops the leading one.
    type_number(987654321, 9);
    send(KEY_MINUS);
    send(KEY_PLUS);              // ignored: minus already chosen
    type_number(5, 1);
    send(KEY_EQUALS);
    send(KEY_CLEAR);

    // Random sequences, weighted towards numerals.
    repeat (3000) begin
      int r;
      r = $urandom_range(99);
      if (r < 70)      send(key_e'($urandom_range(10)));
      else if (r < 78) send(KEY_PLUS);
      else if (r < 86) send(KEY_MINUS);
      else if (r < 95) send(KEY_EQUALS);
      else             send(KEY_CLEAR);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
