// End-to-end testbench for code_entry_top. Two copies of the system,
// one with binary and one with one-hot FSM state encoding, are each
// wired to a keypad model; a person is imitated by holding each key for
// HOLD scans and releasing it for GAP scans. The scan divider is set to
// DIV clock cycles per tick to keep the run short.
//
// After every key the six LEDs of both copies are compared with a
// reference model of the entry rules. Each mechanism of the design is
// counted and must happen at least once: right code, wrong code,
// backspace, '*' on an empty entry, '#' leds_prev four digits, a fifth
// digit ignored, a result cleared by the next key, a key held long
// (one digit only) and two keys pressed together. The time from key
// down to the LED change must be at most two scans plus the input
// synchronizer delay.
module code_entry_top_tb;
  import code_entry_pkg::*;

  localparam int          DIV  = 8;
  localparam int          SCAN = 4 * DIV;
  localparam logic [15:0] CODE = 16'h2580;

  logic        clk = 0, rst = 1;
  logic [11:0] keys = '0;
  logic [3:0]  rows_b, rows_h, led_digits_b, led_digits_h;
  logic [2:0]  cols_b, cols_h;
  logic        led_ok_b, led_wrong_b, led_ok_h, led_wrong_h;
  int checks = 0, failures = 0;

  code_entry_top #(.CLK_HZ(DIV), .SCAN_HZ(1), .CODE(CODE), .ONE_HOT(1'b0)) dut_bin (
    .clk(clk), .rst(rst), .rows_out(rows_b), .cols_in(cols_b),
    .led_digits(led_digits_b), .led_ok(led_ok_b), .led_wrong(led_wrong_b));
  code_entry_top #(.CLK_HZ(DIV), .SCAN_HZ(1), .CODE(CODE), .ONE_HOT(1'b1)) dut_hot (
    .clk(clk), .rst(rst), .rows_out(rows_h), .cols_in(cols_h),
    .led_digits(led_digits_h), .led_ok(led_ok_h), .led_wrong(led_wrong_h));
  keypad_model pad_b (.rows(rows_b), .keys(keys), .cols(cols_b));
  keypad_model pad_h (.rows(rows_h), .keys(keys), .cols(cols_h));

  always #5 clk = ~clk;

  // Mechanism counters.
  int n_ok = 0, n_wrong = 0, n_back = 0, n_back_empty = 0, n_hash_early = 0;
  int n_fifth = 0, n_clear = 0, n_long_hold = 0, n_two_keys = 0;

  // Reference model of the entry rules.
  int         m_n = 0, m_res = 0;
  logic [3:0] m_dig [4];

  task automatic m_key(input logic [3:0] k);
    if (m_res != 0) begin
      m_res = 0; m_n = 0; n_clear++;
    end else if (k <= 9) begin
      if (m_n < 4) begin m_dig[m_n] = k; m_n++; end
      else n_fifth++;
    end else if (k == KEY_STAR) begin
      if (m_n > 0) begin m_n--; n_back++; end
      else n_back_empty++;
    end else if (k == KEY_HASH) begin
      if (m_n < 4) n_hash_early++;
      else if ({m_dig[0], m_dig[1], m_dig[2], m_dig[3]} == CODE) begin m_res = 1; n_ok++; end
      else begin m_res = 2; n_wrong++; end
    end
  endtask

  function automatic logic [5:0] m_leds();
    int n;
    n = (m_res != 0) ? 4 : m_n;
    return {m_res == 1, m_res == 2, 4'((1 << n) - 1)};
  endfunction

  function automatic logic leds_match();
    return {led_ok_b, led_wrong_b, led_digits_b} == m_leds() &&
           {led_ok_h, led_wrong_h, led_digits_h} == m_leds();
  endfunction

  // Press key k for hold scans, then release for GAP scans. The LEDs
  // must reach the model's value within the allowed latency (if they
  // change at all) and hold it from then on.
  // With also >= 0 that key goes down together with k, at the start of
  // a scan, and is released with it.
  task automatic press(input int k, input int hold = 2, input int also = -1);
    int lat;
    logic moved;
    logic [5:0] leds_prev;
    leds_prev = m_leds();
    m_key(4'(k));
    if (also >= 0) begin
      // Wait for the first cycle in which ROW 1 is driven.
      do begin
        @(posedge clk);
        #1;
      end while (rows_b == 4'b0001);
      do begin
        @(posedge clk);
        #1;
      end while (rows_b != 4'b0001);
      keys[also] = 1'b1;
    end
    keys[k] = 1'b1;
    lat = 0;
    while (!leds_match() && lat < 3 * SCAN) begin
      @(posedge clk);
      #1;
      lat++;
    end
    checks++;
    if (!leds_match() || lat > 2 * SCAN + 4) begin
      failures++;
      $display("FAIL key %0d: bin %b%b %b, one-hot %b%b %b, expected %b after %0d cycles",
               k, led_ok_b, led_wrong_b, led_digits_b, led_ok_h, led_wrong_h,
               led_digits_h, m_leds(), lat);
    end
    moved = 1'b0;
    repeat (hold * SCAN + $urandom_range(0, SCAN)) begin
      @(posedge clk);
      #1;
      if (!leds_match()) moved = 1'b1;
    end
    checks++;
    if (moved) begin
      failures++;
      $display("FAIL key %0d: LEDs moved while held (were %b before the key)", k, leds_prev);
    end
    keys[k] = 1'b0;
    if (also >= 0) keys[also] = 1'b0;
    repeat (2 * SCAN + $urandom_range(0, SCAN)) @(posedge clk);
    #1;
    checks++;
    if (!leds_match()) begin
      failures++;
      $display("FAIL key %0d: LEDs moved on release", k);
    end
  endtask

  task automatic enter(input logic [15:0] digits);
    for (int i = 3; i >= 0; i--) press(int'(digits[4*i +: 4]));
  endtask

  initial begin
    repeat (400 * 6 * SCAN) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4) @(posedge clk);
    rst <= 0;
    repeat (2 * SCAN) @(posedge clk);
    #1;
    checks++;
    if (!leds_match()) begin failures++; $display("FAIL LEDs after reset"); end

    enter(CODE);
    press(10);          // right code
    press(3);                            // clears the result
    enter(16'h2581); press(10);          // wrong code
    press(11);                           // clears the result
    press(11);                           // '*' on empty entry
    press(2); press(5); press(10);       // '#' too early
    press(9); press(11);                 // 9 deleted
    press(8, 12);                        // held for 12 scans: one digit
    n_long_hold++;
    press(0); press(7);                  // 7 is a fifth digit
    press(10);                           // right code
    press(10);
    // Two keys together: 2 (row 1) wins over 0 (row 4).
    press(2, 2, 0);
    n_two_keys++;
    press(5); press(8); press(0); press(10);
    press(10);
    // Random keys.
    for (int i = 0; i < 60; i++) begin
      int r;
      r = $urandom_range(0, 9);
      if (r < 6)      press((m_n < 4 && m_res == 0) ? int'(CODE[4*(3 - m_n) +: 4]) : 10);
      else if (r < 8) press($urandom_range(0, 9));
      else            press($urandom_range(10, 11));
    end

    $display("right %0d wrong %0d backspace %0d star-on-empty %0d early-hash %0d fifth-digit %0d clear %0d long-hold %0d two-keys %0d",
             n_ok, n_wrong, n_back, n_back_empty, n_hash_early, n_fifth, n_clear,
             n_long_hold, n_two_keys);
    checks++;
    if (n_ok == 0 || n_wrong == 0 || n_back == 0 || n_back_empty == 0 || n_hash_early == 0 ||
        n_fifth == 0 || n_clear == 0 || n_long_hold == 0 || n_two_keys == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
