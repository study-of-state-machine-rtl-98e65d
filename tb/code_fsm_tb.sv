// Self-checking testbench for code_fsm. Two instances, one with binary
// and one with one-hot state encoding, get the same key events; after
// every event both must show the LEDs of a reference model written here
// from the entry rules (digits count up to four, '*' deletes the last
// digit, '#' after four digits compares with the code, any key clears
// a shown result). Directed sequences come first (right code, wrong
// code, correction with '*'), then random keys. The LEDs must follow
// one clock after the event, and must not move without key_valid.
module code_fsm_tb;
  import code_entry_pkg::*;

  localparam logic [15:0] CODE = 16'h7305;

  logic        clk = 0, rst = 1, key_valid = 0;
  key_code_t   key = KEY_NONE;
  logic [3:0]  led_digits_b, led_digits_h;
  logic        led_ok_b, led_wrong_b, led_ok_h, led_wrong_h;
  entry_state_e state_b, state_h;
  int checks = 0, failures = 0;
  int n_ok = 0, n_wrong = 0, n_back = 0;

  code_fsm #(.CODE(CODE), .ONE_HOT(1'b0)) dut_bin (
    .clk(clk), .rst(rst), .key_valid(key_valid), .key(key),
    .led_digits(led_digits_b), .led_ok(led_ok_b), .led_wrong(led_wrong_b), .state(state_b));
  code_fsm #(.CODE(CODE), .ONE_HOT(1'b1)) dut_hot (
    .clk(clk), .rst(rst), .key_valid(key_valid), .key(key),
    .led_digits(led_digits_h), .led_ok(led_ok_h), .led_wrong(led_wrong_h), .state(state_h));

  always #5 clk = ~clk;

  // Reference model.
  int          m_n = 0;          // digits held
  int          m_res = 0;        // 0 none, 1 correct, 2 wrong
  logic [3:0]  m_dig [4];

  function automatic logic [5:0] m_leds();   // {ok, wrong, digits}
    logic [3:0] d;
    int n;
    n = (m_res != 0) ? 4 : m_n;
    d = 4'((1 << n) - 1);
    return {m_res == 1, m_res == 2, d};
  endfunction

  task automatic m_key(input logic [3:0] k);
    if (m_res != 0) begin
      m_res = 0;
      m_n   = 0;
    end else if (k <= 9) begin
      if (m_n < 4) begin
        m_dig[m_n] = k;
        m_n++;
      end
    end else if (k == 4'hB) begin
      if (m_n > 0) begin
        m_n--;
        n_back++;
      end
    end else if (k == 4'hA && m_n == 4) begin
      if ({m_dig[0], m_dig[1], m_dig[2], m_dig[3]} == CODE) begin
        m_res = 1;
        n_ok++;
      end else begin
        m_res = 2;
        n_wrong++;
      end
    end
  endtask

  task automatic compare(input string what);
    logic [5:0] exp;
    exp = m_leds();
    checks++;
    if ({led_ok_b, led_wrong_b, led_digits_b} != exp ||
        {led_ok_h, led_wrong_h, led_digits_h} != exp) begin
      failures++;
      $display("FAIL %s: bin %b%b %b, one-hot %b%b %b, expected %b", what,
               led_ok_b, led_wrong_b, led_digits_b,
               led_ok_h, led_wrong_h, led_digits_h, exp);
    end
  endtask

  // One key event; LEDs checked one clock later.
  task automatic press(input logic [3:0] k);
    key       <= k;
    key_valid <= 1'b1;
    @(posedge clk);
    key_valid <= 1'b0;
    key       <= 4'($urandom_range(0, 15));
    m_key(k);
    #1;
    compare($sformatf("after key %h", k));
    // Idle cycles with random key values: nothing may change.
    repeat ($urandom_range(0, 3)) begin
      @(posedge clk);
      #1;
      compare("idle");
    end
  endtask

  task automatic enter(input logic [15:0] seq, input int len);
    for (int i = len - 1; i >= 0; i--) press(seq[4*i +: 4]);
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    #1;
    compare("after reset");
    // Right code.
    enter(16'h7305, 4); press(4'hA);
    checks++; if (!led_ok_b || !led_ok_h) begin failures++; $display("FAIL right code not accepted"); end
    press(4'hA);
    // Wrong code.
    enter(16'h7306, 4); press(4'hA);
    checks++; if (!led_wrong_b || !led_wrong_h) begin failures++; $display("FAIL wrong code accepted"); end
    press(4'h1);
    // '#' too early, fifth digit ignored, correction with '*'.
    enter(16'h730A, 4);
    enter(16'h0699, 4);                      // 7 3 0 6, then 9 ignored
    press(4'hB); press(4'h5); press(4'hA);   // 6 replaced by 5
    checks++; if (!led_ok_b) begin failures++; $display("FAIL corrected code not accepted"); end
    press(4'hB);
    // '*' on an empty entry.
    press(4'hB);
    // Random keys, biased towards the code so that some match.
    for (int i = 0; i < 3000; i++) begin
      int r;
      r = $urandom_range(0, 9);
      if (r < 5)       press((m_n < 4) ? CODE[4*(3 - m_n) +: 4] : 4'hA);
      else if (r < 7)  press(4'($urandom_range(0, 9)));
      else if (r < 8)  press(4'hB);
      else if (r < 9)  press(4'hA);
      else             press(4'($urandom_range(12, 15)));
    end
    // Reset in the middle of an entry.
    enter(16'h0073, 2);
    rst <= 1;
    @(posedge clk);
    rst <= 0;
    m_n = 0; m_res = 0;
    #1;
    compare("reset mid-entry");
    $display("results: %0d correct, %0d wrong, %0d backspaces", n_ok, n_wrong, n_back);
    checks++;
    if (n_ok < 5 || n_wrong < 5 || n_back < 5) begin
      failures++;
      $display("FAIL too few of some case");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
