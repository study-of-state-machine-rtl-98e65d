// Full-size testbench for code_entry_top at its default parameters:
// 50 MHz clock, 1 kHz scan tick (4 ms per scan of the four rows) and
// the default code 1-2-3-4. Keys are held for 3 scans and released for
// 3 scans, as a person would. The test enters 1 2 3 4 '#' and expects
// the digit LEDs to count up and the "correct" LED to light, clears the
// result, then enters 1 2 3 5 '#' and expects the "wrong" LED. It also
// measures the scan: each row must be driven for 50 000 clock cycles.
module code_entry_top_full_tb;
  logic        clk = 0, rst = 1;
  logic [11:0] keys = '0;
  logic [3:0]  rows, led_digits;
  logic [2:0]  cols;
  logic        led_ok, led_wrong;
  int checks = 0, failures = 0;

  localparam int TICK = 50_000;     // clock cycles per row at 50 MHz / 1 kHz
  localparam int SCAN = 4 * TICK;

  code_entry_top dut (
    .clk(clk), .rst(rst), .rows_out(rows), .cols_in(cols),
    .led_digits(led_digits), .led_ok(led_ok), .led_wrong(led_wrong));
  keypad_model pad (.rows(rows), .keys(keys), .cols(cols));

  always #10 clk = ~clk;   // 50 MHz with 1 ns units below

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  task automatic press(input int k);
    keys[k] = 1'b1;
    repeat (3 * SCAN) @(posedge clk);
    keys[k] = 1'b0;
    repeat (3 * SCAN) @(posedge clk);
  endtask

  initial begin
    repeat (80 * SCAN) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    logic [3:0] r0;
    repeat (4) @(posedge clk);
    rst <= 0;
    // Row drive period.
    @(posedge clk);
    r0 = rows;
    while (rows == r0) @(posedge clk);
    r0 = rows;
    n = 0;
    while (rows == r0) begin
      @(posedge clk);
      n++;
    end
    check(n == TICK, $sformatf("row driven for %0d cycles", n));

    for (int d = 1; d <= 4; d++) begin
      press(d);
      check(led_digits == 4'((1 << d) - 1) && !led_ok && !led_wrong,
            $sformatf("after digit %0d: leds %b ok %b wrong %b", d, led_digits, led_ok, led_wrong));
    end
    press(10);
    check(led_ok && !led_wrong, "code 1234 not accepted");
    press(11);
    check(led_digits == 4'b0000 && !led_ok, "result not cleared");
    press(1); press(2); press(3); press(5); press(10);
    check(!led_ok && led_wrong, "code 1235 not rejected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
