// Self-checking testbench for key_decoder, driven through the keypad
// model. The scan tick comes every TICK_DIV clock cycles. It checks:
//  - rows_out is one-hot and matches the row number at all times;
//  - while a key is held, the per-row code shows it for its own row and
//    "no key" (1111) for the others;
//  - each of the 12 keys, pressed and held for several scans, gives
//    exactly one press event with its code, within two scans;
//  - releasing a key gives no event, and of two keys that go down
//    together at the start of a scan the one in the lower row wins.
module key_decoder_tb;
  import code_entry_pkg::*;

  localparam int TICK_DIV = 4;
  localparam int SCAN     = 4 * TICK_DIV;   // clock cycles per full scan

  logic        clk = 0, rst = 1, tick = 0;
  logic [3:0]  rows_out;
  logic [2:0]  cols;
  logic [11:0] keys = '0;
  logic [1:0]  row;
  key_code_t   key, scan_key, press_key;
  logic        press;
  int checks = 0, failures = 0;
  int events = 0;
  key_code_t last_event = KEY_NONE;

  key_decoder dut (
    .clk(clk), .rst(rst), .tick(tick), .rows_out(rows_out), .cols_in(cols),
    .row(row), .key(key), .scan_key(scan_key), .press(press), .press_key(press_key)
  );
  keypad_model pad (.rows(rows_out), .keys(keys), .cols(cols));

  always #5 clk = ~clk;

  int div = 0;
  always_ff @(posedge clk) begin
    div  <= (div == TICK_DIV - 1) ? 0 : div + 1;
    tick <= (div == TICK_DIV - 1);
  end

  function automatic int row_of(int k);
    if (k >= 1 && k <= 9) return (k - 1) / 3;
    return 3;
  endfunction

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  // Event monitor and row drive check.
  always @(posedge clk) begin
    if (!rst) begin
      if (press) begin
        events++;
        last_event = press_key;
      end
      checks++;
      if (rows_out != 4'(1 << row)) begin
        failures++;
        $display("FAIL rows_out=%b for row %0d", rows_out, row);
      end
    end
  end

  initial begin
    repeat (200 * 12 * SCAN) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e0, lat;
    repeat (4) @(posedge clk);
    rst <= 0;
    repeat (2 * SCAN) @(posedge clk);
    check(events == 0, "event with no key pressed");

    for (int k = 0; k < 12; k++) begin
      // Press after a random delay so the scan phase varies.
      repeat ($urandom_range(0, SCAN - 1)) @(posedge clk);
      e0 = events;
      keys[k] = 1'b1;
      lat = 0;
      while (events == e0 && lat < 4 * SCAN) begin
        @(posedge clk);
        lat++;
      end
      check(events == e0 + 1, $sformatf("key %0d: no event", k));
      check(last_event == key_code_t'(k), $sformatf("key %0d: event code %0d", k, last_event));
      check(lat <= 2 * SCAN + 3, $sformatf("key %0d: latency %0d cycles", k, lat));
      // Per-row code while held, as sampled on each scan tick (the
      // column synchronizer delays it by two cycles after a row change).
      for (int s = 0; s < SCAN; s++) begin
        @(negedge clk);
        if (!tick) continue;
        checks++;
        if (int'(row) == row_of(k)) begin
          if (key != key_code_t'(k)) begin
            failures++;
            $display("FAIL key %0d: row code %b", k, key);
          end
        end else if (key != KEY_NONE) begin
          failures++;
          $display("FAIL key %0d: row %0d shows %b", k, row, key);
        end
      end
      // Held for more scans: still one event; scan_key shows the key.
      repeat (4 * SCAN) @(posedge clk);
      check(events == e0 + 1, $sformatf("key %0d: repeated event while held", k));
      check(scan_key == key_code_t'(k), $sformatf("key %0d: scan_key %0d", k, scan_key));
      keys[k] = 1'b0;
      repeat (3 * SCAN) @(posedge clk);
      check(events == e0 + 1, $sformatf("key %0d: event on release", k));
      check(scan_key == KEY_NONE, "scan_key not cleared after release");
    end

    // Two keys together: 5 (row 2) and 0 (row 4) -> 5 is reported.
    e0 = events;
    do begin
      @(posedge clk);
      #1;
    end while (!(row == 2'd0 && tick == 1'b0));
    keys[5] = 1'b1;
    keys[0] = 1'b1;
    repeat (4 * SCAN) @(posedge clk);
    check(events == e0 + 1 && last_event == 4'd5, "two keys: lower row should win");
    keys = '0;
    repeat (3 * SCAN) @(posedge clk);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
