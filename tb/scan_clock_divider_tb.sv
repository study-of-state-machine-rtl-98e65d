// Self-checking testbench for scan_clock_divider. A small instance
// (DIVIDE = 7) and one at the default 50 MHz -> 1 kHz setting are run
// side by side; for each, the first tick must come DIVIDE cycles after
// reset, every tick must be one cycle wide, and ticks must be exactly
// DIVIDE cycles apart (50 000 cycles = 1 ms at 50 MHz).
module scan_clock_divider_tb;
  logic clk = 0, rst = 1;
  logic tick_small, tick_full;
  int checks = 0, failures = 0;

  localparam int SMALL = 7;
  localparam int FULL  = 50_000;

  scan_clock_divider #(.DIVIDE(SMALL)) dut_small (.clk(clk), .rst(rst), .tick(tick_small));
  scan_clock_divider                   dut_full  (.clk(clk), .rst(rst), .tick(tick_full));

  always #5 clk = ~clk;

  initial begin
    repeat (4 * FULL + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Cycle counter since reset release, and the last tick seen.
  int cycle = 0, last_small = 0, last_full = 0, n_small = 0, n_full = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    while (n_full < 3) begin
      @(posedge clk);
      #1;
      if (!rst) cycle++;
      if (tick_small) begin
        checks++;
        if (cycle - last_small != SMALL) begin
          failures++;
          $display("FAIL small tick at cycle %0d, previous %0d", cycle, last_small);
        end
        last_small = cycle;
        n_small++;
      end
      if (tick_full) begin
        checks++;
        if (cycle - last_full != FULL) begin
          failures++;
          $display("FAIL full tick at cycle %0d, previous %0d", cycle, last_full);
        end
        last_full = cycle;
        n_full++;
      end
    end
    checks++;
    if (n_small != 3 * FULL / SMALL) begin
      failures++;
      $display("FAIL %0d small ticks, expected %0d", n_small, 3 * FULL / SMALL);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
