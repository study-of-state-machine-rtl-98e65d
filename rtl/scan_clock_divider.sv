// Scan clock divider.
//
// The keypad cannot be scanned at the 50 MHz board clock, so a counter
// slows the scan down to about 1 kHz. This module counts DIVIDE cycles
// of clk and raises `tick` for exactly one clk cycle at the end of each
// count, so tick has a period of DIVIDE clk cycles (50 000 -> 1 kHz from
// 50 MHz). The rest of the design stays on clk and uses tick as a clock
// enable; the specification only says that the clock was slowed down by
// a counter, and using an enable instead of a derived clock is this
// design's choice (one clock domain, no clock made from logic).
//
// Timing: after reset is released, the first tick comes DIVIDE cycles
// later, then one every DIVIDE cycles. rst is synchronous, active high.
module scan_clock_divider #(
  parameter int unsigned CLK_HZ  = 50_000_000,
  parameter int unsigned SCAN_HZ = 1_000,
  parameter int unsigned DIVIDE  = CLK_HZ / SCAN_HZ
) (
  input  logic clk,
  input  logic rst,
  output logic tick
);

  localparam int unsigned CW = (DIVIDE > 1) ? $clog2(DIVIDE) : 1;

  logic [CW-1:0] count_q;

  initial begin
    assert (DIVIDE >= 1) else $error("DIVIDE must be at least 1");
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      count_q <= '0;
      tick    <= 1'b0;
    end else if (count_q == CW'(DIVIDE - 1)) begin
      count_q <= '0;
      tick    <= 1'b1;
    end else begin
      count_q <= count_q + 1'b1;
      tick    <= 1'b0;
    end
  end

endmodule
