// Row counter.
//
// Two-bit binary counter whose value (A1 A0) is the number of the
// keypad row being scanned: 0 for ROW 1 up to 3 for ROW 4. It advances
// by one, wrapping from 3 back to 0, on each clk edge where `en` (the
// scan tick) is high, so the four rows are visited in turn. rst is
// synchronous, active high, and returns the counter to row 0.
// The specification names this counter and its purpose; the enable
// input and reset are this design's choice.
module row_counter #(
  parameter int unsigned N_ROWS = code_entry_pkg::N_ROWS
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      en,
  output logic [$clog2(N_ROWS)-1:0] row
);

  always_ff @(posedge clk) begin
    if (rst)
      row <= '0;
    else if (en)
      row <= (row == $clog2(N_ROWS)'(N_ROWS - 1)) ? '0 : row + 1'b1;
  end

endmodule
