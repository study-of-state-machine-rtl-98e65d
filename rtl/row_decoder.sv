// Row decoder (counter decoder).
//
// Turns the row number from row_counter into the drive lines of the
// keypad: exactly one of rows[N_ROWS-1:0] is high, rows[0] being ROW 1.
// The keypad's column lines have pull-down resistors, so the driven row
// reads back high on the column of a pressed key and all other columns
// stay low. Purely combinational.
module row_decoder #(
  parameter int unsigned N_ROWS = code_entry_pkg::N_ROWS
) (
  input  logic [$clog2(N_ROWS)-1:0] row,
  output logic [N_ROWS-1:0]         rows
);

  always_comb begin
    rows = '0;
    rows[row] = 1'b1;
  end

endmodule
