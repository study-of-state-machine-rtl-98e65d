// Key decoder: the keypad scanning circuit.
//
// Connects the row counter, the row decoder and the keypad encoder as
// the specification describes: the counter steps through the four rows
// at the scan rate, the decoder drives the selected row line high, and
// the encoder combines the row number with the column lines read back
// to give the 4-bit code of the key pressed (`key`, KEY_NONE when the
// scanned row has no key down).
//
// Two parts are this design's own additions. The column lines come from
// switches, not from clk's domain, so they pass through a two-flop
// synchronizer before the encoder; the rows change only on a scan tick,
// so with a tick every two or more cycles the synchronized columns
// belong to the current row by the next tick. And key_scan_latch turns
// the per-row code into one `press` event per key press, with its code
// in `press_key`, for the code detection FSM.
//
// Interface: tick is the scan enable (one clk cycle wide, at least 3
// clk cycles apart). rows_out is one-hot, rows_out[0] = ROW 1.
// cols_in[i] is COL i+1, high when a key in the driven row is pressed.
module key_decoder
  import code_entry_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              tick,
  output logic [N_ROWS-1:0] rows_out,
  input  logic [N_COLS-1:0] cols_in,
  output logic [1:0]        row,        // A1 A0: row being scanned
  output key_code_t         key,        // D3..D0 for the scanned row
  output key_code_t         scan_key,   // key seen in the last full scan
  output logic              press,
  output key_code_t         press_key
);

  logic [N_COLS-1:0] cols_meta_q, cols_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      cols_meta_q <= '0;
      cols_q      <= '0;
    end else begin
      cols_meta_q <= cols_in;
      cols_q      <= cols_meta_q;
    end
  end

  row_counter #(.N_ROWS(N_ROWS)) u_counter (
    .clk (clk),
    .rst (rst),
    .en  (tick),
    .row (row)
  );

  row_decoder #(.N_ROWS(N_ROWS)) u_counter_decoder (
    .row  (row),
    .rows (rows_out)
  );

  keypad_encoder u_keypad_encoder (
    .row  (row),
    .cols (cols_q),
    .key  (key)
  );

  key_scan_latch #(.N_ROWS(N_ROWS)) u_scan_latch (
    .clk       (clk),
    .rst       (rst),
    .tick      (tick),
    .row       (row),
    .key       (key),
    .scan_key  (scan_key),
    .press     (press),
    .press_key (press_key)
  );

endmodule
