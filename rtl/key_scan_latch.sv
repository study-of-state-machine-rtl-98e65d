// Key scan latch: turns the row-by-row output of the keypad encoder
// into one event per key press.
//
// The encoder shows a key code only while the row holding that key is
// being scanned; for the other rows it shows "no key". On every scan
// tick this module samples the encoder output for the current row and
// remembers the first key found in the scan. When the last row has been
// sampled, the key found in that full scan becomes `scan_key` (the "no key" code
// if none). If the scan found a key and the previous full scan found
// none, `press` is high for one clk cycle with the key in `press_key`.
// A key held down therefore gives one event, and a new event needs a
// scan with no key in between, which also rejects contact bounce
// shorter than a scan. If two keys are down, the first one scanned
// wins: the one in the lower numbered row when both were down at the
// start of the scan.
//
// The specification states the need (decode which key is pressed, fed
// to the code FSM, with the scan slowed to about 1 kHz) but not this
// circuit; the whole module is this design's choice.
//
// Timing: press rises on the clk edge after the tick that sampled the
// last row (row N_ROWS-1) of the first scan that saw the key.
module key_scan_latch #(
  parameter int unsigned N_ROWS = code_entry_pkg::N_ROWS
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      tick,      // scan clock enable
  input  logic [$clog2(N_ROWS)-1:0] row,       // row sampled at this tick
  input  code_entry_pkg::key_code_t                 key,       // encoder output for row
  output code_entry_pkg::key_code_t                 scan_key,  // key of the last full scan
  output logic                      press,     // one-cycle press event
  output code_entry_pkg::key_code_t                 press_key
);

  code_entry_pkg::key_code_t acc_q;   // first key seen so far in the current scan
  code_entry_pkg::key_code_t found;

  assign found = (acc_q != code_entry_pkg::KEY_NONE) ? acc_q : key;

  always_ff @(posedge clk) begin
    if (rst) begin
      acc_q     <= code_entry_pkg::KEY_NONE;
      scan_key  <= code_entry_pkg::KEY_NONE;
      press     <= 1'b0;
      press_key <= code_entry_pkg::KEY_NONE;
    end else begin
      press <= 1'b0;
      if (tick) begin
        if (row == $clog2(N_ROWS)'(N_ROWS - 1)) begin
          scan_key <= found;
          acc_q    <= code_entry_pkg::KEY_NONE;
          if (found != code_entry_pkg::KEY_NONE && scan_key == code_entry_pkg::KEY_NONE) begin
            press     <= 1'b1;
            press_key <= found;
          end
        end else begin
          acc_q <= found;
        end
      end
    end
  end

endmodule
