// Keypad code entry system, top level.
//
// A 3x4 matrix keypad (digits 0-9, '*' and '#') is scanned row by row;
// the key presses are checked against a stored four-digit code and the
// result is shown on six LEDs: four that count the digits entered and
// one each for "correct" and "wrong". '*' deletes the last digit and
// '#' validates once four digits are in.
//
//   scan_clock_divider  50 MHz board clock -> ~1 kHz scan tick
//   key_decoder         row counter + row decoder + keypad encoder,
//                       one press event per key press
//   code_fsm            code detection FSM driving the LEDs
//
// Interface: rows_out drives keypad rows ROW 1..ROW 4 (bit 0 = ROW 1,
// one row high at a time); cols_in reads columns COL 1..COL 3 (bit 0 =
// COL 1), which need pull-down resistors so that an idle column reads
// low. rst is synchronous and active high. A key is taken one full scan
// (4 ticks, about 4 ms at the defaults) after it is pressed, and must be
// released for a full scan before the next press counts.
//
// Board clock, scan rate, keypad wiring and LEDs follow the
// specification; the use of a clock enable rather than a divided clock,
// the reset and the default CODE are this design's choices.
module code_entry_top
  import code_entry_pkg::*;
#(
  parameter int unsigned           CLK_HZ  = 50_000_000,
  parameter int unsigned           SCAN_HZ = 1_000,
  parameter logic [4*CODE_LEN-1:0] CODE    = 16'h1234,
  parameter bit                    ONE_HOT = 1'b0
) (
  input  logic                clk,
  input  logic                rst,
  output logic [N_ROWS-1:0]   rows_out,
  input  logic [N_COLS-1:0]   cols_in,
  output logic [CODE_LEN-1:0] led_digits,
  output logic                led_ok,
  output logic                led_wrong
);

  logic         tick;
  key_code_t    press_key;
  logic         press;

  scan_clock_divider #(.CLK_HZ(CLK_HZ), .SCAN_HZ(SCAN_HZ)) u_divider (
    .clk  (clk),
    .rst  (rst),
    .tick (tick)
  );

  key_decoder u_key_decoder (
    .clk       (clk),
    .rst       (rst),
    .tick      (tick),
    .rows_out  (rows_out),
    .cols_in   (cols_in),
    .row       (),
    .key       (),
    .scan_key  (),
    .press     (press),
    .press_key (press_key)
  );

  code_fsm #(.CODE(CODE), .ONE_HOT(ONE_HOT)) u_fsm (
    .clk        (clk),
    .rst        (rst),
    .key_valid  (press),
    .key        (press_key),
    .led_digits (led_digits),
    .led_ok     (led_ok),
    .led_wrong  (led_wrong),
    .state      ()
  );

endmodule
