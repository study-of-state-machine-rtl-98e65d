// Shared constants and types of the keypad code entry system.
//
// Key codes: every key of the 3x4 keypad is reported as a 4-bit code.
// Digits 0..9 are their own binary value, '#' is 4'b1010, '*' is
// 4'b1011 and "no key" is 4'b1111; this table is the one the design is
// specified with. The keypad geometry (4 rows, 3 columns) and the
// code length (4 digits) also follow the specification.
//
// entry_state_e lists the logical states of the code detection FSM.
// How they are stored in flip-flops (binary or one-hot) is chosen
// inside code_fsm.
package code_entry_pkg;

  localparam int unsigned N_ROWS     = 4;
  localparam int unsigned N_COLS     = 3;
  localparam int unsigned CODE_LEN   = 4;   // digits in the secret code
  localparam int unsigned KEY_W      = 4;   // width of a key code

  typedef logic [KEY_W-1:0] key_code_t;

  localparam key_code_t KEY_NONE = 4'b1111;
  localparam key_code_t KEY_HASH = 4'b1010;  // '#': validate
  localparam key_code_t KEY_STAR = 4'b1011;  // '*': backspace

  // True for the codes 0..9.
  function automatic logic is_digit(key_code_t k);
    return k <= 4'd9;
  endfunction

  // Logical states of the code detection FSM: number of digits held,
  // then the two result states.
  typedef enum logic [2:0] {
    S_EMPTY = 3'd0,
    S_ONE   = 3'd1,
    S_TWO   = 3'd2,
    S_THREE = 3'd3,
    S_FOUR  = 3'd4,
    S_OK    = 3'd5,
    S_WRONG = 3'd6
  } entry_state_e;

  localparam int unsigned N_STATES = 7;

endpackage
