// Code detection finite state machine.
//
// Receives one event per key press (key_valid for one clk cycle with
// the key code in `key`) and checks whether the four digits entered
// match the stored code CODE. The states are the number of digits held
// (S_EMPTY .. S_FOUR) and the two results (S_OK, S_WRONG):
//
//   digit      in S_EMPTY..S_THREE: store it, go to the next count
//   '*'        in S_ONE..S_FOUR: backspace, forget the last digit
//   '#'        in S_FOUR: compare the four digits with CODE and go to
//              S_OK or S_WRONG
//   any key    in S_OK or S_WRONG: clear the entry, go to S_EMPTY
//   otherwise  no change
//
// Outputs are the six LEDs: led_digits is a thermometer code with one
// more LED lit per digit entered (all four stay lit while a result is
// shown), led_ok and led_wrong show the result of the last '#'.
// The LEDs are decoded from the state register and change on the clk
// edge that takes the key event.
//
// The keys, the four-digit code, backspace, validate-after-four-digits
// and the six LEDs follow the specification. It does not give the code
// value, what a digit after the fourth, a '#' before the fourth or a
// key while a result is shown should do, nor how a result is cleared;
// those rules above are this design's choice. CODE holds the digits
// first digit in CODE[15:12], as 4-bit codes.
//
// State encoding: the specification compares binary and one-hot state
// encoding. ONE_HOT = 0 stores the state in 3 flip-flops (binary, the
// enum values of entry_state_e); ONE_HOT = 1 stores it in 7
// flip-flops, one per state. Both give the same behaviour; an illegal
// one-hot pattern is read as S_EMPTY.
module code_fsm
  import code_entry_pkg::*;
#(
  parameter logic [4*CODE_LEN-1:0] CODE    = 16'h1234,
  parameter bit                    ONE_HOT = 1'b0
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                key_valid,
  input  key_code_t           key,
  output logic [CODE_LEN-1:0] led_digits,
  output logic                led_ok,
  output logic                led_wrong,
  output entry_state_e        state
);

  localparam int unsigned SW = ONE_HOT ? N_STATES : 3;

  function automatic logic [SW-1:0] encode(entry_state_e s);
    logic [SW-1:0] v;
    if (ONE_HOT) begin
      v = '0;
      v[int'(s)] = 1'b1;
    end else begin
      v = SW'(s);
    end
    return v;
  endfunction

  function automatic entry_state_e decode(logic [SW-1:0] v);
    entry_state_e s;
    if (ONE_HOT) begin
      s = S_EMPTY;
      for (int i = 0; i < N_STATES; i++)
        if (v == SW'(1) << i) s = entry_state_e'(i);
    end else begin
      s = (v < SW'(N_STATES)) ? entry_state_e'(v) : S_EMPTY;
    end
    return s;
  endfunction

  logic [SW-1:0] state_q;
  entry_state_e  state_d;
  key_code_t     digits_q [CODE_LEN];
  logic          match;
  logic          store;

  assign state = decode(state_q);

  always_comb begin
    match = 1'b1;
    for (int i = 0; i < CODE_LEN; i++)
      if (digits_q[i] != CODE[4*(CODE_LEN-1-i) +: 4]) match = 1'b0;
  end

  always_comb begin
    state_d = state;
    store   = 1'b0;
    if (key_valid) begin
      unique case (state)
        S_EMPTY, S_ONE, S_TWO, S_THREE, S_FOUR: begin
          if (is_digit(key) && state != S_FOUR) begin
            store   = 1'b1;
            state_d = entry_state_e'(3'(state) + 3'd1);
          end else if (key == KEY_STAR && state != S_EMPTY) begin
            state_d = entry_state_e'(3'(state) - 3'd1);
          end else if (key == KEY_HASH && state == S_FOUR) begin
            state_d = match ? S_OK : S_WRONG;
          end
        end
        default: state_d = S_EMPTY;   // S_OK, S_WRONG
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q <= encode(S_EMPTY);
      for (int i = 0; i < CODE_LEN; i++) digits_q[i] <= KEY_NONE;
    end else begin
      state_q <= encode(state_d);
      if (store) digits_q[int'(state[1:0])] <= key;
    end
  end

  // LEDs are decoded from the state.
  always_comb begin
    led_digits = '0;
    for (int i = 0; i < CODE_LEN; i++)
      if (state == S_OK || state == S_WRONG || int'(state) > i)
        led_digits[i] = 1'b1;
    led_ok    = (state == S_OK);
    led_wrong = (state == S_WRONG);
  end

  // A one-hot state register always holds exactly one set bit.
  if (ONE_HOT) begin : g_onehot_check
    always_ff @(posedge clk)
      if (!rst) assert ($onehot(state_q)) else $error("state not one-hot");
  end

endmodule
