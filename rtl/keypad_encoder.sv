// Keypad encoder.
//
// Combinational truth table that names the key pressed from the number
// of the row being scanned (row = A1 A0) and the three column lines
// read back from the keypad (cols = B2 B1 B0). The key layout is
//
//              COL 3   COL 2   COL 1      (cols[2] cols[1] cols[0])
//     ROW 1      1       2       3
//     ROW 2      4       5       6
//     ROW 3      7       8       9
//     ROW 4      *       0       #
//
// and the output is the 4-bit key code D3..D0 of code_entry_pkg
// (digit value, '#' = 1010, '*' = 1011, no key = 1111). Layout and codes
// follow the specification. Which column line is B2, B1 or B0 is this
// design's choice (cols[i] is COL i+1), as is the answer when several
// columns of one row are high: the leftmost key (COL 3) wins, since the
// circuit is not meant to handle two keys pressed together.
module keypad_encoder
  import code_entry_pkg::*;
(
  input  logic [1:0]        row,
  input  logic [N_COLS-1:0] cols,
  output key_code_t         key
);

  // Index of the column within the row: 0 = COL 3 (left) .. 2 = COL 1.
  logic       hit;
  logic [1:0] pos;

  always_comb begin
    hit = 1'b1;
    pos = 2'd0;
    unique casez (cols)
      3'b1??:  pos = 2'd0;
      3'b01?:  pos = 2'd1;
      3'b001:  pos = 2'd2;
      default: hit = 1'b0;
    endcase
  end

  always_comb begin
    if (!hit) begin
      key = KEY_NONE;
    end else if (row != 2'd3) begin
      // Rows 1..3 hold the digits 1..9 in reading order.
      key = key_code_t'(3 * int'(row) + int'(pos) + 1);
    end else begin
      unique case (pos)
        2'd0:    key = KEY_STAR;
        2'd1:    key = 4'd0;
        default: key = KEY_HASH;
      endcase
    end
  end

endmodule
