// Behavioural model of the 3x4 matrix keypad, for simulation only.
//
// Twelve key inputs, one per key, indexed by the key's code: keys[0..9]
// are the digits, keys[10] is '#', keys[11] is '*'. A high key input
// means the key is held down. The four row inputs are the row drive
// lines (rows[0] = ROW 1). Each column output is high when a held key
// in that column sits in a row that is driven high, and low otherwise,
// as with the pull-down resistors of the real keypad. cols[0] is COL 1
// (3, 6, 9, #), cols[1] is COL 2 (2, 5, 8, 0), cols[2] is COL 3
// (1, 4, 7, *). Zero delay.
module keypad_model (
  input  logic [3:0]  rows,
  input  logic [11:0] keys,
  output logic [2:0]  cols
);

  // Row and column (as a cols[] index) of each key code.
  function automatic int key_row(int k);
    case (k)
      1, 2, 3:   return 0;
      4, 5, 6:   return 1;
      7, 8, 9:   return 2;
      default:   return 3;   // 0, '#', '*'
    endcase
  endfunction

  function automatic int key_col(int k);
    case (k)
      1, 4, 7, 11: return 2;
      2, 5, 8, 0:  return 1;
      default:     return 0; // 3, 6, 9, '#'
    endcase
  endfunction

  always_comb begin
    cols = '0;
    for (int k = 0; k < 12; k++)
      if (keys[k] && rows[key_row(k)]) cols[key_col(k)] = 1'b1;
  end

endmodule
