// Self-checking testbench for keypad_encoder: every row number with
// every column pattern (32 cases). Expected codes come from the keypad
// layout written out as a table: one column high names that key, no
// column high gives 1111, several columns high give the leftmost key.
module keypad_encoder_tb;
  logic [1:0] row;
  logic [2:0] cols;
  logic [3:0] key;
  int checks = 0, failures = 0;

  // layout[row][c], c = cols bit index (0 = COL 1 = right column).
  logic [3:0] layout [4][3];
  initial begin
    layout[0] = '{4'd3, 4'd2, 4'd1};
    layout[1] = '{4'd6, 4'd5, 4'd4};
    layout[2] = '{4'd9, 4'd8, 4'd7};
    layout[3] = '{4'b1010, 4'd0, 4'b1011};   // '#', 0, '*'
  end

  keypad_encoder dut (.row(row), .cols(cols), .key(key));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] expected;
    #1;
    for (int r = 0; r < 4; r++) begin
      for (int c = 0; c < 8; c++) begin
        row  = 2'(r);
        cols = 3'(c);
        #1;
        if (c[2])      expected = layout[r][2];
        else if (c[1]) expected = layout[r][1];
        else if (c[0]) expected = layout[r][0];
        else           expected = 4'b1111;
        checks++;
        if (key !== expected) begin
          failures++;
          $display("FAIL row=%0d cols=%b key=%b expected %b", r, cols, key, expected);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
