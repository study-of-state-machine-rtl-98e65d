// Self-checking testbench for row_decoder: all four row numbers must
// give exactly the matching one-hot row drive.
module row_decoder_tb;
  logic [1:0] row;
  logic [3:0] rows;
  int checks = 0, failures = 0;

  row_decoder dut (.row(row), .rows(rows));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 4; r++) begin
      row = 2'(r);
      #1;
      checks++;
      if (rows !== 4'(1 << r)) begin
        failures++;
        $display("FAIL row=%0d rows=%b", r, rows);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
