// Self-checking testbench for row_counter: random enable pattern, the
// count is compared with a modulo-4 reference after every clock edge,
// and reset must return it to row 0.
module row_counter_tb;
  logic clk = 0, rst = 1, en = 0;
  logic [1:0] row;
  int ref_row = 0;
  int checks = 0, failures = 0;

  row_counter dut (.clk(clk), .rst(rst), .en(en), .row(row));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 400; i++) begin
      en <= ($urandom_range(0, 2) != 0);
      if (i == 200) rst <= 1;
      @(posedge clk);
      if (rst) ref_row = 0;
      else if (en) ref_row = (ref_row + 1) % 4;
      rst <= 0;
      #1;
      checks++;
      if (int'(row) != ref_row) begin
        failures++;
        $display("FAIL cycle %0d: row=%0d expected %0d", i, row, ref_row);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
