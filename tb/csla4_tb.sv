// csla4_tb: checks the 4-bit carry select adder exhaustively (all 256 input
// pairs) against integer addition.
module csla4_tb;
  logic [3:0] a, b, sum;
  logic       cout;
  int checks = 0, failures = 0;

  csla4 dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a = 4'(i); b = 4'(j);
        #1;
        checks++;
        if ({cout, sum} != 5'(i + j)) begin
          failures++;
          $display("FAIL %0d + %0d = %0d", i, j, {cout, sum});
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
