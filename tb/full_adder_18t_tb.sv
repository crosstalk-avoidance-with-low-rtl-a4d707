// full_adder_18t_tb: checks the 18-transistor full adder on all eight input
// combinations against a + b + c computed as an integer.
module full_adder_18t_tb;
  logic a, b, c, sum, carry;
  int checks = 0, failures = 0;

  full_adder_18t dut (.*);

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int exp_total;
      {a, b, c} = 3'(v);
      #1;
      exp_total = int'(v[0]) + int'(v[1]) + int'(v[2]);
      checks++;
      if ({carry, sum} != 2'(exp_total)) begin
        failures++;
        $display("FAIL a=%0b b=%0b c=%0b got %0b%0b", a, b, c, carry, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
