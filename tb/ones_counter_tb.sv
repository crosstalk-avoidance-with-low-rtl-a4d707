// ones_counter_tb: checks the 1s count of all 128 seven-bit words against a
// bit-by-bit loop.
module ones_counter_tb;
  import bem_pkg::*;
  word_t      d;
  logic [2:0] count;
  int checks = 0, failures = 0;

  ones_counter dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 128; v++) begin
      int n;
      d = word_t'(v);
      n = 0;
      for (int k = 0; k < 7; k++) n += (v >> k) & 1;
      #1;
      checks++;
      if (int'(count) != n) begin
        failures++;
        $display("FAIL d=%b count=%0d expected %0d", d, count, n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
