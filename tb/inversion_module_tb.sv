// inversion_module_tb: checks that each output line equals its mask bit when
// ED is 0 and its inverse when ED is 1 (splitter and XOR stage).
module inversion_module_tb;
  import bem_pkg::*;
  logic  ed;
  word_t mask, data;
  int checks = 0, failures = 0;

  inversion_module dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int v = 0; v < 128; v++) begin
        ed = e[0]; mask = word_t'(v);
        #1;
        for (int k = 0; k < 7; k++) begin
          checks++;
          if (int'(data[k]) != (((v >> k) & 1) ^ e)) begin
            failures++;
            $display("FAIL ed=%0d mask=%b line %0d", e, mask, k);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
