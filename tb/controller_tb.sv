// controller_tb: checks that ED is 1 exactly for counts 4..7.
module controller_tb;
  logic [2:0] count;
  logic       ed;
  int checks = 0, failures = 0;

  controller dut (.*);

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 8; n++) begin
      count = 3'(n);
      #1;
      checks++;
      if (ed != (n > 3)) begin
        failures++;
        $display("FAIL count=%0d ed=%0b", n, ed);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
