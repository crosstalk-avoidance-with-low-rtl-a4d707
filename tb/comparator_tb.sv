// comparator_tb: checks every output line of the comparator for all words and
// both ED values: line k must be 1 exactly when d[k] differs from ED.
module comparator_tb;
  import bem_pkg::*;
  word_t d, w;
  logic  ed;
  int checks = 0, failures = 0;

  comparator dut (.*);

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
        d  = word_t'(v);
        ed = e[0];
        #1;
        for (int k = 0; k < 7; k++) begin
          checks++;
          if (w[k] != (((v >> k) & 1) != e)) begin
            failures++;
            $display("FAIL d=%b ed=%0d line %0d", d, e, k);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
