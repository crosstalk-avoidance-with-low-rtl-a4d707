// pos_estimate_tb: applies every word with at most three 1s and checks the
// three codes: the k-th set line from the bottom (bit b) must appear in slot
// k as b+1, and slots beyond the number of 1s must hold 000.
module pos_estimate_tb;
  import bem_pkg::*;
  word_t    w;
  pos_vec_t pos;
  int checks = 0, failures = 0;

  pos_estimate dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 128; v++) begin
      int exp_code [3];
      int n;
      n = 0;
      exp_code = '{0, 0, 0};
      for (int b = 0; b < 7; b++)
        if (((v >> b) & 1) != 0) begin
          if (n < 3) exp_code[n] = b + 1;
          n++;
        end
      if (n > 3) continue;
      w = word_t'(v);
      #1;
      for (int s = 0; s < 3; s++) begin
        checks++;
        if (int'(pos[s]) != exp_code[s]) begin
          failures++;
          $display("FAIL w=%b slot %0d = %0d expected %0d", w, s, pos[s], exp_code[s]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
