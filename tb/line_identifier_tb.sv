// line_identifier_tb: applies all 512 combinations of three codes and checks
// the mask against a mask built bit by bit from the codes (code 0 = no line).
module line_identifier_tb;
  import bem_pkg::*;
  pos_vec_t pos;
  word_t    mask;
  int checks = 0, failures = 0;

  line_identifier dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      int exp_mask;
      exp_mask = 0;
      for (int s = 0; s < 3; s++) begin
        int c;
        c = (v >> (3 * s)) & 7;
        if (c != 0) exp_mask |= 1 << (c - 1);
      end
      pos = 9'(v);
      #1;
      checks++;
      if (int'(mask) != exp_mask) begin
        failures++;
        $display("FAIL codes %0d %0d %0d mask=%b expected %b", pos[0], pos[1], pos[2], mask, 7'(exp_mask));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
