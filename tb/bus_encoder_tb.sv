// bus_encoder_tb: drives a new 7-bit word every cycle (so only the word
// present at the in_take edge may be sent), and checks, cycle by cycle, that
// in_take is high every third cycle and that each frame carries the ED value
// and the three position codes of the sampled word in slot order, as given by
// the reference model. The first frame after reset must carry word 0. Counts
// inverted words, plain words and null codes, and fails if any never occur.
module bus_encoder_tb;
  import bem_pkg::*;
  import bem_ref_pkg::*;

  logic  clk = 0, rst_n, in_take, ed;
  word_t data_in;
  pos_t  pos;
  int checks = 0, failures = 0;
  int n_inv = 0, n_plain = 0, n_null = 0, n_full = 0;

  bus_encoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int pick_word(int i);
    case (i)
      0: return 0;
      1: return 127;
      2: return 15;
      3: return 7;
      4: return 85;
      default: return int'($urandom_range(0, 127));
    endcase
  endfunction

  initial begin
    int cur_word, next_word;
    rst_n = 0; data_in = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    cur_word = 0;
    next_word = 0;
    for (int c = 0; c < 900; c++) begin
      data_in = word_t'(pick_word(c / 3 + (c % 3 == 2 ? 0 : 1000)));
      if (c % 3 == 2) data_in = word_t'(pick_word(c / 3));
      #3;  // settle, mid-cycle
      if (c % 3 == 0) begin
        cur_word = next_word;
        if (ref_ed(cur_word)) n_inv++; else n_plain++;
        if (ref_ones(ref_ed(cur_word) ? 127 - cur_word : cur_word) == 3) n_full++;
      end
      checks++;
      if (in_take != (c % 3 == 2)) begin
        failures++; $display("FAIL cycle %0d in_take=%0b", c, in_take);
      end
      checks++;
      if (ed != ref_ed(cur_word) || int'(pos) != ref_code(cur_word, c % 3)) begin
        failures++;
        $display("FAIL cycle %0d word %b: ed=%0b pos=%0d expected %0b %0d", c, 7'(cur_word),
                 ed, pos, ref_ed(cur_word), ref_code(cur_word, c % 3));
      end
      if (pos == POS_NULL) n_null++;
      if (c % 3 == 2) next_word = int'(data_in);
      @(posedge clk); #1;
    end
    $display("inverted=%0d plain=%0d null_codes=%0d three_lines=%0d", n_inv, n_plain, n_null, n_full);
    if (n_inv == 0 || n_plain == 0 || n_null == 0 || n_full == 0) begin
      failures++; $display("FAIL a case never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
