// bus_decoder_tb: plays encoded frames (from the reference model) into the
// decoder, three cycles per word, and checks that out_valid is high exactly
// in the first cycle of each following frame and that data_out then equals
// the word that was encoded. Every one of the 128 words is sent, in random
// order after a directed start.
module bus_decoder_tb;
  import bem_pkg::*;
  import bem_ref_pkg::*;

  logic  clk = 0, rst_n, ed, out_valid;
  pos_t  pos;
  word_t data_out;
  int checks = 0, failures = 0, words = 0, n_inv = 0;

  bus_decoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int order [128];
    int prev_word;
    for (int i = 0; i < 128; i++) order[i] = i;
    for (int i = 127; i > 0; i--) begin
      int j, t;
      j = int'($urandom_range(0, i));
      t = order[i]; order[i] = order[j]; order[j] = t;
    end
    rst_n = 0; ed = 0; pos = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    prev_word = -1;
    for (int f = 0; f <= 128; f++) begin
      int v;
      v = (f < 128) ? order[f] : 0;
      for (int s = 0; s < 3; s++) begin
        ed  = ref_ed(v);
        pos = pos_t'(ref_code(v, s));
        #3;
        checks++;
        if (out_valid != (s == 0 && prev_word >= 0)) begin
          failures++; $display("FAIL frame %0d slot %0d out_valid=%0b", f, s, out_valid);
        end
        if (s == 0 && prev_word >= 0) begin
          checks++;
          words++;
          if (int'(data_out) != prev_word) begin
            failures++; $display("FAIL word %b decoded as %b", 7'(prev_word), data_out);
          end
        end
        @(posedge clk); #1;
      end
      prev_word = v;
      if (ref_ed(v)) n_inv++;
    end
    if (words != 128 || n_inv == 0) begin failures++; $display("FAIL words=%0d", words); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
