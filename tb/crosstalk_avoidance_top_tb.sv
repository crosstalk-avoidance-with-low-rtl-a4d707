// crosstalk_avoidance_top_tb: end-to-end test of the link at its default
// size. The encoded bus is looped from tx_* to rx_* as an ideal wire. Every
// one of the 128 words is sent (directed ones first, then the rest in random
// order); each must come out of data_out exactly three cycles after the
// in_take edge that sampled it, one word per three cycles. Along the way the
// four-line bus is checked to be sparse: never more than three position codes
// per word. The test adder is checked on all eight inputs.
// Counted mechanisms (each must occur at least once): inverted words (ED=1),
// plain words, frames with null codes, frames with three codes, all-ones word
// sent as an inverted empty word.
// It also prints, for information, the switching on the raw 7-line bus (the
// words sent back to back, one per cycle) and on the 4-line encoded bus:
// total line toggles and adjacent line pairs switching in opposite directions
// (the worst case for coupling).
module crosstalk_avoidance_top_tb;
  import bem_pkg::*;

  logic  clk = 0, rst_n;
  logic  fa_a, fa_b, fa_c, fa_sum, fa_carry;
  word_t data_in, data_out;
  logic  in_take, tx_ed, rx_ed, out_valid;
  pos_t  tx_pos, rx_pos;
  int checks = 0, failures = 0;
  int n_inv = 0, n_plain = 0, n_null_frame = 0, n_full_frame = 0, n_allones = 0;

  crosstalk_avoidance_top dut (.*);

  // ideal interconnect between the encoder and decoder pins
  assign rx_ed  = tx_ed;
  assign rx_pos = tx_pos;

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sampled words, with the cycle at whose end each was taken
  int sent_word [$];
  int sent_cyc  [$];
  int cyc = 0;
  int frame_codes = 0;

  // switching statistics
  int raw_toggles = 0, raw_opposite = 0, enc_toggles = 0, enc_opposite = 0;
  int prev_raw = 0, prev_enc = 0;

  function automatic void count_switching(int prev, int cur, int n, ref int toggles, ref int opposite);
    int t;
    t = prev ^ cur;
    for (int k = 0; k < n; k++) begin
      if (((t >> k) & 1) != 0) toggles++;
      if (k + 1 < n && ((t >> k) & 3) == 3 && ((cur >> k) & 1) != ((cur >> (k + 1)) & 1))
        opposite++;
    end
  endfunction

  initial begin
    int order [128];
    int idx;
    // test adder
    for (int v = 0; v < 8; v++) begin
      {fa_a, fa_b, fa_c} = 3'(v);
      #1;
      checks++;
      if (int'({fa_carry, fa_sum}) != (v & 1) + ((v >> 1) & 1) + ((v >> 2) & 1)) begin
        failures++; $display("FAIL test adder input %b", 3'(v));
      end
    end

    // word order: directed words first, then the rest shuffled
    for (int i = 0; i < 128; i++) order[i] = i;
    for (int i = 127; i > 0; i--) begin
      int j, t;
      j = int'($urandom_range(0, i));
      t = order[i]; order[i] = order[j]; order[j] = t;
    end
    begin
      int first [5];
      first = '{127, 0, 15, 7, 42};
      for (int i = 0; i < 5; i++)
        for (int k = 0; k < 128; k++)
          if (order[k] == first[i]) begin
            int t; t = order[i]; order[i] = order[k]; order[k] = t;
          end
    end

    rst_n = 0; data_in = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    idx = 0;
    while (idx < 128 || sent_word.size() != 0) begin
      data_in = (idx < 128) ? word_t'(order[idx]) : word_t'($urandom_range(0, 127));
      #3;
      // bus side: count codes per frame, at most three, and classify
      if (tx_pos != POS_NULL) frame_codes++;
      if (cyc >= 3) count_switching(prev_enc, int'({tx_ed, tx_pos}), 4, enc_toggles, enc_opposite);
      prev_enc = int'({tx_ed, tx_pos});
      if (cyc % 3 == 2) begin
        checks++;
        if (frame_codes > 3) begin failures++; $display("FAIL %0d codes in a frame", frame_codes); end
        if (frame_codes < 3) n_null_frame++; else n_full_frame++;
        if (tx_ed) n_inv++; else n_plain++;
        if (tx_ed && frame_codes == 0) n_allones++;
        frame_codes = 0;
      end
      // decoder side
      checks++;
      if (out_valid != (cyc >= 3 && cyc % 3 == 0)) begin
        failures++; $display("FAIL cycle %0d out_valid=%0b", cyc, out_valid);
      end
      if (out_valid) begin
        if (cyc == 3) begin
          checks++;  // frame sent right after reset carries word 0
          if (data_out != '0) begin failures++; $display("FAIL first word %b", data_out); end
        end else if (sent_word.size() != 0) begin
          int w, c0;
          w  = sent_word.pop_front();
          c0 = sent_cyc.pop_front();
          checks += 2;
          if (int'(data_out) != w) begin
            failures++; $display("FAIL sent %b received %b", 7'(w), data_out);
          end
          if (cyc - c0 != 4) begin   // taken at the end of cycle c0, out in c0+4 = 3 clocks later
            failures++; $display("FAIL latency %0d cycles", cyc - c0 - 1);
          end
        end
      end
      // encoder input side
      checks++;
      if (in_take != (cyc % 3 == 2)) begin failures++; $display("FAIL in_take at %0d", cyc); end
      if (in_take && idx < 128) begin
        count_switching(prev_raw, int'(data_in), 7, raw_toggles, raw_opposite);
        prev_raw = int'(data_in);
        sent_word.push_back(int'(data_in));
        sent_cyc.push_back(cyc);
        idx++;
      end
      @(posedge clk); #1;
      cyc++;
    end
    $display("words=128 cycles=%0d inverted=%0d plain=%0d frames_with_null=%0d frames_with_three=%0d all_ones=%0d",
             cyc, n_inv, n_plain, n_null_frame, n_full_frame, n_allones);
    $display("raw 7-line bus: %0d toggles, %0d opposite adjacent pairs; encoded 4-line bus: %0d toggles, %0d opposite adjacent pairs",
             raw_toggles, raw_opposite, enc_toggles, enc_opposite);
    if (n_inv == 0 || n_plain == 0 || n_null_frame == 0 || n_full_frame == 0 || n_allones == 0) begin
      failures++; $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
