// pos_estimate: finds the lines that are 1 in the comparator output and
// encodes their positions as 3-bit codes.
//
// After the comparator the word has at most SLOTS (three) 1s. Scanning from
// line 1 (bit 0) upwards, the first 1 found goes to slot 0, the second to
// slot 1, the third to slot 2. A line in bit k is coded k+1; unused slots hold
// the null code 000. All three codes are found in the same cycle so that the
// three position registers can be loaded together. Any 1s beyond the third
// are ignored (the comparator never produces them).
//
// The code table and the three slots follow the published scheme. The
// published RTL finds the positions with a clocked bit-by-bit search; this
// module does the same search combinationally, lowest line first.
//
// Interface: w (7 bits) in; pos (three 3-bit codes) out. Combinational.
module pos_estimate
  import bem_pkg::*;
(
  input  word_t    w,
  output pos_vec_t pos
);
  always_comb begin
    int unsigned n;
    n   = 0;
    pos = '0;
    for (int unsigned k = 0; k < DATA_W; k++) begin
      if (w[k] && n < SLOTS) begin
        pos[n] = pos_t'(k + 1);
        n      = n + 1;
      end
    end
  end
endmodule
