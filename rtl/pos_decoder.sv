// pos_decoder: turns one 3-bit position code into a one-hot line mask.
//
// Code k in 1..7 sets bit k-1 of the 7-bit mask; the null code 000 sets
// nothing. Three of these make up the decoder's line identifier.
//
// Interface: din (3 bits) in; dout (7 bits) out. Combinational.
module pos_decoder
  import bem_pkg::*;
(
  input  pos_t  din,
  output word_t dout
);
  assign dout = pos_to_mask(din);
endmodule
