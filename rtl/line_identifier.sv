// line_identifier: names the lines the decoder must flip.
//
// Each of the three received position codes is decoded to a one-hot 7-bit
// mask (a null code gives an empty mask) and the three masks are ORed. The
// result has a 1 on every line that was 1 in the word as sent. This follows
// the published decoder: three decoder cells feeding an OR.
//
// Interface: pos (three 3-bit codes) in; mask (7 bits) out. Combinational.
module line_identifier
  import bem_pkg::*;
(
  input  pos_vec_t pos,
  output word_t    mask
);
  word_t dmask [SLOTS];

  for (genvar i = 0; i < SLOTS; i++) begin : g_dec
    pos_decoder u_dec (.din(pos[i]), .dout(dmask[i]));
  end

  always_comb begin
    mask = '0;
    for (int i = 0; i < SLOTS; i++) mask |= dmask[i];
  end
endmodule
