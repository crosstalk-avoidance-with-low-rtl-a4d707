// inversion_module: rebuilds the 7-bit word from the ED line and the line
// mask.
//
// The splitter copies the 1-bit ED line onto all seven lines; each line is
// then XORed with its bit of the line identifier mask. With ED = 0 the word is
// the mask itself; with ED = 1 it is the inverted mask, undoing the encoder's
// inversion. Splitter and XOR stage follow the published decoder; they are
// kept in one module because the splitter alone is only wiring.
//
// Interface: ed, mask (7 bits) in; data (7 bits) out. Combinational.
module inversion_module
  import bem_pkg::*;
(
  input  logic  ed,
  input  word_t mask,
  output word_t data
);
  word_t ed7;   // splitter output

  assign ed7  = {DATA_W{ed}};
  assign data = mask ^ ed7;
endmodule
