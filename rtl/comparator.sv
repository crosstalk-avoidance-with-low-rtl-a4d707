// comparator: XORs each bit of the 7-bit word with the controller output.
//
// With ED = 1 every line is inverted, with ED = 0 the word passes unchanged.
// Either way the result has at most three 1s; their positions are what the
// encoder transmits.
//
// Interface: d (7 bits), ed in; w (7 bits) out. Combinational.
module comparator
  import bem_pkg::*;
(
  input  word_t d,
  input  logic  ed,
  output word_t w
);
  assign w = d ^ {DATA_W{ed}};
endmodule
