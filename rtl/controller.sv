// controller: decides whether the bus word is sent inverted.
//
// ED is 1 when the number of 1s in the word is THRESH (four) or more, so that
// the word sent has at most three 1s. The threshold of four is the published
// value.
//
// Interface: count (3 bits) in; ed out. Combinational.
module controller #(
  parameter int unsigned THRESH = bem_pkg::THRESH
) (
  input  logic [2:0] count,
  output logic       ed
);
  assign ed = (int'(count) >= int'(THRESH));
endmodule
