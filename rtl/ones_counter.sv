// ones_counter: number of 1s in the 7-bit bus word.
//
// The count is built from 4-bit low-area carry select adders arranged as a
// tree: three adders sum the bit pairs (d0+d1, d2+d3, d4+d5), a fourth adds
// the first two pair sums, a fifth adds the third pair sum and d6, and the
// last adds the two partial counts. The use of carry select adders follows
// the published counter; the tree arrangement is this design's choice.
//
// Interface: d (7 bits) in; count (3 bits, 0..7) out. Combinational.
module ones_counter
  import bem_pkg::*;
(
  input  word_t      d,
  output logic [2:0] count
);
  logic [3:0] p01, p23, p45, q0, q1, tot;
  logic       co01, co23, co45, coq0, coq1, cotot;   // never set: sums stay below 8

  csla4 u_p01 (.a({3'b0, d[0]}), .b({3'b0, d[1]}), .sum(p01), .cout(co01));
  csla4 u_p23 (.a({3'b0, d[2]}), .b({3'b0, d[3]}), .sum(p23), .cout(co23));
  csla4 u_p45 (.a({3'b0, d[4]}), .b({3'b0, d[5]}), .sum(p45), .cout(co45));
  csla4 u_q0  (.a(p01), .b(p23), .sum(q0), .cout(coq0));
  csla4 u_q1  (.a(p45), .b({3'b0, d[6]}), .sum(q1), .cout(coq1));
  csla4 u_tot (.a(q0), .b(q1), .sum(tot), .cout(cotot));

  assign count = tot[2:0];
endmodule
