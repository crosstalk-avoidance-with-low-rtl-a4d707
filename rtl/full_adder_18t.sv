// full_adder_18t: 1-bit full adder in the structure of the 18-transistor
// pass-transistor adder used as the test circuit and as the adder cell of the
// carry select adder.
//
// The transistor circuit is built from three kinds of stage, written here at
// gate level:
//   x     = A xnor B                 first XNOR stage
//   sum   = buffer(x xnor C)         second XNOR stage, inverter-pair buffer
//   carry = buffer(x ? A : C)        transmission-gate 2:1 mux, buffer
// When A equals B the carry is A; otherwise it is C. The stage types come from
// the published circuit description; the mux data assignment is the standard
// full-adder identity.
//
// Interface: a, b, c in; sum, carry out. Purely combinational.
module full_adder_18t (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry
);
  logic x;       // A xnor B
  logic s_int;   // second XNOR output, before the buffer
  logic c_int;   // mux output, before the buffer
  logic s_inv;   // first inverter of each buffer
  logic c_inv;

  always_comb begin
    x     = ~(a ^ b);
    s_int = ~(x ^ c);
    c_int = x ? a : c;
    // inverter-based buffers restore the levels of the pass-transistor nodes
    s_inv = ~s_int;
    c_inv = ~c_int;
    sum   = ~s_inv;
    carry = ~c_inv;
  end
endmodule
