// csla4: 4-bit low-area carry select adder.
//
// Bits 1:0 go through a 2-bit ripple-carry adder, giving Sum[1:0] and the
// carry C2. Bits 3:2 are added only once, with carry in 0: a half adder (H)
// on bit 2 and a full adder (F) on bit 3, joined by carry C1. Instead of a
// second adder for carry in 1, a 2-bit binary-to-excess-1 converter (BEC)
// adds one to that result (bit2' = ~s2, bit3' = s3 ^ s2,
// cout' = c ^ (s2 & s3)). A 6:3 multiplexer selects the plain or the
// incremented {Cout, Sum[3], Sum[2]} with C2. This is the published
// structure; there is no carry input, as in the published figure.
//
// Interface: a, b (4 bits) in; sum (4 bits), cout out. Combinational.
module csla4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [3:0] sum,
  output logic       cout
);
  // 2-bit ripple-carry adder for the low half
  logic c1_lo, c2;
  logic [1:0] s_lo;
  full_adder_18t u_rca0 (.a(a[0]), .b(b[0]), .c(1'b0),  .sum(s_lo[0]), .carry(c1_lo));
  full_adder_18t u_rca1 (.a(a[1]), .b(b[1]), .c(c1_lo), .sum(s_lo[1]), .carry(c2));

  // upper half with carry in 0: H on bit 2, F on bit 3
  logic s2, c1, s3, c3;
  always_comb begin
    s2 = a[2] ^ b[2];
    c1 = a[2] & b[2];
  end
  full_adder_18t u_f (.a(a[3]), .b(b[3]), .c(c1), .sum(s3), .carry(c3));

  // 2-bit BEC: the same result plus one
  logic s2_x, s3_x, c3_x;
  always_comb begin
    s2_x = ~s2;
    s3_x = s3 ^ s2;
    c3_x = c3 ^ (s2 & s3);
  end

  // 6:3 multiplexer selected by the low-half carry
  always_comb begin
    sum[1:0] = s_lo;
    {cout, sum[3], sum[2]} = c2 ? {c3_x, s3_x, s2_x} : {c3, s3, s2};
  end
endmodule
