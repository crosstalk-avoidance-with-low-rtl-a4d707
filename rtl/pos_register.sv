// pos_register: a W-bit register with load enable and synchronous clear.
//
// Holds one position code. Three of these sit in the encoder, loaded together
// with the codes of a new word, and three in the decoder, loaded one per cycle
// as the codes arrive. Clearing to 000 (the null code) on reset is this
// design's choice.
//
// Interface: clk, rst_n (active low, synchronous), en, d in; q out.
// Timing: q takes d at the rising clock edge when en is 1.
module pos_register #(
  parameter int unsigned W = bem_pkg::POS_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk) begin
    if (!rst_n)  q <= '0;
    else if (en) q <= d;
  end
endmodule
