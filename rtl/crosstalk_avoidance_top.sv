// crosstalk_avoidance_top: the bus-encoding link and its test adder.
//
// A 7-bit word entering data_in is encoded by bus_encoder into four lines (ED
// and a 3-bit position bus) that carry at most three position codes per word,
// one per cycle. The four lines leave the chip on tx_ed/tx_pos; the wires in
// between are the analog part of the link and are not modelled here. They
// come back on rx_ed/rx_pos into bus_decoder, which delivers the word on
// data_out. Beside the link sits the 18-transistor full adder used as the test
// circuit, with its own pins.
//
// Interface: clk, rst_n (active low, synchronous); data_in, in_take;
//   tx_ed, tx_pos out and rx_ed, rx_pos in (connect them, directly or through
//   a wire model); data_out, out_valid; fa_a/fa_b/fa_c, fa_sum/fa_carry.
// Timing: one word every three cycles; a word sampled when in_take is high
//   appears on data_out three cycles later if tx_* is tied to rx_*.
module crosstalk_avoidance_top
  import bem_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  // test circuit
  input  logic  fa_a,
  input  logic  fa_b,
  input  logic  fa_c,
  output logic  fa_sum,
  output logic  fa_carry,
  // link
  input  word_t data_in,
  output logic  in_take,
  output logic  tx_ed,
  output pos_t  tx_pos,
  input  logic  rx_ed,
  input  pos_t  rx_pos,
  output word_t data_out,
  output logic  out_valid
);
  full_adder_18t u_test_fa (.a(fa_a), .b(fa_b), .c(fa_c), .sum(fa_sum), .carry(fa_carry));

  bus_encoder u_enc (.clk, .rst_n, .data_in, .in_take, .ed(tx_ed), .pos(tx_pos));
  bus_decoder u_dec (.clk, .rst_n, .ed(rx_ed), .pos(rx_pos), .data_out, .out_valid);
endmodule
