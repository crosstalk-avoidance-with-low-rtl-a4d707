// bus_decoder: rebuilds the 7-bit word from the four bus lines.
//
// In cycle i of a frame the code on pos is loaded into position register i;
// in the last cycle the ED line is loaded too. The line identifier turns the
// three stored codes into a mask of lines, and the inversion module XORs that
// mask with the split ED line. The result is on data_out, with out_valid high,
// in the first cycle of the following frame. The three registers, line
// identifier, splitter and inversion module are the published decoder; the
// frame counter, reset together with the encoder's, is this design's way of
// knowing which cycle carries which register.
//
// Interface: clk, rst_n (active low, synchronous), ed, pos in;
//   data_out, out_valid out.
// Timing: a frame received in cycles n..n+2 gives data_out in cycle n+3, for
//   that one cycle (out_valid = 1).
module bus_decoder
  import bem_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  ed,
  input  pos_t  pos,
  output word_t data_out,
  output logic  out_valid
);
  logic [1:0] phase;
  logic       last;
  pos_vec_t   pos_q;
  logic       ed_q;
  word_t      mask;

  frame_counter #(.MOD(SLOTS)) u_fc (.clk, .rst_n, .phase, .last);

  for (genvar i = 0; i < SLOTS; i++) begin : g_reg
    pos_register #(.W(POS_W)) u_reg (
      .clk, .rst_n, .en(int'(phase) == i), .d(pos), .q(pos_q[i])
    );
  end
  pos_register #(.W(1)) u_ed (.clk, .rst_n, .en(last), .d(ed), .q(ed_q));

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= last;
  end

  line_identifier  u_lid (.pos(pos_q), .mask);
  inversion_module u_inv (.ed(ed_q), .mask, .data(data_out));
endmodule
