// bus_encoder: sends a 7-bit word over four lines in three clock cycles.
//
// The ones counter counts the 1s in data_in; the controller raises ED when
// there are four or more; the comparator XORs the word with ED, leaving at
// most three 1s; the position estimator codes their positions (1..7, 0 for
// none). At the last cycle of each frame the three codes and ED are loaded
// into registers together, and during the next frame the code registers are
// put on the 3-bit pos bus one per cycle (slot 0 in cycle 0, and so on) while
// ED stays on its own line for the whole frame. This is the published
// encoder; the frame timing, the sampling of data_in once per frame and the
// registered ED line are this design's choices.
//
// Interface: clk, rst_n (active low, synchronous), data_in in;
//   in_take: data_in is sampled at the coming rising edge;
//   ed, pos: the encoded bus.
// Timing: one word per three cycles. A word sampled at edge n is on the bus in
//   the three cycles after that edge. After reset the first frame carries the
//   all-zero word.
module bus_encoder
  import bem_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  word_t data_in,
  output logic  in_take,
  output logic  ed,
  output pos_t  pos
);
  logic [1:0] phase;
  logic       last;
  logic [2:0] count;
  logic       ed_c;
  word_t      w;
  pos_vec_t   pos_c;
  pos_t       pos_q [SLOTS];

  frame_counter #(.MOD(SLOTS)) u_fc (.clk, .rst_n, .phase, .last);

  ones_counter u_cnt  (.d(data_in), .count);
  controller   u_ctl  (.count, .ed(ed_c));
  comparator   u_cmp  (.d(data_in), .ed(ed_c), .w);
  pos_estimate u_pos  (.w, .pos(pos_c));

  for (genvar i = 0; i < SLOTS; i++) begin : g_reg
    pos_register #(.W(POS_W)) u_reg (.clk, .rst_n, .en(last), .d(pos_c[i]), .q(pos_q[i]));
  end
  pos_register #(.W(1)) u_ed (.clk, .rst_n, .en(last), .d(ed_c), .q(ed));

  assign in_take = last;

  // one register per cycle onto the position lines
  always_comb begin
    pos = POS_NULL;
    for (int i = 0; i < SLOTS; i++)
      if (int'(phase) == i) pos = pos_q[i];
  end
endmodule
