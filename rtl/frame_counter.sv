// frame_counter: counts the clock cycles of one word transfer.
//
// A word travels as MOD (three) position codes in MOD consecutive cycles. The
// counter runs 0, 1, ..., MOD-1, 0, ... from reset; last marks the final cycle
// of a frame. Encoder and decoder each have one and, being reset together,
// agree on which cycle carries which code. Three cycles per word is the
// published figure; sharing the frame by a common reset is this design's
// choice.
//
// Interface: clk, rst_n (active low, synchronous) in; phase, last out.
module frame_counter #(
  parameter int unsigned MOD = bem_pkg::SLOTS,
  localparam int unsigned PW = (MOD > 1) ? $clog2(MOD) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic [PW-1:0] phase,
  output logic          last
);
  always_ff @(posedge clk) begin
    if (!rst_n)    phase <= '0;
    else if (last) phase <= '0;
    else           phase <= phase + 1'b1;
  end
  assign last = (phase == PW'(MOD - 1));
endmodule
