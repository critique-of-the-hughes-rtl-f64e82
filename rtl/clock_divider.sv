// clock_divider: the divide-by-2 D flip-flop that follows the VCO.
//
// The VCO runs at twice the bit rate (the X2 clock). A D flip-flop with its
// Q-bar output fed back to D toggles on every rising X2 edge. Its Q output is
// the I-clock, which times the mid-bit samples, and its Q-bar output is the
// Q-clock, which times the transition samples, so the two bit-rate clocks are
// half a bit apart. This structure follows the synchronizer's description.
// The asynchronous active-low reset, which starts the I-clock low and the
// Q-clock high, is this design's addition so that the phase is defined.
//
// Ports: x2_clk (VCO clock), rst_n; i_clk, q_clk (bit-rate clocks).
// Timing: i_clk and q_clk change right after each rising edge of x2_clk.
module clock_divider (
  input  logic x2_clk,
  input  logic rst_n,
  output logic i_clk,
  output logic q_clk
);
  timeunit 1ns; timeprecision 1ps;

  logic div_q;

  always_ff @(posedge x2_clk or negedge rst_n) begin
    if (!rst_n) div_q <= 1'b0;
    else        div_q <= ~div_q;
  end

  assign i_clk = div_q;
  assign q_clk = ~div_q;
endmodule
