// phase_freq_detector: three-state phase-frequency detector between the
// received clock and the synchronizer's bit-rate clock.
//
// Two flip-flops with their D inputs tied high: a rising edge of the
// reference (received) clock sets UP, a rising edge of the feedback (VCO
// derived) clock sets DN, and as soon as both are set an AND gate resets both.
// The width of the UP (or DN) pulse is the time by which the reference edge
// leads (or lags) the feedback edge, and when the two frequencies differ one
// output dominates, so the detector works as a frequency discriminator during
// acquisition and as a phase detector once locked.
//
// The synchronizer uses a commercial high-frequency phase-frequency detector
// whose insides are not described; this is the standard circuit that has the
// described function. The reset path has no delay here, so the pulse that
// would be a few gate delays long in silicon is zero-width in simulation.
// The combinational loop through the asynchronous reset is the circuit itself
// and is intended.
//
// Ports: ref_clk, fb_clk, rst_n; up, dn.
module phase_freq_detector (
  input  logic ref_clk,
  input  logic fb_clk,
  input  logic rst_n,
  output logic up,
  output logic dn
);
  timeunit 1ns; timeprecision 1ps;

  logic clr;

  assign clr = (up & dn) | ~rst_n;

  always_ff @(posedge ref_clk or posedge clr) begin
    if (clr) up <= 1'b0;
    else     up <= 1'b1;
  end

  always_ff @(posedge fb_clk or posedge clr) begin
    if (clr) dn <= 1'b0;
    else     dn <= 1'b1;
  end
endmodule
