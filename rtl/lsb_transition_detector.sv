// lsb_transition_detector: LSB-delayed flip-flop and XOR that hold off a new
// counter update until the loop has settled.
//
// The LSB-delayed flip-flop copies the up/down counter's least significant
// bit on every 1 kHz clock edge. Their XOR (modulo-2 sum) is high from the
// 1 kHz edge on which the counter changed until the next one, and clears the
// count enable flip-flop. Count enable can therefore only be set again after
// that next edge, so the counter changes at most every second 1 kHz edge: the
// 2 ms settling time of the synchronizer. This follows the synchronizer's
// description; the asynchronous active-low reset is this design's addition.
//
// Ports: tick_clk (1 kHz clock), rst_n, lsb (counter LSB); lsb_d (delayed
// LSB), cen_clr (reset for the count enable flip-flop, combinational).
module lsb_transition_detector (
  input  logic tick_clk,
  input  logic rst_n,
  input  logic lsb,
  output logic lsb_d,
  output logic cen_clr
);
  timeunit 1ns; timeprecision 1ps;

  always_ff @(posedge tick_clk or negedge rst_n) begin
    if (!rst_n) lsb_d <= 1'b0;
    else        lsb_d <= lsb;
  end

  assign cen_clr = lsb ^ lsb_d;
endmodule
