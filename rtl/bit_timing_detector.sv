// bit_timing_detector: the sampling flip-flops and gates that detect a rising
// data edge and tell whether it came before or after the Q-clock edge.
//
// FDI samples the data on the rising I-clock edge (the mid-bit sample). FDQ
// samples the data on the rising Q-clock edge (the transition sample, taken
// where the bit's leading edge should be). FEQ re-samples FDI on the Q-clock,
// delaying the I sample by half a bit. The positive transition detector is
// FDI AND NOT FEQ: after a 0-to-1 data edge it is high for the half bit from
// the I-clock edge to the next Q-clock edge, that is, half a bit after the
// leading edge. During that window FDQ still holds the transition sample of
// the same edge: 1 if the data rose before the Q-clock edge (early data),
// 0 if it rose after it (late data). The up/down gate is FDQ AND the
// transition detector, so it is high only for an early rising edge. FEQ is
// also the resynchronized data sent on with the Q-clock.
//
// The flip-flops, their clocks and the transition gate follow the
// synchronizer's description; the exact inputs of the up/down gate and the
// use of FEQ as the data output are this design's reading of it. The
// asynchronous active-low reset is this design's addition.
//
// Ports: i_clk, q_clk (bit-rate clocks half a bit apart), rst_n, data (sliced
// received data); trans (positive transition pulse), updown (early edge),
// fdq (transition sample), data_out (resynchronized data, changes on q_clk).
module bit_timing_detector (
  input  logic i_clk,
  input  logic q_clk,
  input  logic rst_n,
  input  logic data,
  output logic trans,
  output logic updown,
  output logic fdq,
  output logic data_out
);
  timeunit 1ns; timeprecision 1ps;

  logic fdi;   // mid-bit sample
  logic feq;   // mid-bit sample delayed by half a bit

  always_ff @(posedge i_clk or negedge rst_n) begin
    if (!rst_n) fdi <= 1'b0;
    else        fdi <= data;
  end

  always_ff @(posedge q_clk or negedge rst_n) begin
    if (!rst_n) begin
      fdq <= 1'b0;
      feq <= 1'b0;
    end else begin
      fdq <= data;
      feq <= fdi;
    end
  end

  assign trans    = fdi & ~feq;
  assign updown   = trans & fdq;
  assign data_out = feq;
endmodule
