// updown_counter: the counter of the counter-DAC unit that stores the timing
// correction.
//
// On each rising edge of the 1 kHz clock, if count enable is high, the count
// moves one step: down when FHQ says advance, up when it says retard (a
// higher code gives a higher DAC voltage, which the loop filter subtracts,
// retarding the VCO clock). The count saturates at both ends instead of
// wrapping. While the false frequency lock detector reports false lock the
// count is held at mid-scale, the code for which the DAC gives 0 V, so the
// loop can re-acquire without a bias.
//
// The counter, its 1 kHz clock, its enable and direction inputs and the
// zero-bias setting on false lock follow the synchronizer's description. The
// width, the count direction for advance, saturation, the reset to mid-scale
// and the two-flip-flop synchronizer on the false-lock input (which comes
// from the received-clock domain) are this design's choices.
//
// Ports: tick_clk, rst_n, cen (count enable), dir (FHQ), false_lock (level,
// asynchronous); count (to the DAC), lsb (count bit 0).
// Timing: count changes on the tick_clk edge; false_lock acts after two
// tick_clk edges.
module updown_counter
  import bitsync_pkg::*;
#(
  parameter int unsigned BITS = DAC_BITS_DEFAULT
) (
  input  logic            tick_clk,
  input  logic            rst_n,
  input  logic            cen,
  input  dir_e            dir,
  input  logic            false_lock,
  output logic [BITS-1:0] count,
  output logic            lsb
);
  timeunit 1ns; timeprecision 1ps;

  localparam logic [BITS-1:0] ZERO_BIAS = BITS'(zero_bias_code(BITS));
  localparam logic [BITS-1:0] MAX_CODE  = '1;

  logic [1:0] fl_sync;

  always_ff @(posedge tick_clk or negedge rst_n) begin
    if (!rst_n) fl_sync <= '0;
    else        fl_sync <= {fl_sync[0], false_lock};
  end

  always_ff @(posedge tick_clk or negedge rst_n) begin
    if (!rst_n)          count <= ZERO_BIAS;
    else if (fl_sync[1]) count <= ZERO_BIAS;
    else if (cen) begin
      if (dir == DIR_ADVANCE) begin
        if (count != '0) count <= count - 1'b1;
      end else begin
        if (count != MAX_CODE) count <= count + 1'b1;
      end
    end
  end

  assign lsb = count[0];

  // Outside a zero-bias preset the count moves by at most one step per edge
  // (checked from the second edge after reset, when $past has history).
  logic hist_ok;
  always_ff @(posedge tick_clk or negedge rst_n) begin
    if (!rst_n) hist_ok <= 1'b0;
    else        hist_ok <= 1'b1;
  end

  a_one_step: assert property (@(posedge tick_clk) disable iff (!rst_n)
                               hist_ok && !$past(fl_sync[1]) |->
                                 (count == $past(count) || count == $past(count) + 1'b1 ||
                                  count == $past(count) - 1'b1))
    else $error("counter moved by more than one step");
endmodule
