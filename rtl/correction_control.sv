// correction_control: count enable flip-flop, J-AND and K-AND gates and the
// FHQ JK flip-flop that decides whether the next counter step advances or
// retards the VCO clock.
//
// All flip-flops here are clocked by the Q-clock. The count enable flip-flop
// is set when the positive transition detector is high at a Q-clock edge and
// its reset input is low; it then stays set, enabling the up/down counter,
// until the LSB transition detector clears it asynchronously after the
// counter has changed. While count enable is low, the J-AND gate (up/down
// gate AND count-enable-bar) and the K-AND gate (transition AND NOT up/down
// AND count-enable-bar) steer FHQ: J sets it (advance, data early), K clears
// it (retard, data late). Once count enable is set the gates close, so FHQ
// holds the decision of the edge that armed the counter.
//
// The gates, the JK flip-flop and the reset of count enable by the LSB
// transition detector follow the synchronizer's description. That count
// enable holds its state between transitions (rather than following the
// transition detector every bit), the gate inputs and the asynchronous
// active-low reset are this design's reading and choices.
//
// Ports: q_clk, rst_n, trans, updown, cen_clr (from the LSB transition
// detector, active high, asynchronous); cen (count enable), dir (FHQ).
module correction_control
  import bitsync_pkg::*;
(
  input  logic q_clk,
  input  logic rst_n,
  input  logic trans,
  input  logic updown,
  input  logic cen_clr,
  output logic cen,
  output dir_e dir
);
  timeunit 1ns; timeprecision 1ps;

  logic cen_n;
  logic j_and, k_and;
  logic clr_any;

  assign cen_n   = ~cen;
  assign j_and   = updown & cen_n;
  assign k_and   = trans & ~updown & cen_n;
  assign clr_any = cen_clr | ~rst_n;

  // Count enable flip-flop, cleared by the LSB transition detector.
  always_ff @(posedge q_clk or posedge clr_any) begin
    if (clr_any)    cen <= 1'b0;
    else if (trans) cen <= 1'b1;
  end

  // FHQ JK flip-flop.
  always_ff @(posedge q_clk or negedge rst_n) begin
    if (!rst_n) dir <= DIR_RETARD;
    else begin
      unique case ({j_and, k_and})
        2'b10:   dir <= DIR_ADVANCE;
        2'b01:   dir <= DIR_RETARD;
        2'b11:   dir <= dir_e'(~dir);
        default: dir <= dir;
      endcase
    end
  end

  // Once the counter is armed, the decision must not change until the
  // LSB transition detector has cleared count enable (checked from the
  // second edge after reset, when $past has history).
  logic hist_ok;
  always_ff @(posedge q_clk or negedge rst_n) begin
    if (!rst_n) hist_ok <= 1'b0;
    else        hist_ok <= 1'b1;
  end

  a_dir_frozen: assert property (@(posedge q_clk) disable iff (!rst_n || cen_clr)
                                 hist_ok && $past(cen) |-> dir == $past(dir))
    else $error("FHQ changed while count enable was set");
endmodule
