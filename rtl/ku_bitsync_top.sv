// ku_bitsync_top: the complete leading-edge bit synchronizer loop.
//
// A phase-locked loop locks a VCO running at twice the bit rate to the
// received clock. A second, slow loop then moves the VCO clock's phase
// relative to the received clock, in steps, until the rising edge of the
// Q-clock sits on the leading (rising) edge of each data bit. The slow loop
// is digital (bitsync_core): it decides early or late on each rising data
// edge and steps an up/down counter at most once every two 1 kHz periods. The
// counter drives a DAC whose voltage is subtracted in the loop filter
// amplifier, which shifts the PLL's static phase. A false frequency lock
// detector sets the DAC to zero bias when the VCO is on the wrong frequency.
// The mid-bit (I) samples, re-timed to the Q-clock, are the recovered data.
//
// The DAC, the loop filter amplifier and the VCO are analog; they are
// behavioural models (real-valued, with delays), so this top level is for
// simulation. bitsync_core alone is the synthesizable part. The loop
// structure follows the synchronizer's block diagram as described; the loop
// filter type, gains and DAC range are this design's choices, picked so
// that the DAC spans +/-90 degrees of phase (G_DAC * VFS = 0.25 bit).
//
// Ports: rst_n, rx_clk (received clock), rx_data (data after the threshold
// device), tick_clk (1 kHz clock); x2_clk (twice the bit rate), i_clk,
// q_clk (bit rate), data_out (recovered data, changes on rising q_clk),
// dac_code, lock, false_lock.
module ku_bitsync_top
  import bitsync_pkg::*;
#(
  parameter int unsigned DAC_BITS    = DAC_BITS_DEFAULT,
  parameter int unsigned FLD_BITS    = FLD_BITS_DEFAULT,
  parameter int unsigned FLD_TOL     = 8,
  parameter real         F_CENTER_HZ = 100.0e6,
  parameter real         KV_HZ_PER_V = 10.0e6,
  parameter real         VCO_PULL    = 0.1,
  parameter real         DAC_VFS     = 1.0,
  parameter real         LF_DT_NS    = 0.25,
  parameter real         LF_KI_PER_NS = 0.002,
  parameter real         LF_KP       = 0.9,
  parameter real         LF_TAU_NS   = 40.0,
  parameter real         LF_G_DAC    = 0.25
) (
  input  logic                rst_n,
  input  logic                rx_clk,
  input  logic                rx_data,
  input  logic                tick_clk,
  output logic                x2_clk,
  output logic                i_clk,
  output logic                q_clk,
  output logic                data_out,
  output logic [DAC_BITS-1:0] dac_code,
  output logic                lock,
  output logic                false_lock
);
  timeunit 1ns; timeprecision 1ps;

  logic pfd_up, pfd_dn, cen, fl_decide;
  dir_e dir;
  real  v_dac, v_ctrl;

  bitsync_core #(.DAC_BITS (DAC_BITS), .FLD_BITS (FLD_BITS), .FLD_TOL (FLD_TOL)) u_core (
    .x2_clk (x2_clk), .rx_clk (rx_clk), .rx_data (rx_data), .tick_clk (tick_clk),
    .rst_n (rst_n), .i_clk (i_clk), .q_clk (q_clk), .data_out (data_out),
    .pfd_up (pfd_up), .pfd_dn (pfd_dn), .dac_code (dac_code), .lock (lock),
    .false_lock (false_lock), .cen (cen), .dir (dir), .fl_decide (fl_decide)
  );

  dac_model #(.BITS (DAC_BITS), .VFS (DAC_VFS)) u_dac (
    .code (dac_code), .v_out (v_dac)
  );

  loop_filter_model #(
    .DT_NS (LF_DT_NS), .KI_PER_NS (LF_KI_PER_NS), .KP (LF_KP),
    .TAU_NS (LF_TAU_NS), .G_DAC (LF_G_DAC), .V_LIMIT (2.0)
  ) u_lf (
    .pfd_up (pfd_up), .pfd_dn (pfd_dn), .v_dac (v_dac), .v_ctrl (v_ctrl)
  );

  vco_model #(.F_CENTER_HZ (F_CENTER_HZ), .KV_HZ_PER_V (KV_HZ_PER_V), .PULL (VCO_PULL)) u_vco (
    .v_ctrl (v_ctrl), .clk (x2_clk)
  );
endmodule
