// bitsync_core: all the digital logic of the leading-edge bit synchronizer,
// from the X2 clock and the received clock and data to the DAC code.
//
// The X2 clock from the VCO is halved into the I-clock and the Q-clock. The
// phase-frequency detector compares the received clock with the I-clock and
// drives the loop filter. The bit timing detector finds each rising data
// edge and whether it arrived before or after the Q-clock edge; the
// correction control arms the counter and latches advance or retard; on the
// next 1 kHz edge the up/down counter takes one step, and the LSB transition
// detector then holds off the next arming for one more 1 kHz period. The
// false frequency lock detector compares the received clock with the I-clock
// over 256 periods and, on false lock, holds the counter at the zero-bias
// code. The connections follow the synchronizer's block diagram as described.
//
// Ports: x2_clk (VCO clock), rx_clk (received clock), rx_data (sliced data),
// tick_clk (1 kHz clock), rst_n (asynchronous, active low); i_clk, q_clk,
// data_out (resynchronized data, changes on q_clk), pfd_up, pfd_dn,
// dac_code, lock, false_lock, and the internal decisions cen (counter armed),
// dir (advance/retard) and fl_decide (a false-lock decision was made).
module bitsync_core
  import bitsync_pkg::*;
#(
  parameter int unsigned DAC_BITS = DAC_BITS_DEFAULT,
  parameter int unsigned FLD_BITS = FLD_BITS_DEFAULT,
  parameter int unsigned FLD_TOL  = 8
) (
  input  logic                x2_clk,
  input  logic                rx_clk,
  input  logic                rx_data,
  input  logic                tick_clk,
  input  logic                rst_n,
  output logic                i_clk,
  output logic                q_clk,
  output logic                data_out,
  output logic                pfd_up,
  output logic                pfd_dn,
  output logic [DAC_BITS-1:0] dac_code,
  output logic                lock,
  output logic                false_lock,
  output logic                cen,
  output dir_e                dir,
  output logic                fl_decide
);
  timeunit 1ns; timeprecision 1ps;

  logic trans, updown, fdq;
  logic cen_clr, lsb, lsb_d;
  logic [FLD_BITS:0] fl_err;

  clock_divider u_div (
    .x2_clk (x2_clk), .rst_n (rst_n), .i_clk (i_clk), .q_clk (q_clk)
  );

  phase_freq_detector u_pfd (
    .ref_clk (rx_clk), .fb_clk (i_clk), .rst_n (rst_n), .up (pfd_up), .dn (pfd_dn)
  );

  bit_timing_detector u_btd (
    .i_clk (i_clk), .q_clk (q_clk), .rst_n (rst_n), .data (rx_data),
    .trans (trans), .updown (updown), .fdq (fdq), .data_out (data_out)
  );

  correction_control u_ctl (
    .q_clk (q_clk), .rst_n (rst_n), .trans (trans), .updown (updown),
    .cen_clr (cen_clr), .cen (cen), .dir (dir)
  );

  updown_counter #(.BITS (DAC_BITS)) u_cnt (
    .tick_clk (tick_clk), .rst_n (rst_n), .cen (cen), .dir (dir),
    .false_lock (false_lock), .count (dac_code), .lsb (lsb)
  );

  lsb_transition_detector u_lsb (
    .tick_clk (tick_clk), .rst_n (rst_n), .lsb (lsb), .lsb_d (lsb_d), .cen_clr (cen_clr)
  );

  false_lock_detector #(.BITS (FLD_BITS), .TOL (FLD_TOL)) u_fld (
    .rx_clk (rx_clk), .syn_clk (i_clk), .rst_n (rst_n), .lock (lock),
    .false_lock (false_lock), .decide (fl_decide), .err (fl_err)
  );

  // fdq, lsb_d and fl_err are observed by testbenches through the hierarchy.
endmodule
