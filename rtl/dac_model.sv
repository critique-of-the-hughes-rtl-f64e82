// dac_model: behavioural model of the DAC of the counter-DAC unit. It is an
// analog part, so this model is not meant for synthesis.
//
// An offset-binary converter: code 2**(BITS-1) gives 0 V, each step above or
// below adds or removes VFS / 2**(BITS-1) volts, so the output spans -VFS to
// +VFS (less one step). The output follows the code with no delay.
//
// That a DAC turns the counter state into a bias voltage for the loop filter
// amplifier, and that one code gives zero bias, follows the synchronizer's
// description; the coding, the width and the full-scale voltage are this
// design's choices.
//
// Ports: code (from the up/down counter); v_out (volts, real).
module dac_model
  import bitsync_pkg::*;
#(
  parameter int unsigned BITS = DAC_BITS_DEFAULT,
  parameter real         VFS  = 1.0
) (
  input  logic [BITS-1:0] code,
  output real             v_out
);
  timeunit 1ns; timeprecision 1ps;

  localparam real HALF = real'(zero_bias_code(BITS));

  always_comb v_out = (real'(code) - HALF) * VFS / HALF;
endmodule
