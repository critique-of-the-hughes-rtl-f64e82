// loop_filter_model: behavioural model of the loop filter amplifier. It is an
// analog part, so this model is not meant for synthesis.
//
// The phase-frequency detector outputs act like a charge pump: the input
// current is UP minus DN (+1, 0 or -1) minus G_DAC times the DAC voltage. The
// amplifier is a proportional-plus-integral filter: an integrator with gain
// KI_PER_NS (volts per nanosecond per unit current) plus a proportional path
// of gain KP that is smoothed by a pole with time constant TAU_NS. The model
// is advanced in fixed steps of DT_NS nanoseconds. The control voltage is
// limited to +/-V_LIMIT.
//
// Because the integrator only rests when the mean input is zero, the loop
// settles with the mean of UP minus DN equal to G_DAC times the DAC voltage:
// the DAC sets a static phase offset of G_DAC * v_dac bit periods between the
// received clock and the VCO clock (a positive voltage retards the VCO). That
// the DAC voltage is subtracted in the loop filter amplifier to move the VCO
// phase follows the synchronizer's description; the filter type and every
// gain and time constant are this design's choices.
//
// Ports: pfd_up, pfd_dn (from the phase-frequency detector), v_dac (volts,
// real); v_ctrl (VCO control voltage, real).
module loop_filter_model #(
  parameter real DT_NS     = 0.25,
  parameter real KI_PER_NS = 0.002,
  parameter real KP        = 0.9,
  parameter real TAU_NS    = 40.0,
  parameter real G_DAC     = 0.25,
  parameter real V_LIMIT   = 2.0
) (
  input  logic pfd_up,
  input  logic pfd_dn,
  input  real  v_dac,
  output real  v_ctrl
);
  timeunit 1ns; timeprecision 1ps;

  real integ;
  real vprop;
  real i_in;

  function automatic real clamp(real v);
    if (v > V_LIMIT)  return V_LIMIT;
    if (v < -V_LIMIT) return -V_LIMIT;
    return v;
  endfunction

  initial begin
    integ  = 0.0;
    vprop  = 0.0;
    v_ctrl = 0.0;
    forever begin
      #(DT_NS);
      i_in   = (pfd_up ? 1.0 : 0.0) - (pfd_dn ? 1.0 : 0.0) - G_DAC * v_dac;
      integ  = clamp(integ + KI_PER_NS * i_in * DT_NS);
      vprop  = vprop + (KP * i_in - vprop) * DT_NS / TAU_NS;
      v_ctrl = clamp(integ + vprop);
    end
  end
endmodule
