// vco_model: behavioural model of the voltage-controlled oscillator. It is an
// analog part, so this model is not meant for synthesis.
//
// The oscillator runs at F_CENTER_HZ + KV_HZ_PER_V * v_ctrl, limited to
// F_CENTER_HZ * (1 +/- PULL). It keeps the ideal time of its next edge as a
// real number and waits for it, so the rounding of each half period to the
// simulator's time step does not build up into a frequency error. The
// output is the X2 clock, at twice the bit rate.
//
// A VCO running at twice the bit rate, in a range of 4 to 100 MHz, follows
// the synchronizer's description; the default centre of 100 MHz is the top of
// that range (50 Mbit/s). The gain and the pull range are this design's
// choices.
//
// Ports: v_ctrl (volts, real); clk (X2 clock).
module vco_model #(
  parameter real F_CENTER_HZ = 100.0e6,
  parameter real KV_HZ_PER_V = 10.0e6,
  parameter real PULL        = 0.1
) (
  input  real  v_ctrl,
  output logic clk = 1'b0
);
  timeunit 1ns; timeprecision 1ps;

  real f_hz;
  real t_next = 0.0;

  always begin
    f_hz = F_CENTER_HZ + KV_HZ_PER_V * v_ctrl;
    if (f_hz > F_CENTER_HZ * (1.0 + PULL)) f_hz = F_CENTER_HZ * (1.0 + PULL);
    if (f_hz < F_CENTER_HZ * (1.0 - PULL)) f_hz = F_CENTER_HZ * (1.0 - PULL);
    t_next = t_next + 0.5e9 / f_hz;
    #(t_next - $realtime);
    clk = ~clk;
  end
endmodule
