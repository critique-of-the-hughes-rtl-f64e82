// tb_loop_filter_model: checks the loop filter amplifier model against the
// continuous-time response of its proportional-plus-integral filter:
//   - UP held for 400 ns: integrator 0.002/ns * 400 ns = 0.8 V plus the
//     smoothed proportional part 0.9 * (1 - exp(-400/40)) = 0.9 V;
//   - both inputs low for 600 ns: the proportional part decays, 0.8 V stays;
//   - DAC at +1 V with UP pulses of 25% duty (the offset G_DAC * v_dac):
//     the mean input is zero, so the voltage must stay put;
//   - DN held: the output must stop at the -2 V limit.
module tb_loop_filter_model;
  timeunit 1ns; timeprecision 1ps;

  logic up, dn;
  real  v_dac, v_ctrl;
  int checks = 0, failures = 0;

  loop_filter_model dut (.pfd_up (up), .pfd_dn (dn), .v_dac (v_dac), .v_ctrl (v_ctrl));

  task automatic near(real got, real exp, real tol, string what);
    checks++;
    if (got > exp + tol || got < exp - tol) begin
      failures++;
      $display("FAIL %s: %f, expected %f", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real v0, vm;
    up = 1'b0; dn = 1'b0; v_dac = 0.0;
    #100;
    near(v_ctrl, 0.0, 1e-9, "rest");
    up = 1'b1;
    #400;
    near(v_ctrl, 0.8 + 0.9 * (1.0 - $exp(-10.0)), 0.02, "UP step");
    up = 1'b0;
    #600;
    near(v_ctrl, 0.8, 0.02, "integrator holds");
    v0 = v_ctrl;
    v_dac = 1.0;
    #0.1;
    repeat (200) begin
      up = 1'b1; #5;
      up = 1'b0; #15;
    end
    // mean over whole periods, which removes the proportional ripple
    vm = 0.0;
    repeat (20) begin
      up = 1'b1;
      repeat (5) begin #1; vm += v_ctrl; end
      up = 1'b0;
      repeat (15) begin #1; vm += v_ctrl; end
    end
    near(vm / 400.0, v0, 0.02, "DAC offset balanced by 25% UP duty");
    v_dac = 0.0;
    dn = 1'b1;
    #3000;
    near(v_ctrl, -2.0, 1e-9, "lower limit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
