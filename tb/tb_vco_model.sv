// tb_vco_model: sets control voltages and measures the X2 clock frequency
// over 1000 cycles: 100 MHz at 0 V, 100 MHz + 10 MHz/V * v inside the pull
// range (to 1e-4 relative), and the 90/110 MHz limits outside it.
module tb_vco_model;
  timeunit 1ns; timeprecision 1ps;

  real  v;
  logic clk;
  int checks = 0, failures = 0;

  vco_model dut (.v_ctrl (v), .clk (clk));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(real vin, real f_exp);
    real t_a, f;
    v = vin;
    repeat (5) @(posedge clk);
    t_a = $realtime;
    repeat (1000) @(posedge clk);
    f = 1000.0 / ($realtime - t_a) * 1.0e9;
    checks++;
    if (f > f_exp * 1.0001 || f < f_exp * 0.9999) begin
      failures++;
      $display("FAIL v=%f: %f MHz, expected %f MHz", vin, f / 1.0e6, f_exp / 1.0e6);
    end
  endtask

  initial begin
    v = 0.0;
    measure(0.0, 100.0e6);
    measure(0.5, 105.0e6);
    measure(-0.37, 96.3e6);
    measure(0.0123, 100.123e6);
    measure(3.0, 110.0e6);
    measure(-3.0, 90.0e6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
