// tb_dac_model: applies every code of the default 8-bit DAC and checks the
// output voltage against (code - 128) / 128 * 1 V, including 0 V at the
// zero-bias code 128 and the two ends of the range.
module tb_dac_model;
  timeunit 1ns; timeprecision 1ps;

  logic [7:0] code;
  real v;
  int checks = 0, failures = 0;

  dac_model dut (.code (code), .v_out (v));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 256; c++) begin
      real e, d;
      code = 8'(c);
      #1;
      e = (c - 128) / 128.0;
      d = v - e;
      checks++;
      if (d > 1e-9 || d < -1e-9) begin
        failures++;
        $display("FAIL code %0d: %f V, expected %f V", c, v, e);
      end
    end
    code = 8'd128; #1;
    checks++; if (v != 0.0) failures++;
    code = 8'd0; #1;
    checks++; if (v != -1.0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
