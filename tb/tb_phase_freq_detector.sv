// tb_phase_freq_detector: two 50 MHz clocks with a set phase difference.
// When the reference leads by d ns, each UP pulse must last d ns and DN must
// stay low (and the mirror case); UP and DN must never be high together for
// longer than the reset takes. With the reference 20% faster, the mean of
// UP minus DN must be clearly positive (frequency discriminator), and with
// it 20% slower clearly negative.
module tb_phase_freq_detector;
  timeunit 1ns; timeprecision 1ps;

  logic ref_clk = 1'b0, fb_clk = 1'b0, rst_n;
  logic up, dn;
  int checks = 0, failures = 0;
  real ref_per = 20.0, fb_per = 20.0, fb_delay = 0.0, ref_delay = 0.0;
  bit  run = 1'b0;

  phase_freq_detector dut (.ref_clk (ref_clk), .fb_clk (fb_clk), .rst_n (rst_n), .up (up), .dn (dn));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s t=%0t", what, $time);
    end
  endtask

  initial forever begin
    wait (run);
    #(ref_delay);
    while (run) #(ref_per / 2.0) ref_clk = ~ref_clk;
  end
  initial forever begin
    wait (run);
    #(fb_delay);
    while (run) #(fb_per / 2.0) fb_clk = ~fb_clk;
  end

  // Width measurement and mean of UP - DN with 10 ps steps.
  real t_up, w_up, t_dn, w_dn;
  always @(posedge up) t_up = $realtime;
  always @(negedge up) w_up = $realtime - t_up;
  always @(posedge dn) t_dn = $realtime;
  always @(negedge dn) w_dn = $realtime - t_dn;
  real acc;
  int  nacc;
  initial forever begin
    #0.01;
    if (up && dn) begin
      #0.001;
      if (up && dn) chk(1'b0, "UP and DN high together");
    end
    acc += (up ? 1.0 : 0.0) - (dn ? 1.0 : 0.0);
    nacc++;
  end

  task automatic phase_case(real delay_fb);
    run = 1'b0;
    #50;
    ref_clk = 1'b0; fb_clk = 1'b0;
    rst_n = 1'b1;  // give the asynchronous reset an edge
    #1 rst_n = 1'b0; #5 rst_n = 1'b1;
    ref_per = 20.0; fb_per = 20.0;
    fb_delay  = (delay_fb > 0.0) ? delay_fb : 0.0;
    ref_delay = (delay_fb > 0.0) ? 0.0 : -delay_fb;
    w_up = 0.0; w_dn = 0.0;
    run = 1'b1;
    #500;
    if (delay_fb > 0.0) begin
      chk(w_up > delay_fb - 0.05 && w_up < delay_fb + 0.05, "UP width equals reference lead");
      chk(w_dn < 0.05, "DN quiet when reference leads");
    end else begin
      chk(w_dn > -delay_fb - 0.05 && w_dn < -delay_fb + 0.05, "DN width equals reference lag");
      chk(w_up < 0.05, "UP quiet when reference lags");
    end
  endtask

  task automatic freq_case(real rp, real fp, bit expect_up);
    real m;
    run = 1'b0;
    #50;
    rst_n = 1'b0; #5 rst_n = 1'b1;
    ref_per = rp; fb_per = fp; fb_delay = 3.0; ref_delay = 0.0;
    run = 1'b1;
    #200;
    acc = 0.0; nacc = 0;
    #4000;
    m = acc / nacc;
    $display("ref %0.1f ns fb %0.1f ns: mean UP-DN %0.3f", rp, fp, m);
    chk(expect_up ? (m > 0.3) : (m < -0.3), "frequency discrimination");
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    acc = 0.0; nacc = 0;
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
    #10;
    chk(up == 1'b0 && dn == 1'b0, "reset");
    phase_case(2.0);
    phase_case(5.5);
    phase_case(-3.0);
    phase_case(-7.25);
    freq_case(20.0 / 1.2, 20.0, 1'b1);
    freq_case(20.0 * 1.2, 20.0, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
