// tb_false_lock_detector: runs the received clock and the synchronizer clock
// at chosen frequency ratios and checks each decision. Equal frequencies and
// a 1% difference must give true lock; 5%, 25% and -20% differences must give
// false lock, with the reported count error near 256 * |1 - f_slow/f_fast|.
// Decisions must come roughly every 256 received-clock periods.
module tb_false_lock_detector;
  timeunit 1ns; timeprecision 1ps;

  logic rx_clk = 1'b0, syn_clk = 1'b0, rst_n;
  logic lock, false_lock, decide;
  logic [8:0] err;
  int checks = 0, failures = 0;
  real rx_per = 20.0, syn_per = 20.0;

  false_lock_detector dut (
    .rx_clk (rx_clk), .syn_clk (syn_clk), .rst_n (rst_n), .lock (lock),
    .false_lock (false_lock), .decide (decide), .err (err)
  );

  initial forever #(rx_per / 2.0) rx_clk = ~rx_clk;
  initial begin
    #3.3;
    forever #(syn_per / 2.0) syn_clk = ~syn_clk;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s t=%0t err=%0d", what, $time, err);
    end
  endtask

  task automatic ratio_case(real syn_over_rx, bit expect_lock);
    real f_ratio, exp_err, t_a, t_b;
    int  n_rx;
    syn_per = rx_per / syn_over_rx;
    // discard the decision that straddles the change
    repeat (2) @(posedge decide);
    repeat (3) begin
      @(posedge decide);
      t_a = $realtime;
      @(posedge decide);
      t_b = $realtime;
      #1;
      f_ratio = (syn_over_rx > 1.0) ? 1.0 / syn_over_rx : syn_over_rx;
      exp_err = 256.0 * (1.0 - f_ratio);
      chk(lock == expect_lock && false_lock == !expect_lock, "lock decision");
      chk(real'(err) > exp_err - 4.0 && real'(err) < exp_err + 4.0, "count error");
      n_rx = int'((t_b - t_a) / rx_per);
      chk(n_rx >= 256 * f_ratio && n_rx < 256 / f_ratio + 40, "decision period");
    end
    $display("ratio %0.2f: err=%0d lock=%b", syn_over_rx, err, lock);
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b1;  // give the asynchronous reset an edge
    #1 rst_n = 1'b0;
    #50 rst_n = 1'b1;
    ratio_case(1.00, 1'b1);
    ratio_case(1.05, 1'b0);
    ratio_case(1.01, 1'b1);
    ratio_case(0.80, 1'b0);
    ratio_case(0.99, 1'b1);
    ratio_case(1.25, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
