// tb_ku_bitsync_full: one complete correction of the synchronizer at its
// default size: 8-bit counter and DAC, 100 MHz VCO (50 Mbit/s), a real
// 1 kHz clock. Random NRZ data with 25% asymmetry ("ones" wider) arrives
// LAG_DEG behind the zero-bias Q-clock edge. The PLL must lock to the
// received clock, the counter must retard the clock one step per two 1 kHz
// periods until the Q-clock sits on the data leading edges, and the
// recovered data must match the sent bits. With the DAC spanning +/-90
// degrees in 256 codes, one step is 90/128 degree. The loop ends dithering
// between neighbouring codes a few steps from the ideal one, because each
// decision rests on a single data edge and the PLL model has a little
// jitter; the checks accept 6 codes and 4 degrees of residual phase.
module tb_ku_bitsync_full;
  timeunit 1ns; timeprecision 1ps;

  localparam real TB_NS    = 20.0;
  localparam real ASY      = 0.25;
  localparam real TICK_NS  = 1.0e6;     // 1 kHz
  localparam real LAG_DEG  = 20.0;
  localparam real STEP_DEG = 90.0 / 128.0;

  logic rst_n, rx_clk, rx_data, tick_clk;
  logic x2_clk, i_clk, q_clk, data_out, lock, false_lock;
  logic [7:0] dac_code;

  ku_bitsync_top dut (
    .rst_n (rst_n), .rx_clk (rx_clk), .rx_data (rx_data), .tick_clk (tick_clk),
    .x2_clk (x2_clk), .i_clk (i_clk), .q_clk (q_clk), .data_out (data_out),
    .dac_code (dac_code), .lock (lock), .false_lock (false_lock)
  );

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  function automatic real fabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  initial begin
    rx_clk = 1'b0;
    forever #(TB_NS / 2.0) rx_clk = ~rx_clk;
  end

  initial begin
    tick_clk = 1'b0;
    #(TICK_NS * 0.37);
    forever #(TICK_NS / 2.0) tick_clk = ~tick_clk;
  end

  // Data: leading edges LAG_DEG after the zero-bias Q-clock edge, which sits
  // half a bit after the received-clock edge; falling edges ASY bit late.
  bit  cur_bit = 1'b0;
  real t_rise;
  bit  rise_evt = 1'b0;
  initial begin
    rx_data = 1'b0;
    @(posedge rx_clk);
    #(LAG_DEG / 360.0 * TB_NS);
    forever begin
      bit prev;
      prev = cur_bit;
      #(TB_NS / 2.0);
      cur_bit = 1'($urandom_range(0, 1));
      if (prev && !cur_bit) begin
        #(ASY * TB_NS) rx_data = 1'b0;
        #(TB_NS / 2.0 - ASY * TB_NS);
      end else begin
        if (!prev && cur_bit) begin
          rx_data  = 1'b1;
          t_rise   = $realtime;
          rise_evt = ~rise_evt;
        end
        #(TB_NS / 2.0);
      end
    end
  end

  real t_q;
  always @(posedge q_clk) t_q = $realtime;

  real ph_acc = 0.0;
  int  ph_n = 0;
  bit  ph_on = 1'b0;
  always @(rise_evt) begin
    real d;
    d = t_rise - t_q;
    while (d > TB_NS / 2.0) d -= TB_NS;
    while (d <= -TB_NS / 2.0) d += TB_NS;
    if (ph_on) begin
      ph_acc += d / TB_NS * 360.0;
      ph_n++;
    end
  end

  bit data_on = 1'b0;
  bit exp_q[$];
  int data_checked = 0, data_bad = 0;
  always @(posedge i_clk) if (data_on) exp_q.push_back(cur_bit);
  always @(posedge q_clk) begin
    #0.1;
    if (data_on && exp_q.size() > 0) begin
      bit e;
      e = exp_q.pop_front();
      data_checked++;
      if (data_out !== e) data_bad++;
    end
  end

  int n_upd = 0, n_down = 0, tick_n = 0, last_upd = -10;
  logic [7:0] prev_code = 8'd128;
  always @(posedge tick_clk) begin
    tick_n++;
    #1;
    if (rst_n && dac_code != prev_code) begin
      n_upd++;
      if (dac_code < prev_code) n_down++;
      check(tick_n - last_upd >= 2, "counter updates at most every second 1 kHz edge");
      last_upd = tick_n;
    end
    prev_code = dac_code;
  end

  initial begin
    #(TICK_NS * 120);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ph, want;
    rst_n = 1'b1;  // give the asynchronous reset an edge
    #1 rst_n = 1'b0;
    #200 rst_n = 1'b1;
    #20000;
    check(lock && !false_lock, "PLL in true lock");
    check(dac_code == 8'd128, "counter starts at zero bias");
    // Expected code: LAG_DEG / STEP_DEG steps above mid-scale; each step
    // needs two 1 kHz periods.
    want = 128.0 + LAG_DEG / STEP_DEG;
    repeat (2 * (int'(LAG_DEG / STEP_DEG) + 1) + 24) @(posedge tick_clk);
    $display("code %0d, expected about %0.1f, %0d updates (%0d down)", dac_code, want, n_upd, n_down);
    check(fabs(real'(dac_code) - want) <= 6.0, "retard correction size");
    ph_on = 1'b1;
    data_on = 1'b1;
    #200000;
    ph_on = 1'b0;
    data_on = 1'b0;
    ph = ph_acc / ph_n;
    $display("residual phase %0.2f deg over %0d edges; data %0d checked, %0d wrong", ph, ph_n, data_checked, data_bad);
    check(fabs(ph) <= 4.0, "Q-clock on data leading edge");
    check(data_checked > 5000 && data_bad == 0, "recovered data matches sent data");
    check(lock && !false_lock, "still in true lock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
