// tb_timing_cases: the timing cases used to judge the leading-edge bit
// synchronizer, each run from reset through the closed loop at the default
// sizes (8-bit counter, 50 Mbit/s) with a sped-up 1 kHz clock. The data
// leading edge is placed a given angle before (lead) or after (lag) the
// zero-bias Q-clock edge, with 0% or 25% asymmetry ("ones" or "zeros"
// wider). The first counter step must be an advance (code down) for leading
// data and a retard (code up) for lagging data, for every case up to 90
// degrees. Two cases beyond that range (lag 190, lead 100 degrees) are only
// reported: which way this design moves there depends on gate details that
// are this design's choice. Each case starts data and the 1 kHz clock only
// after the PLL reports lock, as a decision taken during acquisition is
// based on a phase that is still moving.
module tb_timing_cases;
  timeunit 1ns; timeprecision 1ps;

  localparam real TB_NS   = 20.0;
  localparam real TICK_NS = 20000.0;

  logic rst_n, rx_clk, rx_data, tick_clk;
  logic x2_clk, i_clk, q_clk, data_out, lock, false_lock;
  logic [7:0] dac_code;

  ku_bitsync_top dut (
    .rst_n (rst_n), .rx_clk (rx_clk), .rx_data (rx_data), .tick_clk (tick_clk),
    .x2_clk (x2_clk), .i_clk (i_clk), .q_clk (q_clk), .data_out (data_out),
    .dac_code (dac_code), .lock (lock), .false_lock (false_lock)
  );

  int checks = 0, failures = 0;
  real tick_phase = 0.37;

  initial begin
    rx_clk = 1'b0;
    forever #(TB_NS / 2.0) rx_clk = ~rx_clk;
  end

  bit tick_run = 1'b0;
  initial begin
    tick_clk = 1'b0;
    forever begin
      wait (tick_run);
      #(TICK_NS * tick_phase);
      while (tick_run) begin
        #(TICK_NS / 2.0) tick_clk = 1'b1;
        #(TICK_NS / 2.0) tick_clk = 1'b0;
      end
    end
  end

  // Data with leading edges at received-clock edge + TB/2 + lag, falling
  // edges shifted by asy bit (positive: ones wider).
  real lag_deg = 0.0, asy = 0.0;
  bit  gen_run = 1'b0;
  initial begin
    rx_data = 1'b0;
    forever begin
      bit cur, prev;
      real d;
      wait (gen_run);
      cur = 1'b0;
      @(posedge rx_clk);
      // half a bit before the first boundary
      d = lag_deg / 360.0 * TB_NS;
      while (d < 0.0) d += TB_NS;
      #(d);
      while (gen_run) begin
        prev = cur;
        cur  = 1'($urandom_range(0, 1));
        if (prev && !cur) begin
          #(TB_NS / 2.0 + asy * TB_NS) rx_data = 1'b0;
          #(TB_NS / 2.0 - asy * TB_NS);
        end else if (!prev && cur) begin
          #(TB_NS / 2.0) rx_data = 1'b1;
          #(TB_NS / 2.0);
        end else begin
          #(TB_NS);
        end
      end
      rx_data = 1'b0;
    end
  end

  // Returns -1 (advance), +1 (retard) or 0 (no step within 10 ticks).
  task automatic run_case(string name, real lag, real a, real tphase, int expect_dir, bit checked);
    int dir;
    lag_deg = lag; asy = a; tick_phase = tphase;
    gen_run = 1'b0; tick_run = 1'b0;
    rst_n = 1'b1;  // give the asynchronous reset an edge
    #1 rst_n = 1'b0;
    #100;
    rst_n = 1'b1;
    // let the PLL acquire before the first data edge can arm the counter
    wait (lock);
    #5000;
    gen_run = 1'b1;
    tick_run = 1'b1;
    dir = 0;
    repeat (10) begin
      @(posedge tick_clk);
      #1;
      if (dac_code != 8'd128) begin
        dir = (dac_code > 8'd128) ? 1 : -1;
        break;
      end
    end
    $display("%-36s lag %7.1f deg asy %5.2f: %s", name, lag, a,
             dir < 0 ? "advance" : (dir > 0 ? "retard" : "no update"));
    if (checked) begin
      checks++;
      if (dir != expect_dir) begin
        failures++;
        $display("FAIL %s: expected %0d got %0d", name, expect_dir, dir);
      end
    end
  endtask

  initial begin
    #(TICK_NS * 200);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    run_case("early data, symmetric",      -45.0,  0.0,  0.37, -1, 1);
    run_case("late data, symmetric",        45.0,  0.0,  0.37,  1, 1);
    run_case("lead 67.5, ones wider",      -67.5,  0.25, 0.37, -1, 1);
    run_case("lead 90, ones wider (range limit)",  -90.0,  0.25, 0.37, -1, 1);
    run_case("lag 67.5, ones wider",        67.5,  0.25, 0.37,  1, 1);
    run_case("lag 67.5, 1 kHz clock phase moved", 67.5,  0.25, 0.81,  1, 1);
    run_case("lag 90, ones wider (range limit)",    90.0,  0.25, 0.37,  1, 1);
    run_case("lead 22.5, ones wider",      -22.5,  0.25, 0.37, -1, 1);
    run_case("lag 100, zeros wider",       100.0, -0.25, 0.37,  1, 1);
    run_case("lag 190, ones wider",        190.0,  0.25, 0.37,  0, 0);
    run_case("lead 100, ones wider",      -100.0,  0.25, 0.37,  0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
