// tb_ku_bitsync_top: end-to-end test of the closed synchronizer loop.
//
// A 50 Mbit/s random NRZ stream with 25% asymmetry ("ones" wider) is sent
// with a received clock whose phase relative to the data is set by the
// testbench. The run has four phases:
//   1. data lagging the zero-bias Q-clock by LAG_DEG: the loop must retard
//      (count up) until the Q-clock edge sits on the data leading edge;
//   2. data jumped earlier by JUMP_DEG: the loop must advance (count down);
//   3. received clock moved outside the VCO pull range: the false lock
//      detector must report false lock and hold the DAC at zero bias;
//   4. received clock restored: true lock must be reported again.
// Checks: direction and size of the correction, the residual phase of the
// data edges against the Q-clock, recovered data against the sent bits, the
// minimum spacing of two counter updates (two 1 kHz periods), lock and false
// lock. Each mechanism (advance, retard, update hold-off, false lock, zero
// bias preset, true lock) is counted and must occur. The counter is shrunk to
// DAC_BITS bits and the 1 kHz clock sped up to TICK_NS so the run is short;
// the DAC still spans the same +/-90 degrees.
module tb_ku_bitsync_top;
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned DAC_BITS = 5;
  localparam real TB_NS    = 20.0;      // bit period, 50 Mbit/s
  localparam real ASY      = 0.25;      // asymmetry, ones wider
  localparam real TICK_NS  = 20000.0;   // stand-in for the 1 ms clock
  localparam real LAG_DEG  = 60.0;
  localparam real JUMP_DEG = 100.0;
  localparam real STEP_DEG = 90.0 / real'(1 << (DAC_BITS - 1));
  localparam int  MID      = 1 << (DAC_BITS - 1);

  logic rst_n, rx_clk, rx_data, tick_clk;
  logic x2_clk, i_clk, q_clk, data_out, lock, false_lock;
  logic [DAC_BITS-1:0] dac_code;

  ku_bitsync_top #(.DAC_BITS (DAC_BITS)) dut (
    .rst_n (rst_n), .rx_clk (rx_clk), .rx_data (rx_data), .tick_clk (tick_clk),
    .x2_clk (x2_clk), .i_clk (i_clk), .q_clk (q_clk), .data_out (data_out),
    .dac_code (dac_code), .lock (lock), .false_lock (false_lock)
  );

  int checks = 0, failures = 0;
  int n_adv = 0, n_ret = 0, n_holdoff = 0, n_false = 0, n_preset = 0, n_true = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // ---------------- stimulus: received clock ----------------
  real rx_period = TB_NS;
  initial begin
    rx_clk = 1'b0;
    forever begin
      #(rx_period / 2.0) rx_clk = 1'b1;
      #(rx_period / 2.0) rx_clk = 1'b0;
    end
  end

  // ---------------- stimulus: 1 kHz clock (sped up) ----------------
  initial begin
    tick_clk = 1'b0;
    #(TICK_NS * 0.37);
    forever begin
      #(TICK_NS / 2.0) tick_clk = 1'b1;
      #(TICK_NS / 2.0) tick_clk = 1'b0;
    end
  end

  // ---------------- stimulus: data ----------------
  // Bit boundaries sit at received-clock rising edge + data_ofs. A rising
  // edge falls on the boundary; a falling edge is ASY bit late (ones wider).
  real data_ofs;           // ns after the received-clock edge
  real ofs_pending;
  bit  cur_bit, prev_bit;
  real t_rise;
  bit  rise_evt;
  initial begin
    rx_data  = 1'b0;
    cur_bit  = 1'b0;
    prev_bit = 1'b0;
    rise_evt = 1'b0;
    // Q-clock rising edges sit TB_NS/2 after the received clock at zero bias.
    data_ofs    = TB_NS / 2.0 + LAG_DEG / 360.0 * TB_NS;
    ofs_pending = data_ofs;
    @(posedge rx_clk);
    #(data_ofs - TB_NS / 2.0);
    forever begin
      // Here: half a bit before the next boundary.
      prev_bit = cur_bit;
      if (prev_bit == 1'b1) begin
        // the one may stretch past the boundary by ASY bit
        #(TB_NS / 2.0);
        cur_bit = 1'($urandom_range(0, 1));
        if (cur_bit == 1'b0) begin
          #(ASY * TB_NS) rx_data = 1'b0;
          #(TB_NS / 2.0 - ASY * TB_NS);
        end else begin
          #(TB_NS / 2.0);
        end
      end else begin
        #(TB_NS / 2.0);
        cur_bit = 1'($urandom_range(0, 1));
        if (cur_bit) begin
          rx_data = 1'b1;
          t_rise  = $realtime;
          rise_evt = ~rise_evt;
        end
        #(TB_NS / 2.0);
      end
      // apply a phase jump only between bits
      if (ofs_pending != data_ofs) begin
        #(ofs_pending - data_ofs + (ofs_pending < data_ofs ? TB_NS : 0.0));
        data_ofs = ofs_pending;
      end
    end
  end

  // ---------------- monitors ----------------
  real t_q;
  always @(posedge q_clk) t_q = $realtime;

  // Phase of each data leading edge after the last Q-clock edge, in degrees
  // in (-180, 180]: positive = data late.
  real ph_acc;
  int  ph_n;
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

  // Recovered data: the bit sent at the I-clock edge must appear on
  // data_out after the next Q-clock edge.
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
  always @(negedge data_on) exp_q.delete();

  // Counter updates: direction, hold-off of two 1 kHz periods.
  int  last_upd_tick = -10, tick_n = 0;
  logic [DAC_BITS-1:0] prev_code;
  bit  preset_due;
  // The counter's synchronized false-lock flag, sampled mid-period, tells
  // whether the next 1 kHz edge is a zero-bias preset.
  always @(negedge tick_clk) preset_due = dut.u_core.u_cnt.fl_sync[1];
  always @(posedge tick_clk) begin
    tick_n++;
    #1;
    if (rst_n && dac_code != prev_code) begin
      if (preset_due) n_preset++;
      else begin
        if (dac_code > prev_code) n_ret++; else n_adv++;
        check(tick_n - last_upd_tick >= 2, "counter updates at most every second 1 kHz edge");
        if (tick_n - last_upd_tick == 2) n_holdoff++;
        last_upd_tick = tick_n;
      end
    end
    prev_code = dac_code;
  end

  always @(posedge dut.u_core.fl_decide) begin
    if (false_lock) n_false++;
    else            n_true++;
  end

  function automatic real fabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic wait_ticks(int n);
    repeat (n) @(posedge tick_clk);
  endtask

  task automatic measure_phase(int n_ticks, output real mean_deg);
    ph_acc = 0.0; ph_n = 0; ph_on = 1'b1;
    wait_ticks(n_ticks);
    ph_on = 1'b0;
    mean_deg = (ph_n > 0) ? ph_acc / ph_n : 999.0;
  endtask

  initial begin
    #(TICK_NS * 400);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ph;
    int  code_a;
    rst_n = 1'b1;  // give the asynchronous reset an edge
    #1 rst_n = 1'b0;
    prev_code = '0;
    #200 rst_n = 1'b1;

    // Phase 1: data lags by LAG_DEG; expect a retard correction.
    wait_ticks(2 * (int'(LAG_DEG / STEP_DEG) + 1) + 10);
    code_a = int'(dac_code);
    $display("phase 1: code %0d (mid %0d), expected about %0.1f", code_a, MID, MID + LAG_DEG / STEP_DEG);
    check(code_a > MID, "retard raises the code");
    check(fabs(real'(code_a - MID) - LAG_DEG / STEP_DEG) <= 2.0, "retard correction size");
    measure_phase(6, ph);
    $display("phase 1: residual phase %0.1f deg (step %0.2f)", ph, STEP_DEG);
    check(fabs(ph) <= 1.5 * STEP_DEG, "Q-clock on data leading edge after retard");
    check(lock && !false_lock, "true lock in phase 1");

    data_on = 1'b1;
    wait_ticks(4);
    data_on = 1'b0;
    $display("data: %0d bits checked, %0d wrong", data_checked, data_bad);
    check(data_checked > 1000, "enough recovered bits compared");
    check(data_bad == 0, "recovered data matches sent data");

    // Phase 2: data jumps earlier by JUMP_DEG; expect an advance correction.
    ofs_pending = data_ofs - JUMP_DEG / 360.0 * TB_NS;
    wait_ticks(2 * (int'(JUMP_DEG / STEP_DEG) + 1) + 10);
    $display("phase 2: code %0d, expected about %0.1f", dac_code, code_a - JUMP_DEG / STEP_DEG);
    check(int'(dac_code) < code_a, "advance lowers the code");
    check(fabs(real'(code_a - int'(dac_code)) - JUMP_DEG / STEP_DEG) <= 2.0, "advance correction size");
    measure_phase(6, ph);
    $display("phase 2: residual phase %0.1f deg", ph);
    check(fabs(ph) <= 1.5 * STEP_DEG, "Q-clock on data leading edge after advance");
    data_on = 1'b1;
    wait_ticks(4);
    data_on = 1'b0;
    check(data_bad == 0, "recovered data matches sent data after advance");

    // Phase 3: received clock far outside the VCO pull range.
    rx_period = TB_NS * 1.25;
    wait_ticks(6);
    check(false_lock && !lock, "false lock detected");
    check(int'(dac_code) == MID, "DAC at zero bias in false lock");

    // Phase 4: received clock restored.
    rx_period = TB_NS;
    wait_ticks(4);
    check(lock && !false_lock, "true lock regained");

    $display("mechanisms: advance=%0d retard=%0d holdoff=%0d false_lock=%0d preset=%0d true_lock=%0d",
             n_adv, n_ret, n_holdoff, n_false, n_preset, n_true);
    check(n_adv > 0, "advance updates happened");
    check(n_ret > 0, "retard updates happened");
    check(n_holdoff > 0, "update hold-off happened");
    check(n_false > 0, "false lock decisions happened");
    check(n_preset > 0, "zero-bias preset happened");
    check(n_true > 0, "true lock decisions happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
