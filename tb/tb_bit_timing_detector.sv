// tb_bit_timing_detector: drives random NRZ data against ideal I- and
// Q-clocks and compares the outputs with values worked out from the sent
// bits. The Q-clock rises at k*T and the I-clock at k*T + T/2. Bit n's
// leading edge sits at n*T + ofs, ofs < 0 being early and ofs > 0 late data;
// falling edges come 0.25 T later (25% asymmetry, ones wider). In the half
// bit after the I-clock edge of bit k the transition pulse must equal
// b[k] AND NOT b[k-1], the up/down gate must equal that pulse for early
// data and stay low for late data, and the re-timed data must equal b[k-1].
module tb_bit_timing_detector;
  timeunit 1ns; timeprecision 1ps;

  localparam real T     = 20.0;
  localparam int  NBITS = 600;

  logic i_clk, q_clk, rst_n, data;
  logic trans, updown, fdq, data_out;
  int checks = 0, failures = 0;
  int n_early = 0, n_late = 0;
  real t0;
  bit  b[NBITS];

  bit_timing_detector dut (
    .i_clk (i_clk), .q_clk (q_clk), .rst_n (rst_n), .data (data),
    .trans (trans), .updown (updown), .fdq (fdq), .data_out (data_out)
  );

  initial begin
    i_clk = 1'b0;
    q_clk = 1'b0;
    forever begin
      #(T / 2.0) i_clk = 1'b0; q_clk = 1'b1;
      #(T / 2.0) i_clk = 1'b1; q_clk = 1'b0;
    end
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s t=%0t", what, $time);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One run: t0 is a Q-clock rising edge; bits 0 and 1 are zero.
  task automatic run(real ofs);
    for (int n = 0; n < NBITS; n++) b[n] = (n < 2) ? 1'b0 : 1'($urandom_range(0, 1));
    @(posedge q_clk);
    t0 = $realtime;
    fork
      for (int n = 1; n < NBITS; n++) begin
        if (b[n] != b[n-1]) begin
          #(t0 + n * T + ofs + (b[n] ? 0.0 : 0.25 * T) - $realtime);
          data = b[n];
        end
      end
      for (int k = 2; k < NBITS - 1; k++) begin
        bit tr;
        #(t0 + k * T + 0.75 * T - $realtime);
        tr = b[k] & ~b[k-1];
        chk(trans === tr, "transition pulse");
        chk(updown === (tr & (ofs < 0.0)), "up/down gate");
        chk(data_out === b[k-1], "re-timed data");
        if (tr) begin
          if (ofs < 0.0) n_early++; else n_late++;
        end
      end
    join
    data = 1'b0;
  endtask

  initial begin
    data  = 1'b0;
    rst_n = 1'b1;  // give the asynchronous reset an edge
    #1 rst_n = 1'b0;
    #(2.2 * T);
    chk(trans === 1'b0 && updown === 1'b0 && data_out === 1'b0, "reset state");
    rst_n = 1'b1;
    run(-0.2 * T);
    repeat (3) @(posedge q_clk);
    run(0.2 * T);
    $display("early edges=%0d late edges=%0d", n_early, n_late);
    chk(n_early > 50 && n_late > 50, "both early and late edges seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
