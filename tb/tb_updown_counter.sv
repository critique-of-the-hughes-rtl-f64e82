// tb_updown_counter: a 4-bit counter driven by random enable, direction and
// false-lock inputs on a 1 kHz-style clock. Expected count: starts at
// mid-scale (8); each edge with enable steps down for advance and up for
// retard, stopping at 0 and 15; a false-lock level that has been present for
// two edges forces mid-scale. The LSB output must be bit 0 of the count.
module tb_updown_counter;
  timeunit 1ns; timeprecision 1ps;
  import bitsync_pkg::*;

  localparam int BITS = 4;

  logic tick_clk = 1'b0, rst_n, cen, false_lock;
  dir_e dir;
  logic [BITS-1:0] count;
  logic lsb;
  int checks = 0, failures = 0;
  int n_sat = 0, n_preset = 0;

  updown_counter #(.BITS (BITS)) dut (
    .tick_clk (tick_clk), .rst_n (rst_n), .cen (cen), .dir (dir),
    .false_lock (false_lock), .count (count), .lsb (lsb)
  );

  always #50 tick_clk = ~tick_clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m, fl1, fl2;
    rst_n = 1'b1;  // give the asynchronous reset an edge
    #1 rst_n = 1'b0; cen = 1'b0; dir = DIR_RETARD; false_lock = 1'b0;
    #120 rst_n = 1'b1;
    checks++; if (count != 8) failures++;
    m = 8; fl1 = 0; fl2 = 0;
    for (int i = 0; i < 4000; i++) begin
      bit c, d, f;
      // long runs in one direction to reach both ends
      c = ($urandom_range(0, 3) != 0);
      d = ((i / 200) % 2 == 0) ? ($urandom_range(0, 9) < 8) : ($urandom_range(0, 9) < 2);
      f = ((i % 500) > 480);
      @(negedge tick_clk);
      cen = c; dir = d ? DIR_ADVANCE : DIR_RETARD; false_lock = f;
      @(posedge tick_clk);
      if (fl2) begin
        m = 8;
        n_preset++;
      end else if (c) begin
        if (d) begin
          if (m > 0) m--; else n_sat++;
        end else begin
          if (m < 15) m++; else n_sat++;
        end
      end
      fl2 = fl1; fl1 = f;
      #1;
      checks++;
      if (int'(count) != m || lsb != count[0]) begin
        failures++;
        $display("FAIL count=%0d expected %0d", count, m);
      end
    end
    checks++; if (n_sat < 10 || n_preset < 10) failures++;
    $display("saturated=%0d preset=%0d", n_sat, n_preset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
