// tb_lsb_transition_detector: changes the LSB input at random times and
// checks that the delayed LSB copies it at each 1 kHz edge and that the reset
// output is high exactly from an LSB change until the next edge.
module tb_lsb_transition_detector;
  timeunit 1ns; timeprecision 1ps;

  logic tick_clk = 1'b0, rst_n, lsb;
  logic lsb_d, cen_clr;
  int checks = 0, failures = 0;

  lsb_transition_detector dut (
    .tick_clk (tick_clk), .rst_n (rst_n), .lsb (lsb), .lsb_d (lsb_d), .cen_clr (cen_clr)
  );

  always #50 tick_clk = ~tick_clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit last;
    int n_clr = 0;
    rst_n = 1'b1;  // give the asynchronous reset an edge
    #1 rst_n = 1'b0; lsb = 1'b0;
    #120 rst_n = 1'b1;
    last = 1'b0;
    repeat (2000) begin
      bit nv;
      @(posedge tick_clk);
      last = lsb;               // value copied at this edge
      #1;
      checks++; if (lsb_d != last || cen_clr != 1'b0) failures++;
      nv = ($urandom_range(0, 2) == 0) ? ~lsb : lsb;
      #($urandom_range(5, 90));
      lsb = nv;
      #1;
      checks++;
      if (cen_clr != (nv ^ last)) begin
        failures++;
        $display("FAIL cen_clr=%b lsb=%b last=%b", cen_clr, nv, last);
      end
      if (cen_clr) n_clr++;
    end
    checks++; if (n_clr < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
