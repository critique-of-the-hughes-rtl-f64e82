// tb_clock_divider: checks the divide-by-2 flip-flop. After reset the I-clock
// must toggle on every rising X2 edge, starting high on the first edge, and
// the Q-clock must always be its complement, so each runs at half the X2
// rate with the two half a bit apart.
module tb_clock_divider;
  timeunit 1ns; timeprecision 1ps;

  logic x2_clk = 1'b0, rst_n;
  logic i_clk, q_clk;
  int checks = 0, failures = 0;

  clock_divider dut (.x2_clk (x2_clk), .rst_n (rst_n), .i_clk (i_clk), .q_clk (q_clk));

  always #5 x2_clk = ~x2_clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp_i;
    int i_rises;
    rst_n = 1'b1;  // give the asynchronous reset an edge
    #1 rst_n = 1'b0;
    #23;
    checks++; if (i_clk !== 1'b0 || q_clk !== 1'b1) failures++;
    @(negedge x2_clk) rst_n = 1'b1;
    exp_i = 1'b0;
    i_rises = 0;
    repeat (200) begin
      @(posedge x2_clk);
      exp_i = ~exp_i;
      #1;
      checks++;
      if (i_clk !== exp_i || q_clk !== ~exp_i) begin
        failures++;
        $display("FAIL i=%b q=%b expected i=%b", i_clk, q_clk, exp_i);
      end
      if (exp_i) i_rises++;
    end
    checks++; if (i_rises != 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
