// tb_correction_control: drives random transition pulses, up/down gate values
// and LSB-detector resets into the count enable and FHQ flip-flops, and
// checks them against a reference built from the rules: count enable is set
// by a transition pulse at a Q-clock edge and cleared at once by the reset;
// FHQ takes the direction of each transition only while count enable is low,
// so it keeps the decision of the edge that armed the counter. Directed
// cases first: early edge arms and gives advance, a later late edge cannot
// change it, the reset clears count enable between clock edges, and a late
// edge then arms with retard.
module tb_correction_control;
  timeunit 1ns; timeprecision 1ps;
  import bitsync_pkg::*;

  logic q_clk = 1'b0, rst_n, trans, updown, cen_clr;
  logic cen;
  dir_e dir;
  int checks = 0, failures = 0;

  correction_control dut (
    .q_clk (q_clk), .rst_n (rst_n), .trans (trans), .updown (updown),
    .cen_clr (cen_clr), .cen (cen), .dir (dir)
  );

  always #10 q_clk = ~q_clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s t=%0t cen=%b dir=%s", what, $time, cen, dir.name());
    end
  endtask

  // Apply inputs after a falling edge, let one rising edge pass.
  task automatic cycle(bit tr, bit ud, bit clr);
    @(negedge q_clk);
    trans = tr; updown = tr & ud; cen_clr = clr;
    @(posedge q_clk);
    #1;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit   m_cen;
    dir_e m_dir;
    rst_n = 1'b1;  // give the asynchronous reset an edge
    #1 rst_n = 1'b0; trans = 1'b0; updown = 1'b0; cen_clr = 1'b0;
    #25 rst_n = 1'b1;
    chk(cen == 1'b0 && dir == DIR_RETARD, "reset");

    cycle(0, 0, 0);  chk(cen == 1'b0, "idle");
    cycle(1, 1, 0);  chk(cen == 1'b1 && dir == DIR_ADVANCE, "early edge arms, advance");
    cycle(0, 0, 0);  chk(cen == 1'b1, "count enable holds");
    cycle(1, 0, 0);  chk(cen == 1'b1 && dir == DIR_ADVANCE, "decision frozen while armed");
    @(negedge q_clk); trans = 1'b0; cen_clr = 1'b1; #2;
    chk(cen == 1'b0, "reset clears count enable between clock edges");
    cycle(1, 0, 1);  chk(cen == 1'b0, "no arming while reset is high");
    cycle(1, 0, 0);  chk(cen == 1'b1 && dir == DIR_RETARD, "late edge arms, retard");

    // Random sequence against the reference.
    m_cen = cen; m_dir = dir;
    repeat (3000) begin
      bit tr, ud, clr;
      tr  = ($urandom_range(0, 3) == 0);
      ud  = 1'($urandom_range(0, 1));
      clr = ($urandom_range(0, 7) == 0);
      @(negedge q_clk);
      trans = tr; updown = tr & ud; cen_clr = clr;
      #1;
      if (clr) m_cen = 1'b0;
      chk(cen == m_cen, "count enable after asynchronous reset");
      @(posedge q_clk);
      if (!m_cen) begin
        if (tr & ud)  m_dir = DIR_ADVANCE;
        if (tr & ~ud) m_dir = DIR_RETARD;
      end
      if (!clr && tr) m_cen = 1'b1;
      #1;
      chk(cen == m_cen && dir == m_dir, "random sequence");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
