// false_lock_detector: decides whether the loop is in true lock or in a false
// frequency lock by counting the received clock and the synchronizer clock.
//
// Each clock drives its own counter of BITS bits plus a carry bit. When either
// counter reaches its full count of 2**BITS (256), the other is stopped. The
// count of the counter that did not fill is then compared with 2**BITS: an
// error of at most TOL counts means true lock, a larger one false lock. Both
// counters are then cleared and a new measurement starts, so the decision is
// refreshed every 2**BITS received-clock periods or so.
//
// The two counters, their full count of 256, stopping the other counter and
// comparing with 256 follow the synchronizer's description. The error bound
// TOL and the way the two clock domains talk (two-flip-flop synchronizers for
// the stop and clear requests and the full flag, a fixed settling wait before
// the stopped count is read as a quasi-static bus, a cleared measurement
// after each decision) are this design's choices. The synchronizer latency
// lets the counts overrun by a few clocks; TOL must cover that.
//
// Ports: rx_clk (received clock; the control logic runs on it), syn_clk
// (synchronizer clock, the I-clock), rst_n; lock and false_lock (levels,
// updated at each decision, rx_clk domain), decide (one-cycle pulse per
// decision), err (absolute count error of the last decision).
module false_lock_detector
  import bitsync_pkg::*;
#(
  parameter int unsigned BITS   = FLD_BITS_DEFAULT,
  parameter int unsigned TOL    = 8,
  parameter int unsigned SETTLE = 8
) (
  input  logic          rx_clk,
  input  logic          syn_clk,
  input  logic          rst_n,
  output logic          lock,
  output logic          false_lock,
  output logic          decide,
  output logic [BITS:0] err
);
  timeunit 1ns; timeprecision 1ps;

  localparam logic [BITS:0] FULL = (BITS+1)'(1) << BITS;

  typedef enum logic [1:0] {FL_COUNT, FL_SETTLE, FL_EVAL, FL_CLEAR} fl_state_e;

  // ---------------- received-clock domain ----------------
  fl_state_e     state;
  logic [BITS:0] cnt_r;
  logic          halt, clr_req;
  logic [1:0]    full_v_sync;
  logic [$clog2(SETTLE+1)-1:0] wait_cnt;

  // ---------------- synchronizer-clock domain ------------
  logic [BITS:0] cnt_v;
  logic [1:0]    halt_sync, clr_sync;
  logic          full_v;

  assign full_v = (cnt_v == FULL);

  always_ff @(posedge syn_clk or negedge rst_n) begin
    if (!rst_n) begin
      halt_sync <= '0;
      clr_sync  <= '0;
      cnt_v     <= '0;
    end else begin
      halt_sync <= {halt_sync[0], halt};
      clr_sync  <= {clr_sync[0], clr_req};
      if (clr_sync[1])                      cnt_v <= '0;
      else if (!halt_sync[1] && !full_v)    cnt_v <= cnt_v + 1'b1;
    end
  end

  function automatic logic [BITS:0] abs_err(logic [BITS:0] n);
    return (n > FULL) ? n - FULL : FULL - n;
  endfunction

  always_ff @(posedge rx_clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= FL_CLEAR;
      cnt_r       <= '0;
      halt        <= 1'b1;
      clr_req     <= 1'b1;
      full_v_sync <= '0;
      wait_cnt    <= '0;
      lock        <= 1'b0;
      false_lock  <= 1'b0;
      decide      <= 1'b0;
      err         <= '0;
    end else begin
      full_v_sync <= {full_v_sync[0], full_v};
      decide      <= 1'b0;
      unique case (state)
        FL_COUNT: begin
          if (cnt_r == FULL || full_v_sync[1]) begin
            halt     <= 1'b1;
            wait_cnt <= '0;
            state    <= FL_SETTLE;
          end else begin
            cnt_r <= cnt_r + 1'b1;
          end
        end
        FL_SETTLE: begin
          if (wait_cnt == SETTLE[$bits(wait_cnt)-1:0]) state <= FL_EVAL;
          else wait_cnt <= wait_cnt + 1'b1;
        end
        FL_EVAL: begin
          // The counter that filled sets the time base; the other is checked.
          logic [BITS:0] e;
          e = (cnt_r == FULL) ? abs_err(cnt_v) : abs_err(cnt_r);
          err        <= e;
          lock       <= (32'(e) <= TOL);
          false_lock <= (32'(e) > TOL);
          decide     <= 1'b1;
          clr_req    <= 1'b1;
          cnt_r      <= '0;
          wait_cnt   <= '0;
          state      <= FL_CLEAR;
        end
        FL_CLEAR: begin
          if (wait_cnt == SETTLE[$bits(wait_cnt)-1:0]) begin
            clr_req <= 1'b0;
            halt    <= 1'b0;
            cnt_r   <= '0;
            state   <= FL_COUNT;
          end else begin
            wait_cnt <= wait_cnt + 1'b1;
          end
        end
        default: state <= FL_CLEAR;
      endcase
    end
  end
endmodule
