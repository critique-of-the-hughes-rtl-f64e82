// bitsync_pkg: constants and types shared by the leading-edge bit synchronizer.
//
// The false-lock detector's 8-bit counters and their full count of 256 follow
// the synchronizer's description. The up/down counter and DAC width, the
// zero-bias code and the advance/retard encoding are this design's choices.
package bitsync_pkg;
  timeunit 1ns; timeprecision 1ps;

  // Up/down counter and DAC resolution (not given for the original; chosen).
  localparam int unsigned DAC_BITS_DEFAULT = 8;

  // False frequency lock detector: two 8-bit counters, full count 256.
  localparam int unsigned FLD_BITS_DEFAULT = 8;

  // Direction decision held by the FHQ JK flip-flop.
  // ADVANCE: data leading edge came before the Q-clock edge, so the VCO clock
  // must move earlier. RETARD: data came late, the VCO clock must move later.
  typedef enum logic {
    DIR_RETARD  = 1'b0,
    DIR_ADVANCE = 1'b1
  } dir_e;

  // Code that gives 0 V out of the DAC (mid-scale of an offset-binary DAC).
  function automatic int unsigned zero_bias_code(int unsigned bits);
    return 32'd1 << (bits - 1);
  endfunction
endpackage
