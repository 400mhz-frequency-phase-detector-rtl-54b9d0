// Shared constants of the frequency/phase detector and counter firmware.
//
// CNT_W is the width of the equal-precision counters and of the frequency
// results in Hz; PHASE_W the width of the digital phase error. DEF_FS_HZ and
// DEF_GATE_CYCLES are the default time-base frequency of the frequency
// counters and their preset gate length in time-base cycles: a 100 MHz time
// base and a 1 s preset gate give Ns = 1e8 and a relative error below 1e-8
// (Eq. 4), about 1 Hz at 100 MHz. The time-base frequency and gate length
// are this design's choice; the 16-bit phase error width is the document's.
package fpd_pkg;
  localparam int unsigned CNT_W           = 32;
  localparam int unsigned PHASE_W         = 16;
  localparam int unsigned DEF_FS_HZ       = 100_000_000;
  localparam int unsigned DEF_GATE_CYCLES = 100_000_000;

  typedef logic [CNT_W-1:0]          count_t;
  typedef logic signed [PHASE_W-1:0] phase_t;
endpackage
