// Shared types for the low-leakage scan flip-flop design.
//
// The scan test sequencer walks through three phases. In FUNCTIONAL the
// scan enable is low and the flip-flops behave as ordinary registers. In
// SHIFT the scan enable is high: the chain shifts one bit per clock and every
// flip-flop's functional output is parked at its fixed value. CAPTURE is the
// single clock with scan enable low that applies the loaded pattern to the
// combinational logic and captures its response (test-per-scan: one pattern
// every m+1 clocks for an m-bit chain). The phase names are this design's own.
package lowleak_scan_pkg;

  typedef enum logic [1:0] {
    SEQ_FUNCTIONAL = 2'd0,
    SEQ_SHIFT      = 2'd1,
    SEQ_CAPTURE    = 2'd2
  } seq_phase_e;

endpackage
