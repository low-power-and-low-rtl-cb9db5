// Shared types of the low-power test hardware.
//
// The random-access-scan (RAS) part reports which test phase it is in; the
// phase type is used by its controller, its wrapper and the top level. The
// two phases, segmented random scan test (SRST) followed by deterministic
// random-access patterns, follow the Cocktail Scan flow; the encoding of the
// enum is this design's choice.
package lpt_pkg;

  typedef enum logic [1:0] {
    PH_IDLE = 2'd0,   // waiting for start
    PH_SRST = 2'd1,   // first phase: seeds and segmented random patterns
    PH_RAS  = 2'd2,   // second phase: bit flips addressed one cell at a time
    PH_DONE = 2'd3    // all patterns applied
  } ras_phase_e;

endpackage
