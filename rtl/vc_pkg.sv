// Shared types of the victim-cache data cache subsystem.
//
// bypass_sel_e selects which bypass predictor gates victim cache probes.
// vc_events_t is a bundle of one-cycle event pulses that the subsystem
// raises so that an observer can count hits, probes, bypasses and the
// coverage of every predictor (the fraction of victim cache misses that a
// predictor would have avoided).
package vc_pkg;

  typedef enum logic [2:0] {
    BYP_NONE    = 3'd0,   // probe the victim cache whenever the mode asks for it
    BYP_HIGHLOW = 3'd1,   // HighLow-Bits predictor
    BYP_SUM     = 3'd2,   // Sum predictor
    BYP_TABLE   = 3'd3,   // Table predictor
    BYP_EXCL    = 3'd4    // Exclusive predictor
  } bypass_sel_e;

  // Index of each predictor in vc_events_t.pred
  localparam int unsigned P_HIGHLOW = 0;
  localparam int unsigned P_SUM     = 1;
  localparam int unsigned P_TABLE   = 2;
  localparam int unsigned P_EXCL    = 3;

  typedef struct packed {
    logic       l1_hit;      // access hit in the L1 (lookup cycle)
    logic       l1_miss;     // access missed in the L1 (lookup cycle)
    logic       vc_lookup;   // a victim cache lookup was due (before bypass)
    logic       vc_probe;    // the victim cache was actually probed
    logic       vc_hit;      // the probe hit
    logic       vc_bypass;   // the lookup was suppressed by the selected predictor
    logic       vc_miss_any; // the block is not in the victim cache (true outcome of a due lookup)
    logic [3:0] pred;        // outputs of all four predictors at this lookup
    logic       swap;        // victim cache block promoted into the L1
    logic       fill;        // block from level 2 written into the L1
    logic       vc_insert;   // L1 replaced block placed into the victim cache on a fill
    logic       l2_read;     // level-2 block fetch issued
    logic       l2_write;    // dirty block written back to level 2
  } vc_events_t;

endpackage
