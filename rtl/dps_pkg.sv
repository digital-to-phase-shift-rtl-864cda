// dps_pkg: types and default constants shared by the two digital-to-phase-shift
// circuits.
//
// gates_t bundles the four IGBT gate commands of a full bridge: a and b drive the
// left leg (Q1 and Q3), c and d the right leg (Q2 and Q4). The default constants are
// the sizes the design is built around: a 10-bit phase counter split into an 8-bit
// and a 2-bit stage, 74164-style 8-bit shift registers whose QC output (third stage)
// sets the dead time of circuit 2, and a dead-time count of 6 (QB and QC both set)
// for circuit 1. The 10/8/2 bit split, the 74164 length and the QC tap follow the
// circuit description; the count of 6 and the two-stage input synchronisers are
// this design's choices.
package dps_pkg;

  typedef struct packed {
    logic a;  // Q1, left leg upper switch
    logic b;  // Q3, left leg lower switch
    logic c;  // Q2, right leg lower switch
    logic d;  // Q4, right leg upper switch
  } gates_t;

  localparam int unsigned C1_LOW_W     = 8;  // 8-bit counter (41)
  localparam int unsigned C1_HIGH_W    = 2;  // 2-bit counter (42)
  localparam int unsigned C1_DATA_W    = C1_LOW_W + C1_HIGH_W;
  localparam int unsigned C1_DT_CNT_W  = 4;  // width of each dead-time counter
  localparam int unsigned DEF_C1_DT_COUNT = 6;  // QB and QC set
  localparam int unsigned C2_SR_LEN    = 8;  // 74164: QA..QH
  localparam int unsigned DEF_C2_DT_TAP = 3;  // QC
  localparam int unsigned DEF_SYNC_STAGES = 2;

endpackage
