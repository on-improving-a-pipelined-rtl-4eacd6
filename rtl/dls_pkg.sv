// dls_pkg: constants and classification types shared by the Dependence Level
// Scheduler (DLS) blocks.
//
// Sizes follow the integer side of the evaluated 4-wide processor: a 32-entry
// integer issue queue, 4 integer issue ports and a fetch/decode width of 4,
// which is also used as the dispatch width (the dispatch width itself is this
// design's choice). The execution latencies are those of the evaluated
// machine; only ALU operations are one-cycle instructions, everything else is
// a multi-cycle instruction. LAT_W is wide enough for the longest latency (24).
//
// Two classifications are carried per issue-queue entry:
//  * own latency (decided at decode): a one-cycle instruction wakes its
//    dependents "in advance", while it is competing for selection; a
//    multi-cycle instruction wakes them "in selection", after being selected.
//  * producers' latency (decided at rename): an instruction that depends on a
//    one-cycle instruction not yet issued is "woken up in advance" and is held
//    back from selection until its producer level is fully issued.
// The producer-side encoding (0 = woken in advance, 1 = woken in selection)
// is the one printed in the D-Logic and ZDL slice figures; the encoding of the
// own-latency class is this design's choice.
package dls_pkg;

  parameter int unsigned IQ_SIZE    = 32;  // integer issue-queue entries
  parameter int unsigned ISSUE_W    = 4;   // integer issue width
  parameter int unsigned DISPATCH_W = 4;   // instructions written per cycle
  parameter int unsigned LAT_W      = 5;   // bits of an execution latency

  // Execution latencies in cycles (integer and floating-point units).
  parameter int unsigned LAT_ALU    = 1;
  parameter int unsigned LAT_LOAD   = 3;   // predicted L1 hit
  parameter int unsigned LAT_IMUL   = 10;
  parameter int unsigned LAT_IDIV   = 15;
  parameter int unsigned LAT_FPADD  = 4;
  parameter int unsigned LAT_FPDIV  = 15;
  parameter int unsigned LAT_FPSQRT = 24;

  // Class by the instruction's own latency.
  typedef enum logic {
    WAKEUP_IN_ADVANCE   = 1'b0,   // one-cycle: wakes dependents while requesting
    WAKEUP_IN_SELECTION = 1'b1    // multi-cycle: wakes dependents after selection
  } own_class_e;

  // Class by the latency of the instruction's producers.
  typedef enum logic {
    WOKEN_IN_ADVANCE    = 1'b0,   // depends on a pending one-cycle producer
    WOKEN_IN_SELECTION  = 1'b1    // competes the cycle after becoming ready
  } prod_class_e;

endpackage
