// Shared constants and types of the switching network.
//
// All elements of a network run from one clock whose rate is the bit rate
// of the internal (doubled) PCM lines. A time slot carries one 4-bit symbol
// of the (4,2) code, so an internal time slot lasts 4 clocks and an external
// time slot (half the bit rate on the line side) lasts 8 clocks. The time
// slot counter (tsc) is split as follows:
//   tsc[1:0]        bit within an internal slot ("q")
//   tsc[2:0]        phase within an external slot ("p")
//   tsc[W-1:2]      internal slot number
//   tsc[W-1:3]      external slot number
// The symbol width and the 2x ratio of internal to external slots follow the
// report; the bit-level phase plan is this design's own.
package tse_pkg;

  // Width of one coded PCM symbol on the switching network (a 4-bit symbol
  // of the (4,2) code).
  localparam int unsigned SYM_W = 4;

  // Which connection memory a configuration write goes to.
  typedef enum logic [1:0] {
    CFG_T1  = 2'd0,   // first-stage time switch connection memory
    CFG_S   = 2'd1,   // space stage connection memory
    CFG_T2  = 2'd2    // third-stage time switch connection memory
  } cfg_target_e;

  // A 4-bit PCM symbol.
  typedef logic [SYM_W-1:0] sym_t;

endpackage
