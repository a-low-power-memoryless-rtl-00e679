// ddfs_pkg: sizes shared by the blocks of the direct digital frequency
// synthesizer (DDFS).
//
// The synthesizer is a 24-bit phase accumulator built from three pipelined
// 8-bit carry look-ahead stages, followed by a phase-to-amplitude converter
// that uses quarter-wave symmetry and a three-way angular decomposition of
// the 12-bit quarter-wave phase into 4-bit segments A, B and C. The widths
// below are the published ones: 24-bit accumulator, 14-bit phase word (two
// quadrant bits plus a 12-bit address), 11-bit sin A, 8-bit sin B, 4-bit
// sin C and an 11-bit quarter-wave magnitude. The 12-bit output code (sign
// plus magnitude folded to offset binary) is this design's choice of format.
package ddfs_pkg;

  // Phase accumulator
  localparam int unsigned ACC_W    = 24;  // accumulator / FCW width (N)
  localparam int unsigned STAGE_W  = 8;   // width of one CLA pipeline stage
  localparam int unsigned PHASE_W  = 14;  // accumulator bits passed on, [23:10]

  // Phase-to-amplitude converter
  localparam int unsigned ADDR_W   = 12;  // quarter-wave address (PHASE_W - 2)
  localparam int unsigned SEG_W    = 4;   // width of each of segments A, B, C
  localparam int unsigned SINA_W   = 11;  // sin A / cos A word
  localparam int unsigned SINB_W   = 8;   // sin B word
  localparam int unsigned SINC_W   = 4;   // sin C word
  localparam int unsigned MAG_W    = 11;  // quarter-wave magnitude
  localparam int unsigned OUT_W    = 12;  // full-wave output code

  // Full-scale value of all sub-ROM contents: 2^11 - 1
  localparam int unsigned FULL_SCALE = (1 << MAG_W) - 1;

endpackage
