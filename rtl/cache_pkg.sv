// cache_pkg: sizes and helpers shared by the CAM-tagged instruction cache.
//
// The cache holds 2048 instructions of 32 bits (8 KB). Each of the 2048 rows
// has an 11-bit CAM tag: the low 11 bits of the instruction word address, so
// the tag store is 2048 x 11 bits (2.75 KB). These three numbers are the
// design's published sizes. MISS_DELAY, the length of the matched delay that
// decides a miss, is this design's own choice: it only has to be longer than
// the one clock cycle a CAM search takes from the start of evaluation to the
// completion signal; 3 leaves two cycles of margin.
package cache_pkg;

  parameter int unsigned ROWS       = 2048;  // cache lines (one instruction each)
  parameter int unsigned TAG_W      = 11;    // CAM word width = instruction address width
  parameter int unsigned DATA_W     = 32;    // instruction width
  parameter int unsigned MISS_DELAY = 3;     // bundled delay, in clock cycles

endpackage
