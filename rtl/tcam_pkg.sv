// tcam_pkg: sizes and helpers shared by the VP SRAM-based TCAM.
//
// The design emulates a ternary CAM with plain RAM. The stored table of
// TCAM_DEPTH words, each TCAM_WIDTH bits wide, is cut column-wise into
// NUM_VP vertical partitions (VPs) of SUB_WIDTH = TCAM_WIDTH / NUM_VP bits.
// Each VP owns a Bit Position Table (BPT), an APT address generator (APTAG)
// and an Address Position Table (APT).
//
// The defaults describe the 8x4 example: an 8-bit word split into two 4-bit
// sub-words. The depth of 4 words and the 2-bit Bit Position Indicator
// (BPI) are this design's own choices; the source example gives neither
// figure beyond the "8X4" label.
package tcam_pkg;

  localparam int unsigned TCAM_WIDTH = 8;  // W: bits per TCAM word
  localparam int unsigned TCAM_DEPTH = 4;  // K: words stored
  localparam int unsigned NUM_VP     = 2;  // k: vertical partitions
  localparam int unsigned BPI_BITS   = 2;  // p: low bits of a sub-word that pick a bit in a BPT row
  localparam int unsigned NUM_LAYERS = 1;  // horizontal partitions; 1 = pure vertical partitioning

endpackage
