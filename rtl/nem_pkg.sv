// nem_pkg: shared constants of the non-exact stream matching accelerator.
//
// The default sizes are the original design's reference configuration: a
// 128-bit matching word (L), 8 patterns per matching engine (N), a 2-bit
// symbol (S), 8 matching engines (M) and 2 pipeline stages in each
// comparator (C). The position width and the result buffer depth are this
// design's own choices. Helper functions give the derived widths.
package nem_pkg;

  localparam int unsigned L_DEF      = 128; // length of the matching word in bits
  localparam int unsigned N_DEF      = 8;   // patterns (comparators) per matching engine
  localparam int unsigned S_DEF      = 2;   // symbol length in bits (window step)
  localparam int unsigned M_DEF      = 8;   // matching engines working in parallel
  localparam int unsigned C_DEF      = 2;   // pipeline stages of a comparator
  localparam int unsigned SEG_W_DEF  = 32;  // segment width of the Hamming weight counter
  localparam int unsigned POS_W_DEF  = 48;  // width of a stream bit position
  localparam int unsigned FIFO_DEPTH_DEF = 256; // result buffer entries

endpackage
