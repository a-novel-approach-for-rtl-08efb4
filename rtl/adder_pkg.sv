// adder_pkg: sizes shared by the parallel-prefix adders.
//
// The three adders of this design are all 16 bits wide, and the two hybrid
// ones (sparse Kogge-Stone and spanning-tree carry-lookahead) finish the sum
// in 4-bit ripple-carry slices. Both numbers come from the original paper;
// they are collected here so the modules' parameter defaults agree.
package adder_pkg;
  localparam int unsigned ADDER_WIDTH = 16;  // operand width of every adder
  localparam int unsigned SLICE_WIDTH = 4;   // ripple-carry slice of the hybrids
endpackage
