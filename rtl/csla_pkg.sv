// csla_pkg -- sizes shared by the ALU-style carry select adder.
//
// The adder is built from fixed-width slices (SLICE_W bits, four in the
// reference design) chained carry-out to carry-in to reach the full operand
// width (ADDER_W, eight in the reference design). Both numbers are the two
// sizes the design is characterised at; the chaining of two slices for the
// 8-bit adder is this design's own reading of how the wider adder is made.
package csla_pkg;
  localparam int unsigned SLICE_W = 4;  // bits per ALU slice
  localparam int unsigned ADDER_W = 8;  // operand width of the full adder
endpackage
