// Shared constants of the LMS adaptive filter.
//
// All signals of the filter are two's-complement fixed-point numbers of
// DATA_W bits with FRAC_W fractional bits (Q32.32 at the defaults). A full
// product of two such numbers has 2*DATA_W bits and 2*FRAC_W fractional
// bits; shifting it right by FRAC_W and keeping the low DATA_W bits returns
// it to the sample format. The 64-bit data width and 128-bit product width
// follow the 64-bit registers and 128-bit adder of the reference synthesis
// results; the number of taps and the binary point are this design's choice.
package lms_pkg;

  // Sample, weight, error and step-size width.
  localparam int unsigned DATA_W = 64;
  // Fractional bits of every fixed-point quantity.
  localparam int unsigned FRAC_W = 32;
  // Number of taps of the transversal filter.
  localparam int unsigned TAPS = 4;

endpackage
