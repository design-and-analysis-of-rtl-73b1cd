// fp_pkg: types and constants shared by the inexact floating-point adder.
//
// The default format is IEEE 754 binary64 (1 sign bit, 11 exponent bits,
// 52 stored fraction bits plus a hidden one). The status flags follow the
// five conditions an IEEE adder reports: overflow, underflow, zero,
// inexact and NaN. The packing order of the flags is this design's choice.
package fp_pkg;

  localparam int unsigned DP_EXP_W  = 11;
  localparam int unsigned DP_FRAC_W = 52;

  // Status flags of one addition.
  typedef struct packed {
    logic overflow;   // result too large, returned as infinity
    logic underflow;  // result too small, flushed to zero
    logic zero;       // result is (signed) zero
    logic inexact;    // nonzero bits were discarded
    logic nan;        // result is NaN
  } fp_flags_t;

endpackage
