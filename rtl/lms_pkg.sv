// lms_pkg: default sizes shared by the delayed-LMS filter modules.
//
// The filter has N_TAPS taps, L-bit input samples and W-bit weights.
// N_TAPS = 4 and L = 8 are the sizes of the worked example the design is
// built around (four 2-bit partial-product generators with four radix-4
// digits each). W = 16 and MU_SHIFT = 4 are this design's own choices.
//
// Fixed-point formats (this design's choice):
//   x       : L bits, signed, Q1.(L-1)   value = x / 2^(L-1)
//   w       : W bits, signed, Q2.(W-2)   value = w / 2^(W-2)
//   d, y, e : W bits, same format as w
//   mu = 2^-MU_SHIFT, applied to e by an arithmetic right shift.
package lms_pkg;

  localparam int unsigned N_TAPS_DEF   = 4;
  localparam int unsigned L_DEF        = 8;
  localparam int unsigned W_DEF        = 16;
  localparam int unsigned MU_SHIFT_DEF = 4;

endpackage
