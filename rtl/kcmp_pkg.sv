// kcmp_pkg: constants and helper functions shared by the self-exercising
// k-order comparator.
//
// A k-order comparator decides whether two n-bit operands differ in fewer
// than k bit positions (k = 1 is the ordinary equality comparator). The
// defaults below are the sizes the design is characterised at: 16-bit
// operands and a 2nd-order comparator. tvg_phase_e names the two halves of
// the test-vector period: in one half shift register B advances, in the other
// shift register A advances.
`timescale 1ns / 1ps

package kcmp_pkg;

  parameter int unsigned DEFAULT_N = 16;
  parameter int unsigned DEFAULT_K = 2;

  typedef enum logic {
    PH_SHIFT_B = 1'b0,   // B advances: weight of A^B falls from K to K-1
    PH_SHIFT_A = 1'b1    // A advances: weight of A^B rises from K-1 to K
  } tvg_phase_e;

endpackage
