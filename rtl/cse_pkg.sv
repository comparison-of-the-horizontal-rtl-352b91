// cse_pkg: constants shared by the multiplierless 6-tap linear-phase FIR
// filters built with horizontal (HCSE) and vertical (VCSE) common
// subexpression elimination.
//
// The filter coefficients are 16-bit canonic-signed-digit (CSD) fractions:
// digit j (j = 1..16) has weight 2^-j. Inside the datapath every signal is
// kept as an integer scaled by 2^COEF_FRAC, so a right shift by j of the
// input becomes an exact left shift by COEF_FRAC - j and no bit is lost.
//
// The coefficient set is symmetric, h(5-k) = h(k):
//   h(0) = 2^-2 + 2^-6 - 2^-8 + 2^-10 + 2^-12 + 2^-14 - 2^-16 = 17235 / 2^16
//   h(1) = 2^-2 - 2^-4 + 2^-8 + 2^-10 + 2^-12 - 2^-14 - 2^-16 = 12619 / 2^16
//   h(2) = 2^-2 - 2^-5 + 2^-9 - 2^-15                         = 14462 / 2^16
// These are the coefficients of the filter; H_INT is offered for reference
// models and the datapath itself never multiplies by them.
package cse_pkg;

  // Number of taps of the linear-phase FIR filter.
  localparam int unsigned NTAPS = 6;

  // Coefficient wordlength: the CSD digits reach down to 2^-16.
  localparam int unsigned COEF_FRAC = 16;

  // Integer headroom above the input's range. The largest intermediate
  // value is |x4| = 2|x1| (VCSE) and the sum of |h(k)| is about 1.35, so one
  // bit is the minimum; a second one is kept as margin. No adder can
  // overflow, and every output is exact.
  localparam int unsigned GUARD = 2;

  // Coefficients as integers scaled by 2^COEF_FRAC, tap 0 first.
  localparam int H_INT [NTAPS] = '{17235, 12619, 14462, 14462, 12619, 17235};

  // Taps whose product group the VCSE structural adder subtracts rather
  // than adds: only the lone -2^-4 x1[-1] term at delay 1.
  localparam logic [NTAPS-1:0] VCSE_SUB_MASK = 6'b000010;

endpackage
