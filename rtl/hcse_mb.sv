// hcse_mb: multiplier block of the 6-tap linear-phase FIR filter realised
// with horizontal common subexpression elimination (HCSE).
//
// The block multiplies one input sample by the three distinct coefficients
// h(0), h(1), h(2) of the symmetric set using only shifts and eleven adders.
// Two horizontal subexpressions, the CSD patterns [1 0 1] and [1 0 -1] that
// recur inside the coefficients, are formed once:
//   x2 = x1 + 2^-2 x1        x3 = x1 - 2^-2 x1
// and each product is then the sum of four shifted terms, added as a
// balanced tree:
//   h(0)x1 = 2^-2 x1 + 2^-6 x3  + 2^-10 x2 + 2^-14 x3
//   h(1)x1 = 2^-2 x3 + 2^-8 x2  + 2^-12 x3 - 2^-16 x1
//   h(2)x1 = 2^-2 x1 - 2^-5 x1  + 2^-9 x1  - 2^-15 x1
// That is 2 + 3 * 3 = 11 multiplier-block adders, and the longest path is
// three adder-steps (subexpression, then two tree levels). The products of
// h(3..5) equal those of h(2..0) and are not computed again: the filter
// reuses m[2], m[1], m[0] for them.
//
// Interface: x is a signed DATA_W-bit sample. m[k] is h(k)*x as a signed
// ACC_W-bit integer scaled by 2^16, exact. Purely combinational.
//
// The subexpressions, the decomposition and the adder count follow the
// published HCSE realisation; the exact pairing of terms in each tree, the
// 2^16 scaling and the widths are this design's choice.
module hcse_mb
  import cse_pkg::*;
#(
  parameter int unsigned DATA_W = 16,
  localparam int unsigned ACC_W = DATA_W + COEF_FRAC + GUARD
) (
  input  logic signed [DATA_W-1:0] x,
  output logic signed [ACC_W-1:0]  m [3]
);

  typedef logic signed [ACC_W-1:0] acc_t;

  acc_t x1, x2, x3;              // input and horizontal subexpressions
  acc_t a3, a4, a6, a7, a9, a10;  // first tree level

  always_comb begin
    x1  = acc_t'(x) <<< COEF_FRAC;
    // Step 1: subexpressions [1 0 1] and [1 0 -1].
    x2  = x1 + (x1 >>> 2);
    x3  = x1 - (x1 >>> 2);
    // Step 2: pairs of shifted terms.
    a3  = (x1 >>> 2)  + (x3 >>> 6);
    a4  = (x2 >>> 10) + (x3 >>> 14);
    a6  = (x3 >>> 2)  + (x2 >>> 8);
    a7  = (x3 >>> 12) - (x1 >>> 16);
    a9  = (x1 >>> 2)  - (x1 >>> 5);
    a10 = (x1 >>> 9)  - (x1 >>> 15);
    // Step 3: one product per distinct coefficient.
    m[0] = a3 + a4;
    m[1] = a6 + a7;
    m[2] = a9 + a10;
  end

endmodule
