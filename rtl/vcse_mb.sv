// vcse_mb: multiplier block of the 6-tap linear-phase FIR filter realised
// with vertical common subexpression elimination (VCSE).
//
// Vertical subexpressions span two adjacent coefficients, so they combine
// the current and the previous sample. The block keeps x1[-1] in a register
// and forms
//   x4 = x1 + x1[-1]          x5 = x1 - x1[-1]                  (a1, a2)
// The pair h(0), h(1) then reduces to
//   2^-2 x4 + 2^-10 x4 + 2^-12 x4 - 2^-16 x4     = E8  (a3..a5, a chain)
//   -2^-8 x5 + 2^-14 x5                          = E9  (a6)
//   t[0] = E8 + E9 + 2^-6 x1                           (a7, a8)
// plus the lone term -2^-4 x1[-1], which needs no adder of the block.
// The pair h(2), h(3) is 2^-2 x4 - 2^-5 x4 + 2^-9 x4 - 2^-15 x4 (a9..a11).
// The mirrored pair h(4), h(5) cannot simply reuse t[0]: the x5 terms swap
// sign there and the lone terms move. E8 and E9 are reused, and two extra
// adders fold in the -2^-4 x1 term:
//   t[4] = E8 - (E9 + 2^-4 x1)                         (a13, a12)
// with the lone term 2^-6 x1[-5] again left to the structural adders.
// That is 13 multiplier-block adders and a longest path of five
// adder-steps (a1, a3, a4, a5, a8 or a12).
//
// Interface: x is a signed DATA_W-bit sample, taken when en is high. t[k]
// is the product group that enters the transposed filter at delay k, as a
// signed ACC_W-bit integer scaled by 2^16, exact:
//   t[0] = E8 + E9 + 2^-6 x1     t[1] = 2^-4 x1 (to be subtracted)
//   t[2] = h(2) x4               t[3] = 0
//   t[4] = E8 - E9 - 2^-4 x1     t[5] = 2^-6 x1
// VCSE_SUB_MASK in cse_pkg tells the structural adders to subtract t[1].
// Timing: t[] is combinational in x and in x1[-1]; x1[-1] is loaded on the
// rising edge of clk when en is high and cleared by the asynchronous
// active-low rst_n.
//
// The subexpressions, the decomposition, the reuse of E8 and E9 and the
// adder count follow the published VCSE realisation; the grouping inside
// a3..a13, the sample enable, the reset and the widths are this design's
// choice.
module vcse_mb
  import cse_pkg::*;
#(
  parameter int unsigned DATA_W = 16,
  localparam int unsigned ACC_W = DATA_W + COEF_FRAC + GUARD
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic signed [DATA_W-1:0] x,
  output logic signed [ACC_W-1:0]  t [NTAPS]
);

  typedef logic signed [ACC_W-1:0] acc_t;

  logic signed [DATA_W-1:0] x_d;   // x1[-1]

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  x_d <= '0;
    else if (en) x_d <= x;
  end

  acc_t x1, x1d, x4, x5;
  acc_t a3, a4, a5, a6, a7, a9, a10, a13;

  always_comb begin
    x1  = acc_t'(x)   <<< COEF_FRAC;
    x1d = acc_t'(x_d) <<< COEF_FRAC;
    // Step 1: vertical subexpressions [1 1] and [1 -1].
    x4  = x1 + x1d;
    x5  = x1 - x1d;
    // Left-hand side of the mirrored pair: E8 (chain) and E9.
    a3  = (x4 >>> 2) + (x4 >>> 10);
    a4  = a3 + (x4 >>> 12);
    a5  = a4 - (x4 >>> 16);
    a6  = (x5 >>> 14) - (x5 >>> 8);
    // Delay-0 group.
    a7  = a6 + (x1 >>> 6);
    t[0] = a5 + a7;
    t[1] = x1 >>> 4;
    // Delay-2 group (h(2) = h(3) shared through x4).
    a9  = (x4 >>> 2) - (x4 >>> 5);
    a10 = (x4 >>> 9) - (x4 >>> 15);
    t[2] = a9 + a10;
    t[3] = '0;
    // Delay-4 group: E8 reused as is, E9 reused negated.
    a13 = a6 + (x1 >>> 4);
    t[4] = a5 - a13;
    t[5] = x1 >>> 6;
  end

endmodule
