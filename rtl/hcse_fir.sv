// hcse_fir: 6-tap linear-phase FIR filter realised with horizontal common
// subexpression elimination.
//
// y(n) = sum_{k=0..5} h(k) x(n-k) with the symmetric 16-bit CSD
// coefficients of cse_pkg. The multiplier block (hcse_mb) computes only
// h(0)x, h(1)x and h(2)x; because every horizontal subexpression lies
// inside one coefficient, the mirrored taps h(3..5) take the same products
// in reverse order, and the transposed-form chain (sa_chain) supplies the
// delays. Cost: 11 multiplier-block adders (three adder-steps deep), five
// structural adders and five delay registers.
//
// Interface: x is a signed DATA_W-bit sample, accepted on the rising edge
// of clk when en is high; y is the signed ACC_W-bit output scaled by 2^16
// (value = y / 2^16 input LSBs), exact, combinational in the present x.
// rst_n clears the delay line asynchronously.
//
// The structure follows the published HCSE filter; enable, reset and
// widths are this design's choice.
module hcse_fir
  import cse_pkg::*;
#(
  parameter int unsigned DATA_W = 16,
  localparam int unsigned ACC_W = DATA_W + COEF_FRAC + GUARD
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic signed [DATA_W-1:0] x,
  output logic signed [ACC_W-1:0]  y
);

  logic signed [ACC_W-1:0] m [3];
  logic signed [ACC_W-1:0] p [NTAPS];

  hcse_mb #(.DATA_W(DATA_W)) u_mb (.x(x), .m(m));

  // Share the products between symmetric taps: h(5-k) = h(k).
  always_comb
    for (int k = 0; k < NTAPS; k++)
      p[k] = (k < NTAPS/2) ? m[k] : m[NTAPS-1-k];

  sa_chain #(.NTAPS(NTAPS), .ACC_W(ACC_W), .SUB_MASK('0)) u_sa (
    .clk(clk), .rst_n(rst_n), .en(en), .p(p), .y(y)
  );

endmodule
