// cse_fir_top: the two multiplierless realisations of the same 6-tap
// linear-phase FIR filter, side by side on one input.
//
// hcse_fir builds the coefficient products from subexpressions inside each
// coefficient (11 multiplier-block adders, three adder-steps deep);
// vcse_fir builds them from subexpressions across adjacent coefficients
// (13 adders, five adder-steps deep). Both compute exactly the same
// y(n) = sum h(k) x(n-k), so the two outputs are equal sample for sample
// and either can serve; the top carries both so that they can be compared
// in simulation and in synthesis.
//
// Interface: x is a signed DATA_W-bit sample taken on the rising edge of
// clk when en is high; y_hcse and y_vcse are signed outputs of
// DATA_W + 18 bits scaled by 2^16, exact and combinational in the present
// x; rst_n clears both filters asynchronously.
module cse_fir_top
  import cse_pkg::*;
#(
  parameter int unsigned DATA_W = 16,
  localparam int unsigned ACC_W = DATA_W + COEF_FRAC + GUARD
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic signed [DATA_W-1:0] x,
  output logic signed [ACC_W-1:0]  y_hcse,
  output logic signed [ACC_W-1:0]  y_vcse
);

  hcse_fir #(.DATA_W(DATA_W)) u_hcse (
    .clk(clk), .rst_n(rst_n), .en(en), .x(x), .y(y_hcse)
  );

  vcse_fir #(.DATA_W(DATA_W)) u_vcse (
    .clk(clk), .rst_n(rst_n), .en(en), .x(x), .y(y_vcse)
  );

endmodule
