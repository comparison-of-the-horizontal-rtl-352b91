// vcse_fir: 6-tap linear-phase FIR filter realised with vertical common
// subexpression elimination.
//
// Same filter as hcse_fir, y(n) = sum_{k=0..5} h(k) x(n-k), built from
// subexpressions that span adjacent coefficients. The multiplier block
// (vcse_mb) holds x(n-1) itself and delivers one product group per delay;
// the transposed-form chain (sa_chain) delays and sums them, subtracting
// the lone -2^-4 x term at delay 1 and adding the lone 2^-6 x term at
// delay 5 directly. Delay 3 receives no product of its own, as the x4
// subexpression at delay 2 already covers h(3). Cost: 13 multiplier-block
// adders (five adder-steps deep), five structural adders (one of them adds
// zero and vanishes in synthesis), five delay registers and the extra
// input register inside the multiplier block.
//
// Interface and timing are those of hcse_fir: x taken on the rising edge
// of clk when en is high, y signed ACC_W bits scaled by 2^16, exact and
// combinational in the present x, asynchronous active-low rst_n.
//
// The structure follows the published VCSE filter; enable, reset and
// widths are this design's choice.
module vcse_fir
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

  logic signed [ACC_W-1:0] t [NTAPS];

  vcse_mb #(.DATA_W(DATA_W)) u_mb (
    .clk(clk), .rst_n(rst_n), .en(en), .x(x), .t(t)
  );

  sa_chain #(.NTAPS(NTAPS), .ACC_W(ACC_W), .SUB_MASK(VCSE_SUB_MASK)) u_sa (
    .clk(clk), .rst_n(rst_n), .en(en), .p(t), .y(y)
  );

endmodule
