// sa_chain: structural adders and delay stages of a transposed-form FIR
// filter.
//
// The multiplier block delivers, for every delay k = 0..NTAPS-1, the sum of
// the partial products that must reach the output k samples later. This
// chain delays and accumulates them:
//   d[NTAPS-1] <= +/-p[NTAPS-1]
//   d[k]       <= d[k+1] +/- p[k]      k = NTAPS-2 .. 1
//   y           = d[1]   +/- p[0]
// so y(n) = sum_k +/-p[k](n-k). There is one structural adder per delay
// stage (NTAPS-1 of them, five for six taps), and each one adds or, where
// SUB_MASK[k] is set, subtracts its product; a subtracted product at the
// last stage is negated.
//
// Interface: p[] are signed ACC_W-bit products, y the signed ACC_W-bit
// output. The delay registers advance on the rising edge of clk when en is
// high and are cleared by the asynchronous active-low rst_n. y is
// combinational in p[0], so the filter has no latency beyond its taps.
//
// The transposed structure with inter-tap structural adders follows the
// published filter figures; the subtract mask, enable and reset are this
// design's choice.
module sa_chain #(
  parameter int unsigned      NTAPS    = 6,
  parameter int unsigned      ACC_W    = 34,
  parameter logic [NTAPS-1:0] SUB_MASK = '0
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic signed [ACC_W-1:0] p [NTAPS],
  output logic signed [ACC_W-1:0] y
);

  typedef logic signed [ACC_W-1:0] acc_t;

  acc_t d   [1:NTAPS-1];   // delay-stage registers
  acc_t sum [0:NTAPS-1];   // input of each delay stage (sum[0] is y)

  always_comb begin
    sum[NTAPS-1] = SUB_MASK[NTAPS-1] ? -p[NTAPS-1] : p[NTAPS-1];
    for (int k = NTAPS-2; k >= 0; k--)
      sum[k] = SUB_MASK[k] ? d[k+1] - p[k] : d[k+1] + p[k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 1; k < NTAPS; k++) d[k] <= '0;
    end else if (en) begin
      for (int k = 1; k < NTAPS; k++) d[k] <= sum[k];
    end
  end

  assign y = sum[0];

endmodule
