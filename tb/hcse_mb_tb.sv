// hcse_mb_tb: self-checking test of the HCSE multiplier block.
//
// Applies full-scale extremes, small values and random samples to hcse_mb
// and compares each of its three products with the plain integer product
// H_INT[k] * x (h(k) * x scaled by 2^16), computed here by multiplication.
// The coefficient integers come from summing the CSD digits of each
// coefficient, independently of the subexpression decomposition used
// inside the block.
module hcse_mb_tb;
  import cse_pkg::*;

  localparam int unsigned DATA_W = 16;
  localparam int unsigned ACC_W  = DATA_W + COEF_FRAC + GUARD;

  logic signed [DATA_W-1:0] x;
  logic signed [ACC_W-1:0]  m [3];

  int checks = 0, failures = 0;

  hcse_mb #(.DATA_W(DATA_W)) dut (.x(x), .m(m));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic signed [DATA_W-1:0] v);
    longint exp_v;
    x = v;
    #1;
    for (int k = 0; k < 3; k++) begin
      exp_v = longint'(H_INT[k]) * longint'(v);
      checks++;
      if (longint'(m[k]) != exp_v) begin
        failures++;
        if (failures < 10)
          $display("x=%0d m[%0d]=%0d expected %0d", v, k, m[k], exp_v);
      end
    end
  endtask

  initial begin
    apply(16'sd0);
    apply(16'sd1);
    apply(-16'sd1);
    apply(16'sd32767);
    apply(-16'sd32768);
    for (int i = 0; i < 2000; i++) apply(DATA_W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
