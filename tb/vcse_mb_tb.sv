// vcse_mb_tb: self-checking test of the VCSE multiplier block.
//
// Feeds random and full-scale samples with a randomly gated enable and
// checks the five product groups against their closed forms, computed by
// integer multiplication from the present sample x and the last sample the
// block accepted (xd):
//   t[0] = H0 x + (H1 + 2^12) xd      t[1] = 2^12 x
//   t[2] = H2 (x + xd)                t[3] = 0
//   t[4] = H1 x + (H0 - 2^10) xd      t[5] = 2^10 x
// (H0, H1, H2 are the coefficients scaled by 2^16.) Reset must clear xd.
module vcse_mb_tb;
  import cse_pkg::*;

  localparam int unsigned DATA_W = 16;
  localparam int unsigned ACC_W  = DATA_W + COEF_FRAC + GUARD;

  logic clk = 1'b0, rst_n = 1'b1, en = 1'b0;
  logic signed [DATA_W-1:0] x = '0;
  logic signed [ACC_W-1:0]  t [NTAPS];

  int checks = 0, failures = 0;
  longint xd = 0;   // model of the registered previous sample

  vcse_mb #(.DATA_W(DATA_W)) dut (.clk(clk), .rst_n(rst_n), .en(en), .x(x), .t(t));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_now();
    longint xv;
    longint e [NTAPS];
    xv = longint'(x);
    e[0] = H_INT[0] * xv + (H_INT[1] + 4096) * xd;
    e[1] = 4096 * xv;
    e[2] = H_INT[2] * (xv + xd);
    e[3] = 0;
    e[4] = H_INT[1] * xv + (H_INT[0] - 1024) * xd;
    e[5] = 1024 * xv;
    for (int k = 0; k < NTAPS; k++) begin
      checks++;
      if (longint'(t[k]) != e[k]) begin
        failures++;
        if (failures < 10)
          $display("x=%0d xd=%0d t[%0d]=%0d expected %0d", xv, xd, k, t[k], e[k]);
      end
    end
  endtask

  task automatic step(input logic signed [DATA_W-1:0] v, input logic e_n);
    @(negedge clk);
    x  = v;
    en = e_n;
    #1 check_now();
    @(posedge clk);
    if (en) xd = longint'(v);
  endtask

  initial begin
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    step(16'sd32767, 1'b1);
    step(16'sd32767, 1'b1);
    step(-16'sd32768, 1'b1);
    step(-16'sd32768, 1'b1);
    for (int i = 0; i < 3000; i++) step(DATA_W'($urandom), ($urandom % 4) != 0);
    // Reset clears the stored sample.
    @(negedge clk);
    en    = 1'b0;
    rst_n = 1'b0;
    xd = 0;
    #1 rst_n = 1'b1;
    step(16'sd1234, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
