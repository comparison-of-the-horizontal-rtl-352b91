// vcse_fir_tb: self-checking test of the VCSE 6-tap FIR filter.
//
// Checks the impulse response against the six coefficients, then runs
// full-scale and random input with a randomly gated enable and a reset in
// the middle. Every cycle the output is compared with a direct-form model,
// y(n) = sum_k H_INT[k] x(n-k), computed by integer multiplication over the
// samples the filter has accepted. The output is combinational in the
// present sample, so the model includes x(n) with no latency.
module vcse_fir_tb;
  import cse_pkg::*;

  localparam int unsigned DATA_W = 16;
  localparam int unsigned ACC_W  = DATA_W + COEF_FRAC + GUARD;

  logic clk = 1'b0, rst_n = 1'b1, en = 1'b0;
  logic signed [DATA_W-1:0] x = '0;
  logic signed [ACC_W-1:0]  y;

  int checks = 0, failures = 0;
  longint hist [NTAPS];   // hist[k] = x(n-k) for k >= 1

  vcse_fir #(.DATA_W(DATA_W)) dut (.clk(clk), .rst_n(rst_n), .en(en), .x(x), .y(y));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic clear_hist();
    for (int k = 0; k < NTAPS; k++) hist[k] = 0;
  endtask

  task automatic step(input logic signed [DATA_W-1:0] v, input logic e_n);
    longint e;
    @(negedge clk);
    x  = v;
    en = e_n;
    #1;
    e = longint'(H_INT[0]) * longint'(v);
    for (int k = 1; k < NTAPS; k++) e += longint'(H_INT[k]) * hist[k];
    checks++;
    if (longint'(y) != e) begin
      failures++;
      if (failures < 10) $display("x=%0d y=%0d expected %0d", v, y, e);
    end
    @(posedge clk);
    if (en) begin
      for (int k = NTAPS-1; k > 1; k--) hist[k] = hist[k-1];
      hist[1] = longint'(v);
    end
  endtask

  initial begin
    clear_hist();
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // Impulse response: one output sample per coefficient.
    for (int k = 0; k < 8; k++) begin
      step((k == 0) ? 16'sd1 : 16'sd0, 1'b1);
      checks++;
      if (longint'(y) != ((k < NTAPS) ? longint'(H_INT[k]) : 0)) failures++;
    end
    // Full-scale runs of both signs.
    for (int i = 0; i < 8; i++) step(16'sd32767, 1'b1);
    for (int i = 0; i < 8; i++) step(-16'sd32768, 1'b1);
    for (int i = 0; i < 8; i++) step((i % 2) ? 16'sd32767 : -16'sd32768, 1'b1);
    for (int i = 0; i < 2000; i++) step(DATA_W'($urandom), ($urandom % 4) != 0);
    // Reset in the middle of a stream clears the delay line.
    @(negedge clk);
    en    = 1'b0;
    rst_n = 1'b0;
    clear_hist();
    #1 rst_n = 1'b1;
    for (int i = 0; i < 1000; i++) step(DATA_W'($urandom), ($urandom % 4) != 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
