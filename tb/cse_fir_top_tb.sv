// cse_fir_top_tb: end-to-end test of both filter realisations at the
// default 16-bit sample width.
//
// One stimulus drives the HCSE and the VCSE filter together. Every cycle
// both outputs are compared with a direct-form model,
// y(n) = sum_k H_INT[k] x(n-k), and with each other. The run covers, and
// counts, each situation the design has to handle:
//   impulse  - a unit impulse walks through all six taps, so every shared
//              or mirrored product is seen on its own;
//   vcs_diff - samples with x(n) != x(n-1), where the x5 = x1 - x1[-1]
//              subexpression is non-zero and the VCSE mirrored group needs
//              its sign-swapped reuse of E9;
//   fullscale- full-scale samples of both signs, which exercise the
//              integer headroom of every adder;
//   stall    - cycles with en low, when the delay line must hold;
//   reset    - a reset in the middle of a stream.
// A situation that never occurs is counted as a failure. The output is
// combinational in the present sample, so the expected latency is zero
// cycles, checked by the impulse response.
module cse_fir_top_tb;
  import cse_pkg::*;

  localparam int unsigned DATA_W = 16;
  localparam int unsigned ACC_W  = DATA_W + COEF_FRAC + GUARD;

  logic clk = 1'b0, rst_n = 1'b1, en = 1'b0;
  logic signed [DATA_W-1:0] x = '0;
  logic signed [ACC_W-1:0]  y_hcse, y_vcse;

  int checks = 0, failures = 0;
  int n_impulse = 0, n_vcs_diff = 0, n_fullscale = 0, n_stall = 0, n_reset = 0;
  longint hist [NTAPS];   // hist[k] = x(n-k) for k >= 1

  cse_fir_top dut (
    .clk(clk), .rst_n(rst_n), .en(en), .x(x), .y_hcse(y_hcse), .y_vcse(y_vcse)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic clear_hist();
    for (int k = 0; k < NTAPS; k++) hist[k] = 0;
  endtask

  task automatic expect_eq(input string what, input longint got, input longint exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", what, got, exp_v);
    end
  endtask

  task automatic step(input logic signed [DATA_W-1:0] v, input logic e_n);
    longint e;
    @(negedge clk);
    x  = v;
    en = e_n;
    #1;
    e = longint'(H_INT[0]) * longint'(v);
    for (int k = 1; k < NTAPS; k++) e += longint'(H_INT[k]) * hist[k];
    expect_eq("y_hcse", longint'(y_hcse), e);
    expect_eq("y_vcse", longint'(y_vcse), e);
    expect_eq("y_hcse vs y_vcse", longint'(y_hcse), longint'(y_vcse));
    if (!e_n) n_stall++;
    if (e_n && longint'(v) != hist[1]) n_vcs_diff++;
    if (e_n && (v == 16'sh7fff || v == -16'sh8000)) n_fullscale++;
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

    // Impulse response, zero latency: output k equals h(k).
    for (int k = 0; k < NTAPS + 2; k++) begin
      step((k == 0) ? 16'sd1 : 16'sd0, 1'b1);
      expect_eq("impulse", longint'(y_hcse), (k < NTAPS) ? longint'(H_INT[k]) : 0);
      if (k < NTAPS && longint'(y_vcse) == longint'(H_INT[k])) n_impulse++;
    end
    // Impulse held by a stall halfway through the delay line.
    step(-16'sd1, 1'b1);
    step(16'sd0, 1'b1);
    step(16'sd0, 1'b0);
    step(16'sd0, 1'b0);
    expect_eq("stalled impulse", longint'(y_vcse), -longint'(H_INT[2]));

    // Full-scale runs and alternation.
    for (int i = 0; i < 8; i++) step(16'sd32767, 1'b1);
    for (int i = 0; i < 8; i++) step(-16'sd32768, 1'b1);
    for (int i = 0; i < 12; i++) step((i % 2) ? 16'sd32767 : -16'sd32768, 1'b1);

    // Random stream with random stalls.
    for (int i = 0; i < 5000; i++) step(DATA_W'($urandom), ($urandom % 4) != 0);

    // Reset in the middle of a stream.
    @(negedge clk);
    en    = 1'b0;
    rst_n = 1'b0;
    clear_hist();
    n_reset++;
    #1 rst_n = 1'b1;
    #1 expect_eq("after reset", longint'(y_hcse), longint'(H_INT[0]) * longint'(x));
    for (int i = 0; i < 3000; i++) step(DATA_W'($urandom), ($urandom % 4) != 0);

    $display("impulse=%0d vcs_diff=%0d fullscale=%0d stall=%0d reset=%0d",
             n_impulse, n_vcs_diff, n_fullscale, n_stall, n_reset);
    if (n_impulse != NTAPS) failures++;
    if (n_vcs_diff == 0)    failures++;
    if (n_fullscale == 0)   failures++;
    if (n_stall == 0)       failures++;
    if (n_reset == 0)       failures++;
    checks += 5;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
