// sa_chain_tb: self-checking test of the transposed-form structural adder
// chain.
//
// Drives random product vectors into a six-stage chain with a mixed
// subtract mask (including the last stage, which is then negated), gates
// the enable at random and resets once mid-run. Each cycle the output is
// compared with a direct model, y(n) = sum_k s_k p_k(n-k) over the last
// accepted product vectors, where s_k is -1 for subtracted taps.
module sa_chain_tb;

  localparam int unsigned NTAPS = 6;
  localparam int unsigned ACC_W = 34;
  localparam logic [NTAPS-1:0] MASK = 6'b100010;

  logic clk = 1'b0, rst_n = 1'b1, en = 1'b0;
  logic signed [ACC_W-1:0] p [NTAPS];
  logic signed [ACC_W-1:0] y;

  int checks = 0, failures = 0;
  longint hist [NTAPS][NTAPS];   // hist[j][k]: p[k] accepted j samples ago (j >= 1)

  sa_chain #(.NTAPS(NTAPS), .ACC_W(ACC_W), .SUB_MASK(MASK)) dut (
    .clk(clk), .rst_n(rst_n), .en(en), .p(p), .y(y)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint sgn(input int k, input longint v);
    return MASK[k] ? -v : v;
  endfunction

  task automatic clear_hist();
    for (int j = 0; j < NTAPS; j++)
      for (int k = 0; k < NTAPS; k++) hist[j][k] = 0;
  endtask

  task automatic step(input logic e_n);
    longint e;
    @(negedge clk);
    en = e_n;
    for (int k = 0; k < NTAPS; k++)
      p[k] = ACC_W'(signed'(30'($urandom)));   // six of these cannot overflow
    #1;
    e = sgn(0, longint'(p[0]));
    for (int k = 1; k < NTAPS; k++) e += sgn(k, hist[k][k]);
    checks++;
    if (longint'(y) != e) begin
      failures++;
      if (failures < 10) $display("y=%0d expected %0d", y, e);
    end
    @(posedge clk);
    if (en) begin
      for (int j = NTAPS-1; j > 1; j--) hist[j] = hist[j-1];
      for (int k = 0; k < NTAPS; k++) hist[1][k] = longint'(p[k]);
    end
  endtask

  initial begin
    for (int k = 0; k < NTAPS; k++) p[k] = '0;
    clear_hist();
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 1500; i++) step(($urandom % 3) != 0);
    @(negedge clk);
    en    = 1'b0;
    rst_n = 1'b0;
    clear_hist();
    #1 rst_n = 1'b1;
    for (int i = 0; i < 1500; i++) step(($urandom % 3) != 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
