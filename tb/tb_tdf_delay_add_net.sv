// tb_tdf_delay_add_net: drives the delay-and-add network of the default 36-tap filter
// with exact coefficient-magnitude products of a sample stream (computed here) and
// compares the output after every enabled edge with the direct convolution
// y(n) = sum_i c_i x(n-i) of the signed coefficients. Idle cycles (en = 0) are mixed
// in; the output must hold through them. Starts with an impulse and a step.
module tb_tdf_delay_add_net;
  import sidc_pkg::*;
  localparam int TAPS = EX1_TAPS;
  localparam int PW   = DATA_W + COEF_W - 1;
  localparam int YW   = PW + $clog2(TAPS);

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, holds = 0;
  logic rst_n, en;
  logic [EX1_UNIQ-1:0][PW-1:0] prod;
  logic [YW-1:0] y;
  longint hist [TAPS];

  tdf_delay_add_net dut (.clk(clk), .rst_n(rst_n), .en(en), .prod(prod), .y(y));

  function automatic longint coef(input int i);
    int u;
    u = (i < TAPS - 1 - i) ? i : TAPS - 1 - i;
    return EX1_COEF[u][COEF_W-1] ? -longint'(EX1_COEF[u][COEF_W-2:0])
                                 :  longint'(EX1_COEF[u][COEF_W-2:0]);
  endfunction

  task automatic push(input logic signed [DATA_W-1:0] s);
    longint want;
    for (int i = TAPS - 1; i > 0; i--) hist[i] = hist[i-1];
    hist[0] = longint'(s);
    for (int u = 0; u < EX1_UNIQ; u++)
      prod[u] = PW'(longint'(s) * longint'(EX1_COEF[u][COEF_W-2:0]));
    en = 1'b1;
    @(posedge clk);
    #1;
    en = 1'b0;
    want = 0;
    for (int i = 0; i < TAPS; i++) want += coef(i) * hist[i];
    checks++;
    if (longint'($signed(y)) != want) begin
      failures++;
      $display("FAIL y=%0d want %0d", $signed(y), want);
    end
  endtask

  task automatic idle(input int n);
    logic [YW-1:0] y0;
    y0 = y;
    for (int u = 0; u < EX1_UNIQ; u++) prod[u] = PW'($urandom);
    repeat (n) @(posedge clk);
    #1;
    checks++;
    holds++;
    if (y !== y0) begin
      failures++;
      $display("FAIL output changed while idle");
    end
  endtask

  initial begin
    for (int i = 0; i < TAPS; i++) hist[i] = 0;
    en = 1'b0; prod = '0; rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    push(12'sd1);
    for (int i = 0; i < TAPS; i++) push('0);
    for (int i = 0; i < TAPS + 2; i++) push(12'sd2047);
    for (int i = 0; i < TAPS + 2; i++) push(-12'sd2048);
    for (int i = 0; i < 1500; i++) begin
      push(DATA_W'($urandom));
      if ($urandom_range(0, 5) == 0) idle($urandom_range(1, 3));
    end
    checks++;
    if (holds == 0) failures++;
    $display("idle periods: %0d", holds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
