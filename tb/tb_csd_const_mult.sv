// tb_csd_const_mult: checks the shift-and-add constant multiplier for several
// constants (zero, powers of two, runs of ones that CSD recodes with negative digits,
// and primary constants of the default filter) against the built-in product, modulo
// 2^W, for corner and random signed inputs.
module tb_csd_const_mult;
  localparam int W = 23;
  localparam int N = 10;
  localparam int unsigned KS [N] = '{0, 1, 8, 7, 2047, 2040, 273, 511, 114, 1365};

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [W-1:0] x;
  logic [W-1:0] y [N];

  for (genvar k = 0; k < N; k++) begin : g_dut
    csd_const_mult #(.W(W), .K(KS[k])) dut (.x(x), .y(y[k]));
  end

  task automatic apply(input logic [W-1:0] v);
    logic [W-1:0] want;
    x = v;
    @(posedge clk);
    for (int k = 0; k < N; k++) begin
      want = W'(longint'($signed(v)) * longint'(KS[k]));
      checks++;
      if (y[k] !== want) begin
        failures++;
        $display("FAIL K=%0d x=%0d: got %h, want %h", KS[k], $signed(v), y[k], want);
      end
    end
  endtask

  initial begin
    apply('0);
    apply(W'(1));
    apply(W'(-1));
    apply(W'(-2048));
    apply(W'(2047));
    for (int i = 0; i < 2000; i++) apply(W'($signed(12'($urandom))));
    for (int i = 0; i < 500; i++) apply(W'($urandom));
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
