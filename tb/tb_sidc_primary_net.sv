// tb_sidc_primary_net: drives the primary computation network of the default filter
// with corner and random 12-bit samples and checks each primary product against
// constant * sample computed with the built-in multiplication.
module tb_sidc_primary_net;
  import sidc_pkg::*;
  localparam int PW = DATA_W + COEF_W - 1;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [PW-1:0] x;
  logic [EX1_NPRIM-1:0][PW-1:0] prod;

  sidc_primary_net dut (.x(x), .prod(prod));

  task automatic apply(input logic signed [DATA_W-1:0] s);
    longint want;
    x = PW'(s);
    @(posedge clk);
    for (int k = 0; k < EX1_NPRIM; k++) begin
      want = longint'(s) * longint'(EX1_PRIM[k]);
      checks++;
      if (longint'($signed(prod[k])) != want) begin
        failures++;
        $display("FAIL prim %0d (K=%0d) x=%0d: got %0d, want %0d", k, EX1_PRIM[k], s,
                 $signed(prod[k]), want);
      end
    end
  endtask

  initial begin
    apply('0);
    apply(12'sd1);
    apply(-12'sd1);
    apply(-12'sd2048);
    apply(12'sd2047);
    for (int i = 0; i < 2000; i++) apply(DATA_W'($urandom));
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
