// tb_sidc_secondary_net: feeds the secondary adder network of the default filter with
// exact primary products (constant * sample, computed here) and checks that every
// unique coefficient product equals |c_j| * sample, with |c_j| read from the
// coefficient words, not from the graph. Counts root, reuse-with-add and
// reuse-with-subtract nodes so that each kind is known to be exercised.
module tb_sidc_secondary_net;
  import sidc_pkg::*;
  localparam int PW = DATA_W + COEF_W - 1;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [EX1_NPRIM-1:0][PW-1:0] prim;
  logic [EX1_UNIQ-1:0][PW-1:0]  prod;

  sidc_secondary_net dut (.prim(prim), .prod(prod));

  task automatic apply(input logic signed [DATA_W-1:0] s);
    longint want;
    for (int k = 0; k < EX1_NPRIM; k++) prim[k] = PW'(longint'(s) * longint'(EX1_PRIM[k]));
    @(posedge clk);
    for (int j = 0; j < EX1_UNIQ; j++) begin
      want = longint'(s) * longint'(EX1_COEF[j][COEF_W-2:0]);
      checks++;
      if (longint'($signed(prod[j])) != want) begin
        failures++;
        $display("FAIL coef %0d x=%0d: got %0d, want %0d", j, s, $signed(prod[j]), want);
      end
    end
  endtask

  initial begin
    int n_root, n_add, n_sub;
    n_root = 0; n_add = 0; n_sub = 0;
    for (int k = 0; k < EX1_UNIQ; k++) begin
      if (EX1_NODES[k].is_root) n_root++;
      else if (EX1_NODES[k].color_neg || EX1_NODES[k].parent_neg) n_sub++;
      else n_add++;
    end
    $display("graph: %0d roots, %0d reuse-add, %0d reuse-subtract", n_root, n_add, n_sub);
    checks++;
    if (n_root == 0 || n_add == 0 || n_sub == 0) failures++;
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
