// tb_bk_adder: self-checking test of the Brent-Kung adder at two widths, 16 bits
// (a power of two) and 23 bits (not one, the product width of the filter). Corner
// operands (all ones, carry chains through every bit, carry-in) are followed by random
// operands; sum and carry-out are compared with the built-in addition.
module tb_bk_adder;
  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [15:0] a16, b16, s16; logic ci16, co16;
  logic [22:0] a23, b23, s23; logic ci23, co23;

  bk_adder #(.W(16)) dut16 (.a(a16), .b(b16), .cin(ci16), .sum(s16), .cout(co16));
  bk_adder #(.W(23)) dut23 (.a(a23), .b(b23), .cin(ci23), .sum(s23), .cout(co23));

  task automatic apply(input logic [22:0] a, input logic [22:0] b, input logic c);
    logic [16:0] r16;
    logic [23:0] r23;
    a16 = a[15:0]; b16 = b[15:0]; ci16 = c;
    a23 = a;       b23 = b;       ci23 = c;
    @(posedge clk);
    r16 = {1'b0, a[15:0]} + {1'b0, b[15:0]} + 17'(c);
    r23 = {1'b0, a} + {1'b0, b} + 24'(c);
    checks += 2;
    if ({co16, s16} !== r16) begin
      failures++;
      $display("FAIL W=16 %h + %h + %0d: got %h, want %h", a[15:0], b[15:0], c, {co16, s16}, r16);
    end
    if ({co23, s23} !== r23) begin
      failures++;
      $display("FAIL W=23 %h + %h + %0d: got %h, want %h", a, b, c, {co23, s23}, r23);
    end
  endtask

  initial begin
    apply('0, '0, 1'b0);
    apply('0, '0, 1'b1);
    apply('1, 23'd1, 1'b0);
    apply('1, '0, 1'b1);
    apply('1, '1, 1'b1);
    apply(23'h2aaaaa, 23'h155555, 1'b1);
    for (int i = 0; i < 23; i++) apply(23'(1) << i, (23'(1) << i) - 1, 1'b1);
    for (int i = 0; i < 4000; i++) apply(23'($urandom), 23'($urandom), 1'($urandom));
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
