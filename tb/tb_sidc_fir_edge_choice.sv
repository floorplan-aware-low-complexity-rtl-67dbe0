// tb_sidc_fir_edge_choice: the default filter built from two different SIDC graphs.
//
// In the default graph several coefficients could reuse a different earlier product
// at the same cost, because the color they would need is computed anyway. This test
// moves three nodes to such alternative incoming edges:
//   c5  = 164  = 4*c3 - 4      (default: 8*c2 + 4)
//   c7  = 76   = 2*c3 - 8      (default: 4*c2 - 4)
//   c16 = 1775 = 8*c6 + 511    (default: c17 - 272)
// The adder count is unchanged; only which product feeds which adder (the wiring)
// differs, which is the freedom a placement-driven edge selection uses. Both filters
// get the same random stream with idle cycles; their outputs must equal each other
// and the direct convolution on every valid output.
module tb_sidc_fir_edge_choice;
  import sidc_pkg::*;
  localparam int TAPS = EX1_TAPS;
  localparam int YW   = DATA_W + COEF_W - 1 + $clog2(TAPS);

  function automatic sidc_node_t [EX1_UNIQ-1:0] alt_nodes();
    sidc_node_t [EX1_UNIQ-1:0] r;
    r = EX1_NODES;
    r[3]  = '{coef: 8'd5,  is_root: 1'b0, parent: 8'd2, shift: 4'd2, parent_neg: 1'b0,
              has_color: 1'b1, prim: 8'd3,  color_neg: 1'b1};
    r[5]  = '{coef: 8'd7,  is_root: 1'b0, parent: 8'd2, shift: 4'd1, parent_neg: 1'b0,
              has_color: 1'b1, prim: 8'd10, color_neg: 1'b1};
    r[13] = '{coef: 8'd16, is_root: 1'b0, parent: 8'd4, shift: 4'd3, parent_neg: 1'b0,
              has_color: 1'b1, prim: 8'd11, color_neg: 1'b0};
    return r;
  endfunction
  localparam sidc_node_t [EX1_UNIQ-1:0] ALT = alt_nodes();

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_moved = 0;
  logic rst_n, in_valid, ov_a, ov_b;
  logic [DATA_W-1:0] x_in;
  logic [YW-1:0] y_a, y_b;

  sidc_fir dut_a (.clk(clk), .rst_n(rst_n), .x_in(x_in), .in_valid(in_valid),
                  .y_out(y_a), .out_valid(ov_a));
  sidc_fir #(.NODES(ALT)) dut_b (.clk(clk), .rst_n(rst_n), .x_in(x_in), .in_valid(in_valid),
                  .y_out(y_b), .out_valid(ov_b));

  function automatic longint coef(input int i);
    int u;
    u = (i < TAPS - 1 - i) ? i : TAPS - 1 - i;
    return EX1_COEF[u][COEF_W-1] ? -longint'(EX1_COEF[u][COEF_W-2:0])
                                 :  longint'(EX1_COEF[u][COEF_W-2:0]);
  endfunction

  longint hist [TAPS];
  longint want [$];

  initial begin
    longint y;
    for (int k = 0; k < EX1_UNIQ; k++) if (ALT[k] != EX1_NODES[k]) n_moved++;
    for (int i = 0; i < TAPS; i++) hist[i] = 0;
    rst_n = 1'b0; in_valid = 1'b0; x_in = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 1500; n++) begin
      in_valid = ($urandom_range(0, 4) != 0);
      x_in = (n % 40 < 2) ? 12'h800 : DATA_W'($urandom);
      if (in_valid) begin
        for (int i = TAPS - 1; i > 0; i--) hist[i] = hist[i-1];
        hist[0] = longint'($signed(x_in));
        y = 0;
        for (int i = 0; i < TAPS; i++) y += coef(i) * hist[i];
        want.push_back(y);
      end
      @(posedge clk);
      #1;
      checks++;
      if (ov_a !== ov_b || y_a !== y_b) begin
        failures++;
        $display("FAIL sample %0d: the two graphs disagree (%0d vs %0d)", n,
                 $signed(y_a), $signed(y_b));
      end
      if (ov_b) begin
        checks++;
        if (want.size() == 0 || longint'($signed(y_b)) != want.pop_front()) begin
          failures++;
          $display("FAIL sample %0d: y=%0d", n, $signed(y_b));
        end
      end
    end
    $display("nodes on a different incoming edge: %0d", n_moved);
    checks++;
    if (n_moved != 3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end
endmodule
