// sidc_fir_case: one filter-size case for tb_sidc_fir_examples.
//
// Builds, at elaboration, a symmetric coefficient set of TAPS taps from a linear
// congruential generator (12-bit signed-magnitude, random signs, some repeated
// magnitudes) and a valid SIDC graph for it: node 0 is the only root, and node k
// reuses node k-1 shifted by the largest L with 2^L*|c_{k-1}| <= |c_k|, adding the
// non-negative color |c_k| - 2^L*|c_{k-1}|; every fifth node instead shifts the
// parent past |c_k| and subtracts a color, and a repeated magnitude needs no color. It
// then streams NSAMP random samples with idle cycles through sidc_fir and compares
// every output with the direct convolution of the signed coefficients.
module sidc_fir_case
  import sidc_pkg::*;
#(
  parameter int TAPS  = 81,
  parameter int SEED  = 1,
  parameter int NSAMP = 400
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_shift,
  output int   n_psub
);
  localparam int UNIQ = (TAPS + 1) / 2;
  localparam int YW   = DATA_W + COEF_W - 1 + $clog2(TAPS);

  function automatic logic [UNIQ-1:0][COEF_W-1:0] gen_coef();
    logic [UNIQ-1:0][COEF_W-1:0] r;
    int unsigned s;
    s = 32'(SEED) * 32'd2654435761 + 32'd12345;
    for (int u = 0; u < UNIQ; u++) begin
      s = s * 32'd1664525 + 32'd1013904223;
      r[u] = {s[31], s[27:17]};
      if (u > 0 && u % 7 == 3) r[u][COEF_W-2:0] = r[u-1][COEF_W-2:0];
    end
    return r;
  endfunction
  localparam logic [UNIQ-1:0][COEF_W-1:0] COEF = gen_coef();

  function automatic int mag(input int u);
    return int'(COEF[u][COEF_W-2:0]);
  endfunction

  // Shift chosen for node k (k >= 1).
  function automatic int pick_shift(input int k);
    int l;
    l = 0;
    if (mag(k - 1) != 0) begin
      if (k % 5 == 0) begin
        while (l < 12 && (mag(k - 1) << l) <= mag(k)) l++;   // parent exceeds |c_k|
      end else begin
        while (l < 12 && (mag(k - 1) << (l + 1)) <= mag(k)) l++;
      end
    end
    return l;
  endfunction

  function automatic logic [UNIQ-1:0][PRIM_W-1:0] gen_prim();
    logic [UNIQ-1:0][PRIM_W-1:0] r;
    longint d;
    r[0] = PRIM_W'(mag(0));
    for (int k = 1; k < UNIQ; k++) begin
      d = longint'(mag(k)) - (longint'(mag(k - 1)) <<< pick_shift(k));
      r[k] = PRIM_W'(d < 0 ? -d : d);
    end
    return r;
  endfunction
  localparam logic [UNIQ-1:0][PRIM_W-1:0] PRIM = gen_prim();

  function automatic sidc_node_t [UNIQ-1:0] gen_nodes();
    sidc_node_t [UNIQ-1:0] r;
    longint d;
    r[0] = '{coef: 8'd0, is_root: 1'b1, parent: 8'd0, shift: 4'd0, parent_neg: 1'b0,
             has_color: 1'b1, prim: 8'd0, color_neg: 1'b0};
    for (int k = 1; k < UNIQ; k++) begin
      d = longint'(mag(k)) - (longint'(mag(k - 1)) <<< pick_shift(k));
      // |c_k| = d + (P_{k-1} << L): a negative d becomes a subtracted color.
      r[k] = '{coef: 8'(k), is_root: 1'b0, parent: 8'(k - 1), shift: 4'(pick_shift(k)),
               parent_neg: 1'b0, has_color: d != 0, prim: 8'(k), color_neg: d < 0};
    end
    return r;
  endfunction
  localparam sidc_node_t [UNIQ-1:0] NODES = gen_nodes();

  logic rst_n, in_valid, out_valid;
  logic [DATA_W-1:0] x_in;
  logic [YW-1:0] y_out;

  sidc_fir #(
    .TAPS(TAPS), .NPRIM(UNIQ), .COEF(COEF), .PRIM(PRIM), .NODES(NODES)
  ) dut (
    .clk(clk), .rst_n(rst_n), .x_in(x_in), .in_valid(in_valid),
    .y_out(y_out), .out_valid(out_valid)
  );

  function automatic longint coef(input int i);
    int u;
    u = (i < TAPS - 1 - i) ? i : TAPS - 1 - i;
    return COEF[u][COEF_W-1] ? -longint'(mag(u)) : longint'(mag(u));
  endfunction

  longint hist [TAPS];
  longint want [$];

  initial begin
    longint y;
    done = 1'b0; checks = 0; failures = 0; n_shift = 0; n_psub = 0;
    for (int k = 1; k < UNIQ; k++) begin
      if (NODES[k].shift != 0) n_shift++;
      if (NODES[k].color_neg) n_psub++;
    end
    for (int i = 0; i < TAPS; i++) hist[i] = 0;
    rst_n = 1'b0; in_valid = 1'b0; x_in = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < NSAMP; n++) begin
      in_valid = ($urandom_range(0, 4) != 0);
      x_in = (n % 50 < 3) ? 12'h800 : DATA_W'($urandom);
      if (in_valid) begin
        for (int i = TAPS - 1; i > 0; i--) hist[i] = hist[i-1];
        hist[0] = longint'($signed(x_in));
        y = 0;
        for (int i = 0; i < TAPS; i++) y += coef(i) * hist[i];
        want.push_back(y);
      end
      @(posedge clk);
      #1;
      if (out_valid) begin
        checks++;
        if (want.size() == 0 || longint'($signed(y_out)) != want.pop_front()) begin
          failures++;
          $display("FAIL TAPS=%0d sample %0d: y=%0d", TAPS, n, $signed(y_out));
        end
      end
    end
    in_valid = 1'b0;
    repeat (3) begin
      @(posedge clk);
      #1;
      if (out_valid) begin
        checks++;
        if (want.size() == 0 || longint'($signed(y_out)) != want.pop_front()) failures++;
      end
    end
    checks++;
    if (want.size() != 0) failures++;
    done = 1'b1;
  end
endmodule
