// sidc_pkg: shared types and the default coefficient set of the SIDC FIR filter.
//
// An SIDC (shift-inclusive differential coefficient) filter computes the product of
// each coefficient with the input sample either directly (a "root" vertex) or from an
// already computed product: |c_j|*x = +/-(D*x) +/- ((|c_i|*x) << L), where D is a
// "color" D = |c_j| -/+ 2^L*|c_i|. The root constants and the colors are the
// "primary" constants; they are multiplied by x with shift-and-add only. The graph
// of selected incoming edges is given to the RTL as an array of sidc_node_t, listed in
// computation order (a node's parent always has a smaller index).
//
// The default configuration (EX1_*) is a 36-tap (order 35) Parks-McClellan low-pass
// filter, passband edge 0.15 and stopband edge 0.25 (normalised to the Nyquist rate),
// the smallest filter of the SIDC reference set (EX1). The coefficient values are this
// design's own: h = remez(36, [0, 0.075, 0.125, 0.5], [1, 0], fs = 1), scaled uniformly
// so that the largest magnitude is 2047, rounded, and stored as 12-bit
// signed-magnitude words (bit 11 = sign). The SIDC graph for them was chosen greedily:
// repeatedly add the not-yet-computed coefficient that is cheapest to form, either as
// a root (cost = canonical-signed-digit adders) or from a computed coefficient over
// shifts L = 0..12 (cost = one combining adder plus the CSD adders of a new color;
// reused colors and powers of two are free), ties broken by the smaller adder depth.
// It needs 10 primary and 14 secondary adders against 47 for plain CSD multipliers.
package sidc_pkg;

  // Coefficient wordlength: sign bit plus magnitude (signed-magnitude).
  localparam int COEF_W = 12;
  // Input sample width (two's complement).
  localparam int DATA_W = 12;
  // Width of a primary constant (root magnitude or color).
  localparam int PRIM_W = 24;

  // One vertex of the SIDC graph, with its selected incoming edge.
  typedef struct packed {
    logic [7:0] coef;        // index of the unique coefficient this node produces
    logic       is_root;     // 1: product taken directly from the primary network
    logic [7:0] parent;      // node index of the reused product (non-root)
    logic [3:0] shift;       // L: the parent product is shifted left by L
    logic       parent_neg;  // subtract the shifted parent product instead of adding it
    logic       has_color;   // 0: color is zero, node is the shifted parent product
    logic [7:0] prim;        // primary product used (root constant or color)
    logic       color_neg;   // subtract the color product instead of adding it
  } sidc_node_t;

  // ---------------- default configuration: EX1 ----------------
  localparam int EX1_TAPS = 36;
  localparam int EX1_UNIQ = (EX1_TAPS + 1) / 2;
  localparam int EX1_NPRIM = 13;

  // Unique coefficients c_0..c_17 (c_{35-i} = c_i), signed-magnitude. In decimal:
  // -102, -51, -20, 42, 114, 164, 158, 76, -73, -243, -363, -355, -165, 216, 739,
  // 1301, 1775, 2047 (the list below starts with c_17).
  localparam logic [EX1_UNIQ-1:0][COEF_W-1:0] EX1_COEF = '{
    12'h7ff, 12'h6ef, 12'h515, 12'h2e3, 12'h0d8, 12'h8a5, 12'h963, 12'h96b, 12'h8f3, 12'h849, 12'h04c, 12'h09e, 12'h0a4, 12'h072, 12'h02a, 12'h814, 12'h833, 12'h866
  };

  // Sign bits of the unique coefficients.
  function automatic logic [EX1_UNIQ-1:0] ex1_neg();
    logic [EX1_UNIQ-1:0] r;
    for (int u = 0; u < EX1_UNIQ; u++) r[u] = EX1_COEF[u][COEF_W-1];
    return r;
  endfunction
  localparam logic [EX1_UNIQ-1:0] EX1_NEG = ex1_neg();

  // Primary constants: entries 0, 1, 6, 7 are roots (20, 2047, 114, 73), the
  // rest are colors.
  localparam logic [EX1_NPRIM-1:0][PRIM_W-1:0] EX1_PRIM = '{
    24'd2040, 24'd511, 24'd8, 24'd513, 24'd272, 24'd73, 24'd114, 24'd1, 24'd256, 24'd4, 24'd2, 24'd2047, 24'd20
  };

  // SIDC graph in computation order (node 17 first in this list, node 0 last).
  localparam sidc_node_t [EX1_UNIQ-1:0] EX1_NODES = '{
    '{coef: 8'd15, is_root: 1'b0, parent: 8'd16, shift: 4'd0, parent_neg: 1'b1, has_color: 1'b1, prim: 8'd12, color_neg: 1'b0},
    '{coef: 8'd14, is_root: 1'b0, parent: 8'd8, shift: 4'd1, parent_neg: 1'b0, has_color: 1'b1, prim: 8'd11, color_neg: 1'b0},
    '{coef: 8'd10, is_root: 1'b0, parent: 8'd14, shift: 4'd0, parent_neg: 1'b0, has_color: 1'b1, prim: 8'd10, color_neg: 1'b0},
    '{coef: 8'd11, is_root: 1'b0, parent: 8'd4, shift: 4'd0, parent_neg: 1'b1, has_color: 1'b1, prim: 8'd9, color_neg: 1'b0},
    '{coef: 8'd16, is_root: 1'b0, parent: 8'd1, shift: 4'd0, parent_neg: 1'b0, has_color: 1'b1, prim: 8'd8, color_neg: 1'b1},
    '{coef: 8'd9, is_root: 1'b0, parent: 8'd4, shift: 4'd1, parent_neg: 1'b0, has_color: 1'b1, prim: 8'd7, color_neg: 1'b1},
    '{coef: 8'd8, is_root: 1'b1, parent: 8'd0, shift: 4'd0, parent_neg: 1'b0, has_color: 1'b1, prim: 8'd7, color_neg: 1'b0},
    '{coef: 8'd1, is_root: 1'b0, parent: 8'd7, shift: 4'd0, parent_neg: 1'b0, has_color: 1'b1, prim: 8'd6, color_neg: 1'b1},
    '{coef: 8'd0, is_root: 1'b0, parent: 8'd6, shift: 4'd0, parent_neg: 1'b0, has_color: 1'b1, prim: 8'd6, color_neg: 1'b1},
    '{coef: 8'd4, is_root: 1'b1, parent: 8'd0, shift: 4'd0, parent_neg: 1'b0, has_color: 1'b1, prim: 8'd6, color_neg: 1'b0},
    '{coef: 8'd12, is_root: 1'b0, parent: 8'd3, shift: 4'd0, parent_neg: 1'b0, has_color: 1'b1, prim: 8'd5, color_neg: 1'b0},
    '{coef: 8'd13, is_root: 1'b0, parent: 8'd0, shift: 4'd1, parent_neg: 1'b1, has_color: 1'b1, prim: 8'd4, color_neg: 1'b0},
    '{coef: 8'd7, is_root: 1'b0, parent: 8'd0, shift: 4'd2, parent_neg: 1'b0, has_color: 1'b1, prim: 8'd3, color_neg: 1'b1},
    '{coef: 8'd6, is_root: 1'b0, parent: 8'd0, shift: 4'd3, parent_neg: 1'b0, has_color: 1'b1, prim: 8'd2, color_neg: 1'b1},
    '{coef: 8'd5, is_root: 1'b0, parent: 8'd0, shift: 4'd3, parent_neg: 1'b0, has_color: 1'b1, prim: 8'd3, color_neg: 1'b0},
    '{coef: 8'd3, is_root: 1'b0, parent: 8'd0, shift: 4'd1, parent_neg: 1'b0, has_color: 1'b1, prim: 8'd2, color_neg: 1'b0},
    '{coef: 8'd17, is_root: 1'b1, parent: 8'd0, shift: 4'd0, parent_neg: 1'b0, has_color: 1'b1, prim: 8'd1, color_neg: 1'b0},
    '{coef: 8'd2, is_root: 1'b1, parent: 8'd0, shift: 4'd0, parent_neg: 1'b0, has_color: 1'b1, prim: 8'd0, color_neg: 1'b0}
  };

endpackage
