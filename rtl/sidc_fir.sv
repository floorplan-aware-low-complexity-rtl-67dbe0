// sidc_fir: multiplierless symmetric FIR filter in transposed direct form whose
// constant multiplications are shared through an SIDC (shift-inclusive differential
// coefficient) graph.
//
// Datapath, input to output:
//   input register     x_in is captured on an edge with in_valid = 1.
//   primary network    the captured sample times every primary constant (root
//                      coefficient magnitudes and colors), by shift-and-add.
//   secondary network  every other coefficient product as a color product plus or
//                      minus a shifted, already formed coefficient product.
//   delay-and-add      the transposed-direct-form chain; coefficient signs are applied
//                      here as add or subtract, since coefficients are signed-magnitude.
// Every adder is a Brent-Kung adder and every shift is wiring. The SIDC graph (which
// products are roots, which colors exist, and which incoming edge each other vertex
// uses) is a parameter: a floorplan-aware edge choice changes only NODES, never the
// arithmetic result. At elaboration the graph is evaluated and checked against COEF.
//
// Interface: x_in is a two's-complement sample of XW bits; y_out = sum_i c_i x(n-i),
// full precision (YW bits, no rounding), c_i the integer coefficient words.
// Timing: one sample per clock at most. A sample accepted on edge t produces its
// output, with out_valid = 1, right after edge t+1 (latency 2 edges). Cycles without
// in_valid do not advance the filter; out_valid then drops. Reset: asynchronous,
// active low.
// Part of the SIDC filter architecture: the three networks, transposed direct form, symmetric
// 12-bit signed-magnitude coefficients, Brent-Kung adders, hard-wired shifts. This
// design's own choices: the coefficient values and graph of the default
// configuration (see sidc_pkg), the input width, input/output registers, valid
// handshake and reset.
module sidc_fir
  import sidc_pkg::*;
#(
  parameter int XW    = DATA_W,
  parameter int TAPS  = EX1_TAPS,
  parameter int UNIQ  = (TAPS + 1) / 2,
  parameter int NPRIM = EX1_NPRIM,
  parameter logic [UNIQ-1:0][COEF_W-1:0]  COEF  = EX1_COEF,
  parameter logic [NPRIM-1:0][PRIM_W-1:0] PRIM  = EX1_PRIM,
  parameter sidc_node_t [UNIQ-1:0]        NODES = EX1_NODES,
  localparam int PW = XW + COEF_W - 1,
  localparam int YW = PW + $clog2(TAPS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [XW-1:0] x_in,
  input  logic          in_valid,
  output logic [YW-1:0] y_out,
  output logic          out_valid
);

  // Elaboration check: evaluating the graph must give every coefficient magnitude.
  function automatic bit graph_matches_coefs();
    longint val [UNIQ];
    bit     seen [UNIQ];
    bit     ok;
    ok = 1'b1;
    for (int u = 0; u < UNIQ; u++) seen[u] = 1'b0;
    for (int k = 0; k < UNIQ; k++) begin
      longint c, pv;
      c  = NODES[k].has_color || NODES[k].is_root ? longint'(PRIM[NODES[k].prim]) : 0;
      if (NODES[k].is_root) begin
        val[k] = c;
      end else begin
        pv = val[int'(NODES[k].parent)] <<< NODES[k].shift;
        val[k] = (NODES[k].color_neg ? -c : c) + (NODES[k].parent_neg ? -pv : pv);
      end
      if (val[k] != longint'(COEF[NODES[k].coef][COEF_W-2:0])) ok = 1'b0;
      if (seen[int'(NODES[k].coef)]) ok = 1'b0;
      seen[int'(NODES[k].coef)] = 1'b1;
    end
    return ok;
  endfunction

  if (!graph_matches_coefs()) begin : g_chk_graph
    $error("SIDC graph does not reproduce the coefficient magnitudes");
  end

  // Coefficient signs for the delay-and-add network.
  function automatic logic [UNIQ-1:0] coef_signs();
    logic [UNIQ-1:0] r;
    for (int u = 0; u < UNIQ; u++) r[u] = COEF[u][COEF_W-1];
    return r;
  endfunction
  localparam logic [UNIQ-1:0] NEG = coef_signs();

  // Input register.
  logic [XW-1:0] x_q;
  logic          v_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q <= '0;
      v_q <= 1'b0;
    end else begin
      v_q <= in_valid;
      if (in_valid) x_q <= x_in;
    end
  end

  logic [PW-1:0]             x_ext;
  logic [NPRIM-1:0][PW-1:0]  prim_prod;
  logic [UNIQ-1:0][PW-1:0]   coef_prod;

  assign x_ext = PW'($signed(x_q));

  sidc_primary_net #(
    .PW(PW), .NPRIM(NPRIM), .PRIM(PRIM)
  ) u_primary (
    .x   (x_ext),
    .prod(prim_prod)
  );

  sidc_secondary_net #(
    .PW(PW), .NPRIM(NPRIM), .UNIQ(UNIQ), .NODES(NODES)
  ) u_secondary (
    .prim(prim_prod),
    .prod(coef_prod)
  );

  tdf_delay_add_net #(
    .TAPS(TAPS), .UNIQ(UNIQ), .PW(PW), .YW(YW), .NEG(NEG)
  ) u_delay_add (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (v_q),
    .prod (coef_prod),
    .y    (y_out)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= v_q;
  end

endmodule
