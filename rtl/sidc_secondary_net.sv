// sidc_secondary_net: the secondary adder network of the SIDC filter.
//
// Forms the product of every unique coefficient magnitude with the input sample by
// walking the SIDC graph. A root node takes its product straight from the primary
// network. Any other node reuses the product of its parent node, shifted left by L
// (hard wiring), and adds or subtracts one color product from the primary network:
//     P_node = (+/-) color*x (+/-) (P_parent << L)           (one Brent-Kung adder)
// A node whose color is zero is just the shifted parent product (no adder). Nodes are
// listed in computation order, so a parent always has a smaller index; chains of
// reuse therefore form a tree whose depth sets the critical path. The choice of which
// incoming edge each node uses (and so the wiring) is fixed by the NODES parameter;
// the structure follows the SIDC decomposition c_j = D + (+/-)2^L c_i, the encoding
// of the graph is this design's own.
//
// Interface: prim[k] are the primary products, prod[j] = |c_j| * x for unique
// coefficient j, all PW-bit two's complement. Purely combinational. All arithmetic is
// modulo 2^PW, so intermediate overflow is harmless whenever the final products fit.
module sidc_secondary_net
  import sidc_pkg::*;
#(
  parameter int PW    = DATA_W + COEF_W - 1,
  parameter int NPRIM = EX1_NPRIM,
  parameter int UNIQ  = EX1_UNIQ,
  parameter sidc_node_t [UNIQ-1:0] NODES = EX1_NODES
) (
  input  logic [NPRIM-1:0][PW-1:0] prim,
  output logic [UNIQ-1:0][PW-1:0]  prod
);

  for (genvar k = 0; k < UNIQ; k++) begin : g_node
    localparam sidc_node_t N = NODES[k];
    logic [PW-1:0] p;  // product formed by this node

    // Graph rules this network relies on.
    if (int'(N.coef) >= UNIQ) begin : g_chk_coef
      $error("SIDC node %0d: coefficient index out of range", k);
    end
    if (!N.is_root && int'(N.parent) >= k) begin : g_chk_order
      $error("SIDC node %0d: parent must be computed earlier", k);
    end
    if (int'(N.prim) >= NPRIM && (N.is_root || N.has_color)) begin : g_chk_prim
      $error("SIDC node %0d: primary product index out of range", k);
    end
    if (!N.is_root && N.parent_neg && (N.color_neg || !N.has_color)) begin : g_chk_sign
      $error("SIDC node %0d: a product magnitude cannot be a negated sum", k);
    end

    if (N.is_root) begin : g_root
      assign p = prim[N.prim];
    end else begin : g_edge
      logic [PW-1:0] sp;  // parent product shifted by L
      assign sp = g_node[N.parent].p << N.shift;
      if (!N.has_color) begin : g_shift_only
        assign p = sp;
      end else begin : g_add
        logic [PW-1:0] opa, opb;
        logic          cout_unused;
        // Put the subtracted operand (if any) on the b side.
        if (N.color_neg) begin : g_csub
          assign opa = sp;
          assign opb = ~prim[N.prim];
        end else if (N.parent_neg) begin : g_psub
          assign opa = prim[N.prim];
          assign opb = ~sp;
        end else begin : g_plus
          assign opa = prim[N.prim];
          assign opb = sp;
        end
        bk_adder #(.W(PW)) u_add (
          .a   (opa),
          .b   (opb),
          .cin (N.color_neg | N.parent_neg),
          .sum (p),
          .cout(cout_unused)
        );
      end
    end

    assign prod[N.coef] = p;
  end

endmodule
