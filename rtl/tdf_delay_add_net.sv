// tdf_delay_add_net: the delay-and-add network of a transposed-direct-form FIR filter
// with symmetric coefficients.
//
// Tap i (0..TAPS-1) uses unique coefficient u(i) = min(i, TAPS-1-i), so each product
// from the secondary network feeds two taps. The coefficient signs are held
// separately (signed-magnitude coefficients): a tap adds its product when the sign is
// positive and subtracts it when negative, always in one Brent-Kung adder, so the
// multiplier block only ever forms magnitudes. The transposed chain is
//     z[TAPS-1] <= s(TAPS-1)*P(TAPS-1)
//     z[i]      <= s(i)*P(i) + z[i+1]            for 1 <= i <= TAPS-2
//     y         <= s(0)*P(0) + z[1]
// which yields y(n) = sum_i c_i x(n-i) with one adder between registers. The
// structure follows the transposed direct form of the filter architecture; the
// registered output, the full-precision output width (no rounding) and the sample
// enable are this design's choices.
//
// Timing: every register moves only on a clock edge with en = 1, so the filter
// state advances once per input sample; y holds the output for the products
// presented with the last en, and is valid from the edge after it.
// Reset: asynchronous, active low, clears the chain and the output.
module tdf_delay_add_net
  import sidc_pkg::*;
#(
  parameter int TAPS = EX1_TAPS,
  parameter int UNIQ = (TAPS + 1) / 2,
  parameter int PW   = DATA_W + COEF_W - 1,
  parameter int YW   = PW + $clog2(TAPS),
  parameter logic [UNIQ-1:0] NEG = EX1_NEG  // 1: coefficient u is negative
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic [UNIQ-1:0][PW-1:0] prod,
  output logic [YW-1:0]           y
);

  if (UNIQ != (TAPS + 1) / 2) begin : g_chk_uniq
    $error("UNIQ must be (TAPS+1)/2 for a symmetric filter");
  end

  for (genvar i = TAPS - 1; i >= 0; i--) begin : g_tap
    localparam int U = (i < TAPS - 1 - i) ? i : TAPS - 1 - i;
    logic [YW-1:0] term;  // product sign-extended to the output width
    logic [YW-1:0] acc;   // s(i)*P(i) + z[i+1]
    assign term = YW'($signed(prod[U]));

    if (i == TAPS - 1 && !NEG[U]) begin : g_first_pos
      assign acc = term;
    end else begin : g_add
      logic [YW-1:0] partial;
      logic          cout_unused;
      if (i == TAPS - 1) begin : g_none
        assign partial = '0;
      end else begin : g_prev
        assign partial = g_tap[i+1].z;
      end
      bk_adder #(.W(YW)) u_add (
        .a   (partial),
        .b   (NEG[U] ? ~term : term),
        .cin (NEG[U]),
        .sum (acc),
        .cout(cout_unused)
      );
    end

    // The register after this tap: z[i] for i >= 1, the output register for i = 0.
    logic [YW-1:0] z;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)  z <= '0;
      else if (en) z <= acc;
    end
  end

  assign y = g_tap[0].z;

endmodule
