// sidc_primary_net: the primary computation network of the SIDC filter.
//
// Multiplies the current input sample by every primary constant: the magnitudes of
// the root coefficients and the required colors (differential coefficients). Each
// constant gets its own shift-and-add multiplier (csd_const_mult), so the block is
// NPRIM independent constant multipliers side by side; shifts are hard-wired and
// additions use Brent-Kung adders. The network's role and contents follow the
// filter architecture; the per-constant CSD decomposition is this design's choice.
//
// Interface: x is the sample sign-extended to PW bits; prod[k] = PRIM[k] * x in PW-bit
// two's complement. Purely combinational (the filter registers its input ahead of it).
module sidc_primary_net
  import sidc_pkg::*;
#(
  parameter int PW    = DATA_W + COEF_W - 1,
  parameter int NPRIM = EX1_NPRIM,
  parameter logic [NPRIM-1:0][PRIM_W-1:0] PRIM = EX1_PRIM
) (
  input  logic [PW-1:0]            x,
  output logic [NPRIM-1:0][PW-1:0] prod
);

  for (genvar k = 0; k < NPRIM; k++) begin : g_prim
    csd_const_mult #(
      .W(PW),
      .K(32'(PRIM[k]))
    ) u_mult (
      .x(x),
      .y(prod[k])
    );
  end

endmodule
