// csd_const_mult: multiply a two's-complement value by a fixed non-negative constant
// using shifts and Brent-Kung adders only (no multiplier), y = K * x mod 2^W.
//
// The constant is recoded at elaboration into canonical signed digits (CSD, no two
// adjacent non-zero digits). The most significant digit (always +1) is x shifted by
// hard wiring; every further non-zero digit adds or subtracts another shifted copy of
// x in one bk_adder, so a constant with n non-zero digits costs n-1 adders and a power
// of two costs none. Digits are taken from the most significant down, forming a
// chain. Purely combinational. Results are exact whenever K*x fits in W bits.
// Helper of the primary computation network; the CSD recoding is this design's
// choice of shift-and-add decomposition.
module csd_const_mult #(
  parameter int          W = 24,
  parameter int unsigned K = 5
) (
  input  logic [W-1:0] x,
  output logic [W-1:0] y
);

  localparam int KB = 34;  // digit positions examined (K is 32 bits, CSD adds one)

  // CSD recoding of k: bit i of the result is set where digit i is non-zero, and
  // the same bit of neg_digits where that digit is -1.
  function automatic logic [KB-1:0] csd_digits(input int unsigned k, input bit want_neg);
    longint          v;
    logic [KB-1:0]   nz, ng;
    nz = '0;
    ng = '0;
    v  = longint'(k);
    for (int i = 0; i < KB; i++) begin
      if (v[0]) begin
        nz[i] = 1'b1;
        ng[i] = v[1];          // ...11 -> digit -1, ...01 -> digit +1
        v = v[1] ? v + 1 : v - 1;
      end
      v = v >>> 1;
    end
    return want_neg ? ng : nz;
  endfunction

  localparam logic [KB-1:0] NZ  = csd_digits(K, 1'b0);
  localparam logic [KB-1:0] NEG = csd_digits(K, 1'b1);

  for (genvar b = KB - 1; b >= 0; b--) begin : g_dig
    localparam int  D     = !NZ[b] ? 0 : (NEG[b] ? -1 : 1);
    localparam bit  ABOVE = (NZ >> (b + 1)) != '0;
    logic [W-1:0] acc;  // sum of the digits at positions >= b, times x
    if (D == 0) begin : g_zero
      if (b == KB - 1) begin : g_top
        assign acc = '0;
      end else begin : g_pass
        assign acc = g_dig[b+1].acc;
      end
    end else if (!ABOVE) begin : g_first
      // The leading CSD digit of a positive constant is +1: a hard-wired shift.
      assign acc = x << b;
    end else begin : g_add
      logic [W-1:0] sx;
      logic cout_unused;
      assign sx = x << b;
      bk_adder #(.W(W)) u_add (
        .a   (g_dig[b+1].acc),
        .b   ((D > 0) ? sx : ~sx),
        .cin (D < 0),
        .sum (acc),
        .cout(cout_unused)
      );
    end
  end

  assign y = g_dig[0].acc;

endmodule
