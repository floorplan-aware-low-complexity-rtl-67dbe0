// bk_adder: W-bit Brent-Kung parallel-prefix adder, sum = a + b + cin (mod 2^W).
//
// Every adder and subtractor of the filter is an instance of this block (a
// subtractor feeds ~b and cin = 1). Brent-Kung is the adder architecture the SIDC
// filter specifies; the construction is the textbook one:
// bit generate/propagate signals (with cin folded into bit 0), an up-sweep that
// forms group signals over spans 2, 4, 8, ... at positions 2d-1, 4d-1, ..., and a
// down-sweep that fills the remaining positions, giving 2*log2(W)-1 prefix levels
// and about 2W prefix cells. Purely combinational; cout is the carry out of bit W-1.
module bk_adder #(
  parameter int W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  // Number of prefix levels needed to span W bits.
  localparam int LOGW = (W <= 1) ? 1 : $clog2(W);

  logic [W-1:0] p;   // bit propagate
  logic [W-1:0] gg;  // group generate, bits [0..i] once the prefix tree is done
  logic [W-1:0] pp;  // group propagate

  always_comb begin
    p = a ^ b;
    gg = a & b;
    pp = p;
    // Fold the carry-in into bit 0.
    gg[0] = (a[0] & b[0]) | (p[0] & cin);
    // Up-sweep: position i covers (i-2d, i] after the level of span d.
    for (int lvl = 0; lvl < LOGW; lvl++) begin
      for (int i = 0; i < W; i++) begin
        if ((i % (2 << lvl)) == ((2 << lvl) - 1)) begin
          gg[i] = gg[i] | (pp[i] & gg[i - (1 << lvl)]);
          pp[i] = pp[i] & pp[i - (1 << lvl)];
        end
      end
    end
    // Down-sweep: position 3d-1, 5d-1, ... combines with the prefix ending d below.
    for (int lvl = LOGW - 2; lvl >= 0; lvl--) begin
      for (int i = 0; i < W; i++) begin
        if (i >= (3 << lvl) - 1 && ((i - ((3 << lvl) - 1)) % (2 << lvl)) == 0) begin
          gg[i] = gg[i] | (pp[i] & gg[i - (1 << lvl)]);
          pp[i] = pp[i] & pp[i - (1 << lvl)];
        end
      end
    end
    sum[0] = p[0] ^ cin;
    for (int i = 1; i < W; i++) sum[i] = p[i] ^ gg[i-1];
    cout = gg[W-1];
  end

endmodule
