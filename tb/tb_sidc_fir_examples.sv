// tb_sidc_fir_examples: runs the SIDC FIR filter at the six filter lengths of the
// reference example filters (orders 35, 80, 98, 126, 214 and 350, i.e. 36 to 351 taps,
// odd and even) with generated coefficient sets and SIDC graphs (see sidc_fir_case),
// random samples, full-scale negative samples and idle cycles. Every output is
// compared with a direct convolution. Also counts the graph features exercised:
// reused products with a non-zero shift and colors that are subtracted.
module tb_sidc_fir_examples;
  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  localparam int N = 6;
  localparam int TAPS [N] = '{36, 81, 99, 127, 215, 351};

  logic done [N];
  int   chk [N], fail [N], nsh [N], nps [N];

  for (genvar c = 0; c < N; c++) begin : g_case
    sidc_fir_case #(.TAPS(TAPS[c]), .SEED(c + 1), .NSAMP(500)) u_case (
      .clk(clk), .done(done[c]), .checks(chk[c]), .failures(fail[c]),
      .n_shift(nsh[c]), .n_psub(nps[c])
    );
  end

  initial begin
    int checks, failures, shifts, psubs;
    bit all_done;
    all_done = 1'b0;
    while (!all_done) begin
      @(posedge clk);
      all_done = 1'b1;
      for (int c = 0; c < N; c++) if (!done[c]) all_done = 1'b0;
    end
    checks = 0; failures = 0; shifts = 0; psubs = 0;
    for (int c = 0; c < N; c++) begin
      $display("taps=%0d checks=%0d failures=%0d shifted-reuse=%0d subtracted-color=%0d",
               TAPS[c], chk[c], fail[c], nsh[c], nps[c]);
      checks += chk[c]; failures += fail[c]; shifts += nsh[c]; psubs += nps[c];
    end
    checks += 2;
    if (shifts == 0) failures++;
    if (psubs == 0)  failures++;
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
