// tb_sidc_fir: end-to-end test of the SIDC FIR filter at its default configuration
// (36 taps, 12-bit samples, the default coefficient set and SIDC graph).
//
// A cycle-accurate reference model, built only from the signed coefficient words and
// a direct convolution y(n) = sum_i c_i x(n-i), runs beside the filter; out_valid and
// y_out are compared on every clock. The stimulus walks through the behaviours the
// filter has, and each is counted (a behaviour that never happens is a failure):
//   impulse   a lone unit sample, whose outputs must be the coefficients themselves
//   extreme   full-scale +2047 / -2048 runs, the largest products and sums
//   gap       cycles without in_valid, during which the filter must not advance
//   stream    back-to-back samples at one per clock
//   reset     an asynchronous reset in mid-stream, which clears the filter state
// The latency (sample accepted on edge t, output valid after edge t+1) is measured
// separately on the impulse.
module tb_sidc_fir;
  import sidc_pkg::*;
  localparam int TAPS = EX1_TAPS;
  localparam int YW   = DATA_W + COEF_W - 1 + $clog2(TAPS);

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_impulse = 0, n_extreme = 0, n_gap = 0, n_stream = 0, n_reset = 0;
  int cycle = 0;

  logic                     rst_n, in_valid, out_valid;
  logic [DATA_W-1:0]        x_in;
  logic [YW-1:0]            y_out;

  sidc_fir dut (.clk(clk), .rst_n(rst_n), .x_in(x_in), .in_valid(in_valid),
                .y_out(y_out), .out_valid(out_valid));

  // Reference model state.
  longint hist [TAPS];
  longint xq_m, y_m;
  bit     v_m, ov_m, prev_valid;

  function automatic longint coef(input int i);
    int u;
    u = (i < TAPS - 1 - i) ? i : TAPS - 1 - i;
    return EX1_COEF[u][COEF_W-1] ? -longint'(EX1_COEF[u][COEF_W-2:0])
                                 :  longint'(EX1_COEF[u][COEF_W-2:0]);
  endfunction

  function automatic void model_reset();
    for (int i = 0; i < TAPS; i++) hist[i] = 0;
    xq_m = 0; y_m = 0; v_m = 1'b0; ov_m = 1'b0;
  endfunction

  // One clock edge of the model, given the inputs applied before the edge.
  function automatic void model_step(input bit vin, input longint xin);
    ov_m = v_m;
    if (v_m) begin
      for (int i = TAPS - 1; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = xq_m;
      y_m = 0;
      for (int i = 0; i < TAPS; i++) y_m += coef(i) * hist[i];
    end
    v_m = vin;
    if (vin) xq_m = xin;
  endfunction

  // Apply one input (valid or not) for one clock and compare afterwards.
  task automatic step(input bit vin, input logic signed [DATA_W-1:0] xin);
    in_valid = vin;
    x_in = vin ? xin : DATA_W'($urandom);
    if (!vin) n_gap++;
    else if (prev_valid) n_stream++;
    prev_valid = vin;
    @(posedge clk);
    model_step(vin, longint'(xin));
    cycle++;
    #1;
    checks++;
    if (out_valid !== ov_m || longint'($signed(y_out)) != y_m) begin
      failures++;
      $display("FAIL cycle %0d: out_valid=%0d y=%0d, want %0d / %0d",
               cycle, out_valid, $signed(y_out), ov_m, y_m);
    end
  endtask

  initial begin
    int t_acc;
    model_reset();
    prev_valid = 1'b0;
    in_valid = 1'b0; x_in = '0; rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // Impulse: latency and impulse response.
    step(1'b1, 12'sd1);
    t_acc = cycle;
    while (!out_valid) step(1'b0, '0);
    checks++;
    if (cycle - t_acc != 1) begin
      failures++;
      $display("FAIL latency: output %0d edges after the accepting edge", cycle - t_acc + 1);
    end
    // The outputs that follow the impulse are the coefficients c_0, c_1, ...
    begin
      int k;
      k = 0;
      while (k < TAPS) begin
        if (out_valid) begin
          checks++;
          if (longint'($signed(y_out)) != coef(k)) begin
            failures++;
            $display("FAIL impulse response tap %0d: %0d, want %0d", k, $signed(y_out), coef(k));
          end
          k++;
        end
        step(1'b1, '0);
      end
    end
    n_impulse++;

    // Full-scale runs of both signs.
    for (int r = 0; r < 4; r++) begin
      for (int i = 0; i < TAPS + 2; i++) step(1'b1, (r % 2 != 0) ? -12'sd2048 : 12'sd2047);
      n_extreme++;
    end
    // Worst-case alternating pattern: sign of each coefficient, full scale.
    for (int i = 0; i < 3 * TAPS; i++)
      step(1'b1, (coef((3 * TAPS - 1 - i) % TAPS) < 0) ? -12'sd2048 : 12'sd2047);
    n_extreme++;

    // Random stream with gaps.
    for (int i = 0; i < 1500; i++) begin
      if ($urandom_range(0, 4) == 0) step(1'b0, '0);
      else step(1'b1, DATA_W'($urandom));
    end

    // Reset in mid-stream.
    in_valid = 1'b1; x_in = 12'sd1000;
    #2 rst_n = 1'b0;
    model_reset();
    #1;
    checks++;
    if (out_valid !== 1'b0 || y_out != '0) begin
      failures++;
      $display("FAIL reset did not clear the output");
    end
    @(posedge clk);
    #1 rst_n = 1'b1;
    n_reset++;
    prev_valid = 1'b0;
    for (int i = 0; i < 300; i++) step($urandom_range(0, 3) != 0, DATA_W'($urandom));

    $display("impulse=%0d extreme=%0d gap=%0d stream=%0d reset=%0d",
             n_impulse, n_extreme, n_gap, n_stream, n_reset);
    checks += 5;
    if (n_impulse == 0) failures++;
    if (n_extreme == 0) failures++;
    if (n_gap == 0)     failures++;
    if (n_stream == 0)  failures++;
    if (n_reset == 0)   failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
