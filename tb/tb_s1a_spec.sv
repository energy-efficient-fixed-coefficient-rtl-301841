// tb_s1a_spec -- runs the S1a low-pass workload through the complete design
// (fir_top at its defaults) and checks the filter against its
// specification: pass band 0..0.15, stop band 0.25..0.5 (frequencies
// relative to the sample rate), ripple 0.00645 in both, gain free.
//
// 1. An impulse is sent through the filter and the 25 output samples are
//    captured as the measured impulse response.  The testbench evaluates
//    its amplitude response at 50 evenly spaced frequencies in each band,
//    takes the gain G as the mid-point of the pass-band extremes, and
//    checks |A(f)/G - 1| <= 0.00645 in the pass band and
//    |A(f)/G| <= 0.00645 in the stop band.  The response must also be
//    symmetric (linear phase).
// 2. Quantised sinusoids of amplitude 2000 at 0.05 (pass band) and 0.35
//    (stop band) are streamed through the filter.  After settling, the
//    output amplitude must be within the specification, widened by the
//    worst-case effect of the input rounding (0.5 * sum|h|).
module tb_s1a_spec;
  localparam real FP = 0.15, FS = 0.25, DELTA = 0.00645, PI = 3.14159265358979;

  logic clk = 0, rst_n = 0, fir_en = 0;
  logic signed [11:0] fir_x = '0;
  logic signed [23:0] fir_y;
  logic signed [11:0] sop_x [6];
  logic signed [25:0] sop_y;
  int checks = 0, failures = 0;
  int h [25];

  fir_top dut (.clk, .rst_n, .fir_en, .fir_x, .fir_y, .sop_x, .sop_y);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real amp(input real f);   // zero-phase amplitude response
    real a = 0.0;
    for (int k = 0; k < 25; k++) a += h[k] * $cos(2.0 * PI * f * (k - 12));
    return a;
  endfunction

  // stream a sinusoid and return the largest |output| after settling
  task automatic run_sine(input real f, output real peak);
    peak = 0.0;
    for (int n = 0; n < 400; n++) begin
      fir_x = 12'($rtoi(2000.0 * $sin(2.0 * PI * f * n) + ((2000.0 * $sin(2.0 * PI * f * n)) >= 0 ? 0.5 : -0.5)));
      @(negedge clk);
      if (n > 60 && ((fir_y < 0) ? -real'(fir_y) : real'(fir_y)) > peak)
        peak = (fir_y < 0) ? -real'(fir_y) : real'(fir_y);
    end
  endtask

  initial begin
    real lo, hi, g, a, worst_p, worst_s, peak, slack;
    int sum_abs;
    for (int k = 0; k < 6; k++) sop_x[k] = '0;
    @(negedge clk); @(negedge clk);
    rst_n  = 1;
    fir_en = 1;
    // impulse response measured on the hardware (two-clock latency)
    fir_x = 12'sd1;
    @(negedge clk);
    fir_x = 12'sd0;
    for (int k = 0; k < 25; k++) begin
      @(negedge clk);
      h[k] = int'(fir_y);
    end
    for (int k = 0; k < 12; k++) begin
      checks++;
      if (h[k] != h[24-k]) begin failures++; $display("FAIL asymmetric tap %0d", k); end
    end
    // amplitude response against the specification
    lo = 1.0e9;
    hi = -1.0e9;
    for (int i = 0; i < 50; i++) begin
      a = amp(FP * i / 49.0);
      if (a < lo) lo = a;
      if (a > hi) hi = a;
    end
    g = (lo + hi) / 2.0;
    worst_p = (hi - g) / g;
    worst_s = 0.0;
    for (int i = 0; i < 50; i++) begin
      a = amp(FS + (0.5 - FS) * i / 49.0);
      a = (a < 0) ? -a : a;
      if (a / g > worst_s) worst_s = a / g;
    end
    $display("gain %f  pass-band deviation %f  stop-band level %f  (limit %f)", g, worst_p, worst_s, DELTA);
    checks += 2;
    if (worst_p > DELTA) begin failures++; $display("FAIL pass-band ripple"); end
    if (worst_s > DELTA) begin failures++; $display("FAIL stop-band ripple"); end
    // sinusoids through the running filter
    sum_abs = 0;
    for (int k = 0; k < 25; k++) sum_abs += (h[k] < 0) ? -h[k] : h[k];
    slack = 0.5 * sum_abs + 1.0;
    run_sine(0.05, peak);
    $display("0.05: output peak %f, expected %f", peak, 2000.0 * amp(0.05));
    checks++;
    if (peak < 2000.0 * g * (1.0 - DELTA) - slack || peak > 2000.0 * g * (1.0 + DELTA) + slack) begin
      failures++; $display("FAIL pass-band sine amplitude");
    end
    run_sine(0.35, peak);
    $display("0.35: output peak %f, limit %f", peak, 2000.0 * g * DELTA + slack);
    checks++;
    if (peak > 2000.0 * g * DELTA + slack) begin failures++; $display("FAIL stop-band sine amplitude"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
