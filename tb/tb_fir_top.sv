// tb_fir_top -- end-to-end test of the whole design at its default sizes.
//
// The filter (25-tap S1a low-pass, 12-bit in, 24-bit out) and the six-input
// sum-of-products example are driven at the same time.  The filter sees an
// impulse, a full-scale step, full-scale inputs matched to the coefficient
// signs in both polarities (the largest positive and negative outputs),
// 5000 clocks of uniform white noise of full amplitude with a random clock
// enable, and a reset in mid-stream.  The SOP example gets a new random
// input set every clock.  All expected values are computed in the
// testbench (direct convolution with the mirrored impulse response; the
// SOP coefficients 3 + 5*2^(5+k)).  Latency is two enabled clocks for the
// filter and two clocks for the SOP.  Each behaviour counted below must
// occur at least once: a held (stalled) clock, the impulse response,
// both full-scale extremes, the step response, and a mid-stream reset.
module tb_fir_top;
  localparam int CS1A [13] = '{256, 192, 57, -36, -41, 0, 22, 10, -7, -8, 0, 4, 1};

  logic clk = 0, rst_n = 0, fir_en = 0;
  logic signed [11:0] fir_x = '0;
  logic signed [23:0] fir_y;
  logic signed [11:0] sop_x [6];
  logic signed [25:0] sop_y;

  logic signed [11:0] hist [25];
  longint exp_fir, exp_sop_q [$];
  int checks = 0, failures = 0;
  int n_stall = 0, n_impulse = 0, n_max_pos = 0, n_max_neg = 0, n_step = 0, n_reset = 0, n_sop = 0;
  longint max_pos, max_neg;

  fir_top dut (.clk, .rst_n, .fir_en, .fir_x, .fir_y, .sop_x, .sop_y);

  always #5 clk = ~clk;

  function automatic int h(input int k);
    return CS1A[(k < 12) ? 12 - k : k - 12];
  endfunction

  function automatic longint sop_ref(input logic signed [11:0] v [6]);
    longint s = 0;
    for (int k = 0; k < 6; k++) s += (3 + 5 * (longint'(1) << (5 + k))) * longint'(v[k]);
    return s;
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic e, input logic signed [11:0] x);
    fir_en = e;
    fir_x  = x;
    for (int k = 0; k < 6; k++) sop_x[k] = 12'($urandom);
    exp_sop_q.push_back(sop_ref(sop_x));
    @(posedge clk);
    if (e) begin
      exp_fir = 0;
      for (int k = 0; k < 25; k++) exp_fir += longint'(h(k)) * longint'(hist[k]);
      for (int k = 24; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = x;
    end else n_stall++;
    @(negedge clk);
    checks++;
    if (longint'(fir_y) != exp_fir) begin failures++; $display("FAIL filter %0d vs %0d", fir_y, exp_fir); end
    if (exp_fir == max_pos && fir_y == max_pos) n_max_pos++;
    if (exp_fir == max_neg && fir_y == max_neg) n_max_neg++;
    if (exp_sop_q.size() > 1) begin
      longint e2;
      e2 = exp_sop_q.pop_front();
      checks++;
      n_sop++;
      if (longint'(sop_y) != e2) begin failures++; $display("FAIL sop %0d vs %0d", sop_y, e2); end
    end
  endtask

  initial begin
    longint sp, sn;   // sums of the positive and of the negative taps' magnitudes
    sp = 0;
    sn = 0;
    for (int k = 0; k < 25; k++) if (h(k) > 0) sp += h(k); else sn -= h(k);
    max_pos = 2047 * sp + 2048 * sn;        // sign-matched full-scale input
    max_neg = -(2048 * sp + 2047 * sn);
    for (int k = 0; k < 25; k++) hist[k] = '0;
    for (int k = 0; k < 6; k++) sop_x[k] = '0;
    exp_fir = 0;
    @(negedge clk); @(negedge clk);
    rst_n = 1;
    exp_sop_q.push_back(0);
    // impulse: latency two enabled clocks, then h_0..h_24
    step(1'b1, 12'sd1);
    begin
      int ok;
      ok = (fir_y == 0);
      for (int k = 0; k < 25; k++) begin
        step(1'b1, 12'sd0);
        if (int'(fir_y) != h(k)) ok = 0;
      end
      checks++;
      if (ok) n_impulse++; else begin failures++; $display("FAIL impulse response"); end
    end
    // step response settles at the DC gain 644 times the input
    for (int k = 0; k < 30; k++) step(1'b1, 12'sd1000);
    checks++;
    if (fir_y == 24'sd644000) n_step++; else begin failures++; $display("FAIL step %0d", fir_y); end
    // full-scale extremes
    for (int k = 0; k < 25; k++) step(1'b1, (h(24 - k) < 0) ? -12'sd2048 : 12'sd2047);
    for (int k = 0; k < 25; k++) step(1'b1, (h(24 - k) < 0) ? 12'sd2047 : -12'sd2048);
    // white noise, full amplitude, random enable
    for (int c = 0; c < 5000; c++) begin
      step(($urandom % 6) != 0, 12'($urandom));
      if (c == 2500) begin
        // reset in mid-stream
        rst_n = 0;
        @(negedge clk);
        rst_n = 1;
        for (int k = 0; k < 25; k++) hist[k] = '0;
        exp_fir = 0;
        exp_sop_q.delete();
        exp_sop_q.push_back(0);
        checks++;
        if (fir_y == 0 && sop_y == 0) n_reset++; else begin failures++; $display("FAIL reset"); end
      end
    end
    $display("mechanisms: stall=%0d impulse=%0d step=%0d max_pos=%0d max_neg=%0d reset=%0d sop=%0d",
             n_stall, n_impulse, n_step, n_max_pos, n_max_neg, n_reset, n_sop);
    checks += 7;
    if (n_stall == 0)   begin failures++; $display("FAIL no stall"); end
    if (n_impulse == 0) begin failures++; $display("FAIL no impulse"); end
    if (n_step == 0)    begin failures++; $display("FAIL no step"); end
    if (n_max_pos == 0) begin failures++; $display("FAIL no positive extreme"); end
    if (n_max_neg == 0) begin failures++; $display("FAIL no negative extreme"); end
    if (n_reset == 0)   begin failures++; $display("FAIL no reset"); end
    if (n_sop == 0)     begin failures++; $display("FAIL no SOP result"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
