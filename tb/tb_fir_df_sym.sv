// tb_fir_df_sym -- self-checking test of the symmetric direct-form filter.
//
// Three filters run on the same input stream:
//   dut_sub : defaults (25-tap S1a coefficients, shared sub-expressions)
//   dut_sa  : the same coefficients built as CSD shift-and-add + adder tree
//   dut_ev  : an 8-tap even-length (type II) filter, shift-and-add
// The expected outputs come from a direct convolution with the full,
// mirrored impulse response over a sample history kept in the testbench.
// The test checks: the impulse response and its two-clock latency, full
// scale inputs of both signs, 3000 clocks of random full-amplitude samples
// with a random clock enable (a low enable must hold the output), and reset.
module tb_fir_df_sym;
  localparam int CS1A [13] = '{256, 192, 57, -36, -41, 0, 22, 10, -7, -8, 0, 4, 1};
  localparam int CEV  [4]  = '{-9, 20, 3, 1};

  logic clk = 0, rst_n = 0, en = 0;
  logic signed [11:0] x_in = '0;
  logic signed [23:0] y_sub, y_sa, y_ev;
  logic signed [11:0] hist [25];
  longint exp_s1a, exp_ev;
  int checks = 0, failures = 0, stalls = 0;

  fir_df_sym dut_sub (.clk, .rst_n, .en, .x_in, .y_out(y_sub));
  fir_df_sym #(.SOP_STYLE(fir_pkg::SOP_SHIFT_ADD)) dut_sa (.clk, .rst_n, .en, .x_in, .y_out(y_sa));
  fir_df_sym #(.TAPS(8), .COEF(CEV), .SOP_STYLE(fir_pkg::SOP_SHIFT_ADD)) dut_ev (
    .clk, .rst_n, .en, .x_in, .y_out(y_ev));

  always #5 clk = ~clk;

  function automatic int h25(input int k);   // full impulse response, 25 taps
    return CS1A[(k < 12) ? 12 - k : k - 12];
  endfunction
  function automatic int h8(input int k);    // full impulse response, 8 taps
    return CEV[(k < 4) ? 3 - k : k - 4];
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one clock: apply (en, x) at the falling edge, update the model at the
  // rising edge, compare after it
  task automatic step(input logic e, input logic signed [11:0] x);
    en   = e;
    x_in = x;
    @(posedge clk);
    if (e) begin
      exp_s1a = 0;
      exp_ev  = 0;
      for (int k = 0; k < 25; k++) exp_s1a += longint'(h25(k)) * longint'(hist[k]);
      for (int k = 0; k < 8; k++)  exp_ev  += longint'(h8(k))  * longint'(hist[k]);
      for (int k = 24; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = x;
    end else stalls++;
    @(negedge clk);
    checks += 3;
    if (longint'(y_sub) != exp_s1a) begin failures++; $display("FAIL subexpr %0d vs %0d", y_sub, exp_s1a); end
    if (longint'(y_sa)  != exp_s1a) begin failures++; $display("FAIL shift-add %0d vs %0d", y_sa, exp_s1a); end
    if (longint'(y_ev)  != exp_ev)  begin failures++; $display("FAIL even %0d vs %0d", y_ev, exp_ev); end
  endtask

  initial begin
    for (int k = 0; k < 25; k++) hist[k] = '0;
    exp_s1a = 0;
    exp_ev  = 0;
    @(negedge clk); @(negedge clk);
    rst_n = 1;
    // impulse of height 1000: output k+1 clocks after the impulse is h_k*1000
    step(1'b1, 12'sd1000);
    checks++;
    if (y_sub != 0) begin failures++; $display("FAIL output one clock after the impulse"); end
    for (int k = 0; k < 25; k++) begin
      step(1'b1, 12'sd0);
      checks++;
      if (int'(y_sub) != 1000 * h25(k)) begin failures++; $display("FAIL impulse tap %0d: %0d", k, y_sub); end
    end
    // full scale, matched to the coefficient signs (largest positive output)
    for (int k = 0; k < 25; k++) step(1'b1, (h25(24 - k) < 0) ? -12'sd2048 : 12'sd2047);
    step(1'b1, 12'sd0);
    for (int k = 0; k < 25; k++) step(1'b1, (h25(24 - k) < 0) ? 12'sd2047 : -12'sd2048);
    step(1'b1, 12'sd0);
    // white noise with a random enable
    for (int c = 0; c < 3000; c++) step(($urandom % 5) != 0, 12'($urandom));
    // reset clears the output and the delay line
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 25; k++) hist[k] = '0;
    exp_s1a = 0;
    exp_ev  = 0;
    checks++;
    if (y_sub != 0 || y_sa != 0 || y_ev != 0) begin failures++; $display("FAIL reset"); end
    step(1'b1, 12'sd0);
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL enable never low"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
