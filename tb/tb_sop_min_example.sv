// tb_sop_min_example -- self-checking test of the registered six-input
// sum-of-products example.  A new random input set is applied every clock
// (extremes first); each output is compared with
// sum_k (3 + 5*2^(5+k)) * x_k computed in the testbench for the set applied
// two clocks earlier, which also checks the two-clock latency and the
// one-result-per-clock rate.  A single non-zero input is traced to
// measure the latency directly.
module tb_sop_min_example;
  logic clk = 0, rst_n = 0;
  logic signed [11:0] x [6];
  logic signed [25:0] y;
  longint exp_q [$];
  int checks = 0, failures = 0;

  sop_min_example dut (.clk, .rst_n, .x, .y);

  always #5 clk = ~clk;

  function automatic longint ref_y(input logic signed [11:0] v [6]);
    longint s = 0;
    for (int k = 0; k < 6; k++) s += (3 + 5 * (longint'(1) << (5 + k))) * longint'(v[k]);
    return s;
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    for (int k = 0; k < 6; k++) x[k] = '0;
    @(negedge clk); @(negedge clk);
    rst_n = 1;
    checks++;
    if (y != 0) begin failures++; $display("FAIL reset value"); end
    // latency: one impulse on input 5 (coefficient 5123)
    x[5] = 12'sd1;
    @(negedge clk);
    x[5] = 12'sd0;
    lat = 1;
    while (y == 0 && lat < 10) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 2 || y != 26'sd5123) begin failures++; $display("FAIL latency %0d value %0d", lat, y); end
    repeat (3) @(negedge clk);
    // streaming random sets
    exp_q.push_back(0);   // output after the first edge reflects the idle inputs
    for (int c = 0; c < 2000; c++) begin
      for (int k = 0; k < 6; k++) x[k] = (c == 0) ? 12'sh7ff : (c == 1) ? -12'sd2048 : 12'($urandom);
      exp_q.push_back(ref_y(x));
      @(negedge clk);
      begin
        longint e;
        e = exp_q.pop_front();
        checks++;
        if (longint'(y) != e) begin failures++; $display("FAIL cycle %0d: %0d vs %0d", c, y, e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
