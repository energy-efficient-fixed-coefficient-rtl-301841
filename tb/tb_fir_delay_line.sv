// tb_fir_delay_line -- self-checking test of the structural delay line
// (25 taps of 12 bits).  Random samples are pushed with a random clock
// enable; a sample history kept in the testbench gives every tap's
// expected value after each clock.  Checks the one-clock input latency,
// that a low enable holds every tap, and that reset clears all taps.
module tb_fir_delay_line;
  localparam int TAPS = 25;
  logic clk = 0, rst_n = 0, en = 0;
  logic signed [11:0] x_in = '0;
  logic signed [11:0] taps [TAPS];
  logic signed [11:0] hist [$];
  int checks = 0, failures = 0, holds = 0;

  fir_delay_line #(.TAPS(TAPS), .W(12)) dut (.clk, .rst_n, .en, .x_in, .taps);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int k = 0; k < TAPS; k++) begin
      checks++;
      if (taps[k] != hist[k]) begin
        failures++;
        $display("FAIL tap %0d: got %0d expected %0d", k, taps[k], hist[k]);
      end
    end
  endtask

  initial begin
    for (int k = 0; k < TAPS; k++) hist.push_back('0);
    @(negedge clk); @(negedge clk);
    rst_n = 1;
    compare();
    for (int c = 0; c < 2000; c++) begin
      en   = ($urandom % 4) != 0;
      x_in = 12'($urandom);
      @(posedge clk);
      if (en) begin
        hist.push_front(x_in);
        void'(hist.pop_back());
      end else holds++;
      @(negedge clk);
      compare();
    end
    rst_n = 0;
    @(negedge clk);
    for (int k = 0; k < TAPS; k++) hist[k] = '0;
    compare();
    checks++;
    if (holds == 0) begin failures++; $display("FAIL enable never low"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
