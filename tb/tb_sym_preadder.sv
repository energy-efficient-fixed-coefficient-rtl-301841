// tb_sym_preadder -- self-checking test of the symmetric pre-adder for an
// odd (25-tap, type I) and an even (8-tap, type II) filter length.  Random
// and extreme taps; each pair sum is compared with the two mirrored taps
// added in the testbench, and the centre tap of the odd filter with the
// centre input.
module tb_sym_preadder;
  logic signed [11:0] t25 [25];
  logic signed [12:0] u25 [13];
  logic signed [11:0] t8  [8];
  logic signed [12:0] u8  [4];
  int checks = 0, failures = 0;

  sym_preadder #(.TAPS(25), .W(12)) dut25 (.taps(t25), .u(u25));
  sym_preadder #(.TAPS(8),  .W(12)) dut8  (.taps(t8),  .u(u8));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 1000; it++) begin
      for (int k = 0; k < 25; k++) t25[k] = (it == 0) ? 12'sh7ff : (it == 1) ? -12'sd2048 : 12'($urandom);
      for (int k = 0; k < 8; k++)  t8[k]  = (it == 0) ? 12'sh7ff : (it == 1) ? -12'sd2048 : 12'($urandom);
      #1;
      checks++;
      if (int'(u25[0]) != int'(t25[12])) begin failures++; $display("FAIL centre"); end
      for (int n = 1; n < 13; n++) begin
        checks++;
        if (int'(u25[n]) != int'(t25[12-n]) + int'(t25[12+n])) begin
          failures++; $display("FAIL odd pair %0d", n);
        end
      end
      for (int n = 0; n < 4; n++) begin
        checks++;
        if (int'(u8[n]) != int'(t8[3-n]) + int'(t8[4+n])) begin
          failures++; $display("FAIL even pair %0d", n);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
