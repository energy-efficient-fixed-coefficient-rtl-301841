// tb_csd_mult -- self-checking test of the CSD shift-and-add constant
// multiplier.  Six instances with positive, negative, even, odd and large
// coefficients are driven with the extreme 12-bit values and 2000 random
// samples; every product is compared with the integer product computed in
// the testbench.  The canonic recoding is checked as well: digit counts of
// known coefficients, no two adjacent non-zero digits, and the digits
// summing back to the coefficient.
module tb_csd_mult;
  localparam int NC = 6;
  localparam int CS [NC] = '{7, -41, 192, 5123, 1, -36};
  logic signed [11:0] x;
  logic signed [25:0] y [NC];
  int checks = 0, failures = 0;

  for (genvar i = 0; i < NC; i++) begin : g_dut
    csd_mult #(.COEF(CS[i]), .IN_W(12), .OUT_W(26)) dut (.x(x), .y(y[i]));
  end

  task automatic check_all();
    #1;
    for (int i = 0; i < NC; i++) begin
      checks++;
      if (int'(y[i]) != CS[i] * int'(x)) begin
        failures++;
        $display("FAIL coef %0d x %0d: got %0d", CS[i], x, y[i]);
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // recoding
    begin
      int cc [5] = '{57, 192, 22, 15, 5123};
      int nd [5] = '{3, 2, 3, 2, 4};
      for (int i = 0; i < 5; i++) begin
        logic [31:0] p, n;
        longint v;
        p = fir_pkg::csd_pos(cc[i]);
        n = fir_pkg::csd_neg(cc[i]);
        v = 0;
        for (int b = 0; b < 32; b++) v += (longint'(p[b]) - longint'(n[b])) <<< b;
        checks++;
        if (fir_pkg::csd_count(cc[i]) != nd[i] || v != cc[i] || ((p | n) & ((p | n) >> 1)) != 0) begin
          failures++;
          $display("FAIL CSD recoding of %0d", cc[i]);
        end
      end
    end
    x = 12'sh7ff; check_all();
    x = -12'sd2048; check_all();
    x = 0; check_all();
    x = -1; check_all();
    repeat (2000) begin
      x = 12'($urandom);
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
