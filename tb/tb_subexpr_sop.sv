// tb_subexpr_sop -- self-checking test of the shared-sub-expression sum of
// products with two term tables: the six-input example
// (coefficients 3 + 5*2^(5+k)) and the 13-coefficient S1a filter table.
// Inputs take extreme and random values; the outputs are compared with
// sum_n c_n * in[n] evaluated in the testbench from the coefficient lists,
// which are written out independently of the term tables.
module tb_subexpr_sop;
  localparam int CMIN [6]  = '{163, 323, 643, 1283, 2563, 5123};
  localparam int CS1A [13] = '{256, 192, 57, -36, -41, 0, 22, 10, -7, -8, 0, 4, 1};

  logic signed [11:0] xm [6];
  logic signed [25:0] ym;
  logic signed [12:0] xs [13];
  logic signed [23:0] ys;
  int checks = 0, failures = 0;

  subexpr_sop dut_min (.in(xm), .y(ym));   // defaults: the six-input example

  subexpr_sop #(
    .N_IN(13), .IN_W(13), .OUT_W(24),
    .N_SUB(fir_pkg::S1A_NSUB), .SUB_VAL(fir_pkg::S1A_SUB_VAL),
    .N_TERMS(fir_pkg::S1A_NTERMS), .TERMS(fir_pkg::S1A_TERMS)
  ) dut_s1a (.in(xs), .y(ys));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 3000; it++) begin
      longint em, es;
      em = 0;
      es = 0;
      for (int k = 0; k < 6; k++) begin
        xm[k] = (it == 0) ? 12'sh7ff : (it == 1) ? -12'sd2048 : (it == 2) ? ((k == 3) ? 12'sd1 : 12'sd0) : 12'($urandom);
        em += longint'(CMIN[k]) * longint'(xm[k]);
      end
      for (int n = 0; n < 13; n++) begin
        xs[n] = (it == 0) ? 13'sd4094 : (it == 1) ? -13'sd4096 : 13'($urandom);
        es += longint'(CS1A[n]) * longint'(xs[n]);
      end
      #1;
      checks += 2;
      if (longint'(ym) != em) begin failures++; $display("FAIL min it %0d: %0d vs %0d", it, ym, em); end
      if (longint'(ys) != es) begin failures++; $display("FAIL s1a it %0d: %0d vs %0d", it, ys, es); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
