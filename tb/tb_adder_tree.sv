// tb_adder_tree -- self-checking test of the structural adder tree at
// three sizes (13 inputs as in the S1a filter, 5 and 1).  Inputs are set to
// extreme and random values and the tree's sum is compared with a plain
// sum worked out in the testbench.
module tb_adder_tree;
  logic signed [23:0] a13 [13];
  logic signed [23:0] a5  [5];
  logic signed [23:0] a1  [1];
  logic signed [23:0] s13, s5, s1;
  int checks = 0, failures = 0;

  adder_tree #(.N(13), .W(24)) dut13 (.in(a13), .sum(s13));
  adder_tree #(.N(5),  .W(24)) dut5  (.in(a5),  .sum(s5));
  adder_tree #(.N(1),  .W(24)) dut1  (.in(a1),  .sum(s1));

  function automatic logic signed [23:0] ref_sum(input logic signed [23:0] v [], input int n);
    logic signed [23:0] s = '0;
    for (int i = 0; i < n; i++) s += v[i];
    return s;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 3000; it++) begin
      logic signed [23:0] e13 [] = new[13];
      logic signed [23:0] e5  [] = new[5];
      for (int i = 0; i < 13; i++) begin
        a13[i] = (it == 0) ? 24'sh7fffff : (it == 1) ? 24'(i + 1) : 24'($urandom) >>> ($urandom % 12);
        e13[i] = a13[i];
      end
      for (int i = 0; i < 5; i++) begin
        a5[i] = 24'($urandom);
        e5[i] = a5[i];
      end
      a1[0] = 24'($urandom);
      #1;
      checks += 3;
      if (s13 != ref_sum(e13, 13)) begin failures++; $display("FAIL N=13 it %0d", it); end
      if (s5  != ref_sum(e5, 5))   begin failures++; $display("FAIL N=5 it %0d", it); end
      if (s1  != a1[0])            begin failures++; $display("FAIL N=1 it %0d", it); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
