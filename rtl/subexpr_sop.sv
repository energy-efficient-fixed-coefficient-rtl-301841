// subexpr_sop -- sum of products with shared common sub-expressions.
//
// Computes y = sum_n c_n * in[n] for fixed integer coefficients c_n that
// are given, not as numbers, but as a table of terms built from a short
// list of sub-expressions (small odd constants such as 3 = 10-1 or
// 5 = 101 in canonic signed digits).  Every term adds or subtracts one
// input, shifted left, into the group of one sub-expression:
//
//     G_s = sum over terms t with t.sub == s of  (+/-) in[t.inp] << t.shift
//     y   = sum_s SUB_VAL[s] * G_s
//
// Each sub-expression is thus multiplied once, by a csd_mult, however many
// coefficients contain it: a sub-expression that occurs k times saves k-1
// adders compared with expanding every coefficient into its own signed
// digits.  The group products are summed by an adder_tree.  With
// SUB_VAL = {3, 5} and the terms of fir_pkg::MIN_TERMS this is exactly
// y = (x_sum << 2) - x_sum + (x_shift << 2) + x_shift.  Plain shift-and-add
// is the special case of a single sub-expression of value 1.
//
// The coefficient each input receives is C(n) = sum over its terms of
// (+/-) SUB_VAL[sub] << shift; a table that does not realise the intended
// coefficients is caught by comparing with the coefficient list at
// elaboration (see fir_df_sym) and by simulation.
//
// Interface: in[N_IN] (IN_W bits, signed) -> y (OUT_W bits, signed),
// modulo 2^OUT_W.  Purely combinational, no latency.  The sharing scheme is
// the document's; the table format and the single internal width OUT_W are
// this design's choices.
module subexpr_sop #(
  parameter int unsigned N_IN    = 6,
  parameter int unsigned IN_W    = 12,
  parameter int unsigned OUT_W   = 26,
  parameter int unsigned N_SUB   = 2,
  parameter int          SUB_VAL [N_SUB]   = '{3, 5},
  parameter int unsigned N_TERMS = 12,
  parameter fir_pkg::sop_term_t TERMS   [N_TERMS] = fir_pkg::MIN_TERMS
) (
  input  logic signed [IN_W-1:0]  in [N_IN],
  output logic signed [OUT_W-1:0] y
);
  logic signed [OUT_W-1:0] grp  [N_SUB];
  logic signed [OUT_W-1:0] prod [N_SUB];

  // each term: one input, sign-extended and shifted (a constant shift is wiring)
  logic signed [OUT_W-1:0] tv [N_TERMS];
  for (genvar t = 0; t < N_TERMS; t++) begin : g_term
    localparam int INP = int'(TERMS[t].inp);
    localparam int SH  = int'(TERMS[t].shift);
    assign tv[t] = OUT_W'(in[INP]) <<< SH;
  end

  // group sums: shifted inputs collected per sub-expression
  always_comb begin
    for (int s = 0; s < N_SUB; s++) begin
      grp[s] = '0;
      for (int t = 0; t < N_TERMS; t++) begin
        if (int'(TERMS[t].sub) == s) begin
          if (TERMS[t].neg) grp[s] = grp[s] - tv[t];
          else              grp[s] = grp[s] + tv[t];
        end
      end
    end
  end

  // one constant multiplication per sub-expression
  for (genvar s = 0; s < N_SUB; s++) begin : g_sub
    csd_mult #(.COEF(SUB_VAL[s]), .IN_W(OUT_W), .OUT_W(OUT_W)) u_mult (
      .x(grp[s]),
      .y(prod[s])
    );
  end

  adder_tree #(.N(N_SUB), .W(OUT_W)) u_tree (
    .in (prod),
    .sum(y)
  );

  // every term must name an existing sub-expression and input
  for (genvar t = 0; t < N_TERMS; t++) begin : g_chk
    if (int'(TERMS[t].sub) >= N_SUB || int'(TERMS[t].inp) >= N_IN) begin : g_bad
      $error("subexpr_sop: term %0d refers to a missing sub-expression or input", t);
    end
  end
endmodule
