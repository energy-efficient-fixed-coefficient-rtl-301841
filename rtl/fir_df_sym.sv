// fir_df_sym -- symmetric direct-form fixed-coefficient FIR filter.
//
// Computes y[n] = sum_{k=0}^{TAPS-1} h_k x[n-k] for a linear-phase filter
// (h_k = h_{TAPS-1-k}) whose coefficients are wired in as constants.  The
// datapath is the direct form:
//
//   x_in -> fir_delay_line (TAPS x IN_W registers, taps[0] = input register)
//        -> sym_preadder   (pairs of taps that share a coefficient are added)
//        -> sum of products with the NUNIQ unique coefficients
//        -> output register y_out
//
// The sum of products is built in one of two ways, chosen by SOP_STYLE:
//   SOP_SHIFT_ADD : one csd_mult per non-zero unique coefficient (shift and
//                   add over the canonic signed digits), summed by an
//                   adder_tree.  Zero coefficients cost nothing.
//   SOP_SUBEXPR   : subexpr_sop with a table of terms that reuses common
//                   sub-expressions across coefficients (default; for the
//                   S1a coefficients it needs 16 adders instead of 20).
// An elaboration-time check rebuilds every coefficient from the term table
// and stops elaboration if the table does not match COEF.
//
// Interface: clk, rst_n (active-low synchronous reset clearing the delay
// line and the output), en (clock enable: when low, the delay line and the
// output register hold), x_in (IN_W-bit signed sample) -> y_out (OUT_W-bit
// signed).  Timing: one sample per enabled clock; a sample presented with
// en high at edge t is in the input register after t and contributes to
// y_out after the next enabled edge, a latency of two enabled clocks, with
// no pipelining between the input and output registers.
//
// Defaults: the 25-tap S1a coefficient set, 12-bit input, 24-bit output,
// giving 25*12 + 24 = 324 flip-flops.  The direct form, the pre-adder, the
// CSD shift-and-add multipliers and the sub-expression sharing follow the
// document.  The clock enable, the reset, the 24-bit output width (a
// 22-bit result would already be exact) and the S1a sub-expression table
// are this design's choices.
module fir_df_sym
  import fir_pkg::*;
#(
  parameter int unsigned TAPS    = fir_pkg::S1A_TAPS,
  parameter int unsigned IN_W    = fir_pkg::FIR_IN_W,
  parameter int unsigned OUT_W   = fir_pkg::FIR_OUT_W,
  parameter int unsigned NUNIQ   = (TAPS + 1) / 2,
  parameter int          COEF    [NUNIQ]   = fir_pkg::S1A_COEF,
  parameter sop_style_e  SOP_STYLE         = SOP_SUBEXPR,
  parameter int unsigned N_SUB   = fir_pkg::S1A_NSUB,
  parameter int          SUB_VAL [N_SUB]   = fir_pkg::S1A_SUB_VAL,
  parameter int unsigned N_TERMS = fir_pkg::S1A_NTERMS,
  parameter sop_term_t   TERMS   [N_TERMS] = fir_pkg::S1A_TERMS
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic signed [IN_W-1:0]  x_in,
  output logic signed [OUT_W-1:0] y_out
);
  // coefficient that the term table realises for pre-added input n
  function automatic longint table_coef(input int n);
    longint c;
    c = 0;
    for (int t = 0; t < N_TERMS; t++) begin
      for (int s = 0; s < N_SUB; s++) begin
        if (int'(TERMS[t].inp) == n && int'(TERMS[t].sub) == s) begin
          if (TERMS[t].neg) c = c - (longint'(SUB_VAL[s]) <<< TERMS[t].shift);
          else              c = c + (longint'(SUB_VAL[s]) <<< TERMS[t].shift);
        end
      end
    end
    return c;
  endfunction

  logic signed [IN_W-1:0]  taps [TAPS];
  logic signed [IN_W:0]    u    [NUNIQ];
  logic signed [OUT_W-1:0] y_comb;

  fir_delay_line #(.TAPS(TAPS), .W(IN_W)) u_delay (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (en),
    .x_in (x_in),
    .taps (taps)
  );

  sym_preadder #(.TAPS(TAPS), .W(IN_W), .NUNIQ(NUNIQ)) u_preadd (
    .taps(taps),
    .u   (u)
  );

  if (SOP_STYLE == SOP_SHIFT_ADD) begin : g_shift_add
    logic signed [OUT_W-1:0] prod [NUNIQ];
    for (genvar n = 0; n < NUNIQ; n++) begin : g_scm
      if (COEF[n] != 0) begin : g_mult
        csd_mult #(.COEF(COEF[n]), .IN_W(IN_W + 1), .OUT_W(OUT_W)) u_mult (
          .x(u[n]),
          .y(prod[n])
        );
      end else begin : g_zero
        assign prod[n] = '0;
      end
    end
    adder_tree #(.N(NUNIQ), .W(OUT_W)) u_tree (
      .in (prod),
      .sum(y_comb)
    );
  end else begin : g_subexpr
    for (genvar n = 0; n < NUNIQ; n++) begin : g_chk
      if (table_coef(n) != longint'(COEF[n])) begin : g_bad
        $error("fir_df_sym: term table gives %0d for coefficient %0d, expected %0d",
               table_coef(n), n, COEF[n]);
      end
    end

    subexpr_sop #(
      .N_IN   (NUNIQ),
      .IN_W   (IN_W + 1),
      .OUT_W  (OUT_W),
      .N_SUB  (N_SUB),
      .SUB_VAL(SUB_VAL),
      .N_TERMS(N_TERMS),
      .TERMS  (TERMS)
    ) u_sop (
      .in(u),
      .y (y_comb)
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  y_out <= '0;
    else if (en) y_out <= y_comb;
  end
endmodule
