// sop_min_example -- registered six-input sum of products with manually
// shared sub-expressions.
//
// Computes y = sum_{k=0}^{5} (3 + 5*2^(5+k)) * x_k, i.e. the coefficients
// 163, 323, 643, 1283, 2563 and 5123.  Written out in canonic signed digits
// every coefficient contains the pattern 10-1 (= 3) at shift 0 and the
// pattern 101 (= 5) at shift 5+k, so the block first forms
//     x_sum   = sum_k x_k
//     x_shift = sum_k x_k << (5+k)
// and then y = (x_sum << 2) - x_sum + (x_shift << 2) + x_shift: 13 adders
// instead of the 23 of a digit-by-digit shift-and-add.  The arithmetic is
// a subexpr_sop with the term table fir_pkg::MIN_TERMS.
//
// Interface: clk, rst_n (active-low synchronous reset), x[6] (12-bit signed)
// -> y (26-bit signed, enough for the largest possible result).  Inputs and
// the output are registered, so a set of inputs presented before edge t
// appears on y after edge t+1 (latency two clocks, one result per clock).
// The coefficients and the sharing scheme follow the document; the
// register boundary, reset and output width are this design's choices.
module sop_min_example #(
  parameter int unsigned IN_W  = fir_pkg::FIR_IN_W,
  parameter int unsigned OUT_W = fir_pkg::MIN_OUT_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [IN_W-1:0]  x [fir_pkg::MIN_N],
  output logic signed [OUT_W-1:0] y
);
  localparam int unsigned N = fir_pkg::MIN_N;

  logic signed [IN_W-1:0]  x_q [N];
  logic signed [OUT_W-1:0] y_comb;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) x_q[k] <= '0;
      y <= '0;
    end else begin
      x_q <= x;
      y   <= y_comb;
    end
  end

  subexpr_sop #(
    .N_IN   (N),
    .IN_W   (IN_W),
    .OUT_W  (OUT_W),
    .N_SUB  (fir_pkg::MIN_NSUB),
    .SUB_VAL(fir_pkg::MIN_SUB_VAL),
    .N_TERMS(fir_pkg::MIN_NTERMS),
    .TERMS  (fir_pkg::MIN_TERMS)
  ) u_sop (
    .in(x_q),
    .y (y_comb)
  );
endmodule
