// csd_mult -- single constant multiplication (SCM) by shift-and-add.
//
// Multiplies the signed input x by the fixed integer COEF without a
// multiplier: |COEF| is recoded at elaboration time into canonic signed
// digits (no two adjacent non-zero digits, fewest non-zero digits), and the
// product is the sum of x shifted to each +1 digit minus x shifted to each
// -1 digit.  For example 7x = (x << 3) - x.  A negative coefficient is
// realised as the positive product followed by a two's complement negation,
// the usual treatment of negative constants.  Each non-zero digit beyond
// the first costs one adder or subtractor.
//
// Interface: x (IN_W bits, signed) -> y (OUT_W bits, signed) = COEF * x,
// wrapping modulo 2^OUT_W.  Purely combinational, no latency.
// The shift-and-add structure and CSD recoding follow the document's
// description; accumulating in one OUT_W-wide variable (rather than trimming
// each partial sum to its own width) is this design's choice.
module csd_mult #(
  parameter int          COEF  = 57,
  parameter int unsigned IN_W  = 12,
  parameter int unsigned OUT_W = 24
) (
  input  logic signed [IN_W-1:0]  x,
  output logic signed [OUT_W-1:0] y
);
  localparam int          MAG  = (COEF < 0) ? -COEF : COEF;
  localparam logic [31:0] POS  = fir_pkg::csd_pos(MAG);
  localparam logic [31:0] NEG  = fir_pkg::csd_neg(MAG);
  localparam int unsigned NDIG = (OUT_W < 32) ? OUT_W : 32;

  logic signed [OUT_W-1:0] xe;
  logic signed [OUT_W-1:0] acc;

  assign xe = OUT_W'(x);   // sign extension of a signed operand

  always_comb begin
    acc = '0;
    for (int i = 0; i < NDIG; i++) begin
      if (POS[i])      acc = acc + (xe <<< i);
      else if (NEG[i]) acc = acc - (xe <<< i);
    end
  end

  assign y = (COEF < 0) ? -acc : acc;
endmodule
