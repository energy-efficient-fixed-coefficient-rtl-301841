// sym_preadder -- coefficient-pair pre-adder of a symmetric FIR filter.
//
// A linear-phase filter has h[k] = h[TAPS-1-k], so the two taps that share
// a coefficient are added before the multiplication and the filter needs
// only one constant multiplier per unique coefficient.  Outputs are ordered
// from the centre outwards: for an odd TAPS (type I) u[0] is the centre tap
// and u[n] = x[C-n] + x[C+n] with C = (TAPS-1)/2; for an even TAPS
// (type II) u[n] = x[TAPS/2-1-n] + x[TAPS/2+n].  This ordering matches the
// coefficient lists of fir_pkg (centre coefficient first).
//
// Interface: taps[TAPS] (W bits, signed) -> u[NUNIQ] (W+1 bits, signed),
// NUNIQ = ceil(TAPS/2).  Purely combinational; the pair sums are exact.
// The pre-addition itself follows the document; the output ordering is
// this design's choice.
module sym_preadder #(
  parameter int unsigned TAPS  = 25,
  parameter int unsigned W     = 12,
  parameter int unsigned NUNIQ = (TAPS + 1) / 2
) (
  input  logic signed [W-1:0] taps [TAPS],
  output logic signed [W:0]   u    [NUNIQ]
);
  localparam bit ODD = (TAPS % 2) == 1;
  localparam int unsigned C = (TAPS - 1) / 2;

  for (genvar n = 0; n < NUNIQ; n++) begin : g_pair
    if (ODD && n == 0) begin : g_centre
      assign u[n] = (W+1)'(taps[C]);
    end else if (ODD) begin : g_odd
      assign u[n] = (W+1)'(taps[C-n]) + (W+1)'(taps[C+n]);
    end else begin : g_even
      assign u[n] = (W+1)'(taps[TAPS/2-1-n]) + (W+1)'(taps[TAPS/2+n]);
    end
  end
endmodule
