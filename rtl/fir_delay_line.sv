// fir_delay_line -- structural delays of a direct-form FIR filter.
//
// A chain of TAPS registers of W bits.  taps[0] is the filter's input
// register and holds x[n], taps[k] holds x[n-k].  On each rising clock edge
// with en high the chain shifts by one sample and x_in enters taps[0]; with
// en low every register holds (a clock enable, so a data source may pause).
// This gives the TAPS*W flip-flops that a direct-form filter spends on
// delaying its input; the document counts them as (M+1)*B_in including the
// input register.
//
// Interface: clk, rst_n (active-low synchronous reset, clears all taps),
// en, x_in -> taps[TAPS].  Latency: x_in is visible on taps[0] one enabled
// clock after it is presented.  Reset, enable and the synchronous reset
// style are this design's choices; the document does not describe them.
module fir_delay_line #(
  parameter int unsigned TAPS = 25,
  parameter int unsigned W    = 12
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [W-1:0] x_in,
  output logic signed [W-1:0] taps [TAPS]
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS; k++) taps[k] <= '0;
    end else if (en) begin
      taps[0] <= x_in;
      for (int k = 1; k < TAPS; k++) taps[k] <= taps[k-1];
    end
  end
endmodule
