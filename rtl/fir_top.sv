// fir_top -- the two datapaths of this design side by side.
//
//  * u_fir: the 25-tap symmetric direct-form low-pass filter for the S1a
//    specification (fir_df_sym at its defaults: 12-bit input, 24-bit
//    output, sum of products with shared sub-expressions).
//  * u_sop: the six-input sum-of-products example with manually shared
//    sub-expressions (sop_min_example).
//
// The two share only the clock and reset; each has its own ports.
// Interface: clk, rst_n (active-low synchronous reset), fir_en (clock
// enable of the filter), fir_x -> fir_y (latency two enabled clocks);
// sop_x[6] -> sop_y (latency two clocks).  Placing the two blocks in one
// top is this design's choice; they are independent circuits.
module fir_top (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic                                  fir_en,
  input  logic signed [fir_pkg::FIR_IN_W-1:0]   fir_x,
  output logic signed [fir_pkg::FIR_OUT_W-1:0]  fir_y,
  input  logic signed [fir_pkg::FIR_IN_W-1:0]   sop_x [fir_pkg::MIN_N],
  output logic signed [fir_pkg::MIN_OUT_W-1:0]  sop_y
);
  fir_df_sym u_fir (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (fir_en),
    .x_in (fir_x),
    .y_out(fir_y)
  );

  sop_min_example u_sop (
    .clk  (clk),
    .rst_n(rst_n),
    .x    (sop_x),
    .y    (sop_y)
  );
endmodule
