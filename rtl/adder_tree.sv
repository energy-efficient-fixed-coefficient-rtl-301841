// adder_tree -- structural adder tree of a direct-form FIR filter.
//
// Sums N signed words in a balanced binary tree of ceil(log2 N) levels:
// level l+1 adds neighbouring pairs of level l, an odd word at the end of
// a level passes to the next level unchanged.  The tree shape keeps the
// logic depth at log2 N adders instead of the N-1 of a chain, which is the
// reason a direct-form filter can optimise its structural adders together.
//
// Interface: in[N] (W bits each, signed) -> sum (W bits, signed), wrapping
// modulo 2^W.  Purely combinational, no latency.  The document gives the
// function (an adder tree summing the products); the balanced pairwise
// shape and the single common width W are this design's choices.
module adder_tree #(
  parameter int unsigned N = 13,
  parameter int unsigned W = 24
) (
  input  logic signed [W-1:0] in  [N],
  output logic signed [W-1:0] sum
);
  localparam int unsigned LEVELS = (N > 1) ? $clog2(N) : 0;

  // number of words on level l
  function automatic int unsigned words(input int unsigned l);
    return (N + (1 << l) - 1) >> l;
  endfunction

  always_comb begin
    logic signed [W-1:0] node [N];   // one level of partial sums, reused in place
    for (int i = 0; i < N; i++) node[i] = in[i];
    for (int l = 0; l < LEVELS; l++) begin
      for (int i = 0; i < N; i++) begin
        if (i < words(l + 1)) begin
          if (2 * i + 1 < words(l)) node[i] = node[2*i] + node[2*i+1];
          else                      node[i] = node[2*i];
        end
      end
    end
    sum = node[0];
  end
endmodule
