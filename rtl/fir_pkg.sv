// fir_pkg -- constants, types and elaboration-time helpers shared by the
// fixed-coefficient FIR filter and its sum-of-products blocks.
//
// Contents:
//   * Word widths.  Input samples are 12-bit two's complement, the width used
//     for every experiment this design is built around.  The 24-bit output
//     width is chosen so that the filter holds exactly 25*12 + 24 = 324
//     flip-flops, the register count quoted for the direct-form S1a filter.
//   * S1A_COEF: the 13 unique integer coefficients of the 25-tap symmetric
//     low-pass filter (specification S1a: f_p = 0.15, f_s = 0.25,
//     ripple 0.00645), centre tap first.  They carry 21 signed digits in
//     canonic signed digit (CSD) form, the optimum for that specification.
//   * CSD recoding functions: csd_pos()/csd_neg() return bit masks of the +1
//     and -1 digits of the canonic (non-adjacent) signed-digit form.
//   * sop_term_t and the term tables that describe a sum of products built
//     from shared sub-expressions (see subexpr_sop).  A term says "add (or
//     subtract) input INP shifted left by SHIFT into the group of
//     sub-expression SUB"; the group sum is then multiplied by the
//     sub-expression's value.  The S1a table uses the sub-expressions
//     1, 3 = 10-1, 5 = 101 and 7 = 100-1 (CSD), each reused twice; the
//     choice of these three follows the greedy three-sub-expression search
//     the design is based on, done by hand for this coefficient set.
package fir_pkg;

  localparam int unsigned FIR_IN_W  = 12;   // input sample width
  localparam int unsigned FIR_OUT_W = 24;   // filter output width

  // ---- S1a filter: 25 taps, symmetric (type I), centre tap first ----------
  localparam int unsigned S1A_TAPS  = 25;
  localparam int unsigned S1A_NUNIQ = 13;
  localparam int S1A_COEF [S1A_NUNIQ] =
    '{256, 192, 57, -36, -41, 0, 22, 10, -7, -8, 0, 4, 1};

  // ---- canonic signed digit recoding -------------------------------------
  // Non-adjacent form: scan from the LSB; an odd remainder r produces digit
  // +1 when r mod 4 == 1 and -1 when r mod 4 == 3.
  function automatic logic [31:0] csd_pos(input int c);
    logic [31:0] m;
    longint r;
    m = '0;
    r = longint'(c);
    for (int i = 0; i < 32; i++) begin
      if (r[0]) begin
        if (r[1] == 1'b0) begin m[i] = 1'b1; r = r - 1; end
        else              begin               r = r + 1; end
      end
      r = r >>> 1;
    end
    return m;
  endfunction

  function automatic logic [31:0] csd_neg(input int c);
    logic [31:0] m;
    longint r;
    m = '0;
    r = longint'(c);
    for (int i = 0; i < 32; i++) begin
      if (r[0]) begin
        if (r[1] == 1'b1) begin m[i] = 1'b1; r = r + 1; end
        else              begin               r = r - 1; end
      end
      r = r >>> 1;
    end
    return m;
  endfunction

  // number of non-zero signed digits of c
  function automatic int csd_count(input int c);
    return $countones(csd_pos(c)) + $countones(csd_neg(c));
  endfunction

  // ---- sub-expression sum-of-products description -----------------------
  typedef struct packed {
    logic [7:0] sub;    // index into the sub-expression value list
    logic [7:0] inp;    // which SOP input
    logic [7:0] shift;  // left shift applied to that input
    logic       neg;    // 1: subtract, 0: add
  } sop_term_t;

  function automatic sop_term_t mk_term(input logic [7:0] sub, input logic [7:0] inp,
                                        input logic [7:0] shift, input logic neg);
    sop_term_t t;
    t.sub   = sub;
    t.inp   = inp;
    t.shift = shift;
    t.neg   = neg;
    return t;
  endfunction

  // S1a: sub-expressions 1, 3 (10-1), 5 (101), 7 (100-1)
  localparam int unsigned S1A_NSUB = 4;
  localparam int S1A_SUB_VAL [S1A_NSUB] = '{1, 3, 5, 7};
  localparam int unsigned S1A_NTERMS = 15;
  localparam sop_term_t S1A_TERMS [S1A_NTERMS] = '{
    mk_term(0,  0, 8, 1'b0),                          //  256 = 1<<8
    mk_term(1,  1, 6, 1'b0),                          //  192 = 3<<6
    mk_term(3,  2, 3, 1'b0), mk_term(0,  2, 0, 1'b0), //   57 = 7<<3 + 1
    mk_term(0,  3, 5, 1'b1), mk_term(0,  3, 2, 1'b1), //  -36 = -(1<<5) - (1<<2)
    mk_term(2,  4, 3, 1'b1), mk_term(0,  4, 0, 1'b1), //  -41 = -(5<<3) - 1
    mk_term(1,  6, 3, 1'b0), mk_term(0,  6, 1, 1'b1), //   22 = 3<<3 - (1<<1)
    mk_term(2,  7, 1, 1'b0),                          //   10 = 5<<1
    mk_term(3,  8, 0, 1'b1),                          //   -7 = -7
    mk_term(0,  9, 3, 1'b1),                          //   -8 = -(1<<3)
    mk_term(0, 11, 2, 1'b0),                          //    4 = 1<<2
    mk_term(0, 12, 0, 1'b0)                           //    1
  };

  // ---- minimal sum-of-products example: y = sum_k (3 + 5*2^(5+k)) x_k ----
  localparam int unsigned MIN_N      = 6;
  localparam int unsigned MIN_OUT_W  = 26;  // 2048 * sum|c| = 20,680,704 < 2^25
  localparam int unsigned MIN_NSUB   = 2;
  localparam int MIN_SUB_VAL [MIN_NSUB] = '{3, 5};  // 10-1 and 101
  localparam int unsigned MIN_NTERMS = 12;
  localparam sop_term_t MIN_TERMS [MIN_NTERMS] = '{
    mk_term(0, 0, 0, 1'b0), mk_term(0, 1, 0, 1'b0), mk_term(0, 2, 0, 1'b0),
    mk_term(0, 3, 0, 1'b0), mk_term(0, 4, 0, 1'b0), mk_term(0, 5, 0, 1'b0),
    mk_term(1, 0, 5, 1'b0), mk_term(1, 1, 6, 1'b0), mk_term(1, 2, 7, 1'b0),
    mk_term(1, 3, 8, 1'b0), mk_term(1, 4, 9, 1'b0), mk_term(1, 5, 10, 1'b0)
  };

  // SOP style of the direct-form filter
  typedef enum logic [0:0] {
    SOP_SHIFT_ADD = 1'b0,  // one CSD multiplier per coefficient + adder tree
    SOP_SUBEXPR   = 1'b1   // shared sub-expressions (term table)
  } sop_style_e;

endpackage
