// llr_pkg: shared types and soft-logic arithmetic for the LDPC-MTR read channel.
//
// A soft bit is a log-likelihood ratio LLR(x) = ln P(x=0)/P(x=1) held as a
// signed two's-complement number of LLR_W bits. Positive means "probably 0".
// The range is kept symmetric (-LLR_MAX..+LLR_MAX) so that negation never
// overflows. The four functions below are the low-cost approximations of the
// exact LLR rules for Boolean gates with independent inputs:
//   NOT : -L                       (exact)
//   AND : max(L1, L2)              (output is 0 if either input is 0)
//   OR  : min(L1, L2)              (output is 1 if either input is 1)
//   XOR : sign(L1)*sign(L2)*min(|L1|,|L2|)
// These follow the source article; the word width and the fixed-point scale
// (one LSB = 1/4 nat by convention of this design) are this design's choice.
package llr_pkg;
  localparam int LLR_W   = 8;
  localparam int LLR_MAX = (1 << (LLR_W - 1)) - 1;

  typedef logic signed [LLR_W-1:0] llr_t;
  typedef logic [LLR_W-2:0]        llr_mag_t;

  typedef enum logic [1:0] {OP_NOT = 2'd0, OP_AND = 2'd1, OP_OR = 2'd2, OP_XOR = 2'd3} llr_op_e;

  // saturate a wide signed value into the symmetric llr_t range
  function automatic llr_t llr_sat(input logic signed [31:0] v);
    if (v > LLR_MAX)       return llr_t'(LLR_MAX);
    else if (v < -LLR_MAX) return llr_t'(-LLR_MAX);
    else                   return llr_t'(v);
  endfunction

  function automatic llr_t llr_not(input llr_t a);
    return llr_sat(-32'(a));
  endfunction

  function automatic llr_t llr_and(input llr_t a, input llr_t b);
    return (a > b) ? a : b;
  endfunction

  function automatic llr_t llr_or(input llr_t a, input llr_t b);
    return (a < b) ? a : b;
  endfunction

  function automatic llr_mag_t llr_abs(input llr_t a);
    logic signed [LLR_W:0] w;
    w = (a < 0) ? -(LLR_W+1)'(a) : (LLR_W+1)'(a);
    return (w > (LLR_W+1)'(LLR_MAX)) ? llr_mag_t'(LLR_MAX) : llr_mag_t'(w);
  endfunction

  function automatic llr_t llr_xor(input llr_t a, input llr_t b);
    llr_mag_t ma, mb, m;
    logic     neg;
    ma  = llr_abs(a);
    mb  = llr_abs(b);
    m   = (ma < mb) ? ma : mb;
    neg = a[LLR_W-1] ^ b[LLR_W-1];
    return neg ? -llr_t'({1'b0, m}) : llr_t'({1'b0, m});
  endfunction

  // 3-input forms used by the MTR coder logic
  function automatic llr_t llr_and3(input llr_t a, input llr_t b, input llr_t c);
    return llr_and(llr_and(a, b), c);
  endfunction

  function automatic llr_t llr_or3(input llr_t a, input llr_t b, input llr_t c);
    return llr_or(llr_or(a, b), c);
  endfunction
endpackage
