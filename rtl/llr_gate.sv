// llr_gate: one soft-output Boolean gate working on log-likelihood ratios.
//
// The gate type is chosen by the OP parameter (NOT, AND, OR or XOR) and the
// output is computed with the max / min / sign-min approximations of
// llr_pkg, which are the source article's rules for passing soft information through
// logic (NOT uses input a only). Purely combinational: the output follows
// the inputs in the same cycle. Width and saturation are this design's choice.
module llr_gate
  import llr_pkg::*;
#(
  parameter llr_op_e OP = OP_XOR
) (
  input  llr_t a,
  input  llr_t b,
  output llr_t y
);
  always_comb begin
    unique case (OP)
      OP_NOT:  y = llr_not(a);
      OP_AND:  y = llr_and(a, b);
      OP_OR:   y = llr_or(a, b);
      default: y = llr_xor(a, b);
    endcase
  end
endmodule
