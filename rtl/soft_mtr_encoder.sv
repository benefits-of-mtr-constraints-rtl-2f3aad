// soft_mtr_encoder: the MTR encoder logic evaluated on soft bits.
//
// Takes the LLRs of the 4 data bits of one MTR word and returns the LLRs of
// the 5 code bits, by pushing the LLRs through the same sum-of-products logic
// as mtr_encoder with the gate rules of llr_pkg (NOT = negate, AND = max,
// OR = min, XOR = sign-min). This is the return path of the iterative
// receiver: message-passing output is turned into a priori information for
// the channel detector. The middle bit c2 = d1 XOR (d0 AND (d2 XOR d3)) is
// built from three llr_gate instances; the other bits use the package
// functions directly. Inputs are assumed independent, as the source article's gate
// rules require. Purely combinational.
module soft_mtr_encoder
  import llr_pkg::*;
(
  input  llr_t ld [4],   // LLR of d[0..3]
  output llr_t lc [5]    // LLR of c[0..4]
);
  llr_t n0, n1, n2, n3;
  llr_t x23, a023;

  assign n0 = llr_not(ld[0]);
  assign n1 = llr_not(ld[1]);
  assign n2 = llr_not(ld[2]);
  assign n3 = llr_not(ld[3]);

  llr_gate #(.OP(OP_XOR)) u_x23  (.a(ld[2]), .b(ld[3]), .y(x23));
  llr_gate #(.OP(OP_AND)) u_a023 (.a(ld[0]), .b(x23),   .y(a023));
  llr_gate #(.OP(OP_XOR)) u_c2   (.a(ld[1]), .b(a023),  .y(lc[2]));

  always_comb begin
    lc[0] = llr_or(llr_and(ld[3], ld[2]), llr_and(ld[3], ld[1]));
    lc[1] = llr_or3(llr_and3(n3, ld[2], ld[1]), llr_and3(ld[3], n2, n1), llr_and3(n3, ld[2], n0));
    lc[3] = llr_or3(llr_and3(n3, n1, ld[0]), llr_and3(ld[3], ld[2], ld[0]),
                    llr_and(llr_and3(ld[3], n2, n1), n0));
    lc[4] = llr_or(llr_or3(llr_and3(n3, ld[1], ld[0]), llr_and3(ld[3], ld[2], n0),
                           llr_and(llr_and3(n3, n2, n1), n0)),
                   llr_and(llr_and3(ld[3], n2, n1), ld[0]));
  end
endmodule
