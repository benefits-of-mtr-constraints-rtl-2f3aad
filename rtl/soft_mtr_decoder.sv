// soft_mtr_decoder: the MTR decoder logic evaluated on soft bits.
//
// Takes the LLRs of the 5 code bits of one MTR word (from the channel
// detector) and returns the LLRs of the 4 data bits, which feed the LDPC
// message-passing decoder. It evaluates the same sums of products as
// mtr_decoder with the gate rules of llr_pkg (NOT = negate, AND = max,
// OR = min), so its hard decisions equal mtr_decoder applied to the signs of
// the inputs. Purely combinational.
module soft_mtr_decoder
  import llr_pkg::*;
(
  input  llr_t lc [5],   // LLR of c[0..4]
  output llr_t ld [4]    // LLR of d[0..3]
);
  llr_t n [5];

  always_comb begin
    for (int k = 0; k < 5; k++) n[k] = llr_not(lc[k]);
    ld[0] = llr_or(llr_or(llr_and(n[1], lc[3]), llr_and(lc[1], lc[4])),
                   llr_or(llr_and3(n[0], lc[2], lc[4]), llr_and3(lc[0], n[2], n[4])));
    ld[1] = llr_or(llr_or3(llr_and3(n[1], lc[2], n[3]), llr_and(lc[0], lc[2]),
                           llr_and3(lc[0], n[3], n[4])),
                   llr_or(llr_and3(lc[1], n[2], lc[4]), llr_and3(lc[1], lc[2], n[4])));
    ld[2] = llr_or(llr_or3(llr_and(lc[0], lc[3]), llr_and(lc[0], lc[4]),
                           llr_and3(lc[1], n[2], n[3])),
                   llr_or(llr_and(lc[2], lc[3]), llr_and3(lc[1], lc[2], n[4])));
    ld[3] = llr_or3(lc[0], llr_and(lc[1], lc[3]), llr_and3(lc[1], lc[2], lc[4]));
  end
endmodule
