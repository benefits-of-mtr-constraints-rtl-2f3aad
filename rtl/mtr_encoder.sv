// mtr_encoder: rate 4/5 maximum-transition-run encoder, MTR(j=2, k=8).
//
// Maps a 4-bit data word d[3:0] onto a 5-bit NRZI code word c[4:0], c[0]
// recorded first. The 16 code words are exactly the 5-bit words that contain
// no "111", do not begin or end with "11" and are not "00000"; concatenated,
// they never hold more than 2 consecutive transitions (j=2) or more than 8
// consecutive non-transitions (k=8). After NRZI-to-NRZ precoding this keeps
// the patterns 1010 and 0101 off the channel.
//
// The middle code bit follows the source article's output equation
//   c2 = d1 + d0*~d2*d3 + d0*d2*~d3, with "+" read as modulo-2 addition,
// which is the reading under which it can be a bit of a valid MTR code word.
// Which data word maps to which code word beyond that is this design's
// choice: within each value of c2, data words in increasing order map to code
// words in increasing order. The other four outputs are minimised sums of
// products of that table. Purely combinational.
module mtr_encoder (
  input  logic [3:0] d,
  output logic [4:0] c
);
  always_comb begin
    c[0] = (d[3] & d[2]) | (d[3] & d[1]);
    c[1] = (~d[3] & d[2] & d[1]) | (d[3] & ~d[2] & ~d[1]) | (~d[3] & d[2] & ~d[0]);
    c[2] = d[1] ^ ((d[0] & ~d[2] & d[3]) | (d[0] & d[2] & ~d[3]));
    c[3] = (~d[3] & ~d[1] & d[0]) | (d[3] & d[2] & d[0]) | (d[3] & ~d[2] & ~d[1] & ~d[0]);
    c[4] = (~d[3] & d[1] & d[0]) | (d[3] & d[2] & ~d[0]) | (~d[3] & ~d[2] & ~d[1] & ~d[0])
         | (d[3] & ~d[2] & ~d[1] & d[0]);
  end
endmodule
