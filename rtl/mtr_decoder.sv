// mtr_decoder: rate 4/5 MTR(j=2, k=8) decoder, inverse of mtr_encoder.
//
// Maps a 5-bit NRZI code word c[4:0] (c[0] first) back to the 4-bit data
// word d[3:0]. Each output is a minimised sum of products over the 16 valid
// code words; the 16 invalid 5-bit words are don't-cares, so a corrupted code
// word decodes to some data word without any error flag. The code table is
// this design's choice (see mtr_encoder). Purely combinational.
module mtr_decoder (
  input  logic [4:0] c,
  output logic [3:0] d
);
  always_comb begin
    d[0] = (~c[1] & c[3]) | (c[1] & c[4]) | (~c[0] & c[2] & c[4]) | (c[0] & ~c[2] & ~c[4]);
    d[1] = (~c[1] & c[2] & ~c[3]) | (c[0] & c[2]) | (c[0] & ~c[3] & ~c[4])
         | (c[1] & ~c[2] & c[4]) | (c[1] & c[2] & ~c[4]);
    d[2] = (c[0] & c[3]) | (c[0] & c[4]) | (c[1] & ~c[2] & ~c[3]) | (c[2] & c[3])
         | (c[1] & c[2] & ~c[4]);
    d[3] = c[0] | (c[1] & c[3]) | (c[1] & c[2] & c[4]);
  end
endmodule
