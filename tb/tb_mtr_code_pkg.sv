// tb_mtr_code_pkg: reference model of the rate 4/5 MTR(j=2,k=8) code table,
// built from its definition: the valid words are the 5-bit words without
// "111", not starting or ending with "11" and not "00000"; the data words
// whose middle-bit function d1 ^ (d0 & (d2 ^ d3)) is 1 are matched, in
// increasing order, to the valid words with middle bit 1, and likewise for 0.
// Bit c[0] of a word is its first (most significant in the listing) bit.
package tb_mtr_code_pkg;
  function automatic logic word_ok(logic [4:0] c);
    // c[0] first: check runs on the sequence c0 c1 c2 c3 c4
    logic [4:0] s;
    for (int k = 0; k < 5; k++) s[4-k] = c[k];   // s[4] = first bit
    if (s == 5'b00000) return 1'b0;
    if (s[4] & s[3]) return 1'b0;
    if (s[1] & s[0]) return 1'b0;
    for (int k = 0; k < 3; k++) if (s[k] & s[k+1] & s[k+2]) return 1'b0;
    return 1'b1;
  endfunction

  function automatic logic mid(logic [3:0] d);
    return d[1] ^ (d[0] & (d[2] ^ d[3]));
  endfunction

  // code word for data d
  function automatic logic [4:0] encode(logic [3:0] d);
    int rank_d = 0, seen = 0;
    for (int e = 0; e < int'(d); e++) if (mid(4'(e)) == mid(d)) rank_d++;
    for (int s = 0; s < 32; s++) begin
      logic [4:0] c;
      for (int k = 0; k < 5; k++) c[k] = 1'(s >> (4 - k));
      if (word_ok(c) && c[2] == mid(d)) begin
        if (seen == rank_d) return c;
        seen++;
      end
    end
    return '0;
  endfunction
endpackage
