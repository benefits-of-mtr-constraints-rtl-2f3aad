// tb_soft_mtr_encoder: for random data LLRs (never 0) checks that
//  - the sign of every code-bit LLR equals the hard MTR encoding of the
//    data-bit signs (reference table),
//  - the middle code bit equals the gate rules applied to
//    c2 = d1 XOR (d0 AND (d2 XOR d3)), computed here with integers,
//  - when all inputs share one magnitude, every output has that magnitude.
module tb_soft_mtr_encoder;
  import llr_pkg::*;
  import tb_mtr_code_pkg::*;
  llr_t ld [4];
  llr_t lc [5];
  int checks = 0, failures = 0;

  soft_mtr_encoder dut (.ld(ld), .lc(lc));

  function automatic int iabs(int v); return v < 0 ? -v : v; endfunction
  function automatic int rxor(int a, int b);
    int m = iabs(a) < iabs(b) ? iabs(a) : iabs(b);
    return ((a < 0) != (b < 0)) ? -m : m;
  endfunction
  function automatic int rand_llr(int maxmag);
    int m = int'($urandom_range(1, maxmag));
    return $urandom_range(0, 1) ? -m : m;
  endfunction

  initial begin
    for (int t = 0; t < 3000; t++) begin
      logic [3:0] d;
      logic [4:0] c;
      int v [4];
      automatic int mag = (t % 3 == 0) ? int'($urandom_range(1, 127)) : 0;
      for (int k = 0; k < 4; k++) begin
        v[k]  = (mag != 0) ? ($urandom_range(0, 1) ? -mag : mag) : rand_llr(127);
        ld[k] = llr_t'(v[k]);
        d[k]  = v[k] < 0;
      end
      #1;
      c = encode(d);
      for (int k = 0; k < 5; k++) begin
        checks++;
        if ((lc[k] < 0) != c[k]) begin failures++; $display("t=%0d bit %0d sign wrong", t, k); end
        if (mag != 0) begin
          checks++;
          if (iabs(int'(lc[k])) != mag) begin failures++; $display("t=%0d bit %0d mag %0d exp %0d", t, k, lc[k], mag); end
        end
      end
      begin
        automatic int a023 = v[0] > rxor(v[2], v[3]) ? v[0] : rxor(v[2], v[3]);
        checks++;
        if (int'(lc[2]) != rxor(v[1], a023)) begin failures++; $display("t=%0d c2 %0d exp %0d", t, lc[2], rxor(v[1], a023)); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
