// tb_soft_mtr_decoder: for every valid code word, with random nonzero
// code-bit LLRs whose signs spell that word, checks that the data-bit LLR
// signs give back the data word, that equal input magnitudes give equal
// output magnitudes, and that a data bit is never more reliable than the
// most reliable code bit.
module tb_soft_mtr_decoder;
  import llr_pkg::*;
  import tb_mtr_code_pkg::*;
  llr_t lc [5];
  llr_t ld [4];
  int checks = 0, failures = 0;

  soft_mtr_decoder dut (.lc(lc), .ld(ld));

  function automatic int iabs(int v); return v < 0 ? -v : v; endfunction

  initial begin
    for (int t = 0; t < 3000; t++) begin
      automatic logic [3:0] d = 4'($urandom);
      automatic logic [4:0] c = encode(d);
      automatic int mag = (t % 2 == 0) ? int'($urandom_range(1, 127)) : 0;
      automatic int maxin = 0;
      for (int k = 0; k < 5; k++) begin
        automatic int m = (mag != 0) ? mag : int'($urandom_range(1, 127));
        lc[k] = c[k] ? -llr_t'(m) : llr_t'(m);
        if (m > maxin) maxin = m;
      end
      #1;
      for (int k = 0; k < 4; k++) begin
        checks += 2;
        if ((ld[k] < 0) != d[k]) begin failures++; $display("t=%0d d%0d sign wrong", t, k); end
        if (iabs(int'(ld[k])) > maxin) failures++;
        if (mag != 0) begin
          checks++;
          if (iabs(int'(ld[k])) != mag) begin failures++; $display("t=%0d d%0d mag %0d exp %0d", t, k, ld[k], mag); end
        end
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
