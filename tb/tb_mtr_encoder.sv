// tb_mtr_encoder: compares all 16 encoder outputs with the reference table,
// checks the middle bit against the output equation, and checks the j=2 and
// k=8 run-length limits on a long stream of random data words.
module tb_mtr_encoder;
  import tb_mtr_code_pkg::*;
  logic [3:0] d;
  logic [4:0] c;
  int checks = 0, failures = 0;

  mtr_encoder dut (.d(d), .c(c));

  initial begin
    int ones = 0, zeros = 0, max_ones = 0, max_zeros = 0;
    for (int v = 0; v < 16; v++) begin
      d = 4'(v); #1;
      checks += 2;
      if (c != encode(d)) begin failures++; $display("d=%b c=%b exp %b", d, c, encode(d)); end
      if (c[2] != (d[1] ^ ((d[0] & ~d[2] & d[3]) | (d[0] & d[2] & ~d[3])))) failures++;
    end
    for (int w = 0; w < 5000; w++) begin
      d = 4'($urandom); #1;
      for (int k = 0; k < 5; k++) begin
        if (c[k]) begin ones++; zeros = 0; end else begin zeros++; ones = 0; end
        if (ones > max_ones) max_ones = ones;
        if (zeros > max_zeros) max_zeros = zeros;
      end
    end
    checks += 2;
    if (max_ones > 2)  begin failures++; $display("transition run %0d > 2", max_ones); end
    if (max_zeros > 8) begin failures++; $display("zero run %0d > 8", max_zeros); end
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
