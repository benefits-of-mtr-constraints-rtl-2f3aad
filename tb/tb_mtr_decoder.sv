// tb_mtr_decoder: feeds every reference code word and checks that the data
// word it was built from comes back; also checks encoder/decoder round trip.
module tb_mtr_decoder;
  import tb_mtr_code_pkg::*;
  logic [4:0] c;
  logic [3:0] d;
  int checks = 0, failures = 0;

  mtr_decoder dut (.c(c), .d(d));

  initial begin
    for (int v = 0; v < 16; v++) begin
      c = encode(4'(v)); #1;
      checks++;
      if (d != 4'(v)) begin failures++; $display("c=%b d=%b exp %b", c, d, 4'(v)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
