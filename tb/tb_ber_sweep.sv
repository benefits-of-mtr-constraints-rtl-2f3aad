// tb_ber_sweep: bit-error measurement of the full-size system over a range
// of noise levels, in the style of a BER-versus-SNR curve. For each noise
// level the same noisy frames are decoded in Case A (forwarding) and in
// Case B (5 detector/decoder passes). For every frame it counts the data
// errors of the detector alone (hard MTR decoding of the detector output)
// and after message passing. The SNR printed is 10 log10(Ec / (2 R sigma^2))
// with Ec = 10 (energy of the E2PR4 response 1,2,0,-2,-1 per symbol) and
// R = 0.768, sigma in level units.
// Checks: no errors at the lowest noise; at every level the decoded errors
// of Case A never exceed the detector-only errors once the LDPC decoder
// converges; Case B must run all passes.
module tb_ber_sweep;
  import tb_mtr_code_pkg::*;
  import tb_ldpc_pkg::*;
  localparam int NS = 28;
  localparam int M = 6 * NS + 1, N = NS * M, NW = N / 4, NSYM = 5 * NW;
  localparam int FRAMES = 3;
  localparam int NSIG = 5;
  localparam real SIGMA [NSIG] = '{0.7, 0.9, 1.0, 1.1, 1.2};

  logic clk = 0, rst_n = 1;
  // a real falling edge of rst_n clears every asynchronously reset register
  // before the first clock edge, whatever its power-up value
  initial #1 rst_n = 0;
  logic wr_valid = 0, wr_sof = 0, wr_ready, ch_valid, ch_bit;
  logic [3:0] wr_data = '0;
  logic case_b = 0, y_valid = 0, y_ready;
  logic signed [7:0] y_in = '0;
  logic dec_valid, dec_last, frame_done, ldpc_converged, det_valid;
  logic [3:0] dec_word, det_word;
  logic [3:0] ldpc_iters;
  logic [2:0] passes;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ldpc_mtr_e2pr4 dut (.*);

  bit chq [$];
  bit decq [$];
  bit detq [$];
  always @(posedge clk) begin
    if (ch_valid) chq.push_back(ch_bit);
    if (dec_valid) for (int k = 0; k < 4; k++) decq.push_back(dec_word[k]);
    if (det_valid) for (int k = 0; k < 4; k++) detq.push_back(det_word[k]);
  end

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom) + 1.0) / 4294967297.0;
    u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  task automatic write_frame(row_t cw);
    chq.delete();
    for (int w = 0; w < NW; w++) begin
      @(negedge clk);
      wr_valid = 1; wr_sof = (w == 0);
      for (int k = 0; k < 4; k++) wr_data[k] = cw[4 * w + k];
      while (!wr_ready) @(negedge clk);
    end
    @(negedge clk); wr_valid = 0; wr_sof = 0;
    repeat (8) @(negedge clk);
  endtask

  // y: noisy samples; returns detector-only errors (first pass) and decoded errors
  task automatic read_frame(row_t cw, ref int y [$], input bit mode_b,
                            output int det_errs, output int dec_errs, output bit conv, output int np);
    int cyc;
    decq.delete(); detq.delete();
    case_b = mode_b;
    for (int i = 0; i < NSYM; i++) begin
      @(negedge clk);
      y_valid = 1; y_in = 8'(y[i]);
      while (!y_ready) @(negedge clk);
    end
    @(negedge clk); y_valid = 0;
    cyc = 0;
    while (!frame_done && cyc < 2000000) begin @(negedge clk); cyc++; end
    @(negedge clk);
    conv = ldpc_converged; np = int'(passes);
    det_errs = 0; dec_errs = 0;
    for (int i = 0; i < N; i++) begin
      if (i >= detq.size() || detq[i] != cw[i]) det_errs++;
      if (i >= decq.size() || decq[i] != cw[i]) dec_errs++;
    end
  endtask

  initial begin
    build(NS);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < NSIG; s++) begin
      int det_a, dec_a, dec_b, nconv_a, nconv_b;
      real snr;
      det_a = 0; dec_a = 0; dec_b = 0; nconv_a = 0; nconv_b = 0;
      snr = 10.0 * $log10(10.0 / (2.0 * 0.768 * SIGMA[s] * SIGMA[s]));
      for (int f = 0; f < FRAMES; f++) begin
        row_t cw;
        bit a [$];
        int y [$];
        int de, ee, np;
        bit conv;
        cw = codeword();
        write_frame(cw);
        a = '{0, 0, 0, 0};
        foreach (chq[i]) a.push_back(chq[i]);
        y.delete();
        for (int i = 0; i < NSYM; i++) begin
          int lvl, v;
          lvl = (2 * a[i + 4] - 1) + 2 * (2 * a[i + 3] - 1) - 2 * (2 * a[i + 1] - 1) - (2 * a[i] - 1);
          v = int'($floor(8.0 * (real'(lvl) + SIGMA[s] * gauss()) + 0.5));
          y.push_back(v > 127 ? 127 : (v < -127 ? -127 : v));
        end
        read_frame(cw, y, 0, de, ee, conv, np);
        det_a += de; dec_a += ee; nconv_a += conv;
        checks++;
        if (conv && ee > de) begin failures++; $display("sigma %0.2f: decoding added errors", SIGMA[s]); end
        read_frame(cw, y, 1, de, ee, conv, np);
        dec_b += ee; nconv_b += conv;
        checks++;
        if (np != 5) begin failures++; $display("Case B made %0d passes", np); end
      end
      $display("sigma %0.2f SNR %0.2f dB: detector-only BER %e, Case A BER %e (%0d/%0d converged), Case B BER %e (%0d/%0d converged)",
               SIGMA[s], snr, real'(det_a) / real'(FRAMES * N), real'(dec_a) / real'(FRAMES * N), nconv_a, FRAMES,
               real'(dec_b) / real'(FRAMES * N), nconv_b, FRAMES);
      if (s == 0) begin
        checks++;
        if (dec_a != 0 || dec_b != 0) begin failures++; $display("errors at the lowest noise"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
