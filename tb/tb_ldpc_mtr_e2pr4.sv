// tb_ldpc_mtr_e2pr4: end-to-end test of the whole recording system at its
// default size (N = 4732 LDPC bits, 5915 channel samples per frame).
// Random LDPC codewords come from the reference model; they pass through the
// design's write path, whose NRZ output is checked bit by bit against the
// reference MTR table and precoder. A behavioural E2PR4 channel model
// (response 1 + 2D - 2D^3 - D^4, 8 sample LSBs per level, additive white
// Gaussian noise) turns those bits into samples for the read path. Frames:
//   1. Case A, no noise: decoded word = codeword, LDPC converges at once,
//      and the hard MTR-decoded detector output (det_word) = codeword too;
//   2. Case A, moderate noise plus a few impulses: detector errors that
//      message passing removes;
//   3. Case B, same disturbance: OUTER_ITERS detector/decoder passes, return path
//      through the soft MTR encoder, decoded word = codeword;
//   4. Case A, heavy noise: the decoder stops at its iteration limit.
// Each mechanism (forwarding frame, return pass, multi-iteration correction,
// iteration-limit stop, detector flush) is counted and must occur.
module tb_ldpc_mtr_e2pr4;
  import tb_mtr_code_pkg::*;
  import tb_ldpc_pkg::*;
  localparam int NS = 28;
  localparam int M = 6 * NS + 1, N = NS * M, NW = N / 4, NSYM = 5 * NW;
  localparam int OUTER = 5;

  logic clk = 0, rst_n = 1;
  // a real falling edge of rst_n clears every asynchronously reset register
  // before the first clock edge, whatever its power-up value
  initial #1 rst_n = 0;
  logic wr_valid = 0, wr_sof = 0, wr_ready, ch_valid, ch_bit;
  logic [3:0] wr_data = '0;
  logic case_b = 0, y_valid = 0, y_ready;
  logic signed [7:0] y_in = '0;
  logic dec_valid, dec_last, frame_done, ldpc_converged, det_valid;
  logic [3:0] det_word;
  logic [3:0] dec_word;
  logic [$clog2(11)-1:0] ldpc_iters;
  logic [$clog2(OUTER+1)-1:0] passes;
  int checks = 0, failures = 0;
  int cnt_case_a = 0, cnt_return = 0, cnt_corrected = 0, cnt_limit = 0, cnt_flush = 0;

  always #5 clk = ~clk;

  ldpc_mtr_e2pr4 dut (.*);

  bit   chq  [$];
  bit   decq [$];
  bit   detq [$];
  int   nframes = 0;
  always @(posedge clk) begin
    if (ch_valid) chq.push_back(ch_bit);
    if (det_valid) for (int k = 0; k < 4; k++) detq.push_back(det_word[k]);
    if (dec_valid) for (int k = 0; k < 4; k++) decq.push_back(dec_word[k]);
    if (frame_done) nframes++;
    if (dut.u_sova.out_last) cnt_flush++;
  end

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom) + 1.0) / 4294967297.0;
    u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  task automatic write_frame(row_t cw);
    bit ref_nrz [$];
    bit a;
    chq.delete();
    a = 0;
    for (int w = 0; w < NW; w++) begin
      logic [4:0] c;
      logic [3:0] d;
      for (int k = 0; k < 4; k++) d[k] = cw[4 * w + k];
      c = encode(d);
      for (int k = 0; k < 5; k++) begin a ^= c[k]; ref_nrz.push_back(a); end
      @(negedge clk);
      wr_valid = 1; wr_sof = (w == 0); wr_data = d;
      while (!wr_ready) @(negedge clk);
    end
    @(negedge clk); wr_valid = 0; wr_sof = 0;
    repeat (8) @(negedge clk);
    checks++;
    if (chq.size() != NSYM) begin failures++; $display("write path gave %0d bits", chq.size()); end
    else begin
      int bad = 0;
      foreach (ref_nrz[i]) if (chq[i] != ref_nrz[i]) bad++;
      checks++;
      if (bad != 0) begin failures++; $display("write path: %0d wrong bits", bad); end
    end
  endtask

  // n_imp > 0 adds that many impulse disturbances of 4 levels against the
  // sign of the sample, evenly spread over the frame, so the detector is
  // sure to make errors that the LDPC code can still remove
  task automatic read_frame(row_t cw, real sigma, int n_imp, bit mode_b, output int bit_errs, output bit conv,
                            output int iters, output int npass);
    bit a [$];
    int cyc;
    a = '{0, 0, 0, 0};
    foreach (chq[i]) a.push_back(chq[i]);
    decq.delete();
    detq.delete();
    case_b = mode_b;
    for (int i = 0; i < NSYM; i++) begin
      int lvl, s;
      lvl = (2 * a[i + 4] - 1) + 2 * (2 * a[i + 3] - 1) - 2 * (2 * a[i + 1] - 1) - (2 * a[i] - 1);
      s = int'($floor(8.0 * (real'(lvl) + sigma * gauss()) + 0.5));
      if (n_imp > 0 && i % (NSYM / n_imp) == NSYM / (2 * n_imp)) s += (lvl >= 0) ? -32 : 32;
      if (s > 127) s = 127;
      if (s < -127) s = -127;
      @(negedge clk);
      y_valid = 1; y_in = 8'(s);
      while (!y_ready) @(negedge clk);
    end
    @(negedge clk); y_valid = 0;
    cyc = 0;
    while (!frame_done && cyc < 2000000) begin @(negedge clk); cyc++; end
    @(negedge clk);
    conv = ldpc_converged; iters = int'(ldpc_iters); npass = int'(passes);
    bit_errs = 0;
    checks++;
    if (decq.size() != N) begin failures++; $display("decoded %0d bits", decq.size()); bit_errs = N; end
    else foreach (decq[i]) if (decq[i] != cw[i]) bit_errs++;
  endtask

  initial begin
    row_t cw;
    int errs, it, np;
    bit conv;
    build(NS);
    $display("code N=%0d M=%0d rank=%0d", n_bits, n_chk, rank);
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. Case A, noiseless
    cw = codeword();
    write_frame(cw);
    read_frame(cw, 0.0, 0, 0, errs, conv, it, np);
    $display("frame 1 (A, clean): errors %0d conv %b iters %0d passes %0d", errs, conv, it, np);
    checks += 3;
    if (errs != 0 || !conv || it != 1) failures++;
    if (detq.size() != N) failures++;
    else foreach (detq[i]) if (detq[i] != cw[i]) begin failures++; break; end
    if (np != 1) failures++;
    cnt_case_a++;

    // 2. Case A, moderate noise and impulses
    cw = codeword();
    write_frame(cw);
    read_frame(cw, 0.8, 8, 0, errs, conv, it, np);
    begin
      int derr = 0;
      foreach (detq[i]) if (detq[i] != cw[i]) derr++;
      $display("frame 2 (A, sigma 0.8 + impulses): detector-only data errors %0d", derr);
    end
    $display("frame 2 (A, sigma 0.8 + impulses): errors %0d conv %b iters %0d passes %0d", errs, conv, it, np);
    checks += 2;
    if (errs != 0 || !conv) failures++;
    if (np != 1) failures++;
    if (conv && it > 1) cnt_corrected++;
    cnt_case_a++;

    // 3. Case B, the same kind of disturbance
    cw = codeword();
    write_frame(cw);
    read_frame(cw, 0.8, 8, 1, errs, conv, it, np);
    $display("frame 3 (B, sigma 0.8 + impulses): errors %0d conv %b iters %0d passes %0d", errs, conv, it, np);
    checks += 2;
    if (errs != 0 || !conv) failures++;
    if (np != OUTER) failures++;
    cnt_return += np - 1;

    // 4. Case A, heavy noise
    cw = codeword();
    write_frame(cw);
    read_frame(cw, 3.0, 0, 0, errs, conv, it, np);
    $display("frame 4 (A, sigma 3.0): errors %0d conv %b iters %0d passes %0d", errs, conv, it, np);
    if (!conv && it == 10) cnt_limit++;

    checks += 6;
    if (nframes != 4) failures++;
    if (cnt_case_a == 0) failures++;
    if (cnt_return == 0) begin failures++; $display("no return pass"); end
    if (cnt_corrected == 0) begin failures++; $display("no multi-iteration correction"); end
    if (cnt_limit == 0) begin failures++; $display("iteration limit never reached"); end
    if (cnt_flush == 0) failures++;
    $display("mechanisms: case A %0d, return passes %0d, corrected %0d, limit stops %0d, detector flushes %0d",
             cnt_case_a, cnt_return, cnt_corrected, cnt_limit, cnt_flush);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
