// tb_sova_detector: drives the detector with E2PR4 samples of MTR-coded,
// precoded random data, built here from the reference code table and the
// channel response 1 + 2D - 2D^3 - D^4 (8 sample LSBs per level).
//  - noiseless frame: every NRZI decision and LLR sign correct; the first
//    output is registered in the clock after sample WINDOW+1 is taken;
//    one output per sample, out_last on the last one;
//  - noisy frame: few errors, and none among highly reliable outputs;
//  - very noisy frame decoded twice, without and with correct a priori
//    LLRs: the a priori term must reduce the errors;
//  - a frame shorter than the window is flushed completely.
module tb_sova_detector;
  import llr_pkg::*;
  import tb_mtr_code_pkg::*;
  localparam int W = 20;

  logic clk = 0, rst_n = 1;
  // a real falling edge of rst_n clears every asynchronously reset register
  // before the first clock edge, whatever its power-up value
  initial #1 rst_n = 0;
  logic in_valid = 0, in_sof = 0, in_eof = 0, in_ready;
  logic signed [7:0] in_y = '0;
  llr_t in_apr = '0;
  logic out_valid, out_bit, out_last;
  llr_t out_llr;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sova_detector #(.WINDOW(W)) dut (.*);

  // collected outputs
  bit   obit [$];
  int   ollr [$];
  int   nlast = 0, in_count = 0, first_lat = -1;
  always @(posedge clk) begin
    if (in_valid && in_ready) in_count++;
    if (out_valid) begin
      obit.push_back(out_bit); ollr.push_back(int'(out_llr));
      if (first_lat < 0) first_lat = in_count;
      if (out_last) nlast++;
    end
  end

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom) + 1.0) / 4294967297.0;
    u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  // build a frame: returns NRZI bits and samples
  task automatic make_frame(int nwords, real sigma, ref bit u [$], ref int y [$]);
    bit a [$];
    u.delete(); y.delete();
    a = '{0, 0, 0, 0};
    for (int w = 0; w < nwords; w++) begin
      logic [4:0] c;
      c = encode(4'($urandom));
      for (int k = 0; k < 5; k++) u.push_back(c[k]);
    end
    foreach (u[i]) begin
      int lvl, s;
      a.push_back(a[a.size() - 1] ^ u[i]);
      lvl = (2 * a[i + 4] - 1) + 2 * (2 * a[i + 3] - 1) - 2 * (2 * a[i + 1] - 1) - (2 * a[i] - 1);
      s = int'($floor(8.0 * (real'(lvl) + sigma * gauss()) + 0.5));
      if (s > 127) s = 127;
      if (s < -127) s = -127;
      y.push_back(s);
    end
  endtask

  task automatic run_frame(ref int y [$], ref bit u [$], input int apr_mag, output int errs, output int strong_errs);
    int start_out, cyc;
    obit.delete(); ollr.delete();
    nlast = 0; in_count = 0; first_lat = -1;
    foreach (y[i]) begin
      @(negedge clk);
      in_valid = 1; in_sof = (i == 0); in_eof = (i == y.size() - 1);
      in_y = 8'(y[i]);
      in_apr = (apr_mag == 0) ? llr_t'(0) : (u[i] ? -llr_t'(apr_mag) : llr_t'(apr_mag));
      while (!in_ready) @(negedge clk);
    end
    @(negedge clk); in_valid = 0; in_sof = 0; in_eof = 0;
    cyc = 0;
    while (nlast == 0 && cyc < 10 * W) begin @(negedge clk); cyc++; end
    checks += 2;
    if (obit.size() != y.size()) begin failures++; $display("outputs %0d for %0d samples", obit.size(), y.size()); end
    if (nlast != 1) begin failures++; $display("out_last count %0d", nlast); end
    if (y.size() > W) begin
      checks++;
      if (first_lat != W + 2) begin failures++; $display("first output after %0d samples", first_lat); end
    end
    errs = 0; strong_errs = 0;
    foreach (obit[i]) if (i < u.size()) begin
      if (obit[i] != u[i]) begin
        errs++;
        if (ollr[i] > 60 || ollr[i] < -60) strong_errs++;
      end
      if ((ollr[i] < 0) != obit[i] && ollr[i] != 0) strong_errs++;
    end
  endtask

  initial begin
    bit u [$]; int y [$];
    int e, se, e0, e1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // noiseless
    for (int t = 0; t < 3; t++) begin
      make_frame(100, 0.0, u, y);
      run_frame(y, u, 0, e, se);
      checks++;
      if (e != 0 || se != 0) begin failures++; $display("noiseless: %0d errors", e); end
    end
    // mild noise
    make_frame(400, 0.35, u, y);
    run_frame(y, u, 0, e, se);
    $display("sigma 0.35: %0d errors in %0d, strong errors %0d", e, u.size(), se);
    checks += 2;
    if (e > 20) failures++;
    if (se != 0) failures++;
    // heavy noise with and without a priori information
    make_frame(1000, 1.4, u, y);
    run_frame(y, u, 0, e0, se);
    run_frame(y, u, 12, e1, se);
    $display("sigma 1.4: %0d errors without, %0d with a priori", e0, e1);
    checks += 2;
    if (e0 == 0) begin failures++; $display("heavy noise gave no errors"); end
    if (e1 >= e0) begin failures++; $display("a priori did not help"); end
    // short frame
    make_frame(3, 0.0, u, y);
    run_frame(y, u, 0, e, se);
    checks++;
    if (e != 0) begin failures++; $display("short frame: %0d errors", e); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
