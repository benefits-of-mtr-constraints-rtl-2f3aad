// tb_ldpc_decoder: decoder for the order-25 triple system (N = 100,
// M = 25), driven with random codewords from the reference model.
//  - clean LLRs: must converge after 1 iteration, bits and a posteriori
//    signs equal the codeword;
//  - a few weak wrong-sign LLRs: must converge to the codeword after more
//    than one iteration (real correction happened);
//  - random LLRs: a run that converges must end on a codeword, one that
//    does not must stop at exactly MAX_ITER, and at least one must stop.
// Every run also checks the latency of (N+1) clocks per iteration.
module tb_ldpc_decoder;
  import llr_pkg::*;
  import tb_ldpc_pkg::*;
  localparam int NS = 4, MAXI = 8;
  localparam int M = 6 * NS + 1, N = NS * M, NW = N / 4, AW = $clog2(NW);

  logic clk = 0, rst_n = 1;
  // a real falling edge of rst_n clears every asynchronously reset register
  // before the first clock edge, whatever its power-up value
  initial #1 rst_n = 0;
  logic wr_en = 0, start = 0, busy, done, converged;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0;
  llr_t wr_llr [4];
  logic [$clog2(MAXI+1)-1:0] iters;
  llr_t rd_llr [4];
  logic [3:0] rd_bits;
  int checks = 0, failures = 0;
  int n_clean = 0, n_corrected = 0, n_fail_stop = 0;

  always #5 clk = ~clk;

  ldpc_decoder #(.STS_N(NS), .MAX_ITER(MAXI)) dut (.*);

  task automatic run(row_t cw, int mode, output bit conv, output int it);
    int llr [N];
    int cyc;
    for (int k = 0; k < N; k++) llr[k] = cw[k] ? -40 : 40;
    if (mode == 1) for (int e = 0; e < 3; e++) begin
      int k;
      k = $urandom_range(0, N - 1);
      llr[k] = cw[k] ? 10 : -10;
    end
    if (mode == 2) for (int k = 0; k < N; k++) llr[k] = int'($urandom_range(0, 60)) - 30;
    for (int w = 0; w < NW; w++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = AW'(w);
      for (int k = 0; k < 4; k++) wr_llr[k] = llr_t'(llr[4 * w + k]);
    end
    @(negedge clk); wr_en = 0; start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    conv = converged; it = int'(iters);
    checks++;
    if (cyc != it * (N + 1) + 1) begin failures++; $display("latency %0d for %0d iterations", cyc, it); end
  endtask

  task automatic compare(row_t cw);
    for (int w = 0; w < NW; w++) begin
      rd_addr = AW'(w); #1;
      for (int k = 0; k < 4; k++) begin
        checks += 2;
        if (rd_bits[k] != cw[4 * w + k]) begin failures++; $display("bit %0d wrong", 4 * w + k); end
        if ((rd_llr[k] < 0) != cw[4 * w + k]) failures++;
      end
    end
  endtask

  initial begin
    bit conv; int it; row_t cw;
    build(NS);
    $display("code N=%0d M=%0d rank=%0d", n_bits, n_chk, rank);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      cw = codeword();
      checks++; if (!is_codeword(cw)) failures++;
      run(cw, 0, conv, it);
      checks++;
      if (!conv || it != 1) begin failures++; $display("clean: conv=%b it=%0d", conv, it); end
      compare(cw);
      n_clean++;
    end
    for (int t = 0; t < 20; t++) begin
      cw = codeword();
      run(cw, 1, conv, it);
      checks++;
      if (!conv) begin failures++; $display("weak errors not corrected, it=%0d", it); end
      compare(cw);
      if (it > 1) n_corrected++;
    end
    for (int t = 0; t < 6; t++) begin
      row_t hd;
      cw = codeword();
      run(cw, 2, conv, it);
      hd = '0;
      for (int w = 0; w < NW; w++) begin
        rd_addr = AW'(w); #1;
        for (int k = 0; k < 4; k++) hd[4 * w + k] = rd_bits[k];
      end
      checks++;
      if (conv) begin
        // random LLRs may still lie close to some codeword of this short code
        if (!is_codeword(hd)) begin failures++; $display("noise: converged to a non-codeword"); end
      end else begin
        if (it != MAXI) begin failures++; $display("noise: stopped after %0d iterations", it); end
        n_fail_stop++;
      end
    end
    checks += 2;
    if (n_corrected == 0) begin failures++; $display("no multi-iteration correction seen"); end
    if (n_fail_stop == 0) begin failures++; $display("iteration limit never reached"); end
    $display("clean %0d corrected %0d stopped %0d", n_clean, n_corrected, n_fail_stop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
