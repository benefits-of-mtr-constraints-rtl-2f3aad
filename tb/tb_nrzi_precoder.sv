// tb_nrzi_precoder: streams random MTR code words (with idle gaps and frame
// starts) into the precoder and checks every output bit against a running
// XOR of the NRZI bits, that no word is lost, and that a back-to-back
// stream leaves at one bit per clock.
module tb_nrzi_precoder;
  logic clk = 0, rst_n = 1;
  // a real falling edge of rst_n clears every asynchronously reset register
  // before the first clock edge, whatever its power-up value
  initial #1 rst_n = 0;
  logic in_valid = 0, in_sof = 0, in_ready, out_valid, out_bit;
  logic [4:0] in_word = '0;
  int checks = 0, failures = 0;
  bit exp_q [$];
  logic ref_state = 0;
  bit e;
  int nout = 0, cyc = 0, first_out = -1, last_out = 0;

  always #5 clk = ~clk;

  nrzi_precoder dut (.*);

  always @(posedge clk) begin
    cyc++;
    if (out_valid) begin
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("unexpected output"); end
      else begin
        e = exp_q.pop_front();
        if (out_bit != e) begin failures++; $display("bit %0d: %b exp %b", nout, out_bit, e); end
      end
      if (first_out < 0) first_out = cyc;
      last_out = cyc;
      nout++;
    end
  end

  // drive at the falling edge; the word is taken at the next rising edge
  // once in_ready is seen high
  task automatic send(logic [4:0] w, logic sof);
    @(negedge clk);
    in_valid = 1; in_word = w; in_sof = sof;
    while (!in_ready) @(negedge clk);
    if (sof) ref_state = 0;
    for (int k = 0; k < 5; k++) begin ref_state ^= w[k]; exp_q.push_back(ref_state); end
    @(posedge clk);
  endtask

  task automatic idle(int n);
    @(negedge clk);
    in_valid = 0; in_sof = 0;
    repeat (n) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // back-to-back phase: 40 words, expect 200 bits on consecutive clocks
    for (int w = 0; w < 40; w++) send(5'($urandom), (w == 0));
    idle(10);
    checks++;
    if (nout != 200 || last_out - first_out != 199) begin
      failures++; $display("stream: %0d bits over %0d clocks", nout, last_out - first_out + 1);
    end
    // gaps and new frames
    for (int w = 0; w < 200; w++) begin
      send(5'($urandom), ($urandom_range(0, 9) == 0));
      if ($urandom_range(0, 1)) idle($urandom_range(0, 6));
    end
    idle(10);
    checks++;
    if (nout != 1200 || exp_q.size() != 0) begin failures++; $display("count %0d", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
