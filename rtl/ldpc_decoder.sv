// ldpc_decoder: min-sum message-passing decoder for the column-weight-3
// triple-system LDPC code (N = 4732 bits, M = 169 checks for STS_N = 28).
//
// Check-node rule: the XOR gate rule of llr_pkg, i.e. the message from a
// check to a bit is the product of the signs and the minimum magnitude of
// the other incoming messages (min-sum). Variable-node rule: the total LLR
// L = channel LLR + sum of the three check messages, and the message back
// to each check is L minus that check's own message.
//
// Architecture: flooding schedule, one column per clock. sts_column_gen
// names the three checks of the current column. Each check keeps a
// compressed state (smallest and second smallest magnitude, the column of
// the smallest, and the product of signs); each edge keeps only the sign of
// its last bit-to-check message. While column j is processed, the check
// messages are rebuilt from the state of the previous iteration, and the
// new bit-to-check messages are folded into the state of the current one,
// together with the syndrome of the hard decisions. One iteration takes N
// clocks plus one; decoding stops when every parity check is met or after
// MAX_ITER iterations. The schedule, the compressed state and MAX_ITER are
// this design's choices; the source article only says "message passing".
//
// Interface: channel LLRs are written one 4-bit group (one MTR data word)
// per clock through wr_*; start begins decoding; done pulses at the end with
// converged and iters valid. The a posteriori LLRs and the hard decisions of
// the last iteration are read combinationally through rd_addr (word address).
module ldpc_decoder
  import llr_pkg::*;
#(
  parameter int STS_N    = 28,
  parameter int MAX_ITER = 10,
  localparam int M       = 6 * STS_N + 1,
  localparam int N       = STS_N * M,
  localparam int NW      = N / 4,
  localparam int AW      = $clog2(NW),
  localparam int CW      = $clog2(N),
  localparam int PW      = $clog2(M),
  localparam int IW      = $clog2(MAX_ITER + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  llr_t          wr_llr [4],
  input  logic          start,
  output logic          busy,
  output logic          done,
  output logic          converged,
  output logic [IW-1:0] iters,
  input  logic [AW-1:0] rd_addr,
  output llr_t          rd_llr [4],
  output logic [3:0]    rd_bits
);
  localparam int SW = LLR_W + 3;   // width of the sum of four LLRs
  typedef logic signed [SW-1:0] sum_t;

  initial begin
    assert (N % 4 == 0) else $error("code length must hold whole MTR words");
  end

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_END} state_e;
  state_e state;

  llr_t     ch   [NW][4];
  llr_t     post [NW][4];
  logic [2:0] esg [N];
  // check state: previous iteration (o*) and current iteration (n*)
  llr_mag_t om1 [M], om2 [M], nm1 [M], nm2 [M];
  logic [CW-1:0] oix [M], nix [M];
  logic     osg [M], nsg [M], syn [M];

  logic [CW-1:0] col;
  logic [PW-1:0] chk [3];
  logic          gen_last, gen_restart, gen_step;

  sts_column_gen #(.STS_N(STS_N)) u_gen (
    .clk, .rst_n, .restart(gen_restart), .step(gen_step),
    .chk0(chk[0]), .chk1(chk[1]), .chk2(chk[2]), .last(gen_last)
  );

  // ---- column datapath ----
  llr_t     c2v [3];
  sum_t     total;
  llr_t     v2c [3];
  llr_mag_t v2c_mag [3];
  llr_t     l_ch;
  always_comb begin
    l_ch  = ch[col[CW-1:2]][col[1:0]];
    total = sum_t'(l_ch);
    for (int e = 0; e < 3; e++) begin
      llr_mag_t m;
      logic     sg;
      m  = (oix[chk[e]] == col) ? om2[chk[e]] : om1[chk[e]];
      sg = osg[chk[e]] ^ esg[col][e];
      c2v[e] = sg ? -llr_t'({1'b0, m}) : llr_t'({1'b0, m});
      total  = total + sum_t'(c2v[e]);
    end
    for (int e = 0; e < 3; e++) begin
      v2c[e]     = llr_sat(32'(total) - 32'(c2v[e]));
      v2c_mag[e] = llr_abs(v2c[e]);
    end
  end

  logic any_syn;
  always_comb begin
    any_syn = 1'b0;
    for (int c = 0; c < M; c++) any_syn |= syn[c];
  end

  assign gen_step    = (state == S_RUN);
  assign gen_restart = (state != S_RUN);
  assign busy        = (state != S_IDLE);

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      rd_llr[k]  = post[rd_addr][k];
      rd_bits[k] = post[rd_addr][k][LLR_W-1];
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en && state == S_IDLE)
      for (int k = 0; k < 4; k++) ch[wr_addr][k] <= wr_llr[k];
    if (state == S_RUN) begin
      post[col[CW-1:2]][col[1:0]] <= llr_sat(32'(total));
      for (int e = 0; e < 3; e++) esg[col][e] <= v2c[e][LLR_W-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; col <= '0; iters <= '0; done <= 1'b0; converged <= 1'b0;
      for (int c = 0; c < M; c++) begin
        om1[c] <= '0; om2[c] <= '0; oix[c] <= '0; osg[c] <= 1'b0;
        nm1[c] <= '1; nm2[c] <= '1; nix[c] <= '0; nsg[c] <= 1'b0; syn[c] <= 1'b0;
      end
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_RUN; col <= '0; iters <= '0; converged <= 1'b0;
          for (int c = 0; c < M; c++) begin
            om1[c] <= '0; om2[c] <= '0; oix[c] <= '0; osg[c] <= 1'b0;
            nm1[c] <= '1; nm2[c] <= '1; nix[c] <= '0; nsg[c] <= 1'b0; syn[c] <= 1'b0;
          end
        end
        S_RUN: begin
          for (int e = 0; e < 3; e++) begin
            nsg[chk[e]] <= nsg[chk[e]] ^ v2c[e][LLR_W-1];
            syn[chk[e]] <= syn[chk[e]] ^ total[SW-1];
            if (v2c_mag[e] < nm1[chk[e]]) begin
              nm2[chk[e]] <= nm1[chk[e]];
              nm1[chk[e]] <= v2c_mag[e];
              nix[chk[e]] <= col;
            end else if (v2c_mag[e] < nm2[chk[e]]) begin
              nm2[chk[e]] <= v2c_mag[e];
            end
          end
          if (gen_last) state <= S_END;
          else          col <= col + 1'b1;
        end
        default: begin   // S_END: one iteration complete
          iters <= iters + 1'b1;
          col   <= '0;
          for (int c = 0; c < M; c++) begin
            om1[c] <= nm1[c]; om2[c] <= nm2[c]; oix[c] <= nix[c]; osg[c] <= nsg[c];
            nm1[c] <= '1; nm2[c] <= '1; nix[c] <= '0; nsg[c] <= 1'b0; syn[c] <= 1'b0;
          end
          if (!any_syn || iters + 1'b1 == IW'(MAX_ITER)) begin
            state     <= S_IDLE;
            done      <= 1'b1;
            converged <= !any_syn;
          end else begin
            state <= S_RUN;
          end
        end
      endcase
    end
  end
endmodule
