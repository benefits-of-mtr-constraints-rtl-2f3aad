// ldpc_mtr_e2pr4: LDPC outer code + rate 4/5 MTR inner code over an E2PR4
// magnetic recording channel, write path and iterative read channel.
//
// Write path: LDPC codeword bits enter four at a time (one MTR data word),
// mtr_encoder turns each group into a 5-bit MTR(j=2,k=8) code word and
// nrzi_precoder sends it to the head as NRZ bits, one per clock. The LDPC
// encoder itself is not part of this design: wr_data must already be a
// codeword of the triple-system code.
//
// Read path, one frame = N/4 MTR words = 5N/4 channel samples (5915 for the
// default N = 4732):
//   1. the samples are stored in a frame buffer and streamed through
//      sova_detector (14-state trellis, a priori LLRs zero);
//   2. every 5 detector LLRs go through soft_mtr_decoder; the 4 resulting
//      data LLRs are written into ldpc_decoder as channel information;
//   3. ldpc_decoder runs min-sum message passing;
//   4. Case A (case_b = 0): the hard decisions of the decoder are the
//      result. Case B (case_b = 1): the decoder's a posteriori LLRs, four per
//      MTR word, go through soft_mtr_encoder; the 5 code-bit LLRs are stored
//      as a priori information, the frame buffer is replayed through the
//      detector with that a priori term in its branch metric, and steps 2-3
//      repeat, OUTER_ITERS detector/decoder passes in all (5 in the
//      source article);
//   5. the decoded codeword is sent out as N/4 4-bit words, one per clock.
// The order of operations and the use of the decoder's a posteriori (rather
// than extrinsic) LLRs on the return path are this design's choices; the
// source article shows the two schemes only as block diagrams. The message-passing
// state is cleared at every detector/decoder pass.
//
// Interface: y_valid/y_ready accept samples while the read path is waiting
// for a frame; the first accepted sample starts a frame. dec_valid/dec_word/
// dec_last deliver the result (no back-pressure). frame_done pulses with the
// last word; ldpc_converged, ldpc_iters and passes describe that frame.
module ldpc_mtr_e2pr4
  import llr_pkg::*;
#(
  parameter int STS_N       = 28,
  parameter int OUTER_ITERS = 5,
  parameter int LDPC_ITERS  = 10,
  parameter int WINDOW      = 20,
  parameter int Y_W         = 8,
  localparam int M          = 6 * STS_N + 1,
  localparam int N          = STS_N * M,
  localparam int NW         = N / 4,
  localparam int AW         = $clog2(NW),
  localparam int IW         = $clog2(LDPC_ITERS + 1),
  localparam int OW         = $clog2(OUTER_ITERS + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // write path
  input  logic                  wr_valid,
  input  logic                  wr_sof,
  input  logic [3:0]            wr_data,
  output logic                  wr_ready,
  output logic                  ch_valid,
  output logic                  ch_bit,
  // read path
  input  logic                  case_b,
  input  logic                  y_valid,
  input  logic signed [Y_W-1:0] y_in,
  output logic                  y_ready,
  output logic                  dec_valid,
  output logic [3:0]            dec_word,
  output logic                  dec_last,
  output logic                  frame_done,
  output logic                  det_valid,
  output logic [3:0]            det_word,
  output logic                  ldpc_converged,
  output logic [IW-1:0]         ldpc_iters,
  output logic [OW-1:0]         passes
);
  // ------------------------------------------------------------ write path
  logic [4:0] wr_code;
  mtr_encoder u_enc (.d(wr_data), .c(wr_code));
  nrzi_precoder u_pre (
    .clk, .rst_n, .in_valid(wr_valid), .in_sof(wr_sof), .in_word(wr_code),
    .in_ready(wr_ready), .out_valid(ch_valid), .out_bit(ch_bit)
  );

  // ------------------------------------------------------------ read path
  typedef enum logic [2:0] {R_RX, R_REDET, R_DET_WAIT, R_LDPC, R_RET, R_OUT} rstate_e;
  rstate_e rs;

  logic signed [Y_W-1:0] ybuf [NW][5];
  llr_t                  abuf [NW][5];
  logic [AW-1:0]         wq;       // MTR word counter (input, replay, return, output)
  logic [2:0]            kq;       // symbol within the word
  logic [OW-1:0]         pass_cnt;

  // detector
  logic                  d_in_valid, d_in_sof, d_in_eof, d_in_ready;
  logic signed [Y_W-1:0] d_y;
  llr_t                  d_apr;
  logic                  d_out_valid, d_out_bit;
  llr_t                  d_out_llr;
  logic                  last_sym;

  assign last_sym   = (wq == AW'(NW-1)) && (kq == 3'd4);
  assign y_ready    = (rs == R_RX) && d_in_ready;
  assign d_in_valid = (rs == R_RX) ? y_valid : (rs == R_REDET);
  assign d_in_sof   = (wq == '0) && (kq == 3'd0);
  assign d_in_eof   = last_sym;
  assign d_y        = (rs == R_RX) ? y_in : ybuf[wq][kq];
  assign d_apr      = (rs == R_RX) ? llr_t'(0) : abuf[wq][kq];

  sova_detector #(.WINDOW(WINDOW), .Y_W(Y_W)) u_sova (
    .clk, .rst_n, .in_valid(d_in_valid), .in_sof(d_in_sof), .in_eof(d_in_eof),
    .in_y(d_y), .in_apr(d_apr), .in_ready(d_in_ready),
    .out_valid(d_out_valid), .out_bit(d_out_bit), .out_llr(d_out_llr), .out_last()
  );

  // soft MTR decoding of every 5 detector outputs
  llr_t          grp [5];
  llr_t          sd_in [5];
  llr_t          sd_out [4];
  logic [2:0]    gpos;
  logic [AW:0]   gw;        // words delivered to the LDPC decoder
  logic          l_wr;
  logic [3:0]    grp_bit;
  logic [3:0]    hd_word;

  // hard MTR decoding of the detector decisions (data before message passing)
  mtr_decoder u_hdec (.c({d_out_bit, grp_bit}), .d(hd_word));

  always_comb begin
    for (int k = 0; k < 4; k++) sd_in[k] = grp[k];
    sd_in[4] = d_out_llr;
  end
  soft_mtr_decoder u_sdec (.lc(sd_in), .ld(sd_out));
  assign l_wr = d_out_valid && (gpos == 3'd4);

  // LDPC decoder
  logic          l_start, l_done, l_conv;
  logic [IW-1:0] l_iters;
  logic [AW-1:0] l_rd_addr;
  llr_t          l_rd_llr [4];
  logic [3:0]    l_rd_bits;

  assign l_rd_addr = wq;
  assign l_start   = (rs == R_DET_WAIT) && (gw == (AW+1)'(NW));

  ldpc_decoder #(.STS_N(STS_N), .MAX_ITER(LDPC_ITERS)) u_ldpc (
    .clk, .rst_n, .wr_en(l_wr), .wr_addr(gw[AW-1:0]), .wr_llr(sd_out),
    .start(l_start), .busy(), .done(l_done), .converged(l_conv), .iters(l_iters),
    .rd_addr(l_rd_addr), .rd_llr(l_rd_llr), .rd_bits(l_rd_bits)
  );

  // return path: a posteriori data LLRs -> code-bit a priori LLRs
  llr_t se_out [5];
  soft_mtr_encoder u_senc (.ld(l_rd_llr), .lc(se_out));

  // frame buffer and a priori buffer
  always_ff @(posedge clk) begin
    if (rs == R_RX && y_valid && y_ready) ybuf[wq][kq] <= y_in;
    if (rs == R_RET) for (int k = 0; k < 5; k++) abuf[wq][k] <= se_out[k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rs <= R_RX; wq <= '0; kq <= '0; pass_cnt <= '0;
      gpos <= '0; gw <= '0; grp_bit <= '0; det_valid <= 1'b0; det_word <= '0;
      for (int k = 0; k < 5; k++) grp[k] <= '0;
      dec_valid <= 1'b0; dec_word <= '0; dec_last <= 1'b0; frame_done <= 1'b0;
      ldpc_converged <= 1'b0; ldpc_iters <= '0; passes <= '0;
    end else begin
      dec_valid  <= 1'b0;
      dec_last   <= 1'b0;
      frame_done <= 1'b0;
      det_valid  <= l_wr;
      if (l_wr) det_word <= hd_word;

      // group detector outputs into MTR words
      if (d_out_valid) begin
        if (gpos == 3'd4) begin
          gpos <= '0;
          gw   <= gw + 1'b1;
        end else begin
          grp[gpos]     <= d_out_llr;
          grp_bit[gpos[1:0]] <= d_out_bit;
          gpos      <= gpos + 1'b1;
        end
      end

      unique case (rs)
        R_RX, R_REDET: if (d_in_valid && d_in_ready) begin
          if (last_sym) begin
            wq <= '0; kq <= '0; rs <= R_DET_WAIT;
          end else if (kq == 3'd4) begin
            kq <= '0; wq <= wq + 1'b1;
          end else begin
            kq <= kq + 1'b1;
          end
        end
        R_DET_WAIT: if (l_start) begin
          gw <= '0;
          rs <= R_LDPC;
        end
        R_LDPC: if (l_done) begin
          pass_cnt       <= pass_cnt + 1'b1;
          ldpc_converged <= l_conv;
          ldpc_iters     <= l_iters;
          wq             <= '0;
          if (case_b && (pass_cnt + 1'b1 < OW'(OUTER_ITERS))) rs <= R_RET;
          else                                                rs <= R_OUT;
        end
        R_RET: begin
          if (wq == AW'(NW-1)) begin wq <= '0; rs <= R_REDET; end
          else wq <= wq + 1'b1;
        end
        default: begin  // R_OUT
          dec_valid <= 1'b1;
          dec_word  <= l_rd_bits;
          if (wq == AW'(NW-1)) begin
            dec_last   <= 1'b1;
            frame_done <= 1'b1;
            passes     <= pass_cnt;
            pass_cnt   <= '0;
            wq         <= '0;
            rs         <= R_RX;
          end else begin
            wq <= wq + 1'b1;
          end
        end
      endcase
    end
  end
endmodule
