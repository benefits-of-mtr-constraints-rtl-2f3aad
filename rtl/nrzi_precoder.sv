// nrzi_precoder: serialises MTR code words and precodes them for the channel.
//
// Accepts one 5-bit NRZI code word per handshake (in_valid & in_ready) and
// emits its bits, c[0] first, one per clock on out_bit/out_valid. Each NRZI
// bit is turned into the NRZ write current by a = a_prev XOR c (the 1/(1+D)
// precoder), so an NRZI "1" is a magnetisation transition. With MTR(j=2)
// code words this keeps 0101 and 1010 off the channel input, which is what
// lets the detector drop two of the 16 E2PR4 trellis states. in_sof on the
// first word of a frame clears the precoder state to 0, matching the
// detector's start state. A new word is taken in the cycle its predecessor's
// last bit leaves, so a continuous stream runs at one bit per clock.
// The precoder itself is this design's reading of the source article's statement
// that the MTR constraint removes 1010 and 0101 from the channel input.
module nrzi_precoder (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic       in_sof,
  input  logic [4:0] in_word,
  output logic       in_ready,
  output logic       out_valid,
  output logic       out_bit
);
  logic [4:0] sh;       // remaining NRZI bits, next one in sh[0]
  logic [2:0] left;     // bits still to send from sh
  logic       state;    // last NRZ bit written

  assign in_ready = (left <= 3'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh <= '0; left <= '0; state <= 1'b0; out_valid <= 1'b0; out_bit <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (left != 0) begin
        out_valid <= 1'b1;
        out_bit   <= state ^ sh[0];
        state     <= state ^ sh[0];
        sh        <= sh >> 1;
        left      <= left - 3'd1;
      end
      if (in_valid && in_ready) begin
        if (left == 3'd1) begin
          sh <= in_word; left <= 3'd5;
          if (in_sof) begin
            // the bit leaving now still belongs to the previous frame
            state <= 1'b0;
          end
        end else begin
          // idle: emit the first bit of the new word at once
          out_valid <= 1'b1;
          out_bit   <= (in_sof ? 1'b0 : state) ^ in_word[0];
          state     <= (in_sof ? 1'b0 : state) ^ in_word[0];
          sh        <= {1'b0, in_word[4:1]};
          left      <= 3'd4;
        end
      end
    end
  end
endmodule
