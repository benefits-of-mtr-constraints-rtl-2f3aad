// sova_detector: soft-output Viterbi detector for the E2PR4 channel with the
// MTR(j=2) constraint, i.e. on a 14-state trellis.
//
// The E2PR4 target (1-D)(1+D)^3 has the response 1 + 2D - 2D^3 - D^4 and a
// memory of four NRZ bits, so its full trellis has 16 states. The MTR code
// keeps 0101 and 1010 out of the NRZ sequence, so those two states and every
// branch through them are removed: 14 states remain, and the states whose
// three older bits read 010 or 101 have a single predecessor.
//
// State s holds the last four NRZ bits, s[0] newest. A branch from s to
// ns = {s[2:0], a} has the noiseless sample
//   x = b(a) + 2 b(s[0]) - 2 b(s[2]) - b(s[3]),  b(v) = 2v - 1,
// and carries the NRZI label u = a XOR s[0] (one recorded transition), which
// is the bit the detector delivers. The branch metric is the source article's
//   (y - x)^2 + u * LLR_apriori,
// with x scaled by Y_UNIT sample LSBs per level and the a priori LLR shifted
// left by REL_SHIFT into metric units. Path metrics are renormalised each
// step by subtracting the smallest one.
//
// Soft output uses register exchange over a WINDOW-symbol window (20 in the
// source article): every state keeps the last WINDOW decisions and their
// reliabilities. On each add-compare-select with two candidates, positions
// where the survivor and the competitor disagree get
// reliability = min(reliability, |metric difference| >> REL_SHIFT)
// (Hagenauer's rule). The output symbol, WINDOW steps old, is taken from
// the state with the best metric and sent as an LLR of the NRZI bit
// (positive = no transition).
//
// Interface: one sample per clock while in_ready is high. in_sof marks the
// first sample of a frame (the trellis restarts from state 0000, i.e. the
// precoder and channel memory cleared); in_eof marks the last. Output k
// appears WINDOW accepted samples after input k, registered. After in_eof
// the detector drops in_ready and flushes the last min(WINDOW, frame length)
// decisions from the best state, one per clock, with out_last on the final
// one. Fixed-point sizes, the scaling and the flush are this design's choice.
module sova_detector
  import llr_pkg::*;
#(
  parameter int WINDOW    = 20,
  parameter int Y_W       = 8,
  parameter int Y_UNIT    = 8,
  parameter int PM_W      = 20,
  parameter int REL_SHIFT = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic                  in_sof,
  input  logic                  in_eof,
  input  logic signed [Y_W-1:0] in_y,
  input  llr_t                  in_apr,
  output logic                  in_ready,
  output logic                  out_valid,
  output logic                  out_bit,
  output llr_t                  out_llr,
  output logic                  out_last
);
  localparam int NS = 16;
  localparam logic signed [PM_W-1:0] PM_MAX  = {1'b0, {(PM_W-1){1'b1}}};
  localparam logic signed [PM_W-1:0] PM_INIT = PM_W'(1) <<< (PM_W - 3);
  localparam int CW = $clog2(WINDOW + 1);
  typedef logic signed [PM_W-1:0] pm_t;

  function automatic logic state_ok(input int s);
    return (s != 5) && (s != 10);
  endfunction

  function automatic int bip(input logic v);
    return v ? 1 : -1;
  endfunction

  // noiseless E2PR4 level of a branch: a_k, a_(k-1), a_(k-3), a_(k-4)
  // (the tap on a_(k-2) is zero)
  function automatic int level(input logic a0, input logic a1, input logic a3, input logic a4);
    return bip(a0) + 2 * bip(a1) - 2 * bip(a3) - bip(a4);
  endfunction

  pm_t                    pm   [NS];
  logic [WINDOW-1:0]      dec  [NS];
  llr_mag_t               rel  [NS][WINDOW];
  logic [CW-1:0]          fill;
  logic                   flushing;
  logic [CW-1:0]          flush_n;

  pm_t                    pm_base [NS];
  pm_t                    pm_min;
  logic [3:0]             best;
  pm_t                    pm_nx   [NS];
  logic [WINDOW-1:0]      dec_nx  [NS];
  llr_mag_t               rel_nx  [NS][WINDOW];

  logic accept;
  assign in_ready = !flushing;
  assign accept   = in_valid && in_ready;

  // metric base (restart at a frame start) and the best state
  always_comb begin
    for (int s = 0; s < NS; s++)
      pm_base[s] = (accept && in_sof) ? ((s == 0) ? pm_t'(0) : PM_INIT) : pm[s];
    pm_min = PM_MAX;
    best   = 4'd0;
    for (int s = 0; s < NS; s++)
      if (state_ok(s) && pm_base[s] < pm_min) begin
        pm_min = pm_base[s];
        best   = 4'(s);
      end
  end

  // add-compare-select and register exchange
  always_comb begin
    for (int ns = 0; ns < NS; ns++) begin
      logic [3:0]              p0, p1, ps, pc;
      logic                    u, two, sel;
      logic signed [PM_W+1:0]  m0, m1, diff;
      logic signed [Y_W+3:0]   e0, e1;
      logic signed [PM_W+1:0]  apr_term;
      llr_mag_t                delta;
      p0 = {1'b0, 3'(ns >> 1)};
      p1 = {1'b1, 3'(ns >> 1)};
      u  = 1'(ns) ^ 1'(ns >> 1);
      apr_term = u ? ((PM_W+2)'(in_apr) <<< REL_SHIFT) : '0;
      e0 = (Y_W+4)'(in_y) - (Y_W+4)'(level(1'(ns), 1'(ns >> 1), 1'(ns >> 3), 1'b0) * Y_UNIT);
      e1 = (Y_W+4)'(in_y) - (Y_W+4)'(level(1'(ns), 1'(ns >> 1), 1'(ns >> 3), 1'b1) * Y_UNIT);
      m0 = (PM_W+2)'(pm_base[p0]) - (PM_W+2)'(pm_min) + (PM_W+2)'(e0 * e0) + apr_term;
      m1 = (PM_W+2)'(pm_base[p1]) - (PM_W+2)'(pm_min) + (PM_W+2)'(e1 * e1) + apr_term;
      two = state_ok(int'(p0)) && state_ok(int'(p1));
      if (!state_ok(int'(p0)))      sel = 1'b1;
      else if (!state_ok(int'(p1))) sel = 1'b0;
      else                          sel = (m1 < m0);
      ps   = sel ? p1 : p0;
      pc   = sel ? p0 : p1;
      diff = sel ? (m0 - m1) : (m1 - m0);
      if ((diff >>> REL_SHIFT) > (PM_W+2)'(LLR_MAX)) delta = llr_mag_t'(LLR_MAX);
      else                                delta = llr_mag_t'(diff >>> REL_SHIFT);
      if (!state_ok(ns)) begin
        pm_nx[ns]  = PM_MAX;
        dec_nx[ns] = '0;
        for (int i = 0; i < WINDOW; i++) rel_nx[ns][i] = '0;
      end else begin
        if ((sel ? m1 : m0) > (PM_W+2)'(PM_MAX)) pm_nx[ns] = PM_MAX;
        else                                    pm_nx[ns] = pm_t'(sel ? m1 : m0);
        dec_nx[ns]    = {dec[ps][WINDOW-2:0], u};
        rel_nx[ns][0] = llr_mag_t'(LLR_MAX);
        for (int i = 1; i < WINDOW; i++) begin
          rel_nx[ns][i] = rel[ps][i-1];
          if (two && (dec[ps][i-1] != dec[pc][i-1]) && (delta < rel[ps][i-1]))
            rel_nx[ns][i] = delta;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NS; s++) begin
        pm[s]  <= (s == 0) ? pm_t'(0) : PM_INIT;
        dec[s] <= '0;
        for (int i = 0; i < WINDOW; i++) rel[s][i] <= '0;
      end
      fill      <= '0;
      flushing  <= 1'b0;
      flush_n   <= '0;
      out_valid <= 1'b0;
      out_bit   <= 1'b0;
      out_llr   <= '0;
      out_last  <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      if (accept) begin
        for (int s = 0; s < NS; s++) begin
          pm[s]  <= pm_nx[s];
          dec[s] <= dec_nx[s];
          for (int i = 0; i < WINDOW; i++) rel[s][i] <= rel_nx[s][i];
        end
        if (!in_sof && fill == CW'(WINDOW)) begin
          out_valid <= 1'b1;
          out_bit   <= dec[best][WINDOW-1];
          out_llr   <= dec[best][WINDOW-1] ? -llr_t'({1'b0, rel[best][WINDOW-1]})
                                           :  llr_t'({1'b0, rel[best][WINDOW-1]});
        end
        if (in_sof)                     fill <= CW'(1);
        else if (fill != CW'(WINDOW))   fill <= fill + 1'b1;
        if (in_eof) begin
          flushing <= 1'b1;
          flush_n  <= in_sof ? CW'(1) : ((fill == CW'(WINDOW)) ? fill : fill + 1'b1);
        end
      end else if (flushing) begin
        // registers are frozen; shift the best survivor out, oldest first
        out_valid <= 1'b1;
        out_bit   <= dec[best][flush_n-1];
        out_llr   <= dec[best][flush_n-1] ? -llr_t'({1'b0, rel[best][flush_n-1]})
                                          :  llr_t'({1'b0, rel[best][flush_n-1]});
        flush_n   <= flush_n - 1'b1;
        if (flush_n == CW'(1)) begin
          flushing <= 1'b0;
          out_last <= 1'b1;
          fill     <= '0;
        end
      end
    end
  end
endmodule
