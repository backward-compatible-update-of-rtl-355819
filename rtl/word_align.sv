// word_align: recovers and tracks the 10-bit word boundaries of the decoded
// WTS bit stream.
//
// Each cycle 0, 1 or 2 decoded bits arrive (bits[0] first). They are shifted
// one by one into a 10-bit register, newest bit at the LSB, so that once ten
// bits are in, sr[9] is the first transmitted bit of the word. After every
// shifted bit the register is compared with the JK sync pair (11000 10001),
// which the 4b/5b code reserves and which cannot appear across data symbols.
// A match fixes the word boundary: the JK itself is delivered as a word and the
// bit counter restarts. If a JK is found where the current framing does not
// expect a word end, the framing is moved to it at once and `realign` pulses.
// Afterwards a word is delivered every ten bits, so words come every 10 cycles
// most of the time, sometimes 9 or 11 when the transition lock forwards 2 or 0
// bits. Outputs are registered (one cycle after the bits).
//
// The document gives the function (shift 0/1/2 bits per cycle, find and track
// boundaries on the reserved idle characters); the immediate realignment and
// the bit order are this design's choices.
`timescale 1ns/1ps
module word_align #(
  parameter int unsigned  W    = wts_pkg::WORD_W,
  parameter logic [W-1:0] SYNC = wts_pkg::SYNC_JK
) (
  input  logic         clk,
  input  logic         rst,         // synchronous, active high
  input  logic [1:0]   bits,        // decoded bits, [0] first
  input  logic [1:0]   bits_valid,  // 00, 01 or 11
  output logic [W-1:0] word,        // word[W-1] first transmitted bit
  output logic         word_valid,
  output logic         aligned,     // a JK has been seen since reset
  output logic         realign      // framing moved to a new JK position
);

  localparam int unsigned CW = $clog2(W + 1);

  logic [W-1:0]  sr;
  logic [CW-1:0] cnt;    // bits of the current word received so far

  logic [W-1:0]  sr_n, word_n;
  logic [CW-1:0] cnt_n;
  logic          aligned_n, wv_n, realign_n;

  always_comb begin
    sr_n      = sr;
    cnt_n     = cnt;
    aligned_n = aligned;
    word_n    = word;
    wv_n      = 1'b0;
    realign_n = 1'b0;
    for (int k = 0; k < 2; k++) begin
      if (bits_valid[k]) begin
        sr_n  = {sr_n[W-2:0], bits[k]};
        cnt_n = cnt_n + 1'b1;
        if (sr_n == SYNC) begin
          if (aligned_n && cnt_n != CW'(W)) realign_n = 1'b1;
          aligned_n = 1'b1;
          cnt_n     = CW'(W);
        end
        if (cnt_n == CW'(W)) begin
          cnt_n = '0;
          if (aligned_n) begin
            word_n = sr_n;
            wv_n   = 1'b1;
          end
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sr         <= '0;
      cnt        <= '0;
      aligned    <= 1'b0;
      word       <= '0;
      word_valid <= 1'b0;
      realign    <= 1'b0;
    end else begin
      sr         <= sr_n;
      cnt        <= cnt_n;
      aligned    <= aligned_n;
      word       <= word_n;
      word_valid <= wv_n;
      realign    <= realign_n;
    end
  end

endmodule
