// transition_lock: lock on the transitions of the 10x oversampled WTS stream
// and forward the recovered line bits.
//
// Every 100 MHz cycle the input deserializer delivers OVS = 10 samples of the
// 100 Mbit/s line, taken 1 ns apart; samples[0] is the earliest. The local
// sampling clock is not the remote bit clock, so the bit boundaries drift
// through the word. This block:
//   * finds the first transition in the word (comparing each sample with the
//     one before it, the last sample of the previous word included);
//   * acquires: the first transition sets the boundary phase `edge_pos`;
//   * tracks: afterwards every transition moves `edge_pos` one sample towards
//     itself (bang-bang tracking, wrapping modulo OVS);
//   * samples the line half a bit after the boundary, at
//     sp = (edge_pos + OVS/2) mod OVS;
//   * forwards 1 bit per cycle normally, 0 bits when sp wraps from OVS-1 to 0
//     (remote clock slower, underflow) and 2 bits when sp wraps from 0 to
//     OVS-1 (remote clock faster, overflow). With two bits, bits[0] is the
//     earlier one (sample 0) and bits[1] the later (sample OVS-1).
//   * reports how many bit boundaries fell in the word (`bnd_n`, 0/1/2, same
//     wrap rule applied to edge_pos) for the recovered clock generator.
// Lock: LOCK_EDGES consecutive transitions within one sample of the tracked
// phase raise `locked`; UNLOCK_EDGES consecutive transitions more than two
// samples away, or LOS_WORDS words without any transition (loss of signal:
// the 4b/5b code never leaves more than three bits without one), drop lock and
// restart acquisition. A phase jump of the line is simply tracked back, one
// sample per transition. Bits are forwarded only while locked. Outputs are
// registered: one cycle latency from `samples`.
//
// The document gives the function (lock on transitions, track the drift, 0/1/2
// valid bits per cycle, 1 ns resolution); the tracking rule, the sampling
// point and the lock criteria are this design's own choices.
`timescale 1ns/1ps
module transition_lock #(
  parameter int unsigned OVS          = wts_pkg::OVS,
  parameter int unsigned LOCK_EDGES   = 16,
  parameter int unsigned UNLOCK_EDGES = 8,
  parameter int unsigned LOS_WORDS    = 16
) (
  input  logic                   clk,       // 100 MHz word clock
  input  logic                   rst,       // synchronous, active high
  input  logic [OVS-1:0]         samples,   // samples[0] earliest
  output logic [1:0]             bits,      // recovered line (NRZI) bits
  output logic [1:0]             bits_valid,// 00: none, 01: bits[0], 11: both
  output logic [$clog2(OVS)-1:0] edge_pos,  // tracked boundary phase
  output logic [1:0]             bnd_n,     // bit boundaries in this word
  output logic                   locked
);

  localparam int unsigned PW = $clog2(OVS);
  localparam int unsigned CW = $clog2(LOCK_EDGES + UNLOCK_EDGES + 1) + 1;

  logic          last_s;          // last sample of the previous word
  logic          acq;             // phase acquired
  logic [PW-1:0] ph;              // tracked boundary phase
  logic [CW-1:0] good_cnt, bad_cnt;
  logic [$clog2(LOS_WORDS + 1)-1:0] idle_cnt;   // words without a transition

  // ---- transition search -------------------------------------------------
  logic [OVS-1:0] trans;
  logic           has_edge;
  logic [PW-1:0]  t_pos;

  always_comb begin
    trans[0] = samples[0] ^ last_s;
    for (int i = 1; i < OVS; i++) trans[i] = samples[i] ^ samples[i-1];
    has_edge = |trans;
    t_pos    = '0;
    for (int i = OVS - 1; i >= 0; i--)
      if (trans[i]) t_pos = PW'(i);
  end

  // Signed distance from the tracked phase to the transition, in
  // [-OVS/2, OVS/2 - 1].
  int diff;
  always_comb begin
    diff = int'(t_pos) - int'(ph);
    if (diff >= int'(OVS / 2)) diff -= int'(OVS);
    else if (diff < -int'(OVS / 2)) diff += int'(OVS);
  end

  function automatic logic [PW-1:0] wrap_inc(input logic [PW-1:0] p);
    return (p == PW'(OVS - 1)) ? '0 : p + 1'b1;
  endfunction
  function automatic logic [PW-1:0] wrap_dec(input logic [PW-1:0] p);
    return (p == '0) ? PW'(OVS - 1) : p - 1'b1;
  endfunction
  function automatic logic [PW-1:0] samp_pt(input logic [PW-1:0] p);
    return (int'(p) + int'(OVS / 2) >= int'(OVS)) ? PW'(int'(p) + int'(OVS / 2) - int'(OVS))
                                                 : PW'(int'(p) + int'(OVS / 2));
  endfunction

  // ---- next phase --------------------------------------------------------
  logic [PW-1:0] ph_n;
  logic          acq_n;
  always_comb begin
    ph_n  = ph;
    acq_n = acq;
    if (has_edge) begin
      if (!acq) begin
        ph_n  = t_pos;
        acq_n = 1'b1;
      end else if (diff > 0) begin
        ph_n = wrap_inc(ph);
      end else if (diff < 0) begin
        ph_n = wrap_dec(ph);
      end
    end
  end

  // Wrap events of the sampling point and of the boundary phase.
  logic [PW-1:0] sp_o, sp_n;
  logic          sp_up, sp_dn, ph_up, ph_dn;
  always_comb begin
    sp_o  = samp_pt(ph);
    sp_n  = samp_pt(ph_n);
    sp_up = acq && (sp_o == PW'(OVS - 1)) && (sp_n == '0);
    sp_dn = acq && (sp_o == '0) && (sp_n == PW'(OVS - 1));
    ph_up = acq && (ph == PW'(OVS - 1)) && (ph_n == '0);
    ph_dn = acq && (ph == '0) && (ph_n == PW'(OVS - 1));
  end

  // ---- lock qualification ------------------------------------------------
  logic good_edge, bad_edge;
  assign good_edge = has_edge && acq && (diff >= -1) && (diff <= 1);
  assign bad_edge  = has_edge && acq && ((diff > 2) || (diff < -2));

  always_ff @(posedge clk) begin
    if (rst) begin
      last_s     <= 1'b0;
      acq        <= 1'b0;
      ph         <= '0;
      good_cnt   <= '0;
      bad_cnt    <= '0;
      idle_cnt   <= '0;
      locked     <= 1'b0;
      bits       <= '0;
      bits_valid <= '0;
      bnd_n      <= '0;
    end else begin
      last_s <= samples[OVS-1];
      ph     <= ph_n;
      acq    <= acq_n;

      if (has_edge) idle_cnt <= '0;
      else if (int'(idle_cnt) + 1 >= int'(LOS_WORDS)) begin
        // Loss of signal: restart acquisition.
        idle_cnt <= '0;
        good_cnt <= '0;
        bad_cnt  <= '0;
        locked   <= 1'b0;
        acq      <= 1'b0;
      end else idle_cnt <= idle_cnt + 1'b1;

      if (good_edge) begin
        bad_cnt <= '0;
        if (good_cnt != CW'(LOCK_EDGES)) good_cnt <= good_cnt + 1'b1;
        if (good_cnt + 1'b1 >= CW'(LOCK_EDGES)) locked <= 1'b1;
      end else if (bad_edge) begin
        good_cnt <= '0;
        if (bad_cnt + 1'b1 >= CW'(UNLOCK_EDGES)) begin
          // Lost: restart acquisition on the next transition.
          bad_cnt <= '0;
          locked  <= 1'b0;
          acq     <= 1'b0;
        end else begin
          bad_cnt <= bad_cnt + 1'b1;
        end
      end

      // Forward the recovered bits of this word.
      bits       <= '0;
      bits_valid <= '0;
      bnd_n      <= '0;
      if (locked) begin
        if (sp_dn) begin
          bits       <= {samples[OVS-1], samples[0]};
          bits_valid <= 2'b11;
        end else if (!sp_up) begin
          bits       <= {1'b0, samples[sp_n]};
          bits_valid <= 2'b01;
        end
        bnd_n <= ph_up ? 2'd0 : (ph_dn ? 2'd2 : 2'd1);
      end
    end
  end

  assign edge_pos = ph;

  // Tracking moves the phase by at most one sample per word.
  a_one_wrap : assert property (@(posedge clk) disable iff (rst) !(sp_up && sp_dn));

endmodule
