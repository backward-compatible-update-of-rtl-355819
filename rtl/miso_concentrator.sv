// miso_concentrator: funnels event codes from up to eight asynchronous sources
// into the single master emitter of the timing network, without dead time.
//
// Each source presents a code on `in_code[i]` with a strobe `in_strobe[i]`
// that is asynchronous to the emitter's byte clock `clk` (10 MHz, one code per
// byte slot). Per input, the strobe goes through a two-flop synchronizer and
// its rising edge captures the code into a one-entry pending register. Every
// cycle the lowest-numbered pending input is granted the emitter slot and its
// code appears on `out_code` with `out_valid` for one cycle. Codes that arrive
// too close together are therefore queued and sent in consecutive slots
// instead of being lost: with eight inputs a code waits at most seven slots
// (700 ns), far below the interval between codes of one source (the busiest
// input, the periodic pulse generator on input 0, runs at 2 kHz at most).
// Monitoring counters per input: `collisions[i]` counts codes that arrived
// while a code of another input was pending (they may have been delayed),
// `overruns[i]` counts codes lost because the same input's previous code was
// still pending (the older code is kept). Counters saturate.
//
// Timing: the strobe must stay high, and the code stable, for at least three
// `clk` cycles. A code appears on the output 4 to 4 + N_IN - 1 cycles after its
// strobe rises. The document gives the number of inputs, the input rate and
// the aims (handle collisions, report them, no dead time); the queueing scheme,
// fixed priority and counters are this design's choices.
`timescale 1ns/1ps
module miso_concentrator #(
  parameter int unsigned N_IN   = 8,
  parameter int unsigned CODE_W = 8,
  parameter int unsigned CNT_W  = 16
) (
  input  logic                          clk,        // emitter byte clock
  input  logic                          rst,        // synchronous, active high
  input  logic [N_IN-1:0][CODE_W-1:0]   in_code,
  input  logic [N_IN-1:0]               in_strobe,  // asynchronous
  output logic [CODE_W-1:0]             out_code,
  output logic                          out_valid,
  output logic [N_IN-1:0][CNT_W-1:0]    collisions,
  output logic [N_IN-1:0][CNT_W-1:0]    overruns
);

  logic [N_IN-1:0]             s1, s2, s3;     // synchronizer and edge history
  logic [N_IN-1:0]             arrive;
  logic [N_IN-1:0]             pending;
  logic [N_IN-1:0][CODE_W-1:0] pcode;
  logic [N_IN-1:0]             grant;

  assign arrive = s2 & ~s3;

  // Fixed priority: lowest index first.
  always_comb begin
    grant = '0;
    for (int i = N_IN - 1; i >= 0; i--)
      if (pending[i]) grant = N_IN'(1) << i;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      s1         <= '0;
      s2         <= '0;
      s3         <= '0;
      pending    <= '0;
      pcode      <= '0;
      out_code   <= '0;
      out_valid  <= 1'b0;
      collisions <= '0;
      overruns   <= '0;
    end else begin
      s1 <= in_strobe;
      s2 <= s1;
      s3 <= s2;

      out_valid <= |grant;
      for (int i = 0; i < N_IN; i++) begin
        if (grant[i]) begin
          out_code   <= pcode[i];
          pending[i] <= 1'b0;
        end
      end

      for (int i = 0; i < N_IN; i++) begin
        if (arrive[i]) begin
          if (pending[i] && !grant[i]) begin
            if (overruns[i] != '1) overruns[i] <= overruns[i] + 1'b1;
          end else begin
            pending[i] <= 1'b1;
            pcode[i]   <= in_code[i];
          end
          if (((pending | arrive) & ~(N_IN'(1) << i)) != '0)
            if (collisions[i] != '1) collisions[i] <= collisions[i] + 1'b1;
        end
      end
    end
  end

  a_one_grant : assert property (@(posedge clk) disable iff (rst) $onehot0(grant));

endmodule
