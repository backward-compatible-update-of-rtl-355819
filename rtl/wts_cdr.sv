// wts_cdr: clock and data recovery for the WEST timing network, done entirely
// in FPGA fabric and I/O serializers, with no external CDR chip.
//
// The timing link is a 100 Mbit/s NRZI stream of 4b/5b symbols: one byte per
// 100 ns, idle time filled with the JK sync pair. The receiver chain is:
//   divider_pll            100 MHz local oscillator -> 500 MHz clk/clk_bar and
//                          the 100 MHz word clock `word_clk`
//   iserdes_1to10          1 GHz DDR sampler, ten samples per word clock cycle
//   transition_lock        finds and tracks the bit boundaries, forwards 0, 1
//                          or 2 line bits per cycle
//   nrzi_decoder           line bits -> data bits
//   word_align             0/1/2 bits per cycle -> 10-bit words framed on JK
//   dec4b5b                10-bit words -> byte codes (`code`, `code_valid`)
//   bit_transition_counter recovered bit count and a divided recovered clock
//                          pattern with 1 ns edge placement
//   oserdes_10to1          serializes that pattern at 1 Gb/s: `recovered_clk`
// All logic runs in the local word clock domain, which is asynchronous to the
// remote bit clock; a code word therefore takes 10 cycles on average, 9 or 11
// when a bit is gained or lost to the frequency offset. Every decoded code is
// stamped with the recovered bit count at the moment it leaves the decoder
// (`code_timestamp`, one count per 10 ns bit, valid with `code_valid`). Latency from the line to
// `code_valid` is a fixed few word cycles plus the sampling phase.
//
// `rst` is asynchronous; it is held internally until the PLL has locked and is
// released synchronously to the word clock. The chain and its clock plan
// follow the document's block diagram; lock rules, bit order, reset scheme and
// the code timestamp register are this design's choices.
`timescale 1ns/1ps
module wts_cdr #(
  parameter int unsigned OVS          = wts_pkg::OVS,
  parameter int unsigned DIV_BITS     = 100,   // recovered clock = 100 Mbit/s / DIV_BITS
  parameter int unsigned TS_W         = 32,
  parameter int unsigned LOCK_EDGES   = 16,
  parameter int unsigned UNLOCK_EDGES = 8
) (
  input  logic            osc_clk,        // local 100 MHz oscillator
  input  logic            rst,            // asynchronous, active high
  input  logic            serial_in,      // 100 Mbit/s WTS line
  output logic            word_clk,       // 100 MHz word clock of all outputs
  output logic [7:0]      code,
  output logic            code_valid,
  output logic            code_sync,      // JK sync pair received
  output logic            code_error,     // invalid code word received
  output logic [TS_W-1:0] code_timestamp, // bit_count when `code` was decoded
  output logic [TS_W-1:0] bit_count,      // recovered bits since reset
  output logic            recovered_clk,  // 1 Gb/s serializer output
  output logic            locked,         // transition lock achieved
  output logic            aligned,        // word framing found
  output logic            realign         // word framing moved
);

  localparam int unsigned PW = $clog2(OVS);

  logic clk5, clk5_bar, pll_locked;

  divider_pll #(.MULT(5)) u_pll (
    .ref_clk (osc_clk),
    .rst     (rst),
    .clk     (clk5),
    .clk_bar (clk5_bar),
    .clkdiv  (word_clk),
    .locked  (pll_locked)
  );

  // Reset held while the PLL is not locked, released on the word clock. The
  // synchronizer also starts in reset from FPGA configuration: its declaration
  // carries that power-up value on purpose, so that the chain is reset even if
  // `rst` is never pulsed.
  logic       rst_a;
  logic [1:0] rst_sync = 2'b11;
  logic       srst;
  assign rst_a = rst | ~pll_locked;
  always_ff @(posedge word_clk or posedge rst_a) begin
    if (rst_a) rst_sync <= 2'b11;
    else       rst_sync <= {rst_sync[0], 1'b0};
  end
  assign srst = rst_sync[1];

  logic [OVS-1:0] samples;
  iserdes_1to10 #(.OVS(OVS)) u_iserdes (
    .clk     (clk5),
    .clk_bar (clk5_bar),
    .clkdiv  (word_clk),
    .rst     (srst),
    .d       (serial_in),
    .q       (samples)
  );

  logic [1:0]    line_bits, line_valid;
  logic [PW-1:0] edge_pos;
  logic [1:0]    bnd_n;
  transition_lock #(
    .OVS          (OVS),
    .LOCK_EDGES   (LOCK_EDGES),
    .UNLOCK_EDGES (UNLOCK_EDGES)
  ) u_lock (
    .clk        (word_clk),
    .rst        (srst),
    .samples    (samples),
    .bits       (line_bits),
    .bits_valid (line_valid),
    .edge_pos   (edge_pos),
    .bnd_n      (bnd_n),
    .locked     (locked)
  );

  logic [1:0] dbits, dvalid;
  nrzi_decoder u_nrzi (
    .clk        (word_clk),
    .rst        (srst),
    .line_bits  (line_bits),
    .line_valid (line_valid),
    .bits       (dbits),
    .bits_valid (dvalid)
  );

  logic [9:0] word;
  logic       word_valid;
  word_align u_align (
    .clk        (word_clk),
    .rst        (srst),
    .bits       (dbits),
    .bits_valid (dvalid),
    .word       (word),
    .word_valid (word_valid),
    .aligned    (aligned),
    .realign    (realign)
  );

  dec4b5b u_dec (
    .clk        (word_clk),
    .rst        (srst),
    .word       (word),
    .word_valid (word_valid),
    .code       (code),
    .code_valid (code_valid),
    .sync       (code_sync),
    .code_error (code_error)
  );

  logic [OVS-1:0] clk_pattern;
  bit_transition_counter #(
    .OVS      (OVS),
    .DIV_BITS (DIV_BITS),
    .TS_W     (TS_W)
  ) u_btc (
    .clk       (word_clk),
    .rst       (srst),
    .locked    (locked),
    .edge_pos  (edge_pos),
    .bnd_n     (bnd_n),
    .pattern   (clk_pattern),
    .bit_count (bit_count)
  );

  oserdes_10to1 #(.OVS(OVS)) u_oserdes (
    .clk     (clk5),
    .clk_bar (clk5_bar),
    .clkdiv  (word_clk),
    .rst     (srst),
    .d       (clk_pattern),
    .q       (recovered_clk)
  );

  // Recovered-clock-domain timestamp of each word, taken as it enters the
  // decoder so that it is valid together with `code_valid`.
  always_ff @(posedge word_clk) begin
    if (srst)            code_timestamp <= '0;
    else if (word_valid) code_timestamp <= bit_count;
  end

endmodule
