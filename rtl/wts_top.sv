// wts_top: the two FPGA functions of the backward compatible timing network
// upgrade, side by side.
//
//  * CDR receiver (wts_cdr): a node's optical input at 100 Mbit/s
//    (`serial_in`) is recovered in firmware against the local 100 MHz
//    oscillator (`osc_clk`) and turned into byte codes, code timestamps, a
//    recovered bit count and a regenerated divided clock (`recovered_clk`).
//    These feed the node's chrono board logic, which is outside this design.
//  * MISO concentrator (miso_concentrator): eight asynchronous event sources
//    are merged into one code stream for the master emitter, clocked by the
//    emitter's 10 MHz byte clock (`conc_clk`).
// The two have nothing in common but this wrapper; each keeps its own clock,
// reset and ports. Timing of each is described in its own module.
`timescale 1ns/1ps
module wts_top #(
  parameter int unsigned DIV_BITS = 100,   // recovered clock: 100 Mbit/s / DIV_BITS
  parameter int unsigned TS_W     = 32,
  parameter int unsigned N_IN     = 8,
  parameter int unsigned CNT_W    = 16
) (
  // CDR receiver
  input  logic                       osc_clk,
  input  logic                       rst,
  input  logic                       serial_in,
  output logic                       word_clk,
  output logic [7:0]                 code,
  output logic                       code_valid,
  output logic                       code_sync,
  output logic                       code_error,
  output logic [TS_W-1:0]            code_timestamp,
  output logic [TS_W-1:0]            bit_count,
  output logic                       recovered_clk,
  output logic                       locked,
  output logic                       aligned,
  output logic                       realign,
  // MISO concentrator
  input  logic                       conc_clk,
  input  logic                       conc_rst,
  input  logic [N_IN-1:0][7:0]       conc_in_code,
  input  logic [N_IN-1:0]            conc_in_strobe,
  output logic [7:0]                 conc_out_code,
  output logic                       conc_out_valid,
  output logic [N_IN-1:0][CNT_W-1:0] conc_collisions,
  output logic [N_IN-1:0][CNT_W-1:0] conc_overruns
);

  wts_cdr #(
    .DIV_BITS (DIV_BITS),
    .TS_W     (TS_W)
  ) u_cdr (
    .osc_clk        (osc_clk),
    .rst            (rst),
    .serial_in      (serial_in),
    .word_clk       (word_clk),
    .code           (code),
    .code_valid     (code_valid),
    .code_sync      (code_sync),
    .code_error     (code_error),
    .code_timestamp (code_timestamp),
    .bit_count      (bit_count),
    .recovered_clk  (recovered_clk),
    .locked         (locked),
    .aligned        (aligned),
    .realign        (realign)
  );

  miso_concentrator #(
    .N_IN   (N_IN),
    .CODE_W (8),
    .CNT_W  (CNT_W)
  ) u_conc (
    .clk        (conc_clk),
    .rst        (conc_rst),
    .in_code    (conc_in_code),
    .in_strobe  (conc_in_strobe),
    .out_code   (conc_out_code),
    .out_valid  (conc_out_valid),
    .collisions (conc_collisions),
    .overruns   (conc_overruns)
  );

endmodule
