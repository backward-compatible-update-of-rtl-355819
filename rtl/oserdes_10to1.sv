// oserdes_10to1: behavioural model of the output serializer pair of an FPGA
// I/O block (two cascaded OSERDES primitives in DDR mode, 10:1).
//
// A 10-bit word `d` is taken on each rising edge of the 100 MHz `clkdiv` and
// shifted out on `q`, one bit per rising edge of `clk` or `clk_bar` (1 Gb/s),
// d[0] first. A word taken on one `clkdiv` edge is sent during the following
// word period, so the latency is fixed, between one and two word periods. Like
// the real primitive, only the bit order and rate are modelled here, not its
// output timing. The use (10 bits at 1 Gb/s for the recovered clock) follows
// the document.
`timescale 1ns/1ps
module oserdes_10to1 #(
  parameter int unsigned OVS = wts_pkg::OVS
) (
  input  logic           clk,      // 500 MHz
  input  logic           clk_bar,  // 500 MHz, inverted
  input  logic           clkdiv,   // 100 MHz
  input  logic           rst,      // active high
  input  logic [OVS-1:0] d,        // d[0] sent first
  output logic           q         // serial output
);

  localparam int unsigned IW = $clog2(OVS);

  logic [OVS-1:0] nxt;       // word taken on clkdiv
  logic [OVS-1:0] cur;       // word being sent
  logic [IW-1:0]  idx;

  always_ff @(posedge clkdiv) nxt <= d;

  always @(posedge clk, posedge clk_bar) begin
    if (rst) begin
      idx <= '0;
      cur <= '0;
      q   <= 1'b0;
    end else begin
      q <= cur[idx];
      if (idx == IW'(OVS - 1)) begin
        idx <= '0;
        cur <= nxt;
      end else begin
        idx <= idx + 1'b1;
      end
    end
  end

endmodule
