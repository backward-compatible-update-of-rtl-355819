// iserdes_1to10: behavioural model of the input deserializer pair of an FPGA
// I/O block (two cascaded ISERDES primitives in DDR mode, 1:10).
//
// The serial input is sampled on every rising edge of `clk` and of `clk_bar`,
// two opposite 500 MHz clocks, i.e. once per nanosecond. On each rising edge of
// the 100 MHz `clkdiv` the ten samples taken on the ten preceding fast edges
// are presented on `q`, q[0] being the earliest. Sampling is asynchronous to
// the incoming bit stream. The real primitive's pipeline latency, bitslip and
// set-up/hold behaviour are not modelled. The sampling scheme (DDR at 500 MHz,
// 1 GHz, ten-bit words at 100 MHz) follows the document.
`timescale 1ns/1ps
module iserdes_1to10 #(
  parameter int unsigned OVS = wts_pkg::OVS
) (
  input  logic           clk,      // 500 MHz
  input  logic           clk_bar,  // 500 MHz, inverted
  input  logic           clkdiv,   // 100 MHz
  input  logic           rst,      // synchronous to clkdiv, active high
  input  logic           d,        // serial line
  output logic [OVS-1:0] q         // q[0] earliest sample
);

  logic [OVS-1:0] sh;

  // One sample per fast edge, newest at the top.
  always @(posedge clk, posedge clk_bar)
    sh <= {d, sh[OVS-1:1]};

  always_ff @(posedge clkdiv) begin
    if (rst) q <= '0;
    else     q <= sh;
  end

endmodule
