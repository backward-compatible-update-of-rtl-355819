// nrzi_decoder: inverts the NRZI line code of the recovered bit stream.
//
// In NRZI a 1 is sent as a change of line level and a 0 as no change, so each
// decoded bit is the XOR of a line bit with the line bit before it. The block
// takes the 0, 1 or 2 line bits per cycle produced by the transition lock
// (bits[0] earlier than bits[1], valid flags 00/01/11), keeps the last line
// level across cycles and gives the decoded bits with the same valid flags one
// cycle later. The first bit after reset is decoded against a line level of 0.
// The document places this step between the transition lock and the word
// alignment; the register stage and the reset level are this design's choices.
`timescale 1ns/1ps
module nrzi_decoder (
  input  logic       clk,
  input  logic       rst,        // synchronous, active high
  input  logic [1:0] line_bits,  // NRZI line bits, [0] earlier
  input  logic [1:0] line_valid, // 00, 01 or 11
  output logic [1:0] bits,       // decoded bits, [0] earlier
  output logic [1:0] bits_valid
);

  logic level;  // last line bit seen

  always_ff @(posedge clk) begin
    if (rst) begin
      level      <= 1'b0;
      bits       <= '0;
      bits_valid <= '0;
    end else begin
      bits_valid <= line_valid;
      bits       <= '0;
      if (line_valid[0]) begin
        bits[0] <= line_bits[0] ^ level;
        level   <= line_bits[0];
        if (line_valid[1]) begin
          bits[1] <= line_bits[1] ^ line_bits[0];
          level   <= line_bits[1];
        end
      end
    end
  end

  a_valid_code : assert property (@(posedge clk) disable iff (rst) line_valid != 2'b10);

endmodule
