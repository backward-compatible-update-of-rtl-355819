// dec4b5b: turns aligned 10-bit code words back into WTS byte codes.
//
// A code word holds two 5-bit symbols, the first transmitted in word[9:5]. The
// first symbol carries the high nibble of the byte, the second the low nibble.
// When both symbols are data symbols the byte is delivered on `code` with a
// one-cycle `code_valid` pulse. The JK sync pair, which fills the idle time of
// the link, only pulses `sync`. Any other word (a control symbol or an invalid
// 5-bit pattern) pulses `code_error`, the hook for transmission error
// monitoring. Registered outputs, one cycle after `word_valid`.
// The document gives the function (invert the 4b/5b code, byte code plus a
// valid flag); the nibble order and the error flag are this design's choices.
`timescale 1ns/1ps
module dec4b5b
  import wts_pkg::*;
(
  input  logic       clk,
  input  logic       rst,         // synchronous, active high
  input  logic [9:0] word,        // word[9] first transmitted bit
  input  logic       word_valid,
  output logic [7:0] code,
  output logic       code_valid,
  output logic       sync,
  output logic       code_error
);

  sym_dec_t hi, lo;
  assign hi = dec_sym(word[9:5]);
  assign lo = dec_sym(word[4:0]);

  always_ff @(posedge clk) begin
    if (rst) begin
      code       <= '0;
      code_valid <= 1'b0;
      sync       <= 1'b0;
      code_error <= 1'b0;
    end else begin
      code_valid <= 1'b0;
      sync       <= 1'b0;
      code_error <= 1'b0;
      if (word_valid) begin
        if (word == SYNC_JK) begin
          sync <= 1'b1;
        end else if (hi.is_data && lo.is_data) begin
          code       <= {hi.nibble, lo.nibble};
          code_valid <= 1'b1;
        end else begin
          code_error <= 1'b1;
        end
      end
    end
  end

endmodule
