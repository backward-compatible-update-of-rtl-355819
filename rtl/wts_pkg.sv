// wts_pkg: constants and types shared by the WTS firmware receiver blocks.
//
// The timing link carries one byte per 100 ns (10 MHz master byte clock) as two
// 4b/5b symbols, NRZI line coded, i.e. 100 Mbit/s. The receiver oversamples it
// tenfold at 1 GHz, so one 10-sample word spans one bit period, and one
// 10-bit code word spans one byte. Idle time on the link is filled with the JK
// sync pair. The symbol table is the standard 4b/5b (FDDI/TAXI) table; the
// first transmitted bit of a symbol is its leftmost (most significant) bit.
`timescale 1ns/1ps
package wts_pkg;

  // Samples per 100 MHz word (1 GHz / 100 MHz) and bits per code word.
  localparam int unsigned OVS    = 10;
  localparam int unsigned WORD_W = 10;

  // 4b/5b control symbols, first transmitted bit on the left.
  localparam logic [4:0] SYM_J = 5'b11000;
  localparam logic [4:0] SYM_K = 5'b10001;
  localparam logic [9:0] SYNC_JK = {SYM_J, SYM_K};

  // Result of decoding one 5-bit symbol.
  typedef struct packed {
    logic       is_data;   // one of the 16 data symbols
    logic [3:0] nibble;    // its value
  } sym_dec_t;

  // 4b/5b data symbol decode (standard table); non-data symbols give is_data=0.
  function automatic sym_dec_t dec_sym(input logic [4:0] s);
    sym_dec_t r;
    r.is_data = 1'b1;
    unique case (s)
      5'b11110: r.nibble = 4'h0;
      5'b01001: r.nibble = 4'h1;
      5'b10100: r.nibble = 4'h2;
      5'b10101: r.nibble = 4'h3;
      5'b01010: r.nibble = 4'h4;
      5'b01011: r.nibble = 4'h5;
      5'b01110: r.nibble = 4'h6;
      5'b01111: r.nibble = 4'h7;
      5'b10010: r.nibble = 4'h8;
      5'b10011: r.nibble = 4'h9;
      5'b10110: r.nibble = 4'hA;
      5'b10111: r.nibble = 4'hB;
      5'b11010: r.nibble = 4'hC;
      5'b11011: r.nibble = 4'hD;
      5'b11100: r.nibble = 4'hE;
      5'b11101: r.nibble = 4'hF;
      default: begin
        r.is_data = 1'b0;
        r.nibble  = 4'h0;
      end
    endcase
    return r;
  endfunction

endpackage
