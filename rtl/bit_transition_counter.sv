// bit_transition_counter: regenerates a divided recovered clock with 1 ns edge
// placement and counts recovered bits for timestamping.
//
// The transition lock reports, every 100 MHz cycle, how many bit boundaries
// fell in the current 10-sample word (`bnd_n`, 0/1/2) and where (`edge_pos`;
// with two boundaries they sit at samples 0 and OVS-1). Each boundary advances
// a bit counter modulo DIV_BITS. The recovered clock rises at the boundary
// where the counter returns to 0 and falls at the boundary where it reaches
// DIV_BITS/2. The block outputs the recovered clock as a 10-sample pattern
// (`pattern[0]` first in time) for the 10:1 output serializer running at
// 1 Gb/s, so its edges land on the sample where the boundary was seen: 1 ns
// resolution. DIV_BITS = 100 gives 1 MHz from the 100 Mbit/s stream, 1000
// gives 100 kHz. `bit_count` counts all recovered bit boundaries since reset,
// a free-running time base in the recovered clock domain. Nothing advances
// while `locked` is low. Outputs are registered, one cycle after the inputs.
// The document gives the function (clock from bit counts and boundary
// positions, 1 MHz or 100 kHz, 1 ns resolution); the counting scheme and the
// 50 % duty cycle are this design's choices.
`timescale 1ns/1ps
module bit_transition_counter #(
  parameter int unsigned OVS      = wts_pkg::OVS,
  parameter int unsigned DIV_BITS = 100,
  parameter int unsigned TS_W     = 32
) (
  input  logic                   clk,
  input  logic                   rst,       // synchronous, active high
  input  logic                   locked,
  input  logic [$clog2(OVS)-1:0] edge_pos,
  input  logic [1:0]             bnd_n,
  output logic [OVS-1:0]         pattern,   // recovered clock samples, [0] first
  output logic [TS_W-1:0]        bit_count
);

  localparam int unsigned PW = $clog2(OVS);
  localparam int unsigned DW = $clog2(DIV_BITS);

  logic [DW-1:0] cnt;
  logic          level;

  logic [DW-1:0]  cnt_n;
  logic           level_n;
  logic [OVS-1:0] pat_n;
  logic [PW-1:0]  pos [2];
  logic [1:0]     en;

  function automatic logic [DW-1:0] cnt_inc(input logic [DW-1:0] c);
    return (c == DW'(DIV_BITS - 1)) ? '0 : c + 1'b1;
  endfunction

  always_comb begin
    en     = '0;
    pos[0] = edge_pos;
    pos[1] = PW'(OVS - 1);
    if (locked) begin
      if (bnd_n == 2'd1) en = 2'b01;
      else if (bnd_n == 2'd2) begin
        en     = 2'b11;
        pos[0] = '0;
      end
    end
    cnt_n   = cnt;
    level_n = level;
    pat_n   = '0;
    for (int i = 0; i < OVS; i++) begin
      for (int k = 0; k < 2; k++) begin
        if (en[k] && pos[k] == PW'(i)) begin
          cnt_n = cnt_inc(cnt_n);
          if (cnt_n == '0) level_n = 1'b1;
          else if (cnt_n == DW'(DIV_BITS / 2)) level_n = 1'b0;
        end
      end
      pat_n[i] = level_n;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt       <= '0;
      level     <= 1'b0;
      pattern   <= '0;
      bit_count <= '0;
    end else begin
      cnt       <= cnt_n;
      level     <= level_n;
      pattern   <= pat_n;
      bit_count <= bit_count + TS_W'(en[0]) + TS_W'(en[1]);
    end
  end

endmodule
