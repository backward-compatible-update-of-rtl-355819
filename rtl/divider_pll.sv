// divider_pll: behavioural model (not synthesizable) of the clock-generating
// PLL of the receiver, the analog part that an FPGA provides as a clocking
// primitive.
//
// From the local 100 MHz oscillator `ref_clk` it makes the two opposite
// 500 MHz clocks `clk`/`clk_bar` that drive the DDR input and output
// serializers (1 GHz sampling) and the 100 MHz word clock `clkdiv`, phase
// aligned with `clk`. The model measures the reference period on the first
// rising edges after `rst` falls, raises `locked` on the third edge and from
// then on emits MULT `clk` periods per reference period, starting on each
// reference rising edge; `clkdiv` follows `ref_clk` while locked, and `rst` drops
// `locked` at once. Before lock all outputs stay low (clk_bar high). Real lock
// time, jitter and duty cycle are not modelled. The clock frequencies follow
// the original design; the rest is the model's own.
`timescale 1ns/1ps
module divider_pll #(
  parameter int unsigned MULT = 5     // 100 MHz * 5 = 500 MHz
) (
  input  logic ref_clk,   // local 100 MHz oscillator
  input  logic rst,       // asynchronous, active high
  output logic clk,       // 500 MHz
  output logic clk_bar,   // 500 MHz, inverted
  output logic clkdiv,    // 100 MHz word clock
  output logic locked
);

  logic    lock_r;
  realtime t_last;
  realtime half;
  int      n_edges;

  initial begin
    clk     = 1'b0;
    lock_r  = 1'b0;
    n_edges = 0;
    t_last  = 0.0;
    half    = 1.0;
  end

  initial forever begin
    @(posedge ref_clk or posedge rst);
    if (rst) begin
      lock_r  = 1'b0;
      n_edges = 0;
    end else begin
      if (n_edges > 0) half = ($realtime - t_last) / (2.0 * real'(MULT));
      t_last = $realtime;
      if (n_edges < 2) n_edges = n_edges + 1;
      else lock_r = 1'b1;
      if (lock_r) begin
        // MULT periods; the last low phase lasts until the next reference edge.
        for (int i = 0; i < int'(MULT); i++) begin
          clk = 1'b1;
          #(half);
          clk = 1'b0;
          if (i < int'(MULT) - 1) #(half);
        end
      end
    end
  end

  assign clk_bar = ~clk;
  assign locked  = lock_r & ~rst;
  assign clkdiv  = ref_clk & locked;

endmodule
