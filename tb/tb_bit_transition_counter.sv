// tb_bit_transition_counter: self-checking test of the recovered clock
// generator and bit counter.
//
// The test drives random boundary reports as the transition lock would
// (mostly one boundary per word at a slowly drifting position, sometimes none
// or two), with DIV_BITS = 10. Its reference: after the k-th boundary since
// reset the clock level is 1 when k >= DIV_BITS and k mod DIV_BITS < DIV_BITS/2,
// else 0; the level changes exactly at the sample where the boundary is
// reported. Every output sample (one cycle after its input) and the bit count
// are compared with this reference; while `locked` is low nothing may advance.
`timescale 1ns/1ps
module tb_bit_transition_counter;

  localparam int OVS = 10;
  localparam int DIV = 10;

  logic           clk = 1'b0;
  logic           rst = 1'b1;
  logic           locked = 1'b0;
  logic [3:0]     edge_pos = '0;
  logic [1:0]     bnd_n = '0;
  logic [OVS-1:0] pattern;
  logic [31:0]    bit_count;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bit_transition_counter #(.OVS(OVS), .DIV_BITS(DIV), .TS_W(32)) dut (
    .clk, .rst, .locked, .edge_pos, .bnd_n, .pattern, .bit_count
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic ref_level(input int k);
    return (k >= DIV) && ((k % DIV) < DIV / 2);
  endfunction

  initial begin
    int k, pos, n, n_rise, n_two, n_zero;
    logic [OVS-1:0] want;
    logic prev;
    k = 0;
    pos = 3;
    n_rise = 0;
    n_two = 0;
    n_zero = 0;
    prev = 1'b0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    for (int c = 0; c < 3000; c++) begin
      int r;
      logic lk;
      lk = !(c >= 1000 && c < 1100);   // a stretch without lock
      r = $urandom_range(0, 9);
      n = 1;
      if (r == 0 && pos == 0) begin
        n = 2;
        pos = OVS - 1;
      end else if (r == 1 && pos == OVS - 1) begin
        n = 0;
        pos = 0;
      end else if (r == 2) begin
        pos = (pos == 0) ? OVS - 1 : pos - 1;
      end else if (r == 3) begin
        pos = (pos == OVS - 1) ? 0 : pos + 1;
      end
      if (pos == 0 && n == 1 && $urandom_range(0, 1) == 0) pos = 1;
      locked   <= lk;
      bnd_n    <= 2'(n);
      edge_pos <= 4'(pos);
      @(posedge clk);
      #1;
      // Reference pattern for this word.
      for (int i = 0; i < OVS; i++) begin
        if (lk) begin
          if (n == 1 && i == pos) k++;
          if (n == 2 && (i == 0 || i == OVS - 1)) k++;
        end
        want[i] = ref_level(k);
      end
      if (lk && n == 2) n_two++;
      if (lk && n == 0) n_zero++;
      check(pattern == want, $sformatf("cycle %0d: pattern %b want %b", c, pattern, want));
      check(bit_count == 32'(k), $sformatf("cycle %0d: count %0d want %0d", c, bit_count, k));
      for (int i = 0; i < OVS; i++) begin
        if (want[i] && !prev) n_rise++;
        prev = want[i];
      end
    end
    check(n_rise > 100 && n_two > 0 && n_zero > 0,
          $sformatf("rises %0d, two-boundary words %0d, empty words %0d", n_rise, n_two, n_zero));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
