// tb_transition_lock: self-checking test of the transition lock.
//
// The test builds the oversampled words itself: a random NRZI line (at most
// three bit periods without a transition, as 4b/5b guarantees) with a bit
// period of BIT_PS picoseconds, sampled every 1000 ps, ten samples per word.
// Two runs: a remote clock 0.5 % slower and one 0.5 % faster than the
// sampling clock. Checks: lock within 64 words, the forwarded bit sequence is
// exactly the line sequence (no bit lost or repeated), 0-bit words occur only
// with the slow remote clock and 2-bit words only with the fast one, and the
// number of bit boundaries reported equals the number of bits forwarded.
`timescale 1ns/1ps
module tb_transition_lock;

  localparam int OVS   = 10;
  localparam int NBITS = 6000;

  logic           clk = 1'b0;
  logic           rst = 1'b1;
  logic [OVS-1:0] samples = '0;
  logic [1:0]     bits, bits_valid, bnd_n;
  logic [3:0]     edge_pos;
  logic           locked;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  transition_lock #(.OVS(OVS)) dut (
    .clk, .rst, .samples, .bits, .bits_valid, .edge_pos, .bnd_n, .locked
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic level [NBITS];
  logic got [$];
  int   n_zero, n_two, n_bnd;

  task automatic run(input int bit_ps, input int phase_ps, input bit slow);
    int  cyc, lock_cyc, base, t, idx;
    bit  match;
    logic l;
    int  run_len;
    // Line levels: random transitions, never more than 3 bits without one.
    l = 1'b0;
    run_len = 0;
    for (int i = 0; i < NBITS; i++) begin
      if ($urandom_range(0, 1) == 1 || run_len == 3) begin
        l = ~l;
        run_len = 0;
      end else begin
        run_len++;
      end
      level[i] = l;
    end
    got.delete();
    n_zero = 0;
    n_two  = 0;
    n_bnd  = 0;
    lock_cyc = -1;
    rst = 1'b1;
    @(posedge clk);
    @(posedge clk);
    rst <= 1'b0;
    cyc = 0;
    forever begin
      logic [OVS-1:0] w;
      bit done;
      done = 1'b0;
      for (int i = 0; i < OVS; i++) begin
        t   = cyc * 10000 + i * 1000 + phase_ps;
        idx = t / bit_ps;
        if (idx >= NBITS) done = 1'b1;
        else w[i] = level[idx];
      end
      if (done) break;
      samples <= w;
      @(posedge clk);
      #1;
      if (locked && lock_cyc < 0) lock_cyc = cyc;
      if (lock_cyc >= 0 && !rst) begin
        if (bits_valid == 2'b00 && cyc > lock_cyc) n_zero++;
        if (bits_valid == 2'b11) n_two++;
        if (bits_valid[0]) got.push_back(bits[0]);
        if (bits_valid[1]) got.push_back(bits[1]);
        n_bnd += int'(bnd_n);
      end
      cyc++;
    end
    check(lock_cyc >= 0 && lock_cyc < 64, $sformatf("lock after %0d words", lock_cyc));
    // Find where the forwarded bits start in the line sequence.
    base = -1;
    for (int s = 0; s < 200 && base < 0; s++) begin
      match = 1'b1;
      for (int k = 0; k < 40; k++)
        if (got[k] != level[s + k]) match = 1'b0;
      if (match) base = s;
    end
    check(base >= 0, "forwarded bits found in the line sequence");
    if (base >= 0) begin
      int bad;
      bad = 0;
      for (int k = 0; k < got.size() - 4; k++)
        if (base + k >= NBITS || got[k] != level[base + k]) bad++;
      check(bad == 0, $sformatf("%0d of %0d forwarded bits wrong", bad, got.size()));
      check(got.size() >= NBITS - base - 20, $sformatf("only %0d bits forwarded", got.size()));
    end
    if (slow) check(n_zero > 0 && n_two == 0, $sformatf("slow: %0d zero, %0d two", n_zero, n_two));
    else      check(n_two > 0 && n_zero == 0, $sformatf("fast: %0d zero, %0d two", n_zero, n_two));
    check(n_bnd >= got.size() - 2 && n_bnd <= got.size() + 2,
          $sformatf("%0d boundaries for %0d bits", n_bnd, got.size()));
    $display("bit_ps %0d: lock %0d, %0d bits, %0d zero, %0d two", bit_ps, lock_cyc,
             got.size(), n_zero, n_two);
  endtask

  initial begin
    run(10050, 300, 1'b1);
    run(9950, 700, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
