// tb_wts_top: end-to-end test of the whole design at its default parameters.
//
// Eight event sources strobe codes into the concentrator at random times; every
// code the concentrator forwards is handed to an emitter model, which sends it
// over the 100 Mbit/s NRZI 4b/5b line into the CDR receiver. The test checks
// that every code comes out of the receiver once and in order, that each
// source's codes keep their order, that line-to-code latency is fixed to
// within two word clock periods, that code timestamps advance by the bits
// elapsed, and that the regenerated 1 MHz clock has a period of 100 bits
// within 3 ns while the link is steady. Along the way it makes every
// mechanism happen and counts it, failing if one never did:
//   lock and word alignment; dropped bits (remote clock slower) and doubled
//   bits (remote clock faster); code words 9, 10 and 11 cycles apart; a bit
//   slip on the line that forces re-framing (realign) and gives code errors;
//   an interruption of the line that loses lock (no transitions), followed by
//   re-acquisition; concentrator collisions and an overrun.
`timescale 1ns/1ps
module tb_wts_top;

  localparam int N = 8;

  logic               osc_clk = 1'b0, conc_clk = 1'b0;
  logic               rst = 1'b0, conc_rst = 1'b1;
  logic               line;
  logic               word_clk, code_valid, code_sync, code_error;
  logic [7:0]         code;
  logic [31:0]        code_timestamp, bit_count;
  logic               recovered_clk, locked, aligned, realign;
  logic [N-1:0][7:0]  conc_in_code = '0;
  logic [N-1:0]       conc_in_strobe = '0;
  logic [7:0]         conc_out_code;
  logic               conc_out_valid;
  logic [N-1:0][15:0] conc_collisions, conc_overruns;

  int checks = 0, failures = 0;

  always #5.0 osc_clk = ~osc_clk;      // local 100 MHz oscillator
  always #50.0 conc_clk = ~conc_clk;   // 10 MHz master byte clock

  wts_emitter_model #(.BIT_NS(10.02)) u_em (.line(line));

  wts_top dut (
    .osc_clk, .rst, .serial_in(line), .word_clk, .code, .code_valid, .code_sync,
    .code_error, .code_timestamp, .bit_count, .recovered_clk, .locked, .aligned,
    .realign, .conc_clk, .conc_rst, .conc_in_code, .conc_in_strobe, .conc_out_code,
    .conc_out_valid, .conc_collisions, .conc_overruns
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic cdr_rst;
  assign cdr_rst = dut.u_cdr.srst;

  // ---- concentrator -> emitter --------------------------------------------
  int n_fwd = 0;
  always @(posedge conc_clk) begin
    if (conc_out_valid && !conc_rst) begin
      u_em.send_byte(conc_out_code);
      n_fwd++;
    end
  end

  // ---- mechanism counters ----------------------------------------------------
  int n_zero = 0, n_two = 0, g9 = 0, g10 = 0, g11 = 0, n_realign = 0, n_err = 0;
  int n_unlock = 0, n_lock = 0, cyc = 0, last_w = -1;
  logic was_locked = 1'b0;
  bit   steady = 1'b0;   // link undisturbed: timing checks apply
  always @(posedge word_clk) begin
    cyc++;
    if (!cdr_rst) begin
      if (dut.u_cdr.u_lock.locked && dut.u_cdr.u_lock.bits_valid == 2'b00 && was_locked) n_zero++;
      if (dut.u_cdr.u_lock.bits_valid == 2'b11) n_two++;
      if (dut.u_cdr.u_align.word_valid) begin
        if (last_w >= 0 && steady)
          case (cyc - last_w)
            9: g9++;
            10: g10++;
            11: g11++;
            default: ;
          endcase
        last_w = cyc;
      end
      if (realign) n_realign++;
      if (code_error) n_err++;
      if (locked && !was_locked) n_lock++;
      if (!locked && was_locked) n_unlock++;
      was_locked = locked;
    end
  end

  // ---- received codes --------------------------------------------------------
  int  n_rx = 0, n_ignored = 0;
  real lat_min = 1.0e9, lat_max = 0.0;
  logic [31:0] last_ts;
  real last_start = -1.0;
  logic [4:0] last_seq [N];
  bit  seen_src [N];
  always @(posedge word_clk) begin
    if (code_valid && !cdr_rst) begin
      if (!steady) begin
        n_ignored++;
      end else if (n_rx >= u_em.n_sent) begin
        check(1'b0, $sformatf("code %02h received that was never sent", code));
      end else begin
        real lat;
        int  src;
        check(code == u_em.sent[n_rx],
              $sformatf("code %0d: %02h want %02h", n_rx, code, u_em.sent[n_rx]));
        src = int'(code[7:5]);
        if (seen_src[src])
          check(code[4:0] == last_seq[src] + 5'd1, $sformatf("source %0d out of order", src));
        seen_src[src] = 1'b1;
        last_seq[src] = code[4:0];
        lat = $realtime - u_em.start_ns[n_rx];
        if (lat < lat_min) lat_min = lat;
        if (lat > lat_max) lat_max = lat;
        if (last_start >= 0.0) begin
          int e, g;
          e = int'((u_em.start_ns[n_rx] - last_start) / u_em.bit_ns);
          g = int'(code_timestamp - last_ts);
          check(g >= e - 2 && g <= e + 2, $sformatf("timestamp step %0d want %0d", g, e));
        end
        last_ts    = code_timestamp;
        last_start = u_em.start_ns[n_rx];
        n_rx++;
      end
    end
  end

  // ---- recovered clock -------------------------------------------------------
  realtime t_rise = 0;
  int n_per = 0, n_per_bad = 0;
  bit per_ok = 1'b0;
  always @(posedge recovered_clk) begin
    if (steady && per_ok) begin
      real per;
      per = $realtime - t_rise;
      n_per++;
      if (per < 100.0 * u_em.bit_ns - 3.0 || per > 100.0 * u_em.bit_ns + 3.0) begin
        n_per_bad++;
        $display("recovered clock period %.2f ns", per);
      end
    end
    per_ok = steady;
    t_rise = $realtime;
  end

  // ---- stimulus ----------------------------------------------------------------
  int seq [N];

  task automatic strobe(input int i, input realtime width);
    conc_in_code[i]   = {3'(i), 5'(seq[i])};
    seq[i]++;
    conc_in_strobe[i] = 1'b1;
    #(width);
    conc_in_strobe[i] = 1'b0;
  endtask

  task automatic traffic(input int rounds);
    for (int r = 0; r < rounds; r++) begin
      for (int i = 0; i < N; i++)
        if ($urandom_range(0, 2) == 0)
          fork
            automatic int ii = i;
            begin
              #($urandom_range(0, 900) * 1.0 + 0.3);
              strobe(ii, 400.0);
            end
          join_none
      #1500;
    end
    #3000;
  endtask

  // Settle after a disturbance: wait for lock and framing, then a margin.
  task automatic resettle();
    wait (locked && aligned);
    #3000;
    last_start = -1.0;
    steady = 1'b1;
  endtask

  initial begin
    foreach (seq[i]) seq[i] = 0;
    foreach (seen_src[i]) seen_src[i] = 1'b0;
    #1 rst = 1'b1;
    #100 rst = 1'b0;
    #200 conc_rst = 1'b0;
    wait (!cdr_rst);
    @(posedge word_clk);
    resettle();
    // Remote clock 0.2 % slow.
    traffic(20);
    // All eight sources at once: collisions.
    for (int i = 0; i < N; i++)
      fork
        automatic int ii = i;
        strobe(ii, 400.0);
      join_none
    #4000;
    // Input 7 strobed twice while waiting behind 0..6: an overrun (the
    // second code is dropped by the concentrator, so it is not expected).
    for (int i = 0; i < N - 1; i++)
      fork
        automatic int ii = i;
        strobe(ii, 400.0);
      join_none
    strobe(N - 1, 300.0);
    #300;
    conc_in_code[N-1]   = 8'hFF;
    conc_in_strobe[N-1] = 1'b1;
    #300;
    conc_in_strobe[N-1] = 1'b0;
    #4000;
    // Remote clock 0.2 % fast.
    steady = 1'b0;
    u_em.bit_ns = 9.98;
    #2000;
    last_start = -1.0;
    steady = 1'b1;
    traffic(20);
    // Bit slip: three bits lost on the line.
    steady = 1'b0;
    u_em.drop_bits = 3;
    $display("%t bit slip", $realtime);
    #3000;
    resettle();
    traffic(10);
    // Line interrupted for 500 ns: lock is lost and re-acquired.
    steady = 1'b0;
    u_em.pause_ns = 500.0;
    $display("%t line interruption", $realtime);
    wait (!locked);
    resettle();
    traffic(10);
    // ---- results ----
    check(n_rx == u_em.n_sent && n_rx == n_fwd,
          $sformatf("received %0d, sent %0d, forwarded %0d", n_rx, u_em.n_sent, n_fwd));
    check(n_rx > 100, $sformatf("%0d codes end to end", n_rx));
    check(lat_max - lat_min <= 20.0, $sformatf("latency %.2f..%.2f ns", lat_min, lat_max));
    check(n_per > 50 && n_per_bad == 0, $sformatf("%0d of %0d clock periods off", n_per_bad, n_per));
    check(n_lock >= 2, $sformatf("lock acquired %0d times", n_lock));
    check(n_unlock >= 1, $sformatf("lock lost %0d times", n_unlock));
    check(n_zero > 0, $sformatf("dropped-bit cycles %0d", n_zero));
    check(n_two > 0, $sformatf("doubled-bit cycles %0d", n_two));
    check(g9 > 0 && g10 > 0 && g11 > 0, $sformatf("word spacing 9:%0d 10:%0d 11:%0d", g9, g10, g11));
    check(n_realign > 0, $sformatf("realignments %0d", n_realign));
    check(n_err > 0, $sformatf("code errors %0d", n_err));
    for (int i = 0; i < N; i++)
      check(conc_collisions[i] > 0, $sformatf("collisions[%0d] = %0d", i, conc_collisions[i]));
    check(conc_overruns[N-1] == 16'd1, $sformatf("overruns[7] = %0d", conc_overruns[N-1]));
    $display("codes %0d (ignored while disturbed %0d), latency %.2f..%.2f ns",
             n_rx, n_ignored, lat_min, lat_max);
    $display("locks %0d unlocks %0d dropped %0d doubled %0d realign %0d errors %0d",
             n_lock, n_unlock, n_zero, n_two, n_realign, n_err);
    $display("word spacing 9:%0d 10:%0d 11:%0d, clock periods %0d", g9, g10, g11, n_per);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
