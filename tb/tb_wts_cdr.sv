// tb_wts_cdr: end-to-end test of the firmware CDR receiver.
//
// An emitter model sends JK idle and random byte codes over a 100 Mbit/s NRZI
// line, first with a remote bit clock 0.2 % slower than the receiver's
// (10.02 ns bits), then 0.2 % faster (9.98 ns). The test checks that:
//   * the receiver locks and finds the word framing;
//   * every byte comes out once, in order, with no code error;
//   * the line-to-code latency stays within two word clock periods of its
//     mean (fixed latency apart from the sampling phase);
//   * code timestamps advance by the number of bits between the codes;
//   * the regenerated 1 MHz clock has a period of 100 bits within 3 ns;
//   * bits are dropped (0 per cycle) with the slow remote clock and doubled
//     (2 per cycle) with the fast one, and code words come 9, 10 and 11 cycles
//     apart.
`timescale 1ns/1ps
module tb_wts_cdr;

  localparam int unsigned DIV_BITS = 100;

  logic        osc_clk = 1'b0;
  logic        rst = 1'b0;
  logic        line;
  logic        word_clk;
  logic [7:0]  code;
  logic        code_valid, code_sync, code_error;
  logic [31:0] code_timestamp, bit_count;
  logic        recovered_clk, locked, aligned, realign;

  int checks = 0, failures = 0;

  always #5.0 osc_clk = ~osc_clk;

  wts_emitter_model #(.BIT_NS(10.02)) u_em (.line(line));

  wts_cdr #(.DIV_BITS(DIV_BITS)) dut (
    .osc_clk, .rst, .serial_in(line), .word_clk, .code, .code_valid,
    .code_sync, .code_error, .code_timestamp, .bit_count, .recovered_clk,
    .locked, .aligned, .realign
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---- mechanism counters ------------------------------------------------
  int n_zero = 0, n_two = 0, n_gap9 = 0, n_gap10 = 0, n_gap11 = 0, n_gap_bad = 0;
  int last_word = -1, cyc = 0, n_err = 0;
  always @(posedge word_clk) begin
    cyc++;
    if (dut.locked && dut.u_lock.bits_valid == 2'b00 && !rst) n_zero++;
    if (dut.u_lock.bits_valid == 2'b11) n_two++;
    if (dut.u_align.word_valid) begin
      if (last_word >= 0) begin
        case (cyc - last_word)
          9: n_gap9++;
          10: n_gap10++;
          11: n_gap11++;
          default: n_gap_bad++;
        endcase
      end
      last_word = cyc;
    end
    if (code_error && !dut.srst) n_err++;
  end

  // ---- received codes ----------------------------------------------------
  int   n_rx = 0;
  real  lat_sum = 0.0, lat_min = 1.0e9, lat_max = 0.0;
  logic [31:0] last_ts;
  real  last_start, last_bit_ns;
  always @(posedge word_clk) begin
    if (code_valid && !dut.srst) begin
      real lat;
      if (n_rx < u_em.n_sent) begin
        check(code == u_em.sent[n_rx], $sformatf("code %0d: got %02h want %02h",
                                                 n_rx, code, u_em.sent[n_rx]));
        lat = $realtime - u_em.start_ns[n_rx];
        lat_sum += lat;
        if (lat < lat_min) lat_min = lat;
        if (lat > lat_max) lat_max = lat;
        if (n_rx > 0 && last_bit_ns == u_em.bit_ns) begin
          int exp_bits, got_bits;
          exp_bits = int'((u_em.start_ns[n_rx] - last_start) / u_em.bit_ns);
          got_bits = int'(code_timestamp - last_ts);
          check(got_bits >= exp_bits - 2 && got_bits <= exp_bits + 2,
                $sformatf("timestamp step %0d, expected %0d", got_bits, exp_bits));
        end
        last_ts    = code_timestamp;
        last_start = u_em.start_ns[n_rx];
        last_bit_ns = u_em.bit_ns;
      end else begin
        check(1'b0, $sformatf("code %02h received at %t that was never sent", code, $realtime));
      end
      n_rx++;
    end
  end

  // ---- recovered clock period -------------------------------------------
  realtime last_rise = 0;
  int      n_rise = 0, n_per_bad = 0, n_per = 0;
  always @(posedge recovered_clk) begin
    if (n_rise > 0) begin
      real per, want;
      per  = $realtime - last_rise;
      want = real'(DIV_BITS) * u_em.bit_ns;
      n_per++;
      if (per < want - 3.0 || per > want + 3.0) begin
        n_per_bad++;
        $display("recovered clock period %.3f ns, expected %.3f", per, want);
      end
    end
    last_rise = $realtime;
    n_rise++;
  end

  task automatic send_burst(input int n);
    for (int i = 0; i < n; i++) begin
      u_em.send_byte(8'($urandom));
      // Random spacing, sometimes back to back.
      if ($urandom_range(0, 3) != 0) #($urandom_range(0, 400) * 1.0);
    end
  endtask

  initial begin
    #1 rst = 1'b1;
    #100 rst = 1'b0;
    wait (!dut.srst);
    @(posedge word_clk);
    wait (locked && aligned);
    check(1'b1, "locked and aligned");
    #500;
    send_burst(60);
    #20000;
    // Faster remote clock: the receiver must now gain bits.
    u_em.bit_ns = 9.98;
    #5000;
    send_burst(60);
    #20000;
    check(n_rx == u_em.n_sent, $sformatf("received %0d of %0d codes", n_rx, u_em.n_sent));
    check(n_err == 0, $sformatf("%0d code errors", n_err));
    check(locked && aligned, "lock kept");
    check(lat_max - lat_min <= 20.0,
          $sformatf("latency spread %.2f..%.2f ns", lat_min, lat_max));
    check(n_per > 20 && n_per_bad == 0,
          $sformatf("%0d of %0d recovered clock periods off", n_per_bad, n_per));
    check(n_zero > 0, "no underflow (0-bit) cycle seen");
    check(n_two > 0, "no overflow (2-bit) cycle seen");
    check(n_gap9 > 0 && n_gap10 > 0 && n_gap11 > 0 && n_gap_bad == 0,
          $sformatf("word spacing 9:%0d 10:%0d 11:%0d other:%0d",
                    n_gap9, n_gap10, n_gap11, n_gap_bad));
    $display("underflows %0d overflows %0d codes %0d latency %.2f..%.2f ns mean %.2f",
             n_zero, n_two, n_rx, lat_min, lat_max, lat_sum / real'(n_rx));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog.
  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
