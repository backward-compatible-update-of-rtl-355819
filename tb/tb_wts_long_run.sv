// tb_wts_long_run: the receiver under realistic timing-network traffic, run
// for 10 ms: two receivers on the same line, one regenerating the 1 MHz clock
// and one the 100 kHz clock.
//
// The line mostly carries JK sync pairs. Codes are scarce: a periodic
// monitoring byte every 512 us and random event bytes 30 to 80 us apart. The
// remote bit clock is 100 ppm slow for the first 5 ms and 100 ppm fast
// for the next 5 ms. These are crystal-like offsets, so bits are lost or gained
// only every few hundred words. The test checks, for both receivers:
//   * they lock once and never unlock;
//   * every byte sent is received once, in order, with no code error and no
//     code that was not sent (no missed and no false detections);
//   * the recovered clock stays in phase with an ideal clock divided from the
//     remote bit clock. The spread of its rising edges against that reference
//     must stay within 5 ns.
// It also counts the underflow (0-bit) and overflow (2-bit) cycles of the
// first receiver and fails if either never happened.
`timescale 1ns/1ps
module tb_wts_long_run;

  localparam int unsigned DIV_A = 100;    // 1 MHz
  localparam int unsigned DIV_B = 1000;   // 100 kHz

  logic osc_clk = 1'b0;
  logic rst = 1'b0;
  logic line;

  logic        wclk [2];
  logic [7:0]  code [2];
  logic        cvalid [2], csync [2], cerr [2];
  logic [31:0] cts [2], bcnt [2];
  logic        rclk [2], locked [2], aligned [2], realign [2];

  int checks = 0, failures = 0;

  always #5.0 osc_clk = ~osc_clk;

  wts_emitter_model #(.BIT_NS(10.001)) u_em (.line(line));

  wts_cdr #(.DIV_BITS(DIV_A)) u_rx_a (
    .osc_clk, .rst, .serial_in(line), .word_clk(wclk[0]), .code(code[0]),
    .code_valid(cvalid[0]), .code_sync(csync[0]), .code_error(cerr[0]),
    .code_timestamp(cts[0]), .bit_count(bcnt[0]), .recovered_clk(rclk[0]),
    .locked(locked[0]), .aligned(aligned[0]), .realign(realign[0])
  );

  wts_cdr #(.DIV_BITS(DIV_B)) u_rx_b (
    .osc_clk, .rst, .serial_in(line), .word_clk(wclk[1]), .code(code[1]),
    .code_valid(cvalid[1]), .code_sync(csync[1]), .code_error(cerr[1]),
    .code_timestamp(cts[1]), .bit_count(bcnt[1]), .recovered_clk(rclk[1]),
    .locked(locked[1]), .aligned(aligned[1]), .realign(realign[1])
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---- ideal divided clocks of the remote bit clock --------------------
  real ref_t [2];
  always @(u_em.n_bits) begin
    if (u_em.n_bits % DIV_A == 0) ref_t[0] = u_em.bit_t_ns;
    if (u_em.n_bits % DIV_B == 0) ref_t[1] = u_em.bit_t_ns;
  end

  // ---- per receiver bookkeeping ----------------------------------------
  bit  running = 1'b0;   // both receivers locked and framed
  int  n_rx [2] = '{0, 0};
  int  n_bad [2] = '{0, 0};
  int  n_err [2] = '{0, 0};
  int  n_unlock [2] = '{0, 0};
  int  n_edge [2] = '{0, 0};
  real dev0 [2], dev_min [2] = '{1.0e9, 1.0e9}, dev_max [2] = '{-1.0e9, -1.0e9};

  task automatic got_code(input int r, input logic [7:0] c);
    if (n_rx[r] < u_em.n_sent && c == u_em.sent[n_rx[r]]) begin
      checks++;
    end else begin
      n_bad[r]++;
      check(1'b0, $sformatf("receiver %0d code %0d: got %02h", r, n_rx[r], c));
    end
    n_rx[r]++;
  endtask

  task automatic rec_edge(input int r, input int unsigned div);
    real per, dev;
    per = real'(div) * u_em.bit_ns;
    dev = $realtime - ref_t[r];
    while (dev >= per) dev -= per;
    while (dev < 0.0) dev += per;
    n_edge[r]++;
    if (n_edge[r] == 3) dev0[r] = dev;
    if (n_edge[r] > 3) begin
      dev -= dev0[r];
      if (dev >= per / 2.0) dev -= per;
      if (dev < -per / 2.0) dev += per;
      if (dev < dev_min[r]) dev_min[r] = dev;
      if (dev > dev_max[r]) dev_max[r] = dev;
    end
  endtask

  for (genvar r = 0; r < 2; r++) begin : g_mon
    always @(posedge wclk[r]) begin
      if (running && cvalid[r]) got_code(r, code[r]);
      if (running && cerr[r]) n_err[r]++;
    end
    always @(negedge locked[r]) if (running) n_unlock[r]++;
    always @(posedge rclk[r]) if (running) rec_edge(r, (r == 0) ? DIV_A : DIV_B);
  end

  int n_zero = 0, n_two = 0;
  always @(posedge wclk[0]) begin
    if (running && u_rx_a.u_lock.bits_valid == 2'b00) n_zero++;
    if (running && u_rx_a.u_lock.bits_valid == 2'b11) n_two++;
  end

  // ---- traffic -----------------------------------------------------------
  int n_periodic = 0;
  initial begin
    #1 rst = 1'b1;
    #100 rst = 1'b0;
    wait (!u_rx_a.srst && !u_rx_b.srst);
    @(posedge wclk[0]);
    wait (locked[0] && aligned[0] && locked[1] && aligned[1]);
    // Let the word in flight pass before counting.
    #300;
    running = 1'b1;
    fork
      begin : periodic
        forever begin
          #20000;
          u_em.send_byte(8'hA5);
          n_periodic++;
          #492000;
        end
      end
      begin : events
        forever begin
          #($urandom_range(30000, 80000) * 1.0);
          u_em.send_byte(8'($urandom));
        end
      end
      begin : rate
        #5000000;
        u_em.bit_ns = 9.999;
        #5000000;
      end
    join_any
    disable fork;
    #2000;
    running = 1'b0;
    for (int r = 0; r < 2; r++) begin
      check(n_rx[r] == u_em.n_sent && n_bad[r] == 0,
            $sformatf("receiver %0d: %0d of %0d codes, %0d wrong", r, n_rx[r], u_em.n_sent, n_bad[r]));
      check(n_err[r] == 0, $sformatf("receiver %0d: %0d code errors", r, n_err[r]));
      check(n_unlock[r] == 0 && locked[r], $sformatf("receiver %0d: unlocked %0d times", r, n_unlock[r]));
      check(n_edge[r] > 10, $sformatf("receiver %0d: %0d recovered clock edges", r, n_edge[r]));
      check(dev_max[r] - dev_min[r] <= 5.0,
            $sformatf("receiver %0d: recovered clock edges spread %.3f..%.3f ns", r, dev_min[r], dev_max[r]));
      $display("receiver %0d: %0d codes, %0d clock edges, edge spread %.3f..%.3f ns",
               r, n_rx[r], n_edge[r], dev_min[r], dev_max[r]);
    end
    check(n_periodic >= 15, $sformatf("%0d periodic codes", n_periodic));
    check(n_zero > 0, "no underflow (0-bit) cycle with the slow remote clock");
    check(n_two > 0, "no overflow (2-bit) cycle with the fast remote clock");
    $display("periodic %0d, underflows %0d, overflows %0d", n_periodic, n_zero, n_two);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog.
  initial begin
    #11000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
