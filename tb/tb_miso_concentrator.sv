// tb_miso_concentrator: self-checking test of the eight-input concentrator.
//
// Event sources are emulated with strobes at random times, asynchronous to
// the 10 MHz byte clock, held high 400 ns. Each code names its source in its
// top three bits and a sequence number in the rest, so the test can check
// that every code is delivered exactly once, in order per source, within
// 4 + 7 cycles of its strobe (ten synchronizer/queue cycles plus one for the
// asynchronous strobe edge). Collisions are forced by strobing all eight
// inputs at once; each collision counter must then count one. Finally input 7
// is strobed twice 600 ns apart while its first code waits behind inputs 0-6:
// one overrun must be counted, the first code delivered and the second
// dropped.
`timescale 1ns/1ps
module tb_miso_concentrator;

  localparam int N = 8;

  logic                 clk = 1'b0;
  logic                 rst = 1'b1;
  logic [N-1:0][7:0]    in_code = '0;
  logic [N-1:0]         in_strobe = '0;
  logic [7:0]           out_code;
  logic                 out_valid;
  logic [N-1:0][15:0]   collisions, overruns;

  int checks = 0, failures = 0;

  always #50 clk = ~clk;

  miso_concentrator #(.N_IN(N), .CODE_W(8), .CNT_W(16)) dut (
    .clk, .rst, .in_code, .in_strobe, .out_code, .out_valid, .collisions, .overruns
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic [7:0] exp_q [N][$];
  realtime    t_q   [N][$];
  int         n_out = 0, n_late = 0;

  task automatic strobe(input int i, input logic [7:0] c, input realtime width);
    in_code[i]   = c;
    in_strobe[i] = 1'b1;
    exp_q[i].push_back(c);
    t_q[i].push_back($realtime);
    #(width);
    in_strobe[i] = 1'b0;
  endtask

  always @(posedge clk) begin
    if (out_valid && !rst) begin
      int src;
      src = int'(out_code[7:5]);
      n_out++;
      if (exp_q[src].size() == 0) begin
        check(1'b0, $sformatf("unexpected code %02h", out_code));
      end else begin
        logic [7:0] e;
        realtime    t0;
        e  = exp_q[src].pop_front();
        t0 = t_q[src].pop_front();
        check(out_code == e, $sformatf("input %0d: code %02h want %02h", src, out_code, e));
        if ($realtime - t0 > 12 * 100.0) begin
          n_late++;
          $display("late by %.0f ns", $realtime - t0);
        end
      end
    end
  end

  initial begin
    int seq [N];
    foreach (seq[i]) seq[i] = 0;
    #250 rst = 1'b0;
    #300;
    // Random traffic: each source fires now and then.
    for (int r = 0; r < 40; r++) begin
      fork
        for (int i = 0; i < N; i++) begin
          automatic int ii = i;
          if ($urandom_range(0, 2) == 0) begin
            fork
              begin
                #($urandom_range(0, 700) * 1.0 + 0.3);
                strobe(ii, {3'(ii), 5'(seq[ii])}, 400.0);
              end
            join_none
            seq[ii]++;
          end
        end
      join
      #2000;
    end
    #2000;
    check(n_out > 50, $sformatf("%0d codes delivered", n_out));
    for (int i = 0; i < N; i++)
      check(exp_q[i].size() == 0, $sformatf("input %0d: %0d codes lost", i, exp_q[i].size()));
    check(n_late == 0, $sformatf("%0d codes late", n_late));
    // Forced collision: all eight at once.
    begin
      int c0 [N];
      for (int i = 0; i < N; i++) c0[i] = int'(collisions[i]);
      for (int i = 0; i < N; i++)
        fork
          automatic int ii = i;
          strobe(ii, {3'(ii), 5'd30}, 400.0);
        join_none
      #3000;
      for (int i = 0; i < N; i++)
        check(int'(collisions[i]) - c0[i] == 1,
              $sformatf("input %0d: %0d collisions counted", i, int'(collisions[i]) - c0[i]));
      check(exp_q[N-1].size() == 0 && exp_q[0].size() == 0, "all colliding codes delivered");
    end
    // Overrun: input 7 double-strobed while inputs 0..6 are ahead of it.
    @(posedge clk);
    #10;
    for (int i = 0; i < N - 1; i++)
      fork
        automatic int ii = i;
        strobe(ii, {3'(ii), 5'd31}, 400.0);
      join_none
    strobe(N - 1, {3'(N - 1), 5'd1}, 300.0);
    #300;
    in_code[N-1]   = {3'(N - 1), 5'd2};   // lost: not expected at the output
    in_strobe[N-1] = 1'b1;
    #300;
    in_strobe[N-1] = 1'b0;
    #3000;
    check(overruns[N-1] == 16'd1, $sformatf("overruns[7] = %0d", overruns[N-1]));
    check(exp_q[N-1].size() == 0, "first code of the double strobe delivered");
    $display("delivered %0d codes", n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
