// tb_word_align: self-checking test of the word alignment.
//
// The test sends a stream of 10-bit code words (JK sync pairs and random
// 4b/5b data pairs, first bit first), 0, 1 or 2 bits per cycle at random
// (1, with a 0 or a 2 at most once every 30 cycles, as with a small clock
// offset). Part 1: after the first JK every
// word must come out exactly as sent. Part 2: three bits are dropped from the
// stream, which breaks the framing; the next JK must pulse `realign` once and
// every word from that JK on must again come out as sent. Words must be spaced
// 9, 10 or 11 cycles apart in part 1, and all three spacings must occur.
`timescale 1ns/1ps
module tb_word_align;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic [1:0] bits = '0, bits_valid = '0;
  logic [9:0] word;
  logic       word_valid, aligned, realign;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  word_align dut (.clk, .rst, .bits, .bits_valid, .word, .word_valid, .aligned, .realign);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [4:0] enc5(input logic [3:0] n);
    logic [4:0] t [16] = '{5'b11110, 5'b01001, 5'b10100, 5'b10101, 5'b01010, 5'b01011,
                           5'b01110, 5'b01111, 5'b10010, 5'b10011, 5'b10110, 5'b10111,
                           5'b11010, 5'b11011, 5'b11100, 5'b11101};
    return t[n];
  endfunction

  localparam logic [9:0] JK = 10'b1100010001;

  logic       bq [$];       // bits still to send
  logic [9:0] sent1 [$], sent2 [$], got [$];
  int         realign_at [$];

  function automatic logic [9:0] rand_word();
    if ($urandom_range(0, 2) == 0) return JK;
    return {enc5(4'($urandom)), enc5(4'($urandom))};
  endfunction

  task automatic push_word(input logic [9:0] w);
    for (int i = 9; i >= 0; i--) bq.push_back(w[i]);
  endtask

  // Driver: 0, 1 or 2 bits per cycle.
  int cyc = 0, last_w = -1, g9 = 0, g10 = 0, g11 = 0, gbad = 0;
  bit part2 = 1'b0;
  int since_slip = 0;
  always @(posedge clk) begin
    int r;
    logic [1:0] v, b;
    cyc++;
    // A bit slip (0 or 2 bits) at most once every 30 cycles, as with a
    // small frequency offset.
    r = $urandom_range(0, 19);
    since_slip++;
    if (since_slip < 30) r = 5;
    v = (r == 0) ? 2'b00 : (r == 1) ? 2'b11 : 2'b01;
    if (r <= 1) since_slip = 0;
    if (rst || (v[0] && bq.size() == 0)) v = 2'b00;
    if (v[1] && bq.size() < 2)  v = 2'b01;
    b = '0;
    if (v[0]) b[0] = bq.pop_front();
    if (v[1]) b[1] = bq.pop_front();
    bits       <= b;
    bits_valid <= rst ? 2'b00 : v;
    if (word_valid && !rst) begin
      got.push_back(word);
      if (!part2 && last_w >= 0)
        case (cyc - last_w)
          9: g9++;
          10: g10++;
          11: g11++;
          default: gbad++;
        endcase
      last_w = cyc;
    end
    if (realign && !rst) realign_at.push_back(got.size());
  end

  initial begin
    int first, ra;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    // Part 1.
    push_word(JK);
    sent1.push_back(JK);
    for (int i = 0; i < 300; i++) begin
      logic [9:0] w;
      w = rand_word();
      push_word(w);
      sent1.push_back(w);
    end
    wait (bq.size() == 0);
    repeat (4) @(posedge clk);
    check(aligned, "aligned");
    check(got.size() == sent1.size(), $sformatf("%0d words out of %0d", got.size(), sent1.size()));
    for (int i = 0; i < got.size() && i < sent1.size(); i++)
      check(got[i] == sent1[i], $sformatf("word %0d: %03h want %03h", i, got[i], sent1[i]));
    check(g9 > 0 && g10 > 0 && g11 > 0 && gbad == 0,
          $sformatf("spacing 9:%0d 10:%0d 11:%0d other:%0d", g9, g10, g11, gbad));
    check(realign_at.size() == 0, "no realignment in part 1");
    // Part 2: drop three bits, then more words.
    part2 = 1'b1;
    first = got.size();
    push_word(rand_word() & 10'h07f);   // a broken 7-bit remnant is sent below
    repeat (3) void'(bq.pop_back());
    push_word({enc5(4'h5), enc5(4'hA)});
    push_word(JK);
    sent2.push_back(JK);
    for (int i = 0; i < 100; i++) begin
      logic [9:0] w;
      w = rand_word();
      push_word(w);
      sent2.push_back(w);
    end
    wait (bq.size() == 0);
    repeat (4) @(posedge clk);
    check(realign_at.size() == 1, $sformatf("%0d realign pulses", realign_at.size()));
    if (realign_at.size() == 1) begin
      ra = realign_at[0] - 1;   // index of the JK word that realigned
      check(got.size() - ra == sent2.size(),
            $sformatf("%0d words after realign, want %0d", got.size() - ra, sent2.size()));
      for (int i = 0; i < sent2.size() && ra + i < got.size(); i++)
        check(got[ra + i] == sent2[i], $sformatf("part 2 word %0d", i));
    end
    $display("words %0d, spacing 9:%0d 10:%0d 11:%0d", got.size(), g9, g10, g11);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
