// tb_oserdes_10to1: checks the behavioural 10:1 DDR output serializer model.
//
// Random 10-bit words are given on successive clkdiv (100 MHz) edges. The
// serial output, captured after every clk/clk_bar edge (1 Gb/s), must carry
// every word, d[0] first, back to back and in order, each word starting a
// fixed number of nanoseconds (below 20) after the clkdiv edge that took it.
`timescale 1ns/1ps
module tb_oserdes_10to1;

  logic       clk = 1'b0, clkdiv = 1'b0, rst = 1'b1;
  logic       clk_bar, q;
  logic [9:0] d = '0;
  logic [9:0] words [$];
  logic       stream [$];

  int checks = 0, failures = 0;

  assign clk_bar = ~clk;
  always #1 clk = ~clk;
  always #5 clkdiv = ~clkdiv;

  oserdes_10to1 #(.OVS(10)) dut (.clk, .clk_bar, .clkdiv, .rst, .d, .q);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int t_first_word = -1;   // time of the clkdiv edge that took words[0]

  always @(posedge clkdiv) begin
    if (!rst) begin
      if (t_first_word < 0) t_first_word = int'($realtime);
      words.push_back(d);
    end
    #0.2 d = 10'($urandom);
  end

  int t_stream0 = -1;      // time of the first captured serial bit
  always @(clk) begin
    #0.1;
    if (!rst && t_first_word >= 0) begin
      if (t_stream0 < 0) t_stream0 = int'($realtime);
      stream.push_back(q);
    end
  end

  initial begin
    int off;
    bit ok;
    #31 rst = 1'b0;
    #3000;
    // Find the start of words[0] in the serial stream.
    off = -1;
    for (int s = 0; s < 30 && off < 0; s++) begin
      ok = 1'b1;
      for (int w = 0; w < 5; w++)
        for (int i = 0; i < 10; i++)
          if (stream[s + 10 * w + i] != words[w][i]) ok = 1'b0;
      if (ok) off = s;
    end
    check(off >= 0, "first words found in the serial stream");
    if (off >= 0) begin
      int lat;
      lat = t_stream0 + off - 1 - t_first_word;
      check(lat >= 0 && lat < 20, $sformatf("latency %0d ns", lat));
      for (int w = 0; w < 250; w++) begin
        logic [9:0] got;
        for (int i = 0; i < 10; i++) got[i] = stream[off + 10 * w + i];
        check(got == words[w], $sformatf("word %0d: %b want %b", w, got, words[w]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
