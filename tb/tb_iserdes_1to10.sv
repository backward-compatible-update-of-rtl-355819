// tb_iserdes_1to10: checks the behavioural 1:10 DDR input deserializer model.
//
// clk/clk_bar run at 500 MHz and clkdiv at 100 MHz, so there is a sampling
// edge every nanosecond. The serial input takes a new random value half-way
// between sampling edges; the word presented on each clkdiv edge must hold
// the values seen at the ten preceding sampling edges, earliest in q[0].
`timescale 1ns/1ps
module tb_iserdes_1to10;

  logic       clk = 1'b0, clkdiv = 1'b0, rst = 1'b1, d = 1'b0;
  logic       clk_bar;
  logic [9:0] q;
  logic       p [4000];

  int checks = 0, failures = 0;

  assign clk_bar = ~clk;
  always #1 clk = ~clk;
  always #5 clkdiv = ~clkdiv;

  iserdes_1to10 #(.OVS(10)) dut (.clk, .clk_bar, .clkdiv, .rst, .d, .q);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Value p[k] is on the line from k-0.5 ns to k+0.5 ns.
  initial begin
    foreach (p[k]) p[k] = 1'($urandom);
    #0.5;
    for (int k = 1; k < 4000; k++) begin
      d = p[k];
      #1;
    end
  end

  initial begin
    #20 rst = 1'b0;
    for (int n = 0; n < 300; n++) begin
      int t;
      @(posedge clkdiv);
      t = int'($realtime);
      #0.1;
      if (t >= 30) begin
        logic [9:0] want;
        for (int i = 0; i < 10; i++) want[i] = p[t - 10 + i];
        check(q == want, $sformatf("t=%0d q=%b want %b", t, q, want));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
