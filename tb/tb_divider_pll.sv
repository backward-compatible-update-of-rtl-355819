// tb_divider_pll: checks the behavioural clocking PLL model.
//
// With a 100 MHz reference the model must raise `locked` within five
// reference periods, then give a 500 MHz `clk` (2 ns period, 50 % duty),
// `clk_bar` its inverse, and a 100 MHz `clkdiv` whose rising edges coincide
// with a rising edge of `clk`, five `clk` periods per `clkdiv` period. A reset
// must drop `locked`.
`timescale 1ns/1ps
module tb_divider_pll;

  logic ref_clk = 1'b0, rst = 1'b0;
  logic clk, clk_bar, clkdiv, locked;

  int checks = 0, failures = 0;

  always #5 ref_clk = ~ref_clk;

  divider_pll #(.MULT(5)) dut (.ref_clk, .rst, .clk, .clk_bar, .clkdiv, .locked);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  realtime t_clk = 0, t_div = 0, t_fall = 0;
  int n_clk = 0, n_bad = 0, n_div = 0, n_inv = 0, clk_per_div = 0, n_ratio_bad = 0;

  always @(posedge clk) begin
    if (locked && n_clk > 0) begin
      if ($realtime - t_clk < 1.999 || $realtime - t_clk > 2.001) n_bad++;
      if (t_fall - t_clk < 0.999 || t_fall - t_clk > 1.001) n_bad++;
    end
    t_clk = $realtime;
    n_clk++;
    clk_per_div++;
  end
  always @(negedge clk) t_fall = $realtime;
  always @(clk or clk_bar) #0.001 if (clk_bar == clk) n_inv++;
  always @(posedge clkdiv) begin
    #0.001;
    if (n_div > 0) begin
      if (t_clk != $realtime - 0.001) n_bad++;
      if (clk_per_div != 5) n_ratio_bad++;
    end
    clk_per_div = 0;
    n_div++;
  end

  initial begin
    #1 rst = 1'b1;
    #20 rst = 1'b0;
    #50;
    check(locked, "locked within five reference periods");
    #2000;
    check(n_clk > 900, $sformatf("%0d clk edges", n_clk));
    check(n_bad == 0, $sformatf("%0d clk period/duty/phase errors", n_bad));
    check(n_ratio_bad == 0 && n_div > 150, $sformatf("%0d ratio errors in %0d", n_ratio_bad, n_div));
    check(n_inv == 0, "clk_bar is the inverse of clk");
    rst = 1'b1;
    #1;
    check(!locked, "reset drops lock");
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
