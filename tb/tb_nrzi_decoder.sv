// tb_nrzi_decoder: self-checking test of the NRZI decoder.
//
// Random data bits are NRZI coded by the test (a 1 toggles the line) and fed
// to the decoder 0, 1 or 2 bits per cycle at random. The decoded stream must
// equal the data stream bit for bit, one cycle after its input, with the same
// valid flags.
`timescale 1ns/1ps
module tb_nrzi_decoder;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic [1:0] line_bits = '0, line_valid = '0;
  logic [1:0] bits, bits_valid;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  nrzi_decoder dut (.clk, .rst, .line_bits, .line_valid, .bits, .bits_valid);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    logic       lvl;
    logic [1:0] d, v;
    int         n_two;
    lvl    = 1'b0;
    n_two  = 0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    for (int c = 0; c < 2000; c++) begin
      case ($urandom_range(0, 9))
        0:       v = 2'b00;
        1:       v = 2'b11;
        default: v = 2'b01;
      endcase
      d = 2'($urandom);
      line_valid <= v;
      if (v[0]) begin
        lvl = lvl ^ d[0];
        line_bits[0] <= lvl;
      end
      if (v[1]) begin
        lvl = lvl ^ d[1];
        line_bits[1] <= lvl;
      end
      @(posedge clk);
      #1;
      // Registered output of this cycle's input.
      check(bits_valid == v, "valid flags passed through");
      if (v[0]) check(bits[0] == d[0], $sformatf("cycle %0d bit 0", c));
      if (v[1]) check(bits[1] == d[1], $sformatf("cycle %0d bit 1", c));
      if (v == 2'b11) n_two++;
    end
    check(n_two > 0, "two-bit cycles exercised");
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
