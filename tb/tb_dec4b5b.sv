// tb_dec4b5b: self-checking test of the 4b/5b code word decoder.
//
// All 256 byte values are encoded by the test with its own copy of the
// standard 4b/5b table (high nibble first) and must come back as the same
// byte with `code_valid`, one cycle later. The JK pair must give `sync` only,
// and words holding a control or unused 5-bit symbol must give `code_error`
// only. A word without `word_valid` must give nothing.
`timescale 1ns/1ps
module tb_dec4b5b;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic [9:0] word = '0;
  logic       word_valid = 1'b0;
  logic [7:0] code;
  logic       code_valid, sync, code_error;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dec4b5b dut (.clk, .rst, .word, .word_valid, .code, .code_valid, .sync, .code_error);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  localparam logic [4:0] ENC [16] = '{
    5'b11110, 5'b01001, 5'b10100, 5'b10101, 5'b01010, 5'b01011, 5'b01110, 5'b01111,
    5'b10010, 5'b10011, 5'b10110, 5'b10111, 5'b11010, 5'b11011, 5'b11100, 5'b11101};

  task automatic apply(input logic [9:0] w, input logic v);
    word       <= w;
    word_valid <= v;
    @(posedge clk);
    #1;
  endtask

  initial begin
    logic [4:0] bad_syms [8] = '{5'b00000, 5'b11111, 5'b00100, 5'b01101,
                                 5'b00111, 5'b11001, 5'b00001, 5'b00010};
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    for (int b = 0; b < 256; b++) begin
      apply({ENC[b[7:4]], ENC[b[3:0]]}, 1'b1);
      check(code_valid && !sync && !code_error && code == 8'(b),
            $sformatf("byte %02h: valid %0d code %02h", b, code_valid, code));
    end
    apply(10'b11000_10001, 1'b1);
    check(sync && !code_valid && !code_error, "JK gives sync");
    foreach (bad_syms[i]) begin
      apply({bad_syms[i], ENC[3]}, 1'b1);
      check(code_error && !code_valid && !sync, $sformatf("bad high symbol %05b", bad_syms[i]));
      apply({ENC[9], bad_syms[i]}, 1'b1);
      check(code_error && !code_valid && !sync, $sformatf("bad low symbol %05b", bad_syms[i]));
    end
    apply({ENC[1], ENC[2]}, 1'b0);
    check(!code_valid && !sync && !code_error, "nothing without word_valid");
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
