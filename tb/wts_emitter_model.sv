// wts_emitter_model: behavioural model of a timing network emitter, used by
// the testbenches as the far end of the link.
//
// It sends one byte per 10 bit periods: queued bytes as two 4b/5b data symbols
// (high nibble first, each symbol's leftmost bit first), and the JK sync pair
// whenever the queue is empty. The bits are NRZI coded (a 1 toggles the line)
// and driven on `line` with a bit period of `bit_ns` nanoseconds, which a
// testbench may change at any time to emulate a remote clock faster or slower
// than the receiver's. `start_ns[i]` and `sent[i]` record when the i-th queued
// byte started on the line and its value; `n_sent` counts them. Setting
// `drop_bits` skips that many of the following bits (a bit slip), and setting
// `pause_ns` holds the line for that long before the next word (a phase jump).
// `n_bits` counts the bits sent and `bit_t_ns` is the time of the latest bit
// boundary; a testbench uses them as the ideal remote bit clock.
`timescale 1ns/1ps
module wts_emitter_model #(
  parameter real BIT_NS = 10.0
) (
  output logic line
);

  real        bit_ns = BIT_NS;
  logic [7:0] q[$];
  logic [7:0] sent[$];
  real        start_ns[$];
  int         n_sent = 0;
  int         drop_bits = 0;
  real        pause_ns = 0.0;
  longint     n_bits = 0;
  real        bit_t_ns = 0.0;

  function automatic logic [4:0] enc5(input logic [3:0] n);
    case (n)
      4'h0: return 5'b11110;  4'h1: return 5'b01001;
      4'h2: return 5'b10100;  4'h3: return 5'b10101;
      4'h4: return 5'b01010;  4'h5: return 5'b01011;
      4'h6: return 5'b01110;  4'h7: return 5'b01111;
      4'h8: return 5'b10010;  4'h9: return 5'b10011;
      4'hA: return 5'b10110;  4'hB: return 5'b10111;
      4'hC: return 5'b11010;  4'hD: return 5'b11011;
      4'hE: return 5'b11100;  default: return 5'b11101;
    endcase
  endfunction

  task automatic send_byte(input logic [7:0] b);
    q.push_back(b);
  endtask

  initial begin
    logic [9:0] w;
    line = 1'b0;
    forever begin
      if (pause_ns > 0.0) begin
        #(pause_ns);
        pause_ns = 0.0;
      end
      if (q.size() > 0) begin
        logic [7:0] b;
        b = q.pop_front();
        w = {enc5(b[7:4]), enc5(b[3:0])};
        sent.push_back(b);
        start_ns.push_back($realtime);
        n_sent++;
      end else begin
        w = 10'b11000_10001;
      end
      for (int i = 9; i >= 0; i--) begin
        if (drop_bits > 0) begin
          drop_bits--;
        end else begin
          if (w[i]) line = ~line;
          #(bit_ns);
          bit_t_ns = $realtime;
          n_bits++;
        end
      end
    end
  end

endmodule
