// tb_iq_downconverter: random ADC samples; checks the Fs/4 mixing pattern
// (I: +x, 0, -x, 0; Q: 0, +x, 0, -x), the one-clock latency and the
// saturation of -(-128).
`timescale 1ns/1ps
module tb_iq_downconverter;
  import soqpsk_pkg::*;
  localparam longint WATCHDOG_NS = 1_000_000;
  `include "tb_common.svh"
  sample_t adc_in, re_rx, im_rx;
  iq_downconverter dut (.*);
  initial begin
    int n; int x, er, ei, neg;
    adc_in = '0;
    reset_dut();
    n = 0;
    repeat (2000) begin
      x = (n % 97 == 5) ? -128 : $urandom_range(0, 255) - 128;
      adc_in = sample_t'(x);
      @(posedge clk); #1;
      neg = (x == -128) ? 127 : -x;
      case (n % 4)
        0: begin er = x;   ei = 0;   end
        1: begin er = 0;   ei = x;   end
        2: begin er = neg; ei = 0;   end
        default: begin er = 0; ei = neg; end
      endcase
      check(re_rx == sample_t'(er) && im_rx == sample_t'(ei),
            $sformatf("n=%0d x=%0d got %0d,%0d exp %0d,%0d", n, x, re_rx, im_rx, er, ei));
      n++;
      @(negedge clk);
    end
    finish_tb();
  end
endmodule
