// tb_complex_multiplier: random samples and sin/cos values; expects
// Re = floor((re cos + im sin)/256), Im = floor((im cos - re sin)/256),
// saturated to 8 bits, two clocks after the inputs.
`timescale 1ns/1ps
module tb_complex_multiplier;
  import soqpsk_pkg::*;
  localparam longint WATCHDOG_NS = 1_000_000;
  `include "tb_common.svh"
  sample_t re_i, im_i, re_o, im_o;
  logic signed [TRIG_W-1:0] sin_in, cos_in;
  complex_multiplier dut (.*);
  function automatic int satq(int v);
    v = int'($floor(real'(v) / 256.0));
    return v > 127 ? 127 : v < -128 ? -128 : v;
  endfunction
  initial begin
    int er[$], ei[$]; int r, i, s, c;
    re_i = '0; im_i = '0; sin_in = '0; cos_in = '0;
    reset_dut();
    for (int n = 0; n < 3000; n++) begin
      r = $urandom_range(0, 255) - 128; i = $urandom_range(0, 255) - 128;
      s = $urandom_range(0, 512) - 256; c = $urandom_range(0, 512) - 256;
      re_i = sample_t'(r); im_i = sample_t'(i); sin_in = TRIG_W'(s); cos_in = TRIG_W'(c);
      er.push_back(satq(r * c + i * s));
      ei.push_back(satq(i * c - r * s));
      @(posedge clk); #1;
      if (er.size() >= 2)
        check(re_o == sample_t'(er[$-1]) && im_o == sample_t'(ei[$-1]),
              $sformatf("n=%0d got %0d,%0d exp %0d,%0d", n, re_o, im_o, er[$-1], ei[$-1]));
      @(negedge clk);
    end
    finish_tb();
  end
endmodule
