// tb_sincos: random angles (1.0 = pi, 12 fractional bits) against
// 256 sin/cos computed with real arithmetic; one clock latency; error at
// most 3 LSB.
`timescale 1ns/1ps
module tb_sincos;
  import soqpsk_pkg::*;
  localparam longint WATCHDOG_NS = 1_000_000;
  `include "tb_common.svh"
  logic signed [LF_W-1:0] angle;
  logic signed [TRIG_W-1:0] sin_out, cos_out;
  sincos dut (.*);
  initial begin
    int a; real es, ec; int maxe;
    angle = '0;
    reset_dut();
    maxe = 0;
    for (int n = 0; n < 3000; n++) begin
      a = (n < 16) ? n * 512 - 4096 : $urandom_range(0, 8191) - 4096;
      angle = LF_W'(a);
      @(posedge clk); #1;
      es = 256.0 * $sin(3.14159265358979 * a / 4096.0);
      ec = 256.0 * $cos(3.14159265358979 * a / 4096.0);
      check(sin_out - es < 3.0 && es - sin_out < 3.0 && cos_out - ec < 3.0 && ec - cos_out < 3.0,
            $sformatf("angle %0d: sin %0d (%f) cos %0d (%f)", a, sin_out, es, cos_out, ec));
      @(negedge clk);
    end
    finish_tb();
  end
endmodule
