// tb_interpolator: random samples and strobes.  The reference computes
// x[n-1] + floor(mu (x[n] - x[n-1]) / 256) with mu taken from the strobe and
// held between strobes; late lags the input by one clock, on-time by two,
// early by three, and underflow_out is aligned with the on-time sample.
`timescale 1ns/1ps
module tb_interpolator;
  import soqpsk_pkg::*;
  localparam longint WATCHDOG_NS = 1_000_000;
  `include "tb_common.svh"
  sample_t re_rx, im_rx;
  logic underflow;
  logic [MU_W-1:0] mu;
  sample_t re_ontime_rx, im_ontime_rx, re_early_rx, im_early_rx, re_late_rx, im_late_rx;
  logic underflow_out;
  interpolator dut (.*);

  function automatic int ref_interp(int cur, int prev, int m);
    int v;
    v = prev + int'($floor(real'((cur - prev) * m) / 256.0));
    if (v > 127) v = 127;
    if (v < -128) v = -128;
    return v;
  endfunction

  initial begin
    int pr, pi_, mreg, lr[$], li[$], uq[$];
    int xr, xi, m, u;
    re_rx = '0; im_rx = '0; underflow = 1'b0; mu = '0;
    reset_dut();
    pr = 0; pi_ = 0; mreg = 0;
    for (int n = 0; n < 3000; n++) begin
      xr = $urandom_range(0, 255) - 128;
      xi = $urandom_range(0, 255) - 128;
      u  = ($urandom_range(0, 15) == 0);
      m  = $urandom_range(0, 256);
      re_rx = sample_t'(xr); im_rx = sample_t'(xi); underflow = u[0]; mu = MU_W'(m);
      if (u) mreg = m;
      lr.push_back(ref_interp(xr, pr, mreg));
      li.push_back(ref_interp(xi, pi_, mreg));
      uq.push_back(u);
      pr = xr; pi_ = xi;
      @(posedge clk); #1;
      check(re_late_rx == sample_t'(lr[$]) && im_late_rx == sample_t'(li[$]),
            $sformatf("late n=%0d got %0d exp %0d", n, re_late_rx, lr[$]));
      if (lr.size() >= 2)
        check(re_ontime_rx == sample_t'(lr[$-1]) && im_ontime_rx == sample_t'(li[$-1])
              && underflow_out == uq[$-1][0], $sformatf("on-time n=%0d", n));
      if (lr.size() >= 3)
        check(re_early_rx == sample_t'(lr[$-2]) && im_early_rx == sample_t'(li[$-2]),
              $sformatf("early n=%0d", n));
      @(negedge clk);
    end
    finish_tb();
  end
endmodule
