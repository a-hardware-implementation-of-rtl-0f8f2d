// tb_mf_mac: random samples with the index running 0..15; after each
// 16-sample window the three outputs are compared with
//   z(+1) = sum x exp(-j pi q_PT), z(-1) = sum x exp(+j pi q_PT), z(0) = sum x
// computed in real arithmetic from the TG pulse (tolerance 4 LSB for the
// table rounding).  idx_d2 must be the index delayed by two clocks.
`timescale 1ns/1ps
module tb_mf_mac;
  import soqpsk_pkg::*;
  localparam longint WATCHDOG_NS = 2_000_000;
  `include "tb_common.svh"
  `include "tg_pulse.svh"
  sample_t re_rx, im_rx;
  logic [3:0] idx, idx_d2;
  mf_set_t z;
  mf_mac dut (.*);
  function automatic bit near(int got, real e, real tol);
    return (got - e) <= tol && (e - got) <= tol;
  endfunction
  initial begin
    int xr[16], xi[16], iq[$]; real c, s, pr, pi_, mr, mi, zr, zi; logic [3:0] prev_d2;
    tg_build();
    re_rx = '0; im_rx = '0; idx = '0;
    reset_dut();
    for (int n = 0; n < 16 * 150; n++) begin
      idx = 4'(n % 16);
      xr[n % 16] = $urandom_range(0, 200) - 100;
      xi[n % 16] = $urandom_range(0, 200) - 100;
      re_rx = sample_t'(xr[n % 16]); im_rx = sample_t'(xi[n % 16]);
      iq.push_back(n % 16);
      prev_d2 = idx_d2;
      @(posedge clk); #1;
      if (iq.size() >= 2) check(idx_d2 == 4'(iq[$-1]), "idx_d2 is idx of the previous clock, registered twice");
      if (n >= 16 && prev_d2 == 4'd15) begin
        // window complete: it used the samples of indexes 0..15 of the
        // previous window (two clocks of pipeline)
        pr = 0; pi_ = 0; mr = 0; mi = 0; zr = 0; zi = 0;
        for (int k = 0; k < 16; k++) begin
          c = $cos(3.14159265358979 * tg_qpt(k)); s = $sin(3.14159265358979 * tg_qpt(k));
          pr += xr_w[k] * c + xi_w[k] * s;  pi_ += xi_w[k] * c - xr_w[k] * s;
          mr += xr_w[k] * c - xi_w[k] * s;  mi += xi_w[k] * c + xr_w[k] * s;
          zr += xr_w[k]; zi += xi_w[k];
        end
        check(near(z.re_p1, pr, 4) && near(z.im_p1, pi_, 4),
              $sformatf("z(+1) got %0d,%0d exp %f,%f", z.re_p1, z.im_p1, pr, pi_));
        check(near(z.re_m1, mr, 4) && near(z.im_m1, mi, 4),
              $sformatf("z(-1) got %0d,%0d exp %f,%f", z.re_m1, z.im_m1, mr, mi));
        check(z.re_0 == mf_t'(int'(zr)) && z.im_0 == mf_t'(int'(zi)), "z(0) is the plain sum");
      end
      if (n % 16 == 15) begin xr_w = xr; xi_w = xi; end
      @(negedge clk);
    end
    finish_tb();
  end
  int xr_w[16], xi_w[16];
endmodule
