// tb_mf_bank: random samples and strobes 15..17 samples apart.  A strobe on
// sample t starts a symbol made of samples t..t+15; every valid output must
// equal that symbol's three correlations computed in real arithmetic from
// the TG pulse (tolerance 4 LSB), in order, with TI alternating.  Strobes 15
// apart make the two accumulator systems overlap.
`timescale 1ns/1ps
module tb_mf_bank;
  import soqpsk_pkg::*;
  localparam longint WATCHDOG_NS = 4_000_000;
  `include "tb_common.svh"
  `include "tg_pulse.svh"
  sample_t re_rx, im_rx;
  logic underflow, ti_out, valid_out;
  mf_set_t z;
  mf_bank dut (.*);
  function automatic bit near(int got, real e, real tol);
    return (got - e) <= tol && (e - got) <= tol;
  endfunction
  int xr[20000], xi[20000];
  initial begin
    int strobes[$]; int nxt, t, nval, ti, n_short; real c, s, pr, pi_, mr, mi; int zr, zi;
    tg_build();
    re_rx = '0; im_rx = '0; underflow = 1'b0;
    reset_dut();
    nxt = 7; nval = 0; ti = 0; n_short = 0;
    for (int n = 0; n < 16000; n++) begin
      xr[n] = $urandom_range(0, 200) - 100; xi[n] = $urandom_range(0, 200) - 100;
      re_rx = sample_t'(xr[n]); im_rx = sample_t'(xi[n]);
      underflow = (n == nxt) && (n < 15000);
      if (underflow) begin
        strobes.push_back(n);
        t = $urandom_range(15, 17);
        if (t == 15) n_short++;
        nxt = n + t;
      end
      @(posedge clk); #1;
      if (valid_out) begin
        check(strobes.size() > 0, "valid output without a pending symbol");
        if (strobes.size() > 0) begin
          t = strobes.pop_front();
          check(n >= t + 15, $sformatf("output at sample %0d before symbol %0d is complete", n, t));
          pr = 0; pi_ = 0; mr = 0; mi = 0; zr = 0; zi = 0;
          for (int k = 0; k < 16; k++) begin
            c = $cos(3.14159265358979 * tg_qpt(k)); s = $sin(3.14159265358979 * tg_qpt(k));
            pr += xr[t+k] * c + xi[t+k] * s;  pi_ += xi[t+k] * c - xr[t+k] * s;
            mr += xr[t+k] * c - xi[t+k] * s;  mi += xi[t+k] * c + xr[t+k] * s;
            zr += xr[t+k]; zi += xi[t+k];
          end
          check(near(z.re_p1, pr, 4) && near(z.im_p1, pi_, 4) && near(z.re_m1, mr, 4) && near(z.im_m1, mi, 4)
                && z.re_0 == mf_t'(zr) && z.im_0 == mf_t'(zi),
                $sformatf("symbol at %0d: z(+1) %0d,%0d exp %f,%f", t, z.re_p1, z.im_p1, pr, pi_));
          ti = 1 - ti;
          check(ti_out == ti[0], "TI alternates");
          nval++;
        end
      end
      @(negedge clk);
    end
    check(strobes.size() == 0 && nval > 800, $sformatf("%0d outputs, %0d pending", nval, strobes.size()));
    check(n_short > 0, "overlapping symbols exercised");
    finish_tb();
  end
endmodule
