// tb_metric_manager: random branch increments (biased positive so that the
// metrics grow through many renormalisations).  A reference add-compare-
// select with unbounded integer metrics, built from the trellis definition
// (ending state after an even section (u_k, u_{k-1}), after an odd one
// (u_{k-1}, u_k)), predicts every winner w (1: the candidate from the
// higher-numbered branch), every reliability d = min(127, |Delta| >> 5) and
// the best state gmax.  Renormalisation must happen and must not disturb
// any of them.
`timescale 1ns/1ps
module tb_metric_manager;
  import soqpsk_pkg::*;
  localparam longint WATCHDOG_NS = 2_000_000;
  `include "tb_common.svh"
  bi_t bi [8];
  logic ti_in, valid_in, ti_out, valid_out, renorm;
  logic [3:0] w;
  rel_t d [4];
  logic [1:0] gmax;
  metric_manager dut (.*);

  function automatic int es(int e, int ti);
    int ss_hi, ss_lo, u;
    ss_hi = (e >> 2) & 1; ss_lo = (e >> 1) & 1; u = e & 1;
    if (ti == 0) return u * 2 + ss_lo;   // (u_k, u_{k-1}), u_{k-1} = ss_lo
    else         return ss_hi * 2 + u;   // (u_{k-1}, u_k), u_{k-1} = ss_hi
  endfunction

  initial begin
    longint m [4], nm [4], lm [8], c1, c2; int e1, e2, ti, nren, dd, g;
    for (int e = 0; e < 8; e++) bi[e] = '0;
    ti_in = 1'b0; valid_in = 1'b0;
    reset_dut();
    for (int s = 0; s < 4; s++) m[s] = 0;
    nren = 0;
    for (int n = 0; n < 4000; n++) begin
      ti = n % 2;
      for (int e = 0; e < 8; e++) begin
        bi[e] = bi_t'($urandom_range(0, 700) - 250);
        lm[e] = m[e >> 1] + bi[e];
      end
      ti_in = logic'(ti); valid_in = 1'b1;
      @(posedge clk); #1;
      valid_in = 1'b0;
      if (renorm) nren++;
      for (int s = 0; s < 4; s++) begin
        e1 = -1; e2 = -1;
        for (int e = 0; e < 8; e++) if (es(e, ti) == s) begin if (e1 < 0) e1 = e; else e2 = e; end
        c1 = lm[e1]; c2 = lm[e2];
        nm[s] = (c2 > c1) ? c2 : c1;
        if (c1 != c2) check(w[s] == (c2 > c1), $sformatf("step %0d state %0d winner", n, s));
        dd = int'((c1 > c2 ? c1 - c2 : c2 - c1) >> 5);
        if (dd > 127) dd = 127;
        check(d[s] == rel_t'(dd), $sformatf("step %0d state %0d d %0d exp %0d", n, s, d[s], dd));
      end
      g = 0;
      for (int s = 1; s < 4; s++) if (nm[s] > nm[g]) g = s;
      check(gmax == 2'(g) || nm[gmax] == nm[g], $sformatf("step %0d gmax %0d exp %0d", n, gmax, g));
      check(valid_out && ti_out == logic'(ti), "valid_out and ti_out");
      m = nm;
      repeat (2) @(negedge clk);
    end
    check(nren > 5, $sformatf("%0d renormalisations", nren));
    finish_tb();
  end
endmodule
