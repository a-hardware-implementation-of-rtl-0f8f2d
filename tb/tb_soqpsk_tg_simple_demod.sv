// tb_soqpsk_tg_simple_demod: the reduced demodulator on synthetic branch
// increments.  A random bit stream is walked through the four-state trellis
// (state {u[k-2],u[k-1]} in even sections, {u[k-1],u[k-2]} in odd ones); the
// branch of the true state and bit gets +200, every other branch a random
// value in -200..100, so the true path is the unique best one.  The outputs
// must reproduce the bits with a fixed delay, signs of the soft outputs must
// agree with the hard bits, and every step must produce one output.
`timescale 1ns/1ps
module tb_soqpsk_tg_simple_demod;
  import soqpsk_pkg::*;
  localparam longint WATCHDOG_NS = 20_000_000;
  localparam int NSTEP = 2000;
  `include "tb_common.svh"
  bi_t  bi_in [8];
  logic ti_in, valid_in;
  logic signed [REL_W-1:0] pu_o;
  logic hu_o, valid;
  int   u [NSTEP];
  int   out_hu [$], out_pu [$];

  soqpsk_tg_simple_demod dut (.clk, .rst, .ce, .bi_in, .ti_in, .valid_in, .pu_o, .hu_o, .valid);

  always @(posedge clk) if (valid && !rst) begin out_hu.push_back(int'(hu_o)); out_pu.push_back(int'(pu_o)); end

  initial begin
    int best_lag, best_match, match, s, ss;
    for (int e = 0; e < 8; e++) bi_in[e] = '0;
    ti_in = 0; valid_in = 0;
    for (int i = 0; i < NSTEP; i++) u[i] = $urandom_range(0, 1);
    reset_dut();
    out_hu.delete(); out_pu.delete();
    for (int k = 2; k < NSTEP; k++) begin
      ti_in = k[0];
      ss = ti_in ? (u[k-1] * 2 + u[k-2]) : (u[k-2] * 2 + u[k-1]);
      for (int e = 0; e < 8; e++)
        bi_in[e] = (e == ss * 2 + u[k]) ? bi_t'(200) : bi_t'($urandom_range(0, 300)) - bi_t'(200);
      valid_in = 1;
      @(posedge clk); #1;
      valid_in = 0;
      repeat (15) @(posedge clk);
      #1;
    end
    repeat (40) @(posedge clk);
    check(out_hu.size() >= NSTEP - 2 - 20, $sformatf("%0d outputs for %0d steps", out_hu.size(), NSTEP - 2));
    best_lag = 0; best_match = -1;
    for (int lag = 0; lag < 30; lag++) begin
      match = 0;
      for (int j = 40; j < out_hu.size() && j + 2 - lag < NSTEP; j++) if (out_hu[j] == u[j + 2 - lag]) match++;
      if (match > best_match) begin best_match = match; best_lag = lag; end
    end
    $display("best output delay %0d steps", best_lag);
    check(best_lag == WIN - 1, $sformatf("decision delay %0d, expected %0d", best_lag, WIN - 1));
    for (int j = 40; j < out_hu.size(); j++) begin
      if (j + 2 - best_lag < NSTEP && j + 2 - best_lag >= 0)
        check(out_hu[j] == u[j + 2 - best_lag], $sformatf("bit %0d wrong", j));
      check((out_pu[j] > 0) == (out_hu[j] == 1) && out_pu[j] != 0, $sformatf("soft output %0d sign/zero at %0d", out_pu[j], j));
    end
    finish_tb();
  end
endmodule
