// tb_mod1_counter: with no loop correction the counter must underflow every
// N = 16 samples exactly; with a constant correction c (1/4096 units) on
// every sample the mean period must be 4096/(256+c) samples.  mu must be the
// counter's fractional position at the wrap: at most 1.0, plus the
// correction c because mu is scaled with the nominal step 1/N.
`timescale 1ns/1ps
module tb_mod1_counter;
  import soqpsk_pkg::*;
  localparam longint WATCHDOG_NS = 2_000_000;
  `include "tb_common.svh"
  logic signed [LF_W-1:0] tlf_in;
  logic valid_in, underflow;
  logic [MU_W-1:0] mu;
  mod1_counter dut (.*);
  task automatic measure(input int c, input int ncyc, output int cnt, output int first, output int last);
    cnt = 0; first = -1; last = -1;
    for (int i = 0; i < ncyc; i++) begin
      @(posedge clk); #1;
      if (underflow) begin
        if (last >= 0 && c == 0) check(i - last == 16, $sformatf("period %0d, expected 16", i - last));
        check(int'(mu) <= 256 + (c < 0 ? -c : c), $sformatf("mu %0d above 1.0 + |c|", mu));
        if (first < 0) first = i;
        last = i; cnt++;
      end
    end
  endtask
  initial begin
    int cnt, first, last; real expect_p, got_p;
    tlf_in = '0; valid_in = 1'b0;
    reset_dut();
    measure(0, 1600, cnt, first, last);
    check(cnt >= 99 && cnt <= 101, $sformatf("%0d underflows in 1600 samples", cnt));
    for (int k = 0; k < 4; k++) begin
      int c;
      c = (k == 0) ? 16 : (k == 1) ? -20 : (k == 2) ? 5 : -7;
      tlf_in = LF_W'(c); valid_in = 1'b1;
      measure(c, 200, cnt, first, last);   // settle
      measure(c, 4000, cnt, first, last);
      expect_p = 4096.0 / (256.0 + c);
      got_p = real'(last - first) / (cnt - 1);
      check(got_p > expect_p - 0.05 && got_p < expect_p + 0.05,
            $sformatf("c=%0d mean period %f expected %f", c, got_p, expect_p));
    end
    finish_tb();
  end
endmodule
