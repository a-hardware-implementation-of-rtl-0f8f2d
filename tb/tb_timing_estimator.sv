// tb_timing_estimator: a constant timing error e on every symbol strobe
// changes the counter step by floor(e TK1 / 4096) (TK1 = -0.0026/pi * 2^22)
// on the sample after each strobe; the measured strobe spacing must match
// the reference period, and 16 samples for e = 0.
`timescale 1ns/1ps
module tb_timing_estimator;
  import soqpsk_pkg::*;
  localparam longint WATCHDOG_NS = 2_000_000;
  `include "tb_common.svh"
  err_t t_e;
  logic valid_in, underflow;
  logic [MU_W-1:0] mu;
  timing_estimator dut (.*);
  // timing error valid one clock after each strobe, as the loop would give
  always @(posedge clk) valid_in <= rst ? 1'b0 : underflow;
  initial begin
    int cnt, first, last, e, c; real got_p, exp_p, pos;
    t_e = '0;
    reset_dut();
    check(dut.TK1 == -15'sd3471, "default TK1 is -0.0026/pi * 2^22");
    for (int k = 0; k < 4; k++) begin
      e = (k == 0) ? 0 : (k == 1) ? 40 : (k == 2) ? -60 : 100;
      t_e = err_t'(e);
      c = int'($floor(real'(e * -3471) / 4096.0));
      repeat (100) @(posedge clk);
      cnt = 0; first = -1; last = -1;
      for (int i = 0; i < 4000; i++) begin
        @(posedge clk); #1;
        if (underflow) begin
          if (e == 0 && last >= 0) check(i - last == 16, "period 16 without error");
          if (first < 0) first = i;
          last = i; cnt++;
        end
      end
      // per symbol the counter falls by 1 (4096) = n*256 + c
      exp_p = real'(4096 - c) / 256.0;
      got_p = real'(last - first) / (cnt - 1);
      check(got_p > exp_p - 0.1 && got_p < exp_p + 0.1,
            $sformatf("e=%0d period %f expected %f", e, got_p, exp_p));
    end
    finish_tb();
  end
endmodule
