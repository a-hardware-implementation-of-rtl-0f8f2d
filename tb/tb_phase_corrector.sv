// tb_phase_corrector: loads a VCO angle, holds constant early/on-time/late
// samples and compares the outputs, once settled, with the samples rotated
// by exp(-j angle) computed in real arithmetic (tolerance 2 LSB).  The
// underflow strobe must come out delayed with the samples (two clocks).
`timescale 1ns/1ps
module tb_phase_corrector;
  import soqpsk_pkg::*;
  localparam longint WATCHDOG_NS = 2_000_000;
  `include "tb_common.svh"
  sample_t re_ontime_rx, im_ontime_rx, re_early_rx, im_early_rx, re_late_rx, im_late_rx;
  sample_t re_ontime_rx_out, im_ontime_rx_out, re_early_rx_out, im_early_rx_out, re_late_rx_out, im_late_rx_out;
  logic signed [LF_W-1:0] vco_in;
  logic vco_valid_in, underflow, underflow_out;
  phase_corrector dut (.*);
  function automatic bit near(int got, real e);
    return (got - e) < 2.0 && (e - got) < 2.0;
  endfunction
  initial begin
    int a, r[3], i[3]; real ph, er, ei; int lat;
    vco_in = '0; vco_valid_in = 1'b0; underflow = 1'b0;
    re_ontime_rx = '0; im_ontime_rx = '0; re_early_rx = '0; im_early_rx = '0; re_late_rx = '0; im_late_rx = '0;
    reset_dut();
    for (int n = 0; n < 300; n++) begin
      a = $urandom_range(0, 8191) - 4096;
      for (int k = 0; k < 3; k++) begin r[k] = $urandom_range(0, 160) - 80; i[k] = $urandom_range(0, 160) - 80; end
      vco_in = LF_W'(a); vco_valid_in = 1'b1;
      @(negedge clk) vco_valid_in = 1'b0;
      re_ontime_rx = sample_t'(r[0]); im_ontime_rx = sample_t'(i[0]);
      re_early_rx  = sample_t'(r[1]); im_early_rx  = sample_t'(i[1]);
      re_late_rx   = sample_t'(r[2]); im_late_rx   = sample_t'(i[2]);
      repeat (6) @(negedge clk);
      ph = 3.14159265358979 * a / 4096.0;
      er = ( r[0] * $cos(ph) + i[0] * $sin(ph)); ei = (i[0] * $cos(ph) - r[0] * $sin(ph));
      check(near(re_ontime_rx_out, er) && near(im_ontime_rx_out, ei),
            $sformatf("on-time angle %0d got %0d,%0d exp %f,%f", a, re_ontime_rx_out, im_ontime_rx_out, er, ei));
      er = ( r[1] * $cos(ph) + i[1] * $sin(ph)); ei = (i[1] * $cos(ph) - r[1] * $sin(ph));
      check(near(re_early_rx_out, er) && near(im_early_rx_out, ei), "early rotation");
      er = ( r[2] * $cos(ph) + i[2] * $sin(ph)); ei = (i[2] * $cos(ph) - r[2] * $sin(ph));
      check(near(re_late_rx_out, er) && near(im_late_rx_out, ei), "late rotation");
    end
    // strobe latency
    underflow = 1'b1;
    @(negedge clk) underflow = 1'b0;
    lat = 1;
    while (!underflow_out && lat < 10) begin @(negedge clk); lat++; end
    check(lat == 2, $sformatf("underflow latency %0d, expected 2 (same as the samples)", lat));
    finish_tb();
  end
endmodule
