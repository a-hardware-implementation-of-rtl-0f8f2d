// tb_phase_estimator: random phase errors on random valids; the VCO output
// must be the wrapping sum of floor(e PK1 / 4096) (PK1 = 0.0026/pi * 2^22),
// two clocks after each valid.
`timescale 1ns/1ps
module tb_phase_estimator;
  import soqpsk_pkg::*;
  localparam longint WATCHDOG_NS = 1_000_000;
  `include "tb_common.svh"
  err_t p_e;
  logic valid_in, valid_out;
  logic signed [LF_W-1:0] vco_out;
  phase_estimator dut (.*);
  initial begin
    int acc [$]; int a, e, v, vq[$];
    p_e = '0; valid_in = 1'b0;
    reset_dut();
    check(dut.PK1 == 15'sd3471, "default PK1 is 0.0026/pi * 2^22");
    a = 0;
    for (int n = 0; n < 3000; n++) begin
      e = $urandom_range(0, 255) - 128; v = ($urandom_range(0, 3) == 0);
      p_e = err_t'(e); valid_in = v[0];
      if (v) a = a + int'($floor(real'(e * 3471) / 4096.0));
      a = ((a + 4096) & 8191) - 4096;
      acc.push_back(a); vq.push_back(v);
      @(posedge clk); #1;
      if (acc.size() >= 2)
        check(vco_out == LF_W'(acc[$-1]) && valid_out == vq[$-1][0],
              $sformatf("n=%0d got %0d exp %0d", n, vco_out, acc[$-1]));
      @(negedge clk);
    end
    finish_tb();
  end
endmodule
