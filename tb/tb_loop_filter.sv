// tb_loop_filter: random errors and valids with the default constant
// (0.0026/pi scaled by 2^22) and a negative one; expects floor(e K / 4096)
// saturated to 13 bits one clock after valid_in, held otherwise.
`timescale 1ns/1ps
module tb_loop_filter;
  import soqpsk_pkg::*;
  localparam longint WATCHDOG_NS = 1_000_000;
  `include "tb_common.svh"
  err_t err_in;
  logic valid_in, valid_out, valid_out_n;
  logic signed [LF_W-1:0] lf_out, lf_out_n;
  loop_filter dut (.clk, .rst, .ce, .err_in, .valid_in, .lf_out, .valid_out);
  loop_filter #(.K1(-15'sd16000)) dut_n (.clk, .rst, .ce, .err_in, .valid_in,
                                         .lf_out(lf_out_n), .valid_out(valid_out_n));
  function automatic int ref_lf(int e, int k);
    int v;
    v = int'($floor(real'(e * k) / 4096.0));
    if (v > 4095) v = 4095;
    if (v < -4096) v = -4096;
    return v;
  endfunction
  initial begin
    int e, v, exp_p, exp_n;
    err_in = '0; valid_in = 1'b0;
    reset_dut();
    check(dut.K1 == 15'sd3471, "default constant is 0.0026/pi * 2^22");
    exp_p = 0; exp_n = 0;
    for (int n = 0; n < 2000; n++) begin
      e = $urandom_range(0, 255) - 128;
      v = $urandom_range(0, 1);
      err_in = err_t'(e); valid_in = v[0];
      if (v) begin exp_p = ref_lf(e, 3471); exp_n = ref_lf(e, -16000); end
      @(posedge clk); #1;
      check(valid_out == v[0] && lf_out == LF_W'(exp_p), $sformatf("K=3471 e=%0d got %0d exp %0d", e, lf_out, exp_p));
      check(lf_out_n == LF_W'(exp_n), $sformatf("K=-16000 e=%0d got %0d exp %0d", e, lf_out_n, exp_n));
      @(negedge clk);
    end
    finish_tb();
  end
endmodule
