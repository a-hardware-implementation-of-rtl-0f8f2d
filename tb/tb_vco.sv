// tb_vco: random loop-filter values and valids; the output must be the
// 13-bit wrapping sum of the valid inputs, one clock after each.
`timescale 1ns/1ps
module tb_vco;
  import soqpsk_pkg::*;
  localparam longint WATCHDOG_NS = 1_000_000;
  `include "tb_common.svh"
  logic signed [LF_W-1:0] plf_in, vco_out;
  logic valid_in, valid_out;
  vco dut (.*);
  initial begin
    int acc, x, v;
    plf_in = '0; valid_in = 1'b0;
    reset_dut();
    acc = 0;
    for (int n = 0; n < 3000; n++) begin
      x = $urandom_range(0, 8191) - 4096; v = $urandom_range(0, 1);
      plf_in = LF_W'(x); valid_in = v[0];
      if (v) acc = acc + x;
      acc = ((acc + 4096) & 8191) - 4096;
      @(posedge clk); #1;
      check(vco_out == LF_W'(acc) && valid_out == v[0], $sformatf("n=%0d got %0d exp %0d", n, vco_out, acc));
      @(negedge clk);
    end
    finish_tb();
  end
endmodule
