// tb_branch_increment_calc: random matched-filter outputs and trellis
// indicators; the eight branch increments must equal the mapping table of
// the branch increment calculator (written out below as printed, BI_1..BI_8
// for TI = 0 and 1), one clock after valid_in, and hold without valid_in.
`timescale 1ns/1ps
module tb_branch_increment_calc;
  import soqpsk_pkg::*;
  localparam longint WATCHDOG_NS = 1_000_000;
  `include "tb_common.svh"
  mf_set_t z;
  logic ti_in, valid_in, ti_out, valid_out;
  bi_t bi [8];
  branch_increment_calc dut (.*);
  // Table: branch increments per TI.  Each entry names the MF output
  // (0: Re +1, 1: Im +1, 2: Re -1, 3: Im -1, 4: Re 0, 5: Im 0) and a sign.
  localparam int SRC [2][8] = '{'{5, 1, 4, 2, 2, 4, 1, 5},    // TI = 0
                                '{5, 3, 0, 4, 4, 0, 3, 5}};   // TI = 1
  localparam int SGN [2][8] = '{'{-1, -1, -1, -1, 1, 1, 1, 1},
                                '{-1, -1, -1, -1, 1, 1, 1, 1}};
  function automatic int pick(mf_set_t zz, int k);
    case (k)
      0: return zz.re_p1;  1: return zz.im_p1;
      2: return zz.re_m1;  3: return zz.im_m1;
      4: return zz.re_0;   default: return zz.im_0;
    endcase
  endfunction
  initial begin
    int exp_bi [8]; int t, v, x;
    z = '0; ti_in = 1'b0; valid_in = 1'b0;
    reset_dut();
    for (int e = 0; e < 8; e++) exp_bi[e] = 0;
    for (int n = 0; n < 3000; n++) begin
      z.re_p1 = mf_t'($urandom_range(0, 4095)); z.im_p1 = mf_t'($urandom_range(0, 4095));
      z.re_m1 = mf_t'($urandom_range(0, 4095)); z.im_m1 = mf_t'($urandom_range(0, 4095));
      z.re_0  = mf_t'($urandom_range(0, 4095)); z.im_0  = mf_t'($urandom_range(0, 4095));
      t = $urandom_range(0, 1); v = $urandom_range(0, 1);
      ti_in = t[0]; valid_in = v[0];
      if (v) for (int e = 0; e < 8; e++) begin
        x = SGN[t][e] * pick(z, SRC[t][e]);
        exp_bi[e] = (x > 2047) ? 2047 : x;
      end
      @(posedge clk); #1;
      for (int e = 0; e < 8; e++)
        check(bi[e] == bi_t'(exp_bi[e]), $sformatf("n=%0d TI=%0d BI_%0d got %0d exp %0d", n, t, e + 1, bi[e], exp_bi[e]));
      check(valid_out == v[0], "valid_out follows valid_in");
      if (v) check(ti_out == t[0], "ti_out follows ti_in");
      @(negedge clk);
    end
    finish_tb();
  end
endmodule
