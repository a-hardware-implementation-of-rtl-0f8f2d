// tb_mf_lut_control: symbol strobes 15 to 17 samples apart.  Strobes go
// alternately to counter 2 (first) and counter 1; after a strobe the
// assigned counter must show 1, 2, ..., 15 on the 15 clocks after the
// strobe's clock edge and 0 otherwise, so two symbols can overlap by one sample.
`timescale 1ns/1ps
module tb_mf_lut_control;
  localparam longint WATCHDOG_NS = 2_000_000;
  `include "tb_common.svh"
  logic underflow;
  logic [3:0] cntr1, cntr2;
  mf_lut_control dut (.*);
  function automatic int expc(int n, int t);
    return (n - t >= 1 && n - t <= 15) ? n - t : 0;
  endfunction
  initial begin
    int t1, t2, gap, nxt, sel, n_overlap;
    underflow = 1'b0;
    reset_dut();
    t1 = -100; t2 = -100; sel = 2; nxt = 5; n_overlap = 0;
    for (int n = 0; n < 5000; n++) begin
      underflow = (n == nxt);
      if (n == nxt) begin
        if (sel == 2) t2 = n; else t1 = n;
        sel = (sel == 2) ? 1 : 2;
        gap = $urandom_range(15, 17);
        if (gap == 15) n_overlap++;
        nxt = n + gap;
      end
      @(posedge clk); #1;
      check(cntr1 == 4'(expc(n, t1)) && cntr2 == 4'(expc(n, t2)),
            $sformatf("n=%0d got %0d/%0d exp %0d/%0d", n, cntr1, cntr2, expc(n, t1), expc(n, t2)));
      @(negedge clk);
    end
    check(n_overlap > 0, "overlapping symbols were exercised");
    finish_tb();
  end
endmodule
