// tb_mf_output_control: counter sequences as the LUT control makes them
// (random symbol spacing 15..17); valid_out must follow one clock after
// either counter shows 15, out_sel must select system 2 unless counter 1
// finished, and TI must toggle with every valid output starting from 1.
`timescale 1ns/1ps
module tb_mf_output_control;
  localparam longint WATCHDOG_NS = 2_000_000;
  `include "tb_common.svh"
  logic [3:0] cntr1_delay2, cntr2_delay2;
  logic out_sel, valid_out, ti_out;
  mf_output_control dut (.*);
  function automatic int expc(int n, int t);
    return (n - t >= 1 && n - t <= 15) ? n - t : 0;
  endfunction
  initial begin
    int t1, t2, nxt, sel, ti, nval; bit d1, d2;
    cntr1_delay2 = '0; cntr2_delay2 = '0;
    reset_dut();
    t1 = -100; t2 = -100; sel = 2; nxt = 3; ti = 0; nval = 0;
    for (int n = 0; n < 5000; n++) begin
      if (n == nxt) begin
        if (sel == 2) t2 = n; else t1 = n;
        sel = (sel == 2) ? 1 : 2;
        nxt = n + $urandom_range(15, 17);
      end
      cntr1_delay2 = 4'(expc(n, t1)); cntr2_delay2 = 4'(expc(n, t2));
      d1 = (cntr1_delay2 == 15); d2 = (cntr2_delay2 == 15);
      @(posedge clk); #1;
      if (d1 | d2) begin ti = 1 - ti; nval++; end
      check(valid_out == (d1 | d2), $sformatf("n=%0d valid", n));
      check(out_sel == !d1, $sformatf("n=%0d out_sel", n));
      check(ti_out == ti[0], $sformatf("n=%0d ti", n));
      if (nval == 1 && (d1 | d2)) check(ti_out == 1'b1, "first symbol carries TI = 1");
      @(negedge clk);
    end
    finish_tb();
  end
endmodule
