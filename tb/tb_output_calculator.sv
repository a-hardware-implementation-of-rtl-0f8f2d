// tb_output_calculator: the SOVA's output stage.  For every output the
// reliability must have the decision's sign (+ for 1), and the branch
// increments sent with it must be those of the decided step, 15 steps old
// (checked on BI_1 = -Im Z(0)); outputs come one per step.
`timescale 1ns/1ps
module tb_output_calculator;
  localparam longint WATCHDOG_NS = 5_000_000;
  `include "tb_common.svh"
  `include "sova_stim.svh"
  `include "sova_harness.svh"
  initial begin
    for (int k = 0; k < NSTEP; k++) begin u[k] = $urandom_range(0, 1); amp[k] = 100.0 + $urandom_range(0, 300); end
    run_sova();
    check(out_hu.size() > NSTEP - 20 && out_hu.size() <= NSTEP, "one output per step");
    for (int j = 20; j < out_hu.size(); j++) begin
      check(out_pu[j] != 0 && ((out_pu[j] > 0) == (out_hu[j] == 1)), "reliability sign follows the decision");
      check(out_bi0[j] == exp_bi0[j - 15], $sformatf("BI_1 of output %0d is %0d, step %0d had %0d", j, out_bi0[j], j - 15, exp_bi0[j - 15]));
      check(out_hu[j] == u[j - 15], $sformatf("decision of the best state, step %0d amp %f %f %f renorm-free", j-15, amp[j-16], amp[j-15], amp[j-14]));
    end
    finish_tb();
  end
endmodule
