// tb_sova: noiseless trellis-consistent MF outputs for 3000 random bits.
// The decisions must equal the transmitted bits 15 steps late (decoding
// window 16), the reliabilities must be non-zero with the decision's sign,
// the branch increments sent out must belong to the decided step, and with
// equal early/late outputs and no phase offset T_e and P_e must be 0.
`timescale 1ns/1ps
module tb_sova;
  localparam longint WATCHDOG_NS = 5_000_000;
  `include "tb_common.svh"
  `include "sova_stim.svh"
  `include "sova_harness.svh"
  initial begin
    int best, bd, e, nz;
    for (int k = 0; k < NSTEP; k++) begin u[k] = $urandom_range(0, 1); amp[k] = 300.0; end
    run_sova();
    check(out_hu.size() > NSTEP - 20, $sformatf("%0d outputs for %0d steps", out_hu.size(), NSTEP));
    best = -1; bd = 1 << 30;
    for (int d = 0; d < 30; d++) begin e = hu_errors(d, 40); if (e < bd) begin bd = e; best = d; end end
    check(best == 15, $sformatf("decision delay %0d steps, expected 15", best));
    check(hu_errors(15, 40) == 0, $sformatf("%0d decision errors", hu_errors(15, 40)));
    nz = 0;
    for (int j = 40; j < out_hu.size(); j++) begin
      check(out_pu[j] != 0 && ((out_pu[j] > 0) == (out_hu[j] == 1)), $sformatf("reliability %0d for decision %0d", out_pu[j], out_hu[j]));
      if (j >= 15) check(out_bi0[j] == exp_bi0[j - 15], $sformatf("BI_1 of output %0d", j));
    end
    foreach (te_q[i]) if (i > 40) check(te_q[i] == 0, "T_e is 0 with equal early and late outputs");
    foreach (pe_q[i]) if (i > 40) check(pe_q[i] == 0, "P_e is 0 without phase offset");
    check(te_q.size() > NSTEP - 20 && pe_q.size() > NSTEP - 20, "one T_e and P_e per step");
    finish_tb();
  end
endmodule
