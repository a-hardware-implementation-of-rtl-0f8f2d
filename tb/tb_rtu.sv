// tb_rtu: the reliability traceback unit inside the SOVA.  Noiseless
// symbols of amplitude 300 with one weak symbol (amplitude 12) every 50
// steps: decisions far from a weak symbol must carry a larger reliability
// than every decision next to one, and reliabilities away from weak symbols
// must be non-zero.  The number of outputs is checked as well.
`timescale 1ns/1ps
module tb_rtu;
  localparam longint WATCHDOG_NS = 5_000_000;
  `include "tb_common.svh"
  `include "sova_stim.svh"
  `include "sova_harness.svh"
  initial begin
    int near_max, far_min, m, k;
    for (int i = 0; i < NSTEP; i++) begin u[i] = $urandom_range(0, 1); amp[i] = (i % 50 == 25) ? 12.0 : 300.0; end
    run_sova();
    check(out_pu.size() > NSTEP - 100, $sformatf("only %0d outputs for %0d steps", out_pu.size(), NSTEP));
    near_max = 0; far_min = 1000;
    for (int j = 60; j < out_pu.size(); j++) begin
      k = j - 15;                       // step of this decision
      m = out_pu[j] < 0 ? -out_pu[j] : out_pu[j];
      if ((k % 50) < 20 || (k % 50) > 30) check(m > 0, $sformatf("zero reliability at step %0d", k));
      if ((k % 50) >= 24 && (k % 50) <= 26) begin if (m > near_max) near_max = m; end
      else if ((k % 50) < 15 || (k % 50) > 40) begin if (m < far_min) far_min = m; end
    end
    $display("reliability: weak-symbol neighbourhood max %0d, far min %0d", near_max, far_min);
    check(near_max < far_min, "weak symbols lower the reliability of nearby decisions");
    finish_tb();
  end
endmodule
