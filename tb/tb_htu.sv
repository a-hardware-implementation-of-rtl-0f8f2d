// tb_htu: the hard-decision traceback unit inside the SOVA, driven with
// noiseless trellis outputs of random bits where one step in seven is weak
// (amplitude 60 instead of 300).  The survivor of the best state must give
// the transmitted bits exactly 15 steps late.
`timescale 1ns/1ps
module tb_htu;
  localparam longint WATCHDOG_NS = 5_000_000;
  `include "tb_common.svh"
  `include "sova_stim.svh"
  `include "sova_harness.svh"
  initial begin
    for (int k = 0; k < NSTEP; k++) begin u[k] = $urandom_range(0, 1); amp[k] = (k % 7 == 3) ? 60.0 : 300.0; end
    run_sova();
    check(out_hu.size() > NSTEP - 20, "one decision per step");
    for (int j = 40; j < out_hu.size(); j++)
      check(out_hu[j] == u[j - 15], $sformatf("decision %0d: %0d, sent %0d", j, out_hu[j], u[j - 15]));
    finish_tb();
  end
endmodule
