// tb_ped: the phase error detector inside the SOVA.  A carrier phase offset
// phi on the MF outputs must give P_e = Im{Z exp(-j theta)}/4 of the
// surviving branch, i.e. about 300 sin(phi)/4: positive for phi > 0,
// negative for phi < 0, zero for phi = 0.
`timescale 1ns/1ps
module tb_ped;
  localparam longint WATCHDOG_NS = 20_000_000;
  `include "tb_common.svh"
  `include "sova_stim.svh"
  `include "sova_harness.svh"
  task automatic one(real ph);
    int expv;
    phi = ph;
    expv = $rtoi(300.0 * $sin(ph) / 4.0);
    run_sova();
    check(pe_q.size() > NSTEP - 20, "one P_e per step");
    for (int i = 40; i < pe_q.size(); i++)
      check(pe_q[i] >= expv - 2 && pe_q[i] <= expv + 2, $sformatf("phi=%f: P_e %0d, expected %0d", ph, pe_q[i], expv));
  endtask
  initial begin
    for (int k = 0; k < NSTEP; k++) begin u[k] = $urandom_range(0, 1); amp[k] = 300.0; end
    one(0.3);
    one(-0.3);
    one(0.0);
    finish_tb();
  end
endmodule
