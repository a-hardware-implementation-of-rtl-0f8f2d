// tb_ted: the timing error detector inside the SOVA.  Late outputs larger
// than early ones (sampling too early) must give T_e > 0, the reverse T_e < 0,
// equal ones T_e = 0; the size must follow Re{(Zl - Ze) exp(-j theta)}/4
// of the surviving branch (here (gl - ge) * 300 / 4).
`timescale 1ns/1ps
module tb_ted;
  localparam longint WATCHDOG_NS = 20_000_000;
  `include "tb_common.svh"
  `include "sova_stim.svh"
  `include "sova_harness.svh"
  task automatic one(real g_e, real g_l, int expv);
    ge = g_e; gl = g_l;
    run_sova();
    check(te_q.size() > NSTEP - 20, "one T_e per step");
    for (int i = 40; i < te_q.size(); i++)
      check(te_q[i] >= expv - 2 && te_q[i] <= expv + 2, $sformatf("ge=%f gl=%f: T_e %0d, expected %0d", g_e, g_l, te_q[i], expv));
  endtask
  initial begin
    for (int k = 0; k < NSTEP; k++) begin u[k] = $urandom_range(0, 1); amp[k] = 300.0; end
    one(0.8, 1.2, 30);
    one(1.2, 0.8, -30);
    one(1.0, 1.0, 0);
    finish_tb();
  end
endmodule
