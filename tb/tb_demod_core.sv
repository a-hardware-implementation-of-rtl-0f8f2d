// tb_demod_core: the demodulator core on complex baseband samples (16 per
// symbol, amplitude 2.0) of random bits from a behavioural SOQPSK-TG
// transmitter, with a carrier phase offset of 0.3 rad and a symbol rate
// 0.05 % off.  After the loops settle, the hard decisions must equal the
// sent bits at one fixed delay (carrier offset 0 + 0.3) or all inverted
// (offset pi + 0.3), the reliabilities must carry the decisions' signs, and
// the timing strobes must average one per symbol.
`timescale 1ns/1ps
module tb_demod_core;
  import soqpsk_pkg::*;
  localparam longint WATCHDOG_NS = 200_000_000;
  `include "tb_common.svh"
  `include "tg_pulse.svh"
  `include "soqpsk_tx.svh"
  localparam int NSYM = 5000;
  sample_t re_rx, im_rx;
  logic signed [REL_W-1:0] pu_o;
  logic hu_o, valid, underflow, renorm;
  bi_t bi [8];
  logic [MU_W-1:0] mu;
  logic signed [LF_W-1:0] vco_out;
  demod_core dut (.*);
  logic bits [];
  int hu_q [$], pu_q [$];
  int n_uf;
  always @(posedge clk) if (!rst) begin
    if (valid) begin hu_q.push_back(hu_o); pu_q.push_back(pu_o); end
    if (underflow) n_uf++;
  end
  task automatic run(real phi0, real sps, bit inverted);
    int n, best, bd, e; real t, ph;
    reset_dut();
    hu_q.delete(); pu_q.delete(); n_uf = 0;
    n = 0;
    while (1) begin
      t = n / sps;
      if (t >= NSYM - 10) break;
      ph = tx_phase(t) + TX_PHI_REF + phi0;
      re_rx = sample_t'($rtoi(2.0 * $cos(ph) * 16.0 + 0.5 * ($cos(ph) >= 0 ? 1 : -1)));
      im_rx = sample_t'($rtoi(2.0 * $sin(ph) * 16.0 + 0.5 * ($sin(ph) >= 0 ? 1 : -1)));
      @(negedge clk);
      n++;
    end
    best = 0; bd = 1 << 30;
    for (int d = 10; d < 30; d++) begin
      e = 0;
      for (int j = 1000; j < hu_q.size(); j++) if ((hu_q[j] ^ int'(inverted)) != int'(bits[j - d])) e++;
      if (e < bd) begin bd = e; best = d; end
    end
    $display("phi0=%f sps=%f: %0d decisions, delay %0d, %0d errors, %0d strobes", phi0, sps, hu_q.size(), best, bd, n_uf);
    check(bd == 0, $sformatf("%0d decision errors after settling", bd));
    check(n_uf > NSYM - 30 && n_uf < NSYM + 5, "one strobe per symbol");
    for (int j = 1000; j < pu_q.size(); j++) check(pu_q[j] == 0 || ((pu_q[j] > 0) == (hu_q[j] == 1)), "reliability sign");
  endtask
  initial begin
    re_rx = '0; im_rx = '0;
    tg_build();
    bits = new[NSYM];
    foreach (bits[i]) bits[i] = logic'($urandom_range(0, 1));
    tx_build(bits);
    run(0.3, 16.008, 1'b0);
    run(3.14159265358979 + 0.3, 15.992, 1'b1);
    finish_tb();
  end
endmodule
