// tb_soqpsk_tg_demod: the full demodulator (core + correlator) on complex
// baseband samples of a repeated 6240-bit frame (64-bit marker + random
// payload) with carrier offsets of 90 and 180 degrees (+0.3 rad).  Each
// frame must be found, the ambiguity reported (1 for 180, 2 or 3 for 90)
// and, from the second frame on, every output must have the sign of the
// sent bit; one output per frame position except the marker's last bit.
`timescale 1ns/1ps
module tb_soqpsk_tg_demod;
  import soqpsk_pkg::*;
  localparam longint WATCHDOG_NS = 400_000_000;
  `include "tb_common.svh"
  `include "tg_pulse.svh"
  `include "soqpsk_tx.svh"
  localparam int FRAME = 6240;
  localparam logic [63:0] ASM_V = 64'h034776C7272895B0;
  localparam int LEAD = 300;
  localparam int NSYM = LEAD + 3 * FRAME + 100;
  sample_t re_rx, im_rx;
  logic signed [REL_W-1:0] pu_o, core_pu;
  logic hu_o, valid, target_found, core_valid, core_hu, underflow, renorm;
  logic [1:0] phase_sel;
  bi_t bi [8];
  logic [MU_W-1:0] mu;
  logic signed [LF_W-1:0] vco_out;
  soqpsk_tg_demod dut (.*);
  logic bits [];
  logic fbits [FRAME];
  task automatic run(real phi0, int sel_lo, int sel_hi);
    int n, pos, dets, errs, outs, first_outs; real t, ph; logic was;
    reset_dut();
    n = 0; pos = 0; dets = 0; errs = 0; outs = 0; first_outs = 0; was = 1'b0;
    while (1) begin
      t = n / 16.004;
      if (t >= NSYM - 10) break;
      ph = tx_phase(t) + TX_PHI_REF + phi0;
      re_rx = sample_t'($rtoi(2.0 * $cos(ph) * 16.0));
      im_rx = sample_t'($rtoi(2.0 * $sin(ph) * 16.0));
      @(posedge clk); #1;
      n++;
      if (valid) begin
        if (dets >= 2) begin
          outs++;
          if (pu_o == 0 || (pu_o > 0) != fbits[pos]) errs++;
        end
        pos = (pos + 1) % FRAME;
        if (pos == 63) pos = 64;
      end
      if (target_found && !was) begin
        dets++; pos = 64;
        check(int'(phase_sel) >= sel_lo && int'(phase_sel) <= sel_hi,
              $sformatf("phase_sel %0d, expected %0d..%0d", phase_sel, sel_lo, sel_hi));
      end else if (dut.u_sdc.accept && was) begin
        dets++;
      end
      was = target_found;
      @(negedge clk);
    end
    $display("phi0=%f: %0d markers, %0d outputs checked, %0d errors, phase_sel %0d", phi0, dets, outs, errs, phase_sel);
    check(dets >= 3, "every frame found");
    check(outs >= FRAME, "a whole frame checked");
    check(errs == 0, $sformatf("%0d wrong outputs", errs));
  endtask
  initial begin
    re_rx = '0; im_rx = '0;
    tg_build();
    for (int i = 0; i < 64; i++) fbits[i] = ASM_V[63 - i];
    for (int i = 64; i < FRAME; i++) fbits[i] = logic'($urandom_range(0, 1));
    bits = new[NSYM];
    foreach (bits[k]) bits[k] = (k < LEAD) ? logic'($urandom_range(0, 1)) : fbits[(k - LEAD) % FRAME];
    tx_build(bits);
    run(3.14159265358979 / 2.0 + 0.3, 2, 3);
    run(3.14159265358979 + 0.3, 1, 1);
    finish_tb();
  end
endmodule
