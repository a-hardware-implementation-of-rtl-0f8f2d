// tb_soft_decision_correlator: streams of reliabilities made of random
// bits, then frames of 6240 bits starting with the 64-bit marker, with one
// of the four phase-ambiguity patterns applied (none, all inverted, odd
// positions inverted, even positions inverted; positions from the first
// marker bit).  The correlator must detect each frame start, report the
// pattern, and deliver the payload and the next marker with the original
// signs, FRAME_LEN - 1 outputs per frame (the bit completing a marker is
// not sent).  A random stream must not trigger.  A lock on a correlation
// side lobe up to five bits before the true marker is allowed if the true
// marker then takes over.
`timescale 1ns/1ps
module tb_soft_decision_correlator;
  import soqpsk_pkg::*;
  localparam longint WATCHDOG_NS = 40_000_000;
  `include "tb_common.svh"
  localparam logic [63:0] ASM_V = 64'h034776C7272895B0;
  localparam int FRAME = 6240;
  logic signed [REL_W-1:0] pu_i, pu_o;
  logic hu_i, valid_in, hu_o, valid_out, target_found;
  logic [1:0] phase_sel;
  bi_t bi_in [8], bi_out [8];
  soft_decision_correlator dut (.*);
  logic fbits [FRAME];
  int outs_q [$];

  always @(posedge clk) if (!rst && valid_out) outs_q.push_back(pu_o);

  task automatic send(int v);
    pu_i = REL_W'(v); hu_i = (v > 0); valid_in = 1'b1;
    @(negedge clk) valid_in = 1'b0;
    repeat (3) @(negedge clk);
  endtask

  function automatic bit inv_of(int sel, int pos);
    case (sel)
      0: return 0;
      1: return 1;
      2: return pos % 2 == 1;
      default: return pos % 2 == 0;
    endcase
  endfunction

  initial begin
    int mag, v, pos, n_pre;
    pu_i = '0; hu_i = 1'b0; valid_in = 1'b0;
    for (int e = 0; e < 8; e++) bi_in[e] = '0;
    for (int i = 0; i < 64; i++) fbits[i] = ASM_V[63 - i];
    for (int i = 64; i < FRAME; i++) fbits[i] = logic'($urandom_range(0, 1));
    for (int sel = 0; sel < 4; sel++) begin
      reset_dut();
      outs_q.delete();
      // noise-like start: random signs, no detection allowed
      for (int i = 0; i < 3000; i++) send(($urandom_range(0, 1) ? 1 : -1) * $urandom_range(1, 40));
      check(!target_found && outs_q.size() == 0, "no detection on random reliabilities");
      // two frames plus the next marker
      for (int f = 0; f < 3; f++)
        for (pos = 0; pos < ((f == 2) ? 64 : FRAME); pos++) begin
          mag = $urandom_range(10, 60);
          v = fbits[pos] ? mag : -mag;
          if (inv_of(sel, pos)) v = -v;
          send(v);
          if (f == 0 && pos == 63) begin
            check(target_found, $sformatf("sel %0d: marker detected", sel));
            n_pre = outs_q.size();
            check(n_pre <= 5, $sformatf("sel %0d: %0d outputs from a side-lobe lock", sel, n_pre));
          end
        end
      check(phase_sel == 2'(sel), $sformatf("phase_sel %0d, expected %0d", phase_sel, sel));
      // outputs: payload 64..6239, marker 0..62, payload, marker 0..62
      check(outs_q.size() == n_pre + 2 * (FRAME - 1), $sformatf("sel %0d: %0d outputs", sel, outs_q.size()));
      pos = 64;
      for (int i = n_pre; i < outs_q.size(); i++) begin
        if (pos == 63) pos = 64;     // the completing marker bit is not sent
        check((outs_q[i] > 0) == fbits[pos], $sformatf("sel %0d output %0d (pos %0d) sign", sel, i, pos));
        pos = (pos + 1) % FRAME;
      end
    end
    finish_tb();
  end
endmodule
