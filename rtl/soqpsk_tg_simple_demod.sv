// soqpsk_tg_simple_demod: sequence estimation only, from branch increments.
//
// In iterative decoding the full demodulator is run once to recover timing
// and phase; later iterations only repeat the trellis search on the branch
// increments BI_1..BI_8 it put out.  This module is that reduced
// demodulator: the SOVA of the full design without the branch-increment
// calculator and without the timing and phase error detectors.  The metric
// manager, hard-decision and reliability traceback units and the output
// calculator are the same modules, so the outputs equal those of the full
// design for the same increments.
// The document only says that this version follows from the full one; the
// block view shows BI_1..BI_8, CTRL, Pu_O, Hu_O and Valid.  The two extra
// inputs valid_in (one step per pulse) and ti_in (trellis indicator of the
// step, 0 = even section) are this design's choice: the trellis is
// time-varying, so the detector must know the section parity.
//
// Interface: bi_in[e] is the increment of branch e (start state e>>1, input
// bit e&1), 12 bit signed.  Timing: as the SOVA, pu_o/hu_o belong to the step
// 15 steps before the current one and follow valid_in by a few clocks.
module soqpsk_tg_simple_demod
  import soqpsk_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    ce,
  input  bi_t                     bi_in [8],
  input  logic                    ti_in,
  input  logic                    valid_in,
  output logic signed [REL_W-1:0] pu_o,
  output logic                    hu_o,
  output logic                    valid
);
  logic [3:0]     w;
  rel_t           d [4];
  logic [1:0]     gmax;
  logic           mm_ti, mm_valid, renorm;
  logic [3:0]     u_hat;
  logic [WIN-2:0] u_xor [4];
  rel_t           l_hat [4];
  logic           rtu_valid;
  bi_t            bi_unused [8];

  metric_manager u_mm (.clk, .rst, .ce, .bi(bi_in), .ti_in, .valid_in,
    .w, .d, .gmax, .ti_out(mm_ti), .valid_out(mm_valid), .renorm);

  htu u_htu (.clk, .rst, .ce, .w, .ti_in(mm_ti), .valid_in(mm_valid),
    .u_hat, .u_xor, .ti_out(), .valid_out());

  rtu u_rtu (.clk, .rst, .ce, .w, .d, .u_xor, .ti_in(mm_ti), .valid_in(mm_valid),
    .l_hat, .valid_out(rtu_valid));

  output_calculator u_oc (.clk, .rst, .ce, .u_hat, .l_hat, .bi_in, .gmax,
    .mm_valid_in(mm_valid), .rtu_valid_in(rtu_valid), .bi_valid_in(valid_in),
    .pu_o, .hu_o, .bi(bi_unused), .valid);
endmodule
