// sova: soft-output Viterbi decoder of the full demodulator.
//
// Seven units: the branch increment calculator turns the on-time MF outputs
// into eight branch increments; the metric manager runs add-compare-select
// and yields the winners w, the Deltas d and the best state gmax; the
// hard-decision and reliability traceback units keep 16-step register-exchange
// histories; the output calculator picks the decision and reliability of
// the best state and aligns the branch increments with them.  The timing and
// phase error detectors sit here too because they need the winners: they
// deliver T_e and P_e for the synchronisation loops.  Composition as in the
// document.
//
// Interface: one set of on-time, early and late MF outputs per symbol with
// mf_valid and the trellis indicator.  Pu_O is the signed reliability (+ for
// bit 1), Hu_O the hard decision, of the symbol 15 steps before the newest.
// Timing: valid rises five clocks after mf_valid; t_e/p_e three clocks after.
module sova
  import soqpsk_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    ce,
  input  mf_set_t                 z_ontime,
  input  mf_set_t                 z_early,
  input  mf_set_t                 z_late,
  input  logic                    ti_in,
  input  logic                    valid_in,
  output logic signed [REL_W-1:0] pu_o,
  output logic                    hu_o,
  output bi_t                     bi [8],
  output logic                    valid,
  output err_t                    t_e,
  output logic                    t_e_valid,
  output err_t                    p_e,
  output logic                    p_e_valid,
  output logic                    renorm
);
  bi_t            bi_int [8];
  logic           bic_ti, bic_valid;
  logic [3:0]     w;
  rel_t           d [4];
  logic [1:0]     gmax;
  logic           mm_ti, mm_valid;
  logic [3:0]     u_hat;
  logic [WIN-2:0] u_xor [4];
  rel_t           l_hat [4];
  logic           rtu_valid;

  branch_increment_calc u_bic (.clk, .rst, .ce, .z(z_ontime), .ti_in, .valid_in,
    .bi(bi_int), .ti_out(bic_ti), .valid_out(bic_valid));

  metric_manager u_mm (.clk, .rst, .ce, .bi(bi_int), .ti_in(bic_ti), .valid_in(bic_valid),
    .w, .d, .gmax, .ti_out(mm_ti), .valid_out(mm_valid), .renorm);

  htu u_htu (.clk, .rst, .ce, .w, .ti_in(mm_ti), .valid_in(mm_valid),
    .u_hat, .u_xor, .ti_out(), .valid_out());

  rtu u_rtu (.clk, .rst, .ce, .w, .d, .u_xor, .ti_in(mm_ti), .valid_in(mm_valid),
    .l_hat, .valid_out(rtu_valid));

  output_calculator u_oc (.clk, .rst, .ce, .u_hat, .l_hat, .bi_in(bi_int), .gmax,
    .mm_valid_in(mm_valid), .rtu_valid_in(rtu_valid), .bi_valid_in(bic_valid),
    .pu_o, .hu_o, .bi, .valid);

  ted u_ted (.clk, .rst, .ce, .z_early, .z_late, .ti_in, .mf_valid(valid_in),
    .w, .gmax, .mm_ti, .mm_valid, .t_e, .valid_out(t_e_valid));

  ped u_ped (.clk, .rst, .ce, .z_ontime, .ti_in, .mf_valid(valid_in),
    .w, .gmax, .mm_ti, .mm_valid, .p_e, .valid_out(p_e_valid));
endmodule
