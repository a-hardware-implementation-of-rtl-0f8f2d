// demod_core: timing recovery, phase recovery and sequence detection.
//
// Data path: the interpolator computes on-time, early and late sample
// streams at the instants given by the timing estimator (mu, underflow); the
// phase corrector rotates all three by the phase estimate; three matched
// filter banks correlate each stream over one symbol, started by the
// underflow strobe; the SOVA detects the bits from the on-time outputs.
// Loops: the SOVA's timing error detector (early/late outputs) drives the
// timing estimator (loop filter and modulo-1 counter), and its phase error
// detector (on-time outputs) drives the phase estimator (loop filter and
// VCO).  Both are first-order loops updated once per symbol, decision
// directed along the best survivor with a delay of one symbol.  Structure as
// in the document.
//
// Interface: one complex 8-bit sample per clock with ce = 1, 16 samples per
// symbol on average.  Outputs as the SOVA's; the loop state is brought out
// for observation.
module demod_core
  import soqpsk_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    ce,
  input  sample_t                 re_rx,
  input  sample_t                 im_rx,
  output logic signed [REL_W-1:0] pu_o,
  output logic                    hu_o,
  output bi_t                     bi [8],
  output logic                    valid,
  output logic                    underflow,
  output logic [MU_W-1:0]         mu,
  output logic signed [LF_W-1:0]  vco_out,
  output logic                    renorm
);
  sample_t re_on, im_on, re_ea, im_ea, re_la, im_la;
  sample_t re_on_c, im_on_c, re_ea_c, im_ea_c, re_la_c, im_la_c;
  logic    uf_i, uf_c;
  logic    vco_valid;
  mf_set_t z_on, z_ea, z_la;
  logic    ti_on, v_on;
  logic    ti_ea, v_ea, ti_la, v_la;
  err_t    t_e, p_e;
  logic    t_e_valid, p_e_valid;

  interpolator u_interp (.clk, .rst, .ce, .re_rx, .im_rx, .underflow, .mu,
    .re_ontime_rx(re_on), .im_ontime_rx(im_on), .re_early_rx(re_ea), .im_early_rx(im_ea),
    .re_late_rx(re_la), .im_late_rx(im_la), .underflow_out(uf_i));

  timing_estimator u_test (.clk, .rst, .ce, .t_e, .valid_in(t_e_valid), .underflow, .mu);

  phase_corrector u_pc (.clk, .rst, .ce,
    .re_ontime_rx(re_on), .im_ontime_rx(im_on), .re_early_rx(re_ea), .im_early_rx(im_ea),
    .re_late_rx(re_la), .im_late_rx(im_la), .vco_in(vco_out), .vco_valid_in(vco_valid),
    .underflow(uf_i),
    .re_ontime_rx_out(re_on_c), .im_ontime_rx_out(im_on_c),
    .re_early_rx_out(re_ea_c), .im_early_rx_out(im_ea_c),
    .re_late_rx_out(re_la_c), .im_late_rx_out(im_la_c), .underflow_out(uf_c));

  phase_estimator u_pest (.clk, .rst, .ce, .p_e, .valid_in(p_e_valid), .vco_out,
    .valid_out(vco_valid));

  mf_bank u_mf_on (.clk, .rst, .ce, .re_rx(re_on_c), .im_rx(im_on_c), .underflow(uf_c),
    .z(z_on), .ti_out(ti_on), .valid_out(v_on));
  mf_bank u_mf_ea (.clk, .rst, .ce, .re_rx(re_ea_c), .im_rx(im_ea_c), .underflow(uf_c),
    .z(z_ea), .ti_out(ti_ea), .valid_out(v_ea));
  mf_bank u_mf_la (.clk, .rst, .ce, .re_rx(re_la_c), .im_rx(im_la_c), .underflow(uf_c),
    .z(z_la), .ti_out(ti_la), .valid_out(v_la));

  sova u_sova (.clk, .rst, .ce, .z_ontime(z_on), .z_early(z_ea), .z_late(z_la),
    .ti_in(ti_on), .valid_in(v_on), .pu_o, .hu_o, .bi, .valid,
    .t_e, .t_e_valid, .p_e, .p_e_valid, .renorm);

  // The three banks share one strobe and therefore run in lockstep.
  a_banks_in_step: assert property (@(posedge clk) disable iff (rst)
    (v_ea == v_on) && (v_la == v_on) && (ti_ea == ti_on) && (ti_la == ti_on))
    else $error("matched-filter banks out of step");
endmodule
