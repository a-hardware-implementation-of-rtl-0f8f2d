// soqpsk_tg_demod: full coherent SOQPSK-TG demodulator for FEC decoders.
//
// The demodulator core recovers symbol timing and carrier phase and runs the
// soft-output Viterbi algorithm on the four-state pulse-truncation trellis;
// the soft-decision correlator then finds the frame start by correlating the
// reliabilities with the attached sync marker and removes the 90-degree
// phase ambiguity.  Pu_O carries signed reliabilities for the outer decoder,
// Hu_O the hard decisions (for testing), BI_1..BI_8 the branch increments of
// each decoded bit, which a simpler, synchronisation-free demodulator
// reuses in later iterations of an SCCC decoder.  Structure and port set as
// in the document; target_found and phase_sel are extra observation outputs.
//
// Interface: Re_rx/Im_rx are 8 bit signed with 4 fractional bits, one
// complex sample per clock with CE = 1 at 16 samples per symbol; RST is
// asynchronous and active high.  valid marks one output per decoded bit
// inside a detected frame.
module soqpsk_tg_demod
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
  output logic                    target_found,
  output logic [1:0]              phase_sel,
  output logic                    core_valid,
  output logic signed [REL_W-1:0] core_pu,
  output logic                    core_hu,
  output logic                    underflow,
  output logic [MU_W-1:0]         mu,
  output logic signed [LF_W-1:0]  vco_out,
  output logic                    renorm
);
  bi_t core_bi [8];

  demod_core u_core (.clk, .rst, .ce, .re_rx, .im_rx,
    .pu_o(core_pu), .hu_o(core_hu), .bi(core_bi), .valid(core_valid),
    .underflow, .mu, .vco_out, .renorm);

  soft_decision_correlator u_sdc (.clk, .rst, .ce,
    .pu_i(core_pu), .hu_i(core_hu), .bi_in(core_bi), .valid_in(core_valid),
    .pu_o, .hu_o, .bi_out(bi), .valid_out(valid), .target_found, .phase_sel);
endmodule
