// soqpsk_tg_receiver: ADC samples in, decoded soft decisions out.
//
// The IF signal (70 MHz in the reference system) is bandpass-subsampled at
// Fs = 93 1/3 MHz so that it aliases to Fs/4; the I/Q downconverter turns the
// real ADC stream into the complex baseband stream by sign changes only, and
// the full SOQPSK-TG demodulator does the rest.  The band-pass filter and the
// ADC are analogue and outside this design.
//
// Interface: adc_in 8 bit signed (4 fractional bits), one per clock with
// ce = 1; outputs as soqpsk_tg_demod.
module soqpsk_tg_receiver
  import soqpsk_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    ce,
  input  sample_t                 adc_in,
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
  sample_t re_rx, im_rx;

  iq_downconverter u_ddc (.clk, .rst, .ce, .adc_in, .re_rx, .im_rx);

  soqpsk_tg_demod u_demod (.clk, .rst, .ce, .re_rx, .im_rx,
    .pu_o, .hu_o, .bi, .valid, .target_found, .phase_sel,
    .core_valid, .core_pu, .core_hu, .underflow, .mu, .vco_out, .renorm);
endmodule
