// iq_downconverter: quarter-sample-rate I/Q downconversion of the ADC stream.
//
// The IF signal is bandpass-subsampled so that its carrier lands on Fs/4.
// The mixers cos(n pi/2) and sin(n pi/2) then only take the values 0 and +-1,
// so mixing is a sign change and a choice of rail: sample 0 goes to the real
// output, sample 1 to the imaginary output, sample 2 negated to the real
// output, sample 3 negated to the imaginary output, and the other rail is 0.
// This follows the receiver's sampling scheme; the saturation of the negated
// most-negative code and the one-cycle output register are this design's own.
//
// Interface: adc_in is taken on every clock with ce = 1.  re_rx/im_rx appear
// one clock later.  rst is asynchronous, active high, and restarts the
// mixer phase at n = 0.
module iq_downconverter
  import soqpsk_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    ce,
  input  sample_t adc_in,
  output sample_t re_rx,
  output sample_t im_rx
);
  logic [1:0] n;
  sample_t    neg;

  always_comb neg = (adc_in == sample_t'(-128)) ? sample_t'(127) : -adc_in;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      n     <= '0;
      re_rx <= '0;
      im_rx <= '0;
    end else if (ce) begin
      n <= n + 2'd1;
      unique case (n)
        2'd0: begin re_rx <= adc_in; im_rx <= '0;     end
        2'd1: begin re_rx <= '0;     im_rx <= adc_in; end
        2'd2: begin re_rx <= neg;    im_rx <= '0;     end
        2'd3: begin re_rx <= '0;     im_rx <= neg;    end
      endcase
    end
  end
endmodule
