// complex_multiplier: phase rotation of one complex sample stream.
//
// Computes re_o = re_i cos + im_i sin and im_o = im_i cos - re_i sin, i.e.
// the sample times exp(-j phi), which removes the estimated carrier phase phi.
// Four real products are registered, then one adder and one subtractor,
// whose results are scaled back to the sample format (the trig values have
// 8 fractional bits) and saturated to 8 bits.  The product/sum structure is
// the document's; the document's equation writes the rotation with
// exp(+j phi) while its figure wires the sum and difference given here, and
// this design follows the figure, which is the sign that makes the phase loop
// with a positive gain converge.
//
// Timing: two clocks of latency, one result per clock.
module complex_multiplier
  import soqpsk_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     ce,
  input  sample_t                  re_i,
  input  sample_t                  im_i,
  input  logic signed [TRIG_W-1:0] sin_in,
  input  logic signed [TRIG_W-1:0] cos_in,
  output sample_t                  re_o,
  output sample_t                  im_o
);
  localparam int PW = SAMPLE_W + TRIG_W;
  logic signed [PW-1:0] p_rc, p_rs, p_ic, p_is;
  logic signed [PW:0]   sum_re, sum_im;

  always_comb begin
    sum_re = (PW+1)'(p_rc) + (PW+1)'(p_is);
    sum_im = (PW+1)'(p_ic) - (PW+1)'(p_rs);
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      p_rc <= '0; p_rs <= '0; p_ic <= '0; p_is <= '0;
      re_o <= '0; im_o <= '0;
    end else if (ce) begin
      p_rc <= re_i * cos_in;
      p_rs <= re_i * sin_in;
      p_ic <= im_i * cos_in;
      p_is <= im_i * sin_in;
      re_o <= sample_t'(sat(40'(sum_re >>> 8), SAMPLE_W));
      im_o <= sample_t'(sat(40'(sum_im >>> 8), SAMPLE_W));
    end
  end
endmodule
