// mf_mac: one multiply-and-accumulate system of the matched-filter bank.
//
// Two 16-entry tables hold the matched-filter coefficient
// exp(+j pi q_PT(i T/16)) for alpha = -1: Re_LUT = round(256 cos(pi q_PT)) and
// Im_LUT = round(256 sin(pi q_PT)), where q_PT(t) = q_TG(t + 3.5T) is the
// truncated SOQPSK-TG phase pulse (q_TG is the integral of the TG frequency
// pulse with rho = 0.7, B = 1.25, T1 = 1.5, T2 = 0.5 and area 1/2).  The
// coefficient of alpha = +1 is the conjugate, so four real products give both
// filters (the MF complex multiplier):
//   Re(+1) = Re Rc + Im Ic    Im(+1) = Im Rc - Re Ic
//   Re(-1) = Re Rc - Im Ic    Im(-1) = Im Rc + Re Ic
// The alpha = 0 filter is a plain sum of the samples.  The accumulators
// restart when the (delayed) index is 0 and otherwise add, so after index 15
// they hold the 16-sample correlation.  Structure as in the document; the
// table contents are computed from the document's pulse definition, the
// sampling of q_PT at t = iT/16 and the 8 fractional bits are this design's.
//
// Timing: products are registered (one clock), the sums are registered (one
// clock) and the accumulators add on the third clock; idx_d2 is the index
// delayed by two clocks, aligned with the accumulator input.  Outputs are
// the accumulators scaled to 12 bits with 4 fractional bits, saturated.
module mf_mac
  import soqpsk_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       ce,
  input  sample_t    re_rx,
  input  sample_t    im_rx,
  input  logic [3:0] idx,
  output logic [3:0] idx_d2,
  output mf_set_t    z
);
  localparam logic signed [COEF_W-1:0] RE_LUT [16] = '{
    10'sd242, 10'sd238, 10'sd232, 10'sd226, 10'sd219, 10'sd211, 10'sd202, 10'sd192,
    10'sd181, 10'sd170, 10'sd158, 10'sd145, 10'sd133, 10'sd120, 10'sd107, 10'sd95};
  localparam logic signed [COEF_W-1:0] IM_LUT [16] = '{
    10'sd83,  10'sd95,  10'sd107, 10'sd120, 10'sd133, 10'sd145, 10'sd158, 10'sd170,
    10'sd181, 10'sd192, 10'sd202, 10'sd211, 10'sd219, 10'sd226, 10'sd232, 10'sd238};
  localparam int PW = SAMPLE_W + COEF_W;   // product width
  localparam int AW = PW + 1 + 4;          // accumulator width

  logic signed [PW-1:0] p_rr, p_ri, p_ir, p_ii;   // Re*Rc, Re*Ic, Im*Rc, Im*Ic
  logic signed [PW:0]   re_p1, im_p1, re_m1, im_m1;
  sample_t              re_d1, im_d1, re_d2, im_d2;
  logic [3:0]           idx_d1;
  logic signed [AW-1:0] a_re_p1, a_im_p1, a_re_m1, a_im_m1;
  logic signed [MF_W-1:0] a_re_0, a_im_0;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      p_rr <= '0; p_ri <= '0; p_ir <= '0; p_ii <= '0;
      re_p1 <= '0; im_p1 <= '0; re_m1 <= '0; im_m1 <= '0;
      re_d1 <= '0; im_d1 <= '0; re_d2 <= '0; im_d2 <= '0;
      idx_d1 <= '0; idx_d2 <= '0;
      a_re_p1 <= '0; a_im_p1 <= '0; a_re_m1 <= '0; a_im_m1 <= '0;
      a_re_0 <= '0; a_im_0 <= '0;
    end else if (ce) begin
      // MF complex multiplier
      p_rr  <= re_rx * RE_LUT[idx];
      p_ri  <= re_rx * IM_LUT[idx];
      p_ir  <= im_rx * RE_LUT[idx];
      p_ii  <= im_rx * IM_LUT[idx];
      re_p1 <= (PW+1)'(p_rr) + (PW+1)'(p_ii);
      re_m1 <= (PW+1)'(p_rr) - (PW+1)'(p_ii);
      im_p1 <= (PW+1)'(p_ir) - (PW+1)'(p_ri);
      im_m1 <= (PW+1)'(p_ir) + (PW+1)'(p_ri);
      re_d1 <= re_rx;  im_d1 <= im_rx;
      re_d2 <= re_d1;  im_d2 <= im_d1;
      idx_d1 <= idx;   idx_d2 <= idx_d1;
      // accumulator
      if (idx_d2 == 4'd0) begin
        a_re_p1 <= AW'(re_p1);  a_im_p1 <= AW'(im_p1);
        a_re_m1 <= AW'(re_m1);  a_im_m1 <= AW'(im_m1);
        a_re_0  <= MF_W'(re_d2); a_im_0  <= MF_W'(im_d2);
      end else begin
        a_re_p1 <= a_re_p1 + AW'(re_p1);  a_im_p1 <= a_im_p1 + AW'(im_p1);
        a_re_m1 <= a_re_m1 + AW'(re_m1);  a_im_m1 <= a_im_m1 + AW'(im_m1);
        a_re_0  <= a_re_0 + MF_W'(re_d2); a_im_0  <= a_im_0 + MF_W'(im_d2);
      end
    end
  end

  always_comb begin
    z.re_p1 = mf_t'(sat(40'(a_re_p1 >>> 8), MF_W));
    z.im_p1 = mf_t'(sat(40'(a_im_p1 >>> 8), MF_W));
    z.re_m1 = mf_t'(sat(40'(a_re_m1 >>> 8), MF_W));
    z.im_m1 = mf_t'(sat(40'(a_im_m1 >>> 8), MF_W));
    z.re_0  = a_re_0;
    z.im_0  = a_im_0;
  end
endmodule
