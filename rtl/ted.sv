// ted: early-late timing error detector inside the SOVA.
//
// Input selector: for each branch e the derivative of the MF output is
// approximated by late minus early MF output of the branch's symbol, rotated
// by the phase state of the branch's starting state and its real part taken:
// Te_branch(e) = Re{(Z_late - Z_early) exp(-j theta)}.  That is one
// subtraction of two real or two imaginary parts per branch, the operand
// choice following the trellis indicator (the document's operand table).
// The result is scaled by 2^-2 and saturated to 8 bits.  The estimates are
// registered when the MF outputs arrive and passed to the error calculator
// when the metric manager's winners for the same symbol are valid.
//
// Timing: t_e is valid one clock after mm_valid; it is the error of the
// previous symbol (D = 1).
module ted
  import soqpsk_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       ce,
  input  mf_set_t    z_early,
  input  mf_set_t    z_late,
  input  logic       ti_in,
  input  logic       mf_valid,
  input  logic [3:0] w,
  input  logic [1:0] gmax,
  input  logic       mm_ti,
  input  logic       mm_valid,
  output err_t       t_e,
  output logic       valid_out
);
  err_t br_c [8];
  err_t br   [8];

  always_comb begin
    for (int e = 0; e < 8; e++) begin
      mf_t re_l, im_l, re_e, im_e;
      logic signed [MF_W:0] dre, dim, r;
      mf_pick(z_late,  alpha_of(3'(e), ti_in), re_l, im_l);
      mf_pick(z_early, alpha_of(3'(e), ti_in), re_e, im_e);
      dre = (MF_W+1)'(re_l) - (MF_W+1)'(re_e);
      dim = (MF_W+1)'(im_l) - (MF_W+1)'(im_e);
      r   = rot_re(dre, dim, theta_of(2'(e >> 1)));
      br_c[e] = err_t'(sat(40'(r >>> 2), ERR_W));
    end
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      for (int e = 0; e < 8; e++) br[e] <= '0;
    end else if (ce) begin
      if (mf_valid)
        for (int e = 0; e < 8; e++) br[e] <= br_c[e];
    end
  end

  traceback_err_calc u_calc (
    .clk, .rst, .ce, .br, .w, .ti_in(mm_ti), .gmax, .valid_in(mm_valid),
    .err_out(t_e), .valid_out
  );
endmodule
