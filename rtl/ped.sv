// ped: decision-directed phase error detector inside the SOVA.
//
// Input selector: Pe_branch(e) = Im{Z(alpha(e)) exp(-j theta)} of the on-time
// MF output, i.e. a plus or minus real or imaginary part (the document's
// table: Pe_branch1 = Re Z(0), Pe_branch3 = -Im Z(0) or -Im Z(+1), ...),
// scaled by 2^-2 and saturated to 8 bits.  The error calculator then follows
// the survivor of the best state with a decision delay of one symbol.
//
// Timing: p_e is valid one clock after mm_valid.
module ped
  import soqpsk_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       ce,
  input  mf_set_t    z_ontime,
  input  logic       ti_in,
  input  logic       mf_valid,
  input  logic [3:0] w,
  input  logic [1:0] gmax,
  input  logic       mm_ti,
  input  logic       mm_valid,
  output err_t       p_e,
  output logic       valid_out
);
  err_t br_c [8];
  err_t br   [8];

  always_comb begin
    for (int e = 0; e < 8; e++) begin
      mf_t re, im;
      logic signed [MF_W:0] r;
      mf_pick(z_ontime, alpha_of(3'(e), ti_in), re, im);
      r = rot_im((MF_W+1)'(re), (MF_W+1)'(im), theta_of(2'(e >> 1)));
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
    .err_out(p_e), .valid_out
  );
endmodule
