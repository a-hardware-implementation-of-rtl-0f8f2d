// branch_increment_calc: turns the on-time matched-filter outputs into the
// eight branch increments B(e) = Re{Z(alpha(e)) exp(-j theta(SS(e)))}.
//
// Branch e (0..7, printed as BI_1..BI_8) leaves state e>>1 whose phase state
// theta is a multiple of pi/2, so each increment is a plus or minus real or
// imaginary part of one MF output; which symbol alpha a branch carries
// depends on the trellis indicator (even/odd section).  The result is the
// document's mapping table (BI_1 = -Im Z(0), BI_5 = Re Z(-1) or Re Z(0), ...);
// here it is generated from the trellis definition in soqpsk_pkg.  Negation
// of the most negative code saturates.
//
// Timing: registered; bi, ti_out and valid_out appear one clock after
// valid_in and hold until the next valid_in.
module branch_increment_calc
  import soqpsk_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    ce,
  input  mf_set_t z,
  input  logic    ti_in,
  input  logic    valid_in,
  output bi_t     bi [8],
  output logic    ti_out,
  output logic    valid_out
);
  bi_t bi_c [8];

  always_comb begin
    for (int e = 0; e < 8; e++) begin
      mf_t re, im;
      mf_pick(z, alpha_of(3'(e), ti_in), re, im);
      bi_c[e] = bi_t'(sat(40'(rot_re((MF_W+1)'(re), (MF_W+1)'(im), theta_of(2'(e >> 1)))), BI_W));
    end
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      for (int e = 0; e < 8; e++) bi[e] <= '0;
      ti_out    <= 1'b0;
      valid_out <= 1'b0;
    end else if (ce) begin
      valid_out <= valid_in;
      if (valid_in) begin
        for (int e = 0; e < 8; e++) bi[e] <= bi_c[e];
        ti_out <= ti_in;
      end
    end
  end
endmodule
