// timing_estimator: timing loop filter followed by the modulo-1 counter.
//
// The timing error T_e from the timing error detector is scaled by the loop
// constant TK1 = -0.0026/pi (a first-order loop) and the result adjusts the
// decrementing counter once per symbol.  The counter produces the symbol
// boundary strobe underflow and the fractional interval mu for the
// interpolator.  Composition as in the document.
//
// Timing: a valid T_e changes the counter two clocks later.
module timing_estimator
  import soqpsk_pkg::*;
#(
  parameter logic signed [K_W-1:0] TK1 = TK1_DEFAULT
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            ce,
  input  err_t            t_e,
  input  logic            valid_in,
  output logic            underflow,
  output logic [MU_W-1:0] mu
);
  logic signed [LF_W-1:0] tlf_out;
  logic                   tlf_valid;

  loop_filter #(.K1(TK1)) u_tlf (
    .clk, .rst, .ce, .err_in(t_e), .valid_in,
    .lf_out(tlf_out), .valid_out(tlf_valid)
  );

  mod1_counter u_cnt (
    .clk, .rst, .ce, .tlf_in(tlf_out), .valid_in(tlf_valid),
    .underflow, .mu
  );
endmodule
