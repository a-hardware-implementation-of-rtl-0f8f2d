// phase_estimator: phase loop filter followed by the VCO.
//
// The phase error P_e from the phase error detector is scaled by
// PK1 = +0.0026/pi and accumulated by the VCO into the carrier phase
// estimate (unit pi rad).  Composition as in the document.
//
// Timing: a valid P_e changes vco_out two clocks later.
module phase_estimator
  import soqpsk_pkg::*;
#(
  parameter logic signed [K_W-1:0] PK1 = PK1_DEFAULT
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   ce,
  input  err_t                   p_e,
  input  logic                   valid_in,
  output logic signed [LF_W-1:0] vco_out,
  output logic                   valid_out
);
  logic signed [LF_W-1:0] plf_out;
  logic                   plf_valid;

  loop_filter #(.K1(PK1)) u_plf (
    .clk, .rst, .ce, .err_in(p_e), .valid_in,
    .lf_out(plf_out), .valid_out(plf_valid)
  );

  vco u_vco (
    .clk, .rst, .ce, .plf_in(plf_out), .valid_in(plf_valid),
    .vco_out, .valid_out
  );
endmodule
