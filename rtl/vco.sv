// vco: discrete-time VCO of the phase synchronizer, an accumulator (K0 = 1).
//
// When valid_in is 1 the 13-bit running sum loads vco_out + plf_in; the
// angle unit is pi rad with 12 fractional bits, so the two's-complement
// wrap-around of the register is the wrap of the phase at +-pi.  valid_in is
// registered to valid_out to mark a changed estimate.  As in the document.
//
// Timing: one clock from valid_in to the new vco_out and valid_out.
module vco
  import soqpsk_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   ce,
  input  logic signed [LF_W-1:0] plf_in,
  input  logic                   valid_in,
  output logic signed [LF_W-1:0] vco_out,
  output logic                   valid_out
);
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      vco_out   <= '0;
      valid_out <= 1'b0;
    end else if (ce) begin
      valid_out <= valid_in;
      if (valid_in) vco_out <= vco_out + plf_in;
    end
  end
endmodule
