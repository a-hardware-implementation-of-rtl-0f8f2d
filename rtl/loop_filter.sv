// loop_filter: first-order PLL loop filter, a single gain K1.
//
// Used twice: as the timing loop filter (K1 = -0.0026/pi) and as the phase
// loop filter (K1 = +0.0026/pi); the division by pi normalises to the
// angle unit of the sine/cosine block.  When valid_in is 1 the output
// register loads err_in * K1, otherwise it holds; valid_in is registered and
// passed on so the next block sees the new value with valid_out.
//
// Widths follow the document (8 bit error, 15 bit constant, 13 bit output).
// The binary points are this design's: err_in has 2 fractional bits, K1 is
// scaled by 2^22 and the output has 12 fractional bits, so the product is
// shifted right by 12 and saturated to 13 bits.
//
// Timing: one clock from valid_in to valid_out and lf_out.
module loop_filter
  import soqpsk_pkg::*;
#(
  parameter logic signed [K_W-1:0] K1 = PK1_DEFAULT
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   ce,
  input  err_t                   err_in,
  input  logic                   valid_in,
  output logic signed [LF_W-1:0] lf_out,
  output logic                   valid_out
);
  logic signed [ERR_W+K_W-1:0] prod;
  always_comb prod = err_in * K1;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      lf_out    <= '0;
      valid_out <= 1'b0;
    end else if (ce) begin
      valid_out <= valid_in;
      if (valid_in) lf_out <= LF_W'(sat(40'(prod >>> LF_SHIFT), LF_W));
    end
  end
endmodule
