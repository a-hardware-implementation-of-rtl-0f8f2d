// phase_corrector: removes the estimated carrier phase from the on-time,
// early and late sample streams.
//
// The VCO angle is loaded into a register when vco_valid_in is 1, the sincos
// block turns it into sin/cos (one clock), and three identical complex
// multipliers rotate the three streams (two clocks).  The underflow strobe is
// delayed by two clocks so that it stays aligned with the samples.  The
// holding register on the VCO angle is this design's reading of the valid
// input that the document lists.
//
// Timing: sample outputs and underflow_out lag their inputs by two clocks; a
// new angle takes effect three clocks after vco_valid_in.
module phase_corrector
  import soqpsk_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   ce,
  input  sample_t                re_ontime_rx,
  input  sample_t                im_ontime_rx,
  input  sample_t                re_early_rx,
  input  sample_t                im_early_rx,
  input  sample_t                re_late_rx,
  input  sample_t                im_late_rx,
  input  logic signed [LF_W-1:0] vco_in,
  input  logic                   vco_valid_in,
  input  logic                   underflow,
  output sample_t                re_ontime_rx_out,
  output sample_t                im_ontime_rx_out,
  output sample_t                re_early_rx_out,
  output sample_t                im_early_rx_out,
  output sample_t                re_late_rx_out,
  output sample_t                im_late_rx_out,
  output logic                   underflow_out
);
  logic signed [LF_W-1:0]   angle;
  logic signed [TRIG_W-1:0] s, c;
  logic                     uf_d;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      angle         <= '0;
      uf_d          <= 1'b0;
      underflow_out <= 1'b0;
    end else if (ce) begin
      if (vco_valid_in) angle <= vco_in;
      uf_d          <= underflow;
      underflow_out <= uf_d;
    end
  end

  sincos u_sincos (.clk, .rst, .ce, .angle, .sin_out(s), .cos_out(c));

  complex_multiplier u_cm_ontime (.clk, .rst, .ce, .re_i(re_ontime_rx), .im_i(im_ontime_rx),
    .sin_in(s), .cos_in(c), .re_o(re_ontime_rx_out), .im_o(im_ontime_rx_out));
  complex_multiplier u_cm_early  (.clk, .rst, .ce, .re_i(re_early_rx), .im_i(im_early_rx),
    .sin_in(s), .cos_in(c), .re_o(re_early_rx_out), .im_o(im_early_rx_out));
  complex_multiplier u_cm_late   (.clk, .rst, .ce, .re_i(re_late_rx), .im_i(im_late_rx),
    .sin_in(s), .cos_in(c), .re_o(re_late_rx_out), .im_o(im_late_rx_out));
endmodule
