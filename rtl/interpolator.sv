// interpolator: linear interpolator of the timing synchronizer.
//
// On every clock a new complex sample arrives.  The late sample is
// x[n-1] + mu (x[n] - x[n-1]); the on-time and early samples are that value
// delayed by one and two clocks, so the three streams are one sample apart.
// mu is held in a register that loads only on the underflow strobe (a new
// symbol boundary; the strobe's own sample already uses the new value); the strobe is carried along so that underflow_out is
// aligned with the on-time sample.  The structure follows the document's
// interpolator; rounding (truncation) and output saturation to the input
// format are this design's choices.
//
// Interface: re_rx/im_rx 8 bit signed (4 fractional bits), mu 9 bit unsigned
// (8 fractional bits).  Outputs are registered; the late sample lags the
// input by one clock, the on-time sample by two.
module interpolator
  import soqpsk_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic            ce,
  input  sample_t         re_rx,
  input  sample_t         im_rx,
  input  logic            underflow,
  input  logic [MU_W-1:0] mu,
  output sample_t         re_ontime_rx,
  output sample_t         im_ontime_rx,
  output sample_t         re_early_rx,
  output sample_t         im_early_rx,
  output sample_t         re_late_rx,
  output sample_t         im_late_rx,
  output logic            underflow_out
);
  logic [MU_W-1:0] mu_reg;
  sample_t re_prev, im_prev;
  sample_t re_lin, im_lin;
  logic    uf_d;

  function automatic sample_t interp(input sample_t cur, input sample_t prev,
                                     input logic [MU_W-1:0] m);
    logic signed [SAMPLE_W:0]        diff;
    logic signed [SAMPLE_W+MU_W+1:0] prod;
    logic signed [39:0]              sum;
    diff = {cur[SAMPLE_W-1], cur} - {prev[SAMPLE_W-1], prev};
    prod = diff * $signed({1'b0, m});
    sum  = 40'(prev) + 40'(prod >>> 8);
    return sample_t'(sat(sum, SAMPLE_W));
  endfunction

  // The strobe's own sample already uses the new mu.
  logic [MU_W-1:0] mu_eff;
  always_comb begin
    mu_eff = underflow ? mu : mu_reg;
    re_lin = interp(re_rx, re_prev, mu_eff);
    im_lin = interp(im_rx, im_prev, mu_eff);
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      mu_reg        <= '0;
      re_prev       <= '0;
      im_prev       <= '0;
      re_late_rx    <= '0;
      im_late_rx    <= '0;
      re_ontime_rx  <= '0;
      im_ontime_rx  <= '0;
      re_early_rx   <= '0;
      im_early_rx   <= '0;
      uf_d          <= 1'b0;
      underflow_out <= 1'b0;
    end else if (ce) begin
      if (underflow) mu_reg <= mu;
      re_prev       <= re_rx;
      im_prev       <= im_rx;
      re_late_rx    <= re_lin;
      im_late_rx    <= im_lin;
      re_ontime_rx  <= re_late_rx;
      im_ontime_rx  <= im_late_rx;
      re_early_rx   <= re_ontime_rx;
      im_early_rx   <= im_ontime_rx;
      uf_d          <= underflow;
      underflow_out <= uf_d;
    end
  end
endmodule
