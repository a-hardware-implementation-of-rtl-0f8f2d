// metric_manager: add-compare-select of the four-state SOVA.
//
// Metric calculator: each branch e adds its increment to the cumulative
// metric of its starting state, LM(e) = CM(e>>1) + B(e).  For every ending
// state s the two candidates (RM s1 from the upper state, RM s2 from the
// lower one, chosen by the trellis indicator) are compared; the larger one
// becomes the new metric.  w(s) = 1 means candidate 2 won; d(s) is the
// absolute difference of the two candidates (the SOVA's Delta), scaled down
// by 2^5 and saturated to the 0..127 reliability range.
// Metric registers update unit: the metrics are 18-bit unsigned numbers.
// When bit 16 is set in all four registered metrics, bit 16 is cleared in
// all four of them before the branch increments are added (an exact
// subtraction of 2^16).  All comparisons use the signed 18-bit difference of
// two metrics, so a metric that wraps below zero after a renormalisation
// still compares correctly as long as the metrics stay within 2^17 of each
// other.
// Max index unit: gmax is the state of the largest metric (lowest index on
// ties), taken from the new metrics so that it belongs to the same step as
// w and d.
// The structure, the candidate tables and the bit-16 mask follow the
// document; the modulo comparisons, the Delta scaling, the tie rules and the
// reset value of the
// metrics (2^15 instead of 0, head-room for metrics that shrink in the first
// steps) are this design's.
//
// Timing: all outputs are registered, one clock after valid_in.
module metric_manager
  import soqpsk_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       ce,
  input  bi_t        bi [8],
  input  logic       ti_in,
  input  logic       valid_in,
  output logic [3:0] w,
  output rel_t       d [4],
  output logic [1:0] gmax,
  output logic       ti_out,
  output logic       valid_out,
  output logic       renorm       // a renormalisation happened on this step
);
  localparam cm_t CM_RESET = cm_t'(1) << 15;

  cm_t        cm [4];
  cm_t        lm [8];
  cm_t        rm1, rm2;
  cm_t        cm_tmp [4], cm_new [4];
  cm_t        diff;
  logic [3:0] w_c;
  rel_t       d_c [4];
  logic [1:0] gmax_c;
  logic       all16;

  cm_t        cm_m [4];

  always_comb begin
    all16 = cm[0][16] & cm[1][16] & cm[2][16] & cm[3][16];
    for (int s = 0; s < 4; s++)
      cm_m[s] = all16 ? (cm[s] & ~(cm_t'(1) << 16)) : cm[s];
    for (int e = 0; e < 8; e++)
      lm[e] = cm_m[e >> 1] + cm_t'(signed'(bi[e]));
    for (int s = 0; s < 4; s++) begin
      rm1       = lm[cand_of(2'(s), ti_in, 1'b0)];
      rm2       = lm[cand_of(2'(s), ti_in, 1'b1)];
      w_c[s]    = signed'(rm2 - rm1) > 0;
      cm_tmp[s] = w_c[s] ? rm2 : rm1;
      diff      = w_c[s] ? rm2 - rm1 : rm1 - rm2;
      d_c[s]    = ((diff >> REL_SHIFT) > cm_t'(REL_MAX)) ? rel_t'(REL_MAX)
                                                         : rel_t'(diff >> REL_SHIFT);
      cm_new[s] = cm_tmp[s];
    end
    gmax_c = 2'd0;
    for (int s = 1; s < 4; s++)
      if (signed'(cm_new[s] - cm_new[gmax_c]) > 0) gmax_c = 2'(s);
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      for (int s = 0; s < 4; s++) begin
        cm[s] <= CM_RESET;
        d[s]  <= '0;
      end
      w         <= '0;
      gmax      <= '0;
      ti_out    <= 1'b0;
      valid_out <= 1'b0;
      renorm    <= 1'b0;
    end else if (ce) begin
      valid_out <= valid_in;
      renorm    <= valid_in & all16;
      if (valid_in) begin
        for (int s = 0; s < 4; s++) begin
          cm[s] <= cm_new[s];
          d[s]  <= d_c[s];
        end
        w      <= w_c;
        gmax   <= gmax_c;
        ti_out <= ti_in;
      end
    end
  end
endmodule
