// output_calculator: final SOVA output selection.
//
// gmax (the state with the largest metric) is captured when the metric
// manager's valid rises; when the traceback units deliver their oldest
// decisions one clock later, the decision and reliability of state gmax are
// taken: Hu_O = u_hat(gmax) and Pu_O = +L or -L for Hu_O = 1 or 0.  The eight
// branch increments of every step are kept in a 16-deep delay line that moves
// on BI_Valid, so the branch increments sent out belong to the same step as
// the decision (15 steps old).  As in the document; the register layout is
// this design's.
//
// Timing: outputs registered, one clock after rtu_valid_in.
module output_calculator
  import soqpsk_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    ce,
  input  logic [3:0]              u_hat,
  input  rel_t                    l_hat [4],
  input  bi_t                     bi_in [8],
  input  logic [1:0]              gmax,
  input  logic                    mm_valid_in,
  input  logic                    rtu_valid_in,
  input  logic                    bi_valid_in,
  output logic signed [REL_W-1:0] pu_o,
  output logic                    hu_o,
  output bi_t                     bi [8],
  output logic                    valid
);
  bi_t        dl [WIN][8];
  logic [1:0] gmax_r;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      for (int k = 0; k < WIN; k++)
        for (int e = 0; e < 8; e++) dl[k][e] <= '0;
      for (int e = 0; e < 8; e++) bi[e] <= '0;
      gmax_r <= '0;
      pu_o   <= '0;
      hu_o   <= 1'b0;
      valid  <= 1'b0;
    end else if (ce) begin
      if (bi_valid_in) begin
        for (int e = 0; e < 8; e++) dl[0][e] <= bi_in[e];
        for (int k = 1; k < WIN; k++) dl[k] <= dl[k-1];
      end
      if (mm_valid_in) gmax_r <= gmax;
      valid <= rtu_valid_in;
      if (rtu_valid_in) begin
        hu_o <= u_hat[gmax_r];
        pu_o <= u_hat[gmax_r] ? signed'(l_hat[gmax_r]) : -signed'(l_hat[gmax_r]);
        for (int e = 0; e < 8; e++) bi[e] <= dl[WIN-1][e];
      end
    end
  end
endmodule
