// soft_decision_correlator: frame synchronisation and phase-ambiguity
// resolution on the soft decisions.
//
// The phase loop can lock in four ways (0, 90, 180, 270 degrees).  Every
// frame starts with a 64-bit attached sync marker (ASM).  The last 64
// reliabilities are kept in a shift register; two correlations are formed by
// giving each stored reliability the sign of the aligned ASM bit (kept for a
// 1, negated for a 0) and adding the 64 results in a six-level adder tree:
// one with the ASM itself (ASM02) and one with its odd-position bits
// inverted (ASM13).  When either magnitude exceeds THRESH (915) a frame
// start is declared and a frame counter runs for FRAME_LEN (6240) inputs;
// target_found is high meanwhile.  The phase-ambiguity selector latches
//   Se10 = |ASM13 sum| > |ASM02 sum|,  Se11 = winning sum < 0,
// and the output multiplexer then passes the reliabilities unchanged (0
// degrees), all negated (180), odd positions negated (90) or even positions
// negated (270).  Positions count from the first ASM bit (position 0).
// Hard decisions get the same inversions; branch increments are passed
// through unchanged.  While a frame runs, a new marker is only accepted at
// the position where the next one is due, or anywhere if its correlation is
// larger than that of the marker that started the frame (a marker found on
// a correlation side lobe, e.g. five bits early, is then replaced by the
// true one).
// Thresholds, lengths and the structure follow the document; the ASM value
// is not given there, the default is the 64-bit CCSDS marker 034776C7272895B0
// (first transmitted bit = MSB).  Whether the decision bit that completes a
// marker is itself sent out, the gating of repeated markers, and that outputs are only marked valid while
// target_found is high, are this design's choices.
//
// Timing: one input per valid_in (about every 16 clocks); outputs are
// registered two clocks after the input.
module soft_decision_correlator
  import soqpsk_pkg::*;
#(
  parameter logic [63:0] ASM       = 64'h034776C7272895B0,
  parameter int          THRESH    = 915,
  parameter int          FRAME_LEN = 6240
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    ce,
  input  logic signed [REL_W-1:0] pu_i,
  input  logic                    hu_i,
  input  bi_t                     bi_in [8],
  input  logic                    valid_in,
  output logic signed [REL_W-1:0] pu_o,
  output logic                    hu_o,
  output bi_t                     bi_out [8],
  output logic                    valid_out,
  output logic                    target_found,
  output logic [1:0]              phase_sel     // 0:0, 1:180, 2:90, 3:270 degrees
);
  localparam int SUM_W = REL_W + 7;
  localparam int CNT_W_F = $clog2(FRAME_LEN + 1);

  // ASM13: bits at odd positions inverted; position p = 63 - bit index
  localparam logic [63:0] ASM13 = ASM ^ {32{2'b01}};

  logic signed [REL_W-1:0] sr [64];     // sr[i] aligned with ASM bit i
  logic signed [REL_W-1:0] pu_d;
  logic                    hu_d, valid_d;
  bi_t                     bi_d [8];
  logic signed [SUM_W-1:0] c02, c13, a02, a13, amax, peak;
  logic                    detect, se10, se11;
  logic [CNT_W_F-1:0]      fcnt;
  logic                    pos_odd;
  logic                    accept;

  // apply sign and six-level adder tree (written as a sum)
  always_comb begin
    c02 = '0;
    c13 = '0;
    for (int i = 0; i < 64; i++) begin
      c02 += ASM[i]   ? SUM_W'(sr[i]) : -SUM_W'(sr[i]);
      c13 += ASM13[i] ? SUM_W'(sr[i]) : -SUM_W'(sr[i]);
    end
    a02    = (c02 < 0) ? -c02 : c02;
    a13    = (c13 < 0) ? -c13 : c13;
    detect = valid_d && (a02 > SUM_W'(THRESH) || a13 > SUM_W'(THRESH));
    se10   = a13 > a02;
    se11   = se10 ? (c13 < 0) : (c02 < 0);
    amax   = se10 ? a13 : a02;
    // while a frame is running a marker is only accepted where it is due or
    // when it is stronger than the one that started the frame
    accept = detect && (!target_found || fcnt == CNT_W_F'(FRAME_LEN - 1) || amax > peak);
  end

  function automatic logic invert_of(input logic [1:0] sel, input logic odd);
    logic inv;
    unique case (sel)
      2'd0: inv = 1'b0;
      2'd1: inv = 1'b1;
      2'd2: inv = odd;
      2'd3: inv = ~odd;
    endcase
    return inv;
  endfunction

  logic inv_now;
  assign inv_now = invert_of(phase_sel, pos_odd);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      for (int i = 0; i < 64; i++) sr[i] <= '0;
      for (int e = 0; e < 8; e++) begin
        bi_d[e]   <= '0;
        bi_out[e] <= '0;
      end
      pu_d         <= '0;
      hu_d         <= 1'b0;
      valid_d      <= 1'b0;
      pu_o         <= '0;
      hu_o         <= 1'b0;
      valid_out    <= 1'b0;
      target_found <= 1'b0;
      phase_sel    <= '0;
      fcnt         <= '0;
      pos_odd      <= 1'b0;
      peak         <= '0;
    end else if (ce) begin
      valid_d <= valid_in;
      if (valid_in) begin
        sr[0] <= pu_i;
        for (int i = 1; i < 64; i++) sr[i] <= sr[i-1];
        pu_d <= pu_i;
        hu_d <= hu_i;
        bi_d <= bi_in;
      end
      valid_out <= 1'b0;
      if (accept) begin
        // the input that completed the marker is marker position 63
        phase_sel    <= {se10, se11};
        peak         <= amax;
        target_found <= 1'b1;
        fcnt         <= '0;
        pos_odd      <= 1'b0;
      end else if (valid_d && target_found) begin
        pu_o      <= inv_now ? -pu_d : pu_d;
        hu_o      <= hu_d ^ inv_now;
        bi_out    <= bi_d;
        valid_out <= 1'b1;
        pos_odd   <= ~pos_odd;
        if (fcnt == CNT_W_F'(FRAME_LEN - 1)) target_found <= 1'b0;
        fcnt <= fcnt + 1'b1;
      end
    end
  end
endmodule
