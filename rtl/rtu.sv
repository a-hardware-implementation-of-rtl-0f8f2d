// rtu: reliability traceback unit (register exchange, window 16).
//
// Each state keeps 15 reliabilities (8 bit, 0..127) that belong to the
// decisions of its path-decision vector, entry 14 the newest.  On every step
// the array of the winning predecessor w is updated against the array of the
// losing one with the step's Delta d(s):
//   decisions differ (u_xor = 1):  L_j = min(d, L_j(winner))
//   decisions agree  (u_xor = 0):  L_j = min(d + L_j(loser), L_j(winner))
// d itself becomes the newest entry.  The oldest updated entry leaves as
// L_hat; the rest is stored.  This is the document's reliability update; the
// same predecessor choice is used as in the hard-decision unit.
//
// Timing: one clock after valid_in, in step with the hard-decision unit.
module rtu
  import soqpsk_pkg::*;
(
  input  logic           clk,
  input  logic           rst,
  input  logic           ce,
  input  logic [3:0]     w,
  input  rel_t           d [4],
  input  logic [WIN-2:0] u_xor [4],
  input  logic           ti_in,
  input  logic           valid_in,
  output rel_t           l_hat [4],
  output logic           valid_out
);
  rel_t l_arr [4][WIN-1];
  rel_t upd   [4][WIN-1];

  always_comb begin
    for (int s = 0; s < 4; s++) begin
      logic [2:0] cw, cl;
      logic [1:0] pw, pl;
      cw = cand_of(2'(s), ti_in, w[s]);
      cl = cand_of(2'(s), ti_in, ~w[s]);
      pw = cw[2:1];
      pl = cl[2:1];
      for (int j = 0; j < WIN - 1; j++) begin
        logic [REL_W:0] alt;
        alt = u_xor[s][j] ? (REL_W+1)'(d[s]) : (REL_W+1)'(d[s]) + (REL_W+1)'(l_arr[pl][j]);
        upd[s][j] = (alt < (REL_W+1)'(l_arr[pw][j])) ? rel_t'(alt) : l_arr[pw][j];
      end
    end
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      for (int s = 0; s < 4; s++) begin
        for (int j = 0; j < WIN - 1; j++) l_arr[s][j] <= '0;
        l_hat[s] <= '0;
      end
      valid_out <= 1'b0;
    end else if (ce) begin
      valid_out <= valid_in;
      if (valid_in) begin
        for (int s = 0; s < 4; s++) begin
          for (int j = 0; j < WIN - 2; j++) l_arr[s][j] <= upd[s][j + 1];
          l_arr[s][WIN-2] <= d[s];
          l_hat[s] <= upd[s][0];
        end
      end
    end
  end
endmodule
