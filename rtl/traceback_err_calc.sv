// traceback_err_calc: error calculator shared by the timing and the phase
// error detector (decision delay D = 1).
//
// br(e) is the error estimate of branch e for the current symbol.  First
// traceback: for each ending state the estimate of the winning branch is
// stored (nn).  Second traceback, on the next symbol: each state takes the
// stored estimate of the predecessor that the new winning branch leaves
// from, and the state gmax selects the error that is sent out.  So the output
// is the error of the previous symbol on the survivor path of the currently
// best state.  The candidate selections are those of the document's
// traceback tables.
//
// Timing: registered, one clock after valid_in.  The first output after
// reset carries the reset value 0 of the stored estimates.
module traceback_err_calc
  import soqpsk_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       ce,
  input  err_t       br [8],
  input  logic [3:0] w,
  input  logic       ti_in,
  input  logic [1:0] gmax,
  input  logic       valid_in,
  output err_t       err_out,
  output logic       valid_out
);
  err_t nn [4];
  err_t n  [4];
  err_t nn_c [4];

  always_comb begin
    for (int s = 0; s < 4; s++) begin
      logic [2:0] e;
      e       = cand_of(2'(s), ti_in, w[s]);
      n[s]    = nn[e[2:1]];
      nn_c[s] = br[e];
    end
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      for (int s = 0; s < 4; s++) nn[s] <= '0;
      err_out   <= '0;
      valid_out <= 1'b0;
    end else if (ce) begin
      valid_out <= valid_in;
      if (valid_in) begin
        for (int s = 0; s < 4; s++) nn[s] <= nn_c[s];
        err_out <= n[gmax];
      end
    end
  end
endmodule
