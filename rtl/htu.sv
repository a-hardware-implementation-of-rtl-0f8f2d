// htu: hard-decision traceback unit (register exchange, window 16).
//
// Each state keeps a 15-bit path-decision vector, bit 14 the newest decision
// and bit 0 the oldest.  On every step the vector of the winning predecessor
// (chosen by w and the trellis indicator) is extended with the decision bit of
// the winning branch; the oldest bit falls out as u_hat, and the other 15
// bits become the state's new vector, so u_hat is the decision made 15 steps
// earlier on the path that ends in that state.  The input bit of the branches
// entering states 00 and 11 is always 0 and 1; for states 01 and 10 it depends
// on the trellis indicator.
// u_xor(s) is the bitwise XOR of the two vectors that merge in state s at
// this step; the reliability unit needs it in the same clock, so it is
// combinational here (the document registers it; with one step every 16
// clocks either works, and this keeps the two units in lockstep).
//
// Timing: u_vector and u_hat update one clock after valid_in.
module htu
  import soqpsk_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              ce,
  input  logic [3:0]        w,
  input  logic              ti_in,
  input  logic              valid_in,
  output logic [3:0]        u_hat,
  output logic [WIN-2:0]    u_xor [4],
  output logic              ti_out,
  output logic              valid_out
);
  logic [WIN-2:0] u_vec [4];
  logic [WIN-1:0] upd [4];

  always_comb begin
    for (int s = 0; s < 4; s++) begin
      logic [2:0] c1, c2, win;
      c1       = cand_of(2'(s), ti_in, 1'b0);
      c2       = cand_of(2'(s), ti_in, 1'b1);
      win      = w[s] ? c2 : c1;
      upd[s]   = {win[0], u_vec[win[2:1]]};
      u_xor[s] = u_vec[c1[2:1]] ^ u_vec[c2[2:1]];
    end
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      for (int s = 0; s < 4; s++) u_vec[s] <= '0;
      u_hat     <= '0;
      ti_out    <= 1'b0;
      valid_out <= 1'b0;
    end else if (ce) begin
      valid_out <= valid_in;
      if (valid_in) begin
        for (int s = 0; s < 4; s++) begin
          u_vec[s] <= upd[s][WIN-1:1];
          u_hat[s] <= upd[s][0];
        end
        ti_out <= ti_in;
      end
    end
  end
endmodule
