// mod1_counter: modulo-1 decrementing counter for interpolation control.
//
// The counter eta (14 bit signed, 1 integer and 12 fractional bits) drops by
// 1/16 on every clock, and additionally by the loop filter output v on the
// clock where valid_in is 1: eta(n+1) = (eta(n) - 1/16 - v) mod 1.  The two
// subtractions run in parallel so that an output exists on every clock.
// The register keeps the raw difference; the modulo-1 step is applied on
// the way out of the register: when the integer bit (bit 12) is set the
// value is negative (or >= 1) and is replaced by "00" & bits 11:0, which is
// the value plus or minus one.  underflow is the sign bit of the register,
// so it is 1 for the clock after the counter went negative: a new symbol
// boundary, on average every 16 clocks.
//
// mu = 16 * eta(m(k)) is bits 8:0 of the counter value just before it went
// negative (1 integer and 8 fractional bits).  Here it is captured on the
// clock where the next value is negative, so mu changes together with the
// underflow strobe; the figure of the original design names valid_in as the
// select of this register, which would not capture the value before the
// underflow, so this is this design's reading.
//
// Reset clears the counter; the first underflow follows one clock later.
module mod1_counter
  import soqpsk_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   ce,
  input  logic signed [LF_W-1:0] tlf_in,
  input  logic                   valid_in,
  output logic                   underflow,
  output logic [MU_W-1:0]        mu
);
  localparam logic signed [CNT_W-1:0] STEP = CNT_W'(1 << (CNT_W - 2 - 4)); // 1/16

  logic signed [CNT_W-1:0] cnt, modval, dec, dec_v, nxt;

  always_comb begin
    modval = cnt[CNT_W-2] ? {2'b00, cnt[CNT_W-3:0]} : cnt;
    dec    = modval - STEP;
    dec_v  = dec - CNT_W'(tlf_in);
    nxt    = valid_in ? dec_v : dec;
  end

  assign underflow = cnt[CNT_W-1];

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      cnt <= '0;
      mu  <= '0;
    end else if (ce) begin
      cnt <= nxt;
      if (nxt[CNT_W-1]) mu <= modval[MU_W-1:0];
    end
  end
endmodule
