// mf_lut_control: coefficient index counters of the matched-filter bank.
//
// Each underflow strobe (a symbol boundary) starts one of two 4-bit
// counters, alternately: a toggle register remembers which one is next, and
// the first strobe after reset starts counter 2.  A started counter shows 0
// on the strobe's own sample and then counts 1, 2, ... 15 on the following
// clocks, wraps to 0 and stays there until it is started again.  Because the
// counters alternate, two symbols whose sample windows overlap by one sample
// (the timing loop shortened a symbol to 15 samples) are both served: the
// shared sample is index 15 of one counter and index 0 of the other.
// Structure as in the document; the counters' exact start convention is
// this design's.
//
// Timing: cntr1/cntr2 are registered, one clock after the sample they index.
module mf_lut_control (
  input  logic       clk,
  input  logic       rst,
  input  logic       ce,
  input  logic       underflow,
  output logic [3:0] cntr1,
  output logic [3:0] cntr2
);
  logic       sel;         // 1: the next strobe starts counter 1
  logic [3:0] c1, c2;
  logic       trig1, trig2;

  always_comb begin
    trig1 = underflow &  sel;
    trig2 = underflow & ~sel;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      sel   <= 1'b0;
      c1    <= '0;
      c2    <= '0;
      cntr1 <= '0;
      cntr2 <= '0;
    end else if (ce) begin
      if (underflow) sel <= ~sel;
      c1    <= (trig1 || c1 != 4'd0) ? c1 + 4'd1 : 4'd0;
      c2    <= (trig2 || c2 != 4'd0) ? c2 + 4'd1 : 4'd0;
      cntr1 <= c1;
      cntr2 <= c2;
    end
  end
endmodule
