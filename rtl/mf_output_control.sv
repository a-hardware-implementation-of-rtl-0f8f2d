// mf_output_control: output selection of the matched-filter bank.
//
// A symbol is complete when either counter, delayed by two clocks to line up
// with the accumulators, shows 15.  valid_out is registered from that
// condition, out_sel is registered as 0 when counter 1 finished (take
// accumulator system 1) and 1 otherwise, and the trellis indicator ti_out
// toggles with every completed symbol, so consecutive MF outputs alternate
// between the even and the odd trellis section.  As in the document's output
// control; the first symbol after reset carries TI = 1.
//
// Timing: valid_out, out_sel and ti_out change on the clock edge where the
// accumulators take their last sample.
module mf_output_control (
  input  logic       clk,
  input  logic       rst,
  input  logic       ce,
  input  logic [3:0] cntr1_delay2,
  input  logic [3:0] cntr2_delay2,
  output logic       out_sel,
  output logic       valid_out,
  output logic       ti_out
);
  logic done1, done2;
  always_comb begin
    done1 = (cntr1_delay2 == 4'hF);
    done2 = (cntr2_delay2 == 4'hF);
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      out_sel   <= 1'b0;
      valid_out <= 1'b0;
      ti_out    <= 1'b0;
    end else if (ce) begin
      out_sel   <= ~done1;
      valid_out <= done1 | done2;
      if (done1 | done2) ti_out <= ~ti_out;
    end
  end
endmodule
