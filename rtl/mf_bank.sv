// mf_bank: matched-filter bank for one sample stream (on-time, early or late).
//
// Produces, once per symbol, the three complex correlations Z(+1), Z(-1) and
// Z(0) of the 16 samples that start at the underflow strobe with the
// truncated SOQPSK-TG phase pulse.  The LUT control alternates two index
// counters, each driving its own multiply-and-accumulate system, so that a
// sample shared by two overlapping symbols counts in both; the output control
// picks the system that just finished, raises valid_out for one clock and
// toggles the trellis indicator ti_out.  Structure as in the document.
//
// Interface: 8-bit samples in on every clock, underflow marks the first
// sample of a symbol.  Outputs are 12-bit with 4 fractional bits.
// Timing: valid_out rises four clocks after the 16th sample of the symbol
// entered and lasts one clock; z and ti_out hold until the next symbol.
module mf_bank
  import soqpsk_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    ce,
  input  sample_t re_rx,
  input  sample_t im_rx,
  input  logic    underflow,
  output mf_set_t z,
  output logic    ti_out,
  output logic    valid_out
);
  logic [3:0] cntr1, cntr2, c1_d2, c2_d2;
  sample_t    re_d, im_d;
  mf_set_t    z1, z2;
  logic       out_sel;

  mf_lut_control u_ctl (.clk, .rst, .ce, .underflow, .cntr1, .cntr2);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      re_d <= '0;
      im_d <= '0;
    end else if (ce) begin
      re_d <= re_rx;
      im_d <= im_rx;
    end
  end

  mf_mac u_mac1 (.clk, .rst, .ce, .re_rx(re_d), .im_rx(im_d), .idx(cntr1), .idx_d2(c1_d2), .z(z1));
  mf_mac u_mac2 (.clk, .rst, .ce, .re_rx(re_d), .im_rx(im_d), .idx(cntr2), .idx_d2(c2_d2), .z(z2));

  mf_output_control u_out (.clk, .rst, .ce, .cntr1_delay2(c1_d2), .cntr2_delay2(c2_d2),
                           .out_sel, .valid_out, .ti_out);

  assign z = out_sel ? z2 : z1;
endmodule
