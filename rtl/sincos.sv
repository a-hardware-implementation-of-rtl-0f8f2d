// sincos: sine and cosine of the carrier phase estimate.
//
// The angle is 13 bit two's complement with 1.0 = pi, so bits 12:11 give the
// quadrant and bits 10:0 the position inside it.  The quarter wave is split
// into 16 segments and approximated piecewise by first-order polynomials:
// one table holds the value at the start of each segment, round(256 sin(i pi/32)),
// and a second table holds its slope, the difference to the next start
// value.  The 7 low bits of the position interpolate inside a segment.  The
// other quadrants and the cosine follow from the symmetries of the two
// functions.  The document names a piecewise-polynomial sine/cosine with two
// coefficient tables but gives neither their order nor their size; first
// order and 16 segments are this design's choice (error below 2/256).
//
// Outputs: 10 bit signed, 8 fractional bits; registered, one clock latency.
module sincos
  import soqpsk_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     ce,
  input  logic signed [LF_W-1:0]   angle,
  output logic signed [TRIG_W-1:0] sin_out,
  output logic signed [TRIG_W-1:0] cos_out
);
  localparam logic [8:0] C0 [17] = '{9'd0, 9'd25, 9'd50, 9'd74, 9'd98, 9'd121, 9'd142,
                                     9'd162, 9'd181, 9'd198, 9'd213, 9'd226, 9'd237,
                                     9'd245, 9'd251, 9'd255, 9'd256};

  // sin over the first quadrant, x in 0..2048 (2048 = pi/2)
  function automatic logic [8:0] qsin(input logic [11:0] x);
    logic [3:0]  seg;
    logic [6:0]  frac;
    logic [8:0]  base, slope;
    logic [15:0] step;
    if (x[11]) return 9'd256;
    seg   = x[10:7];
    frac  = x[6:0];
    base  = C0[5'(seg)];
    slope = C0[5'(seg) + 5'd1] - C0[5'(seg)];
    step  = slope * frac;
    return base + 9'((step + 16'd64) >> 7);
  endfunction

  logic [1:0]  quad;
  logic [11:0] r, rc;
  logic [8:0]  a, b;
  logic signed [TRIG_W-1:0] s, c;

  always_comb begin
    quad = angle[12:11];
    r    = {1'b0, angle[10:0]};
    rc   = 12'd2048 - r;
    a    = qsin(r);
    b    = qsin(rc);
    unique case (quad)
      2'd0: begin s =  TRIG_W'(a); c =  TRIG_W'(b); end
      2'd1: begin s =  TRIG_W'(b);         c = -TRIG_W'(a); end
      2'd2: begin s = -TRIG_W'(a);         c = -TRIG_W'(b); end
      2'd3: begin s = -TRIG_W'(b);         c =  TRIG_W'(a); end
    endcase
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      sin_out <= '0;
      cos_out <= '0;
    end else if (ce) begin
      sin_out <= s;
      cos_out <= c;
    end
  end
endmodule
