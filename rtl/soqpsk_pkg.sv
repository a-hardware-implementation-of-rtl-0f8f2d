// soqpsk_pkg: widths, constants and trellis helpers shared by the SOQPSK-TG
// demodulator.
//
// The demodulator detects SOQPSK-TG with a four-state time-varying trellis
// (pulse-truncation detector).  Each of its eight branches e = 0..7 leaves
// starting state SS(e) = e>>1 and carries input bit BD(e) = e&1.  The ending
// state and the ternary symbol of a branch depend on whether the trellis
// section is even (TI = 0) or odd (TI = 1).  The symbol follows the standard
// precoder alpha_k = (-1)^(k+1) (2u_{k-1}-1)(u_k-u_{k-2}); the state pair is
// (u_{k-2},u_{k-1}) in even sections and (u_{k-1},u_{k-2}) in odd ones.  Each
// state owns a CPM phase state theta (00:3pi/2, 01:pi, 10:0, 11:pi/2), so the
// rotation by exp(-j theta) is only a swap and sign change of Re/Im.
//
// Fixed-point formats (this design's choices unless noted):
//   samples      8 bit signed, 4 fractional bits (given for the inputs)
//   mu           9 bit unsigned, 1 integer + 8 fractional bits (bits 8:0 of
//                the counter scaled by 16)
//   counter      14 bit signed, 1 integer + 12 fractional bits (1.0 = T)
//   VCO angle    13 bit signed, 12 fractional bits, 1.0 = pi rad
//   sin/cos, MF coefficients  10 bit signed, 8 fractional bits
//   MF outputs   12 bit signed, 4 fractional bits (sum over 16 samples)
//   metrics      18 bit unsigned with the bit-16 renormalisation
//   reliability  8 bit (magnitude saturated to 127, antipodal on output)
package soqpsk_pkg;

  localparam int SAMPLE_W   = 8;
  localparam int MU_W       = 9;
  localparam int CNT_W      = 14;
  localparam int ERR_W      = 8;    // T_e, P_e
  localparam int K_W        = 15;   // loop constants
  localparam int LF_W       = 13;   // loop filter outputs and VCO
  localparam int LF_SHIFT   = 12;   // product scaling of the loop filters
  localparam int TRIG_W     = 10;
  localparam int COEF_W     = 10;
  localparam int MF_W       = 12;
  localparam int BI_W       = 12;
  localparam int CM_W       = 18;
  localparam int REL_W      = 8;
  localparam int SPS        = 16;   // samples per symbol N
  localparam int WIN        = 16;   // SOVA decoding window
  localparam int REL_SHIFT  = 5;    // metric difference -> reliability
  localparam int REL_MAX    = 127;

  // Loop constants: +-0.0026/pi scaled by 2^22 (error signals carry two
  // fractional bits, the loop outputs twelve).
  localparam logic signed [K_W-1:0] TK1_DEFAULT = -15'sd3471;
  localparam logic signed [K_W-1:0] PK1_DEFAULT =  15'sd3471;

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic signed [MF_W-1:0]     mf_t;
  typedef logic signed [BI_W-1:0]     bi_t;
  typedef logic signed [ERR_W-1:0]    err_t;
  typedef logic [CM_W-1:0]            cm_t;
  typedef logic [REL_W-1:0]           rel_t;   // unsigned reliability 0..127

  // Three complex matched-filter outputs for alpha = +1, -1 and 0.
  typedef struct packed {
    mf_t re_p1; mf_t im_p1;
    mf_t re_m1; mf_t im_m1;
    mf_t re_0;  mf_t im_0;
  } mf_set_t;

  // ---------------------------------------------------------------- trellis
  function automatic logic [1:0] es_of(input logic [2:0] e, input logic ti);
    return ti ? {e[2], e[0]} : {e[0], e[1]};
  endfunction

  // Symbol of branch e: +1 -> 2'b01, -1 -> 2'b11, 0 -> 2'b00.
  function automatic logic signed [1:0] alpha_of(input logic [2:0] e, input logic ti);
    logic um1, um2, u;
    int a;
    u = e[0];
    if (ti) begin um1 = e[2]; um2 = e[1]; end
    else    begin um2 = e[2]; um1 = e[1]; end
    a = (um1 ? 1 : -1) * (int'(u) - int'(um2));
    if (!ti) a = -a;
    return 2'(a);
  endfunction

  // Phase state of a trellis state in multiples of pi/2.
  function automatic logic [1:0] theta_of(input logic [1:0] s);
    case (s)
      2'b00:   return 2'd3;
      2'b01:   return 2'd2;
      2'b10:   return 2'd0;
      default: return 2'd1;
    endcase
  endfunction

  // Branch entering state s as candidate 1 (from the upper state) or 2.
  function automatic logic [2:0] cand_of(input logic [1:0] s, input logic ti, input logic second);
    logic [2:0] first_e, e;
    first_e = 3'd0;
    for (int k = 7; k >= 0; k--)
      if (es_of(3'(k), ti) == s) first_e = 3'(k);
    e = first_e;
    if (second)
      for (int k = 0; k < 8; k++)
        if (es_of(3'(k), ti) == s && 3'(k) != first_e) e = 3'(k);
    return e;
  endfunction

  // Matched-filter output of the symbol hypothesis of branch e.
  function automatic void mf_pick(input mf_set_t z, input logic signed [1:0] a,
                                  output mf_t re, output mf_t im);
    case (a)
      2'sd1:   begin re = z.re_p1; im = z.im_p1; end
      -2'sd1:  begin re = z.re_m1; im = z.im_m1; end
      default: begin re = z.re_0;  im = z.im_0;  end
    endcase
  endfunction

  // Re{(re + j im) exp(-j q pi/2)} and Im{...}
  function automatic logic signed [MF_W:0] rot_re(input logic signed [MF_W:0] re,
                                                  input logic signed [MF_W:0] im,
                                                  input logic [1:0] q);
    case (q)
      2'd0:    return re;
      2'd1:    return im;
      2'd2:    return -re;
      default: return -im;
    endcase
  endfunction

  function automatic logic signed [MF_W:0] rot_im(input logic signed [MF_W:0] re,
                                                  input logic signed [MF_W:0] im,
                                                  input logic [1:0] q);
    case (q)
      2'd0:    return im;
      2'd1:    return -re;
      2'd2:    return -im;
      default: return re;
    endcase
  endfunction

  // Saturate a wide signed value to w bits (w <= 32).
  function automatic logic signed [31:0] sat(input logic signed [39:0] v, input int w);
    logic signed [39:0] hi, lo;
    hi = (40'sd1 <<< (w - 1)) - 40'sd1;
    lo = -(40'sd1 <<< (w - 1));
    if (v > hi) return hi[31:0];
    if (v < lo) return lo[31:0];
    return v[31:0];
  endfunction

endpackage
