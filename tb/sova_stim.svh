// Noiseless SOVA stimulus.  For a random bit sequence u, the on-time MF
// output of the transmitted symbol alpha_k is A exp(j(theta_k + phi)) and the
// other two hypotheses are 0, where theta_k is the phase state of the
// trellis state the step starts in (standard precoder, Fig. 2.4 mapping).
// The early and late outputs are the on-time value scaled by ge/gl.
// Section k is even (TI = 0) for even k.
function automatic int st_alpha(int k, int um2, int um1, int uk);
  int sg;
  sg = (k % 2 == 1) ? 1 : -1;
  return sg * (2 * um1 - 1) * (uk - um2);
endfunction

// trellis state of step k (before u_k): even k -> (u_{k-2}, u_{k-1}),
// odd k -> (u_{k-1}, u_{k-2}); first listed bit is the state's MSB
function automatic int st_state(int k, int um2, int um1);
  return (k % 2 == 0) ? um2 * 2 + um1 : um1 * 2 + um2;
endfunction

function automatic real st_theta(int s);
  case (s)
    0: return 1.5 * 3.14159265358979;
    1: return 3.14159265358979;
    2: return 0.0;
    default: return 0.5 * 3.14159265358979;
  endcase
endfunction

function automatic soqpsk_pkg::mf_set_t st_z(int a, real amp, real ang);
  soqpsk_pkg::mf_set_t z;
  int re, im;
  z = '0;
  re = $rtoi(amp * $cos(ang));
  im = $rtoi(amp * $sin(ang));
  case (a)
    1:       begin z.re_p1 = soqpsk_pkg::mf_t'(re); z.im_p1 = soqpsk_pkg::mf_t'(im); end
    -1:      begin z.re_m1 = soqpsk_pkg::mf_t'(re); z.im_m1 = soqpsk_pkg::mf_t'(im); end
    default: begin z.re_0  = soqpsk_pkg::mf_t'(re); z.im_0  = soqpsk_pkg::mf_t'(im); end
  endcase
  return z;
endfunction
