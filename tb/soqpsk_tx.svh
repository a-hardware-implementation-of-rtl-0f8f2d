// Behavioural SOQPSK-TG transmitter for testbenches: bits tx_u[0..], the
// standard precoder and the 8T TG phase pulse (tg_pulse.svh).  tx_phase(t)
// is the CPM phase at time t (in symbols).  The transmitter starts in trellis
// state 00 with phase 0, which the receiver's trellis labels 3pi/2, so
// TX_PHI_REF is added for "no carrier offset".
localparam real TX_PHI_REF = 1.5 * 3.14159265358979;
int tx_alpha [];
int tx_csum [];

task automatic tx_build(input logic bits []);
  int n, um1, um2, sg;
  n = bits.size();
  tx_alpha = new[n];
  tx_csum  = new[n + 1];
  tx_csum[0] = 0;
  for (int k = 0; k < n; k++) begin
    um1 = (k >= 1) ? int'(bits[k-1]) : 0;
    um2 = (k >= 2) ? int'(bits[k-2]) : 0;
    sg  = (k % 2 == 1) ? 1 : -1;
    tx_alpha[k]  = sg * (2 * um1 - 1) * (int'(bits[k]) - um2);
    tx_csum[k+1] = tx_csum[k] + tx_alpha[k];
  end
endtask

function automatic real tx_phase(real t);
  int k; real ph;
  k  = int'($floor(t));
  ph = 0.0;
  if (k - 8 >= 0) ph = 3.14159265358979 / 2.0 * tx_csum[k - 7];
  for (int i = k - 7; i <= k; i++)
    if (i >= 0 && i < tx_alpha.size()) ph += 3.14159265358979 * tx_alpha[i] * tg_q(t - i);
  return ph;
endfunction
