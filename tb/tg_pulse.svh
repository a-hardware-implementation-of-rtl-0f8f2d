// SOQPSK-TG phase pulse for testbench references: the TG frequency pulse
// (rho = 0.7, B = 1.25, T1 = 1.5, T2 = 0.5, length 8T) integrated
// numerically and scaled to area 1/2.  tg_q(t) takes t in symbols, 0..8.
real tg_qtab [0:512];

function automatic real tg_f(real t);
  real x, c, y, s, a, wv, pi_;
  pi_ = 3.14159265358979;
  x = 0.7 * 1.25 * t / 2.0;
  if ((1.0 - 4.0 * x * x) > -1e-9 && (1.0 - 4.0 * x * x) < 1e-9) c = pi_ / 4.0;
  else c = $cos(pi_ * x) / (1.0 - 4.0 * x * x);
  y = pi_ * 1.25 * t / 2.0;
  s = (y > -1e-12 && y < 1e-12) ? 1.0 : $sin(y) / y;
  a = (t < 0 ? -t : t) / 2.0;
  if (a < 1.5) wv = 1.0;
  else if (a <= 2.0) wv = 0.5 + 0.5 * $cos(pi_ / 0.5 * (a - 1.5));
  else wv = 0.0;
  return c * s * wv;
endfunction

task automatic tg_build();
  real acc;
  acc = 0.0;
  tg_qtab[0] = 0.0;
  for (int i = 0; i < 512; i++) begin
    acc += tg_f(-4.0 + (i + 0.5) / 64.0);
    tg_qtab[i+1] = acc;
  end
  for (int i = 0; i <= 512; i++) tg_qtab[i] = 0.5 * tg_qtab[i] / acc;
endtask

function automatic real tg_q(real t);
  int i; real fr;
  if (t <= 0.0) return 0.0;
  if (t >= 8.0) return 0.5;
  i  = int'($floor(t * 64.0));
  fr = t * 64.0 - i;
  return tg_qtab[i] + fr * (tg_qtab[i+1] - tg_qtab[i]);
endfunction

// truncated pulse sampled at i/16 of a symbol: q_PT(t) = q_TG(t + 3.5T)
function automatic real tg_qpt(int i);
  return tg_q(3.5 + i / 16.0);
endfunction
