// SOVA test harness: drives the sova with the noiseless stimulus, one step
// every 16 clocks with alternating TI, and records its outputs.
// Per step k: amp[k] (on-time amplitude), phi (rad), ge, gl (early/late gain).
import soqpsk_pkg::*;
mf_set_t z_ontime, z_early, z_late;
logic ti_in, valid_in, hu_o, valid, t_e_valid, p_e_valid, renorm;
logic signed [REL_W-1:0] pu_o;
bi_t bi [8];
err_t t_e, p_e;
sova dut (.*);

localparam int NSTEP = 3000;
int  u [NSTEP];
real amp [NSTEP];
real phi = 0.0, ge = 1.0, gl = 1.0;
int  out_hu [$], out_pu [$], out_bi0 [$], te_q [$], pe_q [$];
int  exp_bi0 [NSTEP];

always @(posedge clk) if (!rst) begin
  if (valid) begin out_hu.push_back(hu_o); out_pu.push_back(pu_o); out_bi0.push_back(bi[0]); end
  if (t_e_valid) te_q.push_back(t_e);
  if (p_e_valid) pe_q.push_back(p_e);
end

task automatic run_sova();
  int um1, um2, a, s; real th;
  z_ontime = '0; z_early = '0; z_late = '0; ti_in = 1'b0; valid_in = 1'b0;
  out_hu.delete(); out_pu.delete(); out_bi0.delete(); te_q.delete(); pe_q.delete();
  reset_dut();
  for (int k = 0; k < NSTEP; k++) begin
    um1 = (k >= 1) ? u[k-1] : 0;
    um2 = (k >= 2) ? u[k-2] : 0;
    a  = st_alpha(k, um2, um1, u[k]);
    s  = st_state(k, um2, um1);
    th = st_theta(s);
    z_ontime = st_z(a, amp[k], th + phi);
    z_early  = st_z(a, amp[k] * ge, th + phi);
    z_late   = st_z(a, amp[k] * gl, th + phi);
    // BI_1 = -Im Z(0) in both sections (branch increment table)
    exp_bi0[k] = -int'(z_ontime.im_0);
    ti_in = logic'(k % 2);
    valid_in = 1'b1;
    @(negedge clk) valid_in = 1'b0;
    repeat (15) @(negedge clk);
  end
  repeat (40) @(negedge clk);
endtask

// the output stream delayed by D steps against u; returns mismatches
function automatic int hu_errors(int d, int from);
  int e;
  e = 0;
  for (int j = from; j < out_hu.size(); j++)
    if (j - d >= 0 && out_hu[j] != u[j - d]) e++;
  return e;
endfunction
