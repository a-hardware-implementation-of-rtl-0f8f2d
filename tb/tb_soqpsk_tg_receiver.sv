// tb_soqpsk_tg_receiver: end-to-end test of the receiver at its default sizes.
//
// A behavioural SOQPSK-TG transmitter in the testbench repeats one
// 6240-bit frame (64-bit sync marker + fixed pseudo-random payload), applies
// the standard precoder and the full-length (8T) TG phase pulse, puts the
// signal on the Fs/4 IF and quantises it to 8-bit ADC samples.  Four runs
// use carrier phase offsets of about 0, 90, 180 and 270 degrees, and a
// transmit symbol period 0.05% off 16 samples so that the timing loop has
// to insert and drop samples.  Each run must find the frame, resolve the
// phase ambiguity and deliver the frame's bits with the right signs.
//
// Mechanisms counted (each must occur): symbol strobes, a symbol of 15
// samples (shared sample in the MF bank), a symbol of 17 samples, metric
// renormalisation, frame detection, all four phase-ambiguity selections and
// non-zero carrier phase estimates.  Sign errors are counted from the
// second detected frame on; the first frame may still see the loops settle.
`timescale 1ns/1ps
module tb_soqpsk_tg_receiver;
  import soqpsk_pkg::*;

  localparam int    FRAME    = 6240;
  localparam logic [63:0] ASM_V = 64'h034776C7272895B0;
  localparam int    LEAD     = 400;        // bits before the first marker
  localparam int    NSYM     = LEAD + 4 * FRAME + 200;
  localparam real   PI       = 3.14159265358979;
  localparam int    QRES     = 64;         // phase pulse table points per T
  // The transmitter starts in state 00 with phase 0; the receiver's trellis
  // gives state 00 the phase state 3pi/2, so that is zero carrier offset.
  localparam real   PHI_REF  = 1.5 * PI;

  logic clk = 1'b0, rst = 1'b1, ce = 1'b1;
  sample_t adc_in;
  logic signed [REL_W-1:0] pu_o, core_pu;
  logic hu_o, valid, target_found, core_valid, core_hu, underflow, renorm;
  logic [1:0] phase_sel;
  logic [MU_W-1:0] mu;
  logic signed [LF_W-1:0] vco_out;
  bi_t bi [8];

  soqpsk_tg_receiver dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint rel_sum = 0; int rel_n = 0, rel_sat = 0;
  int n_uf = 0, n_short = 0, n_long = 0, n_renorm = 0, n_detect = 0, n_vco = 0;
  int n_sel [4] = '{0, 0, 0, 0};

  real qtab [0:8*QRES];
  logic frame_bits [FRAME];
  logic u [NSYM];
  int   alpha [NSYM];
  int   csum [NSYM+1];

  function automatic real ftg(real t);   // TG frequency pulse, t in T, centred
    real x, c, y, s, a, wv;
    x = 0.7 * 1.25 * t / 2.0;
    if ((1.0 - 4.0 * x * x) > -1e-9 && (1.0 - 4.0 * x * x) < 1e-9) c = PI / 4.0;
    else c = $cos(PI * x) / (1.0 - 4.0 * x * x);
    y = PI * 1.25 * t / 2.0;
    s = (y > -1e-12 && y < 1e-12) ? 1.0 : $sin(y) / y;
    a = (t < 0 ? -t : t) / 2.0;
    if (a < 1.5) wv = 1.0;
    else if (a <= 2.0) wv = 0.5 + 0.5 * $cos(PI / 0.5 * (a - 1.5));
    else wv = 0.0;
    return c * s * wv;
  endfunction

  function automatic real qf(real t);
    int i; real fr;
    if (t <= 0.0) return 0.0;
    if (t >= 8.0) return 0.5;
    i  = int'($floor(t * QRES));
    fr = t * QRES - i;
    return qtab[i] + fr * (qtab[i+1] - qtab[i]);
  endfunction

  task automatic build_tables();
    real acc;
    acc = 0.0;
    qtab[0] = 0.0;
    for (int i = 0; i < 8 * QRES; i++) begin
      acc += ftg(-4.0 + (i + 0.5) / QRES);
      qtab[i+1] = acc;
    end
    for (int i = 0; i <= 8 * QRES; i++) qtab[i] = 0.5 * qtab[i] / acc;
    for (int i = 0; i < 64; i++) frame_bits[i] = ASM_V[63 - i];
    for (int i = 64; i < FRAME; i++) frame_bits[i] = logic'($urandom_range(0, 1));
    for (int k = 0; k < NSYM; k++)
      u[k] = (k < LEAD) ? logic'($urandom_range(0, 1)) : frame_bits[(k - LEAD) % FRAME];
    csum[0] = 0;
    for (int k = 0; k < NSYM; k++) begin
      int um1, um2, sg;
      um1 = (k >= 1) ? int'(u[k-1]) : 0;
      um2 = (k >= 2) ? int'(u[k-2]) : 0;
      sg  = (k % 2 == 1) ? 1 : -1;      // (-1)^(k+1)
      alpha[k] = sg * (2 * um1 - 1) * (int'(u[k]) - um2);
      csum[k+1] = csum[k] + alpha[k];
    end
  endtask

  // CPM phase at time t (in symbols)
  function automatic real cpm_phase(real t);
    int k; real ph;
    k  = int'($floor(t));
    ph = 0.0;
    if (k - 8 >= 0) ph = PI / 2.0 * csum[k - 7];
    for (int i = k - 7; i <= k; i++)
      if (i >= 0 && i < NSYM) ph += PI * alpha[i] * qf(t - i);
    return ph;
  endfunction

  // watchdog
  initial begin
    #(64'd60_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int last_uf = 0, cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && underflow) begin
      n_uf++;
      if (n_uf > 50 && cyc - last_uf == 15) n_short++;
      if (n_uf > 50 && cyc - last_uf == 17) n_long++;
      last_uf = cyc;
    end
    if (!rst && renorm) n_renorm++;
    if (!rst && core_valid) begin rel_sum += (core_pu < 0 ? -core_pu : core_pu); rel_n++; if (core_pu == 127 || core_pu == -127) rel_sat++; end
    if (!rst && vco_out != 0) n_vco++;
  end

  task automatic run(input real phi0, input real sps, input real t0, input int expect_sel);
    int errs_at = 0;
    int pos, errs, outs, dets, n, zeros;
    real t, ph, x;
    logic was_found;
    rst = 1'b1;
    repeat (4) @(posedge clk);
    #1 rst = 1'b0;
    pos = 0; errs = 0; outs = 0; dets = 0; n = 0; zeros = 0;
    was_found = 1'b0;
    while (1) begin
      t  = t0 + n / sps;
      if (t >= NSYM - 10) break;
      ph = cpm_phase(t) + phi0 + PHI_REF;
      // ADC sample of A cos(2 pi n/4 ... ) chosen so that the downconverter's
      // sign pattern recovers A/2 exp(j ph)
      x  = 4.0 * $cos(ph - PI / 2.0 * (n % 4));
      adc_in = sample_t'($rtoi(x * 16.0 + (x >= 0 ? 0.5 : -0.5)));
      @(posedge clk);
      #1;
      n++;
      if (valid) begin
        outs++;
        if (pu_o == 0) zeros++;
        else if ((pu_o > 0) != frame_bits[pos]) errs++;
        if (dets < 2) errs = 0;   // the first frame may still see settling loops
        pos = (pos + 1) % FRAME;
      end
      if (dut.u_demod.u_sdc.accept && ce) begin
        if (dets > 0) $display("  frame done: %0d sign errors", errs - errs_at);
        errs_at = errs;
        pos = 64;
      end
      if (target_found && !was_found) begin
        dets++;
        n_sel[phase_sel]++;
        $display("  detection at sample %0d, phase_sel=%0d", n, phase_sel);
      end
      if (target_found && was_found && dut.u_demod.u_sdc.accept) begin
        dets++;
      end
      was_found = target_found;
    end
    $display("run phi0=%0.2f sps=%0.4f: detections=%0d outputs=%0d sign errors=%0d zero=%0d sel=%0d",
             phi0, sps, dets, outs, errs, zeros, phase_sel);
    n_detect += dets;
    checks++; if (dets < 1) begin failures++; $display("FAIL: no frame detected"); end
    checks++; if (outs < FRAME) begin failures++; $display("FAIL: too few outputs"); end
    checks++; if (errs != 0) begin failures++; $display("FAIL: %0d sign errors", errs); end
    checks++;
    if (expect_sel < 2 ? (phase_sel != 2'(expect_sel)) : (phase_sel < 2)) begin
      failures++; $display("FAIL: phase_sel %0d expected %0s", phase_sel, expect_sel < 2 ? (expect_sel ? "1" : "0") : "2 or 3");
    end
  endtask

  initial begin
    build_tables();
    run(0.35,            16.0 * 1.0005, 0.0, 0);
    run(PI / 2.0 + 0.35, 16.0 * 0.9995, 0.0, 2);
    run(PI + 0.35,       16.0 * 1.0005, 0.0, 1);
    run(1.5 * PI + 0.35, 16.0 * 0.9995, 0.0, 2);
    // exact symbol rate, 90 degrees
    run(PI / 2.0 + 0.35, 16.0, 0.0, 2);
    $display("mean |reliability| %0d, saturated %0d of %0d", rel_sum / rel_n, rel_sat, rel_n);
    $display("mechanisms: strobes=%0d short=%0d long=%0d renorm=%0d detect=%0d vco_nonzero=%0d sel=%0d/%0d/%0d/%0d",
             n_uf, n_short, n_long, n_renorm, n_detect, n_vco, n_sel[0], n_sel[1], n_sel[2], n_sel[3]);
    checks++; if (n_uf == 0) failures++;
    checks++; if (n_short == 0) failures++;
    checks++; if (n_long == 0) failures++;
    checks++; if (n_renorm == 0) failures++;
    checks++; if (n_detect == 0) failures++;
    checks++; if (n_vco == 0) failures++;
    for (int s = 0; s < 4; s++) begin checks++; if (n_sel[s] == 0) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
