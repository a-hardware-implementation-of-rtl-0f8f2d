# SOQPSK-TG coherent demodulator

SOQPSK-TG is the shaped-offset QPSK variant used in aeronautical telemetry. It is a
continuous-phase modulation with a long (8-symbol) frequency pulse, so an optimal detector
would need a 512-state trellis. This design uses the *pulse-truncation* approximation instead:
the received signal is correlated against a 2-symbol truncated phase pulse, and the bits are
detected on a four-state, time-varying trellis with a soft-output Viterbi algorithm (SOVA).
The loss against the optimum is about 0.2 dB. The SOVA does two more jobs. It delivers soft
outputs (sign plus 7-bit reliability) for an outer FEC decoder. Its best survivor also drives
decision-directed symbol-timing and carrier-phase loops.

The signal path is:

```
ADC (8 bit, Fs/4 IF) -> I/Q downconverter -> interpolator -> phase corrector
   -> 3 matched-filter banks (early / on-time / late) -> SOVA -> soft-decision correlator
                ^                           ^                 |  TED     |  PED
                |  mu, strobe               |  angle          v          v
        timing estimator  <---------------- + ------  loop filters <-----+
        (mod-1 counter)                   VCO (phase estimator)
```

All of it is synthesizable SystemVerilog with parameters in `rtl/soqpsk_pkg.sv`. It takes one
sample per clock enable at 16 samples per symbol; the reference system uses Fs = 93 1/3 MHz,
which gives 5.83 Mbit/s.

## Top level and interfaces

`soqpsk_tg_receiver` (top) = `iq_downconverter` + `soqpsk_tg_demod`.
`soqpsk_tg_demod` = `demod_core` + `soft_decision_correlator`.

| Port | Meaning |
|---|---|
| `clk`, `rst` (asynchronous, active high), `ce` | one ADC sample per `ce` |
| `adc_in` | 8-bit signed, 4 fractional bits |
| `pu_o`, `hu_o`, `valid` | frame-aligned, ambiguity-corrected soft output (signed 8 bit, ±127) and hard bit |
| `bi[8]` | the eight branch increments of the symbol, for soft-input decoders |
| `target_found`, `phase_sel` | a frame is running; chosen correction (0: none, 1: invert all, 2: invert odd, 3: invert even) |
| `core_valid`, `core_pu`, `core_hu` | raw SOVA output before correlation |
| `underflow`, `mu`, `vco_out`, `renorm` | loop state, for observation |

Latency from a symbol to its soft output is the SOVA window (15 symbols) plus a few clocks.

## Front end: Fs/4 downconversion and interpolation

The IF is subsampled so that it aliases to exactly Fs/4. Mixing with cos/sin at Fs/4 then only
needs the sequences 1,0,−1,0 and 0,−1,0,1, so `iq_downconverter` is a 4-phase counter and a
negation. No low-pass filter follows; the matched filters remove the 2·Fs/4 image.

Timing is corrected by resampling, not by moving the ADC clock. `interpolator` forms
`x[n-1] + mu·(x[n]-x[n-1])` (linear) on every clock. Its outputs are a *late* stream and the
same value delayed by one sample (*on-time*) and by two (*early*). So the early and late
streams are ±1 sample (±T/16) around the on-time point. `mu` is loaded only on the symbol strobe.

## Timing loop

`mod1_counter` is a 14-bit counter (1 sign bit, 1 integer bit, 12 fractional bits, 1.0 = one
symbol). It counts down by 1/16 plus the loop-filter output on each sample. Each wrap through
zero is an *underflow*: the start of a new symbol. At that point the counter's low bits give the
fractional interpolation instant `mu` (9 bits, 8 fractional).

`loop_filter` is proportional only: `out = K·e >> 12`, registered on the error's valid strobe.
The timing constant is TK1 = −0.0026/π, stored as −3471 (2^22 scaling, because the error has
two fractional bits and the output twelve). `timing_estimator` = loop filter + counter.

Measured pull range: a ±0.05 % symbol-rate offset is tracked without slips. At ±0.15 % the
first-order loop slips about two symbols every ~1700 symbols. A PI loop filter would be needed
for larger clock offsets; the parameters allow a different constant but not a second path.

## Phase loop

`phase_estimator` = the same `loop_filter` (PK1 = +0.0026/π → 3471) + `vco`. The VCO is a
13-bit phase accumulator with 12 fractional bits, where 1.0 = π rad, so it wraps naturally
at ±π. `phase_corrector` rotates all three sample streams by −angle. It uses `sincos`, a
quarter-wave table of 10-bit sin/cos with 8 fractional bits, and `complex_multiplier`
(4 multipliers, rounding, saturation to 8 bits). The angle is loaded once per symbol, so one
symbol of samples shares one rotation.

## Matched-filter bank

`mf_bank` is instantiated three times (early, on-time, late). For each symbol it correlates
the 16 samples that follow the strobe with the three truncated-pulse hypotheses α = +1, −1 and 0:

```
Z(α) = Σ_i x[i] · exp(−j·π·α·q_PT(iT/16))
```

The α = −1 and α = +1 coefficients are complex conjugates. So `mf_mac` forms four real products
per sample and combines them into both filters; α = 0 is a plain sum. The coefficient tables
(`Re`: 242 … 95, `Im`: 83 … 238, 8 fractional bits) come from the TG phase pulse (ρ = 0.7,
B = 1.25, T1 = 1.5, T2 = 0.5) truncated to the two centre symbols.

A symbol strobe can arrive while the previous symbol is still being summed: strobes drift by
one sample when the timing loop corrects. To handle this, `mf_lut_control` runs two index
counters and gives strobes to them in turn. Each counter feeds its own MAC. `mf_output_control`
outputs whichever MAC has just finished, with a one-clock `valid_out`. It also toggles the
trellis indicator TI (even/odd symbol). Outputs are 12-bit, 4 fractional bits.

## SOVA detector (`sova`)

This is the core of the design and the hardest part to follow.

### The trellis

The state is two past bits. Each of the 8 branches `e` starts in state `SS(e) = e>>1` and
carries input bit `BD(e) = e&1`. The ending state and the ternary symbol α depend on whether
the section is even or odd (TI), because SOQPSK is an offset scheme:

- even: `ES = {e[0], e[1]}`; odd: `ES = {e[2], e[0]}`
- `α_k = (−1)^(k+1) · (2u_{k−1}−1) · (u_k − u_{k−2})`, where α = 0 means the phase holds
- each state has a carrier phase θ: 00 → 3π/2, 01 → π, 10 → 0, 11 → π/2

The helpers `es_of`, `alpha_of`, `theta_of` and `cand_of` are in the package and are used by
every SOVA sub-block. That keeps the trellis in one place.

### Branch increments (`branch_increment_calc`)

`BI(e) = Re{ Z(α(e)) · exp(−jθ(SS(e))) }`. θ is a multiple of π/2, so this is a choice of
±Re or ±Im of one of the three MF outputs, with no multiplier. The mapping follows the
hardware operand table of the reference design; the testbench checks that table entry by entry.

### Add-compare-select and renormalisation (`metric_manager`)

Each state has two incoming branches. The manager adds each candidate's branch increment to
its predecessor's metric and keeps the larger. It also outputs:

- the winner index `w(s)`;
- the metric difference Δ(s), scaled by 2^−5 and saturated to 127;
- the state with the largest metric `gmax`.

Metrics are 18-bit unsigned and never saturate. When all four metrics have bit 16 set, bit 16 is
cleared in all of them: an exact subtraction of 2^16 that keeps every difference. Two details of
this design matter here and differ from a naive reading:

1. The clearing is applied to the *registered* metrics before the add, in the same clock, so
   the compare always sees consistent values.
2. Every compare (candidate vs candidate, and the gmax search) uses the *signed 18-bit difference*
   of the two metrics, i.e. modulo arithmetic. A compare across the moment one metric has
   crossed a power of two and another has not is then still right. Metric spread is bounded by
   a few thousand, far below 2^17.

The Δ scaling of 2^−5 is this design's choice. It puts the locked mean reliability near 27 of 127.
That keeps the correlator's fixed threshold (915 over 64 bits) about 4.5σ above the
correlation of random data, and still well below the full-marker sum.

### Register-exchange units (`htu`, `rtu`)

The decoding window is T = 16 symbols. The hard-decision unit keeps a 15-bit path vector per
state. On each step, every state copies the vector of its winning predecessor and appends the
new decision bit. The bit shifted out is the decision made 15 symbols earlier on that state's
path. `u_xor(s)` is the XOR of the two vectors that merge in state s; it marks where the
competing paths disagree.

The reliability unit keeps 15 reliabilities per state and applies the Hagenauer update with
Δ(s):

- where the paths disagree: `L ← min(Δ, L_winner)`
- where they agree: `L ← min(Δ + L_loser, L_winner)`

This is the variant that also charges the loser's reliability, as in the reference design.

### Output (`output_calculator`)

This takes the oldest decision and reliability from state `gmax` (captured with the metrics)
and outputs `hu = u_hat(gmax)`, `pu = hu ? +L : −L`. It also delays the branch increments so
they line up with the decision.

### Error detectors (`ted`, `ped`, `traceback_err_calc`)

Both detectors compute one error value per branch, all eight in parallel:

- timing: `Re{(Z_late − Z_early)·e^{−jθ}}`
- phase: `Im{Z_on-time·e^{−jθ}}`

`traceback_err_calc` then follows the winner indexes two steps back from `gmax`. It picks the
value of the branch on the best survivor one symbol ago, so the loops are decision-directed with
a delay of one symbol. Errors are scaled by 2^−2 and saturated to 8 bits.

## Soft-decision correlator and phase ambiguity

A decision-directed phase loop can lock at 0°, 90°, 180° or 270°. Because of the offset
structure, 90° and 270° lock show up as inverting every odd or every even bit, while 180°
inverts everything. `soft_decision_correlator` keeps the last 64 soft outputs. It correlates
them with the 64-bit attached sync marker (ASM) and with the ASM with its odd bits inverted.
The CCSDS marker `034776C7272895B0` is the default; the marker is a parameter. If either
magnitude exceeds 915, a frame starts (6240 bits, `target_found` high). The larger of the two
correlations and its sign pick one of the four corrections, which is then applied to `pu`/`hu`
for the whole frame.

This design adds one rule of its own. The odd-inverted marker correlates with the true
marker at a shift of 5 bits with 25/64 of full scale. So a detection can also be replaced
within a frame by a later one with a larger peak, and a frame cannot lock to the side lobe.
Repeated markers are otherwise accepted only where the next frame is due.

## Reduced demodulator for iterative decoding (`soqpsk_tg_simple_demod`)

In an iterative (SCCC) receiver the demodulator runs several times per frame. Only the first pass
needs synchronisation. Later passes repeat the trellis search on the eight branch increments
`bi[8]` that the full demodulator puts out, with updated prior information.
`soqpsk_tg_simple_demod` is that reduced detector: metric manager, HTU, RTU and output
calculator, without the branch-increment calculator and the error detectors. It takes
`bi_in[8]`, `ti_in` (the section parity of the step) and a one-clock `valid_in` per step. Its
outputs are the same as those of the full SOVA for the same increments. It is a separate top
and is not instantiated by `soqpsk_tg_receiver`.

## Fixed-point summary

| Signal | Format |
|---|---|
| samples | 8 bit signed, 4 fractional |
| mu | 9 bit unsigned, 8 fractional |
| timing counter | 14 bit signed, 12 fractional, 1.0 = T |
| VCO angle | 13 bit signed, 12 fractional, 1.0 = π |
| sin/cos, MF coefficients | 10 bit signed, 8 fractional |
| MF outputs, branch increments | 12 bit signed, 4 fractional |
| path metrics | 18 bit unsigned, bit-16 renormalisation |
| T_e, P_e | 8 bit signed, 2 fractional |
| reliability | 7-bit magnitude, signed 8-bit output |

## What follows the reference design and what does not

These follow it: the block structure and partitioning, 16 samples/symbol, the linear
interpolator with early/on-time/late taps, the mod-1 counter, the ±0.0026/π loop constants, the
Fs/4 downconverter, the three-hypothesis MF bank with two alternating MACs, the four-state
trellis and its operand tables, 18-bit metrics with bit-16 renormalisation, register-exchange
HTU/RTU with window 16, two-step error traceback, the 64-bit correlator with threshold 915,
frame length 6240 and the four-way ambiguity correction.

These are this design's own choices, because the source gives no value or no detail:
- the fixed-point widths not listed above as given;
- the MF table values, computed from the pulse definition;
- the ASM value;
- the reliability scaling 2^−5 and the error scaling 2^−2;
- reset values;
- the modulo metric compares;
- the correlator's larger-peak rule;
- the Q sign convention of the downconverter;
- the correlator also applies the ambiguity correction to the hard decisions (the reference
  corrects only the reliabilities).

One part of the reference SOVA is left out. In iterative SCCC decoding, the a-priori input
P(u;I) from the outer decoder is subtracted from the signed reliabilities, so that only
extrinsic information is passed on. Neither block view has a port for it, so neither
demodulator here has that input. Outputs are the full reliabilities, as in the first iteration,
where P(u;I) is zero. Add the subtraction after `output_calculator` if an iterative decoder
needs it.

The band-pass filter and ADC are analogue and are not part of the RTL. The block view of the
reduced demodulator has no valid or trellis-indicator input; `soqpsk_tg_simple_demod` adds
both.

## Verification

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one compares the module
against an independent model written in the testbench. They end with
`TB_RESULT checks=N failures=M`. For example:

- the branch-increment testbench checks against the printed operand table;
- the metric manager is checked against an integer ACS model across many renormalisations;
- the SOVA and its sub-units are checked against a behavioural SOVA over random symbol streams;
- the correlator is checked at all four rotations with random frames.
- the reduced demodulator must reproduce a random bit stream from synthetic branch
  increments with a delay of exactly 15 steps, with soft-output signs matching the bits.

`tb_soqpsk_tg_receiver` runs the top at default parameters from IF samples. It uses a
behavioural SOQPSK-TG transmitter (`tb/soqpsk_tx.svh`) that generates real ADC samples. There
are five runs of about four frames each:

- carrier phase offsets of 0.35, π/2+0.35, π+0.35 and 3π/2+0.35 rad, at symbol rates ±0.05 % off;
- one 90° run at exact rate.

It checks frame detection, the chosen ambiguity correction and zero bit errors in every frame
after the first. It also counts that each mechanism was exercised: short and long symbols,
metric renormalisations, VCO movement and every `phase_sel` value.

Run one testbench with Verilator (5.x):

```
verilator --binary --timing -Wno-fatal -Irtl -Itb rtl/soqpsk_pkg.sv \
  $(ls rtl/*.sv | grep -v soqpsk_pkg) tb/tb_soqpsk_tg_receiver.sv \
  --top-module tb_soqpsk_tg_receiver -o sim && ./obj_dir/sim
```

## Limitations

- No noise is added in simulation, so bit-error-rate curves (4–10 dB Eb/N0) and the small
  implementation loss quoted for the reference hardware were not reproduced here.
- Timing pull range is about ±0.05 % of symbol rate (see the timing loop section).
- Clock frequency was not evaluated. The reference hardware reached about 115 MHz against the
  93 1/3 MHz sample clock.
- The interpolator is linear, as in the reference; at 16 samples/symbol its error is small.
