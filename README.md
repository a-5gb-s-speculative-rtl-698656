# Speculative DFE for a 5 Gb/s blind 2x-oversampling ADC receiver

An ADC-based serial receiver can equalize in the digital domain, but when the
ADC clock is *blind* (free-running at twice the bit rate, never aligned to
the data) a decision-feedback equalizer has a problem: the interference a bit
leaves on the following samples depends on where in the unit interval (UI)
those samples fall, and that position wanders. This design solves it by
splitting the UI into 8 intervals, keeping one DFE coefficient per interval,
and choosing the coefficients each frame from the average transition phase
that the clock-and-data-recovery (CDR) loop already estimates. To reach
5 Gb/s, the back end processes 8 UIs (16 samples) per frame and unrolls the
one-tap feedback loop: every sample is corrected for both possible values of
the previous bit, and a chain of 4:1 multiplexers keeps the right result.

This repository holds synthesizable SystemVerilog for the digital part: the
4:16 deMUX, the coefficient selector, the speculative ISI subtractor, the
phase-detection/data-decision arrays, the resolving multiplexers and the
average-phase loop. The ADCs, the multi-phase sampling clock, the bias
generator and the input buffers are analog and are not included; the
testbench produces ADC codes from a channel model instead.

## Signal flow

```
 4 ADC codes/cycle                                         rx_bits[1:8]
 ──► demux_4to16 ─S[1:16]─► sample_frame_reg ─S[0:16]─►  isi_subtractor
                                  (S0 = previous S16)       │ d^0[0:16], d^1[0:16]
                                                            ▼
                         c1, c2    8 × pd_dd_array  (4 PD/DD units each)
           dfe_coef_sel ◄───────┐   │ 8 × 4 × (PHI_X, valid, b)
                ▲               │   ▼
                │ PHI_AVG       │  spec_mux (8 chained 4:1, b7/b8 register) ──► b[1:8]
                │               │   │ PHI_X[1:8]
           avg_phase_recovery ◄─┴───┘
```

Everything between the frame registers is combinational, so one frame is
decided per `frame_valid`. PHI_AVG is constant over a frame and is updated
at its end for the next frame.

## Phase-dependent coefficients (dfe_coef_sel)

Number the 8 intervals of a UI from its end: I0 is the eighth of a UI just
before the next boundary, I7 the eighth just after the previous one.
`alpha[j]` is the interference the previous bit leaves in interval I_j,
beyond what an ideal ("desired") pulse would leave; for a low-pass channel
the larger values sit at high j, early in the UI.

PHI_AVG1, the average phase reduced modulo one UI, is the distance from the
second sample of a UI (S2) to the next UI boundary. With 64 phase steps per
UI its top three bits give S2's interval j. S1 comes half a UI earlier and
so lies in interval (j+4) mod 8. The selector therefore produces

| sample | coefficient |
|---|---|
| S2 and every even sample of the frame | `c2 = alpha[j]` |
| S1 and every odd sample of the frame | `c1 = alpha[(j+4) mod 8]` |

Example: S2 in I2 uses alpha2 for S2 and alpha6 for S1. The two 8:1
multiplexers are wired with c1's inputs in natural order and c2's rotated by
four, and are steered by (j+4) mod 8.

Because PHI_AVG changes only once per frame, the same c1/c2 pair serves the
whole frame. S0, the last sample of the previous UI, is corrected with c2
and the bit *two* UIs back; the change of phase over one UI is ignored.

## Loop unrolling (isi_subtractor, pd_dd_array, spec_mux)

A one-tap DFE needs the previous decision before it can correct the next
sample, which at 5 Gb/s leaves 200 ps per bit. Instead, `isi_subtractor`
computes both corrections for every sample of the frame:

* `d1 = S - c` (previous bit 1, treated as +1)
* `d0 = S + c` (previous bit 0, treated as -1)

UI k of the frame is decided from three samples S[2k-2], S[2k-1], S[2k]. The
first depends on b[k-2], the other two on b[k-1], so `pd_dd_array` holds four
phase-detection + data-decision units, unit u assuming {b[k-2], b[k-1]} = u.
`spec_mux` then walks the frame: the multiplexer of UI 1 is steered by b7 and
b8 of the previous frame (kept in a register), UI 2 by b8 and the new b1, and
so on. Only this chain of 4:1 multiplexers remains in the feedback path.

## Phase detection, data decision and the phase loop

These three parts are named by the architecture but their method is this
implementation's own:

* **phase_detector** looks for a single sign change in d[0:2] and places the
  zero crossing by linear interpolation between the two samples around it.
  PHI_X is reported in the same measure as PHI_AVG1: a crossing a fraction f
  of the way from S0 to S1 gives 32·f, one from S1 to S2 gives 32 + 32·f
  (1/64 UI). No sign change, or two, gives no valid phase.
* **data_decision** slices the sample nearest the eye centre: S1 when
  PHI_AVG1 < 1/4 UI (S1 then sits between 1/4 and 1/2 UI into the bit),
  otherwise S2. The architecture also routes PHI_X into the decision unit;
  this rule does not need it.
* **avg_phase_recovery** is a first-order loop: each frame the valid phase
  errors PHI_X − PHI_AVG, taken modulo one UI into [−1/2, 1/2), are summed
  and added, scaled by 2^−KP_SHIFT, to an accumulator with ACC_FRAC extra
  fraction bits. With about four transitions per frame the default gain
  corrects 1/32 of the error per frame, roughly a 3 MHz loop bandwidth at
  625 Mframes/s. PHI_AVG carries two extra bits counting whole UIs.

## Number formats and timing

* ADC codes are 5-bit unsigned (0..31), coefficients 5-bit unsigned in ADC
  LSBs. Internally a code S becomes `2·S − 31` (half-LSB units, signed,
  8 bits) and a coefficient `2·c`; results are always odd, so a corrected
  sample is never zero and its sign is always defined.
* One clock, one word per ADC per cycle. `frame_valid` pulses every fourth
  cycle and stands in for the divided-by-4 digital clock; a real
  implementation would run the back end on that slower clock.
* `rx_bits`, `rx_valid` and `rx_phi_avg` are registered and appear two
  cycles after the last ADC words of a frame. All registers reset
  asynchronously on `rst_n` low.

## Top-level interface (`dfe_rx_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | ADC word clock, active-low reset |
| `adc_data[0:3]` | in | 5 each | codes of ADC0..ADC3, in sampling order |
| `alpha[0:7]` | in | 5 each | DFE coefficients; all zero disables the DFE |
| `rx_bits[1:8]` | out | 1 each | recovered bits, bit 1 first in time |
| `rx_valid` | out | 1 | one pulse per recovered frame |
| `rx_phi_avg` | out | 8 | PHI_AVG used for that frame |
| `phi_avg`, `s2_interval`, `use_s1`, `spec_sel`, `phx_valid`, `n_valid` | out | | live observation of the loop |

Parameters: `ACC_FRAC` (8), `KP_SHIFT` (7), `PHI_INIT` (0). The frame size
(8 UI, 16 samples), ADC count (4), sample and coefficient widths (5) and
interval count (8) are constants of `dfe_pkg`, as is the phase resolution
(`PH_W` = 6, i.e. 1/64 UI).

## Limits and departures

* **Phase wrap / bit slip.** When the sampling phase drifts across a UI
  boundary, the frame gains or loses a bit. PHI_AVG counts the wrap in its
  whole-UI bits, but nothing re-aligns the output bits; a downstream
  elastic buffer would have to.
* **Acquisition.** Decisions and phase estimates depend on each other. The
  loop acquires when the starting phase is close to `PHI_INIT`; from a far
  phase it can settle wrongly because wrong coefficients corrupt the
  decisions. Coefficients can be loaded after the loop has locked with a
  suitable `PHI_INIT`, or `PHI_INIT` chosen per link.
* **Sample 1 when PHI_AVG1 ≥ 1/2 UI** physically belongs to the previous bit,
  yet it is corrected with b[n-1] like any odd sample. It is then used only
  for phase detection, not for the decision.
* The phase detector, the decision rule and the loop filter are simple
  choices, not tuned against a real channel; jitter tolerance was not
  simulated.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog:

| testbench | what it checks |
|---|---|
| `tb_demux_4to16` | sample order of every frame, `frame_valid` every 4 cycles |
| `tb_sample_frame_reg` | S0 = S16 of the last accepted frame, hold, reset value |
| `tb_dfe_coef_sel` | all 256 PHI_AVG values against `c2 = alpha[j]`, `c1 = alpha[(j+4) mod 8]`; the S2-in-I2 example |
| `tb_isi_subtractor` | both speculative values of all 17 samples against a real-valued reference |
| `tb_phase_detector` | interpolated crossing against a real-valued reference, edge cases |
| `tb_data_decision` | sample choice over all 64 phases |
| `tb_pd_dd_array` | which speculative sample each of the four units takes |
| `tb_spec_mux` | the 4:1 chain against a bit-by-bit reference across frames; all four selects |
| `tb_avg_phase_recovery` | exact one-frame step, invalid phases ignored, shortest-way error, convergence, whole-UI count |
| `tb_dfe_rx_top` | end to end at default parameters (below) |

`tb_dfe_rx_top` sends a PRBS7 stream through a behavioural channel: a linear
transition of 0.75 UI between bit levels (5 LSB amplitude) plus a post-cursor
interference of 5..10 LSB depending on the interval, ±0.3 LSB noise, and a
blind sampling phase that starts at 0.1 UI, drifts to 0.4 UI and back to
0.15 UI. With `alpha` equal to the channel interference, all bits after
150 acquisition frames must be correct (about 22,800 bits in 3000 frames).
The same channel with `alpha = 0` must produce errors (about half of the
2,000 bits it checks are wrong). It also requires that every speculation select,
several coefficient intervals, both decision samples and PHI_AVG updates
occur.

Two more testbenches drive the whole receiver through the same channel
model (`tb/rx_channel_model.sv`) to repeat the kinds of evaluation used for
such a receiver:

* `tb_dfe_rx_kscan` scales the coefficients by K = 0, 0.2, ... 1.6 and
  counts bit errors over 3,200 bits per K at a sampling phase of 0.2 UI. It
  gives no errors for K = 0.8 to 1.4, about half the bits wrong for K up to
  0.4, 21 errors at 0.6 and 550 at 1.6; it requires error-free operation for
  0.8 ≤ K ≤ 1.2 and errors at K = 0.
* `tb_dfe_rx_jtol` moves the sampling phase sinusoidally by 0.24 UI
  peak-to-peak at 1, 2, 4 and 8 MHz (a frame lasts 1.6 ns) and requires no
  bit errors. It also requires PHI_AVG to follow the jitter below the loop
  bandwidth; at 8 MHz PHI_AVG swings only 6/64 UI of the 15/64 applied, yet
  the bits stay correct on this channel.

To run one, from the repository root:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/dfe_pkg.sv \
    tb/tb_dfe_rx_top.sv --top-module tb_dfe_rx_top -o sim
./obj_dir/sim
```

Replace `tb_dfe_rx_top` with any other testbench name; each one runs in
a few seconds at most.
