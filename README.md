# Service-clock recovery for T1 circuit emulation over Ethernet

A T1 line carries 1.544 Mb/s, and the far end of the line must run at exactly the
sender's rate. When T1 frames travel through a metro Ethernet network instead of a TDM
network, the clock is lost. The receiving adapter (the *slave*) has to regenerate the
sending adapter's (the *master's*) 1.544 MHz service clock. It has to do so from
packets that arrive with tens of microseconds of queuing jitter, and from a local
oscillator that shares no reference with the master.

This RTL implements the slave's clock-recovery algorithm, plus the master's small
timestamp responder. The algorithm combines three mechanisms:

1. **Holdover loop.** A frequency-locked loop (FLL) steers an external DAC and VCO so
   that N cycles of the VCO output last exactly `C` ticks of a local 311.04 MHz
   reference. `C` is the single control input of the whole system. Freezing `C` keeps
   the last frequency: this is *holdover*.
2. **Open-loop filter.** The arrival intervals of the T1 packets are averaged very
   heavily: a 2048-tap low-pass FIR, then an 8000-sample mean. The result is scaled into
   a first estimate `c[n]` of `C`. It converges to within a few ppm without any
   cooperation from the master.
3. **NTP loop.** A simplified four-timestamp exchange measures the phase offset θ
   between the master's and the slave's cycle counters. Filtered and scaled, θ gives a
   second estimate `d[n]`, which is accurate to well under a ppm once settled.

A weight `w` ramps from 0 to 1 after the first open-loop estimate, so control passes
smoothly from `c[n]` to `d[n]`:

    C[n] = (1 - w) c[n] + w d[n]

```
 PHY words ─► sop_detect ─► measure_t(16b) ─► t1_accumulator ─► fir_filter ─► mavg_decim ─► c1_gain ─ c[n] ─┐
 (clk_phy)   SOP toggle     all-packet gaps     T1 gaps only       2048 taps     ÷M mean       ×N/L           │
                                                                                                              ▼
 NTP replies ─► ntp_client ─ θ ─► ntp_loop_filter ─ d[n] ──────────────────────────────────────────► weight_blend ─ C ─┐
 (T2,T3)        T1,T4, θ           H1, G1, +f0                                                       (1-w)c + wd       │
                                                                                                                        ▼
  f_out (VCO) ─► div_n (÷N) ─ f_div ─► measure_t(32b) ─ period ─► holdover_filter: e = period - C, H(z), G ─► DAC code
```

`ces_sync_top` wires all of this together. `ntp_server`, the master's side, sits
beside it in the same top with its own clock and ports. It is not connected to the
slave: the network between the two is outside the design.

## The control value and the holdover loop

Everything is expressed as one quantity: **reference ticks per N output cycles**.
At the nominal frequency f0 = 1.544 MHz, with N = 1,544,000 and f_r0 = 311.04 MHz, that
quantity is

    C0 = N · f_r0 / f0 = 311,040,000 ticks

A frequency higher by x corresponds to `C = N f_r0 / (f0 + x)`. The holdover loop
(`holdover_filter`) works as follows:

- `div_n` divides the VCO output by N.
- A 32-bit `measure_t` counts reference ticks over each f_div period.
- `holdover_filter` forms the error `e = period − C`.
- It applies the loop filter `H(z) = (1 − d z⁻¹)/(1 − z⁻¹)`, with d = 0.05. The pole at
  z = 1 gives zero steady-state error.
- It multiplies by a gain G and drives a 16-bit DAC code, offset-binary about mid-scale.

G is chosen so that the loop gain `A = G · Kv · N f_r0 / f0²` equals 1. This design
takes the full DAC range to span the VCO's ±50 ppm, so `Kv = 100 ppm · f0 / 2^16` Hz per
code. That gives

    G = f0 · 2^16 / (100e-6 · N · f_r0) ≈ 2.107 codes per tick

The sign works out because a longer measured period (VCO too slow) must raise the code.
The code is rounded to the nearest value. If it would leave the DAC range, it saturates,
and the integrator is frozen (anti-windup); `dac_sat` flags this. One update happens per
f_div period, i.e. once per second at the defaults.

Holdover needs no separate mode logic. `weight_blend` counts loop updates that bring
neither a new `c` nor a new `d`. After `HOLD_STEPS` (3) such updates it raises
`holdover` and freezes the ramp. `C` simply stays at its last value, so the FLL keeps the
last known frequency, as stable as the local reference. New estimates end holdover.

## Fixed-point formats (`ces_pkg`)

Every control-path value (`c`, `d`, `C`, the error, the filter state) is a `ctrl_t`: a
signed 48-bit number of reference ticks with 16 fraction bits. Its range is ±2^31 ticks,
enough for C0 = 3.1e8. Its resolution of 1/65536 tick is about 5e-14 of C0.

Real-valued constants (G, d, α, G1, C1, C0) are computed during elaboration from `real`
parameters. They are then rounded to Q16, or to Q32 for C1. Changing F0, N or F_R0
therefore re-derives every constant.

## Open-loop path

**Arrival events (`sop_detect`).** The PHY runs with its byte realignment disabled, so
code-groups can start at any bit of the 10-bit parallel word. `sop_detect` works in the
PHY clock domain:

- It keeps the last two words.
- It searches all ten bit offsets for the start-of-packet code-group /S/ (K27.7, either
  running disparity; bit 0 is the first bit on the line).
- It reports the word index and the shift.
- It toggles `sop_toggle`, which crosses into the reference domain through a
  two-flop synchroniser.

**Interval measurement.** A 16-bit `measure_t` times all packets: T1, background and
corrupt. At 311.04 MHz, 16 bits hold up to 210 µs; the nominal T1 interval is 125 µs.
The counter saturates at all-ones.

**`t1_accumulator`.** This stage stands in for the packet processor. It adds up the
intervals until it receives a header that matches the T1 pattern. It then emits the sum,
which is the interval between consecutive T1 packets, and clears. The header decision
comes in as `hdr_valid`/`hdr`, with a programmable pattern and mask. Parsing headers is
the job of outside logic.

**`fir_filter`.** This is a 2048-tap linear-phase FIR with 16-bit samples and 16-bit
Q1.15 coefficients. It uses the coefficient symmetry:

- Only the first 1024 coefficients are stored. The host loads them over `coef_*`.
- Each output pre-adds `x[n−k] + x[n−2047+k]` and then does 1024 multiply-accumulates
  into a 32-bit accumulator.
- Coefficients must sum to 1 (unit DC gain). The output then equals the input scale
  times 2^15.
- One MAC per reference clock takes 3.3 µs per T1 packet. Packets arrive every 125 µs.
- A sample that arrives while the filter runs is dropped and flagged on `overrun`.
- After reset the sample buffer is zeroed, which takes `TAPS` cycles.
- `primed` rises once 2048 real samples are in. The mean that follows ignores outputs
  before that.

The coefficient values themselves are not part of the design. The intended filter is a
low-pass with cut-off 1e-4·π rad/sample, i.e. 0.4 Hz at the 8 kHz packet rate.

**`mavg_decim`.** A length-M moving average followed by decimation by M needs no
M-sample buffer. It is just an accumulator (32 + log2 M = 45 bits) and a divider. Every
M-th input starts a sequential restoring division; the divide takes SUM_W + 1 = 46
cycles. The quotient truncates toward zero.

**`c1_gain`.** The mean T1 interval in ticks, times N/L_frame (L_frame = 193 bits per T1
frame), is the number of ticks for N master cycles. That number is exactly the `C` that
would make the VCO run at the master's rate. Here N/L = 8000. `c1_gain` multiplies by
this value with the 2^15 FIR scale and the Q16 output folded in:

    c = mean · round(N/L · 2^(16−15+32)) >> 32

## NTP loop

**Timestamps.** Timestamps count cycles of the recovered clock f_out at the slave
(`ntp_client`) and of the service clock at the master (`ntp_server`). The exchange runs
as follows:

- After each holdover-loop update, if no exchange is outstanding, the slave sends a
  request stamped T1 (`ntp_req_send`/`ntp_req_t1`).
- The master records T2 when the request arrives.
- The master waits exactly TAU of its cycles (1 s), then replies with T2 and T3 = T2 + TAU.
- The slave stamps T4 on arrival and computes `θ = (T2 − T1 + T3 − T4)/2`.
- θ is given in half cycles, modulo 2^64 so counter wrap is harmless.

The fixed 1 s wait matters. Over that second the frequency difference accumulates into
phase, which makes θ large compared with the network delay noise.

**Time step.** θ also contains the absolute offset between the two counters. To remove
it, the first reply after the ramp has begun is used differently. It steps the slave
counter by round(θ) and sets `ntp_synced`; it does not produce a θ output.

**Timeout.** An exchange whose reply never comes is abandoned after `NTP_TIMEOUT`
reference ticks (3 s), and `ntp_timeout` pulses.

**Loop filter (`ntp_loop_filter`).** θ goes through `H1(z) = (1 − α)/(1 − α z⁻¹)`, with
α = 0.1, and a gain G1 = 0.08 Hz of frequency correction per cycle of phase. The sum with
f0 is done in the same units as `C`, so the correction is converted to ticks:

    d = C0 − G1 · (N f_r0 / f0²) · H1(θ)

A positive θ means the master is ahead, and it shortens `d` so that f_out speeds up.
Phase integration is already done by the counters, so this loop needs no integrator.
In steady state θ settles at the value whose correction cancels the frequency offset.

## Hand-over and `weight_blend`

`w` is held as Q16, with 65536 meaning 1. The ramp behaves as follows:

- It starts at the first `c`.
- It rises by 1/RAMP_STEPS per loop update; RAMP_STEPS = 50, i.e. 50 s.
- It ends at exactly 1, which raises `ntp_full`.

`ctrl = c + (d − c)·w`, registered. Before any estimate, `c` and `d` both hold C0, so the
VCO is steered to nominal.

## Clock domains and latencies

| Domain | Clock | Blocks |
|---|---|---|
| reference | `clk_ref`, 311.04 MHz | everything not listed below |
| PHY | `clk_phy`, word clock | `sop_detect` |
| recovered | `f_out` | `div_n` |
| master | `clk_m` | `ntp_server` |

Signals entering the reference domain (`sop_toggle`, `f_div`, `f_out`) pass through
two-flop synchronisers (`edge_sync`).

| Block | Latency |
|---|---|
| `sop_detect` | 2 PHY clocks from the word holding the code-group |
| `measure_t` | 3 reference clocks from the event edge to `period_valid` |
| `fir_filter` | TAPS/2 + 3 = 1027 reference clocks from `in_valid` to `out_valid` |
| `mavg_decim` | SUM_W + 1 = 46 clocks after the M-th input |
| `c1_gain`, `holdover_filter`, `ntp_loop_filter` | 1 clock |
| `weight_blend` | 2 clocks from a new `c`/`d` to `ctrl` |

## Parameters of `ces_sync_top`

| Parameter | Default | Meaning |
|---|---|---|
| `N` | 1,544,000 | divider; one loop update per second at f0 |
| `M` | 8000 | moving-average length and decimation |
| `TAPS` | 2048 | FIR length (even) |
| `L_FRAME` | 193 | bits per T1 frame (one frame per packet) |
| `F0`, `F_R0` | 1.544e6, 311.04e6 | nominal service and reference frequencies |
| `VCO_PPM` | 50 | VCO deviation at DAC full scale (±) |
| `LOOP_A`, `D` | 1.0, 0.05 | holdover loop gain and zero of H(z) |
| `ALPHA`, `G1` | 0.1, 0.08 | NTP filter pole and gain (Hz per cycle) |
| `RAMP_STEPS` | 50 | updates for w to go from 0 to 1 |
| `HOLD_STEPS` | 3 | updates without estimates before `holdover` |
| `TAU` | 1,544,000 | master reply delay, master cycles |
| `NTP_TIMEOUT` | 933,120,000 | reference ticks before an exchange is abandoned |
| `HDR_W` | 112 | header bits compared against the T1 pattern |

The RTL accepts other services: an E1 line, for example, would use N = 2,048,000,
L_FRAME = 256 and F0 = 2.048e6. Only the T1 defaults have been exercised.

## Where this design departs from the published algorithm

The algorithm comes from the paper *High-Performance Synchronization for Circuit
Emulation in an Ethernet MAN*. Its prototype is an FPGA plus a PowerQUICC II processor.
This RTL follows the paper's structure and numbers, except for the following:

- **Everything after the decimator is hardware, in fixed point.** In the paper, the
  processor does these steps in floating point: the division by M, C1, the weighting,
  H(z), G, H1 and G1. The Q16 quantisation of d, α and G changes the loop dynamics only
  in the fifth decimal place.
- **The paper contradicts itself about where the division by M is done.** It says both
  that the FPGA divides the sum by M and that software does it in floating point. Here
  the divider is in hardware.
- **Arrival timing resolution.** The paper combines the SOP word and the shift into a
  pulse with line-bit resolution (0.8 ns). Here the event is timed at the word boundary:
  8 ns at a 125 MHz word clock, coarser than the 3.2 ns reference tick. `sop_shift` is
  reported but not used. Building the fine pulse needs a line-rate clock or a delay line,
  which portable RTL cannot provide. The error is a bounded quantisation noise that the
  FIR and the mean strongly attenuate.
- **Single-edge reference.** The paper clocks the counter on both edges of 155.52 MHz.
  Here it is one 311.04 MHz clock with the same tick.
- **d[n] as a period.** The paper's diagram adds H1·G1 to f0, a frequency. Since `c` and
  `d` are blended, both are expressed here as the period count `C`, converted to first
  order around f0.
- **Choices the paper leaves open**, all made by this design:
  - the /S/ code-group and 10-bit word;
  - the header pattern and mask;
  - the FIR coefficient values and their write port;
  - when the time step happens;
  - the holdover criterion (HOLD_STEPS);
  - the NTP timeout;
  - the DAC-to-VCO scaling behind Kv;
  - dropping FIR inputs on overrun;
  - the synchronisers;
  - saturation everywhere.
- **Not built:** the DAC, the VCO, the reference oscillator and its PLL, the PHY, header
  parsing, the network that carries the NTP messages, the TDM encapsulation itself and
  the processor. The top brings their signals out as ports.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>`, has a watchdog, and checks latencies cycle by cycle.

| Block | What its testbench compares against |
|---|---|
| `measure_t` | known periods, the first-event arming, saturation |
| `div_n` | odd and even N, and the full N = 1,544,000 |
| `sop_detect` | /S/ at all 10 offsets, both disparities, word index, random data |
| `t1_accumulator` | merging of background gaps, pattern and mask, saturation |
| `fir_filter` | direct convolution at 32 taps and at the full 2048 taps, `primed`, overrun |
| `mavg_decim` | exact means (M = 7 and M = 8000), negative values |
| `c1_gain` | the real-valued formula within 0.01 tick |
| `holdover_filter` | a reference model of e, H(z), G, rounding and saturation at the default sizes |
| `ntp_loop_filter` | the recurrence in real arithmetic |
| `ntp_client` | θ for chosen timestamps including wrap, the time step, the timeout |
| `ntp_server` | TAU = 25 and TAU = 1,544,000, T3 − T2, dropped requests |
| `weight_blend` | ramp values, ntp_full, holdover entry/exit and ramp freeze |

**End-to-end testbench (`tb_ces_sync_top`).** It closes the whole loop:

- A behavioural DAC+VCO (`tb/vco_model.sv`) starts 10 ppm fast, and the master runs
  30 ppm fast.
- T1 packets with random jitter and 0–2 background packets between them are placed as
  /S/ code-groups in a bit-serial 10-bit PHY stream.
- NTP messages cross a jittered path.

Time is compressed 20×: N = 77,200 (an update every 50 ms), M = 400, a 256-tap boxcar
FIR and a 5-step ramp. G1 is scaled so the NTP loop keeps its per-update gain. The
reference is 31.104 MHz and the PHY word clock 12.5 MHz. The testbench checks the
following:

- The open-loop estimate brings the error within 8 ppm; observed about −7.5 ppm from −20 ppm.
- w ramps and the slave time is stepped once.
- After 30 updates of NTP control, the mean error over 8 updates is within 2 ppm;
  observed about −1 ppm.
- When traffic stops, holdover is entered, the exchange times out, and the frequency
  stays within 2 ppm.
- Holdover ends when traffic resumes.

Every mechanism is counted and must occur at least once: SOP, background merge, FIR
output, estimate, ramp, take-over, time step, θ, holdover, timeout. The run takes about
2.5 minutes in Verilator.

**Open loop under network jitter (`tb_open_loop_network`).** This testbench runs the
open-loop chain, from `measure_t` to `c1_gain`, at its full default sizes: 2048 taps,
M = 8000 and N = 1,544,000. The traffic looks like a loaded five-hop gigabit network:

- a T1 packet every 125 µs, with independent delays spread over 40 µs (±20 µs jitter);
- 0 to 6 background packets between consecutive T1 packets;
- a 2048-tap Hamming-windowed low-pass loaded into the FIR.

Every FIR output, every mean and every `c` is checked exactly against an integer model.
The two estimates, after 1.26 s and 2.26 s of traffic, land 0.15 ppm from the master
frequency. Only the reference clock is slowed, to 31.104 MHz; the run takes about 40 s.

**Not simulated at full size.** No simulation has run the whole top at its default
parameters. There, one loop update is 311 million reference cycles. Even with no
packets, Verilator simulated the top at about 2.7 ms of design time per second, so the
first DAC update (2 s) would take over 12 minutes. A full operation would take much
longer: priming the open loop takes 1.3 s of traffic, and the hand-over to NTP takes
50 s. The largest configuration run end to end is the compressed one above. The
blocks with large defaults were tested at those defaults on their own:

- the FIR at 2048 taps;
- the mean at M = 8000;
- the divider at N = 1,544,000;
- the holdover filter and the NTP responder;
- the whole open-loop chain, in `tb_open_loop_network`.

## Simulating

Verilator 5 with `--timing` works. For example, for the end-to-end run:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  --top-module tb_ces_sync_top -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/ces_pkg.sv tb/tb_ces_sync_top.sv -o sim
./obj_dir/sim
```

Any block testbench runs the same way with its own `--top-module`. The RTL is
SystemVerilog-2017 and synthesizable. The FIR holds 48 Kb of memory: 32 Kb of samples,
read through two registered ports (one per operand of the pre-add), and 16 Kb of
coefficients. The wide multipliers of the control path (`c1_gain`, `holdover_filter`,
`ntp_loop_filter`, `weight_blend`) are used about once per second, so they could be made
sequential if area matters.
