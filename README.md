# A 3.2 Gb/s delay-locked loop that shifts phase with a fractional-N PLL

A clock-recovery loop for chip-to-chip links has to slide its sampling clock
to the middle of each received bit, with fine steps and no end stop. The
usual phase shifter is an analog phase interpolator. It needs careful
matching, and its linearity drifts with process, voltage and temperature.
This design uses a different shifter: a fractional-N PLL. The clock comes
from the PLL's VCO. A Sigma-Delta modulator nudges the loop's feedback
divider, and each nudge moves the VCO phase by exactly 1/256 of a cycle.
Because the step size is set by a digital word length, not by analog
matching, it does not change with process, voltage or temperature. Because
the phase setting is held modulo 256 and wraps cleanly, the range is
unlimited.

The configuration here is the one built as a prototype:

- input clock 1.6 GHz
- data rate 3.2 Gb/s
- VCO and recovered clock 3.2 GHz, which is N/M = 6/3 times the input
- phase step 2π/256 ≈ 1.4°, about 1.22 ps
- phase updates at f_d = f_ref/512 ≈ 1.04 MHz
- PLL bandwidth about 4 MHz

## How a divider offset becomes a phase step

The PLL compares the reference (`clk_in / M`) with the divider output
(`VCO / (N + n[k])`) and forces their edges to line up. Suppose one division
cycle is made one VCO period longer (n = +1). The divider edge then comes
late by one VCO period. The loop answers by speeding the VCO up until it has
gained exactly one whole cycle. One VCO cycle is 2π, so the visible phase
does not change. The fractional step comes from averaging. Suppose the
running sum of n[k] has an average value of x/256, with x an integer. The
loop filter then removes the fast dither, and the VCO settles x/256 of a
cycle ahead of its integer-N position. So the phase setting is an 8-bit
number `phase_code` = x, and the modulator's job is to turn x/256 into a
stream of n[k] ∈ {−1, 0, +1} with that running average and with its error
pushed to high frequencies.

In the testbench, one code step moves the recovered clock by about
1.22-1.23 ps, depending on the random start state. The ideal is
312.5/256 = 1.221 ps.

## Loop structure

```
 clk_in ──► /M ──► PFD ──► charge pump ──► loop filter ──► VCO ──┬──► clk_out
                    ▲                                             │
                    └──── f_ref ◄── /(N-1, N, N+1) ◄──────────────┤
                              │            ▲ n[k]                 │
                              ▼            │                      │
                        Sigma-Delta modulator ◄── n_sd ◄── DFF @ f_d
                                                           ▲
 data_in ──► bang-bang phase detector (clocked by clk_out) ─► integrator ─► limiter
                 └──► rdata (retimed data)
```

Two loops are nested, and they run at very different speeds:

- **The PLL** has a bandwidth of about 4 MHz. It settles in roughly 40 ns
  after each phase step.
- **The phase loop** (detector, integrator, sampling flop, modulator) moves
  at most one step per T_d ≈ 1 µs. This gives the PLL time to settle before
  the next step.

The slowest data drift the phase loop can follow is one code per f_d, or
1.04 M codes/s. At 3.2 GHz that is a frequency offset of about 4 kHz. The
asynchronous test uses 3 kHz.

## The multi-rate Sigma-Delta modulator

This is the part that needs the most explanation (`sdm_multirate` and its
sub-blocks).

**Second order from first-order parts.** The modulator is built as three
parts in a row: accumulator 1/(1−z⁻¹), then a first-order modulator (STF
z⁻¹, NTF 1−z⁻¹), then a differentiator 1−z⁻¹.

- In the signal path, the accumulator and the differentiator cancel, so the
  signal transfer function stays z⁻¹.
- For the quantization noise, the differentiator adds a second zero at DC,
  so the noise transfer function is (1−z⁻¹)², the same as a classical
  second-order modulator.
- The output is the difference of a one-bit stream, so it has only three
  levels: −1, 0 and +1. That suits a 5/6/7 divider.

**Why it can be multi-rate.** The input n_sd only changes once every 512
f_ref cycles. So the accumulator is an 8-bit up/down counter (`sdm_udc`)
that steps at f_d. Only the differentiator has to run at the full f_ref
(533 MHz). The first-order modulator sits between the two rates, so it is
split into three requantizing stages (`sdm_stage`). Each stage runs faster
and uses fewer bits than the one before:

| stage | input bits | output bits | update rate | enable |
|---|---|---|---|---|
| up/down counter | 1 (±1) | 8 | f_ref/512 | `en_abc` (f_d) |
| first-order stage 1 | 8 | 5 | f_ref/16 | `en_ab` |
| first-order stage 2 | 5 | 2 | f_ref/2 | `en_a` |
| first-order stage 3 | 2 | 1 | f_ref | always |
| differentiator + adders | 1 | n[k] | f_ref | always |

Each stage adds the residue it kept from its previous update. It outputs
the top bits of the sum and keeps the low bits as the new residue (error
feedback). That is a first-order modulator with STF z⁻¹ and NTF 1−z⁻¹ in the
stage's own clock. Because the slow stages use more bits, the total noise is
dominated by the last, fast stage.

The slow rates come from a /2, /8, /32 chain (`sdm_clkdiv`). Here it is
built as nested clock-enable strobes in the single f_ref domain, not as
divided clocks. Every register of a slower stage therefore updates on the
same f_ref edge as the faster stages. Each stage samples a value that has
been stable for at least one of its own periods.

**Wrapping without a phase jump.** The counter wraps modulo 256 (255 → 0 or
0 → 255). Its value alone would then jump back by a whole VCO cycle, and the
PLL would have to slew a full 2π to follow. To prevent this, the counter
raises an overflow flag (`ovf_up` or `ovf_dn`) for the f_d period after the
wrap. `sdm_ovf_align` passes each flag through one register per stage
domain. These registers use exactly the same enables as the stage data
registers, so the flag stays in step with the wrapped value it belongs to. A
0→1 detector then turns the flag into a single f_ref-cycle pulse. `sdm_diff`
adds the up pulse to the differentiator output and subtracts the down pulse.

The pulse arrives in the same f_ref cycle as the wrapped value reaches the
last stage's output. The overall output is therefore identical to that of
an accumulator that never wraps. `tb_sdm_multirate` checks this cycle by
cycle against an unbounded-integer reference with no overflow logic at all.
The run covers about 920,000 cycles and three wraps in each direction, with
no mismatch. The same run confirms that n[k] never leaves {−1, 0, +1}, and
an assertion in `sdm_diff` guards this.

**One width differs from the stage diagram.** The buses between the stages
are documented as 5 and 2 bits wide. A first-order stage fed with a
near-full-scale fraction (for example 255/256) must sometimes output exactly
1.0. With only the fractional bits, that value would wrap to 0 and throw
away a whole cycle. So each inter-stage bus here carries one extra integer
bit: 6 and 3 bits.

**Latency.** After a change of n_sd is sampled, the new counter value
reaches n[k] within one f_d period plus up to 16 + 2 + 1 + 1 f_ref cycles.
That is small compared with T_d.

## The data side

- **`bbpd`** is a full-rate Alexander bang-bang detector. The rising edge of
  the recovered clock samples the middle of each bit, and those samples are
  the retimed data. The falling edge samples the expected transition
  between two bits. When two successive bits differ, the edge sample shows
  which side of the transition the clock is on: `early` (the edge sample
  still shows the old bit) or `late`.
- **`bb_integrator`** sums late (+1) and early (−1) in a counter that
  saturates at ±64. The limiter output `adv` is the sign of the sum. This
  turns the sparse, noisy three-level decisions into a two-level command.
- **`nsd_sampler`** holds that command for one T_d as n_sd: 1 means advance
  the clock, 0 means retard it.

The loop never stands still. In lock it dithers by one code around the bit
centre, which is a ±1.2 ps limit cycle.

## Analog parts: behavioural models

The PFD, the charge pump with loop filter and level-shifting source
follower, and the ring VCO are analog circuits. Here they are behavioural
SystemVerilog models that use `real` signals and delays:

- **`pfd_model`** is an ideal three-state phase-frequency detector (20 ps
  reset delay). The detector it stands in for is an XOR-type circuit in
  current-mode logic, whose internals are not reproduced.
- **`cp_lf_model`** is a phase-domain proportional-plus-integral filter. The
  width difference of the up and down pulses gives a proportional kick
  (KP = 5.7e-4 V/ps) and an integrated term (KI = 3.6e-5 V/ps). KP is chosen
  so that the loop gain per reference cycle is N·T_vco²·Kv·KP ≈ 0.047 =
  2π·4 MHz/533 MHz, which gives the 4 MHz bandwidth.
- **`vco_model`** has frequency F0 + Kv·vctrl with Kv = 140 MHz/V. It gives
  3.2 GHz at 0.5 V and is clamped to 2.5–4 GHz. It has no phase noise.

Because of these models, `dll_top` is a simulation model of the whole loop.
The digital blocks are synthesizable on their own: `sdm_*`, `mmd_divider`,
`clk_prescaler`, `bbpd`, `bb_integrator` and `nsd_sampler`.

Jitter figures cannot be reproduced with these models: there is no device
noise, no supply coupling and no ISI. What the simulations do show is the
logic: lock, error-free retiming, phase tracking, the step size, and the
wrap behaviour.

## Where this RTL departs from the original design, or fills gaps

- **Clock enables, not divided clocks.** The modulator uses clock enables
  in one f_ref domain. The update rates are the same, but the power saving
  of slow clock nets is lost.
- **Extra integer bit.** The inter-stage buses carry one extra integer bit,
  as explained above.
- **Integrator.** The analog integrator (a current pump into a capacitor,
  with an inverter as limiter) is replaced by a discrete-time saturating
  counter clocked by the recovered clock. The saturation level, 64, is a
  choice made here.
- **Detector and divider internals.** The internals of the BBPD, the
  multi-modulus divider and the prescaler are the simplest logic with the
  required function. They are not the current-mode circuits of the
  prototype. The divider's output is high for N/2 VCO cycles; only its
  rising edge matters.
- **Sign convention.** n_sd = 1 advances the clock. A late clock (data
  transition seen before the edge sample) produces advance commands.
- **Integer-N mode.** Setting `int_n_mode` = 1 forces the divider offset to
  0. This is the PLL-only measurement mode; how that mode is selected is a
  choice made here.
- **Reset.** One active-low asynchronous reset (`rst_n`) clears all digital
  state. The analog models start at the nominal control voltage.
- **Omitted parts.** The differential-to-single-ended converters and the
  I/O buffers and drivers have no logic function and are not modelled.
- **1.6 Gb/s case.** The clock setting used for 1.6 Gb/s operation is not
  known. Here the input clock stays at 1.6 GHz, so the 3.2 GHz recovered
  clock samples each 625 ps bit twice. The detector still pulls the falling
  clock edge onto the transitions, and both rising edges land inside the
  bit. The retimed stream therefore carries every bit twice.

## Files

| file | contents |
|---|---|
| `rtl/dll_pkg.sv` | shared constants (N, M, word widths, divider ratios) and the n[k] type |
| `rtl/dll_top.sv` | the complete loop |
| `rtl/sdm_multirate.sv` | multi-rate second-order modulator |
| `rtl/sdm_clkdiv.sv` | /2, /8, /32 enable chain |
| `rtl/sdm_udc.sv` | 8-bit up/down counter with overflow flags |
| `rtl/sdm_stage.sv` | one first-order requantizer stage |
| `rtl/sdm_ovf_align.sv` | overflow re-alignment and 0→1 detectors |
| `rtl/sdm_diff.sv` | differentiator and overflow adders |
| `rtl/mmd_divider.sv` | /5, /6, /7 divider |
| `rtl/clk_prescaler.sv` | /M input divider |
| `rtl/bbpd.sv` | bang-bang phase detector and retimer |
| `rtl/bb_integrator.sv` | saturating integrator and limiter |
| `rtl/nsd_sampler.sv` | T_d sampling flop |
| `rtl/pfd_model.sv`, `rtl/cp_lf_model.sv`, `rtl/vco_model.sv` | behavioural analog models |
| `tb/tb_<block>.sv` | self-checking testbench of each block |
| `tb/tb_dll_top.sv` | end-to-end test at default parameters |
| `tb/tb_dll_prbs31.sv` | PRBS 2^31−1 retiming at 3.2 Gb/s |
| `tb/tb_dll_prbs7_half.sv` | PRBS 2^7−1 retiming at 1.6 Gb/s, each bit sampled twice |

Every file begins with a comment on what it does and on its timing.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl +libext+.sv -Irtl \
    rtl/dll_pkg.sv tb/tb_dll_top.sv --top-module tb_dll_top -Mdir obj_top
./obj_top/Vtb_dll_top
```

Replace `tb_dll_top` with any other testbench name to run that one. Each
testbench prints a line `TB_RESULT checks=<n> failures=<m>` at the end and
stops itself with a watchdog if something hangs. Modules use
`timeunit 1ps; timeprecision 1fs`, because the analog models need
sub-picosecond delays.

`tb_dll_top` runs at the default parameters and simulates about 180 µs of
loop time in about a second. It runs five phases:

1. **Locking.** The loop locks from reset, through a 0 → 255 wrap.
2. **Synchronous retiming.** 48,000 PRBS-7 bits are retimed with no errors,
   and the output clock is checked to be 3.2 GHz.
3. **Asynchronous mode.** With a 3 kHz faster data stream, about 378,000
   bits are retimed with no errors, while the phase code keeps rotating
   through 255 → 0.
4. **Step size.** The clock phase moves by about 1.22-1.23 ps per code.
   The check accepts 0.8 to 1.2 times the ideal step.
5. **Integer-N mode.** The divider stays at 6 and the clock phase stays
   fixed.

It also counts, and requires, each mechanism at least once: divide by 5 and
by 7, up and down overflow, both commands, both detector decisions and
integrator saturation.

`tb_dll_prbs31` retimes 128,000 bits of PRBS 2^31−1 at 3.2 Gb/s with no
errors. Its input clock has a 35 % duty cycle, to show that only the rising
edges of that clock matter. `tb_dll_prbs7_half` feeds PRBS 2^7−1 at 1.6 Gb/s with the same
1.6 GHz clock. It checks the two interleaved halves of the retimed stream
separately, 128,000 samples with no errors, and checks that no value lasts
only one clock period.

To change the design, use these parameters:

- `N` and `M` on `dll_top`
- the word widths and divider ratios in `dll_pkg`
- `INT_SAT` for the integrator
- `KP`, `KI`, `F0`, `KV` on the models

The unit testbench of each block checks it against an independently written
reference and fails on a deliberately broken copy of the block.
