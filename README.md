# INIS1 digital core: a 100-channel wireless neural stimulator

This is synthesizable SystemVerilog for the digital part of an implantable
stimulator chip. The chip sits on the back of a 10 x 10 penetrating electrode
array and drives each of the 100 electrodes with biphasic constant-current
pulses: a cathodic (sinking) phase, a short gap, then an anodic (sourcing)
phase of the same charge. Each electrode has its own amplitude, phase
duration, interphase gap and repetition rate, and it can be switched on or
off at any time.

The chip has only two external parts: a coil and a supply capacitor. The
2.765 MHz carrier on the coil gives it power and clock. Commands arrive as
amplitude-shift keying (ASK) of that same carrier. The digital core therefore
has three jobs:

1. derive a clock from the carrier;
2. decode commands and write them into the addressed electrode's registers;
3. time every electrode's pulses on its own, while making sure that **no two
   electrodes ever drive current at the same time**.

The last job keeps the power dissipated in tissue bounded. It is done by a
token that circulates through the 100 sites. This token ring is the part of
the design that most affects behaviour, so most of this document is about it.

## Structure

```
coil_clk ──► clk_div2 ──► sys_clk (1.38 MHz) ──► everything below
por_n ─────► 2-flop reset release ──► rst_n

cmd_bit, cmd_strobe ──► master_fsm ──► write bus (req, addr, reg, data) ──┐
                              ▲                                          │
                              └──────────── wr_ack (OR of sites) ◄───────┤
rep_timebase ──► rep_tick (every 8192 clocks) ──────────────────────────┤
                                                                         ▼
                         stim_array: 100 × stim_site, token ring 0→1→…→99→0
                           stim_site = site_regs + site_fsm + token_cell
                                       + site_counter (phase timer)
                                       + site_counter (repetition counter)
                                         │
                    per site: dac_code[7:0], cath_en, anod_en ──► analog cell
```

| Module | Role |
|---|---|
| `inis1_pkg` | widths, register-select enum, command and parameter structs, phase enum |
| `inis1_top` | the core: clock divider, reset release, master FSM, timebase, array |
| `clk_div2` | carrier / 2 → 1.38 MHz system clock (725 ns period) |
| `master_fsm` | frames command bits, writes one register of one site, four-phase handshake |
| `rep_timebase` | one-clock tick every 8192 system clocks (5.94 ms) |
| `stim_array` | 100 sites, address decode, acknowledge OR, the token ring |
| `stim_site` | one site's digital logic |
| `site_regs` | amplitude (8 b), duration (9 b), interphase gap (9 b), repetition (9 b) |
| `site_fsm` | the site's controller: register writes, repetition tracking, pulse sequence, token hold |
| `token_cell` | one flip-flop stage of the token ring |
| `site_counter` | loadable down-counter; used as the phase timer and as the repetition counter |

## Units and ranges

Every time in the design is a count of 725 ns system clocks. Every period is a
count of 5.94 ms repetition ticks.

| Register | Width | Meaning | Range |
|---|---|---|---|
| amplitude | 8 | current in 1 µA steps (DAC 0.1 µA steps × 10 in the output stage) | 0 – 255 µA |
| duration | 9 | length of each phase, in clocks; 0 and 1 act as 2 | 1.45 – 370 µs |
| interphase gap | 9 | same scale as duration; 0 and 1 act as 2 | 1.45 – 370 µs |
| repetition | 9 | bit 8 = site on; bits 7:0 = period in ticks; period 0 = off | 5.94 ms – 1.51 s (168 – 0.66 Hz) |

The 8192-clock tick is inferred from the rate limits. 8192 × 725 ns = 5.94 ms.
One tick gives 168 Hz and 255 ticks give 0.66 Hz, matching the chip's stated
range and its "6 ms" resolution. A 9-bit phase register gives a maximum of
511 clocks = 370.5 µs. The minimum of 1.45 µs is exactly two clocks, which is
why values below 2 are stretched to 2.

## One site's pulse

A site is in one of four phases: `PH_IDLE`, `PH_CATH`, `PH_INTER` or
`PH_ANOD`. The phase register is Gray coded (00, 01, 11, 10), so each step
of the sequence changes one bit. `cath_en` and `anod_en` are decoded from
it and drive the two switch transistors of the output stage. They therefore
never glitch, and they are never both high (there is an assertion for this).

**Repetition.** The repetition counter is a `site_counter` clocked by
`rep_tick`. It is reloaded with `period − 1` while the site is off and in the
site's first clock on. After that it counts down one per tick. The tick on
which it reaches zero sets the site's `due` flag and reloads the counter. The
first pulse is therefore due one full period after the site is switched on.
If `due` is still set when the period expires again (the token did not come
round in time), that pulse is simply delivered once. Pulses are not queued.

**Firing.** Say the token reaches a site at clock *t* and `due` is set. Then:

| clocks | what happens |
|---|---|
| *t* | `hold` goes high; amplitude and duration are latched; `due` clears |
| *t*+1 … *t*+D | cathodic phase, `cath_en` = 1 |
| *t*+D+1 … *t*+D+I | interphase gap |
| *t*+D+I+1 … *t*+2D+I | anodic phase, `anod_en` = 1; `hold` drops in the last clock |
| *t*+2D+I+1 | the next site holds the token |

A site therefore keeps the token for 1 + 2D + I clocks when it fires, and
for 1 clock when it does not. Amplitude and duration are latched at the start
of the pulse. A register write during a pulse therefore cannot make the two
phases carry different charge. The gap length is read when the gap begins.

**Register writes.** `site_fsm` also handles the write handshake. A request
with this site selected writes the register bank once (`regs_we` is a
one-clock strobe). `wr_ack` is raised the next clock and held until the
request drops. Writes may arrive at any time, including during a pulse.

## The token ring

One token exists, held in the `token_cell` flip-flop of exactly one site.
Site 0 holds it after reset. Each cell computes

```
have_token(next) = token_in | (have_token & hold)
token_out        = have_token & ~hold
```

and site *i*'s `token_out` feeds site *i*+1 (site 99 feeds site 0). This has
the following consequences, all checked by the testbenches:

* With nothing due, the token advances one site per clock and goes round
  all 100 sites in 100 clocks (72.5 µs). A due pulse therefore waits at
  most about 100 clocks for the token.
* A site only fires while it holds the token, so at most one electrode
  drives current at a time. `stim_array` asserts that the token is one-hot.
* When two sites are due together, the second starts its cathodic phase two
  clocks after the first one's last anodic clock.
* The ring is also the limit on rate. If every site is on with maximum
  duration and gap (511 clocks each), a round of the ring takes
  100 × 1534 = 153 400 clocks = 111 ms. Each electrode then fires about
  9 times per second, however short its programmed period. The published
  figure for this case is 9.1 pulses/s. The arithmetic above gives 9.0,
  because the extra clock per site and the 370.5 µs maximum add up.
* Ring order follows site address order. Physically neighbouring rows are
  therefore linked end to start, not in a serpentine.

## Commands

The master FSM sees the ASK demodulator's output as one bit per
`cmd_strobe`, synchronous to the system clock. The frame is this design's
own choice:

```
idle: 0 ... 0 | start: 1 | addr[6:0] | reg[1:0] | data[8:0]     (MSB first)
reg: 0 = amplitude (data[7:0]), 1 = duration, 2 = interphase gap, 3 = repetition
```

After the last bit the master holds `wr_req` with the decoded fields until
the addressed site acknowledges. It then drops the request and waits for the
acknowledge to drop. Only after that does it accept a new frame. With a
one-clock acknowledge a write takes four clocks after the last bit. Bits that
arrive during a write are ignored, and `cmd_busy` is high while a write is in
progress. A frame that addresses a site ≥ 100 is dropped and `cmd_error`
pulses. Without this, no site would ever acknowledge and the master would
hang. `cmd_done` pulses when a write completes.

## Outside the RTL

These parts of the chip are analog. They appear here only through the top's
ports:

* **Rectifier, 5 V regulator (±2.5 V rails) and bias generator.** These have
  no logic function. `por_n` stands in for the supply coming up.
* **Carrier comparator.** It squares the coil voltage into `coil_clk`.
* **ASK demodulator.** It supplies `cmd_bit` and `cmd_strobe`.
* **Per site, the analog cell:**
  * an 8-bit MOSFET R-2R DAC, 0.1 µA per code, driven by `dac_code`;
  * a wide-swing cascoded output stage that multiplies the DAC current by
    10, and sinks it (`cath_en`) or sources it (`anod_en`) through its two
    switch transistors;
  * a subthreshold OTA buffer that trickles up to ±235 nA into or out of
    the electrode to remove residual charge imbalance. It has no digital
    control.

`dac_code` holds the last pulse's amplitude between pulses. The output stage
passes current only while `cath_en` or `anod_en` is high.

For simulation, `tb/stim_cell_model.sv` models the DAC and output stage
with real numbers: electrode current = ±10 × 0.1 µA × `dac_code`, negative
while cathodic. The charge-recovery amplifier is left out of the model.

## How far to trust it, and where it departs

The following follow the published chip:

* the 10 × 10 array and its one master FSM;
* the four per-site registers and their widths;
* the active bit in the repetition register;
* the 725 ns timing resolution;
* the carrier divided by two;
* the token rule ("fire only with the token, pass it at once when done,
  otherwise pass it after one clock");
* the master waiting for each site's acknowledge.

The following are this design's own choices, because the published
description does not specify them:

* the command frame, the register-select code and the bad-address handling;
* the four-phase handshake;
* the 8192-clock tick, and one prescaler shared by all sites instead of one
  per site;
* the two-clock minimum phase;
* cathodic phase first;
* latching amplitude and duration per pulse;
* the repetition edge cases (first pulse one period after switch-on, no
  queued pulses, period 0 = off);
* the reset: registers cleared and every site off, plus a two-flop reset
  release;
* ring order by address;
* `cmd_bit`/`cmd_strobe` taken as already synchronous to the system clock.

The design was checked by simulation only. It has not been checked against
silicon measurements or a gate-level netlist.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

| Testbench | What it shows |
|---|---|
| `tb_clk_div2` | output low in reset, then exactly carrier / 2 |
| `tb_rep_timebase` | tick spacing at prescale 7 and at the default 8192 |
| `tb_site_counter`, `tb_site_regs`, `tb_token_cell` | random traffic against reference models |
| `tb_site_fsm`, `tb_stim_site` | handshake and single write strobe; phase lengths; latched amplitude; two-clock minimum; period; waiting for the token in a modelled 10-site ring; switching off; writes to another site ignored |
| `tb_master_fsm` | 60 random frames decoded exactly once each against a site model with random acknowledge delays; bad addresses dropped; bits during a write ignored |
| `tb_stim_array` | 2 × 3 array: idle token advances one site per clock, one-hot token, no two sites active, back-to-back hand-over, per-site amplitudes and phases |
| `tb_inis1_top` | full-size core from carrier and command bits. It programs two electrodes (75 µA, 370 µs, 30 µs gap, 84 Hz; 150 µA, 200 µs, 200 µs gap, 168 Hz) plus a minimum-phase site, then switches that site off. Through the analog cell model it checks that each pulse peaks at the programmed µA and carries zero net charge. It counts each mechanism: write, bad address, idle pass, hold, back-to-back, waiting for the token, minimum phase, switch-off, balanced pulse |
| `tb_all_sites_max` | all 100 sites at maximum duration and gap: every site's pulses exactly 153 400 clocks apart (8.99 pulses/s), never two at once |

The testbenches run at the full default size. The two full-chip ones take a
few seconds. To run one with Verilator:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb \
  rtl/inis1_pkg.sv tb/tb_inis1_top.sv --top-module tb_inis1_top -o sim
./obj_dir/sim
```

Replace the testbench name to run another. For a lint of the core, use
`verilator --lint-only -Wall -Irtl -y rtl rtl/inis1_pkg.sv rtl/inis1_top.sv`.
`inis1_top` takes `ROWS`, `COLS` and `PRESCALE` as parameters for smaller
arrays or faster repetition in simulation.

The two lint warnings that remain are expected:

* `SYNCASYNCNET` on the reset-release flip-flops. They are meant to be reset
  asynchronously and released synchronously.
* Unused counter values inside `stim_site`. Only the counters' zero flags
  are needed.
