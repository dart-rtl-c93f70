# DART: field delay-margin testing with on-die clock shrink

Transistors age in the field: hot-carrier injection (HCI) and bias-temperature
instability (NBTI) make paths slower year by year, until a path that met timing
at production test no longer does. DART (Dependable Architecture with Reliability
Testing) watches this from inside the chip. In each short test slot that the
system grants, it runs the chip's own logic BIST on one or more clock domains
at shorter and shorter release-to-capture intervals. It finds the shortest
interval at which the domain still passes and logs that value. A domain whose
shortest passing interval creeps upward over weeks is losing its timing margin,
and software can act before the chip fails. A temperature/voltage monitor (TVM)
runs alongside, because a hot or under-powered chip is also slow, and the log
must tell aging apart from environment.

This repository is synthesizable SystemVerilog for the on-chip part of that
scheme, at the configuration of the original 90 nm implementation:
- 12 clock domains, the fastest at 300 MHz;
- a 25 MHz DART controller;
- an 8 kB DART memory;
- 40 ps clock-shrink steps;
- five TVMs.

The parts that are analog are behavioural models: the buffer delay chain and
the ring oscillators. The PLL, the processor, the off-chip flash, the log
analysis software and the logic under test are outside the RTL. The
testbenches model the last one.

## How a session runs

```
  processor ──host port──► DART memory (8 kB: test specification + log)
      │ DRTSTART, MENU           ▲
      ▼                          │ reads specification, writes log
  dart_ctrl ── jtag_master ──► jtag_pin_mux ──► tap_ctrl ──► lbist_ctrl ──► TPG/RA per domain
      │   CHIPRESET                 ▲ DRTPIN               └─► mbist_ctrl ──► memory under test
      └── TVM x5 (3 ROs + counters each) ─► tv_estimator
  pll_clk ─► test_timing_generator (divider, clock gating, two delay lines) ─► test_clk[domain]
```

There are three modes:
- **Production test.** DRTPIN is high. The TAP belongs to the JTAG pins, and
  the controller stays idle.
- **User mode.** The controller is idle.
- **DART mode.** The processor first does its part:
  1. saves its state;
  2. copies the specification of the chosen test session from flash into the
     DART memory;
  3. raises DRTSTART with MENU = LBIST or MBIST.

  The controller then takes the JTAG path (`dart_sel`). The processor can no
  longer reach the DART memory, and user writes to the memory under MBIST are
  blocked. This is the write protection of the memories that hold test data.
  At the end the controller pulses CHIPRESET, releases everything and returns
  to idle. The processor restarts, copies the log back to flash and decides
  whether the margin is getting critical.

All BIST control goes through the standard IEEE 1149.1 TAP, the same path a
tester uses in production. A small JTAG engine inside the controller
(`jtag_master`) produces the TCK/TMS/TDI sequences. TCK runs at half the
controller clock: 12.5 MHz.

## Clock shrink: how the test timing is varied

This is the core of the design, and the part most worth reading in the code
(`test_timing_generator`, `ttg_delay_line`, `lbist_ctrl`).

The PLL keeps running at its user frequency. Each test-clock pulse is one high
phase of the PLL clock, gated through a clock-gating latch. The LBIST
sequencer asks for a pulse one PLL cycle ahead (`req_a` or `req_b`). The enable
is taken on the falling PLL edge, so the gated pulse is always a whole high
phase. The two kinds of pulse travel on different paths:
- **Path A** carries the shift, load, unload and *release* pulses. It passes
  the full buffer chain: 63 × 40 ps.
- **Path B** carries the *capture* pulse. It leaves the chain `shrink` taps
  early.

The two paths are ORed into the test clock of the domain under test. The
release and capture requests are issued `div` PLL cycles apart, so

    release-to-capture interval = div × T_pll − shrink × 40 ps

This is 3332 − 40·k ps at 300 MHz and divider 1. A clock divider (`div`) gives
the slower domains their own rate. At 300 MHz with divider 1, codes up to 41
keep the two pulses apart. From code 42 on, the shortened capture pulse runs
into the release pulse, the domain sees one merged pulse, and the test fails.
The search treats that like any other failure. The whole chain must stay
shorter than a PLL period; at 63 × 40 ps = 2.52 ns it does.

Each pattern is launched-on-capture:
1. `chain_len` shift pulses with scan enable high; the response of the
   previous pattern goes into the response analyser (RA) at the same time;
2. one idle PLL cycle while scan enable falls;
3. the release pulse;
4. the shortened capture pulse.

After the last pattern, one more unload is compacted.

The sequencer's control outputs run one PLL cycle behind its requests, so they
are steady when the pulse arrives. The test pattern generator (TPG) is a 32-bit
LFSR (x^32 + x^22 + x^2 + x + 1). A per-chain XOR phase shifter feeds four
chains. The phase-shifter taps are spread unevenly (c, 2c+11, 4c+21). With
equal spacing, neighbouring chains would carry the same stream one clock apart.
That hides every path between them, and a model of the logic under test made
that plain. The RA is a MISR with the same polynomial.

### The search

For each domain, the controller:
1. starts at the shrink code last logged for that domain, so a steady chip
   needs very few trials;
2. runs a trial: all menus and all seeds at that code;
3. after a pass, shortens the interval by one code; after a fail, lengthens it
   by one code;
4. stops at the first change of outcome, or at the end of the code range, or
   after `MAX_TRIALS` trials.

It logs the shortest passing code, whether a pass and a fail were both seen,
and the number of trials. In the end-to-end test, a domain with a 2.0 ns path
passes at code 33 (3332 − 1320 = 2012 ps) and fails at 34. After the path is
aged by 200 ps, the next session moves down to code 28.

## The DART memory

The memory holds 2048 words of 32 bits. Words 0–1791 hold the test
specification written by the processor. Words 1792–2047 hold the log, which
persists across sessions.

LBIST specification:

| word | contents |
|---|---|
| 0 | number of domain entries |
| entry header | [3:0] domain, [7:4] divider, [17:8] chain length, [25:18] number of menus |
| menu header | [15:0] patterns per seed, [23:16] number of seeds |
| then | seed, signature, seed, signature, … |

MBIST specification: word 0 gives the number of groups. Each group then has two
words: the algorithm (0 = MATS+, 1 = March C−), and {last[31:16], first[15:0]}.

Log (offsets from 1792):

| offset | contents |
|---|---|
| +d (d < 16) | last minimum passing code of domain d, bit 31 = valid; also the starting point of the next search |
| +16 + 3t + r | first RO count ever seen for TVM t, RO r (the characterisation) |
| +32 + 3t + r | latest RO count |
| +48 + 3t | dT of TVM t, signed, 1/256 °C; +1: dV, 1/256 mV; +2: chosen intervals |
| +64 + d | [31] pass seen, [30] fail seen, [23:16] trials, [5:0] minimum passing code |
| +96 + g | MBIST group g: {done, fail} |
| +127 | session status |

The signature check works on shifted data. The seed register captures the
signature of the domain under test on Capture-DR. So while the next seed is
shifted in, the signature of the previous seed comes out in the same scan. A
menu costs one scan per seed plus one final scan.

## JTAG instructions

4-bit instruction register; BYPASS = 0xF. The user data registers are:

| code | register | bits |
|---|---|---|
| 0x2 | LBIST configuration {chain_len, patterns, shrink, div, dom} | 40 |
| 0x3 | seed in / signature out | 32 |
| 0x4 | LBIST status {busy, done}; the run request is high while this instruction is loaded | 2 |
| 0x5 | MBIST configuration {alg, last, first} | 34 |
| 0x6 | MBIST status {fail, done}; runs while loaded | 2 |

The TCK-domain registers reach the PLL or controller domain through two-flop
synchronisers on the run request and the status. The configuration and seed
are only read while the synchronised request is high, when they are static.

## Temperature and voltage monitor

Each TVM has three ring oscillators of different types, plus a counter per
ring:
- type 1 is mostly sensitive to temperature;
- type 2 is mostly sensitive to voltage;
- type 3 is mixed.

The controller does the following for each domain:
1. resets the counters;
2. starts the rings;
3. opens the counting window for 256 clocks;
4. stops the rings and reads the 15 counts through `out_select`.

The first counts ever recorded are kept as the characterisation: they take
out process variation. Later counts become differences ΔF1..ΔF3, and
`tv_estimator` solves

    ΔT = a1 ΔF1 + a2 ΔF2 + a3 ΔF3,   ΔV = b1 ΔF1 + b2 ΔF2 + b3 ΔF3

in two passes:
1. A rough pass with one coefficient set picks one of three temperature
   intervals and one of three voltage intervals.
2. A precise pass uses the coefficients of that interval pair (nine sets).

The coefficients are signed Q8.8 parameters. The real coefficients come from
circuit simulation of the real rings. The defaults here are fitted to the
behavioural ring models. With those defaults, a +20 °C step is estimated as
19.3 °C.

## Memory BIST

`mbist_ctrl` runs MATS+ {⇕(w0); ⇑(r0,w1); ⇓(r1,w0)} or March C−
{⇕(w0); ⇑(r0,w1); ⇑(r1,w0); ⇓(r0,w1); ⇓(r1,w0); ⇕(r0)}. It uses solid
backgrounds over an address range, which is one test group. The memory has a
one-clock read latency. A write takes 2 clocks and a read 3, so MATS+ takes
about 12N clocks and March C− about 25N. The group result is held until the run
instruction is removed.

## Files

| file | block |
|---|---|
| `rtl/dart_pkg.sv` | instruction codes, register structs, modes, memory map |
| `rtl/dart_top.sv` | the chip-level wiring; domains under test are ports |
| `rtl/dart_ctrl.sv` | mode machine, session sequencing, timing search, TVM readout, log |
| `rtl/jtag_master.sv` | IR/DR scan engine |
| `rtl/jtag_pin_mux.sv` | JTAG pins vs. controller, DRTPIN override |
| `rtl/tap_ctrl.sv` | IEEE 1149.1 TAP |
| `rtl/lbist_ctrl.sv` | LBIST data registers and PLL-domain pattern sequencer |
| `rtl/lbist_tpg.sv`, `rtl/lbist_ra.sv` | LFSR + phase shifter, MISR |
| `rtl/test_timing_generator.sv` | divider, pulse gating, release/capture paths |
| `rtl/ttg_delay_line.sv` | 64-tap, 40 ps buffer chain (behavioural delays) |
| `rtl/mbist_ctrl.sv`, `rtl/sram_sp.sv` | March engine; single-port RAM (DART memory and memory under test) |
| `rtl/tvm.sv`, `rtl/tvm_ro.sv`, `rtl/tvm_counter.sv` | TVM; ring model; counter |
| `rtl/tv_estimator.sv` | two-pass linear T/V estimate |

Each file starts with a comment on its function, interface and timing. The
comment also says which parts follow the original design and which are choices
made here.

## Simulation

All testbenches are self-checking. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

    verilator --binary --timing --top-module tb_dart_top -y rtl -y tb +libext+.sv \
        rtl/dart_pkg.sv tb/tb_dart_top.sv
    ./obj_dir/Vtb_dart_top

`tb_dart_top` runs the whole design with every `dart_top` parameter at its
default, using 24-flop chains and 8 patterns per seed. It takes a few seconds.
Domains 0 and 2 are replaced by `tb/scan_domain_model.sv`. That model is a
4-chain scan design with one slow path whose capture flop sees the old value
when the capture comes too soon after the launch. The testbench computes every
signature itself, then runs three sessions:
1. LBIST from a stale log: the search goes down for one domain and up for the
   other.
2. LBIST after aging one path and heating the TVMs.
3. MBIST with two groups.

It also checks production-test access through the pins. It counts each
mechanism (passing and failing trials, both search directions, detected aging,
characterisation, T/V estimate, MBIST, write protection, chip reset, pin
access, no stray test clocks) and fails if any never happened.

`tb_dart_full` runs the same test with the original implementation's sizes: scan chains of
300 flops and 64 patterns per seed. It takes about four minutes.

The other `tb/tb_<block>.sv` files test one block each against independent
models, including rate and latency checks:
- pulse interval = div·T − 40·k ps;
- delay-line steps of exactly 40 ps;
- scan time of 2(n+5) clocks;
- request counts and cycle counts of the LBIST sequencer;
- 12N/25N MBIST time.

Verilator needs `--timing` for the behavioural delay line and ring oscillators.

## Capacity against the original targets

The target was 8 kB of DART memory and 200 ms per test slot. The test slot
covers 12 intra-domain and 52 inter-domain tests, spread over six slots. The
assumptions are:
- chains of 300;
- 64 patterns per seed;
- 4 trials per domain;
- a 75 MHz domain clock;
- about 400 controller clocks of JTAG, polling and TVM work per seed-trial
  (measured in the full-size run).

Under these assumptions the intra-domain share of a slot needs at most 349 of
2048 words and 49 ms, with 22 seeds on each of 2 domains. The memory format is
compact because a seed and its signature take two words. Testing all 12 domains
with 22 seeds at 25 MHz in a single slot would take about 850 ms, which does
not fit.

## Limits and departures

- **Intra-domain tests only.** Inter-domain tests are not built: launch in one
  domain and capture in another, with TPGs and RAs of several domains
  initialised together.
- **Per-menu options.** The only option per menu is the pattern count. The
  original also has coverage and low-power options.
- **Smaller instruction set.** There are 5 user instructions. The original
  LBIST has 10 and its MBIST 14.
- **Search step.** The search moves one code per trial and stops at the first
  change of outcome. It does not re-test around the boundary. Delays are not
  normalised by the T/V estimate in hardware; the estimate is logged for
  software.
- **TVM coefficients.** The coefficients are placeholders fitted to the models,
  and all nine precise sets are equal by default. For silicon, load real ones
  through the parameters. The interval limits used here do not overlap.
- **Analog parts.** The delay chain and ring oscillators are delay models. In
  silicon they are standard-cell buffer and gate chains that need layout
  control.
- **One memory under MBIST.** A single 1024-word memory stands for the chip's
  many RAMs.
- **Domain count.** The original design is described as having 12 clock
  domains, but its design overview also lists a domain numbered 13. The RTL
  uses 12 (`N_DOM`), and the 4-bit domain field allows 16.
- **Not modelled.** Boundary-scan isolation of user pins, the PLL and the
  processor's restart handling.
