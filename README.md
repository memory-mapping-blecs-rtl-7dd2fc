# BLECS board register map in SystemVerilog

The BLECS board sits in a beam-loss monitoring crate. It collects the beam
permit and dump signals of up to 16 threshold-comparator (TC) boards, watches
its own high-voltage and low-voltage supplies and its links, and runs the
periodic tests of the detector chain: a system test, consistency and
threshold checks, and an HV modulation test (HVLF) of the 256 ionisation-chamber
channels. Everything it knows or is told goes through one 8 MB address space
seen by the control system. This RTL implements that address space: the
decoder, the four register banks, the counters, timers and alarms behind the
status words, the control logic behind the command words, the collimation
FIFOs, the on-chip tables, and the sine generator that modulates the HV during
the HVLF test.

The register layout (addresses, bit fields, depths, scale formulas) comes from
the board's memory map. The bus protocol, reset values, counter widths where
the map is silent, and the internal structure of every block are choices made
here; they are listed in the "Departures and open points" section.

## Address map

Byte addresses, 24 bits. The decoder (`addr_decoder`) sends each request to
one window and hands on the address relative to the window start.

| Window | Range | Implemented by |
|---|---|---|
| PM SRAM (post-mortem data) | 000000–1FFFFF | external, brought out on `ext_req` |
| BD SRAM (beam dump data) | 200000–3FFFFF | external |
| Xtra SRAM | 400000–5FFFFF | external |
| Flash ROM | 600000–6FFFFF | external |
| LOGIN status bank | 700000–701FFF | `login_regs` |
| TEST RESULTS bank | 720000–721FFF | `test_results_regs` |
| Control registers | 7E0000–7EFFFF | `control_regs` |
| DAB64x control/status | 7F0000–7FFFFF | `dab_csr` |
| everything else | | answers zero |

## Bus

`blecs_top` is a slave with a one-cycle request strobe (`req`, a packed
struct: `valid`, `we`, `addr`, `wdata`). Internal banks answer on the next
clock with `ack` and, for reads, `rdata`; external windows answer whenever
their memory raises `ext_ack`. One request may be outstanding at a time (an
assertion in the top checks this). All accesses are 32-bit words; address
bits 1..0 are ignored. Where the map numbers bytes inside a word, the byte at
the lowest address is bits 31..24 (big-endian, as on VME).

## LOGIN bank: what the control system polls every second

28 read-only words at 700000–70006C. Many are just board signals shown as
they are (the `mon` input struct): system status (operational, under test,
test requested, post mortem, HV fault, energy fault, orbit clock fault, dump),
active tests, result flags of the last test, beam permit lines, beam energy,
HV voltages and currents, VME and analog supply readings. The rest is state
kept in this bank:

* **Seconds** (`time_base`). A prescaler of `CLK_HZ` cycles (40 MHz assumed)
  makes a one-cycle `sec_tick`; 700018 counts seconds since reset.
* **Test timers** (`test_timer`). 700004 and 700008 count down the seconds
  until a normal and a critical system test are due; at zero they raise the
  "timer system test request normal" (bit 6) and "priority" (bit 5) flags of
  700000, whose OR is "timer system test pending" (bit 7). A finished system
  test (`mon.test_done`) reloads both and clears 700010, seconds since the
  last test. The intervals are parameters (`NORMAL_TEST_S` = 20 h,
  `CRITICAL_TEST_S` = 24 h); the map gives no values.
* **Dump bookkeeping** (`dump_logger`). 70001C bits 15..8 and 7..0 count
  unmaskable and maskable dumps since reset (saturating at 255). Each dump
  latches the turn counter (700020) and bunch counter (700024) and clears the
  two "beam info A/B responded to the last dump" flags, which a later response
  pulse sets.
* **Link counters.** 32-bit counts of CTRV frames, CRC errors and timeouts on
  channels A and B and of beam-energy timeouts (70002C–700044).
* **Rate alarms** (`rate_alarm`). More than 5 CRC errors in one second on a
  channel raise `alarm_low`; more than 5 timeouts raise `alarm_medium`. The
  alarm rises at the sixth error and falls at the end of the first second
  that stays within the limit.
* **Supply ripple.** For each of the five low-voltage supplies, bit 31 shows
  its "ok" input and bits 30..0 count how often it fell.
* **HV alarm.** `alarm_hv` is high while any of the eight HV "higher/lower"
  flags (700048, 70004C bits 31..28) is high.

Bits 23..8 of 700000, the pending test requests, come from the control bank
(next section).

## Control bank: test requests and manual control

This is where most of the board's own behaviour lives.

**Test requests (7E0000).** Writing a 1 into bits 31..16 requests, in order:
user system, consistency, threshold-to-BPL, energy and BPBIS tests, then the
expert system, consistency, threshold-to-BPL, energy, BPBIS, BPTC, HVLF, CFC
(100 pA), DAC-reset and GOH-reset tests and expert manual control. Each write
sets pending flags without clearing others. The flags are output on
`pending`, read back in 7E0000 bits 31..16, and shown in the same order as
"pending" bits 23..8 of the LOGIN system word. The test logic clears a flag by
pulsing its bit of `test_ack`; a new request on the same cycle wins.

**Manual control (7E0004).** An expert can force dumps, send an energy value
to a TC, or force the four beam-permit lines (unmaskable A/B, maskable A/B).
Two rules apply:

1. The activation bit (31) is accepted only while the board is under system
   test and manual control is the active test (`manual_allowed`; in the top
   this is LOGIN status bit 30 AND active-test bit 21). It is cleared as soon
   as that condition falls, and until it is set again every field of the
   `manual` output struct is zero. The stored non-activation bits read back
   unchanged.
2. When forcing beam-permit lines, an A line forced true forces its B line
   false (UA over UB, MA over MB).

**Tables and settings.** 7E0008 holds which TC boards are present (bit 31 =
TC 1). 7E000C–7E0018 are read-only BLECF status words (HV, test CFC, DAC
reset, GOH reset; 32 channels each, channel 1 in bit 31). 7E0100–7E011C hold
the 256-channel "connected to a chamber" table. 7E1000–7E13FC is the running
maximum table (256 channels), written by the acquisition side through `rm_*`
and read-only from the bus. 7E1400–7E140C hold the default HVLF settings and
the default HV bias values for normal operation and the three HV tests;
spare bits read zero.

## HVLF modulation

During the HVLF test the HV bias of the detectors is modulated with a slow
sine so that every connected chamber shows a response. `hvlf_modulator`
produces the HV DAC code from the default HVLF control words:

* 7E1400 bits 31..16: bias as a DAC code, HV = 10/2^16 × code × 300 V.
* 7E1400 bits 7..0: digital multiplier, peak amplitude 11.72 V × multiplier.
* 7E1404 bits 15..0: frequency division, F = 10 MHz / 2048 / division.

One DAC step is 3000 V / 65536 = 45.8 mV, and 11.72 V is 3000 V / 256, so one
multiplier step is exactly 256 DAC codes. The output is therefore

    dac_code = bias + 256 × multiplier × sin(2π k / 256),  saturated to 0..65535

with k the sample index. 2048 = 8 × 256 is read as a base rate of
10 MHz / 8 = 1.25 MHz (`BASE_HZ`, reached by dividing the system clock),
divided by the division value to give the sample rate, with 256 samples per
period. A division of 0 counts as 1.

The sine is not stored as data: a 128-entry half-period table is computed at
elaboration with the Bhaskara approximation sin ≈ 4u / (20480 − u),
u = p(128 − p), for p = 0..128 a half-period index. It is within 0.2 % of full
scale of the true sine; the second half period is the first negated. The
generator runs while the board is under system test and the HVLF test is
active; otherwise its phase returns to 0 and the DAC holds the bias. `phase`
steps at each sample, `dac_code` follows one clock later, and `hv_dac_sample`
marks the first clock of each new code. The analog attenuator setting (7E1400
bits 15..8) is passed out unchanged in `defaults[0]`.

The measurement side of the test (amplitude and phase per channel, long-term
sine and cosine factors) is not built: the map gives only where its results
go.

## TEST RESULTS bank

A 522-word dual-port memory at 720000–720827, written and read both by the
bus and by the test logic (`tr_*` ports, word index). The layout the test
logic is expected to follow: HV applied during the CFC, DAC-reset and
GOH-reset tests (720000, 720004); the BPLTC word (720008: TC present in bits
31..16, pass/fail in 15..0, TC 1 in the top bit); HVLF setup (72000C–720018);
HVLF time and overview (72001C–720024); then two words per channel, channel n
at 720028 + 8(n − 1): passed flag, amplitude and phase of the immediate test,
then the long-term sine and cosine factors. Same-cycle writes to one word:
the test side wins.

## DAB64x bank

* Identification: ADC board revision (7F0004), revision letter and date
  (7F0014), FPGA temperature and power-monitor status (7F0018), 64-bit serial
  number (7F003C, 7F0040), all from the `ident` input struct.
* Flash ROM control/status (7F0000) and the PM, BD and Xtra SRAM read
  pointers (7F0050–7F0058, bit 31 full or partial read): read/write
  registers brought out as ports.
* Collimation data (7F0100–7F013C): 16 channels, each a 32-deep FIFO
  (`coll_fifo`) filled through `coll_push`/`coll_data`. A bus read returns the
  oldest value and removes it; an empty FIFO reads 0. A value arriving at a
  full FIFO is dropped and sets its bit in the overflow register 7F0140
  (channel 1 in bit 15, channel 16 in bit 0); writing a 1 clears the bit.
* BLM memories (7FC000–7FC8FF): logging A and B (128 words each), ESL A and
  B (16 each), ADC range (32), thresholds A and B (128 each), held as one
  576-word dual-port memory (`dp_ram`). The acquisition side uses `blm_*`
  with word index 0..575 counted from 7FC000.

## Departures and open points

* The map gives LOGIN and TEST RESULTS two sizes each (701FFF/70FFFF and
  721FFF/72FFFF). The smaller, from the overview, are decoded; the rest reads
  zero. The overview's DAB64x end, printed as 7FFFFFFF, is taken as 7FFFFF.
* Two HVLF frequency formulas disagree: 10 MHz/2048/division for the control
  register and 1 MHz/256/divider for the TEST RESULTS setup word. The
  generator follows the control register. The TEST RESULTS setup words are
  plain memory and do not drive it.
* In 7E0000 bit 16 is listed both as "expert manual control request" and in
  the spare range 16..0; it is taken as the request. The BPLTC word is listed
  from a bit "32"; it is read as bits 31..16.
* Bus timing, word-only access, reset of all registers to zero, write
  handling of read-only words (ignored), clear-on-write-one for the overflow
  register, pop-on-read for the FIFOs, and saturation of the dump counters
  are choices made here.
* The test-interval lengths (20 h, 24 h), the 40 MHz clock, the ripple rule
  (count of falling "ok" edges) and the alarm hold rule are assumptions.
* Not built: the SRAMs and flash (external chips, their windows come out of
  the top); the test sequencer that runs the system, consistency, threshold,
  energy, BPBIS, BPTC and HV tests and fills the results; the analog
  monitoring of supplies and HV. Their signals are ports of the top. The
  "MUX FPGA" index numbers the map gives next to many registers are not used.
* All `mon` inputs are taken as synchronous to `clk`; add synchronisers in
  front of the top if they are not.

## Simulating

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5, from the directory that
holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl rtl/blecs_pkg.sv -y rtl \
        tb/tb_blecs_top.sv --top-module tb_blecs_top
    ./obj_dir/Vtb_blecs_top

Replace `tb_blecs_top` by any testbench name. `tb_blecs_top` runs the whole
design with a 20-cycle second and short test intervals and makes every
mechanism above happen at least once (external windows, spare answers, the
pending link and its acknowledge, manual control refused and accepted, A-over-B
forcing, both rate alarms, the HV alarm, dump logging, supply ripple, both
timer requests, FIFO overflow, memory traffic, HVLF modulation). It fails if
any never happens. `tb_blecs_full` runs the top at its default parameters:
one access per bank, HVLF samples at the real 1.25 MHz rate, and one real
second of 40 MHz clock (about a minute of simulation). The block testbenches
compare against reference models written separately in the testbench
(address table, queue model, shadow memory, real-valued sine).

## Files

* `rtl/blecs_pkg.sv`: window addresses, request struct, `manual_t`,
  `login_in_t`, `dab_ident_t`.
* `rtl/blecs_top.sv`: decoder, banks, HVLF generator, answer merge.
* `rtl/addr_decoder.sv`, `login_regs.sv`, `time_base.sv`, `test_timer.sv`,
  `dump_logger.sv`, `rate_alarm.sv`, `control_regs.sv`,
  `test_results_regs.sv`, `dab_csr.sv`, `coll_fifo.sv`, `dp_ram.sv`,
  `hvlf_modulator.sv`.
* `tb/tb_<module>.sv`: one testbench per module, plus `tb_blecs_full.sv`.
