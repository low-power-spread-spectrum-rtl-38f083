# Spread-spectrum CDMA demodulator back end

This is synthesizable SystemVerilog for the digital back end of a direct-sequence CDMA
receiver for a wideband indoor wireless link. A base station sends many users at once. Each
user's symbols are spread by a 64-chip Walsh code, and the whole signal is then multiplied by a
common 32768-chip pseudo-noise (PN) sequence at 64 Mchip/s. The same PN sequence is also sent
alone, as a pilot tone. The receiver gets 4-bit sign-magnitude I and Q samples from an ADC.

The back end does five jobs:

1. Find where the base station is in its PN sequence (coarse lock).
2. Keep its sampling clock aligned to the chips within a quarter chip (a digital phase-locked
   loop).
3. Despread one user's channel and decode its differential QPSK symbols: 2 bits per 64 chips,
   2 Mb/s.
4. Watch the pilot energy to tell when lock is lost.
5. Optionally scan all PN phases for neighbouring cells.

The architecture follows K. Stone's low-power demodulator design (UC Berkeley, 1995).
"Following the source" below refers to that design. Everything listed as a choice is this
implementation's own.

## Clocking model: one quarter-chip clock

The original chip runs from a 128 MHz oscillator and uses both of its edges. Two toggle flops
make four 64 MHz clocks a quarter chip (about 4 ns) apart. Pass gates pick one of them as the
chip clock, and a chain of dual-edge flops derives the sample clocks from it.

The RTL replaces all of this with **one clock, `clk`, whose period is a quarter chip**: one
period per 128 MHz edge. Every register runs on it.

- The 64 MHz chip clock becomes a one-`clk`-wide strobe. `clkgen` makes `clkx`, the edge of
  the selected phase.
- `clk_detff` delays `clkx` into five strobes:

  | strobe | position after the chip edge | role |
  | --- | --- | --- |
  | `clk_ion_pn` | +1 quarter | control strobe; also the top's `chip_en` output |
  | `clk_ion` | +1 quarter | I on-time sample |
  | `clk_qon` | +2 quarters | Q on-time sample |
  | `clk_ioff` | +3 quarters | I off-time sample |
  | `clk_qoff` | +4 quarters | Q off-time sample |

- Chip-rate logic is enabled by `chip_en`: the PN and Walsh generators, correlators and
  controllers.
- Strobe outputs of chip-rate blocks are levels. They mean something only in a `chip_en`
  cycle.

**Phase steps.**

- **Extend** (switch to the next, later phase A→B→C→D→A): that chip lasts five quarters. The
  switch happens one quarter after the chip edge. Switching at the edge itself would give a
  one-quarter glitch chip.
- **Reduce** (switch to the previous phase): that chip lasts three quarters. Three quarters is
  too short for the correlators, so the correlator edge that ends it is removed
  (`killpulse_l`).
  - A chip starting at a removed edge has no samples, and `dvalid` marks it invalid.
  - The control strobe keeps the edge, so the PN generator stays in step with the transmitter.

Each stalled or killed chip is summed by no correlator: `svalid = dvalid & pnstall_l`.

The quarter counter `qc` is reset by `clkrst`. The whole chip-rate state is reset by `rst_n`
(`RESET_L`), which also selects phase A.

## Data path

```
iin/qin --testmode--> datamux --ion,qon--> 4 x mpcorr (PN taps 0..3) --> updctrl / lock_fsm
                              |          \-> drcorr (PN x Walsh) --> dqpsk_dec --> dq_bits
                              |          \-> acs (own PN generator)  --> rssi_e/rssi_p
                              \--ioff,qoff--> t1t2corr (early/late) --> clkgen (extend/reduce)
regblk: WALSH, THRESA, THRESB, THRESC      pn_gen, walsh_gen     osb: ODATA observation bus
```

- **Samples.**
  - `testmode` turns the input pins into sign-magnitude samples. In normal mode they pass
    unchanged. The test modes accept offset-binary, or two's complement with alternate inputs.
  - `datamux` captures I and Q at the four strobes. At the next control strobe it presents
    them as chip-aligned `ion`, `qon`, `ioff` and `qoff`, with `dvalid`.
- **Correlator core.** `sm_corr` multiplies by ±1 as an XOR into the sign bit (chip value 0 is
  +1, 1 is −1). It adds magnitudes into separate positive and negative carry-save accumulators,
  so no two's-complement sign flips toggle through the adder. At a dump it resolves both
  accumulators and subtracts them. Its result is ready two chips after the window closes.
- **Framing.** Everything chip-rate is framed by `updctrl`:
  - A frame is 1088 counted chips: 17 symbols of 64.
  - The pilot sums use the first 16 symbols (1024 chips). The 17th symbol leaves time for the
    sums and compares.
  - Stalled chips are not counted. The frame counter and the Walsh chip counter therefore agree
    at all times, and an assertion in the top checks this.

## Coarse lock search

Four pilot correlators (`mpcorr`) see the PN at the current chip and delayed by 1, 2 and 3
chips.

- **Per symbol.** Each correlator sums I and Q over each 64-chip symbol and adds the magnitudes
  of 16 symbols. Taking the magnitude per symbol keeps the slow rotation from the oscillator
  offset from cancelling the sum.
- **Compare.** `cmpth_l` goes low when |I|+|Q| ≥ THRESA.
- **At the last chip of a frame** (`valid_data`):
  - If no correlator is over the threshold, the PN and Walsh generators stall 4 chips and the
    next four phases are tried.
  - If correlator *k* is over (the lowest *k* wins), they stall *k* chips. Correlator 0 then
    becomes the on-time one, and the lock state machine goes from 00 to 01 (lock).
- **Worst case.** 8192 frames of 1092 chips: 140 ms at 64 Mchip/s.

## Phase loop

`t1t2corr` computes two pilot energies the same way as `mpcorr`:

- **Late**: from the off-time samples, half a chip after on-time.
- **Early**: from the off-time samples of the previous chip, half a chip before on-time.

Once per frame, while locked:

| condition | action |
| --- | --- |
| \|E_early − E_late\| > THRESC, E_early < E_late (sampling too early) | extend by a quarter chip |
| \|E_early − E_late\| > THRESC, otherwise | reduce by a quarter chip |
| E_early + E_late < THRESB | `t_reset`: lock is lost. `lock_fsm` passes through state 10 (`lockrst`) back to 00, and the search restarts. |

With rectangular chips the loop settles into alternating between the two quarter phases on
either side of the chip centre. This is expected.

The decision uses energies gathered over the previous frame, so each step lands one frame
after the timing it corrects. The loop can follow at most a quarter chip per 1088 chips, about
230 ppm of chip-rate offset. Near that limit the lag matters: if the signal slips a quarter
chip between a measurement and its step, the step can overshoot. The on-time sample then reads
the neighbouring chip for one frame (see `tb_wl_drift` below).

## Data recovery

- `drcorr` correlates on-time I and Q with PN × the user's Walsh code over each symbol.
- `dqpsk_dec` compares each symbol with the previous one:
  - Re = IₙIₙ₋₁ + QₙQₙ₋₁
  - Im = Iₙ₋₁Qₙ − IₙQₙ₋₁
- It slices the phase change by comparing |Re| and |Im|. No division is needed.

| phase change | dibit |
| --- | --- |
| 0° | 00 |
| +90° | 01 |
| 180° | 11 |
| 270° | 10 |

- Ranges are half-open: (−45°, 45°] and so on.
- The first symbol after reset only loads the history.
- `dq_bits`/`dq_valid` give one dibit per 64 chips while locked. The decoded dibit belongs to
  the symbol before the one that is ending.

## Adjacent cell scan

`acs` has its own PN generator. It starts at the PN wrap once lock is held. It then measures the
pilot energy for one frame at each of the 32768 phases, stalling its PN one chip between frames.
It keeps the three largest energies with their phases, sorted, and reports them on
`rssi_e`/`rssi_p` with `rssi_new`. Losing lock aborts the scan. A full scan takes about 0.56 s
of chip time. The top's `ACS_NPHASE` and `ACS_NBLK` parameters shrink it for simulation.

## Registers and pins

**Registers.** Four double-buffered registers are written through `datain`, `addr`, `csl` and
`wrl`. A write happens on a clock with both strobes low.

| addr | register | width | use |
| --- | --- | --- | --- |
| 00 | WALSH | 6 | user's Walsh code |
| 01 | THRESA | 14 | coarse lock threshold |
| 10 | THRESB | 15 | stay-in-lock threshold |
| 11 | THRESC | 15 | phase adjust threshold |

- The chip uses the back halves.
- The back halves copy the front halves while reset is held and at every PN wrap. A new code
  or threshold therefore takes effect on a symbol boundary, the same chip for every register.

**Status outputs.** `lock`, `stall_l`, `cmp_adjust`, `cmp_energy`, `dumprst`, `dump64h`,
`dump1024h`, `stretchsamp`, `clk8`.

**Observation bus.** `odata` (28 bits) shows one of eight groups of internal values, selected by
`omode`:

| `omode` | contents |
| --- | --- |
| 0–3 | the four lock correlators |
| 4 | early/late energies |
| 5 | data correlators, Walsh count and dibit |
| 6 | the extra correlator and state bits |
| 7 | PN state and frame count |

**Extra correlator.** A stand-alone correlator with its own clock and pins: `ec64clk`,
`ecdata`, `ecpn`, `ecw`, `ecdump`, `ecrstdump`.

## Where this departs from, or fills in, the source

- **Clocking** is the quarter-chip model above, not dual-edge flops and gated clocks.
- **CMPTH2/CMPTH3.** The source's pin table and its block diagram disagree on which of the two
  compare outputs is which. The block diagram is followed: the adjust compare is `cmp_adjust`
  and the energy compare is `cmp_energy`.
- **Stay-in-lock threshold.** The source names both register 2 and register 3 for it. THRESB
  (register 2) is used, as the register table says.
- **PN seed.** 16'h2A88 is computed so that the 16-bit LFSR reaches all ones after 32767 steps.
  Feedback is bits 15^13^4^0, shifting towards bit 0, with output bit 0. The all-ones state is
  detected a chip early, and the seed is reloaded after it.
- **Walsh chip** *j* of code *w* is parity(*w* & Gray(*j*)), with chip 0 = +1. The counter
  restarts on the chip after the PN all-ones chip.
- **DQPSK dibit mapping** follows the encoder (0°, 90°, 180°, 270° = 00, 01, 11, 10).
- **Stall chips.** In the source the frame counter keeps running while the PN generator is
  stalled, so up to three invalid chips enter the next sum. Here the counter and the samples
  stop as well, so every frame holds 1088 valid chips. The source's separate correlator-clear
  outputs are replaced by the start-of-symbol and start-of-frame strobes.
- **Lock search ties.** When several correlators pass at once, the lowest-numbered one wins.
  The source does not say.
- **Adjacent cell scan.** The source describes it as a planned block. Its start condition,
  abort on loss of lock and best-three list are choices here.
- **Observation groups.** The source's table of the eight `omode` groups was not available, so
  the grouping is this design's. The observation block is therefore only partly the source's.
- **Widths.**
  - 64-chip sums: 10-bit signed.
  - Pilot energy sums: 13 bits.
  - |I|+|Q|: 14 bits.
  - Early+late: 15 bits.
  - Extra correlator: 13-bit signed result.
- **Not built** (no logic function, or not designed in the source): level converters, clock
  pad and buffer trees, RF/ADC/oscillator, RAKE channel estimation, handoff.

## Verification

Every block has a self-checking testbench in `tb/` with its own reference model. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. The two-state simulator needs everything it
reads to be reset or initialised.

End-to-end tests:

- **`tb_channel`** models the base station:
  - the pilot;
  - one user on Walsh code 5 carrying random dibits;
  - a weaker neighbour pilot 5 chips behind;
  - optionally, more users on other Walsh codes, each with its own random symbols;
  - optionally, a transmitter chip clock that runs fast by a set ratio;
  - rectangular chips, sampled four times per chip.
- **`tb_demod_top`** uses a scan reduced to 8 phases of one symbol. It checks that the receiver:
  - searches;
  - aligns with a 1–3 chip stall;
  - decodes every dibit correctly at exactly one per 64 chips;
  - extends and reduces its phase (one removed edge per reduce);
  - copies a register at the PN wrap;
  - loses and regains lock;
  - finds the own cell at scan phase 0 and the neighbour at phase 5.

  Each mechanism is counted, and one that never happens is a failure.
- **`tb_wl_multiuser`** is a workload test with five users in the cell. The wanted user is on
  code 5. Four others, at half its amplitude, are on codes 12, 19, 26 and 33, and the ADC
  clips their sum. The test checks that lock is found and held, and that every dibit of the
  wanted user decodes correctly at one per 64 chips.
- **`tb_wl_drift`** runs the transmitter's chip clock 20 ppm fast, the oscillator accuracy the
  design is built for. Over 120 frames the signal slides 10 quarter chips. The loop's net steps
  follow the slide, lock is held, and 2033 of 2037 dibits decode correctly. The few errors come
  from the once-per-frame loop: a slip that falls between a frame's measurement and its step
  leaves the sampling point one chip off for a frame. At 100 ppm the same effect costs about 8%
  of the dibits, although lock still holds.
- **`tb_demod_full`** runs the same flow with every parameter at its default: a longer search
  and the start of a full-size scan. The complete 32768-phase scan (about 36 M chips) is
  checked only in the reduced form.

To run one test with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv rtl/demod_pkg.sv \
    tb/tb_channel.sv tb/tb_demod_top.sv --top-module tb_demod_top -Mdir obj -o sim
./obj/sim
```

For a block test, name its testbench instead. `tb_channel.sv` is only needed by the four
end-to-end tests.

**Known lint notes.**

- `regblk` uses the reset synchronously (the back registers copy while it is held). Elsewhere
  the same reset is asynchronous, so Verilator reports a mixed synchronous/asynchronous net.
- Some unused outputs of shared sub-blocks are left open: the delayed PN taps of the scan
  generator, for example.
