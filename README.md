# Tunable beat-frequency-detection TRNG built on FPGA clock managers

This is a true random number generator (TRNG) for FPGAs. It turns the jitter of two
on-chip clock synthesizers into random numbers. The design follows the published
architecture "Design Of True Random Number Generation Using Pulsed Clock Generator".
That paper improves the beat-frequency-detection (BFD) TRNG in three ways:

* the two free-running ring oscillators of the classic BFD-TRNG are replaced by two
  Xilinx digital clock managers (DCMs);
* the DCMs' multiply/divide settings can be changed at run time, but only to sets fixed
  at design time;
* a Von Neumann corrector removes bias from the output.

The RTL here covers everything on the FPGA fabric side. The DCMs themselves are vendor
primitives. They sit outside the top module, and the testbenches use a behavioural model
of them.

## The idea: counting beats between two almost equal clocks

DCM-A and DCM-B both take the same reference clock `F_in`. Each multiplies it by M and
divides it by D:

    F_A = F_in * M_A / D_A        F_B = F_in * M_B / D_B

The settings are chosen so that clock A is very slightly faster than clock B:

    T_A / T_B = N / (N + 1)       400 <= N <= 1000

So in the time clock B makes N cycles, clock A makes N + 1. Seen from clock B, the phase
of clock A slides by 1/N of a period each cycle, and comes back to where it started after
N cycles. That is the beat period.

A flip-flop (`bfd_sampler`) samples clock A on every rising edge of clock B. Its output
`q` is therefore a slow square wave: about N/2 cycles high, then about N/2 cycles low.

A counter (`beat_counter`) on clock B does the rest:

* while `q` is low, it counts up;
* while `q` is high, it is held at zero;
* when `q` rises, the value it had reached (its *peak*) is the random number.

Without jitter the peak would always be

    n = floor(T_B / (2 (T_B - T_A))) = floor((N + 1) / 2),

which lies between 200 and 500. The DCM's cycle-to-cycle jitter moves the edges of both
clocks, so the cycle at which `q` changes is uncertain. That makes the peak a random value
spread around n. The low-order bits of the peak carry the entropy.

Near each transition, jitter can also make `q` toggle a few times. This produces short
"peaks" of a few counts between the long ones. This is a property of the mechanism, not
an error. The end-to-end testbench separates the two by magnitude.

Why the paper prefers DCMs to ring oscillators (or PLLs):

* the frequencies of ring oscillators depend on placement and routing, and cannot be
  controlled on an FPGA;
* DCM frequencies are set exactly by M and D;
* DCMs have usable jitter, while PLL outputs are too clean for BFD to work.

## Tuning: the permitted (M, D) sets

The spread of the random values depends on N and on the jitter of the chosen settings.
The generator can therefore be *tuned* by rewriting M and D through each DCM's dynamic
reconfiguration port (DRP). Unrestricted reconfiguration would be an attack surface, so
only a fixed list of sets, chosen at design time, can be applied. Each set must satisfy:

    (D_A * M_B) / (D_B * M_A) = N / (N + 1),
    2 <= M <= 33,  1 <= D <= 32,  400 <= N <= 1000.

The original design stores 23 such sets in a block RAM of 16-bit words (46 bytes) with a
5-bit address. It does not list them.

**What this RTL stores.** `trng_pkg::md_table()` builds the table at elaboration time:

1. It searches every (M_A, D_A, M_B) in lexical order.
2. It keeps a set when N = D_A * M_B lies in 400..1000 and (N + 1) / M_A is a whole
   number D_B in 1..32.
3. It stops after the first 23 sets.

There are 95 such sets in total, so the original 23 were some other selection. This
table is a stand-in that meets the same rule. To use different sets, edit `md_table()` or
replace the `mem` initialisation in `md_rom`.

**Word layout.** The four settings need 4 x 5 bits, which does not fit in a 16-bit word.
So D_B is not stored. The controller recomputes it from `D_B * M_A = D_A * M_B + 1`:

| bits    | field    |
|---------|----------|
| [15]    | 0        |
| [14:10] | M_A - 2  |
| [9:5]   | D_A - 1  |
| [4:0]   | M_B - 2  |

The first set is M_A=14, D_A=15, M_B=27, D_B=29 (N=405, peak about 202). Its word is
`16'h31D9`.

## Reconfiguration sequence (`drp_ctrl`)

The tuning path runs on the DRP clock. It goes `addr_gen` → `md_rom` → `drp_ctrl` → both
DCM DRP ports.

1. `sel_valid`/`sel` loads a set index into `addr_gen`. An index of 23 or more is refused
   with `sel_err`, and the previous index is kept.
2. `drp_req` starts the controller. It reads the word, which takes one cycle because the
   block RAM read is synchronous.
3. It unpacks M_A, D_A and M_B.
4. It computes D_B with an 11-step restoring divider.
5. It checks the set. The division must be exact, D_B must be in 1..32 and N must be in
   400..1000. Otherwise it pulses `tune_err` and touches no DCM.
6. It asserts `dcm_rst_a/b`.
7. It writes DRP register 0x50 of DCM-A with `{M-1, D-1}` and waits for DRDY. It then does
   the same for DCM-B.
8. It releases reset and waits until both `LOCKED` inputs are high.
9. It pulses `tune_done` and shows the applied set on `cur_set`.

The sequence takes about 18 DRP-clock cycles plus the two DRP latencies and the DCM lock time.
Requests that arrive while `tune_busy` is high are ignored. Assertions in `drp_ctrl` check
the DRP rules:

* DEN is a single-cycle pulse;
* writes happen only while the DCMs are held in reset.

The paper says only that the controller uses the standard Xilinx procedure. The
register address, data layout and reset/lock handshake above are those of the Virtex-5
`DCM_ADV` DRP.

## Post-processing: Von Neumann corrector (`vnc`)

The three least significant bits of each peak go through a Von Neumann corrector:

* a bit pair 00 or 11 is discarded;
* a pair 01 or 10 outputs its first bit.

Here each bit position is its own *lane*. Lane i pairs bit i of one peak with bit i of
the next peak. So each pair of peaks gives 0 to 3 output bits, flagged per lane on
`vnc_valid[2:0]` / `vnc_bits[2:0]`. For unbiased, independent inputs that averages 0.75
bits per peak.

**Caution: the lanes are not independent of each other.** If the peaks spread over only a
few counts (for example 201..204), bits 0, 1 and 2 of the same two numbers are strongly
correlated. Concatenating the lanes into one stream then fails a runs test, even though
each lane on its own passes. Use the lanes as separate streams, or use lane 0 alone when
the spread is narrow. Lane 2 produces bits only when a pair of peaks straddles a multiple
of 4.

The paper states the drop/keep rule and that three LSBs are corrected. How the three
bits are paired is this design's choice.

## Clocks and resets

| domain | clock   | contents                                    |
|--------|---------|---------------------------------------------|
| DRP    | `clk`   | `addr_gen`, `md_rom`, `drp_ctrl`            |
| beat   | `clk_b` | `bfd_sampler`, `beat_counter`, `vnc`        |

* Clock A is used only as data, on the sampler's D input.
* The beat domain has its own reset, made by `rst_sync`. The reset is asserted at once
  when `rst_n` is low or either DCM is unlocked, and released two `clk_b` edges later. So
  every retune or enable cycle restarts the counter from a clean state.
* `en` low holds both DCMs in reset, which stops the generator.
* All outputs of the beat domain are synchronous to `clk_b`, and the tuning status outputs
  to `clk`. A system reading random numbers on another clock needs its own crossing, for
  example a small asynchronous FIFO. None is included here.

## Top-level interface (`bfd_trng_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | DRP/system clock, active-low reset |
| `en` | in | 1 | enables the DCMs (low: both held in reset) |
| `sel_valid`, `sel` | in | 1, 5 | load a tuning-set index |
| `drp_req` | in | 1 | apply the selected set |
| `clk_a`, `clk_b` | in | 1 | CLKFX of DCM-A and DCM-B |
| `locked_a`, `locked_b` | in | 1 | LOCKED of the DCMs |
| `rsp_a`, `rsp_b` | in | `drp_rsp_t` | DRDY and DO of each DCM |
| `drp_a`, `drp_b` | out | `drp_req_t` | DEN, DWE, DADDR, DI to each DCM |
| `dcm_rst_a`, `dcm_rst_b` | out | 1 | RST of each DCM |
| `rnd_number`, `rnd_valid` | out | 9, 1 | peak count and its one-cycle strobe (`clk_b`) |
| `rnd_sat` | out | 1 | the peak hit the counter's maximum (511) |
| `vnc_valid`, `vnc_bits` | out | 3, 3 | corrected bits per lane (`clk_b`) |
| `sel_err` | out | 1 | refused index |
| `tune_busy`, `tune_done`, `tune_err` | out | 1 | reconfiguration status |
| `cur_set` | out | `md_set_t` | M_A, D_A, M_B, D_B last applied |

Parameters: `CNT_W = 9` (peak width; 500 needs 9 bits), `VNC_LANES = 3` and
`FF_STAGES = 1` (sampler flip-flops in series).

## Where this RTL departs from, or adds to, the original

* **Tuning table.** The contents are a stand-in, and the word layout and D_B
  recomputation are this design's own (see above).
* **Address generation.** This is only named in the original. Here it is a
  range-checked index register.
* **Peak capture.** The peak is taken at the moment the counter is reset. There is no
  separate sampling clock.
* **Counter overflow.** The counter saturates at 511 and flags it.
* **Reconfiguration safety.** The controller's arithmetic check of every set is an
  addition. So are the DCM reset/lock handling and the beat-domain reset tied to LOCKED.
* **Metastability.** A single sampling flip-flop is the default, matching the resource
  count reported for the original. Raising `FF_STAGES` adds synchronizer stages, at one
  `clk_b` cycle of latency each, and does not change the peak values.
* **Not here.** The DCMs, any output FIFO or bus interface, and any on-line health test
  are not part of this RTL.

## How far it has been checked

Each block has a self-checking testbench that compares against a reference model written
separately from the RTL:

* `tb_md_rom` finds the sets by its own factorisation search;
* `tb_drp_ctrl` uses hand-computed DRP words and three deliberately invalid words;
* `tb_beat_counter` includes low runs longer than 511 cycles.

`tb_bfd_trng_top` runs the whole design at its default parameters with two behavioural
DCMs (`tb/dcm_adv_model.sv`) on a 100 MHz reference with ±10 ps jitter per edge. It checks
the following:

* With set 0 (N=405), the long peaks average 202.4, against the theoretical 202.5.
* After retuning to set 22 (N=608), they average 303.8, against 304.
* The DCMs received the right M/D values.
* An out-of-range index is refused.
* The generator stops and restarts with `en`.
* The corrector's output matches a reference fed with the same numbers.

`tb_tuning_sweep` applies all 23 stored sets in turn through the reconfiguration path.
For each set it checks the DCM settings and `cur_set`, and checks that the mean long peak
is within 5% of N/2. In practice the means land within one count of `(N + 1) / 2` for
every set, from N=405 to N=608.

`tb_trng_stats` collects 1000 corrected bits from each of lanes 0 and 1. It applies the
NIST SP 800-22 frequency and runs tests at p ≥ 0.01, and both lanes pass. These statistics
mostly reflect the behavioural jitter model. They say nothing about real DCM jitter, which
the original characterised in hardware with the full NIST suite.

## Simulating

The testbenches need Verilator 5 with timing support. The DCM model uses picosecond
delays; the RTL has no delays.

    verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
        -Irtl -y rtl -y tb rtl/trng_pkg.sv tb/tb_bfd_trng_top.sv \
        --top-module tb_bfd_trng_top
    ./obj_dir/Vtb_bfd_trng_top

Replace `tb_bfd_trng_top` with any other `tb_*` file to run that test. Every testbench
ends by printing `TB_RESULT checks=<n> failures=<m>`.

## Files

| file | contents |
|------|----------|
| `rtl/trng_pkg.sv` | constants, `md_set_t`, DRP structs, table generator |
| `rtl/bfd_trng_top.sv` | top level |
| `rtl/bfd_sampler.sv` | clock-A-on-clock-B sampling flip-flop |
| `rtl/beat_counter.sv` | beat counter and peak capture |
| `rtl/vnc.sv` | Von Neumann corrector |
| `rtl/addr_gen.sv` | tuning-set index register |
| `rtl/md_rom.sv` | 23 x 16 tuning-set memory |
| `rtl/drp_ctrl.sv` | DCM reconfiguration controller |
| `rtl/rst_sync.sv` | reset synchronizer for the clock-B domain |
| `tb/dcm_adv_model.sv` | behavioural DCM with jitter and DRP (simulation only) |
| `tb/tb_*.sv` | testbenches |
