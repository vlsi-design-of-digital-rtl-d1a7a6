# Hybrid parallel/serial C/A-code correlator for a GPS receiver

A GPS receiver must find out which of the 32 satellites are visible and then stay
locked to each of them. Every satellite spreads its 50 bit/s navigation data with
its own 1023-chip C/A code, sent at 1.023 Mchip/s. So the receiver has to find, for
each code, the one code phase out of 1023 at which the received chips agree with a
local copy. Two classic ways to do it pull in opposite directions:

* A **serial (sliding) correlator** tests one code phase per 1 ms epoch. It is tiny,
  but finding one code can take 1023 epochs, about one second.
* A **parallel correlator** holds a whole epoch of received chips and a whole epoch
  of local code in two 1023-bit shift registers. It tests one phase per chip, so one
  code takes about 2 ms. It is large, and once locked it sits doing very little.

The **hybrid correlator** in this repository uses one parallel correlator only for
the search. When it locks to a code it hands the satellite to one of several small
serial correlators ("channels"), starting that channel already in phase. Then it
moves on to the next code. The channels do the easy job of staying locked and
reading out the data bits. The default build has one parallel correlator and four
channels.

Beside the correlator sits a small **margin scanner**. It is the measurement circuit
used to choose the lock thresholds: it correlates a signal with one code at every
phase in turn and outputs one 10-bit word per phase, for a DAC and an oscilloscope.

## What "correlation" means here

All signals are single bits: the A/D converter delivers one hard-decision chip per
chip period. The correlators XOR received and local chips and count the
**mismatches** over one epoch (1023 chips):

| count over one epoch | meaning                                                  |
|----------------------|----------------------------------------------------------|
| `<= LOW` (384)       | codes aligned, navigation bit 0 (code sent as is)        |
| between the margins  | not aligned (Gold-code cross-correlation gives about 512) |
| `>= HIGH` (639)      | codes aligned, navigation bit 1 (code sent inverted)     |

`corr_threshold` makes this decision. Its outputs are `flag` (locked) and `data`
(the bit); in the parallel correlator the same output is called `comp`. A navigation
bit lasts 20 epochs and always changes at an epoch boundary. So a window that is
aligned to an epoch never straddles a bit change.

The margin values are this design's own choice. With one satellite and no noise the
aligned count is 0 or 1023, and the unaligned counts are exactly 480, 512 or 544.
The testbenches model several satellites received at once as a bitwise majority vote
of their chips. With three satellites the aligned count drops to about 256. The
margins at 3/8 and 5/8 of an epoch leave room for that. Change `TH_LOW`/`TH_HIGH` in
`gps_corr_pkg`, or the `LOW`/`HIGH` parameters, for other signal conditions.

## Clocking

There is one clock, `clk`, at 10.23 MHz: ten times the chip rate. The top divides it
into `chip_en`, high for one clock out of every `CK2_PER_CHIP` = 10. Everything that
moves at the chip rate (shift registers, code generators, counters) is clocked by
`clk` and enabled by `chip_en`. The ten fast clocks inside a chip are what let the
parallel correlator count 1023 bits with a small adder (see below). Reset `rst_n` is
asynchronous and active low. After reset the parallel correlator starts filling with
PRN 1 and every channel is idle.

The received chip `rx` is taken to be in step with the local chip clock. In a real
receiver a code-tracking loop (a PLL, not part of this RTL) makes that true.

## C/A code generator (`ca_code_gen`)

Two 10-stage LFSRs start in the all-ones state: G1 = 1 + x^3 + x^10 and
G2 = 1 + x^2 + x^3 + x^6 + x^8 + x^9 + x^10. Code *i* is G1 stage 10 XOR two G2
stages chosen per PRN: the standard phase-selector table, e.g. stages 3 and 8 for
PRN 31. All 32 codes come out at once on a 32-bit bus, and a 32-to-1 mux indexed by
a 5-bit PRN number picks one (index 0 = PRN 1). `epoch` is high while the generator
shows chip 0, i.e. when G1 is all ones. `restart` goes back to chip 0.

## Serial correlator (`serial_correlator`, `serial_clock_control`)

Each chip, the received chip is XORed with the local code chip and a counter adds
up the mismatches. On the local epoch chip the count of the epoch just finished is
latched, and the threshold turns it into `flag` and `data`. If the result is "not
locked", the clock control masks one step of the generator. The local code then
falls one chip behind, so the next epoch tests the next phase. Once locked, the
generator runs freely and the channel yields one data decision per epoch.

* The step that is masked is the one on the chip *after* the epoch chip, not the
  epoch chip itself. At that point the lock decision for the epoch just ended is
  already in the latch, so a slip never uses an old result. An epoch with a slip
  spans 1024 received chips, hence the 11-bit counter.
* The first result comes one epoch after `start`, and `settling` is high until then.
* Stand-alone use (`SEARCH_ALL_PRN = 1`): after 1023 slips without a lock the
  correlator moves on to the next PRN. The hybrid's channels use
  `SEARCH_ALL_PRN = 0` and keep the PRN they were given. If such a channel loses its
  satellite, it drops `flag` and slides on that PRN.

## Parallel correlator (`parallel_correlator`)

```
 rx ──► [ upper 1023-bit SR, clocked every chip ] ──┐
                                                    XOR x1023 ──► 1023-bit adder ──► threshold ──► comp
 generator ─► 32:1 mux ─► [ lower 1023-bit SR ] ────┘          (8 steps of clk)
                   ▲ 5-bit PRN counter
```

For each PRN the lower register goes through two modes (`pc_mode_e`):

1. **Sliding** (`PC_SLIDING`): for 1023 chips the lower register and the generator
   are clocked, which fills the register with one complete epoch of the code. The
   generator stops at chip 0.
2. **Stationary** (`PC_STATIONARY`): the lower register is held and the received
   chips slide past it. Each chip is one new alignment. The alignment made by the
   last fill chip is the first one tested, so 1023 alignments take 1023 chips and a
   whole code takes 2045 chips (2.0 ms).

When `comp` rises in stationary mode, the upper register holds exactly one received
epoch. So **the next received chip is chip 0 of that satellite's epoch**. The
hand-off relies on this fact. With `HYBRID = 1` the correlator pulses `found`,
advances the PRN counter and refills. With `HYBRID = 0` (a plain parallel
correlator) it enters `PC_TRACKING`: both registers are clocked in step, and it
stays there. The alignment counter is brought out as `shift`: at `found` it gives the
measured offset, in chips, between the received epoch and the stored one. If 1023
alignments pass without `comp`, it moves to the next PRN. After
PRN 32 it goes back to PRN 1. One sweep of all 32 codes takes 32 x 2045 chips =
64 ms.

### The 1023-bit adder (`bit_adder_1023`, `ml_parallel_adder`)

A full 1023-input ones counter would be large. Instead the 1023 XOR outputs, padded
to 1024, go to 128 8-to-1 muxes: mux *j* sees bits 8j..8j+7. A 3-bit counter steps
all the muxes together through positions 0..7, one per fast clock. Each step, the
128 mux outputs are counted like this:

* 127 of them go through the **multi-level parallel adder**, a tree of six levels:
  32 one-bit full adders, 16 two-bit adders, 8 three-bit, 4 four-bit, 2 five-bit and
  1 six-bit adder. The operands are 64 bits. Each adder's carry-in takes one more
  input bit (32 + 16 + 8 + 4 + 2 + 1 = 63), so the 127 bits are counted into a 7-bit
  sum with no extra logic.
* The 128th bit enters the **10-bit accumulator adder** as its carry-in.

The accumulator starts from zero on the first step. The eighth step's adder output
goes straight into the synchronous output buffer, `count`.

Cycle plan inside one chip (10 fast clocks; `t` = the clock with `chip_en`):

| clock | action                                                         |
|-------|----------------------------------------------------------------|
| t     | shift registers take the new chip                              |
| t+1   | adder `start`: step 0 (mux position 0, accumulator from zero)  |
| t+2…t+8 | steps 1–7                                                    |
| t+9   | `count` valid, `count_done`; `comp`, `found` decided           |
| t+10  | next `chip_en`: the chip sampled here is chip 0 of a found code |

The count is ready 880 ns after the chip edge, within the 977.5 ns chip. An
assertion checks that a chip never starts while the adder is busy. That is why
`CK2_PER_CHIP` must be at least 10.

## Hand-off and mapping (`hybrid_correlator`)

In the clock where `found` is high, the top scans the channels. A channel is free
when its `flag` is 0 and it is not settling. A channel started less than an epoch
ago has `flag` 0 but is not free. The lowest-numbered free channel gets `start`,
together with the parallel correlator's current 5-bit PRN index. `start` restarts
that channel's generator at chip 0. At the next `chip_en` the channel compares chip
0 of its code with the received chip 0 of that satellite's epoch: it starts in
phase. After one epoch the channel raises `flag`, with no slips, and from then on
yields a data bit every epoch. Meanwhile the parallel correlator has gone on to fill
the next code.

Two rules here are this design's choices, not part of the published scheme:

* If no channel is free, the lock is dropped and `no_free` pulses.
* A PRN that is already being tracked is not excluded from the search. When the
  sweep comes round to it again (every 64 ms), it is handed to another free channel.
  A system that wants one channel per satellite should compare `par_prn` with the
  locked channels' `ch_prn` before accepting the hand-off.

## Margin scanner (`margin_scan`)

This block is a serial correlator that never locks. Each epoch it outputs the
mismatch count `word` at one code phase, then holds the code for one chip to move to
the next phase. The held chip is not counted. So each word compares exactly 1023
chips at one phase and fits 10 bits, and the pattern repeats every 1023 words.
`shift` is the lag of the local code, in chips. With `chip_en` tied high at 50 MHz
it gives about 48.8 k words/s. In the top it has its own inputs (`scan_chip_en`,
`scan_prn`, `scan_rx`) and outputs (`scan_word`, `scan_shift`, `scan_valid`), and
shares only the clock and reset.

## Parameters

| module                | parameter        | default | meaning                                          |
|-----------------------|------------------|---------|--------------------------------------------------|
| `hybrid_correlator`   | `N_CH`           | 4       | serial tracking channels                         |
|                       | `CK2_PER_CHIP`   | 10      | fast clocks per chip (>= 10)                     |
|                       | `LOW`, `HIGH`    | 384, 639| lock margins on the mismatch count               |
| `parallel_correlator` | `N`              | 1023    | shift-register length (one epoch)                |
|                       | `HYBRID`         | 1       | 1: hand off and move on; 0: track after lock     |
| `serial_correlator`   | `CNT_W`          | 11      | epoch counter width                              |
|                       | `SEARCH_ALL_PRN` | 1       | step to the next PRN after 1023 slips            |
| `bit_adder_1023`      | `N_BITS`, `LEVELS`, `STEPS`, `ACC_W` | 1023, 6, 8, 10 | vector width, adder-tree levels, mux steps, accumulator width |

The code length, PRN count and margins live in `rtl/gps_corr_pkg.sv`.

## Size

After generic synthesis the default top has about 2,390 flip-flops. 2,046 of them
are the parallel correlator's two shift registers. The 1023-bit adder needs only 25
flip-flops: the 3-bit step counter, the accumulator and the output buffer. Each
serial channel needs about 60 flip-flops. This is the trade-off the hybrid
exploits: a further tracking channel costs about 3 % of the search engine.

## How far to trust it, and where it departs from the original scheme

The structure follows the published hybrid correlator closely:

* the G1/G2 generator;
* the serial correlator's XOR/counter/latch/threshold chain, and clock control that
  slips one chip per epoch;
* the parallel correlator's two shift registers, XOR net, sliding and stationary
  modes, 5-bit PRN counter and 32-to-1 mux;
* the 8-step, 128-mux, six-level-adder ones counter with its 10-bit accumulator and
  output buffer;
* the flag scan and PRN mapping of the hand-off.

These points are this design's own:

* **Margin values** (384/639): the scheme has two margins but fixes no numbers.
* **Adder input count**: the six-level adder counts 127 bits, not 128. The 128th mux
  output goes to the accumulator carry-in, and the tree's result is 7 bits wide
  (a 6-bit adder plus its carry-out).
* **Clock gating** is replaced by clock enables: one 10.23 MHz clock plus `chip_en`.
  The serial clock control masks the generator step one chip after the epoch mark,
  not at the mark.
* **End of a search**: the PRN counter also advances after a search with no lock,
  and wraps round. A plain parallel correlator (`HYBRID = 0`) never leaves tracking.
* **Busy channels**: channel choice is lowest index first, settling channels count
  as busy, and locks found with no free channel are dropped.
* **Bit-level interface**: there is no carrier, no Doppler search and no code-rate
  tracking. The received signal is assumed to be hard-decision chips at exactly the
  local chip rate.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. The reference C/A codes in
`tb/tb_gps_pkg.sv` are built another way: G1(t) XOR G2(t − d), with the standard
G2 delay d of each PRN. The first ten chips of PRN 1–10 are also checked against
their published octal values. The package also models the sky: satellites with a
code offset and navigation bits, combined by majority vote.

| testbench                 | what it checks |
|---------------------------|----------------|
| `tb_ca_code_gen`          | all 32 codes over two epochs, epoch mark, hold, restart |
| `tb_corr_threshold`       | every count against both margins, with and without `valid` |
| `tb_serial_clock_control` | slip exactly one chip after an epoch when unlocked; none when locked |
| `tb_ml_parallel_adder`    | corner and random vectors against a popcount |
| `tb_bit_adder_1023`       | 600 vectors, one per 10-clock chip; sum and the 8-clock latency |
| `tb_serial_correlator`    | lock after exactly the required slips; epoch alignment and data bits; loss of lock; PRN change after 1023 slips |
| `tb_parallel_correlator`  | three satellites; 2045 chips per absent code; finds only present PRNs, at the epoch boundary, with the right data bit; tracking mode holds |
| `tb_margin_scan`          | one aligned phase per 1023, at the predicted lag; cross-correlation band 480–544; inverted data gives 1023 |
| `tb_hybrid_correlator`    | the whole top at default parameters (see below) |
| `tb_search_sweep`         | the whole top at default parameters over a full sweep: PRN 1, 17 and 32 present, 32 codes tried in order within 64 ms, duplicate hand-off and `no_free` in the second sweep |

`tb_hybrid_correlator` runs the top with no parameter overrides and 20-epoch
navigation bits. It uses three satellites (PRN 2, 5, 7), and later replaces PRN 5
with noise. It checks:

* the code sweep timing;
* each hand-off: the lowest free channel, at the epoch boundary, with the right PRN;
* each channel's lock exactly one epoch after its hand-off;
* epoch alignment and the data bits of every channel;
* loss of lock and the slips that follow it;
* the margin scanner running beside the correlator.

It counts each mechanism (code switch, sliding and stationary modes, hand-off, busy
channel skipped, lock, data 0 and 1, loss, slip, scan) and fails if any of them
never happens. It takes about a second.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    --top-module tb_hybrid_correlator -y rtl -y tb +libext+.sv \
    rtl/gps_corr_pkg.sv tb/tb_gps_pkg.sv tb/tb_hybrid_correlator.sv
./obj_dir/Vtb_hybrid_correlator
```

Replace the top-module name and the last file to run another testbench.
`tb_gps_pkg.sv` is needed by every testbench that uses reference codes.

## Files

* `rtl/gps_corr_pkg.sv` – constants, PRN type, mode enum, G2 tap table
* `rtl/ca_code_gen.sv`, `rtl/corr_threshold.sv` – shared building blocks
* `rtl/serial_clock_control.sv`, `rtl/serial_correlator.sv` – serial correlator
* `rtl/ml_parallel_adder.sv`, `rtl/bit_adder_1023.sv` – the 1023-bit ones counter
* `rtl/parallel_correlator.sv` – search correlator
* `rtl/margin_scan.sv` – threshold-margin scanner
* `rtl/hybrid_correlator.sv` – top
* `tb/` – testbenches and the reference/sky-model package
