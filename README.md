# Recirculating delay and multiplier system for a radio interferometer

This is synthesizable SystemVerilog for a correlator that works in two modes
on the same hardware:

* **Continuum**: each antenna's sampled signals go straight through delay lines
  and drivers to a bank of three-level multipliers and integrators. This is the
  plain "one multiplier per product" correlator.
* **Spectral line**: the samples are stored and then read out many times,
  faster than they arrived, through one set of multipliers. Each readout uses a
  different lag, so a few hardware multipliers produce many lag channels. This
  is called a *recirculating correlator*. When the sampling rate is 1/N of the
  100 MHz multiplier clock, each stored block can be read N times. With 4
  hardware lags per correlator, that gives 4N lag channels.

The top, `vla_corr_module`, is one complete correlator module: 27 antennas,
all 351 baselines between them with eight cross multipliers each (2808), four
self multipliers and two sin×cos multipliers per antenna, and an integrator
behind every multiplier.
Sampler outputs go in; integrated correlation coefficients come out through a
host read port. The full instrument uses four such modules, which differ only
in their settings.

## Data path

```
 antenna_front, one per antenna (27):
   samp[a][RS,RC,LS,LC] ─ sampler_mux ─ delay_line ─┬─ rm_card 0 (RS stored, RC flow-through) ─┐
                                                    └─ rm_card 1 (LS stored, LC flow-through) ─┤
                                                                              drivers RS RC LS LC, outputs T1 T2 B1 B2
 cable matrix: 8 cross multipliers per baseline (351) + 4 self and 2 sin×cos multipliers per antenna
 multiplier ─ integrator (2970 of each) ─ host port
 rm_controller (one per module): sample strobes, bank swaps, pass starts, lag per pass, integrate/dump windows
```

All logic runs on one 100 MHz clock (`clk`). Slower rates use clock enables.
Samples are two bits: bit 1 is the sign and bit 0 the magnitude. The three
levels are −1 (`11`), 0 (`x0`) and +1 (`01`). The product of two samples is
−1, 0 or +1.

## The recirculating memory (`recirc_memory`, `ccd_bank`)

One `recirc_memory` handles one bit of the sample. An `rm_card` holds two of
them, one per bit. The memory is built from two equal **memory sets**. One set
is loaded while the other is read, and `swap` exchanges their roles.

Each set is 72 bits wide and 1024 words deep, 73 728 samples in all. The
original sets are eight CCD chips, each with nine 1024-bit shift registers, so
`ccd_bank` reads back in the order it was written. The set is modelled as an
addressed array with sequential pointers.

The load side turns the fast serial stream into wide, slow words:

* Register A is a 6-bit serial register.
* Every sixth sample, A is copied to B.
* B is shifted six bits at a time into the 72-bit register C.
* After twelve groups, C is written to the set as one word.

When the set is full, later samples are refused and flagged on `overflow`.
This happens in every cycle group, because loading takes a little less time
than the cycles it must fit in.

The read side reverses this. Every 72 clocks one word goes into E, which is
eight 9-bit shift registers. Every 8 clocks E puts one bit on each of eight
serial lines. Line *i* carries samples *i*, *i*+8, …, so the eight lines
together carry one sample per clock. A pass through the set takes 73 728
clocks (737.28 µs).

## Lag stepping (`lag_step_gen`)

The eight lines go into eight 1 × 64 RAMs, written one 8-sample word per
strobe. Reading the word written `lag_d` strobes earlier delays the stream by
8·`lag_d` samples, in 80 ns steps.

Two more registers give 40 ns steps. G holds the previous RAM word. H is
loaded with either:

* the current word (`lag_h` = 0), or
* the upper half of G followed by the lower half of the current word
  (`lag_h` = 1), which adds 4 samples.

H then shifts one sample per clock out as τ_m. The total lag is
m = 8·`lag_d` + 4·`lag_h`.

The undelayed stream τ_0 is taken from the same line bits into I and J. Its
latency is matched so that m = 0 puts the same sample on τ_0 and τ_m in the
same clock, 6 clocks after `rd_start`.

In continuum mode the RAMs are not used. The stored input's delay line is fed
serially into H (input Z). A second delay line is fed through I and J
(input Y). Both paths are 8 clocks long.

## Drivers and the tau delays (`driver`)

Each antenna has four drivers, named after the continuum signals RS, RC, LS
and LC. Each driver has four outputs: T1 and T2 (terminated) and B1 and B2
(bridging). Each output is a multiplexer followed by a flip-flop. Flip-flops on
the lag input make τ_(m+1) and τ_(m+2) from τ_(m+0). The chain then passes
τ_(m+1) from the RC driver on to the LS and LC drivers. The four drivers
together therefore provide τ_0 and τ_(m+0…m+3).

In spectral line mode the outputs carry these signals:

| driver | T1      | T2      | B1      | B2      |
|--------|---------|---------|---------|---------|
| RS     | τ0      | τ0      | τ(m+0)  | τ0      |
| RC     | τ(m+0)  | τ(m+1)  | τ0      | τ(m+1)  |
| LS     | τ0      | τ0      | τ(m+2)  | τ0      |
| LC     | τ(m+2)  | τ(m+3)  | τ0      | τ(m+3)  |

In continuum mode all four outputs of a driver carry that driver's signal.

## One cable matrix for both modes (`vla_corr_module`)

The cable matrix is fixed wiring, but the drivers change what they send. Every
baseline is wired the same way, with X the lower-numbered antenna and Y the
higher. A driver's bridging outputs can feed many multipliers, so one antenna's
drivers serve all 26 of its baselines. The wiring below gives the eight continuum products
RS×RS, LS×LS, RC×LC, LC×RC, RS×RC, LS×LC, RC×LS and LC×RS (X first). In
spectral line mode the same wiring gives X τ0 × Y τ(m+n) and Y τ0 × X τ(m+n)
for all four n:

| multiplier | X output | Y output | continuum | spectral line |
|-----------:|----------|----------|-----------|---------------|
| 0 | RS.T1 | RS.B1 | RS×RS | Xτ0 · Yτ(m+0) |
| 1 | LS.T1 | LS.B1 | LS×LS | Xτ0 · Yτ(m+2) |
| 2 | RC.B1 | LC.T2 | RC×LC | Xτ0 · Yτ(m+3) |
| 3 | LC.B1 | RC.T2 | LC×RC | Xτ0 · Yτ(m+1) |
| 4 | RS.B1 | RC.B1 | RS×RC | Xτ(m+0) · Yτ0 |
| 5 | LS.B1 | LC.B1 | LS×LC | Xτ(m+2) · Yτ0 |
| 6 | RC.T2 | LS.T1 | RC×LS | Xτ(m+1) · Yτ0 |
| 7 | LC.T2 | RS.T1 | LC×RS | Xτ(m+3) · Yτ0 |

Each antenna also has four self multipliers. In continuum they measure the
power of RS, RC, LS and LC. In spectral line mode they are autocorrelators
τ0 × τ(m+n), n = 0…3.

The two sin×cos multipliers of each antenna take RS.T1 × RC.T1 and
LS.T1 × LC.T1. In continuum they give RS×RC and LS×LC of the same antenna. In
spectral line mode they repeat the autocorrelation lags m+0 and m+2.

The sampler multiplexers choose what a module stores. Each antenna has its own
`mux_sel`. Bit 0 makes the R delay lines take L. Bit 1 makes the L delay lines
take R. With all antennas set alike, a module correlates R×R or L×L. Setting
antennas differently gives R×L on the baselines between the two groups.
Together with the lag set below, this is how the two-polarization,
four-product and split-band modes are spread over four modules.

## Timing of a memory cycle (`rm_controller`)

Times are in 10 ns clocks.

| quantity | clocks | time |
|---|---:|---:|
| pass through a memory set | 73 728 | 737.28 µs |
| integration per pass | 72 385 | 723.847 µs |
| memory cycle | 74 405 | 744.047 µs |
| memory cycles per valid period | 64 | 47.6 ms of the 50.48 ms valid time |

The controller waits for `di` (data invalid) to fall. It then runs 64 memory
cycles and waits for the next falling edge. Each cycle starts a pass
(`rd_start`).

Integration covers the last 72 385 samples of the pass, delayed by the 9-clock
pipeline. Leaving out the first 1343 samples means no product pairs data from
two different passes. At the end of the window a one-clock `dump` adds each
accumulator into its integrator's lag word for this pass and clears it. The
remaining 2020 clocks of the cycle are the dump time.

The sets swap every R = 2^`recirc_log2` cycles, and pass K uses the lag
m = 4·(K·2^`lag_mult_log2` + `lag_off`). That is m = 4K for one module, and
m = 8K + 4j or 16K + 4j when two or four modules share the lags. Samples are
taken every 2^`samp_log2` clocks, and each is written 2^`rep_log2` times.
Integration starts after the second swap, once the set being read was fully
loaded. Swaps continue across data-invalid gaps, so nothing is lost at the
start of the next valid period.

Settings for the bandwidths (all simulated at full size):

| bandwidth (MHz) | samp_log2 | rep_log2 | recirc_log2 | lags per correlator direction |
|---:|---:|---:|---:|---:|
| 50 | 0 | 0 | 0 | 4 |
| 25 | 1 | 0 | 1 | 8 |
| 12.5 | 2 | 0 | 2 | 16 |
| 6.25 | 3 | 0 | 3 | 32 |
| 3.125 | 4 | 0 | 4 | 64 |
| 0.78125 (2× oversampled) | 5 | 0 | 5 | 128 |
| 0.390625, 0.1953125 | 6 | 0 | 6 | 256 |
| 0.09765625 | 7 | 1 | 6 | 256 |

A 1.5625 MHz setting at 3.125 MS/s with only 16 passes per load is **not**
supported. Loading a set at that rate takes 32 cycles, and a pass always reads
the whole set.

## Reading results

Set `rd_sel` to an integrator and `rd_addr` to a lag word K. `rd_data`
returns the 36-bit signed sum of all dumps into that word. The integrators are
numbered as follows:

* Baselines (i, j) with i < j are numbered b = 0, 1, … in the order (0,1),
  (0,2), …, (0,26), (1,2), …, (25,26).
* Integrator 8b + n is cross multiplier n of baseline b (0 ≤ n < 8).
* Integrator 8·351 + 4a + k is self multiplier k of antenna a.
* Integrator 8·351 + 4·27 + 2a + k is sin×cos multiplier k (RS×RC, LS×LC)
  of antenna a.

Lag word K of cross multiplier n holds the correlation at lag m(K) + n′, where
n′ comes from the table above. A `clr` pulse (and reset) starts a 64-clock
sweep that zeroes every word. No dump may fall inside the sweep. The storage
has no reset of its own, so it can map onto RAM. Status outputs
(`swap_o`, `dump_o`, `overflow_o`, …) show the controller's activity.

## Where this design departs from or adds to the source description

* **Memory controls.** The recirculating-memory controls were left undesigned
  in the source. The whole `rm_controller` is this design's: which samples are
  left out of integration, the one-clock dump, priming after two swaps, and
  the swap schedule.
* **CCD model.** The CCD sets are modelled with separate input and output
  ports, with no tri-state bus. Their minimum shift rate is not modelled; the
  read side pauses 6.77 µs per cycle, within the 9.56 µs a CCD may stop.
* **Sample order and half step.** The order of samples inside a 72-bit word
  and the way G and H make the 40 ns step are this design's.
* **Unspecified sizes.** The delay line depth (256 samples), the integrator
  widths (18-bit accumulator, 36-bit storage) and the 64 lag words per
  integrator are this design's choices.
* **Sampler multiplexers.** The placement of the sampler multiplexers and the
  assignment of driver outputs to multipliers are chosen here. They are
  consistent with the printed continuum product list and with the driver
  wiring for one polarization.
* **Oversampled bands.** For the oversampled bandwidths, the discarding of
  half the channels is left to whoever reads the integrators.
* **Redundant writes.** The number of redundant writes per sample is a
  setting. The published values could not be made consistent with the rest of
  the timing.
* **Multiplier count.** Per module, 2808 cross, 108 self and 54 sin×cos
  multipliers are built, each with an integrator. The redundant second set of
  108 self multipliers is left out.
* **Delay lines inside the module.** In the source the delay lines are
  separate modules shared by the four correlator modules. Here each module
  has its own delay lines in `antenna_front`.
* **Not built.** The analog IF switches and samplers, and the cable matrix as
  a physical part. The four-module system is not written out either; it would
  be four instances of `vla_corr_module` with different settings.

## Files and simulation

`rtl/` has one module per file. `vla_pkg.sv` holds the sample type, mode
enums, timing constants and the three-level product. The top is
`vla_corr_module`; `antenna_front` groups one antenna's chain from sampler
multiplexers to drivers. `N_ANT` sets the number of antennas (default 27).

Each module has a self-checking testbench, `tb/tb_<module>.sv`. The system
tests are:

* `tb_vla_corr_module` runs a two-antenna module at reduced sizes. It covers
  spectral line,
  resynchronization after data invalid, continuum with the multiplexers, and a
  cross-polarization run with interleaved lags. It counts every mechanism.
* `tb_vla_full` runs one full-size load-and-read cycle of the 27-antenna
  module and checks all 2970 integrators. Building it takes about two
  minutes; the run takes about 20 seconds.
* `tb_vla_bandwidths` runs every bandwidth setting on a two-antenna module
  with full-size memories and cycles, in about one minute.

Each system test recomputes every integrator word from the samples that went
into the memories. Example:

```
verilator --binary --timing --assert -Irtl rtl/vla_pkg.sv rtl/*.sv \
    tb/tb_vla_full.sv --top-module tb_vla_full -Mdir obj
./obj/Vtb_vla_full     # prints TB_RESULT checks=N failures=0
```
