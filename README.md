# Multichannel carry-chain TDC with sub-TDL averaging and histogram calibration

A time-to-digital converter (TDC) built from an FPGA carry chain is a very
fine ruler: a hit edge runs along the chain of carry multiplexers, and the
flip-flop behind each tap records whether the edge has passed it when the
sampling clock ticks. The count of passed taps gives the time between the hit
and the clock edge, at a resolution of one tap delay, about 10 ps on a 28 nm
Virtex 7 and 5 ps on a 20 nm UltraScale device. The ruler is badly uneven.
The fast lookahead logic inside every CARRY4/CARRY8 block makes some taps
nearly coincide and others lie far apart. The result is bubbles in the
thermometer code, missing codes, and a large differential nonlinearity (DNL).

This RTL implements a 96-channel TDC that attacks the unevenness in three
steps, each cheap enough to repeat in every channel:

1. **Sub-TDL averaging.** The taps of one line are regrouped into several
   shorter lines, called sub-TDLs. Sub-TDL *j* takes output *j* of every
   carry element. Each sub-TDL has one tap per element, so its taps are about
   four (or eight) tap delays apart and its code is free of bubbles. Each
   sub-TDL is decoded on its own, and the decoded codes are **added**. The
   sum has roughly the fine resolution of the full line, with no zero-width
   bins.
2. **Histogram compensation.** A code density test measures the real width
   of every averaged bin. Each fine code is then mapped to one ideal output
   bin (`BCF_m`), or to two adjacent ones (`BCF_m`, `BCF_c`) when the real
   bin straddles an ideal bin boundary. The mapping happens in hardware while
   the histogram is built.
3. **Binwidth calibration.** A second code density test, run through the
   compensation mapping, gives a weight for each of the two bins
   (`WCF = 1/(DNL+1)`). Every hit then adds its weights instead of 1 to the
   histogram bins.

The four factors (`BCF_m`, `BCF_c`, `WCF_m`, `WCF_c`) are packed into one
word of a small calibration memory. The histogram memory is true dual port:
port A updates the main bin and port B the compensation bin of the same hit.

## Datapath of one channel

```
carry_out ──► tdl_sampler ──► t2oh ×S ──► oh2bin ×S ──► averaged_tdl ──► cal_bram ──► hist_bram
 (CO/O of      D-FF column,    thermometer   one-hot →     sum of the S     factors at     port A: +WCF_m @ BCF_m
  N elements)  regroup into S  → one-hot     binary B_j    codes = fine     address fine   port B: +WCF_c @ BCF_c
               sub-TDLs, hit                  (tap timing
               detect          coarse code ──────────────► event output (coarse, fine)
```

| stage | clock edge after sampling | module |
|---|---|---|
| taps sampled, hit flagged | 0 | `tdl_sampler` |
| one-hot per sub-TDL | 1 | `t2oh` |
| binary code per sub-TDL (`sub_bin`) | 2 | `oh2bin` |
| averaged fine code, event out (`ev_*`) | 3 | `averaged_tdl` |
| calibration factors read | 4 | `cal_bram` |
| histogram bins read, then written back | 5, 6 | `hist_bram` |

**Carry outputs and tap selection.** Every carry element has two outputs
per multiplexer, `CO_j` (carry) and `O_j` (sum). They reach the channel in the
order `C_2j = O_j`, `C_2j+1 = CO_j`, one group of `2*MUX_PER_CARRY` bits per
element. Element 0 is the one the hit enters first. `TAP_MAP` gives one
8-bit entry per sub-TDL, naming which `C_k` of each element feeds it. This is
the "tuned TDL" choice between CO and O: on a CARRY4 only one of the two can
be registered per position. On a CARRY8, where all 16 outputs can be
registered, `TAP_MAP` keeps 8 of the 16. The default maps sub-TDLs 0..3 to
CO0..CO3.

**Hit detection.** A hit is recognised when the sampled first tap (sub-TDL 0,
element 0) differs from its value one clock earlier. Its new value is the hit
level, so rising and falling hit edges are both measured. Each sub-TDL code
is normalised to that level. `t2oh` then marks the boundary between passed
and unpassed taps on N+1 positions, where position 0 means "not yet reached"
and position N means "all passed". `oh2bin` turns the mark into
B_j = 0..N_CARRY. A sub-TDL whose first tap lags the line's first tap may
read 0 on the clock the hit is detected; the sum handles this naturally.
The detector relies on the bubble-free sub-TDL code and has no bubble
correction.

**Fine code range.** With 4 sub-TDLs of 100 CARRY4 elements the averaged code
runs from 0 to 400; with 8 sub-TDLs of 60 CARRY8 elements it runs from 0 to
480. Both fit the 512-entry tables (`tdc_pkg::BIN_AW = 9`).

## Calibration word and histogram update

`tdc_pkg::cal_word_t` is 36 bits, the width of a 512 × 36 block RAM:

| bits | field | meaning |
|---|---|---|
| 35:27 | `wcf_c` | weight for the compensation bin; **0 = no compensation bin** |
| 26:18 | `bcf_c` | compensation bin address |
| 17:9  | `wcf_m` | weight for the main bin |
| 8:0   | `bcf_m` | main bin address |

Weights are unsigned fixed point with 7 fraction bits (`1.0 = 128`, range
0 to 3.99). After compensation the DNL stays above about -0.75, so
`1/(DNL+1)` stays below 4. Histogram bins are 32 bits in the same format:
2^25 hits of weight 1.0 per bin.

The channel has two modes, selected by `cal_en`:

* `cal_en = 0`: **code density mode**. Each hit adds 1.0 at its own fine code.
  The calibration factors are computed from this histogram.
* `cal_en = 1`: **mapped mode**. Each hit adds `wcf_m` at `bcf_m` and, if
  `wcf_c != 0`, adds `wcf_c` at `bcf_c`. A table with all weights 1.0 gives
  the *compensated* TDC. A table carrying the second test's weights gives
  the *calibrated* TDC.

The calibration factors are computed off chip from the dumped histograms and
written through `cal_we/cal_ch/cal_addr/cal_wdata`. This RTL has no on-chip
computation of the factors. The rule for the addresses, with `T[k]` the
cumulative sum of measured bin widths and ideal boundaries at multiples of
the LSB, is:

* A measured bin lying inside one ideal bin maps only to that bin.
* A bin crossing an ideal boundary maps to the ideal bins on both sides.
* The weights are `WCF[k] = 1/(DNL{BCF[k]} + 1)`, with the DNL taken from
  the code density test repeated in mapped mode.

**Histogram timing and dead time.** `hist_bram` reads both bins in the clock
an update is accepted and writes the sums back in the next clock. So it
accepts one update every second clock. A hit arriving while the previous
one is still being written back is not histogrammed, and `ev_drop` pulses
for it. The event output (`ev_valid`, `ev_coarse`, `ev_fine`) still carries
that hit. Because the write always lands before the next read, repeated hits
on one bin need no forwarding. If `bcf_c == bcf_m`, both weights go through
port A. The memories start at zero, as FPGA block RAM does after
configuration. Reading a histogram with the clear flag empties it for the
next run.

## Coarse time, tap timing test and readout

* **Coarse code.** One free-running 16-bit counter on the sampling clock is
  shared by all channels. Its value at the sampling edge travels with the
  hit and comes out as `ev_coarse`. The coarse code is not part of the
  histogram address.
* **Tap timing test.** For channel `tt_ch`, while `tt_en` is high,
  `tap_timing_acc` adds up `B_n − B_n+1` over all hits, for each pair of
  adjacent sub-TDLs (`tt_sum`), and counts the hits (`tt_count`). Feeding
  random hits, `D_n = tt_sum[n] / tt_count` is the mean offset between the
  first taps of sub-TDLs n and n+1, in sub-TDL bins. It shows which CO/O
  outputs are evenly spaced and should go into `TAP_MAP`. Reading `tt_sum`
  as signed needs `$signed(tt_sum[n])`.
* **Histogram dump.** With `acq_en` low, a `dump_start` pulse sends channel
  `dump_ch` over the UART at 8N1, `CLKS_PER_BIT` clocks per bit (868 =
  115200 baud at 100 MHz). The frame is `0xA5`, the channel number, then
  bins 0..511, 4 bytes each, MSB first. With `dump_clr` set, every bin is
  zeroed as it is sent. A dump is 2050 bytes.

## Parameters (top level, `tdc_top`)

| parameter | default | meaning |
|---|---|---|
| `NUM_CH` | 96 | channels |
| `N_CARRY` | 100 | carry elements per line (two clock regions of 50 CARRY4 rows) |
| `MUX_PER_CARRY` | 4 | 4 for CARRY4 (Virtex 7), 8 for CARRY8 (UltraScale) |
| `NUM_SUB` | 4 | sub-TDLs per line (4 on Virtex 7, 8 on UltraScale) |
| `TAP_MAP` | `32'h07_05_03_01` | output `C_k` per sub-TDL, 8 bits each |
| `COARSE_W` | 16 | coarse counter width |
| `CLKS_PER_BIT` | 868 | UART bit time |

UltraScale configuration: `NUM_SUB=8, MUX_PER_CARRY=8, N_CARRY=60` and a
64-bit `TAP_MAP` naming the eight outputs kept. The `NUM_SUB*N_CARRY + 1`
fine codes must fit the 512 table entries; an elaboration-time assertion
checks this.

## What is and is not in the RTL

Implemented: everything from the sampling flip-flops to the UART, for any
number of channels. The defaults give the 96-channel Virtex 7 configuration.

Not in the RTL:

* The carry chains themselves (CARRY4/CARRY8 primitives), together with
  their placement in the two central clock regions. They are the analog part
  of the design and enter as `carry_out`. Single or dual sampling phases
  are also left out.
* The computation of `BCF`/`WCF` from code density histograms. It is done on
  the host.
* The delay generators and oscillators used to test the converter.

Choices made here where no design was given: the line length (100 / 60
elements), the hit detector, the pipeline registers, the 36-bit calibration
word with zero weight meaning "no compensation bin", the 7-bit weight
fraction, the 32-bit bins, the one-update-per-two-clocks histogram with
dropped hits, the shared coarse counter and its width, the host ports, the
UART frame and baud rate, and the on-chip accumulation for the tap timing
test. `TAP_MAP` defaults to the CO outputs; the best choice depends on the
device and should come from a tap timing test.

Expected resolution of the real circuit depends on the device and
placement, not on this RTL: about 10.5 ps per averaged bin on Virtex 7 and
5.0 ps on UltraScale, with DNL within about ±0.1 LSB after calibration.

## Files

* `rtl/tdc_pkg.sv`: widths and the calibration word type.
* `rtl/tdl_sampler.sv`, `t2oh.sv`, `oh2bin.sv`, `averaged_tdl.sv`: front end.
* `rtl/cal_bram.sv`, `hist_bram.sv`: calibration table and histogram.
* `rtl/tdc_channel.sv`: one channel.
* `rtl/coarse_counter.sv`, `tap_timing_acc.sv`, `hist_readout.sv`,
  `uart_tx.sv`, `tdc_top.sv`: shared parts and the top level.
* `tb/tb_<module>.sv`: a self-checking testbench per module.
  * `tb_tdc_top` runs the whole design at 3 channels × 8 elements with a
    fast UART, decoding complete dumps.
  * `tb_tdc_ultrascale` runs the UltraScale configuration (8 sub-TDLs of
    60 CARRY8 elements) on 4 channels.
  * `tb_tdc_full` runs the whole design at the default size. It checks every channel's
    histogram directly in memory, and only the start of a UART dump, since a
    complete dump at 115200 baud takes about 18 million clocks.

The channel and top testbenches model the carry chain themselves. They give
every CO/O output a fixed, uneven arrival time, place hits at random times
before a clock edge, and predict every sub-TDL code, fine code, coarse code
and histogram bin.

## Simulating

With Verilator 5 (two-state; registers that are not reset start at random
values, which the testbenches tolerate):

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_tdc_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/tdc_pkg.sv tb/tb_tdc_top.sv
./obj_dir/Vtb_tdc_top
```

Every testbench ends with a line `TB_RESULT checks=N failures=M` and has a
watchdog. The default-size test (`tb_tdc_full`) runs at about 1,500 clocks
per second and takes a few minutes; the others finish in seconds.
