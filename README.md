# Duplicate-with-compare with a histogram smart detector

Triple modular redundancy (TMR) masks any single fault, but it costs three
copies of the circuit plus voters. Duplicate-with-compare (DWC) costs two copies
and a comparator. It can only *detect* a disagreement, though: it cannot say which
copy is wrong. This design adds a small **smart detector** to a DWC pair. When the
two copies disagree, the detector guesses which copy is fault free and routes that
copy to the output. The guess is statistical. Many signals have a strongly
non-uniform value distribution, and a single stuck or flipped bit usually moves a
value somewhere less common. So the copy whose current value is *more typical* of
fault-free operation is probably the healthy one.

The protected circuit here is a 12-bit to 20-bit halfband downsampler, the kind
found in the receive chain of a QPSK/BPSK modem. It is instantiated twice. The
detector needs one histogram RAM, one small history RAM, an accumulator and a few
comparators. That is a few percent of one downsampler copy, against a whole third
copy plus voting for TMR.

```
            +---------------+  A   +----------------+
 x -------->| downsampler A |--+-->|                |
   |        +---------------+  |   |  smart         |---> y  (A or B)
   |        +---------------+  |   |  detector      |---> neq, sel_b, ambiguous,
   +------->| downsampler B |--+-->|                |     decision, tally
            +---------------+  B   +----------------+
           (stuck-at masks on A and B, zero in use)
```

## How the detector decides

**1. Histogram (offline training).** Representative input is run through a
fault-free copy. Its outputs are counted into a histogram with a power-of-two
number of bins. The default is 16384 bins with 8-bit counts that saturate at 255.
The histogram is built by software and then written into `hist_ram` through the
load port (`load_en`, `load_addr`, `load_data`).

**2. Bin lookup.** The bin of a 20-bit output is its top 14 bits with the sign
bit inverted (offset binary). Bins are therefore 64 LSBs wide and run from the
most negative value to the most positive. `hist_ram` is a dual-port block RAM, so
the bins of A and B are read in the same clock.

**3. Single-sample decision** (`bin_decide`). This step only runs on a mismatch
(`neq`). The copy whose bin has the higher count wins. Equal counts are
*ambiguous*, and this happens in two ways:
- both values fall into one bin, e.g. a fault in one of the 6 bits below bin
  resolution;
- two different bins hold the same count.

A small example uses a voltmeter with fault-free counts 1 V: 20, 2 V: 11, 3 V: 37,
4 V: 20:
- 2 V against 3 V picks the 3 V copy. This is right if the fault produced 2 V and
  wrong if it produced 3 V.
- 1 V against 4 V is ambiguous.

**4. History** (`history_vote`). A single sample is a weak indicator. The
detector therefore keeps the last `HIST_DEPTH` decisions (1024 by default) and
takes the majority. Decisions are recorded only on mismatching samples. A vote
for A counts +1, for B −1 and an ambiguous one 0. An accumulator keeps the running
sum `tally`. The history itself is a circular buffer in block RAM. On each push
the new vote is added, and once the window is full the vote that falls out is
subtracted. The entry that is about to leave is read one clock early, because the
RAM read is synchronous. A bypass covers `HIST_DEPTH = 1`, where that entry is
being written in the same clock.

**5. Output multiplexer** (`smart_detector`):

| situation on the current sample | `sel_b` / `y` |
|---|---|
| copies agree | previous choice (A and B are equal anyway) |
| mismatch, `tally > 0` | copy A |
| mismatch, `tally < 0` | copy B |
| mismatch, `tally == 0` (tied history) | previous choice; `ambiguous` is raised |

After reset the multiplexer selects A.

A tied history is the third way to get an ambiguous outcome. Ambiguity cannot be
removed entirely, because no practical histogram has a bin for every output
value. The bin count trades this off:
- With few bins, faulty and correct values often share a bin.
- With very many bins, each bin holds only a few samples. The counts get coarse
  and many neighbouring bins tie.

## Timing

| path | latency |
|---|---|
| `smart_detector`: `in_valid` → `out_valid` | 2 clocks (RAM read, then decision and history update) |
| `halfband_dec` | 1 clock |
| `downsampler` (5 stages) | 5 clocks |
| `dwc_smart_top`: 16th input of a group → `y_valid` | 7 clocks |

In `smart_detector`, the majority used for a sample already includes that
sample's own decision. A sample may arrive on every clock, and the top accepts
one input sample per clock. Reset is synchronous and active low. It clears the
pipelines, the history and the multiplexer choice but not the histogram.

## The protected circuit: `downsampler`

There are five halfband stages in cascade (`halfband_dec`). The first four
decimate by two and the fifth filters without decimating. The overall rate change
is 16: 100 samples per symbol in, 6.25 samples per symbol out.

Each stage uses the 7-tap halfband kernel [−1 0 9 16 9 0 −1]/32 and keeps extra
fraction bits. The word grows 12 → 14 → 16 → 18 → 19 → 20 bits. Each stage
saturates, because the kernel's absolute tap sum (36) is larger than its DC gain
(32).

These stages are a representative stand-in: the coefficients and word widths are
this design's choice (see below). The detector does not depend on them. Any
circuit with a non-uniform output distribution can be put in its place, with
`DATA_W` set to that circuit's output width.

## Parameters (`dwc_smart_top`)

| parameter | default | meaning |
|---|---|---|
| `IN_W` | 12 | input sample width |
| `DATA_W` | 20 | protected output width |
| `BIN_BITS` | 14 | log2 of the histogram bin count (16384 bins) |
| `COUNT_W` | 8 | histogram count width |
| `HIST_DEPTH` | 1024 | decisions in the majority window; 1 = no history |

## Ports of `dwc_smart_top`

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock, synchronous active-low reset |
| `x_valid`, `x[IN_W]` | in | input samples (signed) |
| `load_en`, `load_addr[BIN_BITS]`, `load_data[COUNT_W]` | in | histogram write. Keep `x_valid` low while loading. Loading during operation is caught by an assertion. |
| `fault_stuck0_a/b`, `fault_stuck1_a/b` `[DATA_W]` | in | stuck-at-0/1 masks on copy A's / B's output; tie to 0 in use |
| `y_valid`, `y[DATA_W]` | out | protected output, one per 16 inputs |
| `neq` | out | copies disagree on this sample (the plain DWC error flag) |
| `sel_b` | out | `y` comes from copy B |
| `ambiguous` | out | mismatch with a tied history |
| `decision` | out | single-sample decision (`dwc_pkg::decision_e`: `DEC_A`, `DEC_B`, `DEC_AMBIG`) |
| `tally` | out | A-votes minus B-votes in the window |
| `hist_full` | out | the history window has filled once |

The stuck-at masks exist so that a test can switch a fault on in the middle of a
run. They are the only fault model provided. Upsets in FPGA configuration memory,
which can change the logic itself, are outside what RTL can emulate.

## Cost

In 16-kbit FPGA block RAMs, the defaults need 9 RAMs:
- histogram: 16384 × 8 = 131072 bits = 8 RAMs;
- history: 1024 × 2 = 2048 bits = 1 RAM.

Besides the RAMs, the detector has:
- a 20-bit equality check (`neq`) and an 8-bit count comparison;
- a 12-bit accumulator;
- a 10-bit pointer;
- two pipeline stages holding both copies' values (80 flip-flops).

The pipeline registers account for most of the detector's 111 flip-flops. They
could be saved where the copies' outputs stay stable for two clocks.

## Files

- `rtl/dwc_pkg.sv`: decision type and vote weights
- `rtl/dwc_smart_top.sv`: the duplicated downsampler with detector (top)
- `rtl/smart_detector.sv`: bin mapping, pipeline, output multiplexer
- `rtl/hist_ram.sv`: dual-port histogram RAM
- `rtl/bin_decide.sv`: single-sample decision
- `rtl/history_vote.sv`: history window, accumulator and majority
- `rtl/downsampler.sv`, `rtl/halfband_dec.sv`: the protected circuit
- `rtl/stuck_at_fault.sv`: stuck-at fault masks
- `tb/tb_ref_pkg.sv`: integer reference model of the filter cascade
- `tb/tb_<module>.sv`: one self-checking testbench per module
- `tb/tb_workload_tables.sv`: the accuracy sweep described below

Each testbench ends with a `TB_RESULT checks=N failures=M` line.

## Simulating

With Verilator 5, for example for the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/dwc_pkg.sv tb/tb_ref_pkg.sv tb/tb_dwc_smart_top.sv --top-module tb_dwc_smart_top
./obj_dir/Vtb_dwc_smart_top
```

### `tb_dwc_smart_top`

This runs the whole design at its default sizes. The steps are:
1. Train the histogram on fault-free output.
2. Load the histogram.
3. Run five fault scenarios, each with a stuck bit switched on halfway through.

It checks:
- every output against the reference model;
- the 7-clock latency;
- that every detector mechanism occurs: mismatch, decision for A, decision for
  B, same-bin ambiguity, equal-count ambiguity, tied history, switch to B, and
  wrap of the history window.

Typical result:
- stuck bits 19, 17 and 14 are corrected on 99–100 % of mismatching samples;
- a stuck bit 3 (inside one bin) is always ambiguous, and the output stays on the
  previously selected, healthy copy.

### `tb_workload_tables`

This sweeps all stuck-at-0/1 faults on the 20 output bits of copy A. It covers:
- history depths 1, 64, 256, 512 and 1024, as five tops side by side;
- histograms of 1024, 4096 and 16384 bins. The smaller histograms are loaded
  into the 16384-bin RAM by repeating each coarse count over its fine bins.

It prints, for each configuration, the share of ambiguous verdicts and accuracy
counted four ways: ambiguous ignored, ambiguous counted wrong, half counted right,
all counted right. The run takes about 10 s.

On the built-in synthetic stimulus (noisy ±1 symbols at 100 samples per symbol)
with 16384 bins:
- Accuracy with ambiguous verdicts ignored rises from about 71 % for one sample
  to about 82 % with 1024 decisions of history.
- About 31 % of verdicts stay ambiguous. These come almost entirely from the
  faults on the 6 bits below bin resolution.

It also prints a per-bit table for 16384 bins. With 64 or more decisions of
history, faults on bits 12–19 are corrected on 98–100 % of mismatching samples,
and bits 15–19 are checked to be at least 90 %. The middle bits (6–11) land near
chance. Bits 0–5 are always ambiguous, because they never change the bin.

Figures measured on other data and other fault models, such as configuration-
memory upsets on real hardware, will differ.

## Where this RTL makes its own choices

The detector's structure follows the method as published:
- histogram with a power-of-two bin count in block RAM;
- comparison of the two copies' bin counts;
- majority over a history of decisions, kept by an accumulator;
- 16384 × 8-bit histogram and 1024-deep history.

So do the downsampler's five halfband stages, its 12/20-bit widths and its rate
change. The following points are this design's own:

- **Bin mapping.** A bin is the top `BIN_BITS` bits of the offset-binary value.
  A histogram built by software over the observed min-to-max range of the data
  would have narrower bins, so faults in lower bits would still change the bin.
  Supporting that would need an offset subtraction and a shift ahead of the RAM
  address.
- **Only mismatching samples enter the history.** Ambiguous decisions enter with
  weight 0.
- **A tied majority keeps the previous multiplexer choice.** Copy A is selected
  after reset.
- **Downsampler internals.** The 7-tap kernel, the per-stage width growth
  (2, 2, 2, 1, 1 bits), saturation, and which stage does not decimate are all
  this design's choices. Only the overall figures are fixed: five stages, 12 to
  20 bits, and a rate change of 16. Four decimating stages are what a 100 to 6.25
  rate change requires.
- **Histogram storage is a RAM with a load port**, not a ROM initialised at
  configuration. Building the histogram in hardware is not provided.
- **Stuck-at masks on the copies' outputs** stand in for the fault injection.
- **The detector is a single copy.** It is not itself triplicated. A TMR'd
  detector, roughly three times the size, would remove it as a single point of
  failure. That option is not included.
- **Not included:** the 16-bit, 25-tap BPSK demodulator filter used as a second
  test circuit. Its coefficients are not available here.
