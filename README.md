# Tanimoto screening accelerator

Virtual screening compares every compound of a *search* library with every
compound of a *reference* library and keeps the pairs whose Tanimoto
dissimilarity passes a threshold. Each compound is described by a
fingerprint. The comparison is simple, but there are a great many pairs.
This RTL streams the search library past 128 stored reference fingerprints,
one 128-bit memory word per clock, and tests all 128 pairs in parallel.
Only the pairs that pass leave the chip.

Two fingerprint types are supported, each as its own build of the same top
level:

* **binary**: 1024 bits, 8 memory words. This is the default build.
* **pharmacophore**: 1680 bits of 8-bit histogram bins, padded with zeros to
  1792 bits (14 words).

The two builds share the control block, the memory ports and the output
merging tree. Only the Processing Core differs.

## The arithmetic: no dividers

For binary fingerprints, let *a* be the number of ones in the reference, *b*
the number of ones in the search fingerprint, and *c* the number of ones
they have in common. A pair passes when its dissimilarity
`1 - c/(a+b-c)` exceeds `D`. Rearranged, the test becomes

    a + b  >  c * (2 - D) / (1 - D)

For a fixed `D`, the right-hand side depends on *c* alone. The host fills a
table (the **CMPR RAM**) with `MEM[c] = floor(c*(2-D)/(1-D))` for
c = 0..1024, saturated to 4095. The hardware then does one lookup and one
compare per pair. Because `a+b` is an integer, the floor makes the test
exact.

For pharmacophore fingerprints, the sums reach 53550 (210 bins x 255), so a
table is too large. The ratio `sum(min)/sum(max)` over all bins is instead
tested as a multiply, a subtract and a sign check:

    accept  when  D * sum(max) - sum(min) < 0

`D` is a 17-bit fraction (`D * 2^17`), written by the host. `sum(min)` is
shifted left by 17 bits. The test is therefore exact for the coefficient
given, with no rounding of the sums. The polarity of this rule is explained
under *Departures and choices* below.

## Data flow

```
 source SRAM port ──► control ──tagged words──► Processing Core ──16 FIFOs──► HEM ──► control ──► sink SRAM port
   (128 bit)            │   ▲                    (128 PUs)                    (15 nodes)            (128 bit)
                      clear, ref_base          afull / busy
```

`control` runs a job in three steps and repeats them until every reference
has been used:

1. **Load.** Read the next 128 reference fingerprints. Each word goes to
   the core tagged with the number of the PU that must store it.
2. **Search.** Read the whole search library. Each word is tagged with its
   fingerprint index and its word position. Every PU compares the word with
   the word at the same position of its stored reference.
3. **Drain.** Wait until the core pipelines are empty. If references
   remain, start again at step 1 with a `clear` and a new `ref_base`.

The last batch may be partial. PUs that got no reference in a batch produce
no output. Reads may return after any latency, but they must return in
order. The tag of each outstanding read waits in a 32-entry queue
(`TAG_DEPTH`).

Records leave the core through the Hierarchical Elastic Memory. `control`
pops one record per cycle and packs two records into each 128-bit sink
word, the first in the low half. When a job has an odd number of records,
its last word has a zero upper half. `job_done` pulses once the last word
has been written, and `job_results` then holds the record count.

### Double buffering

Each SRAM port is split into two halves by its top address bit. A job names
the half it uses (`job.half`), for both the source and the sink port. The
host can fill the other source half, or read the other sink half, while the
job runs.

## Binary Processing Core

`bin_core` holds one `ppu` and 16 `octal_core`s. Each Octal Core holds 8
`bin_pu`s. All of them see the same input word in the same cycle.
Fingerprints are 1024 bits (8 words). Shorter ones, such as the common
512-bit kind, can be padded with zeros by the host. Zero bits change none
of *a*, *b* and *c*, so the results stay exact, but each fingerprint then
takes the full 8 cycles.

* **`srl_reg`** is the store for one reference: 128 bits wide and 8 words
  deep. It shifts in Step 1. In Step 2 it is read at tap `7 - widx`, the way
  an FPGA's SRL primitive is addressed.
* **`cnt1`** counts the ones of a 128-bit word in a 6-stage pipeline. The
  first stage has 19 summarizers of 7 bits each. A tree of two-input adders
  (`adder_tree`, 5 levels) follows.
* **`bin_pu`** ANDs the search word with the stored word, counts the result
  with `cnt1`, and accumulates 8 counts into *c*. It also keeps *a*.
* **`ppu`** (Primary Processing Unit) runs the same count-and-accumulate
  pipeline on the input word alone. In Step 1 its result is *a* for the PU
  being loaded. In Step 2 it is *b* for all PUs. Because its pipeline has
  the same depth as a PU's, *b* arrives in exactly the cycle the eight *c*
  values do.
* **`octal_core`** captures the eight *c* values and *b* together. It then
  tests them over the next 8 cycles with one shared `cmpr_ram` and one
  comparator. A search fingerprint takes 8 cycles to arrive, so this
  time-shared comparator keeps pace with the input. An assertion checks
  that. Accepted pairs go into a 64 x 1024 `sync_fifo`.

Timing, counted from the cycle the last word of a search fingerprint is on
`core_in`:

| event                                  | cycles |
|----------------------------------------|--------|
| AND result registered                  | 1      |
| CNT1 output                            | 1 + 6  |
| `c_valid` / PPU `out_valid`            | 8      |
| PU *j*'s record written into the FIFO  | 11 + j |
| that record readable at the FIFO output | 12 + j |

## Pharmacophore Processing Core

`ph_core` holds 16 `ph_octal_core` groups of 8 `ph_pu`s each. A `ph_pu`
stores a 14-word reference. For each bin pair (16 per word), a comparator
drives a multiplexer that selects the smaller and the larger value (the
CMPR MUX). Two 16-input `adder_tree`s sum the minima and the maxima, and two
accumulators add the 14 partial sums. Results are ready 6 cycles after the
last word.

Each group tests its eight PUs over 8 of the 14 cycles per fingerprint with
one shared multiply-subtract unit. This unit is shaped like a DSP48 slice:
a multiplier register, then the subtraction and the sign bit. PU *j*'s
record is readable 10 + *j* cycles after the last word. A pharmacophore
build needs no PPU.

## Hierarchical Elastic Memory (HEM)

How many pairs pass depends on the data and the threshold, and it differs a
lot between Octal Cores. `hem` is a binary tree with 8 + 4 + 2 + 1 nodes.
Each node has a `pri_ptr` selector and its own 64 x 1024 FIFO. Every cycle
in which its FIFO has room, a node moves one record from one of its two
children. When both children hold data, it takes from the one whose FIFO
holds more. That way the fullest FIFOs drain first. On equal levels, the
child not served last time wins.

Nodes are numbered as a heap: node 1 is the root, node *k* reads nodes 2*k*
and 2*k*+1, and numbers 16..31 are the Octal Core FIFOs.

Flow control is end to end. When any Octal Core FIFO holds more than
`FIFO_DEPTH - AFULL_MARGIN` (896) records, `afull` rises. `control` then
stops issuing search reads (output `stalled`). The margin of 128 records
covers the reads and fingerprints still in flight. A sticky `overflow`
output reports a violation, which the tests require never to happen.

## Interfaces (`vs_accel`)

| port | meaning |
|------|---------|
| `job_valid`, `job_ready`, `job` (`job_t`) | Start a job. It is taken when both `job_valid` and `job_ready` are high. |
| `job_done`, `job_results` | One-cycle pulse at the end of a job, and the job's record count. |
| `cfg` (`cfg_t`: `we`, `addr`, `data`) | Binary build: writes CMPR RAM word `addr` in every Octal Core. Pharmacophore build: writes the coefficient `D*2^17`, whatever `addr` is. |
| `src_rd_req`, `src_rd_addr`, `src_rd_valid`, `src_rd_data` | Source port. One read request per cycle. Data returns in order. |
| `snk_wr_en`, `snk_wr_addr`, `snk_wr_data` | Sink port. One 128-bit write per cycle. |
| `stalled`, `overflow` | Input hung because an output FIFO is nearly full; sticky overflow error flag. |

Fields of `job_t` (`vs_pkg`):

* `half`: which half of both memories the job uses.
* `ref_addr`, `num_refs`: where the reference fingerprints start, and how
  many there are (up to 4096).
* `srch_addr`, `num_srch`: the same for the search fingerprints (up to
  2^20, the range of the record's search index).
* `sink_addr`: where the records go.

All addresses are word addresses within the half. Fingerprints lie in
memory one after another, `W` words each, first word first.

A record (`result_t`, 64 bits) holds, from the MSB down:

* a 12-bit reference index within the job;
* a 20-bit search index;
* 16 bits `hi`: *a+b* (binary) or `sum(max)` (pharmacophore);
* 16 bits `lo`: *c* (binary) or `sum(min)` (pharmacophore).

The host can recompute the exact dissimilarity from these fields.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `FP_TYPE` | `FP_BINARY` | `FP_BINARY` or `FP_PHARMA`; selects the Processing Core |
| `N_PU` | 128 | Processing Units, in groups of 8 (must be a multiple of 8, with N_PU/8 a power of two for the HEM) |
| `FIFO_DEPTH` | 1024 | Depth of every Octal Core and HEM FIFO |
| `AFULL_MARGIN` | 128 | Free words below which the input is hung |
| `TAG_DEPTH` | 32 | Outstanding source reads |

The word width (128), the fingerprint lengths, the field widths and
`ADDR_W` (20) are constants in `vs_pkg`.

## Departures and choices

These follow the published architecture:

* the block structure: PU, PPU, CNT1 with K = 7 and 6 stages, the Octal
  Core with a shared CMPR RAM and comparator, the 64 x 1024 FIFOs, the HEM
  with level-based priority;
* the 128-bit datapath, and the three-step loop;
* the table for the binary threshold, and the multiply-subtract test for
  the pharmacophore one.

These are this design's own choices:

* **Pharmacophore polarity.** The pharmacophore test follows the printed
  multiply-subtract rule, `D*sum(max) - sum(min) < 0`. That rule accepts a
  pair when `sum(min)/sum(max) > D`, which is a *similarity* above the
  limit. The binary test accepts a *dissimilarity* above the limit. To
  screen pharmacophores for dissimilarity instead, invert the sign test in
  `ph_octal_core`. The host cannot get that effect through the coefficient.
* **Pharmacophore grouping.** Pharmacophore PUs share one multiply unit
  and one FIFO per group of eight, mirroring the binary Octal Core. The
  XC4VLX200 part that the architecture targets has only 96 DSP48 slices,
  fewer than 128 PUs.
* **Interfaces.** The job descriptor, the configuration bus, the tag queue,
  the record field widths, packing two records per sink word, the
  almost-full margin and the drain between batches are all this design's.
* **Register placement.** The pipeline registers are placed at every
  adder-tree level, after the AND stage and after the CMPR MUX.
* **FIFO.** First-word-fall-through. It has a synchronous-read memory and
  an output register, so a word written at cycle *t* can be read at *t+2*.
* **Not included.** The vendor SRAM interface, the QDR SRAMs, the host
  link and the host software are outside this RTL. Their signals are the
  top-level ports. Clock frequency and placement targets (200 MHz for the
  modules, 100 MHz for the full device) are not represented in the RTL.

## Simulating

Every module has a self-checking testbench in `tb/`. Each one ends with a
line `TB_RESULT checks=N failures=M`.

| testbench | what it covers |
|-----------|----------------|
| `tb_cnt1`, `tb_adder_tree`, `tb_srl_reg`, `tb_sync_fifo`, `tb_cmpr_ram`, `tb_pri_ptr` | Leaf blocks against models, including exact pipeline latencies |
| `tb_bin_pu`, `tb_ppu`, `tb_ph_pu` | Counts, sums and latencies, with gaps in the input |
| `tb_octal_core`, `tb_ph_octal_core` | Exact record stream of a partially loaded core under back-to-back input |
| `tb_bin_core`, `tb_ph_core` | Two Octal Cores / groups, two batches |
| `tb_hem` | Ordering, priority rule and back-pressure with 4 inputs |
| `tb_control` | Word stream, batching, hanging the input, record packing, empty job |
| `tb_vs_accel` | Both builds end to end at 16/32 PUs with 64-word FIFOs. Fails if reference reload, partial batch, input hang, a HEM choice between two inputs, accept/reject or odd-record padding never happens |
| `tb_vs_accel_full` | Binary build with every parameter at its default: 128 PUs, two jobs, 200x300 and 130x50 fingerprints, about 70,000 cycles |
| `tb_vs_accel_ph_full` | The same for the pharmacophore build at full size |

The SRAMs are modelled by `tb/sram_model.sv`, which returns reads in order
after a random latency of 2 to 6 cycles. `tb/vs_accel_harness.sv` generates
fingerprints and jobs and checks every record against a software model.

With Verilator 5, for example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    rtl/vs_pkg.sv tb/tb_vs_accel.sv --top-module tb_vs_accel
./obj_dir/Vtb_vs_accel
```

The full-size testbenches take about a minute to compile, then a second or
two to run.
