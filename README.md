# Jet/Energy-Sum Processor for a pipelined calorimeter trigger

This is synthesizable SystemVerilog for the jet and energy-sum part of the
ATLAS Level-1 calorimeter trigger, as it was proposed for large FPGAs. Every
25 ns bunch crossing the processor receives 0.2 x 0.2 (eta x phi) "jet
elements" from the calorimeter preprocessor. It produces four things:

* the total transverse energy (ET);
* the missing-ET vector (EX, EY) and threshold bits for both energies;
* counts of jet clusters above eight programmable thresholds;
* a pipelined record of its data, read out when the trigger accepts an
  event (Level-1 Accept).

The design has one fixed latency and no stalls: every stage handles one
bunch crossing per 40 MHz period. The jet stage runs at 80 MHz and does its
arithmetic on 5-bit halves ("5-bit serial" arithmetic), so the jet FPGA needs
only half the input pins and half the adder width.

The RTL models one crate: a row of Jet/Energy Sum Modules (JEMs) covering
one phi quadrant, and the two crate merger modules. Each FPGA of the real
system is one module here.

```
             em/had (9 bit, 40 MHz), 4 x 11 elements per JEM
                              |
  +---------------------------v------------------------------- JEM (x N_JEM) --+
  |  energy_sum_fpga x11 (one per phi row, 4 eta elements each)                 |
  |    noise thresholds -> EM+HAD -> 10-bit ET -> LUTs (ET, EX, EY) -> sum of 4 |
  |         |  ET as 5-bit digits @80 MHz (link80_tx)       | sums (core rows)  |
  |         v                                               v                   |
  |  jet_fpga x2 (2x8 core, 5x11 environment)        sum_merge_fpga             |
  |    <- neighbour JEM columns (backplane)             (module ET/EX/EY)       |
  |    -> multiplicities (8 x 3 bit), ROIs              |                       |
  +-------|------------------------------------------------|--------------------+
          v                                                v
   jet_merger_module (crate jet counts)          sum_merger_module
                                                 (crate ET/EX/EY, ET and
                                                  missing-ET threshold bits)
```

## Geometry and partitioning

* **Jet element**: 0.2 x 0.2. It has a 9-bit EM energy and a 9-bit hadronic
  energy. Its ET is the 10-bit sum of the two.
* **Jet FPGA**: owns a 2 (eta) x 8 (phi) core. To form every window around
  that core it needs a 5 x 11 block of elements: one element below the core
  and two above, in both directions. The 55 element ETs arrive on 55 5-bit
  links at 80 MHz, 275 input pins in all.
* **JEM**: in this implementation a JEM owns 4 x 8 core elements and has
  two Jet FPGAs. It takes in 4 x 11 elements: the 8 core phi rows plus the
  environment rows. Those rows are also sent to the JEMs of the neighbouring
  quadrants.
* **Energy Sum FPGAs**: one per phi row, each with four eta elements, so 11
  per JEM. Only the 8 core rows feed the energy sums. All 11 rows feed the
  jet links.
* **Crate**: in this implementation a crate holds one quadrant, which is
  `N_JEM = 8` JEMs in a row along eta. Neighbouring JEMs exchange jet links.
  The lower JEM sends its eta column 3. The upper JEM sends its columns 0 and
  1. The JEMs at the two ends of the row get zeros.

Four such crates give 64 Jet FPGAs and 32 x 32 core positions. That is
slightly more than the 960 elements the trigger needs within |eta| < 3.2.

## The jet algorithm (`jet_fpga`)

This is the most involved block.

**Digit streams.** A 10-bit ET leaves its Energy Sum FPGA as two 5-bit
digits: the low digit in the first 80 MHz cycle of a crossing, the high
digit in the second (`link80_tx`). Inside the Jet FPGA every quantity stays
in this form. A value is a low digit (5 bits), then an upper digit that holds
all remaining bits.

* `serial5_add` adds the low digits and saves the carry in a flip-flop. In
  the next cycle it adds the upper digits plus that carry.
* `serial5_cmp` compares the low digits and saves the result. In the next
  cycle it compares the upper digits; it uses the saved result only when the
  upper digits are equal.

Both blocks are combinational apart from that one flip-flop. A tree of them
therefore works on the digit stream without adding latency, and no carry
chain is longer than the upper digit.

**Windows.** Within the 5 x 11 environment (indices e = 0..4, f = 0..10,
with the core at e = 1..2, f = 1..8):

* *0.4 windows* (2 x 2 elements) are formed at every origin (i, j) with
  i = 0..3 and j = 0..9. They are built from shared sums of vertical pairs.
* *0.6 windows* (3 x 3) are formed at origins 0..2 x 0..8.
* *0.8 windows* (4 x 4): one per core position. Each is the sum of the four
  0.4 windows around the candidate position.

**Declustering (ROIs).** Each of the 16 core 0.4 windows is a candidate jet
position. A candidate is a region of interest (ROI) when it is a local
maximum among its eight neighbouring 0.4 windows. Each pair of neighbouring
windows is compared once, and that single `a > b` result serves both
windows. To resolve ties, the window that comes earlier in (phi, then eta)
order must be strictly greater than the later one. The later window only
has to be at least as large. So two equal neighbours can never both be
ROIs, and a flat plateau gives no ROI at all.

**Clusters and thresholds.** There are eight combinations, each a pair of
(threshold, window size) set by configuration. For each ROI and each
combination, the cluster sum of the chosen size is compared with the
threshold:

* 0.4: the ROI window itself.
* 0.8: the 4 x 4 window centred on the ROI.
* 0.6: four 3 x 3 windows contain the ROI, with the ROI in each of their
  corners. The combination passes if any of them is above the threshold,
  which is the same as testing the largest. No maximum has to be computed.

Only ROIs are counted. The result of a combination is the number of passing
ROIs, saturating at 3 bits.

In 2 x 8 positions at most four ROIs can be non-adjacent. So one Jet FPGA
never exceeds 4; the 3-bit limit matters only after summing over FPGAs and
modules.

**Timing inside the Jet FPGA.** The input registers hold the low digits in
the `ph == 1` cycle. The carries and partial comparisons are stored at the
end of that cycle. In the next cycle (the upper digits) the ROI and hit
results are final and are registered. The multiplicities are registered on
the following bunch-crossing edge.

## Energy path (`jet_element_proc`, `energy_sum_fpga`, `sum_merge_fpga`, `sum_merger_module`)

For each element:

1. Each of the EM and hadronic energies is set to zero unless it is strictly
   above its own noise threshold.
2. The two are added into the 10-bit ET.
3. Three 1024-entry tables, indexed by that ET, give the ET contribution
   (10 bits) and the signed EX and EY contributions (11 bits each). The EX
   and EY tables carry the cos/sin of the element's phi, and can also encode
   calibration or saturation.

The sums then widen stage by stage:

| Stage | ET width | EX/EY width |
|---|---|---|
| Energy Sum FPGA (4 elements) | 12 bits | 13 bits |
| JEM adder tree (8 FPGAs) | 15 bits | 16 bits |
| Crate (8 JEMs) | 18 bits | 19 bits |

The Sum Merger compares the crate ET with four thresholds. It compares the
missing ET with four more, using EX² + EY² > T², so no square root is
needed.

## Timing

There is one 80 MHz clock. The crate makes a phase bit `ph` (output `bc`)
that is 0 right after reset and then alternates. Registers of the 40 MHz
bunch-crossing stages update on the clock edge that ends a `ph == 1` cycle.

Latency, in bunch crossings, from the inputs to each output:

| Output | Latency |
|---|---|
| element ET registered | 1 |
| table outputs | 2 |
| jet links carry the digits | 2 |
| Energy Sum FPGA sums | 3 |
| JEM sums | 4 |
| Jet FPGA results | 4 |
| JEM multiplicities | 5 |
| crate `jet_mult`, `et`, `ex`, `ey` | 6 |
| `et_hits`, `met_hits` | 7 |

The crate delays the JEM sums by one crossing so that the jet and energy
results come out together.

## Readout (`readout_pipeline`)

Each Energy Sum FPGA stores its raw EM and hadronic inputs (72 bits) every
crossing. Each Jet FPGA stores its ROI mask and per-ROI hit bits (144 bits).
Both go into a circular buffer of `DEPTH = 128` crossings.

A Level-1 Accept arrives `LATENCY = 100` crossings after the data it
selects. It queues `SLICES = 5` words centred on that crossing. The Jet
FPGAs see their data two crossings later than the Energy Sum FPGAs, and
their readout looks back two crossings less, so one accept reads the same
bunch crossing from every FPGA.

Words leave on a valid/ready stream, and `rd_last` marks the last slice of
each event. Up to eight events can wait per FPGA. An accept that finds the
queue full is dropped and flagged on `l1a_lost`. A consumer that stalls for
more than about `DEPTH - LATENCY - SLICES` crossings reads overwritten data;
nothing detects this.

## Configuration

There is one write bus, `cfg_wr_t`: `{we, jem, chip, sub, addr[11:0],
data[15:0]}`, one write per clock. The value 0xF in `jem`, `chip` or `sub`
addresses every target at that level.

| target | jem | chip | sub | addr | data |
|---|---|---|---|---|---|
| element lookup table | module | 0..10 (phi row) | element 0..3 or 0xF | {table[1:0], index[9:0]}, table 0 = ET, 1 = EX, 2 = EY | table value |
| EM / hadronic noise threshold | module | 0..10 | 0xE | 0..3 EM, 4..7 hadronic | 9 bits |
| jet threshold / window | module | 12, 13 | 0xE | k = 0..7 threshold, 8 + k window (0 = 0.4, 1 = 0.6, 2 = 0.8) | 14 bits / 2 bits |
| crate energy thresholds | 0xE | 0 | 0xE | 0..3 ET, 4..7 missing ET | 16 bits |

After reset:

* noise thresholds are 0;
* jet thresholds are 0x3FFF, which nothing can exceed;
* energy thresholds are 0xFFFF;
* the lookup tables are undefined until written.

A register write with `chip = 0xF` reaches both kinds of FPGA. Addresses
0..7 mean different registers in the two kinds, so address the Jet FPGAs by
chip number.

## Files

| file | content |
|---|---|
| `rtl/jep_pkg.sv` | widths, `win_e`, `cfg_wr_t`, address decode helpers |
| `rtl/jep_crate.sv` | top: crate of JEMs, neighbour wiring, phase generator, mergers |
| `rtl/jem.sv` | one module |
| `rtl/energy_sum_fpga.sv`, `rtl/jet_element_proc.sv`, `rtl/lut_ram.sv`, `rtl/link80_tx.sv` | energy path and jet links |
| `rtl/sum_merge_fpga.sv` | JEM adder tree |
| `rtl/jet_fpga.sv`, `rtl/serial5_add.sv`, `rtl/serial5_cmp.sv` | jet algorithm |
| `rtl/readout_pipeline.sv` | pipeline memory and readout |
| `rtl/jet_merger_module.sv`, `rtl/sum_merger_module.sv` | crate mergers |
| `tb/jep_ref_pkg.sv` | integer reference model of the jet algorithm, table contents used by the tests |
| `tb/tb_*.sv` | one self-checking testbench per block |

Top-level parameters are `N_JEM` (2..8, default 8), `DEPTH`, `LATENCY` and
`SLICES`. Data widths, the number of jet combinations and the number of
energy thresholds are in `jep_pkg`.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. For
example:

```
verilator --binary --timing --assert --top-module tb_jep_crate \
  rtl/jep_pkg.sv tb/jep_ref_pkg.sv $(ls rtl/*.sv | grep -v jep_pkg) tb/tb_jep_crate.sv
./obj_dir/Vtb_jep_crate
```

Replace `tb_jep_crate` to run another testbench. The testbenches compare
against integer models written independently of the RTL.

`tb_jep_crate` runs the full default crate (8 JEMs, 128-deep pipelines)
end to end, in about 2 s of simulation after about 1.5 minutes of C++
compilation:

* it loads every table and register through the configuration bus;
* it runs 260 crossings that cycle through five patterns: low noise,
  sparse large deposits, patches of equal energy (ties), saturating
  energies, and jets on module boundaries;
* it checks every trigger output every crossing, and the readout of two
  streams word by word;
* it counts the mechanisms it relies on and fails if any of them never
  happened: noise suppression, jets that change when neighbour data is
  removed, equal neighbouring windows, hits of every window size, crate
  saturation, energy bits set and clear, readout, and queue overflow.

## What this RTL does not cover, and choices to be aware of

Not covered:

* **Forward calorimeter sums.** The extra energy sums from the forward
  calorimeters are not included, because their format is not defined here.
* **Board-to-board physical layer.** The 400 Mb/s LVDS deserialisers, LVDS
  pre-compensation, LVCMOS backplane links and clock DLLs are not modelled.
  The JEM takes the deserialised 9-bit energies, and the links are plain
  wires.
* **Host interface.** The host interface (VME) is replaced by the plain
  configuration write bus.
* **Diagnostic FPGA configurations.** The special configurations for
  testing signal paths are not included.
* **Readout of module outputs.** Only the Energy Sum FPGA inputs and the
  Jet FPGA ROIs are read out. The module output sums and multiplicities are
  not stored.

Choices of this implementation, not fixed by the original design
description:

* the JEM size (4 x 8 core, two Jet FPGAs), one Energy Sum FPGA per phi row,
  and 8 JEMs per crate;
* the tie rule, and "strictly above" for both the noise and jet thresholds;
* the 0.8 window centred on the ROI;
* 3-bit saturating multiplicities;
* the table widths, and four ET plus four missing-ET thresholds;
* low digit first on the links;
* the pipeline depth, latency, number of slices and event queue size;
* the register map;
* all latencies.

The hardware compares all 16 candidate windows against the thresholds in
parallel and keeps only the ROIs. This gives the same result as testing only
local maxima.

Timing closure at 80 MHz on a real FPGA has not been tried.
