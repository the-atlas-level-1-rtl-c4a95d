# Muon topological trigger words for the ATLAS MUCTPI

This RTL adds topological information to the trigger outputs of the ATLAS Level-1 muon
central trigger processor (MUCTPI). Each of the 16 octant modules receives up to 26 muon
candidates per bunch crossing (BC, 25 ns). It already counts them per pT threshold. Here
it also:

- picks the two highest-pT candidates that survive the overlap veto;
- turns each into an 8-bit coarse position-and-momentum word;
- sends each word on one of the octant's two electrical trigger outputs at 320 Mb/s.

A second design, the error rate test system, sits at the far end of those cables. It
checks that the 32 outputs can run at that rate, finds a safe sampling point for each
input, and captures the words for comparison with a reference model.

The two designs are wired together in `l1mu_topo_top`: 16 octants drive 32 outputs, and
the 32 receive channels sample them.

## Data flow in one octant (`mioct_trigger`)

```
cand_in[26] -> sync_pipeline -> cand_sync[26] -> (overlap handling, external) -> veto_in[26]
                                   |                                                 |
                                   +--> local_multiplicity (6 x 3-bit counts) <------+
                                   +--> veto_unit -> sorter_unit -> topo_encoder -> topo_serializer x2 -> ser1, ser2
                                                          |
                                                          +-> cand_counters (1 / 2 / >2 candidates)
```

- **Candidates.** A candidate (`cand_t`) has a 3-bit pT threshold number (0 = absent,
  1..6) and an 8-bit region-of-interest (RoI) number.
  - Candidates 2s and 2s+1 come from sector s. There are 13 sectors per octant.
  - `sync_pipeline` delays each sector by 0..8 crossings to line up cables of
    different lengths.
- **Veto.** The overlap handling unit lies outside this design. It returns one veto
  flag per candidate.
  - Both the multiplicity path and the topological path register those flags in
    their own copies. This keeps the timing of the two paths independent.
  - A vetoed candidate has its pT forced to 0.
- **Clocking.** Everything runs at 160 MHz, four cycles per crossing. `bc` marks the
  first cycle of each crossing and must come every fourth cycle; an assertion checks
  this.

### Timing

The veto unit, sorter and encoder form one combinational path. It is allowed two
160 MHz cycles, so it must be constrained as a two-cycle multicycle path.

| Edge | Event |
|------|-------|
| E0 (bc high) | veto and multiplicity registers capture `cand_sync`/`veto_in` |
| E1 | `mult` valid |
| E2 | words `topo1`, `topo2` and `ncand_q` captured; counters update |
| E3 | serializers load |
| E4..E7 | output bit pairs [7:6], [5:4], [3:2], [1:0] |

A word leaves the octant one crossing after its candidates were captured. A new word
follows every crossing.

## The sorter (`sorter_unit`)

The sorter is the critical path, and the part that needs the most explanation. It does
no sorting network. Instead it makes all 26·25/2 = 325 comparisons at once:

- Comparator (i,j) with i<j computes `pT_i >= pT_j`, and entry (j,i) of the matrix is
  its inverse. Equal pT values therefore go to the lower index.
- The highest candidate is the row that wins every comparison: an AND over 25 bits.
- For the second-highest candidate, the same matrix is reused with every comparison
  that involves the winner inverted. The winner then loses everywhere, and the row
  that wins everything is the second.
- Both results are one-hot vectors (`win1`, `win2`). They steer AND-OR multiplexers
  for the sector number, RoI and pT.
- `ncand` reports whether zero, one, two or more than two candidates are present. Assertions check that
  both winners are always one-hot.

The cost is about 325 comparators of 3 bits and 26 wide AND gates per matrix. The
latency is one comparator, one AND tree and one multiplexer.

## The topological word (`topo_encoder`)

| bits | 7..5 | 4..2 | 1..0 |
|------|------|------|------|
| field | eta code | phi code | pT code |

- **Position.** Eta and phi come from a programmable table of 13 × 256 entries of 6 bits,
  addressed by {sector, RoI}.
  - It is written through `lut_we/lut_sector/lut_roi/lut_wdata`. In the top, it is
    broadcast to the octants selected by `lut_sel`.
  - Its contents depend on the detector geometry and cabling and are not part of
    this RTL.
  - Seven eta codes and eight phi codes give 56 locations per octant, 896 in all.
    Eta code `111` means "no candidate".
- **Momentum.** `pt_map` holds a 2-bit code for each of the six thresholds, so the six
  thresholds fold onto three programmable levels (`00`, `01`, `10`).
- **More than two candidates.** Code `11` on the second word means that more than two
  candidates were present.

## Serializer (`topo_serializer`)

Each output is a shift register that sends the MSB first, two bits per 160 MHz cycle.
Bit [1] of `dout` goes on the rising edge and bit [0] on the falling edge of a DDR output
buffer. The buffer is outside this RTL. `ser_mode` selects one of three sources:

- the data words;
- a 16-bit training pattern, `FE01`;
- PRBS-31, using the polynomial x^31 + x^28 + 1 and seed all ones (`prbs31_gen`).

The training pattern contains the byte `FE` once per 16 bits. That is what the receiver
aligns on.

## Error rate test system (`ber_test_system`)

### Front end

Each of the 32 inputs feeds two FPGA delay lines, called master and slave:

- The slave path is set one tap (78.125 ps) later than the master.
- Both paths are oversampled at four phases, Q1..Q4, spaced 1.5625 ns apart within a
  6.25 ns cycle. Each phase therefore covers 1.5625 / 0.078125 = 20 taps.
- The delay lines and deserializers are vendor primitives and are not in `rtl/`. The
  RTL drives their tap number and takes their 4 + 4 samples per cycle.
- `tb/rx_frontend_model.sv` models them, with cable skew and an edge-jitter zone in
  which samples are random.

### Phase scan (`phase_scan_ctrl`, `transition_detector`)

- **Scan.** The scan steps the tap through 20 positions, twice:
  - stage 0 compares master and slave on Q1 and Q2;
  - stage 1 compares them on Q3 and Q4.
- **Each step.** Each step waits `SETTLE` cycles for the delay line, clears the
  detector, then watches for `DWELL` cycles.
- **Detection.** Any difference between the master and slave samples means a bit edge
  lies between them. The XOR result is latched low.
- **Result.** The outcome is a 4 × 20 transition map per channel (`trans_map`). From it,
  the control software picks:
  - a tap (`tap_cfg`, common to all channels);
  - a sample pair per channel: Q1/Q3 or Q2/Q4 (`qsel`).

  At 320 Mb/s, each bit spans two phases, and the chosen pair keeps clear of the edges.
- **Duration.** One scan takes 2·20·(SETTLE + DWELL + 2) cycles.

### Per-channel checks (`ber_channel`)

- **`prbs31_checker`.** It first loads its 31-bit register from the incoming bits, in
  16 cycles (100 ns). It then closes its own feedback loop and compares. It counts
  errors (32 bits) and received bits (48 bits).
- **`word_aligner`.** It searches the training pattern for `FE` at either bit offset
  within a cycle. It locks to the first match, then delivers a byte every crossing.
- **`mem_interface`.** It packs the words of all 32 channels for two crossings into
  one 512-bit memory word, the earlier crossing in bits 255..0.
  - Writes use a valid/ready handshake with the external memory.
  - If the next memory word is complete while the previous one is still waiting,
    the new word is dropped. `overflow` is then set and stays set until the next
    start.

## Departures and choices

The published MUCTPI upgrade fixes these numbers, and the RTL defaults follow them:

- 26 candidates, 13 sectors and 16 octants;
- 325 comparisons;
- the 8-bit word with 7 eta codes, 8 phi codes and a 2-bit pT;
- 320 Mb/s over DDR outputs;
- PRBS-31;
- a 16-bit training pattern and an 8-bit alignment value;
- 32 test channels;
- 78.125 ps taps, four-phase oversampling at 160 MHz and 20 scan steps;
- a 100 ns checker load;
- 512-bit memory words;
- 32-bit monitoring counters.

The following are this design's own choices:

- candidate field widths and the order of candidates within an octant;
- which eta code means "none", and the value of the training pattern (`FE01`) and the
  alignment byte (`FE`);
- the exact edges of the two-cycle sorter path;
- the 0..8 range of the synchronisation delay;
- 3-bit saturating multiplicities;
- the PRBS polynomial and seed;
- the scan's settle and dwell times, and running the scan as a hardware sequencer
  rather than step by step from software;
- the memory word layout, handshake and overflow rule;
- one common tap for all channels;
- a single shared clock for both designs in the top, which in reality are separate
  boards;
- the octant-to-channel mapping: octant m drives outputs 2m (first candidate) and
  2m+1 (second).

The following parts are not in this RTL:

- the overlap handling unit and its tables;
- the read-out FIFOs and the validation SRAM of the octant board;
- the backplane, CTP interface and read-out modules;
- the Ethernet/IPbus control path: configuration and results are plain ports;
- the vendor I/O primitives;
- the external memory, which is modelled in the top-level testbench.

The veto input must belong to the same crossing as `cand_sync`. Any latency of the
external overlap unit must be matched by whoever connects it.

## Simulation

All testbenches are self-checking and print `TB_RESULT checks=N failures=M`. Build one
with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/muctpi_pkg.sv rtl/prbs_pkg.sv rtl/ber_pkg.sv tb/tb_sorter_unit.sv \
    --top-module tb_sorter_unit -Mdir obj_sorter -o sim
./obj_sorter/sim
```

Other modules are found through `-I`. Each block in `rtl/` has a testbench
`tb/tb_<block>.sv`.

`tb_l1mu_topo_top` runs the whole system with every parameter at its default. It takes
roughly two minutes, and goes through these steps:

1. It programs the tables.
2. It runs a full phase scan while all octants send PRBS.
3. It chooses a tap and sample pairs from the maps, the way the software would.
4. It checks PRBS on all 32 channels.
5. It aligns on the training pattern.
6. It sends random candidates and vetoes, and captures 64 memory words under random
   memory back-pressure. Each byte is compared with an independent model of
   sorting and encoding.
7. It reads the counters.
8. It forces an overflow.

At the end it prints how often each mechanism occurred, and it fails if any never
occurred. The mechanisms counted are vetoes, the four candidate counts, both word
offsets, memory stalls and overflow.

Testbenches of single blocks override `DWELL` and similar parameters to stay short.
