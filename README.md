# SCN-CAM: a 16 × 8 binary CAM with a neural-network sub-block predictor

A content-addressable memory (CAM) answers "where is this word stored?" by comparing
the search word against every stored word at once. That full parallel compare is what
makes a CAM fast, and also what makes it costly in energy: every match line is
precharged and every search line toggles on every search.

This design cuts most of those compares. The 16-entry × 8-bit array is split into
sub-blocks that can be compare-enabled on their own. In front of the array sits a
small classifier, a *clustered neural network* (sparse clustered network, SCN). It
learns which entry holds which short piece of a tag. For each search it predicts which
sub-blocks can hold the word, and only those sub-blocks are compared. The prediction
can enable more sub-blocks than needed but never too few, so the answer is always the
same as a full compare. A wrong guess costs energy, never accuracy.

The RTL is synthesizable SystemVerilog (IEEE 1800-2017) and is checked with Verilator
and Yosys/slang.

## Contents of the array after reset

With `PRESET=1` (the default), reset loads the reference 16 × 8 table. Entry *i* holds
its own 4-bit index followed by the complement of that index:

| entry | word      | entry | word      |
|------:|-----------|------:|-----------|
| 0     | 0000 1111 | 8     | 1000 0111 |
| 1     | 0001 1110 | 9     | 1001 0110 |
| 2     | 0010 1101 | 10    | 1010 0101 |
| 3     | 0011 1100 | 11    | 1011 0100 |
| 4     | 0100 1011 | 12    | 1100 0011 |
| 5     | 0101 1010 | 13    | 1101 0010 |
| 6     | 0110 1001 | 14    | 1110 0001 |
| 7     | 0111 1000 | 15    | 1111 0000 |

Searching `1100_0011` raises match line ML12 and returns address 12. The classifier is
trained on the same table at reset. Any entry can be rewritten later through the write
port. `scn_cam_pkg::preset_word()` generates this table for any size where
WIDTH = 2·log2(ENTRIES).

## The classifier (`scn_classifier`)

The classifier is the least familiar part of the design.

**Reduced tag.** Only the `Q` least significant bits of a tag are used (Q = 3 by
default). These bits are cut into `C = Q/KAPPA` partitions of `KAPPA` bits each
(KAPPA = 1, so C = 3).

**Input layer PI.** PI has C clusters of `L = 2^KAPPA` binary neurons (3 clusters of 2
neurons). Partition *k* of the reduced tag, read as an integer, switches on that neuron
of cluster *k*. So exactly one neuron per cluster is active. PI has no connections
inside itself.

**Output layer PII.** PII has one binary neuron per CAM entry (16). PI and PII are
joined by a binary connection matrix of (C·L) × ENTRIES bits. It is stored as one
C·L-bit column per entry, `conn[j]`.

**Training.** Writing entry *j* with tag *t* overwrites column *j* with the PI pattern
of *t*. Connections are set from the active neuron of each cluster to neuron *j*, and
every other connection in that column is cleared. Rewriting an entry therefore forgets
its old tag.

**Decoding.** PII neuron *j* fires when it is connected to the active neuron of *every*
cluster. That is the same as "entry *j* was trained with a tag whose low Q bits equal
the search tag's". A stored match can never be missed.

**Compare-enables.** The PII neurons are ORed in groups of ENTRIES/NSB consecutive
entries. Each group's result is the compare-enable of one sub-block (4 groups of 4).

Worked example with the preset table. Searching `1100_0011` gives reduced tag `011`.
Entries 4 (`0100_1011`) and 12 (`1100_0011`) share it, so PII neurons 4 and 12 fire
and sub-blocks 1 and 3 are enabled. Half of the array, 8 of its 16 rows, is compared,
and only entry 12 matches. For this table every reduced tag has exactly two owners in
different sub-blocks. So each search of a stored word enables 2 of the 4 sub-blocks.
A reduced tag that nobody owns enables no sub-block: the array stays idle and the
search misses at once.

Q sets the trade-off. A longer reduced tag gives fewer ambiguous predictions, but a
larger connection matrix. With 16 entries and uniformly distributed reduced tags,
Q = 3 gives 16/2³ = 2 candidate entries per search on average.

## The CAM array (`cam_array`, `cam_subblock`, `cam_cell`)

- **`cam_cell`** stores one bit and compares it with a differential search-line pair
  (SL, SL'). It flags a mismatch, meaning it would discharge its match line, when it
  stores 1 while SL' is high, or stores 0 while SL is high. With both lines low it never
  flags a mismatch. This is the NOR-type cell behaviour.
- **`cam_subblock`** holds `ROWS` words of `WIDTH` cells, each with a valid bit. When
  its `cmp_en` is high, a valid word's match line is high if none of its cells flags a
  mismatch. When `cmp_en` is low, the sub-block is not evaluated and all its match lines
  read low. The match lines are sampled into a register at the clock edge. This register
  stands in for the match-line sense amplifiers of a full-custom array, which are analog
  and are not modelled.
- **`cam_array`** holds NSB sub-blocks. Sub-block *s* holds entries
  `s·ENTRIES/NSB … (s+1)·ENTRIES/NSB − 1`. The array has one write decoder, and all
  sub-blocks share the search lines.
- **`search_data_register`** captures the search word. It drives SL = word and
  SL' = ~word for one cycle, and holds both lines low when idle.
- **`match_encoder`** turns the match lines into `hit`, `multi` (more than one match)
  and `match_addr` (the lowest matching entry), through one register stage.

## Pipeline and timing (`scn_cam`)

The top level accepts one search per clock. Each result comes 3 cycles after its
search:

| cycle | what happens |
|-------|--------------|
| 0 | `srch_en`/`srch_tag` applied. The classifier decodes the reduced tag. At the edge, the search register captures the tag and the classifier registers the sub-block enables. |
| 1 | The search lines are driven and the enabled sub-blocks compare. At the edge, the match lines are sensed. `ml`, `ml_valid` and `sb_en` are valid in cycle 2. |
| 2 | The encoder resolves the match lines. At the edge, `res_valid`, `hit`, `multi` and `match_addr` are registered. They are valid in cycle 3. |

A write (`wr_en`, `wr_addr`, `wr_data`) stores the word and trains the classifier at
the same clock edge. A search sees every write issued in an earlier cycle. A write and
a search must not be issued in the same cycle: if they were, the classifier would
decode with the old connections while the array compared the new word. An assertion in
`scn_classifier` catches this.

Top-level ports:

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (loads the preset table) |
| `wr_en`, `wr_addr`, `wr_data` | in | 1, 4, 8 | write one entry and train the classifier |
| `srch_en`, `srch_tag` | in | 1, 8 | start a search |
| `ml`, `ml_valid` | out | 16, 1 | sensed match lines ML0..ML15 |
| `sb_en` | out | 4 | sub-block enables used by the search now on `ml` |
| `res_valid`, `hit`, `multi`, `match_addr` | out | 1, 1, 1, 4 | search result |

Parameters (all have defaults, shared through `scn_cam_pkg`): `ENTRIES` = 16, `WIDTH` = 8,
`Q` = 3, `KAPPA` = 1, `NSB` = 4, `PRESET` = 1. Requirements: `Q` must be a multiple of
`KAPPA` and at most `WIDTH`, and `ENTRIES` must be a multiple of `NSB`. Both are checked
at elaboration.

## What follows the reference design, and what is this implementation's choice

These parts follow the reference design:

- the 16 × 8 binary array and its ML0..ML15 numbering;
- the preset table;
- the differential search lines and the search (scan-line) data register;
- the split into independently compare-enabled sub-blocks;
- the classifier's structure: reduced tag, C clusters of 2^κ neurons with direct
  binary-to-integer activation, binary PI→PII connections, and the OR of PII groups into
  compare-enables;
- the use of a pipeline.

These parts were chosen here, because the reference leaves them open:

- **Sizes.** Q = 3, κ = 1 and NSB = 4. Q = 3 is the value that gives the "about two
  candidates per search" the design aims for at 16 entries.
- **Reduced-tag bits.** The reduced tag is taken from the low bits. The reference allows
  any bit selection chosen to reduce correlation.
- **Grouping.** Entries are grouped into sub-blocks contiguously.
- **Firing rule.** A PII neuron fires only when all clusters connect to it.
- **Retraining.** Training overwrites the entry's connection column.
- **Pipeline.** The three pipeline stages and their boundaries.
- **Interface.** The write port and the no-write-while-searching rule.
- **Extra state and outputs.** Valid bits, the reset preset, lowest-index priority and
  the `multi` flag.
- **Cell type.** NOR-type mismatch semantics for the cell.
- **Sense amplifiers.** They are not modelled as circuits. Their effect is a register.

The energy saving itself is not modelled. Nothing here measures or estimates power. The
saving shows up only as the number of sub-blocks left idle, which the top-level
testbench reports.

## Verification

Each module has a self-checking testbench in `tb/`. Each one compares the module with a
reference model written independently in the testbench, and ends with a
`TB_RESULT checks=… failures=…` line.

| testbench | what it checks |
|-----------|----------------|
| `tb_cam_cell` | write/hold, reset value, mismatch for all four search-line states |
| `tb_search_data_register` | held word, valid, SL/SL' levels (both low when idle) |
| `tb_cam_subblock` | 4 × 4 example array (rows 1010, 0111, 1100, 1010; search 1100 → ML2 only), compare-enable gating, unwritten rows, random traffic |
| `tb_cam_array` | preset table, search 11000011 → ML12, random sub-block enables and writes |
| `tb_scn_classifier` | PII firing and sub-block enables against the "low Q bits equal" model, retraining, ambiguous queries |
| `tb_match_encoder` | hit / multi / lowest address, clearing when not valid |
| `tb_scn_cam` | whole design at its default size, about 3,000 random operations |
| `tb_scn_cam_workloads` | 4 × 4 example through the whole design at ENTRIES=4, WIDTH=4; all 256 words against the preset table, where every search enables exactly 2 of 4 sub-blocks and exactly 16 hit; a skewed table whose entries share one reduced tag, where every search enables all 4 sub-blocks and every answer stays correct |

`tb_scn_cam` checks the match lines, the enables and the result of every search. It also
checks that each search's result arrives exactly 3 cycles after it was issued, with
searches issued back to back. It counts these events, and fails if one of them never
happens:

- hits;
- misses rejected by the classifier (no sub-block enabled);
- misses found only by the compare;
- ambiguous predictions (more than one sub-block enabled);
- multiple matches;
- writes;
- back-to-back searches.

To simulate with Verilator, for example the whole design:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/scn_cam_pkg.sv tb/tb_scn_cam.sv --top-module tb_scn_cam -o sim
./obj_dir/sim
```

Replace `tb_scn_cam` with another testbench's name to run that test. The package file
must come first on the command line.

## Files

- `rtl/scn_cam_pkg.sv`: default sizes, `preset_word()`
- `rtl/scn_cam.sv`: top level and pipeline
- `rtl/scn_classifier.sv`: clustered-neural-network sub-block predictor
- `rtl/search_data_register.sv`, `rtl/cam_array.sv`, `rtl/cam_subblock.sv`,
  `rtl/cam_cell.sv`: CAM array
- `rtl/match_encoder.sv`: match-line encoder
- `tb/tb_*.sv`: one testbench per module
