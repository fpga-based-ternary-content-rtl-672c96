# Ternary CAM from plain RAM by vertical partitioning

A ternary content-addressable memory (TCAM) compares a search key with every
stored word at once. Each stored bit is 0, 1 or X (don't care), and the memory
returns the address of a matching word. Native TCAM cells are large and
costly, and FPGAs have none. This design builds the same behaviour from
ordinary RAM and a little logic.

The main idea is to never store the ternary words directly. The stored table
is cut column-wise into `k` **vertical partitions** (VPs) of `w` bits each.
In one VP a `w`-bit slice of the key can take only `2^w` values. For each of
those values that some stored word accepts, the VP keeps a `K`-bit vector
with one bit per stored word: "word `j` accepts this slice value". A search
reads one such vector per VP and ANDs them. The words left are exactly those
that match the whole key.

With the default parameters this is an 8-bit, 4-word TCAM with two 4-bit
vertical partitions.

## One vertical partition: BPT, Last Index, APTAG, APT

Storing a `K`-bit vector for every one of the `2^w` values would waste most
of the RAM, because few values are usually present. A VP therefore uses
three parts:

* **Bit Position Table (BPT)** (`tcam_bpt`). One presence bit per possible
  slice value, `2^w` bits in all. They are arranged as `2^(w-p)` rows of
  `2^p` bits. The high `w-p` bits of the slice (the *BPTA*) select a row.
  The low `p` bits (the *BPI*, bit position indicator) select a bit in it.
  Each row also stores a signed `(w+1)`-bit **Last Index (LI)**. The LI is
  the number of present values in all lower rows, minus one. The lowest row
  therefore always has LI = -1.
* **APT Address Generator (APTAG)** (`tcam_aptag`). A ones-counter counts the
  1 bits of the selected row, from bit 0 up to and including bit BPI. An
  adder adds the row's LI. For a present value the result is its **rank**
  among all present values (0 for the smallest). This is the APT address.
* **Address Position Table (APT)** (`tcam_apt`). It has `2^w` rows of `K`
  bits. Row `r` holds the word vector of the `r`-th present value. The rows
  are packed: only as many rows are used as there are distinct present
  values.

So the BPT plus the APTAG act as a rank/select structure. They map a sparse
set of slice values onto a dense range of APT rows with one RAM read and a
small popcount.

### Worked example

Take this table (bit 7 on the left, X = don't care):

| address | word        |
|---------|-------------|
| 0       | `1111 0000` |
| 1       | `0001 1X1X` |
| 2       | `0001 1010` |
| 3       | `XXXX 1010` |

VP0 holds bits 3:0. The present values are 0000, 1010, 1011, 1110 and 1111.
With `p = 2`:

| BPT row (values) | bits (bit3..bit0) | LI |
|------------------|-------------------|----|
| 0 (0-3)          | `0001`            | -1 |
| 1 (4-7)          | `0000`            | 0  |
| 2 (8-11)         | `1100`            | 0  |
| 3 (12-15)        | `1100`            | 2  |

The APT rows, in rank order, are listed below. Each shows the word vector
(word3..word0):

| rank | value | vector |
|------|-------|--------|
| 0    | 0000  | 0001   |
| 1    | 1010  | 1110   |
| 2    | 1011  | 0010   |
| 3    | 1110  | 0010   |
| 4    | 1111  | 0010   |

Search with the key `0001 1010`:

* In VP0 the slice is 1010. The BPTA is 2 and the BPI is 2. Row 2 reads
  `1100` and bit 2 is set, so this is a hit. One 1 bit lies at positions
  0..2. LI is 0, so the APT address is 0 + 1 = 1. That row gives vector
  `1110`.
* In VP1 every value is present, because word 3 is `XXXX` there. The slice
  0001 gets rank 1, and that row reads `1110` (words 1, 2 and 3).
* The AND is `1110`. The priority encoder returns address 1.

## Search path

`tcam_layer` slices the key: VP `i` gets bits `[i*w +: w]`. Every VP reads
its BPT. The BPT **hit** bits go through a 1-bit AND (`tcam_and`). If any VP
misses, the key cannot match. The AND output is then low and acts as the
enable of the APTAGs and APTs, so the APT rows read as zero. Otherwise the
`K`-bit APT rows are ANDed (`tcam_and` again) into the **match lines**. The
local priority encoder (`tcam_lpe`) returns the lowest matching address.

The whole search is combinational: key in, `match` / `match_addr` /
`match_lines` out, with no clock latency. Both tables are read as
asynchronous RAM, which maps onto FPGA distributed (LUT) RAM. The longest
path runs from the key through the BPT read, the popcount and the adder,
then the APT read, the AND and the priority encoder. If you need a higher
clock rate, register the key or the result outside the core, or split the
path after the APTAG.

## Loading the table: the mapping pass

The BPT and APT contents follow from the ternary table. `tcam_mapper`
builds them in hardware:

* It keeps the table in registers. Each entry has a value, a mask (mask bit
  1 = X) and a valid flag. An invalid entry matches nothing.
* `map_start` runs one **mapping pass**. The pass steps a counter `v` through
  all `2^w` slice values, one per clock. All VPs (and all layers) work in
  parallel.
* On each clock, and for each VP, it compares `v` with that VP's slice of
  every entry. This gives the word vector of `v`.
* If the vector is non-zero, `v` is present. The vector is written to the
  APT at the next free row, and a running count is incremented. `v`'s bit is
  set in the BPT row being assembled.
* At the last value of a BPT row, the row is written together with its LI.
  The LI is the count at the start of the row, minus 1.
* A pass takes exactly `2^w` clocks (16 at the defaults). `busy` is high for
  the whole pass, and `map_done` pulses once at the end.
* Table writes (`wr_en`) are accepted only while `wr_ready` is high, that is
  while no pass runs. `map_start` is ignored during a pass.
* After reset a pass runs by itself over the empty table. This clears every
  BPT, so the TCAM starts empty. Until that pass ends the search outputs
  mean nothing.

APT rows above the last used rank keep stale data. They are never read:
such a row can only be addressed through a BPT hit, and the pass rewrites
every BPT row.

## Horizontal layers (hybrid partitioning)

With `LAYERS > 1` the words are also split into horizontal layers of
`DEPTH/LAYERS` words each:

* Each layer is a full `tcam_layer`, with its own VPs, ANDs and local
  priority encoder.
* Layer `l` holds the addresses `l*DEPTH/LAYERS` and up.
* `tcam_gpe` (global priority encoder) picks the lowest layer that matches
  and adds the layer offset to that layer's local address.

`LAYERS = 2` with two VPs gives four hybrid partitions. This is the
alternative that the vertically partitioned organisation was measured
against. In the original FPGA implementation of the 8x4 example, the
vertical version was the smaller one (15 vs 27 slices) and slightly faster.
The default is therefore `LAYERS = 1`, and `tcam_gpe` then just forwards
the result of the single layer.

## Interface (`tcam_top`)

| port          | dir | width          | meaning                                               |
|---------------|-----|----------------|-------------------------------------------------------|
| `clk`         | in  | 1              | clock                                                 |
| `rst_n`       | in  | 1              | asynchronous reset, active low                        |
| `wr_en`       | in  | 1              | write a table entry (taken when `wr_ready`)           |
| `wr_ready`    | out | 1              | table port free (no pass running)                     |
| `wr_addr`     | in  | clog2(DEPTH)   | entry address (= priority: lower wins)                |
| `wr_value`    | in  | WIDTH          | entry value                                           |
| `wr_mask`     | in  | WIDTH          | 1 = don't care                                        |
| `wr_valid`    | in  | 1              | entry takes part in searches                          |
| `map_start`   | in  | 1              | rebuild BPTs/APTs from the table                      |
| `busy`        | out | 1              | pass running, search results not valid                |
| `map_done`    | out | 1              | one-clock pulse at the end of a pass                  |
| `key`         | in  | WIDTH          | binary search key                                     |
| `match`       | out | 1              | some valid entry matches `key`                        |
| `match_addr`  | out | clog2(DEPTH)   | lowest matching address                               |
| `match_lines` | out | DEPTH          | one bit per matching entry                            |

Written entries take effect only after the next mapping pass.

## Parameters

Defaults come from `tcam_pkg`.

| parameter | default | meaning                                         |
|-----------|---------|-------------------------------------------------|
| `WIDTH`   | 8       | bits per word (`W`)                             |
| `DEPTH`   | 4       | stored words (`K`)                              |
| `VPS`     | 2       | vertical partitions (`k`); `w = WIDTH/VPS`      |
| `PBITS`   | 2       | BPI width `p`; BPT rows hold `2^p` bits         |
| `LAYERS`  | 1       | horizontal layers; `DEPTH/LAYERS` words each    |

`WIDTH` must be a multiple of `VPS`, `DEPTH` a multiple of `LAYERS`, and
`w > p`.

Memory per VP:

* BPT: `2^(w-p) * (2^p + w + 1)` bits.
* APT: `2^w * DEPTH/LAYERS` bits.

The APT grows as `2^w`, so keep `w` small: add VPs rather than widen them.
The mapping pass takes `2^w` clocks.

## What follows the original design and what is chosen here

These parts follow the original design:

* the split into BPT, APTAG and APT;
* the BPT row layout, with `2^(w-p)` rows of `2^p` bits;
* the `(w+1)`-bit Last Index that starts at -1;
* the 1's counter plus adder in the APTAG;
* the APT size of `2^w x K`;
* the AND of BPT hits as an enable, the AND of APT rows and the priority
  encoder;
* the hybrid layers with local and global priority encoders;
* the 8-bit word with two VPs.

These are choices made here:

* **Depth of 4 words.** The example is labelled "8x4" and searched with an
  8-bit key. This design reads the label as 8 bits by 4 words.
* **`p = 2`.** No value for `p` is fixed.
* **"Up to the BPI" is inclusive.** The 1's counter counts up to and
  including the BPI position. This is what makes LI = -1 give rank 0.
* **Lowest address first** in both priority encoders.
* **Slice order.** VP0 takes the least significant bits.
* **Mapping in hardware.** The mapping pass, its timing, the table port and
  the automatic pass after reset are all this design's own. The original
  only states what the tables must contain after mapping.
* **Combinational search.** The search has no pipeline registers.
* **Zero rows on a miss.** When the enable is low, the APTAG address is
  forced to 0 and the APT output to zeros.
* **Binary keys only.** Searching with X in the key is not supported.

## Files

| file                 | contents                                                     |
|----------------------|--------------------------------------------------------------|
| `rtl/tcam_pkg.sv`    | default sizes                                                |
| `rtl/tcam_bpt.sv`    | Bit Position Table with Last Index                           |
| `rtl/tcam_aptag.sv`  | ones-counter + adder                                         |
| `rtl/tcam_apt.sv`    | Address Position Table                                       |
| `rtl/tcam_vp.sv`     | one vertical partition                                       |
| `rtl/tcam_and.sv`    | AND of N vectors (1-bit and K-bit ANDing)                    |
| `rtl/tcam_lpe.sv`    | local priority encoder                                       |
| `rtl/tcam_layer.sv`  | k VPs + ANDs + LPE                                           |
| `rtl/tcam_gpe.sv`    | global priority encoder over layers                          |
| `rtl/tcam_mapper.sv` | ternary table and mapping pass                               |
| `rtl/tcam_top.sv`    | top level                                                    |
| `tb/tcam_ref_pkg.sv` | reference model: ternary match, ranks, expected table images |
| `tb/tb_*.sv`         | one self-checking testbench per module                       |

## Verification

Every module has a self-checking testbench. Each one compares the module
against values from `tb/tcam_ref_pkg.sv`, which computes matches, ranks and
expected table images straight from the definitions, without the hardware's
counters. Each testbench prints `TB_RESULT checks=N failures=M` and has a
watchdog. The checks are:

* The AND, priority encoder and APTAG testbenches are exhaustive.
* The BPT, APT, VP and layer testbenches load table images that the
  reference model computed.
* `tb_tcam_mapper` records every write of the mapping pass and compares the
  result with the expected images, for random tables in two layers. It also
  checks the 16-clock pass length.
* `tb_tcam_top` runs the default configuration end to end. It uses a fixed
  table searched with `00011010` (three words match, and address 1 must
  win), then 60 random ternary tables. Each table is mapped and searched
  with all 256 keys. The test counts each mechanism and fails if one never
  happens: a BPT miss stopping the search, BPT hits with no common word, a
  single match, multiple matches resolved by priority, a match through an X
  bit, an invalid entry ignored, a write held off during a pass, and a
  mapping pass.
* `tb_tcam_top_hp` repeats this with `LAYERS = 2` and also counts searches
  where both layers match and the global encoder has to choose.
* `tb_tcam_top_wide` checks that the parameters scale. It uses 12-bit words
  in three VPs, 8 words in two layers and `p = 1`, and searches every key
  of every table.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/tcam_pkg.sv tb/tcam_ref_pkg.sv tb/tb_tcam_top.sv --top-module tb_tcam_top -o sim
./obj_dir/sim
```

Replace `tb_tcam_top` with any other testbench name.

## Limits

* Gate counts and timing of the original FPGA implementation were not
  reproduced. Only the logic function was checked.
* The mapping pass rebuilds everything even when only one entry changed. An
  incremental update is not implemented.
* Every entry is compared with every slice value during a pass. That logic
  grows as `DEPTH * WIDTH`, which is fine for small tables. For large
  tables, compute the images in software and write the RAMs directly.
