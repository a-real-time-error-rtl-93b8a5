# Real-time error detection (RTD) for flip-flop memory arrays

Most memory protection only finds a fault when someone reads the corrupted
word. That read might come a billion cycles after the fault happened. RTD moves
detection into the array itself. Every column of flip-flops carries an XOR tree
that gives the column's parity continuously. A small register holds the parity
each column *should* have. Any mismatch shows up within the clock cycle in which
the fault happens, whether or not the row is ever read.

That signal has two uses, and this RTL covers both:

* **A faster in-line ECC.** Each row stores only a parity bit or two. A read
  then needs only a parity tree, not a SECDED checker plus a syndrome decoder. If
  the row's parity fails, the real-time column mismatch vector already names the
  bad columns, so the bits are flipped on the way out. This is the
  "2D ECC + RTD" scheme.
* **Fault localisation and demand scrubbing.** The error flag rises as soon as
  a cell is corrupted. In post-silicon validation this catches an electrical
  bug at the moment it hits, not much later. In the field it can start a scrub
  that repairs the stored row.

This SystemVerilog implements the RTD scheme published by Sazeides, Bramnik,
Gabor and Canal (IEEE Trans. Emerging Topics in Computing, 2022). It is an
independent implementation. Where the publication leaves things open, the
choices made here are listed under "Choices and departures" below.

## The three signals: RTCP, SCP and EV

For an array of `ROWS` rows by `COLS` bits:

* **RTCP** (real-time column parity), `COLS` bits, combinational: the XOR of
  all cells in each column. It is an extra "port" of the array that needs no
  address decoder.
* **SCP** (stored column parity), a `COLS`-bit register. On every write it
  becomes `SCP ^ IN ^ PD ^ CV`:
  * `IN` is the new row.
  * `PD` ("previous data") is the row being overwritten, read through a second
    mux column.
  * `CV` is a correction vector for `PD`. It is nonzero only when the
    overwritten row is itself faulty (see below).
* **EV** (error vector) `= SCP ^ RTCP`. Bit *c* is set when column *c* holds an
  odd number of faults, or when SCP bit *c* is itself corrupted.

Why `CV` is needed: suppose a faulty row is overwritten and its raw content is
used as `PD`. The SCP would then absorb the fault, and the column would look
clean while it is not. So the overwritten row goes through its own parity
checker (C2) and through the decoder. The decoder turns the fault into a
correction vector, so the SCP update always uses the fault-free old value.
After such a write EV goes back to zero.

The cells have no reset. The SCP is therefore loaded from the RTCP in the first
enabled cycle after reset, which makes the current content the reference. A
`scp_sync` pulse does the same at any time. One use is to clear a column error
that could not be repaired.

## Reading: the 2D decoder

Each stored row is `{parity[H-1:0], data[DATA_W-1:0]}`. With `H`-way
horizontal interleaving, parity bit *k* covers the data bits *j* with
`j % H == k`. Parity bit *k*'s own column counts as part of partition *k*.
The default is `H = 2`: one parity bit for the even bit positions and one for
the odd ones.

On a read, checker C1 gives a parity status per partition. The decoder then
counts the EV bits in each partition. The count is classed as zero, odd, or
even-and-nonzero:

| condition (any partition)                      | outcome |
|------------------------------------------------|---------|
| EV count even and nonzero                      | DUE     |
| parity fails and EV count is zero              | DUE     |
| otherwise, some partition's parity fails       | CE      |
| otherwise                                      | NE      |

On CE the output is `data ^ CV`. `CV` holds the EV bits of the partitions whose
parity failed. EV bits in partitions that passed belong to faults in *other*
rows, so they are masked out. On NE and DUE the data passes unchanged, with
the flag set.

How to read the rules:

* **Odd EV count with good parity (NE):** the fault is in another row.
* **Even EV count (DUE):** this rule exists because a row parity cannot see two
  flips in one partition. Without it, such a row would be returned silently
  corrupted.
* **Failed parity with an EV count of zero (DUE):** this happens when two rows
  have faults in the same column, so the faults cancel in the RTCP.

With `H = 1` these rules reduce to the five-case table of the basic scheme.
With `H = 2`, a two-bit horizontal burst (one flip in each partition) becomes
correctable.

**Vertical interleaving** (`V`): the row classes `r % V` get separate RTCP
trees and separate SCP registers. An access uses the class of its row. Then a
burst of `V` faults straight down a column is still seen, and corrected. With a
single column parity it would cancel out.

For small multi-bit upsets the interleaving options behave as follows. Each
cell is the decoder outcome when a faulty row is read:

| upset                          | H=1 V=1 | H=2 | V=2 | V=4 | H=2 V=2 |
|--------------------------------|---------|-----|-----|-----|---------|
| single bit                     | CE      | CE  | CE  | CE  | CE      |
| two bits down one column       | DUE     | DUE | CE  | CE  | CE      |
| two adjacent bits in one row   | DUE     | CE  | DUE | DUE | CE      |
| two bits on a diagonal         | DUE     | CE  | CE  | CE  | CE      |

A vertical pair with `V = 1` does not even raise the real-time flag, because
the two faults cancel in the column parity. It is caught on read: the row
parity fails while EV is zero.

The scheme assumes that at most one row holds faults at a time, or that faults
in different rows fall in different partitions or row classes. When that does
not hold, the decoder's job is to raise DUE rather than return wrong data. It
cannot do this in every case: a column-even fault pattern combined with an
even count in the read row is invisible to both codes.

## The array's structure

`rtd_2d_ecc_array` is built from `COLS = DATA_W + H` bit-slices (`rtd_bitslice`).
All of them share one write address decoder and one read address decoder
(`rtd_addr_decoder`). Each slice contains:

* a column of `ROWS` flip-flops, written through the one-hot write gates;
* a read mux column: AND-mask each cell with the read gates, then OR-reduce;
* a PD mux column: the same structure, selected by the write gates;
* `V` XOR trees for the RTCP.

The PD mux column is a second read port, and it costs area. With
`PD_PORT = 0` it is left out, and a write becomes a read-before-write:

* In the first cycle the old row is read through the regular read port into a
  register. `wready` is low, and so is `rready`: an external read in that
  cycle is not served.
* In the second cycle the row is written, and `wready` is high.
* `wen`, `waddr` and `din` must stay stable until `wready` is seen. An
  assertion checks the address.

With `PD_PORT = 1` (the default) `wready` and `rready` are always high and a
write takes one cycle.

Around the slices sit:

* the parity generator `rtd_parity_gen` (G);
* two checkers `rtd_row_checker`: C1 on the read row, C2 on the PD row;
* the `rtd_scp` register, which also produces EV;
* two `rtd_ecc_decoder` instances: one turns the read status into the output
  correction, the other turns the PD status into the SCP correction.

The read path, from address to corrected data, is combinational:

```
address decode -> row gate -> cell mask -> mux tree -> H-way parity tree
-> correction-vector gating -> XOR
```

Nothing on this path waits for a syndrome decoder. That is where the access
time gain over SECDED comes from. Depending on size, the publication reports
8 % to 24 % shorter access time. The cost is 12 % to 53 % more area and 21 % to
42 % more power.

## Demand scrubbing

`rtd_scrubber` serves arrays where in-line correction is not wanted. Once
started, it does the following:

1. It reads every row through the array's read port, one row per cycle.
2. It XORs each row whose parity is good into an accumulator as wide as a
   stored row.
3. It remembers the row whose parity fails.
4. After the last row, the repaired value of that row is `accumulator ^ SCP`,
   because the SCP is the XOR of the fault-free rows. The scrubber writes this
   value back and sets `fixed`.

It raises `due` instead in these cases:

* two rows fail;
* EV is nonzero but no row fails (an even flip count inside one partition);
* a row fails while EV is zero.

With `V > 1` each row class has its own accumulator, so one faulty row can be
repaired per class. One scrub takes `ROWS + V + 1` cycles from `start` to
`done`. A write-back waits while `wr_ready` is low, which adds one cycle per
repaired row on an array built with `PD_PORT = 0`.

## The row-and-column variant

`rtd_rowcol_array` (default 4×4) adds a real-time parity tree per row and a
stored expected parity per row, next to the column ones. A row's error signal
is then known without reading the row, so the read path has no parity tree at
all: `out = d[row] ^ (row_err[row] ? col_err : 0)`. A single corrupted data bit
anywhere in the array is corrected on read. A fault in an expected-parity cell
raises only a row error or only a column error, and it flips nothing. When a
faulty row is overwritten, its bad bit is inverted in the column-parity update.
The column errors then clear, as in the main array.

## The detection-only array

`rtd_detect_array` (default 64×64) is the basic RTD arrangement with no row
code. It uses the same bit-slices and SCP register, with `CV` tied to zero.
EV and `rtd_err` flag a corrupted column in the cycle after the fault, and
reads return the stored data unchanged. Without a row code a faulty `PD`
cannot be repaired, so the flag stays set even after the faulty row is
overwritten. Only `sync` clears it. The flag is meant to stop execution,
start a repair, or, in post-silicon validation, mark the cycle in which the
array was corrupted.

## Top level: `rtd_top`

The top level, `rtd_top`, contains:

* `rtd_2d_ecc_array` with `rtd_scrubber` attached to its ports;
* `rtd_rowcol_array` beside them, with its ports prefixed `rc_`;
* `rtd_detect_array` beside them, with its ports prefixed `d_`.

All top-level ports are plain signals.

| group | ports | timing |
|-------|-------|--------|
| write | `wen waddr din` → `wready wr_ce wr_due` | row, SCP update at rising `clk` when `wready` is high; `wr_ce/wr_due` describe the overwritten row, combinational |
| read  | `ren raddr` → `rready dout rd_ce rd_due` | combinational, same cycle, valid when `rready` is high; same-row write in that cycle reads the old value |
| RTD   | `rtd_en scp_sync` → `ev rtd_err` | `ev`/`rtd_err` combinational from the cells: set right after the edge at which a fault appears |
| scrub | `scrub_req scrub_auto` → `busy scrub_done scrub_fixed scrub_due` | the scrub starts at the edge after `scrub_req`, or after a new rise of `rtd_err` when `scrub_auto` is set |
| inject| `inj_en inj_row inj_mask` | inverts the selected cells of one row at the rising edge, without touching the SCP |

The read and write ports stall while `busy` is high: the scrubber owns them,
and `wen`/`ren` from outside are ignored. The caller must hold its access until
`busy` falls.

`rtd_en = 0` stands for a control bit that turns RTD off in field use to save
power. In that state:

* EV reads zero;
* the SCP is held;
* a row parity failure is reported as DUE.

When RTD is switched back on, the SCP is reloaded from the RTCP.

Parameters (defaults in brackets):

* `ROWS` [64], `DATA_W` [64]: the 64×64 array used for the published RTL
  validation.
* `H` [2]: horizontal interleaving, as in the evaluated design.
* `V` [1]: vertical interleaving.
* `PD_PORT` [1]: 1 gives the PD mux column and one-cycle writes; 0 gives
  two-cycle writes through the read port.
* `RC_ROWS`, `RC_COLS` [4, 4].
* `D_ROWS`, `D_COLS` [64, 64]: size of the detection-only array.

`ROWS` and `V` must be powers of two.

## Choices and departures

These points are decisions made for this RTL. The publication leaves them open
or describes them only in words:

* The column layout and partition map described above. This includes counting
  the parity bits' own columns in SCP/EV.
* **Decoder:** on CE, the correction vector masks the EV bits of partitions
  whose parity passed. On NE and DUE the correction vector is zero. The rules
  generalise to any `H`.
* **Reads** are combinational. There is no output register.
* **Initialisation** is done by loading the SCP from the RTCP after reset, on
  `scp_sync`, and on re-enable. The behaviour of `rtd_en` is likewise this
  design's choice.
* **Error injection** (`inj_*`) is a test hook added here. It models an upset or
  a write over a failing speed path.
* **Writes after power-up:** the first write over power-up garbage usually
  reports `wr_due`, because random content fails its row parity. The SCP stays
  correct in that case, since it was loaded from the real content.
* **Scrubber:**
  * its handshake, its timing, and the way it shares ports with the in-line
    array;
  * the per-class accumulators;
  * its write-back uses `wr_keep_scp`, so the SCP is left unchanged.
* **Writes without a PD port** (`PD_PORT = 0`): the publication only says
  that the regular read port can read the old row before each write. The
  two-cycle sequence and the `wready`/`rready` handshake are this design's.
* **Detection-only array:** its size is not given, so it takes the same
  64×64 default. That its flag is sticky after an overwrite follows from the
  update rule; the publication does not discuss this case.
* **Upset shapes:** apart from the two-bit horizontal burst, the shapes in
  the interleaving table are the simplest ones that give the published
  outcomes. Larger published patterns (three and four bits) are not tested,
  because their shapes are not given.
* **Row-and-column array:** the column error signals are combinational, not
  clocked. There is no DUE output, because only single-error correction is
  described for this design.
* **Not implemented:**
  * The SECDED array, which serves only as the comparison baseline.
  * Any logging around the error flag (for example a timestamp of the first
    error) for post-silicon debug. The publication describes none.
* **Gate-level structure:** the NAND/NOR mux trees and the address pre-decode
  are written behaviourally and left to synthesis.

## What has been checked

Each module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M`.

**Exhaustive or directed tests:**

* The address decoder and the decoder tables are checked exhaustively. The
  decoder is checked for `H = 1` and `H = 2` over every EV and parity status of
  an 8-bit row.
* `tb_rtd_2d_ecc_array` and `tb_rtd_2d_ecc_array_vi` go through these cases:
  * single upsets, detected in the cycle after they happen;
  * correction on read;
  * overwriting a faulty row;
  * 2-bit horizontal and vertical bursts with and without interleaving;
  * blind double flips;
  * faults in parity bits;
  * column-cancelling faults;
  * RTD off and on;
  * a write that stores one bit wrong (a failing speed path), flagged right
    after its clock edge and corrected on read;
  * a random phase.
* `tb_rtd_2d_ecc_array_rbw` runs the same kinds of cases on a `PD_PORT = 0`
  array. It also checks the two-cycle write and the read port it borrows.
* `tb_rtd_mbu_patterns` injects each upset of the table above at random
  places into five arrays, one per configuration, and checks every outcome.
  For CE it also checks the corrected data.
* `tb_rtd_detect_array` checks detection, the sticky flag after an
  overwrite, `sync` and the enable.
* `tb_rtd_scrubber` checks repair values and DUE cases against a behavioural
  array, and checks the `ROWS + V + 1` latency.

**End-to-end tests:** `tb_rtd_top` (16×16, `PD_PORT = 0`, 8×8 detection-only
array) and `tb_rtd_top_full` (every parameter at its default, 64×64)
drive the whole top. Both count every mechanism and fail if any of them never
happened:

* in-line CE;
* read DUE and write DUE;
* PD correction;
* real-time detection;
* manual scrub ending in DUE;
* automatic scrub that repairs;
* stall;
* SCP sync;
* RTD off;
* row/column correction;
* detection in the detection-only array;
* two-cycle writes (`tb_rtd_top` only, since it uses `PD_PORT = 0`).

The full-size run takes well under a minute.

This RTL does not reproduce the published area, delay and power figures. Those
come from an analytical gate model.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/rtd_pkg.sv tb/tb_rtd_top_full.sv --top-module tb_rtd_top_full -o sim
./obj_dir/sim
```

For any other testbench, replace `tb_rtd_top_full` with its name. The package
`rtd_pkg.sv` has to come first on the command line. Verilator has two states
only, so the testbenches initialise everything they read. The array cells,
which have no reset, are handled by the SCP reload described above.

## Files

| file | content |
|------|---------|
| `rtl/rtd_pkg.sv` | decoder outcome type, column-to-partition map |
| `rtl/rtd_addr_decoder.sv` | shared one-hot row decoder |
| `rtl/rtd_bitslice.sv` | one column: cells, read mux, PD mux, RTCP tree(s) |
| `rtl/rtd_parity_gen.sv`, `rtl/rtd_row_checker.sv` | row parity G and checkers C1/C2 |
| `rtl/rtd_scp.sv` | SCP register and EV |
| `rtl/rtd_ecc_decoder.sv` | decoder D (NE/CE/DUE and correction vector) |
| `rtl/rtd_2d_ecc_array.sv` | the 2D ECC RTD array |
| `rtl/rtd_scrubber.sv` | demand-scrubbing controller |
| `rtl/rtd_rowcol_array.sv` | row-and-column RTD array |
| `rtl/rtd_detect_array.sv` | detection-only RTD array |
| `rtl/rtd_top.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_rtd_2d_ecc_array_vi`, `tb_rtd_2d_ecc_array_rbw`, `tb_rtd_mbu_patterns` and `tb_rtd_top_full` |
