# Low-cost memory fault detection tester

A memory tester for a small bit-per-cell memory. It writes known data into
every cell, reads it back and compares. The patterns and orders of those
writes and reads are chosen so that typical memory defects become visible:
stuck-at cells, cells that cannot make a transition, coupling between
neighbouring cells, and address decoding errors. It runs two kinds of test:

* **March tests**: MATS+, MATS++, March X, March C, March C-, March A,
  March Y and March B. Each one walks the address space several times, up and
  down, applying a fixed read/write sequence to one cell before moving on to
  the next.
* **Zero-one scan**: twelve data backgrounds (solid, checkerboard, row and
  column stripes, double row and double column stripes, each with its
  complement). Each background is written into the whole array at once and
  read back at once.

The device under test is itself part of the design. It is a grid of D
flip-flops, one per bit, with a row decoder and per-cell enables. Each
flip-flop's set and reset terminals are brought out, so faults can be injected
while a test runs. The tester repeats its program a chosen number of times.
For each iteration it produces a pass/fail map of the cells, and for every
read it produces a log record.

The RTL is synthesizable SystemVerilog (IEEE 1800-2017), parameterised in
array size. Its default is a 4 x 4 array. 8 x 8 and 16 x 16 arrays are
exercised by the testbenches.

This design follows the architecture and test content described in *VHDL
Modelling of Low-Cost Memory Fault Detection Tester* (Quek, Pang, Chan, Lee,
Chung, J. Eng. Technol. Appl. Phys., 2020). It is an independent
implementation, not the authors' code.

## Structure

```
            start, loops, run_scan, march_mask
                          |
   +----------------------v-----------------------+
   | mem_tester                                   |
   |   scan_engine --- bg_pattern_gen             |
   |   march_engine -- march_rom                  |
   |   compare, fail maps, cell disabling, log    |
   +--+-----------+-----------+--------------^----+
      | row_addr  | cell_en   | wdata, we    | q (all cells)
      | row_all   |           |              |
   +--v--------+  |           |              |
   |row_decoder|  |           |              |
   +--+--------+  |           |              |
      | row_en    |           |              |
   +--v-----------v-----------v--------------+----+
   | mem_array: ROWS x COLS mem_cell               |<-- fault_set, fault_clr
   |  (row enable AND cell enable -> flop enable)  |--> led
   +-----------------------------------------------+
```

`mem_tester_top` wires these blocks together. All blocks share the clock. One
asynchronous active-low reset, `rst_n`, resets the tester and clears every
memory cell.

### The memory array (`mem_array`, `mem_cell`)

Every cell is a D flip-flop with:

* its own data input;
* a clock enable;
* an asynchronous set terminal and an asynchronous reset terminal (reset wins).

A cell loads its data input at the clock edge only when all three of these are
high:
* the row decoder selects its row;
* the tester raises that cell's enable;
* the write strobe is high.

This per-row gating stands for the pass transistors of the board build. There,
a selected row's transistors connect the enables of that row's flip-flops, and
this replaces a column decoder. Every stored bit is always visible on `q`, as
the `led` outputs of the top. A read therefore takes no cycle of its own: the
tester compares `q` in the same cycle.

A cell whose set terminal is held high is stuck-at-1. One whose reset terminal
is held high is stuck-at-0. A short pulse on a terminal emulates a disturbance,
such as a coupling fault triggered by another cell.

### Row decoder (`row_decoder`)

Converts the binary row number to a one-hot row enable. For eight rows this is
the 3-to-8 decoder of the board build. An extra `all_rows` input enables every
row at once, which the zero-one scan uses.

## How a March test runs

`march_rom` holds the algorithms as lists of *elements*. An element is an
address order (up, down, or either) plus up to six operations (`r0`, `r1`,
`w0`, `w1`). `march_engine` executes an element by applying all of its
operations to one cell, then stepping to the next address. When the last cell
is done, it moves to the next element. An "either" element is walked
ascending.

| Algorithm | Sequence | Ops per cell (k) | Reads per cell |
|-----------|----------|-----:|----:|
| MATS+    | ⇕(w0); ⇑(r0,w1); ⇓(r1,w0) | 5 | 2 |
| MATS++   | ⇕(w0); ⇑(r0,w1); ⇓(r1,w0,r0) | 6 | 3 |
| March X  | ⇕(w0); ⇑(r0,w1); ⇓(r1,w0); ⇕(r0) | 6 | 3 |
| March C  | ⇕(w0); ⇑(r0,w1); ⇑(r1,w0); ⇕(r0); ⇓(r0,w1); ⇓(r1,w0); ⇕(r0) | 11 | 6 |
| March C- | ⇕(w0); ⇑(r0,w1); ⇑(r1,w0); ⇓(r0,w1); ⇓(r1,w0); ⇕(r0) | 10 | 5 |
| March A  | ⇕(w0); ⇑(r0,w1,w0,w1); ⇑(r1,w0,w1); ⇓(r1,w0,w1,w0); ⇓(r0,w1,w0) | 15 | 4 |
| March Y  | ⇕(w0); ⇑(r0,w1,r1); ⇓(r1,w0,r0); ⇕(r0) | 8 | 5 |
| March B  | ⇕(w0); ⇑(r0,w1,r1,w0,r0,w1); ⇑(r1,w0,w1); ⇓(r1,w0,w1,w0); ⇓(r0,w1,w0) | 17 | 6 |

March C is used in its standard form, with a descending fifth element. With an
ascending fifth element, a coupling fault whose aggressor lies above its victim
would escape the test.

Cells are addressed linearly: index = row × COLS + column. For each operation,
the tester:
* sends the row to the row decoder;
* raises `cell_en` only in the addressed column (failed cells excluded);
* drives the data bit on every column.

The engine issues one operation per clock with no gaps. An algorithm therefore
takes exactly **k × n cycles** for n = ROWS × COLS cells. `op_last` flags the
final operation. The tester restarts the engine on that same cycle for the next
algorithm, so a program has no idle cycles between tests.

The algorithms differ in what they catch. For example, an idempotent coupling
fault can be set up in which a rising aggressor forces a victim at a lower
address to 1. MATS+ never reads the victim between the aggressor's rise and
the victim's next write, so it misses the fault. March C- detects it in its
descending `(r0,w1)` element. The end-to-end testbench demonstrates exactly
this.

## The zero-one scan

| Code | Background | Cell (r, c) |
|-----:|-----------|-------------|
| 0, 1 | solid zero / solid one | 0 |
| 2, 3 | checkerboard / complement | (r + c) mod 2 |
| 4, 5 | row stripes / complement | r mod 2 |
| 6, 7 | double row stripes / complement | ⌊r/2⌋ mod 2 |
| 8, 9 | column stripes / complement | c mod 2 |
| 10, 11 | double column stripes / complement | ⌊c/2⌋ mod 2 |

Odd codes are the complement of the even code before them.
`bg_pattern_gen` computes the image for any array size. `scan_engine` spends
one cycle writing the whole background, with every row selected and every
non-failed cell enabled, and one cycle reading it back. The scan therefore
takes **24 cycles whatever the array size**. When the array is known to hold
all zeros, the write of the solid-zero background is skipped and the scan
takes 23 cycles. The array holds all zeros after reset, before the first
write.

## Results: fail maps, disabling and the log

* A read that differs from the expected value marks the cell failed for the
  current iteration.
* From then on the cell's enable stays low, so it is not written again, and it
  is not compared again. The other cells carry on.
* At the end of each iteration, `iter_done` pulses for one cycle. At the same
  time, `iter_num` and `iter_fail_map` hold that iteration's map, and the
  per-iteration map is cleared.
* `fail_map` accumulates over all iterations. `pass` is valid after `done`.
* `test_cycles` is the length of the last program in cycles.

Each read also produces a log record for an external logger, valid for one
cycle with `log_valid`:

| Field | Content |
|-------|---------|
| `log_time` | cycles since reset |
| `log_phase`, `log_test` | scan or March, and which background or algorithm |
| `log_mask` | the cells compared |
| `log_expected` | expected data |
| `log_actual` | data read |
| `log_fail` | a compared cell mismatched |

The testbenches turn the fail maps into a datalog, `_` for a passing cell and
`X` for a failing one:

```
  _ X _ X _ X _ X
  _ X _ X _ X _ X      (8 x 8 array, odd columns stuck from iteration 4)
  ...
```

## Test time

A program is the scan (if `run_scan`), then every algorithm whose bit is set
in `march_mask`, lowest code first, repeated `loops` times:

    cycles = loops × (24·run_scan + Σ k·n)  − 1 if the first scan starts on a clear array

| Program, 10 repetitions | 4 x 4 | 8 x 8 | 16 x 16 |
|---|---:|---:|---:|
| zero-one scan (fresh array) | 239 | 239 | 239 |
| MATS+ | 800 | 3 200 | 12 800 |
| March C | 1 760 | 7 040 | 28 160 |
| March C- | 1 600 | 6 400 | 25 600 |
| scan + MATS+ + March C- (the combination given as full coverage; see Departures for stuck-open faults) | 2 640 | 9 840 | 38 640 |

These are clock cycles. Times in nanoseconds depend on the FPGA and its
clock, which this design does not fix.

## Top-level interface (`mem_tester_top`)

| Port | Dir | Width | Meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset, also clears the array |
| `start` | in | 1 | one-cycle pulse while idle: run the program |
| `loops` | in | 8 | repetitions (0 ends at once with `pass`) |
| `run_scan` | in | 1 | include the zero-one scan |
| `march_mask` | in | 8 | bit i selects algorithm code i: 0 MATS+, 1 MATS++, 2 March X, 3 March C, 4 March C-, 5 March A, 6 March Y, 7 March B |
| `fault_set`, `fault_clr` | in | ROWS×COLS | set / reset terminal of every cell |
| `led` | out | ROWS×COLS | stored bit of every cell |
| `busy`, `done`, `pass` | out | 1 | `busy` is high from the cycle after `start`; `done` pulses at the end |
| `iter_done`, `iter_num`, `iter_fail_map` | out | 1, 8, ROWS×COLS | per-iteration result |
| `fail_map`, `test_cycles` | out | ROWS×COLS, 32 | accumulated result, program length |
| `log_*` | out | | one record per read, see above |

Parameters: `ROWS`, `COLS` (default 4, 4). Arrays are packed
`[ROWS-1:0][COLS-1:0]`, so bit `[r][c]` is cell (row r, column c).

## Departures and choices to be aware of

* The flip-flops' set and reset terminals are driven from outside the tester,
  for fault injection. The tester itself never uses them.
* The solid-zero write is saved only on the first scan after reset. In a
  repeated program, later iterations take 24 scan cycles.
* March test time grows with the array size (k·n cycles). Only the scan time
  is independent of size.
* MATS and Marching-1/0 are not provided: no operation sequence was available
  for them.
* March C's fifth element walks downwards (the standard form). This makes
  March C reach the published 100 % idempotent and state coupling-fault
  coverage; an upward fifth element would not.
* The published stuck-open coverage of MATS+ (100 %) is not reproduced; it
  measures 6.2 % (see Verification). The combination of scan,
  MATS+ and March C- therefore does not cover stuck-open faults. Adding
  MATS++ or March Y does: set bit 1 or 6 of `march_mask`.
* The column decoder of a conventional memory is not built. Column selection
  is done with the per-cell enables inside the selected row.
* The following are this design's own choices:
  * one operation per cycle;
  * "either" order walked ascending;
  * linear row-major addressing;
  * the program encoding;
  * clearing the fail map every iteration;
  * the all-rows decoder input;
  * the log record format.
* The LEDs, the board's pass transistors and the host-side datalog software
  are not hardware of this RTL. The LEDs are the `led` port, and the
  transistors' effect is part of `mem_array`.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| Testbench | What it checks |
|-----------|----------------|
| `tb_mem_cell` | enable, asynchronous set/reset, stuck-at behaviour |
| `tb_row_decoder` | exhaustive, 4 and 8 rows |
| `tb_mem_array` | random writes against a reference array, fault terminals |
| `tb_bg_pattern_gen` | all 12 backgrounds at 4 x 4, 8 x 8 and 16 x 16 |
| `tb_march_rom` | every element against an independent text table (`march_ref_pkg`) |
| `tb_march_engine` | full operation sequences at 4 x 4 and 3 x 5, k·n length, zero-gap chaining |
| `tb_scan_engine` | order, images, 23/24-cycle timing |
| `tb_mem_tester` | access pattern, cycle counts, fail maps, disabled cells, log contents, on a bench-modelled 2 x 4 memory |
| `tb_mem_tester_top` | end to end at the default size: full program ten times with exact cycle and log counts; stuck-at-1, stuck-at-0 and coupling faults; counts of every mechanism |
| `tb_workloads` | scan, six March algorithms and the combined program, ten times each, at 4 x 4, 8 x 8 and 16 x 16; plus a five-iteration 8 x 8 datalog |
| `tb_fault_coverage` | every single fault of six classes injected into a bench-modelled faulty 4 x 4 memory, each of the six evaluated algorithms run against each one (see below) |

Fault coverage measured by `tb_fault_coverage` (percent of the faults
detected; 4 x 4 memory, every aggressor/victim pair):

| Fault class | MATS+ | MATS++ | March X | March Y | March C- | March C |
|-------------|------:|-------:|--------:|--------:|---------:|--------:|
| stuck-at (SAF) | 100 | 100 | 100 | 100 | 100 | 100 |
| transition (TF) | 50 | 100 | 100 | 100 | 100 | 100 |
| address (AF) | 100 | 100 | 100 | 100 | 100 | 100 |
| inversion coupling (CFin) | 75 | 75 | 100 | 100 | 100 | 100 |
| idempotent coupling (CFid) | 37.5 | 37.5 | 50 | 50 | 100 | 100 |
| state coupling (CFst) | 75 | 75 | 75 | 75 | 100 | 100 |
| stuck-open (SOF) | 6.2 | 100 | 12.5 | 100 | 12.5 | 12.5 |

The SAF, AF, CFin and CFid figures equal the published coverage table. For
TF and CFst, every entry published as 100 % measures 100 % and every entry
published below 100 % measures below it. The exact values differ because
they depend on the fault list used. A stuck-open cell is modelled as an open
cell: writes do not reach it, and a read returns the value sensed by the
previous read. Only a read that directly follows a write of the opposite
value to the same cell, within one element, finds it for certain; MATS++ and
March Y have one. The published table also lists MATS+ at 100 % for
stuck-open faults. That entry cannot hold under any fault model, because
March X performs every MATS+ operation in the same order and is listed near
0 %. The bench checks all of these figures, except that MATS+ entry. The CFid
column of March C is why its fifth element walks downwards (see "How a March
test runs").

`mem_tester` also carries assertions:
* exactly one engine is active while busy;
* a March operation never selects all rows;
* a March operation compares at most one cell.

Run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/mt_pkg.sv tb/march_ref_pkg.sv tb/tb_mem_tester_top.sv \
    --top-module tb_mem_tester_top
./obj_dir/Vtb_mem_tester_top
```

Replace the testbench name to run the others. The packages must come first on
the command line.

## Changing the design

* **Array size:** set `ROWS`/`COLS` on `mem_tester_top`. Nothing else depends
  on the size.
* **Another March algorithm:** add an enum code in `mt_pkg`, its elements in
  `march_rom` and its k in `mt_pkg::march_complexity`. At most 8 algorithms,
  8 elements each and 6 operations per element fit the current encodings.
  `march_mask` is as wide as `NUM_ALGS`.
* **Another background:** extend `bg_pattern_e` and `bg_bit`, then update the
  last-pattern test in `scan_engine`.
