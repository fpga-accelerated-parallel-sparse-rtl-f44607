# Parallel sparse LU factorization engine for circuit simulation

A circuit simulator solves `A x = b` many times. The values of `A` change with
every Newton-Raphson step and every time point, but its nonzero pattern does
not. This engine takes the part that is repeated, the numeric LU
factorization, and runs it on several processing elements (PEs) that work on
different columns of the matrix at the same time.

The work that is done only once is left to the host:
- static pivoting (row and column reordering);
- symbolic analysis, which predicts where L and U will have nonzeros.

Because the symbolic analysis is done up front, the engine does only
arithmetic. It runs a left-looking Gilbert/Peierls factorization without the
per-column reachability search. The work per column is then proportional to
the number of floating-point operations, not to the matrix dimension.

The RTL follows an FPGA architecture from the literature (the number of PEs,
the PE structure, the PE state diagram, the distributed tri-port caches and
the switch). Widths, protocols, arithmetic format, memory sizes and
scheduling are this implementation's own choices. They are listed under
"Departures and own choices" below.

## The algorithm each PE runs

Column `k` is computed from the earlier columns of L:

```
x = A(:,k)                      -- on the predicted structure of column k
for each j < k with U(j,k) != 0, in increasing j:
    for each i > j with L(i,j) != 0:
        x(i) = x(i) - L(i,j) * x(j)
U(1:k, k) = x(1:k)
L(k+1:n, k) = x(k+1:n) / x(k)
```

The loop walks the U nonzeros of column `k` in increasing row order. Every
update to `x(j)` comes from a column before `j`, so `x(j)` is final by the
time it is used.

The symbolic analysis guarantees that every row `i` of `L(:,j)` is also in
column `k`'s structure. The update therefore never creates a new nonzero.

## Data layout: what the host must write

Each PE has its own cache, and column `k` belongs to PE `k mod NUM_PE`.
Inside its PE, a column is kept in compressed column storage:

* **Entries.** One `{row, value}` word per predicted nonzero: entries of `A`
  plus fill-ins written as 0.0. Within a column, entries are sorted by row, so
  the U part comes first, then the diagonal, then the L part. The columns of a
  PE may be packed one after another.
* **Descriptors.** One word per column, at descriptor address
  `k / NUM_PE`: `{start, diag, fin}`. These are the addresses of the first
  entry, of the diagonal entry, and one past the last entry.

After a run, the same addresses hold the result: U (including the diagonal)
above and on the diagonal, L below it (unit diagonal implied). The
descriptors are not changed. For the next factorization with the same
pattern, the host rewrites only the entry values.

Values are IEEE-754 single precision. Row indices and cache addresses are 13
bits (`lu_pkg`).

## Inside a PE (`proc_element`)

The PE's controller follows a five-state diagram. The transitions are
exactly I→0, 0→0, 0→1→2→3→0.

| phase | what happens |
|---|---|
| I | After reset, wait while the host loads the caches. Leave at the first `start`. |
| 0 | Idle. Ask the PE controller for the next column. |
| 1 | Read the descriptor, then stream one section of the column into the column buffer (`inner_cache`), one entry per clock. Write `row → buffer address` into the CAM. |
| 2 | For each U entry `x_j` of the column above the section's end: wait until column `j` is finished (dependency stall). Read its descriptor, then each `L(i,j)` below its diagonal that falls in the section. Look row `i` up in the CAM, then read, multiply-subtract and write back the buffer word. |
| 3 | Read the pivot if it is in this section. Divide each L entry of the section by it. Write the section back to the PE's own cache. After the last section, report the column finished. |

### Sections

A column is processed in sections of `SEC_ROWS` aligned rows (rows
`s·SEC_ROWS` to `(s+1)·SEC_ROWS − 1`). Only the rows of a column that hold
nonzeros are loaded, so a section takes at most `SEC_ROWS` buffer words.
The CAM and the buffer hold one section at a time:
- the CAM needs `SEC_ROWS` words instead of one word per matrix row;
- sections with no nonzeros are skipped entirely.

A section is updated in two steps:
1. by the U entries of earlier sections. They are final and are read back
   from the PE's own cache, where they were written;
2. by its own U entries, from the buffer, in row order.

In the L scan of column `j`, rows above the section are skipped. The scan
stops at the first row past the section. The pivot stays in a register for
the sections below the diagonal.

Between two sections the PE passes through phase 0 without asking for a new
column (3→0→1). `extra_sections` counts these passes. With `SEC_ROWS ≥ n`
every column is a single section.

Reads in phase 2 go straight to the PE's own cache when the PE owns column
`j`. Otherwise they go through the switch.

Within a section, the operations are not overlapped:
- a multiply-subtract takes about 5 clocks, plus any switch wait;
- a division takes 28 clocks.

This keeps the datapath simple and the result exactly reproducible. It is
also the first place to gain speed (see "Performance").

The **CAM** (`cam_index`) is not an associative memory. It is a table with
one word per row of a section, indexed by the low row bits, which answers in
one clock. Each word carries the column number and section start that wrote
it, so a new column or section needs no clearing. Only at reset does the
table clear itself, taking one clock per word.

Two errors are flagged:
- a row missing from the CAM means the host's symbolic structure was wrong
  (`err_cam_miss`; that update is skipped);
- a zero pivot sets `err_zero_pivot`.

## Parallel operation (`lu_top`, `pe_controller`, `lu_switch`)

The **PE controller** hands each idle PE its next column: PE `p` gets `p`,
`p+NUM_PE`, `p+2·NUM_PE`, and so on. It counts the finished columns per PE.
Because every PE finishes its own columns in order, "column `j` is finished"
is one comparison: `finished[j mod NUM_PE] > j / NUM_PE`. This is the
question a PE asks before it reads column `j`.

All PEs work at once. A PE stalls only when the column it needs next is
still in progress somewhere else. The columns that can run in parallel are
therefore found at run time, not from a precomputed elimination tree.

The **switch** is a full crossbar from `NUM_PE + 1` requesters (the PEs and
the host driver) to the `NUM_PE` caches' external read ports:
- each cache has a round-robin arbiter;
- reads to different caches proceed in the same clock;
- a requester holds its request until `req_ready`, and the data returns
  exactly one clock later;
- `sw_wait_cycles` counts the clocks in which some requester was stalled.

Host writes go through the switch to the addressed cache and are never
blocked. The host writes only while no PE is writing.

Each **cache** (`onchip_cache`) is a tri-port RAM:
- a write port, shared by the PE's write-back and the host;
- a read port for its PE;
- a read port for the switch.

Each read returns both the entry word and the descriptor word at that
address, and the requester uses the one it asked for.

### Host sequence at the top level

1. Reset. Write entries and descriptors with `drv_we`/`drv_tgt`/`drv_wr`,
   one word per clock.
2. Set `n_cols`, pulse `start`, wait for the `done` pulse. `cycles` gives the
   run length, counted from the clock after `start` to the `done` clock.
3. Read results with `drv_rd_valid`/`drv_rd_tgt`/`drv_rd`. Hold until
   `drv_rd_ready`; `drv_rsp` is valid one clock later.

After reset, the PEs spend `SEC_ROWS` clocks clearing their CAMs before
they take a column.

## Arithmetic

`fp_sub`, `fp_mul` and `fp_div` are IEEE-754 single precision:
- round to nearest even;
- subnormal inputs are read as zero, and underflowing results become zero;
- overflow gives infinity;
- infinities and NaNs are not otherwise handled.

| unit | latency | how it works |
|---|---|---|
| `fp_sub` | 1 clock, pipelined | Align with a 27-bit extension plus sticky bit, add or subtract, normalize by leading-zero count, round. |
| `fp_mul` | 1 clock, pipelined | 24×24 significand product, one-bit normalize, round. |
| `fp_div` | 28 clocks, start/done | Radix-2 restoring division, 26 quotient bits plus remainder sticky. |

Each result is correctly rounded. The testbenches check this bit for bit
against double precision rounded once to single, which is exact for these
operations.

## Parameters and sizes

| parameter | default | meaning |
|---|---|---|
| `NUM_PE` | 16 | PEs and caches (must be a power of two) |
| `N_MAX` | 8192 | largest matrix dimension: `N_MAX/NUM_PE` descriptors per cache |
| `CACHE_DEPTH` | 8192 | entries (L+U nonzeros) per PE cache |
| `SEC_ROWS` | 256 | rows per section, CAM words per PE (must be a power of two) |
| `COL_MAX` | 1024 | column buffer words: largest number of nonzeros in one section |

At the defaults, each cache holds 8192 × 45-bit entries. The whole engine
holds 131072 nonzeros of L+U and matrices up to 8192 × 8192.

The circuit matrices this architecture was evaluated on (rajat19, circuit_1,
circuit_2, add32, meg4) have 1157 to 5860 rows and 5399 to 35823 nonzeros in
`A`. Their dimension fits, and their `A` entries fit easily (at most about
2240 per PE). Whether L+U fits depends on the fill-in after the host's
ordering, which is not known here. A matrix fits if:
- the fill-in spreads over the PEs within 8192 entries each; and
- no section of a column exceeds 1024 nonzeros. With 256-row sections this
  always holds.

## Performance

The PE datapath is sequential. A column costs about
`5·(multiply-subtracts) + 28·(L entries) + nnz(column)` clocks, plus
dependency and switch stalls. Each extra section adds another pass over the
column's U entries and over the L entries of those columns that lie above the
section.

In the default-size test (400 × 400 random matrix, 66667 nonzeros in L+U
after fill-in, 16 PEs, 256-row sections), a factorization takes about 6.26
million clocks. The same test with sections larger than `n` (one section per
column) took about 2.08 million. The difference comes from the re-scans just
described, on a matrix far denser than a circuit matrix.
Most PE time goes to phase 2 and to waiting on dependencies. The random test
matrices fill in far more than circuit matrices do.

There are three obvious ways to speed this up:
- pipeline the read–CAM–multiply–subtract–write chain, watching for
  repeated rows;
- multiply by a reciprocal of the pivot instead of dividing each entry;
- schedule columns by the elimination tree instead of round robin.

## Departures and own choices

* **Sections.** Sections are aligned to multiples of `SEC_ROWS`. Rows above a
  section are skipped by reading them, not by a search. The PE passes through
  idle between sections. The section length is this design's choice.
* **Not built: the mesh network** (an alternative to the crossbar for many
  PEs) and the host link itself (PCIe and driver). The switch's driver port
  is brought out as plain top-level ports.
* **Scheduling.** Columns are assigned round robin with run-time dependency
  checks, rather than by an elimination tree computed on the host.
* **Arithmetic.** Single precision and the rounding rules above are choices
  made here. The divider is this design's own, not a vendor core.
* **Memories.** The column buffer is a separate memory rather than a region
  of the PE's cache. Each column has a `{start, diag, fin}` descriptor in
  place of the usual column pointer vector.
* **PE state after reset.** A PE leaves state I once and stays in idle
  afterwards. Later reloads by the host happen while all PEs are idle.

## Files and simulation

`rtl/`: `lu_pkg` (types), `lu_top`, `pe_controller`, `lu_switch`,
`proc_element`, `cam_index`, `inner_cache`, `onchip_cache`, `fp_sub`,
`fp_mul`, `fp_div`.

`tb/`: one self-checking testbench per module (`tb_<module>`). There are also
two reference packages:
- `fp_ref_pkg`: correctly rounded single-precision operations;
- `lu_ref_pkg`: a random diagonally dominant test matrix, its symbolic fill,
  and a reference factorization in the same operation order and precision as
  the hardware.

There are two end-to-end testbenches, and both check every result word bit
for bit:
- `tb_lu_top`: 4 PEs, 60 × 60 matrix, 16-row sections;
- `tb_lu_top_full`: all defaults, 400 × 400 matrix, about 75 s.

Each end-to-end test runs two factorizations (new values, same pattern). It
fails unless all of the following occurred at least once: every PE phase,
local reads, remote reads, dependency stalls, switch stalls, read-back and
columns split into several sections.

Run any testbench with Verilator 5, for example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_lu_top \
  -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/lu_pkg.sv tb/fp_ref_pkg.sv tb/lu_ref_pkg.sv tb/tb_lu_top.sv
./obj_dir/Vtb_lu_top
```

Each testbench ends by printing `TB_RESULT checks=N failures=M`.
