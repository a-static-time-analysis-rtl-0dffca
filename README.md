# Single-cycle-access scan for logic test

A conventional scan chain reaches a register by shifting the whole chain,
one bit per clock, and every register in the chain toggles on every shift
clock. The structures here make the scan registers behave like a small
memory instead: registers at the same depth of all chains form a *line*,
and a whole line can be written from the scan-in bus or read onto the
scan-out bus in **one clock cycle**. Registers that are not addressed keep
their value. A page of 32 chains x 31 lines (992 registers) is therefore
loaded or unloaded in 31 cycles. Any single line can be revisited without
touching the rest, and the scan-out path has no register-to-register timing
path (so no hold-time fixing between scan cells).

Three variants of the idea are implemented, each at the reference size of
32 pages x 32 chains x 31 lines = 31,744 registers:

| structure | register cell | how "hold" is done | global scan enable | access path |
|---|---|---|---|---|
| SCAh (`scah_struct`) | `scah_ff`: scan FF + 2 muxes | a hold mode in the cell | yes (`gse`) | combinational |
| SCA (`scas_struct`) | `sca_ff`: scan FF + 1 mux | none | no | combinational |
| gated SCA (`gscas_struct`) | `sca_ff` | the line's clock is gated off (`gcl`) | yes (`gse`) | pipelined: one register stage in, pipelined XOR tree out |

`sca_top` instantiates all three side by side. They share only `clk` and
`rst`. Ports are prefixed `h_`, `s_` and `g_`.

## The register cells

Each cell has the usual functional input `di` and output `dout`, a scan
input `si`, and an extra scan output `so`. The key point is that `so`
is not the flip-flop output. It is a multiplexer that shows either the
register's own value (when its line is selected) or simply passes `si`
through (when it is not).

`scah_ff`, with `se[0]` = global scan enable and `se[1]` = line select:

| se[0:1] | captured at clk | so | mode |
|---|---|---|---|
| 00 | di | si | functional |
| 01 | di | dout | asynchronous read |
| 10 | dout | si | hold |
| 11 | si | dout | synchronous write / read |

Internally there are three muxes. A hold mux picks `si` if `se[1]`, else
`dout`. The scan mux in front of the FF picks that hold mux if `se[0]`,
else `di`. The output mux sets `so = se[1] ? dout : si`. The `di` → FF path
has only the usual scan mux, so the functional setup time is that of a
plain scan flip-flop.

`sca_ff` drops the global enable: with `se` = line select, it captures
`si` and shows `dout` on `so` when `se = 1`. Otherwise it captures `di`
and passes `si`.

Both cells reset asynchronously (active-high `rst`) to 0. The reset is this
implementation's choice: the cell is specified only as having a reset pin.
The inverted data output of the underlying flip-flop is not provided.

## How a line is read and written (the part to understand)

Inside a page (`scah_page`, `scas_page`, `gscas_page`), chain `w` is a
string of SD cells where cell `l` takes `si` from the `so` of cell `l-1`.
Cell 1 takes bit `w` of the page's scan-in bus. All cells of line `l`
share the line select `ls[l]`, which comes from a global 1-out-of-SD
decoder (`line_decoder`; address 0 selects no line).

Because an unselected cell passes `si` straight to `so`, a chain is a
**combinational multiplexer chain**:

* the chain end shows the content of the one selected line (read), or the
  scan-in bus if no line is selected;
* the scan-in bus reaches the selected line unchanged through the cells in
  front of it, so at the clock edge the selected line captures it (write).

Read and write happen in the same cycle. Before the edge `so` shows the old
line content; after the edge it shows the value just written.

Pages are selected by `psel`, which is AND-ed into the page's scan-in bus
and line selects. An unselected page therefore sees no line select and a
zero scan-in bus, and all its `so` bits are 0. Each page XORs its chain
ends into the scan output of the preceding pages (`lpso` in, `pso` out).
With `PIPE = 1` a pipelined XOR tree is used instead (see Timing). Either
way the global scan-out `psso` equals the output of the selected page. `psel`
comes from `page_select_reg`, which test control writes with
`page_we` / `page_idx` / `page_en`. Selecting one page at a time is this
implementation's interface. `page_en = 0` deselects all pages.

What the other registers do while a line is accessed depends on the
structure:

* **SCAh**: with `gse = 1` every unaddressed register holds. With
  `gse = 0` every register runs functionally (captures `di`), and an
  addressed line of the selected page is visible on `psso` without being
  written. That is the asynchronous read.
* **SCA**: no hold mode. An addressed line is read and written at the next
  edge, and every other register captures `di` on every edge.
* **gated SCA**: each line of each page has a clock gate `gcl`. With
  `gse = 1`, only the addressed line of the selected page receives a clock,
  so everything else holds. With `gse = 0`, line `l` is clocked when its
  functional clock enable `ce[l]` is 1. `gcl` is a latch-based glitch-free
  clock gate: the enable `gse ? ls : ce` is latched while `clk` is low and
  AND-ed with `clk`. An addressed line with `ce = 1` in functional mode
  captures the scan-in bus, not `di`, so functional operation expects
  `add = 0`.

### Shift-scan compatible operation

`seq_start` starts `addr_counter`. The counter drives the line address
1, 2, … SD on successive cycles, overriding `add`, then returns to 0
(`seq_busy` is high for exactly SD cycles). Presenting a new scan-in word
every cycle meanwhile writes the whole selected page while its old content
streams out on `psso`. That is the same SD cycles as a shift pass over
SW parallel chains of depth SD, and existing shift-based patterns map onto
it directly; but in the SCAh and gated structures only the addressed line
changes in each cycle, instead of
every register in every chain.

## Timing

SCAh and SCA structures (`PIPE = 0`): address, `si` and `gse` act in the
cycle they are applied. `psso` is combinational from `add`, `si`, `psel`
and the register contents. A write lands at the next rising edge.

Gated SCA structure (`PIPE = 1`): `si`, the decoded line selects and `gse`
are registered once in `sca_access_ctrl`. The pages are then combined not
by the page-to-page chain but by `xor_tree`: a balanced XOR tree of
ceil(log2 PAGES) levels with a register set buried after every `XS = 3`
levels and one at its output. At 32 pages that is 5 levels and
X = 2 register stages (`sca_pkg::xor_stages(PAGES, XS)`). With inputs
applied before edge *n*, the line is written at edge *n+1*. `psso` shows the
line's previous content from edge *n+X* on, and the newly written content
one cycle later if the address is held. In a sequencer pass the word read
back for line `k` appears 1 + X cycles after the word written into it was
presented. `psel` is a register in both cases and is not delayed further,
so change pages at least one cycle before accessing them.

`PIPE` is a parameter of all three structures. The top fixes it at 0, 0
and 1 respectively.

## Module hierarchy

```
sca_top
├── scah_struct  ── sca_access_ctrl ─┬─ page_select_reg
│                                    ├─ addr_counter
│                                    └─ line_decoder
│                └── scah_page  x PAGES ── scah_ff x SW*SD
│                └── xor_tree (PIPE = 1 only)
├── scas_struct  ── sca_access_ctrl, scas_page x PAGES ── sca_ff x SW*SD
└── gscas_struct ── sca_access_ctrl, xor_tree,
                    gscas_page x PAGES ─┬─ gcl x SD
                                        └─ sca_ff x SW*SD
```

`sca_pkg` holds the default sizes, the SCAh mode encoding (`scah_mode_e`)
and the address and page-index width functions.

Parameters (defaults are the reference sizes):

| parameter | default | meaning |
|---|---|---|
| `SW` | 32 | scan chains per page (scan-in / scan-out bus width) |
| `SD` | 31 | lines per page (chain depth); address width is `$clog2(SD+1)` |
| `PAGES` | 32 | pages per structure; page index width is `$clog2(PAGES)` |
| `PIPE` | 0 / 0 / 1 | register the access path and use the pipelined XOR tree (see Timing) |
| `XS` | 3 | XOR levels between buried register sets of the tree (`PIPE = 1`) |

Functional data ports are packed `[PAGES-1:0][SD:1][SW-1:0]`, indexed
[page][line][chain]. `g_ce` is `[PAGES-1:0][SD:1]`. Line numbers run from 1
so that line `l` is selected by address `l`.

## Choices made in this implementation

The cell mode tables, the page organisation (AND-selected scan-in and line
selects, XOR-combined page outputs), the line decoder with address 0 as
"no line", the clock-gate truth table, the 32 x 31 x 32 sizing and the
optional input registers and buried XOR-tree registers follow the published
description of the method. The following are this implementation's own
choices:

* asynchronous active-high reset of every register to 0, and no inverted
  register output;
* the page-select register interface (index + enable, one page at a time);
* the sequencer stops at address 0 after line SD rather than wrapping;
* `gcl` is built as a latch-plus-AND clock gate;
* the combinational structures (`PIPE = 0`) chain the pages, and the
  pipelined ones use a tree with a register set every 3 levels and at the
  end;
* the gated structure is pipelined by default and the other two are not;
* addresses above SD select no line;
* in the gated structure, a line that is addressed while `gse = 0` and
  `ce = 1` captures the scan-in bus.

## What is not here

* **The logic under test.** The combinational logic between the registers
  belongs to the circuit being tested and is not part of this RTL. Every
  register's `di` and `dout` is a top-level port, so any such logic can be
  wrapped around the top.
* **Test control / pattern generation.** Whatever drives `psel`, addresses,
  scan-in words and `gse` (a tester, ATPG patterns or a BIST engine) is
  outside. The testbenches play this role.
* **BIST.** The structures are meant to be usable under a built-in
  self-test engine with many parallel chains. No such engine is included.
* **Physical results.** Setup/hold slack, pad-to-pad delays, FPGA
  utilisation and power belong to a particular FPGA implementation and are
  not reproduced. Note that one 32-page structure (31,744 flip-flops) alone
  exceeds the 29,504 flip-flops of a Spartan-3E XC3S1600E.

## Simulation

Each module has a self-checking testbench `tb/<module>_tb.sv` that prints
`TB_RESULT checks=N failures=M`. The structure- and top-level testbenches
compare against `tb/sca_model_pkg.sv`, a cycle-level model written from the
mode tables above (register contents, page select, sequencer and pipeline
stages). The model does not reuse the RTL.

```
verilator --binary --timing --assert -Irtl rtl/sca_pkg.sv tb/sca_model_pkg.sv \
    tb/sca_top_tb.sv -y rtl --top-module sca_top_tb -Mdir obj_top
./obj_top/Vsca_top_tb
```

(Use `tb/<name>_tb.sv` and `--top-module <name>_tb` for any other block.
Add `-Wno-fatal` if lint warnings should not stop the build.)

* `sca_top_tb` runs all three structures at 4 x 5 x 3. It does a directed
  shift-compatible write pass and read-back pass (checking the
  SD-cycle pass length and the 1 + X cycle delay of the pipelined structure),
  then 3000 random cycles against the model. It counts functional capture,
  asynchronous read, hold, write/read, page switching, sequencer passes,
  clock-gated hold and `ce`-disabled lines, and fails if any never
  occurred.
* `sca_top_full_tb` runs the same sequence at the default size (three
  structures of 31,744 registers each) with 200 random cycles.
* `scah_struct_pipe_tb` runs the SCAh structure with `PIPE = 1`, and
  `xor_tree_tb` checks the tree's result and latency at 32, 8 and 5 inputs.
* Page, structure, cell, decoder, sequencer, page-select, clock-gate and
  access-control testbenches check their blocks exhaustively (cells,
  decoder) or against random traffic. Each has been confirmed to fail on a
  deliberately broken copy of its block.
