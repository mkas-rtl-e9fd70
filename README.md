# MKAS: a modular knockout ATM switch in SystemVerilog

A knockout switch gives each output a concentrator that sees all N inputs
and takes up to L cells per time slot. Its cost grows with N at every output.
This switch works in two stages instead. The outputs are grouped into groups
of n ports. A group shares one larger concentrator with m outputs (m much
smaller than N). Only after that are cells sorted to their own port, and each
port then needs to take only about 8 cells per slot. For N = 64 and n = 8, the
8 ports of a group share 22 paths into the group. Each port still has 8
dedicated paths, as in a plain knockout switch. The structure is built from
N/n identical group modules, so the switch can grow by adding modules.

The RTL implements the whole datapath for one cell per input per clock cycle:

```
in_cells[i] ─► input_interface ─► broadcast bus i ──┬──► gbi (group 0) ─► out ports 0..7
  (VPI/VCI → local routing tag)                     ├──► gbi (group 1) ─► out ports 8..15
                                                    └──► ...           (N/n groups)

gbi:  N cell filters (group address) ─► N:m knockout concentrator
        ─► destination sorting network (filters or banyan)
        ─► n shared output buffers ─► one cell per port per slot
```

Default sizes: N = 64 ports, n = 8 ports per group (8 groups), m = 22 group
concentrator outputs, h = 8 paths per port.

## The local routing tag

The input interface looks up each arriving cell's VPI/VCI in a per-input
table. It attaches a log2(N)-bit local address, which holds two parts:

```
tag = { group address (log2(N/n) bits) , destination address (log2(n) bits) }
output port = group * n + destination
```

The first stage of a group module looks only at the group bits. The second
stage looks only at the destination bits. The tag travels in a fixed 10-bit
field (`mkas_pkg::TAG_W`), so N can be at most 1024. The tag is dropped on
the output ports and the original 53-byte cell leaves unchanged. The VPI/VCI
is not rewritten.

The table has 2^`LUT_AW` entries (256 by default). It is indexed by the low
4 bits of the VPI above the low 4 bits of the VCI. A cell whose entry is not
valid is discarded and counted in `stat_unknown`. Tables are written through
one shared port (`lut_we`, `lut_port`, `lut_addr`, `lut_data`). A write takes
effect in the next slot.

## Stage 1: group filters and the knockout concentrator

Each group module (`gbi`) sees all N broadcast buses. A row of N
`cell_filter`s keeps only the cells whose group address equals the module's
`GROUP_ID`. The surviving cells enter an N:m `knockout_concentrator`.

This concentrator is the most involved part. It runs m knockout tournaments,
one after the other in the same slot:

* Each tournament is a binary tree of 2x2 contention elements. An element
  sends one cell towards the root and the other to the next tournament.
* A cell that is alone at an element wins. When both inputs hold a cell, the
  left one wins.
* The root of tournament r drives output r. So the winners fill outputs
  0..k-1 with no gaps, where k = min(cells offered, m).
* Cells still left after m rounds are knocked out. They are lost and counted
  (`stat_conc_lost`).

Only presence bits and input indices run through the trees. The 435-bit
cells are then picked by index. Every tree is padded to a power of two, so
the whole structure is fixed when the design is elaborated.

Which cells win depends on the tree structure. The testbenches check only
what the structure guarantees:

* the count of winners;
* that outputs are packed;
* that no cell is lost or duplicated below the limit;
* that the lowest-numbered input wins the first round.

The fixed left priority makes low-numbered inputs win more often under
overload. No fairness mechanism is added.

## Stage 2: the destination sorting network (DSN)

Two interchangeable networks sort the m concentrated cells to the n ports of
the group. The parameter `DSN_BANYAN` selects one.

**Filters approach (`DSN_BANYAN = 0`, the default).** `dsn_filters` holds one
`subbus_interface` per port. Each is a row of m `cell_filter`s on the
destination bits, followed by an m:h `knockout_concentrator`. A port
therefore receives up to h = 8 cells per slot. Cells beyond 8 for one port
in one slot are lost (`stat_dsn_lost`).

**Banyan approach (`DSN_BANYAN = 1`).** `dsn_banyan` pairs the concentrator
outputs (2b, 2b+1) and feeds each pair into a `banyan_2xn`. That is a
2-input, n-output self-routing network, so there are ceil(m/2) = 11 of them
by default. Each input of a banyan drives its own tree of 1x2 switching
elements, which steer on the destination bits, most significant bit first.
The two trees share no internal link, so the network never blocks inside and
needs no sorter in front of it.

The trees meet at the n output links, one link per port. If both cells of a
pair go to the same port in the same slot, the cell from the even output
wins and the other is lost. In this approach each port has ceil(m/2) input
links instead of h. The port buffers are sized to match.

## Shared output buffers

Each port has a `shared_output_buffer`. It accepts up to IN cells per slot
(IN = h, or ceil(m/2) with the banyan DSN) and sends one cell per slot. The
buffer is built like a knockout output buffer:

* A shifter spreads the arriving cells, in input order, over IN FIFO banks.
  It starts at the bank after the one written last.
* The read side visits the banks in the same round-robin order.

As a result, cells leave in arrival order, and cells of the same slot leave
in input order. Each bank holds `BUF_DEPTH` = 8 cells, so a port holds 64
cells by default.

The bank due for the next write is always the emptiest one. When that bank
is full, the buffer is full: the cell is dropped, along with the rest of that
slot's cells for the port (`stat_buf_lost`). `buf_occ` reports how many cells
each buffer holds.

## Timing

* One clock cycle is one time slot. A whole cell moves as one word.
* The filters, concentrators and DSN are combinational.
* There are two register stages: the input interface, and the output buffer
  with its output register.

A cell presented in slot t is tagged at the end of slot t and written into
its port buffer at the end of slot t+1. If its port is idle, it appears on
`out_cells` in slot t+2. Each port can send one cell per slot. Reset is
asynchronous and active low. It clears the tables, the buffers and the
counters.

A long combinational path runs through the N:m concentrator (log2 N levels
times m rounds) and the m:h concentrator. A real implementation at ATM line
rates would move cells bit-serially or pipeline the rounds. This RTL keeps
the slot-level behaviour and leaves that choice open.

## Where cells are lost

A cell leaves the switch or is counted in exactly one statistic:

| counter          | cause                                                                      |
|------------------|----------------------------------------------------------------------------|
| `stat_unknown`   | no valid translation-table entry for its VPI/VCI                           |
| `stat_conc_lost` | more than m cells for one group in one slot                                |
| `stat_dsn_lost`  | more than h cells for one port in one slot (filters), or a banyan pair for one port |
| `stat_buf_lost`  | the port's shared buffer is full                                           |

The source design sizes m and h so that the concentrator and DSN losses
happen with probability below 10^-6 under uniform random traffic.

## Parameters (`mkas_top`)

| parameter    | default | meaning                                              |
|--------------|---------|------------------------------------------------------|
| `N`          | 64      | switch inputs and outputs (power of two, at most 1024) |
| `NG`         | 8       | ports per group; N/NG group modules                  |
| `M`          | 22      | outputs of each group concentrator                   |
| `H`          | 8       | cells per port per slot, filters DSN                 |
| `DSN_BANYAN` | 0       | 0: filters DSN, 1: banyan DSN                        |
| `BUF_DEPTH`  | 8       | cells per bank of an output buffer                   |
| `LUT_AW`     | 8       | address bits of each input's translation table      |

N, n, m and h come from the source design. The rest are this implementation's
choices. Types and default sizes are in `rtl/mkas_pkg.sv`.

## Departures and choices

The source design gives the architecture and its sizes but leaves these
points open. They are this implementation's choices:

* One clock cycle per slot, with cells moved as parallel words.
* The translation-table size and index, discarding cells with no entry, and
  the table write port.
* The left-wins rule of the contention element (no fairness toggle).
* The banyan network's internal structure (twin trees), the pairing of
  concentrator outputs, and the rule for two cells to one port.
* Output buffer depth and drop policy.
* The statistics counters and the `buf_occ` outputs.
* No output-link framing. The output interface only removes the tag.

The banyan DSN feeds ceil(m/2) links into each port buffer rather than h.
Cell-loss probability and the gate-count comparison of the source design are
not reproduced here.

## Files

`rtl/` has one module or package per file:

* `mkas_pkg`: cell types and default sizes
* `input_interface`
* `cell_filter`
* `knockout_concentrator`
* `subbus_interface`
* `dsn_filters`
* `banyan_2xn`
* `dsn_banyan`
* `shared_output_buffer`
* `gbi`
* `mkas_top`

`tb/` has one self-checking testbench per module (`tb_<module>`), plus these
two switch-level tests:

* `tb_mkas_top`: the whole switch at 16 x 16, with both DSN variants side by
  side. Traffic runs through light load, a hot group, a hot port and unknown
  connections. A scoreboard checks every departing cell: it must be
  unchanged, reach the right port, arrive in source order and take at least
  two slots. At the end, every cell must have departed or been counted lost.
  The test also requires that each loss mechanism, queueing and the
  two-slot cut-through all happened.
* `tb_mkas_full`: the same checks on the switch at its default 64 x 64 size,
  including set-up of all 64 tables.

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and finishes. To
run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/mkas_pkg.sv \
          tb/tb_mkas_top.sv --top-module tb_mkas_top -Mdir obj -o sim
./obj/sim
```

The default-size test takes several minutes to compile, because every
knockout tree is unrolled, and well under a second to run.
