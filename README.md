# Two-dimensional low power scan shift control for multiple scan chains

Loading a scan test into a full-scan chip normally shifts every scan flip-flop on
every shift cycle. That makes test power high, and it spends shift cycles and
tester memory on bits that are don't-care for most patterns. This design splits
the scan flip-flops into a grid of **clusters**. Each cluster has its own short
**sub-scan-chain** with its own shift-in and shift-out pin. Two small serially
loaded **control chains** pick which clusters shift:

* **scan control 1** holds one bit per column of clusters;
* **scan control 2** holds one bit per row of clusters;
* a cluster shifts only where a set column bit meets a set row bit.

A sub-chain whose bits are all don't-care for the current pattern is simply left
unselected. Its flip-flops keep their values and do not toggle, and its shift-in
line inside the cluster is forced to 0. Switching activity therefore scales with
the number of selected clusters, not with the size of the chip. Because each
sub-chain is short, a full load also takes only as many cycles as the longest
sub-chain.

The default configuration is a 4x4 grid holding the 1415 flip-flops of the
ISCAS'99 benchmark b17. The RTL is parameterised for any grid and any
flip-flop count.

## Structure

```
twod_scan_top
├── scan_ctrl_chain  u_scan_ctrl1   N_CTRL1 bits -> col_sel  (scan control 1)
├── scan_ctrl_chain  u_scan_ctrl2   N_CTRL2 bits -> row_sel  (scan control 2)
└── g_cluster[k].g_cells.u_cluster : scan_cluster    (one per cluster)
    ├── cluster_ctrl    u_ctrl      select, enable, shift-in mask
    └── sub_scan_chain  u_chain     LEN x scan_cell
scan_pkg                            mode enum, cluster-size functions
```

| File | Role |
|---|---|
| `rtl/scan_pkg.sv` | `scan_op_t` mode enum, `decode_op`, and the cluster-size and offset functions |
| `rtl/scan_cell.sv` | mux-D scan flip-flop with enable (hold) and asynchronous reset |
| `rtl/scan_ctrl_chain.sv` | serially loaded select chain (used for both scan control 1 and 2) |
| `rtl/cluster_ctrl.sv` | control circuit of one cluster: column AND row select, chain enable, shift-in mask |
| `rtl/sub_scan_chain.sv` | LEN scan cells linked from shift-in to shift-out |
| `rtl/scan_cluster.sv` | one cluster: `cluster_ctrl` plus `sub_scan_chain` |
| `rtl/twod_scan_top.sv` | the grid, both control chains, cluster sizing |

Clusters are numbered column by column. Cluster `k` sits in column
`k / N_CTRL2` and row `k % N_CTRL2`. In a 4x4 grid, C0 to C3 run down the first
column and C15 is the bottom-right cluster. Column bit `col_sel[c]` comes from
scan control 1 and row bit `row_sel[r]` from scan control 2.

## Operating modes

Two shift enables set the mode (`scan_pkg::decode_op`):

| `ctrl_se` | `scan_se` | mode | control chains | selected sub-chains | unselected sub-chains |
|---|---|---|---|---|---|
| 1 | x | control load | shift in `ctrl1_si` / `ctrl2_si` | hold | hold |
| 0 | 1 | shift | hold | shift `scan_in[k]` in | hold, shift-in masked |
| 0 | 0 | capture | hold | capture `func_d` | capture `func_d` |

All flip-flops switch on the rising edge of `clk`. `rst_n` is an asynchronous
active-low reset that clears every flip-flop, which leaves no cluster selected.

### Loading the control chains

Both control chains shift together while `ctrl_se` is high. The serial input
enters bit 0 and moves one bit up per clock. To set select word `w` in an
`N`-bit chain, apply `w[N-1]` first and `w[0]` last, over exactly `N` cycles.
If the grid is not square, pad the shorter chain's stream at the front: its
extra leading bits fall off the far end. `ctrl1_so` and `ctrl2_so` show the
last bit of each chain, so the chains can be read back or cascaded.
`cluster_selected[k]` shows the resulting selection of every cluster.

### Shifting a pattern

With the selection loaded, drop `ctrl_se` and raise `scan_se`. On each clock,
every selected sub-chain moves one cell toward its shift-out pin and takes
`scan_in[k]` into cell 0. `scan_out[k]` is the last cell of chain `k`, a
combinational output that is valid before the edge. A bit shifted in appears
on `scan_out[k]` after exactly `LEN(k)` shifts. A full load therefore takes
`max LEN(k)` shift cycles plus `max(N_CTRL1, N_CTRL2)` control-load cycles.
For b17 in 4x4 that is 95 + 4 cycles, against 1415 for a single chain.

The selection is a rectangle product: the selected set is always
{columns set} x {rows set}. To shift an arbitrary set of clusters, apply
several selections one after another, each with its own control load.

## Cluster sizes

The flip-flops of the circuit under test reach the grid through two flat
vectors, `func_d` (in) and `func_q` (out), `SC_NUMBER` bits wide. Cluster `k`
owns bits `offset(k) .. offset(k)+LEN(k)-1`. Bit `offset(k)` is cell 0, the
cell next to the shift-in pin. In a layout the order inside each cluster comes
from a nearest-neighbour walk over the placed flip-flops, starting at the
shift-in pin. Here it is just the bit order, so the netlist that hooks the
core to `func_d`/`func_q` fixes the physical scan order.

Two clustering rules are supported:

**Uniform scan-cell number** (`UNIFORM_AREA = 0`, the default). With
`C = N_CTRL1*N_CTRL2` clusters and `x = SC_NUMBER % C`:

* every cluster but the last holds `CELL = (SC_NUMBER - x) / C` cells;
* the last cluster holds `SC_NUMBER - (C-1)*CELL = CELL + x` cells;
* offsets are `k*CELL`.

This rule gives equal chains apart from the last one. Because the whole
remainder goes to that one chain, the last chain can be much longer than the
rest when `SC_NUMBER` is small compared with `C`. That longest chain sets the
shift time:

| circuit (flip-flops) | 3x3 | 5x5 | 7x7 | 9x9 |
|---|---|---|---|---|
| b17 (1415) | 157 / 159 | 56 / 71 | 28 / 71 | 17 / 55 |
| b22 (537) | 59 / 65 | 21 / 33 | 10 / 57 | 6 / 57 |
| s13207 (638) | 70 / 78 | 25 / 38 | 13 / 14 | 7 / 78 |
| s38417 (1636) | 181 / 188 | 65 / 76 | 33 / 52 | 20 / 36 |

(Each entry is common length / last length.)

**Uniform cluster area** (`UNIFORM_AREA = 1`). The grid divides the die into
equal areas, so each cluster's flip-flop count depends on the placement. You
pass the counts in the parameter array `AREA_CELLS[C]`, in cluster order.
Elaboration stops with an error if they do not add up to `SC_NUMBER`. A count
of 0 is allowed: that cluster has no chain, and its `scan_out` is 0.

## Top-level interface

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | test clock, asynchronous active-low reset |
| `ctrl_se` | in | 1 | shift enable of both control chains (has priority) |
| `ctrl1_si`, `ctrl2_si` | in | 1 | serial inputs of scan control 1 (columns) and 2 (rows) |
| `ctrl1_so`, `ctrl2_so` | out | 1 | last bit of each control chain |
| `scan_se` | in | 1 | 1: selected sub-chains shift; 0: all capture |
| `scan_in` | in | C | shift-in pin of each sub-chain |
| `scan_out` | out | C | shift-out pin of each sub-chain |
| `cluster_selected` | out | C | column bit AND row bit, per cluster |
| `func_d` | in | SC_NUMBER | functional D of every scan flip-flop |
| `func_q` | out | SC_NUMBER | Q of every scan flip-flop |

Parameters: `N_CTRL1 = 4`, `N_CTRL2 = 4`, `SC_NUMBER = 1415`,
`UNIFORM_AREA = 0`, and `AREA_CELLS` (all 0, used only when `UNIFORM_AREA = 1`).

## Departures and design choices

The grid, the column/row selection by two serially loaded chains of scan
flip-flops, the masking of a non-selected cluster's shift-in, and the sizing
equations of the uniform scan-cell rule are as the method defines them. The
following are choices made here:

* **Hold by enable, not by gated clock.** An unselected chain keeps its state
  through a flip-flop enable. A low-power implementation would gate the
  cluster's clock instead, using the chain enable as the clock-gate enable.
  The logical behaviour is the same.
* **Masking** is an AND of the shift-in pin with the cluster's select.
* **One pin pair per sub-chain.** Every sub-chain has its own `scan_in` and
  `scan_out` bit. Sharing or broadcasting pins to cut the pin count is left to
  whatever sits outside the grid.
* **Control load has priority** over shift, and sub-chains hold while the
  control chains are loaded.
* **Capture is global.** Every cluster captures when both enables are low.
* **Reset** is asynchronous, clears everything, and selects nothing.
* **Shift direction** of the control chains: the serial input enters bit 0.
* **Empty clusters** (uniform area only) drive 0 on their shift-out.

Not included:

* the combinational logic of the circuit under test;
* the test-pattern encoding that decides which clusters to select for each
  pattern;
* the placement-driven clustering and scan-cell reordering;
* the physical insertion of the control circuits.

These sit in ATPG and layout tools, not in this RTL. Wire length, the main
quantity in the evaluation of this scheme, is a layout result and cannot be
seen here.

## Verification

Each testbench in `tb/` checks itself and ends with
`TB_RESULT checks=<n> failures=<m>`.

| Testbench | What it checks |
|---|---|
| `tb_scan_cell` | random shift/capture/hold against a reference, and asynchronous reset |
| `tb_scan_ctrl_chain` | all 16 select words loaded in exactly N shifts, hold, serial out |
| `tb_cluster_ctrl` | all 32 input combinations against the selection truth table |
| `tb_sub_scan_chain` | 88-cell chain: first bit out after exactly 88 shifts, random shift/capture/hold |
| `tb_scan_cluster` | cluster against a model; requires shift, skip, control-load and capture cycles |
| `tb_twod_scan_top` | the full default design (b17, 4x4, 1415 cells), see below |
| `tb_workloads` | 28 configurations, plus one in uniform-area mode, see below |
| `tb_workloads_b17_large` | b17 in 11x11, 13x13 and 15x15 grids, same procedure as `tb_workloads` |

**`tb_twod_scan_top`** keeps a model of every flip-flop and of both control
chains, with the cluster sizes worked out independently. It compares every
shift-out and every flip-flop on every cycle. It counts each mechanism and
fails if one never occurs:

* control load, shift and capture;
* chains skipped during a shift, and shift-in bits masked;
* a full 95-bit load and unload of the longest chain (C15), checked for its
  95-cycle latency;
* a shift with nothing selected that toggles no flip-flop.

It also checks that a shift with 1 of 16 clusters selected toggles less than an
eighth as many flip-flops as one with all 16 selected. On a typical run the
counts are 68311 and 4145 flip-flop toggles over 95 shifts.

**`tb_workloads`** runs seven benchmark sizes (b17 1415, b22 537, s13207 638,
s15850 534, s35932 1728, s38417 1636, s38584 1426 flip-flops), each in 3x3,
5x5, 7x7 and 9x9 grids. It adds one 4x4 b17 grid in uniform-area mode with
uneven cluster counts, one of them empty. Each configuration is taken through
full loads with all clusters and with random selections. The testbench checks
every shift-out bit and its latency, and prints the cycles per full load.

`scan_cluster` also carries a concurrent assertion for the low-power rule. A
cluster that is skipped during a shift, or any cluster during a control load,
must leave every flip-flop unchanged on the next clock. The assertion is active
in every testbench that is built with `--assert`.

Each module was also checked against a copy of itself with a deliberate bug:

* scan cell: inputs swapped;
* control chain: shift direction reversed;
* cluster control: OR instead of AND;
* sub-chain: shift-out tapped one cell early;
* cluster: enable tied high;
* top: row and column swapped.

The matching testbench fails on every one of these copies.

## Simulating with Verilator

From the directory that holds `rtl/` and `tb/`:

```sh
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/scan_pkg.sv tb/tb_twod_scan_top.sv --top-module tb_twod_scan_top \
    -Mdir obj_top -o sim && ./obj_top/sim
```

Swap in any other testbench name. `tb_workloads` builds 29 grids and takes
a minute or two to compile; `-j 4` helps. All testbenches initialise or reset
every flip-flop they read, so they also run on two-state simulators.

To build a grid for another circuit, override `N_CTRL1`, `N_CTRL2` and
`SC_NUMBER`. For uniform-area sizing, also set `UNIFORM_AREA = 1` and give
`AREA_CELLS` as an array of `N_CTRL1*N_CTRL2` counts (see `tb/wl_runner.sv`
for an example).
