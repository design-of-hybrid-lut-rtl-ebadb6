# Hybrid LUT/MUX logic blocks for an FPGA

A K-input lookup table can implement any function of its inputs, but its
area doubles with every extra input: a LUT6 needs 64 configuration cells
and 63 two-to-one multiplexers. Multiplexer-based logic elements are far
smaller but implement fewer functions. This design mixes both in one
logic block (cluster). Most basic logic elements (BLEs) are LUTs. A few are
MUX4 elements, which have the LUT6's pin count but roughly a tenth of its
area. The BLEs are fed by a local crossbar with half the usual switches.

Two clusters are provided, and both are built:

| cluster | inputs | outputs | BLEs | BLE pins | elements (main mix 1:9) |
|---|---|---|---|---|---|
| non-fracturable (`clb_nf`) | 40 | 10 | 10 | 6 in, 1 out | 1 MUX4 + 9 LUT6 |
| fracturable (`clb_frac`) | 80 | 20 | 10 | 8 in, 2 out | 1 dual MUX4 + 9 fracturable LUT6 |

`hybrid_clb_top` places the two clusters side by side. Each cluster has
its own serial configuration chain. The two share only `clk` and `rst_n`.

## The logic elements

**LUT6 (`lut_k`, K = 6).** The element holds 64 truth-table cells, and
`cfg[i]` is the output for input value `i`. A six-level tree of 2:1 muxes
picks the output: `in[0]` steers the level next to the cells and `in[5]`
the last level.

**MUX4 (`mux4_le`).** The element has four data inputs `d` and two select
inputs `s`. Each data input passes through a 2:1 mux that picks `d[i]` or
`~d[i]` under one inversion cell. A 4:1 mux then picks one of the four by
`s`. That comes to 4 cells, 4 inverters and 7 two-to-one muxes:

    out = d[s] ^ cfg_inv[s]

To build a 2-input function, drive both variables onto `s` and supply
constant data. The truth table then sits in the inversion cells. In a
cluster, the constant comes from the crossbar's constant-0 code (below).
To build a 3-input function, split it on one variable (Shannon
decomposition). Put the other two variables on `s`, and feed the first
variable, its inverse or a constant to each data input, which gives the
cofactor in each case. The element can also build some 4- and 5-input
functions, and the 6-input 4:1 mux itself.

**Fracturable LUT6 (`frac_lut6`).** The 64 cells form two LUT5 halves that
share two inputs. Together they use eight pins:

| pins | use |
|---|---|
| `in[1:0]` | shared by both halves |
| `in[4:2]` | private to half A, table `cfg_lut[31:0]` |
| `in[7:5]` | private to half B, table `cfg_lut[63:32]` |

Each half is indexed by `{private, shared}`. There are two modes:

* **Dual LUT5 (`cfg_mode = 0`).** `out[0]` is A(`in[4:0]`) and `out[1]` is
  B(`in[7:5]`, `in[1:0]`). The two outputs can be two 5-input functions
  with two inputs in common. They can also be two independent 4-input
  functions, if each half ignores a different shared pin.
* **LUT6 (`cfg_mode = 1`).** Half B reads half A's private pins, and
  `in[5]` picks between the halves. `out[0]` is then one 6-input function
  of `in[5:0]`, with `cfg_lut[i]` its value for input value `i`. `out[1]`
  still shows half B and is normally left unused.

**Dual MUX4 (`dual_mux4`).** Two MUX4 elements fit the same 8-input,
2-output pin budget. They share the data pins `in[3:0]`. MUX4 A is
selected by `in[5:4]` and drives `out[0]`. MUX4 B is selected by
`in[7:6]` and drives `out[1]`. Each has its own four inversion cells.

## Basic logic elements

`ble_nf` and `ble_frac` wrap one element each. The parameter `IS_MUX4`
selects the kind. Every element output has a flip-flop, and one
configuration cell per output chooses the registered or the
combinational value. This is the usual shape of a BLE; the register is
this design's addition.

The `run` input is also this design's own. While `run` is 0, every BLE
output is forced to 0 and every BLE register is cleared. That way a
partly shifted configuration cannot oscillate through the feedback
paths. `rst_n` clears the registers asynchronously.

## The 50% depopulated crossbar

In a fully populated cluster, every BLE input pin is a mux over all
cluster inputs and all BLE outputs. `depop_xbar` gives each pin a mux
over only half of these sources, which saves interconnect area. The
sources are numbered with the cluster inputs first and then the BLE
outputs. Pin `p` (pin `j` of BLE `b` is `p = K*b + j`) reaches sources
`2c + (p mod 2)` for `c = 0 .. N_SRC/2 - 1`:

* Even pins see the even sources and odd pins the odd ones.
* Every source therefore reaches every BLE through half of its pins.
* The select code `c` is `SEL_W` bits wide: 5 bits for 25 reachable
  sources in `clb_nf`, 6 bits for 50 in `clb_frac`.
* A code of `N_SRC/2` or more gives constant 0. Combined with a MUX4
  inversion cell, this also gives constant 1.

The connection pattern and the constant code are this design's choices.
The architecture fixes only the 50% depopulation. Cluster outputs are the
BLE outputs directly; there is no output crossbar.

Because BLE outputs feed back into the crossbar, a configuration can
chain unregistered BLEs. It can also close a loop, which a valid
configuration must not do through unregistered outputs only. Lint tools
report this feedback as a combinational loop. That warning is expected:
the feedback path is part of the architecture.

## Configuration

All configuration cells of a cluster sit in one flat vector, `cfg`.
`cfg_chain` holds that vector in a shift register. While `shift` is 1,
each clock moves the chain down one cell and `din` enters the top cell.
Send the word LSB first: after `CFG_W` clocks the first bit sent is in
cell 0. `dout` shows cell 0, so the previous word can be read back while a
new one goes in.

The layout, from bit 0, is:

1. The BLEs in index order, packed back to back. MUX4-type BLEs come
   first (indices `0 .. N_MUX4-1`).
   * `ble_nf`, MUX4 (5 cells): `[3:0]` inversion cells, `[4]` register
     select.
   * `ble_nf`, LUT6 (65 cells): `[63:0]` truth table, `[64]` register
     select.
   * `ble_frac`, dual MUX4 (10 cells): `[7:0]` inversion cells, `[9:8]`
     register selects.
   * `ble_frac`, fracturable LUT6 (67 cells): `[63:0]` tables, `[64]`
     mode, `[66:65]` register selects.
2. One crossbar select code per BLE input pin, pin 0 in the low bits.

At the defaults, `clb_nf` has 5 + 9·65 + 60·5 = 890 cells and `clb_frac`
has 10 + 9·67 + 80·6 = 1093. Loading takes one clock per cell. In the
top, keep `run` low while shifting, then raise it.

## Timing

* The elements and the crossbar are purely combinational.
* A path through unregistered BLEs is combinational from cluster input to
  cluster output.
* A registered BLE output shows its function's value from the previous
  rising clock edge.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `lut_k` | `K` | 6 | LUT inputs |
| `clb_nf`, `clb_frac` | `I` | 40 / 80 | cluster inputs |
| `clb_nf`, `clb_frac` | `N` | 10 | BLEs |
| `clb_nf`, `clb_frac` | `N_MUX4` | 1 | MUX4-type BLEs |
| `hybrid_clb_top` | `NF_MUX4`, `FR_MUX4` | 1 | the same, per cluster |
| `cfg_chain` | `N` | 890 | cells |

`CFG_W` and `SEL_W` are derived. Leave them at their defaults unless you
change the geometry.

Set `N_MUX4` from 1 to 5 to build the 1:9 to 5:5 mixes. The 1:9 mix is
the default because it saves the most area.

The configuration-layout constants live in `hlm_pkg`. The testbench
reference models assume the default geometry, except that they take any
number of MUX4-type BLEs.

## Where this design goes beyond the specification

The cluster sizes, the element structures, the two-input sharing of the
fracturable LUT6, the dual MUX4's shared data and dedicated selects, the
50% depopulated crossbar and the 1:9 mix follow the architecture. The
following are this design's own choices:

* the truth-table bit order and the pin order of every element;
* how the LUT6 mode of the fracturable LUT6 is formed;
* separate inversion cells for the two MUX4s of the dual element;
* the BLE registers and `run`;
* the crossbar connection pattern and its constant-0 code;
* serial configuration loading and the cell layout.

The FPGA around the clusters (routing channels, switch boxes, I/O) is not
part of this RTL. The benchmark circuits used to judge the architecture
need hundreds of clusters or more, so they cannot run on the single
cluster of each kind here. The testbenches instead check the clusters
with random configurations.

## Verification

Each module has a self-checking testbench in `tb/`. Every testbench
prints `TB_RESULT checks=N failures=M` and has a cycle watchdog.
`tb_ref_pkg` holds the reference models. They are written from the
behaviour described above (table lookup, `d[s] ^ inv[s]`,
`2c + p mod 2`) and not from the RTL structure. The package also holds
generators for random configurations without loops.

| testbench | what it checks |
|---|---|
| `tb_lut_k` | every input value for random tables, K = 6 and 5 |
| `tb_mux4_le` | all 4096 combinations; XOR and AND built from constants |
| `tb_frac_lut6` | both modes over all 256 inputs; two independent 4-input functions |
| `tb_dual_mux4` | all inputs for 32 inversion settings |
| `tb_ble_nf`, `tb_ble_frac` | both element kinds; combinational and registered outputs cycle by cycle; `run` gating |
| `tb_depop_xbar` | every code of every pin, constant codes included |
| `tb_cfg_chain` | load, hold, serial read-back |
| `tb_clb_nf`, `tb_clb_frac` | 60 random configurations × 40 cycles, all outputs against the model |
| `tb_clb_mix` | both clusters built with 2 to 5 MUX4-type BLEs (mixes 2:8 to 5:5), random configurations |
| `tb_hybrid_clb_top` | the top at its defaults, end to end (below) |

`tb_hybrid_clb_top` runs the top at its defaults. It loads six random
configurations into each cluster through the serial chains, then runs
each for 300 cycles. While loading, it checks that the outputs stay 0 and
that the previous word comes back out of `dout`. While running, it
checks all 30 outputs every cycle. It also counts how often each
mechanism occurred and fails if any never did:

* MUX4 use;
* LUT6 mode and dual-LUT5 mode;
* registered and combinational outputs;
* registered and combinational feedback;
* constant crossbar codes;
* read-back and output hold.

To simulate with Verilator, list the package first, then the RTL, then
the testbench package:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_hybrid_clb_top \
        rtl/hlm_pkg.sv tb/tb_ref_pkg.sv rtl/*.sv tb/tb_hybrid_clb_top.sv
    ./obj_dir/Vtb_hybrid_clb_top

The same command works for any other testbench; change the top module
and the last file. The full top test runs in well under a second of
wall-clock time once it is built.
