# MOCCA: a systolic DNN accelerator that routes around slow silicon

Carbon-nanotube transistors are fast and frugal, but their speed varies a
lot from device to device, and the variation is strongly correlated along
one direction of the die. A large systolic array built from them runs only
as fast as its slowest multiply-accumulate unit. MOCCA answers this in
three ways, all of which are in this RTL:

1. **Small arrays.** Instead of one 256 x 256 array, the compute layer holds
   several 32 x 32 int8 weight-stationary arrays, each with its own weight
   FIFO, input loader, accumulator, activation and normalization/pooling
   units.
2. **Outlier skipping.** Every row of MAC units is laid out along the
   correlated direction, so slowness comes in whole rows. Each MAC has one
   extra partial-sum wire that bypasses the unit directly above it. A row
   found slow after fabrication is switched out of the reduction chain and
   the array keeps working with one row fewer; the clock no longer has to
   wait for that row.
3. **Banked on-chip memory at per-bank speed.** The 24 MB buffer is split
   into six 4 MB banks stacked above the arrays. Each bank runs at its own
   access rate, and a bank map lets the host pair fast arrays with fast
   banks: the bank directly above an array is reached over a direct
   vertical via, any other bank over two central crossbars (one per layer)
   in the same number of cycles.

The RTL is a synchronous, single-clock model of this architecture at its
full size: six 32 x 32 arrays and six 4 MB banks (256-bit words,
131072 words per bank).

## Block diagram

```
           host registers (ctrl_regs)          host bank port    weight stream (off-chip)
                 |  masks, periods, bank map, commands   |                 |
   memory layer  v                                       v                 |
   +-------------------------------------------------------------+        |
   |  sram_bank x6 (4 MB, own access period)                     |        |
   |        ^ requests                     | read data           |        |
   |  mem_xbar (round robin per bank)      v                     |        |
   +-------------------------------------------------------------+        |
   compute layer                  comp_xbar (data back to requester)      |
   +-------------------------------------------------------------+        |
   |  mocca_core x6                                              | <------+
   |   weight_fifo -> mac_array (32x32, outlier rows bypassed)   |
   |   ifp_loader  ->     |                                      |
   |                ofp_accumulator -> activation_unit           |
   |                               -> norm_pool_unit -> bank     |
   |   core_ctrl sequences all of it                             |
   +-------------------------------------------------------------+
```

## The array and outlier skipping (the subtle part)

`mac_array` is weight stationary. Weight `W[k][c]` sits in row `k`,
column `c`. Activation element `x[k]` enters row `k` at the left edge and
moves one column right per cycle; partial sums move one row down per cycle
and leave at the bottom, one per column. Column `c` therefore produces
`sum_k W[k][c] * x[k]`.

`skip[r] = 1` marks physical row `r` as an outlier. The unit below it
(`mac_pe` in row `r+1`) then takes its incoming partial sum from row `r-1`
over the bypass wire instead of from row `r`. Because the bypass has no
register, the rows that remain form a normal systolic chain with one
stage fewer. Only the direct neighbour can be bypassed, so **two adjacent
rows must not both be skipped**; an assertion checks this. Skipping row 0
makes row 1 start from zero; skipping the last row makes the bottom output
come from the row above it.

With `R = N - popcount(skip)` usable rows, the k-th usable row is the
"logical row" `k`:

* `ifp_loader` delays logical element `k` by `k` cycles and routes it to
  the physical row whose logical index is `k`
  (`k = p - number of skipped rows above p`). Skipped rows get zero. An
  invalid cycle (a slow bank has not delivered yet) becomes a zero bubble,
  which adds nothing to any partial sum.
* `core_ctrl` loads weight rows only into usable rows, in the same order.
  A command may use `K <= R` rows. Rows beyond `K` get zero weights. A
  larger `K` is clamped to `R` and flagged in the status register.
* Column `c` of the result for a vector fed in cycle `t` leaves the bottom
  in cycle `t + R + c`. `ofp_accumulator` delays column `c` by `N-1-c`
  cycles so the whole vector lines up. The controller delays the vector's
  tag (entry address, accumulate flag) by `R` cycles, and the accumulator
  delays it by another `N-1`.

## Memory layer and the crossbars

`sram_bank` stands for one SRAM macro. The chip has one clock, so each
bank's speed is a host-set **access period** `P` (1..15 cycles). A bank
takes one request per `P` cycles, and a read answers exactly `P` cycles
after it was accepted. Writes return nothing. The storage is a plain
array and is not reset.

Requesters are the six tiles (indices 0..5) and the host port (index 6).
`mem_xbar` sends each request to the bank the requester names. Every bank
has its own round-robin arbiter, so a busy host cannot starve a tile. The
crossbar writes the requester index into the request, and `comp_xbar`
uses it to send the bank's answer back, one register stage later. Tile `c`
uses bank `bank_map[c]`. With the default map (bank `c`) the traffic is the
direct-via case, flagged on `ilv_direct_req`/`ilv_direct_rsp`. Timing is
identical either way. Two rules keep the return path free of collisions,
and an assertion checks them: a tile talks only to its own bank, and the
host keeps only one read outstanding.

## A tile command

The host writes one `tile_cmd_t` per array (see `mocca_pkg`), then writes
the start register. The tile then runs in phases:

| phase  | what happens | cycles |
|--------|--------------|--------|
| LOADW  | visit the N physical rows; each usable row gets the next FIFO row (first K) or zeros | N (if the FIFO holds the K rows) |
| STREAM | read M vectors `src_addr..+M-1` and feed them to the loader as they arrive | about M x P |
| FLUSH  | wait for the last result to be accumulated | 2N + 5 |
| DRAIN  | only if `writeback` is set: each entry goes through ReLU (optional), `sat8((x*scale) >>> shift)` and pooling (none, max or average over 1, 2 or 4 consecutive vectors), and the int8 vectors are written to `dst_addr..` | about 5 per entry + bank time |

In the accumulator, entry `acc_addr + m` is overwritten, or added to when
`accumulate` is set. A reduction longer than the usable rows is therefore
split into several commands over the same entries. Without write-back, a
command at bank period 1 takes exactly `3N + M + 8` cycles from the tile's
start pulse to its `done` pulse. The drain handles one vector at a time, which is simple
but slow; the design description sets no rate for it.

## Host interface (`mocca_top`)

* `cfg_we/cfg_addr/cfg_wdata/cfg_rdata`: 32-bit registers, word addresses:
  * `0x00+c`: outlier mask of array `c`
  * `0x08+b`: period of bank `b` (reset 1)
  * `0x10+c`: bank of array `c` (reset `c`)
  * `0x18`: status: busy `[5:0]`, done `[13:8]` (sticky, write 1 to clear), K clamped `[21:16]`
  * `0x40+8c+{0..7}`: command of array `c`: src, M, K, acc_addr, flags, dst, scale/shift, start

  The full layout is in the header of `rtl/ctrl_regs.sv`.
* `hq_*`/`hs_*`: read or write any bank word. Wait for `hq_ready`. Keep one
  read outstanding.
* `w_valid/w_ready/w_core/w_data`: push one weight row (N int8 values) into
  the FIFO of tile `w_core`. The FIFO holds `2N` rows.

Data layout: one 256-bit word is one vector. Byte `k` holds element `k`,
which is the input channel fed to logical row `k`. In the output, byte `c`
holds output channel `c`.

## Where this RTL departs from, or goes beyond, the architecture description

* **Single clock.** Per-bank "own frequency" is modelled as an access
  period in cycles of one clock, not as separate clock domains with
  synchronisers.
* **CNFET specifics have no RTL.** The device and process-variation model,
  the frequencies per array size (0.9 GHz at 256 x 256, 1.8 GHz at
  32 x 32, 2.4 GHz at 8 x 8), the SRAM cell, and the vias are physical
  properties. They enter the RTL only as the outlier masks, bank periods
  and bank map that post-fabrication test would give.
* **Choices of this design, not of the description:**
  * the number of arrays (one per bank, six)
  * signed int8 operands with 32-bit partial sums
  * accumulator depth 512 and weight FIFO depth 2N
  * the row-addressed weight load
  * ReLU as the activation, re-quantisation by multiply, shift and
    saturate, max/average pooling of consecutive vectors
  * round-robin arbitration, the command format, the register map and all
    handshakes
* **Not built:** weight double-buffering, array-to-array traffic over the
  compute crossbar, the off-chip DRAM interface (the weight port is where
  it would connect), and any scheduler that maps whole networks.

## Networks it was evaluated with

The architecture was evaluated on 8-bit LeNet, AlexNet, VGG16, ResNet-18
and MobileNet. The weights are streamed from off-chip memory, so their
size does not limit the design. The largest activation map is VGG16's
224 x 224 x 64 = 3.2 MB. It fits in one 4 MB bank, and a layer that reads
and writes such maps spans two of the six banks. These sizes are
general knowledge about the networks.

`tb/tb_lenet.sv` runs LeNet-5 with random 8-bit weights on one full-size
tile that has two outlier rows:

* conv1 runs as two 288-vector commands, with ReLU and 2 x 2 max pooling.
* conv2 runs as five accumulating passes of 30 rows.
* fc1, fc2 and fc3 run as accumulating matrix-vector passes.

Between layers, the testbench plays the host. It builds the next layer's
patch vectors (im2col) from the results read back from the bank. The
larger networks are not simulated. Their layers decompose into the same
kind of commands.

## Files

* `rtl/mocca_pkg.sv`: sizes, types, the command and bank-request structs
* `rtl/mac_pe.sv`, `rtl/mac_array.sv`, `rtl/ifp_loader.sv`,
  `rtl/weight_fifo.sv`, `rtl/ofp_accumulator.sv`, `rtl/activation_unit.sv`,
  `rtl/norm_pool_unit.sv`, `rtl/core_ctrl.sv`, `rtl/mocca_core.sv`:
  the compute tile
* `rtl/sram_bank.sv`, `rtl/mem_xbar.sv`, `rtl/comp_xbar.sv`,
  `rtl/ctrl_regs.sv`: the memory layer, the crossbars and the control
  registers
* `rtl/mocca_top.sv`: the top level
* `tb/tb_<module>.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M`.
* `tb/tb_mocca_top.sv`: the whole chip with 8 x 8 arrays and small banks.
  All six tiles run two commands each while the host keeps reading, and it
  checks that every mechanism occurs: skipped rows, K clamping, slow-bank
  stalls, direct and crossbar deliveries, host/tile contention, weight FIFO
  back-pressure, accumulation, and all pooling modes.
* `tb/tb_lenet.sv`: LeNet-5, all five layers, on one full-size tile.
* `tb/tb_mocca_full.sv`: the `tb_mocca_top` test at full size (32 x 32 arrays, 4 MB
  banks, top parameters at their defaults).

## Simulating

With Verilator 5, for example the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
    rtl/mocca_pkg.sv tb/tb_mocca_top.sv --top-module tb_mocca_top -o sim
./obj_dir/sim
```

Replace the testbench name to run any other test. The full-size test needs
a few minutes to compile. The RTL uses asynchronous active-low reset
everywhere except the SRAM and accumulator storage, which testbenches
write before they read it. To change the array size, set `ARRAY_N` in
`mocca_pkg` or override `N` on `mocca_top`. The bank size follows from
`BANK_BYTES` and the word width.
