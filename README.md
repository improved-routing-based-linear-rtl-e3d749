# Routing-based GF(2) matrix-by-vector multiplier

The linear-algebra step of the Number Field Sieve multiplies a huge, very
sparse binary matrix A by a vector many times over (block Wiedemann). This
RTL does one such product, y = A·u over GF(2), on a square array of simple
cells. Each nonzero A[i][j] becomes a small *packet* that carries the vector
value u_j to the cell that collects row i. When the packet gets there, the
cell XORs it into its accumulator. All the work is moving packets, and the
array does that with a local, systolic sorting-network style scheme called
*clockwise transposition routing*. No cell needs a routing table or a buffer
deeper than one packet.

With a blocking factor K, each cell handles K vectors at once, so a payload
is K bits wide. The default configuration is a 128 × 128 array
(16,384 cells), K = 69, and up to 128 stored matrix entries per cell.

## Cells, packets and one routing step

Every cell holds:

- one packet register: at most one packet in flight;
- a list of up to DEPTH pending entries. An entry is a precomputed target
  address plus a 2-bit selector that says which vector value the packet
  carries;
- the K-bit input value u and the K-bit accumulator acc.

One clock is one routing step. In each step every cell is paired with at
most one neighbour, and the two packets on that link go through a
compare-exchange (`cx_elem`). The rules are applied in this order:

1. **Merge.** Both packets go to the same cell: their payloads are XORed into
   one packet, which stays in the lower-index cell. With K = 1 both packets
   simply vanish.
2. **Farthest first.** If both cells hold packets, they swap when the lower
   cell's packet targets a coordinate at or beyond the upper cell's packet.
   In effect, each packet moves toward its own destination.
3. **Single packet.** A lone packet moves across if that brings it nearer
   its target.

Which neighbour a cell is paired with depends on t mod 4 (`link_sched`):

| t mod 4 | pairing |
|---|---|
| 0 | rows: odd row with the row above |
| 1 | columns: odd column with the column to the right |
| 2 | rows: odd row with the row below |
| 3 | columns: odd column with the column to the left |

Over four steps this turns clockwise, which gives the scheme its name.

After the exchange, a packet that has reached its cell is consumed
(acc ^= payload).

**Refill.** A cell that has had an empty register for W = 2 consecutive
clocks turns its next pending entry into a packet. An entry whose payload is
all zero sends nothing and is skipped, at one entry per clock.

## Four interleaved tori

A plain mesh can livelock, and its edge cells are slow. So the array is a
**torus**: each row and each column wraps around. The wrap link would
normally be a long wire. To avoid that:

1. **Four sub-tori.** The 128 × 128 array is split into four independent
   64 × 64 sub-tori, chosen by the parity of the physical row and column.
   Every 2 × 2 physical block has one cell of each sub-torus.
2. **Interleaving.** Inside each sub-torus, logical coordinates are laid out
   in the physical order 0, S−1, 1, S−2, 2, … (`nfs_pkg::il_log`). Logical
   neighbours, the wrap pair included, are then at most two physical slots
   apart within their sub-torus. That is at most four physical cells.

The four cells of a 2 × 2 block share their u registers. A matrix entry is
stored in the block cell that lies in its **target's** sub-torus, and its
selector picks which of the four block values it carries. The entries of
column j therefore sit in the 2 × 2 block that holds u_j, whatever sub-torus
the target row lies in.

**Addresses on a torus.** An address is the target's logical coordinate plus
S/2. When the shortest path crosses the wrap link, the address is shifted by
±S. Each address therefore has log2(S)+1 bits and lies in 0 … 2S−1, and a
cell's own address is its coordinate plus S/2. The usual "greater than"
compares of the mesh rules keep working with these addresses. A packet has
arrived when its low log2(S) bits match the cell's. This design makes one
choice of its own here: a packet that crosses a wrap link has its address
MSB flipped (it moves by S modulo 2S). That keeps both cells of a wrap link
comparing in one frame.

## Knowing when the product is finished

Each cell raises EMPTY when it has nothing pending and nothing in flight.
The detector (`empty_tree` built from `empty_chain`) works like this:

- Each row's EMPTY flags are ANDed along a chain with a register after every
  D = 16 gates.
- The row results are ANDed the same way down a column chain.

The global flag therefore lags the array by 2·ceil((M−1)/D) = 16 clocks.
`route_ctrl` declares the product complete when the flag has stayed high for
that many consecutive clocks. It ignores the first 16 clocks after a start,
while the pipeline still holds stale values.

## Recovery ring

Clockwise transposition routing can, in rare cases, cycle forever. If the
product is not finished after `t_max` steps (an input), the controller
switches every cell into **ring mode**:

- The cells form a serpentine Hamiltonian ring: row 0 left to right, the
  other rows snaking over columns 1 … S−1, then column 0 as the return path.
- Odd/even ring pairs alternate, and every scheduled pair always swaps.

Each packet then circulates until it passes its target and is consumed,
which bounds the finishing time. The `recovered` output reports that ring
mode was needed.

## Using the top (`nfs_router_top`)

All signals are synchronous to `clk`. Reset `rst_n` is synchronous and
active low.

1. **Load.** Issue one command per clock on the load bus: `ld_cmd`,
   `ld_row`, `ld_col`, `ld_slot`, `ld_entry` and `ld_u`.
   - `LD_U` writes one cell's u; `LD_U_ALL` writes u in every cell.
   - `LD_ENTRY` writes pending entry `ld_slot` of a cell and sets that
     cell's entry count to `ld_slot + 1`, so write a cell's entries in
     order.
   - An entry is `{sel[1:0], row_addr, col_addr}`, with the addresses as
     described above. `tb/nfs_tb_pkg.sv` has a reference encoder,
     `make_entry`.
2. **Multiply.** Pulse `start_req`. `busy` stays high until `done`, and
   `steps` gives the number of clocks used. With `use_result` high at the
   start, each cell's previous acc becomes its new u, so repeated products
   (A·A·u …) need no reload.
3. **Read back.** `rd_row` / `rd_col` select one cell combinationally; its
   result is `rd_acc`.
4. **Events.** `ev_merge`, `ev_consume`, `ev_inject` and `ev_wrap` are
   one-clock flags: in that clock, at least one cell merged, consumed or
   injected a packet, or a packet crossed a wrap link.

Which cell collects which matrix row, and how rows and columns map onto
cells, is left to the loading software.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| M | 128 | physical array side; must be divisible by 4 |
| K | 69 | payload bits (blocking factor) |
| DEPTH | 128 | pending entries per cell |
| W | 2 | idle clocks before a refill |
| D | 16 | AND gates per detector pipeline stage (own choice) |

## Departures and open points

- The schedule, compare-exchange rules, merging, torus addressing, sub-tori,
  interleaving, refill, EMPTY detection and ring recovery follow the
  published scheme. The following are this design's own choices:
  - the entry format, the load bus and the read port;
  - skipping entries whose payload is zero;
  - u ← acc chaining on start;
  - the exact ring path;
  - taking `t_max` as an input instead of a fixed formula (the published
    bound assumes no refill);
  - D = 16.
- Not built:
  - the communication between the chips of a cluster;
  - the inter-chip I/O;
  - the host computer that prepares the matrix.

  They are only outlined at the system level, so the load and readout ports
  stand in for them.
- There is no bound on the time spent in ring mode. A cell keeps injecting
  in ring mode.
- Each of the modules `link_sched`, `cx_elem` and `route_cell` handles N
  cells side by side (one array row per instance). This keeps elaboration of
  the 16k-cell array small. The logic is identical per cell.

## Files

- `rtl/nfs_pkg.sv`: types, the interleaving and ring functions, and the
  detector stage count.
- Per-cell logic, vectorised per row: `cx_elem`, `link_sched`, `route_cell`.
- `mesh_row` (one physical row) and `tori_fabric` (the whole array with its
  torus wiring).
- The detector: `empty_chain`, `empty_tree`. The controller: `route_ctrl`.
  The top: `nfs_router_top`.
- `tb/`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=… failures=…`.
  - `tb_nfs_router_top` runs an 8 × 8 array end to end: A·u, a chained
    product, and a forced ring recovery. It checks that merges, wrap
    crossings, refills, skips, recovery and the detector latency all
    occurred.
  - `tb_nfs_router_full` runs one complete product at the default 128 × 128
    size, checks 801 results against a software model, and finishes in 99
    clocks.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/nfs_pkg.sv \
    $(ls rtl/*.sv | grep -v nfs_pkg) tb/nfs_tb_pkg.sv \
    tb/tb_nfs_router_top.sv --top-module tb_nfs_router_top
./obj_dir/Vtb_nfs_router_top
```

The package has to come first. Swap in any other `tb/tb_*.sv` and its module
name the same way.

The full-size testbench (`tb_nfs_router_full`), at the defaults with no
parameter overrides, is the largest size simulated. It needs about 2 minutes
to build, about 1.2 GB of memory, and 30 s to run.
