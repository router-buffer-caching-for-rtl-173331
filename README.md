# Router buffer caching for shared cache blocks in a tiled mesh

In a tiled multi-core processor the last-level cache (LLC) is split into
slices, one per tile, and every block has one home slice. When many cores
read the same few blocks at once, the home slice becomes a hotspot: requests
pile up in its queue, and the queueing delay dominates the LLC access time.

This design attacks that hotspot inside the network. Each mesh router holds a
tiny fully associative store of heavily shared, read-only (S-state) blocks,
the **router buffer cache (RBC)**. A read request that reaches its home
router and hits in the RBC is answered by the router itself. The request
still goes on to the LLC controller, marked *serviced*, so the directory
records the new sharer without accessing the data array. The LLC controller
decides which blocks deserve an RBC slot, using a small **prediction
classifier** that remembers which regions of memory recently held blocks
with many sharers.

The RTL covers the network side: a parameterised mesh of routers, each with
its RBC, plus the classifier that sits in each LLC controller. The cores, L1
caches, LLC slices with their directory, and the network interfaces are not
included. Their connections are brought out at the top level (`rbc_mesh`),
and the end-to-end testbench models them behaviourally.

## Configuration

| Item | Default | Parameter |
|---|---|---|
| Mesh | 8 x 8 tiles, X-Y routing | `MESH_X`, `MESH_Y` (rbc_mesh) |
| Router | 5 ports, 3 VCs per port, two pipeline stages, 3 cycles per hop | `rbc_pkg` |
| Flit | 64 data bits (+2 type bits, +2 VC bits) | `rbc_pkg::FLIT_W` |
| Block | 64 B = 1 head flit + 8 body flits | `rbc_pkg` |
| VC buffer | 4 flits | `rbc_pkg::BUF_DEPTH` |
| RBC | 8 blocks x 9 flits x 8 B = 576 B, fully associative, LRU | `RBC_ENTRIES` |
| RBC hit counter | 2-bit saturating, per entry | `rbc_pkg::HIT_CTR_W` |
| History table | 4 (page, zone) entries, LRU | `HT_ENTRIES` |
| Sharer threshold | 5 (more than 5 sharers counts as "high") | `ST` |
| Zones | 4 per 4 KB page, each 16 blocks | `rbc_pkg::blk_zone` |
| Physical address | 48 bits (42-bit block address) | `rbc_pkg::PADDR_W` |

The buffer depth, the address width, the head-flit layout and the
pollution-control constants are choices of this implementation. The other
numbers follow the published design.

## What happens to a request

Requests are classified by the `msg` field of the head flit (`rbc_pkg::head_t`):

- `M_READ` is a read miss.
- `M_WRITE` is a write miss.
- `M_UPGRADE` is a write to a block held in S.

A request travels by X-Y routing to the home tile of its block. The home tile
is chosen by whoever injects the packet. In the home router's first stage the
head flit gets its route to the local (ejection) port and, in the same cycle,
looks up the RBC:

- **Read hit.** The RBC queues a reply for the requester and bumps the
  entry's hit counter. The reply is the stored head flit, with its
  destination rewritten, followed by the eight stored body flits. The request
  gets its `serviced` bit set and continues to the LLC controller. The LLC
  controller must then only add the sharer.
- **Write or upgrade hit.** The RBC entry is invalidated in that same cycle.
  The request only leaves for the LLC in the next stage, so the cached copy is
  always gone before the LLC sees the write.
- **Miss**, or any other message. Nothing changes, and the request continues.

Replies from the RBC enter the router through a multiplexer in front of the
local input port. They use a reserved virtual channel (`RBC_VC` = VC2), which
the processing element must not use. They go out through the same router
pipeline as any other packet. When the reply queue (4 entries) is full, a
read hit waits in stage 1 and retries; this is the *reply stall* event. An
entry that still has replies queued is never chosen as a victim.

Blocks in the RBC are only ever in S state. Invalidation on write keeps them
coherent. So does the LLC controller's invalidation port, which it must use
when the LLC itself evicts or invalidates the block.

## Classifier and promotion (LLC controller side)

`rbc_classifier` turns the directory's knowledge into promotion decisions:

1. **Learning.** Whenever the directory reports a block's sharer count and
   the count exceeds `ST`, the block's *(page, zone)* key is inserted into the
   4-entry history table. A 4 KB page is split into four 1 KB zones, so one
   hot array does not claim a whole page.
2. **Promotion.** When a read hits a block in E state (the E→S transition),
   the LLC controller asks the classifier (`e2s_valid`/`e2s_promote`,
   combinational). If the block's key is in the table, the controller
   promotes the block: it sends it to its own router's RBC on the fill port.
   A full RBC replaces its LRU entry. It then reports the victim's address
   and hit count one cycle later.
3. **Pollution control.** A replaced block that collected fewer than 3 hits
   was a poor choice. A saturating counter rises on each such report and
   falls on each report with 3 hits. When it reaches `POLL_THRESH` (4), the
   classifier either removes the `POLL_REMOVE` (2) most recently used table
   entries, one per cycle, or clears the whole table (`POLL_CLEAR` = 1).

The table-driven promotion, the threshold, zones, the 2-bit counter and the
"fewer than 3 hits" rule follow the published design. That design does not
give a detection rule for pollution, so the counter, its threshold of 4 and
the removal of exactly two entries are this implementation's choices.

## Router pipeline and timing

`rbc_router` is an input-queued wormhole router with credit flow control:

- **Stage 1:** route computation (`xy_route`) and the RBC lookup, one lookup
  per cycle. Several VCs that need a lookup share it round robin.
- **Stage 2:** VC allocation (`vc_allocator`) and switch allocation
  (`switch_allocator`, separable input-first, round robin) run in parallel.
  A head flit that is still waiting for an output VC bids for the switch
  speculatively. Its grant counts only if, in the same cycle, it also gets a
  VC with a credit. Otherwise the crossbar slot is lost, which the router
  counts as `spec_fail`. Winners go through the `crossbar` into registered
  outputs.

A flit written into an input buffer on one clock edge appears on the output
link two edges later. With the next router's input register, an
uncongested hop takes 3 cycles. The router testbench checks this figure in
all directions.

Credits start at the buffer depth and return one cycle after a flit leaves an
input buffer. No credit is returned to the processing element for the
reserved reply VC, because that VC is fed internally.

## Interfaces of the top level

`rbc_mesh` takes per-tile arrays, indexed `tile = y*MESH_X + x`:

- `nic_in`, `nic_in_credit`, `nic_out`, `nic_out_credit`: the local port, as
  `link_t` (valid + flit) and `credit_t` (valid + VC). The network interface
  must accept every ejected flit. It returns a credit for each flit it
  consumes on `nic_out_credit`.
- `llc_shr_*`: sharer-count reports into the classifier.
- `llc_e2s_*` / `llc_e2s_promote`: promotion query.
- `llc_fill_*` / `llc_fill_ready`: block promotion into the RBC. Data is 8 x
  64 bits, held until ready.
- `llc_inv_*` / `llc_inv_ready`: LLC-initiated RBC invalidation.
- `llc_rep_*`: eviction reports (block, hit count), also used by the
  tile's own classifier.
- `events`: one `tile_events_t` of event pulses per tile, for statistics.

The RBC has priorities. A lookup has priority over an invalidation, and an
invalidation over a fill; the `*_ready` signals reflect this.

## Departures and simplifications

- The RBC and its LLC controller exchange fills, invalidations and eviction
  reports over dedicated side ports. The published design sends them through
  the router's injection and ejection channels. The information is the same,
  and no network traffic is involved either way.
- Requests and replies share the network VCs; there are no separate message
  classes. Deadlock freedom relies on X-Y routing and on the interfaces always
  draining ejected flits.
- The VC allocator gives at most one new VC per output port per cycle,
  choosing the lowest free VC.
- Invalidating an RBC entry produces no hit-count report. Only replacement
  does.
- An insertion into the history table that arrives in the cycle when
  pollution control removes an entry is dropped.
- The `serviced` marking is only meaningful if the LLC controller honours it.
  The testbench's LLC model does, and checks that such a block is in S.

## Files

| File | Content |
|---|---|
| `rtl/rbc_pkg.sv` | sizes, flit and head formats, message types, event record |
| `rtl/rbc_mesh.sv` | top: mesh of `rbc_tile` |
| `rtl/rbc_tile.sv` | one router with its classifier |
| `rtl/rbc_router.sv` | two-stage router with RBC |
| `rtl/rbc.sv` | router buffer cache |
| `rtl/rbc_classifier.sv`, `rtl/history_table.sv` | promotion classifier |
| `rtl/xy_route.sv`, `rtl/input_port.sv`, `rtl/vc_allocator.sv`, `rtl/switch_allocator.sv`, `rtl/crossbar.sv` | router parts |
| `rtl/flit_fifo.sv`, `rtl/rr_arbiter.sv`, `rtl/lru_ranks.sv` | helpers |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself.
Each has a watchdog. With Verilator 5:

```sh
verilator --binary --timing -j 4 --top-module tb_rbc_mesh \
    rtl/rbc_pkg.sv $(ls rtl/*.sv | grep -v rbc_pkg) tb/tb_rbc_mesh.sv -o sim
./obj_dir/sim
```

The package must come first on the command line. Swap in any other
`tb/tb_*.sv`, with its module name, to test a single unit.

`tb_rbc_mesh` is the end-to-end test. It uses a **4 x 4 mesh**, the largest
size simulated. The full 8 x 8 mesh compiles, but its C++ build takes tens of
minutes. To run it, set `MX` and `MY` in the testbench to 8 and the hotspot
tiles to two tiles of the larger mesh.

The testbench models a core per tile and an LLC slice with a MESI-like
directory per tile. Every block's data is derived from its address and a
write version, so a stale RBC copy is detected. The testbench requires each
mechanism to occur at least once:

- RBC read hits;
- write invalidations;
- LLC invalidations;
- promotions;
- replacements;
- reply-queue stalls;
- history-table inserts and hits;
- pollution control;
- speculation failures;
- credit stalls.

It prints how often each one happened.

Knobs worth changing: `RBC_ENTRIES` (16 and 32 are natural comparison
points), `ST`, `HT_ENTRIES`, and, inside `rbc_classifier`, `POLL_THRESH`,
`POLL_REMOVE`, `POLL_CLEAR` and `ZONED` (0 keys the table by page only).
