# Routing cache for a low-latency interconnect switch

A switch in an HPC interconnect has to decide, for each arriving packet, which
output port the packet leaves on. Conventional switches look the destination up
in an off-chip TCAM. A search takes about 25 ns and only one search runs at a
time, so one input port can route about 40 million packets per second. With
84-byte minimum-size packets that is far below the line rate of a 400–1600 Gbps
link.

This design puts a small on-chip **packet forwarding cache** at every input port,
in front of that port's CAM. A hit gives the output port in 3 clock cycles, and
the port accepts one packet per cycle. Only a miss pays for the CAM search.

A plain cache stops helping once a job spans many more nodes than the cache has
lines. The second idea fixes that: a **switchable node reduction function**
rewrites the destination address into a short key before the lookup. On the
regular topologies used in practice, every destination that leaves by the same
output link gets the same key:

- k-ary n-meshes and tori with dimension-order routing
- fat trees with up*/down* routing
- Dragonflies, laid out as a 3-level fat tree

With these keys a switch needs about as many cache lines as it has links,
whatever the size of the machine, and the hit rate stays at 100% once the cache
is warm. For any other topology the full address is the key, and the cache
behaves like an ordinary hashed cache.

The RTL covers the routing-computation stage of a 64-port switch:

- the per-port pipelines (`rc_port`)
- the caches (`fwd_cache`)
- the node reduction datapaths (`node_reduction` or its two-cycle form
  `node_reduction_pipe`, `nrf_cube`, `nrf_fattree`, `lag_select`)
- the hash (`crc_hash`)
- the controller that keeps caches and CAMs consistent (`cache_ctrl`)
- the top level, `cache_switch_rc`

The CAM is outside the design, and so are the input buffers, the allocators and
the crossbar of the switch. The top brings their connections out as ports.

## Per-port pipeline and miss handling (`rc_port`)

Timing of a request accepted in cycle 0:

| cycle | work |
|---|---|
| 0 | node reduction turns the 24-bit destination into a 64-bit key |
| 1 | CRC-16 of the key; its low 9 bits select one of 512 sets; the set is read |
| 2 | the tags of the 4 ways are compared with the key |
| 3 | on a hit, `rsp_valid_o` with the 32-bit line data (output port and reserved field) and `rsp_hit_o=1` |

On a miss, the request goes into an 8-entry miss queue. Later requests keep
flowing through the pipeline and keep hitting ("hit under miss"). So results can
return **out of order**, and each one carries the request's 8-bit id.

A single miss handler serves the queue one entry at a time:

1. **Check.** It re-reads the set through the cache's second read port. An
   earlier refill may already have brought the key in, for example when several
   packets to one destination missed back to back. If so, it answers from the
   cache without a CAM search. This also guarantees that a key never sits in two
   ways.
2. **CAM request and wait.** Otherwise it sends the same 64-bit key to the CAM
   and waits for the answer. Only one search is ever outstanding.
3. **Respond.** It writes the line into the victim way and returns the result
   with `rsp_hit_o=0`. The victim is the first invalid way, otherwise a per-set
   round-robin pointer.

Latency and throughput:

- A cold miss with an idle handler takes 3 + 5 + CAM-latency cycles, which is 33
  cycles for a 25-cycle CAM.
- All-miss traffic runs at one packet per CAM search, the same rate as a switch
  without a cache.
- All-hit traffic runs at one packet per cycle.

Flow control:

- `req_ready_o` falls when the miss queue could not absorb every lookup already
  in flight. This is a stall of the input.
- The result port has no back pressure.
- If a hit and a handler result are ready in the same cycle, the hit goes first
  and the handler result waits one cycle.

The handler also applies **line updates** (`upd_*`). Management software uses
them to reroute a single key, for example around a failed link, without a flush.
If the key is cached, an update rewrites its line. Otherwise the update
allocates a line as a refill would. The software must also change the CAM entry,
because later misses are answered from the CAM. Updates take priority over queued misses.

## Node reduction and the cache key (`node_reduction`)

All three datapaths run in parallel. The configured mode selects one of them.
The 64-bit key, which is also the stored tag and the CAM search key, is built as
follows:

| mode | key |
|---|---|
| arbitrary | `{mode[1:0], 38'b0, dst[23:0]}` |
| cube / fat tree | `{mode[1:0], 48'b0, local, dir, idx[7:0], lag[3:0]}` |

The mode bits keep the keys of different modes apart. `lag` is the member link
of a link aggregation group (LAG). Each physical link of a bundle therefore has
its own line.

Addresses are 24 bits wide. They are split into equal chunks of `chunk_w` bits,
with chunk 0 in the least significant bits.

**k-ary n-cube (`nrf_cube`).** Twelve comparators, enough for 2-bit chunks of a
24-bit address, compare all dimensions at once. The lowest dimension whose
coordinate differs from the switch's own decides the link, as dimension-order
routing does.

- On a mesh, the sign of the offset `d_i - c_i` gives the direction.
- On a torus, the wraparound link is used when it is shorter. With
  `h = floor(k/2)`:
  - offsets in `(0, h]` and `< -h` go `+`
  - offsets in `> h` and `[-h, 0)` go `-`
- When all coordinates match, the key is the local endpoint.

A switch therefore needs at most 2n+1 lines, times the LAG size. Supported
shapes are 256-ary 3-cube, 64-ary 4-cube, 16-ary 6-cube, 8-ary 8-cube and 4-ary
12-cube, and anything that embeds in them. `radix` is a run-time field.

**Fat tree / Dragonfly (`nrf_fattree`).** A switch at layer `dim` has address
chunks `c_{n-1}..c_0`, and a node has chunks `d_n..d_0`. For every `i` in
`dim..n-1`, a comparator checks `d_{i+1}` against `c_i`.

- If any comparison differs, the destination lies outside this subtree. The key
  is "up, digit `d_i`", taken at the highest differing `i`.
- Otherwise the key is "down, digit `d_dim`".

This needs at most one line per up link and one per down link. A Dragonfly with
fully connected groups is used as a 3-level fat tree with 1:1 oversubscription.

**LAG member (`lag_select`).** The member is the CRC of the 24-bit destination,
or the destination itself, modulo `lag_num` (1..16). It runs next to the reduction
datapaths and does not lengthen the path.

**Two-cycle variant (`node_reduction_pipe`).** For clock rates at which the
comparators, the priority selection and the key multiplexer do not fit in one
cycle, `rc_port` and `cache_switch_rc` take `NRF_PIPE = 1`. The tags of the
three datapaths, the LAG member and the mode are then registered after
cycle 0, and the key is selected in cycle 1. Every latency grows by one cycle:
a hit takes 4 cycles and a cold miss 34. The throughput stays at one packet per
cycle. The default is the single-cycle circuit.

**Arbitrary topologies.** The key is the whole address, and the CRC of the key
spreads the destinations over the sets. With 2048 lines, jobs of up to 2048
nodes fit. For consecutive addresses the linear CRC puts exactly 4 keys in every
set, so once warm there are no conflict misses.

## Keeping caches and CAMs consistent (`cache_ctrl`)

Routes are never patched piecemeal when the topology changes. Instead the
controller runs this sequence:

1. On `topo_change_i`, or on `cfg_load_i` (a new node reduction configuration,
   loaded before a job), pulse `flush_o` for one cycle. This clears every valid
   bit and victim pointer in all ports at once, and drops `cache_en_o`.
2. While disabled, every packet is routed by its CAM and nothing is refilled.
3. Software reprograms the CAMs and raises `reprog_done_i`.
4. The caches are enabled again and warm up from cold.

Reset state and re-entry:

- After reset the controller waits for `reprog_done_i` with the caches off,
  because the CAMs must be filled first.
- A new request during the sequence restarts it.

Refills in flight: if a flush arrives while a CAM answer is on its way, the
refill is dropped. The packet still gets its answer. So no route from before the
change survives in a cache.

The configuration `rc_cfg_t` (in `rc_pkg`) holds these fields:

| field | meaning |
|---|---|
| `mode` | arbitrary, cube or fat tree |
| `cur_addr` | this switch's address in chunk format |
| `chunk_w` | chunk width, 1..8 |
| `n_dims` | cube: number of dimensions; fat tree: number of levels above the leaves |
| `radix` | cube: k, used for the wraparound |
| `torus` | cube: 1 for a torus, 0 for a mesh |
| `ft_dim` | fat tree: layer of this switch |
| `lag_num` | links per LAG group, 1..16 |
| `lag_sel` | member chosen by CRC or by residue |

All ports of a switch share one configuration.

## The cache array (`fwd_cache`)

Each port has its own cache:

- 2048 lines in 4 ways, so 512 sets.
- A line is 12 bytes: the 8-byte key as tag, a 2-byte output port descriptor and
  2 reserved bytes, for example for QoS.
- Tags and data are plain arrays, one per way, and map to SRAM.
- There are two synchronous read ports and one write port. One read port serves
  lookups. The other lets the miss handler check and pick a victim without
  stalling lookups.
- Valid bits and victim pointers are flip-flops, so that a flush takes one cycle.
- A read issued in the flush cycle already sees an empty cache.

`crc_hash` is a combinational, bit-serial CRC-16/CCITT (polynomial 0x1021, seed
0xFFFF, MSB first). Synthesis unrolls it into an XOR tree.

## Parameters

| parameter | default | where |
|---|---|---|
| `NUM_PORTS` | 64 | `cache_switch_rc` |
| `ENTRIES` | 2048 | `cache_switch_rc`, `rc_port`, `fwd_cache` |
| `WAYS` | 4 | `cache_switch_rc`, `rc_port`, `fwd_cache` |
| `MQ_DEPTH` | 8 | miss-queue depth |
| `NUM_CMP` | 12 | `nrf_cube` comparators |
| `NRF_PIPE` | 0 | `cache_switch_rc`, `rc_port`: 1 selects the two-cycle node reduction |

Widths are set in `rc_pkg`:

- 24-bit address
- 64-bit key
- 16-bit port descriptor
- 16-bit reserved field
- 8-bit request id

The defaults are the published design point:

- 64 ports
- a 2K-entry, 4-way cache per port
- 24-bit addresses
- LAG of up to 16 links
- 12 comparators

## What follows the thesis and what is this design's own

This design is built from Hirasawa's dissertation on routing caches for
interconnect switches.

**Taken from the thesis:**

- a private cache per input port, in front of the CAM, with the CAM used only on
  a miss
- 2048 entries, 4-way set associative, with 8+2+2-byte lines
- a CRC hash to index the cache
- flush, disable, reprogram, enable on a topology change
- the three reduction functions, with 12 chunk comparators over 24-bit addresses
- LAG up to 16 links, selected by a CRC of the destination
- the cache key doubling as the CAM key
- a three-stage pipeline with a one-packet-per-cycle hit rate

**This design's own choices:**

- the key layout and mode bits
- CRC-16/CCITT as the hash, and the low 9 bits as the set index
- round-robin replacement
- the miss queue and its depth, hit under miss, and out-of-order results with an id
- the recheck before a CAM search
- the line-update port
- the exact stage split
- the signal-level handshakes and the reset state

**Departures:**

- For the torus boundary this design uses `floor(k/2)`, the bound stated with the
  thesis' "boundary" address. The thesis' torus pseudo-code writes `ceil(k/2)`,
  which for odd k takes one hop more than needed.
- The fat-tree datapath scans from the top layer down and stops at the first
  mismatch. That is one reading of the thesis' loop.
- The thesis evaluates a two-level variant, with a 512-entry L1 and an
  8192-entry L2, only as a comparison point. It is not built.
- The thesis evaluates a single-cycle and a two-cycle node reduction circuit.
  Both are built. Where the two-cycle one places its register is this design's
  choice.
- The thesis also mentions a 6-comparator reduced variant. It is available by
  setting `NUM_CMP = 6` on `nrf_cube`. `node_reduction` always uses 12.

## Simulation

Every module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`. Each
testbench prints `TB_RESULT checks=N failures=M` and stops itself through a
watchdog.

`tb/tcam_model.sv` is a behavioural CAM with the following behaviour:

- ternary entries, with the lowest index winning
- one search at a time
- a configurable latency, 25 cycles in the tests
- a search counter

The `rc_port` and `cache_switch_rc` testbenches use it. The package must come
first on the command line:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_cache_switch_rc \
  rtl/rc_pkg.sv rtl/crc_hash.sv rtl/nrf_cube.sv rtl/nrf_fattree.sv rtl/lag_select.sv \
  rtl/node_reduction.sv rtl/node_reduction_pipe.sv rtl/sync_fifo.sv rtl/fwd_cache.sv rtl/rc_port.sv \
  rtl/cache_ctrl.sv rtl/cache_switch_rc.sv tb/tcam_model.sv tb/tb_cache_switch_rc.sv
./obj_dir/Vtb_cache_switch_rc
```

`tb_cache_switch_rc` runs the top at its default size: 64 ports, each with a
2048-line cache and its own CAM model. Compiling takes about two minutes and the
run takes a couple of seconds.

The test drives random traffic in arbitrary, cube and fat-tree modes, plus a
2-link LAG, a line update, topology-change flushes and mode switches. It checks
every route against a reference model and checks hit latency. It counts hits,
CAM searches, rechecks, stalls, out-of-order completions, disabled-cache
packets, flushes, mode switches, updates and LAG members, and fails if any of
them never happens.

`tb_rc_port_pipe` repeats the `rc_port` test with `NRF_PIPE = 1` and
latencies one cycle longer. It needs `rtl/node_reduction_pipe.sv` on the
command line. That file also belongs on the command line of every build of
`rc_port` or the top.

`tb_rc_port_workloads` measures hit rates of one port on uniform random
traffic. It also needs `rtl/node_reduction_pipe.sv` and `tb/tcam_model.sv`.
It prints these results:

- 512 destinations in arbitrary mode give 512 CAM searches, after which 100% of
  requests hit.
- The 9261 nodes of a 21×21×21 torus in arbitrary mode give a warm hit rate near
  20%. The cache holds only 2048 of them.
- The same torus with the cube reduction needs 7 CAM searches, after which 100%
  of requests hit.
- A Dragonfly of 16 groups × 16 nodes, seen from one group switch with the
  fat-tree reduction, needs 32 CAM searches (16 up and 16 down links), after
  which 100% of requests hit.

The unit testbenches compare against reference models written independently in
the testbench:

- the CRC
- dimension-order routing on meshes and tori of random shape
- up*/down* routing
- the LAG modulo
- a set-associative cache model
- the controller sequence

## Limits

- Only the routing computation is built. Buffers, virtual-channel and switch
  allocation, the crossbar, the link PHYs and the CAM are outside. The CAM exists
  only as a testbench model.
- There is one cache per input port. A link that carries several wavelengths
  could instead use one `rc_port` per wavelength. That is a matter of how the
  module is instantiated and is not built here.
- The 16-bit port descriptor is passed through as the CAM returns it. Its
  encoding is up to the user: one port, a candidate set for adaptive routing, or
  a LAG group.
- The controller does not reprogram the CAMs. Software does that, then signals
  `reprog_done_i`.
- Timing closure at 1 GHz has not been studied. The reduction datapaths and the
  CRC are single combinational stages.
