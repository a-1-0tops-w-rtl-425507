# 36-core neocortical computing processor on a Kautz network-on-chip

Brain-inspired visual recognition models turn image and video recognition into
one repeated pair of operations: *matching* (a weighted sum or a distance
against stored templates) and *pooling* (a maximum or an average). The work is
large and mostly sparse. This design spreads it over 36 small identical cores.
Each core holds a slice of the model in local SRAM. A core does nothing until a
datum arrives. It then applies the datum to every target word it touches and
*pushes* each result onward as a packet to the cores that need it next. No
core ever pulls data from another.

The cores are connected as a Kautz graph, not a mesh. That gives every core a
path of at most three hops to any other, three disjoint paths between any two,
and a naming scheme in which the illegal names double as multicast group
addresses.

The RTL is synthesizable SystemVerilog in `rtl/`. Self-checking testbenches,
including one that runs the full 36-core chip end to end, are in `tb/`.

## The Kautz network

### Names and links

A core's name is three base-4 digits `S1 S2 S3` in which neighbouring digits
differ (`121` is legal, `122` is not). That gives 4·3·3 = 36 cores, stored as
6 bits, two per digit.

Core `S1S2S3` has three output ports. Port *k* goes to `S2 S3 Pk`, where
P1 < P2 < P3 are the three digits other than `S3`. So core 121 sends to 210,
212 and 213.

Each core also has three input links. The link from predecessor `x S1 S2` lands
in input buffer *q*, where *q* is the rank of `x` among the digits that differ
from `S1`. This wiring is generated in `nc_processor`.

Core index `9*S1 + 3*rank(S2) + rank(S3)` is used only for array positions.

### Routing strings

A packet carries only its 6-bit target `D1D2D3`. Each router computes the
*routing string* (RS) on its own. The RS is the shortest sequence of digits
that starts with the local name and ends with the target:

| condition | routing string | hops |
|---|---|---|
| `S2==D1` and `S3==D2` | `S1S2S3 D3` | 1 |
| else `S3==D1` | `S1S2S3 D2D3` | 2 |
| else | `S1S2S3 D1D2D3` | 3 |

The next hop is the 3-digit window one place to the right of the local name,
so the output port is the rank of the fourth RS digit. Each router repeats the
computation, so no header is rewritten. This is `kautz_route_unit`.

### Fault and congestion avoidance

Two *fault/congestion identifier strings* (FCIS) are broadcast to every router.
Each names either a core (3 digits) or a link (4 digits `abcd`, meaning the
link `abc → bcd`). If the RS contains one of them, the route unit inserts one
free digit between the local name and the target (`S1S2S3 I D1D2D3`). If that
still hits a fault, it inserts two digits. Candidate digits are tried in
ascending order and the first string that is legal and avoids both FCIS wins.

Example: with core 132 faulty, 121 → 323 becomes 121 → 210 → 103 → 032 → 323.

Because K(3,3) has three disjoint paths, any two faults can be avoided:

- two cores;
- two links;
- one core and one link.

The route unit testbench checks this for all source and target pairs under
random double faults. The checks compare the routed path against a hop-by-hop
walk, not against the RTL's own functions.

Limits of this scheme:

- A fault at the target itself cannot be avoided.
- The FCIS inputs are registered in every router. Changing them while packets
  are in flight is allowed, but a packet already past the detour point keeps
  its old path.

### Multicast without extra header bits

Illegal names are group addresses:

- `XYY` (for example `211`) means the three cores `XYk`: 210, 212 and 213.
- `XXx` (for example `11x`) means all nine cores whose first digit is X, that
  is, core group X.

The multicast unit (`kautz_mcast_unit`) recognises the two shapes on the
routing string:

| routing string | clones sent |
|---|---|
| length 4 and `D2==D3` | `D1 D2 Pk` on each port *k* |
| length 5 and `D1==D2` | `D1 Pk Pk` on each port *k*: each clone is a 3-core subgroup that the next router splits again |

Each clone is an ordinary packet. The result is a spanning tree in which every
member gets exactly one copy. Some cores forward a copy without being members;
the testbench reports how many links carry traffic twice under these
rules.

Multicast packets are not fault-rerouted.

### The router

`kautz_router` contains:

- An In Ctrl port for packets from the local packet encoder.
- Three 2-deep input buffers, one per link.
- One shared routing FIFO (`kautz_route_fifo`): 84 b wide, 8 deep, with up to
  4 writes and 3 reads per cycle. The write grant rotates so no input starves.
- Three route units, which look at the three oldest FIFO entries.
- One multicast unit, which looks at the head entry.

Entries leave strictly in order:

- Up to three unicast packets per cycle, one per free output port.
- A packet for the local core goes to `lout` (packet decode).
- A multicast entry waits until it is at the head and all three ports are
  free. It then leaves on all three ports at once.
- An entry that might be a multicast is held until it reaches the head.

Outputs are registered valid/ready ports. The hop latency is 3 cycles:
input buffer, FIFO, output register.

Each router has counters for multicasts, rerouted packets and cycles with a
full FIFO.

Flow control is credit-free valid/ready with in-order issue. In a ring of full
routers, traffic can therefore deadlock. Nothing in the design prevents this.
The testbenches keep traffic light enough that it does not happen.

## The packet

Packets are 84 bits (`nc_pkg::pkt_t`):

| field | bits | meaning |
|---|---|---|
| `dst` | 32 | target: core (6 b) · virtual page (16 b) · word offset in the 1K-word page (10 b) |
| `datum` | 16 | signed value being pushed |
| `op` | 4 | NOP, WR, ACC, MAC, MAX, L1, L2, WCOEF, RD, HOST |
| `simd`, `lanes` | 1+4 | SIMD over `lanes` (1..9) consecutive pages, or SISD |
| `coef` | 7 | index of the first coefficient (0..80) |
| `fire` | 1 | send the result onward |
| `fire_core`, `fire_op`, `fire_coef` | 6+4+7 | where the result goes and what is done with it there |
| reserved | 2 | |

A result fired from lane *l* keeps the page and offset of the word it came
from. It goes to `fire_core` with operation `fire_op`. A `HOST` packet leaves
the chip through a system bus interface.

## The core (`nc_core`)

```
links ─► router ─► packet decode ─► instruction FIFO (4) ─► dispatcher ─┬─► PE0 ─ local memory (81 B coefficients)
  ▲                                                                     ├─► PE1 ─ page unit 1 (1K×16 SRAM)
  │                                                                     │   ...
  └──── packet encode ◄── fired results ◄───────────────────────────────┴─► PE9 ─ page unit 9
                                         MMU / TLB / DMA ◄─► 64-bit system bus
```

### Decode and dispatch

The packet decoder turns an arriving packet into an instruction and pushes it
into a 4-deep FIFO (`nc_inst_fifo`). The FIFO presents its two oldest entries.

Each cycle the dispatcher (`nc_dispatch`) works out which PEs each of those
two instructions needs:

- WCOEF needs PE0.
- Every other operation needs, for each lane, the PE whose page unit holds
  page `vpn + lane`. The dispatcher finds it by a fully associative lookup in
  the 9-entry TLB.

The oldest instruction issues when four conditions hold:

- all its pages are present;
- its PEs are idle;
- the MMU is not busy;
- the clock enable is on.

The second instruction issues in the same cycle only when all of these hold:

- dual issue is enabled (`hmimd_en`);
- the first instruction issued;
- the second's pages are present;
- its PEs are idle and do not overlap the first's.

Each of the two may be SIMD or SISD, which gives the hybrid MIMD mode. With
`hmimd_en` low the core issues one instruction per cycle.

### PEs

PE *p* (`nc_pe`, arithmetic in `nc_arith_unit`) reads the target word in
cycle 1. In cycle 2 it computes and writes the new value. The operations are:

- `y = x`
- `y += x`
- `y += x·w`
- `y = max(x, y)`
- `y += |x−w|`
- `y += (x−w)²`

Results saturate to 16 bits. Coefficients `w` are 8-bit signed and come from
the 81-byte local memory (`nc_local_mem`, 9 rows × 72 b). All PEs see all of
the local memory.

A MAC whose datum or coefficient is zero and that does not fire is *skipped*.
It takes one cycle, does not touch the SRAM, and is counted. `RD` fires the
stored word without changing it.

A PE that fires hands its packet to the packet encoder (`nc_pkt_encode`). The
encoder arbitrates round robin between the 10 PEs and the system bus injection
port, then feeds the router.

### Paging

Each of the 9 page units is a 1K × 16 b single-port SRAM (`nc_sram_sp`), so
each core holds 18 KB and the chip 648 KB.

The MMU (`nc_mmu_dma`) keeps a 9-entry TLB, one entry per unit, with a dirty
bit. On a miss it picks a victim unit: the first empty one, otherwise round
robin among units whose PE is idle. It then:

1. writes the victim page back over the bus, if dirty (256 beats of 4 words);
2. reads the new page in;
3. updates the TLB.

The DRAM address of a page is `{core, vpn, offset}`, as a word address. The
bus address counts 64-bit beats.

### Event-driven control

`nc_core_ctrl` raises the core's clock enable only while there is work:

- a packet is arriving;
- the instruction FIFO is not empty;
- a PE, the DMA or the encoder is busy.

When the enable is low, the PEs, FIFO pops, SRAM accesses and miss requests are
frozen. The router always runs. The block counts wake-ups (off → on) and
active cycles.

## Chip level (`nc_processor`)

The top holds the 36 cores and two system bus interfaces (`nc_sysbus_if`):

| interface | attached core | serves DMA of |
|---|---|---|
| 1 | 010 | groups 0–1 (cores 0–17) |
| 2 | 232 | groups 2–3 (cores 18–35) |

Each interface does three things:

- It takes a packet from the host as two 64-bit beats: bits 63:0 first, then
  bits 83:64 in the low bits of the second beat. It injects that packet
  through its core's encoder.
- It returns HOST packets in the same two-beat format.
- It arbitrates its 18 cores' DMA round robin onto its own external 64-bit
  memory port (`mem_*`), a simple req/ack bus.

`fcis_in[1:0]` and `hmimd_en` are chip inputs shared by all cores. The `n_*`
outputs sum the cores' event counters.

The DRAM, the host CPU and the camera are outside the chip and are not
modelled in `rtl/`. `tb/nc_ddr_model.sv` is a behavioural memory with random
latency, used by the testbenches.

## Where this RTL departs from the architecture

- **Throughput per PE.** The architecture's PE does up to 4 operations per
  cycle: 36 × 10 × 4 × 250 MHz = 360 GOPS. Here a PE does one operation per
  instruction in two cycles (read, then write) on a single-port SRAM, about
  45 GOPS at 250 MHz. The recognition rates at the default size would be
  about 1/8 of the architecture's: roughly 8–16 frames/s for a 128×128 image
  instead of 63–130.
- **Clock gating** is modelled as a clock enable. A real implementation would
  drive integrated clock-gating cells from the same signal.
- **Neighbour-PE paths.** The data paths between neighbouring PEs in the
  core diagram are not built, because their use is not specified.
- **Chosen details.** These parts are this design's own choices:
  - the packet field layout and opcode set;
  - the FCIS encoding;
  - the digit-insertion order for detours;
  - the in-order router issue;
  - the input-buffer depth;
  - the page-per-lane SIMD mapping;
  - the TLB victim rule;
  - the two-beat host format and the split of cores between the two buses.
- **Not modelled.** No deadlock avoidance and no multicast rerouting. Nothing
  measures the reported 16% delay advantage over a mesh.

The NoC bandwidth matches the architecture: 36 cores × 3 links × 84 b ×
250 MHz = 2.27 Tb/s.

## Simulating

Every testbench includes `rtl/nc_check.svh` by a path relative to the
repository root, so run from there. Example with Verilator 5:

```
verilator --binary --timing -Irtl -I. rtl/nc_pkg.sv rtl/*.sv tb/nc_ddr_model.sv \
  tb/tb_nc_processor.sv --top-module tb_nc_processor -o sim
./obj_dir/sim
```

List `rtl/nc_pkg.sv` first. Its second appearance through the glob is
harmless; remove it from the list if your tool objects. Each testbench prints
`TB_RESULT checks=N failures=M` and stops. A watchdog ends a run that hangs.

| testbench | what it exercises |
|---|---|
| `tb_kautz_route_unit` | routing strings and next hops for all pairs; detours for random double faults |
| `tb_kautz_mcast_unit` | every group address reaches exactly its members |
| `tb_kautz_route_fifo` | 4-in/3-out ordering and fairness against a reference queue |
| `tb_kautz_router` | one router: unicast, multicast, detours, backpressure, 3-cycle hop |
| `tb_nc_arith_unit`, `tb_nc_pe`, `tb_nc_dispatch` | datapath and issue rules against reference models |
| `tb_nc_sram_sp`, `tb_nc_local_mem`, `tb_nc_inst_fifo`, `tb_nc_pkt_decode`, `tb_nc_pkt_encode`, `tb_nc_core_ctrl`, `tb_nc_sysbus_if` | the smaller blocks, each against its own reference |
| `tb_nc_mmu_dma` | misses, write-back of dirty pages, against the DRAM model |
| `tb_nc_core` | one core running a short program, including a HOST result and a fired packet |
| `tb_nc_processor` | the full 36-core chip at its default size |

`tb_nc_processor` multicasts coefficients to group 1 and runs SIMD MACs on
core 121 with dual issue switched from off to on. Core 012 is marked faulty,
so packets detour around it. Results return to the host through bus 1, and
bus 2 does a round trip. The test checks every returned value. It fails if
any of these events never happened:

- a backpressure stall;
- the mode switch;
- a multicast;
- a detour;
- a page miss;
- dual issue;
- SIMD and SISD issue;
- a zero skip;
- a wake-up.

Building the full chip takes a few minutes; the run takes seconds.
