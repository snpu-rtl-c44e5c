# sNPU: a secure multi-core NPU with in-NPU isolation

A neural processing unit (NPU) integrated in a phone or car SoC often runs a
secret model (face recognition, a licensed network) next to ordinary tasks.
A CPU-side trusted execution environment protects DRAM. It does not protect
what lives *inside* the NPU: the scratchpad SRAMs, the on-chip network (NoC)
between NPU cores, or the NPU's DMA reach into memory. This RTL adds three
hardware mechanisms so that secure and normal tasks can share one multi-core
NPU at the same time, at essentially no runtime cost:

1. **NPU Guarder.** A tiny per-core translation and permission unit in front
   of the DMA engine. It checks every DMA request once, not every memory
   packet.
2. **ID-tagged scratchpads.** Each 128-bit scratchpad wordline carries one ID
   bit (secure or normal). Per-line rules replace static partitioning.
3. **Peephole NoC.** Every core-to-core transfer first sends a one-flit
   authentication request carrying the sender's ID state. The receiver
   either accepts it and locks onto that sender, or refuses it. Only then
   does the data move.

Everything hinges on one bit per NPU core, its **ID state** (1 = secure,
0 = normal). Only the secure world of the CPU can set it. Every scratchpad
access, DMA request and NoC packet carries the ID state of the core that
issued it.

The synthesizable RTL covers the security shell of each core, the mesh NoC,
and the shared scratchpad. The matrix (systolic) unit, the CPUs, DRAM/L2 and
the trusted software are not included; see [Not included](#not-included).

## Structure

```
snpu_top                    10 cores on a 5 x 2 mesh + shared scratchpad
├── snpu_core  (x10)
│   ├── secure_controller   CPU commands; owns the ID state; secure clears
│   ├── npu_guarder         3 translation + 2 checking registers
│   ├── dma_engine          64-byte memory packets  <-> scratchpad lines
│   ├── spad_arbiter        5 requesters -> 1 scratchpad port
│   ├── spad_bank           local scratchpad, 16384 x 128 bit + ID bit
│   └── router_controller
│       ├── noc_send_engine     peephole sender
│       ├── noc_recv_engine     peephole receiver (with receive lock)
│       └── noc_router          5-port XY wormhole router
└── global_spad             round-robin arbiter + spad_bank (shared rules)
```

`snpu_pkg` holds the shared types: scratchpad request/response, DMA request,
command, flit, status enums.

Each core's scratchpad port is shared, in fixed priority, by:

1. secure clears;
2. NoC receive;
3. NoC send;
4. DMA;
5. the compute port `ext_*`, which stands in for the matrix unit.

A scratchpad address with bit 15 set goes to the global scratchpad instead
of the local one.

## ID state and the secure controller

`secure_controller` is the only way to change a core's secure context. A
command (`cmd_t`) has these fields:

- `op`;
- `secure`, which tells whether the secure world of the CPU issued it;
- a register index, an enable, an authority (`r`, `w`);
- three 32-bit arguments.

| op             | effect                                          | who may issue it |
|----------------|-------------------------------------------------|------------------|
| `CMD_SET_ID`   | core ID state := `a0[0]`                         | secure world only |
| `CMD_SET_CHK`  | checking register `idx` := {en, base a0, size a1, perm} | secure world only |
| `CMD_SET_XLAT` | translation register `idx` := {en, va a0, pa a1, size a2} | secure world, or normal world while the core is normal |
| `CMD_SPAD_CLR` | lines a0 .. a0+a1-1: data := 0, ID := normal     | secure world only |

A refused command changes nothing. It completes with `cmd_err = 1`.
Register commands complete one cycle after acceptance. A clear takes one
cycle per line.

The ID state resets to normal. Letting the normal world program a normal
core's translation is this design's reading. Translation registers change
often, tile by tile, before a computation. Checking registers change
rarely, and they bound what any mapping can reach. So the untrusted driver
can remap a normal core's tiles, but only inside regions the secure world
has granted. A secure core's mapping stays in secure hands. After reset no
checking register is enabled, so no core can reach memory until the secure
world grants a region.

## NPU Guarder: one check per DMA request

A DMA request gives four fields:

- a virtual address;
- a length in 64-byte packets;
- a direction (load or store);
- a first scratchpad line.

The guarder checks it in one cycle:

1. **Translation.** The whole range `[va, va + 64*npkt)` must lie inside one
   enabled translation register. It is then moved by that register's
   `pa - va`. Otherwise the request fails with `DMA_XLAT_FAULT`.
2. **Checking.** The physical range must lie inside one enabled checking
   register whose authority allows the access: `r` for a load, `w` for a
   store. Otherwise the request fails with `DMA_PERM_FAULT`.

Nothing passes until registers cover it. The default is deny.

The DMA engine then splits the request into packets, and those are not
checked again. An IOMMU would look up every packet. The guarder counts its
checks (`n_checks`) and the DMA engine counts packets (`n_packets`), so the
saving can be seen directly. A 512-line load is 128 packets and one check.

The numbers of registers (three translation, two checking) are the defaults
`NUM_XLAT` and `NUM_CHK`. The idea is coarse checking registers for a
pre-allocated secure memory region, and translation registers for one
tile's input and output buffers. Overlaps are resolved lowest index first.

DMA packet layout: packet k covers bytes `addr + 64k ..` and scratchpad
lines `spad_addr + 4k .. + 3`. Line j is bits `[128j +: 128]` of the
512-bit memory word. Every scratchpad access made by the DMA engine carries
the core's ID state. A store that reads a line of the other domain sends
zeros and ends with `DMA_SPAD_DENY`.

## ID-tagged scratchpads

`spad_bank` has one rule set for a core's own scratchpad and another for
the scratchpad all cores share (parameter `SHARED`).

**Local (exclusive) scratchpad.** Only its own core uses it, one domain at
a time.
- A write always succeeds and stamps the line with the writer's ID. So a
  newly secure core can simply overwrite leftovers.
- A read succeeds only if the line's ID equals the reader's ID. Otherwise
  the response is `denied = 1` with zero data.

So a core that is switched from secure to normal cannot read what it left
behind. The secure world wipes those lines with `CMD_SPAD_CLR` before
handing the core on.

**Global (shared) scratchpad.** Several cores use it at once.
- A normal core may neither read nor write a secure line. The access is
  denied and nothing changes.
- A secure core may read or write any line, and the line becomes secure
  either way. So data a normal task shared with a secure task is pulled into
  the secure domain the moment the secure task touches it.

**Both.** A clear (`clr`) is honoured only from a secure requester. It
returns the line to normal with zero data.

The cost is one bit per 128-bit line. No partition registers are needed, so
any split of the scratchpad between tasks works. Every access is accepted at
once and answered one cycle later, writes and clears included, so a writer
learns about a refused write. The SRAM arrays are not reset.

## Peephole NoC

### Packets and routers

A flit is 162 bits: `head`, `tail`, `kind`, destination and source
coordinates, the sender's ID bit, a length and 128 data bits. There are
five kinds:

- `FK_AUTH_REQ`: authentication request, a one-flit packet;
- `FK_AUTH_ACK`, `FK_NACK_DENY`, `FK_NACK_BUSY`: answers, one flit each;
- `FK_DATA`: one flit per scratchpad line, head on the first, tail on the
  last.

`noc_router` has five ports (local, north = y+1, east = x+1, south, west).
It uses:

- a 2-flit buffer per input;
- XY routing on the absolute destination;
- wormhole switching, so an output stays locked to one input from head to
  tail;
- round-robin arbitration between heads.

A hop takes one cycle, and each port moves one flit per cycle.

### Send engine

`noc_send_engine` has four states: IDLE, PEEPHOLE, WAIT_SPAD, SEND_DATA.

```
IDLE --send cmd--> PEEPHOLE: inject AUTH_REQ {my ID, my x/y, length}
PEEPHOLE --ACK from dst--> WAIT_SPAD: read lines from scratchpad
PEEPHOLE --NACK_DENY / NACK_BUSY--> IDLE (done: DENIED / BUSY)
WAIT_SPAD --first line ready--> SEND_DATA: stream lines, 1 flit/cycle
SEND_DATA --tail sent--> IDLE (done: DONE, or SPAD_DENY if a line was refused)
```

Authentication happens once per transfer, not once per flit. Only answers
whose source is the current destination are taken; that is the send lock.

### Receive engine

`noc_recv_engine` has four states: IDLE, PEEPHOLE, RECEIVE_DATA,
SPAD_COMPLETE.

```
IDLE --armed by own core (line address, max length)--> PEEPHOLE
PEEPHOLE --AUTH_REQ, same ID, length fits--> ACK, lock on sender --> RECEIVE_DATA
PEEPHOLE --AUTH_REQ, ID differs or too long--> NACK_DENY, stay
RECEIVE_DATA --data from locked sender--> write next line (own ID)
RECEIVE_DATA --tail--> SPAD_COMPLETE --last write answered--> IDLE (done)
```

A request that arrives in any state other than PEEPHOLE gets `NACK_BUSY`.
That covers a receiver that is not armed and one already locked to another
sender. Data flits from a sender other than the locked one are dropped and
counted (`n_dropped`).

Received lines are written with the receiver's own ID. So data can enter a
secure core's scratchpad only from another core in the same domain, and only
into the lines that core armed.

### Deadlock freedom

XY routing with wormhole switching has no cyclic channel dependency. The
only other coupling is that the receive engine must inject answers in order
to accept requests. Its answer queue (`RSP_DEPTH`, 16 by default) holds at
least one answer per core in the system. Each sender has at most one
outstanding request, so ejection never waits on injection.

`router_controller` steers the core's local router port:

- Ejected ACK and NACK flits go to the send engine, which always takes
  them.
- All other ejected flits go to the receive engine.
- On injection, answers go ahead of send traffic, except in the middle of a
  data packet.

### Cost

With the peephole, a transfer costs one line per cycle plus a fixed set-up.
The set-up is one request/answer round trip plus the scratchpad read
latency. `tb_noc_microtest` measures this on the full-size system, one hop
apart. It compares against moving the same lines through shared memory
(DMA store by the sender, then DMA load by the receiver), with a memory that
answers in three cycles:

| lines | peephole NoC (cycles) | through memory (cycles) | ratio |
|------:|----------------------:|------------------------:|------:|
| 16    | 25    | 71    | 2.8 |
| 64    | 73    | 256   | 3.5 |
| 256   | 265   | 1007  | 3.8 |
| 512   | 521   | 2011  | 3.9 |

## Top level

`snpu_top` places core c at (c % MESH_X, c / MESH_X) and wires each link to
the facing port of the neighbour. Links at the mesh edge are tied off. All
per-core ports are unpacked arrays `[MESH_X*MESH_Y]`:

| group    | purpose |
|----------|---------|
| `cmd_*`  | secure-controller commands (from the CPU side) |
| `dma_*`  | DMA requests and completion status |
| `send_*`, `recv_*` | start a NoC send; arm the receiver; completions |
| `ext_*`  | compute-unit scratchpad port (ID forced to the core's, no clear) |
| `mem_*`  | system-memory port of the DMA engine (64-byte packets) |
| `n_*`    | event counters (checks, packets, authentications, refusals, drops) |

Default parameters:

| parameter | default | meaning |
|-----------|---------|---------|
| `MESH_X`, `MESH_Y` | 5, 2 | 10 cores |
| `LOCAL_LINES` | 16384 | 256 KB local scratchpad per core |
| `GLOBAL_LINES` | 4096 | 64 KB shared scratchpad |
| `NUM_XLAT`, `NUM_CHK` | 3, 2 | guarder registers per core |

The core count and the 256 KB per core match the evaluated system, which
had a 16x16 systolic array per tile, 10 tiles, a 2 MB L2 and a 1 GHz clock.
The 5 x 2 arrangement and the global scratchpad size are this design's
choices.

All handshakes are valid/ready: a transfer happens on a rising clock edge
where both are high. Scratchpad ports answer exactly one cycle after
acceptance. Reset is asynchronous and active low.

## Simulating

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. Run one with plain
Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/snpu_pkg.sv tb/tb_snpu_top.sv \
          --top-module tb_snpu_top -Mdir obj -o sim
./obj/sim
```

| testbench | what it establishes |
|-----------|---------------------|
| `tb_spad_bank` | both rule sets against a reference model, random traffic |
| `tb_spad_arbiter` | responses reach the right requester; priority; rotation |
| `tb_global_spad` | shared rules through the arbiter; three ports at once |
| `tb_npu_guarder` | translation, containment, authority, default deny; random |
| `tb_secure_controller` | who may issue what; clear walks the range |
| `tb_dma_engine` | packet split, line order, faults, back-pressure |
| `tb_noc_router` | random packets through a mid-mesh router: XY port choice, wormhole contiguity, order |
| `tb_noc_send_engine` | peephole sequence, NACK handling, one flit per cycle |
| `tb_noc_recv_engine` | deny, busy, lock, drops, ordered writes |
| `tb_router_controller` | two cores: transfers both ways at once, deny, busy |
| `tb_snpu_core` | a core's whole secure life cycle, NoC loopback |
| `tb_snpu_top` | full-size system, no parameter overrides (see below) |
| `tb_noc_microtest` | full-size system: peephole transfer against the memory path, 16 to 512 lines |

`tb_snpu_top` exercises the following mechanisms, and fails if any one of
them never happens:

- a refused normal-world command;
- guarder pass, translation fault and permission fault;
- a local-scratchpad read denial;
- the shared-line takeover;
- a secure clear;
- a multi-hop authenticated transfer between opposite corners;
- peephole deny and busy;
- three concurrent transfers.

It also runs the 16 to 512-line transfer sweep. It simulates in well under
a minute.

`tb/sys_mem_model.sv` is a behavioural memory. It has random back-pressure,
and a packet that was never written reads back as a pattern derived from its
address.

## Not included

- **Matrix unit and accumulator scratchpad.** The systolic array is an
  existing design. Its scratchpad traffic enters through `ext_*`. An ID-bit
  accumulator would be a `spad_bank` with `LINE_W = 512`.
- **CPUs, DRAM, L2, IOMMU.** These are represented by the `cmd_*` and
  `mem_*` ports.
- **Trusted software.** Context setting, allocation checks, code
  measurement and loading run on the secure CPU. So does the *route
  integrity* check, which confirms that the cores a secure task was given
  form the mesh shape the task expects. The hardware supplies the
  primitives they use.

## Choices made in this RTL

The protection rules above are the design's. The following are this RTL's
own choices, and are the places to look when adapting it:

- A normal-to-secure NoC request is refused as well as secure-to-normal:
  the IDs must be equal.
- NACK is split into DENY and BUSY, and the receiver must be armed with a
  length limit.
- Flits carry absolute coordinates. Routing is XY, with 2-flit buffers and
  one line per flit.
- A clear zeroes the data as well as the ID bit.
- A secure write to a shared line also makes it secure.
- The guarder requires whole-range containment and resolves overlaps lowest
  index first.
- Command encoding, address widths (32-bit memory, 16-bit scratchpad with
  bit 15 selecting global) and the in-core arbitration order are this RTL's
  own.
