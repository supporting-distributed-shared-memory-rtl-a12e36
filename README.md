# A dual microcoded DSM controller for a mesh multi-core

In a multi-core chip where every core has its own local memory, a program is
easier to write if all the local memories together look like one shared
address space. This design provides that in hardware: each node of a mesh
network-on-chip gets a small programmable controller, the **Dual Microcoded
Controller (DMC)**. It sits between the node's core, its local memory and its
router. The DMC:

- translates shared (logical) addresses into a node number and a physical address;
- serves the access itself when the data is local;
- otherwise sends a request over the network to the owner node, whose DMC serves it;
- implements a test-and-set lock with load-linked / store-conditional.

The DSM functions are microcode, not fixed logic. Each DMC has two small
pipelined **mini-processors**:

- **A** runs commands from the local core;
- **B** runs requests that arrive from other nodes.

So one node can serve its own core and a remote core at the same time. The
microcode lives in the node's local memory. It is copied into an on-chip
**Control Store** the first time a command needs it.

The RTL in `rtl/` is synthesizable SystemVerilog. The default system is a
4 x 4 mesh (16 nodes). The processor cores are not part of the RTL: each
node's core interface is a port of the top module (`dsm_noc`), so a
testbench (or a real core adapter) drives the commands.

## System view

```
  node (x,y), number y*MESH_X + x
  ┌───────────────────────────────────────────────┐
  │ core port ──► dmc ◄──► router ◄──► N/E/S/W    │
  │                │ port A   │ port B            │
  │                └─► Local Memory (dual port)   │
  └───────────────────────────────────────────────┘
```

Each node has:

- a `dmc`;
- a dual-port `dp_ram` as its Local Memory (16K x 32 bit by default);
- a five-port `noc_router`.

The routers form a mesh with XY routing. A message moves one hop per cycle
when nothing else contends for the link.

### Address spaces

The core has two kinds of access.

- **Private:** a physical byte address into its own Local Memory. The DMC
  performs private reads and writes directly, with no microcode.
- **Shared:** a logical byte address at or above `BADDR` (default
  `0x8000_0000`). Logical space is divided into 1 KiB pages.

A per-node **V2P table** at word address `V2P_HADDR` (default `0x800`) holds
4 words per page:

- word 0: the frame number in the owner's memory;
- word 3: the owner node.

The translation is:

```
page    = (laddr - BADDR) >> 10
offset  = (laddr - BADDR) & 0x3FF
paddr   = frame << 10 | offset        (byte address in the owner's Local Memory)
```

The V2P table and the microprogram are ordinary data in Local Memory. They
must be written there (with private writes) before the first shared
access. The microprogram sits at word `UCODE_BASE = 0x1000`, 128 words per
slot.

### Core commands and answers

A command (`core_cmd_t`) contains:

- its kind: private read, private write or shared;
- a microcode number (the slot), used by shared commands;
- a byte address;
- a word count n (1..8);
- up to 8 data words.

Commands use a valid/ready handshake. Every command gets exactly one answer
(`core_resp_t`), in order, as a one-cycle `core_resp_valid` pulse. The
answer carries an end code (1 = done), the number of words and the words.

## Inside the DMC

```
 core ─► CICU ──► mini-processor A ◄─► Register File A
          │  \        │ port A
          │   Control Store (4 banks, dual port) ◄── uploads
          │  /        │ port B
 net ◄─► NICU ──► mini-processor B ◄─► Register File B
        A and B ◄─► Synchronization Supporter (ll/sc)
        A, CICU: Local Memory port A;  B, NICU: Local Memory port B
```

### CICU (core interface)

The CICU holds a 4-deep command queue and works on one command at a time.

- **Private commands:** it reads or writes Local Memory through port A, one
  word per cycle.
- **Shared commands:**
  1. It checks that two slots are resident in the Control Store: slot 0
     (translation) and the command's own slot. It uploads any that are
     missing (128 words each, one word per cycle).
  2. It starts mini-processor A at slot 0.
  3. It collects the words A produces.
- **End code from A:**
  - **1**: answer the core.
  - **2** (lock busy): the command goes back to the tail of the queue, and
    the core is not answered yet.
  - **3** (request sent to another node): wait for the reply that the NICU
    forwards, then answer the core with it. A reply that arrives before A
    has finished is kept.

### NICU (network interface)

The NICU holds a request queue with one place per node, so a request is
never refused for lack of room. For each request it:

1. uploads slot 1 (remote entry) and the target slot if needed;
2. starts mini-processor B;
3. returns a reply message with B's words to the requester.

End code 2 requeues the request, which makes the owner poll a busy lock
locally. The NICU also:

- sends mini-processor A's requests;
- forwards incoming replies to the CICU;
- alternates between its two output sources when both are waiting.

### Control Store

The Control Store is four 1024 x 32 dual-port banks. One microinstruction is
the same address in all four banks, i.e. 128 bits, read in one cycle.

- Port A serves A and the CICU; port B serves B and the NICU.
- An upload writes one bank word per cycle.
- The store is divided into 32 slots of 32 microinstructions.
- A resident bit per slot records what has been uploaded. Nothing is ever
  evicted.

### Local Memory ports

While a mini-processor runs, it owns its Local Memory port. Otherwise the
interface unit on that side uses the port.

## Microinstructions

The format is horizontal: one 32-bit field per function unit. All four
units can act in the same microinstruction. Operands name either a register
A0..A7 (selector 0..7) or a value from the command or the node:

| selector | value |
|---|---|
| 8 `LADDR` | command address |
| 9 `DATA` | next command data word |
| 10 `BADDR` | shared-space base |
| 11 `V2P` | V2P table address |
| 12 `SNODE` | this node |
| 13 `START` | target microcode address |
| 14 `ZERO` | 0 |
| 15 `NB` | word count |
| 16 `ONE` | 1 |
| 31 `IMM` | the field's immediate |

The four fields:

| bank | unit | operations |
|---|---|---|
| 0 | Adder (AU) | `add`, `sub`, `set`; `pfe` splits an address into V2P index and offset (two results); `pfm` joins frame and offset |
| 1 | Load/Store (LSU) | `lw` (to a register or to the result stream), `sw`, `lfrw` (V2P table word), `ll`, `sc` |
| 2 | Condition (CU) | `beq ra, sel`, `bneqz ra`, `jmp` (immediate or selector), `end code` |
| 3 | Message Passing (MPU) | `mp dst, qos, paddr, DATA`: send a request carrying the command to another node |

Bit positions are in `rtl/dmc_pkg.sv`. The builder functions
`f_au/f_lsu/f_cu/f_mpu` assemble fields.

### Pipeline

The mini-processor is a five-stage pipeline:

| stage | work |
|---|---|
| IF | Control Store read |
| ID | decode, operand read with forwarding, branch and `end` decision |
| EX | adder |
| MEM | Local Memory, ll/sc check, message out |
| WB | register write, loaded word to the result stream |

The pipeline has no interlocks. The microcode must obey these rules:

- Adder results can be used by the next microinstruction (forwarded from EX
  and MEM).
- A loaded value can be used three microinstructions later.
- Branches have one delay slot, which is executed.
- The microinstruction fetched after `end` is discarded.

The first microinstruction reaches ID 2 cycles after start. `done` is
raised when `end` reaches WB, so a program that issues N microinstructions
takes N + 4 cycles. A failed `sc` forces end code 2, whatever the `end`
says.

## The microprogram

The testbench package `tb/dmc_ucode_pkg.sv` is the reference microprogram.
It builds the Local Memory image from the field builders.

| slot | microcode | length |
|---|---|---|
| 0 | translation and dispatch | 18 |
| 1 | remote entry | 2 |
| 2 | burst load of n words | 4 |
| 3 | burst store | 4 |
| 4 | test-and-set | 11 |
| 5 | release | 3 |
| 6 | single load | 3 |
| 7 | single store | 3 |

**Slot 0 (translation and dispatch):**

1. `pfe` on `LADDR - BADDR`, two `lfrw` reads of the V2P entry, then `pfm`.
   This is 11 microinstructions.
2. Compare the owner node with `SNODE`.
3. If the owner is this node: `jmp START` to the target slot, with the
   physical address in A6.
4. Otherwise: `mp` to the owner, then `end 3`.

**Slot 1 (remote entry):** B starts here. It copies the physical address of
the request into A6 and jumps to the target slot. The memory microcodes
therefore run unchanged on either processor.

**Burst loops:** they use the branch delay slot for the access, so each word
costs two cycles.

**Test-and-set:**

1. `ll` reads the lock.
2. If it is free, `sc 1` and `end 1`.
3. If it is held, `sc` of the old value and `end 2`, so the command is
   retried later from the queue.

## Synchronization Supporter

Both processors can touch the same lock in the same cycle, one from each
memory port. Each processor keeps one ll reservation (an address). The rules:

- `sc` succeeds only if the processor's reservation is still there.
- Any `sc` ends the processor's own reservation.
- Any write by the other processor to that word cancels the reservation.
- An `ll` that meets a write by the other processor in the same cycle gets
  no reservation.
- If both processors write the same word in one cycle:
  - an `sc` loses to a plain store;
  - between two `sc`, A wins.

## Network

Messages are one flit (325 bits). A flit carries:

- the message type (request or reply);
- source and destination nodes;
- a 2-bit QoS value, carried but unused;
- the target microcode address;
- the physical address;
- the count;
- the end code;
- 8 data words.

**Router:**

- Each input port has a 2-deep FIFO.
- Routing is XY: first along X, then along Y.
- Each output port picks among the inputs round robin.
- The choice of input never depends on the downstream ready signal, so the
  ready path has no loop through the message path.

**Deadlock avoidance:** only the core side issues requests, and each core
has at most one request outstanding. A request queue with a place for every
node therefore never back-pressures the network.

## Timing

Cycles are counted from the mini-processor start to `done`, with the
microcode already resident. The reference figures come from the published
design.

| operation | this RTL | reference |
|---|---|---|
| translation part | 11 microinstructions + 2 fill | 13 |
| local single load | 22 | 20 |
| local burst load, 8 words | 37 | 37 |
| local test-and-set | 27 | 25 |
| burst body, n words | 2n + 2 | 2n + 4 |

Interface overheads add to these:

- queueing;
- a 1-cycle start;
- the upload, 2 x 128 cycles the first time a command is used;
- on the core side, the answer.

A remote access adds the network hops and the owner's run of B.

## Where this design departs from the published one, or fills gaps

- **Microinstruction encoding:** the encoding, the operand selectors, the
  slot layout and the microcode itself are this design's own. The published
  design names the operations but not their bits.
- **Writes are acknowledged:** every remote request, writes included, gets
  a reply. The core's answer to a remote store therefore arrives after the
  round trip. The published latency model counts no reply for writes.
- **Burst loop timing:** the loop takes 2n + 2 cycles instead of 2n + 4, and
  a single local load takes 2 cycles more.
- **Sizes:** queue depths (4 core-side; one place per node network-side),
  router FIFO depth, the flit format, the Local Memory size (16K words),
  `BADDR`, `V2P_HADDR` and `UCODE_BASE` are choices. The Control Store size
  (4 x 1024 x 32) and the 4 x 4 mesh follow the published system.
- **What is not built:**
  - The processor cores and the local bus. The core interface is a plain
    command port.
  - QoS. It is carried in messages but not used.
- **No eviction:** the Control Store never evicts. All 32 slots fit at once.

## Files

| file | content |
|---|---|
| `rtl/dmc_pkg.sv` | sizes, message and command structs, microinstruction fields |
| `rtl/dsm_noc.sv` | top: mesh of nodes |
| `rtl/dmc.sv` | controller of one node |
| `rtl/cicu.sv`, `rtl/nicu.sv` | core and network interface units |
| `rtl/mini_processor.sv` | five-stage microcoded processor |
| `rtl/control_store.sv`, `rtl/regfile.sv`, `rtl/sync_supporter.sv` | Control Store, register file, ll/sc logic |
| `rtl/dp_ram.sv`, `rtl/sync_fifo.sv` | dual-port RAM, FIFO |
| `rtl/noc_router.sv` | mesh router |
| `tb/dmc_ucode_pkg.sv` | reference microprogram |
| `tb/tb_*.sv` | one self-checking testbench per module; `tb_dsm_noc` runs the whole 4 x 4 system |

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops. Build
and run one with Verilator 5, from the project directory:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/dmc_pkg.sv tb/dmc_ucode_pkg.sv -y rtl -y tb \
  tb/tb_dsm_noc.sv --top-module tb_dsm_noc -Mdir obj
./obj/Vtb_dsm_noc
```

### What the system test does

`tb_dsm_noc` runs with every parameter at its default. Every core:

1. loads the microprogram and the V2P table with private writes;
2. stores and loads bursts of 1..8 words to a page of every node, checked
   against a model of the shared space;
3. then all 16 cores fight for one lock in node 0, twice, while the test
   checks that at most one core holds it.

The test counts each mechanism, and fails if one never happened:

- private access;
- local shared access;
- remote shared access;
- uploads by both interface units;
- lock retries in both interface units.

It runs in well under a second.

### Workloads on an 8 x 8 mesh

`tb_workloads` builds a 64-node mesh and runs the synthetic workloads. It
makes all microcode resident first. The read workloads are:

- **uniform:** every node reads every other node in turn;
- **hotspot:** all nodes read node (0,0).

Each read workload runs at burst lengths 1, 2, 4, 6 and 8. Every word is
checked. The synchronization workloads are test-and-set plus release, in
four combinations: uniform or hotspot, with one lock per requester or one
shared lock.

The testbench prints average latencies. With the current RTL:

| workload | average latency (cycles) |
|---|---|
| uniform read, 1 word | 46.8 |
| uniform read, 8 words | 61.8 |
| hotspot read, 1 word | 446 |
| hotspot read, 8 words | 926 |
| uniform lock | 47.9 |
| hotspot, different locks | 599 |
| hotspot, same lock | about 22,500, with about 2,100 retries at the owner |

The test also checks the expected trends:

- latency grows with burst length;
- hotspot is slower than uniform;
- one hot lock is by far the slowest case.

The published uniform single-read figure for this mesh size is 48.5 cycles.

### Changing the microprogram

Edit `tb/dmc_ucode_pkg.sv`. Keep the pipeline rules above: loads are used
three microinstructions later, and each branch has one delay slot.
