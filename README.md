# MPI coprocessor and router for small multiprocessor systems

A CPU that has to send data to another processor normally spends its own
cycles on it: packing messages, copying memory, polling a network. This
design moves that work into a **coprocessor** that sits on the CPU's system
bus next to main memory. The CPU hands over one-sided MPI operations with
ordinary store (MOV) instructions:

* **PUT-1** writes one word into another processor's memory.
* **PUT-n** copies up to 30 words from local memory into another processor's memory.
* **GET** fetches up to 30 words from another processor's memory.
* **REGISTER / DEREGISTER** make a local address globally known.
* **BARRIER** synchronises all processors.

The coprocessor does the rest on its own: address translation, packet building, memory transfers and barrier detection. Coprocessors are joined
by an N x N **router** with virtual output queues and a buffered crossbar.

The RTL is SystemVerilog and synthesizable, apart from the testbenches. It contains:

* the coprocessor, with its registration table built from a CAM;
* the router;
* a *coprocessor test module* (CTM), which replaces a real CPU with two FIFOs of MOVs and gives each node 512 words of dual-port main memory;
* a top level, `mpi_system`: four CTMs around a 4x4 router, controlled from a host bus (the LAD bus).

## Global addresses

A PUT or GET names memory on another processor, and one processor cannot know another's local addresses. Each processor therefore *registers* the variables it wants to expose. Registration stores the 32-bit local address in the lowest free slot of a 32-entry **registration table**. The slot number, extended to 8 bits, is the variable's **global address**.

Every program registers its shared variables in the same order, so the same global address refers to the same variable on every node. It can point to a different local address on each node.

Packets carry only global addresses, and translation happens twice:

* **Sending side: local to global.** The coprocessor searches for a 32-bit local address and needs the slot that holds it. This is a content-addressable lookup.
* **Receiving side: global to local.** The coprocessor reads the slot to recover the local address. This is an ordinary RAM read.

A PUT or GET also carries an 8-bit **offset**, which the receiver adds to the translated address, so one registration covers an array of up to 256 words.

### The CAM (`cam32x9`, `cam32x32`)

The CAM is built the way block-RAM CAMs are built on FPGAs:

* A 512 x 32 **match RAM** is addressed by the 9-bit data value.
* Bit *i* of row *v* is 1 when slot *i* holds the value *v*. A lookup is a single RAM read of row `data_match`, and the result (the match vector) is registered.
* A 32 x 9 **erase RAM** remembers what each slot holds.
* A write takes two cycles:
  1. **Erase:** clear bit *addr* in the row of the old value, read from the erase RAM, and store the new value in the erase RAM.
  2. **Write:** set bit *addr* in the row of the new value.

`cam32x32` places four 9-bit CAMs side by side, one per byte of the word, with the ninth bit tied to 0. It ANDs their match vectors, and a lowest-index encoder gives `match_addr`.

After reset the match RAM has no defined contents. It is cleared one row per cycle, 512 cycles in all, and `init_busy` (and `busy` of the registration table) stays high until this is done.

### Registration table (`reg_table`, `prio_enc`)

A 32-bit status register marks the occupied slots. `prio_enc` gives the lowest vacant slot, which is where the next registration goes.

| mode | operation | cycles | `busy` high |
|------|-----------|--------|-------------|
| 00 | none | 1 | 0 |
| 01 | RAM lookup (`rt_addr` → `rt_data_out`) and CAM lookup (`rt_data_in` → `rt_match_addr`) together | 1 | 0 |
| 10 | register `rt_data_in` at the lowest vacant slot | 2 | 1 |
| 11 | deregister: CAM lookup, erase, write of zero; the slot is freed | 3 | 2 |

CAM hits are masked with the status register. A freed slot holds zero, so without the mask a lookup of address 0 would find it.

A registration into a full table is refused (`reg_ok` = 0). A lookup that misses is counted in the coprocessor's `lookup_miss` register, and the packet then uses global address 0.

## Talking to the coprocessor

The coprocessor is a memory-mapped write-only device. A MOV to it has three parts:

* **Chip select:** `cs`.
* **Address bus:** bits A1:A0 (`a`) choose the target. Address bits 31:24 (`op`) carry the opcode.
* **Data bus:** carries the operand.

Each opcode therefore costs one MOV, with no separate "command register" write.

| `a` | effect |
|-----|--------|
| 00 | opcode → Inst FIFO, 32-bit data → Data FIFO, in the same cycle |
| 01 | data bits 7:0 → Data8 register; every third write pushes {dpid, length, offset} into the Data8 FIFO |

`ready` falls while the target FIFO is full and stalls the bus cycle.

Opcodes (`mpi_pkg::opcode_e`):

| opcode | instruction | Data FIFO operand | Data8 entry |
|--------|-------------|-------------------|-------------|
| 00 | NOP | – | – |
| 01 / 02 / 03 | BEGIN / END / ABORT | – | – |
| 04 / 05 | SET_PID / SET_NPROCS | value | – |
| 06 / 07 | REGISTER / DEREGISTER | local address | – |
| 08 | BARRIER | – | – |
| 10, 11 | PUT-1 part A, part B | destination address, data word | {dpid, 1, offset} |
| 12, 13 | PUT-n part A, part B | destination address, source address | {dpid, n, offset} |
| 14, 15 | GET part A, part B | destination (local) address, source (remote) address | {dpid, n, offset} |

A PUT or GET therefore takes five MOVs: two instruction words and three Data8 bytes.

**After BARRIER the CPU must issue nothing more until `barrier_done`.** The barrier waits for every queue of the coprocessor to drain, and that includes the Inst FIFO. An instruction queued behind BARRIER would keep the Inst FIFO non-empty, and the barrier would never complete.

## Packets

All links use the same bus: 32-bit `data`, `valid` and `full`. The `full` signal goes from receiver to sender. A word moves on a clock edge where `valid && !full`.

Header word (`mpi_pkg::pkt_hdr_t`):

| bits | 31:24 | 23:21 | 20:16 | 15:8 | 7:0 |
|------|-------|-------|-------|------|-----|
| field | dpid (destination processor) | type: 001 PUT-1, 010 PUT-n, 011 GET | packet length in words, header included | offset | global address |

* **PUT-1:** header + 1 data word, length 2.
* **PUT-n:** header + n data words (n ≤ 30, so at most 31 words).
* **GET:** two words, length 2. The global address in word 1 is the *source* on the remote node. Word 2 is {requester id, data length, 0, destination global address}.

The remote node answers a GET with an ordinary PUT-n.

## Inside the coprocessor

```
 CPU bus ─► cpu_if ─► Inst / Data / Data8 FIFOs ─► cop_pipeline ─► Head FIFO ─┐
                                                      │   ▲                    ├─► tx_ctrl ─► tx link
                                   reg_table ◄────────┤   │ PUT-n for a GET    │
                                                      ▼   │                    │
 main memory ◄─────── mmic (task FIFO) ─────────► Out FIFO ────────────────────┘
                         ▲
 rx link ─► In FIFO ─► pkt_ctrl (PUT: write task; GET: asks the pipeline for a PUT-n)
                barrier_ctrl watches every queue and engine
```

### Instruction engine (`cop_pipeline`)

The instruction engine has five stages:

* **F:** pop an opcode.
* **D:** decode it with a small ROM.
* **DF:** pop its operands from the Data and Data8 FIFOs.
* **EX1:** registration-table lookups, or a register/deregister, and loading a PUT-n's read task into the MMIC.
* **EX2:** write the header word(s), and PUT-1's data word, into the Head FIFO.

The stages of this implementation are **not overlapped**: each instruction word goes through F, D and DF on its own. A lone PUT-1 takes 10 cycles from the first fetch to its last Head FIFO word. A fully overlapped pipeline would take 6 cycles. See *Timing* below.

Between instructions, the engine accepts PUT-n requests from the packet controller, which are replies to received GETs. The engine has priority over the packet controller at the registration table and at the MMIC task FIFO.

### Main-memory interface controller (`mmic`)

The MMIC keeps the coprocessor's memory traffic in bursts and off the CPU's critical path. Its work arrives as tasks {direction, length, address} in a 16-entry FIFO:

* **Reads** (PUT-n source data, GET replies) go from memory into the Out FIFO.
* **Writes** (received PUTs) go from the In FIFO into memory.

The MMIC raises `mm_req` while it has work and moves one word per cycle while `mm_gnt` is high. The CPU side can withdraw `mm_gnt` at any moment. The MMIC then **suspends** in the middle of its task (`suspended`), and it resumes where it stopped when the grant returns.

A read is issued only when the Out FIFO has room for it and for the reads already in flight, so read data is never dropped.

### Packet controller (`pkt_ctrl`) and transmitter (`tx_ctrl`)

`pkt_ctrl` takes one packet at a time from the In FIFO.

* **PUT:** it translates the global address through the registration table, adds the offset, queues a write task of length−1 words, and waits for it to finish.
* **GET:** it translates both global addresses and hands the pipeline a PUT-n with these fields:
  * source: its local address plus the offset;
  * destination: the requester's global address;
  * length;
  * dpid: the requester's id.

`tx_ctrl` sends each Head FIFO header and then the packet's data:

* PUT-1 and GET take their second word from the Head FIFO.
* PUT-n takes its data from the Out FIFO, as the MMIC fills it.

### Barrier (`barrier_ctrl`)

A BARRIER instruction arms the controller and stops the fetch stage. `executed_barrier` is high while two things are true:

* every FIFO (Inst, Data, Data8, MMIC task, Head, Out and In) is empty;
* the pipeline, MMIC, packet controller and transmitter are idle.

When the system answers with `have_others_done`, the controller raises `barrier_done` until the CPU acknowledges it with `barrier_done_ack`. Fetching then resumes.

## The router

```
 link p ─► voq_port p: Input Memory (512) ─► VOQ controller ─► VOQ[0..N-1] (32) ─► scheduler ─┐
                    └─► Header FIFO ─► routing_table (shared, round robin) ─┘                  │
                                                                                              ▼
                     crossbar: crosspoint FIFO (i,j) of 32 words, round-robin arbiter per column
                                                                                              │
 link j ◄──────────────────────────────────── Output Memory j (32) ◄──────────────────────────┘
```

### Input ports (`voq_port`)

Each input port writes incoming packets into its **Input Memory**. It also copies the destination id and length of every header into a **Header FIFO**.

From the Header FIFO, the **VOQ controller** does two things:

* It asks the shared routing table for the output port of the next packet.
* It moves the right number of words from the Input Memory into the **virtual output queue** of that output.

One routed header is held ahead, so the lookup for the next packet overlaps the move of the current one.

The port's **scheduler** chooses round robin among the VOQs that are non-empty *and* whose crosspoint is not full. It then sends one whole packet.

### Routing table (`routing_table`)

The routing table is a 256-entry RAM indexed by dpid. After reset entry *d* holds *d* mod N, and `cfg_*` rewrites entries. An access controller shared by the ports grants one lookup per cycle, round robin.

### Crossbar (`crossbar`)

The crossbar is **buffered**: every crosspoint (i, j) is a FIFO. Input and output sides are therefore decoupled, and variable-length packets are switched whole, without segmentation and without a central scheduler.

For each output column, a round-robin arbiter picks a non-empty crosspoint and copies one complete packet out of it to that column's output. It uses the length in the header. It may start a packet before the whole packet has reached the crosspoint.

### Output memories and the router barrier

Each **Output Memory** drives the link to one coprocessor.

`router_barrier` is the AND of the idle flags of all input ports, the crossbar and the output memories. The system barrier is then:

```
system_barrier = AND of every node's executed_barrier AND router_barrier
```

The router flag is needed because a packet can still be inside the router at the moment every coprocessor looks drained.

## The test system

### Coprocessor test module (`ctm`)

A CTM is one node of a multiprocessor system, with the CPU replaced by FIFOs that the host loads:

* a coprocessor;
* a 512-word dual-port main memory, with port A on the coprocessor's CAD bus and port B on the host's LAD bus;
* an Address FIFO and a Data FIFO of 512 entries each, which hold the MOVs of the node's program;
* control logic that, while `sys_en` is high, pops one address/data pair per cycle and performs it as a MOV on the coprocessor. The opcode comes from address bits 31:24 and A1:A0 from bits 1:0.

The control logic also arbitrates the CAD bus. A MOV has priority, so a MOV arriving in the middle of an MMIC burst suspends the MMIC.

After a BARRIER MOV the control logic issues nothing until `barrier_done`, which it acknowledges immediately.

A 10-bit system counter runs from `sys_en` until the node's barrier completes.

A **debug memory** (`debug_mem`, 512 words) records, in order, every word that crosses the node's receive link. It stops when it is full, so it keeps the first 512 words. The host reads these words back, and reads the number of words recorded. In a loop-back test the receive link is the node's own transmit link. In the multi-node system, each packet is recorded once, at the node it was sent to.

LAD word addresses:

| address | register |
|---------|----------|
| 0x0050 | control register (`mpi_system`), bit 0 = global system enable |
| base + 0x100 | system counter (read) |
| base + 0x101 | number of words in the debug memory (read) |
| base + 0x200 … 0x3FF | main memory (read/write) |
| base + 0x400 | Address FIFO (write) |
| base + 0x600 | Data FIFO (write) |
| base + 0x800 … 0x9FF | debug memory (read) |

Node *k* of `mpi_system` has base *k* · 0x1000. A read returns its data on `lad_rdata` in the cycle after `lad_re`.

### Using the system

1. Write each node's source data into its memory.
2. Write each node's program into its Address and Data FIFOs, one pair per MOV:
   * the address word is `{opcode, 22'b0, A1:A0}`;
   * the data word is the operand.
3. Write 1 to 0x0050 and wait for `system_barrier` / `barrier_done`.
4. Read back memory and the counters.

`tb/tb_mpi_system.sv` shows a complete program.

## Parameters

All sizes are parameters. The defaults are the sizes of the reference implementation.

| module | parameter | default |
|--------|-----------|---------|
| `coprocessor` | `INST_DEPTH`, `DATA_DEPTH`, `DATA8_DEPTH` | 64 |
| | `HEAD_DEPTH` (Head FIFO), `TASK_DEPTH` (MMIC task FIFO) | 16 |
| | `IN_DEPTH`, `OUT_DEPTH` (In / Out FIFO) | 512 |
| `router` | `N` | 4 |
| | `IN_DEPTH` (Input Memory) | 512 |
| | `VOQ_DEPTH`, `XP_DEPTH` (crosspoint), `OUT_DEPTH` (Output Memory) | 32 |
| `voq_port` | `HDR_DEPTH` (Header FIFO) | 16 (own choice) |
| `ctm` | `MEM_WORDS`, `IF_DEPTH` | 512 |
| | `DBG_WORDS` (debug memory) | 512 (own choice) |
| | `CNT_W` | 10 |
| `mpi_system` | `N` | 4 (2 also builds) |

FIFO depths must be powers of two, 4 or more.

## Timing

The numbers below were measured in simulation at the default sizes, with no back-pressure. The last column gives the figures reported for the original FPGA implementation, where they exist.

| what | this RTL | original design |
|------|----------|-----------------|
| BARRIER alone, coprocessor write → `barrier_done` (loop-back, `tb_coprocessor`) | 8 cycles | 8 cycles to barrier |
| BARRIER alone, CTM system counter (`tb_ctm`) | 11 | – |
| PUT-1 in the pipeline, first fetch → last Head FIFO word (`tb_cop_pipeline`) | 10 | 6 (flow graph) |
| PUT-1 in loop-back, last CPU write → received (`tb_coprocessor`) | 23 | – |
| router, input word → output valid, idle router (`tb_router`) | 13 | – |
| crossbar alone, input → output valid (`tb_crossbar`) | 2 | – |
| 4x4 total exchange of 60 words per pair, plus PUT-1, GET-8 and 100 NOPs per node (`tb_mpi_system`) | 874 to system barrier | – |

`tb_mpi_timing` repeats the original two-node measurement on `mpi_system` with N = 2. Node 0 runs one instruction and then BARRIER, while node 1 runs only BARRIER. The time is counted from the instruction's first MOV to the barrier:

| instruction | this RTL | original design |
|-------------|----------|-----------------|
| Barrier | 10 | 8 |
| Registration | 16 | 10 |
| Deregistration | 17 | 11 |
| PUT-n, n = 1 … 30 | 43 + n | 31 … 59 (≈ 29 + n beyond n = 2) |
| GET-n, n = 1 … 30 | 73 + n | 44 … 73 |
| PUT-8 / GET-8 | 51 / 81 | 38 / 52 |

The cost per word is one cycle, as in the original. The fixed cost is higher, by about 13 cycles for a PUT and 30 for a GET. A GET pays it twice: once for the request, and once for the reply PUT-n built by the remote node's pipeline. The extra cycles come from running the pipeline stages one after another.

## Departures from the original design and open points

* **Pipeline.** The five stages exist but are not overlapped, which costs about 4 cycles per PUT/GET (see *Timing*). This is the main functional difference.
* **One clock.** Every FIFO is a true dual-clock FIFO with Gray-coded pointers, but inside a coprocessor and a router everything runs on one clock.
* **Choices where the original is silent or unreadable:**
  * opcode values and the A1:A0 codes;
  * the direction bit of MMIC tasks;
  * the Header FIFO depth of the router;
  * reset contents and configuration port of the routing table;
  * the MOV-first CAD-bus arbitration;
  * the idle flags of the output memories being part of `router_barrier`;
  * the clearing of the CAM after reset.
* **Crosspoint address.** The crosspoint column travels with every word (`xb_sel`) rather than being sent once ahead of the packet.
* **Deregistration while traffic is in flight.** Deregistering a variable while a packet addressed to it is still in flight makes that packet use the zeroed slot, i.e. local address 0 plus offset. Programs should deregister only after a barrier.
* **Debug memory.** The original test systems placed a block RAM on a link at LAD address 0x800, and described it only by name. Here, each node's memory watches its receive link. It keeps the first 512 words, and its word count at base + 0x101 is an addition.
* **Eight-node system not built.** Only a single-level router is built. A two-level eight-node system would need a top of its own. A flat eight-node system with one 8x8 router is a parameter change (`N = 8`). It builds, but it has not been simulated.
* **Memory limits the total exchange.** With 512 words of main memory per node and separate buffers, a total exchange fits up to H = 170 words per pair on two nodes and H = 102 on four. The original exchange sizes up to 1024 words need larger memories or reused buffers.

## Simulation

Every block has a self-checking testbench in `tb/`. Each prints `TB_RESULT checks=… failures=…` and has a watchdog. With Verilator 5:

```
verilator --binary --timing -Irtl -Itb rtl/mpi_pkg.sv tb/tb_router.sv -y rtl -y tb --top-module tb_router -o sim
./obj_dir/sim
```

| testbench | what it exercises |
|-----------|-------------------|
| `tb_async_fifo` | random push/pop, full/empty, level, idle |
| `tb_cam32x9`, `tb_cam32x32` | writes, overwrites, lookups, lowest match, one-byte-different misses, RAM reads |
| `tb_prio_enc` | lowest zero of random and edge-case status words |
| `tb_reg_table` | register / lookup / deregister against a model, busy lengths 1 and 2, full table |
| `tb_cpu_if` | MOV decoding, Data8 grouping, stalls |
| `tb_cop_pipeline` | every instruction with a real registration table, header words, MMIC tasks, injected PUT-n, barrier hold-off, PUT-1 cycle count |
| `tb_mmic` | random tasks, random grant withdrawal (suspend/resume), Out FIFO back-pressure |
| `tb_pkt_ctrl`, `tb_tx_ctrl`, `tb_barrier_ctrl` | packet handling, framing, barrier handshake |
| `tb_coprocessor` | loop-back with random link stalls and memory-grant denial; PUT-1, PUT-n, GET, lookup miss, two barriers, latencies |
| `tb_rr_arbiter`, `tb_routing_table` | grant rules and fairness, table contents, configuration |
| `tb_voq_port`, `tb_crossbar`, `tb_router` | random packet traffic with random back-pressure; packets whole, in order, on the right output; barrier flag; latencies |
| `tb_debug_mem` | recording under random back-pressure, saturation and overflow, read-back |
| `tb_ctm` | a CTM in loop-back driven over the LAD bus: memory map, MOV/MMIC arbitration, counter stop, debug memory against the link |
| `tb_mpi_timing` | the original single-instruction and PUT-n / GET-n timing runs on a two-node system; prints both sets of numbers |
| `tb_mpi_system` | the whole four-node system at default sizes: total exchange, PUT-1, GET, registration, barrier; counts MMIC suspensions, GET replies, PUTs, packets, barriers and MOV stalls |

The simulator is two-state. Everything read after reset is reset, except the CAM match RAM, which is cleared by its start-up sequence.
