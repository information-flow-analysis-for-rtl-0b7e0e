# A two-world (TrustZone-style) dual-core system in SystemVerilog

This is a small multicore system in which every memory transaction says which
security world it belongs to. Software runs either in the **secure world** or
in the **normal world**. The hardware keeps the two apart everywhere data can
travel: in the cores, in the caches, in the on-chip network, in the DMA
engine, at the debug port and in front of main memory. The normal world must
never read secure data or change secure state. The secure world may use
everything.

The mechanism is a single bit carried with every request and response, the
**NS-bit**. In this design **NS = 1 means secure and NS = 0 means normal**, so
a larger NS-bit is a higher privilege. Every checkpoint applies one rule:
*a request may touch a resource whose level is at or below its own NS-bit*.

The system is built to study hardware information flow: a compact but complete
design, with two cores, a shared cache, a network, a DMA engine and memory
protection. Each of these places needs its own security check.

## Structure

```
            core 0 (starts normal)              core 1 (starts secure)
            tz_core                              tz_core
           /        \                           /        \
       L1 I$        L1 D$                   L1 I$        L1 D$      sec_cache (IS_L2=0)
           \        /                           \        /
          proc_checker (node 0)               proc_checker (node 1)
                |                                     |
   ============ ring_noc: four noc_router, normal + secure channels each way ============
                |                                     |
          L2 cache (node 2)                    dma_ctrl (node 3) <--- debug_if <--- debugger
          sec_cache (IS_L2=1)                        |
                 \                                   /
                  +------------ mem_arbiter --------+
                                   |
                            mem_access_ctrl   (partition register)
                                   |
                              main_memory
```

| file | role |
|---|---|
| `rtl/tz_pkg.sv` | message types, node numbers, address map, helper functions |
| `rtl/tz_top.sv` | the whole system |
| `rtl/tz_core.sv` | five-stage pipelined core with NS-bit and world switch |
| `rtl/sec_cache.sv` | two-way write-back cache with a security tag per line (L1 and L2) |
| `rtl/proc_checker.sv` | a core's network interface and response filter |
| `rtl/noc_router.sv`, `rtl/net_fifo.sv` | one ring router and its queues |
| `rtl/ring_noc.sv` | the four-router ring |
| `rtl/mem_arbiter.sv` | picks between the L2 and the DMA engine for memory |
| `rtl/mem_access_ctrl.sv` | partition register and memory access check |
| `rtl/main_memory.sv` | single-port blocking memory |
| `rtl/sec_checker.sv` | the "equal or higher" NS-bit check |
| `rtl/dma_ctrl.sv` | memory-to-memory DMA with its level register and two checkers |
| `rtl/debug_if.sv` | debug port that drives the DMA engine |

## Messages and the address map

Below the L1 caches, every transfer is one 16-byte line. A request
(`mreq_t`) holds:

- a type (read or write);
- a 4-bit opaque tag `{source node, 0, port}` that routes the response back;
- the NS-bit;
- a byte address;
- a 16-bit byte strobe;
- 128 bits of data.

A response (`mresp_t`) holds the type, the opaque tag, an NS-bit and the line.
The NS-bit of a response means *the security level of the data it carries*,
and the caches and checkers act on it. On the network a message (`net_msg_t`)
also carries a destination node and a response flag.

Word and sub-word accesses place their bytes in the proper lanes of the line
and set only those strobes. Reads always return the whole line.

The address map is byte-addressed:

| address | what | read | write |
|---|---|---|---|
| `0x00` | partition register (in `mem_access_ctrl`) | anyone | secure only |
| `0x04` | L2 cacheable-control register (in the L2) | anyone | secure only |
| `0x08` | DMA level register | requests at or above the level | secure only |
| `0x0C` | DMA status: operations completed | as above | no effect |
| `0x10` | DMA source address | as above | as above |
| `0x14` | DMA destination; a write starts a copy | as above | as above |
| `0x18`–`0xFF` | reserved, reads zero | | |
| `0x100` and up | main memory, normal below the partition and secure at or above it | | |

The control space `0x00`–`0xFF` is never cached. Requests to `0x08`–`0x1F`
are routed to the DMA node (3); everything else goes to the L2 node (2).

## Where the worlds are separated

Follow a normal-world load of a secure address, starting at core 0:

1. **Core.** The request leaves with the core's NS-bit (0).
2. **L1 cache.** The address tag may match a line whose security tag is 1;
   that still counts as a miss (see below). The L1 asks for the line.
3. **Processor checker.** The request is passed to the network unchanged,
   addressed to the L2.
4. **Ring.** The request travels on the normal-world channel. It never shares
   a queue with secure traffic, and at every shared output it yields to
   secure traffic.
5. **L2 cache.** Secure memory is not cacheable while the L2 control register
   is 0, so the request passes straight through. If it were cacheable, the
   same tag rule as in the L1 would apply.
6. **Memory access control.** The address is at or above the partition and
   the request is normal, so it is **refused**. It never reaches memory. The
   reply is an all-zero line marked NS = 1, and the refusal is signalled on
   `reject_evt`.
7. **Back up.** Each cache sees a response whose NS-bit is above the
   requester's. It does not install the line and answers with zeros. At the
   core's network interface, the processor checker zeroes the data of any
   response whose NS-bit is above the core's current level, which catches
   misrouted responses. It keeps the NS-bit so that the L1 also refuses to
   install the line.

Answering a refusal with a harmless zero response keeps the requester from
hanging.

## The secure cache (`sec_cache`)

One module serves as the L1 instruction cache, the L1 data cache and, with
`IS_L2 = 1`, the shared L2.

**Organisation.**
- Two ways, `SETS` sets, 16-byte lines.
- Write-back with write-allocate.
- One LRU bit per set.
- Blocking: one request is handled at a time.

A hit answers two cycles after the request is accepted. A miss first writes
back a dirty victim, then refills the line.

**Security tag.** Each line stores an NS tag next to its address tag, and the
two are compared in parallel. The tag is the **security domain of the memory
location**, as reported by memory on the fill response. It is not the domain
of whoever caused the fill. A location therefore has one tag, and it can never
appear as two different lines, one secure and one normal. Lines of both worlds
live side by side with no flushing, and either may evict the other.

**Hit rule.** A lookup hits when the address tag matches *and* the requester's
NS-bit is at least the line's tag. A normal request that matches a secure line
is treated as a miss. The refill is then refused by memory access control, the
zero response is not installed, and the requester gets zeros. A clean secure
line stays where it was. A dirty one is written back first and then dropped,
so no data is lost. A secure request may hit a normal line and write into it. The line
stays normal, which is correct because its location is normal memory.

**L2 cacheable control** (`IS_L2 = 1` only).
- The register at `0x04` resets to 0.
- While it is 0, addresses in secure memory (at or above the `partition`
  input) bypass the L2 and go straight to memory.
- Writing 1 makes secure memory cacheable in the L2, where the security tags
  still protect it.
- Only a secure request can write the register. A normal write is answered
  but has no effect.

**Events.** `hit_evt`, `miss_evt`, `wb_evt`, `bypass_evt` and `deny_evt`
(a refused fill) pulse once per occurrence, for statistics and tests.

## The core (`tz_core`)

The core is a five-stage in-order pipeline (fetch, decode, execute, memory,
writeback) for a MIPS-style 32-bit instruction set.

**Hazards.**
- Decode checks for data hazards.
- A source register written by the instruction in execute is taken straight
  from the ALU output (bypass).
- A source register written by an instruction further down, or by a load in
  execute, stalls decode until the value is in the register file.

**Control flow.** There are no delay slots.
- Branches resolve in execute; jumps resolve in decode.
- Fetch continues sequentially, and wrong-path instructions are squashed.

**Memory.**
- Both memory ports are valid/ready and accept any latency.
- Fetch keeps one request outstanding.
- The memory stage holds the pipeline while its access is outstanding.

**Instructions.**
- `addu subu and or xor nor slt sltu addiu andi ori xori slti sltiu`
- `sll srl sra sllv srlv srav`
- `lw lh lhu lb lbu sw sh sb`
- `beq bne blez bgtz bltz bgez j jal jr jalr`
- `mul div divu rem remu`. These use opcode `0x1C` with funct
  `0x02/0x1A/0x1B/0x1E/0x1F`, in the form rd = rs op rt. Division by zero
  gives all ones as the quotient and the dividend as the remainder.
- `mfc0 rt` reads the `from_mngr_data` input. `mtc0 rt` presents rt on
  `to_mngr_data` with a one-cycle `to_mngr_val`. These two form a simple
  test/host channel.

Any other encoding executes as a nop. This includes the system instructions,
atomics and the prefetching load, whose behaviour is not defined here. There
is no `lui`; build constants with `ori` and `sll`.

**World switch.** The core's NS-bit is set by `NS_RESET`; core 0 resets
normal and core 1 resets secure. Raising `ns_switch_req` (held until
`ns_switch_ack`) does the following:
1. Fetch stops.
2. Every instruction already in flight finishes, including its memory
   access.
3. The NS-bit flips, and `ns_switch_ack` pulses for one cycle.
4. Fetch resumes at the next instruction.

Because of this order, no instruction fetched in one world ever issues a
memory request in the other. Flipping the bit while older instructions are
still in the pipeline would let normal-world loads leave as secure ones.
With both switch inputs tied low, the system behaves as a fixed-world system.

## The ring network (`noc_router`, `ring_noc`)

Four routers form a bidirectional ring. Each link carries **two channels per
direction, one per world**. Each router has:
- a terminal port for its node;
- west and east ports;
- one queue per input channel, plus a terminal input queue. Each queue holds
  `QDEPTH` messages (4).

A message addressed to this node leaves by the terminal port. Any other
message takes the shorter way round (east on a tie), on the channel that
matches its NS-bit. On an idle ring a message needs one cycle per router it
passes through.

**Arbitration** has two levels, and the secure world always goes first:
1. For each ring input direction, the secure queue competes if it holds a
   message; otherwise the normal queue does.
2. For each output, a secure message beats a normal one. Among equals the
   order is terminal, west, east.

Normal traffic can be starved by a flood of secure traffic. This is on
purpose: the normal world cannot slow the secure world down by flooding the
network. `priority_evt` marks the cycles in which a secure message was
preferred over a waiting normal one.

## Memory side (`mem_arbiter`, `mem_access_ctrl`, `main_memory`)

- **`main_memory`** has one port and blocks: a request is accepted only when
  the previous one has finished. Its response comes `LATENCY` cycles after
  the request is accepted. Writes merge under the byte strobe. A separate
  word-wide load port (`init_*`) writes the array directly, so a testbench or
  a loader can place program images before the cores start.
- **`mem_arbiter`** shares that port between the L2 (port 0) and the DMA
  engine (port 1). When both ask at once, a secure request goes first, and
  otherwise the L2 goes first. One request is in flight at a time.
- **`mem_access_ctrl`** holds the partition register (reset `0x8000`). It
  forwards a request if its address is below the partition, or if the request
  is secure. Everything else is refused as described above. The partition can
  be moved at run time, but only by a secure write.

## DMA engine and debug port (`dma_ctrl`, `debug_if`, `sec_checker`)

**`dma_ctrl`** copies one line at a time:
1. It reads the source line into its buffer.
2. It writes the buffer to the destination.
3. When the write has been answered, it acknowledges the operation.

Every memory request it makes carries the NS-bit of its **level register**
(reset: secure). The memory access check therefore judges DMA traffic by the
DMA's own level, not by who asked. A normal-level copy out of secure memory
moves zeros, and a normal-level copy into secure memory is dropped.

Requests reach the DMA engine from two sides, and each side passes through
its own `sec_checker`. The checker lets a request through only if its NS-bit
is equal to or higher than the level register.
- **Cores** use the registers at `0x08`–`0x14`. Write the source, then write
  the destination. The response to the destination write is held back until
  the copy has finished, so it is the acknowledgement. A refused core request
  is answered at once with zero data.
- **The debug port** sends `dma_cmd_t` commands: a copy, or a read of one
  word (used to check the result of a copy). A refused command comes back
  with `err` set.

When both sides ask at the same time, they alternate. One operation runs at
a time.

**`debug_if`** stands for an external debugger. The NS-bit of its commands
comes from two enables:
- `dbg_sec_en` makes commands secure.
- `dbg_ns_en` alone makes them normal.
- With neither enable, the port refuses commands itself.

The level checks then happen at the DMA engine.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `tz_top` | `RESET_PC0`, `RESET_PC1` | `0x200`, `0x8200` | start addresses of core 0 (normal memory) and core 1 (secure memory) |
| | `L1_SETS`, `L2_SETS` | 16, 64 | sets per cache (2 ways, 16 B lines): 512 B L1s, 2 KiB L2 |
| | `MEM_BYTES`, `MEM_LATENCY` | 65536, 4 | memory size and latency |
| | `PARTITION_RESET` | `0x8000` | reset value of the partition register |
| | `QDEPTH` | 4 | router queue depth |
| `dma_ctrl` | `DOMAIN_RESET` | 1 | DMA level register at reset |

The two cache ways, the 128-bit cache line and the router queue depth of 4
come from the prototype this design follows. All the other sizes are this
design's own choices.

## Differences from the prototype it is modelled on, and limits

- **Hit rule.** The prototype compares the security tag for equality. This
  design hits when the requester is at least the line's level, so the secure
  world does not miss on every normal line it has cached. Normal requests
  still never hit secure lines.
- **Both prototype variants at once.** The cores have the world-switch port
  and the L1s carry security tags; both belong to the dynamic prototype.
  Holding the switch inputs low gives the static one.
- **Instruction set.** Not implemented: `syscall`, `eret`, `chmod`,
  `dirmem`, `debug`, `prelw` and `amo`. The encodings of
  `mul/div/divu/rem/remu` and the meaning of `mfc0/mtc0` are this design's
  own.
- **No coherence.** Nothing keeps the two private L1 data caches, the L2 and
  the DMA engine coherent. Data shared between cores, or copied by DMA, must
  live in lines that the caches do not hold stale copies of (for example,
  read them for the first time after the DMA has finished). The DMA engine
  works on memory directly, behind the L2.
- **Own choices** (not taken from the prototype):
  - the message format and address map;
  - the register map of the DMA engine;
  - the order of the network nodes and the shortest-path routing;
  - the arbitration policy of the memory arbiter;
  - the way the debug port derives its NS-bit;
  - memory size and latency.
- **Not included.** The prefetch buffer beside the L2 appears in the
  prototype only as a deliberately insecure variant, and so do all other
  deliberately inserted vulnerabilities. None of them is part of this design.

## Simulating

All testbenches are self-checking. Each ends by printing
`TB_RESULT checks=<n> failures=<n>`, and each has a watchdog. They run with
plain Verilator 5. For example, the whole system:

```
verilator --binary --timing -Irtl -Itb rtl/tz_pkg.sv tb/tz_asm_pkg.sv \
    tb/tb_tz_top.sv -y rtl --top-module tb_tz_top -o sim
./obj_dir/sim
```

For a block testbench, replace `tb_tz_top` with its name.
`tb/tz_asm_pkg.sv` (a tiny assembler, one function per instruction) is only
needed by `tb_tz_top` and `tb_tz_core`.

| testbench | what it shows |
|---|---|
| `tb_tz_top` | The whole system at its default parameters. Core 0 (normal) and core 1 (secure) run programs from memory. The testbench checks: ALU work, loads and stores of all widths, branches and jumps; cache evictions; a normal read of secure memory (zeros) and normal attempts to move the partition, make secure memory cacheable or change the DMA level (all ignored); a DMA copy started by core 1 and checked by core 1; secure and normal debug commands; a world switch of core 0 to secure, after which it reads the secret. It counts every mechanism (stall, bypass, squash, L1 hit/miss/write-back/refused fill, checker filter, L2 hit/miss/bypass, network priority, memory arbiter conflict, memory and DMA refusals, DMA completion, world switch) and fails if any never happened. About 1,500 cycles. |
| `tb_tz_core` | About 250 random tests of every instruction group, with bypass and load-use cases, against values computed in the testbench. Memory with random delays. A world switch in mid-program. Every request must carry the current NS-bit. |
| `tb_sec_cache` | L1 and L2 configurations side by side against a reference memory. Random reads and writes by both worlds; the L2 control register; the hit latency. |
| `tb_proc_checker` | Alternation of the two L1s, routing by address, and response filtering by NS-bit. |
| `tb_noc_router` | Routing of random traffic, order, loss, queue depth, and secure-first at the terminal output. |
| `tb_ring_noc` | Delivery, order and hop latency across the ring under random traffic. |
| `tb_mem_arbiter` | Priority when both ports ask at once, and return of responses under random traffic. |
| `tb_mem_access_ctrl` | Access checks on both sides of the partition, and the partition register rules. |
| `tb_main_memory` | Load port, strobed writes, latency, and the blocking port. |
| `tb_sec_checker` | All input combinations. |
| `tb_dma_ctrl` | Copies and debug reads; checks refused on both sides; level register rules; acknowledgement timing; both sides at once. |
| `tb_debug_if` | NS-bit from the enables, refusal with both enables off, and fields and responses passed through. |
