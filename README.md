# A work-queue GPU with a branch-free, predicated instruction set

This is synthesizable SystemVerilog for a small programmable graphics processor
in the style of the CSE467 course GPU. Its instruction set has no
branches. Every instruction carries a predicate, and a program is one straight
run of instructions that ends in `END`. Work is carried in 256-bit *work items*
that sit in queues. Running a program on an item may put new items on the
queues, and that is how the design loops: a program does one step of a loop
and puts the rest of the work back on a queue.

The graphics pipeline is split into four programmable stages: transformation,
lighting, projection and rasterisation. Each stage has a work queue (0 to 3)
and a program in its own slice of the code memory. The host CPU feeds
triangles into queue 0. The rasterisation stage writes its results into the
*z-buffer queue*, which hands them to fixed-function z-buffer logic. That
logic is not part of this RTL.

```
 host ──cpu_if──► queue 0 ─┐                          ┌──► z-buffer queue ──► zq_* (z-buffer logic)
                  queue 1 ─┤   priority_scheduler     │
                  queue 2 ─┼──► pops one item ──► gpu_core ──STOREQ 0..3──► back into queues 0..3
                  queue 3 ─┘   when the core is idle  │
                  (work_queues: one memory)           ├── code_mem  (4 programs)
                                                      └── gp_mem    (data, shared with the host)
```

## The scheduling rules

The design is correct only if no queue ever fills. It also aims to keep the
z-buffer queue supplied. `priority_scheduler` decides which queue the
processor serves next. It looks only at queue occupancies and decides again
every time the processor is idle:

1. If the z-buffer queue holds `ZQDEPTH - RESERVE` items or more, the processor
   stays idle. This keeps `RESERVE` entries free for the items that a
   rasterisation run already in flight may still write.
2. Otherwise it takes queue 3 if the z-buffer queue is less than half full and
   queue 3 has work.
3. Otherwise it takes queue 2 if queue 3 is less than half full and queue 2 has work.
4. Otherwise it takes queue 1 if queue 2 is less than half full and queue 1 has work.
5. Otherwise it takes queue 0 if queue 1 is less than half full and queue 0 has work.
6. Otherwise it idles.

So a stage runs only while the queue it feeds is less than half full, and the
later stages go first. Work drains towards the z-buffer, and a stalled z-buffer
consumer backs the whole pipeline up in order: first queue 3, then queues 2 and
1, then queue 0. Once queue 0 is nearly full, the host is made to wait. The
rules keep a queue from filling only if no single run writes more items than
the room the rules leave. A stage whose queue is under half full has at least
`DEPTH/2` free entries. The z-buffer queue has `RESERVE` free entries. Writing
programs that stay within these margins, loop unrolling included, is up to
the programmer. If a push does meet a full queue, the item is dropped and the
sticky `overflow_err` output is raised, so the mistake is visible instead of
silent.

The host goes through `cpu_if`. It has a one-item buffer and a valid/ready
handshake. The host waits while queue 0 holds `QDEPTH - RESERVE` items or
more, so the last entries stay free for the processor's own writes to queue 0.
It also waits in any cycle in which the processor is writing a queue: there is
a single queue write port, and the processor always gets it first.

## Programs and the instruction set

Each instruction is one 32-bit word:

| bits | 31:30 | 29 | 28:24 | 23:20 | 19:16 | 15:12 | 11:0 |
|------|-------|----|-------|-------|-------|-------|------|
| register form (29 = 0) | predicate | 0 | opcode | REG1 (src1) | REG2 (src2) | REG3 (dest) | 0 |
| constant form (29 = 1) | predicate | 1 | opcode | REG1 (src1) | REG2 (dest) | constant[15:12] | constant[11:0] |

An instruction executes only if the predicate it names is true. Predicate p0
is always true, so predicate field 0 means "always".

| opcode | mnemonic | effect (`b` = REG2 in register form, the constant in constant form) |
|---|---|---|
| 0 | LDGPMEM | dest ← Mem[REG1] (Mem[constant] in constant form) |
| 1 | STGPMEM | Mem[b] ← REG1 |
| 2 | MUL | dest ← low 32 bits of REG1 × b |
| 3 | ADD | dest ← REG1 + b |
| 4 | SUB | dest ← REG1 − b |
| 5 | SRL | dest ← REG1 >> b[4:0] (logical) |
| 6 | SLL | dest ← REG1 << b[4:0] |
| 7 | AND | dest ← REG1 & b (ANDI with 0xffff keeps the low half) |
| 8 | NOT | dest ← ~REG1 |
| 9 | XOR | dest ← REG1 ^ b |
| 10 | OR | dest ← REG1 \| b |
| 11 | NAND | dest ← ~(REG1 & b) |
| 12 | LI | dest ← b (a move in register form) |
| 13 | SETLT | predicate dest[1:0] ← (REG1 < b), signed; writes to p0 are ignored |
| 14 | STOREQ / STOREQI | queue[REG1] (queue[constant] for STOREQI) ← {r7, …, r1, r0} |
| 15 | END | the item is finished |

The constant is sign-extended for ADD, SUB, MUL, LI and SETLT. For the logic
and shift operations, addresses and queue numbers it is zero-extended. Opcode
values 16 to 31 execute as no-operations. STOREQ queue numbers 0 to 3 name
the work queues and 4 names the z-buffer queue. A larger number drops the
write and sets the sticky `bad_queue_err` output.

The packed item `{r7, …, r0}` puts r0 in bits 31:0. Where the item is a
triangle, r0 and r1 hold the first point, a vertex being four 16-bit
fixed-point values (x, y, z, a). Together the three points take 192 bits, and
64 bits are left over for texture or lighting data.

### Registers and the status register

`gpu_regfile` holds r0–r14 (32 bits each), predicates p1–p3 and an
instruction counter. Reading r15 returns the machine status register:

```
[31:16] instruction_count   instructions issued for this item (including ones whose predicate was false)
[15:8]  processor_number    the PROC_NUM parameter
[7:6]   0
[5:4]   queue_source        the queue this item came from
[3:0]   predicates          {p3, p2, p1, p0=1}
```

Writes to r15 are ignored. When an item starts, r0–r7 are loaded with the
item, r8–r14 and the counter are cleared, and every predicate is set true.

## Processor timing

`gpu_core` runs one item at a time and runs it to completion. Time is counted
from the clock in which the scheduler picks a queue:

| clock | what happens |
|---|---|
| 0 | the scheduler picks a queue; the queue memory pops the item and the core leaves idle |
| 1 | the item arrives; the register file is loaded and instruction 0 is fetched |
| 2 … | one instruction per clock; the next fetch is issued in the same clock |

The code memory has a one-clock read. Its output is always the instruction at
the current program counter, and the address for the next clock goes out at
the same time. `LDGPMEM` takes two clocks: in the first it sends its address
to the data memory and fetches itself again. In the second the data comes
back and is written, while the load's fields are still on the code memory
output. All other instructions take one clock. That includes `STGPMEM` and
`STOREQ`, which writes the whole 256-bit item at once. An instruction whose
predicate is false still takes its clock. The processing time of an item is
therefore 2 + (instructions issued) + (loads executed) clocks, and the core is
idle in the clock after `END`. The program counter wraps at the end of the
program's code memory, so every program must end in `END`.

## Memories and sizes

| parameter (gpu_top) | default | meaning |
|---|---|---|
| `QDEPTH` | 128 | items per work queue (the original description suggests 128 or more) |
| `ZQDEPTH` | 128 | items in the z-buffer queue |
| `RESERVE` | 8 | z-buffer queue entries kept free by rule 1; also the entries of queue 0 the host leaves to the processor |
| `PROG_DEPTH` | 256 | instruction words per program |
| `GP_WORDS` | 4096 | 32-bit words of data memory |

- **`work_queues`.** The four work queues share one memory of `4 × QDEPTH`
  256-bit words, each queue a circular buffer with its own pointers. It
  accepts one push and one pop per clock, and pops have a one-clock read.
- **`zbuf_queue`.** A first-in, first-out buffer. Its output is always the
  oldest item, taken with `zq_valid`/`zq_ready`.
- **`code_mem`.** All four programs in one memory. The host loads words through
  `code_*`, with the address given as (program, word).
- **`gp_mem`.** Word-addressed and dual-ported. The processor has one port and
  the host the other (`gp_*`), for loading tables and reading results. Reads
  return the old word. If both ports write one word in the same clock, the
  processor wins. Addresses wrap at the memory size.

## How this relates to the original GPU description

These parts follow the original description directly: the instruction list,
the predicate and register model, the status register layout, how registers
are set up at the start of an item, the 256-bit items, the four queues plus a
z-buffer queue, the storage (one memory for the queues, one for the code and
one general-purpose memory), and the scheduling rules.

The following are choices of this design, because the description leaves
them open:

- Opcode numbers, and which field is the destination in each form.
- Sign- and zero-extension of the constant.
- Signed SETLT, and the low 32 bits kept from MUL.
- Queue number 4 for the z-buffer queue.
- `RESERVE`, the queue depths and the memory sizes.
- Dropping items on a full queue, with an error flag.
- The host handshake, and the processor's priority on the queue write port.
- The timing above, with whole items moved in one clock.

The description has SUB subtract "src3" while listing only two sources. Here
SUB subtracts the second source. Its shift instructions list a constant
operand but shift by a register, so here both forms are supported. One rule
of the scheduling description compares queue 1 with half the size of
queue 0. All work queues have the same depth, so that reading and the natural
one agree.

The design has a single processor. The instruction set describes one thread
of execution, and `processor_number` in the status register is a parameter.
There are no SIMD lanes or warps, because no lane organisation is specified.
The fixed-function z-buffer and framebuffer, and the host CPU, are outside
this design. Their signals are the top-level `zq_*`, `host_*`, `code_*` and
`gp_*` ports.

## Simulating

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and ends with `$finish`. The package
`tb/tb_gpu_ref.sv` contains instruction encoders (`enc_r`, `enc_i`) and an
instruction-level reference model of the processor. The model is written
separately from the RTL, and the core and top-level testbenches compare the
hardware against it.

- `tb_gpu_core` runs random predicated programs. These include loads,
  stores, STOREQ to valid and invalid queues, and conditional ENDs. It checks
  every queue write, the data memory, the status register and the exact
  clock count of each item.
- `tb_gpu_top` runs the whole GPU at its default sizes. It loads four small
  stage programs: the transformation-style unpack and scale, a lighting stage
  with a load–add–store counter, a projection stage driven by predicates, and
  a rasterisation stage that loops by re-queueing itself. It then streams 200
  triangles while the z-buffer consumer first refuses everything and then
  takes items at random. It compares the z-buffer output with the reference
  model as a multiset. It also checks that each mechanism occurs: every
  queue is scheduled, the z-buffer hold, the half-full blocking, host waits
  for queue room and for the write port, predicated-off instructions, load
  waits and re-queue loops. A second phase forces an overflow and an invalid
  queue number and checks the error flags.

- `tb_transform_workload` runs the complete transformation stage at the
  default sizes. Each triangle has three points of four 16-bit values. For
  every point, the program unpacks the four values (mask and shift), forms the
  product with a 4×4 matrix of 8.8 fixed-point coefficients held in data
  memory, shifts each sum right by 8 and repacks the point. The program is 212
  instructions with 48 loads, so it fits in one 256-word program memory. Each
  triangle takes 262 clocks, from the scheduler's pick to `END`. The testbench
  checks 100 triangles against a matrix product computed in the testbench, and
  checks the clock count of every run.

With plain Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --top-module tb_gpu_top -y rtl -y tb \
    rtl/gpu_pkg.sv tb/tb_gpu_ref.sv tb/tb_gpu_top.sv
./obj_dir/Vtb_gpu_top
```

Replace `tb_gpu_top` with any other testbench name to run that testbench.
The top-level run takes well under a second.
To write a program for the GPU, build the words with `enc_r`/`enc_i`, or with
the field layout above. Then write them through `code_*`, with unused words
set to `END`.

## Files

| file | contents |
|---|---|
| `rtl/gpu_pkg.sv` | shared types: instruction fields, opcodes, decoded control, status register |
| `rtl/gpu_top.sv` | the whole GPU |
| `rtl/gpu_core.sv` | processor sequencing |
| `rtl/gpu_decoder.sv`, `rtl/gpu_alu.sv`, `rtl/gpu_regfile.sv` | the processor's decode, datapath and state |
| `rtl/priority_scheduler.sv` | the scheduling rules |
| `rtl/work_queues.sv`, `rtl/zbuf_queue.sv` | the work queues and the z-buffer queue |
| `rtl/code_mem.sv`, `rtl/gp_mem.sv` | code and data memories |
| `rtl/cpu_if.sv` | host entry into queue 0 |
| `tb/tb_*.sv` | one testbench per module, plus the reference package |
