# Sub-word Permutation Unit (SPU) for an MMX-style SIMD datapath

SIMD ("sub-word parallel") instruction sets such as MMX pack several 8-, 16-
or 32-bit values into one 64-bit register. An instruction can only combine
values that sit at the same position of at most two registers. Real kernels
break both rules all the time: a FIR filter slides its window by one sample,
a matrix transpose needs one element from each of four registers, and
`ad - bc` needs the two halves of one register swapped. The code pays with
pack/unpack/shuffle instructions that do no arithmetic.

The SPU moves that data motion out of the instruction stream. It sits between
the register file and the two MMX integer pipes (U and V) and does three things:

* it keeps all eight 64-bit MMX registers in **one byte-addressable 512-bit
  register**, so every byte of every register is reachable at once;
* a **64 x 32 byte crossbar** builds each of the four pipe operands (U.a, U.b,
  V.a, V.b, 32 bytes in all) from any register bytes;
* a small **programmed controller**, one state per instruction of a loop body,
  chooses the crossbar setting for every issued instruction. Two loop
  counters restart themselves, so loops cost no extra instructions.

The instruction set does not change. A loop such as

```
loop: punpckhwd ; punpcklwd ; pmulhw ; pmullw ; jump loop
```

becomes `pmulhw ; pmullw ; jump loop`. The SPU delivers the unpacked layouts
directly to the multiplier.

This repository holds synthesizable SystemVerilog for the SPU itself. It is
written from the published description of the SPU
("Efficient Orchestration of Sub-Word Parallelism in Media Processors").
The MMX pipes, the issue logic and memory are not part of it. They connect
through the ports of `spu_top`.

## Block structure

```
            memory (64-bit loads/stores, memory-mapped control writes)
              |                         |
              v                         v
   +----------------------+     +----------------------------------+
   | spu_register         |     | spu_controller                   |
   | MM0..MM7 as 64 bytes |     |  STR (7b) -> spu_control_memory   |
   +----------------------+     |  128 x 207-bit rows               |
              | 512 bits         |  spu_loop_counters S1/S2, C1/C2   |
              v                  |  next-state MUX, idle state 127   |
   +----------------------+      +----------------------------------+
   | spu_interconnect     |<-- 192 select bits (or "straight" when idle)
   | 64 x 32 byte xbar    |                ^
   | + output register    |                | issue (from MMX control)
   +----------------------+
      |U.a  |U.b  |V.a  |V.b   (64 bits each, one clock after issue)
      v     v     v     v
    MMX U pipe     MMX V pipe  ---- results written back (64 bits each)
```

| Module | Role |
|---|---|
| `spu_pkg` | shared sizes, control-space addresses, port/operand enums |
| `spu_register` | 8 x 64-bit unified register, 3 write ports (memory, U, V), full read-out |
| `spu_interconnect` | parameterized byte crossbar with optional output register |
| `spu_control_memory` | control store, one 207-bit control word per state |
| `spu_loop_counters` | store registers S1/S2, counters C1/C2, decrement and reload |
| `spu_controller` | state register, next-state logic, GO/idle handling, address decode |
| `spu_top` | the SPU: register + crossbar + controller + straight-path select |

## The SPU register

Byte `b` of register `MMi` is SPU byte `8*i + b`, at bits `[8*(8i+b)+7 : 8*(8i+b)]`.
Byte 0 is the least significant byte. The whole 512 bits go to the crossbar
every cycle. Each of the three write ports writes one whole 64-bit register and
leaves the others alone. The ports are loads from memory, the U result and the
V result. As in MMX, U and V must never write the same register in one cycle,
and an assertion checks this. If memory and a pipe write the same register,
memory wins, then U, then V. There is also one 64-bit read port for stores to
memory.

## The crossbar and "straight" mode

Output byte `j` (0..31) belongs to operand `j/8` and sits at byte `j%8` of it.
The operand order is U.a, U.b, V.a, V.b. It takes SPU byte `sel[6j+5:6j]`.
Any byte can feed any number of outputs.

While the SPU is **idle**, `spu_top` builds the selects itself from the
instruction's register numbers (`src_reg[k]`), so operand `k` is register
`src_reg[k]` unchanged. In that mode the unit behaves like an ordinary MMX
register read. While the SPU is **active**, the selects come from the current
controller state and `src_reg` is ignored.

`spu_interconnect` is parameterized (`IN_PORTS`, `OUT_PORTS`, `PORT_W`), so it
can also be built as one of the smaller crossbars the SPU family allows:
32x32 with 8-bit ports, or 32x16 and 16x16 with 16-bit ports. `spu_top` always
uses the fully byte-addressable 64 x 32, 8-bit configuration.

## The controller: programming the SPU

This is the part that needs the most care when using the unit.

### Control word

Each of the 128 states has a 207-bit control word (15 bits of sequencing plus
192 select bits):

| bits | field | meaning |
|---|---|---|
| 206 | `CNTRx` | which loop counter this state uses (0 = C1, 1 = C2) |
| 205:14 | `OUT_SEG` | 32 x 6-bit crossbar selects for the instruction issued in this state |
| 13:7 | `NEXT_STATE0` | next state if the counter reaches zero on this step (loop exit) |
| 6:0 | `NEXT_STATE1` | next state otherwise (loop back / continue) |

### Sequencing rules

* Writing the configuration register with GO = 1 copies S1/S2 into C1/C2,
  puts the state register at state 0 and enables the SPU.
* Every issued instruction (`issue` high) while the SPU is enabled is one
  **step**. The instruction gets the current state's selects. The counter named
  by `CNTRx` is decremented. If the decrement brings it to zero, the counter is
  reloaded from its store register and the controller goes to `NEXT_STATE0`.
  Otherwise it goes to `NEXT_STATE1`. A programmed count of N therefore leaves
  the loop on exactly the N-th step that uses that counter. A count of 0
  behaves like 1.
* State 127 is the idle state. Entering it disables the SPU and restores both
  counters. The next issue is straight again.
* Writing GO = 0 stops the SPU immediately, for example from an exception
  handler. It also resets the state and the counters.
* Issues while the SPU is idle do not move the controller.

The counters count **dynamic instructions**, not loop passes. In the
dot-product example, ten passes of a three-instruction body need C1 = 30. Each
of the three states uses C1 and has `NEXT_STATE0 = 127`, and the states
chain 0 -> 1 -> 2 -> 0 through `NEXT_STATE1`.

Two loop levels are available. The inner loop uses C2. Its last state exits
through `NEXT_STATE0` to states of the outer loop, which use C1 and branch
back to the inner loop's first state. C2 has already reloaded itself, so the
inner loop runs again with no reprogramming. `tb_spu_top` runs this with an
inner count of 4 over two states and an outer count of 5.

### Control space (memory-mapped, 64-bit words)

Addresses are 12 bits wide. Bits `[11:10]` name the context whose registers a
write goes to; they are ignored when there is one context. Bits `[9:0]` select
the register:

| local address | register |
|---|---|
| `0x000`-`0x1FF` | control memory: address `{state[6:0], chunk[1:0]}`; chunk `c` holds control-word bits `[64c+63:64c]` (chunk 3 uses only its low 15 bits) |
| `0x200` | S1, loop count for C1 (bits 15:0) |
| `0x201` | S2, loop count for C2 (bits 15:0) |
| `0x204` | configuration register, bit 0 = GO |
| `0x205` | context select, bits 1:0. This register is shared by all contexts; a value with no matching context is ignored |

Write the program and the counts first, then GO. The control memory has no
reset, so every state that can be reached must be written.

### Contexts

With `CONTEXTS > 1` the controller holds that many copies of its control
registers. Each copy has its own control memory, S1/S2, C1/C2, state register
and enable. Only the selected context supplies the crossbar selects and steps
on issue. The other contexts keep their state. An exception handler can
therefore select a free context, run its own SPU loop there, and then select
the interrupted context again, which continues from the state and count where
it stopped. `tb_spu_contexts` does exactly this. The default is one context.

## Timing

* `issue` in cycle t: the crossbar setting of that cycle (current state, or
  straight) is applied to the register contents of cycle t. The operands,
  `op_valid` and `op_permuted` appear after the clock edge ending cycle t. This
  is the extra pipeline stage that data motion through the SPU costs. Set
  `OUT_REG = 0` for a combinational path.
* Register writes in cycle t are seen by instructions issued from cycle t+1 on.
* The state register and counters change at the edge ending the issue cycle.
  `spu_state`, `spu_active` and `spu_loop_exit` (this step takes
  `NEXT_STATE0`) describe the instruction issued in the current cycle.
* There is no stall input. One `issue` pulse is one instruction.

## Parameters (`spu_top`)

| parameter | default | meaning |
|---|---|---|
| `NUM_REGS` | 8 | MMX registers |
| `REG_W` | 64 | register width |
| `STATES` | 128 | controller states (the last one is idle) |
| `CNT_W` | 16 | loop counter width |
| `OUT_REG` | 1 | register the crossbar output |
| `CONTEXTS` | 1 | copies of the controller registers (1 to 4) |

The control-space map limits the controller to 128 states and control words of
at most 256 bits. The controller checks this at elaboration.

## Relation to the published description

Follows it:
* the three parts (unified byte register, byte crossbar, decoupled controller);
* the 512-bit register, the full read and the partial write;
* the 64 x 32 byte crossbar and the 192 select bits;
* the 128-state controller with idle state 127;
* two counters with store registers loaded from memory;
* the NEXT_STATE0/NEXT_STATE1 choice and automatic counter restore;
* the GO bit, memory-mapped programming and straight operation when idle;
* the extra pipeline stage;
* the control-store size `states x (15 + select bits)`.

Choices made here, where the description is silent or unclear:
* **Loop exit test.** The original block diagram picks the next state from
  the counters' sign bits. Here the decremented count is tested for zero. That
  makes a count of N exit after exactly N steps, which is what the worked
  example (count 30 for 10 x 3 instructions) requires.
* **Crossbar input width.** The original block diagram labels the
  register-to-crossbar bus 256 bits. The text says the whole register is read,
  and a 64-input byte crossbar needs all 512 bits, so 512 are used.
* **Control store size.** It is 128 x 207 bits (about 3.2 KB), from the size
  formula. The block diagram quotes a 4.8 KB SRAM.
* **Loop levels.** Two counters are built. The description mentions both
  "two" and "three" nested loops.
* **Interfaces.** The address map, the start state 0, one step per issued
  instruction, reset values, write priority between memory and the pipes, the
  asynchronous read of the control store and the chunked 64-bit programming
  port are all choices made here.
* **Contexts.** Several copies of the control registers, for fast context
  switching, are described as an option, but how a context is selected is
  not. The context-select register and the rule that idle contexts hold their
  state are choices made here. The default of one context matches the
  configuration that was evaluated.
* **Crossbar circuit.** It is one multiplexer per output byte. The area and
  delay figures quoted for the SPU assume a folded crossbar layout, which is
  not modelled.

Not included: the MMX U and V pipes, MMX issue control and the memory system.
These belong to the host processor. A testbench that needs them models the
arithmetic itself (for example `pmulhw`/`pmullw` and multiply-accumulate).

## Verification

Each testbench is self-checking and prints `TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_spu_register` | random traffic on all three write ports against a reference copy; write priority |
| `tb_spu_interconnect` | identity, broadcast, reversed and random selects, one-cycle latency |
| `tb_spu_control_memory` | chunked writes change only their chunk; asynchronous read |
| `tb_spu_loop_counters` | a count of 30 exits on step 30 and reloads; interleaved counters; random reference |
| `tb_spu_controller` | dot-product program, nested loop, random programs against a reference sequencer, GO = 0 |
| `tb_spu_top` | end to end at default sizes: straight mode, dot-product loop with write-back, 4x4 transpose in four instructions, determinant swap, nested loop stopped by GO = 0; every mechanism must occur |
| `tb_spu_contexts` | two contexts: a loop is interrupted, a second context runs its own loop, the first resumes and finishes |
| `tb_spu_kernels` | 16x16 16-bit transpose in 4x4 tiles; 4-tap FIR over a 150-sample block with the delay-line shift done by the SPU |

Run one with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/spu_pkg.sv tb/spu_tb_pkg.sv \
    -y rtl tb/tb_spu_top.sv --top-module tb_spu_top -Mdir obj_top
./obj_top/Vtb_spu_top
```

For the unit testbenches, replace the top module name. `tb_spu_controller`
and the top-level testbenches need `tb/spu_tb_pkg.sv`. Every testbench runs in
well under a second.
