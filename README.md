# Pipelined Y86-64 with stall/bubble control, branch prediction and forwarding

A five-stage pipeline (fetch, decode, execute, memory, writeback) would finish
one instruction per cycle if no instruction ever needed something an older
instruction has not yet produced. This RTL shows the standard ways of getting
close to that ideal on the Y86-64 instruction set:

* **Every pipeline register bank can stall or take a bubble.** Stall keeps
  the old contents. Bubble loads the bank's default value, a no-op. All hazard
  handling comes down to choosing, each cycle, which banks stall and which
  take a bubble.
* **Guess and check for conditional jumps.** Fetch assumes every `jXX` is
  taken and fetches from its target. When the jump reaches execute and turns
  out not taken, the two instructions fetched behind it are squashed. They
  are still in fetch and decode, which change nothing but pipeline registers,
  so bubbling them undoes them completely. A wrong guess costs 2 cycles.
* **Forwarding.** A result usually exists before it is written to the
  register file, so decode takes it straight from the stage that holds it.
  Only a value loaded from memory and needed by the very next instruction
  still costs a 1-cycle stall (load/use).
* **ret** needs the return address from memory before anything useful can
  be fetched. Fetch waits 3 extra cycles, until the `ret` has been through
  memory.

A second, much smaller pipeline (`addq_pipe`) does nothing but `addq rA, rB`.
It shows forwarding on its own, in the form it is usually first drawn.

## Files

| file | what it is |
|---|---|
| `rtl/y86_pkg.sv` | encodings, status codes, one struct per pipeline register and its bubble value |
| `rtl/pipe_reg.sv` | generic pipeline register bank with stall and bubble |
| `rtl/y86_fetch.sv` | fetch: split the instruction, compute valP, predict the next PC |
| `rtl/y86_decode.sv` | decode: register selection and the forwarding muxes |
| `rtl/y86_regfile.sv` | 15 x 64-bit register file, 2 read ports and 2 write ports |
| `rtl/y86_execute.sv` | execute: ALU, condition codes, jump/cmov condition |
| `rtl/y86_memstage.sv` | memory stage: data port control and status |
| `rtl/y86_memory.sv` | byte memory with fetch, data and program-load ports |
| `rtl/y86_control.sv` | hazard detection: stall/bubble for every bank |
| `rtl/y86_pipe.sv` | the five-stage processor |
| `rtl/addq_pipe.sv` | the four-stage addq-only forwarding pipeline |
| `rtl/hazards_top.sv` | top: both pipelines side by side |
| `tb/*_tb.sv` | one self-checking testbench per module |
| `tb/y86_tb_pkg.sv` | testbench assembler and instruction-level reference model |

## The pipeline register bank (`pipe_reg`)

`pipe_reg` is parameterised by a type `T` and a default value `DEFAULT`.
On each rising edge it does one of three things:

| stall | bubble | next contents |
|---|---|---|
| 0 | 0 | input `d` (normal) |
| 1 | 0 | unchanged (stall) |
| 0 | 1 | `DEFAULT` (bubble) |

Reset also loads `DEFAULT`. Asking for stall and bubble together is an
error, caught by an assertion. The Y86 banks use the structs of `y86_pkg`
(`d_reg_t`, `e_reg_t`, `m_reg_t`, `w_reg_t`). Each default is a no-op: icode
`NOP`, all register fields `0xF` ("no register") and status `STAT_BUB`. The
machine status ignores `STAT_BUB`. An 8-bit bank with default `0xFF`, fed
0x01, 0x02, ..., shows the rules:

| cycle | input | stall | bubble | output |
|---|---|---|---|---|
| 0 | 01 | 0 | 0 | FF |
| 1 | 02 | 1 | 0 | 01 |
| 2 | 03 | 0 | 0 | 01 |
| 3 | 04 | 0 | 1 | 03 |
| 4 | 05 | 0 | 0 | FF |
| 5 | 06 | 0 | 0 | 05 |
| 6 | 07 | 1 | 0 | 06 |
| 7 | 08 | 1 | 0 | 06 |
| 8 |    |   |   | 06 |

`pipe_reg_tb` replays exactly this sequence.

## Hazard control (`y86_control`)

The control block sees the icode in every stage, decode's source registers,
the load destination in execute, the jump condition and the stage
statuses. It drives these commands:

| situation | F (PC register) | D | E | M | W |
|---|---|---|---|---|---|
| `jXX` in execute, condition false (wrong guess) | load fall-through `E.valA` | bubble | bubble | | |
| `ret` in fetch, decode or execute | stall | bubble if in D/E | | | |
| `ret` in memory | load return address `m_valM` | bubble | | | |
| `mrmovq`/`popq` in execute writes a register decode reads | stall | stall | bubble | | |
| HLT/ADR/INS in memory or writeback | | | | bubble | stall if in W |

The priorities are: a wrong guess beats everything, and a `ret` in memory
beats a stall. During a load/use stall the ret bubble in D is held back,
because D is stalling. Condition codes are written only by an `OPq` in
execute, and not when an exception is in memory or writeback.

The `ret` sequence gives this pattern of commands (N normal, S stall,
B bubble). The commands at the end of a line are those applied at the clock
edge that produced that line:

```
cycle  fetch         decode   execute  memory      writeback
1      ret           call
2      (wait)        ret      call                              F:S D:N
3      (wait)        nop      ret      call (store)             F:S D:B
4      (wait)        nop      nop      ret (load)  call         F:S D:B
5      next instr    nop      nop      nop         ret          F:N D:B
```

A wrong guess looks like this (the `jne` falls through):

```
cycle  fetch       decode     execute      memory     writeback
3      target+0    jne        subq (ZF)
4      target+1    target+0   jne (ZF)     subq
5      fall-thru   nop        nop          jne        subq      F<-fall-thru D:B E:B
```

**Design choice:** corrections are written into the F register, so fetch
always fetches at `F.pred_pc` and never chooses among several late PCs. The
return address is written in the cycle the `ret` is in memory; the
fall-through address in the cycle the `jXX` is in execute. The timing is
the same as selecting those PCs combinationally one cycle later.

## Forwarding (`y86_decode`)

For each of valA and valB, decode takes the first match in this list, so
the youngest producer wins:

1. `e_valE`: ALU output of the instruction in execute (its destination
   `e_dstE` is already `0xF` if it is a cmov whose condition failed)
2. `m_valM`: the value being loaded by the instruction in memory
3. `M.valE`: the ALU result held in the M register
4. `W.valM`, then `W.valE`: values about to be written back
5. the register file

Register `0xF` never matches. `call` and `jXX` put valP in valA: it is the
return address, or the fall-through address used to repair a wrong guess.

Forwarding goes only to the end of decode. So `mrmovq ...,%rbx` followed by
`rmmovq %rbx, ...` stalls one cycle, although forwarding into the memory
stage could have saved it.

## The addq pipeline (`addq_pipe`)

Four stages: PC with an add-2 incrementer, instruction memory, split into
rA/rB, register file, adder, and writeback into rB. The registers start at
100*n (`%r8` = 800, `%r9` = 900). Without forwarding, `addq %r8,%r9 ;
addq %r9,%r8` would read the old `%r9` (900). The decode muxes take it from
the adder output instead (1700), so `%r8` becomes 2500. A second path, from
the writeback register, covers an instruction two behind. The register write
lands only at the end of the cycle, so without that path such an instruction
would read a stale value too. The opcode byte is not decoded: every
instruction is treated as an addq.

## Timing summary

Instruction k of a hazard-free program is fetched in cycle k (counting from
the first cycle after reset) and is in writeback in cycle k+4. Each
not-taken `jXX` adds 2 cycles, each `ret` 3, each load/use 1. The
testbenches check this formula exactly on every program. On the common
instruction-mix example (3% not-taken jumps, 5% taken jumps, 1% `ret`, 91%
other instructions), the expected CPI is 1.09 with prediction (1.19 if jumps
stalled instead). A 1000-instruction program with that mix measures 1.094
here.

## Interfaces

`hazards_top` (parameters `MEM_BYTES` = 8192, `IMEM_BYTES` = 256):

* `clk`, `rst`: shared; reset is synchronous and active high, and clears
  every pipeline register to a bubble and the PC to 0.
* `y86_load_we/addr/data`, `addq_load_we/addr/data`: write one program
  byte per cycle into each memory. Use them while `rst` is held.
* `y86_stat`: status of the instruction in writeback (`STAT_AOK` while
  running; `STAT_HLT`, `STAT_ADR` or `STAT_INS` once stopped). `y86_retired`
  is set in each cycle in which an instruction moves into writeback.
  `y86_pc` is the fetch PC and `y86_cc` the condition codes.
* `y86_ev_*`: set in each cycle in which a load/use stall, a squash, a ret
  bubble or a forward happens.
* `addq_wb_valid/dst/val`: the register write in the addq pipeline's
  writeback; `addq_fwd_e` and `addq_fwd_w` show its two forwarding paths.

Instruction encodings are standard Y86-64, little-endian: byte 0 is
icode:ifun; then an optional register byte rA:rB; then an optional 8-byte
constant. Statuses: 1 AOK, 2 HLT, 3 ADR, 4 INS (0 marks a bubble).

## Where this departs from, or adds to, the usual description

* The corrected PC goes into the F register instead of being selected in
  fetch (see above). While a `ret` is in fetch, F stalls, so fetch re-reads
  the `ret` until the return address arrives.
* Memory is one unified 8192-byte array with a 10-byte fetch port and an
  8-byte data port, both combinational: the single-cycle "ideal" memory.
  A fetch is refused (status ADR) if any of the 10 bytes at the PC lies
  outside memory, even for a shorter instruction. Caches and slow memories
  are not modelled.
* An unknown icode or a refused fetch travels down as a nop with status INS
  or ADR.
* The addq pipeline has a writeback forwarding path that drawings of it
  often leave out.
* Not built: variants with other stage splits (4 or 6 stages), multi-cycle
  memories, multiple issue, out-of-order execution, backward-taken /
  forward-not-taken prediction, a return-address stack, and prediction
  before fetch.

## Simulating

Each testbench is self-contained and prints one line
`TB_RESULT checks=N failures=M`. With plain Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/y86_pkg.sv tb/y86_tb_pkg.sv tb/hazards_top_tb.sv --top-module hazards_top_tb
./obj_dir/Vhazards_top_tb
```

Replace `hazards_top_tb` with any other `tb/*_tb.sv`. Leave out
`tb/y86_tb_pkg.sv` for testbenches that do not import it. The testbenches
initialise everything they read, and all run in seconds.

* `y86_pipe_tb`: small example programs (forwarding chains,
  load/use, jumps guessed right and wrong, call/ret and a loop, an invalid
  instruction, a bad address), then 25 random programs. Each is compared
  with `y86_tb_pkg`'s instruction-level model: all registers, condition
  codes, memory, status, instruction count and exact cycle count. Five
  short programs are also traced cycle by cycle, stage by stage: the ret
  stall, a right and a wrong `jXX` guess, a five-instruction chain that
  forwards every value without stalling, and a load/use stall.
* `hazards_top_tb`: both pipelines at their default sizes; the example
  programs plus the 1000-instruction mix; it requires every hazard mechanism
  to act at least once.
* The module testbenches compare each stage with a model written
  independently from the instruction-set rules.

To write a program, use the `a_*` functions of `y86_tb_pkg` (for example
`a_irmovq(5, RAX); a_op(0, RAX, RBX); a_halt();`), then load the resulting
`img` array through the load port.
