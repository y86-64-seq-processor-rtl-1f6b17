# A single-cycle Y86-64 processor, and a pipelined "times three" circuit

This repository holds two small teaching designs that go together:

* **SEQ**, a processor for the Y86-64 instruction set (a reduced, x86-64-like
  ISA with fifteen 64-bit registers). It executes **one whole instruction per
  clock cycle**. The instruction passes through fetch, decode, execute, memory,
  write-back and PC update. All six stages are combinational logic between the
  state elements, and every state element changes only on the rising clock
  edge. Most of the design is a set of multiplexers. Each one picks, from the
  instruction code, which value feeds the next unit. This README spends most
  of its space on those multiplexers.
* **times three**, computing `3*A` with two adders (`A+A`, then `2A+A`). It
  comes in two builds: combinational, and cut into stages by pipeline
  registers. Together they show how registers between the stages trade latency
  for throughput. This design is the first step from SEQ towards a pipelined
  processor.

The two designs share nothing but the clock. `lecture_top` places them side
by side.

## The instruction set as implemented

| instruction          | bytes | encoding (byte 0, byte 1, ...)          | effect |
|----------------------|-------|-----------------------------------------|--------|
| `halt`               | 1     | `00`                                    | stop (status HLT) |
| `nop`                | 1     | `10`                                    | — |
| `rrmovq rA,rB` / `cmovXX rA,rB` | 2 | `2fn rA:rB`                  | `rB = rA` (if condition `fn` holds) |
| `irmovq V,rB`        | 10    | `30 F:rB V[8]`                          | `rB = V` |
| `rmmovq rA,D(rB)`    | 10    | `40 rA:rB D[8]`                         | `M[rB+D] = rA` |
| `mrmovq D(rB),rA`    | 10    | `50 rA:rB D[8]`                         | `rA = M[rB+D]` |
| `OPq rA,rB`          | 2     | `6fn rA:rB` (fn 0 add, 1 sub, 2 and, 3 xor) | `rB = rB op rA`, sets ZF SF OF |
| `jXX Dest`           | 9     | `7fn Dest[8]`                           | jump if condition `fn` holds |
| `call Dest`          | 9     | `80 Dest[8]`                            | push return address, jump |
| `ret`                | 1     | `90`                                    | pop return address into PC |
| `pushq rA`           | 2     | `A0 rA:F`                               | `%rsp -= 8; M[%rsp] = rA` |
| `popq rA`            | 2     | `B0 rA:F`                               | `rA = M[%rsp]; %rsp += 8` |

Conditions `fn`: 0 always, 1 le, 2 l, 3 e, 4 ne, 5 ge, 6 g. Constants are
8-byte little-endian. Register 4 is `%rsp`. Register number `F` means "no
register".

## The SEQ datapath, stage by stage

```
 PC ─► instruction memory ─► split ─► icode:ifun, rA, rB, valC ;  valP = PC + length
       srcA/srcB mux ─► register file ─► valA, valB
       aluA/aluB mux ─► ALU ─► valE        condition codes + ifun ─► Cnd
       address/data mux ─► data memory ─► valM
       dstE/dstM mux ─► register file write ports (valE, valM)
       new-PC mux ─► PC register
```

**Fetch** (`y86_imem`, `y86_fetch`). The instruction memory returns the ten
bytes at the PC. The split unit cuts them into `icode:ifun`, the register
byte `rA:rB` and the constant `valC`. It also adds the instruction's length
to the PC, giving `valP`, the address of the next instruction.

**Decode** (`y86_decode_ctl`, `y86_regfile`). The register file has two read
ports. Which registers they read depends on the instruction, so `srcA` and
`srcB` are multiplexers controlled by `icode`:

| instruction              | srcA | srcB   |
|--------------------------|------|--------|
| halt, nop, jXX, irmovq   | none | none   |
| rrmovq / cmovXX          | rA   | none   |
| mrmovq                   | none | rB     |
| rmmovq, OPq              | rA   | rB     |
| call, ret                | none | %rsp   |
| pushq, popq              | rA   | %rsp   |

Reading register `F` returns 0.

**Execute** (`y86_exec_ctl`, `y86_alu`, `y86_cc`). The ALU does not always
operate on the two register values:

| instruction              | aluA  | aluB | ALU op | result `valE` |
|--------------------------|-------|------|--------|---------------|
| rrmovq / cmovXX          | valA  | 0    | add    | the moved value |
| irmovq                   | valC  | 0    | add    | the constant |
| rmmovq, mrmovq           | valC  | valB | add    | effective address `D + rB` |
| OPq                      | valA  | valB | ifun   | `rB op rA` |
| pushq, call              | 8     | valB | sub    | `%rsp - 8` |
| popq, ret                | 8     | valB | add    | `%rsp + 8` |

Subtract is `aluB - aluA`. Only `OPq` writes the condition codes ZF, SF and
OF. `Cnd` is computed from the codes stored *before* this instruction and from
`ifun`. It steers conditional jumps and conditional moves.

**Memory** (`y86_mem_ctl`, `y86_dmem`). Reads happen for `mrmovq`, `popq` and
`ret`. Writes happen for `rmmovq`, `pushq` and `call`. The address is usually
the ALU output. `popq` and `ret` are the exception: they read at the *old*
stack pointer, `valB`, while the ALU computes the new one. The write data is
usually `valA`. `call` is the exception: it writes the return address `valP`.

**Write back** (`y86_decode_ctl`, `y86_regfile`). There are two write ports,
`dstE ← valE` and `dstM ← valM`. `popq` needs both ports: one writes the
incremented `%rsp`, the other the popped value. A destination of `F`
disables a port.

| instruction            | dstE                   | dstM |
|------------------------|------------------------|------|
| rrmovq / cmovXX        | rB if Cnd, else F      | F    |
| irmovq, OPq            | rB                     | F    |
| mrmovq                 | F                      | rA   |
| call, ret, pushq       | %rsp                   | F    |
| popq                   | %rsp                   | rA   |

If both ports name the same register (`popq %rsp`), the memory value wins.

**PC update** (`y86_pc_update`). The next PC is `valP`, with three
exceptions. `call` takes `valC`. `jXX` takes `valC` when `Cnd` holds.
`ret` takes `valM`, the popped return address.

Because everything between the registers is combinational, the clock period
must cover the whole chain. That chain runs from the PC through both
memories, the register file and the ALU, and back to the register inputs.

## Stopping: the status register

`y86_seq` has a status output with four values: AOK (1), HLT (2), ADR (3)
and INS (4).

* `halt` stops the processor with HLT.
* An unknown `icode` stops it with INS.
* ADR stops it when the PC, or a data access, falls outside its memory.

The instruction that stops the processor changes no state, and the PC keeps
pointing at it. Once stopped, the processor stays stopped until `rst_n` is
pulsed.

## Times three: latency against throughput

`times3_comb` is two adders in series. A new input can enter only once the
previous result has settled, which takes two adder delays.

`times3_pipe` puts registers between the two adders:

```
a ─► [A] ─┬─► (A+A) ─► [2A] ─┐
          └──────────► [A ] ─┴─► (2A+A) ─► [3A] ─► y
```

The two stage-1 registers hold the *same* input's `2A` and `A`, so the
second adder always combines values of one input. The clock only has to
cover one adder. A new input enters every cycle, and `y` is `3*a` from three
clock edges earlier. Throughput rises at the cost of a longer latency.

## Files

| file | contents |
|------|----------|
| `rtl/y86_pkg.sv` | instruction codes, register numbers, ALU functions, condition codes, status codes |
| `rtl/y86_seq.sv` | the processor: PC and status registers, stage wiring |
| `rtl/y86_imem.sv`, `rtl/y86_fetch.sv` | fetch |
| `rtl/y86_regfile.sv`, `rtl/y86_decode_ctl.sv` | decode and write back |
| `rtl/y86_exec_ctl.sv`, `rtl/y86_alu.sv`, `rtl/y86_cc.sv` | execute |
| `rtl/y86_mem_ctl.sv`, `rtl/y86_dmem.sv` | memory |
| `rtl/y86_pc_update.sv` | PC update |
| `rtl/times3_comb.sv`, `rtl/times3_pipe.sv` | times three |
| `rtl/lecture_top.sv` | both designs side by side |
| `tb/y86_ref_pkg.sv` | testbench assembler and instruction-set reference model |
| `tb/tb_*.sv` | one self-checking testbench per module, plus the tests described below |

## Using the processor

Parameters:

* `IMEM_BYTES` (default 1024) sets the instruction memory size.
* `DMEM_BYTES` (default 1024) sets the data memory size.
* `T3_W` (default 32) sets the width of the times-three circuits.

To run a program:

1. Hold `run` low (`cpu_run` on `lecture_top`).
2. Write the program one byte per clock through `imem_we`, `imem_waddr` and
   `imem_wdata`.
3. Pulse `rst_n` low. It is asynchronous and active low, and clears the PC,
   the registers and the status, and sets the condition codes to ZF=1.
4. Raise `run`. One instruction retires on every rising edge while `run` is
   high and the status is AOK.

`dbg_reg`/`dbg_val` reads any register at any time. The data memory has no
reset, and its contents survive `rst_n`.

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Each has a watchdog. Build and run one with Verilator, for example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    --top-module tb_lecture_top rtl/y86_pkg.sv tb/y86_ref_pkg.sv tb/tb_lecture_top.sv
./obj_dir/Vtb_lecture_top
```

`-y rtl -y tb` lets Verilator find each module in the file of the same name;
the two packages are named first. `-Wno-fatal` keeps the width warnings of
the testbench code from stopping the build.

* `tb_y86_seq` assembles programs in the testbench with `y86_ref_pkg`. It
  runs them on the processor while an instruction-set model steps alongside.
  After every clock it compares the PC, the status, the condition codes and
  all fifteen registers. The programs are:
  * an array sum through call/ret;
  * twenty random straight-line programs;
  * three programs that stop with INS or ADR.

  It also checks that N instructions take exactly N cycles.
* `tb_seq_mux_exercises` stops on addq, rmmovq, irmovq, mrmovq, jle (taken
  and not), cmove (taken and not), ret, popq and call. For each, it checks
  inside the processor what every multiplexer selected.
* `tb_lecture_top` runs the whole top at default sizes: a program with an
  array sum, a recursive function, conditional moves and overflow, and two
  faulting programs. At the same time it streams values through both
  times-three circuits. It counts each mechanism (each instruction kind,
  taken and untaken conditions, halt, INS, ADR, both times-three circuits)
  and fails if any count is zero.
* The module testbenches compare each block with an independent reference:
  the ALU with 65-bit signed arithmetic, the register file and the memories
  with array models, and the control blocks with their tables.

## Where this design makes its own choices

The datapath structure and the multiplexer choices are the standard SEQ
organisation described above. The following are this design's own choices:

* **Memories.** The memory sizes, the program-load port and the
  little-endian 8-byte data access are this design's own. So are the two
  separate memories for instructions and data.
* **Status and reset.** The status register and the "faulting instruction
  changes nothing" rule are this design's own. So are the reset values.
* **Register file.** Reading register `F` returns 0, and the M port wins
  when both write ports name one register.
* **Conditions.** They use the full Y86-64 definitions with OF: le =
  (SF^OF)|ZF and l = SF^OF. A simplified drawing of this logic shows le as
  SF|ZF and l as SF, which agrees only when OF = 0.
* **Unused function codes.** `OPq` with a function code above 3 executes as
  add. `jXX`/`cmovXX` with a code above 6 are never taken. Neither is
  reported as an invalid instruction.
* **Register reads for popq and call.** `popq` reads `rA` on port A, but
  the value is unused. `call` reads nothing on port A.
* **ALU input B.** `aluB` has an explicit 0 input for the two move
  instructions.
* **Times three.** The 32-bit width and the absence of reset and
  valid bits in the pipelined version are this design's own. Its first three
  outputs after power-up are meaningless.
