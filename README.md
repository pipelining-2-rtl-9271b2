# Pipeline hazards in two small Y86-64-style processors

A pipelined processor starts an instruction every cycle, before the ones in
front of it have finished. When an instruction needs a register value that an
older, still-unfinished instruction is about to write, it would read the stale
copy from the register file. That is a *data hazard*. When the processor does
not yet know which instruction comes next, because a conditional jump has not
been evaluated, that is a *control hazard*.

This RTL builds two processors that show the standard hardware answers:

* **`addq_pipe`** is a four-stage processor (fetch, decode, execute,
  writeback) that only knows `addq`. It is small enough that every pipeline
  register can be read cycle by cycle. Data hazards are resolved either by
  **forwarding** (the default) or by **stalling**.
* **`y86_pipe`** is a five-stage processor (fetch, decode, execute, memory,
  writeback) for a subset of Y86-64: `halt`, `nop`, `rrmovq`, `irmovq`,
  `rmmovq`, `mrmovq`, `addq`/`subq`/`andq`/`xorq` and the conditional jumps.
  It forwards from three stages, stalls one cycle when a load is used right
  away, and holds a jump in fetch until its condition codes are final.

`top` puts the two side by side. They share only clock and reset.

The stage structure and the hazard mechanisms follow the course notes this
design is based on. Those notes give the worked examples reproduced in the
test benches. The following are choices made here, and each is listed under
"Departures and choices" below: the instruction encodings beyond `addq`, the
memory sizes, the halt behaviour, the exact stall signals, and the load and
inspection ports.

## Naming

Each stage reads the pipeline register in front of it and drives the inputs of
the next one:

* `D_rA` is the `rA` field of the fetch→decode register, as seen by decode.
* `d_dstE` is the `dstE` value that decode produces for the decode→execute
  register.
* `e_valE` is the adder output at the end of execute. `M_...`, `m_...`,
  `W_...` follow the same pattern.

Destination registers (`dstE` for ALU results, `dstM` for loaded values) are
worked out in decode and travel down the pipeline with the instruction.
`valE`/`valM` carry only the value that will be written there. Because of
this, every hazard check is just a comparison of 4-bit register numbers.
Register number `0xF` means "no register". It never matches a comparison,
reads as 0 and is never written. A *bubble*, the do-nothing value a stalled
stage sends forward, is a `nop` with all register fields `0xF`.

## The addq processor

```
 pc ─► instr mem ─► split ─► [fD: rA rB] ─► regfile read ─► fwd mux ─► [dE: valA valB dstE] ─► + ─► [eW: valE dstE] ─► regfile write
 pc+2 ◄┘                                        ▲                ▲                              │          │
                                                │                └──────── e_valE/e_dstE ────────┘          │
                                                └──────────────────────── W_valE/W_dstE ───────────────────┘
```

Every instruction is two bytes. Byte 1 holds `rA:rB` and the operation is
`R[rB] ← R[rA] + R[rB]`. Byte 0 is not decoded. The register file is written
at the end of the writeback cycle, so an instruction that decodes in that same
cycle would still read the old value.

Take `addq %r8,%r9 ; addq %r9,%r8` with `R[i] = 100·i`:

| cycle | pc | fD rA,rB | dE valA,valB,dstE | eW valE,dstE |
|------:|---:|---------|-------------------|--------------|
| 0 | 0 | – | – | – |
| 1 | 2 | 8, 9 | – | – |
| 2 | 4 | 9, 8 | 800, 900, 9 | – |
| 3 | 6 | – | **1700**, 800, 8 | 1700, 9 |
| 4 | 8 | – | – | 2500, 8 |

Without help, the second `addq` would latch 900 in cycle 3.

**Forwarding (`FORWARD = 1`).** In front of the decode→execute register,
each operand passes through a `fwd_mux`. The mux checks two sources in order:

1. Does the source register equal `e_dstE`? Then take the adder output
   `e_valE`. This catches the instruction one ahead.
2. Does it equal `W_dstE`? Then take `W_valE`. This catches the instruction
   two ahead, whose write has not landed yet.
3. Otherwise, take the register file output.

Dependent `addq`s then run back to back, and *n* instructions complete
*n* + 3 cycles after reset.

**Stalling (`FORWARD = 0`).** The fetch stage compares the fetched `rA`/`rB`
with the destination of the instruction in decode and of the one in execute.
On a match it keeps the pc and puts a bubble into fetch→decode. The dependent
instruction therefore waits two cycles and decodes in the cycle after the
producer's write:

| cycle | pc | fD | dE | eW |
|------:|---:|----|----|----|
| 1 | 2 (held) | 8, 9 | – | – |
| 2 | 2 (held) | bubble | 800, 900, 9 | – |
| 3 | 2 | bubble | bubble | 1700, 9 |
| 4 | 4 | 9, 8 | bubble | bubble |
| 5 | 6 | 10, 11 | 1700, 800, 8 | bubble |

## The five-stage processor

The stages are fetch (instruction memory, `y86_split`, pc logic), decode
(register file, two `fwd_mux`), execute (`y86_alu`, condition codes,
`y86_cond`), memory (`data_mem`) and writeback. The four pipeline registers
are `pipe_reg` instances holding the structs of `y86_pkg`.

### Forwarding

Each decode operand takes the first match in this list:

| order | condition | value | where it comes from |
|------:|-----------|-------|---------------------|
| 1 | `src == e_dstE` | `e_valE` | ALU result of the instruction one ahead |
| 2 | `src == M_dstM` | `m_valM` | data just read by a load two ahead |
| 3 | `src == M_dstE` | `M_valE` | ALU result two ahead |
| 4 | `src == W_dstM` | `W_valM` | load three ahead, not yet written |
| 5 | `src == W_dstE` | `W_valE` | ALU result three ahead, not yet written |
| – | otherwise | register file | |

The order matters. If several instructions in flight write the same register,
the youngest one wins. For example, in `addq %r10,%r8 ; addq %r11,%r8 ;
addq %r12,%r8` the third instruction must use the second one's `%r8`, not the
first one's.

### Load/use stall

A value loaded by `mrmovq` exists only at the end of the memory stage. If the
very next instruction needs it, forwarding alone cannot help. `y86_hazard`
detects this in decode: the load is in execute with `E_dstM` equal to
`d_srcA` or `d_srcB`. When that happens:

* fetch and decode hold for one cycle;
* a bubble goes into execute;
* in the next cycle the value is forwarded from the memory stage (row 2 above).

Each such pair costs one cycle.

### Jumps

A conditional jump is decided in **fetch**, from the condition codes (ZF, SF,
OF). Only `OPq` sets them, at the end of its execute cycle. So when a jump is
fetched while an `OPq` is still in decode or execute, the flags are not final
yet. In that case fetch holds the pc and sends a bubble into decode, once per
cycle, until the `OPq` has left execute.

When no `OPq` is pending, the jump is decided in the cycle it is fetched, and
the pc goes straight to the target or the fall-through address. The jump
itself then travels down the pipeline as a no-op.

For `subq %r8,%r9 ; je T` this gives:

| cycle | pc | what happens |
|------:|----|--------------|
| 0 | subq | fetched |
| 1 | je (held) | subq in decode: wait |
| 2 | je (held) | subq in execute: wait |
| 3 | je | flags final; pc ← T if ZF else fall-through |
| 4 | T or next | first instruction after the jump fetched |

The wait is two cycles when the `OPq` is right before the jump, one cycle
when it is two ahead, and none otherwise. Nothing is fetched speculatively, so
nothing is ever squashed. The condition codes reset to ZF=1, SF=0, OF=0.

### Halt and cycle count

`halt` keeps fetch at its own address. When it reaches writeback, every stage
freezes and `halted` goes high. A program that executes *n* instructions
before its `halt`, with no stalls, shows `halted` *n* + 5 cycles after reset
is released. Each load/use pair adds one cycle, and each jump adds its wait
(0 to 2 cycles). The test bench checks the exact count for every program.

## Modules

| module | role |
|--------|------|
| `y86_pkg` | word and register types, icodes, pipeline-register structs and their bubble values |
| `top` | both processors; `aq_*` and `y_*` ports |
| `addq_pipe` | four-stage addq processor, parameter `FORWARD` |
| `y86_pipe` | five-stage processor |
| `pipe_reg` | pipeline register with `stall` (hold), `bubble` (load `BUBBLE`) and reset to `BUBBLE`; `stall` wins |
| `regfile` | 15 × 64-bit registers plus the "none" register; reads A/B; writes E/M at the clock edge; `dstM` wins if both writes name the same register |
| `fwd_mux` | N-way priority forwarding mux, index 0 = youngest |
| `instr_mem` | byte memory with a `FETCH_BYTES`-wide window at the pc (2 for addq, 10 for Y86) |
| `y86_split` | icode/ifun/rA/rB/valC, valP = pc + length, `valid` |
| `y86_alu` | `aluB OP aluA` for add/sub/and/xor, with ZF/SF/OF |
| `y86_cond` | jump decision for jmp, jle, jl, je, jne, jge, jg |
| `data_mem` | 8-byte little-endian loads/stores; read and write enables decoded from the memory-stage icode |
| `y86_hazard` | stall/bubble control for load/use, jumps waiting for flags, and halt; `jump_go` when a fetched jump may be decided |

Instruction encodings are standard Y86-64. Byte 0 is `icode:ifun`. Byte 1 is
`rA:rB` where there are register fields. An 8-byte little-endian constant
follows it for `irmovq`/`rmmovq`/`mrmovq`, or follows byte 0 directly for
jumps. Memory operands with base register `0xF` use the constant alone as the
address.

### Interfaces and timing

* Everything is synchronous to `clk`. `rst` is synchronous and active high:
  pc = 0, all pipeline registers hold bubbles, and the condition codes and
  `halted` are cleared.
* Memories and register files are not reset. Load them through the `*_ld_*`
  ports, which work during reset: one byte per cycle for instruction memory,
  one register per cycle, and eight bytes per cycle for data memory.
* `*_dbg_*` ports read registers or data memory combinationally.
* Instruction memory, register file and data memory all read combinationally
  within the stage. Writes land at the clock edge.
* The `ev_*` outputs pulse in each cycle where a mechanism acts: forwarding
  from each stage, stalls, taken jumps and memory accesses.
* `addq_pipe` also exposes its pipeline registers (`D_q`, `E_q`, `W_q`) and pc.

Defaults: 64-bit words, 256-byte instruction memory, 256-byte data memory
(`IMEM_DEPTH`, `DMEM_DEPTH`, both powers of two; addresses wrap).

## Simulating

Each test bench is self-checking and ends with a `TB_RESULT checks=N
failures=M` line. For example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/y86_pkg.sv tb/tb_y86_pipe.sv --top-module tb_y86_pipe
./obj_dir/Vtb_y86_pipe
```

| bench | what it establishes |
|-------|---------------------|
| `tb_addq_pipe` | the cycle tables above, for both forwarding and stalling; forwarding from writeback; 20 random addq programs against a sequential model; *n*+3-cycle completion with forwarding |
| `tb_y86_pipe` | directed programs for each forwarding path, youngest-wins, load/use, je taken and not taken, mixed add/sub/xor/and; 150 random programs with loads, stores and forward jumps, checked for registers, all of data memory and the exact cycle count |
| `tb_top` | both processors through the top, including a second top with stalling; requires every mechanism to occur |
| `tb_top_full` | the top at its default parameters, one program per processor |
| `tb_regfile`, `tb_instr_mem`, `tb_fwd_mux`, `tb_pipe_reg`, `tb_y86_split`, `tb_y86_alu`, `tb_y86_cond`, `tb_data_mem`, `tb_y86_hazard` | each unit against an independent model |

The random-program benches use `$urandom`. Their reference models are plain
sequential interpreters written inside the bench.

## Departures and choices

* **Instructions.** `call`, `ret`, `pushq`, `popq` and conditional moves are
  not built. The stack-pointer paths and the pc+9 return-address path they
  would need are left out. Unknown icodes act as a one-byte `nop` and set
  `invalid_instr`.
* **Branch handling** is stall-only: a jump waits in fetch for its flags.
  There is no prediction and no squashing. A fetch-stage decision makes the
  fetch path longer (condition evaluation and a 64-bit mux before the pc).
* **Word width and sizes.** 64-bit words and 256-byte memories are choices
  made here. A jump target outside the 256-byte instruction memory wraps.
* **Timing.** No delays are modelled. The clock-period argument (the slowest
  stage sets the period, plus pipeline-register overhead) is about gate delays
  and does not appear in this RTL.
* **Stalling in the addq processor** is detected in fetch, against decode and
  execute, which gives exactly two bubbles for a back-to-back dependency. In
  the five-stage processor, the load/use stall is detected in decode.
* **Test access.** The load/inspection ports and event outputs are additions
  for testing. Tie the load enables low in a real system.
