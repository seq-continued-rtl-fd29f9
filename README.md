# Y86-64 SEQ: a single-cycle processor

SEQ executes one whole Y86-64 instruction per clock cycle. Y86-64 is a
small 64-bit instruction set modelled on x86-64. Between two clock edges,
combinational logic reads the instruction at PC and works out everything
the instruction does: the registers it reads, the ALU operation, the memory
access, the registers it writes and the next PC. At the clock edge, every
state element takes its new value at once: the PC, the register file, the
condition codes, the data memory and the status register. There is no
pipeline, so there are no hazards, stalls or forwarding. The design is
mainly a question of which value each multiplexer selects for each
instruction, and most of what follows is about that.

## The instruction set

All values are 64 bits. There are 15 registers, numbered 0-14. Register
number `0xF` means "no register". Register 4 is `%rsp`, the stack pointer.
Instructions are 1 to 10 bytes long. Byte 0 holds `icode:ifun`. Byte 1, if
present, holds `rA:rB`. An 8-byte little-endian constant `valC` follows.

| icode | instruction            | bytes                     | length |
|-------|------------------------|---------------------------|--------|
| 0     | `halt`                 | `00`                      | 1 |
| 1     | `nop`                  | `10`                      | 1 |
| 2     | `rrmovq rA, rB` / `cmovXX` | `2 fn rA rB`          | 2 |
| 3     | `irmovq V, rB`         | `30 F rB V`               | 10 |
| 4     | `rmmovq rA, D(rB)`     | `40 rA rB D`              | 10 |
| 5     | `mrmovq D(rB), rA`     | `50 rA rB D`              | 10 |
| 6     | `OPq rA, rB` (add 0, sub 1, and 2, xor 3) | `6 fn rA rB` | 2 |
| 7     | `jXX Dest`             | `7 fn Dest`               | 9 |
| 8     | `call Dest`            | `80 Dest`                 | 9 |
| 9     | `ret`                  | `90`                      | 1 |
| A     | `pushq rA`             | `A0 rA F`                 | 2 |
| B     | `popq rA`              | `B0 rA F`                 | 2 |

The condition functions for `jXX` and `cmovXX` are: 0 always, 1 le, 2 l,
3 e, 4 ne, 5 ge, 6 g. They are evaluated on the condition codes ZF, SF
and OF. Only `OPq` sets the codes. `OPq` computes `rB = rB op rA`, so
`subq rA, rB` gives `rB - rA`.

## One cycle, six steps

The names below are the signal names in the RTL (`rtl/seq_cpu.sv`).

1. **Fetch** (`imem`, `fetch_split`). Read 10 bytes at `pc`. Split them
   into `icode`, `ifun`, `ra`, `rb` and `valc`. Compute the length from the
   icode, and `valp = pc + length`. Flag unknown opcodes (`instr_valid`).
2. **Decode** (`decode_ctl`, `regfile`). Choose `src_a` and `src_b`, then
   read `vala = R[src_a]` and `valb = R[src_b]`.
3. **Execute** (`exec_ctl`, `alu`, `cc_cond`). Choose the ALU operands
   `alu_a` and `alu_b` and compute `vale`. Evaluate the condition `cnd`
   on the codes held *before* this instruction. An `OPq` also loads new
   codes at the clock edge.
4. **Memory** (`mem_ctl`, `dmem`). Read or write 8 bytes at `mem_addr`.
   A read gives `valm`.
5. **Write back** (`decode_ctl`, `regfile`). Write `vale` to `dst_e` and
   `valm` to `dst_m`. A destination of `0xF` disables that write.
6. **PC update** (`pc_update`). Select `new_pc`.

Steps 1-6 are one combinational path from the PC register back to itself.
Nothing is registered in between.

## The multiplexer settings

This table is the core of the design. A dash means "not used" (`0xF` for a
register number, no access for memory).

| instruction | srcA | srcB | dstE | dstM | aluA | aluB | memory | address | data | new PC |
|---|---|---|---|---|---|---|---|---|---|---|
| halt, nop | - | - | - | - | - | - | - | | | valP |
| rrmovq / cmovXX | rA | - | rB if cnd | - | valA | 0 | - | | | valP |
| irmovq | - | - | rB | - | valC | 0 | - | | | valP |
| rmmovq | rA | rB | - | - | valC | valB | write | valE | valA | valP |
| mrmovq | - | rB | - | rA | valC | valB | read | valE | | valP |
| OPq | rA | rB | rB | - | valA | valB | - | | | valP |
| jXX | - | - | - | - | - | - | - | | | valC if cnd, else valP |
| call | - | %rsp | %rsp | - | -8 | valB | write | valE | valP | valC |
| ret | - | %rsp | %rsp | - | +8 | valB | read | valB | | valM |
| pushq | rA | %rsp | %rsp | - | -8 | valB | write | valE | valA | valP |
| popq | rA | %rsp | %rsp | rA | +8 | valB | read | valB | | valP |

Points that are easy to get wrong:

- **Moves go through the ALU.** `rrmovq` and `irmovq` add their value to
  0, so every register result except a memory load arrives on the E write
  port.
- **`popq` needs both write ports.** `%rsp` gets `valE` (old `%rsp` + 8)
  and `rA` gets `valM`. If `rA` is `%rsp`, the M port wins, so
  `popq %rsp` loads the popped value.
- **`popq` and `ret` read at the old stack pointer.** `vale` already holds
  `%rsp + 8`, so the address comes from `valb` instead. `valb` is `%rsp`,
  read through the srcB port. For these two instructions the srcA port
  reads `rA` or nothing; it does not read `%rsp` as the textbook version of
  SEQ does.
- **`call` writes its return address.** The data written is `valP`, not
  `valA`.
- **A conditional move that fails disables its write.** It does so by
  setting `dst_e` to `0xF`, as if it had no destination.

## Stopping: the status register

`stat` is AOK (1), HLT (2), ADR (3) or INS (4). The status of the current
instruction is set by the first rule that applies:

1. ADR if `pc` is outside instruction memory.
2. INS if the opcode or function code is undefined.
3. ADR if its data access falls outside data memory.
4. HLT for `halt`.
5. AOK otherwise.

An instruction whose status is not AOK changes only `stat`. The PC stays
at that instruction's address, and registers, codes and memory are left
alone. After that the processor does nothing until reset. So a program
whose `halt` sits at address 0x1e ends with `pc = 0x1e`.

## Interface and timing of `seq_cpu`

| port | dir | width | |
|---|---|---|---|
| `clk` | in | 1 | all state changes on the rising edge |
| `rst_n` | in | 1 | synchronous, active low: PC 0, Stat AOK, registers 0, codes Z=1 S=0 O=0 |
| `run` | in | 1 | one instruction per cycle while high |
| `load_en`, `load_addr`, `load_data` | in | 1, 64, 8 | write one byte into both memories; use while `run` is low |
| `stat` | out | 3 | status register |
| `pc` | out | 64 | PC register |
| `cc` | out | 3 | `{ZF, SF, OF}` |
| `dbg_reg` / `dbg_reg_val` | in/out | 4 / 64 | combinational read of one register |
| `dbg_addr` / `dbg_mem_val` | in/out | 64 / 64 | combinational read of one data-memory word |

The parameter `MEM_BYTES` sets the size of each memory. It defaults to 8192
bytes. Instruction memory and data memory are separate arrays. The load
port writes the program image into both, so data that is part of the image
can be read by the program. Stores go only to data memory, so a program
cannot modify its own code.

To run a program: hold `rst_n` low, load the image byte by byte, release
reset, and raise `run`. Then wait until `stat` is no longer AOK. The
number of cycles equals the number of instructions executed, counting the
final `halt`.

## Where this design makes its own choices

The structure follows the classic SEQ organisation: the stage division,
the srcA/srcB table, 0xF as write disable, the ALU operand sources, the
memory address and data exceptions, the next-PC choices, and 15 registers
with two read and two write ports. The following are choices made here:

- **Conditions use OF.** `le` is `(SF^OF)|ZF` and `l` is `SF^OF`, as in
  the full Y86-64 definition. A simpler drawing of this logic shows
  `SF|ZF` and `SF`. The two agree unless the last `OPq` overflowed.
- **Memory size and byte order.** 8192 bytes per memory and little-endian
  words. Reads are combinational. An access is legal only if all 8 bytes
  are inside the array.
- **Function codes are checked.** An undefined `ifun` (for example `OPq`
  with `ifun` 4) gives INS, not just an undefined `icode`.
- **Reset values and halt behaviour** are as described above. The reset
  values of the codes match what a program that sets no codes ends with.
- **Test ports.** `run`, the load port and the debug read ports exist for
  simulation and bring-up.
- **Write enables depend on status.** The data-memory write enable is split
  into a request (`we`) and a qualifier (`commit`). This way the address
  error check does not depend on the write decision, which would otherwise
  form a combinational loop through the status logic.

## Files

`rtl/`:

- `y86_pkg.sv`: opcodes, codes and types.
- `seq_cpu.sv`: the top; holds the PC and Stat registers.
- `imem.sv`, `fetch_split.sv`, `decode_ctl.sv`, `regfile.sv`,
  `exec_ctl.sv`, `alu.sv`, `cc_cond.sv`, `mem_ctl.sv`, `dmem.sv`,
  `pc_update.sv`, `stat_logic.sv`: one file per step or unit.

`tb/`:

- `<module>_tb.sv`: one self-checking bench per module.
- `seq_cpu_tb.sv`: the end-to-end test. It has a small assembler and an
  instruction-level reference model written independently of the RTL. It
  compares PC, status, codes and all registers after every cycle, and all
  of data memory at the end. It runs:
  - an array sum and maximum (call/ret, push/pop, loops, `cmovg`);
  - three random 400-instruction streams;
  - programs that end in INS, in a data ADR and in a fetch ADR.

  It counts each opcode, taken and not-taken jumps and moves, and each
  stop reason, and fails if any of them never happened.
- `seq_mux_tb.sv`: for `addq`, `rmmovq`, `irmovq`, `mrmovq`, `jle`,
  `cmovle`, `call`, `pushq`, `popq` and `ret`, checks the internal
  multiplexer outputs against the table above. It also runs a
  nop-and-jump program that must halt at 0x1e after exactly 7 cycles with
  codes Z=1 S=0 O=0.

Every bench prints `TB_RESULT checks=N failures=M` at the end. Each runs
in well under a second.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal \
    rtl/y86_pkg.sv rtl/*.sv tb/seq_cpu_tb.sv --top-module seq_cpu_tb
./obj_dir/Vseq_cpu_tb
```

For a unit bench, list the package, the module and its bench, for example
`rtl/y86_pkg.sv rtl/alu.sv tb/alu_tb.sv --top-module alu_tb`. To run your
own program, copy `seq_cpu_tb.sv`. Build the image with its assembler
tasks (`a_ir` for irmovq, `a_rm`, `a_mr`, `a_op`, `a_j`, `a_call`, and so
on) and call `run_program`. The reference model then
checks the run for you.
